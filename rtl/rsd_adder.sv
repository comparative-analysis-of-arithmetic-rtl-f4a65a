// rsd_adder: carry-free addition of two N-digit signed-digit vectors.
//
// Two layers, no carry chain. Layer 1 looks at each digit position i: it forms
// the position sum x_i + y_i in {-2..2} and splits it into a transfer digit
// t_{i+1} (sent one position up) and an interim sum w_i. For the sums +1 and -1
// the split depends on whether the pair one position down (x_{i-1}, y_{i-1})
// holds a negative digit; the choice makes sure the incoming transfer t_i can
// never push w_i + t_i out of {-1, 0, +1}:
//   sum  2      -> t= 1, w= 0
//   sum  1      -> t= 1, w=-1 if lower pair has no -1, else t= 0, w= 1
//   sum  0      -> t= 0, w= 0
//   sum -1      -> t= 0, w=-1 if lower pair has no -1, else t=-1, w= 1
//   sum -2      -> t=-1, w= 0
// Layer 2 adds the interim sum and the incoming transfer, s_i = w_i + t_i, which
// cannot overflow. Every output digit depends on input positions i, i-1 and i-2
// only, so the delay is independent of N. The result has N+1 digits; digit N is
// the last transfer. The two-layer structure and the "layer 1 prevents overflow
// in layer 2" rule follow the design description; the transfer table above is
// the classic radix-2 signed-digit rule chosen to meet it.
//
// Interface: x, y (N digits, any spelling including (1,1)); s (N+1 digits, never
// (1,1)). Purely combinational.
module rsd_adder
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd_t [N-1:0] x,
  input  sd_t [N-1:0] y,
  output sd_t [N:0]   s
);

  // transfer into position i (t[0] = 0) and interim sum at position i,
  // both as small signed integers
  logic signed [1:0] t [0:N];
  logic signed [1:0] w [0:N-1];

  function automatic logic signed [1:0] dval(sd_t d);
    return $signed({1'b0, d.p}) - $signed({1'b0, d.n});
  endfunction

  function automatic sd_t denc(logic signed [2:0] v);
    sd_t r;
    r.p = (v == 3'sd1);
    r.n = (v == -3'sd1);
    return r;
  endfunction

  // layer 1: interim sum and transfer
  always_comb begin
    logic signed [2:0] sum;
    logic              low_neg;
    t[0] = 2'sd0;
    for (int i = 0; i < N; i++) begin
      sum = 3'(dval(x[i])) + 3'(dval(y[i]));
      if (i == 0) low_neg = 1'b0;
      else        low_neg = sd_is_neg(x[i-1]) | sd_is_neg(y[i-1]);
      unique case (sum)
        3'sd2:  begin t[i+1] = 2'sd1;  w[i] = 2'sd0;  end
        3'sd1:  begin
          if (low_neg) begin t[i+1] = 2'sd0; w[i] = 2'sd1;  end
          else         begin t[i+1] = 2'sd1; w[i] = -2'sd1; end
        end
        -3'sd1: begin
          if (low_neg) begin t[i+1] = -2'sd1; w[i] = 2'sd1;  end
          else         begin t[i+1] = 2'sd0;  w[i] = -2'sd1; end
        end
        -3'sd2: begin t[i+1] = -2'sd1; w[i] = 2'sd0;  end
        default: begin t[i+1] = 2'sd0; w[i] = 2'sd0;  end
      endcase
    end
  end

  // layer 2: final digit, never out of range
  always_comb begin
    for (int i = 0; i < N; i++) s[i] = denc(3'(w[i]) + 3'(t[i]));
    s[N] = denc(3'(t[N]));
  end

endmodule
