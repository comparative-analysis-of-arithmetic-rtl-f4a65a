// karatsuba_iter: iterative Karatsuba multiplier for N-digit signed-digit
// operands. It computes the same product as karatsuba_rsd but owns a single
// N/2-digit Karatsuba multiplier (karatsuba_rsd #(N/2)) and uses it three times
// in a row instead of instantiating three, trading two thirds of the
// sub-multiplier area for latency.
//
// Schedule, one sub-product per clock:
//   LOW  : pl = aL * bL
//   HIGH : ph = aH * bH
//   MID  : pm = lo(sa) * lo(sb), sa = aL + aH and sb = bL + bH (carry-free RSD)
//   FIN  : p  = kara_combine(pl, ph, pm, sa, sb), registered; done pulses
// The design description names the iterative Karatsuba multiplier next to the
// recursive one without giving its schedule; this three-pass reuse of one
// half-size multiplier, the handshake and the reset are this design's choices.
//
// Interface: start (one cycle, accepted while busy is low) with a, b; done is a
// one-cycle pulse with p valid from then until the next accepted start.
// Timing: done is high in the 4th cycle after the cycle in which start was
// accepted (LATENCY = 4). Reset is synchronous, active high.
module karatsuba_iter
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  sd_t [N-1:0]               a,
  input  sd_t [N-1:0]               b,
  output logic                      busy,
  output logic                      done,
  output sd_t [kara_digits(N)-1:0]  p
);

  localparam int H = N / 2;
  localparam int W = kara_digits(N / 2);

  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_MID, S_FIN} state_e;

  state_e                   state;
  sd_t [N-1:0]              a_q, b_q;
  sd_t [H:0]                sa, sb;
  sd_t [H-1:0]              op_a, op_b;
  sd_t [W-1:0]              core_p, pl_q, ph_q, pm_q;
  sd_t [kara_digits(N)-1:0] p_comb;

  rsd_adder #(.N(H)) u_sa (.x(a_q[H-1:0]), .y(a_q[N-1:H]), .s(sa));
  rsd_adder #(.N(H)) u_sb (.x(b_q[H-1:0]), .y(b_q[N-1:H]), .s(sb));

  // operand multiplexer of the shared half-size multiplier
  always_comb begin
    unique case (state)
      S_HIGH:  begin op_a = a_q[N-1:H]; op_b = b_q[N-1:H]; end
      S_MID:   begin op_a = sa[H-1:0];  op_b = sb[H-1:0];  end
      default: begin op_a = a_q[H-1:0]; op_b = b_q[H-1:0]; end
    endcase
  end

  karatsuba_rsd #(.N(H)) u_core (.a(op_a), .b(op_b), .p(core_p));

  kara_combine #(.N(N)) u_comb (
    .pl(pl_q), .ph(ph_q), .pm(pm_q), .sa(sa), .sb(sb), .p(p_comb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
      pl_q  <= '0;
      ph_q  <= '0;
      pm_q  <= '0;
      p     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          state <= S_LOW;
        end
        S_LOW:  begin pl_q <= core_p; state <= S_HIGH; end
        S_HIGH: begin ph_q <= core_p; state <= S_MID;  end
        S_MID:  begin pm_q <= core_p; state <= S_FIN;  end
        S_FIN:  begin p <= p_comb; done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // done is a single-cycle pulse and never coincides with a running pass
  a_done_pulse : assert property (@(posedge clk) disable iff (rst) done |=> !done);
  a_done_idle  : assert property (@(posedge clk) disable iff (rst) done |-> !busy);

endmodule
