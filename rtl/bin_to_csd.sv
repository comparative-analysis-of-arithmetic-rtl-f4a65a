// bin_to_csd: recodes an N-bit unsigned binary number into canonical signed
// digit (CSD) form, the signed-digit spelling with the fewest non-zero digits,
// in which no two adjacent digits are both non-zero.
//
// Standard CSD recoding with a carry c (c_0 = 0), scanning from the LSB:
//   c_{i+1} = 1 when b_i + b_{i+1} + c_i >= 2
//   d_i     = b_i + c_i - 2*c_{i+1}          (in {-1, 0, +1})
// and digit N is the final carry. A run of ones 0111 becomes 100(-1). Numbers
// whose CSD needs N+1 digits (a non-zero digit N) exist: 255 -> 1000000(-1).
// The design description defines CSD (minimal non-zero digits, unique) and
// feeds CSD operands to the same adders; how the recoding is done is not given,
// and this is the usual way.
// The top digit is a carry and can only be 0 or +1, so its negative wire
// d[N].n is the constant 0.
// Interface: b (N bits) in; d (N+1 digits) out. Combinational; the carry runs
// through all N positions.
module bin_to_csd
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] b,
  output sd_t  [N:0]   d
);

  logic [N:0] bx;   // b with a zero above its MSB

  always_comb begin
    logic cin, cout;
    bx  = {1'b0, b};
    cin = 1'b0;
    for (int i = 0; i < N; i++) begin
      cout = (bx[i] & bx[i+1]) | (bx[i] & cin) | (bx[i+1] & cin);
      // d_i = b_i + c_i - 2 c_{i+1}: +1 for an odd sum with no carry out,
      // -1 for an odd sum with a carry out
      d[i].p = (bx[i] ^ cin) & ~cout;
      d[i].n = (bx[i] ^ cin) &  cout;
      cin    = cout;
    end
    d[N].p = cin;
    d[N].n = 1'b0;
  end

endmodule
