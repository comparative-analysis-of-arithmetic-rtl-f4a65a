// rsd_mod_sub: modular subtraction S = (X - Y) mod M on N-digit signed-digit
// operands. Negating a signed-digit vector is free: the positive and negative
// components of every digit of Y swap places. The negated Y then goes through
// the three-level modular adder, exactly as the design description prescribes
// ("the same algorithm, inverting the operand to be subtracted").
// Interface and result range as rsd_mod_adder: x, y, m (N digits) in; s (N+3
// digits) out, congruent to X - Y modulo M. Combinational.
module rsd_mod_sub
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd_t [N-1:0] x,
  input  sd_t [N-1:0] y,
  input  sd_t [N-1:0] m,
  output sd_t [N+2:0] s
);

  sd_t [N-1:0] y_neg;

  always_comb begin
    for (int i = 0; i < N; i++) y_neg[i] = sd_neg(y[i]);
  end

  rsd_mod_adder #(.N(N)) u_add (.x(x), .y(y_neg), .m(m), .s(s));

endmodule
