// rsd_digit_mul: product of two signed digits, {-1,0,+1} x {-1,0,+1}.
//
// It is the one-digit multiplier of the Karatsuba tree: it forms the leaf
// products of the recursion and multiplies the two carry digits of the middle
// sums. The inputs are first cleaned so that the redundant zero (1,1) counts as
// 0; the product is +1 when the signs agree and -1 when they differ.
// Interface: a, b in; y out, one digit each. Purely combinational.
module rsd_digit_mul
  import rsd_pkg::*;
(
  input  sd_t a,
  input  sd_t b,
  output sd_t y
);

  logic ap, an, bp, bn;

  always_comb begin
    ap  = sd_is_pos(a);
    an  = sd_is_neg(a);
    bp  = sd_is_pos(b);
    bn  = sd_is_neg(b);
    y.p = (ap & bp) | (an & bn);
    y.n = (ap & bn) | (an & bp);
  end

endmodule
