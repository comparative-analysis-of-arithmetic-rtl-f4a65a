// kara_combine: the addition network of one Karatsuba level, shared by the
// recursive and the iterative multiplier.
//
// For N-digit operands split into halves of H = N/2 digits,
//   a = aL + aH*2^H,  b = bL + bH*2^H,
//   sa = aL + aH,     sb = bL + bH       (H+1 digits each, carry digit on top)
// the middle product (sa)(sb) is not formed by an unbalanced (H+1)-digit
// multiplier. Only the low H digits of sa and sb go through an H-digit
// multiplier (pm); the carry digits are handled here:
//   (sa)(sb) = pm + (sa_c*sb_lo + sb_c*sa_lo)*2^H + (sa_c*sb_c)*2^(2H)
// where each cross term is the other sum's low part, negated or dropped
// according to the carry digit, and sa_c*sb_c comes from a one-digit
// multiplier. The product is then
//   a*b = pl + ((sa)(sb) - ph - pl)*2^H + ph*2^N
// with pl = aL*bL and ph = aH*bH.
// All additions are carry-free RSD additions arranged as a tree of depth 3 for
// the middle term plus two for the final sum; each addition widens its result by
// one digit, which sets the output width kara_digits(N).
// Interface: pl, ph, pm (W digits, W = kara_digits(N/2)), sa, sb (H+1 digits) in;
// p (kara_digits(N) digits) out. Combinational.
module kara_combine
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd_t [kara_digits(N/2)-1:0] pl,
  input  sd_t [kara_digits(N/2)-1:0] ph,
  input  sd_t [kara_digits(N/2)-1:0] pm,
  input  sd_t [N/2:0]                sa,
  input  sd_t [N/2:0]                sb,
  output sd_t [kara_digits(N)-1:0]   p
);

  localparam int H  = N / 2;
  localparam int W  = kara_digits(N / 2);
  localparam int G0 = (W > 2 * H + 1) ? W : 2 * H + 1;   // middle-term operand width
  localparam int R0 = N + W;                              // pl + ph*2^N operand width
  localparam int F0 = (R0 + 1 > H + G0 + 3) ? R0 + 1 : H + G0 + 3;  // final operand width

  sd_t          cc;                 // sa_c * sb_c
  sd_t [G0-1:0] core, cross_a, cross_b, carry_t, neg_ph, neg_pl;
  sd_t [G0:0]   p1, p2, p3;
  sd_t [G0+1:0] q, p3_ext;
  sd_t [G0+2:0] g;
  sd_t [R0-1:0] lo_op, hi_op;
  sd_t [R0:0]   r1;
  sd_t [F0-1:0] f_a, f_b;

  rsd_digit_mul u_cc (.a(sa[H]), .b(sb[H]), .y(cc));

  always_comb begin
    core    = '0;
    cross_a = '0;
    cross_b = '0;
    carry_t = '0;
    neg_ph  = '0;
    neg_pl  = '0;
    core[W-1:0] = pm;
    for (int i = 0; i < H; i++) begin
      // sa_c * sb_lo and sb_c * sa_lo: select, negate or drop
      if (sd_is_pos(sa[H]))      cross_a[H+i] = sb[i];
      else if (sd_is_neg(sa[H])) cross_a[H+i] = sd_neg(sb[i]);
      if (sd_is_pos(sb[H]))      cross_b[H+i] = sa[i];
      else if (sd_is_neg(sb[H])) cross_b[H+i] = sd_neg(sa[i]);
    end
    carry_t[2*H] = cc;
    for (int i = 0; i < W; i++) begin
      neg_ph[i] = sd_neg(ph[i]);
      neg_pl[i] = sd_neg(pl[i]);
    end
    p3_ext = '0;
    p3_ext[G0:0] = p3;
    lo_op = '0;
    hi_op = '0;
    lo_op[W-1:0] = pl;
    hi_op[R0-1:N] = ph;
    f_a = '0;
    f_b = '0;
    f_a[R0:0] = r1;
    f_b[H+G0+2:H] = g;
  end

  // middle term: (sa)(sb) - ph - pl
  rsd_adder #(.N(G0))   u_p1 (.x(core),    .y(cross_a), .s(p1));
  rsd_adder #(.N(G0))   u_p2 (.x(cross_b), .y(carry_t), .s(p2));
  rsd_adder #(.N(G0))   u_p3 (.x(neg_ph),  .y(neg_pl),  .s(p3));
  rsd_adder #(.N(G0+1)) u_q  (.x(p1),      .y(p2),      .s(q));
  rsd_adder #(.N(G0+2)) u_g  (.x(q),       .y(p3_ext),  .s(g));
  // outer terms pl + ph*2^N, then the middle term at 2^H
  rsd_adder #(.N(R0))   u_r1 (.x(lo_op),   .y(hi_op),   .s(r1));
  rsd_adder #(.N(F0))   u_f  (.x(f_a),     .y(f_b),     .s(p));

endmodule
