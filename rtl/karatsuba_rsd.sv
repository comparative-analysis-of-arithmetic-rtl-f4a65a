// karatsuba_rsd: recursive Karatsuba-Ofman multiplier for N-digit signed-digit
// operands (N a power of two), fully combinational.
//
// At every level the operands split into low and high halves. The low halves
// are multiplied by one half-size multiplier, the high halves by a second one.
// The half sums sa = aL + aH and sb = bL + bH come from carry-free RSD adders
// and have one digit more than a half; a third half-size multiplier takes only
// their low digits, and kara_combine deals with the two carry digits (cross
// terms and a one-digit product) and adds everything up. The recursion ends at
// one digit, where rsd_digit_mul forms the product.
//
// The recursion tree is unrolled level by level instead of by a module that
// instantiates itself: level k holds 3^k nodes of N/2^k digits. Going down,
// each node's operands are read from its parent (low halves, high halves or
// the low digits of the parent's half sums). Going up, each node combines the
// three products of its children. Level log2(N) holds the 3^log2(N) one-digit
// products. The product is exact, not reduced by any modulus, and is spelled in
// kara_digits(N) digits (24 for N = 8).
//
// The split, the three sub-multipliers, the carry handling of the middle sums
// and the one-digit multiplier follow the design description; the order of the
// additions in kara_combine and the unrolled form are this implementation's own.
// Interface: a, b (N digits) in; p (kara_digits(N) digits) out.
module karatsuba_rsd
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd_t [N-1:0]              a,
  input  sd_t [N-1:0]              b,
  output sd_t [kara_digits(N)-1:0] p
);

  localparam int LV = $clog2(N);

  for (genvar k = 0; k <= LV; k++) begin : g_lvl
    localparam int S = N >> k;          // digits per operand at this level
    localparam int C = 3 ** k;          // nodes at this level
    localparam int W = kara_digits(S);  // product digits at this level

    sd_t [S-1:0] opa  [C];
    sd_t [S-1:0] opb  [C];
    sd_t [W-1:0] prod [C];

    for (genvar j = 0; j < C; j++) begin : g_node
      // operands of this node
      if (k == 0) begin : g_root
        assign opa[j] = a;
        assign opb[j] = b;
      end else if (j % 3 == 0) begin : g_low
        assign opa[j] = g_lvl[k-1].opa[j/3][S-1:0];
        assign opb[j] = g_lvl[k-1].opb[j/3][S-1:0];
      end else if (j % 3 == 1) begin : g_high
        assign opa[j] = g_lvl[k-1].opa[j/3][2*S-1:S];
        assign opb[j] = g_lvl[k-1].opb[j/3][2*S-1:S];
      end else begin : g_mid
        assign opa[j] = g_lvl[k-1].g_node[j/3].g_split.sa[S-1:0];
        assign opb[j] = g_lvl[k-1].g_node[j/3].g_split.sb[S-1:0];
      end

      // product of this node
      if (k == LV) begin : g_leaf
        rsd_digit_mul u_mul (.a(opa[j][0]), .b(opb[j][0]), .y(prod[j][0]));
      end else begin : g_split
        localparam int H = S / 2;
        sd_t [H:0] sa, sb;

        rsd_adder #(.N(H)) u_sa (.x(opa[j][H-1:0]), .y(opa[j][S-1:H]), .s(sa));
        rsd_adder #(.N(H)) u_sb (.x(opb[j][H-1:0]), .y(opb[j][S-1:H]), .s(sb));

        kara_combine #(.N(S)) u_comb (
          .pl(g_lvl[k+1].prod[3*j]),
          .ph(g_lvl[k+1].prod[3*j+1]),
          .pm(g_lvl[k+1].prod[3*j+2]),
          .sa(sa), .sb(sb), .p(prod[j])
        );
      end
    end
  end

  assign p = g_lvl[0].prod[0];

endmodule
