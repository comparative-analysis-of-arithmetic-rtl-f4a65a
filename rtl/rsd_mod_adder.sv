// rsd_mod_adder: modular addition S = (X + Y) mod M on N-digit signed-digit
// operands, built from three carry-free RSD adders in a row.
//
//   level 1: T1 = X + Y                        (N+1 digits)
//   level 2: T2 = T1 - M if T1[N] = +1,
//            T2 = T1 + M if T1[N] = -1, else T2 = T1 + 0   (N+2 digits)
//   level 3: T3 = T2 - M if T2[N] = +1,
//            T3 = T2 + M if T2[N] = -1, else T3 = T2 + 0   (N+3 digits)
//   S = T3
// The correction is chosen from the most significant digit only, so no
// comparison with M and no carry chain is needed. Subtracting M is adding M
// with its positive and negative components swapped. S is congruent to X + Y
// modulo M and, for operands in [0, M) and M below 2^N, its value lies in
// (-2^N, 2^N); it is not reduced to [0, M). With a modulus of at least 2^(N-1)
// digits N+1 and N+2 of S are always zero; with a smaller modulus the
// redundant spelling can occasionally reach digit N+1, so S is kept at its
// full N+3 digits rather than cut to N.
//
// The three levels and the MSD rule follow the design description; keeping the
// full width of T3 is this implementation's choice.
// Interface: x, y, m (N digits) in; s (N+3 digits) out. Combinational.
module rsd_mod_adder
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd_t [N-1:0] x,
  input  sd_t [N-1:0] y,
  input  sd_t [N-1:0] m,
  output sd_t [N+2:0] s
);

  sd_t [N:0]   t1;
  sd_t [N+1:0] t2;
  sd_t [N:0]   corr2;   // level-2 addend: -M, +M or 0, widened to N+1 digits
  sd_t [N+1:0] corr3;   // level-3 addend, widened to N+2 digits

  // conditional +-M from the most significant digit of the previous level
  function automatic sd_t [N-1:0] pick_m(sd_t msd, sd_t [N-1:0] mod);
    sd_t [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      if (sd_is_pos(msd))      r[i] = sd_neg(mod[i]);
      else if (sd_is_neg(msd)) r[i] = mod[i];
      else                     r[i] = '0;
    end
    return r;
  endfunction

  always_comb begin
    corr2 = '0;
    corr2[N-1:0] = pick_m(t1[N], m);
    corr3 = '0;
    corr3[N-1:0] = pick_m(t2[N], m);
  end

  rsd_adder #(.N(N))   u_level1 (.x(x),                 .y(y),     .s(t1));
  rsd_adder #(.N(N+1)) u_level2 (.x(t1),                .y(corr2), .s(t2));
  rsd_adder #(.N(N+2)) u_level3 (.x(t2),                .y(corr3), .s(s));

endmodule
