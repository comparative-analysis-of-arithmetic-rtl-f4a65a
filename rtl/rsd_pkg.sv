// rsd_pkg: shared types, constants and helper functions for the signed-digit
// (RSD / CSD) arithmetic units.
//
// A signed digit takes a value in {-1, 0, +1} and is carried on two wires, a
// positive component p and a negative component n, with value p - n. The pair
// (1,1) is a legal, redundant spelling of 0; every unit accepts it on its inputs
// and never produces it on its outputs. A vector of N digits is a packed array
// "sd_t [N-1:0]", so digit i sits on bits [2i+1:2i] with p on the upper bit:
// +1 = 2'b10, -1 = 2'b01, 0 = 2'b00. That per-digit packing is the one the CSD
// waveforms use (85 = 16'b00_10_00_10_00_10_00_10); the component split itself
// (value = positive part minus negative part) is the defining property of RSD.
//
// kara_digits() gives the number of result digits of the recursive Karatsuba
// multiplier for n-digit operands. Carry-free signed-digit adders grow a result
// by one digit per addition regardless of its value, so the width follows the
// adder tree of kara_combine, not the 2n digits the product value needs.
package rsd_pkg;

  typedef struct packed {
    logic p;  // positive component
    logic n;  // negative component
  } sd_t;

  // Operations of the arithmetic unit.
  typedef enum logic [1:0] {
    OP_MODADD  = 2'd0,  // (X + Y) mod M, three-level RSD modular adder
    OP_MODSUB  = 2'd1,  // (X - Y) mod M, same adder with Y negated
    OP_MUL_REC = 2'd2,  // X * Y, recursive Karatsuba multiplier
    OP_MUL_ITR = 2'd3   // X * Y, iterative Karatsuba multiplier
  } op_e;

  // How the operands reach the datapath.
  typedef enum logic [1:0] {
    FMT_RSD    = 2'd0,  // binary A/B/M taken as RSD digits with empty negative part
    FMT_CSD    = 2'd1,  // binary A/B/M recoded to canonical signed digits
    FMT_DIGITS = 2'd2   // X/Y/M1 digit vectors taken as given (any RSD spelling)
  } fmt_e;

  function automatic sd_t sd_neg(sd_t d);
    return '{p: d.n, n: d.p};
  endfunction

  function automatic bit sd_is_neg(sd_t d);
    return d.n & ~d.p;
  endfunction

  function automatic bit sd_is_pos(sd_t d);
    return d.p & ~d.n;
  endfunction

  // Width of the recursive Karatsuba product, in digits (n a power of two).
  function automatic int kara_digits(int n);
    int w, k, g0, a, b;
    w = 1;
    k = 1;
    while (k < n) begin
      // level of size 2k built from sub-products of w digits
      g0 = (w > 2 * k + 1) ? w : 2 * k + 1;
      a  = 2 * k + w + 1;
      b  = k + g0 + 3;
      w  = ((a > b) ? a : b) + 1;
      k  = 2 * k;
    end
    return w;
  endfunction

endpackage
