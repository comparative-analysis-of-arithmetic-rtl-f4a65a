# Signed-digit arithmetic unit for prime-field ECC

Elliptic-curve point multiplication comes down to long chains of modular
additions, subtractions and multiplications on large field elements. In plain
binary every one of these waits for a carry to ripple across the whole word.
This design keeps the operands in a **signed-digit** form, where each digit is
-1, 0 or +1. In that form an addition needs no carry chain: every result digit
depends on only three neighbouring input positions, whatever the word length.

The unit `ecc_arith_unit` offers four operations on N-digit operands (N = 8 by
default):

| op           | result                              | unit             |
|--------------|-------------------------------------|------------------|
| `OP_MODADD`  | (X + Y) mod M                       | `rsd_mod_adder`  |
| `OP_MODSUB`  | (X - Y) mod M                       | `rsd_mod_sub`    |
| `OP_MUL_REC` | X * Y, full product                 | `karatsuba_rsd`  |
| `OP_MUL_ITR` | X * Y, full product, multi-cycle    | `karatsuba_iter` |

The operands can be written in two signed-digit forms:

- **RSD** (redundant signed digit). A number is a positive part minus a negative
  part, and has many spellings.
- **CSD** (canonical signed digit). This is the unique spelling with the fewest
  non-zero digits: no two neighbouring digits are both non-zero.

The same datapath serves both forms. Only the operands differ.

Worked example, in both forms: X = 85, Y = 59, M = 127.

- The sum mod M is 17.
- The difference mod M is 26.
- The product is 5015.

## Digits on wires

Each digit is a packed struct `sd_t {p, n}` with the value p - n. It is defined
in `rsd_pkg`:

| bits `{p,n}` | value |
|--------------|-------|
| `00`         | 0     |
| `10`         | +1    |
| `01`         | -1    |
| `11`         | 0 (redundant spelling) |

A vector `sd_t [N-1:0]` holds digit i on bits `[2i+1:2i]`. Every unit accepts
`11` on its inputs and never produces it. In CSD form, 85 is
`00_10_00_10_00_10_00_10` and 59 = 64 - 4 - 1 is `00_10_00_00_00_01_00_01`.

Negating a vector costs nothing: swap `p` and `n` in every digit. Subtraction
and the "-M" corrections below rely on this.

To read a result, add up the digits: value = sum over i of (p_i - n_i) * 2^i.
The testbenches all do this.

## The carry-free adder (`rsd_adder`)

The adder has two layers of digit cells, with no path longer than two
positions.

**Layer 1** looks at position i. It forms the position sum x_i + y_i, which lies
in -2..2. It splits this sum into a transfer digit t_(i+1), passed one position
up, and an interim digit w_i:

| x_i + y_i | pair at i-1 has a -1 digit | t_(i+1) | w_i |
|-----------|----------------------------|---------|-----|
| +2        | either                     | +1      | 0   |
| +1        | no                         | +1      | -1  |
| +1        | yes                        | 0       | +1  |
| 0         | either                     | 0       | 0   |
| -1        | no                         | 0       | -1  |
| -1        | yes                        | -1      | +1  |
| -2        | either                     | -1      | 0   |

**Layer 2** forms s_i = w_i + t_i.

The look at position i-1 is the key step. If that position may send up a -1,
layer 1 leaves room at position i by picking w_i = +1. If it may send up a +1,
layer 1 picks w_i = -1. So s_i always stays within -1..+1, and layer 2 never
overflows.

An N-digit addition gives N+1 digits. Digit N is the last transfer digit.

A side effect matters for the rest of the design. Every addition can make the
**spelling** one digit longer, even when the **value** does not grow. For
example, 1 can be written as 2 - 1. So widths in this design follow the depth of
the adder trees, not the size of the values.

## Modular addition and subtraction by the top digit

`rsd_mod_adder` uses three adders in a row. None of them compares anything with
M:

```
T1 = X + Y                                          N+1 digits
T2 = T1 - M  if T1[N] = +1;  T1 + M  if T1[N] = -1;  else T1 + 0    N+2 digits
T3 = T2 - M  if T2[N] = +1;  T2 + M  if T2[N] = -1;  else T2 + 0    N+3 digits
S  = T3
```

"- M" is M with its digits negated. The correction depends on one digit only,
so the whole operation stays carry-free.

With this adder, digit N+1 of T2 is always zero. Only digit N can still be
non-zero, which is why the third level looks at digit N.

`rsd_mod_sub` negates Y for free by swapping its wires, then uses the same
adder.

The result is correct modulo M, but it is a redundant residue:

- S is congruent to X ± Y modulo M. For operands in [0, M) its value lies in
  (-2^N, 2^N). It is not reduced to [0, M). For the worked example it comes out exactly 17 and 26.
- The spelling of S can use digit N even when the value is small, for example
  256 - 255. So S keeps all N+3 digits.
- If M is at least 2^(N-1), digits N+1 and N+2 of S are always zero.
- If M is smaller, as in the 8-digit example with M = 127, a small share of
  inputs also reaches digit N+1. The value stays correct.

## Karatsuba multiplication with carry digits

The product a*b is split in the Karatsuba way, with H = N/2:

```
a*b = pl + ((aL+aH)(bL+bH) - ph - pl) * 2^H + ph * 2^N,   pl = aL*bL, ph = aH*bH
```

The half sums sa = aL + aH and sb = bL + bH come from the carry-free adder. They
have H+1 digits, so the middle product would normally need an unbalanced
(H+1)-digit multiplier. Instead, the unit splits off the carry digits sa_c and
sb_c:

```
sa*sb = lo(sa)*lo(sb) + (sa_c*lo(sb) + sb_c*lo(sa)) * 2^H + sa_c*sb_c * 2^(2H)
```

- `lo(sa)*lo(sb)` comes from a normal H-digit multiplier.
- Each cross term is the other half sum's low part, passed as it is, negated or
  dropped, depending on the carry digit.
- `sa_c*sb_c` comes from the one-digit multiplier `rsd_digit_mul`.

`kara_combine` adds all the terms of one level in a tree of carry-free adders:

- depth 3 for the middle term;
- one addition for pl + ph * 2^N;
- one final addition.

Each addition lengthens the spelling by a digit. So the product width
`kara_digits(n)` (in `rsd_pkg`) grows level by level: 8 digits for n = 2, 14 for
n = 4 and 24 for n = 8. The value itself always fits in 2n digits.

**`karatsuba_rsd`** is the fully combinational recursion, down to one-digit
products. It is written as an unrolled tree, not as a module that instantiates
itself:

- Level k has 3^k nodes of N/2^k digits.
- Going down, each node takes its operands from its parent: low halves, high
  halves, or the low digits of the parent's half sums.
- Going up, each node combines its three children's products.
- For N = 8 this makes 27 one-digit products.

**`karatsuba_iter`** computes the same product with a single N/2-digit
`karatsuba_rsd`, used three times:

| clock | work                                   |
|-------|----------------------------------------|
| LOW   | aL*bL                                  |
| HIGH  | aH*bH                                  |
| MID   | lo(sa)*lo(sb)                          |
| FIN   | combine and register; `done` pulses    |

After a one-clock `start`, `done` comes 4 clocks later. `busy` is high
meanwhile, and a `start` while busy is ignored. The product stays valid until
the next operation.

Neither multiplier reduces its product modulo M. Both return the full product,
e.g. 5015 for 85 x 59.

## The arithmetic unit (`ecc_arith_unit`)

`fmt` selects where the operands come from:

- `FMT_RSD`: binary `a`, `b`, `m`, with every 1 bit read as a +1 digit.
- `FMT_CSD`: binary `a`, `b`, `m`, recoded to CSD by `bin_to_csd`.
- `FMT_DIGITS`: the digit vectors `x_in`, `y_in`, `m_in`, taken as given in any
  RSD spelling.

`bin_to_csd` is the usual carry-based recoding. It turns every run of ones
0111 into 100(-1).

The CSD of an N-bit number can need N+1 digits. For N = 8 this happens for
numbers from 171 up, e.g. 255 = 256 - 1. Such an operand keeps its binary
spelling, which is also a valid signed-digit vector. The output `csd_fallback`
reports this for the operation.

Handshake (synchronous, active-high `rst`):

- A request is taken on a clock edge where `in_valid` and `in_ready` are both
  high. The operands are converted and registered on that edge.
- Add, subtract and recursive multiply: the result is registered on the next
  edge, and `out_valid` is high for one cycle.
- Iterative multiply: `out_valid` comes 6 clocks after the accepting edge.
- `in_ready` is low while an operation runs.
- `z` (`sd_t [23:0]` for N = 8) holds the last result. Modular results sit in
  the low N+3 digits.

Module hierarchy:

```
ecc_arith_unit
├── bin_to_csd x3
├── rsd_mod_adder ── rsd_adder x3
├── rsd_mod_sub ──── rsd_mod_adder
├── karatsuba_rsd ── rsd_adder, kara_combine (rsd_adder, rsd_digit_mul), rsd_digit_mul
└── karatsuba_iter ─ karatsuba_rsd #(N/2), rsd_adder, kara_combine
```

All types, the `op_e`/`fmt_e` encodings and `kara_digits()` live in `rsd_pkg`.

## Simulating

Each `tb/tb_<module>.sv` is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog. For
example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/rsd_pkg.sv \
          tb/tb_ecc_arith_unit.sv --top-module tb_ecc_arith_unit -o sim
./obj_dir/sim
```

Every testbench runs in well under a second.

- `tb_rsd_adder`: random spellings and extreme values.
- `tb_rsd_digit_mul`: exhaustive.
- `tb_bin_to_csd`: all 256 inputs, plus the CSD patterns of 85, 59 and 127.
- `tb_rsd_mod_adder` and `tb_rsd_mod_sub`: the worked example, plus random
  operands with random redundant spellings, against an integer model.
- `tb_karatsuba_rsd`: random spellings against an integer model.
- `tb_karatsuba_iter`: random spellings, plus the 4-clock latency and the
  busy/done rules.
- `tb_ecc_arith_unit`: the whole unit at its default size. It checks every
  operation and format and both latencies. It also counts how often each
  mechanism occurred, and fails if one never did: level-2 and level-3
  corrections by -M and by +M, a carry digit in the middle sums, the CSD
  fallback, and a request held off by `in_ready`.

`N` can be changed on any module. It must be a power of two for the
multipliers and at least 2.

## What is this design's own

The two-layer carry-free adder, the three-level modular adder driven by the top
digit, modular subtraction by negation, and the Karatsuba scheme are all taken
from the described design. That scheme covers the split into halves, the
half-size middle multiplier, the cross terms chosen by carry digits, and the
one-digit multiplier. So is the operand size of 8, with its example values.

The following choices are this design's own:

- **Layer-1 rule.** The exact layer-1 rule (the table above) is the classic
  radix-2 signed-digit rule. It was chosen to meet the requirement that layer 2
  never overflows.
- **Direction of the corrections.** The modular corrections subtract M for a
  top digit of +1 and add M for -1. That is the direction that gives 17 for the
  worked example.
- **Result widths.** The widths are set by the adder trees: N+3 digits for
  modular results and 24 digits for products. The redundant results are not
  reduced to [0, M).
- **Adder ordering.** The order in which `kara_combine` adds its terms is this
  design's own.
- **Iterative multiplier.** Its three-pass schedule, its handshake and its
  latency are this design's own. So are the operand formats, the handshake and
  registers of `ecc_arith_unit`, and the CSD fallback.
- **Speed of CSD versus RSD.** CSD operands are often described as being faster
  than RSD ones. In this datapath both take the same path, so any difference
  lies in switching activity and is not modelled.

Not included are a scalar point-multiplication controller with its register
file and instruction set, and modular division or inversion. These are the
parts of a full ECC processor around this unit.
