# Single-precision floating-point multiplier: Karatsuba-Urdhva significands, Kogge-Stone exponents

This is a combinational IEEE 754 binary32 multiplier. Multiplying two
floating-point numbers takes three independent parts:

- the sign of the product is the XOR of the operand signs;
- the exponents are added and one bias of 127 is removed;
- the 24-bit significands (23 stored bits plus the hidden one) are multiplied
  into a 48-bit product, which is then normalised.

The significand multiply is by far the largest part, and this design builds it
as a **Karatsuba-Urdhva multiplier**. A Karatsuba recursion splits the operands
in halves and forms each product from three half-size products instead of four.
The recursion stops at 8 x 8 multipliers. These work by the Urdhva Tiryagbhyam
("vertically and crosswise") column method. The exponent sum, the bias
subtraction and the exponent increment after normalisation all use one
**Kogge-Stone parallel-prefix adder** module.

The design has no clock and no pipeline registers. A result is valid as soon as
the logic settles after the operands change.

## Datapath

```
 a[31] ──┐
         XOR ─────────────────────────────────────────────────────► sign
 b[31] ──┘

 a[30:23] ─┐  exp_adder                              normalizer
           ├─► Kogge-Stone 8b ──► Kogge-Stone 10b ──► e_in         e_out ─┐
 b[30:23] ─┘     (ea + eb)         (+ ~127 + 1)       Kogge-Stone 10b     │
                                                      (+ shift)           │
 1.a[22:0] ─┐  karatsuba_mult (N = 32)                                   ├─► range / special
            ├─► 3 x karatsuba(16) ─► 9 x urdhva_mult(8) ──► prod[47:0] ─► frac[22:0] ┘   handling ─► p
 1.b[22:0] ─┘   (operands zero-extended 24 → 32)
```

| module              | role |
|---------------------|------|
| `fpmul_pkg`         | field widths, bias, special constants, `fp32_t` struct |
| `fp_multiplier`     | top: sign XOR, wiring, special operands, range limits |
| `exp_adder`         | `ea + eb` on an 8-bit Kogge-Stone adder, then `- 127` on a 10-bit one |
| `karatsuba_mult`    | recursive N x N Karatsuba multiplier (self-instantiating) |
| `urdhva_mult`       | W x W vertical-and-crosswise multiplier, the recursion's leaf |
| `normalizer`        | one-place normalisation, truncation, exponent update |
| `kogge_stone_adder` | WIDTH-bit parallel-prefix adder with carry in and out |

## The significand multiplier

### Karatsuba level

Split each N-bit operand into halves of H = N/2 bits, `X = Xh·2^H + Xl` and
`Y = Yh·2^H + Yl`. Then

```
X·Y = Xh·Yh·2^N + ((Xh+Xl)·(Yh+Yl) − Xh·Yh − Xl·Yl)·2^H + Xl·Yl
```

So one level needs three products: high·high, low·low and the product of the
half sums. The middle term comes from a subtracter. The high product is
shifted by N, the subtracter result by H, and one adder combines all three. In
`karatsuba_mult`, each of the three products is another `karatsuba_mult` of
width H. When the width reaches `LEAF` (8) or less, the module becomes a
`urdhva_mult` instead.

The significands are 24 bits. They are zero-extended to N = 32, so that two
halvings (32 → 16 → 8) end exactly at 8-bit leaves. The full multiplier
therefore has 3 × 3 = 9 Urdhva multipliers of 8 × 8. The top 16 bits of its
64-bit result are always zero.

### The carry of the half sums

`Xh + Xl` has H+1 bits, so the middle product would need (H+1)-bit operands.
That breaks the rule that every leaf is 8 bits wide. Instead, write the sums as
`cx·2^H + sx` and `cy·2^H + sy`, where cx and cy are their carry bits. The
middle product is then taken on the H-bit parts only:

```
(cx·2^H + sx)(cy·2^H + sy) = sx·sy + (cx·sy + cy·sx)·2^H + cx·cy·2^(2H)
```

The two correction terms are gated additions. They cost no further
multiplier. This correction is this design's own solution: the original
description gives only the three-product split and the 8-bit leaf width.

`N` must halve evenly until it is at most `LEAF`. Otherwise elaboration stops
with an error. Any such `N` works, for example 16, 24 (leaves of 6 bits) or 64.

### Urdhva Tiryagbhyam leaf

For product column k, the leaf counts the bit products `a[i] & b[j]` with
`i + j = k` (the "crosswise" products). It adds that count to the carry from
column k−1. Bit 0 of the total becomes product bit k, and the rest is carried
into column k+1. After the last column, the remaining carry is the top product
bit. This is the schoolbook vertical-and-crosswise procedure applied to binary
digits. In decimal, 232 × 323 gives the column totals 6, 13, 18, 13, 6, which
resolve with their carries to 74936. The loop describes the arithmetic, not a
gate netlist, and a synthesis tool may restructure it.

## Exponent path and the Kogge-Stone adder

`kogge_stone_adder` first forms a generate and a propagate bit for every bit
position. It then runs log2(WIDTH) prefix stages. In stage s, bit i combines
with bit i − 2^s. Bits without a partner that far below pass their values
through. After the last stage, bit i holds the group generate and propagate of
bits i..0. The carry into bit i+1 is `G[i] | P[i]&cin`. The carry-in is this
design's addition, so that one module can also subtract and increment:

- `exp_adder`: an 8-bit instance adds the biased exponents, and its carry out
  becomes bit 8 of the sum. A 10-bit instance then adds `~127` with carry-in 1.
  The result is `ea + eb − 127` as a 10-bit two's-complement number in
  [−127, 383].
- `normalizer`: a 10-bit instance with `b = 0` adds the normalisation shift
  (the carry-in) to that exponent.

The exponent is carried as 10 signed bits so that results above 254 and below 1
stay visible, and are not wrapped round before the range check.

## Normalisation, rounding and special values

The product of two significands in [1, 2) lies in [1, 4). If product bit 47 is
set, the fraction is taken from bits 46:24 and the exponent is raised by one.
Otherwise the fraction comes from bits 45:23. The bits below are dropped, so
**rounding is toward zero**. The original description names a normaliser and an
exponent update, but no rounding step.

Special cases are resolved in `fp_multiplier`, in this order:

| condition | result | flag |
|-----------|--------|------|
| NaN operand, or infinity × zero | `0x7fc00000` (quiet NaN) | `invalid` |
| infinity × nonzero | ±infinity | – |
| zero or subnormal operand | ±0 (subnormals are read as zero) | – |
| exponent after update ≥ 255 | ±`0x7f7fffff`, the largest finite value (correct for rounding toward zero) | `overflow` |
| exponent after update ≤ 0 | ±0 (no subnormal results) | `underflow` |

All of these rules are this design's own choices. The original description does
not cover exceptional operands.

## Where this design departs from, or goes beyond, the original description

- **Four or three sub-products.** The published top-level block diagram draws
  the significand multiplier as four 16 × 16 Vedic multipliers joined by three
  32-bit adders. That is four sub-products, not three. Its text, its Karatsuba
  block diagram and its two-level (Karatsuba over Urdhva) diagram all describe
  the three-product Karatsuba split. This design follows the three-product
  split.
- **Half-sum carries** are folded in as shown above, which keeps the leaves at
  8 bits.
- **Zero-extension of the 24-bit significands to 32 bits** is what makes 8-bit
  leaves possible.
- **Kogge-Stone carry-in**, and its reuse for the bias subtraction and the
  exponent increment. The original description uses Kogge-Stone for the
  exponent addition only. The additions inside the Karatsuba combination are
  plain `+`, which a synthesis tool maps to its own adders.
- **Truncating rounding, subnormal flushing, saturation on overflow, NaN/infinity
  rules and the three flag outputs.**
- **Combinational timing.** The original reports one combinational delay
  (4.505 ns) and gives no clock, so no registers are added. Its area, power and
  delay figures come from a particular technology flow, and this RTL does not
  claim to reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what is checked |
|-----------|-----------------|
| `tb_urdhva_mult` | all 65,536 8 × 8 operand pairs against `a*b` |
| `tb_karatsuba_mult` | 32 × 32: every pair from a directed set that sets the half-sum carry bits at both levels, alone and together, then 50,000 random pairs |
| `tb_kogge_stone_adder` | 8-bit exhaustively with carry-in (131,072 cases); 16-bit on edge cases and 20,000 random cases |
| `tb_exp_adder` | all 65,536 exponent pairs against `ea + eb − 127` |
| `tb_normalizer` | 20,000 random products in [2^46, 2^48), found by scanning for the leading one; both shift cases must occur |
| `tb_fp_multiplier` | end to end at the default configuration (see below) |

`tb_fp_multiplier` computes its reference independently of the RTL structure.
It widens both operands to double precision and multiplies them with the
simulator's `real` arithmetic. This is exact, because 48 significand bits fit
in 53. It then truncates the result back to single precision and applies the
rules in the table above. The testbench runs directed cases, including
−12.5 × 64 = −800, and 30,000 random pairs. It counts how often each mechanism
occurs, and fails if one never does. The mechanisms are: normalisation shift,
no shift, overflow, underflow, zero operand, infinite operand, invalid
operation, and a carry out of a first-level half sum.

The rounding and exception rules are verified only against this design's own
conventions. Results are not bit-exact with an IEEE round-to-nearest multiplier.

## Simulating

Every module is in `rtl/<name>.sv`. The package `fpmul_pkg` must be read first.
With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/fpmul_pkg.sv tb/tb_fp_multiplier.sv \
          --top-module tb_fp_multiplier -o sim
./obj_dir/sim
```

To run another testbench, replace the testbench file and the top name. Lint a
module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fpmul_pkg.sv rtl/<module>.sv --top-module <module>`.
Lint reports the following warnings, and each one is explained in its module's
header comment:

- `karatsuba_mult` shows one undriven-signal warning. It comes from the
  tool's placeholder copy of a self-instantiating module.
- `fp_multiplier` shows two unused-signal warnings: the always-zero product
  bits and the shift flag.

Things to change:

- `karatsuba_mult #(.N, .LEAF)` sets the operand width and the width at which
  the recursion hands over to Urdhva leaves. For example, `LEAF = 16` gives one
  Karatsuba level over three 16 × 16 leaves.
- `kogge_stone_adder #(.WIDTH)` accepts any width. Widths that are not a power
  of two work, because the last stage simply has fewer combining cells.
- To round to nearest instead of toward zero, `normalizer` would need to pass
  on the guard and sticky bits of the product, which it currently drops.
