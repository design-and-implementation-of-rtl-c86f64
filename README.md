# Pipelined single-precision multiplier with a CSD-recoded significand

This is an IEEE-754 single-precision floating-point multiplier. It forms the
significand product without a conventional array of partial products. One
operand's mantissa is first recoded into **canonic signed digits (CSD)**: each
digit is 0, +1 or −1, and no two neighbouring digits are both nonzero. The
product is then the sum of the other significand, shifted to each nonzero digit
position and added (+1) or subtracted (−1). The recoded word has at most 13
nonzero digits: at most 12 from the mantissa, plus the hidden one. On average
about one digit in three is nonzero. So the recoded multiplier needs far fewer
add/subtract terms than its binary form has one-bits in the worst case. The work is split into three pipeline
stages, and the design accepts one multiplication per clock.

Around the multiplier sit two converters. They let the same datapath multiply
fixed-point numbers: a sign bit, 10 integer bits and 9 fraction bits (Q10.9, 20
bits in all). The operands are converted to float, multiplied, and the product
is converted back.

```
 fa,fb (Q10.9) ──fix2float──┐
                            ├─ in_fixed mux ─► csd_fp_mul (3 stages) ─► y, flags
 a,b (float) ───────────────┘                                        └─► float2fix ─► fy, fy_ovf, fy_inv
```

## Files

| file | role |
|------|------|
| `rtl/fp_csd_pkg.sv` | shared types: `float32_t`, CSD digit code, operand classes, result flags |
| `rtl/csd_fp_mul_top.sv` | top: operand select, converters, multiplier |
| `rtl/csd_fp_mul.sv` | the pipelined floating-point multiplier |
| `rtl/sign_unit.sv` | product sign (XOR) |
| `rtl/exp_unit.sv` | exponent sum `ea + eb − 127` |
| `rtl/mant_csd_conv.sv` | 23-bit mantissa → 50-bit CSD word |
| `rtl/csd4.sv` | 4-bit CSD conversion slice |
| `rtl/obcsd.sv` | one-bit CSD cell |
| `rtl/csd_mult.sv` | significand × CSD word, adder tree |
| `rtl/normalizer.sv` | normalize, round, special cases |
| `rtl/fix2float.sv`, `rtl/float2fix.sv` | fixed ↔ float converters |
| `tb/fp_ref_pkg.sv` | reference models for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Binary to CSD recoding

The recoding is a ripple from the LSB upward. Bit *i* of a two's complement
number *a* gives digit *c_i*:

```
theta_i = a_i xor a_{i-1}                 (a_{-1} = 0)
gamma_i = (not gamma_{i-1}) and theta_i   (gamma_{-1} = 0)
c_i     = gamma_i ? (a_{i+1} ? -1 : +1) : 0
```

`gamma_i` marks a nonzero digit. Because `gamma_i` needs `gamma_{i-1} = 0`, a
nonzero digit is always followed by a zero, and this is what makes the form
canonic. A run of ones `0111…1` becomes `100…0(−1)`. For example,
23 = `010111` recodes to `1 0 −1 0 0 −1` (32 − 8 − 1).

- **One-bit cell (`obcsd`).** Computes `gamma_i` and the digit. It needs
  `a_{i−1}`, `a_i`, `a_{i+1}` and `gamma_{i−1}`.
- **4-bit slice (`csd4`).** Four cells chained through gamma. It also takes
  the bit just below the slice, the bit just above it, and the gamma of the
  slice below.
- **Mantissa converter (`mant_csd_conv`).** Six slices cover the 23-bit
  mantissa zero-extended to 24 bits. This gives 24 digits (48 bits), and
  because the number is non-negative their value equals the mantissa. Above
  them goes one more digit, `01` (+1) for a normal operand. It stands for the
  hidden one, with weight 2^23, the same weight as the top CSD digit. The
  complete 50-bit word is worth `2^23 + mantissa`, the 24-bit significand.
  This extra digit sits next to the top CSD digit, so the word as a whole is not
  strictly canonic. That does not matter, because it is simply one more term.

**Digit code.** Two bits per digit in two's complement: `00` = 0, `01` = +1,
`11` = −1. The code `10` is never produced. Digit *k* of a word sits at bits
`[2k+1:2k]`.

## Multiplying by a CSD word (`csd_mult`)

Each of the 25 digits turns the 24-bit multiplicand significand `x` into one
48-bit term:

- `+x << i` for a +1 digit;
- `−x << i` for a −1 digit (two's complement negation);
- zero otherwise.

The hidden digit uses shift 23. The terms are padded to 32 and summed in a
balanced binary adder tree five levels deep, rather than in a linear chain.
All sums are taken modulo 2^48. Partial sums may go negative, but the final
value `x × (2^23 + mantissa)` always lies in [0, 2^48), so the wrapped result
is exact. The module works for any digit string, canonic or not, and the
testbench checks this.

## Pipeline and timing (`csd_fp_mul`)

| stage | work | registered |
|-------|------|------------|
| 1 | classify both operands; sign = `sa ^ sb`; exponent `ea + eb − 127` (10-bit signed); recode `b`'s mantissa to CSD; form `a`'s significand | sign, exponent, significand, CSD word, classes, valid |
| 2 | CSD multiplication and adder tree | 48-bit product, sign, exponent, classes, valid |
| 3 | normalization, rounding, special cases | `y`, `flags`, `out_valid` |

- **Latency:** `out_valid` rises 3 clock edges after the operands were
  presented with `in_valid`.
- **Throughput:** a new operation can enter on every cycle. There is no stall
  and no back-pressure.
- **Reset:** `rst_n` is active low and synchronous. It clears only the valid
  bits; data registers are not reset.
- **Operand roles:** `b` is the operand that gets recoded, and `a` is the
  multiplicand. The product is the same either way round.

## Normalization and special cases (`normalizer`)

A denormal operand enters the datapath as its mantissa without a hidden one,
with exponent 1. The significand product can therefore be any size. The
normalizer:

1. Counts the leading zeros `lz` of the 48-bit product. The result exponent is
   `E = e + 1 − lz`, where `e = ea' + eb' − 127`. For two normal operands,
   `lz` is 0 or 1.
2. If `E ≥ 1`, shifts the product left by `lz`, so that the leading one
   becomes the hidden bit.
3. If `E ≤ 0`, shifts it a further `1 − E` places right. The result is then
   denormal, with exponent field 0. Shifts beyond 26 places are clipped,
   because the result rounds to zero anyway.
4. Rounds the 23 bits below the hidden position to nearest, ties to even. The
   guard bit and the sticky OR of the remaining bits decide.
5. Handles a carry from rounding:
   - for a normal result, the exponent goes up by one and the significand
     becomes 1.0;
   - a denormal that rounds up to 2^−126 becomes the smallest normal number.

Special cases are resolved in this order:

| condition | result | flags set |
|-----------|--------|-----------|
| either operand NaN, or infinity × zero | `7FC00000` | `nan` |
| either operand infinite | ±∞ | `inf` |
| either operand zero | ±0 | `zero` |
| final exponent ≥ 255 | ±∞ | `ovf`, `inf` |
| result denormal | ±denormal | `unf` |
| result rounds to zero | ±0 | `unf`, `zero` |
| otherwise | normal result | none |

`flags` is the packed struct `{nan, inf, zero, ovf, unf}` (bit 4 is `nan`).
`unf` here means only that the result is tiny. It is not IEEE's
inexact-and-tiny underflow exception.

## Fixed-point converters

Both converters are parameterized by `INT_W` (default 10) and `FRAC_W`
(default 9). A word is `1 + INT_W + FRAC_W` bits in two's complement.

**`fix2float`**
- Takes the magnitude, finds the leading one and shifts it into the hidden-bit
  position. The exponent is `lead − FRAC_W + 127`.
- Any word of up to 24 bits fits the significand, so the conversion is exact.
- Zero gives +0.

**`float2fix`**
- Shifts the significand right by `150 − FRAC_W − exp` places.
- Rounds to nearest, ties to even.
- Saturates at the largest or most negative code and raises `ovf`. Infinity
  saturates the same way.
- NaN gives 0 and raises `inv`. Zero and denormal inputs give 0.

A fixed-point product goes through two roundings: first to the 24-bit float
significand, then to Q10.9. Q10.9 values lie in [−1024, 1024), so a product
can reach 2^20 and often saturates in the 20-bit output.

## Top level (`csd_fp_mul_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `in_valid` | in | 1 | an operation enters this cycle |
| `in_fixed` | in | 1 | 1: multiply `fa × fb`; 0: multiply `a × b` |
| `fa`, `fb` | in | 20 | Q10.9 operands |
| `a`, `b` | in | 32 (`float32_t`) | single-precision operands |
| `out_valid` | out | 1 | result valid, 3 cycles after `in_valid` |
| `y` | out | 32 | single-precision product |
| `flags` | out | 5 | `{nan, inf, zero, ovf, unf}` of `y` |
| `fy` | out | 20 | `y` converted to Q10.9 |
| `fy_ovf`, `fy_inv` | out | 1 | `fy` saturated / `y` was NaN |

`fy` is always valid alongside `y`, whichever mode was used. The converters
are combinational, so the latency stays 3 cycles.

## Design choices and departures

The following come from the source description of this multiplier:

- the overall structure: sign, exponent, CSD conversion, multiplication,
  normalization;
- the one-bit CSD cell and the 4-bit slice built from four cells;
- the 48-bit CSD word plus a 2-bit `01` digit (50 bits);
- the use of pipelining;
- the Q10.9 fixed-point widths.

The following are choices made for this RTL:

- **Stage boundaries.** The source says the design is pipelined but does not
  say where the registers go. The three stages above are this RTL's choice.
- **Multiplication method.** The source does not say how the 50-bit CSD word is
  multiplied. Summing shifted terms in an adder tree is the direct reading of
  CSD multiplication.
- **Digit code, handshake and reset.** The 2-bit digit code, the valid
  handshake and the reset behaviour are all choices made here.
- **Rounding, denormals and flags.** Rounding is to nearest, ties to even.
  Denormals follow gradual underflow. The NaN code is `7FC00000`, and the
  `flags` bundle is this RTL's own.
- **Converters.** Their rounding and saturation are choices made here. In the
  source they are vendor cores, and here they are plain logic with the same
  function.
- **Top level.** The `in_fixed` operand select, and the fixed-point output
  having the same format as the input, are choices made here.
- **Not reproduced.** The FPGA resource counts, delay and power reported for
  the original implementation were not measured. The comparison designs
  (shift-and-add, Vedic and the unpipelined CSD multiplier) are not included.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. The expected values come from `tb/fp_ref_pkg.sv`, which does
not use the RTL's methods:

- the significand product uses the `*` operator;
- rounding compares the remainder with one half;
- the CSD digits come from the identity
  `NAF(n) = ((n + n/2) xor n/2)`, split into +1 and −1 masks;
- the fixed-point conversions use `real` arithmetic.

| testbench | what it covers |
|-----------|----------------|
| `tb_obcsd`, `tb_sign_unit` | all input combinations |
| `tb_csd4` | all 128 input combinations, plus value and non-adjacency for all 4-bit numbers |
| `tb_exp_unit` | all 65536 exponent pairs |
| `tb_fix2float` | all 2^20 codes |
| `tb_mant_csd_conv` | 20 000 random mantissas and edge mantissas, checked digit by digit |
| `tb_csd_mult` | canonic, arbitrary and edge digit strings |
| `tb_normalizer` | exponent edges, exact ties, rounding carries, every class pair, products of any size deep into the denormal range |
| `tb_float2fix` | exact codes, ties, quarter-LSB offsets, random floats, specials |
| `tb_csd_fp_mul` | 40 000 operations with idle gaps; exact latency, one result per operation |
| `tb_csd_fp_mul_top` | 30 000 mixed fixed-point and float operations at default parameters (see below) |

`tb_csd_fp_mul_top` counts every mechanism and fails if any never happened:
both modes, a mode switch between back-to-back operations, rounding up,
rounding carry, overflow, underflow, NaN, infinity, zero, a denormal operand,
a denormal result, fixed-point saturation and fixed-point NaN.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/fp_csd_pkg.sv tb/fp_ref_pkg.sv tb/tb_csd_fp_mul_top.sv \
    --top-module tb_csd_fp_mul_top -o sim
./obj_dir/sim
```

Replace `tb_csd_fp_mul_top` with any other testbench name. Every testbench
finishes in seconds.

To lint a module: `verilator --lint-only -Wall -Irtl rtl/fp_csd_pkg.sv rtl/<module>.sv`.

## Changing it

- **Fixed-point widths.** `INT_W` and `FRAC_W` on the top and on the
  converters. `fix2float` asserts that the word fits the 24-bit significand.
- **Significand widths.** These live in `fp_csd_pkg`. The CSD converter
  assumes `CSD_DIGITS` is a multiple of 4, one slice per 4 digits. The adder
  tree sizes itself from `CSD_DIGITS`.
- **Pipeline depth.** Move or add the `always_ff` blocks in `csd_fp_mul`. A
  natural extra cut is between two levels of the adder tree in `csd_mult`.
  Change `LATENCY` in the two pipelined testbenches to match.
