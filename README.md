# Compensated approximate bfloat16 multiplier

A bfloat16 × bfloat16 → FP32 multiplier for CNN inference that replaces the
8 × 8-bit significand multiplier with something much cheaper: one Mitchell
log-domain step, built from an adder, followed by a small exact multiplier
that adds back most of the error Mitchell leaves. With the default setting
(n' = 5) the worst-case relative error of a product is 0.98 % and the mean
error 0.048 %. Plain Mitchell has 11.1 % worst case. The reported cost is
about 500 µm² against 648 µm² for an exact bfloat16 multiplier (32 nm
generic library).

The circuit is purely combinational: `bf16_comp_mul` takes two 16-bit
bfloat16 words and returns a 32-bit FP32 word in the same evaluation. There
is no clock, no handshake and no state.

## The arithmetic

Write the operands as `A = 2^kA · (1 + xA)` and `B = 2^kB · (1 + xB)`, where
`xA` and `xB` are the 7-bit fractions `A_f/128` and `B_f/128`. The exact
significand product is `(1 + xA)(1 + xB) = 1 + xA + xB + xA·xB`.

**Stage 1: unbiased Mitchell.** Mitchell's method drops the product term,
which leaves one addition. The adder here forms `f_ma = A_f + B_f + 1`. The
extra LSB pulls the mean error of the truncated sum towards zero. Bit 7 of
`f_ma` (the *carry*) selects one of two cases:

| carry | stage-1 significand C(1) | exact product equals | missing term (error) |
|---|---|---|---|
| 0 (`xA + xB < 1`) | `1 + xA + xB` | C(1) + `xA·xB` | `xA · xB` |
| 1 (`xA + xB ≥ 1`) | `2 · (xA + xB)`, exponent +1 | C(1) + `(1−xA)(1−xB)` | `(1−xA)(1−xB)` |

Both rows are exact identities; the second follows from expanding
`2(xA + xB) + (1 − xA)(1 − xB)`. Floating-point significands are already
normalised, so no leading-one detector is needed, unlike Mitchell on
integers.

**Stage 2: compensation.** The missing term is itself a product of two
fractions. The design computes it approximately and adds it back:

* The *error terms* are `xA, xB` when carry = 0, and the complements
  `1 − xA, 1 − xB` when carry = 1. The complement is a 1's complement
  (bitwise NOT, i.e. `1 − x − 2^-7`), not a 2's complement. This removes two
  adders, and with 7-bit fractions the difference in error is negligible.
* Each error term is cut to its `n'` top bits (`NP` in the RTL).
* The two `n'`-bit values are multiplied exactly. Only the 7 bits of
  weight 2^-1 … 2^-7 are kept (a fixed-width multiplier), and they are added
  to the low end of the stage-1 significand.

**Why the 9-bit sum never overflows.** C(1) and the sum C(1,2) are 9-bit
numbers with the binary point after bit 7, so their value lies in [1, 4).
With carry = 0, C(1) ≤ 255 and the compensation is < 128. With carry = 1,
C(1) = 2·f_ma grows with the fractions while the complemented error terms
shrink. The largest sum, both fractions all ones, is 510 + 0. A 2's
complement would break this bound. `m_adder` asserts it.

**Normalisation.** If C(1,2) ≥ 2 (bit 8 set), bit 8 is the hidden one and
the exponent is raised by one (`range = 1`). Otherwise bit 7 is the hidden
one; it is always set, because C(1) ≥ 1. The 7 or 8 bits below the hidden
one fill the top of the 23-bit FP32 fraction, and the rest is zero. Nothing
is rounded: the FP32 output holds the approximate significand exactly.

**Exponent and special values.** `C_e = A_e + B_e + range − 127`, applied in
this order of priority:

1. Any operand exponent 00h (zero; bfloat16 subnormals are flushed): the
   result is +/−0.
2. Any operand exponent FFh (infinity): `C_e = FFh`. Zero wins, so 0 × ∞ = 0.
3. Underflow, `A_e + B_e + range < 127`: the result is flushed to zero.
4. Overflow, result above FFh: `C_e` saturates to FFh.

The sign is `A_s XOR B_s`.

## Accuracy against n'

`NP` (n') sets the trade-off. These figures come from `tb_error_sweep`, over
all 128 × 128 significand pairs, with rerr = (exact − approx) / exact:

| NP | 0 | 1 | 2 | 3 | 4 | **5** | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| worst rerr % | 10.646 | 10.646 | 7.996 | 4.522 | 2.250 | **0.980** | −0.781 | −0.781 |
| mean rerr %  | 3.326 | 3.326 | 2.262 | 1.128 | 0.407 | **0.048** | −0.140 | −0.243 |

NP = 0 and NP = 1 are identical: with one bit kept, one of the two error
terms is always zero, so there is no compensation. For NP ≥ 6 the worst case
is the −0.781 % (one LSB too high) caused by the unbiasing carry-in at
`xA = xB = 0`. The published values are 10.65, 2.25, 0.980 and −0.781 % for
the worst case and 0.408 / 0.048 % for the mean, and the RTL reproduces
them.

The published CNN results use NP = 4. At NP = 4, ResNet50 and DenseNet121
lose at most about 0.3 points of top-1 accuracy. MobileNet V1/V2 lose 2–3
points, because their pointwise layers accumulate only a few products. For
those networks NP ≥ 5 is recommended, which is why 5 is the default here.

## Blocks and files

The RTL has one module per block of the datapath. Everything shares
`bf16_mul_pkg` (the `bf16_t` and `fp32_t` structs, widths, the bias).

| module | role | width |
|---|---|---|
| `e_adder` | `A_e + B_e` | 8 + 8 → 9 |
| `special_detect` | zero / infinite operand flags | 8, 8 → 2 × 1 |
| `bias127_unit` | bias removal, zero/∞/overflow/underflow; `flush` clears the fraction | 9 + 1 → 8 |
| `f_adder` | `A_f + B_f + 1`; bit 7 is the carry | 7 + 7 → 8 |
| `left_shifter_1b` | `{1, f_ma[6:0]}`, shifted left when carry = 1 → C(1) | 7 + 1 → 9 |
| `error_term_calc` | fractions or their bitwise NOT, chosen by carry | 7, 7 → 7, 7 |
| `fixed_width_mult` | keep the NP top bits of each error term (bit selection, no logic), multiply exactly, keep bits of weight 2^-1..2^-7 → C(2) | 7, 7 → 7 |
| `m_adder` | C(1) + {00, C(2)} | 9 + 7 → 9 |
| `normalizer` | FP32 fraction and `range` | 9 → 23 + 1 |
| `sign_xor` | product sign | 1, 1 → 1 |
| `bf16_comp_mul` | top: wires the above together | 16, 16 → 32 |

Parameter: `NP` (int unsigned, 0…7, default 5), on `bf16_comp_mul` and
`fixed_width_mult`.

## Where this implementation makes its own choices

* **Default NP = 5.** The design is evaluated at several n'. NP = 5 is the
  setting favoured for cost, power and accuracy. NP = 4 is the one used for
  most CNN results.
* **Infinity and overflow keep the computed fraction.** Only the exponent is
  forced to FFh, so the FP32 output can be a NaN pattern rather than a clean
  infinity. NaN inputs are treated like infinities. Clear the fraction in
  `bf16_comp_mul` if IEEE-clean infinities are needed.
* **Underflow clears the fraction.** This gives a signed zero, in line with
  flushing subnormal outputs.
* **An exponent of exactly FFh passes unchanged.** Only values above FFh are
  clamped, so such an exponent is passed on as it is.
* **NP ≤ 3.** The product has fewer than 7 bits. It is shifted up so that
  C(2) keeps its weight. For NP = 0 the second stage outputs zero.
* **Zero/infinity detection** is done with plain compares on the exponent
  fields. The design requires these detectors but does not draw them.
* **No pipeline registers.** The evaluated design is combinational, with
  2.5 ns delay at a 333 MHz target. Register the ports outside if needed.

Not included: the 2's-complement and biased variants, and the comparison
multipliers (exact bfloat16, truncated `mul(n')`, DRUM, iterative Mitchell),
which serve only as reference points. The FP32 accumulation of a
convolution is also outside this design; the testbenches do it in software.

## Verification

Each module has an exhaustive or near-exhaustive self-checking testbench,
`tb/tb_<module>.sv`. Each compares against integer formulas written
independently of the RTL and prints `TB_RESULT checks=N failures=M`.
Further testbenches:

* `tb_bf16_comp_mul` runs the top at its defaults. It covers all 16384
  fraction pairs with random signs and exponents, bit-exact against a
  reference model, and checks the measured error statistics
  (0.980 % / 0.048 %). It also covers zero, infinity, 0 × ∞, overflow and
  underflow, directed exponent edges, and coverage counters for each path.
* `tb_error_sweep` instantiates NP = 0…7 and checks the accuracy table above.
* `tb_conv_workload` runs a 3×3×16 convolution and a 1×1×8 pointwise layer
  with random bfloat16 data. It checks that every product stays within the
  NP = 5 error bounds and every accumulated output within 0.98 % of
  Σ|products|.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/bf16_mul_pkg.sv tb/tb_bf16_comp_mul.sv --top-module tb_bf16_comp_mul
./obj_dir/Vtb_bf16_comp_mul
```

All testbenches finish in well under a second. Verilator lint reports only
unused-bit warnings: the bits the fixed-width multiplier drops on purpose. Gate-level area, delay and power were not reproduced.
