# 14-bit floating-point arithmetic units for neural-network hardware

Inference hardware for neural networks spends most of its logic on multiplying
weights by activations, summing the products and, in convolutional networks,
picking the largest value of a pooling window. Doing this in IEEE half precision
(16 bits) needs an 11x11 significand multiplier, which on FPGAs such as
Cyclone V occupies an 18x18 DSP slice. Dropping the two least significant
mantissa bits leaves a 9-bit significand, so each product fits a 9x9 hard
multiplier (three of which share one DSP block) while the format stays
bit-compatible with half precision: a 16-bit half value becomes a 14-bit value by
dropping its two low bits, and a 14-bit value becomes half precision by appending
two zero bits. For classification tasks the lost precision is reported not to change the outcome.

This RTL implements four combinational units for that format: a multiplier,
an adder, a subtractor and a comparator that returns the maximum. None of them
has a clock. They are meant to be used as building blocks of a neuron or a
pooling stage, with registers placed around them as the surrounding design
needs.

## The fp14 format

```
 13   12 .. 8     7 .. 0
+----+----------+----------+
|sign| exponent | mantissa |    value = (-1)^sign * 1.mantissa * 2^(exponent - 15)
+----+----------+----------+
```

`fp14_pkg::fp14_t` is a packed struct with these three fields. The package also
holds the widths (`EXP_W = 5`, `MAN_W = 8`, `BIAS = 15`) and the two widths of
the adder's fixed-point domain (`FIX_W = 40`, `SUM_W = 41`).

The units share the following conventions. Treat them as the contract of the RTL:

| case | behaviour |
|---|---|
| exponent field 0 | the value is zero, whatever the mantissa; there are no subnormals |
| exponent field 31 | an ordinary exponent; there is no infinity or NaN |
| rounding | always truncation toward zero |
| result below 2^-14 | flushed to zero; the zero keeps the sign of the exact result (the `underflow` flag is set) |
| multiplier result above exponent 31 | not handled: the exponent keeps its five low bits (the `overflow` flag is set) |
| adder/subtractor result above exponent 31 | saturates to exponent 31, mantissa `FF` (the `overflow` flag is set) |

Infinities are left out on purpose: a network's weights and activations stay far
from the format's limits. The overflow flags let a user detect overflow if they
need to.

## Multiplier (`fp14_multiplier`)

The multiplier works like a textbook floating-point multiplier, cut down to the
smallest hardware:

* sign = `sign_a ^ sign_b`;
* exponent: `exp_a - 15 + exp_b` is formed 7 bits wide, so that bit 6 is the
  sign of the biased sum. A second adder forms the same sum plus one;
* significand: `{1, man_a} * {1, man_b}` is an 18-bit product in [1, 4);
* normalisation: product bit 17 chooses between the two. When bit 17 is set, the
  result is `sum + 1` with mantissa `product[16:9]`. When it is clear, the result
  is `sum` with mantissa `product[15:8]`. The bits below are dropped;
* underflow: when the normalised exponent is 0 or negative, exponent and mantissa
  are forced to zero. A zero operand forces the same.

Choices that go beyond the basic scheme:

* The scheme this design follows tests for underflow using bit 6 of the sum
  *before* the +1. This RTL tests the normalised exponent instead, so a result
  whose exponent field would be exactly 0 is also flushed. Without this, such a
  result would be read back as zero anyway, since exponent 0 means zero.
* A zero operand is tested explicitly. Without that test, 0 x (a large number)
  gives a non-zero result.
* For the unshifted case, the reference diagram labels the mantissa
  `product[17:10]`. That slice would keep the hidden one, so `product[15:8]` is used.

## Adder (`fp14_adder`) and its two conversions

The adder does not follow the usual route: compare exponents, shift the smaller
operand, add, renormalise. It puts both operands on a single fixed-point grid
instead:

1. **`fp14_to_fixed`**: the 9-bit significand `{1, man}` is shifted left by
   `exp - 1` places. One least significant bit then weighs 2^-22 for every
   operand. The smallest normal number, exponent 1, sits at bit 8. The largest,
   exponent 31, reaches bit 38. A negative operand is negated into two's
   complement, so each operand becomes a signed 40-bit integer.
2. The two integers are added in 41 bits. This sum is **exact**: no bit is lost
   aligning the operands, and no guard or sticky bits are needed.
3. **`fixed_to_fp14`** takes the sign from bit 40 and negates a negative sum to
   its magnitude. A priority search then finds the leading one at position `pos`.
   The exponent is `pos - 7`, and the mantissa is the eight bits below the leading
   one. A leading one below bit 8 is under the smallest normal number and becomes
   a signed zero. A leading one at bit 39 can only come from adding two numbers of
   exponent 31, and saturates.

Because the sum is exact, the only error of the adder is the final truncation
toward zero. This includes catastrophic cancellation: the difference of two
nearby numbers is exact whenever it is representable. The costs are two
40-bit barrel shifters, a 41-bit adder and a 41-bit leading-one search. That is
far more logic than the multiplier needs.

## Subtractor and comparator

`fp14_subtractor` inverts the sign bit of `b` and feeds the adder, so
`d = a - b` has the same exactness and truncation as the adder.

`fp14_comparator` compares by subtracting: it forms `a - b` and reads only the
sign of the difference. Sign 1 means `a < b`. Sign 0 means `a >= b`. The same bit
drives a two-way multiplexer that passes `b` when `a < b` and `a` otherwise, so
`max` is the larger operand, and `a` when the two are equal. This is where the
signed zero of the adder matters. The difference of two distinct numbers can be
smaller than the smallest normal number, for example two neighbouring values
near 2^-14. It is then flushed to zero, but keeps its sign, so the comparison
stays correct for every pair of operands. +0 and -0 compare equal.
Which operand is the minuend is this design's choice.

## Top level (`fp14_units`)

The top places the four units side by side on one operand pair, with no clock:

| port | dir | type | meaning |
|---|---|---|---|
| `a`, `b` | in | `fp14_t` | operands |
| `prod`, `prod_uf`, `prod_of` | out | `fp14_t`, 1, 1 | `a * b`, underflow, exponent wrap |
| `sum`, `sum_uf`, `sum_of` | out | `fp14_t`, 1, 1 | `a + b`, underflow, saturation |
| `diff`, `diff_uf`, `diff_of` | out | `fp14_t`, 1, 1 | `a - b`, underflow, saturation |
| `lt`, `ge`, `max` | out | 1, 1, `fp14_t` | `a < b`, `a >= b`, larger operand |

The comparator contains its own subtractor, so the top holds three adder
datapaths. A design that needs only one of the units should instantiate that
unit directly. Coarse synthesis of the whole top gives about 400 word-level
cells, with no flip-flops and no latches. There is one 9x9 multiplier; the
adders are 40 and 41 bits wide.

Hierarchy:

```
fp14_units
 |- fp14_multiplier
 |- fp14_adder        (fp14_to_fixed x2, fixed_to_fp14)
 |- fp14_subtractor   (fp14_adder)
 '- fp14_comparator   (fp14_subtractor)
```

## Departures from the reference design and open points

* The reference design reports a variant of the multiplier that handles
  infinities, but only its size. `fp14_multiplier #(.HANDLE_INF(1))` builds it.
  There, exponent field 31 means infinity. An infinite operand, or a product
  whose exponent reaches 31, gives a signed infinity (exponent 31, mantissa 0).
  A zero operand still gives zero, because NaN is not represented. The default,
  `HANDLE_INF = 0`, is the variant without infinity described above. The adder
  always treats exponent 31 as an ordinary exponent.
* Zero encoding, subnormal flushing, the signed zero and the adder's saturation
  are this design's choices (see the table above). The reference gives none of them.
* The scaling of the fixed-point grid (a shift by `exp - 1`) and the
  leading-one search are this design's reading of "convert to 40-bit fixed
  point" and "convert back".
* Reported results for the reference design are 1-cycle latency for every unit.
  Here the units are purely combinational, and each testbench checks that every
  result settles within one 10 ns clock period. No timing closure or FPGA fitting
  was done. The maximum frequency depends on the target.

## Verification

Every unit has a self-checking testbench in `tb/`. The testbenches compare the
RTL with an independent reference in `tb/fp14_ref_pkg.sv`. That reference
decodes operands to `real`, computes the exact result in double precision (every
product or sum of two fp14 numbers is exact there), and re-encodes it by scaling
into [1, 2) and truncating.

| testbench | stimulus |
|---|---|
| `tb_fp14_to_fixed` | all 16,384 encodings |
| `tb_fixed_to_fp14` | 50,000 signed values with random leading-one position, plus edge values |
| `tb_fp14_multiplier` | all 65,536 mantissa pairs with random exponents and signs, 50,000 random pairs, corner cases; both `HANDLE_INF` settings |
| `tb_fp14_adder`, `tb_fp14_subtractor` | 100,000 pairs biased toward cancellation, zeros, exponent 31 |
| `tb_fp14_comparator` | 100,000 pairs, many equal or one mantissa step apart |
| `tb_fp14_units` | end to end: 40,000 pairs on every output, 200 16-term dot products accumulated through the units, 500 2x2 max-pooling windows |

`tb_fp14_units` also counts how often each of these happens, and fails if any
never does: the multiplier's normalisation shift, underflow and exponent wrap;
zero operands; adder cancellation, underflow and saturation; a negative
difference; and both comparator outcomes. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog that ends the run with a
failure.

To simulate with Verilator (5.x), run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp14_pkg.sv tb/fp14_ref_pkg.sv \
    rtl/fp14_to_fixed.sv rtl/fixed_to_fp14.sv rtl/fp14_adder.sv \
    rtl/fp14_subtractor.sv rtl/fp14_comparator.sv rtl/fp14_multiplier.sv \
    rtl/fp14_units.sv tb/tb_fp14_units.sv --top-module tb_fp14_units
./obj_dir/Vtb_fp14_units
```

To test a single unit, change the top module to its testbench. The packages
must come first. Each run takes well under a second.

## Changing the design

The format widths live in `fp14_pkg`. The units are written around the 5/8
split: the 7-bit exponent path of the multiplier and the `pos - 7` offset in
`fixed_to_fp14` follow from it. Changing the format means revisiting those two
spots and the reference package. To pipeline a unit, register its inputs and
outputs. A pipeline stage inside the adder fits naturally after the 41-bit sum.
