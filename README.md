# Customizable pipelined floating-point cores

This is a set of floating-point arithmetic units for FPGA or ASIC designs:
an adder, a subtractor, a multiplier, a divider, and an adder in a
reduced-precision 15-bit format. Each unit is a pipeline that accepts a new
operand pair on every clock cycle (initiation interval 1). Parameters set
the number format, the pipeline depth and the IEEE 754 special-case
handling.

The units follow cores that were first written as branch-free C and turned
into hardware by high-level synthesis. The idea behind them is that a core
you can edit is worth more than a fixed vendor core. You can narrow the
exponent and mantissa for approximate computing. You can remove the
special-case logic when an application never produces zeros, infinities or
NaNs. Here the same customizations are RTL parameters:

| parameter | meaning |
|---|---|
| `EXP_W`, `MAN_W` | exponent and mantissa width (8/23 = single precision, 4/10 = reduced precision) |
| `EXC` | 1: IEEE 754 handling of zero, infinity and NaN operands; 0: none (smaller, assumes normal operands) |
| `LATENCY` (adder, multiplier) | pipeline depth in cycles |
| `STEPS_PER_STAGE` (divider) | quotient bits computed per pipeline stage |

All units round to nearest, ties to even. None of them supports subnormal
numbers: a subnormal operand is read as zero and a subnormal result becomes
a signed zero. Most FPGA floating-point libraries make the same trade.

## Number format and special cases

A word is `{sign, exponent, mantissa}`. A normal number has the value
`(-1)^sign × 2^(exponent − bias) × 1.mantissa`, with `bias = 2^(EXP_W−1) − 1`.
That is 127 for single precision and 7 for the 15-bit format. The reduced
format keeps the IEEE conventions: an all-ones exponent is reserved for
infinity and NaN, and exponent zero is reserved for zero.

With `EXC = 1`:

| case | adder / subtractor | multiplier | divider |
|---|---|---|---|
| NaN operand | NaN | NaN | NaN |
| invalid | inf − inf | 0 × inf | 0 / 0, inf / inf |
| infinite result | an infinite operand | an infinite operand | inf / x, x / 0 |
| zero operand | the other operand (−0 + −0 = −0) | signed zero | 0 / x, x / inf → signed zero |
| exact cancellation | +0 | – | – |

Every NaN result is the canonical quiet NaN: sign 0, all-ones exponent,
only the top mantissa bit set (`0x7FC00000` in single precision). After
rounding, an exponent at or above the all-ones code gives infinity, and an
exponent of zero or below gives a signed zero. This applies in both `EXC`
settings.

With `EXC = 0` the units contain no comparators for zero, infinity or NaN.
Every operand is treated as a normal number, so an exponent field of zero
counts as 2^−bias with a hidden 1. This is correct only when the
application guarantees normal operands.

## The adder/subtractor datapath (`fp_addsub`)

Subtraction is addition with the sign of `b` inverted (`SUB = 1`). The
datapath has four phases, and each decision in it is a multiplexer rather
than a branch:

1. **Order and align.** The operand with the larger magnitude is found by
   comparing exponents, and mantissas when the exponents are equal. That
   operand also supplies the result sign. Both significands get their
   hidden 1. The smaller one is shifted right by the exponent difference
   into a field three bits wider than the significand: a *guard* bit, a
   *round* bit and a *sticky* bit. The sticky bit is the OR of everything
   shifted further out, so no information needed for rounding is lost.
   In parallel, the special cases are resolved from the operands alone into
   a flag and a ready-made result word that travel down the pipeline.
2. **Add.** The aligned significands are added, or subtracted when the
   signs differ. Because the larger magnitude is always the minuend, the
   difference is never negative.
3. **Normalise.** A carry out of the addition means a right shift by one,
   with the dropped bit folded into the sticky bit, and exponent + 1.
   Otherwise a leading-zero count drives a left shift, and the count is
   subtracted from the exponent. A left shift of two or more places only
   happens when the exponents differ by at most one. In that case nothing
   was shifted into the sticky bit, so the shift is exact. An all-zero sum
   (exact cancellation) becomes +0.
4. **Round and pack** (`fp_round`). The significand is incremented when the
   round bit is set and either the sticky bit or the kept LSB is set. A
   carry out of that increment raises the exponent. Then comes the
   overflow/underflow clamp and the packing.

**Leading-zero counter (`fp_lzc`).** The counter halves its window at each
level. It asks whether the upper half of the remaining window is all zero
and writes that answer into one bit of the count (16, 8, 4, 2, 1 for 32
bits). It then continues with the lower half if the upper half was zero,
and with the upper half otherwise. The RTL keeps the window left-aligned and
appends a single 1 below the input. That makes any width count correctly,
including an all-zero input, which counts as `WIDTH`. The adder uses it at
`MAN_W + 4` bits.

**Pipeline cuts.** `LATENCY` registers are placed in a fixed order:

| `LATENCY` | registers |
|---|---|
| 0 | none (combinational) |
| 1 | output |
| 2 | + between add and normalise |
| 3 | + between align and add |
| 4 | + between normalise and round |
| > 4 | further registers follow the output; with register retiming in synthesis they move into the logic |

The original cores were pipelined to a clock-period target by the synthesis
tool. Their depths ran from 2 to 31 stages for the adder. The stage
boundaries above are this design's own choice.

## Multiplier (`fp_mul`)

The result sign is the XOR of the operand signs. The exponent is
`ea + eb − bias`. The two 24-bit significands are multiplied in a single
wide product, which lies in [1, 4). If the top bit is set, the significand
is taken one place higher and the exponent incremented. The bits below it
give the round and sticky bits for `fp_round`. `LATENCY = 1` (the default)
puts one register at the output. `LATENCY = 2` adds a register between the
product and the rounding, and further registers follow the output. Mapping
the wide multiply onto DSP blocks is left to synthesis.

## Divider (`fp_div`)

The divider uses radix-2 restoring division, one quotient bit per
iteration. The partial remainder starts as the dividend significand. Each
iteration compares it with the divisor significand. If the remainder is not
smaller, the divisor is subtracted and the quotient bit is 1; otherwise the
remainder is kept and the bit is 0. The remainder is then doubled.

The significand quotient lies in (1/2, 2). Producing `MAN_W + 3` quotient
bits (26 in single precision, weights 2^0 down to 2^−25) leaves enough
below the kept 24 bits for a round bit in either case. When the quotient is
≥ 1, the last quotient bit and a non-zero final remainder form the sticky
bit. When it is < 1, the quotient moves up one place, the exponent
`ea − eb + bias` drops by one, and the final remainder alone is the sticky
bit.

The recurrence is unrolled so that the divider also accepts an operand pair
every cycle:

* stage 1 registers the unpacked operands, exponent and special-case code;
* each middle stage performs `STEPS_PER_STAGE` iterations;
* the last stage rounds and registers the result.

The latency is `2 + ceil(26 / STEPS_PER_STAGE)`. The default of one bit per
stage gives 28 stages. With five bits per stage it is 8, and with all 26 in
one stage it is 3. No setting goes beyond 28 stages.

## Top level (`fp_cores_top`)

The top places five independent units side by side. Each has its own
`*_in_valid`, operands, `*_out_valid` and result. They share only `clk`
and the active-low asynchronous reset `rst_n`, which clears the valid bits
only. Single-precision ports use `fp_pkg::fp32_t` and reduced-precision
ports `fp_pkg::fp15_t`. There is no back-pressure: a result appears exactly
the latency after its operands, and an idle cycle (`in_valid = 0`) simply
makes a bubble.

| unit | module | default latency |
|---|---|---|
| `add` | `fp_addsub` (8/23, `SUB = 0`) | 2 (`ADD_LATENCY`) |
| `sub` | `fp_addsub` (8/23, `SUB = 1`) | 2 (`ADD_LATENCY`) |
| `mul` | `fp_mul` (8/23) | 1 (`MUL_LATENCY`) |
| `div` | `fp_div` (8/23) | 28 (`DIV_STEPS = 1`) |
| `rpa` | `fp_addsub` (4/10) | 1 (`RP_LATENCY`) |

`EXC` sets the special-case handling of the four single-precision units
(default 1) and `RP_EXC` that of the reduced-precision adder (default 1).
The default depths are those of the smallest cores in the original
evaluation: 2, 1 and 1 stages for adder, multiplier and reduced-precision
adder, and a 28-stage divider that was one of its evaluated points.

Files (one module or package per file):

```
rtl/fp_pkg.sv        format constants, fp32_t / fp15_t, bias()
rtl/fp_lzc.sv        leading-zero counter
rtl/fp_round.sv      round to nearest even, overflow/underflow clamp, pack
rtl/fp_pipe.sv       register chain with valid bit (pipeline cuts and output)
rtl/fp_addsub.sv     adder / subtractor
rtl/fp_mul.sv        multiplier
rtl/fp_div.sv        divider
rtl/fp_cores_top.sv  the five units side by side
```

## Verification

Every testbench checks results bit for bit against a reference in
`tb/fp_ref_pkg.sv`. The reference converts operands exactly to double
precision and computes with the simulator's `real` arithmetic. It then
rounds the double result once more to the target format with round to
nearest even. For +, −, × and ÷ this double rounding still gives the
correctly rounded result, because a double has more than 2p + 2 significand
bits for p ≤ 24. The reference applies the same flush-to-zero, overflow and
NaN conventions as the RTL.

`tb/fp_check_harness.sv` drives one unit with random operand pairs,
mostly back to back and with a bubble about one cycle in eight. Besides
arbitrary values, the operands include:

* zeros, subnormals, infinities and NaNs;
* operands of equal or nearly equal magnitude, to force cancellation;
* operands from the smallest and largest binades, to force underflow and
  overflow.

The harness checks each result and its exact latency, and counts how often
each case occurred.

| testbench | what it runs |
|---|---|
| `tb_fp_lzc` | both counter widths: zero, all-ones, every single bit, 5,000 random values |
| `tb_fp_add`, `tb_fp_sub`, `tb_fp_add_rp`, `tb_fp_mul`, `tb_fp_div` | 20,000 pairs each, with `EXC = 1` and `EXC = 0` |
| `tb_fp_cores_top` | the whole top at default parameters, 5,000 pairs per unit |
| `tb_fp_depth_sweep` | 18 builds at the evaluated pipeline depths, 3,000 pairs each |
| `tb_fp_random_million` | 1,000,000 pairs per unit through the top, 5,000,000 results |

In `tb_fp_depth_sweep`, the depths are:

* adder 2/4/26/31;
* subtractor 2/5/29/31;
* multiplier 1/6/8;
* divider 8/15/28;
* reduced-precision adder 1/13.

`tb_fp_add` also runs one hand-worked example, 12.25 + 3.75 = 16.0. It
covers alignment by two places, a carry-out and renormalisation.
Assertions inside the RTL check three invariants during every simulation:

* the adder's normalised significand has its hidden bit set;
* the multiplier's product lies in [1, 4);
* the divider's partial remainder stays below twice the divisor.

Each unit testbench, and `tb_fp_cores_top`, fails if a case the unit
handles never occurred: NaN, special operand, overflow, flush to zero,
cancellation (adders only), inexact rounding, bubble or back-to-back issue.
All testbenches pass. Each module was also broken on purpose, for example
by dropping the sticky bit or skipping the exponent correction of the
divider. Every such break is caught with hundreds to thousands of failing
checks.

To simulate with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_cores_top.sv \
  --top-module tb_fp_cores_top -o sim --Mdir obj
./obj/sim
```

Replace `tb_fp_cores_top` with any other testbench name. Each one ends with
a line `TB_RESULT checks=N failures=M`.

## Departures and limits

* **Rounding mode.** The original cores specify guard, round and sticky
  bits and correct rounding. The rounding mode itself was a design choice
  here: round to nearest, ties to even. No other rounding mode is built.
* **Tininess.** Underflow is decided after rounding, and a result below the
  smallest normal number becomes zero. No exception flags are produced.
* **Exceptions off.** With `EXC = 0`, only the detection of special
  *operands* is removed. Overflow to infinity and flush to zero of
  *results* remain.
* **Pipeline stages.** Stage boundaries and pipeline depths are
  parameters, not the output of a scheduler. Adder and multiplier depths
  beyond their fixed cuts (4 and 2) rely on register retiming in synthesis
  to add speed.
* **Divider depths.** The divider cannot reach depths above 28 stages, or
  between 16 and 27. The original evaluation also had divider builds of 16,
  18, 21, 26, 39, 82 and 85 stages.
* **No area or speed data.** Nothing here reproduces the FPGA area and
  clock-rate results of the original cores. Those depend on a vendor tool
  flow and device.
