# Single-precision IEEE 754 arithmetic unit

This is a floating-point unit for 32-bit IEEE 754 (binary32) numbers, written in
SystemVerilog. It does five operations: add, subtract, multiply, divide and square root.
It supports all four IEEE rounding modes and gives a full set of exception flags.

The unit is built from independent units:

- one unit for add and subtract together;
- one unit each for multiply, divide and square root.

Every unit has the same three stages:

1. A **pre-normalize** stage brings the operands into an internal form that is easy to work on.
2. An **arithmetic core** computes the raw mantissa and exponent.
3. A **post-normalize** stage normalizes the raw result, rounds it and packs it back into binary32.

An output multiplexer picks the result of the unit chosen by the op-code. A small
exception block then turns that result, the operands and the unit's status into the
eight exception outputs. The units share no logic, and each post-normalize stage has its own
rounding logic. You can remove one unit, or add a new one, without touching the others.
Four bit parameters of the top, `EN_ADDSUB`, `EN_MUL`, `EN_DIV` and `EN_SQRT` (all 1 by
default), leave a unit out of the build. The op-codes of a unit that is left out then
behave like the unused op-codes: ready after 2 edges, with a zero result.

The arithmetic is exact in the IEEE sense, including subnormal inputs and outputs. Every
result is the correctly rounded value in the selected mode. The testbenches check this
bit for bit against an independent reference model.

## Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i` | in | 1 | clock; all registers use the rising edge |
| `opa_i`, `opb_i` | in | 32 | operands, binary32 (square root uses only `opa_i`) |
| `fpu_op_i` | in | 3 | `000` add, `001` subtract, `010` multiply, `011` divide, `100` square root |
| `rmode_i` | in | 2 | `00` nearest-even, `01` toward zero, `10` toward +inf, `11` toward -inf |
| `start_i` | in | 1 | start an operation; it is also the only reset |
| `output_o` | out | 32 | result, binary32 |
| `ready_o` | out | 1 | `output_o` and the flags are valid |
| `ine_o` | out | 1 | inexact: the result was rounded |
| `overflow_o` | out | 1 | the rounded result was too large and became inf or the largest finite number |
| `underflow_o` | out | 1 | the result is tiny after rounding (subnormal or zero) and inexact |
| `div_zero_o` | out | 1 | a finite non-zero number was divided by zero |
| `inf_o` | out | 1 | the result is ±infinity, however that came about |
| `zero_o` | out | 1 | the result is ±0, however that came about |
| `qnan_o` | out | 1 | the result is a NaN (every invalid operation gives one) |
| `snan_o` | out | 1 | an operand the operation reads is a signalling NaN |

### Protocol and timing

- **Starting an operation.** Drive the operands, op-code and rounding mode, then hold
  `start_i` high for one clock edge. That edge samples all inputs, so they may change
  afterwards.
- **While busy.** `ready_o` goes low on the next cycle. The top controller has two states,
  *waiting* and *busy*, and enters busy.
- **Finishing.** When the selected unit reports ready, the top registers the result and all
  eight flags. `ready_o` then rises and stays high until the next start.
- **Restarting.** A start while busy abandons the running operation and begins the new one.
- **After power-up.** There is no other reset, so the outputs are undefined until the first start.

Latency, counted in clock edges from the edge that samples `start_i` to the edge after
which `ready_o` is high:

| Operation | Unit stages (pre + core + post) | Unit | At the top |
|---|---|---|---|
| add / subtract | 1 + 1 + 1 | 3 | 4 |
| multiply | 1 + 5 + 1 | 7 | 8 |
| divide | 1 + 27 + 1, plus one hand-over cycle | 30 | 31 |
| square root | 1 + 26 + 1, plus one hand-over cycle | 29 | 30 |
| op-code `101`–`111` | no unit | — | 2 (result 0, no flags) |

The top adds one cycle because it registers the result and flags. The fixed-latency
add/subtract unit has no hand-over cycle: its ready bit rises with its last stage.

## Normalize, round and pack (`fp_round_pack`)

Every post-normalize stage hands the rounding to `fp_round_pack`, and each unit has its own
copy. This is the part that makes the arithmetic IEEE-exact, so it is worth understanding
first.

**Input.** The module takes a sign, a mantissa `mant_i` of `W` bits and a signed 13-bit
exponent `exp_i`. `exp_i` is the biased exponent that bit `W-1` of the mantissa would carry,
so the value is `mant_i · 2^(exp_i − 127 − (W−1))`. A `sticky_i` bit says that something
non-zero lies below the last mantissa bit; the divider and square root set it from their
remainder. The units pass their raw result without normalizing it first:

| Unit | `W` | What the mantissa holds |
|---|---|---|
| add/subtract | 28 | the sum |
| multiply | 48 | the product |
| divide | 27 | the quotient bits |
| square root | 26 | the root bits |

**Normalize.**
- A leading-zero count finds the leading one, and a left shift moves it to the top.
- The shift stops early if it would take the exponent below 1. The result is then
  subnormal, and its exponent field is 0.
- If `exp_i` is already below 1, the mantissa is shifted right instead. Every one bit that
  falls off goes into the sticky bit.

**Round.**
- The top 24 bits are kept.
- The next bit is the guard bit. All bits below it, together with `sticky_i`, make the sticky part.
- The rounding decision depends on the mode:
  - nearest-even rounds up when guard is set and (sticky or the last kept bit) is set;
  - toward +inf rounds positive inexact values up;
  - toward −inf rounds negative inexact values up, in magnitude;
  - toward zero never rounds up.
- A carry out of the 24 bits moves the mantissa one place and raises the exponent by one.
  A subnormal that rounds up to the smallest normal number becomes normal in the same way.

**Overflow.**
- An exponent of 255 or more is an overflow.
- Nearest-even, and rounding away from zero, give ±infinity.
- The other two modes give the largest finite number of the same sign.

**Flags.**
- `ine` is set when any bit was discarded.
- `underflow` is set when the result is also tiny after rounding, meaning the packed
  exponent field is 0. This is the *tininess after rounding* rule.

Each unit resolves special operands (NaN, infinity, zero) itself, in its post-normalize
stage. It uses the operands it captured at start and bypasses the rounder for them.

## Add / subtract unit

- **Subtract.** Subtraction is addition with the sign of B inverted.
- **Pre-normalize** (`pre_norm_addsub`):
  - compares the exponents; if `e_A > e_B`, A is the large operand, otherwise B is;
  - shifts the smaller mantissa right by the difference into a 28-bit field:
    `[27]` carry, `[26]` hidden bit, `[25:3]` fraction, `[2]` guard, `[1]` round, `[0]` sticky;
  - ORs every bit shifted past bit 0 into the sticky bit.

  This gives the same rounding as a double-width alignment shifter, but in 28 bits.
- **Core** (`addsub_28`):
  - when the effective signs are equal, it adds;
  - otherwise it subtracts the smaller magnitude from the larger, so the result is always a
    positive magnitude with the sign of the larger operand.
- **Post-normalize** (`post_norm_addsub`) rounds through `fp_round_pack`.
  - An exact zero from a true subtraction is +0, or −0 when rounding toward −inf.
  - inf − inf is invalid and gives a quiet NaN.

## Multiply unit

- **Pre-normalize** (`pre_norm_mul`):
  - adds the exponents and subtracts the bias 127;
  - the stored value is one higher, because it labels bit 47 of the 48-bit product;
  - computes the sign as an XOR.
- **Core** (`mul_24`) is a parallel 24 × 24 multiplier spread over five cycles. Each
  operand is split into 12-bit halves. Four 12 × 12 partial products form in parallel.
  They are then summed in two adder stages:
  `ah·bh·2^24 + (ah·bl + al·bh)·2^12 + al·bl`.
  The four small multipliers map well onto 18 × 18 FPGA multiplier blocks.
- **Post-normalize** (`post_norm_mul`):
  - rounds the raw 48-bit product, which also handles subnormal inputs and outputs with no
    extra logic;
  - 0 × inf is invalid and gives a quiet NaN.

## Divide unit

- **Pre-normalize** (`pre_norm_div`):
  - counts the leading zeros `z_A` and `z_B` of both mantissas, which matters only for
    subnormals;
  - shifts both mantissas left so their leading ones line up at bit 23;
  - forms the exponent as `e_A − e_B + 127 − z_A + z_B`.
- **Core** (`serial_div`) is a restoring divider that produces one quotient bit per clock.
  - Each step compares the partial remainder with the divisor. When it fits, the step
    subtracts and records a 1. Then the remainder doubles.
  - After 27 steps it holds `floor(A·2^26 / B)`: an integer bit and 26 fraction bits. That
    is enough for 24 result bits plus a guard bit in both cases: quotient ≥ 1 and quotient < 1.
  - A non-zero final remainder is the sticky bit.
- **Post-normalize** (`post_norm_div`):
  - x / 0, with x finite and non-zero, gives ±infinity and raises `div_zero`;
  - 0/0 and inf/inf are invalid;
  - x/inf gives ±0, and inf/x gives ±inf.

## Square-root unit

The square root has the one non-obvious step in the design: halving the exponent.

- **Radicand.** Pre-normalize (`pre_norm_sqrt`) counts the leading zeros `z_A` of the
  mantissa. It appends 28 zeros to make a 52-bit radicand, then shifts left by `z_A`.
- **Exponent.** The result exponent is `(e_A + 127 − z_A) / 2`.
- **Parity.** The radicand as laid out suits an odd unbiased exponent `e_A − z_A − 127`.
  When that exponent is even, the radicand is shifted one more place right, which absorbs
  the factor of two and keeps the halving exact. Either way, the 26-bit root has its leading one at bit 25. That
  leaves 24 result bits, a guard bit and one spare bit.
- **Core** (`sqrt`) finds the root digit by digit in 26 loops, one per clock, using only
  shifts, one comparison and one subtraction:
  - each loop brings the next two radicand bits down into the partial remainder;
  - it compares the remainder with `4·root + 1`;
  - if that fits, it subtracts and sets the next root bit.
  - The final remainder gives the sticky bit.
- **Post-normalize** (`post_norm_sqrt`). A square root can neither overflow nor underflow.
  - √(+0) = +0, √(−0) = −0 and √(+inf) = +inf.
  - A NaN, or any negative non-zero operand (−inf included), gives a quiet NaN.

## Exceptions and invalid operations

- **Invalid operations** give the quiet NaN `0x7FC00000`, with the sign bit clear. These are:
  - any operation on a NaN;
  - inf − inf;
  - 0 × inf;
  - 0/0 and inf/inf;
  - the square root of a negative number.

  A NaN operand is not passed through. `qnan_o` is high whenever the result is that NaN.
- **`snan_o`** is raised when an operand the operation reads is a signalling NaN. This is
  exponent all ones, a non-zero fraction, and fraction bit 22 clear. For such an operand
  both `snan_o` and `qnan_o` are high.
- **`inf_o` and `zero_o`** are read off the final result.
- **`ine_o`, `overflow_o`, `underflow_o` and `div_zero_o`** come from the unit that did the work.
- **Exact results with special operands**, such as inf + 1, never raise `overflow_o` or `ine_o`.

## Verification

Each unit has a self-checking testbench in `tb/`. There is also one end-to-end testbench for
the top. All of them compare against `fp_ref_pkg`, a reference model that does not share the
hardware's approach:

- it computes the exact result on 320-bit integers (integer product, long division with the
  remainder, integer square root);
- it rounds that exact value once, by comparing the dropped part with half a unit in the last
  place.

Random operands are chosen by class:

- any bit pattern;
- normal numbers near a chosen exponent, to get cancellation and long carries;
- subnormals;
- zeros, infinities, and quiet and signalling NaNs;
- very large and very small numbers.

| Testbench | What it covers | Checks |
|---|---|---|
| `tb_addsub_unit` | directed cases and 6000 random add/sub in all modes; result, flags, latency | 12068 |
| `tb_mul_unit` | directed and random products, overflow, underflow, subnormals | 12067 |
| `tb_div_unit` | directed and random quotients, division by zero, invalid cases | 8072 |
| `tb_sqrt_unit` | directed and random roots, both exponent parities, negative operands | 8066 |
| `tb_fpu_result_mux` | selection for every op-code | 2000 |
| `tb_fpu_exceptions` | all eight flags against their definitions | 5000 |
| `tb_fpu` | see below | 10050 |
| `tb_fpu_units_left_out` | the top built with `EN_MUL = EN_SQRT = 0`, run beside the full build | 3002 |

`tb_fpu` tests the top end to end:

- the worked examples 2.5 + 4 = 6.5, 2.5 − 4 = −1.5, 4 × 2.5 = 10, 16 / 4 = 4 and √16 = 4;
- directed division by zero, overflow, underflow and signalling-NaN cases;
- a restart while busy;
- the unused op-codes;
- 5000 random operations.

It counts how often each operation, rounding mode, exception, subnormal result and restart
occurred, and it fails if any of them never happened. A typical run:

```
ops add=1077 sub=927 mul=1000 div=1026 sqrt=980 unused=2
exceptions ine=3794 ovf=167 unf=252 dz=26 inf=324 zero=320 qnan=549 snan=212
subnormal results=114 restarts=1
TB_RESULT checks=10050 failures=0
```

`tb_fpu_units_left_out` runs 3000 random operations on a full build and on a build with
the multiply and square-root units left out. The reduced build must agree bit for bit on
add, subtract and divide. It must answer multiply and square root like an unused op-code:
ready after 2 edges with a zero result.

Each testbench ends with a `TB_RESULT checks=… failures=…` line and has a watchdog that stops
a hung simulation.

## Simulating

This needs Verilator 5. The package `fpu_pkg.sv` must come first, then the other RTL files,
then the reference package, then the testbench:

```
verilator --binary -j 4 --top-module tb_fpu \
    rtl/fpu_pkg.sv $(ls rtl/*.sv | grep -v fpu_pkg) \
    tb/fp_ref_pkg.sv tb/tb_fpu.sv -o sim
./obj_dir/sim
```

For a single unit, swap in its testbench, for example `--top-module tb_div_unit` with
`tb/tb_div_unit.sv`. All RTL is synthesizable, with no vendor primitives. The top carries two
concurrent assertions on the ready handshake.

## Design choices and departures from the original description

The design follows a thesis on an FPGA arithmetic unit. Where that description is silent or
differs, this RTL does the following:

- **Op-code and rounding-mode codes.**
  - The codes for add, subtract, divide and square root follow the original.
  - Multiply takes the remaining code, `010`.
  - The rounding codes follow the usual order of the four modes (nearest-even, toward zero,
    up, down).
- **Latency.**
  - The original gives only the multiplier core's five cycles, which are kept.
  - The other latencies above follow from this implementation.
  - The original top used a cycle counter. This top waits for the selected unit's ready
    bit instead.
- **Multiplier.** The original used a parallel multiplier, but its internal split is not
  described; the 12-bit-halves scheme is this design's own. The serial shift-and-add
  multiplier is mentioned only as a slower alternative and is not included.
- **Square root.**
  - The original flowchart is a 26-pass successive-approximation loop that works on the
    square of the trial root. This RTL keeps the 26 passes, the 28 appended zeros and the
    shift-only arithmetic.
  - It computes each bit with the digit-by-digit remainder form, which needs no squaring.
  - The odd/even exponent step is this design's own.
- **Add/subtract alignment.** The original describes a double-width (48-bit) alignment
  shifter. This RTL keeps 28 bits and folds everything below into a sticky bit, which gives
  identical results.
- **Subnormals** are fully supported in both directions. The original does not say how it
  treats them.
- **NaN results** are always `0x7FC00000`. The original leaves the sign of the NaN it
  produces unspecified.
- **Clock rate.** The original aimed at about 100 MHz and reported under 20 MHz for its
  Spartan-3E build. This RTL has not been timed on an FPGA. Its longest paths are the
  one-cycle normalize-and-round in each post-normalize stage and the 24-bit alignment shift.
  Splitting those is the first step if more speed is needed.
- **Leaving units out.** The original does this by editing the output multiplexer. Here the
  top's `EN_*` parameters do it.
- **Device mapping.** The original's device-utilization figures are for its own code on a
  specific Xilinx part. They say nothing about this RTL. The I/O count matches: 112 signals.

## Files

| File | Contents |
|---|---|
| `rtl/fpu_pkg.sv` | op-code and rounding enums, status and exception structs, classification helpers |
| `rtl/fpu.sv` | top: controller, unit instances, registered outputs |
| `rtl/fp_round_pack.sv` | shared normalize/round/pack logic, one instance per unit |
| `rtl/addsub_unit.sv`, `pre_norm_addsub.sv`, `addsub_28.sv`, `post_norm_addsub.sv` | add/subtract |
| `rtl/mul_unit.sv`, `pre_norm_mul.sv`, `mul_24.sv`, `post_norm_mul.sv` | multiply |
| `rtl/div_unit.sv`, `pre_norm_div.sv`, `serial_div.sv`, `post_norm_div.sv` | divide |
| `rtl/sqrt_unit.sv`, `pre_norm_sqrt.sv`, `sqrt.sv`, `post_norm_sqrt.sv` | square root |
| `rtl/fpu_result_mux.sv` | output multiplexer |
| `rtl/fpu_exceptions.sv` | exception outputs |
| `tb/fp_ref_pkg.sv` | exact reference model and operand generator |
| `tb/tb_*.sv` | self-checking testbenches |
