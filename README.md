# Single-precision floating-point ALU

A small arithmetic unit for IEEE 754 single-precision (binary32) numbers,
intended as the arithmetic core of a math coprocessor. It adds, subtracts,
multiplies and divides two 32-bit floating-point operands. The three
operations are built as three separate sequential units: an
adder/subtractor, a multiplier and a divider. A top level, `fpu`, feeds
them the same operands and uses two selection lines to choose which one
answers. Every word moves on a strobe/acknowledge handshake, so the caller
never has to know how many clocks an operation takes.

| `{s1,s0}` | operation | example (`input_a`, `input_b` → `output_z`) |
|-----------|-----------|---------------------------------------------|
| `00` | add; subtract by giving `input_b` a negative sign | `40000000` + `40400000` → `40A00000` (2 + 3 = 5) |
| `00` | (subtraction) | `40000000` + `C0400000` → `BF800000` (2 − 3 = −1) |
| `01` | multiply | `40000000` × `40400000` → `40C00000` (2 × 3 = 6) |
| `10` | divide, `input_a / input_b` | `40000000` / `40400000` → `3F2AAAAB` (2 / 3) |
| `11` | nothing selected: `output_z` = 0, no strobe, no acknowledge | |

These four examples are the reference results of the design. The
end-to-end testbench checks them bit for bit.

## Number format

A word is `{sign, exponent[7:0], fraction[22:0]}`. The exponent is biased by
127. A normal number is (−1)^S · 2^(E−127) · 1.F. The leading 1 is the
*hidden bit*; with it, the fraction becomes a 24-bit *significand*.
Exponent 0 means zero or a subnormal: the hidden bit is 0 and the exponent
counts as 1. Exponent 255 means infinity (fraction 0) or NaN (fraction
≠ 0). `rtl/fpu_pkg.sv` holds these definitions as the struct `fp32_t`,
together with the helper functions and the shared rounding step.

## The handshake and timing

Each of the three words (`input_a`, `input_b`, `output_z`) has a strobe
from its sender (`*_stb`) and an acknowledge from its receiver (`*_ack`).
A word is transferred on a rising clock edge at which both are high.
Every unit runs the same cycle:

1. **GET_A**: the unit raises `input_a_ack` and waits for `input_a_stb`.
2. **GET_B**: the same for `input_b`.
3. **Compute**: a few states, described below.
4. **PUT_Z**: `output_z_stb` goes high and stays high until `output_z_ack`
   is seen. While it waits, `output_z` and the flags do not change
   (assertions check this). The unit then returns to GET_A.

`output_z_stb` is high at the following rising edge, counted from the edge
that takes `input_b`:

| operation | edge | extra edges |
|-----------|------|-------------|
| add / subtract | 7th | +1 for each left shift needed to renormalise after cancellation |
| multiply | 6th | +1 if the product's leading one is at bit 47; +1 per shift for subnormal operands |
| divide | 33rd | +1 per shift to normalise a subnormal operand |

Special-value operations (NaN, infinity, zero operands) skip the
arithmetic and finish sooner. `rst` is synchronous and active high. It
returns every unit to GET_A with all strobes and acknowledges low.

In `fpu`, the strobes `input_a_stb`, `input_b_stb` and `output_z_ack` are
gated with the selection, so only the selected unit sees them. The others
wait in GET_A. **Change `s1`/`s0` only between operations**: after
`output_z` has been taken and before the next `input_a` is offered. If the
selection changes during an operation, the unit that was left stays part
way through and later offers that old result when it is selected again.
An assertion in `fpu` flags a selection change while a result is waiting.

## Adder/subtractor (`rtl/adder.sv`)

This unit has the most steps; they follow the classic sign-magnitude
algorithm.

1. **Unpack and swap.** Any subnormal operand gets a hidden bit of 0. If
   E2 > E1, the operands are exchanged, so N1 always has the larger
   exponent. Each significand is extended by three low bits (guard, round,
   sticky), making it 27 bits wide.
2. **Align.** S2 is shifted right by d = E1 − E2, with zeros filling from
   the left. Any 1 shifted out is ORed into the sticky bit. Both operands
   now have exponent E1.
3. **Add.**
   * *Same signs*: S = S1 + S2. If the sum carries out, it is shifted
     right by one (the carry becomes the MSB, the dropped bit joins the
     sticky bit) and the exponent goes up by one. The sign is N1's.
   * *Different signs*: S = S1 + (2's complement of S2).
     * A carry out means |N1| ≥ |N2|. The carry is discarded and the sign
       is N1's.
     * No carry means N2 was larger (possible only when E1 = E2). S is
       replaced by its 2's complement and the sign is N2's.
     * An exact zero result is +0 (−0 only for −0 + −0).
4. **Normalise.** While the MSB is 0, S moves left by one and the exponent
   goes down by one. This takes one clock per position. It stops at
   exponent 1; the result is then a subnormal.
5. **Round and pack** (see below).

## Multiplier (`rtl/multiplier.sv`)

* Sign S = S1 xor S2. Intermediate exponent E = E1 + E2 − 127.
* The two 24-bit significands are multiplied into a 48-bit product, with
  the binary point between bits 46 and 45. For normal inputs the leading
  one is at bit 46 (no shift) or at bit 47. At bit 47 the product shifts
  right once and E goes up by one.
* A subnormal operand leaves the leading one lower. The product then
  shifts left, one bit per clock, lowering E each time. The full 48-bit
  product is kept, so nothing is lost.
* After rounding, an exponent above 254 gives ±∞ and raises `overflow`.
  An exponent below 1 gives ±0 and raises `underflow`. An intermediate
  exponent of 0 can still be saved by the right shift.

## Divider (`rtl/divider.sv`)

* S = S1 xor S2 and E = E1 − E2 + 127. The bias is added back so that the
  result exponent is biased again.
* A subnormal operand is first shifted left until its hidden bit is 1, so
  both significands lie in [1, 2).
* The significands are divided by a restoring divider that produces one
  quotient bit per clock. It makes 27 bits, weighted 2^0 to 2^−26, and
  the final remainder supplies the sticky bit. The quotient lies in
  (½, 2). When it is below 1, one left shift and E − 1 normalise it. A
  quotient ≥ 2 cannot occur, so there is no right-shift path.
* Overflow and underflow are handled as in the multiplier.

## Rounding, exceptions and special values

All three units round to nearest, ties to even, using the guard, round and
sticky bits (`round_pack` in `fpu_pkg`). If rounding carries out of the
significand, the exponent goes up by one.

| case | result | flag |
|------|--------|------|
| any NaN operand, +∞ + −∞, 0 × ∞, 0 / 0, ∞ / ∞ | quiet NaN `7FC00000` | – |
| ∞ ± finite, ∞ × non-zero, ∞ / finite | ±∞ | – |
| x / 0, x ≠ 0 (divide by zero) | ±∞ | – |
| 0 × finite, 0 / non-zero, finite / ∞ | ±0 | – |
| multiply/divide result above the largest normal | ±∞ | `overflow` |
| multiply/divide result below the smallest normal | ±0 (flushed) | `underflow` |
| add/subtract result below the smallest normal | subnormal, exact | – |
| add/subtract result above the largest normal | ±∞ | – |

The flags are outputs of the multiplier and divider and of `fpu`. They are
valid while `output_z_stb` is high. With the adder selected they read 0.

## What is fixed by the original description and what was chosen here

These parts come from the description this design was built from:

* the number format;
* the three-unit structure with a common top and two selection lines,
  including the codes 00/01/10 and subtraction as addition of a negated
  operand;
* the port names of the units;
* the adder's steps: swap on the larger exponent, right alignment,
  2's complement subtraction with the carry deciding the sign, left
  normalisation;
* the multiplier's E1 + E2 − 127 and its bit-46/47 normalisation;
* the multiplier's overflow to ±∞ and underflow to ±0, each with a flag;
* the divider's sequence of steps;
* the four reference results.

These parts are this design's own choices:

* **Handshake and latency.** The state sequences, all cycle counts, the
  synchronous active-high reset, and gating the strobes to the selected
  unit.
* **Rounding.** Round to nearest even with guard/round/sticky bits in all
  three units. The source's adder steps drop the bit shifted out after a
  carry (truncation), while its multiplier and divider include a rounding
  step without naming a mode. Here the adder rounds like the other two.
  The 2 / 3 = `3F2AAAAB` reference needs round-to-nearest.
* **Subnormals.** They are accepted as operands everywhere, and produced
  by the adder. The multiplier and divider flush subnormal results to
  zero, as the source specifies for underflow. This is not full IEEE 754
  gradual underflow.
* **Flag outputs.** The `overflow`/`underflow` ports, and the choice that
  divide by zero raises no flag.
* **NaN encoding** and the exact special-value table above.
* **Code `11`.** It selects no unit.

The adder's overflow to infinity is not flagged. No inexact flag exists,
and no rounding mode other than nearest-even is available.

## Files

| file | contents |
|------|----------|
| `rtl/fpu_pkg.sv` | `fp32_t`, constants, operation codes, classification helpers, `round_pack` |
| `rtl/adder.sv` | adder/subtractor unit |
| `rtl/multiplier.sv` | multiplier unit |
| `rtl/divider.sv` | divider unit |
| `rtl/fpu.sv` | top level: three units and the output multiplexers |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches (see below) |
| `tb/adder_tb.sv`, `tb/multiplier_tb.sv`, `tb/divider_tb.sv` | unit testbenches |
| `tb/fpu_tb.sv` | end-to-end testbench of `fpu` |

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/fpu_pkg.sv tb/fp_ref_pkg.sv rtl/adder.sv rtl/multiplier.sv \
  rtl/divider.sv rtl/fpu.sv tb/fpu_tb.sv --top-module fpu_tb
./obj_dir/Vfpu_tb
```

A unit testbench needs only the two packages, its unit and its own file,
for example `rtl/fpu_pkg.sv tb/fp_ref_pkg.sv rtl/divider.sv
tb/divider_tb.sv --top-module divider_tb`. Each testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog that ends a hung
run as a failure. Lint with `verilator --lint-only -Wall` on the same file
lists. The remaining warnings are unused bits of helper-function arguments
and the adder's unused flag bits of the shared rounding result.

## How the results are checked

The testbenches do not reuse any of the design's logic. `fp_ref_pkg`
converts operands exactly to double precision and lets the simulator do
the operation. It then rounds the double to single precision in software:
nearest even, with subnormals. For +, −, × and ÷, rounding a double result
once more to single gives the correctly rounded single result, because a
double has more than 2·24 + 2 significand bits. For the multiplier and
divider, an expected subnormal becomes ±0 with `underflow`, and an
expected infinity from finite operands needs `overflow`.

* **Unit testbenches.** Each runs about 3000 operations. They mix directed
  corner cases (ties, cancellation, overflow, underflow, subnormals,
  infinities, NaN, divide by zero) with random operands. The operands are
  drawn from the full exponent range, from close exponents (to force
  cancellation in the adder) and from the special values.
  `output_z_ack` is held back for random numbers of clocks.
* **`fpu_tb`.** This is the end-to-end run of the top at its only
  configuration. It checks:
  * the four reference results and their cycle counts;
  * that code 11 gives no response;
  * free-running use, with both operand strobes and `output_z_ack` held
    high so that a unit repeats an operation back to back;
  * about 1500 random operations with the selection changing between
    them.

  It also counts every mechanism: each operation, adder carry,
  cancellation, bit-47 normalisation, overflow, underflow, divide by zero,
  NaN, a held-back acknowledge, a selection change and free-running use. A mechanism that
  never occurs counts as a failure.

The reference rounds a result just below the smallest normal number in
the subnormal format. The multiplier and divider round in the normal
format and then flush. For a result within half a unit in the last place
below 2^−126, the two can differ; random operands are very unlikely to land in that band.
