# FPU-MULA: a four-cycle fused multiply/add unit for IEEE double precision

This is the floating-point multiply/add unit of a small RISC-like cluster, as
used in the M-Machine multicomputer. It takes IEEE-754 double-precision
operands and can start one operation every clock cycle. Every arithmetic
result comes out four cycles later.

Its central idea is that multiply and add are not two units but one pipeline:

- the first half of the pipeline is a 64 × 64 bit multiplier that rounds its
  product to double precision;
- the second half is an adder that aligns, adds, rounds and normalizes;
- a multiply-add `A*B + C` flows straight through both halves.

The product is rounded before the add. So `FMULA` gives bit for bit the same
answer as an `FMUL` followed by an `FADD`, while still accepting a new
multiply-add every cycle. A plain add runs through the multiplier as `A × 1.0`.
A plain multiply runs through the adder with a zero addend. Every operation
therefore has the same latency, and results can never collide at the output.

The hard part is keeping each half to two clock phases. Each half would
normally need two long carry chains in a row: a final add, then a rounding
increment. Both halves here fold the rounding into the add: they compute
several candidate sums in parallel and pick one with a few bits of logic. The
sections below spend most of their space on that.

## Operations

| op (4-bit code) | result |
|---|---|
| `FADD` 0, `FSUB` 1 | A ± B |
| `FMUL` 2 | A × B |
| `FMULA` 3 | A × B + C, with the product rounded first |
| `IMUL` 4, `HMUL` 5 | low / high 64 bits of the signed 128-bit product A × B |
| `MOV` 6 | A (err-val tag kept) |
| `ITOF` 7 | signed 64-bit integer A to double |
| `FTOI` 8, `FTOIU` 9 | double A to signed / unsigned 64-bit integer, rounded to nearest even |
| `FLT` 10, `FLE` 11, `FEQ` 12, `FNE` 13 | 1 or 0; comparisons with a NaN are false, except `FNE` |
| `FIMM` 14 | sign-extended 16-bit immediate |
| `FSHORU` 15 | `(A << 16) \| imm16` |

Rounding is always round-to-nearest-even, and denormals are handled fully
(gradual underflow). If a result would be a NaN, the unit writes an **err-val**
instead. An err-val is a tagged word that replaces an exception in this
machine. NaN results come from `0 × ∞`, `∞ − ∞` or a NaN operand. Out-of-range
conversions also give an err-val. An overflow gives ±∞.

## Interface and timing

`fpu_mula` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `stall` | in | 1 | freeze every register in the unit |
| `in_valid` | in | 1 | issue an operation this cycle |
| `in_op` | in | 4 | operation (`mula_pkg::op_e`) |
| `in_a`, `in_b`, `in_c` | in | 64 | operands; `in_c` only for `FMULA` |
| `in_a_err`, `in_b_err`, `in_c_err` | in | 1 | operand is an err-val |
| `in_imm` | in | 16 | immediate for `FIMM` / `FSHORU` |
| `in_ip` | in | 64 | instruction pointer, stored in a generated err-val |
| `out_valid` | out | 1 | a result is on `out_data` this cycle |
| `out_data` | out | 64 | result or err-val word |
| `out_err` | out | 1 | `out_data` is an err-val |

Timing rules:

- **Issue.** Inputs are sampled on a rising edge with `in_valid & ~stall`.
  The issuer holds its request while `stall` is high.
- **Latency.** A result appears exactly four advancing cycles after issue:
  after four rising edges with `stall` low.
- **Taking a result.** Take a result in a cycle where `out_valid` is high
  and `stall` is low. During a stall the output registers hold, so the same
  result stays on the outputs until the unit advances again.
- **Feed-through.** `MOV`, `FIMM` and `FSHORU` normally take four cycles as
  well. When nothing older is in flight, they feed through and appear after
  one cycle.
- **Ordering.** Results leave in issue order. An assertion checks that the
  two result paths never retire in the same cycle.

### Pipeline

| cycle | work | modules |
|---|---|---|
| 1 | Booth encoding, 3A adder, partial-product muxes, two carry-save arrays of 11 products each | `booth_pp_gen`, `booth_enc8`, `mult_array` ×2 |
| 2 | combine the arrays, add and round the product (or give the integer product) | `array_combine`, `mult_round`, `adder_both` |
| 3 | exponent compare, operand swap, alignment shift, sticky mask | `align_shifter`, `mask_gen` |
| 4 | three-way add with built-in rounding, post-normalization, special values, result select | `add_round`, `post_norm`, `lzd64` |

Registers:

- after cycles 1, 2 and 3, and on the output;
- 4 stages in the immediate/move path (`imm_path`);
- 4 stages in the err-val path (`errval_path`).

The original circuit uses transparent latches and eight half-cycle stages.
This RTL uses four edge-triggered stages at the same four-cycle latency.

## Number format inside the pipeline

- **Mantissas** travel as 64-bit fields with the 53 significant bits on top.
  The 11 bits below them give the adder room for round, guard and sticky bits.
- **Exponents** are 13-bit signed values with the usual bias of 1023. That
  leaves room for product exponents below 1 and above 2046.
- **Denormal operands** enter with exponent 1 and a leading 0.
- **Zeros, infinities and NaNs** are flagged at issue and carried alongside
  the data. The datapath itself only ever sees finite numbers.

## The multiplier

### Radix-8 Booth encoding

A radix-8 Booth recoding turns the multiplier operand B into 22 digits, each
in the range −4 … +4. This cuts the number of partial products to 22.

- Each digit is read from four overlapping bits, `b[3k+2 : 3k−1]`.
- `booth_enc8` turns those bits into a one-hot select among 0, A, 2A, 3A and
  4A, plus an invert flag.
- The encoder first forms `t2 = b3⊕b2`, `t1 = b3⊕b1` and `t0 = b3⊕b0`. Each
  select is then a small function of these:

| bits b3 b2 b1 b0 | digit | select |
|---|---|---|
| 0000, 1111 | 0 | 0 |
| 0001, 0010 / 1101, 1110 | +1 / −1 | A |
| 0011, 0100 / 1011, 1100 | +2 / −2 | 2A |
| 0101, 0110 / 1001, 1010 | +3 / −3 | 3A |
| 0111 / 1000 | +4 / −4 | 4A |

Only 3A needs an adder. `booth_pp_gen` builds it once, in the first cycle.

A negative digit is formed by inverting the selected multiple rather than
negating it. The missing +1s are collected into a separate **correction
vector**, one bit at the LSB of each inverted product. The vector is added in
later, which takes the carry chain of a negation off the first cycle.

### Operand placement

- **Integer multiplies:** A and B are the 64-bit signed operands. B is
  sign-extended to 66 bits so that 22 digits cover it.
- **Floating-point multiplies:** A is the 53-bit significand. B is the
  significand shifted up 12 places. That puts the product's binary point
  between bits 116 and 115, and its rounding LSB at bit 64. The low 64-bit
  half of the product is then exactly the part that is rounded away.

### Carry-save arrays

Each of the two `mult_array` instances adds 11 partial products with a linear
chain of 3-2 adder rows (`csa32`, a row of full adders). The first row takes
three products and each later row adds one more, so each array has nine rows.

**Narrow rows.** Each partial product is a 66-bit two's-complement number.
Every multiple from −4A to 4A of a 64-bit signed A fits, and so does its
inversion. Product k has weight 2^(3k). So no row computes a full 128-bit
sum: each row works only on the bits its product touches.

- Once a row has passed them, the lowest three bits of the running sum and
  carry can no longer change. They leave the array directly as low output
  bits.
- The rest shifts down three places and is sign-extended into the next
  row's window.
- The sign extension is exact. If all three inputs of a 3-2 adder row are
  sign-extended, its sum and carry outputs are too. A window one bit wider
  than a product (67 bits) therefore loses nothing.
- The first row is six bits wider, because it also holds products 0 and 1.

Each array delivers a 97-bit sum and a 97-bit carry:
`3 × 10` retired bits plus the 67-bit final window.

**Combination.** `array_combine` sign-extends the four array outputs to 128
bits, placing the second array 33 bits higher. Three more 3-2 adder rows then
reduce five vectors to one sum/carry pair. The fifth vector is the correction
vector.

## Rounding the product without a second add

A textbook multiplier adds the final sum and carry vectors, then increments
at the rounding position when needed. That is two 128-bit carry chains in
series. `mult_round` needs one:

1. **Low half.** An ordinary 64-bit adder adds the low halves of the two
   vectors. Its carry-out is the one bit the high half still needs; call it
   the pre-round bit. Its top bit is the round bit R. A zero detector on its
   remaining bits gives the sticky bit S.
2. **Pre-round bit.** A row of full adders folds the pre-round bit into the
   high halves, still in carry-save form.
3. **Both high sums.** `adder_both` adds the high halves once, with two
   global carry chains. It yields both `H` and `H+1`. Each 8-bit local group
   is computed for carry-in 0 and 1. Two global chains then pick the groups
   for a total carry-in of 0 and of 1.
4. **Select.** Round to `H+1` when needed:
   - if `H` is below 2, rounding depends on R;
   - if `H` is 2 or more, the LSB moves up one place and rounding depends
     on H's own bit 0.
5. **Round to nearest even.** On an exact tie the new LSB is forced to 0.
   An exact tie is R set and S clear, or the equivalent one place up.
6. **Normalize.** The mantissa is shifted right by one place (two, if
   rounding carried out again). The shift is reported to the exponent logic.

For `IMUL`/`HMUL`, the pre-round bit is held at 0. The low adder's carry-out
picks `H` or `H+1` instead. That gives the exact 128-bit product from the
same hardware.

## The adder half

### Alignment and the sticky mask

`align_shifter` compares the exponents of the rounded product P and the
addend C.

- **Swap.** Two muxes send the operand with the larger exponent to the
  unshifted side and the other to a 64-bit logarithmic right shifter. On
  equal exponents, C stays unshifted.
- **Shift amount.** The shift is the exponent difference, capped at 63.
  Above 63, every bit has reached the sticky region anyway.
- **Sticky bit.** After the shift, bits 63..11 are the aligned integer part,
  bit 10 is R and bit 9 is G. S is the OR of everything below G: the bits
  still in the window plus every bit that fell off the end.
- **Mask generator.** `mask_gen` finds the bits that fell off without
  waiting for the shifter. It is a two-dimensional array of small comparator
  cells (`mask_cell`):
  - Column j compares the shift amount with the constant j, one radix-4
    digit per row, starting from the most significant digit.
  - A cell whose digit equals its constant passes its x and y inputs
    straight through. If the digit is greater, both outputs take x; if it is
    less, both take y.
  - The column's x input is the operand bit and its y input is 0.
  - So the bottom y output is the operand bit exactly when the shift amount
    exceeds j, that is, when the bit is shifted off.
  - An OR over the columns then gives the sticky contribution.
- **Subtraction.** For an effective subtraction (operand signs differ), the
  unshifted operand is inverted. Its fraction bits, all zero, become ones.
  The two's-complement +1 therefore always carries into the integer part,
  and the adder adds it at the integer LSB.

### Adding and rounding in one step

This is the least obvious part of the design. `add_round` has to deliver a
correctly rounded result before it knows how far the result will be
normalized. It works in five parts.

**Three candidate sums.** Let A and B be the two 54-bit integer parts. Only
three distinct sums can ever be needed: `A+B`, `A+B+1` and `A+B+2`.

- `adder_both` gives the first two.
- A full-adder row plus an ordinary adder gives the third.

Which sum is the unrounded one depends on the operation:

- For an addition, it is `A+B`, and the rounded one is `A+B+1`.
- For a subtraction with a result of 0 or more, it is `A+B+1`, and the
  rounded one is `A+B+2`. R, G, S are the shifted operand's own bits.

**Where to round.** The result lies between 0 and 4, so its integer part has
up to two bits above the binary point.

- If the top bit (53) is set, normalization will shift right by one. The
  rounding point is then the integer LSB, called L.
- If the top bit is clear and bit 52 is set, no shift is needed. Round at R.
- If bits 53 and 52 are clear and bit 51 is set, a left shift by one follows.
  Round at G.
- If all three are clear, round at S.

A 3-bit leading-zero detector on bits 53..51 of the unrounded sum picks one
of those four positions. Rounding at S covers every deeper shift. When the
result needs a left shift of 2 or more, the operands had nearly equal
exponents, so the shifted bits below S are zero and the result is exact.

**Deciding to round up.** A one-hot round vector (`1000` for L, `0100` for R,
`0010` for G, `0001` for S) is added to the 4-bit vector `{0,R,G,S}`. Bit 3
of the sum says that the half-unit carried into the integer part, and the
rounded candidate is selected. The lower bits of the same 4-bit sum are the
new R and G.

**Round to nearest even.** On an exact tie, the bit just left of the rounding
position is forced to 0. An exact tie means the rounding-position bit is 1
and everything to its right is 0. That forced bit is L1, L0, R or G. Bits
below the rounding position are cleared. The left shifter that follows can
therefore shift in zeros.

**Negative results.** A subtraction gives a negative `A+B+1` when the
unshifted operand was the larger. The output muxes then invert:

- The unrounded magnitude is `~(A+B+1)`, with fraction `~RGS + 1`.
- The rounded magnitude is `~(A+B)`, which is one more.

If R, G, S are all zero, the fraction sum carries and `~(A+B)` is taken
directly. The result then has the unshifted operand's sign. For a
non-negative result it has the opposite sign. No incrementer is needed.
The three sums cover every case.

The output `v` is `{integer part, R, G}`, ready for post-normalization.

### Post-normalization and gradual underflow

`post_norm` uses `lzd64` to find the leading 1. The detector has eight 8-bit
local chains and a global chain that picks the first group with a 1. A left
shifter then moves the leading 1 to the top, and the exponent becomes
`e_more + 1 − shift`.

**Gradual underflow.** The shift is limited so that the exponent never drops
below 1. If the leading 1 cannot reach the top, the result is a denormal and
its exponent field becomes 0. `add_round` must then round at the denormal's
own LSB, so its rounding position is capped at `min(e_more, 3)`.

**Tiny products.** A product whose exponent is below the normal range meets
an addend with exponent at least 1. For `FMUL`, that addend is a zero of the
product's sign with exponent 1. The alignment shifter then moves the product
right into the denormal range, so one shifter serves both alignment and
gradual underflow.

## Conversions

- **ITOF.**
  - An 11-bit leading-zero count on the top bits of the integer's magnitude
    left-aligns it into the 64-bit operand field, with exponent
    `1086 − count`.
  - The value goes down the add side with a zero addend.
  - The adder's rounding reduces it to 53 bits. That is the right shift the
    conversion needs for large integers.
- **FTOI / FTOIU.**
  - A zero addend with exponent 1075 (the exponent of an integer's LSB) makes
    the alignment shifter move the value to a fixed binary point.
  - The adder rounds at R: to nearest even, as always.
  - For magnitudes of 2^53 and above, the post-normalization shifter moves
    the integer left by up to 11 places.
  - These cases write an err-val: NaN, infinity, a value out of the
    destination range, and a negative non-zero value for `FTOIU`.

## Immediates, moves and err-vals

**`imm_path`.** Four registers in a row carry `MOV`, `FIMM` and `FSHORU`
results.

- A mux at the input forms the `FSHORU` shift-and-OR.
- Muxes between the registers let an operation skip to the last register.
- The skip is allowed only when the arithmetic pipeline and this path's own
  first three registers are empty. The operation then appears after one
  cycle without overtaking anything.

**`errval_path`.** Four registers follow every arithmetic operation.

- **Err-val operand.** If any used operand is an err-val, the first one in
  the order A, B, C enters the path. It is written in place of the result.
- **Fresh word.** Otherwise the path carries a fresh err-val word:
  `{cause[3:0], op[3:0], ip[55:0]}`. If the datapath finds an invalid
  operation, the fresh word's cause field is set and the word replaces the
  result.
  - cause 1: NaN result;
  - cause 2: conversion out of range.

## Where this RTL departs from the original circuit

| Topic | Original circuit | This RTL |
|---|---|---|
| Circuit style | Custom circuits: domino multiplier array with delayed precharge, RS interface latches, transparent-latch half-cycle stages | Ordinary synchronous logic. The logic functions are the same; the timing structure differs. |
| Booth selects | — | Derived from the encoding table. They use the same three XOR terms as the original encoder cell. |
| Pre-round bit in `mult_round` | OR of the two vectors' bits at R, added at the LSB | The low adder's carry-out |
| Array row and output width | 66 bits per row, 96-bit array outputs | 67 bits per row, 97-bit array outputs |
| `FSHORU` | Shift and OR of a 16-bit immediate | Treated as `(A << 16) \| imm16` |
| `FIMM` | — | Sign-extends its immediate |

Several choices are this design's own, because the original leaves them to
surrounding control logic:

- the operation encoding;
- the err-val word layout;
- handling of special values;
- the stall semantics;
- the comparison results.

**Multiplies near the bottom of the range.** This is the one known numerical
difference from strict IEEE-754. It is inherent to the fused structure, and
the original design has it too.

- **Tiny product.** If the exact product lies below the normal range, it is
  first rounded to 53 bits in the multiplier. The alignment shifter then
  rounds it again, at the denormal's LSB. The two roundings can differ from
  one correct rounding by one unit in the last place.
- **Denormal operand.** A denormal operand is not normalized before the
  multiply. So the multiplier rounds at a fixed position, and such a product
  keeps fewer significant bits than the result format allows.

Adds, subtracts and conversions are exact IEEE round-to-nearest-even in every
case, including denormal operands and results.

### Not included

These parts belong to the surrounding floating-point cluster, not to this
unit:

- the message send unit, which is shared with the integer unit;
- the register file;
- the issue/scoreboard logic;
- the divide/square-root unit.

## Files

`rtl/`:

| file | role |
|---|---|
| `mula_pkg.sv` | shared constants, the operation enum, err-val causes, the internal operand struct |
| `fpu_mula.sv` | top: operand unpacking, exponent and special-value logic, comparisons, the four pipeline stages, output merge |
| `booth_enc8.sv` | Booth encoder |
| `booth_pp_gen.sv` | partial-product generator |
| `csa32.sv` | 3-2 adder row |
| `mult_array.sv` | 11-product carry-save array |
| `array_combine.sv` | final 5-to-2 reduction |
| `adder_both.sv` | dual-result adder |
| `mult_round.sv` | product add-and-round |
| `mask_cell.sv`, `mask_gen.sv` | sticky mask generator |
| `align_shifter.sv` | alignment |
| `add_round.sv` | combined add and round |
| `lzd64.sv` | leading-zero detector |
| `post_norm.sv` | normalization |
| `imm_path.sv` | immediate/move registers |
| `errval_path.sv` | err-val registers |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. The
exception is `mask_cell`, which is tested through `mask_gen`. Each
compares against a reference computed independently, in plain SystemVerilog
arithmetic. Each prints a line of the form
`TB_RESULT checks=N failures=M`.

`tb_fpu_mula.sv` runs the whole unit at its default parameters:

- 40,000 random operations of all sixteen kinds;
- special values, exact ties, cancellations, overflow and underflow
  operands, and err-val operands;
- random gaps between operations and random stalls.

Its reference is the simulator's own IEEE `real` arithmetic plus 128-bit
integer math. It checks:

- every result value and err-val flag;
- every result's latency, in advancing cycles.

It also counts how often each mechanism occurred and fails if one never did.
Those mechanisms are:

- stall and feed-through;
- product normalization, rounding and ties;
- add rounding and ties;
- cancellation and negative results;
- sticky bits shifted off;
- denormal results and overflow;
- err-val generation and propagation;
- the conversion left shift;
- integer multiplies.

Multiplies in the range described above are counted as known deviations, not
failures.

## Simulating

Any testbench builds with Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/mula_pkg.sv tb/tb_fpu_mula.sv --top-module tb_fpu_mula -o sim
./obj_dir/sim
```

Replace `tb_fpu_mula` with any other `tb_*` to test one block. The top-level
run takes well under a minute. The widths of the arrays and adders are
parameters, but their defaults are the sizes used by the top level.
