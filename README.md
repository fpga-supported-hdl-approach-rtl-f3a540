# floting_point_alu32: a combinational IEEE 754 single-precision ALU

This design is an arithmetic logic unit for 32-bit IEEE 754 floating point
numbers. Two operand words, `a` and `b`, are fed at the same time to an
adder/subtractor, a multiplier, a divider and a bitwise logic unit. A 4-bit
select `s` chooses which result appears on the 65-bit output `out`. There is
no clock: the output follows the inputs after the logic delay. All three
arithmetic units have the same shape:

1. **pre-normalization**: split the fields, restore the hidden bit, line up or
   combine the exponents and sort out special operands;
2. **significand operation**: add or subtract, multiply, or divide;
3. **post-normalization**: shift the raw significand back to the form 1.xxx
   and round it to 24 bits;
4. **exception handling**: detect overflow and underflow, apply the special
   results and pack the IEEE 754 word.

The original article specifies the ALU's interface, the order of these stages
and the exponent arithmetic. This RTL adds the details the article leaves
open: rounding, guard bits, special values and the encodings. Those choices
are listed under "Where this RTL departs from or extends the original".

## Interface

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `a`   | in  | 32 | operand A (IEEE 754 single; plain bits for logic operations) |
| `b`   | in  | 32 | operand B |
| `s`   | in  | 4  | operation select |
| `out` | out | 65 | result and flags |

| `s` | operation | `s` | operation |
|-----|-----------|-----|-----------|
| 0 | a + b | 4 | a AND b |
| 1 | a - b | 5 | a OR b |
| 2 | a * b | 6 | a NAND b |
| 3 | a / b | 7 | a NOR b |
|   |       | 8 | a XOR b |

Codes 9 to 15 give an all-zero output.

`out[31:0]` holds the result word. Three flags follow it: `out[32]` is
overflow, `out[33]` is underflow and `out[34]` is divide by zero.
`out[64:35]` is reserved and always zero. The flags are zero for the logic
operations. The port names and widths, 65 output bits included, are those of
the published ALU symbol. The published FPGA result lists 133 I/O pins, which
matches 32 + 32 + 4 + 65. The select encoding and the use of the output bits
are this design's own.

## Number handling in brief

- **Rounding**: round to nearest, ties to even. Results are correctly
  rounded, and they match IEEE 754 single precision bit for bit on normal
  numbers.
- **Subnormals**: not supported. A subnormal input counts as zero with its
  sign kept.
- **Underflow**: a result whose rounded magnitude is below 2^-126 becomes a
  signed zero, and `out[33]` is set.
- **Overflow**: a result at or above 2^128 after rounding becomes a signed
  infinity, and `out[32]` is set.
- **Divide by zero**: a finite nonzero number divided by zero gives a signed
  infinity, and `out[34]` is set.
- **NaN**: NaN operands and the invalid forms give the quiet NaN `0x7FC00000`
  without a flag. The invalid forms are inf - inf, 0 * inf, 0 / 0 and
  inf / inf.
- **Infinity**: infinity operands otherwise follow IEEE 754.
- **Zero results**: x - x gives +0. -0 + -0 gives -0.

## Add and subtract: alignment, guard bits and cancellation

This is the subtlest path (`fp_prenorm_addsub`, `fp_addsub`).

**Operand order.** For a subtraction the sign of `b` is inverted first, so the
rest of the path only ever adds. Then the two operands are ordered by
magnitude. The exponent and fraction fields are compared as one unsigned
number, so the larger operand always comes first. The larger operand's sign
becomes the result sign. The XOR of the two signs decides whether the
significands are added or subtracted. A subtraction takes the smaller
significand from the larger one, by adding its two's complement, so the
difference is never negative.

**Alignment.** The smaller significand is shifted towards the least
significant end by the exponent difference, so both operands share the larger
exponent. It is first extended by three low bits: guard, round and sticky.
Any bit shifted past those three is ORed into the sticky bit. Differences of
27 or more leave only the sticky bit. Three extra bits are enough for a
correctly rounded sum or difference:

- a large shift can only drop the result by one binade, so at most one left
  normalization shift follows it;
- a massive cancellation can only happen when the shift was 0 or 1, and then
  no bits were lost.

**Width.** The 27-bit sum gets a carry bit, giving 28 bits. Bit 26 has weight
1, and bit 27 holds a carry-out, as in 1.5 + 1.5.

## Post-normalization and rounding (`fp_postnorm`)

All three units hand over the same kind of raw result:

- a W-bit significand whose bit W-2 has weight 1;
- the biased exponent that goes with that weight;
- a sticky bit for anything already discarded.

The adder and the divider use W = 28. The multiplier uses W = 48: the full
product of two 24-bit significands, which lies in [1, 4).

**Normalization.** A leading-zero count shifts the significand left until its
MSB is 1, and the exponent is adjusted by the same amount. A carry in bit W-1
therefore counts as a shift of -1 and increments the exponent.

**Rounding.** The top 24 bits are the significand. The next bit is the guard
bit. All lower bits, plus the incoming sticky bit, make up the sticky bit.
Ties to even rounds up when guard AND (sticky OR lsb). If rounding carries out
of the significand (1.111...1 + ulp), the result becomes 1.0 and the exponent
goes up by one.

**Unbounded exponent.** The exponent stays a signed 10-bit value here. Range
checks happen only in `fp_exception`, so overflow and underflow are judged on
the rounded result.

**Constraint.** The incoming sticky bit may only be set when the leading one
lies in the top three bits. The divider's quotient always meets this.

## Multiply (`fp_prenorm_muldiv`, `fp_mul`)

The sign is the XOR of the operand signs. The biased exponent is ea + eb - 127.
The significands are multiplied as unsigned 24-bit numbers, because the sign
is handled separately (sign-magnitude form). The 48-bit product goes straight
to the post-normalizer, with no bits dropped. Zero and infinity operands are
resolved in pre-normalization.

## Divide (`fp_mant_div`, `fp_div`)

The sign is the XOR of the operand signs. The biased exponent is ea - eb + 127.

**Restoring division.** The significands are divided by a restoring divider,
fully unrolled into combinational logic:

- the first quotient bit is the comparison n >= d;
- each of the next 26 steps doubles the partial remainder, adds the two's
  complement of the divisor, and keeps the difference if it is not negative;
- a negative difference restores the old remainder and gives a 0 quotient bit.

**Quotient format.** The 27-bit quotient has its weight-1 bit at bit 26. Since
n/d lies in (1/2, 2), the leading one is at bit 26 or bit 25. That leaves at
least 24 result bits plus a guard bit. A nonzero final remainder becomes the
sticky bit, which is enough for correct rounding.

**Zero operands.** A zero divisor gives infinity, with the divide-by-zero flag
set for a finite nonzero dividend. A zero dividend gives zero.

## Logic operations (`fp_logic`)

AND, OR, NAND, NOR and XOR, applied bit by bit to the raw operand words.

## Module map

| file | role |
|------|------|
| `rtl/fp_pkg.sv` | shared types: `fp32_t`, unpacked operand, flags, special-case and opcode enums, constants |
| `rtl/fp_unpack.sv` | field separation, hidden bit, zero/inf/NaN classification |
| `rtl/fp_prenorm_addsub.sv` | operand ordering, exponent compare, alignment with guard/round/sticky |
| `rtl/fp_prenorm_muldiv.sv` | sign XOR, exponent sum/difference with bias, zero and special checks |
| `rtl/fp_postnorm.sv` | leading-zero normalization, round to nearest even (parameter `W`) |
| `rtl/fp_exception.sv` | overflow/underflow detection, special results, packing |
| `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | the three arithmetic units |
| `rtl/fp_mant_div.sv` | unrolled restoring significand divider |
| `rtl/fp_logic.sv` | bitwise logic unit |
| `rtl/floting_point_alu32.sv` | top: the four units and the output select |

The top module's name keeps the spelling of the published symbol.

## Where this RTL departs from or extends the original

- **Alignment direction.** The original flow chart says the smaller mantissa
  is "left shifted" by the exponent difference. Alignment needs a shift
  towards the least significant bit, and that is what is built.
- **Field widths and sign convention.** The original's prose swaps the
  mantissa and exponent widths and the meaning of the sign bit. The RTL
  follows standard IEEE 754: 8-bit exponent, 23-bit fraction, sign 1 =
  negative.
- **Order of rounding and normalization.** The multiply and divide flow charts
  round before they normalize. Here rounding follows normalization, with a
  renormalization after a rounding carry. This ordering is what makes the
  result correctly rounded.
- **Divider timing.** The division is described with accumulator and register
  names, as a sequential algorithm. The ALU symbol has no clock, so the steps
  are unrolled into combinational logic.
- **Choices the original leaves open:** the rounding mode, the number of guard
  bits, flush-to-zero for subnormals, NaN and infinity handling, the select
  encoding and the layout of the output word.
- **Exception checks.** The original ties overflow to addition and underflow
  to subtraction. Here every arithmetic operation checks both.
- **Reversible logic is not implemented.** The original also mentions a
  library of reversible gates (AND, OR, NAND, NOR, XOR) and circuits built
  from it: a full adder, a full subtractor, 2:4 and 3:8 decoders, a
  multiplier and a comparator. It never says which reversible gates they use
  or how the circuits are built, so none of that is implemented here. The
  logic operations use ordinary gates.
- **Timing and area.** The design is one deep combinational path. It has no
  pipeline registers, and no timing or area figures are claimed for this
  RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

**Reference model.** The arithmetic testbenches compare against
`tb/fp_ref_pkg.sv`, which works independently of the RTL:

1. it widens the operands exactly to double precision;
2. it does the operation in the simulator's `real` arithmetic;
3. it rounds the result back to single precision by bit manipulation.

The model applies the same flush-to-zero and NaN conventions as the ALU.
Rounding twice, first to double and then to single, gives the correct result
for +, -, * and /, because 53 >= 2*24 + 2.

**Stimulus.** The testbenches use directed cases and about 20,000 random
operand pairs:

- directed cases cover ties, overflow, underflow, divide by zero and the
  special operands;
- random operands mix normal numbers over the full range with zeros,
  infinities, NaNs and subnormals;
- some pairs have nearly equal magnitudes, to force cancellation.

**End-to-end test.** `tb/tb_floting_point_alu32.sv` runs every select code. It
counts how often each mechanism occurs:

- alignment shift, cancellation and carry renormalization;
- round-up;
- overflow, underflow and divide by zero;
- a NaN result.

A mechanism that never occurs counts as a failure. All testbenches pass.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_floting_point_alu32.sv \
        --top-module tb_floting_point_alu32 -Mdir obj -o sim && obj/sim

Replace the testbench name to run another one. Verilator finds the RTL files
through `-Irtl`.
