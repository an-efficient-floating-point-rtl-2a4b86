# Approximate single precision floating point adder

A floating point adder spends most of its logic on the significand (mantissa) adder.
In error-tolerant work such as audio, image and video processing, the low bits of that
sum matter little. This design saves logic and shortens the carry path by computing the
low 16 bits of the 24-bit significand sum only approximately. The exponent path and the
top byte of the significand stay exact, so the magnitude of the result is always right.
Only its least significant bits can be wrong.

Everything is combinational SystemVerilog. Operands go in and the sum comes out in the
same cycle. Setting one parameter (`NUM_APPROX = 0`) turns the adder into an exact,
correctly rounded IEEE-754 style adder. The testbenches use that build as a reference.

## The approximate bit cell (`approx_cell`)

The trick is in one bit position. A full adder needs an XOR chain for the sum and a
majority function for the carry. The approximate cell drops the propagate term:

    carry = a & b | cin
    sum   = ~carry

The sum is simply the inverted carry, so no XOR is needed. Against an exact full adder,
three of the eight sum entries are wrong (inputs a b cin = 000, 001 and 111) and one
carry entry is wrong (001):

| a b cin | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---------|-----|-----|-----|-----|-----|-----|-----|-----|
| sum     | 1   | 0   | 1   | 0   | 1   | 0   | 0   | 0   |
| carry   | 0   | 1   | 0   | 1   | 0   | 1   | 1   | 1   |

A carry that has appeared is never killed: once any low bit generates one, every bit
above it in the approximate run sees `cin = 1`, produces `carry = 1` and outputs `sum = 0`.

## The 8-bit block (`approx_adder8`)

Each approximate byte has two halves of W = 4 bits:

- **Low half:** four `approx_cell`s chained from the byte's carry in.
- **High half:** four exact `full_adder`s. They ripple from the carry that leaves the
  low half, so their sum bits are exact for that (possibly wrong) carry.
- **Carry out:** a separate 4-bit look-ahead `carry_gen` over the generate
  (`a&b`) and propagate (`a^b`) terms of the high half. It ignores the carry that
  enters the high half:

      cout = g7 | p7 g6 | p7 p6 g5 | p7 p6 p5 g4

The carry out therefore depends only on the top four operand bits. It is ready after one
AND-OR level, instead of a ripple through all eight bits. In units of one full-adder delay
T, the block's carry is ready after about 4T instead of 8T. The price is that a carry
rippling out of the low half into a high half of all-propagate bits (for example
`0x0F + 0xF1`) is lost. That costs 256 in the 9-bit result.

An exhaustive sweep of all 256 × 256 operand pairs with carry in 0 (`tb_approx_adder8`)
measures this error distance |approximate − exact| on the 9-bit result:

| measure        | value |
|----------------|-------|
| maximum        | 270   |
| mean           | 15.4  |
| pairs in error | 82 %  |

The source paper quotes a maximum error distance of 3 for this block. The cell equations
and truth table above cannot produce that: with a = b = 0 the four low sum bits are
already `1111`. This implementation follows the equations and the truth table, not the
quoted figure.

Inside `approx_adder8`, `W` sets the width of the approximate low half. The carry
generator spans the remaining `N − W` bits. With the default N = 8, W = 4 these are the
same four bits either way.

## The significand adder (`mantissa_adder`)

The 24-bit significand adder is three 8-bit blocks chained carry-out to carry-in:

    byte 2 (bits 23..16)  exact_adder8     <- carry from byte 1
    byte 1 (bits 15..8)   approx_adder8    <- carry from byte 0
    byte 0 (bits 7..0)    approx_adder8    <- cin

The 24 bits hold the 23 stored mantissa bits plus the restored hidden '1'. An error in the
low bytes reaches the exact top byte only through the look-ahead carry of byte 1. So the
error stays below about 2^17 in a 24-bit significand, about 2^-6 relative when no
cancellation follows. `NUM_APPROX` sets how many low bytes are approximate: 2 by
default, 0 for fully exact. `W` is passed down to every approximate block.

## Floating point flow (`fp_adder`)

`fp_adder` wraps the significand adder in the usual adder steps:

1. **Special operands** (`fp_special`) are decided first and bypass everything else:
   - a NaN operand, or infinities of opposite sign, gives the quiet NaN `0x7FC00000`
     and sets `nan`;
   - an infinite operand is returned as it is;
   - a zero operand returns the other operand unchanged. Subnormal operands count as
     zero.

   The zero bypass matters here: the approximate cells would otherwise change `x + 0`,
   because with a zero operand each low cell outputs `sum = 1`.
2. **Compare and swap.** `exponent_addsub` subtracts the exponents. Only its carry
   (a ≥ b) is used. On equal exponents the mantissas decide. The operand with the larger
   magnitude goes first, so an effective subtraction never goes negative.
3. **Alignment distance.** A second exact subtraction, larger exponent minus smaller,
   gives the shift.
4. **Align** (`fp_align`). The smaller significand is shifted right. Three bits are kept
   below it: guard, round, and a sticky bit that ORs everything shifted further. A shift
   of 27 or more leaves only the sticky bit.
5. **Add or subtract** on `mantissa_adder`. For operands of equal sign the aligned
   significands are added, and the guard bits pass along unchanged. For opposite signs
   the difference is `larger + ~smaller + 1` on the same approximate adder. The three
   guard bits are outside the adder: they are negated on their own (`0 − grs`), and they
   borrow from the adder exactly when they are non-zero. So the adder's carry in is 1
   only when `grs == 0`.
6. **Normalize and round** (`fp_normalize_round`):
   - A carry out of an addition shifts the result right by one.
   - Otherwise a leading zero count (`lzc`) over the 27 bits {sum, grs} gives the left
     shift.
   - The result is rounded to nearest, ties to even. A rounding carry bumps the exponent.
7. **Range check.**
   - A biased exponent of 255 or more gives ±infinity and sets `overflow`.
   - One below 1 gives ±0 and sets `underflow` (flush to zero).
   - An exactly zero difference gives +0.

## Interface

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `a`, `b`    | in  | 32    | IEEE-754 single precision operands |
| `sum`       | out | 32    | a + b |
| `nan`       | out | 1     | result is NaN |
| `overflow`  | out | 1     | result overflowed; `sum` is infinity |
| `underflow` | out | 1     | result underflowed; `sum` is zero |

| parameter    | default | meaning |
|--------------|---------|---------|
| `NUM_APPROX` | 2       | approximate low bytes of the significand adder (0 to 3) |
| `W`          | 4       | approximate low bits per byte; the carry window is the other 8 − W bits |

There are no clock or reset ports. To pipeline the adder, register its inputs and outputs
in the enclosing design.

## Accuracy

`tb_fp_adder` runs 100,000 random pairs, biased towards corner cases. It compares each
result with a correctly rounded reference and reports the following:

| operands                                   | results that differ from exact | mean relative error | worst relative error |
|--------------------------------------------|--------------------------------|---------------------|----------------------|
| effective addition                         | 98 %                           | 2.1e-4              | 7.5e-3               |
| effective subtraction, at most one leading bit cancelled | 99 %             | 6.1e-4              | 1.6e-2               |
| effective subtraction, all                 | 99 %                           | 6.7e4               | 1.7e7                |

Nearly every result differs in its low bits. Without cancellation the relative error stays
below about 2^-6 (1.6 %), which is what an error of up to about 2^17 in a 24-bit
significand allows. Subtractions of nearly equal numbers can go badly wrong. In that case
the top bits cancel, and normalization shifts the corrupted low bits up to the most
significant positions. The stimulus deliberately includes many such pairs, and they
dominate the last row. Where such cancellations occur, use the exact build
(`NUM_APPROX = 0`), or make fewer bytes approximate.

## What follows the source paper and what does not

Taken from the paper:

- the approximate cell equations and truth table;
- the 8-bit block with a 4-bit approximate half, a 4-bit exact half and a look-ahead
  carry from the top four bits;
- the significand adder of three bytes with the low two approximate;
- the exact 8-bit exponent adder/subtractor;
- the overall steps: compare, swap, align, add, leading-zero normalization, rounding,
  overflow/underflow/NaN flags.

Choices made here, where the paper gives no detail:

- round to nearest even with guard/round/sticky bits;
- subnormals flushed to zero;
- the zero-operand bypass;
- the canonical quiet NaN;
- two's complement subtraction on the same approximate adder;
- ripple-carry exact adders;
- a purely combinational adder with no pipeline registers.

Departures from the paper:

- The adder is 24 bits wide: three bytes, holding 23 mantissa bits plus the hidden bit.
  The paper calls it a 23-bit adder.
- The error distance of the 8-bit block (maximum 270) does not match the value the paper
  quotes (3). See above.

Not modelled:

- the transistor-level cells;
- the reduced supply voltage and the power savings that come with them;
- the DCT/IDCT circuits used to evaluate the adder.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `fp_pkg.sv` | field widths, the `float32_t` struct, constants |
| `fp_adder.sv` | top level |
| `fp_special.sv` | NaN, infinity and zero handling |
| `exponent_addsub.sv` | exact exponent adder/subtractor |
| `exact_adder8.sv` | exact ripple adder |
| `full_adder.sv` | exact 1-bit full adder |
| `fp_align.sv` | alignment shifter with guard/round/sticky |
| `mantissa_adder.sv` | three-byte significand adder |
| `approx_adder8.sv` | approximate 8-bit block |
| `approx_cell.sv` | approximate 1-bit cell |
| `carry_gen.sv` | look-ahead carry generator |
| `fp_normalize_round.sv` | normalization, rounding, range check |
| `lzc.sv` | leading zero counter |

`tb/`:

| file | contents |
|------|----------|
| `tb_<module>.sv` | one self-checking testbench per module |
| `tb_fp_adder_exact.sv` | the exact build against a correctly rounded reference |
| `fp_ref_pkg.sv` | reference models: the truth-table model of the approximate bytes, a bit-exact model of the approximate adder, and a wide-integer correctly rounded adder |
| `fp_stim_pkg.sv` | biased random operand pairs |

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fp_adder \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/fp_stim_pkg.sv tb/tb_fp_adder.sv
    ./obj_dir/Vtb_fp_adder

Replace `tb_fp_adder` with any other testbench name. The packages must come first on the
command line. Each testbench runs in a few seconds at most.

To try other approximation levels, pass the top parameters, e.g.
`-GNUM_APPROX=1` when linting `fp_adder` on its own, or `#(.NUM_APPROX(1))` in an
instance. Note that `fp_ref_pkg::fadd_model_ref` takes the number of approximate bytes as
an argument, so `tb_fp_adder` can be pointed at another setting by changing both the
instance and the `2` passed to the model. The model assumes W = 4.
