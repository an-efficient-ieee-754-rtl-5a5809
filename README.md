# A single-precision IEEE-754 floating point unit with CLA, Karatsuba, non-restoring and CORDIC datapaths

This FPU takes two numbers, each given the way a fixed-point program holds one: a signed 32-bit
integer part and a 32-bit binary fraction. It turns them into IEEE-754 single-precision words and
performs one of eight operations on them:

| `fpu_op` | operation | unit | clocks, start to done |
|---|---|---|---|
| 0 | add `op1 + op2` | block carry-look-ahead adder | 2 |
| 1 | subtract `op1 - op2` | the same adder, two's complement | 2 |
| 2 | multiply | Karatsuba split with bit-pair (radix-4 Booth) recoding | 2 |
| 3 | divide `op1 / op2` | non-restoring divider, 3 clocks per quotient bit | 77 |
| 4 | shift `op1` integer word | 32-bit logarithmic barrel shifter | 2 |
| 5 | square root of `op1` | non-restoring square root, 3 clocks per root bit | 77 |
| 6 | sine and cosine of `op1` (degrees) | 12-step integer CORDIC | 16 |
| 7 | tangent of `op1` (degrees) | CORDIC, then the divider on sine / cosine | 92 |

Every arithmetic result goes through a normalise-and-round stage with four rounding modes. An
exception stage then sets the IEEE-754 default result and flag for division by zero and for
invalid operations. Each algorithm was picked to keep the logic small rather than fast. The adder
shares carry sub-terms between bit positions to cut gate count and fan-in. The multiplier builds a
24×24 product from three 12-bit products. The divider and square root reuse one add/subtract step
for every bit.

## Top level: `fpu_top`

```
op1_int/op1_frac ─► cnvrt_2_integral ─► cnvrt_2_ieee ─► op1_ieee ─┐
op2_int/op2_frac ─► cnvrt_2_integral ─► cnvrt_2_ieee ─► op2_ieee ─┤
                                                                   │
     ┌─────────────────────────────────────────────────────────────┤
     │ add/sub: pre_normalization ─► fp_add / fp_sub ─► post_normalization (rmode) ─┐
     │ mul/div/sqrt/trig: pre_normalization_mds ─► multiplication │ division │       │
     │                    squareroot │ trig_unit ─► post_normalization (rmode) ────┤
     │ shift: barrel_shifter (op1_int word) ────────────────────────────────────────┤
     └──────────────────────────────────────────────── exception_handling ◄─────────┘
                                                          │
                                        oper_result, flags (registered)
```

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `start` | in | 1 | sampled while `busy` is low; loads both operands and the controls |
| `op1_int`, `op2_int` | in | 32 | integer part: bit 31 sign, bits 30:0 magnitude |
| `op1_frac`, `op2_frac` | in | 32 | fraction: bit 31 weighs 1/2 |
| `fpu_op` | in | 4 | operation, table above; codes 8..15 finish in 2 clocks with result 0 |
| `rmode` | in | 2 | 0 truncate, 1 nearest-even, 2 towards +∞, 3 towards −∞ |
| `shift_dir`, `shift_val` | in | 1, 5 | shift: 1 = left, distance 0..31 |
| `op1_ieee`, `op2_ieee` | out | 32 | the converted operands, valid from the clock after `start` |
| `oper_result` | out | 32 | result (sine for `fpu_op` 6, tangent for 7; the raw shifted word for `fpu_op` 4) |
| `cos_result` | out | 32 | cosine after `fpu_op` 6 or 7 |
| `sin_fx`, `cos_fx` | out | 16 | sine and cosine × 2048, two's complement |
| `overflow`, `underflow`, `div_by_0`, `invalid`, `inexact` | out | 1 | flags of the last operation |
| `busy`, `done` | out | 1 | operation running; one-clock pulse when results are valid |

A small controller sequences the work through idle, execute and wait states, plus one extra state for the tangent. `start` registers the
converted operands, the operation and the rounding mode. In the execute state the combinational
operations (add, subtract, multiply, shift) are written to `oper_result` and the flags, and `done`
follows. Divide, square root, sine/cosine and tangent instead start their sequential unit and wait for
its done. `start` is ignored while `busy` is high. `oper_result`, `cos_result` and the flags hold until
the next operation finishes.

## The two-part operand and its conversion

`cnvrt_2_integral` packs an integer and a fraction into one 32-bit *effective operand*:
- Bit 31 is the sign.
- Bits 30:0 hold the integer magnitude from its leading one downwards, followed by as many
  fraction bits as still fit.
- `pos` gives the bit position of that leading one.

Example: integer `0x02A350E0` and fraction `0xFFFC00FF`:
- The leading one is at position 25.
- The effective operand is `0 1010100011010100001110000011111`.

If the integer magnitude is zero, the fraction is shifted past its leading zeros, and `pos` is −1
minus that count. Small values therefore also keep 31 significant bits.

`cnvrt_2_ieee` normalises the effective operand:
- The exponent is `pos + 127`.
- The 23 bits after the leading one form the mantissa.
- Bits below those are cut off: conversion truncates.

The example above becomes `0x4C28D438`. A zero magnitude gives a signed zero.

Every operand therefore lies between 2^-32 and 2^31 in magnitude, or is zero. No result of the
operations can then leave the single-precision range. So the overflow and underflow logic
in the post-normalisation units is present and unit-tested, but **cannot be triggered from the top
level**. Subnormal numbers, infinities and NaNs never occur as inputs either.

## The unrounded format

All arithmetic units hand their result to `post_normalization` as a `fpu_pkg::unrounded_t`:
- a sign;
- an 11-bit signed exponent with bias 127;
- a 28-bit significand `sig`, with value `sig / 2^26 · 2^(exp−127)`.

`sig[27]` is a carry position, `sig[26]` the hidden one, `sig[25:3]` the fraction and `sig[2:0]` the
guard, round and sticky bits. The wider exponent lets the multiplier and divider work out-of-range
exponents before rounding. `post_normalization` then:
- shifts right by one on a carry;
- otherwise shifts left to the leading one;
- rounds by `rmode`, renormalising if rounding overflows the mantissa;
- returns the IEEE-754 overflow result (infinity, or the largest finite number when rounding
  towards zero or away from that infinity);
- flushes results below the normal range to a signed zero.

Three instances are used: one for add/subtract, one shared by multiply, divide, square root,
sine and tangent, and one for the cosine.

## Add and subtract

`pre_normalization` restores the hidden ones, compares the magnitudes and swaps the operands so
the larger one comes first. It shifts the smaller mantissa right by the exponent difference. The
bits shifted out are kept as guard, round and sticky; a difference above 26 leaves only sticky.

If the effective signs agree, `fp_add` adds the mantissas. Otherwise `fp_sub` subtracts them. After
the swap the difference is never negative, so no result needs complementing. Both use
`cla_adder24`:
- The adder is four 6-bit carry-look-ahead blocks with the carry rippling between blocks.
- Inside a block, the carries are written so that two sub-terms are formed once and reused by the
  higher carries: `G0 + P0·C0` and `G2 + P2·G1`. This cuts the AND/OR count and the fan-in of the
  top carries compared with the fully expanded look-ahead equations.

Subtraction adds the one's complement of the smaller mantissa. The carry-in is 1 only when the
guard/round/sticky bits are zero; otherwise the borrow is taken from the fraction bits, whose
two's complement joins the result.

An exact zero difference is +0, or −0 when rounding towards −∞.

## Multiply

`karatsuba_mul24` splits each 24-bit mantissa into 12-bit halves and forms three products. The
middle product uses 13-bit sums of the halves. They are combined as
`z2·2^24 + (zm − z2 − z0)·2^12 + z0`. Each product comes from `booth_mul`:
- The multiplier is recoded in bit pairs, radix-4 Booth, into digits −2..+2.
- One shifted partial product is added per pair.

`multiplication` then computes:
- the sign as an XOR;
- the exponent as `e1 + e2 − 127`;
- a significand from the top 27 bits of the 48-bit product, with the rest folded into sticky.

## Divide and square root: three clocks per bit

`nrd_divider` is a non-restoring divider over registers A (remainder, N+2 bits), Q and M. Each
quotient bit takes three clocks:
1. Shift A and Q left together.
2. Subtract M from A if A ≥ 0, else add M.
3. Set the new quotient bit to the inverse of A's sign.

After N bits, one clock adds M back to a negative remainder. For N = 24 this is 72 iteration
clocks.

`division` first makes the dividend mantissa at least the divisor mantissa by doubling it when
needed, in `pre_normalization_mds`. The quotient is then a 24-bit mantissa. The remainder gives
the rounding bits: guard = `2R ≥ M`, sticky = `R ≠ 0`. Special cases:
- x/0 (x ≠ 0) gives a signed infinity and `div_by_0`.
- 0/0 gives the quiet NaN `0x7FC00000` and `invalid`.
- 0/x gives a signed zero.

`nr_sqrt` is the non-restoring integer square root:
- Two radicand bits are brought down per root bit.
- The remainder is never restored.
- The same three-clock shift / add-or-subtract / set-bit rhythm is used.

`squareroot` instantiates it for a 24-bit root. The radicand is the mantissa times 2^23, or
times 2^24 for an odd exponent so that the exponent halves exactly. Rounding bits: guard =
`rem > root`, sticky = `rem ≠ 0`. A negative operand gives a NaN and `invalid`; ±0 gives itself.

Both take 77 clocks from `start` to `done` at the top: 72 iteration clocks plus operand
registration, unit load, remainder correction and two result registers.

## Sine and cosine: integer CORDIC

`cordic` rotates the vector (X, Y) = (0.60725·2048, 0) towards the target angle A, one step per
clock for 12 steps:
- If A ≥ 0: `X −= Y>>i`, `Y += X>>i`, `A −= atan(2^-i)`.
- Otherwise the three signs reverse.

Angles are in degrees × 2048. The arctangent table holds `round(atan(2^-i) · 2048)` in degrees:
92160, 54405, 28746, 14592, 7324, 3664, 1833, 917, 459, 230, 115, 57. The starting X = 1244
cancels the CORDIC gain. After 12 steps Y ≈ 2048·sin and X ≈ 2048·cos, within about 3/2048. X and
Y are 16 bits. The angle register is 20 bits, because 90° is 184320.

`trig_unit` turns the IEEE operand into degrees × 2048 by shifting the mantissa, truncating
towards zero. It runs the CORDIC and passes both results to post-normalisation. Angles beyond
±90°, the range over which 12 steps converge as built, give NaN results and `invalid`. The range
check looks at the angle after truncation to 1/2048°.

The tangent reuses the divider. When the CORDIC finishes, the post-normalised sine and cosine are
stored. They are sent back through `pre_normalization_mds` to `division`, in place of the
operands. The quotient is rounded like any other division. A cosine of exactly zero gives a signed
infinity and `div_by_0`. The tangent inherits the CORDIC's error, about 3/2048 in each of sine and
cosine. Near ±90° that error is magnified by 1/cos².

## Shift

`barrel_shifter` shifts by 16, 8, 4, 2 and 1 places in five stages, one per bit of `shift_val`,
so every distance takes one pass. The shift is logical, with zeros filled. At the top it acts on
the raw 32-bit integer-part word of operand 1 and returns the word as is. For example, 100 shifted
right by 5 is 3.

## Where this design departs from, or adds to, the original description

- **Rounding modes.** The original uses truncation only, which is mode 0 here. Nearest-even,
  towards +∞ and towards −∞ are added. Their encoding is this design's.
- **Conversion exponent.** The exponent is `pos + 127`, and the mantissa is the 23 bits after the
  leading one. A zero integer part is handled by normalising the fraction.
- **Flags and NaNs.** An `invalid` flag and NaN results are added for 0/0, √(negative) and angles
  out of range. An `inexact` flag is set when rounding changed the value, and always for a valid
  sine, cosine or tangent. The original brings out only overflow, underflow and divide-by-zero.
- **Ties away from zero.** The original also mentions rounding to nearest with ties away from
  zero. That mode is not built; the four modes here are IEEE-754's directed and nearest-even
  modes.
- **Extra ports.** The start/busy/done handshake, `cos_result`, `sin_fx` and `cos_fx` are
  additions.
- **Add/subtract front end.** Guard/round/sticky bits and the magnitude ordering before the adder
  are additions.
- **Latencies.** The original reports 2–3 clocks for add/subtract/multiply, 72 for divide, 75–80
  for square root and 31 for sine/cosine. This design takes 2, 77, 77 and 16.
- **Tangent.** The original names tangent among the trigonometric functions but gives no method
  and no operation code. Here it is `fpu_op` 7, computed as sine / cosine on the existing divider.
- **No subnormals.** Subnormal results are flushed to zero.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. The shared reference functions are in `tb/fp_ref_pkg.sv`:
rounding a `real` to single precision in each mode, and the two-part operand conversion. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv \
          --top-module tb_fpu_top
./obj_dir/Vtb_fpu_top
```

Replace `tb_fpu_top` with any other `tb_<block>` to test one unit.

`tb_fpu_top` runs the whole FPU at its only size. It first runs the worked examples:
- the conversion above;
- 5 + 4 = 9;
- 195 − 50 = 145;
- 65 × 165 = 10725;
- 50 / 5 = 10;
- 100 >> 5 = 3;
- √4761 = 69;
- sin 30° = 0.5;
- tan 45° = 1.

Then it runs about 6000 random operations in all rounding modes. Each is compared with a
reference: an exact 128-bit fixed-point sum for add/subtract, double precision for the others, and
`$sin`/`$cos` to within 8/2048 for the CORDIC. The tangent must equal the CORDIC's own sine over
cosine, rounded, and lie close to `$tan`. Each operation's latency is checked. The testbench
counts how often each mechanism occurred and fails if one never did:
- every operation;
- carry renormalisation, cancellation, operand swap and exact zero;
- x/0, 0/0, √(negative) and an out-of-range angle;
- a start pulse while busy;
- rounding up in each mode;
- exact and inexact results.

The unit testbenches cover overflow and underflow in `post_normalization`, since they cannot
occur at the top.

## Files

`rtl/fpu_pkg.sv` holds the shared widths, the operation and rounding-mode enums and the IEEE and
unrounded structs. Each other file in `rtl/` is one module, named as in the sections above.
