# Fast inverse square root in hardware

This is a pipelined hardware unit that computes `1/sqrt(x)` for an IEEE-754
single-precision (binary32) number. It uses the bit-level trick known as the
"fast inverse square root": read the float's bit pattern as an integer,
shift it right by one, and subtract it from a "magic" constant. The result,
read back as a float, is already within a few percent of `1/sqrt(x)`. Two
Newton-Raphson steps then refine it to a relative error of about 5e-5.

Two things make this variant different from the classic one:

* **Two magic constants.** Which one is used depends on whether the power of
  two of `x` is even or odd.
* **Tuned Newton-Raphson constants.** Both refinement steps use adjusted
  constants in place of the textbook `0.5` and `1.5`.

Every floating-point multiplication goes through a floating-point multiplier.
That multiplier forms its significand product with a radix-4 (modified) Booth
multiplier.

## The algorithm

For a binary32 input `x`, with each operation rounded to binary32 (round to
nearest, ties to even) in the order written:

```
xhalf = 0.500438180 * x
R     = 0x5F3E34BC  if the power of two of x is even
        0x5F3759DF  otherwise
y0    = float_bits( R - (int_bits(x) >> 1) )              integer subtraction
y1    = y0 * (1.50131454 - (xhalf * y0) * y0)             Newton-Raphson step 1
y2    = y1 * (1.50000086 - ((0.999124984 * xhalf) * y1) * y1)   step 2
```

`y2` is the output. The binary32 encodings of the constants are in
`rtl/fisr_pkg.sv`:

| value        | encoding       |
|--------------|----------------|
| 0.500438180  | `32'h3F001CB7` |
| 1.50131454   | `32'h3FC02B13` |
| 1.50000086   | `32'h3FC00007` |
| 0.999124984  | `32'h3F7FC6A8` |

### Why the shift-and-subtract works

Read as an integer, a positive float is roughly `2^23 * (log2(x) + 127)`.
So halving the integer and negating it approximates `-log2(x)/2`, which is
the logarithm of `1/sqrt(x)`. The magic constant puts the exponent bias back
and trims the error.

### Which constant is chosen

The power of two of `x` is `E - 127`, where `E` is the biased exponent field
(bits 30:23). That power is even exactly when `E` is odd, that is when bit
23 of `x` is 1. So the hardware selects with one bit:

* `x[23] = 1` selects `0x5F3E34BC`.
* `x[23] = 0` selects `0x5F3759DF`.

"Exponent even" could also be read as the *biased* field being even. That
reading selects the other way round. Over all positive normal inputs, the
reading used here gives a worst-case relative error of about 5.3e-5, and the
other gives about 1.0e-4.

Note that the Newton-Raphson constants were derived for a single magic
constant. With the classic single constant, the same two steps reach about
7e-7. With two constants they reach about 5e-5, as above.

## Pipeline

`InverseSquareRoot` accepts one operand per clock. Its result appears
`LATENCY = 4` cycles later. The shift and all three subtractors are
registered. The multipliers are combinational. Delay registers keep each
operand's values lined up as they move through the stages.

| stage | combinational work                               | register at end of stage   |
|-------|--------------------------------------------------|----------------------------|
| 0     | `xhalf = C_HALF * x` (mul1)                      | `x >> 1` (rs1), `x[23]`, `xhalf` |
| 1     | select `R`                                       | `y0 = R - (x>>1)` (sub1), `xhalf` |
| 2     | `p = (xhalf*y0)*y0` (mul2, mul3); `xh2 = 0.999124984*xhalf` (mul5) | `t1 = 1.50131454 - p` (sub2), `y0`, `xh2` |
| 3     | `y1 = y0*t1` (mul4); `q = (xh2*y1)*y1` (mul7, mul8) | `t2 = 1.50000086 - q` (sub3), `y1` |
| 4     | `inv_sqrt = y1*t2` (mul6)                        | (output is combinational)  |

The longest combinational path is in stage 3: three floating-point
multipliers in series, then a subtractor. To raise the clock rate, add
registers there and adjust `LATENCY` and the delay registers to match.

`in_valid` travels alongside the data in a shift register and comes out as
`out_valid`. There is no back-pressure: a result is on `inv_sqrt` for exactly
one cycle, and the consumer must take it then. `rst` is synchronous and
active high. It clears every register, so operands in flight are dropped and
`out_valid` stays low until new operands arrive.

## Arithmetic units

### `Multiply`: binary32 multiplier

* Restores the hidden one of both significands.
* Multiplies the 24-bit significands exactly with `ModifiedBooth`.
* Normalises the 48-bit product by at most one place.
* Rounds to nearest, ties to even, using a guard bit and a sticky bit.

Special values:

* A zero or subnormal operand is treated as zero.
* A result below the normal range becomes a signed zero.
* Overflow gives a signed infinity.
* `inf * 0` or any NaN operand gives a quiet NaN.

### `ModifiedBooth`: radix-4 Booth multiplier

The multiplier is scanned in overlapping 3-bit groups, two bits at a time.
Each group is recoded into a digit in {-2, -1, 0, +1, +2}. Each digit selects
0, ±a or ±2a as a partial product, shifted by two places per digit.

For a 24-bit unsigned operand this gives 13 partial products instead of 24.
The multiplier is zero-extended so that the top group sees a positive sign.
The partial products are summed by a plain adder chain, and a synthesis tool
is free to turn that into a carry-save tree. `WIDTH` is a parameter
(default 24).

### `FpSubtractor`: binary32 subtractor (registered)

1. Flips the sign of `b`.
2. Orders the operands by magnitude.
3. Shifts the smaller significand right into three extra bits (guard, round
   and sticky).
4. Adds or subtracts the significands.
5. Normalises: one place right after a carry, or left by a leading-zero count
   after cancellation.
6. Rounds to nearest, ties to even.

Special values:

* An exact zero difference is `+0`.
* Subnormal operands and results are flushed to zero.
* `inf - inf` of the same sign, and any NaN, give a quiet NaN.

### `IntSubtractor`, `RightShiftBy1`, `MagicConstantSelect`

* `IntSubtractor` is a registered `a - b - Bin`. It computes the initial
  guess; its borrow input is tied to 0 there.
* `RightShiftBy1` is a registered logical shift right by one place.
* `MagicConstantSelect` is the constant multiplexer described above.

## Interface of the top, `TopModule`

| port        | dir | width | meaning                                      |
|-------------|-----|-------|----------------------------------------------|
| `clk`       | in  | 1     | clock                                        |
| `rst`       | in  | 1     | synchronous, active-high reset               |
| `in_valid`  | in  | 1     | `x_int` holds an operand this cycle          |
| `x_int`     | in  | 32    | operand `x`, binary32 bit pattern            |
| `out_valid` | out | 1     | `inv_sqrt` holds a result this cycle         |
| `inv_sqrt`  | out | 32    | `1/sqrt(x)`, binary32 bit pattern            |

## Accuracy and input range

For positive normal inputs from `2^-125` upwards, the relative error is below
5.3e-5. The end-to-end test measures this over the whole range.

The unit does no special-case handling:

* **Tiny inputs.** Below `2^-125` (biased exponent field 1), the product
  `0.500438180 * x` falls below the normal range and is flushed to zero. The
  result is then far off.
* **Zero, negative numbers, infinities, NaNs and subnormals.** These give
  whatever the same arithmetic gives, not IEEE-754 special results.

If you need these cases, add a small bypass around the pipeline that
recognises them from the exponent field and the sign.

## Where this implementation makes its own choices

The algorithm, its constants and the split into units follow the published
design. The following are choices of this implementation:

* **Second Newton-Raphson step.** It uses `y1`, the result of the first step,
  inside `xhalf*y*y`, as a Newton-Raphson iteration requires. That takes two
  more multipliers (mul7, mul8) than the six in the original schematic.
  `0.999124984 * xhalf` is formed once, by mul5.
* **Two kinds of subtractor.** The original uses one "Subtractor" block with
  a borrow input for all three subtractions. Here the integer step has its
  own `IntSubtractor`. The two floating-point subtractions use
  `FpSubtractor`, which has no borrow input.
* **Arithmetic conventions.** Rounding to nearest even, flush-to-zero of
  subnormals, and the handling of NaN and infinity.
* **Pipeline.** The delay registers, the valid signal, the reset style and
  the 4-cycle latency. The original reports 72 flip-flops on its FPGA. This
  pipeline has about 290, because it keeps each operand's values aligned so
  that a new operand can enter every cycle.

## Files

| file | contents |
|------|----------|
| `rtl/fisr_pkg.sv` | binary32 struct, constants, `LATENCY` |
| `rtl/TopModule.sv` | top level |
| `rtl/InverseSquareRoot.sv` | the pipeline |
| `rtl/Multiply.sv`, `rtl/ModifiedBooth.sv` | floating-point multiplier and its Booth core |
| `rtl/FpSubtractor.sv`, `rtl/IntSubtractor.sv` | subtractors |
| `rtl/RightShiftBy1.sv`, `rtl/MagicConstantSelect.sv` | initial-guess parts |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench checks its module against values computed independently and
ends with a line `TB_RESULT checks=N failures=M`.

`tb/fp_ref_pkg.sv` is the floating-point reference. It does the arithmetic
in `real` (binary64), where products of binary32 numbers, and differences
with small exponent gaps, are exact. It then rounds once to binary32 by
operating on the binary64 bit pattern.

`tb_InverseSquareRoot` first checks this reference against eight values
computed separately. Then it compares every result bit for bit.

`tb_TopModule` is the end-to-end test, with the design at its default
configuration. It streams about 78,000 operands over the whole positive
normal range: at full rate, with random gaps, and with a reset while
operands are in flight. It checks the following:

* the bit-exact value of each result;
* the relative error of each result against `1/sqrt(x)` (bound 1e-4);
* the latency of each result (4 cycles).

It also counts how often each of these happened, and fails if one never
did:

* the even-power constant;
* the odd-power constant;
* back-to-back operands;
* gaps in the input stream;
* the reset flush.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fisr_pkg.sv tb/fp_ref_pkg.sv tb/tb_TopModule.sv --top-module tb_TopModule
./obj_dir/Vtb_TopModule
```

Use the same command for the other testbenches, with their file and module
names substituted.
