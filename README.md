# Floating point memory, fixed point coprocessor: converter interface

A processor running ordinary C code keeps its real numbers in memory as IEEE 754
floating point words. A hardware coprocessor that takes over the program's hot
loops would be far smaller and faster if it worked in fixed point, where an
addition is an integer addition and a multiplication is an integer
multiplication followed by a constant shift. This RTL draws the line between the
two worlds at the coprocessor's memory port. Everything on the processor side,
including memory contents, stays floating point. Everything inside the
coprocessor is fixed point. Two combinational converters sit on the port and
translate each word as it passes:

```
              memory (floating point words)
   Addr BE Rd   Wr          DataOut (to memory)          DataIn (from memory)
    ^  ^  ^     ^                 ^                            |
    |  |  |    OR<--+       +-----+-----+               +------+------+
    |  |  |     ^   |       |    MUX    |<-- WrFixed    |             |
    |  |  |     |   |       +--+-----+--+               |      Float-to-Fixed
    |  |  |     |   |          |     |                  |             |
    |  |  |     |   |          |  Fixed-to-Float        |             |
    |  |  |  WrInt WrFixed IntDataOut  FixedDataOut  IntDataIn   FixedDataIn
   +---------------------- hardware coprocessor ------------------------+
```

The software is not rewritten. The coprocessor is written as if the floats were
integers, and the registers that hold real numbers get a fixed point format
chosen for the application. Read words arrive both unchanged (`IntDataIn`, for
integer data) and converted (`FixedDataIn`). For a write, the coprocessor raises
`WrInt` or `WrFixed` to say which kind of word it is writing.

The RTL provides the two converters, their parts, and the interface that wires
them to a memory port. The coprocessor kernels, the processor and the memory
are not part of it. Their signals are the ports of the top module,
`coproc_mem_if`.

## Fixed point formats

A format is written `I.F`: `I` integer bits including the sign, and `F`
fractional bits (the *radix point*). The word is two's complement, so it
holds `x * 2^F` for a value `x`. The formats used by the applications this
interface was sized for are listed below. All of them read and write single
precision memory words:

| format | `FixedSize` | `RadixPoint` | used for |
|---|---|---|---|
| 12.20 | 32 | 20 | MPEG-2 decoder IDCT, MPEG-2 encoder DCT (the default) |
| 21.30 | 51 | 30 | FFT / inverse FFT butterflies |
| 17.47 | 64 | 47 | EPIC convolution filter |

Intermediate results in the last two formats had been computed in double
precision in software. The converters still translate only to and from single
precision, because that is what memory holds.

## Float-to-Fixed converter (`float_to_fixed`)

The converter has two parts that work in parallel on the incoming word.

**Special cases** (`f2x_special_cases`) classifies the word from its exponent
and mantissa fields:

* `zero`: the exponent and mantissa are all zeros, so the word is +0 or -0.
* `normal`: the exponent is neither all zeros nor all ones. It is cleared for
  denormals and zero, whose hidden bit is 0.
* `exception`: the exponent is all ones, meaning infinity or NaN. Fixed point
  cannot represent these, so this flag is the converter's `exception` output.

**Normal cases** (`f2x_normal_cases`) converts the value on the assumption
that it is an ordinary number that fits:

1. *Shift calculation.* The significand `{normal, mantissa}` is an integer
   worth `2^(Eeff - bias - MantissaBits)`. In the fixed point word it must sit
   at `shift = Eeff - bias - MantissaBits + RadixPoint`. A non-negative `shift`
   means a left shift by `shift`. A negative one means a right shift by
   `-shift`. `Eeff` is the exponent field, or 1 for a denormal.
2. *Shifter.* This moves the significand. Bits that fall off the right end are
   dropped, which truncates the magnitude toward zero.
3. *Negate.* If the sign bit is 1, the two's complement is taken.
4. *AND.* Every bit is ANDed with `~zero`.
5. *Overflow calculation.* This runs from the exponent alone, in parallel with
   the shifter. It gives `overflow = max(0, Eeff - bias + RadixPoint + 2 -
   FixedSize)`. That is how many more bits the fixed point word would need to
   hold this value: the position of the leading one, plus a sign bit, minus
   the word size. The coprocessor or a monitor can use the count to detect a
   format that is too narrow. In that case `fixed_out` holds only the low
   `FixedSize` bits.

Worked example at 12.20: `-1.5` is `0xBFC00000` (exponent 127, significand
`0xC00000`). The shift is `127-127-23+20 = -3`, so the significand is shifted
right by 3 to `0x180000`. Negated, that gives `0xFFE80000`, and `overflow` is 0.
`4096.0` has its leading one at bit 32, so it needs 2 more bits than the 32
available, and `overflow` reads 2.

## Fixed-to-Float converter (`fixed_to_float`)

The fixed point side has no infinities or NaNs, so the only special case is
zero. Zero is always written as +0. For any other value:

1. The sign is the top bit. A negative word is replaced by its two's
   complement, which gives the magnitude. `-2^(FixedSize-1)` still fits,
   because the magnitude is treated as unsigned.
2. A priority encoder (`leading_one_enc`) finds the position `p` of the
   leading one.
3. The magnitude is shifted left so that this one becomes the hidden bit. The
   next `MantissaBits` bits are the mantissa: any lower bits are truncated, and
   any missing bits are zero. The exponent field is `p - RadixPoint + bias`.

Example at 12.20: `0xFFE80000` has magnitude `0x180000`, with the leading one
at bit 20. The exponent is `20-20+127 = 127` and the mantissa is `100...0`,
which gives `0xBFC00000` (-1.5).

In any 32, 51 or 64-bit format with a radix point up to 63, the exponent
always stays in the single precision normal range. For other parameter sets,
results below the range flush to signed zero and results above it become
infinity.

## Radix point as a parameter or as an input

Both converters, and the interface, have a `RadixInput` parameter.

* `RadixInput = 0` (the default): the radix point is the elaboration-time
  parameter `RadixPoint`. The shift and exponent offsets fold into constants,
  and the `radix_point` port is ignored.
* `RadixInput = 1`: the `radix_point` input (`RadixPointSize` = 6 bits) sets the
  radix point at run time. One converter pair can then serve kernels with
  different formats, or a format chosen after the hardware is built. This costs
  one adder input on each converter's critical path. In the interface,
  `radix_point` is shared by both converters.

## Interface timing

`coproc_mem_if` contains no registers, clock or reset. `Addr`, `BE` and `Rd`
pass straight through, and `Wr` is `WrInt | WrFixed`. `DataOut` is the
converted fixed point word when `WrFixed` is high, and `IntDataOut` otherwise,
so `WrFixed` wins if both are high. The read word goes to `IntDataIn`
unchanged and to `FixedDataIn` through Float-to-Fixed. Accesses therefore take
exactly as many cycles as the memory does. The converters add combinational
delay to the read and write data paths. If that delay limits the clock, a
pipeline register can be placed on either side of them.

Port naming: the coprocessor-side ports start with `cp_`, and the memory-side
ports start with `mem_`. `mem_data_out` goes into the memory's data input, and
`mem_data_in` comes from its data output. The converter's `overflow` and
`exception` for the word being read are brought out as `cp_fixed_overflow` and
`cp_fixed_exception`. The coprocessor may use them or ignore them.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FloatSize` | 32 | floating point word width (64 for double) |
| `MantissaBits` | 23 | mantissa field width (52 for double) |
| `ExponentBits` | 8 | exponent field width (11 for double) |
| `FixedSize` | 32 | fixed point word width |
| `RadixPoint` | 20 | fractional bits when `RadixInput = 0` |
| `RadixPointSize` | 6 | width of the run-time `radix_point` input |
| `RadixInput` | 0 | 1 selects the run-time radix point |
| `OverflowBits` | `ExponentBits+1` | width of the saturating overflow count |
| `AddrBits` | 32 | address width (interface only) |

The shared defaults live in `fxconv_pkg`. It also defines `fp_class_t`, the
struct of special case flags.

## Where this RTL makes its own choices

These points are this implementation's own decisions:

* **Rounding** is truncation in both directions.
* **Denormals** use the IEEE 754 weight `2^(1-bias)`. For every supported
  format they therefore convert to 0.
* **The overflow count** is computed from the exponent only. It reports one
  extra bit for the single value `-2^(I-1)`, which would just fit.
* **Out-of-range outputs:** when `overflow` is non-zero, the fixed output holds
  the low bits of the value. When `exception` is set, the fixed output and the
  count are not meaningful.
* **Variant selection:** the parameter and run-time radix point variants are
  one module selected by `RadixInput`, not two separate modules.
* **Widths:** the address width, the byte enable width (one bit per byte of a
  `FloatSize` word), `RadixPointSize` and `OverflowBits` are chosen here.
* **Not included:** a fixed point format that adapts at run time to
  avoid overflow, trading accuracy for range, is not built.

## Files

| file | content |
|---|---|
| `rtl/fxconv_pkg.sv` | default formats, `fp_class_t` |
| `rtl/f2x_special_cases.sv` | zero / normal / exception classification |
| `rtl/f2x_normal_cases.sv` | shift, negate, zero mask, overflow count |
| `rtl/float_to_fixed.sv` | Float-to-Fixed converter |
| `rtl/leading_one_enc.sv` | leading-one priority encoder |
| `rtl/fixed_to_float.sv` | Fixed-to-Float converter |
| `rtl/coproc_mem_if.sv` | coprocessor memory interface (top) |
| `tb/tb_fp_pkg.sv` | reference arithmetic for the testbenches (real numbers, integer loops) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/wl_lane.sv`, `tb/tb_workloads.sv` | application-style kernels in all three formats |

## Verification

Each testbench checks its results against values computed independently, with
real arithmetic or bit loops, and ends with a line
`TB_RESULT checks=N failures=M`.

* The unit testbenches sweep thousands of random words in every format above,
  plus the special encodings: ±0, denormals, ±infinity, NaN, the largest and
  smallest normals, and `-2^(I-1)`.
* `tb_fixed_to_float` also checks round trips through both converters.
* `tb_coproc_mem_if` runs the interface at its defaults against a byte-enabled
  memory model. The coprocessor model runs a fixed point `a*x+b` kernel and an
  integer sum of absolute differences through the interface. It also reads
  infinity, NaN, an overflowing value, a denormal and zeros, and writes zero,
  -1.0 and a partial-byte word. It counts each of these events and fails if any
  never happened. Writes must complete in one clock.
* `tb_workloads` runs an 8-point DCT at 12.20, complex FFT butterflies at
  21.30 and a 5-tap convolution at 17.47. A fourth lane uses the run-time
  radix point variant and switches among 20, 30 and 47. Each result is
  compared with real arithmetic, within the truncation error of the format.

Nothing here has been checked on an FPGA or for timing.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fxconv_pkg.sv tb/tb_fp_pkg.sv tb/tb_coproc_mem_if.sv --top-module tb_coproc_mem_if
./obj_dir/Vtb_coproc_mem_if
```

Substitute another `tb_*.sv` and its module name for the other testbenches.
Every module in `rtl/` also lints on its own with
`verilator --lint-only -Wall -Irtl rtl/fxconv_pkg.sv rtl/<module>.sv`.
