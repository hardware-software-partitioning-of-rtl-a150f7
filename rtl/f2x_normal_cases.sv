// f2x_normal_cases: the NormalCases unit of the Float-to-Fixed converter.
//
// Converts a floating point word that is neither infinity nor NaN into a two's
// complement fixed point word with radix_point fractional bits. It has the five
// parts of the converter's block diagram:
//   Shift Calc    : shift = Eeff - bias - MantissaBits + radix_point, split into a
//                   direction (left when shift >= 0) and an amount |shift|
//   Shifter       : moves {hidden bit, mantissa} by that amount; bits shifted out
//                   on the right are dropped (truncation toward zero), bits beyond
//                   FixedSize on the left are dropped (reported by overflow)
//   negate ("-")  : two's complement of the aligned magnitude when the sign is 1
//   AND           : every bit is ANDed with ~zero so both zero encodings give 0
//   Overflow Calc : number of extra fixed point bits the current input would need,
//                   max(0, (Eeff - bias + radix_point) + 2 - FixedSize), i.e. the
//                   magnitude's leading one position plus one sign bit
// The hidden bit is the normal input. Eeff is the exponent field, or 1 for a
// denormal (IEEE 754 weighting 2^(1-bias)); truncation as the rounding rule and
// the exact overflow formula (which treats -2^(FixedSize-1) as needing one more
// bit, since it looks at the exponent only) are this design's choices.
// radix_point is an input so the same unit serves the parameter and the run-time
// radix point converters. Purely combinational.
module f2x_normal_cases
  import fxconv_pkg::*;
#(
  parameter int FloatSize      = SP_FLOAT_SIZE,
  parameter int MantissaBits   = SP_MANTISSA_BITS,
  parameter int ExponentBits   = SP_EXPONENT_BITS,
  parameter int FixedSize      = FIXED_SIZE,
  parameter int RadixPointSize = RADIX_POINT_SIZE,
  parameter int OverflowBits   = ExponentBits + 1
) (
  input  logic [FloatSize-1:0]      float_in,
  input  logic                      normal,
  input  logic                      zero,
  input  logic [RadixPointSize-1:0] radix_point,
  output logic [FixedSize-1:0]      fixed_out,
  output logic [OverflowBits-1:0]   overflow
);

  localparam int Bias = (1 << (ExponentBits - 1)) - 1;
  // Signed width that holds every shift and leading-one position
  localparam int SW   = ((ExponentBits > RadixPointSize) ? ExponentBits : RadixPointSize) + 3;
  // Shifter width: wide enough for the mantissa and for the fixed point word
  localparam int W    = (FixedSize > MantissaBits + 1) ? FixedSize : MantissaBits + 1;

  logic                    sign;
  logic [ExponentBits-1:0] exp_f;
  logic [MantissaBits:0]   mant;        // hidden bit & mantissa field
  logic signed [SW-1:0]    exp_eff;
  logic signed [SW-1:0]    shift;
  logic                    dir_left;
  logic [SW-1:0]           amount;
  logic [W-1:0]            aligned;
  logic [FixedSize-1:0]    signed_val;
  logic signed [SW-1:0]    need;

  assign sign  = float_in[FloatSize-1];
  assign exp_f = float_in[MantissaBits +: ExponentBits];
  assign mant  = {normal, float_in[MantissaBits-1:0]};

  // Shift Calc
  always_comb begin
    exp_eff  = normal ? SW'($signed({1'b0, exp_f})) : SW'(1);
    shift    = exp_eff - SW'(Bias) - SW'(MantissaBits) + SW'($signed({1'b0, radix_point}));
    dir_left = !shift[SW-1];
    amount   = dir_left ? shift : -shift;
  end

  // Shifter
  always_comb begin
    if (dir_left) aligned = W'(mant) << amount;
    else          aligned = W'(mant) >> amount;
  end

  // Negate and zero masking
  always_comb begin
    signed_val = sign ? -aligned[FixedSize-1:0] : aligned[FixedSize-1:0];
    fixed_out  = signed_val & {FixedSize{~zero}};
  end

  // Overflow Calc
  always_comb begin
    need = exp_eff - SW'(Bias) + SW'($signed({1'b0, radix_point})) + SW'(2) - SW'(FixedSize);
    if (need[SW-1] || need == '0)
      overflow = '0;
    else if (need > SW'((1 << OverflowBits) - 1))
      overflow = '1;
    else
      overflow = OverflowBits'(need);
  end

endmodule
