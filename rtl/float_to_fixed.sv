// float_to_fixed: configurable Float-to-Fixed converter.
//
// Combinational. A floating point word (FloatSize bits: sign, ExponentBits
// exponent, MantissaBits mantissa) is split to the SpecialCases unit, which
// raises exception for infinity/NaN and zero/normal for the other special
// encodings, and to the NormalCases unit, which aligns, negates and masks the
// mantissa into a FixedSize-bit two's complement word with RadixPoint fractional
// bits, and reports in overflow how many more fixed point bits the value needs.
// When overflow is non-zero the fixed point output holds the low FixedSize bits
// of the value; when exception is set it is not meaningful.
//
// The radix point is either the parameter RadixPoint (RadixInput = 0, the main
// variant) or the radix_point input (RadixInput = 1), for designs that need
// several fixed point formats or learn the format late. With RadixInput = 0 the
// radix_point input is ignored. Selecting the two variants by one parameter is
// this design's choice; the parameter names follow the converter's description.
module float_to_fixed
  import fxconv_pkg::*;
#(
  parameter int FloatSize      = SP_FLOAT_SIZE,
  parameter int MantissaBits   = SP_MANTISSA_BITS,
  parameter int ExponentBits   = SP_EXPONENT_BITS,
  parameter int FixedSize      = FIXED_SIZE,
  parameter int RadixPointSize = RADIX_POINT_SIZE,
  parameter int RadixPoint     = RADIX_POINT,
  parameter bit RadixInput     = 1'b0,
  parameter int OverflowBits   = ExponentBits + 1
) (
  input  logic [FloatSize-1:0]      float_in,
  input  logic [RadixPointSize-1:0] radix_point,
  output logic [FixedSize-1:0]      fixed_out,
  output logic [OverflowBits-1:0]   overflow,
  output logic                      exception
);

  if (FloatSize != 1 + ExponentBits + MantissaBits) begin : g_bad_float_format
    $error("float_to_fixed: FloatSize must equal 1 + ExponentBits + MantissaBits");
  end
  if (RadixPoint >= (1 << RadixPointSize)) begin : g_bad_radix_point
    $error("float_to_fixed: RadixPoint does not fit in RadixPointSize bits");
  end

  fp_class_t                 cls;
  logic [RadixPointSize-1:0] radix;

  assign radix     = RadixInput ? radix_point : RadixPointSize'(RadixPoint);
  assign exception = cls.exception;

  f2x_special_cases #(
    .FloatSize   (FloatSize),
    .MantissaBits(MantissaBits),
    .ExponentBits(ExponentBits)
  ) u_special (
    .float_in(float_in),
    .cls     (cls)
  );

  f2x_normal_cases #(
    .FloatSize     (FloatSize),
    .MantissaBits  (MantissaBits),
    .ExponentBits  (ExponentBits),
    .FixedSize     (FixedSize),
    .RadixPointSize(RadixPointSize),
    .OverflowBits  (OverflowBits)
  ) u_normal (
    .float_in   (float_in),
    .normal     (cls.normal),
    .zero       (cls.zero),
    .radix_point(radix),
    .fixed_out  (fixed_out),
    .overflow   (overflow)
  );

endmodule
