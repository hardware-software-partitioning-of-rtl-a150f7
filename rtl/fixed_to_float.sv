// fixed_to_float: configurable Fixed-to-Float converter.
//
// Combinational. Converts a FixedSize-bit two's complement word with RadixPoint
// fractional bits into a floating point word (FloatSize bits: sign,
// ExponentBits exponent, MantissaBits mantissa):
//   - an input of zero gives positive zero (fixed point has no negative zero);
//   - otherwise the sign bit is taken from the input's top bit and a negative
//     input is replaced by its two's complement, the magnitude;
//   - a priority encoder finds the position p of the magnitude's leading one;
//   - the magnitude is shifted so that the leading one becomes the hidden bit;
//     the next MantissaBits bits form the mantissa (lower bits are truncated,
//     missing bits are zero) and the exponent is p - RadixPoint + bias.
// The zero rule, sign/negate step, priority encoder and shift follow the
// converter's description. This design's own choices: truncation as rounding,
// and, for parameter sets where p - RadixPoint falls outside the normal
// exponent range (not reachable with single precision and fixed point words of
// up to 64 bits), a flush to signed zero below and infinity above.
// The radix point is the parameter RadixPoint (RadixInput = 0) or the
// radix_point input (RadixInput = 1); with RadixInput = 0 the input is ignored.
module fixed_to_float
  import fxconv_pkg::*;
#(
  parameter int FloatSize      = SP_FLOAT_SIZE,
  parameter int MantissaBits   = SP_MANTISSA_BITS,
  parameter int ExponentBits   = SP_EXPONENT_BITS,
  parameter int FixedSize      = FIXED_SIZE,
  parameter int RadixPointSize = RADIX_POINT_SIZE,
  parameter int RadixPoint     = RADIX_POINT,
  parameter bit RadixInput     = 1'b0
) (
  input  logic [FixedSize-1:0]      fixed_in,
  input  logic [RadixPointSize-1:0] radix_point,
  output logic [FloatSize-1:0]      float_out
);

  if (FloatSize != 1 + ExponentBits + MantissaBits) begin : g_bad_float_format
    $error("fixed_to_float: FloatSize must equal 1 + ExponentBits + MantissaBits");
  end
  if (RadixPoint >= (1 << RadixPointSize)) begin : g_bad_radix_point
    $error("fixed_to_float: RadixPoint does not fit in RadixPointSize bits");
  end

  localparam int Bias = (1 << (ExponentBits - 1)) - 1;
  localparam int PW   = (FixedSize > 1) ? $clog2(FixedSize) : 1;
  localparam int SW   = ((ExponentBits > RadixPointSize) ? ExponentBits : RadixPointSize) + 3;
  localparam int EMax = (1 << ExponentBits) - 1;

  logic [RadixPointSize-1:0]           radix;
  logic                                sign;
  logic                                is_zero;
  logic [FixedSize-1:0]                mag;
  logic [PW-1:0]                       lead_pos;
  logic                                lead_valid;
  logic [FixedSize-1:0]                norm;
  logic [FixedSize-2+MantissaBits:0]   frac_ext;
  logic [MantissaBits-1:0]             mant;
  logic signed [SW-1:0]                exp_s;

  assign radix = RadixInput ? radix_point : RadixPointSize'(RadixPoint);

  // Sign and magnitude
  always_comb begin
    is_zero = (fixed_in == '0);
    sign    = fixed_in[FixedSize-1];
    mag     = sign ? -fixed_in : fixed_in;
  end

  leading_one_enc #(
    .Width   (FixedSize),
    .PosWidth(PW)
  ) u_lead (
    .in_bits(mag),
    .pos    (lead_pos),
    .valid  (lead_valid)
  );

  // Normalising shift: leading one moved to the top bit, then the bits below it
  // are taken as the mantissa.
  always_comb begin
    norm     = mag << (PW'(FixedSize - 1) - lead_pos);
    frac_ext = {norm[FixedSize-2:0], {MantissaBits{1'b0}}};
    mant     = frac_ext[FixedSize-2+MantissaBits -: MantissaBits];
    exp_s    = SW'($signed({1'b0, lead_pos})) - SW'($signed({1'b0, radix})) + SW'(Bias);
  end

  always_comb begin
    if (is_zero || !lead_valid)
      float_out = '0;
    else if (exp_s <= 0)
      float_out = {sign, {(FloatSize-1){1'b0}}};
    else if (exp_s >= SW'(EMax))
      float_out = {sign, {ExponentBits{1'b1}}, {MantissaBits{1'b0}}};
    else
      float_out = {sign, ExponentBits'(exp_s), mant};
  end

endmodule
