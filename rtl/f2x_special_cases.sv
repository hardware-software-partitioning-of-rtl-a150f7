// f2x_special_cases: the SpecialCases unit of the Float-to-Fixed converter.
//
// Classifies a floating point word from its exponent and mantissa fields:
//   zero      : exponent and mantissa all zeros (positive or negative zero)
//   normal    : exponent neither all zeros nor all ones; deasserted for zero and
//               denormal numbers, whose hidden bit is 0
//   exception : exponent all ones (positive/negative infinity or NaN), which a
//               fixed point word cannot represent
// The three outputs and their meaning follow the converter's description; that
// zero also clears normal, and that infinity/NaN clear it, is this design's
// choice (both cases are decided by zero/exception anyway). Purely combinational.
module f2x_special_cases
  import fxconv_pkg::*;
#(
  parameter int FloatSize    = SP_FLOAT_SIZE,
  parameter int MantissaBits = SP_MANTISSA_BITS,
  parameter int ExponentBits = SP_EXPONENT_BITS
) (
  input  logic [FloatSize-1:0] float_in,
  output fp_class_t            cls
);

  logic [ExponentBits-1:0] exp_f;
  logic [MantissaBits-1:0] man_f;

  assign exp_f = float_in[MantissaBits +: ExponentBits];
  assign man_f = float_in[MantissaBits-1:0];

  always_comb begin
    cls.zero      = (exp_f == '0) && (man_f == '0);
    cls.normal    = (exp_f != '0) && (exp_f != '1);
    cls.exception = (exp_f == '1);
  end

endmodule
