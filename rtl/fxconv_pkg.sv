// fxconv_pkg: constants shared by the floating/fixed point converters and the
// coprocessor memory interface.
//
// The defaults describe the main configuration: IEEE 754 single precision words
// in memory (32 bits: 1 sign, 8 exponent, 23 mantissa) and a 32-bit fixed point
// format with 20 fractional bits ("12.20"). The other two formats used by the
// evaluated kernels, 21.30 (51 bits) and 17.47 (64 bits), are listed too.
// RADIX_POINT_SIZE (the width of a run-time radix point) is this design's choice:
// 6 bits reach every radix point of a fixed point word of up to 64 bits.
package fxconv_pkg;

  localparam int SP_FLOAT_SIZE    = 32;
  localparam int SP_MANTISSA_BITS = 23;
  localparam int SP_EXPONENT_BITS = 8;

  localparam int DP_FLOAT_SIZE    = 64;
  localparam int DP_MANTISSA_BITS = 52;
  localparam int DP_EXPONENT_BITS = 11;

  // Main fixed point format 12.20
  localparam int FIXED_SIZE       = 32;
  localparam int RADIX_POINT      = 20;
  localparam int RADIX_POINT_SIZE = 6;

  // Formats of the other kernels
  localparam int FIXED_SIZE_21_30  = 51;
  localparam int RADIX_POINT_21_30 = 30;
  localparam int FIXED_SIZE_17_47  = 64;
  localparam int RADIX_POINT_17_47 = 47;

  // Decoded class of a floating point word, produced by the SpecialCases unit.
  typedef struct packed {
    logic zero;       // +0 or -0
    logic normal;     // exponent field neither all zeros nor all ones
    logic exception;  // infinity or NaN: no fixed point equivalent
  } fp_class_t;

endpackage
