// coproc_mem_if: memory interface of a fixed point hardware coprocessor
// (top level).
//
// The processor and memory keep all real numbers as floating point words; the
// coprocessor computes in fixed point. This block sits between them:
//   - Addr, BE and Rd from the coprocessor go straight to the memory;
//   - the memory's DataOut word reaches the coprocessor twice: unaltered on
//     int_data_in (integer reads) and through a Float-to-Fixed converter on
//     fixed_data_in (floating point reads); the coprocessor picks the one that
//     matches the data it asked for;
//   - for writes, the coprocessor drives integer data on int_data_out and fixed
//     point data on fixed_data_out, the latter through a Fixed-to-Float
//     converter; wr_fixed selects the converted word for the memory's DataIn,
//     otherwise int_data_out is written;
//   - the memory's Wr is wr_int OR wr_fixed.
// Direction names: mem_data_out is what this block drives into the memory's
// data input, mem_data_in is what the memory returns. Everything is
// combinational, so timing is that of the memory: a read word is converted in
// the same cycle it is returned, a write word in the cycle it is written.
// The structure follows the coprocessor interface of the design. This design's
// choices: address width AddrBits, byte enables one per byte of a FloatSize
// word, and the converter flags (overflow, exception) brought out as ports for
// the coprocessor or a monitor. RadixInput selects the run-time radix point
// variant of both converters; radix_point is then shared by both.
module coproc_mem_if
  import fxconv_pkg::*;
#(
  parameter int FloatSize      = SP_FLOAT_SIZE,
  parameter int MantissaBits   = SP_MANTISSA_BITS,
  parameter int ExponentBits   = SP_EXPONENT_BITS,
  parameter int FixedSize      = FIXED_SIZE,
  parameter int RadixPointSize = RADIX_POINT_SIZE,
  parameter int RadixPoint     = RADIX_POINT,
  parameter bit RadixInput     = 1'b0,
  parameter int AddrBits       = 32,
  parameter int OverflowBits   = ExponentBits + 1
) (
  // coprocessor side
  input  logic [AddrBits-1:0]        cp_addr,
  input  logic [FloatSize/8-1:0]     cp_be,
  input  logic                       cp_rd,
  input  logic                       cp_wr_int,
  input  logic                       cp_wr_fixed,
  input  logic [FloatSize-1:0]       cp_int_data_out,
  input  logic [FixedSize-1:0]       cp_fixed_data_out,
  output logic [FloatSize-1:0]       cp_int_data_in,
  output logic [FixedSize-1:0]       cp_fixed_data_in,
  output logic [OverflowBits-1:0]    cp_fixed_overflow,
  output logic                       cp_fixed_exception,
  // run-time radix point (used when RadixInput = 1)
  input  logic [RadixPointSize-1:0]  radix_point,
  // memory side
  output logic [AddrBits-1:0]        mem_addr,
  output logic [FloatSize/8-1:0]     mem_be,
  output logic                       mem_rd,
  output logic                       mem_wr,
  output logic [FloatSize-1:0]       mem_data_out,
  input  logic [FloatSize-1:0]       mem_data_in
);

  logic [FloatSize-1:0] float_wr_data;

  assign mem_addr = cp_addr;
  assign mem_be   = cp_be;
  assign mem_rd   = cp_rd;

  // Write control: OR gate and output multiplexer
  assign mem_wr       = cp_wr_int | cp_wr_fixed;
  assign mem_data_out = cp_wr_fixed ? float_wr_data : cp_int_data_out;

  // Read path: raw word and its fixed point conversion
  assign cp_int_data_in = mem_data_in;

  float_to_fixed #(
    .FloatSize     (FloatSize),
    .MantissaBits  (MantissaBits),
    .ExponentBits  (ExponentBits),
    .FixedSize     (FixedSize),
    .RadixPointSize(RadixPointSize),
    .RadixPoint    (RadixPoint),
    .RadixInput    (RadixInput),
    .OverflowBits  (OverflowBits)
  ) u_f2x (
    .float_in   (mem_data_in),
    .radix_point(radix_point),
    .fixed_out  (cp_fixed_data_in),
    .overflow   (cp_fixed_overflow),
    .exception  (cp_fixed_exception)
  );

  fixed_to_float #(
    .FloatSize     (FloatSize),
    .MantissaBits  (MantissaBits),
    .ExponentBits  (ExponentBits),
    .FixedSize     (FixedSize),
    .RadixPointSize(RadixPointSize),
    .RadixPoint    (RadixPoint),
    .RadixInput    (RadixInput)
  ) u_x2f (
    .fixed_in   (cp_fixed_data_out),
    .radix_point(radix_point),
    .float_out  (float_wr_data)
  );

endmodule
