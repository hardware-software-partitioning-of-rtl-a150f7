// tb_f2x_special_cases: checks the zero / normal / exception flags of the
// SpecialCases unit on the IEEE 754 single precision special encodings and on
// random words whose class is worked out from their value.
module tb_f2x_special_cases;
  import fxconv_pkg::*;
  import tb_fp_pkg::*;

  logic [31:0] f;
  fp_class_t   cls;
  int checks = 0, failures = 0;

  f2x_special_cases dut (.float_in(f), .cls(cls));

  task automatic expect_cls(input logic [31:0] w, input logic z, input logic n, input logic x);
    f = w;
    #1;
    checks++;
    if (cls.zero !== z || cls.normal !== n || cls.exception !== x) begin
      failures++;
      $display("FAIL %h: zero=%b normal=%b exc=%b, expected %b %b %b",
               w, cls.zero, cls.normal, cls.exception, z, n, x);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_cls(32'h0000_0000, 1, 0, 0);  // +0
    expect_cls(32'h8000_0000, 1, 0, 0);  // -0
    expect_cls(32'h0000_0001, 0, 0, 0);  // smallest denormal
    expect_cls(32'h807F_FFFF, 0, 0, 0);  // largest negative denormal
    expect_cls(32'h7F80_0000, 0, 0, 1);  // +inf
    expect_cls(32'hFF80_0000, 0, 0, 1);  // -inf
    expect_cls(32'h7FC0_0000, 0, 0, 1);  // quiet NaN
    expect_cls(32'hFF80_0001, 0, 0, 1);  // signalling NaN
    expect_cls(32'h3F80_0000, 0, 1, 0);  // 1.0
    expect_cls(32'hC120_0000, 0, 1, 0);  // -10.0
    expect_cls(32'h0080_0000, 0, 1, 0);  // smallest normal
    expect_cls(32'h7F7F_FFFF, 0, 1, 0);  // largest normal
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] w;
      real         v;
      w = $urandom;
      if (i % 4 == 0) w[30:23] = 8'hFF;
      if (i % 4 == 1) w[30:23] = 8'h00;
      if (i % 8 == 1) w[22:0]  = '0;
      if (i % 8 == 4) w[22:0]  = '0;  // infinities
      v = sp_to_real(w);
      if (w[30:23] == 8'hFF)
        expect_cls(w, 0, 0, 1);
      else if (v == 0.0)
        expect_cls(w, 1, 0, 0);
      else
        // normal exactly when |v| >= 2^-126
        expect_cls(w, 0, ((v < 0.0 ? -v : v) >= 2.0 ** -126), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
