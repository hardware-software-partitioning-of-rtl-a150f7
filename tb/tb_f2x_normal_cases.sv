// tb_f2x_normal_cases: checks alignment, negation, zero masking and the overflow
// count of the NormalCases unit for a 32-bit and a 64-bit fixed point word,
// with the radix point swept over its input range. Expected values come from
// real arithmetic in tb_fp_pkg.
module tb_f2x_normal_cases;
  import tb_fp_pkg::*;

  logic [31:0] f;
  logic        normal, zero;
  logic [5:0]  radix;
  logic [31:0] fx32;
  logic [63:0] fx64;
  logic [8:0]  ov32, ov64;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_neg = 0, n_ovf = 0;

  f2x_normal_cases dut32 (
    .float_in(f), .normal(normal), .zero(zero), .radix_point(radix),
    .fixed_out(fx32), .overflow(ov32)
  );

  f2x_normal_cases #(.FixedSize(64)) dut64 (
    .float_in(f), .normal(normal), .zero(zero), .radix_point(radix),
    .fixed_out(fx64), .overflow(ov64)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: f=%h radix=%0d fx32=%h ov32=%0d fx64=%h ov64=%0d",
               what, f, radix, fx32, ov32, fx64, ov64);
    end
  endtask

  task automatic apply(input logic [31:0] w, input int r);
    int     e32, e64;
    longint x;
    f      = w;
    radix  = 6'(r);
    normal = (w[30:23] != 0);
    zero   = (w[30:0] == 0);
    #1;
    e32 = f2x_overflow(w, r, 32);
    e64 = f2x_overflow(w, r, 64);
    check(ov32 == 9'(e32), "overflow32");
    check(ov64 == 9'(e64), "overflow64");
    if (e64 == 0) begin
      x = f2x_expected(w, r);
      check(fx64 == 64'(x), "fixed64");
      if (e32 == 0) check(fx32 == 32'(x), "fixed32");
      else          check(fx32 == x[31:0], "fixed32 low bits");
      if (int'(w[30:23]) - 150 + r >= 0) n_left++; else n_right++;
      if (w[31] && x != 0) n_neg++;
    end
    if (e32 != 0) n_ovf++;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h3F80_0000, 20);  // 1.0 -> 0x00100000
    check(fx32 == 32'h0010_0000, "1.0 at 12.20");
    apply(32'hBFC0_0000, 20);  // -1.5 -> 0xFFE80000
    check(fx32 == 32'hFFE8_0000, "-1.5 at 12.20");
    apply(32'h8000_0000, 20);  // -0 -> 0
    check(fx32 == 32'h0 && ov32 == 0, "-0");
    apply(32'h4580_0000, 20);  // 4096.0 needs two more bits
    check(ov32 == 2, "4096 overflow");
    apply(32'h0000_0003, 20);  // denormal truncates to 0
    check(fx32 == 0, "denormal");
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = int'($urandom_range(0, 63));
      apply(rand_sp(127 - 40, 127 + 40), r);
    end
    check(n_left > 0 && n_right > 0 && n_neg > 0 && n_ovf > 0, "coverage");
    $display("left=%0d right=%0d neg=%0d ovf=%0d", n_left, n_right, n_neg, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
