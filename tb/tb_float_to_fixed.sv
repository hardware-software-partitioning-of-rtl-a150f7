// tb_float_to_fixed: checks the Float-to-Fixed converter in three set-ups:
// the parameter radix point 12.20 (defaults), the run-time radix point variant
// with a random radix on a 32-bit word, and the 17.47 format on a 64-bit word;
// and in a double precision configuration (64-bit floats) converting to 17.47.
// Fixed output, overflow count and exception flag are compared with real
// arithmetic from tb_fp_pkg.
module tb_float_to_fixed;
  import tb_fp_pkg::*;

  logic [31:0] f;
  logic [5:0]  radix;
  logic [31:0] fx_p, fx_i;
  logic [63:0] fx_w;
  logic [8:0]  ov_p, ov_i, ov_w;
  logic        ex_p, ex_i, ex_w;
  logic [63:0] d;
  logic [63:0] fx_d;
  logic [11:0] ov_d;
  logic        ex_d;
  int checks = 0, failures = 0;

  float_to_fixed u_p (
    .float_in(f), .radix_point(6'd0), .fixed_out(fx_p), .overflow(ov_p), .exception(ex_p)
  );
  float_to_fixed #(.RadixInput(1'b1)) u_i (
    .float_in(f), .radix_point(radix), .fixed_out(fx_i), .overflow(ov_i), .exception(ex_i)
  );
  float_to_fixed #(.FixedSize(64), .RadixPoint(47)) u_w (
    .float_in(f), .radix_point(6'd0), .fixed_out(fx_w), .overflow(ov_w), .exception(ex_w)
  );

  float_to_fixed #(
    .FloatSize(64), .MantissaBits(52), .ExponentBits(11), .FixedSize(64), .RadixPoint(47)
  ) u_d (
    .float_in(d), .radix_point(6'd0), .fixed_out(fx_d), .overflow(ov_d), .exception(ex_d)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: f=%h radix=%0d p=%h/%0d/%b i=%h/%0d/%b w=%h/%0d/%b", what, f, radix,
               fx_p, ov_p, ex_p, fx_i, ov_i, ex_i, fx_w, ov_w, ex_w);
    end
  endtask

  task automatic apply(input logic [31:0] w, input int r);
    bit     exc;
    int     e;
    longint x;
    f     = w;
    radix = 6'(r);
    #1;
    exc = (w[30:23] == 8'hFF);
    check(ex_p == exc && ex_i == exc && ex_w == exc, "exception");
    if (!exc) begin
      e = f2x_overflow(w, 20, 32);
      check(ov_p == 9'(e), "overflow 12.20");
      if (e == 0) check(fx_p == 32'(f2x_expected(w, 20)), "fixed 12.20");
      e = f2x_overflow(w, r, 32);
      check(ov_i == 9'(e), "overflow radix input");
      if (e == 0) check(fx_i == 32'(f2x_expected(w, r)), "fixed radix input");
      e = f2x_overflow(w, 47, 64);
      check(ov_w == 9'(e), "overflow 17.47");
      if (e == 0) begin
        x = f2x_expected(w, 47);
        check(fx_w == 64'(x), "fixed 17.47");
      end
    end
  endtask

  // Double precision: value from $bitstoreal, scaled by 2^47 and truncated
  task automatic apply_dp(input logic [63:0] w);
    real v;
    int  e;
    d = w;
    #1;
    v = $bitstoreal(w);
    checks++;
    if (ex_d !== (w[62:52] == 11'h7FF)) begin
      failures++;
      $display("FAIL double exception: d=%h", w);
    end
    if (w[62:52] != 11'h7FF) begin
      e = (v == 0.0) ? 0 : log2_floor(v) + 47 + 2 - 64;
      if (e < 0) e = 0;
      check(ov_d == 12'(e), "double overflow");
      if (e == 0) begin
        checks++;
        if (fx_d != 64'(longint'(trunc_real(v * (2.0 ** 47))))) begin
          failures++;
          $display("FAIL double fixed: d=%h fx=%h", w, fx_d);
        end
      end
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h3F80_0000, 20);
    check(fx_p == 32'h0010_0000 && fx_i == 32'h0010_0000, "1.0");
    check(fx_w == 64'h0000_8000_0000_0000, "1.0 at 17.47");
    apply(32'hC0A0_0000, 4);   // -5.0
    check(fx_p == 32'hFFB0_0000 && fx_i == 32'hFFFF_FFB0, "-5.0");
    apply(32'h7F80_0000, 20);
    check(ex_p, "+inf");
    apply(32'h7FC0_0001, 20);
    check(ex_p, "NaN");
    apply(32'h8000_0000, 20);
    check(fx_p == 0 && fx_w == 0 && !ex_p, "-0");
    apply(32'h4500_0000, 20);  // 2048.0: one bit short in 12.20
    check(ov_p == 1, "2048 overflow");
    apply_dp($realtobits(-1.5));
    check(fx_d == 64'hFFFF_4000_0000_0000, "double -1.5 at 17.47");
    apply_dp($realtobits(65536.0));
    check(ov_d == 1, "double 2^16 overflow");
    apply_dp(64'h7FF0_0000_0000_0000);
    check(ex_d, "double infinity");
    apply_dp(64'h8000_0000_0000_0000);
    check(fx_d == 0, "double -0");
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      w[62:52] = 11'(1023 - 60 + int'($urandom_range(0, 80)));
      if (i % 40 == 0) w[62:52] = 11'h7FF;
      if (i % 40 == 1) w[62:0] = '0;
      if (i % 40 == 2) w[62:52] = 11'h000;
      apply_dp(w);
    end
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] w;
      w = rand_sp(127 - 60, 127 + 30);
      if (i % 50 == 0) w[30:23] = 8'hFF;
      if (i % 50 == 1) w[30:0] = '0;
      if (i % 50 == 2) w[30:23] = 8'h00;
      apply(w, int'($urandom_range(0, 40)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
