// tb_fixed_to_float: checks the Fixed-to-Float converter for the three formats
// 12.20 (defaults), 21.30 and 17.47, and for the run-time radix point variant,
// and for a double precision output from 17.47, against a reference that finds the leading one with a loop and truncates the
// mantissa. Also checks round trips through the Float-to-Fixed converter.
module tb_fixed_to_float;
  import tb_fp_pkg::*;

  logic [63:0] x;
  logic [5:0]  radix;
  logic [31:0] f_p, f_i, f_m, f_w;
  logic [63:0] f_d;
  logic [31:0] back;
  logic [8:0]  back_ov;
  logic        back_ex;
  int checks = 0, failures = 0;

  fixed_to_float u_p (.fixed_in(x[31:0]), .radix_point(6'd0), .float_out(f_p));
  fixed_to_float #(.RadixInput(1'b1)) u_i (.fixed_in(x[31:0]), .radix_point(radix), .float_out(f_i));
  fixed_to_float #(.FixedSize(51), .RadixPoint(30)) u_m (.fixed_in(x[50:0]), .radix_point(6'd0), .float_out(f_m));
  fixed_to_float #(.FixedSize(64), .RadixPoint(47)) u_w (.fixed_in(x), .radix_point(6'd0), .float_out(f_w));
  fixed_to_float #(
    .FloatSize(64), .MantissaBits(52), .ExponentBits(11), .FixedSize(64), .RadixPoint(47)
  ) u_d (.fixed_in(x), .radix_point(6'd0), .float_out(f_d));
  float_to_fixed u_back (.float_in(f_p), .radix_point(6'd0), .fixed_out(back), .overflow(back_ov), .exception(back_ex));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%h radix=%0d p=%h i=%h m=%h w=%h", what, x, radix, f_p, f_i, f_m, f_w);
    end
  endtask

  task automatic apply(input logic [63:0] v, input int r);
    x     = v;
    radix = 6'(r);
    #1;
    check(f_p == x2f_expected(longint'($signed(v[31:0])), 20), "12.20");
    check(f_i == x2f_expected(longint'($signed(v[31:0])), r), "radix input");
    check(f_m == x2f_expected(longint'($signed(v[50:0])), 30), "21.30");
    check(f_w == x2f_expected(longint'(v), 47), "17.47");
    check(f_d == x2fp_expected(longint'(v), 47, 11, 52), "17.47 to double");
    // A word with at most 24 significant bits survives the round trip exactly
    if (v[31:0] == 0 ||
        (($signed(v[31:0]) < 0 ? -v[31:0] : v[31:0]) < 32'h0100_0000))
      check(back == v[31:0] && back_ov == 0 && !back_ex, "round trip");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(64'h0000_0000_0010_0000, 20);
    check(f_p == 32'h3F80_0000, "1.0");
    apply(64'h0000_0000_FFE8_0000, 20);
    check(f_p == 32'hBFC0_0000, "-1.5");
    apply(64'h0, 20);
    check(f_p == 0 && f_w == 0 && f_m == 0, "zero is +0");
    apply(64'h0000_0000_8000_0000, 20);
    check(f_p == 32'hC500_0000, "-2048");
    apply(64'h8000_0000_0000_0000, 47);
    check(f_w == 32'hC780_0000, "-2^16 at 17.47");
    apply(64'hFFFF_4000_0000_0000, 47);
    check(f_d == $realtobits(-1.5), "-1.5 to double");
    apply(64'h0000_0000_0000_0001, 20);
    check(f_p == 32'h3580_0000 && f_w == 32'h2800_0000, "one LSB");
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      v = $signed(v) >>> $urandom_range(0, 63);
      apply(v, int'($urandom_range(0, 63)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
