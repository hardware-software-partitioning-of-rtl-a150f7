// tb_workloads: runs the interface with the three fixed point formats the
// evaluated applications use, each on a kernel of that application's kind:
//   12.20 (32-bit): 8-point DCT, as in the mpeg2dec IDCT and mpeg2enc DCT
//   21.30 (51-bit): complex FFT butterflies, as in fft/ifft
//   17.47 (64-bit): 5-tap convolution, as in epic
// and a fourth lane with the run-time radix point variant on a 64-bit word that
// switches between all three radix points. Each lane must complete operations,
// and the switching lane must switch.
module tb_workloads;
  logic clk = 1'b0;
  logic done [4];
  int   c [4], f [4], ops [4], sw [4];
  int   checks, failures;

  always #5 clk = ~clk;

  wl_lane #(.Kind(0), .FixedSize(32), .RadixPoint(20)) l_dct (
    .clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_ops(ops[0]), .n_switch(sw[0]));
  wl_lane #(.Kind(1), .FixedSize(51), .RadixPoint(30)) l_fft (
    .clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_ops(ops[1]), .n_switch(sw[1]));
  wl_lane #(.Kind(2), .FixedSize(64), .RadixPoint(47)) l_conv (
    .clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_ops(ops[2]), .n_switch(sw[2]));
  wl_lane #(.Kind(0), .FixedSize(64), .RadixPoint(20), .RadixInput(1'b1)) l_rt (
    .clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .n_ops(ops[3]), .n_switch(sw[3]));

  initial begin
    #5_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    checks   = c[0] + c[1] + c[2] + c[3] + 5;
    failures = f[0] + f[1] + f[2] + f[3];
    for (int i = 0; i < 4; i++) begin
      $display("lane %0d: checks=%0d failures=%0d ops=%0d switches=%0d", i, c[i], f[i], ops[i], sw[i]);
      if (ops[i] == 0) failures++;
    end
    if (sw[3] < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
