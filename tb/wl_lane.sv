// wl_lane: one workload set-up for tb_workloads.
//
// Holds a small word addressed memory of single precision floats, a
// coproc_mem_if configured for one fixed point format, and a coprocessor model
// that runs a linear kernel y = C x through the interface: the inputs x are
// floats read through the Float-to-Fixed path, the products and sums are done
// in fixed point with the lane's radix point, and y is written back through the
// Fixed-to-Float path. The kernels stand in for the partitioned applications:
//   Kind 0: 8-point DCT-II with the 1/2 C(k) scaling (mpeg2dec/mpeg2enc, 12.20)
//   Kind 1: radix-2 FFT butterfly on two complex values with a random twiddle
//           (fft/ifft, 21.30)
//   Kind 2: 5-tap convolution over 12 samples (epic, 17.47)
// With RadixInput = 1 the lane runs Kind 0 three times, switching the run-time
// radix point between 20, 30 and 47 (mode switches counted in n_switch).
// Results are compared with real arithmetic to within the fixed point and
// float truncation error. Reports its counts on ports when done is high.
module wl_lane
  import tb_fp_pkg::*;
#(
  parameter int Kind       = 0,
  parameter int FixedSize  = 32,
  parameter int RadixPoint = 20,
  parameter bit RadixInput = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_ops,
  output int   n_switch
);

  logic [31:0]          mem [64];
  logic [31:0]          cp_addr;
  logic                 cp_rd, cp_wr_int, cp_wr_fixed;
  logic [FixedSize-1:0] cp_fixed_data_out, cp_fixed_data_in;
  logic [31:0]          cp_int_data_in;
  logic [8:0]           cp_fixed_overflow;
  logic                 cp_fixed_exception;
  logic [5:0]           radix_rt;
  logic [31:0]          mem_addr, mem_data_out, mem_data_in;
  logic [3:0]           mem_be;
  logic                 mem_rd, mem_wr;

  coproc_mem_if #(
    .FixedSize (FixedSize),
    .RadixPoint(RadixPoint),
    .RadixInput(RadixInput)
  ) dut (
    .cp_addr, .cp_be(4'hF), .cp_rd, .cp_wr_int, .cp_wr_fixed,
    .cp_int_data_out(32'h0), .cp_fixed_data_out,
    .cp_int_data_in, .cp_fixed_data_in, .cp_fixed_overflow, .cp_fixed_exception,
    .radix_point(radix_rt),
    .mem_addr, .mem_be, .mem_rd, .mem_wr, .mem_data_out, .mem_data_in
  );

  assign mem_data_in = mem[mem_addr[5:0]];
  always @(posedge clk)
    if (mem_wr) mem[mem_addr[5:0]] <= mem_data_out;

  localparam int PI_STEPS = 16;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL lane kind=%0d fixed=%0d: %s", Kind, FixedSize, what);
    end
  endtask

  task automatic run_kernel(input int r, input int kind);
    real                 c [16][16];
    real                 xr [16];
    real                 yr, got, tol;
    logic signed [127:0] xf [16];
    logic signed [127:0] acc, cf;
    int                  n_in, n_out;
    real                 wr_re, wi_im, h [5];

    for (int j = 0; j < 16; j++) for (int n = 0; n < 16; n++) c[j][n] = 0.0;
    case (kind)
      0: begin
        n_in = 8; n_out = 8;
        for (int k = 0; k < 8; k++)
          for (int n = 0; n < 8; n++)
            c[k][n] = ((k == 0) ? 0.5 / $sqrt(2.0) : 0.5) * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
        for (int n = 0; n < 8; n++) xr[n] = real'($signed(9'($urandom))) + real'($urandom_range(0, 15)) / 16.0;
      end
      1: begin
        // inputs ar, ai, br, bi; outputs a + w b and a - w b
        n_in = 4; n_out = 4;
        wr_re = $cos(real'($urandom_range(0, PI_STEPS - 1)) * 3.14159265358979 / PI_STEPS);
        wi_im = -$sin(real'($urandom_range(0, PI_STEPS - 1)) * 3.14159265358979 / PI_STEPS);
        c[0][0] = 1; c[0][2] = wr_re; c[0][3] = -wi_im;
        c[1][1] = 1; c[1][2] = wi_im; c[1][3] = wr_re;
        c[2][0] = 1; c[2][2] = -wr_re; c[2][3] = wi_im;
        c[3][1] = 1; c[3][2] = -wi_im; c[3][3] = -wr_re;
        for (int n = 0; n < 4; n++) xr[n] = real'($signed(16'($urandom))) / 64.0;
      end
      default: begin
        n_in = 12; n_out = 8;
        h = '{0.0625, 0.25, 0.375, 0.25, 0.0625};
        for (int j = 0; j < 8; j++) for (int t = 0; t < 5; t++) c[j][j + t] = h[t];
        for (int n = 0; n < 12; n++) xr[n] = real'($signed(12'($urandom))) / 2048.0;
      end
    endcase

    for (int n = 0; n < n_in; n++) mem[n] = real_to_sp(xr[n]);

    // read phase: floats arrive as fixed point
    for (int n = 0; n < n_in; n++) begin
      @(negedge clk);
      cp_addr = 32'(n); cp_rd = 1; cp_wr_fixed = 0;
      #1;
      check(!cp_fixed_exception && cp_fixed_overflow == 0, "input in range");
      xf[n] = 128'($signed(cp_fixed_data_in));
      check(xf[n] == 128'(longint'(trunc_real(xr[n] * (2.0 ** r)))), "input conversion");
      cp_rd = 0;
    end

    // compute and write phase
    for (int j = 0; j < n_out; j++) begin
      acc = '0;
      for (int n = 0; n < n_in; n++) begin
        cf  = 128'(longint'(trunc_real(c[j][n] * (2.0 ** r))));
        acc = acc + ((cf * xf[n]) >>> r);
      end
      @(negedge clk);
      cp_addr = 32'(32 + j); cp_wr_fixed = 1; cp_fixed_data_out = FixedSize'(acc);
      @(posedge clk);
      #1;
      cp_wr_fixed = 0;
      yr = 0.0;
      for (int n = 0; n < n_in; n++) yr += c[j][n] * xr[n];
      got = sp_to_real(mem[32 + j]);
      // fixed point truncation of inputs, coefficients and products, plus the
      // float mantissa truncation of the result
      tol = real'(2 * n_in + 2) / (2.0 ** r) + ((yr < 0.0) ? -yr : yr) / (2.0 ** 21);
      for (int n = 0; n < n_in; n++) tol += ((xr[n] < 0.0) ? -xr[n] : xr[n]) / (2.0 ** r);
      check((got - yr) < tol && (yr - got) < tol, $sformatf("output %0d: got %f want %f", j, got, yr));
      n_ops++;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_ops = 0; n_switch = 0;
    cp_addr = '0; cp_rd = 0; cp_wr_int = 0; cp_wr_fixed = 0; cp_fixed_data_out = '0;
    radix_rt = 6'(RadixPoint);
    for (int i = 0; i < 64; i++) mem[i] = '0;
    if (RadixInput) begin
      automatic int rs [3] = '{20, 30, 47};
      for (int rep = 0; rep < 6; rep++) begin
        radix_rt = 6'(rs[rep % 3]);
        n_switch++;
        run_kernel(rs[rep % 3], 0);
        run_kernel(rs[rep % 3], 2);
      end
    end else begin
      for (int rep = 0; rep < 20; rep++) run_kernel(RadixPoint, Kind);
    end
    done = 1;
  end

endmodule
