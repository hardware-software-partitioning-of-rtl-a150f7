// tb_coproc_mem_if: end-to-end test of the coprocessor memory interface at its
// default configuration (single precision memory words, 12.20 fixed point,
// radix point as a parameter).
//
// The testbench plays the two parts around the interface: a word addressed
// memory with byte enables (written on the rising clock edge, read
// combinationally) and a coprocessor that runs two small kernels through the
// interface, as a partitioned application would:
//   1. a fixed point kernel y[i] = a*x[i] + b: x[i] are floats read through the
//      Float-to-Fixed path, y[i] are fixed point results written through the
//      Fixed-to-Float path (WrFixed); checked against real arithmetic;
//   2. an integer kernel, a sum of absolute differences over two integer arrays
//      read on the unconverted path and written back with WrInt;
// plus directed accesses for the special cases: infinity/NaN (exception), a value
// too large for 12.20 (overflow), both zeros, a denormal, a byte-enable write.
// Each mechanism is counted and must occur at least once. Every access takes one
// clock cycle; a write must be visible in memory after exactly one edge.
module tb_coproc_mem_if;
  import tb_fp_pkg::*;

  localparam int N = 64;  // elements per kernel
  localparam int X_BASE = 0, Y_BASE = 64, P_BASE = 128, Q_BASE = 192, S_BASE = 256;
  localparam int SPECIAL = 264;

  logic        clk = 1'b0;
  logic [31:0] mem [512];

  logic [31:0] cp_addr;
  logic [3:0]  cp_be;
  logic        cp_rd, cp_wr_int, cp_wr_fixed;
  logic [31:0] cp_int_data_out, cp_fixed_data_out;
  logic [31:0] cp_int_data_in, cp_fixed_data_in;
  logic [8:0]  cp_fixed_overflow;
  logic        cp_fixed_exception;
  logic [31:0] mem_addr;
  logic [3:0]  mem_be;
  logic        mem_rd, mem_wr;
  logic [31:0] mem_data_out, mem_data_in;

  int checks = 0, failures = 0;
  int n_fixed_rd = 0, n_int_rd = 0, n_fixed_wr = 0, n_int_wr = 0, n_be_partial = 0;
  int n_exception = 0, n_overflow = 0, n_zero = 0, n_denormal = 0, n_negative = 0;
  int cycles = 0;

  coproc_mem_if dut (
    .cp_addr, .cp_be, .cp_rd, .cp_wr_int, .cp_wr_fixed,
    .cp_int_data_out, .cp_fixed_data_out,
    .cp_int_data_in, .cp_fixed_data_in, .cp_fixed_overflow, .cp_fixed_exception,
    .radix_point(6'd0),
    .mem_addr, .mem_be, .mem_rd, .mem_wr, .mem_data_out, .mem_data_in
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Memory model: word addressed, byte enables on writes
  assign mem_data_in = mem[mem_addr[8:0]];
  always @(posedge clk) begin
    if (mem_wr) begin
      for (int b = 0; b < 4; b++)
        if (mem_be[b]) mem[mem_addr[8:0]][8*b +: 8] <= mem_data_out[8*b +: 8];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (addr %0d)", what, cp_addr);
    end
  endtask

  task automatic idle();
    cp_rd = 0; cp_wr_int = 0; cp_wr_fixed = 0; cp_be = 4'hF;
    cp_int_data_out = '0; cp_fixed_data_out = '0;
  endtask

  // One-cycle read; returns both views of the word
  task automatic cp_read(input int a, output logic [31:0] iv, output logic [31:0] fv,
                         output logic [8:0] ov, output logic ex);
    @(negedge clk);
    idle();
    cp_addr = 32'(a);
    cp_rd   = 1;
    #1;
    check(mem_rd && !mem_wr && mem_addr == 32'(a), "read control passes through");
    iv = cp_int_data_in;
    fv = cp_fixed_data_in;
    ov = cp_fixed_overflow;
    ex = cp_fixed_exception;
    check(iv == mem[a], "integer read is unaltered");
  endtask

  task automatic cp_write(input int a, input bit fixed, input logic [31:0] d, input logic [3:0] be);
    int c0;
    @(negedge clk);
    idle();
    cp_addr = 32'(a);
    cp_be   = be;
    if (fixed) begin cp_wr_fixed = 1; cp_fixed_data_out = d; end
    else       begin cp_wr_int   = 1; cp_int_data_out   = d; end
    #1;
    check(mem_wr && !mem_rd && mem_be == be && mem_addr == 32'(a), "write control");
    c0 = cycles;
    @(posedge clk);
    #1;
    check(cycles - c0 == 1, "write takes one cycle");
    if (fixed) n_fixed_wr++; else n_int_wr++;
    if (be != 4'hF) n_be_partial++;
    @(negedge clk);
    idle();
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] iv, fv, r0, r1;
    logic [8:0]  ov;
    logic        ex;
    real         a, b, xr, yr, got, tol;
    longint      afx, bfx, prod;
    int          sad;

    for (int i = 0; i < 512; i++) mem[i] = '0;
    idle();
    cp_addr = '0;

    // ---- data set up by "software": floats and integers ----
    for (int i = 0; i < N; i++) begin
      // floats with 12 fractional bits in [-512, 512)
      mem[X_BASE + i] = real_to_sp(real'($signed(22'($urandom))) / 4096.0);
      mem[P_BASE + i] = $urandom_range(0, 255);
      mem[Q_BASE + i] = $urandom_range(0, 255);
    end
    mem[X_BASE + 3] = 32'h8000_0000;  // -0.0

    // ---- kernel 1: y = a*x + b in 12.20 fixed point ----
    a   = -1.375;
    b   = 3.25;
    afx = longint'(a * 1048576.0);
    bfx = longint'(b * 1048576.0);
    for (int i = 0; i < N; i++) begin
      cp_read(X_BASE + i, iv, fv, ov, ex);
      n_fixed_rd++;
      check(!ex && ov == 0, "kernel input in range");
      xr = sp_to_real(mem[X_BASE + i]);
      check(longint'($signed(fv)) == longint'(trunc_real(xr * 1048576.0)), "float to fixed");
      if (xr == 0.0) n_zero++;
      if (xr < 0.0)  n_negative++;
      prod = (longint'($signed(fv)) * afx) >>> 20;
      cp_write(Y_BASE + i, 1'b1, 32'(prod + bfx), 4'hF);
      yr  = a * xr + b;
      got = sp_to_real(mem[Y_BASE + i]);
      tol = 3.0 / 1048576.0 + ((yr < 0.0) ? -yr : yr) / 4194304.0;
      check(((got - yr) < tol) && ((yr - got) < tol), "kernel 1 result");
    end

    // ---- kernel 2: sum of absolute differences on integer data ----
    sad = 0;
    for (int i = 0; i < N; i++) begin
      cp_read(P_BASE + i, r0, fv, ov, ex);
      n_int_rd++;
      cp_read(Q_BASE + i, r1, fv, ov, ex);
      n_int_rd++;
      sad += (r0 > r1) ? int'(r0 - r1) : int'(r1 - r0);
    end
    cp_write(S_BASE, 1'b0, 32'(sad), 4'hF);
    begin
      int ref_sad = 0;
      for (int i = 0; i < N; i++)
        ref_sad += (mem[P_BASE + i] > mem[Q_BASE + i]) ? int'(mem[P_BASE + i] - mem[Q_BASE + i])
                                                         : int'(mem[Q_BASE + i] - mem[P_BASE + i]);
      check(mem[S_BASE] == 32'(ref_sad), "kernel 2 sum of absolute differences");
    end

    // ---- special words on the read path ----
    mem[SPECIAL + 0] = 32'h7F80_0000;  // +inf
    mem[SPECIAL + 1] = 32'hFFC0_0000;  // NaN
    mem[SPECIAL + 2] = 32'h4600_0000;  // 8192.0: needs 3 more integer bits
    mem[SPECIAL + 3] = 32'h0000_0010;  // denormal
    mem[SPECIAL + 4] = 32'h0000_0000;  // +0
    for (int k = 0; k < 2; k++) begin
      cp_read(SPECIAL + k, iv, fv, ov, ex);
      check(ex, "infinity/NaN raises exception");
      if (ex) n_exception++;
    end
    cp_read(SPECIAL + 2, iv, fv, ov, ex);
    check(ov == 3 && !ex, "overflow count");
    if (ov != 0) n_overflow++;
    cp_read(SPECIAL + 3, iv, fv, ov, ex);
    check(fv == 0 && ov == 0 && !ex, "denormal reads as zero");
    n_denormal++;
    cp_read(SPECIAL + 4, iv, fv, ov, ex);
    check(fv == 0, "zero");
    n_zero++;

    // ---- special words on the write path ----
    cp_write(SPECIAL + 5, 1'b1, 32'h0, 4'hF);
    check(mem[SPECIAL + 5] == 32'h0, "fixed zero is written as +0");
    cp_write(SPECIAL + 6, 1'b1, 32'hFFF0_0000, 4'hF);
    check(mem[SPECIAL + 6] == 32'hBF80_0000, "fixed -1.0 is written as float -1.0");
    mem[SPECIAL + 7] = 32'h1122_3344;
    cp_write(SPECIAL + 7, 1'b0, 32'hAABB_CCDD, 4'b0010);
    check(mem[SPECIAL + 7] == 32'h1122_CC44, "byte enable write");

    $display("fixed_rd=%0d int_rd=%0d fixed_wr=%0d int_wr=%0d be_partial=%0d exception=%0d overflow=%0d zero=%0d denormal=%0d negative=%0d",
             n_fixed_rd, n_int_rd, n_fixed_wr, n_int_wr, n_be_partial, n_exception, n_overflow,
             n_zero, n_denormal, n_negative);
    check(n_fixed_rd > 0, "fixed point read happened");
    check(n_int_rd > 0, "integer read happened");
    check(n_fixed_wr > 0, "fixed point write happened");
    check(n_int_wr > 0, "integer write happened");
    check(n_be_partial > 0, "byte enable write happened");
    check(n_exception > 0, "exception happened");
    check(n_overflow > 0, "overflow happened");
    check(n_zero > 0, "zero input happened");
    check(n_denormal > 0, "denormal input happened");
    check(n_negative > 0, "negative value happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
