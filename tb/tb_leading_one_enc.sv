// tb_leading_one_enc: checks the leading-one priority encoder at widths 32, 51
// and 64 against a reference found by comparing with powers of two.
module tb_leading_one_enc;
  logic [63:0] v;
  logic [4:0]  p32;
  logic [5:0]  p51, p64;
  logic        v32, v51, v64;
  int checks = 0, failures = 0;

  leading_one_enc                u32 (.in_bits(v[31:0]), .pos(p32), .valid(v32));
  leading_one_enc #(.Width(51))  u51 (.in_bits(v[50:0]), .pos(p51), .valid(v51));
  leading_one_enc #(.Width(64))  u64 (.in_bits(v),       .pos(p64), .valid(v64));

  // index of the highest one: largest k with 2^k <= x
  function automatic int ref_pos(input longint unsigned x);
    int k;
    k = -1;
    for (int i = 0; i < 64; i++)
      if (x >= (64'd1 << i)) k = i;
    return k;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: v=%h p32=%0d p51=%0d p64=%0d", what, v, p32, p51, p64);
    end
  endtask

  task automatic apply(input logic [63:0] x);
    int r;
    v = x;
    #1;
    r = ref_pos(x[31:0]);
    check(v32 == (r >= 0) && (r < 0 || p32 == 5'(r)), "width 32");
    r = ref_pos(x[50:0]);
    check(v51 == (r >= 0) && (r < 0 || p51 == 6'(r)), "width 51");
    r = ref_pos(x);
    check(v64 == (r >= 0) && (r < 0 || p64 == 6'(r)), "width 64");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(64'h0);
    check(!v32 && !v64, "zero");
    apply(64'h1);
    apply(64'h8000_0000_0000_0000);
    check(p64 == 63 && !v32, "top bit");
    for (int i = 0; i < 64; i++) apply(64'h1 << i);
    for (int i = 0; i < 2000; i++) apply({$urandom, $urandom} >> $urandom_range(0, 63));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
