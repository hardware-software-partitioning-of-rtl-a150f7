// tb_fp_pkg: reference arithmetic shared by the converter testbenches.
//
// Everything here is computed with real numbers or plain 64-bit integer loops,
// independently of the RTL's shifter and priority encoder structure:
//   sp_to_real       value of an IEEE 754 single precision word
//   f2x_expected     value * 2^radix truncated toward zero (as the fixed point word)
//   f2x_overflow     extra fixed point bits a value needs: leading one position
//                    plus radix plus a sign bit, minus the word size, at least 0
//   x2fp_expected    floating point word (any exponent/mantissa split) for a
//                    fixed point value, mantissa truncated, zero mapped to +0
//   x2f_expected     the same for single precision
//   rand_sp          random single precision word with an exponent in a range
//   real_to_sp       single precision word of a real value (mantissa truncated)
package tb_fp_pkg;

  function automatic real sp_to_real(input logic [31:0] b);
    int  e;
    real m;
    real v;
    e = int'(b[30:23]);
    m = real'(b[22:0]);
    if (e == 0) v = m * (2.0 ** -149);
    else        v = (1.0 + m / (2.0 ** 23)) * (2.0 ** (e - 127));
    return b[31] ? -v : v;
  endfunction

  function automatic real trunc_real(input real v);
    return (v >= 0.0) ? $floor(v) : $ceil(v);
  endfunction

  // Only meaningful when the result fits in 64 bits
  function automatic longint f2x_expected(input logic [31:0] b, input int radix);
    return longint'(trunc_real(sp_to_real(b) * (2.0 ** radix)));
  endfunction

  // floor(log2(|v|)) for v != 0
  function automatic int log2_floor(input real v);
    real a;
    int  k;
    a = (v < 0.0) ? -v : v;
    k = 0;
    while (a >= 2.0) begin a = a / 2.0; k++; end
    while (a < 1.0)  begin a = a * 2.0; k--; end
    return k;
  endfunction

  function automatic int f2x_overflow(input logic [31:0] b, input int radix, input int fixed_size);
    real v;
    int  need;
    v = sp_to_real(b);
    if (v == 0.0) return 0;
    need = log2_floor(v) + radix + 2 - fixed_size;
    return (need > 0) ? need : 0;
  endfunction

  // Floating point word (eb exponent bits, mb mantissa bits, right aligned in
  // 64 bits) of a fixed point value
  function automatic logic [63:0] x2fp_expected(input longint x, input int radix,
                                                input int eb, input int mb);
    longint unsigned mag;
    longint unsigned m;
    longint unsigned e;
    int              k;
    if (x == 0) return 64'h0;
    mag = (x < 0) ? longint'(-x) : longint'(x);
    k = 63;
    while (mag[k] == 1'b0) k--;
    e = longint'(k - radix + (1 << (eb - 1)) - 1);
    if (k >= mb) m = mag >> (k - mb);
    else         m = mag << (mb - k);
    m = m & ((64'd1 << mb) - 1);
    return (longint'(x < 0) << (eb + mb)) | (e << mb) | m;
  endfunction

  function automatic logic [31:0] x2f_expected(input longint x, input int radix);
    return 32'(x2fp_expected(x, radix, 8, 23));
  endfunction

  function automatic logic [31:0] rand_sp(input int exp_lo, input int exp_hi);
    logic [7:0] e;
    e = 8'(exp_lo + int'($urandom_range(0, exp_hi - exp_lo)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic logic [31:0] real_to_sp(input real v);
    // truncating encoder; exact for values with at most 24 significant bits
    logic [31:0] r;
    real         a, m;
    int          k;
    if (v == 0.0) return 32'h0;
    a = (v < 0.0) ? -v : v;
    k = log2_floor(a);
    m = a / (2.0 ** k) - 1.0;
    r = {(v < 0.0), 8'(k + 127), 23'(longint'($floor(m * (2.0 ** 23))))};
    return r;
  endfunction

endpackage
