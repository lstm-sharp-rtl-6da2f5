// sharp_tb_pkg: reference arithmetic for the testbenches.
//
// Converts between IEEE fp16/fp32 bit patterns and real numbers with plain
// real arithmetic, independently of the design's bit-level functions, and
// provides the reference sigmoid and tanh.
package sharp_tb_pkg;

  function automatic real pow2(int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp32_to_real(logic [31:0] b);
    real r;
    if (b[30:23] == 8'd0) return 0.0;
    r = (1.0 + real'(b[22:0]) / 8388608.0) * pow2(int'(b[30:23]) - 127);
    return b[31] ? -r : r;
  endfunction

  function automatic real fp16_to_real(logic [15:0] b);
    real r;
    if (b[14:10] == 5'd0) return 0.0;
    r = (1.0 + real'(b[9:0]) / 1024.0) * pow2(int'(b[14:10]) - 15);
    return b[15] ? -r : r;
  endfunction

  // Round to nearest (ties away); subnormals flush to zero.
  function automatic logic [15:0] real_to_fp16(real r);
    logic s;
    real a, m;
    int e, mi;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a < pow2(-14)) return {s, 15'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0) begin a = a * 2.0; e--; end
    m = (a - 1.0) * 1024.0;
    mi = int'(m);            // int'() rounds to nearest
    if (mi == 1024) begin mi = 0; e++; end
    if (e + 15 >= 31) return {s, 5'h1f, 10'd0};
    return {s, 5'(e + 15), 10'(mi)};
  endfunction

  function automatic logic [31:0] real_to_fp32(real r);
    logic s;
    real a, m;
    int e;
    longint mi;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a < pow2(-126)) return {s, 31'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0) begin a = a * 2.0; e--; end
    m = (a - 1.0) * 8388608.0;
    mi = longint'(m);
    if (mi == 64'd8388608) begin mi = 0; e++; end
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  function automatic real sigmoid(real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  function automatic real tanh_r(real x);
    if (x > 20.0) return 1.0;
    if (x < -20.0) return -1.0;
    return ($exp(2.0 * x) - 1.0) / ($exp(2.0 * x) + 1.0);
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
