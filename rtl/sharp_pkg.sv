// sharp_pkg: types, constants and floating-point helper functions shared by
// the LSTM accelerator.
//
// Number formats follow the accelerator's arithmetic: weights, inputs, hidden
// values and activated gates are IEEE half precision (fp16); products are
// widened to single precision (fp32) and all accumulation, the cell state and
// the activation datapath are fp32. The helper functions are plain
// combinational logic used inside the pipelined units:
//   fp16_mul        fp16 x fp16 -> exact fp32 product ("fp-mul")
//   fp32_add        fp32 + fp32, round to nearest even ("fp-add")
//   fp32_scale2     multiply by 2^k through the exponent ("fp-shift")
//   fp32_exp        e^x through 2^(x log2 e), cubic for the fraction ("fp-exp")
//   fp32_recip      1/x by mantissa division, truncated ("fp-div")
//   fp32_to_fp16 / fp16_to_fp32 conversions, round to nearest even
// Simplifications (this design's choice): subnormals are flushed to zero, NaN
// is not produced or propagated (an infinite operand wins), and overflow gives
// infinity.
package sharp_pkg;

  typedef logic [15:0] fp16_t;
  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ONE  = 32'h3f80_0000;
  localparam fp32_t FP32_ZERO = 32'h0000_0000;

  // MVM tile configurations of the compute unit. CFG1 maps the VS units to
  // 8 row groups (a tile of 8K rows), CFG4 to a single row group (K rows).
  typedef enum logic [1:0] {
    CFG1 = 2'd0,   // 8 row groups, N/8 columns per pass, tap at level log2(N)-3
    CFG2 = 2'd1,   // 4 row groups, N/4 columns per pass
    CFG3 = 2'd2,   // 2 row groups, N/2 columns per pass
    CFG4 = 2'd3    // 1 row group,  N columns per pass, tap at the tree root
  } tile_cfg_e;

  // Row groups of a configuration: 8 >> cfg.
  function automatic int unsigned cfg_groups(tile_cfg_e c);
    return 32'd8 >> c;
  endfunction

  typedef enum logic {
    PH_INPUT  = 1'b0,   // W * x_t, result parked in the intermediate buffer
    PH_HIDDEN = 1'b1    // U * h_(t-1), merged with the parked input result
  } phase_e;

  // Tag that travels with every tile-engine issue and with every result vector.
  typedef struct packed {
    phase_e     phase;
    logic [15:0] step;     // time step t
    logic [15:0] rb;       // first row block (K rows) of the tile
    logic [3:0]  nvec;     // row blocks of the tile that lie inside the matrix
    tile_cfg_e  cfg;       // configuration of this tile
    logic        first;    // first column pass of the tile
    logic        last;     // last column pass of the tile
  } issue_tag_t;

  // Tag of one K-wide result vector after the accumulators.
  typedef struct packed {
    phase_e      phase;
    logic [15:0] step;
    logic [15:0] rb;
  } vec_tag_t;

  // Event counters of the pipeline controller.
  typedef struct packed {
    logic [31:0] busy_cycles;     // cycles between start and done
    logic [31:0] issues;          // column passes sent to the tile engine
    logic [31:0] stall_dep;       // cycles the hidden MVM waited for h_(t-1)
    logic [31:0] stall_credit;    // cycles a tile waited for result-FIFO space
    logic [31:0] overlap;         // input-MVM issues while the cell updater ran
    logic [31:0] pad_tiles;       // last row tiles shrunk by padding reconfiguration
    logic [31:0] tiles_cfg1;      // tiles issued in each configuration
    logic [31:0] tiles_cfg2;
    logic [31:0] tiles_cfg3;
    logic [31:0] tiles_cfg4;
  } perf_t;

  // ---------------------------------------------------------------- fp helpers

  function automatic fp32_t fp16_to_fp32(fp16_t a);
    if (a[14:10] == 5'd0) return {a[15], 31'd0};
    if (a[14:10] == 5'd31) return {a[15], 8'hff, 23'd0};
    return {a[15], 8'(a[14:10]) + 8'd112, a[9:0], 13'd0};
  endfunction

  function automatic fp16_t fp32_to_fp16(fp32_t a);
    int e;
    logic [10:0] m;
    logic rnd;
    if (a[30:23] == 8'd0) return {a[31], 15'd0};
    if (a[30:23] == 8'hff) return {a[31], 5'h1f, 10'd0};
    e = int'(a[30:23]) - 112;
    m = {1'b0, a[22:13]};
    rnd = a[12] & ((|a[11:0]) | a[13]);
    m = m + 11'(rnd);
    if (m[10]) begin
      m = 11'd0;
      e = e + 1;
    end
    if (e >= 31) return {a[31], 5'h1f, 10'd0};
    if (e <= 0) return {a[31], 15'd0};
    return {a[31], 5'(e), m[9:0]};
  endfunction

  function automatic fp32_t fp16_mul(fp16_t a, fp16_t b);
    logic s;
    logic [21:0] p;
    int e;
    s = a[15] ^ b[15];
    if (a[14:10] == 5'd31 || b[14:10] == 5'd31) return {s, 8'hff, 23'd0};
    if (a[14:10] == 5'd0 || b[14:10] == 5'd0) return {s, 31'd0};
    p = {1'b1, a[9:0]} * {1'b1, b[9:0]};
    e = int'(a[14:10]) + int'(b[14:10]) - 30 + 127;
    if (p[21]) return {s, 8'(e + 1), p[20:0], 2'b00};
    return {s, 8'(e), p[19:0], 3'b000};
  endfunction

  function automatic fp32_t fp32_add(fp32_t a, fp32_t b);
    fp32_t big, sml;
    logic [26:0] mb, ms;
    logic [27:0] sum;
    logic [8:0] d;
    int e, lz;
    logic sticky;
    logic [23:0] mant;
    if (a[30:23] == 8'hff) return a;
    if (b[30:23] == 8'hff) return b;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? {a[31] & b[31], 31'd0} : a;
    if (a[30:23] == 8'd0) return b;
    if (a[30:0] >= b[30:0]) begin
      big = a; sml = b;
    end else begin
      big = b; sml = a;
    end
    mb = {1'b1, big[22:0], 3'b000};
    ms = {1'b1, sml[22:0], 3'b000};
    d = {1'b0, big[30:23]} - {1'b0, sml[30:23]};
    if (d >= 9'd27) begin
      ms = 27'd1;
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d)) sticky = sticky | ms[i];
      ms = (ms >> d) | 27'(sticky);
    end
    e = int'(big[30:23]);
    if (big[31] == sml[31]) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms};
      if (sum == 28'd0) return FP32_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--)
        if (sum[i] && lz == 0) lz = 27 - i;
      lz = lz - 1;
      sum = sum << lz;
      e = e - lz;
    end
    // sum[26] is the hidden one, [25:3] the fraction, [2] guard, [1:0] sticky
    mant = {1'b0, sum[25:3]};
    if (sum[2] && ((|sum[1:0]) || sum[3])) mant = mant + 24'd1;
    if (mant[23]) begin
      mant = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {big[31], 8'hff, 23'd0};
    if (e <= 0) return {big[31], 31'd0};
    return {big[31], 8'(e), mant[22:0]};
  endfunction

  // x * 2^k by exponent arithmetic.
  function automatic fp32_t fp32_scale2(fp32_t a, int k);
    int e;
    if (a[30:23] == 8'd0 || a[30:23] == 8'hff) return a;
    e = int'(a[30:23]) + k;
    if (e >= 255) return {a[31], 8'hff, 23'd0};
    if (e <= 0) return {a[31], 31'd0};
    return {a[31], 8'(e), a[22:0]};
  endfunction

  // e^x. x is turned into Q8.16 fixed point, multiplied by log2(e) (Q2.30),
  // split into an integer part (the result exponent) and a fraction f whose
  // 2^f comes from a least-squares cubic with Q0.24 coefficients.
  localparam longint LOG2E_Q30 = 64'd1549082005;
  localparam longint EXP_C1 = 64'd11667380;
  localparam longint EXP_C2 = 64'd3807423;
  localparam longint EXP_C3 = 64'd1298232;

  function automatic fp32_t fp32_exp(fp32_t a);
    longint xf, yf, f, p, ip;
    int sh;
    if (a[30:23] == 8'hff) return a[31] ? FP32_ZERO : {1'b0, 8'hff, 23'd0};
    if (a[30:23] == 8'd0) return FP32_ONE;
    if (a[30:23] >= 8'd134) return a[31] ? FP32_ZERO : {1'b0, 8'hff, 23'd0}; // |x| >= 128
    sh = 134 - int'(a[30:23]);       // x * 2^16 = mant >> (134 - e)
    xf = (sh >= 40) ? 64'd0 : longint'({1'b1, a[22:0]}) >>> sh;
    if (a[31]) xf = -xf;
    yf = (xf * LOG2E_Q30) >>> 30;    // log2 scaled value, 16 fraction bits
    ip = yf >>> 16;
    f = (yf & 64'hffff) << 8;        // Q0.24
    p = (EXP_C3 * f) >>> 24;
    p = ((EXP_C2 + p) * f) >>> 24;
    p = ((EXP_C1 + p) * f) >>> 24;   // 2^f - 1 in Q0.24
    if (ip + 127 >= 255) return {1'b0, 8'hff, 23'd0};
    if (ip + 127 <= 0) return FP32_ZERO;
    if (p >= 64'd16777216) return {1'b0, 8'(ip + 128), 23'd0};
    return {1'b0, 8'(ip + 127), p[23:1]};
  endfunction

  // 1/x with a truncated mantissa quotient.
  function automatic fp32_t fp32_recip(fp32_t a);
    logic [47:0] q;
    int e;
    if (a[30:23] == 8'hff) return {a[31], 31'd0};
    if (a[30:23] == 8'd0) return {a[31], 8'hff, 23'd0};
    q = 48'h8000_0000_0000 / {24'd0, 1'b1, a[22:0]};
    if (q[24]) begin
      e = 254 - int'(a[30:23]);
      return {a[31], 8'(e), 23'd0};
    end
    e = 253 - int'(a[30:23]);
    if (e <= 0) return {a[31], 31'd0};
    return {a[31], 8'(e), q[22:0]};
  endfunction

endpackage
