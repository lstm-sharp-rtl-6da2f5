// tb_sharp_compute_unit: multiplies random small-integer matrices (exact in
// fp16/fp32) by vectors through the tile engine in every configuration,
// issuing one column pass per cycle with tiles back to back, and checks the
// row-group results and the latency from the last pass (1 + log2(N) + 1).
`timescale 1ns/1ps
module tb_sharp_compute_unit;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int N = 16, K = 4, L = 4, COLS = 21;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, out_valid;
  issue_tag_t in_tag, out_tag;
  fp16_t weights [N][K];
  fp16_t ih_word [N];
  logic [$clog2(N)-1:0] ih_offset;
  logic [$clog2(N):0] ncols;
  fp32_t out_vec [8][K];

  sharp_compute_unit #(.N(N), .K(K)) dut (.*);

  real M [64][COLS];   // 8 row groups x K rows
  real v [COLS];
  int  last_sent [16];
  int  tiles_seen = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int g;
    real s;
    tiles_seen++;
    g = 8 >> out_tag.cfg;
    checks++;
    if (cyc - last_sent[out_tag.rb[3:0]] != L + 2) begin
      failures++;
      $display("latency %0d", cyc - last_sent[out_tag.rb[3:0]]);
    end
    for (int q = 0; q < g; q++)
      for (int e = 0; e < K; e++) begin
        s = 0.0;
        for (int c = 0; c < COLS; c++) s += M[q * K + e][c] * v[c];
        checks++;
        if (fp32_to_real(out_vec[q][e]) != s) begin
          failures++;
          if (failures < 5) $display("cfg %0d q %0d e %0d: %f vs %f", out_tag.cfg, q, e, fp32_to_real(out_vec[q][e]), s);
        end
      end
  end

  initial begin
    int g, cpp, npass, col;
    in_valid = 0;
    in_tag = '0;
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < COLS; c++) M[r][c] = real'($urandom_range(0, 6)) - 3.0;
    for (int c = 0; c < COLS; c++) v[c] = real'($urandom_range(0, 6)) - 3.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      g = 8 >> (t % 4);
      cpp = N / g;
      npass = (COLS + cpp - 1) / cpp;
      for (int p = 0; p < npass; p++) begin
        @(negedge clk);
        in_valid = 1;
        in_tag = '{phase: PH_INPUT, step: 16'(t), rb: 16'(t), nvec: 4'(g), cfg: tile_cfg_e'(t % 4),
                   first: (p == 0), last: (p == npass - 1)};
        for (int u = 0; u < N; u++) begin
          col = p * cpp + (u % cpp);
          for (int e = 0; e < K; e++)
            weights[u][e] = real_to_fp16(col < COLS ? M[(u / cpp) * K + e][col] : 0.0);
        end
        // the I/H word holds elements (p*cpp/N)*N .. +N-1
        for (int i = 0; i < N; i++) begin
          col = ((p * cpp) / N) * N + i;
          ih_word[i] = real_to_fp16(col < COLS ? v[col] : 0.0);
        end
        ih_offset = ($clog2(N))'((p * cpp) % N);
        ncols = ($clog2(N)+1)'((COLS - p * cpp < cpp) ? COLS - p * cpp : cpp);
        if (p == npass - 1) last_sent[t] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (tiles_seen != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
