// tb_sharp_vector_multiply: checks the VS-unit scalar routing and the exact
// fp16 x fp16 -> fp32 products for all four tile configurations, random
// column offsets and padded (masked) columns, and the one-cycle latency.
`timescale 1ns/1ps
module tb_sharp_vector_multiply;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int N = 16, K = 4;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  tile_cfg_e cfg;
  fp16_t weights [N][K];
  fp16_t ih_word [N];
  logic [$clog2(N)-1:0] ih_offset;
  logic [$clog2(N):0] ncols;
  fp32_t prod [N][K];

  sharp_vector_multiply #(.N(N), .K(K)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cpp, m, col;
    real expv, s;
    in_valid = 0;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      cfg = tile_cfg_e'(it % 4);
      cpp = N / (8 >> (it % 4));
      for (int u = 0; u < N; u++) begin
        ih_word[u] = real_to_fp16((real'($urandom_range(0, 200)) - 100.0) / 16.0);
        for (int e = 0; e < K; e++)
          weights[u][e] = real_to_fp16((real'($urandom_range(0, 200)) - 100.0) / 32.0);
      end
      ih_offset = ($clog2(N))'(($urandom_range(0, N / cpp - 1)) * cpp);
      ncols = ($clog2(N)+1)'($urandom_range(0, cpp));
      in_valid = 1;
      @(posedge clk);
      #0.1;
      checks++;
      if (!out_valid) failures++;
      for (int u = 0; u < N; u++) begin
        m = u % cpp;
        col = int'(ih_offset) + m;
        s = (m < int'(ncols)) ? fp16_to_real(ih_word[col]) : 0.0;
        for (int e = 0; e < K; e++) begin
          expv = fp16_to_real(weights[u][e]) * s;
          checks++;
          if (fp32_to_real(prod[u][e]) != expv) begin
            failures++;
            if (failures < 5) $display("cfg %0d u %0d e %0d: %f vs %f", cfg, u, e, fp32_to_real(prod[u][e]), expv);
          end
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
