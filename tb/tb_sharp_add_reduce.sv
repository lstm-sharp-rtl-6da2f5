// tb_sharp_add_reduce: streams random integer-valued vectors (exact in fp32)
// with a random configuration every cycle through the tree, and checks that
// each result leaves exactly log2(N) cycles later with the row-group sums of
// its own configuration in slots 0..G-1 and zeros above.
`timescale 1ns/1ps
module tb_sharp_add_reduce;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int N = 16, K = 2, L = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  tile_cfg_e in_cfg, out_cfg;
  logic [7:0] in_tag, out_tag;
  fp32_t in_vec [N][K];
  fp32_t out_vec [8][K];

  sharp_add_reduce #(.N(N), .K(K), .TAG_W(8)) dut (.*);

  real exp_arr [256][8][K];
  int  sent_at [256];
  int  exp_t [$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_tag) != exp_t.pop_front()) failures++;
    checks++;
    if (cyc - sent_at[out_tag] != L) begin
      failures++;
      $display("latency wrong");
    end
    for (int q = 0; q < 8; q++)
      for (int k = 0; k < K; k++) begin
        checks++;
        if (fp32_to_real(out_vec[q][k]) != exp_arr[out_tag][q][k]) begin
          failures++;
          if (failures < 5) $display("slot %0d lane %0d: %f vs %f", q, k, fp32_to_real(out_vec[q][k]), exp_arr[out_tag][q][k]);
        end
      end
  end

  initial begin
    real v [N][K];
    real e [8][K];
    int g;
    in_valid = 0;
    in_tag = 0;
    in_cfg = CFG1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_cfg = tile_cfg_e'($urandom_range(0, 3));
      in_tag = 8'(it);
      g = 8 >> in_cfg;
      for (int u = 0; u < N; u++)
        for (int k = 0; k < K; k++) begin
          v[u][k] = real'($urandom_range(0, 2000)) - 1000.0;
          in_vec[u][k] = real_to_fp32(v[u][k]);
        end
      for (int q = 0; q < 8; q++)
        for (int k = 0; k < K; k++) begin
          e[q][k] = 0.0;
          if (q < g)
            for (int u = q * (N / g); u < (q + 1) * (N / g); u++) e[q][k] += v[u][k];
        end
      if (in_valid) begin
        exp_arr[it % 256] = e;
        exp_t.push_back(it % 256);
        sent_at[it % 256] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
