// tb_sharp_accumulators: checks the 8 x K fp32 accumulators. Random tiles of
// 1..5 column passes are streamed back to back, with random idle cycles;
// inputs are small integers so every fp32 sum is exact. On the last pass the
// tile's sums must appear exactly one cycle later with the tile's tag, and
// out_valid must pulse once per tile and never otherwise.
`timescale 1ns/1ps
module tb_sharp_accumulators;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  issue_tag_t in_tag, out_tag;
  fp32_t in_vec [8][K];
  fp32_t out_vec [8][K];

  sharp_accumulators #(.K(K)) dut (.*);

  real sum [8][K];
  real exp_sum [8][K];
  bit  expect_out;
  logic [15:0] exp_rb;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: compares one cycle after the last pass was driven
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != expect_out) begin
      failures++;
      if (failures < 10) $display("out_valid %0d expected %0d", out_valid, expect_out);
    end else if (expect_out) begin
      if (out_tag.rb != exp_rb) failures++;
      for (int q = 0; q < 8; q++)
        for (int e = 0; e < K; e++) begin
          checks++;
          if (fp32_to_real(out_vec[q][e]) != exp_sum[q][e]) begin
            failures++;
            if (failures < 10) $display("tile %0d slot %0d lane %0d: got %f expected %f",
                                        exp_rb, q, e, fp32_to_real(out_vec[q][e]), exp_sum[q][e]);
          end
        end
    end
  end

  initial begin
    int np;
    real v;
    in_valid = 0; in_tag = '0; expect_out = 0; exp_rb = 0;
    for (int q = 0; q < 8; q++) for (int e = 0; e < K; e++) in_vec[q][e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tile = 0; tile < 300; tile++) begin
      np = $urandom_range(1, 5);
      for (int p = 0; p < np; p++) begin
        // a random idle cycle between passes
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #0.1;
          in_valid = 0; expect_out = 0;
          @(negedge clk);
        end
        @(posedge clk); #0.1;
        // the output of a tile finished on the previous pass is due now
        in_valid = 1;
        in_tag = '0;
        in_tag.rb = 16'(tile);
        in_tag.first = (p == 0);
        in_tag.last = (p == np - 1);
        for (int q = 0; q < 8; q++)
          for (int e = 0; e < K; e++) begin
            v = real'($urandom_range(0, 200)) - 100.0;
            in_vec[q][e] = real_to_fp32(v);
            sum[q][e] = (p == 0) ? v : sum[q][e] + v;
          end
        @(negedge clk);
      end
      // after the edge that takes the last pass, the sums are expected
      @(posedge clk); #0.1;
      in_valid = 0;
      expect_out = 1; exp_rb = 16'(tile);
      for (int q = 0; q < 8; q++) for (int e = 0; e < K; e++) exp_sum[q][e] = sum[q][e];
      @(negedge clk);
      @(posedge clk); #0.1;
      expect_out = 0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
