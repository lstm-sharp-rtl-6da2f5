// tb_sharp_weight_buffer: checks the banked weight buffer. Random single-bank
// writes (one DMA beat of K values) and shared-address reads of all N banks
// against a reference array; read data must appear one cycle after rd_en and
// hold while rd_en is low, and a write must change only its own bank.
`timescale 1ns/1ps
module tb_sharp_weight_buffer;
  import sharp_pkg::*;
  localparam int N = 4, K = 4, D = 16;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en;
  logic [$clog2(N)-1:0] wr_bank;
  logic [$clog2(D)-1:0] wr_addr, rd_addr;
  fp16_t wr_data [K];
  fp16_t rd_data [N][K];

  sharp_weight_buffer #(.N(N), .K(K), .DEPTH(D)) dut (.*);

  fp16_t ref_m [N][D][K];
  fp16_t exp_d [N][K];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit have;
    wr_en = 0; rd_en = 0; wr_bank = 0; wr_addr = 0; rd_addr = 0;
    for (int e = 0; e < K; e++) wr_data[e] = '0;
    for (int b = 0; b < N; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = ($clog2(N))'(b); wr_addr = ($clog2(D))'(a);
        for (int e = 0; e < K; e++) begin
          wr_data[e] = 16'($urandom);
          ref_m[b][a][e] = wr_data[e];
        end
      end
    @(negedge clk);
    wr_en = 0;
    have = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (have)
        for (int b = 0; b < N; b++)
          for (int e = 0; e < K; e++) begin
            checks++;
            if (rd_data[b][e] != exp_d[b][e]) begin
              failures++;
              if (failures < 10) $display("it %0d bank %0d lane %0d: got %h expected %h", it, b, e, rd_data[b][e], exp_d[b][e]);
            end
          end
      rd_en = 1'($urandom_range(0, 1));
      rd_addr = ($clog2(D))'($urandom_range(0, D - 1));
      if (rd_en) begin
        for (int b = 0; b < N; b++) for (int e = 0; e < K; e++) exp_d[b][e] = ref_m[b][rd_addr][e];
        have = 1;
      end
      wr_en = 1'($urandom_range(0, 1));
      wr_bank = ($clog2(N))'($urandom_range(0, N - 1));
      wr_addr = ($clog2(D))'($urandom_range(0, D - 1));
      for (int e = 0; e < K; e++) wr_data[e] = 16'($urandom);
      if (wr_en)
        for (int e = 0; e < K; e++) ref_m[wr_bank][wr_addr][e] = wr_data[e];
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
