// tb_sharp_ih_buffer: checks the I/H buffer. Random element-masked writes and
// whole-word reads against a reference array; only masked-in elements may
// change, and read data must appear one cycle after rd_en and hold while
// rd_en is low.
`timescale 1ns/1ps
module tb_sharp_ih_buffer;
  import sharp_pkg::*;
  localparam int N = 8, D = 16;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en;
  logic [$clog2(D)-1:0] wr_addr, rd_addr;
  logic [N-1:0] wr_mask;
  fp16_t wr_data [N], rd_data [N];

  sharp_ih_buffer #(.N(N), .DEPTH(D)) dut (.*);

  fp16_t ref_m [D][N];
  fp16_t exp_d [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit have;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_mask = '0;
    for (int e = 0; e < N; e++) wr_data[e] = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = ($clog2(D))'(a); wr_mask = '1;
      for (int e = 0; e < N; e++) begin
        wr_data[e] = 16'($urandom);
        ref_m[a][e] = wr_data[e];
      end
    end
    @(negedge clk);
    wr_en = 0;
    have = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (have)
        for (int e = 0; e < N; e++) begin
          checks++;
          if (rd_data[e] != exp_d[e]) begin
            failures++;
            if (failures < 10) $display("it %0d elem %0d: got %h expected %h", it, e, rd_data[e], exp_d[e]);
          end
        end
      rd_en = 1'($urandom_range(0, 1));
      rd_addr = ($clog2(D))'($urandom_range(0, D - 1));
      if (rd_en) begin
        for (int e = 0; e < N; e++) exp_d[e] = ref_m[rd_addr][e];
        have = 1;
      end
      wr_en = 1'($urandom_range(0, 1));
      wr_addr = ($clog2(D))'($urandom_range(0, D - 1));
      wr_mask = N'($urandom);
      for (int e = 0; e < N; e++) wr_data[e] = 16'($urandom);
      if (wr_en)
        for (int e = 0; e < N; e++) if (wr_mask[e]) ref_m[wr_addr][e] = wr_data[e];
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
