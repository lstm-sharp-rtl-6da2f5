// tb_sharp_cell_state: checks the double-buffered fp32 cell-state memory.
// Random writes and reads over both halves against a reference array; read
// data must appear one cycle after rd_en and hold while rd_en is low, and a
// write to one half must never disturb the other.
`timescale 1ns/1ps
module tb_sharp_cell_state;
  import sharp_pkg::*;
  localparam int CW = 4, D = 16;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, wr_half, rd_en, rd_half;
  logic [$clog2(D)-1:0] wr_addr, rd_addr;
  fp32_t wr_data [CW], rd_data [CW];

  sharp_cell_state #(.CW(CW), .DEPTH(D)) dut (.*);

  fp32_t ref_m [2][D][CW];
  fp32_t exp_d [CW];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit have;
    wr_en = 0; rd_en = 0; wr_half = 0; rd_half = 0; wr_addr = 0; rd_addr = 0;
    for (int e = 0; e < CW; e++) wr_data[e] = '0;
    // fill every word so that nothing read is uninitialised
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 1; wr_half = 1'(h); wr_addr = ($clog2(D))'(a);
        for (int e = 0; e < CW; e++) begin
          wr_data[e] = $urandom;
          ref_m[h][a][e] = wr_data[e];
        end
      end
    @(negedge clk);
    wr_en = 0;
    have = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (have) begin
        for (int e = 0; e < CW; e++) begin
          checks++;
          if (rd_data[e] != exp_d[e]) begin
            failures++;
            if (failures < 10) $display("it %0d lane %0d: got %h expected %h", it, e, rd_data[e], exp_d[e]);
          end
        end
      end
      rd_en = 1'($urandom_range(0, 1));
      rd_half = 1'($urandom_range(0, 1));
      rd_addr = ($clog2(D))'($urandom_range(0, D - 1));
      if (rd_en) begin
        for (int e = 0; e < CW; e++) exp_d[e] = ref_m[rd_half][rd_addr][e];
        have = 1;
      end
      wr_en = 1'($urandom_range(0, 1));
      wr_half = 1'($urandom_range(0, 1));
      wr_addr = ($clog2(D))'($urandom_range(0, D - 1));
      for (int e = 0; e < CW; e++) wr_data[e] = $urandom;
      if (wr_en)
        for (int e = 0; e < CW; e++) ref_m[wr_half][wr_addr][e] = wr_data[e];
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
