// tb_sharp_config_table: checks the per-layer configuration lookup table.
// Writes random entries (dimension, configuration, padding flag) into random
// slots, keeps a reference copy, and looks up both stored and absent
// dimensions. A hit must return the stored configuration and flag one cycle
// after lk_en; a miss must return the default (CFG2, padding on). Overwriting
// a slot must drop its old dimension. Reset must clear the table.
`timescale 1ns/1ps
module tb_sharp_config_table;
  import sharp_pkg::*;
  localparam int E = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, wr_pad, lk_en, lk_hit, lk_pad;
  logic [$clog2(E)-1:0] wr_idx;
  logic [15:0] wr_dim, lk_dim;
  tile_cfg_e wr_cfg, lk_cfg;

  sharp_config_table #(.ENTRIES(E)) dut (.*);

  // reference model
  bit          r_valid [E];
  logic [15:0] r_dim [E];
  tile_cfg_e   r_cfg [E];
  bit          r_pad [E];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input logic [15:0] dim);
    bit hit; tile_cfg_e c; bit p;
    hit = 0; c = CFG2; p = 1;
    for (int i = E - 1; i >= 0; i--)
      if (r_valid[i] && r_dim[i] == dim) begin
        hit = 1; c = r_cfg[i]; p = r_pad[i];
      end
    @(negedge clk);
    lk_en = 1; lk_dim = dim;
    @(negedge clk);
    lk_en = 0;
    checks++;
    if (lk_hit !== hit || lk_cfg !== c || lk_pad !== p) begin
      failures++;
      if (failures < 10)
        $display("dim %0d: got hit %0d cfg %0d pad %0d, expected %0d %0d %0d",
                 dim, lk_hit, lk_cfg, lk_pad, hit, c, p);
    end
  endtask

  initial begin
    wr_en = 0; lk_en = 0; wr_idx = 0; wr_dim = 0; wr_cfg = CFG1; wr_pad = 0; lk_dim = 0;
    for (int i = 0; i < E; i++) r_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty table: every lookup misses
    for (int i = 0; i < 8; i++) lookup(16'($urandom_range(1, 64)));
    for (int it = 0; it < 400; it++) begin
      if ($urandom_range(0, 1) == 0) begin
        @(negedge clk);
        wr_en = 1;
        wr_idx = ($clog2(E))'($urandom_range(0, E - 1));
        wr_dim = 16'($urandom_range(1, 64));
        wr_cfg = tile_cfg_e'($urandom_range(0, 3));
        wr_pad = 1'($urandom_range(0, 1));
        r_valid[wr_idx] = 1; r_dim[wr_idx] = wr_dim; r_cfg[wr_idx] = wr_cfg; r_pad[wr_idx] = wr_pad;
        @(negedge clk);
        wr_en = 0;
      end
      lookup(16'($urandom_range(1, 64)));
    end
    // reset clears everything
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < E; i++) r_valid[i] = 0;
    for (int i = 0; i < 8; i++) lookup(16'($urandom_range(1, 64)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
