// sharp_weight_buffer: multi-banked weight SRAM.
//
// N banks, one per VS unit, each word holding the K fp16 weights that VS unit
// consumes in one cycle. The default depth gives 26 MB in total
// (N * DEPTH * K * 2 bytes = 32 * 13312 * 64 B). The tile engine reads the same
// address in all banks every cycle, so the weights of a layer must be laid out
// offline, interleaved over the banks in the order the chosen tile
// configuration consumes them. The memory controller writes one bank word per
// cycle.
//
// Timing: synchronous read, rd_data is valid the cycle after rd_en; a write
// and a read in the same cycle go to separate ports (1R1W per bank).
// Banking per VS unit follows the accelerator's description; the word layout
// and port structure are this design's choice.
module sharp_weight_buffer
  import sharp_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned K     = 32,
  parameter int unsigned DEPTH = 13312
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(N)-1:0]     wr_bank,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  fp16_t                    wr_data [K],
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp16_t                    rd_data [N][K]
);

  for (genvar b = 0; b < int'(N); b++) begin : g_bank
    logic [K*16-1:0] mem [DEPTH];
    logic [K*16-1:0] wword;

    always_comb
      for (int e = 0; e < int'(K); e++) wword[e*16 +: 16] = wr_data[e];

    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == b[$clog2(N)-1:0]) mem[wr_addr] <= wword;
      if (rd_en)
        for (int e = 0; e < int'(K); e++) rd_data[b][e] <= mem[rd_addr][e*16 +: 16];
    end
  end

endmodule
