// sharp_inter_buffer: double-buffered intermediate scratchpad.
//
// Holds the result of the input MVM (W * x_t) of a time step until the hidden
// MVM (U * h_(t-1)) of the same step completes and is merged with it. Two
// halves: step t uses half t mod 2, so the input MVM of step t+1 can be
// written while the hidden results of step t are still being read. A word is
// one K-row block of results; they are stored as fp16, so the default
// 2 x 192 words x 64 B = 24 KB holds 4H rows for a hidden size H up to 1536.
//
// Timing: synchronous read, rd_data valid one cycle after rd_en; independent
// read and write ports. The size and double buffering follow the
// accelerator's configuration; fp16 storage is this design's reading of that
// size.
module sharp_inter_buffer
  import sharp_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned DEPTH = 192     // words per half
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_half,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  fp32_t                    wr_data [K],
  input  logic                     rd_en,
  input  logic                     rd_half,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp32_t                    rd_data [K]
);

  fp16_t mem [2][DEPTH][K];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int e = 0; e < int'(K); e++) mem[wr_half][wr_addr][e] <= fp32_to_fp16(wr_data[e]);
    if (rd_en)
      for (int e = 0; e < int'(K); e++) rd_data[e] <= fp16_to_fp32(mem[rd_half][rd_addr][e]);
  end

endmodule
