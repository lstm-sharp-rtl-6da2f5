// sharp_cell_state: double-buffered cell-state scratchpad.
//
// Stores the fp32 cell state c_t. A word holds the K/4 cells of one K-row
// block of gates (each hidden unit has four gate rows). Step t reads c_(t-1)
// from half t mod 2 and writes c_t to the other half, so reads of the old
// state and writes of the new one never collide. Default size:
// 2 halves x 3072 words x 32 B = 192 KB.
//
// Timing: synchronous read (rd_data valid the cycle after rd_en), separate
// read and write ports. Size and double buffering follow the accelerator's
// configuration; the word organisation is this design's choice.
module sharp_cell_state
  import sharp_pkg::*;
#(
  parameter int unsigned CW    = 8,      // cells per word (K/4)
  parameter int unsigned DEPTH = 3072    // words per half
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_half,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  fp32_t                    wr_data [CW],
  input  logic                     rd_en,
  input  logic                     rd_half,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp32_t                    rd_data [CW]
);

  fp32_t mem [2][DEPTH][CW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_half][wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_half][rd_addr];
  end

endmodule
