// sharp_ih_buffer: the input/hidden (I/H) vector SRAM.
//
// Holds the input sequence x_0..x_(T-1) of a layer and the hidden vectors
// h_t it produces. A word holds N fp16 elements, one for each VS unit that
// can be fed in a cycle; a vector of length L occupies ceil(L/N) consecutive
// words. The default depth gives about 2.3 MB (37683 words of 64 B).
// The write port has one enable per element so the cell updater can store
// K/4 hidden elements and the memory controller K elements at a time.
//
// Timing: synchronous read (rd_data valid the cycle after rd_en); one read
// and one write port. Capacity follows the accelerator's configuration; word
// width and element-enable writes are this design's choice.
module sharp_ih_buffer
  import sharp_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 37683
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [N-1:0]             wr_mask,
  input  fp16_t                    wr_data [N],
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp16_t                    rd_data [N]
);

  // one memory column per element, so the element write mask is a plain
  // write enable of that column
  for (genvar e = 0; e < N; e++) begin : g_col
    fp16_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_mask[e]) mem[wr_addr] <= wr_data[e];
      if (rd_en) rd_data[e] <= mem[rd_addr];
    end
  end

endmodule
