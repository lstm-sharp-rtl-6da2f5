// sharp_result_fifo: local FIFO between the tile engine and the activation
// stage.
//
// When a tile finishes, the accumulators release up to eight K-wide result
// vectors in one cycle; the stages behind consume one vector per cycle. This
// FIFO accepts 0..8 vectors per cycle (slots 0..push_n-1 of the push arrays)
// and delivers one per cycle at its head. The tile dispatcher keeps a credit
// count of the free entries, so pushes never exceed the space; an overflowing
// push is an error caught by an assertion.
//
// Timing: a pushed vector can be popped the next cycle; pop takes the head
// shown on out_vec/out_tag in the same cycle. Decoupling the stages with
// local FIFOs follows the accelerator's description; the multi-push width,
// depth and credit flow control are this design's choice.
module sharp_result_fifo
  import sharp_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [3:0]             push_n,
  input  fp32_t                  push_vec [8][K],
  input  vec_tag_t               push_tag [8],
  input  logic                   pop,
  output logic                   out_valid,
  output fp32_t                  out_vec [K],
  output vec_tag_t               out_tag,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  fp32_t          mem_vec [DEPTH][K];
  vec_tag_t       mem_tag [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  assign out_valid = (count != '0);
  assign out_vec   = mem_vec[rd_ptr];
  assign out_tag   = mem_tag[rd_ptr];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      if (i < int'(push_n)) begin
        mem_vec[wr_ptr + AW'(i)] <= push_vec[i];
        mem_tag[wr_ptr + AW'(i)] <= push_tag[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(push_n);
      if (pop && out_valid) rd_ptr <= rd_ptr + 1'b1;
      count <= count + ($clog2(DEPTH)+1)'(push_n) - ($clog2(DEPTH)+1)'(pop && out_valid);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(push_n) - int'(pop && out_valid) <= int'(DEPTH))
    else $error("result FIFO overflow");

endmodule
