// sharp_accumulators: the K-Accumulators behind R-Add-Reduce.
//
// Eight K-wide fp32 accumulators (8K accumulators), one per possible row
// group. A tile of G row groups uses slots 0..G-1. Each incoming partial-sum
// vector is added into its slot; on the first column pass of a tile the slot
// restarts from the incoming value, and on the last pass the completed sums
// are copied to the output register, so the accumulators are free for the
// next tile on the very next cycle (no bubble between tiles).
//
// Interface: in_valid/in_tag/in_vec from the adder tree; out_valid pulses for
// one cycle with out_tag and out_vec one cycle after the last pass arrives.
// Accumulation in fp32 follows the accelerator's description; the restart
// scheme and the output register are this design's choice.
module sharp_accumulators
  import sharp_pkg::*;
#(
  parameter int unsigned K = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  issue_tag_t in_tag,
  input  fp32_t      in_vec  [8][K],
  output logic       out_valid,
  output issue_tag_t out_tag,
  output fp32_t      out_vec [8][K]
);

  fp32_t acc [8][K];
  fp32_t nxt [8][K];

  always_comb
    for (int q = 0; q < 8; q++)
      for (int e = 0; e < int'(K); e++)
        nxt[q][e] = in_tag.first ? in_vec[q][e] : fp32_add(acc[q][e], in_vec[q][e]);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      acc <= nxt;
      if (in_tag.last) begin
        out_vec <= nxt;
        out_tag <= in_tag;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else out_valid <= in_valid && in_tag.last;

endmodule
