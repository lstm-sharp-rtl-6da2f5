// sharp_partial_acc: the ACC stage of the Unfolded schedule.
//
// Takes one K-row result vector per cycle from the result FIFO.
//  - Input phase (W * x_t): the vector is parked in the intermediate buffer,
//    half t mod 2, word = row block.
//  - Hidden phase (U * h_(t-1)): the parked input result of the same row block
//    is read back and added lane by lane (K fp32 adders); the sum, the full
//    gate pre-activation, goes on to the activation MFU. At the same time the
//    cell-state read for the K/4 cells of that row block is issued.
// When a hidden vector directly follows the input vector of the same row
// block (a phase of a single row tile), its read of the intermediate buffer
// happens in the cycle the input vector is written; the written value
// (rounded to the buffer's fp16 storage) is then forwarded instead, and
// bypass pulses.
// Timing: pop at P0 (intermediate read issued), P1 (read data back, write or
// add), out_valid at P2, i.e. two cycles after the pop. cs_rd_* is issued at
// P1, so the cell state is on the cell-state buffer output together with
// out_valid. Splitting input and hidden MVMs through a double-buffered
// intermediate buffer follows the accelerator's description; the stage
// timing is this design's choice.
module sharp_partial_acc
  import sharp_pkg::*;
#(
  parameter int unsigned K        = 32,
  parameter int unsigned IB_DEPTH = 192,
  parameter int unsigned CS_DEPTH = 3072
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // result FIFO head
  input  logic                        in_valid,
  input  fp32_t                       in_vec [K],
  input  vec_tag_t                    in_tag,
  output logic                        pop,
  // intermediate buffer
  output logic                        ib_wr_en,
  output logic                        ib_wr_half,
  output logic [$clog2(IB_DEPTH)-1:0] ib_wr_addr,
  output fp32_t                       ib_wr_data [K],
  output logic                        ib_rd_en,
  output logic                        ib_rd_half,
  output logic [$clog2(IB_DEPTH)-1:0] ib_rd_addr,
  input  fp32_t                       ib_rd_data [K],
  // cell-state read request
  output logic                        cs_rd_en,
  output logic                        cs_rd_half,
  output logic [$clog2(CS_DEPTH)-1:0] cs_rd_addr,
  // merged gate pre-activations
  output logic                        out_valid,
  output fp32_t                       out_vec [K],
  output vec_tag_t                    out_tag,
  output logic                        bypass
);

  logic     p1_valid;
  fp32_t    p1_vec [K];
  vec_tag_t p1_tag;

  assign pop        = in_valid;
  assign ib_rd_en   = in_valid && in_tag.phase == PH_HIDDEN;
  assign ib_rd_half = in_tag.step[0];
  assign ib_rd_addr = ($clog2(IB_DEPTH))'(in_tag.rb);

  assign ib_wr_en   = p1_valid && p1_tag.phase == PH_INPUT;
  assign ib_wr_half = p1_tag.step[0];
  assign ib_wr_addr = ($clog2(IB_DEPTH))'(p1_tag.rb);
  assign ib_wr_data = p1_vec;

  assign cs_rd_en   = p1_valid && p1_tag.phase == PH_HIDDEN;
  assign cs_rd_half = p1_tag.step[0];
  assign cs_rd_addr = ($clog2(CS_DEPTH))'(p1_tag.rb);

  // read-after-write forwarding around the intermediate buffer
  logic  fwd_hit, fwd_q;
  fp32_t fwd_data [K];
  fp32_t addend [K];
  assign fwd_hit = ib_rd_en && ib_wr_en && ib_wr_half == ib_rd_half && ib_wr_addr == ib_rd_addr;
  always_comb
    for (int e = 0; e < int'(K); e++) addend[e] = fwd_q ? fwd_data[e] : ib_rd_data[e];
  assign bypass = fwd_q && p1_valid;

  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(K); e++) fwd_data[e] <= fp16_to_fp32(fp32_to_fp16(p1_vec[e]));
    p1_vec <= in_vec;
    p1_tag <= in_tag;
    out_tag <= p1_tag;
    for (int e = 0; e < int'(K); e++) out_vec[e] <= fp32_add(p1_vec[e], addend[e]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_q     <= 1'b0;
      p1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      fwd_q     <= fwd_hit;
      p1_valid  <= in_valid;
      out_valid <= p1_valid && p1_tag.phase == PH_HIDDEN;
    end
  end

endmodule
