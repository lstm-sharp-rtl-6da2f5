// sharp_amfu: Activation Multi-Functional Unit (A-MFU).
//
// LANES independent pipelines, each computing sigmoid or tanh of an fp32
// value, selected per lane by in_tanh. The pipeline is built from the
// floating-point operators of the MFU:
//   S1 fp-shift  z = -x (sigmoid) or z = 2x (tanh)
//   S2 fp-exp    e = exp(z)
//   S3 fp-add    d = e + 1
//   S4 fp-div    r = 1/d (sigmoid) or r = 2/d (tanh)
//   S5 fp-add    y = r (sigmoid) or y = 1 - r (tanh), rounded to fp16
// so sigmoid(x) = 1/(1+e^-x) and tanh(x) = 1 - 2/(1+e^2x).
// Timing: fully pipelined, one result per lane per cycle, latency 5 cycles;
// in_tag (TAG_W bits of caller sideband) comes out with the result.
// The operator set and the exp -> add -> reciprocal sequence for sigmoid
// follow the accelerator's description; the tanh identity, the closing
// fp-add stage and the fp16 output rounding are this design's choices.
module sharp_amfu
  import sharp_pkg::*;
#(
  parameter int unsigned LANES = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            in_x    [LANES],
  input  logic [LANES-1:0] in_tanh,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp16_t            out_y   [LANES],
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned LAT = 5;

  logic [LAT-1:0]   vld;
  logic [TAG_W-1:0] tag  [LAT];
  logic [LANES-1:0] mode [LAT-1];
  fp32_t s1 [LANES], s2 [LANES], s3 [LANES], s4 [LANES];

  always_ff @(posedge clk) begin
    tag[0]  <= in_tag;
    mode[0] <= in_tanh;
    for (int i = 1; i < int'(LAT); i++) tag[i] <= tag[i-1];
    for (int i = 1; i < int'(LAT) - 1; i++) mode[i] <= mode[i-1];
    for (int l = 0; l < int'(LANES); l++) begin
      s1[l] <= in_tanh[l] ? fp32_scale2(in_x[l], 1) : {~in_x[l][31], in_x[l][30:0]};
      s2[l] <= fp32_exp(s1[l]);
      s3[l] <= fp32_add(s2[l], FP32_ONE);
      s4[l] <= mode[2][l] ? fp32_scale2(fp32_recip(s3[l]), 1) : fp32_recip(s3[l]);
      out_y[l] <= fp32_to_fp16(mode[3][l] ? fp32_add(FP32_ONE, {~s4[l][31], s4[l][30:0]}) : s4[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else vld <= {vld[LAT-2:0], in_valid};

  assign out_valid = vld[LAT-1];
  assign out_tag   = tag[LAT-1];

endmodule
