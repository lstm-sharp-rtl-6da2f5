// sharp_cell_updater: Cell Updater stage.
//
// Receives one K-wide vector of activated gates per cycle: K/4 hidden units,
// each with its four gates in the order i, f, g, o (element 4j+g), plus the
// K/4 previous cell states c_(t-1) (fp32). Computes per unit
//   c_t = f * c_(t-1) + i * g        (fp16 multipliers, fp32 adder)
//   h_t = o * tanh(c_t)              (own A-MFU, fp16 multiplier)
// c_(t-1) is rounded to fp16 before the multiply because the point-wise
// multipliers are fp16; c_t stays fp32 and h_t is rounded to fp16.
// Timing: fully pipelined, K/4 hidden outputs per cycle, latency 8 cycles
// (multiply, add, 5-cycle A-MFU, multiply); in_tag comes out with the result.
// The operator set (fp16 multipliers, fp32 adder, an A-MFU) and the K/4 rate
// follow the accelerator's description; stage order and rounding points are
// this design's choice.
module sharp_cell_updater
  import sharp_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp16_t            in_gates [K],
  input  fp32_t            in_c     [K/4],
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            out_c    [K/4],
  output fp16_t            out_h    [K/4],
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned U = K / 4;

  // S1: products
  logic             v1;
  logic [TAG_W-1:0] t1;
  fp32_t            fc [U], ig [U];
  fp16_t            o1 [U];
  always_ff @(posedge clk) begin
    t1 <= in_tag;
    for (int j = 0; j < int'(U); j++) begin
      fc[j] <= fp16_mul(in_gates[4*j+1], fp32_to_fp16(in_c[j]));
      ig[j] <= fp16_mul(in_gates[4*j+0], in_gates[4*j+2]);
      o1[j] <= in_gates[4*j+3];
    end
  end

  // S2: new cell state
  logic             v2;
  logic [TAG_W-1:0] t2;
  fp32_t            c2 [U];
  fp16_t            o2 [U];
  always_ff @(posedge clk) begin
    t2 <= t1;
    for (int j = 0; j < int'(U); j++) begin
      o2[j] <= o1[j];
      c2[j] <= fp32_add(fc[j], ig[j]);
    end
  end

  // S3..S7: tanh(c_t), with c_t and o carried alongside
  localparam int unsigned ALAT = 5;
  logic             va;
  logic [TAG_W-1:0] ta;
  fp16_t            tc [U];
  fp32_t            cd [ALAT][U];
  fp16_t            od [ALAT][U];

  sharp_amfu #(.LANES(U), .TAG_W(TAG_W)) u_tanh (
    .clk, .rst_n, .in_valid(v2), .in_x(c2), .in_tanh({U{1'b1}}), .in_tag(t2),
    .out_valid(va), .out_y(tc), .out_tag(ta)
  );

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(U); j++) begin
      cd[0][j] <= c2[j];
      od[0][j] <= o2[j];
      for (int i = 1; i < int'(ALAT); i++) begin
        cd[i][j] <= cd[i-1][j];
        od[i][j] <= od[i-1][j];
      end
    end
  end

  // S8: hidden output
  always_ff @(posedge clk) begin
    out_tag <= ta;
    for (int j = 0; j < int'(U); j++) begin
      out_c[j] <= cd[ALAT-1][j];
      out_h[j] <= fp32_to_fp16(fp16_mul(od[ALAT-1][j], tc[j]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= va;
    end

endmodule
