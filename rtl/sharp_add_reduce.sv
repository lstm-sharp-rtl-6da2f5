// sharp_add_reduce: Reconfigurable Add-Reduce (R-Add-Reduce).
//
// A binary tree of K-adders (K fp32 adders side by side) sums the N K-vectors
// coming out of the VS units. Every tree level is registered, so a new set of
// N vectors enters each cycle. The four last levels (log2(N)-3 .. log2(N))
// hold 8, 4, 2 and 1 partial-sum vectors: node q of level log2(N)-log2(G) is
// the sum of row group q when the tile uses G row groups. Four multiplexers,
// one per last level, route the tap that matches each vector's configuration
// into an 8-slot output that then rides the remaining levels as a plain
// delay, so the latency is log2(N) cycles for every configuration and tiles of
// different configurations can follow each other back to back.
//
// Interface: in_valid/in_tag/in_vec enter; out_valid/out_tag/out_vec leave
// log2(N) cycles later; slots 0..G-1 of out_vec are valid. TAG_W carries the
// caller's sideband. The tree and the four tap multiplexers follow the
// accelerator's description; the constant-latency delay of the early taps is
// this design's choice. Requires N to be a power of two, N >= 8.
module sharp_add_reduce
  import sharp_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned K     = 32,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  tile_cfg_e        in_cfg,
  input  logic [TAG_W-1:0] in_tag,
  input  fp32_t            in_vec [N][K],
  output logic             out_valid,
  output tile_cfg_e        out_cfg,
  output logic [TAG_W-1:0] out_tag,
  output fp32_t            out_vec [8][K]
);
  localparam int unsigned L = $clog2(N);

  // Level l (1..L) registers: the N >> l tree nodes (slots above that stay
  // zero), the tap path and the sideband of the vectors at that level.
  fp32_t            lvl  [1:L][N][K];
  fp32_t            tap  [1:L][8][K];
  logic             vld  [1:L];
  tile_cfg_e        cfgp [1:L];
  logic [TAG_W-1:0] tagp [1:L];

  for (genvar l = 1; l <= L; l++) begin : g_level
    localparam int unsigned NODES = N >> l;
    fp32_t            prv     [N][K];
    fp32_t            prv_tap [8][K];
    logic             prv_vld;
    tile_cfg_e        prv_cfg;
    logic [TAG_W-1:0] prv_tag;

    if (l == 1) begin : g_first
      assign prv     = in_vec;
      assign prv_tap = '{default: FP32_ZERO};
      assign prv_vld = in_valid;
      assign prv_cfg = in_cfg;
      assign prv_tag = in_tag;
    end else begin : g_next
      assign prv     = lvl[l-1];
      assign prv_tap = tap[l-1];
      assign prv_vld = vld[l-1];
      assign prv_cfg = cfgp[l-1];
      assign prv_tag = tagp[l-1];
    end

    always_ff @(posedge clk) begin
      for (int i = 0; i < int'(N); i++)
        for (int e = 0; e < int'(K); e++)
          lvl[l][i][e] <= (i < int'(NODES)) ? fp32_add(prv[2*i][e], prv[2*i+1][e]) : FP32_ZERO;
      cfgp[l] <= prv_cfg;
      tagp[l] <= prv_tag;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[l] <= 1'b0;
      else vld[l] <= prv_vld;

    // Reconfiguration multiplexer of this level (one of the four last ones):
    // take this level's nodes if they are the tile's row groups, else pass the
    // earlier tap along. Below the last four levels no tap exists yet.
    if (l + 3 >= L) begin : g_mux
      always_ff @(posedge clk) begin
        for (int q = 0; q < 8; q++)
          for (int e = 0; e < int'(K); e++)
            if (cfg_groups(prv_cfg) == NODES)
              tap[l][q][e] <= (q < int'(NODES)) ? fp32_add(prv[2*q][e], prv[2*q+1][e]) : FP32_ZERO;
            else
              tap[l][q][e] <= prv_tap[q][e];
      end
    end else begin : g_nomux
      assign tap[l] = '{default: FP32_ZERO};
    end
  end

  assign out_valid = vld[L];
  assign out_cfg   = cfgp[L];
  assign out_tag   = tagp[L];
  assign out_vec   = tap[L];

endmodule
