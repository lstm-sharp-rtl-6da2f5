// sharp_config_table: reconfiguration table.
//
// A small on-chip table, loaded by the host ahead of time, that maps an LSTM
// hidden dimension to the tile configuration found best for it offline, plus
// a flag enabling padding reconfiguration of the last row tile. Before a
// layer starts the controller looks its hidden size up; all entries are
// compared at once and the matching entry (the lowest index if several match)
// is returned. On a miss the table returns hit = 0 and the default
// configuration DEF_CFG with padding reconfiguration enabled.
//
// Timing: write in one cycle; lookup result registered, valid the cycle after
// lk_en. The table and its per-dimension contents follow the accelerator's
// description; entry count, matching rule and miss behaviour are this
// design's choice.
module sharp_config_table
  import sharp_pkg::*;
#(
  parameter int unsigned    ENTRIES = 16,
  parameter tile_cfg_e      DEF_CFG = CFG2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [15:0]                wr_dim,
  input  tile_cfg_e                  wr_cfg,
  input  logic                       wr_pad,
  input  logic                       lk_en,
  input  logic [15:0]                lk_dim,
  output logic                       lk_hit,
  output tile_cfg_e                  lk_cfg,
  output logic                       lk_pad
);

  typedef struct packed {
    logic        valid;
    logic [15:0] dim;
    tile_cfg_e   cfg;
    logic        pad;
  } entry_t;

  entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) tbl[i] <= '0;
      lk_hit <= 1'b0;
      lk_cfg <= DEF_CFG;
      lk_pad <= 1'b1;
    end else begin
      if (wr_en) tbl[wr_idx] <= '{valid: 1'b1, dim: wr_dim, cfg: wr_cfg, pad: wr_pad};
      if (lk_en) begin
        lk_hit <= 1'b0;
        lk_cfg <= DEF_CFG;
        lk_pad <= 1'b1;
        for (int i = int'(ENTRIES) - 1; i >= 0; i--)
          if (tbl[i].valid && tbl[i].dim == lk_dim) begin
            lk_hit <= 1'b1;
            lk_cfg <= tbl[i].cfg;
            lk_pad <= tbl[i].pad;
          end
      end
    end
  end

endmodule
