// sharp_controller: pipeline controller and Unfolded scheduler.
//
// Runs one LSTM layer: T time steps, input length X, hidden size H. The
// weights are 4H gate rows (row 4j+g is gate g of hidden unit j, gates in the
// order i, f, g, o), cut into row blocks of K rows; nrb = ceil(4H/K).
// For every time step t it dispatches
//   1. the input phase  W * x_t      (all row tiles, result parked), then
//   2. the hidden phase U * h_(t-1)  (all row tiles, merged and activated),
// so the input MVM of step t+1 is issued right behind the hidden MVM of step
// t and keeps the multipliers busy while the cell updater finishes step t.
// The hidden phase of step t starts only after all nrb row blocks of step t-1
// have left the cell updater (h_(t-1) complete); that wait is the only data
// dependency stall. h_(-1) and c_(-1) are zero, so the hidden MVM of step 0
// runs with zero scalars.
//
// A tile covers G = 8 >> cfg row blocks and takes ceil(len / (N/G)) column
// passes, one per cycle. With padding reconfiguration enabled, the last tile
// of a phase shrinks to the smallest G' in {1,2,4,8} that still covers the
// remaining row blocks. Before a tile's last pass the controller checks that
// the result FIFO has room for the tile's result vectors (credits returned on
// every FIFO pop).
//
// Weight buffer addresses run linearly from wx_base (input phase) or wh_base
// (hidden phase), one address per issue; I/H words: x_t at x_base + t*ceil(X/N),
// h_(t-1) at h_base + t*ceil(H/N). The configuration comes from the
// reconfiguration table, looked up with the hidden size in the cycle after
// start. Timing: start pulse -> busy; done pulses once all results are
// written. The two-phase Unfolded order, the dependency handling and the
// padding reconfiguration follow the accelerator's description; addresses,
// credit flow control and the one-pass-per-cycle issue are this design's.
module sharp_controller
  import sharp_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned K          = 32,
  parameter int unsigned WAW        = 14,   // weight buffer address bits
  parameter int unsigned IAW        = 16,   // I/H buffer address bits
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // layer command
  input  logic                 start,
  input  logic [15:0]          x_len,
  input  logic [15:0]          h_len,
  input  logic [15:0]          steps,
  input  logic [WAW-1:0]       wx_base,
  input  logic [WAW-1:0]       wh_base,
  input  logic [IAW-1:0]       x_base,
  input  logic [IAW-1:0]       h_base,
  output logic                 busy,
  output logic                 done,
  // reconfiguration table lookup
  output logic                 lk_en,
  output logic [15:0]          lk_dim,
  input  tile_cfg_e            lk_cfg,
  input  logic                 lk_pad,
  // tile-engine issue
  output logic                 issue_valid,
  output issue_tag_t           issue_tag,
  output logic [WAW-1:0]       w_addr,
  output logic [IAW-1:0]       ih_addr,
  output logic [$clog2(N)-1:0] ih_offset,
  output logic [$clog2(N):0]   ncols,
  // feedback
  input  logic                 fifo_pop,     // one result-FIFO entry freed
  input  logic                 rb_done,      // one hidden row block written back
  input  logic                 tail_active,  // activation / cell update in flight
  // layer constants for the write-back
  output logic [15:0]          nrb,
  output tile_cfg_e            cur_cfg,
  output perf_t                perf
);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [15:0]    xl, hl, nsteps, wx_words, wh_words;
  logic [WAW-1:0] wxb, whb;
  logic [IAW-1:0] x_row, h_row;
  tile_cfg_e      cfg;
  logic           pad_en;

  logic [15:0]    t, rb, pass, col;
  phase_e         phase;
  logic [WAW-1:0] waddr;
  logic [31:0]    done_rb;
  logic [$clog2(FIFO_DEPTH)+1:0] credits;

  // --- current tile --------------------------------------------------------
  logic [15:0]  rem, len, cpp, npass, nvec16;
  tile_cfg_e    gcfg;
  logic         shrunk, last_pass, dep_ok, credit_ok, can_issue, last_tile;

  always_comb begin
    rem = nrb - rb;
    gcfg = cfg;
    if (pad_en)
      for (int c = 0; c < 4; c++)
        if (c >= int'(cfg) && rem <= 16'(8 >> c)) gcfg = tile_cfg_e'(c);
    shrunk = (gcfg != cfg);
    nvec16 = (rem < 16'(cfg_groups(gcfg))) ? rem : 16'(cfg_groups(gcfg));
    cpp = 16'(N / cfg_groups(gcfg));
    len = (phase == PH_INPUT) ? xl : hl;
    npass = (len + cpp - 16'd1) / cpp;
    if (npass == 16'd0) npass = 16'd1;
    last_pass = (pass == npass - 16'd1);
    last_tile = (rb + 16'(cfg_groups(gcfg)) >= nrb);
    dep_ok = (phase == PH_INPUT) || (done_rb >= 32'(t) * 32'(nrb));
    credit_ok = !last_pass || (credits >= ($clog2(FIFO_DEPTH)+2)'(nvec16));
    can_issue = (state == S_RUN) && dep_ok && credit_ok;
  end

  assign issue_valid = can_issue;
  assign issue_tag = '{phase: phase, step: t, rb: rb, nvec: nvec16[3:0], cfg: gcfg,
                       first: (pass == 16'd0), last: last_pass};
  assign w_addr    = waddr;
  assign ih_addr   = ((phase == PH_INPUT) ? x_row : h_row) + IAW'(col / 16'(N));
  assign ih_offset = ($clog2(N))'(col % 16'(N));
  always_comb begin
    if (phase == PH_HIDDEN && t == 16'd0) ncols = '0;
    else if (len - col < cpp) ncols = ($clog2(N)+1)'(len - col);
    else ncols = ($clog2(N)+1)'(cpp);
  end

  assign busy    = (state != S_IDLE);
  assign lk_en   = start && state == S_IDLE;
  assign lk_dim  = h_len;
  assign cur_cfg = cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      {xl, hl, nsteps, wx_words, wh_words, nrb} <= '0;
      {wxb, whb, x_row, h_row, waddr} <= '0;
      cfg <= CFG1;
      pad_en <= 1'b0;
      {t, rb, pass, col} <= '0;
      phase <= PH_INPUT;
      done_rb <= '0;
      credits <= ($clog2(FIFO_DEPTH)+2)'(FIFO_DEPTH);
      perf <= '0;
    end else begin
      done <= 1'b0;
      credits <= credits + ($clog2(FIFO_DEPTH)+2)'(fifo_pop)
                 - ((can_issue && last_pass) ? ($clog2(FIFO_DEPTH)+2)'(nvec16) : '0);
      if (rb_done) done_rb <= done_rb + 1;
      if (busy) perf.busy_cycles <= perf.busy_cycles + 1;
      unique case (state)
        S_IDLE: if (start) begin
          xl <= x_len;
          hl <= h_len;
          nsteps <= steps;
          wx_words <= (x_len + 16'(N) - 16'd1) / 16'(N);
          wh_words <= (h_len + 16'(N) - 16'd1) / 16'(N);
          nrb <= 16'((32'(h_len) * 4 + K - 1) / K);
          wxb <= wx_base;
          whb <= wh_base;
          waddr <= wx_base;
          x_row <= x_base;
          h_row <= h_base;
          {t, rb, pass, col} <= '0;
          phase <= PH_INPUT;
          done_rb <= '0;
          perf <= '0;
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin
          cfg <= lk_cfg;
          pad_en <= lk_pad;
          state <= S_RUN;
        end
        S_RUN: begin
          if (!dep_ok) perf.stall_dep <= perf.stall_dep + 1;
          else if (!credit_ok) perf.stall_credit <= perf.stall_credit + 1;
          if (can_issue) begin
            perf.issues <= perf.issues + 1;
            if (phase == PH_INPUT && tail_active) perf.overlap <= perf.overlap + 1;
            waddr <= waddr + 1'b1;
            if (!last_pass) begin
              pass <= pass + 1'b1;
              col <= col + cpp;
            end else begin
              pass <= '0;
              col <= '0;
              if (shrunk) perf.pad_tiles <= perf.pad_tiles + 1;
              unique case (gcfg)
                CFG1: perf.tiles_cfg1 <= perf.tiles_cfg1 + 1;
                CFG2: perf.tiles_cfg2 <= perf.tiles_cfg2 + 1;
                CFG3: perf.tiles_cfg3 <= perf.tiles_cfg3 + 1;
                CFG4: perf.tiles_cfg4 <= perf.tiles_cfg4 + 1;
              endcase
              if (!last_tile) begin
                rb <= rb + 16'(cfg_groups(gcfg));
              end else begin
                rb <= '0;
                if (phase == PH_INPUT) begin
                  phase <= PH_HIDDEN;
                  waddr <= whb;
                end else begin
                  phase <= PH_INPUT;
                  waddr <= wxb;
                  t <= t + 1'b1;
                  x_row <= x_row + IAW'(wx_words);
                  h_row <= h_row + IAW'(wh_words);
                  if (t + 16'd1 == nsteps) state <= S_DRAIN;
                end
              end
            end
          end
        end
        S_DRAIN: if (done_rb == 32'(nsteps) * 32'(nrb)) begin
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
