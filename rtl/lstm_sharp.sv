// lstm_sharp: top level of the LSTM inference accelerator.
//
// A three-stage pipeline evaluates one LSTM layer at a time:
//   compute unit  -> resizable MVM tile engine (N VS units of K fp16
//                    multipliers, reconfigurable adder tree, 8K accumulators)
//   A-MFU         -> sigmoid / tanh of every gate pre-activation
//   cell updater  -> c_t = f*c_(t-1) + i*g, h_t = o*tanh(c_t)
// fed by a multi-banked weight buffer and an input/hidden (I/H) buffer, with a
// result FIFO, a double-buffered intermediate buffer and a double-buffered
// cell-state buffer between the stages. The pipeline controller issues the
// Unfolded schedule (input MVM of step t, hidden MVM of step t, input MVM of
// step t+1, ...) and picks the tile configuration of the layer from the
// reconfiguration table. The memory controller fills the buffers from main
// memory, which sits outside this block.
//
// Data path of a result vector (K gate rows of one row block):
//   issue -> buffers (1) -> multiply (1) -> tree (log2 N) -> accumulators (1)
//   -> result FIFO -> ACC merge (2) -> A-MFU (5) -> cell updater (8)
//   -> h_t into the I/H buffer at h_base + (t+1)*ceil(H/N), c_t into the
//      cell-state buffer.
// Host use: load weights and inputs with DMA commands, optionally write the
// reconfiguration table, pulse start with the layer description, wait for
// done, read h_t through the host read port (valid while not busy, data one
// cycle after host_rd_en). The top-level structure follows the accelerator's
// description; the host interface is this design's choice.
module lstm_sharp
  import sharp_pkg::*;
#(
  parameter int unsigned N          = 32,     // VS units (1K MACs with K = 32)
  parameter int unsigned K          = 32,     // multipliers per VS unit
  parameter int unsigned WDEPTH     = 13312,  // words per weight bank (26 MB)
  parameter int unsigned IHDEPTH    = 37683,  // I/H words (2.3 MB)
  parameter int unsigned IBDEPTH    = 192,    // intermediate words per half (24 KB)
  parameter int unsigned CSDEPTH    = 3072,   // cell-state words per half (192 KB)
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned CT_ENTRIES = 16,
  localparam int unsigned WAW = $clog2(WDEPTH),
  localparam int unsigned IAW = $clog2(IHDEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // DMA commands
  input  logic                        dma_valid,
  output logic                        dma_ready,
  input  logic                        dma_to_ih,
  input  logic [31:0]                 dma_src,
  input  logic [31:0]                 dma_dst,
  input  logic [31:0]                 dma_len,
  output logic                        dma_done,
  output logic [31:0]                 dma_stall,
  // reconfiguration table load
  input  logic                        ct_wr_en,
  input  logic [$clog2(CT_ENTRIES)-1:0] ct_wr_idx,
  input  logic [15:0]                 ct_wr_dim,
  input  tile_cfg_e                   ct_wr_cfg,
  input  logic                        ct_wr_pad,
  // layer command
  input  logic                        start,
  input  logic [15:0]                 x_len,
  input  logic [15:0]                 h_len,
  input  logic [15:0]                 steps,
  input  logic [WAW-1:0]              wx_base,
  input  logic [WAW-1:0]              wh_base,
  input  logic [IAW-1:0]              x_base,
  input  logic [IAW-1:0]              h_base,
  output logic                        busy,
  output logic                        done,
  output tile_cfg_e                   layer_cfg,
  output perf_t                       perf,
  output logic [31:0]                 acc_bypass,
  // host read of the I/H buffer
  input  logic                        host_rd_en,
  input  logic [IAW-1:0]              host_rd_addr,
  output logic [N*16-1:0]             host_rd_data,   // element e at [16e +: 16]
  // main memory
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic [31:0]                 mem_req_addr,
  input  logic                        mem_resp_valid,
  output logic                        mem_resp_ready,
  input  logic [K*16-1:0]             mem_resp_data
);
  localparam int unsigned CW = K / 4;
  localparam int unsigned TAG_W = $bits(vec_tag_t);

  // ------------------------------------------------------------ memory ctrl
  logic                 wb_wr_en;
  logic [$clog2(N)-1:0] wb_wr_bank;
  logic [WAW-1:0]       wb_wr_addr;
  fp16_t                wb_wr_data [K];
  logic                 dma_ih_req, dma_ih_gnt;
  logic [IAW-1:0]       dma_ih_addr;
  logic [N-1:0]         dma_ih_mask;
  fp16_t                dma_ih_data [N];

  sharp_mem_ctrl #(.N(N), .K(K), .WAW(WAW), .IAW(IAW)) u_memctrl (
    .clk, .rst_n,
    .cmd_valid(dma_valid), .cmd_ready(dma_ready), .cmd_to_ih(dma_to_ih),
    .cmd_src(dma_src), .cmd_dst(dma_dst), .cmd_len(dma_len), .done(dma_done),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid,
    .mem_resp_ready, .mem_resp_data,
    .wb_wr_en, .wb_wr_bank, .wb_wr_addr, .wb_wr_data,
    .ih_wr_req(dma_ih_req), .ih_gnt(dma_ih_gnt), .ih_wr_addr(dma_ih_addr),
    .ih_wr_mask(dma_ih_mask), .ih_wr_data(dma_ih_data), .stall_cycles(dma_stall)
  );

  // ------------------------------------------------------------ config table
  logic        lk_en, lk_pad, lk_hit;
  logic [15:0] lk_dim;
  tile_cfg_e   lk_cfg;

  sharp_config_table #(.ENTRIES(CT_ENTRIES)) u_cfgtab (
    .clk, .rst_n, .wr_en(ct_wr_en), .wr_idx(ct_wr_idx), .wr_dim(ct_wr_dim),
    .wr_cfg(ct_wr_cfg), .wr_pad(ct_wr_pad), .lk_en, .lk_dim, .lk_hit, .lk_cfg,
    .lk_pad
  );

  // ------------------------------------------------------------ controller
  logic                 iss_valid;
  issue_tag_t           iss_tag;
  logic [WAW-1:0]       iss_waddr;
  logic [IAW-1:0]       iss_ihaddr;
  logic [$clog2(N)-1:0] iss_off;
  logic [$clog2(N):0]   iss_ncols;
  logic                 fifo_pop, rb_done, tail_active;
  logic [15:0]          nrb;

  sharp_controller #(.N(N), .K(K), .WAW(WAW), .IAW(IAW), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .x_len, .h_len, .steps, .wx_base, .wh_base, .x_base,
    .h_base, .busy, .done, .lk_en, .lk_dim, .lk_cfg, .lk_pad,
    .issue_valid(iss_valid), .issue_tag(iss_tag), .w_addr(iss_waddr),
    .ih_addr(iss_ihaddr), .ih_offset(iss_off), .ncols(iss_ncols),
    .fifo_pop, .rb_done, .tail_active, .nrb, .cur_cfg(layer_cfg), .perf
  );

  // write-back constants of the running layer
  logic [IAW-1:0] wb_hbase;
  logic [15:0]    wb_hlen, wb_hwords;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb_hbase <= '0;
      wb_hlen <= '0;
      wb_hwords <= '0;
    end else if (start && !busy) begin
      wb_hbase <= h_base;
      wb_hlen <= h_len;
      wb_hwords <= (h_len + 16'(N) - 16'd1) / 16'(N);
    end

  // ------------------------------------------------------------ buffers
  fp16_t wb_rd_data [N][K];
  sharp_weight_buffer #(.N(N), .K(K), .DEPTH(WDEPTH)) u_wbuf (
    .clk, .wr_en(wb_wr_en), .wr_bank(wb_wr_bank), .wr_addr(wb_wr_addr),
    .wr_data(wb_wr_data), .rd_en(iss_valid), .rd_addr(iss_waddr),
    .rd_data(wb_rd_data)
  );

  logic           ih_wr_en;
  logic [IAW-1:0] ih_wr_addr;
  logic [N-1:0]   ih_wr_mask;
  fp16_t          ih_wr_data [N];
  fp16_t          ih_rd_data [N];
  logic           cu_wr_en;
  logic [IAW-1:0] cu_wr_addr;
  logic [N-1:0]   cu_wr_mask;
  fp16_t          cu_wr_data [N];

  assign dma_ih_gnt = !cu_wr_en;
  assign ih_wr_en   = cu_wr_en || dma_ih_req;
  assign ih_wr_addr = cu_wr_en ? cu_wr_addr : dma_ih_addr;
  assign ih_wr_mask = cu_wr_en ? cu_wr_mask : dma_ih_mask;
  for (genvar e = 0; e < N; e++) begin : g_ihw
    assign ih_wr_data[e] = cu_wr_en ? cu_wr_data[e] : dma_ih_data[e];
  end

  sharp_ih_buffer #(.N(N), .DEPTH(IHDEPTH)) u_ihbuf (
    .clk, .wr_en(ih_wr_en), .wr_addr(ih_wr_addr), .wr_mask(ih_wr_mask),
    .wr_data(ih_wr_data), .rd_en(busy ? iss_valid : host_rd_en),
    .rd_addr(busy ? iss_ihaddr : host_rd_addr), .rd_data(ih_rd_data)
  );
  for (genvar e = 0; e < N; e++) begin : g_hrd
    assign host_rd_data[16*e +: 16] = ih_rd_data[e];
  end

  // ------------------------------------------------------------ compute unit
  logic                 cu_in_valid;
  issue_tag_t           cu_in_tag;
  logic [$clog2(N)-1:0] cu_off;
  logic [$clog2(N):0]   cu_ncols;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cu_in_valid <= 1'b0;
    else cu_in_valid <= iss_valid;
  always_ff @(posedge clk) begin
    cu_in_tag <= iss_tag;
    cu_off <= iss_off;
    cu_ncols <= iss_ncols;
  end

  logic       acc_valid;
  issue_tag_t acc_tag;
  fp32_t      acc_vec [8][K];

  sharp_compute_unit #(.N(N), .K(K)) u_cu (
    .clk, .rst_n, .in_valid(cu_in_valid), .in_tag(cu_in_tag),
    .weights(wb_rd_data), .ih_word(ih_rd_data), .ih_offset(cu_off),
    .ncols(cu_ncols), .out_valid(acc_valid), .out_tag(acc_tag), .out_vec(acc_vec)
  );

  // ------------------------------------------------------------ result FIFO
  logic [3:0] push_n;
  vec_tag_t   push_tag [8];
  logic       f_valid;
  fp32_t      f_vec [K];
  vec_tag_t   f_tag;
  logic [$clog2(FIFO_DEPTH):0] f_count;

  assign push_n = acc_valid ? acc_tag.nvec : 4'd0;
  always_comb
    for (int q = 0; q < 8; q++)
      push_tag[q] = '{phase: acc_tag.phase, step: acc_tag.step, rb: acc_tag.rb + 16'(q)};

  sharp_result_fifo #(.K(K), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push_n, .push_vec(acc_vec), .push_tag, .pop(fifo_pop),
    .out_valid(f_valid), .out_vec(f_vec), .out_tag(f_tag), .count(f_count)
  );

  // ------------------------------------------------------------ ACC merge
  logic                       ib_wr_en, ib_wr_half, ib_rd_en, ib_rd_half;
  logic [$clog2(IBDEPTH)-1:0] ib_wr_addr, ib_rd_addr;
  fp32_t                      ib_wr_data [K], ib_rd_data [K];
  logic                       cs_rd_en, cs_rd_half;
  logic [$clog2(CSDEPTH)-1:0] cs_rd_addr;
  logic                       pa_valid;
  fp32_t                      pa_vec [K];
  vec_tag_t                   pa_tag;
  logic                       pa_bypass;

  sharp_partial_acc #(.K(K), .IB_DEPTH(IBDEPTH), .CS_DEPTH(CSDEPTH)) u_pacc (
    .clk, .rst_n, .in_valid(f_valid), .in_vec(f_vec), .in_tag(f_tag),
    .pop(fifo_pop), .ib_wr_en, .ib_wr_half, .ib_wr_addr, .ib_wr_data, .ib_rd_en,
    .ib_rd_half, .ib_rd_addr, .ib_rd_data, .cs_rd_en, .cs_rd_half, .cs_rd_addr,
    .out_valid(pa_valid), .out_vec(pa_vec), .out_tag(pa_tag), .bypass(pa_bypass)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc_bypass <= '0;
    else if (pa_bypass) acc_bypass <= acc_bypass + 1;

  sharp_inter_buffer #(.K(K), .DEPTH(IBDEPTH)) u_ibuf (
    .clk, .wr_en(ib_wr_en), .wr_half(ib_wr_half), .wr_addr(ib_wr_addr),
    .wr_data(ib_wr_data), .rd_en(ib_rd_en), .rd_half(ib_rd_half),
    .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  logic                       cs_wr_en;
  logic [$clog2(CSDEPTH)-1:0] cs_wr_addr;
  logic                       cs_wr_half;
  fp32_t                      cs_wr_data [CW], cs_rd_data [CW];

  sharp_cell_state #(.CW(CW), .DEPTH(CSDEPTH)) u_cstate (
    .clk, .wr_en(cs_wr_en), .wr_half(cs_wr_half), .wr_addr(cs_wr_addr),
    .wr_data(cs_wr_data), .rd_en(cs_rd_en), .rd_half(cs_rd_half),
    .rd_addr(cs_rd_addr), .rd_data(cs_rd_data)
  );

  // ------------------------------------------------------------ activation
  logic [K-1:0] tanh_lanes;
  always_comb
    for (int e = 0; e < int'(K); e++) tanh_lanes[e] = (e % 4) == 2;   // gate g

  logic             am_valid;
  fp16_t            am_y [K];
  logic [TAG_W-1:0] am_tag;

  sharp_amfu #(.LANES(K), .TAG_W(TAG_W)) u_amfu (
    .clk, .rst_n, .in_valid(pa_valid), .in_x(pa_vec), .in_tanh(tanh_lanes),
    .in_tag(pa_tag), .out_valid(am_valid), .out_y(am_y), .out_tag(am_tag)
  );

  // c_(t-1) travels beside the A-MFU; it is zero at step 0
  localparam int unsigned ALAT = 5;
  fp32_t c_dly [ALAT][CW];
  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(CW); j++) begin
      c_dly[0][j] <= (pa_tag.step == 16'd0) ? FP32_ZERO : cs_rd_data[j];
      for (int i = 1; i < int'(ALAT); i++) c_dly[i][j] <= c_dly[i-1][j];
    end
  end

  // ------------------------------------------------------------ cell updater
  logic             cu_valid;
  fp32_t            cu_c [CW];
  fp16_t            cu_h [CW];
  logic [TAG_W-1:0] cu_tag_raw;
  vec_tag_t         cu_tag;

  sharp_cell_updater #(.K(K), .TAG_W(TAG_W)) u_cupd (
    .clk, .rst_n, .in_valid(am_valid), .in_gates(am_y), .in_c(c_dly[ALAT-1]),
    .in_tag(am_tag), .out_valid(cu_valid), .out_c(cu_c), .out_h(cu_h),
    .out_tag(cu_tag_raw)
  );
  assign cu_tag = vec_tag_t'(cu_tag_raw);

  // write-back of c_t and h_t
  logic [31:0] j0;       // first hidden unit of the row block
  assign j0 = 32'(cu_tag.rb) * CW;

  assign cs_wr_en   = cu_valid;
  assign cs_wr_half = ~cu_tag.step[0];
  assign cs_wr_addr = ($clog2(CSDEPTH))'(cu_tag.rb);
  assign cs_wr_data = cu_c;

  assign cu_wr_en   = cu_valid;
  assign cu_wr_addr = wb_hbase + IAW'((32'(cu_tag.step) + 1) * 32'(wb_hwords)) + IAW'(j0 / N);
  for (genvar e = 0; e < N; e++) begin : g_wb
    logic [31:0] jj;
    assign jj = (j0 / N) * N + e;    // hidden unit held by element e of the word
    assign cu_wr_mask[e] = (jj >= j0) && (jj < j0 + CW) && (jj < 32'(wb_hlen));
    assign cu_wr_data[e] = cu_h[(jj - j0) % CW];
  end

  assign rb_done = cu_valid;


  // hidden-phase row blocks between the accumulators and the write-back
  logic [15:0] inflight;
  logic [3:0]  hid_push;
  assign hid_push = (acc_valid && acc_tag.phase == PH_HIDDEN) ? acc_tag.nvec : 4'd0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 16'(hid_push) - 16'(cu_valid);
  assign tail_active = (inflight != 16'd0);

  a_fifo_mod: assert property (@(posedge clk) disable iff (!rst_n) N % K == 0);

endmodule
