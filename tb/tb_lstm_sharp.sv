// tb_lstm_sharp: end-to-end test of the accelerator at its default size
// (N = 32 VS units of K = 32 multipliers, full buffer sizes).
//
// Runs four LSTM layers chosen so that every mechanism of the design occurs:
// all four tile configurations, padding reconfiguration of the last row tile,
// a table hit and a table miss (default configuration), result-FIFO credit
// stalls, hidden-state dependency stalls, input MVMs overlapping the cell
// update of the previous step, and I/H-buffer DMA writes held off by the cell
// updater. For each layer the testbench generates random fp16 weights and
// inputs, lays the weights out in the interleaved order the tile engine reads
// them, loads everything through the DMA from a behavioural main memory, runs
// the layer, reads every h_t back and compares it with a real-number LSTM
// reference. It also checks the number of tile-engine issues against the
// number of column passes the schedule needs.
`timescale 1ns/1ps
module tb_lstm_sharp;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;

  localparam int N = 32;
  localparam int K = 32;
  localparam int WAW = 14;
  localparam int IAW = 16;
  localparam int MM_BEATS = 1 << 15;
  localparam int XB = 1000;       // I/H word of x_0
  localparam int HB = 8000;       // I/H word of h_(-1)
  localparam int DUMMY = 30000;   // I/H word used by the background DMA

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- DUT
  logic dma_valid, dma_ready, dma_to_ih, dma_done;
  logic [31:0] dma_src, dma_dst, dma_len, dma_stall;
  logic ct_wr_en, ct_wr_pad;
  logic [3:0] ct_wr_idx;
  logic [15:0] ct_wr_dim;
  tile_cfg_e ct_wr_cfg, layer_cfg;
  logic start, busy, done;
  logic [15:0] x_len, h_len, steps;
  logic [WAW-1:0] wx_base, wh_base;
  logic [IAW-1:0] x_base, h_base;
  perf_t perf;
  logic [31:0] acc_bypass;
  logic host_rd_en;
  logic [IAW-1:0] host_rd_addr;
  logic [N*16-1:0] host_rd_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  logic [31:0] mem_req_addr;
  logic [K*16-1:0] mem_resp_data;

  lstm_sharp dut (.*);

  // ---------------------------------------------------------------- main memory model
  logic [K*16-1:0] mm [MM_BEATS];
  int unsigned q_addr [$];
  longint      q_time [$];
  int qn = 0;                           // entries in the request queue
  assign mem_req_ready = rst_n && qn < 8;
  always @(posedge clk) begin
    if (!rst_n) begin
      // requests seen before reset took effect are dropped
      q_addr.delete();
      q_time.delete();
      qn <= 0;
      mem_resp_valid <= 1'b0;
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        q_addr.push_back(mem_req_addr);
        q_time.push_back(cyc + 3);
      end
      if (mem_resp_valid && mem_resp_ready) mem_resp_valid <= 1'b0;
      if ((!mem_resp_valid || mem_resp_ready) && q_addr.size() > 0 && q_time[0] <= cyc) begin
        mem_resp_valid <= 1'b1;
        mem_resp_data <= mm[q_addr[0] % MM_BEATS];
        void'(q_addr.pop_front());
        void'(q_time.pop_front());
      end
      qn <= q_addr.size();
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  task automatic dma(input bit to_ih, input int src, input int dst, input int len);
    @(negedge clk);
    while (!dma_ready) @(negedge clk);
    dma_valid = 1; dma_to_ih = to_ih; dma_src = src; dma_dst = dst; dma_len = len;
    @(negedge clk);
    dma_valid = 0;
  endtask

  task automatic wait_dma();
    @(negedge clk);
    while (!dma_ready) @(negedge clk);
  endtask

  function automatic int groups(int c);
    return 8 >> c;
  endfunction

  // Tile sequence of one phase: returns the configuration of every tile.
  function automatic void tiles(int nrb, int cfg, bit pad, ref int tcfg[$]);
    int rb, g, c;
    tcfg.delete();
    rb = 0;
    while (rb < nrb) begin
      c = cfg;
      if (pad) while (c < 3 && groups(c + 1) >= nrb - rb) c++;
      tcfg.push_back(c);
      rb += groups(c);
    end
  endfunction

  // Lay one gate matrix (rows x cols, row-major fp16) out as weight-buffer
  // words starting at main-memory beat base + word*N; returns words used.
  function automatic int layout(int base, int word0, ref fp16_t m[], input int rows,
                                input int cols, input int nrb, input int cfg, input bit pad);
    int tcfg[$];
    int a, rb, cpp, npass, q, mcol, col, row;
    logic [K*16-1:0] beat;
    tiles(nrb, cfg, pad, tcfg);
    a = word0;
    rb = 0;
    foreach (tcfg[i]) begin
      cpp = N / groups(tcfg[i]);
      npass = (cols + cpp - 1) / cpp;
      for (int p = 0; p < npass; p++) begin
        for (int u = 0; u < N; u++) begin
          q = u / cpp;
          mcol = u % cpp;
          col = p * cpp + mcol;
          for (int e = 0; e < K; e++) begin
            row = (rb + q) * K + e;
            beat[e*16 +: 16] = (row < rows && col < cols) ? m[row*cols + col] : 16'h0;
          end
          mm[base + a * N + u] = beat;
        end
        a++;
      end
      rb += groups(tcfg[i]);
    end
    return a - word0;
  endfunction

  function automatic int passes(int len, int nrb, int cfg, bit pad);
    int tcfg[$];
    int s, cpp;
    tiles(nrb, cfg, pad, tcfg);
    s = 0;
    foreach (tcfg[i]) begin
      cpp = N / groups(tcfg[i]);
      s += (len + cpp - 1) / cpp;
    end
    return s;
  endfunction

  function automatic fp16_t rnd16(real scale);
    return real_to_fp16((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * scale);
  endfunction

  // ---------------------------------------------------------------- one layer
  perf_t tot;

  task automatic run_layer(input int X, input int H, input int T, input bit in_table,
                           input int tab_cfg, input bit tab_pad, input int expect_cfg,
                           input bit expect_pad);
    fp16_t wx[], wh[], xs[];
    real   href[], cref[], pre[];
    int    nrb, wxw, whw, WX, WH, beat, exp_issues;
    real   gi, gf, gg, go, err, maxerr;
    fp16_t got;
    nrb = (4 * H + K - 1) / K;
    WX = (X + N - 1) / N;
    WH = (H + N - 1) / N;
    wx = new[4 * H * X];
    wh = new[4 * H * H];
    xs = new[T * X];
    foreach (wx[i]) wx[i] = rnd16(1.5 / $sqrt(real'(X)));
    foreach (wh[i]) wh[i] = rnd16(1.5 / $sqrt(real'(H)));
    foreach (xs[i]) xs[i] = rnd16(1.0);

    // weights: Wx at weight word 0, Wh right behind it
    wxw = layout(0, 0, wx, 4 * H, X, nrb, expect_cfg, expect_pad);
    whw = layout(0, wxw, wh, 4 * H, H, nrb, expect_cfg, expect_pad);
    // inputs: beat region after the weights, one I/H word per beat (N == K)
    beat = (wxw + whw) * N;
    for (int t = 0; t < T; t++)
      for (int w = 0; w < WX; w++) begin
        logic [K*16-1:0] b;
        for (int e = 0; e < K; e++)
          b[e*16 +: 16] = (w * N + e < X) ? xs[t * X + w * N + e] : 16'h0;
        mm[beat + t * WX + w] = b;
      end
    dma(0, 0, 0, (wxw + whw) * N);
    dma(1, beat, XB, T * WX);
    wait_dma();

    if (in_table) begin
      @(negedge clk);
      ct_wr_en = 1; ct_wr_idx = 4'(H % 16); ct_wr_dim = 16'(H);
      ct_wr_cfg = tile_cfg_e'(tab_cfg); ct_wr_pad = tab_pad;
      @(negedge clk);
      ct_wr_en = 0;
    end

    @(negedge clk);
    x_len = 16'(X); h_len = 16'(H); steps = 16'(T);
    wx_base = '0; wh_base = WAW'(wxw); x_base = IAW'(XB); h_base = IAW'(HB);
    start = 1;
    @(negedge clk);
    start = 0;
    // background I/H prefetch that competes with the h_t write-back
    repeat (20) @(negedge clk);
    dma(1, 0, DUMMY, 600);
    while (!done) @(negedge clk);
    wait_dma();

    checks++;
    if (int'(layer_cfg) != expect_cfg) begin
      failures++;
      $display("layer H=%0d: configuration %0d, expected %0d", H, layer_cfg, expect_cfg);
    end
    exp_issues = T * (passes(X, nrb, expect_cfg, expect_pad) + passes(H, nrb, expect_cfg, expect_pad));
    checks++;
    if (int'(perf.issues) != exp_issues) begin
      failures++;
      $display("layer H=%0d: %0d issues, expected %0d", H, perf.issues, exp_issues);
    end

    // reference LSTM
    href = new[H];
    cref = new[H];
    pre = new[4 * H];
    foreach (href[j]) begin href[j] = 0.0; cref[j] = 0.0; end
    maxerr = 0.0;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < 4 * H; r++) begin
        pre[r] = 0.0;
        for (int c = 0; c < X; c++) pre[r] += fp16_to_real(wx[r * X + c]) * fp16_to_real(xs[t * X + c]);
        for (int c = 0; c < H; c++) pre[r] += fp16_to_real(wh[r * H + c]) * href[c];
      end
      for (int j = 0; j < H; j++) begin
        gi = sigmoid(pre[4*j]); gf = sigmoid(pre[4*j+1]);
        gg = tanh_r(pre[4*j+2]); go = sigmoid(pre[4*j+3]);
        cref[j] = gf * cref[j] + gi * gg;
        href[j] = fp16_to_real(real_to_fp16(go * tanh_r(cref[j])));
      end
      for (int j = 0; j < H; j++) begin
        @(negedge clk);
        host_rd_en = 1; host_rd_addr = IAW'(HB + (t + 1) * WH + j / N);
        @(negedge clk);
        host_rd_en = 0;
        got = host_rd_data[16 * (j % N) +: 16];
        err = absr(fp16_to_real(got) - href[j]);
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 0.03) begin
          failures++;
          if (failures < 10)
            $display("layer H=%0d t=%0d h[%0d] = %f, expected %f", H, t, j, fp16_to_real(got), href[j]);
        end
      end
    end
    $display("layer X=%0d H=%0d T=%0d cfg=%0d: %0d cycles, %0d issues, dep stalls %0d, credit stalls %0d, overlap %0d, pad tiles %0d, max |err| %f",
             X, H, T, layer_cfg, perf.busy_cycles, perf.issues, perf.stall_dep, perf.stall_credit,
             perf.overlap, perf.pad_tiles, maxerr);
    tot.stall_dep    += perf.stall_dep;
    tot.stall_credit += perf.stall_credit;
    tot.overlap      += perf.overlap;
    tot.pad_tiles    += perf.pad_tiles;
    tot.tiles_cfg1   += perf.tiles_cfg1;
    tot.tiles_cfg2   += perf.tiles_cfg2;
    tot.tiles_cfg3   += perf.tiles_cfg3;
    tot.tiles_cfg4   += perf.tiles_cfg4;
  endtask

  task automatic mech(input string name, input longint n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  initial begin
    tot = '0;
    dma_valid = 0; dma_to_ih = 0; dma_src = 0; dma_dst = 0; dma_len = 0;
    ct_wr_en = 0; ct_wr_idx = 0; ct_wr_dim = 0; ct_wr_cfg = CFG1; ct_wr_pad = 0;
    start = 0; x_len = 0; h_len = 0; steps = 0; wx_base = 0; wh_base = 0; x_base = 0; h_base = 0;
    host_rd_en = 0; host_rd_addr = 0;
    mem_resp_valid = 0; mem_resp_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    //        X    H   T  table cfg  pad  expected cfg, pad
    run_layer(24,  40, 3, 1, 2,     1,   2, 1);   // Config3, last tile shrinks to Config4
    run_layer(8,  192, 2, 1, 0,     0,   0, 0);   // Config1, FIFO credit stalls
    run_layer(40,   8, 3, 1, 3,     1,   3, 1);   // Config4, column padding
    run_layer(16,  24, 2, 0, 0,     0,   1, 1);   // table miss: default Config2
    run_layer(16,  12, 2, 0, 0,     0,   1, 1);   // table miss: Config2 shrinks to Config3
    mech("configuration 1 tiles", tot.tiles_cfg1);
    mech("configuration 2 tiles", tot.tiles_cfg2);
    mech("configuration 3 tiles", tot.tiles_cfg3);
    mech("configuration 4 tiles", tot.tiles_cfg4);
    mech("padding reconfiguration", tot.pad_tiles);
    mech("hidden dependency stall", tot.stall_dep);
    mech("result FIFO credit stall", tot.stall_credit);
    mech("input MVM overlapping tail", tot.overlap);
    mech("DMA held by write-back", dma_stall);
    mech("ACC read-after-write bypass", acc_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
