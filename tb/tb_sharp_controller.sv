// tb_sharp_controller: checks the unfolded-schedule controller on its own.
// The testbench answers the configuration lookup, and models the rest of the
// pipeline with delays: a tile's result enters a result-FIFO model 5 cycles
// after its last pass, the FIFO model is popped at random, and each popped
// hidden-phase vector reports a written-back row block 8 cycles later.
// Every issue is compared, in order, with a reference schedule worked out
// here (phase, step, row block, configuration incl. padding shrink, vectors,
// first/last, weight and I/H addresses, column offset and valid columns).
// Also checked: no hidden issue of step t before all row blocks of step t-1
// are back, the FIFO model never exceeds its depth (credit flow control),
// done arrives, and the stall, overlap and padding counters moved.
`timescale 1ns/1ps
module tb_sharp_controller;
  import sharp_pkg::*;
  localparam int N = 16, K = 4, WAW = 10, IAW = 10, FD = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, lk_en, lk_pad, issue_valid, fifo_pop, rb_done, tail_active;
  logic [15:0] x_len, h_len, steps, lk_dim, nrb;
  logic [WAW-1:0] wx_base, wh_base, w_addr;
  logic [IAW-1:0] x_base, h_base, ih_addr;
  tile_cfg_e lk_cfg, cur_cfg;
  issue_tag_t issue_tag;
  logic [$clog2(N)-1:0] ih_offset;
  logic [$clog2(N):0] ncols;
  perf_t perf;

  sharp_controller #(.N(N), .K(K), .WAW(WAW), .IAW(IAW), .FIFO_DEPTH(FD)) dut (.*);

  // reference schedule
  typedef struct {
    bit ph; int t, rb, cfg, nvec, w, ih, off, nc; bit first, last;
  } iss_t;
  iss_t sched [$];
  int n_iss;

  task automatic build(int X, int H, int T, int cfg, bit pad, int wxb, int whb, int xb, int hb);
    int nr, rem, g, G, cpp, np, len, w, col;
    nr = (4 * H + K - 1) / K;
    sched.delete();
    for (int t = 0; t < T; t++)
      for (int ph = 0; ph < 2; ph++) begin
        len = ph ? H : X;
        w = ph ? whb : wxb;
        for (int rb = 0; rb < nr; rb += G) begin
          rem = nr - rb;
          g = cfg;
          if (pad) for (int c = cfg; c < 4; c++) if (rem <= (8 >> c)) g = c;
          G = 8 >> g;
          cpp = N / G;
          np = (len + cpp - 1) / cpp;
          if (np == 0) np = 1;
          for (int p = 0; p < np; p++) begin
            iss_t s;
            col = p * cpp;
            s.ph = 1'(ph); s.t = t; s.rb = rb; s.cfg = g; s.nvec = rem < G ? rem : G;
            s.w = w; w++;
            s.ih = (ph ? hb + t * ((H + N - 1) / N) : xb + t * ((X + N - 1) / N)) + col / N;
            s.off = col % N;
            s.nc = (ph && t == 0) ? 0 : ((len - col < cpp) ? len - col : cpp);
            s.first = (p == 0); s.last = (p == np - 1);
            sched.push_back(s);
          end
        end
      end
  endtask

  // downstream model
  longint cyc = 0;
  int push_at [64], push_hid [64];
  bit done_at [64];
  int occ = 0, occ_hid [$], backs = 0, max_occ = 0;
  int cur_t_nr;

  always @(negedge clk) begin
    cyc++;
    fifo_pop = 0;
    rb_done = 0;
    if (rst_n) begin
      for (int i = 0; i < push_at[cyc % 64]; i++) occ_hid.push_back(push_hid[cyc % 64]);
      push_at[cyc % 64] = 0;
      if (occ_hid.size() > FD) begin
        failures++;
        $display("result FIFO model holds %0d > %0d", occ_hid.size(), FD);
      end
      if (occ_hid.size() > max_occ) max_occ = occ_hid.size();
      if (done_at[cyc % 64]) begin
        rb_done = 1;
        backs++;
        done_at[cyc % 64] = 0;
      end
      if (occ_hid.size() > 0 && $urandom_range(0, 3) != 0) begin
        fifo_pop = 1;
        if (occ_hid.pop_front()) done_at[(cyc + 8) % 64] = 1;
      end
      tail_active = 0;
      for (int i = 0; i < 64; i++) if (done_at[i] || push_at[i] > 0) tail_active = 1;
      if (occ_hid.size() > 0) tail_active = 1;
      // issue check (values stable until the next rising edge)
      if (issue_valid) begin
        checks++;
        if (n_iss >= sched.size()) begin
          failures++;
          $display("extra issue");
        end else begin
          iss_t s;
          s = sched[n_iss];
          if (issue_tag.phase != phase_e'(s.ph) || int'(issue_tag.step) != s.t || int'(issue_tag.rb) != s.rb
              || int'(issue_tag.cfg) != s.cfg || int'(issue_tag.nvec) != s.nvec || issue_tag.first != s.first
              || issue_tag.last != s.last || int'(w_addr) != s.w || int'(ih_addr) != s.ih
              || int'(ih_offset) != s.off || int'(ncols) != s.nc) begin
            failures++;
            if (failures < 10)
              $display("issue %0d: ph %0d t %0d rb %0d cfg %0d nvec %0d w %0d ih %0d off %0d nc %0d; expected %0d %0d %0d %0d %0d %0d %0d %0d %0d",
                       n_iss, issue_tag.phase, issue_tag.step, issue_tag.rb, issue_tag.cfg, issue_tag.nvec,
                       w_addr, ih_addr, ih_offset, ncols, s.ph, s.t, s.rb, s.cfg, s.nvec, s.w, s.ih, s.off, s.nc);
          end
          if (s.ph && backs < s.t * cur_t_nr) begin
            failures++;
            $display("hidden issue of step %0d with only %0d row blocks back", s.t, backs);
          end
          if (s.last) begin
            push_at[(cyc + 5) % 64] += s.nvec;
            push_hid[(cyc + 5) % 64] = s.ph;
          end
        end
        n_iss++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int X, int H, int T, int cfg, bit pad);
    int to;
    build(X, H, T, cfg, pad, 3, 200, 10, 300);
    cur_t_nr = (4 * H + K - 1) / K;
    n_iss = 0; backs = 0;
    @(negedge clk);
    start = 1; x_len = 16'(X); h_len = 16'(H); steps = 16'(T);
    wx_base = 3; wh_base = 200; x_base = 10; h_base = 300;
    lk_cfg = tile_cfg_e'(cfg); lk_pad = pad;
    @(negedge clk);
    start = 0;
    to = 0;
    while (!done && to < 20000) begin
      @(negedge clk);
      to++;
    end
    checks += 3;
    if (!done) begin failures++; $display("no done"); end
    if (n_iss != sched.size()) begin
      failures++;
      $display("%0d issues, expected %0d", n_iss, sched.size());
    end
    if (int'(perf.issues) != sched.size()) failures++;
    $display("layer X=%0d H=%0d T=%0d cfg=%0d pad=%0d: %0d issues, dep stalls %0d, credit stalls %0d, overlap %0d, pad tiles %0d",
             X, H, T, cfg, pad, perf.issues, perf.stall_dep, perf.stall_credit, perf.overlap, perf.pad_tiles);
  endtask

  int sum_dep = 0, sum_cred = 0, sum_ovl = 0, sum_pad = 0;
  initial begin
    start = 0; x_len = 0; h_len = 0; steps = 0; wx_base = 0; wh_base = 0; x_base = 0; h_base = 0;
    lk_cfg = CFG1; lk_pad = 0; fifo_pop = 0; rb_done = 0; tail_active = 0;
    for (int i = 0; i < 64; i++) begin push_at[i] = 0; push_hid[i] = 0; done_at[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 8; l++) begin
      run($urandom_range(1, 40), $urandom_range(1, 20), $urandom_range(1, 3), l % 4, 1'(l / 4));
      sum_dep += perf.stall_dep; sum_cred += perf.stall_credit;
      sum_ovl += perf.overlap; sum_pad += perf.pad_tiles;
    end
    run(2, 40, 2, 0, 0);   // one-pass tiles of 8 vectors: fills the FIFO
    sum_cred += perf.stall_credit;
    checks += 3;
    if (sum_dep == 0) begin failures++; $display("no dependency stall"); end
    if (sum_cred == 0) begin failures++; $display("no credit stall"); end
    if (sum_pad == 0) begin failures++; $display("no padding shrink"); end
    $display("max FIFO model occupancy %0d, overlap issues %0d", max_occ, sum_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
