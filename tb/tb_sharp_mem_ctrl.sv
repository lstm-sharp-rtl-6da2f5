// tb_sharp_mem_ctrl: checks the DMA engine between main memory and the
// weight and I/H buffers. A main-memory model answers requests in order
// after 3 cycles with beat data derived from the address, with a random
// request-ready. Commands of random length go to the weight buffer (beat i of
// the command lands in bank (dst+i) mod N, word (dst+i)/N) or to the I/H
// buffer (chunk (dst+i) mod (N/K) of word (dst+i)/(N/K), by element mask),
// while the I/H grant is randomly withheld. Every buffer write is checked
// for address, bank or mask, and data; each command must write exactly len
// beats, in order, and pulse done once; stall_cycles must equal the cycles a
// write waited for the grant.
`timescale 1ns/1ps
module tb_sharp_mem_ctrl;
  import sharp_pkg::*;
  localparam int N = 8, K = 4, WAW = 8, IAW = 8, CH = N / K;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, cmd_to_ih, done;
  logic [31:0] cmd_src, cmd_dst, cmd_len;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  logic [31:0] mem_req_addr;
  logic [K*16-1:0] mem_resp_data;
  logic wb_wr_en;
  logic [$clog2(N)-1:0] wb_wr_bank;
  logic [WAW-1:0] wb_wr_addr;
  fp16_t wb_wr_data [K];
  logic ih_wr_req, ih_gnt;
  logic [IAW-1:0] ih_wr_addr;
  logic [N-1:0] ih_wr_mask;
  fp16_t ih_wr_data [N];
  logic [31:0] stall_cycles;

  sharp_mem_ctrl #(.N(N), .K(K), .WAW(WAW), .IAW(IAW)) dut (.*);

  function automatic logic [K*16-1:0] beat(int unsigned a);
    logic [K*16-1:0] b;
    for (int e = 0; e < K; e++) b[e*16 +: 16] = 16'(a * 37 + e * 5 + 1);
    return b;
  endfunction

  // ---------------------------------------------------------------- memory model
  int unsigned q_addr [$];
  longint      q_time [$];
  longint      cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      q_addr.delete();
      q_time.delete();
      mem_resp_valid <= 1'b0;
      mem_req_ready <= 1'b0;
      ih_gnt <= 1'b1;
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        q_addr.push_back(mem_req_addr);
        q_time.push_back(cyc + 3);
      end
      if (mem_resp_valid && mem_resp_ready) mem_resp_valid <= 1'b0;
      if ((!mem_resp_valid || mem_resp_ready) && q_addr.size() > 0 && q_time[0] <= cyc) begin
        mem_resp_valid <= 1'b1;
        mem_resp_data <= beat(q_addr[0]);
        void'(q_addr.pop_front());
        void'(q_time.pop_front());
      end
      mem_req_ready <= ($urandom_range(0, 3) != 0);
      ih_gnt <= ($urandom_range(0, 2) != 0);
    end
  end

  // ---------------------------------------------------------------- write checker
  bit  c_to_ih;
  int unsigned c_src, c_dst, c_len, seen, n_done, exp_stall;
  always @(negedge clk) if (rst_n) begin
    if (ih_wr_req && !ih_gnt) exp_stall++;
    if (wb_wr_en || (ih_wr_req && ih_gnt)) begin
      int unsigned idx;
      logic [K*16-1:0] b;
      idx = c_dst + seen;
      b = beat(c_src + seen);
      checks++;
      if (seen >= c_len || wb_wr_en == c_to_ih) begin
        failures++;
        $display("unexpected write: beat %0d of %0d, weight %0d", seen, c_len, wb_wr_en);
      end else if (wb_wr_en) begin
        if (wb_wr_bank != ($clog2(N))'(idx % N) || wb_wr_addr != WAW'(idx / N)) failures++;
        for (int e = 0; e < K; e++) if (wb_wr_data[e] != b[e*16 +: 16]) failures++;
      end else begin
        if (ih_wr_addr != IAW'(idx / CH)) failures++;
        for (int e = 0; e < N; e++) begin
          if (ih_wr_mask[e] != ((e / K) == int'(idx % CH))) failures++;
          if (ih_wr_mask[e] && ih_wr_data[e] != b[(e % K)*16 +: 16]) failures++;
        end
      end
      seen++;
    end
    if (done) n_done++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    cmd_valid = 0; cmd_to_ih = 0; cmd_src = 0; cmd_dst = 0; cmd_len = 0;
    seen = 0; n_done = 0; exp_stall = 0; c_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      while (!cmd_ready) @(negedge clk);
      c_to_ih = 1'($urandom_range(0, 1));
      c_src = $urandom_range(0, 1000);
      c_dst = $urandom_range(0, 100);
      c_len = $urandom_range(1, 20);
      seen = 0; n_done = 0;
      cmd_valid = 1; cmd_to_ih = c_to_ih; cmd_src = c_src; cmd_dst = c_dst; cmd_len = c_len;
      @(negedge clk);
      cmd_valid = 0;
      t = 0;
      while (n_done == 0 && t < 500) begin
        @(negedge clk);
        t++;
      end
      repeat (2) @(negedge clk);
      checks++;
      if (seen != c_len || n_done != 1) begin
        failures++;
        $display("command %0d: %0d of %0d beats written, done %0d times", c, seen, c_len, n_done);
      end
    end
    checks++;
    if (stall_cycles != exp_stall) begin
      failures++;
      $display("stall cycles %0d expected %0d", stall_cycles, exp_stall);
    end
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
