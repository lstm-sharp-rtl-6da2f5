// tb_sharp_result_fifo: checks the multi-push result FIFO against a reference
// queue. Each cycle pushes 0..8 vectors (never more than the free space) and
// pops with a random pattern; every popped vector and tag must come out in
// push order, and count/out_valid must match the reference occupancy.
`timescale 1ns/1ps
module tb_sharp_result_fifo;
  import sharp_pkg::*;
  localparam int K = 4, D = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] push_n;
  fp32_t push_vec [8][K];
  vec_tag_t push_tag [8];
  logic pop, out_valid;
  fp32_t out_vec [K];
  vec_tag_t out_tag;
  logic [$clog2(D):0] count;

  sharp_result_fifo #(.K(K), .DEPTH(D)) dut (.*);

  // reference: a sequence number per vector; the data is derived from it
  int unsigned ref_q [$];
  int unsigned seq = 0;

  function automatic fp32_t val(int unsigned s, int e);
    return fp32_t'(s * 131 + e * 7 + 32'h3f00_0000);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, free;
    bit p;
    push_n = 0; pop = 0;
    for (int q = 0; q < 8; q++) push_tag[q] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check the head and the occupancy before this cycle's edge
      checks++;
      if (int'(count) != ref_q.size() || out_valid != (ref_q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d expected %0d", it, count, ref_q.size());
      end
      if (ref_q.size() > 0) begin
        checks++;
        if (out_tag.rb != 16'(ref_q[0]) || out_vec[0] != val(ref_q[0], 0) || out_vec[K-1] != val(ref_q[0], K - 1)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: head tag %0d expected %0d", it, out_tag.rb, ref_q[0]);
        end
      end
      p = ($urandom_range(0, 3) != 0);
      free = D - ref_q.size() + ((p && ref_q.size() > 0) ? 1 : 0);
      n = $urandom_range(0, 8);
      if (n > free) n = 0;
      if (it > 2500) n = 0;            // drain at the end
      pop = p;
      push_n = 4'(n);
      for (int q = 0; q < 8; q++) begin
        push_tag[q] = '{phase: PH_INPUT, step: 16'd0, rb: 16'(seq + q)};
        for (int e = 0; e < K; e++) push_vec[q][e] = val(seq + q, e);
      end
      if (p && ref_q.size() > 0) void'(ref_q.pop_front());
      for (int q = 0; q < n; q++) ref_q.push_back(seq + q);
      seq += n;
    end
    @(negedge clk);
    push_n = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
