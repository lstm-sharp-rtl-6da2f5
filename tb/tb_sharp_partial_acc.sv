// tb_sharp_partial_acc: checks the merge of input-phase and hidden-phase MVM
// results, together with a real intermediate buffer. For each step a random
// number of row blocks is streamed as input-phase vectors (parked) and then
// hidden-phase vectors (merged), with random gaps; single-row-block steps
// with no gap exercise the read-after-write bypass. Inputs are small
// integers, so every merged sum is exact: each hidden vector must leave two
// cycles later with out = hidden + parked input, in order, with its tag, and
// a cell-state read must be requested for each one. The bypass must occur.
`timescale 1ns/1ps
module tb_sharp_partial_acc;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int K = 4, IBD = 8, CSD = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, pop, out_valid, bypass;
  fp32_t in_vec [K], out_vec [K];
  vec_tag_t in_tag, out_tag;
  logic ib_wr_en, ib_wr_half, ib_rd_en, ib_rd_half;
  logic [$clog2(IBD)-1:0] ib_wr_addr, ib_rd_addr;
  fp32_t ib_wr_data [K], ib_rd_data [K];
  logic cs_rd_en, cs_rd_half;
  logic [$clog2(CSD)-1:0] cs_rd_addr;

  sharp_partial_acc #(.K(K), .IB_DEPTH(IBD), .CS_DEPTH(CSD)) dut (.*);
  sharp_inter_buffer #(.K(K), .DEPTH(IBD)) u_ib (
    .clk, .wr_en(ib_wr_en), .wr_half(ib_wr_half), .wr_addr(ib_wr_addr),
    .wr_data(ib_wr_data), .rd_en(ib_rd_en), .rd_half(ib_rd_half),
    .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  real parked [2][IBD][K];
  real exp_v [1024][K];
  int  exp_rb [1024], exp_step [1024];
  int  n_exp = 0, n_got = 0, n_cs = 0, n_byp = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (bypass) n_byp++;
    if (cs_rd_en) begin
      n_cs++;
      checks++;
      if (int'(cs_rd_addr) != exp_rb[n_cs - 1] || cs_rd_half != 1'(exp_step[n_cs - 1])) failures++;
    end
    if (out_valid) begin
      checks++;
      if (n_got >= n_exp || int'(out_tag.rb) != exp_rb[n_got] || int'(out_tag.step) != exp_step[n_got]
          || out_tag.phase != PH_HIDDEN) begin
        failures++;
        $display("unexpected output rb %0d step %0d", out_tag.rb, out_tag.step);
      end else
        for (int e = 0; e < K; e++) begin
          checks++;
          if (fp32_to_real(out_vec[e]) != exp_v[n_got][e]) begin
            failures++;
            if (failures < 10) $display("rb %0d step %0d lane %0d: got %f expected %f",
                                        out_tag.rb, out_tag.step, e, fp32_to_real(out_vec[e]), exp_v[n_got][e]);
          end
        end
      n_got++;
    end
  end

  task automatic send(phase_e ph, int t, int rb);
    real v;
    if ($urandom_range(0, 3) == 0 && !(ph == PH_HIDDEN && rb == 0)) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_valid = 1;
    in_tag = '{phase: ph, step: 16'(t), rb: 16'(rb)};
    for (int e = 0; e < K; e++) begin
      v = real'($urandom_range(0, 200)) - 100.0;
      in_vec[e] = real_to_fp32(v);
      if (ph == PH_INPUT) parked[t % 2][rb][e] = v;
      else exp_v[n_exp][e] = v + parked[t % 2][rb][e];
    end
    if (ph == PH_HIDDEN) begin
      exp_rb[n_exp] = rb; exp_step[n_exp] = t; n_exp++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int r;
    in_valid = 0; in_tag = '0;
    for (int e = 0; e < K; e++) in_vec[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      r = (t % 3 == 0) ? 1 : $urandom_range(1, IBD);
      for (int rb = 0; rb < r; rb++) send(PH_INPUT, t, rb);
      for (int rb = 0; rb < r; rb++) send(PH_HIDDEN, t, rb);
    end
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_got != n_exp || n_cs != n_exp) begin
      failures++;
      $display("%0d outputs and %0d cell-state reads for %0d hidden vectors", n_got, n_cs, n_exp);
    end
    if (n_byp == 0) begin
      failures++;
      $display("bypass never happened");
    end
    $display("bypass used %0d times", n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
