// tb_sharp_cell_updater: feeds random activated gates (fp16) and previous
// cell states, one vector per cycle, and checks c_t = f*c + i*g and
// h_t = o*tanh(c_t) against real arithmetic (c_(t-1) rounded to fp16 as the
// multipliers require) and the 8-cycle latency.
`timescale 1ns/1ps
module tb_sharp_cell_updater;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int K = 8, U = K / 4, LAT = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, out_valid;
  fp16_t in_gates [K];
  fp32_t in_c [U];
  logic [7:0] in_tag, out_tag;
  fp32_t out_c [U];
  fp16_t out_h [U];

  sharp_cell_updater #(.K(K), .TAG_W(8)) dut (.*);

  real ec [256][U], eh [256][U];
  int sent [256];
  int nout = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    nout++;
    checks++;
    if (cyc - sent[out_tag] != LAT) failures++;
    for (int j = 0; j < U; j++) begin
      checks += 2;
      if (absr(fp32_to_real(out_c[j]) - ec[out_tag][j]) > 1e-5 * (1.0 + absr(ec[out_tag][j]))) begin
        failures++;
        $display("c[%0d] %f vs %f", j, fp32_to_real(out_c[j]), ec[out_tag][j]);
      end
      if (absr(fp16_to_real(out_h[j]) - eh[out_tag][j]) > 2e-3) begin
        failures++;
        $display("h[%0d] %f vs %f", j, fp16_to_real(out_h[j]), eh[out_tag][j]);
      end
    end
  end

  initial begin
    real g [4], c;
    in_valid = 0;
    in_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag = 8'(it);
      for (int j = 0; j < U; j++) begin
        for (int q = 0; q < 4; q++) begin
          g[q] = real'($urandom_range(0, 1000)) / 1000.0;
          if (q == 2) g[q] = 2.0 * g[q] - 1.0;
          in_gates[4*j+q] = real_to_fp16(g[q]);
          g[q] = fp16_to_real(in_gates[4*j+q]);
        end
        c = (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0;
        in_c[j] = real_to_fp32(c);
        ec[it][j] = g[1] * fp16_to_real(real_to_fp16(fp32_to_real(in_c[j]))) + g[0] * g[2];
        eh[it][j] = g[3] * tanh_r(ec[it][j]);
      end
      sent[it] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (nout != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
