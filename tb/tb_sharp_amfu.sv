// tb_sharp_amfu: drives random values (including large magnitudes) into the
// lanes with a random sigmoid/tanh mode per lane, one vector per cycle, and
// checks every result against the real-number functions (tolerance 2e-3,
// covering the fp16 output) and the 5-cycle latency.
`timescale 1ns/1ps
module tb_sharp_amfu;
  import sharp_pkg::*;
  import sharp_tb_pkg::*;
  localparam int LANES = 4, LAT = 5;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, out_valid;
  fp32_t in_x [LANES];
  logic [LANES-1:0] in_tanh;
  logic [7:0] in_tag, out_tag;
  fp16_t out_y [LANES];

  sharp_amfu #(.LANES(LANES), .TAG_W(8)) dut (.*);

  real xs [256][LANES];
  logic [LANES-1:0] md [256];
  int sent [256];
  int nout = 0;
  real maxerr = 0.0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real r, err;
    nout++;
    checks++;
    if (cyc - sent[out_tag] != LAT) failures++;
    for (int l = 0; l < LANES; l++) begin
      r = md[out_tag][l] ? tanh_r(xs[out_tag][l]) : sigmoid(xs[out_tag][l]);
      err = absr(fp16_to_real(out_y[l]) - r);
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 2e-3) begin
        failures++;
        if (failures < 6) $display("x=%f tanh=%0d: %f vs %f", xs[out_tag][l], md[out_tag][l], fp16_to_real(out_y[l]), r);
      end
    end
  end

  initial begin
    in_valid = 0;
    in_tag = 0;
    in_tanh = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 250; it++) begin
      @(negedge clk);
      in_valid = 1;
      in_tag = 8'(it);
      for (int l = 0; l < LANES; l++) begin
        xs[it][l] = (real'($urandom_range(0, 20000)) - 10000.0) / ((it % 5 == 0) ? 50.0 : 1000.0);
        in_x[l] = real_to_fp32(xs[it][l]);
        xs[it][l] = fp32_to_real(in_x[l]);
        md[it][l] = 1'($urandom_range(0, 1));
      end
      in_tanh = md[it];
      sent[it] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != 250) failures++;
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
