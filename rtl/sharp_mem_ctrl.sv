// sharp_mem_ctrl: memory controller (DMA into the on-chip buffers).
//
// Copies a block of beats from main memory into the weight buffer or the I/H
// buffer. A beat is K fp16 values (one weight-bank word). A command gives the
// destination, the first main-memory beat address, the first destination
// index and the number of beats.
//  - Weight buffer: destination index i goes to bank i mod N, word i div N, so
//    consecutive beats fill one word of every bank before moving on; the
//    offline weight layout is therefore a plain linear image.
//  - I/H buffer: index i is the K-element chunk i mod (N/K) of word i div (N/K).
// Requests are issued back to back (one per cycle while mem_req_ready); the
// responses return in order. I/H writes share the buffer's write port with the
// cell updater, which has priority: while ih_gnt is low the controller holds
// the response (mem_resp_ready low) and counts a stall cycle. Weight writes
// never wait. This lets the host prefetch the next input sequence while a
// layer runs.
// Timing: cmd_ready while idle; done pulses after the last beat is written.
// The controller's role follows the accelerator's description; its command
// format, beat size and arbitration are this design's choice. Requires
// N to be a multiple of K.
module sharp_mem_ctrl
  import sharp_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned K   = 32,
  parameter int unsigned WAW = 14,
  parameter int unsigned IAW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic                 cmd_to_ih,    // 0: weight buffer, 1: I/H buffer
  input  logic [31:0]          cmd_src,
  input  logic [31:0]          cmd_dst,
  input  logic [31:0]          cmd_len,
  output logic                 done,
  // main memory
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic [31:0]          mem_req_addr,
  input  logic                 mem_resp_valid,
  output logic                 mem_resp_ready,
  input  logic [K*16-1:0]      mem_resp_data,
  // weight buffer write
  output logic                 wb_wr_en,
  output logic [$clog2(N)-1:0] wb_wr_bank,
  output logic [WAW-1:0]       wb_wr_addr,
  output fp16_t                wb_wr_data [K],
  // I/H buffer write
  output logic                 ih_wr_req,
  input  logic                 ih_gnt,
  output logic [IAW-1:0]       ih_wr_addr,
  output logic [N-1:0]         ih_wr_mask,
  output fp16_t                ih_wr_data [N],
  output logic [31:0]          stall_cycles
);
  localparam int unsigned CH = N / K;   // chunks per I/H word

  logic        active, to_ih;
  logic [31:0] src, dst, len, req_cnt, rsp_cnt;

  assign cmd_ready     = !active;
  assign mem_req_valid = active && req_cnt < len;
  assign mem_req_addr  = src + req_cnt;

  logic [31:0] idx;
  logic        take;
  assign idx            = dst + rsp_cnt;
  assign mem_resp_ready = active && (!to_ih || ih_gnt);
  assign take           = mem_resp_valid && mem_resp_ready;

  always_comb
    for (int e = 0; e < int'(K); e++) wb_wr_data[e] = mem_resp_data[e*16 +: 16];
  assign wb_wr_en   = take && !to_ih;
  assign wb_wr_bank = ($clog2(N))'(idx % N);
  assign wb_wr_addr = WAW'(idx / N);

  assign ih_wr_req  = active && to_ih && mem_resp_valid;
  assign ih_wr_addr = IAW'(idx / CH);
  always_comb begin
    for (int e = 0; e < int'(N); e++) begin
      ih_wr_mask[e] = (e / int'(K)) == int'(idx % CH);
      ih_wr_data[e] = mem_resp_data[(e % int'(K))*16 +: 16];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      to_ih <= 1'b0;
      {src, dst, len, req_cnt, rsp_cnt} <= '0;
      done <= 1'b0;
      stall_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (cmd_valid) begin
          active <= (cmd_len != 0);
          done <= (cmd_len == 0);
          to_ih <= cmd_to_ih;
          src <= cmd_src;
          dst <= cmd_dst;
          len <= cmd_len;
          req_cnt <= '0;
          rsp_cnt <= '0;
        end
      end else begin
        if (mem_req_valid && mem_req_ready) req_cnt <= req_cnt + 1;
        if (ih_wr_req && !ih_gnt) stall_cycles <= stall_cycles + 1;
        if (take) begin
          rsp_cnt <= rsp_cnt + 1;
          if (rsp_cnt + 1 == len) begin
            active <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
