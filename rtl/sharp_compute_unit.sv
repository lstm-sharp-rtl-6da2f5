// sharp_compute_unit: the resizable MVM tile engine.
//
// Vector-Multiply (N VS units of K multipliers), R-Add-Reduce (pipelined tree
// with the four reconfiguration multiplexers) and the K-Accumulators. Each
// issue carries one column pass of a tile: the K weights of every bank, one
// I/H buffer word with the offset and count of the columns in use, the tile's
// configuration and its tag. A tile of G row groups covers G*K weight rows;
// after its last pass the G row-group sums leave as out_vec[0..G-1].
//
// Timing: an issue whose last flag is set produces out_valid
// 1 (multiply) + log2(N) (tree) + 1 (accumulator output) cycles later; one
// issue per cycle is accepted without stalls. Structure per the accelerator's
// description; the pipeline register placement is this design's choice.
module sharp_compute_unit
  import sharp_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  issue_tag_t           in_tag,
  input  fp16_t                weights [N][K],
  input  fp16_t                ih_word [N],
  input  logic [$clog2(N)-1:0] ih_offset,
  input  logic [$clog2(N):0]   ncols,
  output logic                 out_valid,
  output issue_tag_t           out_tag,
  output fp32_t                out_vec [8][K]
);
  localparam int unsigned TAG_W = $bits(issue_tag_t);

  logic       vm_valid;
  fp32_t      prod [N][K];
  issue_tag_t vm_tag;

  sharp_vector_multiply #(.N(N), .K(K)) u_vm (
    .clk, .in_valid, .cfg(in_tag.cfg), .weights, .ih_word, .ih_offset, .ncols,
    .out_valid(vm_valid), .prod
  );

  always_ff @(posedge clk) vm_tag <= in_tag;

  logic             ar_valid;
  tile_cfg_e        ar_cfg;
  logic [TAG_W-1:0] ar_tag;
  fp32_t            ar_vec [8][K];

  sharp_add_reduce #(.N(N), .K(K), .TAG_W(TAG_W)) u_ar (
    .clk, .rst_n, .in_valid(vm_valid), .in_cfg(vm_tag.cfg), .in_tag(vm_tag),
    .in_vec(prod), .out_valid(ar_valid), .out_cfg(ar_cfg), .out_tag(ar_tag),
    .out_vec(ar_vec)
  );

  sharp_accumulators #(.K(K)) u_acc (
    .clk, .rst_n, .in_valid(ar_valid), .in_tag(issue_tag_t'(ar_tag)),
    .in_vec(ar_vec), .out_valid, .out_tag, .out_vec
  );

endmodule
