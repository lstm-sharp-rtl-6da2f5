// sharp_vector_multiply: the Vector-Multiply stage of the compute unit.
//
// N vector-scalar (VS) units. VS unit u multiplies the K fp16 weights read
// from weight bank u by one fp16 element of the input/hidden vector and
// produces K exact fp32 products. Which element a unit gets depends on the
// tile configuration: with G = 8 >> cfg row groups, the units form G groups
// of N/G consecutive units and unit u takes column m = u mod (N/G) of the
// current pass, i.e. element (ih_offset + m) of the I/H word. Columns at or
// beyond ncols (padding past the end of the vector) get a zero scalar.
//
// Timing: one register stage; products appear one cycle after in_valid.
// The K-wide VS unit and the column/row mapping follow the accelerator's
// description; the zero masking of padded columns is this design's choice.
module sharp_vector_multiply
  import sharp_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 32
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  tile_cfg_e            cfg,
  input  fp16_t                weights [N][K],
  input  fp16_t                ih_word [N],
  input  logic [$clog2(N)-1:0] ih_offset,
  input  logic [$clog2(N):0]   ncols,
  output logic                 out_valid,
  output fp32_t                prod [N][K]
);

  fp16_t scalar [N];

  always_comb begin
    for (int u = 0; u < N; u++) begin
      int unsigned cpp, m;
      cpp = N / cfg_groups(cfg);
      m = u % cpp;
      if (m < ncols) scalar[u] = ih_word[(int'(ih_offset) + m) % N];
      else scalar[u] = 16'h0000;
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    for (int u = 0; u < N; u++)
      for (int e = 0; e < K; e++)
        prod[u][e] <= fp16_mul(weights[u][e], scalar[u]);
  end

endmodule
