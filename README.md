# LSTM-Sharp accelerator RTL

This design runs LSTM layers in hardware. The matrix-vector products of all four
gates run on a tile engine whose shape can be changed per layer. Gate activation
and the cell update run behind it in a pipeline. An unfolded two-phase schedule
keeps the tile engine busy across the serial dependency between time steps.

At default parameters the engine has N = 32 vector-scalar (VS) units, each K = 32
lanes wide, which is 1K multiply-adders. The larger budgets of the original
architecture (4K, 16K and 64K) are the same RTL with N = 128, 512 or 2048.

## Arithmetic

- Weights, inputs, hidden values and activated gates are IEEE fp16.
- Products are widened exactly to fp32. All sums, the cell state and the
  activation datapath are fp32.
- Additions round to nearest even. Subnormals are flushed to zero. There is no
  NaN handling: an infinite operand wins, and overflow gives infinity.
- The helper functions live in `rtl/sharp_pkg.sv`.

## Matrix layout and gate order

One layer computes `pre = W·x_t + U·h_(t-1)` over 4H gate rows. Row `4j+g` is
gate `g` of hidden unit `j`, with gate order i, f, g, o. A row block is K rows,
which is K/4 hidden units with all four of their gates. This lets each row block
go through activation and the cell update on its own.

**Bias.** The datapath has no bias adder. To get a bias, append a constant 1.0
element to x and a bias column to W.

## The resizable tile engine (`sharp_compute_unit`)

- **Column pass.** Each cycle a column pass reaches the N VS units:
  - every unit gets one weight column, K fp16 values read from its own weight bank;
  - every unit gets one scalar from the I/H word.
- **Tree.** The K-wide products go into a pipelined fp32 adder tree with log2(N)
  levels (`sharp_add_reduce`).
- **Configurations.** A configuration selects how many row groups G the units
  are split into:

| cfg  | G | rows per tile | columns per pass | tree tap level |
|------|---|---------------|------------------|----------------|
| CFG1 | 8 | 8K            | N/8              | log2(N)-3      |
| CFG2 | 4 | 4K            | N/4              | log2(N)-2      |
| CFG3 | 2 | 2K            | N/2              | log2(N)-1      |
| CFG4 | 1 | K             | N                | log2(N)        |

- **Scalar selection.** Unit `u` multiplies element `(offset + u mod N/G)` of the
  I/H word. It contributes zero when that column is past the end of the vector.
  This is how a short last pass is padded.
- **Taps.** Only the last four tree levels have tap multiplexers. An early tap
  is delayed, so every configuration leaves the tree after exactly log2(N)
  cycles.
- **Accumulators.** The 8×K fp32 accumulators (`sharp_accumulators`) load on
  the first pass of a tile and add on the later passes. After the last pass they
  hand G K-vectors to the result FIFO.
- **Latency.** From the last pass of a tile to its result is `2 + log2(N)`
  cycles.

### Weight layout

The weight buffer has N banks that are all read at one shared address. For each
tile, each pass and each bank `u`, the host stores this column of the matrix:

- column `p·(N/G) + u mod (N/G)`;
- rows `(rb + u div (N/G))·K … +K-1`.

Here `p` is the pass and `rb` the first row block of the tile. The input matrix
W goes from `wx_base`, one address per pass. U goes from `wh_base` in the same
way. The layout depends on the configuration the layer will use, including a
shrunk last tile (see padding below). `tb/tb_lstm_sharp.sv` has a reference
packing routine (`layout`).

## Unfolded schedule (`sharp_controller`)

For each time step t the controller issues two phases:

1. **Input phase.** `W·x_t` over all row tiles. Each result vector is parked in
   the intermediate buffer, in half `t mod 2`.
2. **Hidden phase.** `U·h_(t-1)` over all row tiles. Each vector is added to its
   parked input result (`sharp_partial_acc`), activated, and passed to the cell
   updater.

The two phases interact in three ways:

- **Overlap.** The input phase of step t+1 needs no hidden state, so it starts
  while step t is still draining through activation and the cell updater.
  This is counted in `perf.overlap`.
- **Dependency stall.** The hidden phase of step t waits until all row blocks of
  step t-1 have been written back. This is counted in `perf.stall_dep`.
- **Step 0.** At t = 0 the hidden phase does no column work, because
  h_(-1) = 0. The cell state read is forced to zero.

### Padding reconfiguration

If the remaining row blocks of a phase do not fill a tile, the last tile shrinks
to the smallest configuration that still covers them (`perf.pad_tiles`). The
shrink only happens when the layer's padding flag is set.

### Configuration lookup

When `start` arrives, `sharp_config_table` compares the hidden size against up
to 16 host-written entries. Each entry holds a dimension, a configuration and a
padding flag.

- On a miss the layer runs in CFG2 with padding enabled.
- The choice holds for the whole layer, and `layer_cfg` shows it.

### Flow control

`sharp_result_fifo` is 16 vectors deep and accepts a whole tile result (up to 8
vectors) in one cycle.

- The controller keeps credits and issues the last pass of a tile only if the
  FIFO can take its result. Waiting is counted in `perf.stall_credit`.
- Cell-updater write-backs of h_t have priority on the I/H write port. A DMA
  burst into the I/H buffer waits (`dma_stall`).

## Merge, activation and cell update

- **`sharp_partial_acc`**:
  - An input-phase vector is converted to fp16 and written to the intermediate
    buffer.
  - A hidden-phase vector reads its partner and adds it.
  - If the partner was written in the previous cycle, a forwarding path supplies
    it. This happens when a phase has a single row tile. It is counted on
    `acc_bypass`.
  - It also issues the cell-state read for the row block.
- **`sharp_amfu`** (5 stages, one vector per cycle):
  - sigmoid is `1/(1+e^-x)`;
  - tanh is `1 - 2/(1+e^(2x))`.
  - The stages are shift, exp, +1, reciprocal and the tanh correction.
  - `e^x` is computed as `2^(x·log2 e)`, with a cubic for the fractional part.
    The reciprocal is a mantissa division.
  - The maximum error against real arithmetic is about 3e-4.
  - Lanes with `e mod 4 == 2` (the g gate) use tanh.
- **`sharp_cell_updater`** (8 stages):
  - computes `c_t = f·c_(t-1) + i·g` with fp16 multiplies and an fp32 add;
  - computes `h_t = o·tanh(c_t)`, with tanh from its own K/4-lane A-MFU;
  - writes c_t to the other half of the double-buffered cell-state memory;
  - writes h_t into the I/H buffer.

## Buffers

| memory            | default organisation              | size     |
|-------------------|-----------------------------------|----------|
| weight            | 32 banks × 13312 × 32 fp16        | 26 MiB   |
| I/H               | 37683 × 32 fp16                   | 2.3 MiB  |
| intermediate      | 2 × 192 × 32 fp16                 | 24 KiB   |
| cell state        | 2 × 3072 × 8 fp32                 | 192 KiB  |

All of them are modelled as arrays with synchronous reads.

The intermediate buffer stores fp16 so that 24 KiB covers H up to 1536. Holding
those results in fp32 is a possible change that would halve that limit.

## Top level (`lstm_sharp`) and its use

1. **Load.** Load weights and vectors with DMA commands (`dma_*`).
   - Main memory is external. It appears as a request/response port of K·16-bit
     beats.
   - Weight beat `i` lands in bank `i mod N`, word `i div N`.
   - In the I/H buffer, `x_t` sits at `x_base + t·ceil(X/N)`. The design writes
     `h_t` to `h_base + (t+1)·ceil(H/N)`.
2. **Configure.** Optionally write the configuration table (`ct_wr_*`).
3. **Start.** Pulse `start` with `x_len`, `h_len`, `steps` and the four base
   addresses.
4. **Finish.** Wait for `done`. Then read h_t through `host_rd_*`, with data one
   cycle after the enable. `perf` gives the event counters.

Reset is active-low and asynchronous for control state. Datapath registers are
not reset; valid bits guard them.

### Capacity at default size

- Weights need `8·H·(X+H)` bytes. DeepBench-style layers with X = H fit on
  chip up to H = 1024 (16 MiB).
- H = 1536 needs 37.7 MB and does not fit the 26 MiB weight buffer. The
  intermediate and cell-state buffers would hold it.

## Simulation

Every `tb/tb_*.sv` is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. A typical build:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lstm_sharp \
  -y rtl -y tb -Irtl -Itb rtl/sharp_pkg.sv tb/sharp_tb_pkg.sv tb/tb_lstm_sharp.sv
./obj_dir/Vtb_lstm_sharp
```

`tb_lstm_sharp` runs the top at its default size (N = 32, K = 32, full buffer
depths). It takes five layers through the design and compares every h_t with a
real-number LSTM reference (tolerance 0.03). The layers are chosen so that
every mechanism above happens at least once:

- all four configurations, table hits and misses;
- padding shrink;
- dependency and credit stalls;
- input/tail overlap;
- DMA held by a write-back;
- the ACC bypass.

It builds in under a minute and simulates in about a second.

Every block also has its own testbench, at reduced sizes. Each compares the
block against an independent reference:

- exact fp16 products and the scalar routing of the VS array;
- the adder tree per configuration, including its fixed latency;
- the accumulators, FIFO and buffers against reference models;
- the merge unit with its bypass;
- the controller's full issue sequence against a reference schedule, with a
  delay model of the downstream pipeline;
- the DMA engine with a stalling grant;
- the A-MFU and cell updater against real-number math.

## Departures and limits

- **Arithmetic.** No subnormals and no NaN. The exp and reciprocal
  approximations are this design's own.
- **Not specified by the original architecture.** The following were chosen
  here:
  - the scalar-selection scheme;
  - the tap positions;
  - the FIFO depth;
  - the table size and its miss default;
  - the buffer layouts;
  - the DMA and host interfaces.
- **Not built:**
  - main memory;
  - bias hardware;
  - bidirectional or multi-layer sequencing (the host runs layers one after
    another);
  - power and energy features.
- **Synthesis** was checked with yosys on the front end only. A full synthesis
  at the default buffer sizes is slow because of the large memory arrays.
