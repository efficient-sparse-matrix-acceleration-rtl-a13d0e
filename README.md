# Two-step bitmap sparse matrix accelerator

Pruned and ReLU-activated CNN layers are mostly zeros. A multiply-accumulate
engine that only skips zeros one at a time needs index hardware. Common sparse
formats such as COO and CSR make memory access irregular. This design works
with a weight matrix pruned in whole blocks, and it stores the matrix as a
**two-step bitmap**:

* the **first-step bitmap** has one bit per BR x BC block (1 = the block
  survived pruning);
* the **second-step bitmap** has, for every surviving block only, one bit per
  element (1 = element is nonzero);
* after the bitmaps come the nonzero weights.

Activations carry their own bitmap, one bit per element (ReLU zeros are 0).
From these three bitmaps the accelerator works out which products have two
nonzero operands. It performs only those, four per cycle, and never spends a
multiplier cycle on a zero.

The RTL is a parameterised, synthesizable SystemVerilog model of this
architecture. It computes `C = A x W`. `W` is a K x N weight tile (8 x 8 with
2 x 2 blocks by default). `A` is any number of activation rows of length K.
The result is one output row of length N per activation row.

## The format, by example

The default tile is the 8 x 8 example below. A `.` marks a pruned 2 x 2
block, and 1 marks a nonzero element:

```
element pattern            first-step bitmap    second-step bitmaps (kept blocks,
                           (block rows 0..3)     row-major, each 2x2 row-major)
. . 0 1 . . 1 1            0 1 0 1               blk0 01/10  blk1 11/01
. . 1 0 . . 0 1            1 0 1 0               blk2 10/10  blk3 11/01
1 0 . . 1 1 . .            1 1 0 0               blk4 01/10  blk5 10/10
1 0 . . 0 1 . .            0 1 0 1               blk6 01/10  blk7 10/10
0 1 1 0 . . . .
1 0 1 0 . . . .
. . 0 1 . . 1 0
. . 1 0 . . 1 0
```

The index cost is XY/k + XY(1-S) bits for an X x Y matrix, block size k and
sparsity S. Plain bitmaps cost XY bits. So the two-step form is smaller
whenever 1/k + (1-S) < 1.

Bit numbering used everywhere in the RTL:

* first-step bit `bi*NB + bj` is block row `bi`, block column `bj`
  (NB = N/BC);
* the second-step bitmap of the o-th kept block (row-major order) is bits
  `o*BR*BC ...`, and element (r, c) of the block is bit `r*BC + c`;
* the nonzero weights are stored in that same order.

## Dataflow

```
DRAM --> load_unit --+--> first-step bitmap buffer --+
                     +--> second-step bitmap buffer -+--> gustavson_unit --> index_buffer --+
                     +--> activation bitmap ---------+     (AND, output bitmap,            |
                     +--> input buffer (nonzero activations) ----------+   compaction)       |
                     +--> weight buffer (nonzero weights) -------------+---> spgemm_core <---+
                                                                               | (dot_product)
DRAM <-- store_unit <-- output_buffer <----------------------------------------+
```

`tsb_accel` runs these phases one after another:

1. **LOAD_W**: fetch the weight tile once.
2. **LOAD_A**: fetch one activation row.
3. **GUST**: decode that row against the weights into a list of multiply
   jobs.
4. **CORE**: run the jobs, P per cycle.
5. **STORE**: write the output row.

Steps 2 to 5 repeat for each row. The rows are handled one at a time, each
giving a complete output row. This is the row-wise (Gustavson) order of
sparse matrix multiplication.

## The bitmap decoder (`gustavson_unit`)

This is the part that turns bitmaps into work. It visits one output column
`n` per cycle. For every `k` it forms

```
valid[k] = fsb[block(k,n)]  &  abm[k]  &  ssb_bit(block(k,n), element(k,n))
```

In words: the block bitmap selects the activations that meet a kept block,
and the result is ANDed with the element bitmap. The OR of `valid[]` is the
output bitmap bit of column `n`. Each surviving `k` needs two addresses into
compressed arrays:

* **Activation index**: the number of ones in `abm` below `k`.
* **Weight index**: the block's base, plus the ones that come before the
  element inside its block. The base is the number of nonzero weights in all
  kept blocks before this one. The ordinal and base of every block come from
  one running sum over the first-step and second-step bitmaps. That sum is
  combinational and stays valid while the tile is loaded.

The set positions are then moved to the bottom of the list (each goes to
position = count of ones below it) and appended to the **index buffer**. The
columns are visited in order, so the job list is sorted by output column. The
dot-product chain depends on that order.

## The dot-product chain (`dot_product`)

Each core cycle takes the next P = 4 jobs from the list, wherever the
boundaries between columns fall. Lane i multiplies `In_i x W_i`. The products
then run down a chain:

```
p0 -> [switch0] -> (+p1) -> [switch1] -> (+p2) -> [switch2] -> (+p3) -> out lane 3
          |                    |                    |
       out lane 0           out lane 1           out lane 2
```

A switch passes the running sum on when the next lane belongs to the same
output column. Otherwise it ends the sum: it sends the sum to its output lane
and feeds the constant 0 to the next adder. So one cycle can finish up to
four dot products of any lengths, for example 1+3, 2+2 or 4 x 1. A dot
product that runs over two core cycles is completed in the **output buffer**,
which adds each arriving segment sum into its column.

## Timing

At the default size, with all phases in sequence, the compute time per
activation row is:

| phase | cycles |
|---|---|
| GUST (decoder and hand-over) | N + 2 |
| CORE (core and hand-over) | ceil(jobs / P) + 3 |

`jobs` is the number of (k, n) pairs whose activation and weight are both
nonzero. The core alone takes ceil(jobs/P) + 1 cycles from `start` to
`done`. The load unit streams one word per cycle when the memory grants. The
store unit writes ceil(N/32) + N words per row.

Measured on a 64 x 64 tile with 2 x 2 blocks, 4 rows, and the kept blocks
fully dense (`tb_sparsity_sweep`). Compute time is compared with a dense
engine that has the same 4 multipliers (K*N/P cycles per row):

| weight sparsity | activation sparsity 0 % | 50 % | 87.5 % | words read vs dense |
|---|---|---|---|---|
| 50 % | 44 % fewer cycles | 69 % | 87 % | 55 % |
| 75 % | 69 % fewer cycles | 82 % | 91 % | 31 % |

At 8 x 8 the fixed N-cycle decode is as long as the dense 16 cycles per row,
so the design gains nothing there. The gain appears as tiles grow.

## Memory layout and interfaces

The memory word (`MEM_W`) is 32 bits, and addresses are word addresses.

* **Weights at `w_base`**: ceil(NBLK/32) first-step words, then
  ceil(kept*BR*BC/32) second-step words, then the nonzero weights.
* **Activation rows from `a_base`, back to back**: ceil(K/32) bitmap words,
  then the nonzero values.
* **Output row m at `o_base + m*(ceil(N/32)+N)`**: ceil(N/32) output-bitmap
  words, then N dense values.

No lengths are stored. The load unit counts the ones of each bitmap word as
it arrives and sizes the next burst from that count.

The top-level ports are as follows.

* **Control**: `start`, `w_base`, `a_base`, `o_base`, `num_rows` (16 bits),
  `busy`, and `done` (a one-cycle pulse).
* **Read channel**:
  * `rd_req`/`rd_addr` with `rd_gnt`: a request is taken when both
    `rd_req` and `rd_gnt` are high.
  * `rd_rvalid`/`rd_rdata`: data returns in request order, after any
    latency.
* **Write channel**: `wr_req`/`wr_addr`/`wr_data` with `wr_gnt`.
* **Counters** (cleared by `start`):
  * `perf_compute_cycles`: cycles in the GUST and CORE phases.
  * `perf_macs`: multiplications performed.
  * `perf_total_cycles`: all cycles of the last run.
  * `perf_splits`: segments a switch ended before the last lane of a cycle.

Values are signed two's complement. Products and sums wrap at 32 bits.

## Parameters (`tsb_pkg` defaults)

| name | default | meaning |
|---|---|---|
| `K`, `N` | 8, 8 | weight tile rows (= activation length) and columns |
| `BR`, `BC` | 2, 2 | block height and width (block size k = 4) |
| `P` | 4 | multipliers / lanes of the dot-product chain |
| `DATA_W` | 32 | activation and weight width |
| `ACC_W` | 32 | product and accumulator width (wrapping) |
| `MEM_W`, `ADDR_W` | 32, 32 | memory word and address width |

K must be a multiple of BR, and N a multiple of BC.

## Files

| file | contents |
|---|---|
| `rtl/tsb_pkg.sv` | default sizes, phase enum |
| `rtl/tsb_accel.sv` | top level: phase sequencer, wiring, counters |
| `rtl/load_unit.sv` | DRAM reader that steers words into the buffers |
| `rtl/bitmap_buffer.sv` | word-written, whole-vector-read bitmap (first-step, second-step and activation bitmaps) |
| `rtl/value_buffer.sv` | compressed value store with P read ports (input and weight buffers) |
| `rtl/gustavson_unit.sv` | bitmap AND, output bitmap, index arithmetic, compaction |
| `rtl/index_buffer.sv` | job list; multi-entry append, P-wide read window |
| `rtl/dot_product.sv` | P multipliers with the switch/adder chain |
| `rtl/spgemm_core.sv` | job fetch, operand read, dot-product, one register stage |
| `rtl/output_buffer.sv` | per-column accumulators and output bitmap |
| `rtl/store_unit.sv` | writes the output row to DRAM |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sparsity_sweep` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tsb_pkg.sv tb/tb_tsb_accel.sv \
          --top-module tb_tsb_accel -o sim && ./obj_dir/sim
```

Replace `tb_tsb_accel` with any other testbench name. The testbenches are as
follows.

* **`tb_tsb_accel`**: end-to-end at the default size. It contains a DRAM
  model with random grant stalls and random read latency. It runs:
  * the 8 x 8 example pattern above;
  * 16 random tiles at 50 % and 75 % column-balanced block sparsity, with
    activation sparsity from 0 to 87.5 %;
  * a tile with every block pruned.

  It compares every output word with a dense reference product, checks the
  cycle formula, and counts every mechanism (block skip, activation skip,
  element skip, switch split, a dot product spanning two cycles, all-zero
  columns, rows without jobs, read and write stalls).
* **`tb_sparsity_sweep`**: the 64 x 64 sweep above. It also exercises bitmaps
  that span several words.
* **Unit testbenches**: each checks its module against a model written
  independently in the testbench. `tb_gustavson_unit` feeds the literal
  first- and second-step bitmaps of the example.

## How far this follows the described architecture

These parts follow the architecture:

* the two-step format and its example;
* the block set: load, three bitmap buffers, the decoder that ANDs the
  bitmaps, the index store, the input and weight buffers, the SpGEMM core,
  the output buffer and the store;
* the AND of the bitmaps, the output bitmap and the shift-down compaction;
* four PEs, each fetching the operands its job points at;
* the dot-product chain of multipliers, switches, adders and a zero input;
* the 32-bit values.

These are this design's own choices, because the architecture leaves them
open:

* the exact meaning of the switch, which ends a sum at an output-column
  change;
* one decoder column per cycle;
* running the phases in strict sequence, with no overlap between decoding
  and multiplying;
* the DRAM layout and the request/grant handshakes;
* accumulating in the output buffer;
* the wrap-around 32-bit accumulator;
* the reset style;
* the performance counters.

The activation bitmap is routed into the decoder, because the decoder needs
it to filter activations.

Not included:

* the FPGA system around the engine (AXI interconnect, DMA, decoder IP);
* the CNN layers generated by a high-level-synthesis flow;
* tiling of layers larger than one K x N tile. A host must cut a layer into
  tiles and add the partial results.

Known limits:

* The tile size is fixed at elaboration.
* The combinational prefix sums in the decoder grow with (K/BR)*(N/BC), which
  limits clock speed for large tiles.
* Accuracy effects of quantization are outside the RTL.
