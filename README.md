# A matrix-multiplication kernel for CNN inference with multicast PEs and 2-D tiling

Large FPGAs have well over a thousand DSP blocks, and a CNN accelerator only
reaches the device's datasheet throughput if every one of them does a
multiply-accumulate every cycle. For the convolution layers of a network such
as VGG-16 the limit is not DRAM bandwidth, because each weight and pixel is
reused many times. The limit is the on-chip memory bandwidth. A multiply-accumulate
needs one fresh operand pair, but block RAMs deliver only a few words per
cycle. This design is built around two answers to that:

* **Multicast inside the compute unit.** Operands are read from on-chip memory
  once and sent to a whole row or column of processing elements (PEs). A grid
  of `ROWS x COLS` PEs then needs only `ROWS + COLS` buffer reads per cycle to
  do `ROWS * COLS * VEC` multiply-accumulates.
* **Two-dimensional tiling of the output.** The result matrix is worked on in
  tiles whose height and width (`x1`, `x2`) are chosen per layer. Each
  operand fetched from DRAM is then reused across a whole tile, which keeps
  external traffic within what the board's memory can deliver.

The RTL implements this as one kernel that computes `C = A x B`. Every
convolution layer and every fully-connected layer is cast into that form by
the host. The structure follows the accelerator described in *Improving the
Performance of OpenCL-based FPGA Accelerator for Convolutional Neural
Network*: 1320 DSPs at 370 MHz on an Arria 10 GX1150, with multicasting among
PEs and 2-D work-item scheduling. That description gives the ideas and the
headline numbers but not the micro-architecture. Everything below the block
level is this design's own, and the section "How far this follows the
published design" lists where the two may differ.

## From a layer to a matrix product

The kernel only multiplies matrices. The host lowers a layer as follows:

* **Convolution.** Take `N_of` output channels, `N_if` input channels and
  `k x k` kernels. Row `o` of `A` holds the `N_if*k*k` weights of output
  channel `o`. Column `p` of `B` holds the `N_if*k*k` input values under the
  window of output pixel `p`. Both use the same order: channel, kernel row,
  kernel column. `C[o][p]` is then output channel `o` at pixel `p`.
* **Fully-connected.** Weights form `A` and the input vector (or a batch of
  them) forms `B`.

Operands are 16-bit signed fixed point. They are packed `VEC = 8` to a
128-bit *vector*, and a vector is the unit the compute unit consumes.
External reads move a *beat* of `BEAT = 4` vectors (64 bytes); beat `w`
holds vectors `4w` to `4w+3`. The memory layout is:

| matrix | layout in external memory | address of element |
|---|---|---|
| A (m x K) | row-major, vectors along K | row `i`, beat `k`: `a_base + i*kv/4 + k` |
| B (K x n) | column-major, vectors along K | column `j`, beat `k`: `b_base + j*kv/4 + k` |
| C (m x n) | row-major, one 48-bit element per word | `c_base + i*n + j` |

Here `kv = K / VEC`. `K` must be a multiple of `VEC*BEAT = 32`, so that every
row and column starts on a beat; the host pads with zeros.
For example, the first VGG layer has `K = 27`, which is padded to 32. Results
leave the kernel at full accumulator width. Scaling and rounding them back to
16 bits is left to the next stage.

## The compute unit: one read, many PEs

`mmk_cu` is a grid of `ROWS x COLS` PEs; the default is 11 x 15. Each cycle:

* the A-buffer delivers one vector per PE row, and that vector goes to all
  `COLS` PEs of the row;
* the B-buffer delivers one vector per PE column, and that vector goes to all
  `ROWS` PEs of the column;
* PE `(r, c)` multiplies its two vectors lane by lane, adds the 8 products,
  and adds the sum to its accumulator (`mmk_pe`).

Over `kv` cycles, PE `(r, c)` therefore forms the complete dot product of one
row of A and one column of B: a `ROWS x COLS` block of C. The default has
11 * 15 * 8 = 1320 multipliers, one per DSP block of the reference
implementation. The grid is fed by 26 vector reads per cycle.

A PE has two pipeline stages: the products are registered first, then the
adder tree and the accumulation run. Each vector carries `first` and `last`
flags. `first` restarts the accumulator, so blocks run back to back with no
clearing cycle. A vector that enters in cycle `t` is in the accumulator at
the end of `t+2`.

### Block completion, the snapshot and the only stall

When a block's last vector has been accumulated, all `ROWS*COLS`
accumulators are copied into a snapshot register in one cycle (3 cycles
after the last vector entered). The PEs can then start the next block at
once.

The writer (`mmk_writer`) drains the snapshot to external memory at one
element per cycle and then releases it. The drain takes `ROWS*COLS + 1`
cycles. If a block is shorter than that (`kv < 166` at the default size),
the next block would finish before the snapshot is free.

The rule that prevents this: the scheduler holds back the last vector of a
block until `finish_ok` is high. `finish_ok` is high only while the snapshot
is free and no other last vector is in the PE pipeline. Assertions in
`mmk_cu` check that a snapshot is never overwritten. For the deep layers
(`kv` of 144 to 576) the drain is hidden completely. For shallow layers
(conv1_1, `kv = 4`) the writer sets the pace.

## Tiles, buffers and the 2-D schedule

The output matrix is cut into tiles of `(x1*ROWS) x (x2*COLS)` elements.
`x1` and `x2` are run-time settings. The scheduler (`mmk_scheduler`) handles
each tile in row-major tile order:

1. The loader (`mmk_loader`) fetches the tile's A block (`x1*ROWS` rows of
   `kv` vectors) and its B block (`x2*COLS` columns). Each block is a single
   contiguous run of addresses.
2. The CU runs over the tile's `x1*x2` blocks, row by row. Block `(bi, bj)`
   reads A-buffer vectors `bi*kv + k` and B-buffer vectors `bj*kv + k`, for
   `k = 0 .. kv-1`, at one vector per cycle.

So every A vector fetched from DRAM is used `x2` times and every B vector
`x1` times. Per tile, the kernel reads `(x1*ROWS + x2*COLS) * kv` vectors and
computes for `x1*x2*kv` cycles; loading takes one cycle per beat, a
quarter of the vector count. The published per-layer settings are
<6,13>, <6,4>, <5,3>, <7,9> and <4,5> for conv1 to conv5. With `x1 = 1` or
`x2 = 1` the schedule becomes one-dimensional.

The tile buffers (`mmk_tile_buffer`) have one bank per PE row (A) or per PE
column (B):

* Line `l` of a block goes to bank `l mod NB`, at vector `(l / NB) * kv + k`.
  A bank word is one beat, so the loader stores a whole beat per cycle and
  the read side picks one of its four vectors.
* All banks share one read address. The CU's per-row and per-column operands
  therefore come from a single buffer read, and no operand is stored twice.
  Without multicast, every PE would need its own copies.
* Each bank holds two halves of `DEPTH` vectors. The loader fills one half
  with the next tile while the CU reads the current tile from the other.
* A tile waits only if its prefetch has not finished. An assertion in
  `mmk_top` checks that the loader never writes the half that is being read.

Edges: rows and columns beyond `m` or `n` are not fetched. Their buffer beats
are written with zeros, so PEs on them compute zeros, which the writer
discards. Blocks that lie wholly outside C are skipped, so they cost no
compute cycles.

## Interfaces

All ports of `mmk_top` are plain signals. `cfg_in` is a packed struct
(`mmk_pkg::cfg_t`) that is sampled on `start`:

| field | meaning |
|---|---|
| `m`, `n` | rows and columns of C (16 bits) |
| `kv` | reduction length in vectors (`K/8`), a multiple of 4 |
| `x1`, `x2` | tile height and width in CU blocks; `x1*kv` and `x2*kv` must not exceed `DEPTH`; none may be 0 |
| `a_base`, `b_base` | beat addresses of A and B |
| `c_base` | element address of C |

External memory is reached through three channels:

* **Read request:** `rd_req_valid`, `rd_req_ready`, `rd_req_addr`. This is a
  valid/ready handshake, one 64-byte beat per request.
* **Read response:** `rd_resp_valid`, `rd_resp_data` (one beat). Responses come back in
  request order and cannot be back-pressured. Any number of requests may be
  outstanding.
* **Write:** `wr_valid`, `wr_ready`, `wr_addr`, `wr_data`, one 48-bit element
  per transfer. The address, data and valid are held while ready is low.

`busy` is high from `start` until the last element of C has been written,
and `done` pulses at that point. Reset (`rst_n`) is asynchronous and active
low. The buffer memories themselves are not reset.

## Timing and measured throughput

With data on chip, the CU is fed one vector pair per cycle. A block takes
exactly `kv` cycles, and the testbenches check this. The whole run takes
`ceil(m/ROWS) * ceil(n/COLS) * kv` compute cycles, plus load time that is
not hidden and any drain stalls.

One VGG-16 conv5 layer ran on the default-size kernel (512 to 512 channels,
14 x 14, <4,5>, `tb_mmk_conv_layer`):

* 462 M multiply-accumulates;
* 379,008 compute cycles;
* 653,946 cycles in total, which is 707 MACs/cycle out of 1320.

The layer is limited by the read channel. Each full tile reads 119 lines of
576 vectors, which is 17.1 k beats (cycles), but computes for only 11.5 k
cycles. The loader writes a whole beat into a bank per cycle, so the read
channel is the limit, not the buffer ports. At 370 MHz one 64-byte beat per
cycle is 23.7 GB/s, which is already more than the board's DDR4 (17 GB/s)
offers, so on real memory the layer would run slower still.

`tb_mmk_vgg_layers` runs one layer of each other VGG-16 size on the same
kernel, with the same memory model (8-cycle latency, 5% random stalls):

| layer | channels, size | <x1,x2> | cycles | MAC/cycle | limited by |
|---|---|---|---|---|---|
| conv1_1 | 3 -> 64, 224 x 224 | <6,13> | 3,602,404 | 24 | drain |
| conv1_2 | 64 -> 64, 224 x 224 | <6,13> | 3,606,676 | 513 | drain |
| conv2_2 | 128 -> 128, 112 x 112 | <6,4> | 2,009,355 | 921 | reads, drain |
| conv3_2 | 256 -> 256, 56 x 56 | <5,3> | 2,654,793 | 697 | reads |
| conv4_1 | 256 -> 512, 28 x 28 | <7,9> | 751,055 | 1231 | compute |
| conv4_2 | 512 -> 512, 28 x 28 | <7,7> | 1,583,388 | 1168 | compute |
| conv5 | 512 -> 512, 14 x 14 | <4,5> | 653,946 | 707 | reads |
| fc7 | 4096 -> 4096, one vector | <1,1> | 1,276,584 | 13 | reads, zero fill |

Two limits show up besides the read channel:

* **Drain.** The writer empties a block's snapshot at one element per
  cycle, so a block costs at least `ROWS*COLS + 1 = 166` cycles. When `kv`
  is below that (conv1 has `kv` = 4 and 72, conv2 has 144), the CU stalls
  on the snapshot rule and the drain sets the pace.
* **Zero fill.** Edge lines are written with zeros one beat per cycle. With
  `n = 1` (fc7), 14 of the 15 B lines of every tile are zero fill.

The published design reports 2568 GOP/s on the conv layers (about 3470 ops
per cycle at 370 MHz). This RTL does not reach that; see the next section.

## How far this follows the published design

Taken from the published accelerator:

* the matrix-multiplication formulation;
* a compute unit of PEs with operands multicast among them;
* double use of on-chip data through 2-D tiling, with per-layer <x1, x2>;
* the 1320-multiplier budget and the per-layer tile settings.

This design's own choices, where the description gives no detail:

* **Number format.** The datasheet figure is quoted in GFLOP/s, but the
  reported 3.06 ops/DSP/cycle is more than one floating-point multiply-add
  per DSP can give. 16-bit fixed point with 48-bit accumulation was chosen.
* **Array shape.** `ROWS=11`, `COLS=15`, `VEC=8` is one split of 1320;
  nothing fixes it.
* **Meaning of x1 and x2.** The published bandwidth model also has a third
  variable `x0`, apparently a split of the reduction dimension with on-chip
  partial sums. It was not built: a tile always holds all of K. The
  published DRAM bandwidths (about 11 GB/s at full speed) imply far more
  reuse per fetched byte than tiles of `(x1*11) x (x2*15)` give. So `x1`
  and `x2` probably count larger units in the original than they do here.
* **conv4_2/4_3 do not fit at <7,9>.** The B block is 9*576 = 5184 vectors,
  more than `DEPTH = 4096`. They fit with `x2 <= 7`. `DEPTH` was sized so
  that the 26 double-buffered banks (27.3 Mbit) come close to the block RAM
  the published implementation uses (1250 M20K blocks).
* **Buffers, loader, writer, snapshot, interfaces.** Double buffering, the
  element-serial writer, the snapshot and its stall rule, and all interfaces
  are this design's choices. The original kernel is an OpenCL library
  component with vendor interfaces, which are replaced here by plain
  valid/ready channels.
* **Read channel width.** The external read channel carries one 64-byte
  beat per cycle, and each bank word holds one beat. The width was picked
  as the power of two just above the board bandwidth per cycle (17 GB/s at
  370 MHz is 46 bytes). Even so the tiles here reuse too little data, so
  throughput stays below the published numbers.
* **What is not included.** The host program, the OpenCL runtime and the
  DDR4 controller are not part of the RTL. The testbenches use a behavioural
  memory model (`tb/mmk_ext_mem.sv`) and do the host's layout work
  themselves.

## Files

| file | contents |
|---|---|
| `rtl/mmk_pkg.sv` | widths, vector and configuration types |
| `rtl/mmk_pe.sv` | one PE: 8-lane multiply, adder tree, accumulator |
| `rtl/mmk_cu.sv` | PE grid with row/column multicast, snapshot, `finish_ok` |
| `rtl/mmk_tile_buffer.sv` | banked, double-buffered operand buffer with a shared read address |
| `rtl/mmk_loader.sv` | fetches a tile's A and B blocks, zero-fills edges |
| `rtl/mmk_writer.sv` | drains result blocks to external memory |
| `rtl/mmk_scheduler.sv` | 2-D tile and block schedule, prefetch, stall rule |
| `rtl/mmk_top.sv` | the kernel |
| `tb/mmk_ext_mem.sv` | behavioural external memory with random back-pressure |
| `tb/tb_mmk_*.sv` | one self-checking testbench per module |
| `tb/tb_mmk_conv_layer.sv` | the VGG-16 conv5 layer on the default-size kernel, checked against a direct convolution |
| `tb/tb_mmk_vgg_layers.sv` | seven more VGG-16 layers (conv1 to conv4, fc7) on the default-size kernel, run back to back |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=F`. Each one has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/mmk_pkg.sv tb/tb_mmk_top.sv --top-module tb_mmk_top -o sim
./obj_dir/sim
```

The testbenches:

* **`tb_mmk_top`** runs a 3 x 4-PE kernel with 64-vector bank halves through
  17 products with random sizes and tilings. It checks:
  * every element of C;
  * that nothing outside C is written;
  * the exact numbers of compute cycles and DRAM reads.

  It also counts how often each mechanism occurs and fails if one never
  does. The mechanisms are: snapshot stall, edge zero-fill, block skip,
  drain/compute overlap, load/compute overlap, multi-tile 2-D schedules,
  and read and write back-pressure.
* **`tb_mmk_conv_layer`** uses the default sizes. It takes about 1.5 minutes
  to compile and 10 seconds to run. To try other layers, change its `NIF`,
  `NOF`, `HW`, `X1` and `X2`.
* **`tb_mmk_vgg_layers`** also uses the default sizes. It runs the layers
  in the table above one after another, without a reset in between, and
  takes about 2 minutes to run. On the five largest layers it compares the
  outputs of every fourth channel; on the others, every output.
* **The unit testbenches** (`tb_mmk_pe`, `tb_mmk_cu`, `tb_mmk_tile_buffer`,
  `tb_mmk_loader`, `tb_mmk_writer`, `tb_mmk_scheduler`) check their module
  against models written in the testbench, including cycle timing.

## Changing the design

* **Array shape:** `ROWS` and `COLS` are parameters of `mmk_top`.
* **Vector width and word widths:** `VEC`, `DATA_W` and `ACC_W` live in
  `mmk_pkg`. Raise `ACC_W` if `K * 2^(2*DATA_W-2)` approaches `2^(ACC_W-1)`.
* **`DEPTH`** must be a power of two. It bounds `x1*kv` and `x2*kv`.
* **Beat width:** `BEAT` lives in `mmk_pkg` and must be a power of two.
  `DEPTH` must be at least `2*BEAT`, and `kv` a multiple of `BEAT`.
* **Throughput:** the read channel is already wider than the board's memory.
  The next step is the reduction-dimension split (`x0`), so that each tile
  covers more output per fetched byte.
