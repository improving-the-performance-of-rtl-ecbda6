// mmk_top: OpenCL-style matrix-multiplication kernel for CNN layers.
//
// Computes C = A x B for an m x K matrix A and a K x n matrix B, the form
// into which convolution layers (after unrolling their input windows) and
// fully-connected layers are cast by the host. The kernel is built to keep
// every multiplier busy each cycle while on-chip and off-chip bandwidth stay
// within what the device offers:
//   * a compute unit of ROWS x COLS processing elements, each a VEC-lane
//     multiply-accumulator; A vectors are multicast along PE rows and B
//     vectors along PE columns, so ROWS + COLS buffer reads feed
//     ROWS * COLS * VEC multiply-accumulates (mmk_cu);
//   * banked, double-buffered on-chip buffers holding a tile's A and B
//     blocks, one bank per PE row or column, all banks read at one shared
//     address, the next tile loading while the current one computes
//     (mmk_tile_buffer);
//   * 2-D scheduling of output tiles of (x1*ROWS) x (x2*COLS), with x1 and
//     x2 chosen per layer to trade buffer size against external traffic
//     (mmk_scheduler, mmk_loader);
//   * a writer that drains finished result blocks while the PEs compute the
//     next one (mmk_writer).
//
// Interface: cfg is sampled on `start` (see mmk_pkg::cfg_t for the memory
// layout: A row-major, B column-major, both packed VEC values to a vector
// and BEAT vectors to a 64-byte beat, C row-major in accumulator-wide
// elements). K must be a multiple of VEC*BEAT = 32 (the host pads it with
// zeros) and x1*kv, x2*kv must not exceed DEPTH. External memory has a read
// request channel (valid/ready, one beat per request), an in-order read
// response channel without back-pressure, and a valid/ready write channel.
// `done` pulses when the last element of C has been written.
//
// Default sizes: ROWS * COLS * VEC = 11 * 15 * 8 = 1320 multipliers, one per
// DSP block used in the reference implementation. DEPTH = 4096 vectors per
// bank and buffer half holds the VGG-16 conv layers at their published
// <x1, x2> except conv4_2/4_3, which need x2 <= 7; the 26 double-buffered
// banks come to 27.3 Mbit, about the block RAM the reference design uses.
// The split of 1320 into ROWS, COLS and VEC, and DEPTH, are this design's
// choices.
//
// Throughput: the array sustains ROWS*COLS*VEC MACs per cycle while the
// tile data is on chip. External reads move one beat (BEAT vectors) per
// cycle, so a tile whose load takes longer than its computation
// ((x1*ROWS + x2*COLS) * kv / BEAT cycles against x1*x2*kv) is limited by
// the read channel.
module mmk_top
  import mmk_pkg::*;
#(
  parameter int unsigned ROWS  = 11,
  parameter int unsigned COLS  = 15,
  parameter int unsigned DEPTH = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg_in,
  input  logic  start,
  output logic  busy,
  output logic  done,
  output logic  rd_req_valid,
  input  logic  rd_req_ready,
  output addr_t rd_req_addr,
  input  logic  rd_resp_valid,
  input  beat_t rd_resp_data,
  output logic  wr_valid,
  input  logic  wr_ready,
  output addr_t wr_addr,
  output acc_t  wr_data
);

  localparam int unsigned BANK_W  = $clog2(ROWS > COLS ? ROWS : COLS);
  localparam int unsigned WADDR_W = $clog2(DEPTH);

  cfg_t cfg;

  logic ld_start, ld_done, ld_busy, ld_half, rd_half;
  dim_t ld_row0, ld_col0;
  logic a_wr_en, b_wr_en;
  logic [BANK_W-1:0]  ld_bank;
  logic [$clog2(DEPTH/BEAT)-1:0] ld_addr;
  beat_t ld_data;

  logic buf_rd_en, a_rd_valid, b_rd_valid;
  logic [WADDR_W-1:0] a_rd_addr, b_rd_addr;
  vec_t [ROWS-1:0] a_row;
  vec_t [COLS-1:0] b_col;

  logic cu_valid, cu_first, cu_last, finish_ok, snap_valid, release_snap;
  logic [$clog2(ROWS)-1:0] snap_row;
  logic [$clog2(COLS)-1:0] snap_col;
  acc_t snap_data;

  dim_t blk_row0, blk_col0;
  logic wr_busy;

  mmk_scheduler #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) u_sched (
    .clk, .rst_n, .cfg_in, .start, .busy, .done, .cfg,
    .ld_start, .ld_half, .ld_row0, .ld_col0, .ld_done,
    .buf_rd_en, .rd_half, .a_rd_addr, .b_rd_addr,
    .cu_valid, .cu_first, .cu_last, .finish_ok,
    .blk_row0, .blk_col0, .wr_busy
  );

  mmk_loader #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) u_loader (
    .clk, .rst_n, .cfg, .start(ld_start), .row0(ld_row0), .col0(ld_col0),
    .busy(ld_busy), .done(ld_done),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .a_wr_en, .b_wr_en, .wr_bank(ld_bank), .wr_addr(ld_addr), .wr_data(ld_data)
  );

  mmk_tile_buffer #(.NB(ROWS), .DEPTH(DEPTH)) u_abuf (
    .clk, .rst_n,
    .wr_en(a_wr_en), .wr_half(ld_half), .wr_bank(ld_bank[$clog2(ROWS)-1:0]), .wr_addr(ld_addr), .wr_data(ld_data),
    .rd_en(buf_rd_en), .rd_half, .rd_addr(a_rd_addr), .rd_data(a_row), .rd_valid(a_rd_valid)
  );

  mmk_tile_buffer #(.NB(COLS), .DEPTH(DEPTH)) u_bbuf (
    .clk, .rst_n,
    .wr_en(b_wr_en), .wr_half(ld_half), .wr_bank(ld_bank[$clog2(COLS)-1:0]), .wr_addr(ld_addr), .wr_data(ld_data),
    .rd_en(buf_rd_en), .rd_half, .rd_addr(b_rd_addr), .rd_data(b_col), .rd_valid(b_rd_valid)
  );

  mmk_cu #(.ROWS(ROWS), .COLS(COLS)) u_cu (
    .clk, .rst_n,
    .in_valid(cu_valid), .in_first(cu_first), .in_last(cu_last),
    .a_row, .b_col, .finish_ok, .snap_valid,
    .rd_row(snap_row), .rd_col(snap_col), .rd_data(snap_data), .release_snap
  );

  mmk_writer #(.ROWS(ROWS), .COLS(COLS)) u_writer (
    .clk, .rst_n, .cfg, .row0(blk_row0), .col0(blk_col0),
    .snap_valid, .rd_row(snap_row), .rd_col(snap_col), .rd_data(snap_data),
    .release_snap, .busy(wr_busy),
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  // the CU consumes buffer data in the cycle the buffers deliver it
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    cu_valid == (a_rd_valid && b_rd_valid));
  // a tile's blocks must fit the buffer banks
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (32'(cfg_in.x1) * 32'(cfg_in.kv) <= DEPTH &&
                          32'(cfg_in.x2) * 32'(cfg_in.kv) <= DEPTH &&
                          cfg_in.x1 != 0 && cfg_in.x2 != 0 && cfg_in.kv != 0 &&
                          32'(cfg_in.kv) % BEAT == 0));
  // a tile is never loaded into the buffer half the CU is reading
  a_no_load_into_read_half: assert property (@(posedge clk) disable iff (!rst_n)
    (ld_busy && buf_rd_en) |-> (ld_half != rd_half));

endmodule
