// mmk_writer: drains a completed ROWS x COLS result block to external memory.
//
// When the compute unit holds a result snapshot (snap_valid), the writer
// walks it row by row, selecting each element through (rd_row, rd_col), and
// writes element (r, c) to C address c_base + (row0 + r) * n + (col0 + c).
// Elements outside the matrix (row0 + r >= m or col0 + c >= n) are the
// zero-padded edge of a partial block and are skipped, one per cycle. After
// the last element the writer pulses release_snap, which frees the snapshot
// for the next block.
//
// Interface: (row0, col0) is the origin of the block being drained; the
// scheduler keeps it stable until release_snap. Writes use a valid/ready
// channel carrying one accumulator-wide element per transfer; wr_valid,
// wr_addr and wr_data are held while wr_ready is low. wr_data is the selected
// snapshot element itself (rd_data passed straight through): the snapshot is
// a register array that holds still until release_snap, so a second copy
// here would only add 48 flip-flops.
//
// Timing: the first write is offered the cycle after snap_valid rises; then
// one element per cycle while wr_ready stays high, so a block occupies the
// writer for ROWS*COLS + 1 cycles, and release_snap follows the last write.
//
// The element-serial drain and the write channel are this design's choices;
// the source does not describe how results leave the kernel.
module mmk_writer
  import mmk_pkg::*;
#(
  parameter int unsigned ROWS = 11,
  parameter int unsigned COLS = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  cfg_t cfg,
  input  dim_t row0,
  input  dim_t col0,
  input  logic snap_valid,
  output logic [$clog2(ROWS)-1:0] rd_row,
  output logic [$clog2(COLS)-1:0] rd_col,
  input  acc_t rd_data,
  output logic release_snap,
  output logic busy,
  output logic  wr_valid,
  input  logic  wr_ready,
  output addr_t wr_addr,
  output acc_t  wr_data
);

  logic  act;
  addr_t line_addr;
  logic  in_range, step, last;

  assign in_range = (row0 + dim_t'(rd_row) < cfg.m) && (col0 + dim_t'(rd_col) < cfg.n);
  assign wr_valid = act && in_range;
  assign wr_addr  = line_addr + ADDR_W'(rd_col);
  assign wr_data  = rd_data;
  assign step     = act && (!in_range || wr_ready);
  assign last     = (rd_row == ($clog2(ROWS))'(ROWS - 1)) && (rd_col == ($clog2(COLS))'(COLS - 1));
  assign busy     = act || snap_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act          <= 1'b0;
      rd_row       <= '0;
      rd_col       <= '0;
      line_addr    <= '0;
      release_snap <= 1'b0;
    end else begin
      release_snap <= 1'b0;
      if (!act) begin
        if (snap_valid && !release_snap) begin
          act       <= 1'b1;
          rd_row    <= '0;
          rd_col    <= '0;
          line_addr <= cfg.c_base + ADDR_W'(row0) * ADDR_W'(cfg.n) + ADDR_W'(col0);
        end
      end else if (step) begin
        if (last) begin
          act          <= 1'b0;
          release_snap <= 1'b1;
        end else if (rd_col == ($clog2(COLS))'(COLS - 1)) begin
          rd_col    <= '0;
          rd_row    <= rd_row + 1'b1;
          line_addr <= line_addr + ADDR_W'(cfg.n);
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_addr)));

endmodule
