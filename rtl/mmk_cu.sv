// mmk_cu: the compute unit, a ROWS x COLS grid of processing elements.
//
// Data reuse inside the CU comes from multicasting: the A vector of row r is
// delivered to all COLS PEs of that row, and the B vector of column c to all
// ROWS PEs of that column, so a single read from each on-chip buffer bank
// feeds a whole row or column of PEs. Per cycle the CU reads ROWS + COLS
// vectors and performs ROWS * COLS * VEC multiply-accumulates.
//
// When a block of ROWS x COLS results completes (the PEs' `done`), all
// accumulators are copied into a result snapshot in the same cycle. The
// writer reads the snapshot element by element through (rd_row, rd_col) and
// frees it with `release_snap`, so the PEs can start the next block while the
// previous one drains. `finish_ok` tells the scheduler whether it may issue
// the last vector of a block: only when the snapshot is free and no earlier
// block's last vector is still in the PE pipeline, so a snapshot is never
// overwritten before it was drained.
//
// Timing: a vector entering in cycle t reaches the accumulators after two
// cycles (mmk_pe); snap_valid rises the cycle after the last vector's
// accumulation, i.e. three cycles after it entered. Control inputs are shared
// by every PE.
//
// Multicasting among PEs follows the source; the snapshot with its
// overlap-and-stall rule is this design's choice.
module mmk_cu
  import mmk_pkg::*;
#(
  parameter int unsigned ROWS = 11,
  parameter int unsigned COLS = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  input  vec_t [ROWS-1:0] a_row,
  input  vec_t [COLS-1:0] b_col,
  output logic finish_ok,
  output logic snap_valid,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  input  logic [$clog2(COLS)-1:0] rd_col,
  output acc_t rd_data,
  input  logic release_snap
);

  acc_t [ROWS-1:0][COLS-1:0] acc;
  logic [ROWS-1:0][COLS-1:0] done;
  acc_t [ROWS-1:0][COLS-1:0] snap;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mmk_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .in_first (in_first),
        .in_last  (in_last),
        .a        (a_row[r]),
        .b        (b_col[c]),
        .acc      (acc[r][c]),
        .done     (done[r][c])
      );
    end
  end

  // number of last vectors inside the PE pipeline (at most one, see finish_ok)
  logic [1:0] last_inflight;
  wire        snap_take = done[0][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_inflight <= '0;
      snap_valid    <= 1'b0;
      snap          <= '0;
    end else begin
      last_inflight <= last_inflight + 2'(in_valid && in_last) - 2'(snap_take);
      if (snap_take) begin
        snap       <= acc;
        snap_valid <= 1'b1;
      end else if (release_snap) begin
        snap_valid <= 1'b0;
      end
    end
  end

  assign finish_ok = !snap_valid && (last_inflight == 0);
  assign rd_data   = snap[rd_row][rd_col];

  // a block may only complete into a free snapshot
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    snap_take |-> !snap_valid);
  a_last_rule: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_last) |-> finish_ok);

endmodule
