// mmk_scheduler: two-dimensional work-item scheduling of the kernel.
//
// The output matrix C is cut into tiles of (x1*ROWS) x (x2*COLS) elements,
// x1 and x2 being run-time configuration. For every tile, in row-major tile
// order, the scheduler has the loader bring the A block (x1*ROWS rows) and
// the B block (x2*COLS columns) on chip, then runs the compute unit over the
// x1 * x2 CU-sized blocks of the tile, row by row. The tile buffers are
// double-buffered: as soon as the compute unit starts on a tile, the loader
// is started on the next tile into the other half, so loading and computing
// overlap and a tile waits only if its load has not finished. Each A vector is thus
// fetched from external memory once per tile and reused x2 times from the
// buffer, each B vector reused x1 times; 1-D scheduling is the case x1 = 1
// or x2 = 1. Blocks that lie entirely outside C are skipped.
//
// For a block (bi, bj) the scheduler reads buffer words bi*kv + k (A) and
// bj*kv + k (B), k = 0..kv-1, one per cycle, and passes valid/first/last to
// the CU aligned with the buffers' one-cycle read latency. It holds the
// last read of a block while the CU's result snapshot is still being drained
// (finish_ok low) or another last vector is in flight: that is the only
// stall inside a tile. When it issues a block's last vector it publishes the
// block's origin (blk_row0, blk_col0) for the writer.
//
// Interface: `start` (one cycle, while idle) latches cfg; `busy` is high
// until every result of the last block has been written; `done` pulses once
// then. Timing per block with no stall: kv cycles.
//
// Tiling the output in two dimensions with per-layer <x1, x2> follows the
// source, as does overlapping computation with memory access (assumed by
// its performance model); the loop order, the double buffering, the skip of
// empty blocks and the stall rule are this design's choices.
module mmk_scheduler
  import mmk_pkg::*;
#(
  parameter int unsigned ROWS  = 11,
  parameter int unsigned COLS  = 15,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned WADDR_W = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  cfg_t cfg_in,
  input  logic start,
  output logic busy,
  output logic done,
  output cfg_t cfg,
  // loader
  output logic ld_start,
  output logic ld_half,
  output dim_t ld_row0,
  output dim_t ld_col0,
  input  logic ld_done,
  // tile buffer reads
  output logic               buf_rd_en,
  output logic               rd_half,
  output logic [WADDR_W-1:0] a_rd_addr,
  output logic [WADDR_W-1:0] b_rd_addr,
  // compute unit
  output logic cu_valid,
  output logic cu_first,
  output logic cu_last,
  input  logic finish_ok,
  // writer
  output dim_t blk_row0,
  output dim_t blk_col0,
  input  logic wr_busy
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_LOAD, S_BLOCK, S_NEXT_BLOCK, S_NEXT_TILE, S_FLUSH} state_t;
  state_t state;

  dim_t tile_h, tile_w;           // x1*ROWS, x2*COLS
  dim_t row0, col0;               // tile origin
  dim_t bi, bj;                   // block within tile
  dim_t brow0, bcol0;             // block origin
  dim_t k;
  logic [WADDR_W-1:0] a_off, b_off;
  logic ld_ready;                 // a load has completed and not been used yet

  // origin of the tile after (r0, c0), row-major over tiles
  function automatic logic next_tile(dim_t r0, dim_t c0, output dim_t nr0, output dim_t nc0);
    nr0 = r0;
    nc0 = c0;
    if (c0 + tile_w < cfg.n) begin
      nc0 = c0 + tile_w;
      return 1'b1;
    end
    if (r0 + tile_h < cfg.m) begin
      nr0 = r0 + tile_h;
      nc0 = '0;
      return 1'b1;
    end
    return 1'b0;
  endfunction

  logic has_next;
  dim_t nxt_row0, nxt_col0;
  always_comb has_next = next_tile(row0, col0, nxt_row0, nxt_col0);

  wire  is_last_k = (k == cfg.kv - 1);
  wire  stall     = is_last_k && (!finish_ok || cu_last);
  wire  issue     = (state == S_BLOCK) && !stall;

  assign buf_rd_en = issue;
  assign a_rd_addr = a_off + WADDR_W'(k);
  assign b_rd_addr = b_off + WADDR_W'(k);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg      <= '0;
      tile_h   <= '0;
      tile_w   <= '0;
      row0     <= '0;
      col0     <= '0;
      bi       <= '0;
      bj       <= '0;
      brow0    <= '0;
      bcol0    <= '0;
      k        <= '0;
      a_off    <= '0;
      b_off    <= '0;
      ld_start <= 1'b0;
      ld_half  <= 1'b0;
      ld_ready <= 1'b0;
      rd_half  <= 1'b0;
      ld_row0  <= '0;
      ld_col0  <= '0;
      cu_valid <= 1'b0;
      cu_first <= 1'b0;
      cu_last  <= 1'b0;
      blk_row0 <= '0;
      blk_col0 <= '0;
      done     <= 1'b0;
    end else begin
      ld_start <= 1'b0;
      done     <= 1'b0;
      cu_valid <= issue;
      cu_first <= issue && (k == 0);
      cu_last  <= issue && is_last_k;
      if (ld_done) ld_ready <= 1'b1;
      case (state)
        S_IDLE: if (start) begin
          cfg      <= cfg_in;
          tile_h   <= dim_t'(cfg_in.x1 * ROWS);
          tile_w   <= dim_t'(cfg_in.x2 * COLS);
          row0     <= '0;
          col0     <= '0;
          ld_row0  <= '0;
          ld_col0  <= '0;
          ld_half  <= 1'b0;
          ld_ready <= 1'b0;
          ld_start <= 1'b1;
          state    <= S_WAIT_LOAD;
        end
        S_WAIT_LOAD: if (ld_ready) begin
          // tile (row0, col0) is in half ld_half: compute it from there and
          // prefetch the next tile into the other half
          ld_ready <= 1'b0;
          rd_half  <= ld_half;
          if (has_next) begin
            ld_row0  <= nxt_row0;
            ld_col0  <= nxt_col0;
            ld_half  <= !ld_half;
            ld_start <= 1'b1;
          end
          bi    <= '0;
          bj    <= '0;
          brow0 <= row0;
          bcol0 <= col0;
          a_off <= '0;
          b_off <= '0;
          k     <= '0;
          state <= S_BLOCK;
        end
        S_BLOCK: if (issue) begin
          if (is_last_k) begin
            k        <= '0;
            blk_row0 <= brow0;
            blk_col0 <= bcol0;
            state    <= S_NEXT_BLOCK;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_NEXT_BLOCK: begin
          // advance (bi, bj); skip blocks with no element inside C
          if (bj != cfg.x2 - 1) begin
            bj    <= bj + 1'b1;
            bcol0 <= bcol0 + dim_t'(COLS);
            b_off <= b_off + WADDR_W'(cfg.kv);
            state <= (bcol0 + dim_t'(COLS) < cfg.n && brow0 < cfg.m) ? S_BLOCK : S_NEXT_BLOCK;
          end else if (bi != cfg.x1 - 1) begin
            bj    <= '0;
            bcol0 <= col0;
            b_off <= '0;
            bi    <= bi + 1'b1;
            brow0 <= brow0 + dim_t'(ROWS);
            a_off <= a_off + WADDR_W'(cfg.kv);
            state <= (brow0 + dim_t'(ROWS) < cfg.m) ? S_BLOCK : S_NEXT_BLOCK;
          end else begin
            state <= S_NEXT_TILE;
          end
        end
        S_NEXT_TILE: begin
          if (has_next) begin
            row0  <= nxt_row0;
            col0  <= nxt_col0;
            state <= S_WAIT_LOAD;
          end else begin
            state <= S_FLUSH;
          end
        end
        S_FLUSH: if (finish_ok && !cu_last && !wr_busy) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
