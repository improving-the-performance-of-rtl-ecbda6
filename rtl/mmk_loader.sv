// mmk_loader: fills the on-chip tile buffers from external memory.
//
// For the tile whose top-left output element is (row0, col0) the loader
// fetches the A block, x1*ROWS rows of kv vectors, and then the B block,
// x2*COLS columns of kv vectors. Line l of a block goes to bank l mod NB of
// its buffer, at vector (l / NB) * kv + k (see mmk_tile_buffer). Because A is
// stored row after row and B column after column, each block is one
// contiguous run of external addresses, read as a burst of one-beat
// requests; kv being a multiple of BEAT, every beat lies in one line and is
// written to its bank as one buffer word. Lines beyond the matrix edge (row0 + l >= m, col0 + l >= n) are
// not read; their buffer words are written with zeros so the PEs that work
// on them produce zeros that the writer then discards.
//
// Two walkers step through the same (block, line, k) sequence: one issues
// requests, the other consumes the in-order responses and writes the
// buffers, so any number of requests may be outstanding.
//
// Interface: `start` (one cycle, while idle) latches row0/col0; `busy` stays
// high until the last buffer word is written; `done` pulses in the cycle
// after that write, when the buffers can be read. External
// reads use a valid/ready request channel and a response channel without
// back-pressure; responses return in request order.
//
// The source names the loading of tile data from DDR4 into on-chip memory;
// the sequence, edge handling and handshake are this design's choices.
module mmk_loader
  import mmk_pkg::*;
#(
  parameter int unsigned ROWS  = 11,
  parameter int unsigned COLS  = 15,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned BANK_W = $clog2(ROWS > COLS ? ROWS : COLS),
  localparam int unsigned WADDR_W = $clog2(DEPTH / BEAT)
) (
  input  logic clk,
  input  logic rst_n,
  input  cfg_t cfg,
  input  logic start,
  input  dim_t row0,
  input  dim_t col0,
  output logic busy,
  output logic done,
  // external memory read
  output logic  rd_req_valid,
  input  logic  rd_req_ready,
  output addr_t rd_req_addr,
  input  logic  rd_resp_valid,
  input  beat_t rd_resp_data,
  // tile buffer write ports
  output logic               a_wr_en,
  output logic               b_wr_en,
  output logic [BANK_W-1:0]  wr_bank,
  output logic [WADDR_W-1:0] wr_addr,
  output beat_t              wr_data
);

  typedef struct packed {
    logic               act;   // sequence not finished
    logic               sel;   // 0: A block, 1: B block
    dim_t               blk;   // line / NB
    logic [BANK_W-1:0]  bank;  // line mod NB
    dim_t               k;     // beat within the line
    logic [WADDR_W-1:0] base;  // blk * kv / BEAT
    dim_t               line;  // global row (A) or column (B) index
  } walk_t;

  dim_t col0_q;
  dim_t kvb;                   // beats per line

  assign kvb = cfg.kv >> $clog2(BEAT);

  function automatic walk_t walk_init(dim_t r0);
    walk_t w;
    w      = '0;
    w.act  = 1'b1;
    w.line = r0;
    return w;
  endfunction

  function automatic walk_t walk_step(walk_t w);
    walk_t n;
    logic  last_bank, last_blk;
    n         = w;
    last_bank = w.sel ? (w.bank == BANK_W'(COLS - 1)) : (w.bank == BANK_W'(ROWS - 1));
    last_blk  = w.sel ? (w.blk == cfg.x2 - 1) : (w.blk == cfg.x1 - 1);
    if (w.k != kvb - 1) begin
      n.k = w.k + 1'b1;
    end else begin
      n.k    = '0;
      n.line = w.line + 1'b1;
      if (!last_bank) begin
        n.bank = w.bank + 1'b1;
      end else begin
        n.bank = '0;
        if (!last_blk) begin
          n.blk  = w.blk + 1'b1;
          n.base = w.base + WADDR_W'(kvb);
        end else begin
          n.blk  = '0;
          n.base = '0;
          n.line = col0_q;
          n.sel  = 1'b1;
          n.act  = !w.sel;
        end
      end
    end
    return n;
  endfunction

  function automatic logic in_range(walk_t w);
    return w.sel ? (w.line < cfg.n) : (w.line < cfg.m);
  endfunction

  walk_t rq, rs;
  addr_t rq_addr;

  wire rq_skip = rq.act && !in_range(rq);
  wire rq_fire = rd_req_valid && rd_req_ready;
  wire rs_skip = rs.act && !in_range(rs);
  wire rs_fire = rs.act && in_range(rs) && rd_resp_valid;

  assign rd_req_valid = rq.act && in_range(rq);
  assign rd_req_addr  = rq_addr;
  logic last_wr;
  assign busy         = rs.act || last_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq      <= '0;
      rs      <= '0;
      rq_addr <= '0;
      col0_q  <= '0;
      done    <= 1'b0;
      last_wr <= 1'b0;
      a_wr_en <= 1'b0;
      b_wr_en <= 1'b0;
      wr_bank <= '0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      done    <= last_wr;
      last_wr <= 1'b0;
      a_wr_en <= 1'b0;
      b_wr_en <= 1'b0;
      if (start && !busy) begin
        col0_q  <= col0;
        rq      <= walk_init(row0);
        rs      <= walk_init(row0);
        rq_addr <= cfg.a_base + ADDR_W'(row0) * ADDR_W'(kvb);
      end else begin
        if (rq_fire || rq_skip) begin
          rq <= walk_step(rq);
          // leaving the A block: continue at the first B column
          if (!rq.sel && walk_step(rq).sel)
            rq_addr <= cfg.b_base + ADDR_W'(col0_q) * ADDR_W'(kvb);
          else
            rq_addr <= rq_addr + 1'b1;
        end
        if (rs_fire || rs_skip) begin
          rs      <= walk_step(rs);
          a_wr_en <= !rs.sel;
          b_wr_en <= rs.sel;
          wr_bank <= rs.bank;
          wr_addr <= rs.base + WADDR_W'(rs.k);
          wr_data <= rs_fire ? rd_resp_data : '0;
          last_wr <= !walk_step(rs).act;
        end
      end
    end
  end

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> rs.act && in_range(rs));

endmodule
