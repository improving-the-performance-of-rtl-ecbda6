// mmk_tile_buffer: banked on-chip buffer for one operand block of a tile.
//
// The buffer holds NB banks, one per PE row (A operand) or per PE column
// (B operand). Bank b holds the vectors of every line l with l mod NB == b,
// line l / NB at word (l / NB) * kv + k. All banks share one read address,
// so a single read returns the NB vectors the compute unit multicasts along
// its rows or columns; no line is stored twice, which is what keeps the
// block RAM count low when many PEs use the same data.
//
// Each bank is double-buffered: two halves of DEPTH words, chosen by
// wr_half and rd_half, so the loader can fill one half with the next tile
// while the compute unit reads the current tile from the other.
//
// A bank word is one beat of BEAT vectors: the loader writes a whole beat
// per cycle (wr_addr counts beats), the compute side reads one vector per
// cycle (rd_addr counts vectors; the beat is read and the vector selected by
// the low address bits).
//
// Interface: one write port (wr_bank selects the bank) used by the loader,
// one read port used by the scheduler. Timing: reads are registered, data
// appears in rd_data the cycle after rd_en, with rd_valid. A read and a
// write in the same cycle to the same beat return the old contents.
//
// Sharing one buffer copy among a row or column of PEs follows the source;
// the bank layout, the double buffering and the port timing are this
// design's choices.
module mmk_tile_buffer
  import mmk_pkg::*;
#(
  parameter int unsigned NB    = 11,
  parameter int unsigned DEPTH = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                     wr_en,
  input  logic                     wr_half,
  input  logic [$clog2(NB)-1:0]    wr_bank,
  input  logic [$clog2(DEPTH/BEAT)-1:0] wr_addr,
  input  beat_t                    wr_data,
  input  logic                     rd_en,
  input  logic                     rd_half,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output vec_t [NB-1:0]            rd_data,
  output logic                     rd_valid
);

  localparam int unsigned BW = $clog2(BEAT);
  localparam int unsigned WW = $clog2(DEPTH / BEAT);

  if (DEPTH != 2 ** $clog2(DEPTH) || DEPTH < 2 * BEAT) begin : g_depth_check
    $error("mmk_tile_buffer: DEPTH must be a power of two of at least 2*BEAT");
  end

  beat_t [NB-1:0] word_q;
  logic [BW-1:0]  sel_q;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    beat_t mem [2*DEPTH/BEAT];
    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == b) mem[{wr_half, wr_addr}] <= wr_data;
      if (rd_en) word_q[b] <= mem[{rd_half, rd_addr[BW +: WW]}];
    end
    assign rd_data[b] = word_q[b][sel_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      sel_q    <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) sel_q <= rd_addr[BW-1:0];
    end
  end

endmodule
