// tb_mmk_loader: self-checking test of the tile loader.
//
// The loader fills models of the A and B buffers here from the behavioural
// external memory (random latency back-pressure). For tiles at random
// origins, including tiles that run past the matrix edge, it checks that
// every buffer word (bank l mod NB, beat (l / NB) * kv/BEAT + kb of line l)
// is written exactly once with the memory's beat, or with zero beyond the
// edge, that no other word is written, that the number of external reads is
// the number of in-range lines times kv/BEAT, and that `done` pulses once,
// after the last write, when `busy` has fallen.
module tb_mmk_loader;
  import mmk_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 4;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned WB = DEPTH / BEAT;
  localparam int unsigned BANK_W = 2;
  localparam int unsigned RW = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic start, busy, done;
  dim_t row0, col0;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t rd_req_addr;
  beat_t rd_resp_data;
  logic a_wr_en, b_wr_en;
  logic [BANK_W-1:0] wr_bank;
  logic [$clog2(WB)-1:0] wr_addr;
  beat_t wr_data;

  logic wr_valid_unused = 1'b0, wr_ready_unused;
  addr_t wr_addr_unused = '0;
  acc_t wr_data_unused = '0;

  mmk_loader #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  mmk_ext_mem #(.RWORDS(RW), .WWORDS(16), .LAT(4), .STALL_PCT(30)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid(wr_valid_unused), .wr_ready(wr_ready_unused), .wr_addr(wr_addr_unused),
    .wr_data(wr_data_unused)
  );

  beat_t abuf [ROWS][WB];
  beat_t bbuf [COLS][WB];
  int    acnt [ROWS][WB];
  int    bcnt [COLS][WB];
  int unsigned checks = 0, failures = 0, n_done = 0, n_busy_done = 0;

  always @(posedge clk) begin
    if (a_wr_en) begin abuf[wr_bank][wr_addr] <= wr_data; acnt[wr_bank][wr_addr]++; end
    if (b_wr_en) begin bbuf[wr_bank][wr_addr] <= wr_data; bcnt[wr_bank][wr_addr]++; end
    if (done) n_done++;
    if (done && busy) n_busy_done++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_case(int unsigned m, int unsigned n, int unsigned kv, int unsigned x1,
                          int unsigned x2, int unsigned r0, int unsigned c0);
    int unsigned reads0, exp_reads, bad_a, bad_b, bad_cnt, kvb;
    beat_t expv;
    kvb = kv / BEAT;
    for (int b = 0; b < ROWS; b++) for (int w = 0; w < WB; w++) acnt[b][w] = 0;
    for (int b = 0; b < COLS; b++) for (int w = 0; w < WB; w++) bcnt[b][w] = 0;
    for (int w = 0; w < RW; w++)
      for (int v = 0; v < BEAT; v++)
        for (int l = 0; l < VEC; l++) u_mem.rmem[w][v][l] = data_t'($urandom);
    cfg = '0;
    cfg.m = dim_t'(m); cfg.n = dim_t'(n); cfg.kv = dim_t'(kv); cfg.x1 = dim_t'(x1); cfg.x2 = dim_t'(x2);
    cfg.a_base = 7; cfg.b_base = addr_t'(7 + m * kvb);
    reads0 = u_mem.reads;
    n_done = 0;
    @(negedge clk);
    row0 = dim_t'(r0); col0 = dim_t'(c0); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(busy, "busy not raised by start");
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(n_done == 1, "done did not pulse exactly once");
    bad_a = 0; bad_b = 0; bad_cnt = 0; exp_reads = 0;
    for (int l = 0; l < int'(x1 * ROWS); l++)
      for (int k = 0; k < int'(kvb); k++) begin
        if (r0 + l < m) begin
          expv = u_mem.rmem[cfg.a_base + (r0 + l) * kvb + k]; exp_reads++;
        end else expv = '0;
        if (acnt[l % ROWS][(l / ROWS) * kvb + k] != 1) bad_cnt++;
        if (abuf[l % ROWS][(l / ROWS) * kvb + k] !== expv) bad_a++;
        acnt[l % ROWS][(l / ROWS) * kvb + k] = 0;
      end
    for (int l = 0; l < int'(x2 * COLS); l++)
      for (int k = 0; k < int'(kvb); k++) begin
        if (c0 + l < n) begin
          expv = u_mem.rmem[cfg.b_base + (c0 + l) * kvb + k]; exp_reads++;
        end else expv = '0;
        if (bcnt[l % COLS][(l / COLS) * kvb + k] != 1) bad_cnt++;
        if (bbuf[l % COLS][(l / COLS) * kvb + k] !== expv) bad_b++;
        bcnt[l % COLS][(l / COLS) * kvb + k] = 0;
      end
    for (int b = 0; b < ROWS; b++) for (int w = 0; w < WB; w++) if (acnt[b][w] != 0) bad_cnt++;
    for (int b = 0; b < COLS; b++) for (int w = 0; w < WB; w++) if (bcnt[b][w] != 0) bad_cnt++;
    chk(bad_a == 0, $sformatf("%0d wrong A words (m=%0d kv=%0d x1=%0d r0=%0d)", bad_a, m, kv, x1, r0));
    chk(bad_b == 0, $sformatf("%0d wrong B words (n=%0d kv=%0d x2=%0d c0=%0d)", bad_b, n, kv, x2, c0));
    chk(bad_cnt == 0, $sformatf("%0d words written other than once", bad_cnt));
    chk(u_mem.reads - reads0 == exp_reads, $sformatf("reads %0d, expected %0d", u_mem.reads - reads0, exp_reads));
  endtask

  initial begin
    start = 1'b0; row0 = '0; col0 = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_case(6, 8, 4, 2, 2, 0, 0);
    run_case(7, 9, 12, 2, 2, 6, 8);
    run_case(20, 20, 20, 3, 1, 9, 4);
    for (int t = 0; t < 25; t++) begin
      int unsigned m, n, kv, x1, x2;
      m = 1 + $urandom % 30; n = 1 + $urandom % 30; kv = BEAT * (1 + $urandom % 8);
      x1 = 1 + $urandom % 4; x2 = 1 + $urandom % 4;
      run_case(m, n, kv, x1, x2, ($urandom % m), ($urandom % n));
    end
    chk(n_busy_done == 0, "done while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
