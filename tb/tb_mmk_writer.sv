// tb_mmk_writer: self-checking test of the result writer.
//
// A snapshot model here presents random ROWS x COLS blocks at random
// origins, some running past the edge of C. The test checks every write
// against the expected address c_base + (row0 + r) * n + (col0 + c) and
// the snapshot value, that only in-range elements are written, that
// wr_addr/wr_data hold under back-pressure, that release_snap pulses once
// per block, and, with wr_ready held high, that a full in-range block takes
// ROWS*COLS + 1 cycles from snapshot to the last write.
module tb_mmk_writer;
  import mmk_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg;
  dim_t row0, col0;
  logic snap_valid, release_snap, busy;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic [$clog2(COLS)-1:0] rd_col;
  acc_t rd_data;
  logic wr_valid, wr_ready;
  addr_t wr_addr;
  acc_t wr_data;

  mmk_writer #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  acc_t snap [ROWS][COLS];
  assign rd_data = snap[rd_row][rd_col];

  int unsigned checks = 0, failures = 0;
  int unsigned n_wr = 0, n_rel = 0, stall_pct = 30;
  longint unsigned cyc = 0, t_last_wr = 0;
  acc_t  got [int unsigned];

  always @(posedge clk) begin
    cyc++;
    if (wr_valid && wr_ready) begin
      if (got.exists(wr_addr)) begin
        failures++;
        $display("FAIL: address %0d written twice", wr_addr);
      end
      got[wr_addr] = wr_data;
      n_wr++;
      t_last_wr = cyc;
    end
    if (release_snap) n_rel++;
  end

  // back-pressure and the hold rule
  logic  prev_stalled = 1'b0;
  addr_t prev_addr;
  acc_t  prev_data;
  always @(negedge clk) begin
    if (rst_n && prev_stalled) begin
      checks++;
      if (!(wr_valid && wr_addr == prev_addr && wr_data == prev_data)) begin
        failures++;
        $display("FAIL: write changed under back-pressure");
      end
    end
    wr_ready = ($urandom % 100) >= stall_pct;
    prev_stalled = wr_valid && !wr_ready;
    prev_addr = wr_addr;
    prev_data = wr_data;
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

  task automatic run_block(int unsigned m, int unsigned n, int unsigned r0, int unsigned c0);
    int unsigned nwr0, nrel0, expn, bad;
    longint unsigned t0;
    cfg = '0;
    cfg.m = dim_t'(m); cfg.n = dim_t'(n); cfg.c_base = 100;
    got.delete();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      snap[r][c] = {acc_t'($urandom), 16'($urandom)};
    nwr0 = n_wr; nrel0 = n_rel;
    @(negedge clk);
    row0 = dim_t'(r0); col0 = dim_t'(c0); snap_valid = 1'b1;
    t0 = cyc;
    while (!release_snap) @(negedge clk);
    snap_valid = 1'b0;
    @(negedge clk);
    expn = 0; bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (r0 + r < m && c0 + c < n) begin
          expn++;
          if (!got.exists(100 + (r0 + r) * n + c0 + c) ||
              got[100 + (r0 + r) * n + c0 + c] !== snap[r][c]) bad++;
        end
    chk(bad == 0, $sformatf("%0d elements wrong or missing", bad));
    chk(n_wr - nwr0 == expn, $sformatf("%0d writes, expected %0d", n_wr - nwr0, expn));
    chk(n_rel - nrel0 == 1, "release_snap not pulsed once");
    if (stall_pct == 0 && expn == ROWS * COLS)
      chk(t_last_wr - t0 == ROWS * COLS + 1, $sformatf("drain took %0d cycles, expected %0d",
                                                  t_last_wr - t0, ROWS * COLS + 1));
  endtask

  initial begin
    cfg = '0; row0 = '0; col0 = '0; snap_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    stall_pct = 0;
    run_block(9, 8, 3, 4);
    run_block(9, 8, 6, 4);
    stall_pct = 30;
    run_block(9, 8, 0, 0);
    run_block(7, 6, 6, 4);
    for (int t = 0; t < 40; t++) begin
      int unsigned m, n;
      m = 1 + $urandom % 20; n = 1 + $urandom % 20;
      run_block(m, n, ($urandom % m), ($urandom % n));
    end
    chk(!busy, "busy after all blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
