// tb_mmk_scheduler: self-checking test of the 2-D work-item scheduler.
//
// The loader, compute unit and writer are replaced by small models: a load
// completes a random number of cycles after ld_start, and after every last
// vector the compute unit keeps finish_ok low (snapshot held and drained)
// for a random time. The test builds here the expected schedule (tiles in
// row-major order, blocks of each tile row by row, blocks outside C
// skipped, kv buffer reads per block) and checks the load origins, every
// buffer read address, the valid/first/last flags one cycle later, the
// block origin published for the writer, that no last vector is issued
// while finish_ok is low, that no read happens during a load, and that done
// pulses once when the writer is idle. Loads alternate between the two
// buffer halves; a tile must be read from the half it was loaded into, never
// from the half being loaded, and loading the next tile must overlap the
// computation of the current one.
module tb_mmk_scheduler;
  import mmk_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 4;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WA = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg_in, cfg;
  logic start, busy, done, ld_start, ld_done, buf_rd_en, ld_half, rd_half;
  dim_t ld_row0, ld_col0, blk_row0, blk_col0;
  logic [WA-1:0] a_rd_addr, b_rd_addr;
  logic cu_valid, cu_first, cu_last, finish_ok, wr_busy;

  mmk_scheduler #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  int unsigned checks = 0, failures = 0, n_done = 0;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // loader model
  int unsigned ld_wait = 0;
  logic loading = 1'b0;
  logic loading_half = 1'b0;
  always @(posedge clk) begin
    ld_done <= 1'b0;
    if (ld_start) loading_half <= ld_half;
    if (!rst_n) loading <= 1'b0;
    else if (ld_start) begin loading <= 1'b1; ld_wait <= 2 + $urandom % 60; end
    else if (loading) begin
      if (ld_wait == 0) begin loading <= 1'b0; ld_done <= 1'b1; end
      else ld_wait <= ld_wait - 1;
    end
  end

  // compute unit / writer model
  int unsigned busy_left = 0;
  logic        fast = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) busy_left <= 0;
    else if (cu_last) busy_left <= fast ? 0 : 3 + $urandom % 20;
    else if (busy_left != 0) busy_left <= busy_left - 1;
  end
  assign finish_ok = (busy_left == 0) && !cu_last;
  assign wr_busy   = (busy_left != 0);

  // expected schedule
  typedef struct { int unsigned a, b; bit first, last; int unsigned r0, c0, tile; } rd_t;
  int unsigned n_loads = 0, n_overlap = 0;
  bit tile_half [int unsigned];
  rd_t exp_rd [$];
  int unsigned exp_ld [$];
  rd_t pend;
  logic pend_v = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ld_start) begin
        if (exp_ld.size() == 0) chk(1'b0, "unexpected load");
        else begin
          chk(ld_row0 == exp_ld[0] >> 16 && ld_col0 == (exp_ld[0] & 16'hffff),
              $sformatf("load at (%0d,%0d), expected (%0d,%0d)", ld_row0, ld_col0,
                        exp_ld[0] >> 16, exp_ld[0] & 16'hffff));
          void'(exp_ld.pop_front());
        end
        chk(ld_half == n_loads[0], "load halves do not alternate");
        tile_half[n_loads] = ld_half;
        n_loads++;
      end
      if (buf_rd_en && loading) begin
        n_overlap++;
        chk(loading_half != rd_half, $sformatf("read from the half being loaded at cycle %0d", cyc));
      end
      // flags follow the read by one cycle
      chk(cu_valid == pend_v, "cu_valid not aligned with the read");
      if (pend_v) begin
        chk(cu_first == pend.first && cu_last == pend.last, "first/last flags wrong");
        if (pend.last) chk(blk_row0 == pend.r0 && blk_col0 == pend.c0, "block origin wrong");
      end
      pend_v <= buf_rd_en;
      if (buf_rd_en) begin
        if (exp_rd.size() == 0) begin chk(1'b0, "unexpected buffer read"); end
        else begin
          chk(a_rd_addr == exp_rd[0].a && b_rd_addr == exp_rd[0].b,
              $sformatf("read (%0d,%0d), expected (%0d,%0d)", a_rd_addr, b_rd_addr,
                        exp_rd[0].a, exp_rd[0].b));
          if (exp_rd[0].last) chk(finish_ok, "last vector issued while finish_ok low");
          chk(tile_half.exists(exp_rd[0].tile) && rd_half == tile_half[exp_rd[0].tile],
              "tile read from the wrong half");
          pend <= exp_rd[0];
          void'(exp_rd.pop_front());
        end
      end
      if (done) n_done++;
      if (done) chk(!wr_busy, "done while writer busy");
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    chk(n_overlap > 0, "loading never overlapped computing");
    $display("loads overlapping reads: %0d cycles", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(int unsigned m, int unsigned n, int unsigned kv,
                          int unsigned x1, int unsigned x2);
    cfg_t c;
    rd_t e;
    int unsigned th, tw, nd0, tile;
    longint unsigned t0, t1;
    th = x1 * ROWS; tw = x2 * COLS;
    tile = n_loads;
    for (int unsigned r0 = 0; r0 < m; r0 += th)
      for (int unsigned c0 = 0; c0 < n; c0 += tw) begin
        exp_ld.push_back((r0 << 16) | c0);
        tile++;
        for (int unsigned bi = 0; bi < x1; bi++)
          for (int unsigned bj = 0; bj < x2; bj++)
            if (r0 + bi * ROWS < m && c0 + bj * COLS < n)
              for (int unsigned k = 0; k < kv; k++) begin
                e.a = bi * kv + k; e.b = bj * kv + k;
                e.first = (k == 0); e.last = (k == kv - 1);
                e.r0 = r0 + bi * ROWS; e.c0 = c0 + bj * COLS; e.tile = tile - 1;
                exp_rd.push_back(e);
              end
      end
    c = '0;
    c.m = dim_t'(m); c.n = dim_t'(n); c.kv = dim_t'(kv); c.x1 = dim_t'(x1); c.x2 = dim_t'(x2);
    nd0 = n_done;
    @(negedge clk);
    cfg_in = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0; cfg_in = '0;
    chk(busy && cfg.m == dim_t'(m), "configuration not latched");
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(n_done - nd0 == 1, "done not pulsed once");
    // each run starts again in half 0
    n_loads = 0;
    tile_half.delete();
    chk(exp_rd.size() == 0, $sformatf("%0d buffer reads missing", exp_rd.size()));
    chk(exp_ld.size() == 0, $sformatf("%0d loads missing", exp_ld.size()));
    chk(!busy, "still busy after done");
  endtask

  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    start = 1'b0; cfg_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_case(3, 4, 1, 1, 1);
    run_case(7, 9, 5, 2, 2);
    run_case(13, 17, 3, 3, 1);
    run_case(10, 30, 2, 2, 3);
    for (int t = 0; t < 15; t++)
      run_case(1 + $urandom % 25, 1 + $urandom % 25, 1 + $urandom % 8,
               1 + $urandom % 4, 1 + $urandom % 4);
    // rate: a block of kv reads is issued in kv consecutive cycles
    begin
      longint unsigned c0, c1;
      int unsigned kv;
      kv = 17;
      fast = 1'b1;
      fork
        run_case(ROWS, COLS, kv, 1, 1);
        begin
          while (!buf_rd_en) @(negedge clk);
          c0 = cyc;
          while (buf_rd_en) @(negedge clk);
          c1 = cyc;
        end
      join
      chk((c1 - c0) == kv, $sformatf("block issued in %0d cycles, expected %0d", c1 - c0, kv));
      fast = 1'b0;
    end
    chk(n_overlap > 0, "loading never overlapped computing");
    $display("loads overlapping reads: %0d cycles", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
