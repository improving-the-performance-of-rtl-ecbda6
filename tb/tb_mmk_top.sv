// tb_mmk_top: end-to-end test of the matrix-multiplication kernel.
//
// A small kernel (3 x 4 PEs, 64-vector bank halves) runs a series of
// products C = A x B against the behavioural external memory, which stalls
// both channels at random. Reads are 4-vector beats, so kv is a multiple of
// BEAT and A and B are laid out in beats. Each case fills A and B with random 16-bit values,
// runs the kernel and compares every element of C with a product computed
// here from the memory image. It also checks that nothing outside C is
// written, that exactly m*n elements are written, that the compute unit is
// fed exactly ceil(m/ROWS)*ceil(n/COLS)*kv cycles (one vector per PE per
// cycle), and that each tile's A rows and B columns are read once per tile.
// The mechanisms of the design are counted and each must occur: the
// snapshot stall, zero-filled edge lines, skipped empty blocks, draining
// overlapped with compute, loading of the next tile overlapped with compute
// (double-buffered tiles), multi-tile 2-D schedules, and back-pressure on
// both memory channels.
module tb_mmk_top;
  import mmk_pkg::*;

  localparam int unsigned ROWS  = 3;
  localparam int unsigned COLS  = 4;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned RW    = 8192;
  localparam int unsigned WW    = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t  cfg_in;
  logic  start, busy, done;
  logic  rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t rd_req_addr;
  beat_t rd_resp_data;
  logic  wr_valid, wr_ready;
  addr_t wr_addr;
  acc_t  wr_data;

  mmk_top #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  mmk_ext_mem #(.RWORDS(RW), .WWORDS(WW), .LAT(5), .STALL_PCT(25)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cycles = 0;

  // mechanism counters
  int unsigned n_stall = 0, n_zero = 0, n_skip = 0, n_overlap = 0, n_tiles = 0;
  int unsigned n_issue = 0, n_multi = 0, n_ld_overlap = 0;
  logic prev_nb = 1'b0;

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      if (dut.u_sched.state == 3'd2 && dut.u_sched.stall) n_stall++;
      if (dut.u_loader.rs_skip) n_zero++;
      if (dut.u_sched.state == 3'd3 && prev_nb) n_skip++;
      prev_nb <= (dut.u_sched.state == 3'd3);
      if (dut.u_writer.act && dut.u_sched.buf_rd_en) n_overlap++;
      if (dut.u_sched.ld_start) n_tiles++;
      if (dut.ld_busy && dut.buf_rd_en) n_ld_overlap++;
      if (dut.u_sched.buf_rd_en) n_issue++;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned cdiv(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // vector number v of the memory image
  function automatic vec_t vec_at(int unsigned v);
    return u_mem.rmem[v / BEAT][v % BEAT];
  endfunction

  task automatic run_case(int unsigned m, int unsigned n, int unsigned kv,
                          int unsigned x1, int unsigned x2);
    cfg_t c;
    int unsigned a_base, b_base, c_base, tiles, exp_reads, reads0, issue0, bad, nwr0;
    acc_t ref_v;
    // base addresses are beat addresses
    a_base = 16;
    b_base = a_base + m * kv / BEAT + 3;
    c_base = 40;
    for (int w = 0; w < RW; w++)
      for (int v = 0; v < BEAT; v++)
        for (int l = 0; l < VEC; l++) u_mem.rmem[w][v][l] = data_t'($urandom);
    for (int w = 0; w < WW; w++) u_mem.wmem[w] = acc_t'(48'hDEAD_BEEF_0BAD);
    c = '0;
    c.m = dim_t'(m); c.n = dim_t'(n); c.kv = dim_t'(kv);
    c.x1 = dim_t'(x1); c.x2 = dim_t'(x2);
    c.a_base = addr_t'(a_base); c.b_base = addr_t'(b_base); c.c_base = addr_t'(c_base);
    reads0 = u_mem.reads; issue0 = n_issue; nwr0 = u_mem.writes;
    @(negedge clk);
    cfg_in = c;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    // results
    bad = 0;
    for (int i = 0; i < int'(m); i++)
      for (int j = 0; j < int'(n); j++) begin
        ref_v = '0;
        for (int k = 0; k < int'(kv); k++)
          for (int l = 0; l < VEC; l++)
            ref_v += acc_t'(vec_at(a_base * BEAT + i*kv + k)[l]) *
                     acc_t'(vec_at(b_base * BEAT + j*kv + k)[l]);
        if (u_mem.wmem[c_base + i*n + j] !== ref_v) bad++;
      end
    check(bad == 0, $sformatf("m=%0d n=%0d kv=%0d x1=%0d x2=%0d: %0d wrong elements",
                              m, n, kv, x1, x2, bad));
    bad = 0;
    for (int w = 0; w < WW; w++)
      if ((w < c_base || w >= c_base + m*n) && u_mem.wmem[w] !== acc_t'(48'hDEAD_BEEF_0BAD)) bad++;
    check(bad == 0, $sformatf("%0d writes outside C", bad));
    check(u_mem.writes - nwr0 == m * n, $sformatf("write count %0d, expected %0d",
                                                 u_mem.writes - nwr0, m * n));
    check(n_issue - issue0 == cdiv(m, ROWS) * cdiv(n, COLS) * kv,
          $sformatf("compute cycles %0d, expected %0d", n_issue - issue0,
                    cdiv(m, ROWS) * cdiv(n, COLS) * kv));
    // each tile reads its in-range A rows and B columns once
    exp_reads = 0;
    tiles = 0;
    for (int r0 = 0; r0 < int'(m); r0 += x1 * ROWS)
      for (int c0 = 0; c0 < int'(n); c0 += x2 * COLS) begin
        tiles++;
        exp_reads += ((m - r0 < x1 * ROWS) ? m - r0 : x1 * ROWS) * kv / BEAT;
        exp_reads += ((n - c0 < x2 * COLS) ? n - c0 : x2 * COLS) * kv / BEAT;
      end
    check(u_mem.reads - reads0 == exp_reads,
          $sformatf("external reads %0d, expected %0d", u_mem.reads - reads0, exp_reads));
    if (tiles > 1 && x1 > 1 && x2 > 1) n_multi++;
  endtask

  initial begin
    start  = 1'b0;
    cfg_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(3, 4, 4, 1, 1);
    run_case(7, 9, 12, 2, 2);
    run_case(13, 17, 8, 3, 1);
    run_case(20, 30, 4, 2, 3);
    run_case(1, 1, 16, 1, 1);
    for (int t = 0; t < 12; t++)
      run_case(1 + $urandom % 24, 1 + $urandom % 24, BEAT * (1 + $urandom % 4),
               1 + $urandom % 4, 1 + $urandom % 4);
    $display("mechanisms: stall=%0d zero_fill=%0d block_skip=%0d drain_overlap=%0d load_overlap=%0d tiles=%0d 2d_multi_tile=%0d rd_bp=%0d wr_bp=%0d",
             n_stall, n_zero, n_skip, n_overlap, n_ld_overlap, n_tiles, n_multi, u_mem.rd_stalls, u_mem.wr_stalls);
    check(n_ld_overlap > 0, "loading never overlapped compute");
    check(n_stall > 0, "snapshot stall never happened");
    check(n_zero > 0, "edge zero fill never happened");
    check(n_skip > 0, "empty block skip never happened");
    check(n_overlap > 0, "drain never overlapped compute");
    check(n_multi > 0, "no multi-tile 2-D schedule ran");
    check(u_mem.rd_stalls > 0, "no read back-pressure");
    check(u_mem.wr_stalls > 0, "no write back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
