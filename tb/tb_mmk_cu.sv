// tb_mmk_cu: self-checking test of the compute unit (3 x 4 PEs).
//
// Streams blocks of random length with per-row A vectors and per-column B
// vectors, and checks that after each block the snapshot holds, for every
// PE (r, c), the dot product of row r's and column c's vectors: this checks
// the row and column multicast. It also checks the timing (snap_valid rises
// three cycles after the last vector enters), that finish_ok is low while a
// last vector is in flight or the snapshot is held, and that the next block
// can be computed while the previous snapshot is being read out.
module tb_mmk_cu;
  import mmk_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, finish_ok, snap_valid, release_snap;
  vec_t [ROWS-1:0] a_row;
  vec_t [COLS-1:0] b_col;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic [$clog2(COLS)-1:0] rd_col;
  acc_t rd_data;

  mmk_cu #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int unsigned checks = 0, failures = 0;
  acc_t ref_m [ROWS][COLS];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // feed one block; the last vector waits for finish_ok
  task automatic feed_block(int unsigned len);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ref_m[r][c] = '0;
    for (int unsigned i = 0; i < len; i++) begin
      for (int r = 0; r < ROWS; r++) for (int l = 0; l < VEC; l++) a_row[r][l] = data_t'($urandom);
      for (int c = 0; c < COLS; c++) for (int l = 0; l < VEC; l++) b_col[c][l] = data_t'($urandom);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          for (int l = 0; l < VEC; l++)
            ref_m[r][c] += acc_t'(a_row[r][l]) * acc_t'(b_col[c][l]);
      if (i == len - 1)
        while (!finish_ok) begin
          in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
          @(negedge clk);
        end
      in_valid = 1'b1; in_first = (i == 0); in_last = (i == len - 1);
      @(negedge clk);
    end
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
  endtask

  task automatic drain_check();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        rd_row = r[$clog2(ROWS)-1:0]; rd_col = c[$clog2(COLS)-1:0];
        #1;
        chk(rd_data === ref_m[r][c], $sformatf("PE (%0d,%0d) = %h, expected %h", r, c, rd_data, ref_m[r][c]));
      end
  endtask

  acc_t saved [ROWS][COLS];

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; release_snap = 1'b0;
    a_row = '0; b_col = '0; rd_row = '0; rd_col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(finish_ok && !snap_valid, "not idle after reset");
    // timing of one block
    feed_block(4);
    chk(!finish_ok, "finish_ok high with last in flight");
    chk(!snap_valid, "snapshot one cycle after last");
    @(negedge clk);
    chk(!snap_valid && !finish_ok, "snapshot two cycles after last");
    @(negedge clk);
    chk(snap_valid && !finish_ok, "snapshot missing three cycles after last");
    drain_check();
    release_snap = 1'b1; @(negedge clk); release_snap = 1'b0;
    chk(!snap_valid && finish_ok, "release did not free the snapshot");
    // overlap: compute the next block while the snapshot is read, slowly
    feed_block(3);
    for (int t = 0; t < 30; t++) begin
      int unsigned len;
      len = 1 + $urandom % 10;
      while (!snap_valid) @(negedge clk);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) saved[r][c] = ref_m[r][c];
      fork
        feed_block(len);
        begin
          repeat ($urandom % 14) @(negedge clk);
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              rd_row = r[$clog2(ROWS)-1:0]; rd_col = c[$clog2(COLS)-1:0];
              #1;
              chk(rd_data === saved[r][c], "snapshot changed while held");
            end
          @(negedge clk);
          release_snap = 1'b1; @(negedge clk); release_snap = 1'b0;
        end
      join
      while (!snap_valid) @(negedge clk);
      drain_check();
    end
    release_snap = 1'b1; @(negedge clk); release_snap = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
