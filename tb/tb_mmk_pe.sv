// tb_mmk_pe: self-checking test of one processing element.
//
// Feeds random dot products of random length (1..12 vectors of VEC signed
// 16-bit lanes), with random idle cycles between vectors, and checks that
// `done` rises exactly two cycles after the last vector and that acc then
// equals the dot product computed here. Extreme operands (-32768 squared)
// check the product width.
module tb_mmk_pe;
  import mmk_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, done;
  vec_t a, b;
  acc_t acc;

  mmk_pe dut (.*);

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_dot(int unsigned len, bit extreme);
    acc_t ref_v;
    longint unsigned t_last;
    ref_v = '0;
    for (int unsigned i = 0; i < len; i++) begin
      while ($urandom % 3 == 0) begin
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        @(negedge clk);
      end
      for (int l = 0; l < VEC; l++) begin
        a[l] = extreme ? data_t'(16'h8000) : data_t'($urandom);
        b[l] = extreme ? data_t'(16'h8000) : data_t'($urandom);
        ref_v += acc_t'(a[l]) * acc_t'(b[l]);
      end
      in_valid = 1'b1;
      in_first = (i == 0);
      in_last  = (i == len - 1);
      t_last   = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    // done must not appear before two cycles have passed
    checks++;
    if (done) begin failures++; $display("FAIL: done one cycle after last"); end
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL: done not two cycles after last"); end
    checks++;
    if (acc !== ref_v) begin
      failures++;
      $display("FAIL: len=%0d acc=%0d expected %0d", len, acc, ref_v);
    end
    // accumulator holds while idle
    @(negedge clk);
    checks++;
    if (done || acc !== ref_v) begin failures++; $display("FAIL: acc did not hold"); end
  endtask

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_dot(1, 1'b0);
    run_dot(4, 1'b1);
    for (int t = 0; t < 60; t++) run_dot(1 + $urandom % 12, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
