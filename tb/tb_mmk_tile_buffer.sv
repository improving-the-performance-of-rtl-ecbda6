// tb_mmk_tile_buffer: self-checking test of the banked tile buffer.
//
// Writes random beats to random (half, bank, beat) positions, keeping a
// model copy here, then reads single vectors back through the shared read
// address and checks that every bank returns its own vector in the cycle
// after rd_en, with rd_valid, and that a read colliding with a write returns
// old data.
module tb_mmk_tile_buffer;
  import mmk_pkg::*;

  localparam int unsigned NB = 5;
  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, rd_en, rd_valid, wr_half, rd_half;
  logic [$clog2(NB)-1:0] wr_bank;
  localparam int unsigned WB = DEPTH / BEAT;
  logic [$clog2(WB)-1:0] wr_addr;
  logic [$clog2(DEPTH)-1:0] rd_addr;
  beat_t wr_data;
  vec_t [NB-1:0] rd_data;

  mmk_tile_buffer #(.NB(NB), .DEPTH(DEPTH)) dut (.*);

  vec_t model [2][NB][DEPTH];

  task automatic put(int unsigned h, int unsigned b, int unsigned w);
    for (int v = 0; v < BEAT; v++) model[h][b][w * BEAT + v] = wr_data[v];
  endtask

  function automatic beat_t rand_beat();
    beat_t x;
    for (int v = 0; v < BEAT; v++)
      for (int l = 0; l < VEC; l++) x[v][l] = data_t'($urandom);
    return x;
  endfunction
  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic read_check(int unsigned h, int unsigned addr);
    rd_en = 1'b1; rd_half = h[0]; rd_addr = addr[$clog2(DEPTH)-1:0];
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (!rd_valid) begin failures++; $display("FAIL: rd_valid missing"); end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (rd_data[b] !== model[h][b][addr]) begin
        failures++;
        $display("FAIL: half %0d bank %0d word %0d", h, b, addr);
      end
    end
  endtask

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wr_half = 1'b0; rd_half = 1'b0; wr_bank = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill every word
    for (int h = 0; h < 2; h++)
      for (int b = 0; b < NB; b++)
        for (int w = 0; w < int'(WB); w++) begin
          wr_en = 1'b1; wr_half = h[0]; wr_bank = b[$clog2(NB)-1:0]; wr_addr = w[$clog2(WB)-1:0];
          wr_data = rand_beat();
          put(h, b, w);
          @(negedge clk);
        end
    wr_en = 1'b0;
    @(negedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL: rd_valid without rd_en"); end
    for (int h = 0; h < 2; h++) for (int w = 0; w < DEPTH; w++) read_check(h, w);
    // random overwrites then reads
    for (int t = 0; t < 300; t++) begin
      int unsigned b, w, h, v;
      b = $urandom % NB; w = $urandom % WB; h = $urandom % 2; v = $urandom % BEAT;
      wr_en = 1'b1; wr_half = h[0]; wr_bank = b[$clog2(NB)-1:0]; wr_addr = w[$clog2(WB)-1:0];
      wr_data = rand_beat();
      // read of the same beat in the same cycle returns the old value
      rd_en = 1'b1; rd_half = h[0]; rd_addr = (w * BEAT + v);
      @(negedge clk);
      wr_en = 1'b0; rd_en = 1'b0;
      checks++;
      if (rd_data[b] !== model[h][b][w * BEAT + v]) begin failures++; $display("FAIL: read-during-write"); end
      put(h, b, w);
      read_check($urandom % 2, $urandom % DEPTH);
      for (int u = 0; u < BEAT; u++) read_check(h, w * BEAT + u);
      read_check(1 - h, w * BEAT + v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
