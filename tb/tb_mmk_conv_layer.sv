// tb_mmk_conv_layer: one VGG-16 convolution layer on the full-size kernel.
//
// The kernel is instantiated with its default sizes. The test plays the
// host's part: it builds a random input feature map (NIF channels of HW x HW,
// zero-padded by one pixel) and random 3x3 weights for NOF output channels,
// and lays them out as the matrix product C = W x X, where row o of W holds
// the NIF*9 weights of output channel o and column p of X holds the NIF*9
// input values under the window of output pixel p (both in the order
// channel, kernel row, kernel column). W goes to memory row-major and X
// column-major, VEC values per vector and BEAT vectors per memory word. After the kernel has run, every output
// is compared with a direct convolution computed here from the feature map
// and the weights. The test also checks the number of compute cycles
// (ceil(NOF/ROWS) * ceil(HW*HW/COLS) * K/VEC) and reports the total cycle
// count and the achieved multiply-accumulates per cycle.
//
// Sizes: the conv5 layers of VGG-16 (512 -> 512 channels, 14 x 14), run with
// the <x1, x2> = <4, 5> tiling listed for them.
module tb_mmk_conv_layer;
  import mmk_pkg::*;

  localparam int unsigned NIF = 512;
  localparam int unsigned NOF = 512;
  localparam int unsigned HW  = 14;
  localparam int unsigned X1  = 4;
  localparam int unsigned X2  = 5;
  localparam int unsigned ROWS = 11;   // kernel defaults, for the expected counts
  localparam int unsigned COLS = 15;

  localparam int unsigned K   = NIF * 9;
  localparam int unsigned KV  = K / VEC;
  localparam int unsigned NPX = HW * HW;
  localparam int unsigned RW  = (NOF * KV + NPX * KV) / BEAT;
  localparam int unsigned WW  = NOF * NPX;

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

  mmk_top dut (.*);

  mmk_ext_mem #(.RWORDS(RW), .WWORDS(WW), .LAT(8), .STALL_PCT(5)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  data_t fmap [NIF][HW][HW];
  data_t wgt  [NOF][NIF][3][3];

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0, n_issue = 0, n_stall = 0, t_start = 0, t_done = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.buf_rd_en) n_issue++;
    if (rst_n && dut.u_sched.state == 3'd2 && dut.u_sched.stall) n_stall++;
  end

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t px(int c, int y, int x);
    if (y < 0 || y >= int'(HW) || x < 0 || x >= int'(HW)) return '0;
    return fmap[c][y][x];
  endfunction

  initial begin
    int unsigned bad;
    acc_t ref_v;
    start = 1'b0; cfg_in = '0;
    // small operands keep the layer's sums well inside the accumulator
    foreach (fmap[c, y, x]) fmap[c][y][x] = data_t'($signed(12'($urandom)));
    foreach (wgt[o, c, ky, kx]) wgt[o][c][ky][kx] = data_t'($signed(12'($urandom)));
    // host layout: W rows at 0, X columns after them
    for (int o = 0; o < int'(NOF); o++)
      for (int k = 0; k < int'(K); k++)
        u_mem.rmem[(o * KV + k / VEC) / BEAT][(o * KV + k / VEC) % BEAT][k % VEC] =
          wgt[o][k / 9][(k % 9) / 3][k % 3];
    for (int p = 0; p < int'(NPX); p++)
      for (int k = 0; k < int'(K); k++)
        u_mem.rmem[(NOF * KV + p * KV + k / VEC) / BEAT][(p * KV + k / VEC) % BEAT][k % VEC] =
          px(k / 9, p / HW + (k % 9) / 3 - 1, p % HW + k % 3 - 1);
    for (int w = 0; w < int'(WW); w++) u_mem.wmem[w] = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_in.m = dim_t'(NOF); cfg_in.n = dim_t'(NPX); cfg_in.kv = dim_t'(KV);
    cfg_in.x1 = dim_t'(X1); cfg_in.x2 = dim_t'(X2);
    cfg_in.a_base = '0; cfg_in.b_base = addr_t'(NOF * KV / BEAT); cfg_in.c_base = '0;
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t_done = cyc;
    repeat (2) @(negedge clk);

    bad = 0;
    for (int o = 0; o < int'(NOF); o++)
      for (int p = 0; p < int'(NPX); p++) begin
        ref_v = '0;
        for (int c = 0; c < int'(NIF); c++)
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              ref_v += acc_t'(wgt[o][c][ky][kx]) * acc_t'(px(c, p / HW + ky - 1, p % HW + kx - 1));
        if (u_mem.wmem[o * NPX + p] !== ref_v) begin
          if (bad < 5) $display("FAIL: out[%0d][%0d] = %h, expected %h", o, p, u_mem.wmem[o * NPX + p], ref_v);
          bad++;
        end
      end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %0d wrong outputs", bad); end
    checks++;
    if (n_issue != ((NOF + ROWS - 1) / ROWS) * ((NPX + COLS - 1) / COLS) * KV) begin
      failures++;
      $display("FAIL: %0d compute cycles, expected %0d", n_issue,
               ((NOF + ROWS - 1) / ROWS) * ((NPX + COLS - 1) / COLS) * KV);
    end
    checks++;
    if (u_mem.writes != WW) begin failures++; $display("FAIL: %0d writes", u_mem.writes); end
    $display("layer %0dx%0dx%0d -> %0d: %0d cycles, %0d compute cycles, %0d snapshot stalls, %0d external reads, %0.1f MAC/cycle",
             NIF, HW, HW, NOF, t_done - t_start, n_issue, n_stall, u_mem.reads,
             real'(NOF) * real'(NPX) * real'(K) / real'(t_done - t_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
