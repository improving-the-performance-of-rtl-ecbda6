// tb_mmk_vgg_layers: VGG-16 layers, one after another, on the full-size kernel.
//
// The kernel keeps its default sizes (11 x 15 PEs, 4096-vector bank halves).
// For each layer the test plays the host: it draws a random input (NIF
// channels of HW x HW) and random weights (NOF filters of NIF x KS x KS),
// lowers the layer to C = W x X (row o of W: the weights of output channel
// o; column p of X: the inputs under the window of output pixel p, zero
// outside the padded image; both in the order channel, kernel row, kernel
// column), pads K up to a multiple of VEC*BEAT with zeros, and writes W
// row-major and X column-major into the behavioural memory. It then starts
// the kernel with the layer's <x1, x2> and, once done, compares every output
// with a direct convolution computed here from the input and the weights
// (on the layers above 200 M multiply-accumulates, the outputs of every
// fourth channel, to bound the run time), and checks the number of compute cycles (ceil(m/ROWS)*ceil(n/COLS)*kv) and
// of written elements. Cycles and multiply-accumulates per cycle are
// reported per layer. Layers run back to back without a reset, so a second
// `start` after `done` is exercised too.
//
// Layers (sizes of VGG-16; <x1, x2> as listed for each layer group):
// conv1_1 (3 -> 64, 224 x 224, <6,13>; K = 27 padded to 32, bound by the
// one-element-per-cycle drain), conv1_2 (64 -> 64, 224 x 224, <6,13>),
// conv2_2 (128 -> 128, 112 x 112, <6,4>), conv3_2 (256 -> 256, 56 x 56,
// <5,3>), conv4_1 (256 -> 512, 28 x 28, <7,9>), conv4_2 (512 -> 512,
// 28 x 28, run at <7,7> because its B block at <7,9> exceeds a bank half),
// and fc7 (4096 -> 4096 as a 1 x 1 layer on a single input vector, <1,1>).
// conv5 is covered by tb_mmk_conv_layer. Layers that repeat a size already
// listed (conv2_1, conv3_1, conv3_3, conv4_3, the conv5 group, fc6, fc8)
// are left out to keep the run short.
module tb_mmk_vgg_layers;
  import mmk_pkg::*;

  localparam int unsigned ROWS = 11;   // kernel defaults, for the expected counts
  localparam int unsigned COLS = 15;
  localparam int unsigned KALIGN = VEC * BEAT;
  localparam int unsigned RW = 1_000_000;   // largest layer: conv1_2, 904,320 beats
  localparam int unsigned WW = 3_300_000;   // largest output: 64 * 224 * 224

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

  data_t fm [];   // input feature map, index (c*HW + y)*HW + x
  data_t wt [];   // weights, index ((o*NIF + c)*KS + ky)*KS + kx

  int unsigned checks = 0, failures = 0, n_layers = 0;
  longint unsigned cyc = 0, n_issue = 0, n_stall = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.buf_rd_en) n_issue++;
    if (rst_n && dut.u_sched.state == 3'd2 && dut.u_sched.stall) n_stall++;
  end

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input value at channel c, row y, column x; zero in the padding
  function automatic data_t px(int nif, int hw, int c, int y, int x);
    if (c >= nif || y < 0 || y >= hw || x < 0 || x >= hw) return '0;
    return fm[(c * hw + y) * hw + x];
  endfunction

  task automatic run_layer(string name, int nif, int nof, int hw, int ks, int x1, int x2);
    int k_real, kp, kv, npx, pad, bad, ostep;
    longint unsigned t0, t1, issue0, stall0, exp_issue;
    int unsigned reads0, writes0;
    acc_t ref_v;
    k_real = nif * ks * ks;
    kp     = (k_real + KALIGN - 1) / KALIGN * KALIGN;
    kv     = kp / VEC;
    npx    = hw * hw;
    pad    = ks / 2;

    fm = new[nif * hw * hw];
    wt = new[nof * nif * ks * ks];
    // small operands keep every sum well inside the accumulator
    foreach (fm[i]) fm[i] = data_t'($signed(12'($urandom)));
    foreach (wt[i]) wt[i] = data_t'($signed(12'($urandom)));

    // host layout: W rows from beat 0, X columns after them, K padded with zeros
    for (int o = 0; o < nof; o++)
      for (int k = 0; k < kp; k++) begin
        int v = o * kv + k / VEC;
        u_mem.rmem[v / BEAT][v % BEAT][k % VEC] = (k < k_real) ? wt[o * k_real + k] : '0;
      end
    for (int p = 0; p < npx; p++)
      for (int k = 0; k < kp; k++) begin
        int v = nof * kv + p * kv + k / VEC;
        int c = k / (ks * ks), ky = (k % (ks * ks)) / ks, kx = k % ks;
        u_mem.rmem[v / BEAT][v % BEAT][k % VEC] =
          (k < k_real) ? px(nif, hw, c, p / hw + ky - pad, p % hw + kx - pad) : '0;
      end
    for (int w = 0; w < nof * npx; w++) u_mem.wmem[w] = '0;

    @(negedge clk);
    cfg_in.m = dim_t'(nof); cfg_in.n = dim_t'(npx); cfg_in.kv = dim_t'(kv);
    cfg_in.x1 = dim_t'(x1); cfg_in.x2 = dim_t'(x2);
    cfg_in.a_base = '0; cfg_in.b_base = addr_t'(nof * kv / BEAT); cfg_in.c_base = '0;
    t0 = cyc; issue0 = n_issue; stall0 = n_stall; reads0 = u_mem.reads; writes0 = u_mem.writes;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    repeat (2) @(negedge clk);

    // the reference is slow for the largest layers: there every fourth output
    // channel is compared (still every PE row, as 4 and ROWS are coprime)
    ostep = (longint'(nof) * npx * k_real > 200_000_000) ? 4 : 1;
    bad = 0;
    for (int o = 0; o < nof; o += ostep)
      for (int p = 0; p < npx; p++) begin
        ref_v = '0;
        for (int c = 0; c < nif; c++)
          for (int ky = 0; ky < ks; ky++)
            for (int kx = 0; kx < ks; kx++)
              ref_v += acc_t'(wt[((o * nif + c) * ks + ky) * ks + kx]) *
                       acc_t'(px(nif, hw, c, p / hw + ky - pad, p % hw + kx - pad));
        if (u_mem.wmem[o * npx + p] !== ref_v) begin
          if (bad < 5) $display("FAIL: %s out[%0d][%0d] = %h, expected %h",
                                name, o, p, u_mem.wmem[o * npx + p], ref_v);
          bad++;
        end
      end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %s: %0d wrong outputs", name, bad); end

    exp_issue = longint'((nof + ROWS - 1) / ROWS) * longint'((npx + COLS - 1) / COLS) * longint'(kv);
    checks++;
    if (n_issue - issue0 != exp_issue) begin
      failures++;
      $display("FAIL: %s: %0d compute cycles, expected %0d", name, n_issue - issue0, exp_issue);
    end
    checks++;
    if (u_mem.writes - writes0 != nof * npx) begin
      failures++;
      $display("FAIL: %s: %0d writes, expected %0d", name, u_mem.writes - writes0, nof * npx);
    end
    $display("%s (%0dx%0dx%0d -> %0d, <%0d,%0d>): %0d cycles, %0d compute cycles, %0d snapshot stalls, %0d read beats, %0.1f MAC/cycle",
             name, nif, hw, hw, nof, x1, x2, t1 - t0, n_issue - issue0, n_stall - stall0,
             u_mem.reads - reads0, real'(nof) * real'(npx) * real'(k_real) / real'(t1 - t0));
    $fflush;
    n_layers++;
  endtask

  initial begin
    start = 1'b0; cfg_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer("conv1_1",    3,   64, 224, 3, 6, 13);
    run_layer("conv1_2",   64,   64, 224, 3, 6, 13);
    run_layer("conv2_2",  128,  128, 112, 3, 6,  4);
    run_layer("conv3_2",  256,  256,  56, 3, 5,  3);
    run_layer("conv4_1",  256,  512,  28, 3, 7,  9);
    run_layer("conv4_2",  512,  512,  28, 3, 7,  7);
    run_layer("fc7",     4096, 4096,   1, 1, 1,  1);
    checks++;
    if (n_layers != 7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
