// mmk_ext_mem: behavioural model of the external DDR memory seen by the
// kernel (simulation only, not synthesizable).
//
// Reads: a request is accepted when rd_req_ready is high; its beat
// rmem[addr] (BEAT vectors) is returned LAT cycles later on the response channel, in request
// order. Writes: an accumulator-wide element is stored in wmem[addr] when
// wr_valid and wr_ready are both high. Ready signals drop at random with
// probability STALL_PCT percent, so the kernel sees back-pressure on both
// channels. The testbench preloads rmem and inspects wmem directly.
module mmk_ext_mem
  import mmk_pkg::*;
#(
  parameter int unsigned RWORDS    = 4096,
  parameter int unsigned WWORDS    = 4096,
  parameter int unsigned LAT       = 6,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic  clk,
  input  logic  rd_req_valid,
  output logic  rd_req_ready,
  input  addr_t rd_req_addr,
  output logic  rd_resp_valid,
  output beat_t rd_resp_data,
  input  logic  wr_valid,
  output logic  wr_ready,
  input  addr_t wr_addr,
  input  acc_t  wr_data
);

  beat_t rmem [RWORDS];
  acc_t wmem [WWORDS];

  logic [LAT-1:0] v_pipe;
  beat_t          d_pipe [LAT];
  int unsigned    reads, writes, rd_stalls, wr_stalls;

  initial begin
    v_pipe       = '0;
    rd_req_ready = 1'b0;
    wr_ready     = 1'b0;
    reads = 0; writes = 0; rd_stalls = 0; wr_stalls = 0;
    for (int i = 0; i < LAT; i++) d_pipe[i] = '0;
  end

  assign rd_resp_valid = v_pipe[LAT-1];
  assign rd_resp_data  = d_pipe[LAT-1];

  always @(posedge clk) begin
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_addr >= RWORDS) $fatal(1, "read address %0d out of model range", rd_req_addr);
      reads++;
    end
    if (rd_req_valid && !rd_req_ready) rd_stalls++;
    if (wr_valid && !wr_ready) wr_stalls++;
    if (wr_valid && wr_ready) begin
      if (wr_addr >= WWORDS) $fatal(1, "write address %0d out of model range", wr_addr);
      wmem[wr_addr] <= wr_data;
      writes++;
    end
    for (int i = LAT - 1; i > 0; i--) d_pipe[i] <= d_pipe[i-1];
    v_pipe   <= {v_pipe[LAT-2:0], rd_req_valid && rd_req_ready};
    d_pipe[0] <= rmem[rd_req_addr % RWORDS];
    rd_req_ready <= ($urandom % 100) >= STALL_PCT;
    wr_ready     <= ($urandom % 100) >= STALL_PCT;
  end

endmodule
