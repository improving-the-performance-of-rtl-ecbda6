// mmk_pe: one processing element of the compute unit.
//
// Each cycle with in_valid set, the PE multiplies the VEC lanes of an A
// vector with the VEC lanes of a B vector and adds the VEC products to its
// accumulator; one PE therefore produces one element of C over K/VEC cycles.
// in_first marks the first vector of a dot product (the accumulator restarts
// from the new partial sum instead of adding to the old value) and in_last
// the final one.
//
// Timing: two pipeline stages. The products are registered in the first
// cycle; the adder tree and the accumulation happen in the second. A vector
// presented in cycle t is included in acc at the end of cycle t+2, and `done`
// is high for one cycle, aligned with acc, after the vector marked in_last.
// The accumulator holds its value while no vector arrives.
//
// The source specifies the PE only as the multiply-accumulate unit of a
// matrix-multiplication kernel; the pipeline depth and the first/last
// framing are this design's choices.
module mmk_pe
  import mmk_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  input  vec_t a,
  input  vec_t b,
  output acc_t acc,
  output logic done
);

  typedef logic signed [2*DATA_W-1:0] prod_t;

  prod_t [VEC-1:0] prod_q;
  logic            s1_valid, s1_first, s1_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      prod_q   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      if (in_valid) begin
        for (int l = 0; l < VEC; l++) prod_q[l] <= a[l] * b[l];
      end
    end
  end

  acc_t psum;
  always_comb begin
    psum = '0;
    for (int l = 0; l < VEC; l++) psum = psum + acc_t'(prod_q[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= s1_valid && s1_last;
      if (s1_valid) acc <= s1_first ? psum : acc + psum;
    end
  end

endmodule
