// mmk_pkg: types and constants shared by the matrix-multiplication kernel.
//
// The kernel computes C = A x B, the form into which every convolution and
// fully-connected layer is cast. Operands are signed fixed-point words packed
// VEC to a vector: a row of A and a column of B are both stored as a run of
// such vectors along the reduction (K) dimension. A vector is the unit the
// processing elements consume per cycle; external memory and the buffer
// write ports move a beat of BEAT vectors (64 bytes) per cycle, enough to
// use the 17 GB/s of the DDR4 memory the kernel was built for at its
// 370 MHz clock (48 bytes per cycle). Results are kept at full accumulator
// width.
//
// Word widths, the vector size and the beat size are this design's choices;
// the kernel structure (matrix multiplication on a grid of PEs) follows the
// source.
package mmk_pkg;

  // operands per vector (lanes of one PE)
  localparam int unsigned VEC    = 8;
  // vectors per external-memory beat; K must be a multiple of VEC*BEAT
  localparam int unsigned BEAT   = 4;
  // operand width (signed fixed point)
  localparam int unsigned DATA_W = 16;
  // accumulator width: 2*DATA_W product plus 16 guard bits (K up to 65536)
  localparam int unsigned ACC_W  = 48;
  // width of size / count configuration fields
  localparam int unsigned DIM_W  = 16;
  // external memory address width (beats for reads, elements for writes)
  localparam int unsigned ADDR_W = 32;

  typedef logic signed [DATA_W-1:0]  data_t;
  typedef data_t       [VEC-1:0]     vec_t;
  typedef vec_t        [BEAT-1:0]    beat_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic        [DIM_W-1:0]   dim_t;
  typedef logic        [ADDR_W-1:0]  addr_t;

  // run-time configuration of one matrix multiplication
  typedef struct packed {
    dim_t  m;       // rows of A and C
    dim_t  n;       // columns of B and C
    dim_t  kv;      // reduction length in vectors (K / VEC), a multiple of BEAT
    dim_t  x1;      // tile height, in CU row blocks
    dim_t  x2;      // tile width, in CU column blocks
    addr_t a_base;  // beat address: A row i, vector k in beat a_base + (i*kv + k)/BEAT
    addr_t b_base;  // beat address: B column j, vector k in beat b_base + (j*kv + k)/BEAT
    addr_t c_base;  // C element (i,j) at c_base + i*n + j
  } cfg_t;

endpackage
