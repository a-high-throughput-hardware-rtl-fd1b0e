// Shared types and constants of the radix-8 FFT codelet accelerator.
//
// A complex single-precision sample is a 64-bit packed struct with the real
// part in the low 32 bits. Eight of them form one 512-bit vector, the width
// of every FIFO word and of the FFT and Diag datapaths; sample k occupies
// bits [64k+63:64k]. The pipeline depths below follow the stage split of the
// floating-point units (adder 3 stages, multiplier 2 stages).
package spiral_fft_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t im;
    fp32_t re;
  } cplx_t;

  localparam int unsigned NPT = 8;                 // points per transform
  typedef cplx_t [NPT-1:0] cvec_t;                 // 512-bit vector

  localparam int unsigned WORD_W   = $bits(cvec_t);
  localparam int unsigned ADD_LAT  = 3;            // exponent compare, mantissa add, normalize
  localparam int unsigned MUL_LAT  = 2;            // mantissa multiply, normalize
  localparam int unsigned CMUL_LAT = MUL_LAT + ADD_LAT;
  localparam int unsigned FFT_LAT  = 4 * ADD_LAT + MUL_LAT;  // longest path through fft8
  localparam int unsigned FIFO_DEPTH = 18;

  // 1/sqrt(2) rounded to single precision: the only non-trivial constant of
  // the 8-point transform (W8 = (1 - j)/sqrt(2)).
  localparam fp32_t FP_INV_SQRT2 = 32'h3F35_04F3;

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

endpackage
