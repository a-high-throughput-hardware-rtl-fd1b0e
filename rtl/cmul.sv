// Complex single-precision multiplier: y = x * w.
//
// Four floating-point multipliers form xr*wr, xi*wi, xr*wi and xi*wr in
// parallel; two floating-point adders then form the real part (a
// subtraction) and the imaginary part (an addition). Latency is
// MUL_LAT + ADD_LAT = 5 cycles, fully pipelined, one product per cycle.
// Structure and stage count follow the accelerator's Diag unit.
module cmul
  import spiral_fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t x,
  input  cplx_t w,
  output cplx_t y
);
  fp32_t rr, ii, ri, ir;

  fp_mul u_rr (.clk, .a(x.re), .b(w.re), .y(rr));
  fp_mul u_ii (.clk, .a(x.im), .b(w.im), .y(ii));
  fp_mul u_ri (.clk, .a(x.re), .b(w.im), .y(ri));
  fp_mul u_ir (.clk, .a(x.im), .b(w.re), .y(ir));

  fp_add u_re (.clk, .a(rr), .b(ii), .sub(1'b1), .y(y.re));
  fp_add u_im (.clk, .a(ri), .b(ir), .sub(1'b0), .y(y.im));
endmodule
