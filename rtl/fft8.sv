// Fully unrolled, pipelined radix-8 complex FFT: X[k] = sum_n x[n] W8^(nk),
// W8 = exp(-j*2*pi/8), one 8-point transform accepted and one delivered per
// clock cycle.
//
// Every real addition or subtraction of the signal-flow graph has its own
// 3-stage floating-point adder, and the only non-trivial twiddle factor,
// 1/sqrt(2), is applied by four constant multipliers (2 stages). The graph
// is a decimation-in-frequency split:
//   layer 1   a[k] = x[k] + x[k+4],  b[k] = x[k] - x[k+4]      (k = 0..3)
//   even half 4-point DFT of a  -> X0, X2, X4, X6
//   odd half  b1 *= W8, b2 *= -j (sign/swap only), b3 *= W8^3, then a
//             4-point DFT -> X1, X3, X5, X7
// The longest path (add, multiply, add, add, add) is 4*3 + 2 = 14 cycles;
// shorter paths are padded with delay registers so that all eight outputs of
// one transform leave together. 52 adders and 4 multipliers in total.
// in_valid is carried alongside as out_valid.
//
// The fixed radix-8 structure, dedicated adders, constant multipliers and
// aligned pipeline registers follow the accelerator description; the exact
// graph and its resulting depth (14 stages) are this design's own.
module fft8
  import spiral_fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cvec_t x,
  output logic  out_valid,
  output cvec_t y
);
  localparam int unsigned NADD = 52;

  fp32_t opa [NADD];
  fp32_t opb [NADD];
  logic  opsub [NADD];
  fp32_t res [NADD];

  for (genvar i = 0; i < NADD; i++) begin : g_add
    fp_add u_add (.clk, .a(opa[i]), .b(opb[i]), .sub(opsub[i]), .y(res[i]));
  end

  // constant multipliers: p = c*b1r, q = c*b1i, r = c*b3r, s = c*b3i
  fp32_t mres [4];
  fp_mul u_mp (.clk, .a(res[4*1+2]), .b(FP_INV_SQRT2), .y(mres[0]));
  fp_mul u_mq (.clk, .a(res[4*1+3]), .b(FP_INV_SQRT2), .y(mres[1]));
  fp_mul u_mr (.clk, .a(res[4*3+2]), .b(FP_INV_SQRT2), .y(mres[2]));
  fp_mul u_ms (.clk, .a(res[4*3+3]), .b(FP_INV_SQRT2), .y(mres[3]));

  // e0/e1 (ready at cycle 6) wait 5 cycles for f0/f1 (ready at cycle 11)
  fp32_t e_d [4];
  delay_line #(.W(128), .N(5)) u_dly_e (
    .clk, .d({res[35], res[34], res[33], res[32]}),
    .q({e_d[3], e_d[2], e_d[1], e_d[0]}));

  // even outputs (ready at cycle 9) wait 5 cycles for the odd ones (14)
  fp32_t ev_d [8];
  delay_line #(.W(256), .N(5)) u_dly_even (
    .clk,
    .d({res[31], res[30], res[29], res[28], res[27], res[26], res[25], res[24]}),
    .q({ev_d[7], ev_d[6], ev_d[5], ev_d[4], ev_d[3], ev_d[2], ev_d[1], ev_d[0]}));

  // Set one adder's operands.
  `define FFT_OP(I, A, B, S) begin opa[I] = (A); opb[I] = (B); opsub[I] = (S); end

  always_comb begin
    // layer 1: a[k] (indices 4k, 4k+1) and b[k] (4k+2, 4k+3)
    for (int k = 0; k < 4; k++) begin
      `FFT_OP(4*k+0, x[k].re, x[k+4].re, 1'b0)
      `FFT_OP(4*k+1, x[k].im, x[k+4].im, 1'b0)
      `FFT_OP(4*k+2, x[k].re, x[k+4].re, 1'b1)
      `FFT_OP(4*k+3, x[k].im, x[k+4].im, 1'b1)
    end
    // even half, layer 2: c0 = a0+a2, c1 = a1+a3, d0 = a0-a2, d1 = a1-a3
    `FFT_OP(16, res[0],  res[8],  1'b0)
    `FFT_OP(17, res[1],  res[9],  1'b0)
    `FFT_OP(18, res[4],  res[12], 1'b0)
    `FFT_OP(19, res[5],  res[13], 1'b0)
    `FFT_OP(20, res[0],  res[8],  1'b1)
    `FFT_OP(21, res[1],  res[9],  1'b1)
    `FFT_OP(22, res[4],  res[12], 1'b1)
    `FFT_OP(23, res[5],  res[13], 1'b1)
    // even half, layer 3: X0 = c0+c1, X4 = c0-c1, X2 = d0 - j*d1, X6 = d0 + j*d1
    `FFT_OP(24, res[16], res[18], 1'b0)
    `FFT_OP(25, res[17], res[19], 1'b0)
    `FFT_OP(26, res[16], res[18], 1'b1)
    `FFT_OP(27, res[17], res[19], 1'b1)
    `FFT_OP(28, res[20], res[23], 1'b0)
    `FFT_OP(29, res[21], res[22], 1'b1)
    `FFT_OP(30, res[20], res[23], 1'b1)
    `FFT_OP(31, res[21], res[22], 1'b0)
    // odd half: e0 = b0 + (-j)b2, e1 = b0 - (-j)b2 with (-j)b2 = (b2i, -b2r)
    `FFT_OP(32, res[2],  res[11], 1'b0)
    `FFT_OP(33, res[3],  res[10], 1'b1)
    `FFT_OP(34, res[2],  res[11], 1'b1)
    `FFT_OP(35, res[3],  res[10], 1'b0)
    // odd half: W8*b1 = (p+q, q-p); W8^3*b3 = (s-r, -(r+s)) = (u, -t)
    `FFT_OP(36, mres[0], mres[1], 1'b0)
    `FFT_OP(37, mres[1], mres[0], 1'b1)
    `FFT_OP(38, mres[3], mres[2], 1'b1)
    `FFT_OP(39, mres[2], mres[3], 1'b0)
    // odd half: f0 = W8*b1 + W8^3*b3, f1 = W8*b1 - W8^3*b3
    `FFT_OP(40, res[36], res[38], 1'b0)
    `FFT_OP(41, res[37], res[39], 1'b1)
    `FFT_OP(42, res[36], res[38], 1'b1)
    `FFT_OP(43, res[37], res[39], 1'b0)
    // odd half, last layer: X1 = e0+f0, X5 = e0-f0, X3 = e1 - j*f1, X7 = e1 + j*f1
    `FFT_OP(44, e_d[0],  res[40], 1'b0)
    `FFT_OP(45, e_d[1],  res[41], 1'b0)
    `FFT_OP(46, e_d[0],  res[40], 1'b1)
    `FFT_OP(47, e_d[1],  res[41], 1'b1)
    `FFT_OP(48, e_d[2],  res[43], 1'b0)
    `FFT_OP(49, e_d[3],  res[42], 1'b1)
    `FFT_OP(50, e_d[2],  res[43], 1'b1)
    `FFT_OP(51, e_d[3],  res[42], 1'b0)
  end

  `undef FFT_OP

  always_comb begin
    y[0] = '{re: ev_d[0], im: ev_d[1]};
    y[4] = '{re: ev_d[2], im: ev_d[3]};
    y[2] = '{re: ev_d[4], im: ev_d[5]};
    y[6] = '{re: ev_d[6], im: ev_d[7]};
    y[1] = '{re: res[44], im: res[45]};
    y[5] = '{re: res[46], im: res[47]};
    y[3] = '{re: res[48], im: res[49]};
    y[7] = '{re: res[50], im: res[51]};
  end

  logic [FFT_LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[FFT_LAT-2:0], in_valid};
  end
  assign out_valid = vld[FFT_LAT-1];
endmodule
