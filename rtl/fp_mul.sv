// Single-precision floating-point multiplier, two pipeline stages.
//
// Stage 1 forms the 48-bit mantissa product, the sum of the exponents and
// the sign; stage 2 normalises by at most one place, rounds to nearest even
// and packs. Latency is 2 cycles, one result per cycle. The same unit serves
// as the FFT's constant multiplier (one operand tied to a constant, which
// synthesis reduces) and as the two-input multiplier of the Diag unit.
// Subnormal inputs are read as zero and underflowing results flush to zero;
// infinities and NaNs propagate. The two-stage split follows the accelerator
// description; rounding and special-value handling are this design's choice.
module fp_mul
  import spiral_fft_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  // ---------------- stage 1: mantissa multiply ----------------
  logic [7:0]  ea, eb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
  end

  logic              s1_sign, s1_zero, s1_nan, s1_inf;
  logic signed [9:0] s1_exp;
  logic [47:0]       s1_prod;

  always_ff @(posedge clk) begin
    s1_sign <= a[31] ^ b[31];
    s1_exp  <= $signed({2'b00, ea}) + $signed({2'b00, eb}) - 10'sd127;
    s1_prod <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
    s1_nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    s1_inf  <= a_inf || b_inf;
    s1_zero <= a_zero || b_zero;
  end

  // ---------------- stage 2: normalise, round, pack ----------------
  logic [23:0]       m;
  logic              g, st, rnd_up;
  logic [24:0]       mant_r;
  logic signed [9:0] exp_n, exp_r;
  fp32_t             res;

  always_comb begin
    if (s1_prod[47]) begin
      m     = s1_prod[47:24];
      g     = s1_prod[23];
      st    = |s1_prod[22:0];
      exp_n = s1_exp + 10'sd1;
    end else begin
      m     = s1_prod[46:23];
      g     = s1_prod[22];
      st    = |s1_prod[21:0];
      exp_n = s1_exp;
    end
    rnd_up = g && (st || m[0]);
    mant_r = {1'b0, m} + 25'(rnd_up);
    exp_r  = exp_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_n + 10'sd1;
    end

    if (s1_nan)
      res = FP_QNAN;
    else if (s1_inf)
      res = {s1_sign, 8'hFF, 23'd0};
    else if (s1_zero || exp_r <= 10'sd0)
      res = {s1_sign, 31'd0};
    else if (exp_r >= 10'sd255)
      res = {s1_sign, 8'hFF, 23'd0};
    else
      res = {s1_sign, exp_r[7:0], mant_r[22:0]};
  end

  always_ff @(posedge clk) y <= res;

endmodule
