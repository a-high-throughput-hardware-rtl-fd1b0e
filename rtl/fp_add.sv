// Single-precision floating-point adder/subtractor, three pipeline stages.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1) with round to nearest
// even. The three register stages follow the split of the accelerator's
// adders: stage 1 compares exponents, swaps the operands so the larger
// magnitude comes first and aligns the smaller mantissa (keeping guard,
// round and sticky bits); stage 2 adds or subtracts the mantissas; stage 3
// normalises, rounds and packs. Latency is 3 cycles, one result per cycle,
// no stall. Subnormal inputs are read as zero and results below the normal
// range are flushed to zero; infinities and NaNs propagate (NaN results are
// the canonical quiet NaN). Rounding mode, subnormal handling and special
// values are this design's choices: the accelerator description only fixes
// the format and the stage split.
module fp_add
  import spiral_fft_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  // ---------------- stage 1: exponent compare and alignment ----------------
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_big;
  logic [7:0]  e_big, e_diff;
  logic [26:0] m_big, m_sml, m_sml_sh;
  logic        sticky;
  logic        a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_nan = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 0);
    a_big = {ea, ma} >= {eb, mb};
    e_big = a_big ? ea : eb;
    e_diff = a_big ? (ea - eb) : (eb - ea);
    m_big = a_big ? {ma, 3'b000} : {mb, 3'b000};
    m_sml = a_big ? {mb, 3'b000} : {ma, 3'b000};
    if (e_diff >= 8'd27) begin
      m_sml_sh = 27'd0;
      sticky   = |m_sml;
    end else begin
      m_sml_sh = m_sml >> e_diff;
      sticky   = |(m_sml & ~({27{1'b1}} << e_diff));
    end
    m_sml_sh[0] = m_sml_sh[0] | sticky;
  end

  logic        s1_sign, s1_esub, s1_nan, s1_inf, s1_inf_sign;
  logic [7:0]  s1_exp;
  logic [26:0] s1_mbig, s1_msml;

  always_ff @(posedge clk) begin
    s1_sign     <= a_big ? sa : sb;
    s1_esub     <= sa ^ sb;
    s1_exp      <= e_big;
    s1_mbig     <= m_big;
    s1_msml     <= m_sml_sh;
    s1_nan      <= a_nan || b_nan || (a_inf && b_inf && (sa != sb));
    s1_inf      <= a_inf || b_inf;
    s1_inf_sign <= a_inf ? sa : sb;
  end

  // ---------------- stage 2: mantissa add / subtract ----------------
  logic [27:0] sum;
  always_comb begin
    if (s1_esub) sum = {1'b0, s1_mbig} - {1'b0, s1_msml};
    else         sum = {1'b0, s1_mbig} + {1'b0, s1_msml};
  end

  logic        s2_sign, s2_esub, s2_nan, s2_inf, s2_inf_sign;
  logic [7:0]  s2_exp;
  logic [27:0] s2_sum;

  always_ff @(posedge clk) begin
    s2_sign     <= s1_sign;
    s2_esub     <= s1_esub;
    s2_exp      <= s1_exp;
    s2_sum      <= sum;
    s2_nan      <= s1_nan;
    s2_inf      <= s1_inf;
    s2_inf_sign <= s1_inf_sign;
  end

  // ---------------- stage 3: normalise, round, pack ----------------
  logic [4:0]        lz;
  logic [26:0]       norm;
  logic signed [9:0] exp_n, exp_r;
  logic [24:0]       mant_r;
  logic              rnd_up;
  fp32_t             res;

  always_comb begin
    lz = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (s2_sum[i]) begin
        lz = 5'(26 - i);
        break;
      end
    end
    if (s2_sum[27]) begin
      norm  = {s2_sum[27:2], s2_sum[1] | s2_sum[0]};
      exp_n = $signed({2'b00, s2_exp}) + 10'sd1;
    end else begin
      norm  = s2_sum[26:0] << lz;
      exp_n = $signed({2'b00, s2_exp}) - $signed({5'd0, lz});
    end
    rnd_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r = {1'b0, norm[26:3]} + 25'(rnd_up);
    exp_r  = exp_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_n + 10'sd1;
    end

    if (s2_nan)
      res = FP_QNAN;
    else if (s2_inf)
      res = {s2_inf_sign, 8'hFF, 23'd0};
    else if (s2_sum == 28'd0)
      res = {s2_sign & ~s2_esub, 31'd0};
    else if (exp_r >= 10'sd255)
      res = {s2_sign, 8'hFF, 23'd0};
    else if (exp_r <= 10'sd0)
      res = {s2_sign, 31'd0};
    else
      res = {s2_sign, exp_r[7:0], mant_r[22:0]};
  end

  always_ff @(posedge clk) y <= res;

endmodule
