// Diag unit: the general twiddle multiplication that turns the 8-point FFT
// into a twiddle codelet.
//
// Eight complex multipliers work in parallel, y[k] = x[k] * w[k] for
// k = 0..7, on one 512-bit vector per cycle. in_valid travels with the data
// and comes out as out_valid CMUL_LAT = 5 cycles later. The eight parallel
// multipliers and the 5-stage depth follow the accelerator description; the
// valid flag is this design's addition for the control unit.
module diag
  import spiral_fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cvec_t x,
  input  cvec_t w,
  output logic  out_valid,
  output cvec_t y
);
  for (genvar k = 0; k < NPT; k++) begin : g_cm
    cmul u_cmul (.clk, .x(x[k]), .w(w[k]), .y(y[k]));
  end

  logic [CMUL_LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[CMUL_LAT-2:0], in_valid};
  end
  assign out_valid = vld[CMUL_LAT-1];
endmodule
