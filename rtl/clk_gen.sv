// Behavioural model (not synthesizable) of the on-chip clock generator, a
// ring oscillator of inverters whose setting is shifted in over a scan input.
//
// The real part is a tunable ring oscillator built from standard-cell
// inverters; its frequency depends on process, voltage and the selected
// ring length, which a digital model cannot reproduce. This model keeps the
// real part's interface and its configurability: NBITS scan bits are shifted
// in on scan_clk (first bit ends up in cfg[0] after NBITS clocks);
// cfg[0] enables the oscillator and cfg[NBITS-1:1] selects the delay, giving
// a half period of BASE_HALF + code * STEP_HALF time units. When disabled,
// clk_out is held low. The scan-chain length and the period law are this
// model's assumptions; only the block's existence, its ring-of-inverters
// nature and its scan input are given.
module clk_gen #(
  parameter int unsigned NBITS     = 8,
  parameter int unsigned BASE_HALF = 2,
  parameter int unsigned STEP_HALF = 1
) (
  input  logic scan_clk,
  input  logic scan_in,
  output logic clk_out
);
  logic [NBITS-1:0] cfg;

  initial cfg = '0;

  always @(posedge scan_clk) cfg <= {scan_in, cfg[NBITS-1:1]};

  int unsigned half;
  assign half = BASE_HALF + int'(cfg[NBITS-1:1]) * STEP_HALF;

  initial clk_out = 1'b0;

  always begin
    if (cfg[0]) begin
      #(half) clk_out = ~clk_out;
    end else begin
      clk_out = 1'b0;
      @(cfg);
    end
  end
endmodule
