// Top level of the radix-8 FFTW twiddle-codelet accelerator test chip.
//
// The datapath computes, for every 512-bit input vector x (eight complex
// single-precision samples) and twiddle vector w, the twiddle codelet
//   y[k] = w[k] * sum_n x[n] * exp(-j*2*pi*n*k/8),   k = 0..7,
// at a rate of one vector per clock cycle: the pipelined fft8 (14 cycles)
// feeds the Diag unit (eight complex multipliers, 5 cycles) directly.
// Three 18-deep shift-register FIFOs surround it: the FFT-input FIFO and the
// twiddle FIFO (both loaded by the control unit over a 512-bit bus and both
// looping their output back to their input while running), and the output
// FIFO that captures Diag's results. The FFT-input FIFO rotates on fft_rdy;
// the twiddle FIFO rotates when the FFT output is valid (diag_fifo_valid),
// so each twiddle word meets the transform it belongs to at the Diag input.
//
// Off-chip interface (see ctrl): nibble-wide, asynchronous data_in/load_in
// for loading (first nibble selects compute or looping mode), start to run,
// data_out/load_out for reading the 18 result words back. The core clock is
// either clk_ext or the on-chip ring-oscillator clock generator: clk_sel = 1
// selects clk_ext (this polarity is this design's choice). rst_n is an
// asynchronous active-low reset, also this design's addition. The clock
// multiplexer is a plain multiplexer on a test chip's clock path; switch it
// only while the chip is held in reset.
module spiral_fft_chip
  import spiral_fft_pkg::*;
(
  input  logic       clk_ext,
  input  logic       clk_sel,
  input  logic       clk_gen_scan_clk,
  input  logic       clk_gen_scan_in,
  input  logic       rst_n,
  input  logic       load_in,
  input  logic       start,
  input  logic [3:0] data_in,
  input  logic       load_out,
  output logic [3:0] data_out
);
  localparam int unsigned DEPTH = FIFO_DEPTH;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  // ---------------- clocking ----------------
  logic clk_int, clk;

  clk_gen u_clk_gen (
    .scan_clk (clk_gen_scan_clk),
    .scan_in  (clk_gen_scan_in),
    .clk_out  (clk_int)
  );

  assign clk = clk_sel ? clk_ext : clk_int;

  // ---------------- control ----------------
  logic [WORD_W-1:0] input_fifo_in_data;
  logic fft_fifo_valid, twd_fifo_valid, in_fifo_clear;
  logic fifo_full, twd_fifo_full;
  logic fft_rdy, diag_fifo_valid, res_valid;
  logic out_fifo_clear, out_fifo_rdy;
  logic looping, busy;
  cvec_t fft_in, fft_out, twd, res;
  logic [WORD_W-1:0] out_head;
  logic [CW-1:0] fft_cnt, twd_cnt, out_cnt;
  logic fft_empty, twd_empty, out_full, out_empty;

  ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n,
    .load_in, .start, .data_in, .load_out, .data_out,
    .fifo_wdata     (input_fifo_in_data),
    .fft_fifo_valid, .twd_fifo_valid, .in_fifo_clear,
    .fifo_full, .twd_fifo_full,
    .fft_rdy, .res_valid,
    .out_fifo_clear, .out_fifo_rdy,
    .out_fifo_data  (out_head),
    .looping, .busy
  );

  // ---------------- FIFOs and datapath ----------------
  shift_fifo #(.W(WORD_W), .DEPTH(DEPTH)) u_fft_fifo (
    .clk, .rst_n,
    .clear (in_fifo_clear),
    .push  (fft_fifo_valid),
    .rot   (fft_rdy),
    .pop   (1'b0),
    .din   (input_fifo_in_data),
    .dout  (fft_in),
    .count (fft_cnt),
    .full  (fifo_full),
    .empty (fft_empty)
  );

  fft8 u_fft8 (
    .clk, .rst_n,
    .in_valid  (fft_rdy),
    .x         (fft_in),
    .out_valid (diag_fifo_valid),
    .y         (fft_out)
  );

  shift_fifo #(.W(WORD_W), .DEPTH(DEPTH)) u_twd_fifo (
    .clk, .rst_n,
    .clear (in_fifo_clear),
    .push  (twd_fifo_valid),
    .rot   (diag_fifo_valid),
    .pop   (1'b0),
    .din   (input_fifo_in_data),
    .dout  (twd),
    .count (twd_cnt),
    .full  (twd_fifo_full),
    .empty (twd_empty)
  );

  diag u_diag (
    .clk, .rst_n,
    .in_valid  (diag_fifo_valid),
    .x         (fft_out),
    .w         (twd),
    .out_valid (res_valid),
    .y         (res)
  );

  shift_fifo #(.W(WORD_W), .DEPTH(DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .clear (out_fifo_clear),
    .push  (res_valid),
    .rot   (1'b0),
    .pop   (out_fifo_rdy),
    .din   (res),
    .dout  (out_head),
    .count (out_cnt),
    .full  (out_full),
    .empty (out_empty)
  );

endmodule
