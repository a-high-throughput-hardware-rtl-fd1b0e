// Self-checking testbench for ctrl. The FIFOs and the pipeline around the
// control unit are modelled here: word counters stand for the two input
// FIFOs (full after 18 writes), results come back 19 cycles after fft_rdy,
// and the output FIFO's head is a known word per pop. The host side drives
// the asynchronous nibble port with slow strobes. Checked: each written
// word equals the 128 nibbles sent for it (least significant first), 18
// words go to each input FIFO in that order; compute mode issues exactly
// 18 consecutive fft_rdy cycles; readout presents every nibble of the 18
// output words in order with one out_fifo_rdy per word; looping mode keeps
// issuing whole 18-word passes while start is high and stops on a pass
// boundary after it falls.
module tb_ctrl;
  import spiral_fft_pkg::*;

  localparam int DEPTH = 18;
  localparam int NIBS  = WORD_W / 4;
  localparam int RES_LAT = FFT_LAT + CMUL_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_in, start, load_out;
  logic [3:0] data_in, data_out;
  logic [WORD_W-1:0] fifo_wdata, out_fifo_data;
  logic fft_fifo_valid, twd_fifo_valid, in_fifo_clear, fifo_full, twd_fifo_full;
  logic fft_rdy, res_valid, out_fifo_clear, out_fifo_rdy, looping, busy;

  int checks = 0, failures = 0;
  int n_fft_wr = 0, n_twd_wr = 0, n_pop = 0, n_rdy = 0;
  logic [WORD_W-1:0] sent [2*DEPTH];
  logic [RES_LAT-1:0] rdy_pipe;

  ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WORD_W-1:0] out_word(int i);
    return {16{32'(i * 32'h6C8E_9CF5 + 3)}};
  endfunction

  // environment: FIFO fill levels, pipeline return, output FIFO head
  assign fifo_full     = (n_fft_wr >= DEPTH);
  assign twd_fifo_full = (n_twd_wr >= DEPTH);
  assign res_valid     = rdy_pipe[RES_LAT-1];
  assign out_fifo_data = out_word(n_pop);

  always_ff @(posedge clk) begin
    rdy_pipe <= rst_n ? {rdy_pipe[RES_LAT-2:0], fft_rdy} : '0;
    if (in_fifo_clear) begin
      n_fft_wr <= 0;
      n_twd_wr <= 0;
    end
    if (fft_fifo_valid && rst_n) begin
      checks++;
      if (fifo_wdata !== sent[n_fft_wr]) begin failures++; $display("FFT word %0d wrong", n_fft_wr); end
      n_fft_wr <= n_fft_wr + 1;
    end
    if (twd_fifo_valid && rst_n) begin
      checks++;
      if (fifo_wdata !== sent[DEPTH + n_twd_wr]) begin failures++; $display("twiddle word %0d wrong", n_twd_wr); end
      n_twd_wr <= n_twd_wr + 1;
    end
    if (out_fifo_clear) n_pop <= 0;
    else if (out_fifo_rdy) n_pop <= n_pop + 1;
    if (fft_rdy) n_rdy <= n_rdy + 1;
  end

  task automatic send_nibble(logic [3:0] n);
    data_in = n;
    #13 load_in = 1'b1;
    #37 load_in = 1'b0;
    #31;
  endtask

  task automatic load_session(logic mode);
    send_nibble({3'b000, mode});
    for (int w = 0; w < 2 * DEPTH; w++) begin
      sent[w] = {16{$urandom}};
      for (int k = 0; k < NIBS; k++) send_nibble(sent[w][4*k +: 4]);
    end
    #200;
    checks++;
    if (n_fft_wr != DEPTH || n_twd_wr != DEPTH || busy || looping != mode) begin
      failures++;
      $display("load session: %0d FFT words, %0d twiddle words, busy %0d", n_fft_wr, n_twd_wr, busy);
    end
  endtask

  task automatic read_out();
    for (int w = 0; w < DEPTH; w++)
      for (int k = 0; k < NIBS; k++) begin
        checks++;
        if (data_out !== out_word(w)[4*k +: 4]) begin
          failures++;
          if (failures < 10) $display("readout word %0d nibble %0d wrong", w, k);
        end
        #17 load_out = 1'b1;
        #41 load_out = 1'b0;
        #29;
      end
    #100;
    checks++;
    if (n_pop != DEPTH || busy) begin failures++; $display("readout: %0d pops, busy %0d", n_pop, busy); end
  endtask

  // fft_rdy must come in runs of exactly DEPTH cycles per pass
  int run_len = 0;
  always @(posedge clk) begin
    if (fft_rdy) run_len++;
    else if (run_len != 0) begin
      checks++;
      if (run_len % DEPTH != 0) begin failures++; $display("fft_rdy run of %0d cycles", run_len); end
      run_len = 0;
    end
  end

  initial begin
    load_in = 0; start = 0; load_out = 0; data_in = '0; rdy_pipe = '0;
    #33 rst_n = 1'b1;
    #50;

    // start with empty FIFOs is ignored
    start = 1'b1; #100 start = 1'b0; #100;
    checks++;
    if (n_rdy != 0) begin failures++; $display("ran without data"); end

    // compute mode: one pass
    load_session(1'b0);
    start = 1'b1; #100 start = 1'b0;
    #400;
    checks++;
    if (n_rdy != DEPTH) begin failures++; $display("compute mode issued %0d words", n_rdy); end
    read_out();

    // looping mode: several passes
    load_session(1'b1);
    n_rdy = 0;
    start = 1'b1; #2000 start = 1'b0;
    #600;
    checks++;
    if (n_rdy < 5 * DEPTH || n_rdy % DEPTH != 0) begin failures++; $display("looping mode issued %0d words", n_rdy); end
    read_out();

    // restart compute on the data still held, no reload
    n_rdy = 0;
    start = 1'b1; #100 start = 1'b0;
    #400;
    checks++;
    if (n_rdy < DEPTH) begin failures++; $display("rerun issued %0d words", n_rdy); end
    read_out();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
