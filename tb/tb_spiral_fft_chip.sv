// End-to-end testbench of the accelerator chip at its default size (three
// 18 x 512-bit FIFOs). Acting as the off-chip tester, it
//  1. scans a setting into the clock generator and runs the chip on the
//     internal clock (clk_sel = 0): loads 18 input vectors and 18 twiddle
//     vectors in compute mode through the nibble port, starts one pass and
//     reads the 18 result vectors back;
//  2. resets, switches to the external clock (clk_sel = 1), reloads the same
//     data in looping mode, runs many passes and reads the results again;
//  3. starts once more on the data the input FIFOs kept, without reloading.
// Every result sample is checked against w[k] * DFT8(x)[k] computed in
// double precision (tolerance 1e-6 of the product of the input and twiddle
// magnitudes), looping-mode and repeated results must equal the first
// results bit for bit, and the datapath's issue-to-result latency must be
// FFT_LAT + CMUL_LAT = 19 cycles with one vector per cycle. Each mechanism
// (internal and external clock, both input FIFOs filling, loopback
// rotation, compute and looping mode, output-FIFO overflow in looping mode,
// readout pops) is counted and must occur at least once.
module tb_spiral_fft_chip;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int DEPTH = FIFO_DEPTH;
  localparam int NIBS  = WORD_W / 4;
  localparam real PI   = 3.14159265358979323846;

  logic clk_ext = 1'b0, clk_sel = 1'b0, scan_clk = 1'b0, scan_in = 1'b0, rst_n = 1'b0;
  logic load_in = 1'b0, start = 1'b0, load_out = 1'b0;
  logic [3:0] data_in = '0, data_out;

  int checks = 0, failures = 0;
  cvec_t xin [DEPTH], twd [DEPTH], first_res [DEPTH];
  real   ref_re [DEPTH][NPT], ref_im [DEPTH][NPT], tol [DEPTH];

  spiral_fft_chip dut (
    .clk_ext, .clk_sel, .clk_gen_scan_clk(scan_clk), .clk_gen_scan_in(scan_in), .rst_n,
    .load_in, .start, .data_in, .load_out, .data_out
  );

  always #5 clk_ext = ~clk_ext;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_int_clk = 0, n_ext_clk = 0, n_fft_full = 0, n_twd_full = 0, n_rot = 0;
  int n_compute = 0, n_looping = 0, n_overflow = 0, n_pop = 0, n_issue = 0, n_res = 0;
  int lat_checks = 0;
  longint cyc = 0;
  longint issue_t [$];

  always @(posedge dut.clk) begin
    cyc++;
    if (clk_sel) n_ext_clk++; else n_int_clk++;
    if (dut.fft_fifo_valid && dut.u_fft_fifo.count == 5'(DEPTH - 1)) n_fft_full++;
    if (dut.twd_fifo_valid && dut.u_twd_fifo.count == 5'(DEPTH - 1)) n_twd_full++;
    if (dut.fft_rdy) begin
      n_rot++;
      issue_t.push_back(cyc);
      if (dut.looping) n_looping++; else n_compute++;
    end
    if (dut.res_valid) begin
      n_res++;
      checks++;
      if (issue_t.size() == 0 || cyc - issue_t.pop_front() != longint'(FFT_LAT + CMUL_LAT)) begin
        failures++;
        $display("result latency wrong");
      end
      if (dut.out_full) n_overflow++;
    end
    if (dut.out_fifo_rdy) n_pop++;
  end

  // ---------------- host-side tasks ----------------
  task automatic send_nibble(logic [3:0] n);
    data_in = n;
    #13 load_in = 1'b1;
    #37 load_in = 1'b0;
    #31;
  endtask

  task automatic send_word(cvec_t w);
    logic [WORD_W-1:0] b;
    b = w;
    for (int k = 0; k < NIBS; k++) send_nibble(b[4*k +: 4]);
  endtask

  task automatic load(logic mode);
    send_nibble({3'b000, mode});
    for (int i = 0; i < DEPTH; i++) send_word(xin[i]);
    for (int i = 0; i < DEPTH; i++) send_word(twd[i]);
    #300;
    checks++;
    if (!dut.fifo_full || !dut.twd_fifo_full || dut.busy) begin
      failures++;
      $display("load did not fill both input FIFOs");
    end
  endtask

  task automatic wait_idle();
    int guard = 0;
    #200;
    while (dut.u_ctrl.state != dut.u_ctrl.S_READ && guard < 100000) begin #10; guard++; end
    #100;
  endtask

  task automatic read_results(output cvec_t r [DEPTH]);
    logic [WORD_W-1:0] b;
    for (int i = 0; i < DEPTH; i++) begin
      for (int k = 0; k < NIBS; k++) begin
        b[4*k +: 4] = data_out;
        #17 load_out = 1'b1;
        #41 load_out = 1'b0;
        #29;
      end
      r[i] = b;
    end
    #100;
  endtask

  task automatic check_ref(cvec_t r [DEPTH], string tag);
    for (int i = 0; i < DEPTH; i++)
      for (int k = 0; k < NPT; k++) begin
        real er, ei;
        er = fabs(f2r(r[i][k].re) - ref_re[i][k]);
        ei = fabs(f2r(r[i][k].im) - ref_im[i][k]);
        checks++;
        if (er > tol[i] || ei > tol[i]) begin
          failures++;
          if (failures < 10) $display("%s: vector %0d sample %0d got (%g,%g) expected (%g,%g)", tag, i, k,
                                      f2r(r[i][k].re), f2r(r[i][k].im), ref_re[i][k], ref_im[i][k]);
        end
      end
  endtask

  task automatic check_same(cvec_t r [DEPTH], string tag);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (r[i] !== first_res[i]) begin
        failures++;
        $display("%s: vector %0d differs from the first run", tag, i);
      end
    end
  endtask

  // ---------------- stimulus and reference ----------------
  task automatic make_data();
    for (int i = 0; i < DEPTH; i++) begin
      real l1, wmax;
      for (int n = 0; n < NPT; n++) begin
        if (i == 0) xin[i][n] = '{re: (n == 0) ? 32'h3F80_0000 : 32'h0, im: 32'h0};
        else xin[i][n] = '{re: rand_fp(118, 132), im: rand_fp(118, 132)};
        // twiddles: exp(-j*2*pi*n*i/64) as an FFTW codelet would use
        twd[i][n] = '{re: r2f($cos(2.0 * PI * n * i / 64.0)), im: r2f(-$sin(2.0 * PI * n * i / 64.0))};
      end
      l1 = 0.0;
      for (int n = 0; n < NPT; n++) l1 += fabs(f2r(xin[i][n].re)) + fabs(f2r(xin[i][n].im));
      tol[i] = 2.0e-6 * l1 + 1.0e-30;
      for (int k = 0; k < NPT; k++) begin
        real sr, si, wr, wi;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < NPT; n++) begin
          real c, s, xr, xi;
          c  = $cos(2.0 * PI * n * k / 8.0);
          s  = -$sin(2.0 * PI * n * k / 8.0);
          xr = f2r(xin[i][n].re);
          xi = f2r(xin[i][n].im);
          sr += xr * c - xi * s;
          si += xr * s + xi * c;
        end
        wr = f2r(twd[i][k].re);
        wi = f2r(twd[i][k].im);
        ref_re[i][k] = sr * wr - si * wi;
        ref_im[i][k] = sr * wi + si * wr;
      end
    end
  endtask

  initial begin
    cvec_t r [DEPTH];
    make_data();

    // 1. internal clock: scan in enable = 1, delay code 5 (half period 7)
    for (int i = 0; i < 8; i++) begin
      scan_in = (i == 0) || (i == 1) || (i == 3);
      #3 scan_clk = 1'b1;
      #3 scan_clk = 1'b0;
    end
    clk_sel = 1'b0;
    #100 rst_n = 1'b1;
    #100;
    load(1'b0);
    start = 1'b1; #200 start = 1'b0;
    wait_idle();
    checks++;
    if (dut.u_out_fifo.count != 5'(DEPTH)) begin failures++; $display("compute pass did not fill the output FIFO"); end
    read_results(first_res);
    check_ref(first_res, "compute");

    // 2. external clock, looping mode
    rst_n = 1'b0;
    #50 clk_sel = 1'b1;
    #50 rst_n = 1'b1;
    #100;
    load(1'b1);
    start = 1'b1; #3000 start = 1'b0;
    wait_idle();
    read_results(r);
    check_same(r, "looping");

    // 3. start again on the data the input FIFOs kept (no reload)
    start = 1'b1; #200 start = 1'b0;
    wait_idle();
    read_results(r);
    check_same(r, "retained");

    // mechanisms
    checks += 9;
    if (n_int_clk == 0)  begin failures++; $display("internal clock never used"); end
    if (n_ext_clk == 0)  begin failures++; $display("external clock never used"); end
    if (n_fft_full == 0) begin failures++; $display("FFT input FIFO never filled"); end
    if (n_twd_full == 0) begin failures++; $display("twiddle FIFO never filled"); end
    if (n_rot <= DEPTH)  begin failures++; $display("loopback rotation not exercised"); end
    if (n_compute == 0)  begin failures++; $display("compute mode never ran"); end
    if (n_looping <= DEPTH) begin failures++; $display("looping mode never ran several passes"); end
    if (n_overflow == 0) begin failures++; $display("output FIFO never overflowed"); end
    if (n_pop != 3 * DEPTH) begin failures++; $display("readout pops %0d", n_pop); end
    $display("mechanisms: int_clk=%0d ext_clk=%0d fft_full=%0d twd_full=%0d rot=%0d compute=%0d looping=%0d overflow=%0d pops=%0d",
             n_int_clk, n_ext_clk, n_fft_full, n_twd_full, n_rot, n_compute, n_looping, n_overflow, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
