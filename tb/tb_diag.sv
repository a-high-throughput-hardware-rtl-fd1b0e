// Self-checking testbench for diag: random 8-sample vectors and twiddle
// vectors at one per cycle with gaps in in_valid. Each output sample is
// checked bit-exactly against the single-precision complex product, and
// out_valid must follow in_valid exactly CMUL_LAT = 5 cycles later.
module tb_diag;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 600;
  localparam int LAT = CMUL_LAT;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, out_valid;
  cvec_t x, w, y;
  int    checks = 0, failures = 0;
  cvec_t exp_q [N];
  logic  vld_q [N];

  diag dut (.clk, .rst_n, .in_valid, .x, .w, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t ref_cmul(cplx_t p, cplx_t q);
    real rr, ii, ri, ir;
    cplx_t r;
    rr = f2r(r2f(f2r(p.re) * f2r(q.re)));
    ii = f2r(r2f(f2r(p.im) * f2r(q.im)));
    ri = f2r(r2f(f2r(p.re) * f2r(q.im)));
    ir = f2r(r2f(f2r(p.im) * f2r(q.re)));
    r.re = r2f(rr - ii);
    r.im = r2f(ri + ir);
    return r;
  endfunction

  initial begin
    x = '0; w = '0; in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        checks++;
        if (out_valid !== vld_q[i-LAT]) begin
          failures++;
          $display("valid mismatch at %0d", i - LAT);
        end
        if (vld_q[i-LAT]) begin
          for (int k = 0; k < NPT; k++) begin
            checks++;
            if (y[k] !== exp_q[i-LAT][k]) begin
              failures++;
              if (failures < 10) $display("mismatch #%0d[%0d]: got %h expected %h", i - LAT, k, y[k], exp_q[i-LAT][k]);
            end
          end
        end
      end
      if (i < N) begin
        in_valid = ($urandom % 4 != 0);
        for (int k = 0; k < NPT; k++) begin
          x[k].re = rand_fp(110, 140); x[k].im = rand_fp(110, 140);
          w[k].re = rand_fp(118, 127); w[k].im = rand_fp(118, 127);
          exp_q[i][k] = ref_cmul(x[k], w[k]);
        end
        vld_q[i] = in_valid;
      end else begin
        in_valid = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
