// Self-checking testbench for cmul: random complex operands, one product
// per cycle, each checked bit-exactly against (xr*wr - xi*wi) +
// j(xr*wi + xi*wr) with every product and sum rounded to single precision,
// exactly CMUL_LAT = 5 cycles after its operands were applied.
module tb_cmul;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 3000;
  localparam int LAT = CMUL_LAT;

  logic  clk = 1'b0;
  cplx_t x, w, y;
  int    checks = 0, failures = 0;
  cplx_t exp_q [N];

  cmul dut (.clk, .x, .w, .y);

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
    x = '0; w = '0;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        checks++;
        if (y !== exp_q[i-LAT]) begin
          failures++;
          if (failures < 10) $display("mismatch #%0d: got %h expected %h", i - LAT, y, exp_q[i-LAT]);
        end
      end
      if (i < N) begin
        x.re = rand_fp(110, 140); x.im = rand_fp(110, 140);
        w.re = rand_fp(120, 127); w.im = rand_fp(120, 127);
        if (i % 5 == 0) w.im = '0;                  // real twiddle
        exp_q[i] = ref_cmul(x, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
