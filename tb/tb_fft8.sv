// Self-checking testbench for fft8. Directed vectors (impulse, constant,
// single tones, alternating signs) and random vectors are applied one per
// cycle with gaps in in_valid. Each output vector is compared with an
// 8-point DFT computed in double precision, X[k] = sum x[n] exp(-j2pi nk/8);
// an error of more than 1e-6 times the input's L1 norm fails. out_valid
// must follow in_valid exactly FFT_LAT = 14 cycles later, and the results
// must leave in that same cycle, one transform per cycle.
module tb_fft8;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 400;
  localparam int LAT = FFT_LAT;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, out_valid;
  cvec_t x, y;
  int    checks = 0, failures = 0;
  real   ref_re [N][NPT];
  real   ref_im [N][NPT];
  real   tol_q [N];
  logic  vld_q [N];

  fft8 dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_input(int i);
    for (int n = 0; n < NPT; n++) begin
      case (i)
        0: x[n] = '{re: (n == 0) ? 32'h3F80_0000 : 32'h0, im: 32'h0};       // impulse
        1: x[n] = '{re: 32'h4000_0000, im: 32'hBF80_0000};                  // constant 2 - j
        2: x[n] = '{re: r2f($cos(2.0*PI*n/8.0)), im: r2f($sin(2.0*PI*n/8.0))};   // tone k=1
        3: x[n] = '{re: r2f($cos(2.0*PI*3*n/8.0)), im: r2f(-$sin(2.0*PI*3*n/8.0))}; // tone k=5
        4: x[n] = '{re: (n % 2 == 0) ? 32'h3F80_0000 : 32'hBF80_0000, im: 32'h0}; // k=4
        default: x[n] = '{re: rand_fp(115, 135), im: rand_fp(115, 135)};
      endcase
    end
  endtask

  task automatic make_ref(int i);
    real l1;
    l1 = 0.0;
    for (int n = 0; n < NPT; n++) l1 += fabs(f2r(x[n].re)) + fabs(f2r(x[n].im));
    tol_q[i] = 1.0e-6 * l1 + 1.0e-30;
    for (int k = 0; k < NPT; k++) begin
      ref_re[i][k] = 0.0;
      ref_im[i][k] = 0.0;
      for (int n = 0; n < NPT; n++) begin
        real c, s, xr, xi;
        c  = $cos(2.0 * PI * n * k / 8.0);
        s  = -$sin(2.0 * PI * n * k / 8.0);
        xr = f2r(x[n].re);
        xi = f2r(x[n].im);
        ref_re[i][k] += xr * c - xi * s;
        ref_im[i][k] += xr * s + xi * c;
      end
    end
  endtask

  initial begin
    x = '0; in_valid = 1'b0;
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
            real er, ei;
            er = fabs(f2r(y[k].re) - ref_re[i-LAT][k]);
            ei = fabs(f2r(y[k].im) - ref_im[i-LAT][k]);
            checks++;
            if (er > tol_q[i-LAT] || ei > tol_q[i-LAT]) begin
              failures++;
              if (failures < 10)
                $display("mismatch #%0d X[%0d]: got (%g,%g) expected (%g,%g)", i - LAT, k,
                         f2r(y[k].re), f2r(y[k].im), ref_re[i-LAT][k], ref_im[i-LAT][k]);
            end
          end
        end
      end
      if (i < N) begin
        in_valid = (i < 5) || ($urandom % 5 != 0);
        make_input(i);
        make_ref(i);
        vld_q[i] = in_valid;
      end else begin
        in_valid = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
