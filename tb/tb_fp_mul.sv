// Self-checking testbench for fp_mul: random products (including ones that
// overflow, underflow, hit zero operands and special values), one per
// cycle, each checked bit-exactly against a correctly rounded reference
// exactly MUL_LAT = 2 cycles after its operands were applied.
module tb_fp_mul;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 4000;
  localparam int LAT = 2;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;
  fp32_t exp_q [N];

  fp_mul dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t ref_mul(fp32_t x, fp32_t z);
    logic xn, zn, xi, zi, x0, z0;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    x0 = (x[30:23] == 8'h00);
    z0 = (z[30:23] == 8'h00);
    if (xn || zn || (xi && z0) || (zi && x0)) return FP_QNAN;
    if (xi || zi) return {x[31] ^ z[31], 8'hFF, 23'd0};
    if (x0 || z0) return {x[31] ^ z[31], 31'd0};
    return r2f(f2r(x) * f2r(z));
  endfunction

  initial begin
    a = '0; b = '0;
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
        case (i % 6)
          0: begin a = rand_fp(64, 190); b = rand_fp(64, 190); end
          1: begin a = rand_fp(1, 254); b = rand_fp(1, 254); end
          2: begin a = rand_fp(110, 140); b = FP_INV_SQRT2; end
          3: begin a = rand_fp(120, 134); b = {1'($urandom), 8'h00, 23'($urandom)}; end
          4: begin a = {1'($urandom), 8'h7F, 23'h7FFFFF}; b = {1'($urandom), 8'h7F, 23'($urandom)}; end
          default: begin
            a = ($urandom % 2 == 0) ? {1'($urandom), 8'hFF, 23'(($urandom % 2) << 22)} : rand_fp(1, 254);
            b = ($urandom % 3 == 0) ? '0 : rand_fp(100, 150);
          end
        endcase
        exp_q[i] = ref_mul(a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
