// Self-checking testbench for fp_add: random operands over a wide exponent
// range plus directed cases (exact cancellation, large exponent gaps,
// rounding ties, carry-out, infinities and NaN), one operation per cycle,
// each result checked bit-exactly against a correctly rounded reference
// exactly ADD_LAT = 3 cycles after its operands were applied.
module tb_fp_add;
  import spiral_fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 4000;
  localparam int LAT = 3;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;
  fp32_t exp_q [N];

  fp_add dut (.clk, .a, .b, .sub, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t ref_add(fp32_t x, fp32_t z, logic s);
    logic xn, zn, xi, zi;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    if (xn || zn) return FP_QNAN;
    if (xi && zi) return (x[31] != (z[31] ^ s)) ? FP_QNAN : x;
    if (xi) return x;
    if (zi) return {z[31] ^ s, z[30:0]};
    if (s) return r2f(f2r(x) - f2r(z));
    return r2f(f2r(x) + f2r(z));
  endfunction

  initial begin
    a = '0; b = '0; sub = 1'b0;
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
        case (i % 8)
          0: begin a = rand_fp(1, 254); b = rand_fp(1, 254); end
          1: begin a = rand_fp(100, 150); b = {~a[31], a[30:0]}; end          // cancellation
          2: begin a = rand_fp(120, 130); b = rand_fp(90, 130); end           // gaps up to 40
          3: begin a = rand_fp(126, 128); b = rand_fp(126, 128); end          // near-equal
          4: begin a = rand_fp(126, 127); b = {a[31], 8'(a[30:23] - 8'd24), 23'h0}; end  // tie
          5: begin a = rand_fp(100, 150); b = {a[31], a[30:23], 23'($urandom)}; end      // carry
          6: begin a = rand_fp(240, 254); b = {a[31], a[30:0]}; end          // overflow
          default: begin
            a = ($urandom % 4 == 0) ? {1'($urandom), 8'hFF, 23'(($urandom % 2) << 22)} : rand_fp(1, 254);
            b = ($urandom % 2 == 0) ? {1'($urandom), 8'hFF, 23'd0} : rand_fp(1, 254);
          end
        endcase
        sub = 1'($urandom);
        exp_q[i] = ref_add(a, b, sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
