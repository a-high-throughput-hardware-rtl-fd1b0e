// Self-checking testbench for the clock-generator model: scans in settings,
// then measures the period between rising edges of clk_out. Disabled, the
// output must stay low; enabled with delay code c it must toggle with a
// half period of BASE_HALF + c*STEP_HALF time units.
module tb_clk_gen;
  localparam int NBITS = 8;

  logic scan_clk = 1'b0, scan_in = 1'b0, clk_out;
  int checks = 0, failures = 0;

  clk_gen #(.NBITS(NBITS), .BASE_HALF(2), .STEP_HALF(1)) dut (.scan_clk, .scan_in, .clk_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(logic [NBITS-1:0] cfg);
    for (int i = 0; i < NBITS; i++) begin
      scan_in = cfg[i];
      #3 scan_clk = 1'b1;
      #3 scan_clk = 1'b0;
    end
  endtask

  task automatic measure(int code);
    time t0, t1;
    scan({7'(code), 1'b1});
    repeat (3) @(posedge clk_out);
    t0 = $time;
    repeat (4) @(posedge clk_out);
    t1 = $time;
    checks++;
    if ((t1 - t0) != 4 * 2 * (2 + code)) begin
      failures++;
      $display("code %0d: 4 periods took %0t, expected %0d", code, t1 - t0, 8 * (2 + code));
    end
  endtask

  initial begin
    int toggles;
    scan('0);
    toggles = 0;
    fork
      begin : watch
        forever @(clk_out) toggles++;
      end
      #200;
    join_any
    disable fork;
    checks++;
    if (toggles != 0 || clk_out !== 1'b0) begin failures++; $display("disabled oscillator toggled"); end
    measure(3);
    measure(0);
    measure(10);
    measure(127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
