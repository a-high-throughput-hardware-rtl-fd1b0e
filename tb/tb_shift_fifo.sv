// Self-checking testbench for shift_fifo at its default size (18 x 512).
// A directed part loads 18 words, circulates them twice through the
// loopback (the head must show them in load order each time), overfills
// the FIFO and reads it out with pop. A random part then applies random
// clear/push/rot/pop mixes and compares dout, count, full and empty every
// cycle with a queue-based model of the shift chain.
module tb_shift_fifo;
  localparam int W = 512;
  localparam int DEPTH = 18;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, push, rot, pop;
  logic [W-1:0] din, dout;
  logic [CW-1:0] count;
  logic full, empty;
  int checks = 0, failures = 0;

  logic [W-1:0] model [$];
  logic         known [$];
  int           mcount;

  shift_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] word(int i);
    return {16{32'(i * 32'h9E37_79B9 + 7)}};
  endfunction

  // apply one operation at the next rising edge and update the model
  task automatic step(logic c, logic pu, logic ro, logic po, logic [W-1:0] d);
    clear = c; push = pu; rot = ro; pop = po; din = d;
    @(posedge clk);
    if (c) mcount = 0;
    else if (pu || ro || po) begin
      logic [W-1:0] t; logic tk;
      if (pu) begin t = d; tk = 1'b1; end
      else if (ro) begin t = model[0]; tk = known[0]; end
      else begin t = '0; tk = 1'b1; end
      void'(model.pop_front()); void'(known.pop_front());
      model.push_back(t); known.push_back(tk);
      if (pu && mcount < DEPTH) mcount++;
      else if (!pu && !ro && po && mcount > 0) mcount--;
    end
    @(negedge clk);
    clear = 0; push = 0; rot = 0; pop = 0;
    checks++;
    if (count != CW'(mcount) || full != (mcount == DEPTH) || empty != (mcount == 0)) begin
      failures++;
      $display("count mismatch: got %0d expected %0d", count, mcount);
    end
    if (known[0]) begin
      checks++;
      if (dout !== model[0]) begin
        failures++;
        if (failures < 10) $display("dout mismatch");
      end
    end
  endtask

  initial begin
    clear = 0; push = 0; rot = 0; pop = 0; din = '0;
    mcount = 0;
    for (int i = 0; i < DEPTH; i++) begin model.push_back('0); known.push_back(1'b0); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // load 18 words, then circulate twice: load order must reappear
    for (int i = 0; i < DEPTH; i++) step(0, 1, 0, 0, word(i));
    checks++; if (!full) begin failures++; $display("not full after %0d pushes", DEPTH); end
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (dout !== word(i)) begin failures++; $display("loopback order wrong at %0d", i); end
        step(0, 0, 1, 0, '0);
      end
    // overfill: oldest two words drop out
    step(0, 1, 0, 0, word(100));
    step(0, 1, 0, 0, word(101));
    checks++; if (dout !== word(2)) begin failures++; $display("overfill did not drop the oldest"); end
    // read out with pop
    for (int i = 0; i < DEPTH; i++) step(0, 0, 0, 1, '0);
    checks++; if (!empty) begin failures++; $display("not empty after pops"); end

    // random mix
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom % 100;
      step(r < 2, (r >= 2 && r < 40), (r >= 40 && r < 70) || (r >= 90 && $urandom % 2 == 0),
           (r >= 60), {16{$urandom}});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
