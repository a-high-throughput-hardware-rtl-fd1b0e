// Fixed-latency pipeline delay: N register stages of width W (N = 0 is a
// wire). Used to keep parallel paths of the FFT aligned and to carry valid
// flags alongside the arithmetic pipelines. No reset: the contents are data;
// valid chains are cleared through their first stage by the caller's reset.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end
    assign q = r[N-1];
  end
endmodule
