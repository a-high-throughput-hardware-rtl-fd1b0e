// Shift-register FIFO of DEPTH words of W bits, with output-to-input loopback.
//
// The storage is a chain of DEPTH registers. Every operation moves the whole
// chain one place towards the head (entry 0, which drives dout) and writes
// the tail (entry DEPTH-1) through a 2:1 input multiplexer:
//   push  the tail takes din              (loading, or capturing results)
//   rot   the tail takes dout             (loopback: the contents circulate)
//   pop   the tail takes zero             (reading the FIFO out)
// so after DEPTH pushes the first word written is at the head, and DEPTH
// rotations bring the FIFO back to where it started. Only one operation acts
// per cycle, with priority clear > push > rot > pop. count tracks how many
// valid words are held (saturating at DEPTH: a push into a full FIFO drops
// the oldest word, which is how the output FIFO behaves in looping mode).
// Reading dout and operating in the same cycle is the intended use: the head
// is consumed in the cycle it is shifted out.
//
// Depth 18, the 512-bit width, the shift-register organisation and the
// loopback multiplexer follow the accelerator description; the count, the
// flags, the pop operation and the priority order are this design's choices.
module shift_fifo #(
  parameter int unsigned W     = 512,
  parameter int unsigned DEPTH = 18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic                       rot,
  input  logic                       pop,
  input  logic [W-1:0]               din,
  output logic [W-1:0]               dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);
  typedef logic [$clog2(DEPTH+1)-1:0] cnt_t;

  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] tail;
  logic         shift;

  assign shift = push || rot || pop;

  always_comb begin
    if (push)     tail = din;
    else if (rot) tail = mem[0];
    else          tail = '0;
  end

  always_ff @(posedge clk) begin
    if (shift && !clear) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      mem[DEPTH-1] <= tail;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       count <= '0;
    else if (clear)                   count <= '0;
    else if (push && count != cnt_t'(DEPTH)) count <= count + 1'b1;
    else if (!push && !rot && pop && count != 0) count <= count - 1'b1;
  end

  assign dout  = mem[0];
  assign full  = (count == cnt_t'(DEPTH));
  assign empty = (count == 0);
endmodule
