# Radix-8 FFTW twiddle-codelet accelerator

FFTW computes a large FFT by calling many small, fixed-size kernels, the
*codelets*, in an order chosen by software. A *twiddle codelet* takes eight
complex values, computes their 8-point DFT and multiplies each of the eight
results by its own "twiddle" factor:

    y[k] = w[k] * sum_{n=0..7} x[n] * exp(-j*2*pi*n*k/8),   k = 0..7

Software still decides which codelets to call, on what data and in which
order. Only this arithmetic kernel moves into hardware.

This RTL describes a test chip for that kernel. The arithmetic is IEEE-754
single precision. The datapath is fully unrolled and fully pipelined: every
clock cycle it accepts one new vector of eight complex inputs with eight
twiddles, and it delivers one finished codelet result per cycle. Three
on-chip FIFOs feed and capture the datapath. A narrow 4-bit asynchronous port
lets external test equipment load test vectors, start the run and read the
results back.

```
             data_in/load_in ──►┌──────────────┐◄── start
                                │     ctrl     │──► data_out (load_out)
                                └──┬────┬───▲──┘
                 input_fifo_in_data│    │   │out_fifo_rdy / head word
                  ┌────────────────┘    │fft_rdy
                  ▼                     ▼   │
   ┌──────────────────┐  512  ┌──────┐ 512 ┌──────┐ 512 ┌─────────────┐
   │ FFT-input FIFO   ├──────►│ fft8 ├────►│ diag ├────►│ output FIFO │
   │ 18 x 512, loops  │       └──┬───┘     └──▲───┘     │ 18 x 512    │
   └──────────────────┘          │ diag_fifo_valid      └─────────────┘
                  │              ▼            │ 512
                  │   ┌──────────────────┐    │
                  └──►│ twiddle FIFO     ├────┘
                      │ 18 x 512, loops  │
                      └──────────────────┘
   clk = clk_sel ? clk_ext : clk_gen (ring oscillator, scan-configured)
```

## Data format

A complex sample is 64 bits: the real part in bits 31:0 and the imaginary
part in bits 63:32, both IEEE-754 binary32. A *vector* holds eight samples
in 512 bits, with sample k in bits `64k+63 : 64k`. The types are `cplx_t`
and `cvec_t` in `spiral_fft_pkg`. Every FIFO word, and every datapath bus
between the blocks, is one vector.

## Floating-point units

Every arithmetic node of the datapath is its own pipelined unit. None is
shared or time-multiplexed.

* **`fp_add`** has 3 stages. Stage 1 compares the exponents, swaps the
  operands so the larger magnitude comes first, and shifts the smaller
  mantissa right. It keeps guard, round and sticky bits. Stage 2 adds or
  subtracts the 27-bit mantissas. Stage 3 counts leading zeros, normalises,
  rounds and packs the result. The `sub` input negates `b`, so the add nodes
  and the subtract nodes of the FFT use the same unit.
* **`fp_mul`** has 2 stages. Stage 1 forms the 24x24-bit mantissa product and
  adds the exponents. Stage 2 normalises by at most one place, rounds and
  packs. The FFT also uses it as a constant multiplier: one operand is tied
  to 1/sqrt(2) (`0x3F3504F3`), and synthesis folds the constant.
* The rounding conventions were chosen for this design. Both units round to
  nearest even. Subnormal inputs count as zero, and results below the normal
  range flush to zero. Infinities propagate, and every NaN result is the
  quiet NaN `0x7FC00000`. Results are bit-exact with correctly rounded IEEE
  arithmetic everywhere in the normal range.

## The 8-point FFT (`fft8`)

`fft8` is the hardest block to follow. It is a signal-flow graph in which
each real addition is one `fp_add` instance (52 in total), and four `fp_mul`
instances multiply by 1/sqrt(2). The graph uses a decimation-in-frequency
split, with W = exp(-j*2*pi/8):

| layer | even half (outputs X0, X2, X4, X6) | odd half (outputs X1, X3, X5, X7) |
|---|---|---|
| 1 (cycles 0-3) | a[k] = x[k] + x[k+4] | b[k] = x[k] - x[k+4] |
| 2 | c0 = a0+a2, c1 = a1+a3, d0 = a0-a2, d1 = a1-a3 | p,q,r,s = b1re, b1im, b3re, b3im times 1/sqrt(2) (cycles 3-5), and e0, e1 = b0 ± (-j)b2 (cycles 3-6) |
| 3 | X0 = c0+c1, X4 = c0-c1, X2 = d0 - j d1, X6 = d0 + j d1 (ready at 9) | W·b1 = (p+q, q-p); W³·b3 = (s-r, -(r+s)) (ready at 8) |
| 4 | (delay) | f0 = W·b1 + W³·b3, f1 = W·b1 - W³·b3 (ready at 11) |
| 5 | (delay) | X1 = e0+f0, X5 = e0-f0, X3 = e1 - j f1, X7 = e1 + j f1 (ready at 14) |

Multiplying by -j or by j only swaps the real and imaginary parts and flips
one sign, so these products cost no hardware. The adder that uses the
product picks add or subtract to match. The same goes for the negation in
W³·b3.

The longest path runs through one subtractor, one multiplier and three more
adder layers: 3 + 2 + 3 + 3 + 3 = **14 cycles**. Shorter paths get delay
registers (`delay_line`) so that all eight outputs of one transform leave in
the same cycle:

* the even outputs wait 5 cycles;
* e0 and e1 wait 5 cycles for f0 and f1.

An `in_valid` flag travels through a 14-stage shift register next to the
data and comes out as `out_valid`.

## Twiddle multiplication (`diag`, `cmul`)

`diag` holds eight complex multipliers (`cmul`) that work in parallel.
Sample 0 is multiplied too. Each `cmul` uses four `fp_mul` units for
xr·wr, xi·wi, xr·wi and xi·wr. Two `fp_add` units then form the real part
(a subtraction) and the imaginary part (an addition). The latency is 2 + 3 =
**5 cycles**. The whole datapath therefore has a latency of 19 cycles from
issue to result.

## FIFOs and the loopback (`shift_fifo`)

Each FIFO is a true shift register of 18 words of 512 bits. There are three
of them, 3456 bytes in total. Every operation moves the whole chain one step
towards the head (entry 0, which drives `dout`). The tail is written through
a multiplexer:

* `push` writes external data. This loads a FIFO or captures results.
* `rot` writes the FIFO's own head. This is the loopback: the contents
  circulate, and 18 rotations put them back in their original places.
* `pop` writes zero. This reads a FIFO out.

The two input FIFOs rotate while the chip runs. As a result they still hold
their test vectors afterwards, and a run can repeat without reloading.

The two input FIFOs advance on different signals:

* **FFT-input FIFO:** rotates on `fft_rdy`, the cycle in which its head word
  enters the FFT.
* **Twiddle FIFO:** rotates on `diag_fifo_valid`, the FFT's output-valid
  flag. The twiddle for transform i is therefore at the Diag input in the
  same cycle as that transform's result, 14 cycles after issue. No extra
  alignment buffer is needed.

The output FIFO captures every Diag result. If it is full, the oldest result
drops out, so in looping mode it always holds the last 18 results.

## Talking to the chip (`ctrl`)

All off-chip signals are asynchronous to the core clock. `load_in`,
`load_out` and `start` pass through two-flop synchronisers, and `ctrl` acts
on their rising edges.

1. **Load.** In idle, the first `load_in` rising edge starts a *load
   session*. The nibble on `data_in` at that edge is metadata: bit 0 = 0
   selects compute mode and bit 0 = 1 selects looping mode. Bits 3:1 are
   reserved. The session also empties both input FIFOs. Then 36 × 128
   nibbles follow, one per `load_in` rising edge, least significant nibble
   of each word first. The first 18 words go to the FFT-input FIFO (until
   `fifo_full`), the next 18 go to the twiddle FIFO. `data_in` must be
   stable from before `load_in` rises until the next rising edge. The
   testbench holds each strobe level for 4 to 5 core cycles.
2. **Run.** A `start` rising edge with both input FIFOs full empties the
   output FIFO and issues the 18 words, one per cycle.
   * In *compute* mode, exactly one pass runs.
   * In *looping* mode, passes follow each other back to back while `start`
     stays high. The run stops at the first pass boundary after `start`
     falls. Looping mode exists to keep the datapath busy for power
     measurement.
   `ctrl` then waits until every issued word has come back as a result.
3. **Read.** `data_out` shows one nibble of the output FIFO's head word,
   least significant nibble first. Each `load_out` rising edge advances it
   by one nibble. After 128 nibbles, `out_fifo_rdy` pops the next word to
   the head. After 18 words the chip is idle again. A new `start` reruns on
   the vectors still held, and a new `load_in` starts a new load session.

`ctrl` asserts that no result arrives without an outstanding issue.

## Clocking

The core clock is either `clk_ext` (`clk_sel = 1`) or the on-chip clock
generator (`clk_sel = 0`). The clock generator is a ring oscillator. Its
setting is shifted in on `clk_gen_scan_clk` / `clk_gen_scan_in`. Bit 0
enables it, and bits 7:1 select the delay. In `clk_gen.sv` the generator is
a **behavioural model** with `#` delays, so it simulates but does not
synthesize. A real implementation needs a hand-built oscillator there. The
clock multiplexer is a plain multiplexer, so switch `clk_sel` only while
`rst_n` is low.

## How far to trust it, and where it departs from the original chip

Taken from the published design of the test chip:

* the 8-point FFT followed by eight complex multipliers;
* a fully unrolled datapath that accepts one vector per cycle (8 complex
  samples per cycle, so 2.08 GS/s at 260 MHz);
* 3-stage adders and 2-stage multipliers;
* constant multipliers inside the FFT;
* four multipliers and two adders per complex multiplier, with Diag at 5
  stages;
* three 18-stage, 512-bit shift-register FIFOs with loopback (3.375 kB);
* a nibble-wide asynchronous load port whose metadata selects compute or
  looping mode;
* a clock generator with a scan input next to an external clock and a
  `clk_sel` multiplexer.

Choices and departures of this design:

* **FFT depth.** The original FFT was machine-generated and is pipelined
  to 13 stages. Its exact graph is not available. The graph here is written
  by hand and needs 14 stages with 3-stage adders and 2-stage multipliers.
  The datapath latency is therefore 19 cycles, against the original's
  quoted 68 ns (about 18 cycles at its clock). Throughput is the same.
* **Rounding and special values.** Round to nearest even, flush-to-zero and
  NaN handling, as described under the floating-point units above.
* **I/O protocol.** The synchronisers, strobe edges, the metadata nibble's
  encoding, the word and nibble order, the load order (FFT inputs first,
  then twiddles), how looping mode ends, the readout protocol and the reset
  pin `rst_n` were all chosen here.
* **Clock generator.** Its scan-chain length and encoding and the model's
  period law are placeholders.
* **Not included.** The I/O pads, and any descriptor-driven codelet launcher
  or processor integration. The original design names these only as
  future work.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | thousands of random and directed operands (cancellation, wide exponent gaps, rounding ties, overflow, underflow, infinities, NaN), bit-exact against a correctly rounded reference, at exactly 3 and 2 cycles latency |
| `tb_cmul`, `tb_diag` | bit-exact complex products at 5 cycles latency; in `tb_diag`, `out_valid` follows `in_valid` with gaps |
| `tb_fft8` | impulse, constant, pure tones and random vectors against a double-precision DFT (error within 1e-6 of the input's L1 norm), `out_valid` exactly 14 cycles after `in_valid`, one transform per cycle |
| `tb_shift_fifo` | load order after 18 pushes, two full loopback circulations, overfill, pop readout, and 3000 random operations against a queue model |
| `tb_ctrl` | nibble assembly of all 36 words, compute (exactly 18 issue cycles), looping (whole passes only), readout of every nibble, rerun without reload |
| `tb_clk_gen` | disabled output stays low; period for four delay codes |
| `tb_spiral_fft_chip` | the whole chip at its default size: compute mode on the internal clock, looping mode on the external clock, then a rerun, all through the nibble port. Results are checked against w·DFT8(x) in double precision, the looping and rerun results must be bit-identical to the first run, and issue-to-result latency is checked at 19 cycles. Every mechanism (both clocks, both input FIFOs filling, loopback, both modes, output-FIFO overflow, readout pops) must occur. |

`fp_ref_pkg` (in `tb/`) converts between binary32 bit patterns and `real`
using the bit fields. It does not rely on `shortreal`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/spiral_fft_pkg.sv tb/fp_ref_pkg.sv tb/tb_spiral_fft_chip.sv \
  --top-module tb_spiral_fft_chip
./obj_dir/Vtb_spiral_fft_chip
```

Replace the testbench name to run another one. The chip-level testbench
takes about 40 s to build and under a second to run.

## Files

| file | contents |
|---|---|
| `rtl/spiral_fft_pkg.sv` | types (`fp32_t`, `cplx_t`, `cvec_t`) and constants (latencies, depth, 1/sqrt(2)) |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | binary32 adder (3 stages) and multiplier (2 stages) |
| `rtl/cmul.sv`, `rtl/diag.sv` | complex multiplier and the 8-wide twiddle stage |
| `rtl/fft8.sv`, `rtl/delay_line.sv` | pipelined 8-point FFT and its alignment registers |
| `rtl/shift_fifo.sv` | 18 × 512 shift-register FIFO with loopback |
| `rtl/ctrl.sv` | nibble I/O, mode and run sequencing |
| `rtl/clk_gen.sv` | behavioural ring-oscillator model |
| `rtl/spiral_fft_chip.sv` | chip top |
