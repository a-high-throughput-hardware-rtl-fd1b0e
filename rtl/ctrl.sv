// Control unit of the codelet accelerator test chip.
//
// Off-chip test equipment talks to the chip through a 4-bit asynchronous
// port. load_in, load_out and start come from outside the clock domain and
// pass through two-flop synchronisers; their rising edges are the events
// below. data_in must be stable from before load_in rises until the next
// load_in rising edge; data_out changes only after a load_out rising edge.
//
// Loading (state LOAD): the first nibble of a load session is metadata:
// bit 0 selects the mode (0 = compute, 1 = looping), bits 3:1 are reserved.
// Then 36 words of 128 nibbles each follow, least significant nibble first;
// every 128 nibbles form one 512-bit word (eight complex single-precision
// samples). Words go to the FFT-input FIFO until it reports fifo_full, then
// to the twiddle FIFO until that is full, which ends the session.
//
// Running (state RUN, entered on a start rising edge with both input FIFOs
// full): fft_rdy is high for one cycle per word; it rotates the FFT-input
// FIFO (the word goes to the FFT and loops back) and marks the word valid at
// the FFT input. In compute mode RUN lasts exactly DEPTH cycles: one pass.
// In looping mode whole passes repeat back to back while start stays high,
// and RUN ends at the first pass boundary after start falls, so the input
// FIFOs are always left in their loaded order. DRAIN waits until every
// issued word has come back as a result (res_valid).
//
// Readout (state READ): data_out shows one nibble of the output FIFO's head
// word, least significant first; each load_out rising edge advances it, and
// after the 128th nibble of a word out_fifo_rdy pops the FIFO. After DEPTH
// words the unit returns to IDLE, from which a new load or a new start (the
// input data is still held) may follow.
//
// The nibble port, the metadata-selected compute/looping modes and the
// signal names fft_fifo_valid, fifo_full, fft_rdy and out_fifo_rdy follow
// the accelerator description. The encodings, word order, synchroniser and
// handshake details are this design's choices.
module ctrl
  import spiral_fft_pkg::*;
#(
  parameter int unsigned DEPTH = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  // off-chip asynchronous interface
  input  logic              load_in,
  input  logic              start,
  input  logic [3:0]        data_in,
  input  logic              load_out,
  output logic [3:0]        data_out,
  // input FIFOs
  output logic [WORD_W-1:0] fifo_wdata,
  output logic              fft_fifo_valid,
  output logic              twd_fifo_valid,
  output logic              in_fifo_clear,
  input  logic              fifo_full,
  input  logic              twd_fifo_full,
  // pipeline
  output logic              fft_rdy,
  input  logic              res_valid,
  // output FIFO
  output logic              out_fifo_clear,
  output logic              out_fifo_rdy,
  input  logic [WORD_W-1:0] out_fifo_data,
  // status
  output logic              looping,
  output logic              busy
);
  localparam int unsigned NIBS = WORD_W / 4;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_READ} state_t;

  state_t state;

  // ---------------- synchronisers and edge detection ----------------
  logic [2:0] ld_sync, lo_sync, st_sync;
  logic       ld_rise, lo_rise, st_rise, st_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_sync <= '0;
      lo_sync <= '0;
      st_sync <= '0;
    end else begin
      ld_sync <= {ld_sync[1:0], load_in};
      lo_sync <= {lo_sync[1:0], load_out};
      st_sync <= {st_sync[1:0], start};
    end
  end

  assign ld_rise  = ld_sync[1] && !ld_sync[2];
  assign lo_rise  = lo_sync[1] && !lo_sync[2];
  assign st_rise  = st_sync[1] && !st_sync[2];
  assign st_level = st_sync[1];

  // ---------------- counters ----------------
  logic [$clog2(NIBS)-1:0]    nib_cnt;
  logic [$clog2(DEPTH)-1:0]   issue_cnt;
  logic [$clog2(DEPTH)-1:0]   word_cnt;
  logic [$clog2(DEPTH+2)-1:0] outstanding;
  logic                       nib_last, issue_last, word_last;

  assign nib_last   = (nib_cnt == $clog2(NIBS)'(NIBS - 1));
  assign issue_last = (issue_cnt == $clog2(DEPTH)'(DEPTH - 1));
  assign word_last  = (word_cnt == $clog2(DEPTH)'(DEPTH - 1));

  logic word_done;     // the 128th nibble of a word arrives this cycle
  assign word_done = (state == S_LOAD) && ld_rise && nib_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      looping     <= 1'b0;
      nib_cnt     <= '0;
      issue_cnt   <= '0;
      word_cnt    <= '0;
      outstanding <= '0;
      fifo_wdata  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          nib_cnt  <= '0;
          word_cnt <= '0;
          if (ld_rise) begin
            looping <= data_in[0];
            state   <= S_LOAD;
          end else if (st_rise && fifo_full && twd_fifo_full) begin
            issue_cnt <= '0;
            state     <= S_RUN;
          end
        end
        S_LOAD: begin
          if (ld_rise) begin
            fifo_wdata <= {data_in, fifo_wdata[WORD_W-1:4]};
            nib_cnt    <= nib_last ? '0 : nib_cnt + 1'b1;
          end
          if (twd_fifo_full) state <= S_IDLE;  // last twiddle word written
        end
        S_RUN: begin
          issue_cnt <= issue_last ? '0 : issue_cnt + 1'b1;
          if (issue_last && !(looping && st_level)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (outstanding == 0) begin
            nib_cnt  <= '0;
            word_cnt <= '0;
            state    <= S_READ;
          end
        end
        S_READ: begin
          if (lo_rise) begin
            nib_cnt <= nib_last ? '0 : nib_cnt + 1'b1;
            if (nib_last) begin
              word_cnt <= word_last ? '0 : word_cnt + 1'b1;
              if (word_last) state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase

      case ({fft_rdy, res_valid})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase
    end
  end

  // The assembled word is written one cycle after its last nibble arrived,
  // once fifo_wdata holds it.
  logic word_wr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_wr <= 1'b0;
    else        word_wr <= word_done;
  end

  assign fft_fifo_valid = word_wr && !fifo_full;
  assign twd_fifo_valid = word_wr && fifo_full;
  assign in_fifo_clear  = (state == S_IDLE) && ld_rise;
  assign fft_rdy        = (state == S_RUN);
  assign out_fifo_clear = (state == S_IDLE) && st_rise && fifo_full && twd_fifo_full;
  assign out_fifo_rdy   = (state == S_READ) && lo_rise && nib_last;
  assign data_out       = (state == S_READ) ? out_fifo_data[4*nib_cnt +: 4] : 4'h0;
  assign busy           = (state != S_IDLE);

  // a result can only come back for a word that was issued
  property p_no_spurious_result;
    @(posedge clk) disable iff (!rst_n) res_valid && !fft_rdy |-> outstanding != 0;
  endproperty
  assert property (p_no_spurious_result);

endmodule
