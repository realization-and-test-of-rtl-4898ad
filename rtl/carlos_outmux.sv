// carlos_outmux: builds the chip's 16-bit output packets.
//
// A packet is sent once the trigger words of an event are in fifo_trigger15x12
// (three words; in BIST mode trig_bypass replaces them by zeros) and both
// channel FIFOs hold data or have closed their event. It consists of
//   3 header words  {1, evcnt[2:0], trigger word k}          k = 0, 1, 2
//   data words, the two channels taking alternate clock cycles, channel 0
//   first: {0, 15-bit packed word}, or DUMMY_WORD (16'h8000: flag bit set, all
//   else 0) when the channel has nothing to send in its cycle
//   2 footer words  {4'hF, evcnt} and {4'hF, ~evcnt}
// The data phase ends, always before a channel-0 cycle, when both channels have
// closed their event and emptied their FIFO, so the number of data words is
// even. event_sent pulses with the last footer word.
// Three header words from the trigger FIFO, the even count of data words, the
// fair one-cycle-each sharing between channels, the dummy word and two footer
// words carrying the event count follow the chip description. The bit layout
// of header and footer words, the start condition and the packet strobes
// (out_valid, out_first, out_last) are this design's choices.
// Timing: one word per clock while a packet is in progress; outputs are
// registered, so a word appears the cycle after the FIFO is popped for it.
module carlos_outmux
  import carlos_pkg::*;
#(
  parameter int unsigned TRIG_CW = 4,    // width of the trigger FIFO count
  parameter int unsigned EVW     = EVCNT_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,       // acquisition or BIST in progress
  input  logic               trig_bypass,  // BIST: no trigger words needed
  // trigger FIFO
  input  logic [TRIG_W-1:0]  trig_rdata,
  input  logic [TRIG_CW-1:0] trig_count,
  output logic               trig_rd,
  // channel FIFOs
  input  logic [1:0][WORD_W-1:0] ch_rdata,
  input  logic [1:0]         ch_empty,
  input  logic [1:0]         ch_closed,
  output logic [1:0]         ch_rd,
  // event counter
  input  logic [EVW-1:0]     evcnt,
  output logic               event_sent,
  // output port
  output logic [OUT_W-1:0]   out_word,
  output logic               out_valid,
  output logic               out_first,
  output logic               out_last,
  output logic               dummy,        // current output word is a dummy
  output logic               in_packet
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA0, S_DATA1, S_FTR0, S_FTR1} state_t;

  state_t     state, state_n;
  logic [1:0] hdr_idx;
  logic       trig_ok, ch_ready, all_done;

  always_comb begin
    trig_ok  = trig_bypass || (trig_count >= TRIG_CW'(3));
    ch_ready = (!ch_empty[0] || ch_closed[0]) && (!ch_empty[1] || ch_closed[1]);
    all_done = ch_closed[0] && ch_empty[0] && ch_closed[1] && ch_empty[1];
  end

  always_comb begin
    state_n = state;
    trig_rd = 1'b0;
    ch_rd   = 2'b00;
    unique case (state)
      S_IDLE:  if (enable && trig_ok && ch_ready && !event_sent) state_n = S_HDR;
      S_HDR: begin
        trig_rd = !trig_bypass;
        if (hdr_idx == 2'd2) state_n = S_DATA0;
      end
      S_DATA0: begin
        if (all_done) state_n = S_FTR0;
        else begin
          ch_rd[0] = !ch_empty[0];
          state_n  = S_DATA1;
        end
      end
      S_DATA1: begin
        ch_rd[1] = !ch_empty[1];
        state_n  = S_DATA0;
      end
      S_FTR0:  state_n = S_FTR1;
      S_FTR1:  state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      hdr_idx    <= '0;
      out_word   <= '0;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_last   <= 1'b0;
      dummy      <= 1'b0;
      event_sent <= 1'b0;
    end else begin
      state      <= state_n;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_last   <= 1'b0;
      dummy      <= 1'b0;
      event_sent <= 1'b0;
      unique case (state)
        S_IDLE: hdr_idx <= '0;
        S_HDR: begin
          out_valid <= 1'b1;
          out_first <= (hdr_idx == 2'd0);
          out_word  <= {1'b1, evcnt[2:0], trig_bypass ? TRIG_W'(0) : trig_rdata};
          hdr_idx   <= hdr_idx + 2'd1;
        end
        S_DATA0: if (!all_done) begin
          out_valid <= 1'b1;
          out_word  <= ch_empty[0] ? DUMMY_WORD : {1'b0, ch_rdata[0]};
          dummy     <= ch_empty[0];
        end
        S_DATA1: begin
          out_valid <= 1'b1;
          out_word  <= ch_empty[1] ? DUMMY_WORD : {1'b0, ch_rdata[1]};
          dummy     <= ch_empty[1];
        end
        S_FTR0: begin
          out_valid <= 1'b1;
          out_word  <= {FOOTER_TAG, TRIG_W'(evcnt)};
        end
        S_FTR1: begin
          out_valid  <= 1'b1;
          out_last   <= 1'b1;
          out_word   <= {FOOTER_TAG, ~TRIG_W'(evcnt)};
          event_sent <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign in_packet = (state != S_IDLE);

  // a header is only built from trigger words that are there
  assert property (@(posedge clk) disable iff (rst) trig_rd |-> trig_count != '0);

endmodule
