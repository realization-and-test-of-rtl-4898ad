// carlos_barrel: packs 4..10-bit variable-length codes into 15-bit words.
//
// Codes are appended MSB first behind the bits already held. When a code does
// not fit in the word being filled it is broken in two: the leading bits
// complete the word, which is sent out, and the remaining bits start the next
// word in the hold register. No bit is lost. When the code marked as the last
// one of the event has been appended, whatever the hold register contains is
// sent out even if not full, with the unused low bits at 0; if that code also
// completed a word, the full word goes out first and the padded remainder one
// cycle later. out_last marks the final word of an event.
//
// Two 15-bit registers (the hold register and the output register), the
// splitting of codes, zero padding at the end of an event and the 2-cycle
// latency follow the chip description. The first stage registers the incoming
// code; the second builds and registers the output word, so a code accepted in
// cycle t produces its word, if it completes one, in cycle t+2.
// A new event must not start while a flush is pending (checked by assertion);
// the chip guarantees this because a new event is accepted only after the
// previous one has been transmitted.
module carlos_barrel
  import carlos_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [CODE_W-1:0] in_code,   // right-aligned code
  input  logic [LEN_W-1:0]  in_len,    // 4..10
  input  logic              in_last,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic              out_last
);

  // stage 1: input register
  logic              s1_valid, s1_last;
  logic [CODE_W-1:0] s1_code;
  logic [LEN_W-1:0]  s1_len;

  // stage 2 state: hold register (left-aligned) and its fill count
  logic [WORD_W-1:0] hold;
  logic [LEN_W-1:0]  fill;      // 0..14
  logic              flush_pending;

  logic [CODE_W-1:0]   code_l;    // code left-aligned in CODE_W bits
  logic [2*WORD_W-1:0] cat;       // hold bits followed by the new code
  logic [LEN_W:0]      total;     // fill + len, 0..24

  always_comb begin
    code_l = s1_code << (LEN_W'(CODE_W) - s1_len);
    cat    = {hold, {WORD_W{1'b0}}} |
             ({code_l, {(2*WORD_W-CODE_W){1'b0}}} >> fill);
    total  = {1'b0, fill} + {1'b0, s1_len};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_code  <= '0;
      s1_len   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_last  <= in_valid & in_last;
      s1_code  <= in_code;
      s1_len   <= in_len;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold          <= '0;
      fill          <= '0;
      flush_pending <= 1'b0;
      out_valid     <= 1'b0;
      out_word      <= '0;
      out_last      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (flush_pending) begin
        // second word of an end-of-event split: padded remainder
        out_valid     <= 1'b1;
        out_word      <= hold;
        out_last      <= 1'b1;
        hold          <= '0;
        fill          <= '0;
        flush_pending <= 1'b0;
      end else if (s1_valid) begin
        if (total >= (LEN_W+1)'(WORD_W)) begin
          // word completed: send it, keep the rest of the code
          out_valid <= 1'b1;
          out_word  <= cat[2*WORD_W-1:WORD_W];
          hold      <= cat[WORD_W-1:0];
          fill      <= LEN_W'(total - (LEN_W+1)'(WORD_W));
          if (s1_last) begin
            if (total == (LEN_W+1)'(WORD_W)) begin
              out_last <= 1'b1;
              hold     <= '0;
            end else begin
              flush_pending <= 1'b1;
            end
          end
        end else if (s1_last) begin
          // end of event: send the partly filled word, low bits are 0
          out_valid <= 1'b1;
          out_word  <= cat[2*WORD_W-1:WORD_W];
          out_last  <= 1'b1;
          hold      <= '0;
          fill      <= '0;
        end else begin
          hold <= cat[2*WORD_W-1:WORD_W];
          fill <= LEN_W'(total);
        end
      end
    end
  end

  // code lengths outside 4..10 are not produced by the encoder
  assert property (@(posedge clk) disable iff (rst)
                   s1_valid |-> (s1_len >= LEN_W'(4) && s1_len <= LEN_W'(CODE_W)));
  // no new code may arrive while the end-of-event remainder is being sent
  assert property (@(posedge clk) disable iff (rst) flush_pending |-> !s1_valid);

endmodule
