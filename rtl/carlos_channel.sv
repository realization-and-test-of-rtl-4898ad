// carlos_channel: one of the two identical processing channels.
//
// encoder -> barrel -> fifo32x15, as in the chip's block diagram. 8-bit
// samples enter with in_valid/in_last, are coded into 4..10-bit codes, packed
// into 15-bit words and queued for the output multiplexer, which pops them with
// rd. The structure follows the chip description.
//
// Added here, as the description leaves event framing open: the closed flag
// goes high when the last word of the current event has been written into the
// FIFO and stays high until the output multiplexer reports the event as sent
// (event_sent). "closed and empty" tells the multiplexer that this channel has
// nothing more to send for the event. overflow is the FIFO's sticky overflow
// flag; the chip-level input throttling keeps it low.
// Latency from a sample to its word in the FIFO: encoder 1 + barrel 2 + FIFO
// write 1 cycle.
module carlos_channel
  import carlos_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            in_valid,
  input  logic [DATA_W-1:0]               in_data,
  input  logic                            in_last,
  input  logic                            rd,
  input  logic                            event_sent,
  output logic [WORD_W-1:0]               rdata,
  output logic                            empty,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] count,
  output logic                            closed,
  output logic                            overflow
);

  logic              enc_valid, enc_last;
  logic [CODE_W-1:0] enc_code;
  logic [LEN_W-1:0]  enc_len;
  logic              bar_valid, bar_last;
  logic [WORD_W-1:0] bar_word;
  logic              full_unused;

  carlos_encoder u_encoder (
    .clk, .rst,
    .in_valid, .in_data, .in_last,
    .out_valid(enc_valid), .out_code(enc_code), .out_len(enc_len), .out_last(enc_last)
  );

  carlos_barrel u_barrel (
    .clk, .rst,
    .in_valid(enc_valid), .in_code(enc_code), .in_len(enc_len), .in_last(enc_last),
    .out_valid(bar_valid), .out_word(bar_word), .out_last(bar_last)
  );

  carlos_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr(bar_valid), .wdata(bar_word),
    .rd, .rdata, .empty, .full(full_unused), .count, .overflow
  );

  always_ff @(posedge clk) begin
    if (rst)                   closed <= 1'b0;
    else if (event_sent)       closed <= 1'b0;
    else if (bar_valid && bar_last) closed <= 1'b1;
  end

endmodule
