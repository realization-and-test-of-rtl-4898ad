// carlos_event_counter: counts the events the chip has completely transmitted.
//
// The output multiplexer pulses event_sent after the last footer word of a
// packet; the counter then advances and a new event can be accepted. The value
// goes into the header and footer words of the next packet. That the counter
// is stepped by the multiplexer at the end of each event and used in header and
// footer follows the chip description; the 12-bit width and the wrap-around are
// this design's choices. Synchronous reset to 0.
module carlos_event_counter #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             event_sent,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)             count <= '0;
    else if (event_sent) count <= count + WIDTH'(1);
  end

endmodule
