// carlos_trigger_if: interface with the external trigger chip.
//
// The trigger line (trigger_in, asynchronous to the chip clock) is brought in
// through a two-flip-flop synchronizer; each rising edge gives a one-cycle
// trig_pulse and counts one accepted event that is still to be transmitted.
// The count drops when the output multiplexer has sent an event. busy tells
// the trigger system to send no further trigger: it is high while the chip is
// not acquiring (run low) or while MAX_EVENTS events are pending, the number
// of events whose trigger words fifo_trigger15x12 can hold.
// The chip description only names this block; the synchronizer, the pending
// count and the busy rule are this design's own, built around the description's
// figure of 5 buffered events. A trigger arriving while busy is still counted
// (saturating) and raises the sticky lost flag.
module carlos_trigger_if #(
  parameter int unsigned MAX_EVENTS = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  input  logic trigger_in,
  input  logic event_sent,
  output logic trig_pulse,
  output logic busy,
  output logic [$clog2(MAX_EVENTS+1)-1:0] pending,
  output logic lost
);

  localparam int unsigned CW = $clog2(MAX_EVENTS+1);

  logic [2:0] sync;   // two synchronizer stages plus edge history

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], trigger_in};
  end

  assign trig_pulse = sync[1] & ~sync[2];
  assign busy       = !run || (pending >= CW'(MAX_EVENTS));

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      lost    <= 1'b0;
    end else begin
      if (trig_pulse && busy) lost <= 1'b1;
      if (trig_pulse && !event_sent && pending < CW'(MAX_EVENTS))
        pending <= pending + CW'(1);
      else if (!trig_pulse && event_sent && pending != '0)
        pending <= pending - CW'(1);
    end
  end

endmodule
