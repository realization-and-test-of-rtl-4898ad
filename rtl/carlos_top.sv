// carlos_top: CARLOS 2.0 readout chip core, two-channel data compression and
// packing for the front-end of a silicon drift detector.
//
// Two identical channels (encoder -> barrel -> fifo32x15) compress 8-bit
// samples into variable-length codes and pack them into 15-bit words. The
// output multiplexer sends them as 16-bit words at one word per clock, in
// packets: three header words built from the trigger record of the event
// (fifo_trigger15x12, filled by the TTC receiver interface), the two channels'
// data in alternate cycles (a dummy word 16'h8000 when a channel has nothing to
// send), and two footer words carrying the event count. The trigger interface
// tells the trigger system when no more events can be buffered. The command
// unit, driven over JTAG, selects IDLE, RESET-PIPELINE, BIST or RUN; in BIST
// the pattern generator drives both channels with 200 pseudo-random vectors,
// the signature maker compacts the output packet and the result (FF pass, 55
// fail) is read back on tdo.
//
// The block structure, the data widths, the FIFO sizes, the packet structure
// and the command states follow the chip description. This design's own
// choices: the input handshake (in_ready), a synchronous active-low power-on
// reset, and the rule that the data of a new event are taken only after the
// previous event has been transmitted.
//
// Input handshake: a sample pair is taken in a cycle where in_valid and
// in_ready are both high; in_last marks the last pair of an event. in_ready is
// low outside RUN, while either channel FIFO holds more than FIFO_DEPTH-5
// words (room for the words still in the encoder and barrel pipeline), and from
// the last pair of an event until its packet has been sent.
// Output: data_valid qualifies data_out; data_first marks the first header
// word and data_last the last footer word of a packet.
// SIG_EXPECTED is the BIST signature of a fault-free core with the default
// code table, packet format and pattern generator; it must be recomputed if
// any of them changes.
module carlos_top
  import carlos_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 32,
  parameter int unsigned TRIG_DEPTH   = 15,
  parameter int unsigned MAX_EVENTS   = 5,
  parameter int unsigned BIST_VECTORS = 200,
  parameter logic [15:0] SIG_EXPECTED = 16'hA8A4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // detector data, two 8-bit channels
  input  logic [1:0][DATA_W-1:0] ch_data,
  input  logic                   in_valid,
  input  logic                   in_last,
  output logic                   in_ready,
  // TTC receiver
  input  logic [TRIG_W-1:0]      ttc_data,
  input  logic                   bcnt_str,
  input  logic                   evcnt_l_str,
  input  logic                   evcnt_h_str,
  // trigger chip
  input  logic                   trigger_in,
  output logic                   trigger_busy,
  // JTAG
  input  logic                   tck,
  input  logic                   tms,
  input  logic                   tdi,
  output logic                   tdo,
  // 16-bit output
  output logic [OUT_W-1:0]       data_out,
  output logic                   data_valid,
  output logic                   data_first,
  output logic                   data_last,
  // status
  output cm_state_t              mode,
  output logic                   error
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH+1);
  localparam int unsigned TCW = $clog2(TRIG_DEPTH+1);

  logic por, prst;

  // command unit and JTAG
  logic [1:0] cmd;
  logic       cmd_update;
  logic       pipe_rst, run, bist_mode, bist_start;
  logic [7:0] bist_result;
  logic       sig_done, sig_pass;
  logic [15:0] sig_value;

  // channels
  logic                   ch_valid, ch_last;
  logic [1:0][DATA_W-1:0] ch_in;
  logic [1:0][WORD_W-1:0] ch_rdata;
  logic [1:0]             ch_empty, ch_closed, ch_rd, ch_ovf;
  logic [1:0][FCW-1:0]    ch_count;
  logic                   room, acc_ready, in_hold, accept_last;

  // pattern generator
  logic                   pg_valid, pg_last, pg_busy;
  logic [1:0][DATA_W-1:0] pg_data;

  // trigger path
  logic              tf_wr, tf_rd, tf_full, tf_empty, tf_ovf;
  logic [TRIG_W-1:0] tf_wdata, tf_rdata;
  logic [TCW-1:0]    tf_count;
  logic [7:0]        ttc_records;
  logic              ttc_err, trig_pulse, trig_lost;
  logic [$clog2(MAX_EVENTS+1)-1:0] trig_pending;

  // output side
  logic [EVCNT_W-1:0] evcnt;
  logic               event_sent, om_dummy, om_in_packet;

  assign por  = !rst_n;
  assign prst = por || pipe_rst;

  carlos_jtag_tap u_jtag (
    .clk, .rst(por), .tck, .tms, .tdi, .tdo,
    .result_in(bist_result), .cmd, .cmd_update
  );

  carlos_cmcu u_cmcu (
    .clk, .rst(por), .cmd, .cmd_update,
    .bist_done(sig_done), .bist_pass(sig_pass),
    .state(mode), .pipe_rst, .run, .bist_mode, .bist_start, .result(bist_result)
  );

  // ---- input throttling and source selection ----
  always_comb begin
    room = 1'b1;
    for (int c = 0; c < 2; c++)
      if (ch_count[c] > FCW'(FIFO_DEPTH - 5)) room = 1'b0;
  end

  assign acc_ready = room && !in_hold && !prst;
  assign in_ready  = run && acc_ready;

  carlos_pattern_gen #(.NUM_VECTORS(BIST_VECTORS)) u_pattern_gen (
    .clk, .rst(prst), .start(bist_start), .ready(bist_mode && acc_ready),
    .out_valid(pg_valid), .out_data(pg_data), .out_last(pg_last), .busy(pg_busy)
  );

  always_comb begin
    if (bist_mode) begin
      ch_valid = pg_valid;
      ch_in    = pg_data;
      ch_last  = pg_last;
    end else begin
      ch_valid = in_valid && in_ready;
      ch_in    = ch_data;
      ch_last  = in_last;
    end
  end

  assign accept_last = ch_valid && ch_last;

  // a new event is taken only after the previous one has been sent
  always_ff @(posedge clk) begin
    if (prst)             in_hold <= 1'b0;
    else if (accept_last) in_hold <= 1'b1;
    else if (event_sent)  in_hold <= 1'b0;
  end

  for (genvar c = 0; c < 2; c++) begin : g_ch
    carlos_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_channel (
      .clk, .rst(prst),
      .in_valid(ch_valid), .in_data(ch_in[c]), .in_last(ch_last),
      .rd(ch_rd[c]), .event_sent,
      .rdata(ch_rdata[c]), .empty(ch_empty[c]), .count(ch_count[c]),
      .closed(ch_closed[c]), .overflow(ch_ovf[c])
    );
  end

  // ---- trigger path ----
  carlos_ttc_rx_if u_ttc_rx (
    .clk, .rst(prst), .ttc_data, .bcnt_str, .evcnt_l_str, .evcnt_h_str,
    .fifo_full(tf_full), .fifo_wr(tf_wr), .fifo_wdata(tf_wdata),
    .records(ttc_records), .error(ttc_err)
  );

  carlos_fifo #(.WIDTH(TRIG_W), .DEPTH(TRIG_DEPTH)) u_fifo_trigger (
    .clk, .rst(prst), .wr(tf_wr), .wdata(tf_wdata), .rd(tf_rd),
    .rdata(tf_rdata), .empty(tf_empty), .full(tf_full), .count(tf_count),
    .overflow(tf_ovf)
  );

  carlos_trigger_if #(.MAX_EVENTS(MAX_EVENTS)) u_trigger_if (
    .clk, .rst(prst), .run, .trigger_in, .event_sent,
    .trig_pulse, .busy(trigger_busy), .pending(trig_pending), .lost(trig_lost)
  );

  // ---- output ----
  carlos_event_counter #(.WIDTH(EVCNT_W)) u_event_counter (
    .clk, .rst(prst), .event_sent, .count(evcnt)
  );

  carlos_outmux #(.TRIG_CW(TCW)) u_outmux (
    .clk, .rst(prst), .enable(run || bist_mode), .trig_bypass(bist_mode),
    .trig_rdata(tf_rdata), .trig_count(tf_count), .trig_rd(tf_rd),
    .ch_rdata, .ch_empty, .ch_closed, .ch_rd,
    .evcnt, .event_sent,
    .out_word(data_out), .out_valid(data_valid), .out_first(data_first),
    .out_last(data_last), .dummy(om_dummy), .in_packet(om_in_packet)
  );

  carlos_signature #(.EXPECTED(SIG_EXPECTED)) u_signature (
    .clk, .rst(por), .clear(bist_start), .en(bist_mode && data_valid),
    .word(data_out), .finish(bist_mode && event_sent),
    .sig(sig_value), .done(sig_done), .pass(sig_pass)
  );

  assign error = |ch_ovf || tf_ovf || ttc_err || trig_lost;

endmodule
