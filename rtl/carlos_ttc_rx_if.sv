// carlos_ttc_rx_if: receives the trigger information of each accepted event
// from the external TTC receiver chip and queues it in fifo_trigger15x12.
//
// The TTC receiver presents three 12-bit words per event on one bus, each with
// its own strobe: the bunch counter (bcnt_str), then the low and high halves of
// its 24-bit event counter (evcnt_l_str, evcnt_h_str). Each strobed word is
// registered and written into the trigger FIFO one cycle later, so every event
// occupies three FIFO words. That the trigger record holds the bunch and event
// counters in three 12-bit words follows the chip description; the strobe
// names and their order follow the TTC receiver chip and are assumptions here.
// A strobe out of the expected order, or a word arriving when the FIFO is full,
// sets the sticky error flag; the out-of-order word is still stored. records
// counts complete trigger records received (wraps).
module carlos_ttc_rx_if
  import carlos_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [TRIG_W-1:0] ttc_data,
  input  logic              bcnt_str,
  input  logic              evcnt_l_str,
  input  logic              evcnt_h_str,
  input  logic              fifo_full,
  output logic              fifo_wr,
  output logic [TRIG_W-1:0] fifo_wdata,
  output logic [7:0]        records,
  output logic              error
);

  logic [1:0] expect_idx;   // 0: bunch counter, 1: event low, 2: event high
  logic       any_str;
  logic [1:0] got_idx;

  always_comb begin
    any_str = bcnt_str | evcnt_l_str | evcnt_h_str;
    got_idx = evcnt_h_str ? 2'd2 : (evcnt_l_str ? 2'd1 : 2'd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fifo_wr    <= 1'b0;
      fifo_wdata <= '0;
      expect_idx <= 2'd0;
      records    <= '0;
      error      <= 1'b0;
    end else begin
      fifo_wr <= any_str;
      if (any_str) begin
        fifo_wdata <= ttc_data;
        if (got_idx != expect_idx || $countones({bcnt_str, evcnt_l_str, evcnt_h_str}) > 1)
          error <= 1'b1;
        expect_idx <= (got_idx == 2'd2) ? 2'd0 : got_idx + 2'd1;
        if (got_idx == 2'd2) records <= records + 8'd1;
      end
      if (fifo_wr && fifo_full) error <= 1'b1;
    end
  end

endmodule
