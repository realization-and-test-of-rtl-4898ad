// carlos_encoder: lossless variable-length encoder of one 8-bit channel.
//
// Each accepted sample is turned into a prefix code of 4, 7 or 10 bits, so
// that small sample values (the common case for baseline-subtracted detector
// data) are shortened and no value is lost:
//   value 0..7     -> '0'  + value[2:0]        (4 bits)
//   value 8..39    -> '10' + (value-8)[4:0]    (7 bits)
//   value 40..255  -> '11' + value[7:0]        (10 bits)
// The 4..10-bit length range and the losslessness follow the chip description;
// the code table itself is this design's choice, as the description does not
// give one. The code is right-aligned in out_code and sent MSB first.
//
// Timing: one register stage; a sample presented with in_valid in cycle t gives
// out_valid in cycle t+1. The end-of-event flag travels with the code.
// Interface: synchronous active-high reset, no back-pressure (the source is
// throttled upstream).
module carlos_encoder
  import carlos_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              out_valid,
  output logic [CODE_W-1:0] out_code,
  output logic [LEN_W-1:0]  out_len,
  output logic              out_last
);

  logic [CODE_W-1:0] code_c;
  logic [LEN_W-1:0]  len_c;
  logic [4:0]        offs;      // value - 8, used for 8..39

  always_comb begin
    offs = in_data[4:0] - 5'd8;
    if (in_data < DATA_W'(8)) begin
      code_c = {7'b0, in_data[2:0]};
      len_c  = LEN_W'(4);
    end else if (in_data < DATA_W'(40)) begin
      code_c = {3'b0, 2'b10, offs[4:0]};
      len_c  = LEN_W'(7);
    end else begin
      code_c = {2'b11, in_data};
      len_c  = LEN_W'(10);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_code  <= '0;
      out_len   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_code  <= code_c;
      out_len   <= len_c;
      out_last  <= in_valid & in_last;
    end
  end

endmodule
