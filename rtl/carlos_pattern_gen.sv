// carlos_pattern_gen: BIST stimulus source.
//
// On start it sends NUM_VECTORS pseudo-random test vectors, one per clock in
// which ready is high, to both processing channels at the same time, as one
// event: out_last marks the final vector. The vectors come from a 16-bit
// maximal-length Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1) started from
// SEED; channel 0 receives its low byte and channel 1 its high byte, so the two
// channels see different data. The number of vectors (200) and their delivery
// to both channels at once follow the chip description; the LFSR, its seed and
// the byte split are this design's choices.
// Timing: out_valid = active && ready, combinational; the LFSR steps at each
// clock edge where a vector is taken. busy is high from start until the last
// vector has been taken.
module carlos_pattern_gen
  import carlos_pkg::*;
#(
  parameter int unsigned NUM_VECTORS = 200,
  parameter logic [15:0] SEED        = 16'hACE1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   ready,
  output logic                   out_valid,
  output logic [1:0][DATA_W-1:0] out_data,
  output logic                   out_last,
  output logic                   busy
);

  localparam int unsigned CW = $clog2(NUM_VECTORS+1);

  logic [15:0] lfsr;
  logic [CW-1:0] remaining;

  assign busy      = (remaining != '0);
  assign out_valid = busy && ready;
  assign out_data  = {lfsr[15:8], lfsr[7:0]};
  assign out_last  = (remaining == CW'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr      <= SEED;
      remaining <= '0;
    end else if (start) begin
      lfsr      <= SEED;
      remaining <= CW'(NUM_VECTORS);
    end else if (out_valid) begin
      lfsr      <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      remaining <= remaining - CW'(1);
    end
  end

endmodule
