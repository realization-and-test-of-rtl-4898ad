// carlos_signature: BIST signature maker.
//
// Compacts every 16-bit output word of the BIST packet into a 16-bit
// signature with a multiple-input signature register (an LFSR with polynomial
// x^16 + x^14 + x^13 + x^11 + 1 whose state is XORed with the incoming word):
//   sig <= {sig[14:0], sig[15]^sig[13]^sig[12]^sig[10]} ^ word
// clear sets the register to 0 at the start of the test. On finish (the end
// of the BIST packet) the signature is compared with EXPECTED and done/pass
// are registered; a 16-bit signature leaves an aliasing probability of 2^-16.
// The 16-bit width and the signature comparison follow the chip description;
// the polynomial and the way words are folded in are this design's choices.
// EXPECTED is the signature of a fault-free chip running the default BIST
// (200 vectors from carlos_pattern_gen's default seed, event count 0) and must
// be recomputed if the pattern generator, the code table or the packet format
// change.
module carlos_signature
  import carlos_pkg::*;
#(
  parameter logic [15:0] EXPECTED = 16'hA8A4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  input  logic [OUT_W-1:0] word,
  input  logic             finish,
  output logic [15:0]      sig,
  output logic             done,
  output logic             pass
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sig  <= '0;
      done <= 1'b0;
      pass <= 1'b0;
    end else begin
      if (en)
        sig <= {sig[14:0], sig[15] ^ sig[13] ^ sig[12] ^ sig[10]} ^ word;
      done <= finish;
      pass <= finish && ((en ? ({sig[14:0], sig[15] ^ sig[13] ^ sig[12] ^ sig[10]} ^ word)
                             : sig) == EXPECTED);
    end
  end

endmodule
