// carlos_fifo: synchronous flip-flop FIFO.
//
// Used twice in the chip with different sizes: as fifo32x15 (32 words of 15
// bits, one per channel, absorbing the local expansion of the encoder while the
// output is shared between the two channels) and as fifo_trigger15x12 (15 words
// of 12 bits: the three trigger words of each of 5 accepted events). Both sizes
// follow the chip description, as does the flip-flop storage; the defaults are
// the 32x15 configuration.
//
// The array is written and read in the same clock; rdata shows the oldest word
// while empty is low (first-word fall-through), and rd removes it at the clock
// edge. Any depth is allowed (the pointers wrap at DEPTH, not at a power of 2).
// A write to a full FIFO is dropped and raises the sticky overflow flag; a read
// of an empty FIFO is ignored. count gives the number of stored words.
module carlos_fifo #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       rd,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;

  logic do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: ;
      endcase
      if (wr && full) overflow <= 1'b1;
    end
  end

endmodule
