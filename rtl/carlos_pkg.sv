// carlos_pkg: widths, word formats and command codes shared by the CARLOS 2.0
// readout chip modules.
//
// Two 8-bit input channels, 4..10-bit variable-length codes packed into 15-bit
// words, 16-bit output words (15 data bits plus a flag bit that marks dummy and
// framing words), 12-bit trigger words. These numbers follow the chip
// description. The header/footer layouts, the command codes and the JTAG
// instruction codes are this design's own choices.
package carlos_pkg;

  localparam int unsigned DATA_W  = 8;   // input sample width
  localparam int unsigned CODE_W  = 10;  // longest variable-length code
  localparam int unsigned LEN_W   = 4;   // code length field (4..10)
  localparam int unsigned WORD_W  = 15;  // packed barrel word
  localparam int unsigned OUT_W   = 16;  // output word
  localparam int unsigned TRIG_W  = 12;  // trigger (bunch/event counter) word
  localparam int unsigned EVCNT_W = 12;  // internal event counter

  // Output word written when a channel has nothing to send in its slot:
  // flag bit set, all other bits zero.
  localparam logic [OUT_W-1:0] DUMMY_WORD = 16'h8000;

  // Footer tag: flag bit plus 3'b111 in bits 14:12.
  localparam logic [3:0] FOOTER_TAG = 4'hF;

  // Operating states of the command mode control unit.
  typedef enum logic [1:0] {
    CM_IDLE      = 2'd0,  // power-on state, nothing computed
    CM_RESET_PIPE = 2'd1, // internal reset held on every pipeline register
    CM_BIST      = 2'd2,  // built-in self test running or finished
    CM_RUN       = 2'd3   // normal data acquisition
  } cm_state_t;

  // JTAG instruction register codes (3-bit IR).
  localparam logic [2:0] IR_CMD    = 3'b001;  // 2-bit command data register
  localparam logic [2:0] IR_RESULT = 3'b010;  // 8-bit BIST result register
  localparam logic [2:0] IR_BYPASS = 3'b111;

  // BIST result codes seen on tdo.
  localparam logic [7:0] BIST_PASS = 8'hFF;
  localparam logic [7:0] BIST_FAIL = 8'h55;
  localparam logic [7:0] BIST_NONE = 8'h00;  // not run or still running

endpackage
