// carlos_cmcu: command mode control unit.
//
// Holds the chip's operating state, changed remotely through the JTAG command
// register (cmd_update carries a new 2-bit command):
//   CM_IDLE       power-on state; nothing is computed, inputs are refused
//   CM_RESET_PIPE pipe_rst is held high: every pipeline register is cleared
//   CM_BIST       built-in self test: bist_start pulses once on entry, the
//                 pattern generator drives both channels and the signature
//                 maker reports through bist_done / bist_pass
//   CM_RUN        normal data acquisition
// IDLE and RESET_PIPE may be commanded at any time; BIST and RUN are accepted
// only from RESET_PIPE, so that they always start from cleared registers;
// other commands are ignored. The 8-bit result register reads BIST_NONE (00)
// from entry into BIST until the test ends, then BIST_PASS (FF) or BIST_FAIL
// (55); it keeps its value until the next BIST.
// The IDLE -> RESET-PIPELINE -> BIST sequence, the JTAG control and the FF/55
// codes follow the chip description. The name and code of the run state, the
// rule that BIST and RUN must follow RESET_PIPE, and the 00 code are this
// design's choices. Outputs are registered; a command takes effect one clock
// after cmd_update.
module carlos_cmcu
  import carlos_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cmd,
  input  logic       cmd_update,
  input  logic       bist_done,
  input  logic       bist_pass,
  output cm_state_t  state,
  output logic       pipe_rst,
  output logic       run,
  output logic       bist_mode,
  output logic       bist_start,
  output logic [7:0] result
);

  cm_state_t req;
  logic      accept;

  always_comb begin
    req = cm_state_t'(cmd);
    unique case (req)
      CM_IDLE, CM_RESET_PIPE: accept = 1'b1;
      CM_BIST, CM_RUN:        accept = (state == CM_RESET_PIPE);
      default:                accept = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= CM_IDLE;
      bist_start <= 1'b0;
      result     <= BIST_NONE;
    end else begin
      bist_start <= 1'b0;
      if (cmd_update && accept) begin
        state <= req;
        if (req == CM_BIST) begin
          bist_start <= 1'b1;
          result     <= BIST_NONE;
        end
      end
      if (state == CM_BIST && bist_done)
        result <= bist_pass ? BIST_PASS : BIST_FAIL;
    end
  end

  assign pipe_rst  = (state == CM_RESET_PIPE);
  assign run       = (state == CM_RUN);
  assign bist_mode = (state == CM_BIST);

endmodule
