// carlos_jtag_tap: JTAG test access port through which the chip is
// commanded and the BIST result is read.
//
// The standard 16-state TAP controller (IEEE 1149.1) with a 3-bit instruction
// register and three data registers:
//   IR_CMD    (3'b001) 2-bit command register; on Update-DR its value is handed
//                      to the command unit with a one-cycle cmd_update pulse
//   IR_RESULT (3'b010) 8-bit BIST result, loaded on Capture-DR from result_in
//   IR_BYPASS (3'b111) and any other code: 1-bit bypass
// Registers shift LSB first; Capture-IR loads 3'b001.
// The JTAG pins are sampled with the chip clock, which must be at least four
// times faster than tck: tck, tms and tdi pass a two-flip-flop synchronizer,
// the TAP advances on a detected rising edge of tck and tdo changes on the
// next detected falling edge, as 1149.1 requires. trst_n is not provided; five
// tck cycles with tms high, or the chip reset, bring the TAP to
// Test-Logic-Reset, which also selects BYPASS.
// That the command unit is driven through JTAG and that the BIST result appears
// on tdo follows the chip description; the instruction set, register widths
// and the oversampling are this design's choices.
module carlos_jtag_tap
  import carlos_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  input  logic [7:0] result_in,
  output logic [1:0] cmd,
  output logic       cmd_update
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_t;

  tap_t       st, st_n;
  logic [2:0] tck_s;                 // two synchronizer stages plus edge history
  logic [1:0] tms_s, tdi_s;          // two synchronizer stages
  logic       tck_rise, tck_fall;
  logic [2:0] ir, ir_sh;
  logic [7:0] dr_sh;                 // shared DR shifter, sized for the longest DR
  logic       tdo_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      tck_s <= '0; tms_s <= '1; tdi_s <= '0;
    end else begin
      tck_s <= {tck_s[1:0], tck};
      tms_s <= {tms_s[0], tms};
      tdi_s <= {tdi_s[0], tdi};
    end
  end

  assign tck_rise = tck_s[1] & ~tck_s[2];
  assign tck_fall = ~tck_s[1] & tck_s[2];

  always_comb begin
    unique case (st)
      TLR:    st_n = tms_s[1] ? TLR    : RTI;
      RTI:    st_n = tms_s[1] ? SEL_DR : RTI;
      SEL_DR: st_n = tms_s[1] ? SEL_IR : CAP_DR;
      CAP_DR: st_n = tms_s[1] ? EX1_DR : SH_DR;
      SH_DR:  st_n = tms_s[1] ? EX1_DR : SH_DR;
      EX1_DR: st_n = tms_s[1] ? UPD_DR : PA_DR;
      PA_DR:  st_n = tms_s[1] ? EX2_DR : PA_DR;
      EX2_DR: st_n = tms_s[1] ? UPD_DR : SH_DR;
      UPD_DR: st_n = tms_s[1] ? SEL_DR : RTI;
      SEL_IR: st_n = tms_s[1] ? TLR    : CAP_IR;
      CAP_IR: st_n = tms_s[1] ? EX1_IR : SH_IR;
      SH_IR:  st_n = tms_s[1] ? EX1_IR : SH_IR;
      EX1_IR: st_n = tms_s[1] ? UPD_IR : PA_IR;
      PA_IR:  st_n = tms_s[1] ? EX2_IR : PA_IR;
      EX2_IR: st_n = tms_s[1] ? UPD_IR : SH_IR;
      UPD_IR: st_n = tms_s[1] ? SEL_DR : RTI;
      default: st_n = TLR;
    endcase
  end

  // bit presented on tdo during Shift-IR / Shift-DR
  always_comb begin
    if (st == SH_IR) tdo_bit = ir_sh[0];
    else             tdo_bit = dr_sh[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= TLR;
      ir         <= IR_BYPASS;
      ir_sh      <= '0;
      dr_sh      <= '0;
      cmd        <= '0;
      cmd_update <= 1'b0;
      tdo        <= 1'b0;
    end else begin
      cmd_update <= 1'b0;
      if (tck_fall && (st == SH_IR || st == SH_DR)) tdo <= tdo_bit;
      if (tck_rise) begin
        st <= st_n;
        unique case (st)
          TLR:    ir <= IR_BYPASS;
          CAP_IR: ir_sh <= 3'b001;
          SH_IR:  ir_sh <= {tdi_s[1], ir_sh[2:1]};
          UPD_IR: ir <= ir_sh;
          CAP_DR: begin
            if (ir == IR_RESULT) dr_sh <= result_in;
            else                 dr_sh <= '0;
          end
          SH_DR: begin
            unique case (ir)
              IR_CMD:    dr_sh <= {6'b0, tdi_s[1], dr_sh[1]};
              IR_RESULT: dr_sh <= {tdi_s[1], dr_sh[7:1]};
              default:   dr_sh <= {7'b0, tdi_s[1]};
            endcase
          end
          UPD_DR: begin
            if (ir == IR_CMD) begin
              cmd        <= dr_sh[1:0];
              cmd_update <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
