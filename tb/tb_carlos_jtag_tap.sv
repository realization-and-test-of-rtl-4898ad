// tb_carlos_jtag_tap: drives tck/tms/tdi as a JTAG master with tck eight chip
// clocks long and checks: Capture-IR reads back 3'b001, the command register
// is loaded and announced with one cmd_update pulse, the result register
// shifts out result_in LSB first, BYPASS delays tdi by one bit, and five tck
// cycles with tms high return to Test-Logic-Reset (BYPASS selected).
module tb_carlos_jtag_tap;
  import carlos_pkg::*;

  logic clk = 0, rst = 1;
  logic tck = 0, tms = 1, tdi = 0, tdo;
  logic [7:0] result_in = 8'h00;
  logic [1:0] cmd;
  logic cmd_update;
  int checks = 0, failures = 0, updates = 0;

  carlos_jtag_tap dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (cmd_update) updates++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one tck period; tdo is sampled just before the rising edge
  task automatic clock(input bit m, input bit d, output bit o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  task automatic reset_tap();
    bit o;
    repeat (5) clock(1, 0, o);
    clock(0, 0, o);              // Run-Test/Idle
  endtask

  // from Run-Test/Idle, shift n bits of v into IR (sel=1) or DR, back to RTI
  task automatic shift(input bit ir, input int n, input logic [15:0] v, output logic [15:0] o);
    bit b;
    o = '0;
    clock(1, 0, b);              // Select-DR
    if (ir) clock(1, 0, b);      // Select-IR
    clock(0, 0, b);              // Capture
    clock(0, 0, b);              // Shift
    for (int i = 0; i < n; i++) begin
      clock(i == n - 1, v[i], b);  // last bit leaves with tms high -> Exit1
      o[i] = b;
    end
    clock(1, 0, b);              // Update
    clock(0, 0, b);              // Run-Test/Idle
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] o;
    repeat (3) @(posedge clk);
    rst = 0;
    reset_tap();
    shift(1, 3, 16'(IR_CMD), o);
    check(o[2:0] == 3'b001, "Capture-IR value");
    for (int c = 0; c < 4; c++) begin
      int u;
      u = updates;
      shift(0, 2, 16'(c), o);
      check(cmd == 2'(c), "command register loaded");
      check(updates == u + 1, "one cmd_update per Update-DR");
    end
    shift(1, 3, 16'(IR_RESULT), o);
    result_in = 8'hFF;
    shift(0, 8, 16'h0, o);
    check(o[7:0] == 8'hFF, "result FF shifted out");
    result_in = 8'h55;
    shift(0, 8, 16'h0, o);
    check(o[7:0] == 8'h55, "result 55 shifted out");
    shift(1, 3, 16'(IR_BYPASS), o);
    shift(0, 8, 16'h00B5, o);
    check(o[7:0] == 8'h6A, "bypass delays tdi by one bit");
    // back to reset: BYPASS is selected, so a DR scan is one bit long
    shift(1, 3, 16'(IR_CMD), o);
    reset_tap();
    begin
      int u;
      u = updates;
      shift(0, 2, 16'h3, o);
      check(updates == u, "after reset no command register selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
