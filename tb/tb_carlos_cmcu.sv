// tb_carlos_cmcu: checks the command unit's state sequence: IDLE at power-on,
// BIST and RUN refused unless coming from RESET_PIPE, pipe_rst in RESET_PIPE,
// one bist_start pulse on entering BIST, and the result register going
// 00 -> FF on a passing BIST and 00 -> 55 on a failing one.
module tb_carlos_cmcu;
  import carlos_pkg::*;

  logic clk = 0, rst = 1;
  logic [1:0] cmd = 0;
  logic cmd_update = 0, bist_done = 0, bist_pass = 0;
  cm_state_t state;
  logic pipe_rst, run, bist_mode, bist_start;
  logic [7:0] result;
  int checks = 0, failures = 0, starts = 0;

  carlos_cmcu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (bist_start) starts++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(cm_state_t c);
    @(posedge clk); #1;
    cmd = c; cmd_update = 1;
    @(posedge clk); #1;
    cmd_update = 0;
    @(posedge clk); #1;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (state %0d)", what, state); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(state == CM_IDLE && !pipe_rst && !run && !bist_mode, "IDLE at power-on");
    check(result == BIST_NONE, "result 00 at power-on");
    command(CM_RUN);
    check(state == CM_IDLE, "RUN refused from IDLE");
    command(CM_BIST);
    check(state == CM_IDLE && starts == 0, "BIST refused from IDLE");
    command(CM_RESET_PIPE);
    check(state == CM_RESET_PIPE && pipe_rst, "RESET_PIPE asserts pipe_rst");
    command(CM_BIST);
    check(bist_mode && starts == 1 && result == BIST_NONE, "BIST entered, one start pulse");
    bist_done = 1; bist_pass = 1;
    @(posedge clk); #1 bist_done = 0;
    @(posedge clk); #1;
    check(result == BIST_PASS, "result FF after passing BIST");
    command(CM_RUN);
    check(state == CM_BIST, "RUN refused from BIST");
    command(CM_RESET_PIPE);
    command(CM_BIST);
    check(result == BIST_NONE && starts == 2, "result cleared on new BIST");
    bist_done = 1; bist_pass = 0;
    @(posedge clk); #1 bist_done = 0;
    @(posedge clk); #1;
    check(result == BIST_FAIL, "result 55 after failing BIST");
    command(CM_RESET_PIPE);
    command(CM_RUN);
    check(run && !pipe_rst && state == CM_RUN, "RUN from RESET_PIPE");
    bist_done = 1; bist_pass = 1;
    @(posedge clk); #1 bist_done = 0;
    check(result == BIST_FAIL, "result kept outside BIST");
    command(CM_IDLE);
    check(state == CM_IDLE && !run, "IDLE from RUN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
