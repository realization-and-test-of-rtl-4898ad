// tb_carlos_trigger_if: pulses the trigger line and checks the synchronized
// one-cycle pulse, the pending-event count, busy at MAX_EVENTS pending and
// outside run, the count dropping on event_sent, and the lost flag for a
// trigger arriving while busy.
module tb_carlos_trigger_if;
  localparam int M = 5;
  logic clk = 0, rst = 1, run = 0, trigger_in = 0, event_sent = 0;
  logic trig_pulse, busy, lost;
  logic [$clog2(M+1)-1:0] pending;
  int checks = 0, failures = 0, pulses = 0;

  carlos_trigger_if #(.MAX_EVENTS(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (trig_pulse) pulses++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trig();
    #2 trigger_in = 1;              // asynchronous to the clock
    repeat (4) @(posedge clk);
    #3 trigger_in = 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (pending %0d busy %0b)", what, pending, busy); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(busy, "busy while not running");
    run <= 1;
    @(posedge clk);
    check(!busy, "not busy when running and empty");
    for (int i = 1; i <= M; i++) begin
      trig();
      check(pending == 3'(i), "pending counts triggers");
      check(pulses == i, "one pulse per trigger");
    end
    check(busy, "busy with MAX_EVENTS pending");
    check(!lost, "nothing lost yet");
    trig();
    check(lost, "trigger while busy flagged");
    check(pending == 3'(M), "pending saturates");
    event_sent <= 1; @(posedge clk); event_sent <= 0; @(posedge clk);
    check(pending == 3'(M - 1) && !busy, "event_sent frees a slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
