// tb_carlos_event_counter: random event_sent pulses; the count must equal the
// number of pulses modulo 2^12, and reset must clear it.
module tb_carlos_event_counter;
  logic clk = 0, rst = 1, event_sent = 0;
  logic [11:0] count;
  int checks = 0, failures = 0, n = 0;

  carlos_event_counter #(.WIDTH(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 10000; i++) begin
      bit p;
      p = ($urandom_range(0, 1) == 1);
      event_sent <= p;
      @(posedge clk);
      if (p) n++;
      #1;
      checks++;
      if (count != 12'(n)) begin failures++; $display("count %0d want %0d", count, n); end
    end
    event_sent <= 0;
    rst <= 1; @(posedge clk); #1;
    checks++;
    if (count != 0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
