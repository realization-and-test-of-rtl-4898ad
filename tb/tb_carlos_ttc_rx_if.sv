// tb_carlos_ttc_rx_if: sends trigger records (bunch counter, event counter
// low, event counter high) with random gaps and checks that each word is
// written to the trigger FIFO one cycle after its strobe, that complete records
// are counted, and that an out-of-order strobe and a write into a full FIFO
// raise the error flag.
module tb_carlos_ttc_rx_if;
  logic clk = 0, rst = 1;
  logic [11:0] ttc_data = 0;
  logic bcnt_str = 0, evcnt_l_str = 0, evcnt_h_str = 0, fifo_full = 0;
  logic fifo_wr, error;
  logic [11:0] fifo_wdata;
  logic [7:0] records;
  int checks = 0, failures = 0;
  logic [11:0] exp_q[$];

  carlos_ttc_rx_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && fifo_wr) begin
    checks++;
    if (exp_q.size() == 0 || fifo_wdata != exp_q[0]) begin
      failures++; $display("unexpected write %h", fifo_wdata);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  task automatic strobe(int which, logic [11:0] d);
    // inputs change 1 time unit after the clock edge
    ttc_data = d;
    bcnt_str = (which == 0); evcnt_l_str = (which == 1); evcnt_h_str = (which == 2);
    exp_q.push_back(d);
    @(posedge clk); #1;
    bcnt_str = 0; evcnt_l_str = 0; evcnt_h_str = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 3; k++) begin
        strobe(k, 12'($urandom));
        repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      end
    end
    repeat (3) @(posedge clk); #1;
    checks++;
    if (records != 8'd20 || error || exp_q.size() != 0) begin
      failures++; $display("records %0d error %0b left %0d", records, error, exp_q.size());
    end
    // out of order: event-high strobe where a bunch counter is expected
    strobe(2, 12'h123);
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!error) begin failures++; $display("order error not flagged"); end
    // full FIFO
    rst = 1; @(posedge clk); #1; rst = 0; exp_q = {};
    @(posedge clk); #1;
    checks++;
    if (error) begin failures++; $display("error not cleared by reset"); end
    fifo_full = 1;
    strobe(0, 12'h456);
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!error) begin failures++; $display("full FIFO write not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
