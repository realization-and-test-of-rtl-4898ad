// tb_carlos_fifo: checks carlos_fifo in its fifo32x15 configuration (32 words of 15 bits)
// against a queue model under random writes and reads: data order, count,
// empty/full, a write to a full FIFO being dropped with the overflow flag
// raised, and a read of an empty FIFO being ignored.
module tb_carlos_fifo;
  localparam int W = 15, D = 32;
  logic clk = 0, rst = 1;
  logic wr = 0, rd = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] model[$];
  bit ovf_model = 0;

  carlos_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare, then update the model with what the edge does
  always @(posedge clk) if (!rst) begin
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D)
        || overflow != ovf_model || (model.size() > 0 && rdata != model[0])) begin
      failures++;
      $display("count %0d/%0d empty %0b full %0b ovf %0b rdata %h", count, model.size(),
               empty, full, overflow, rdata);
    end
    if (model.size() == D) fulls++;
    if (model.size() == 0) empties++;
    begin
      bit can_rd;
      can_rd = rd && model.size() > 0;
      if (wr && model.size() == D) ovf_model = 1;
      else if (wr) model.push_back(wdata);
      if (can_rd) void'(model.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int phase = 0; phase < 6; phase++) begin
      // alternate between filling, draining and balanced traffic
      for (int i = 0; i < 400; i++) begin
        int pw;
        pw = (phase % 3 == 0) ? 80 : (phase % 3 == 1) ? 20 : 50;
        wr <= ($urandom_range(0, 99) < pw);
        rd <= ($urandom_range(0, 99) < 100 - pw);
        wdata <= W'($urandom);
        @(posedge clk);
      end
    end
    wr <= 0; rd <= 0;
    @(posedge clk); @(posedge clk);
    checks++;
    if (fulls == 0 || empties == 0 || !ovf_model) begin
      failures++; $display("full %0d empty %0d overflow %0b not all seen", fulls, empties, ovf_model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
