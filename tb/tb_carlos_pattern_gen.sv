// tb_carlos_pattern_gen: starts the generator, throttles ready at random and
// checks the 200 vectors against a separately written LFSR model (channel 0
// gets the low byte, channel 1 the high byte), the last flag on the 200th, and
// that the sequence restarts identically on a second start.
module tb_carlos_pattern_gen;
  import carlos_pkg::*;

  logic clk = 0, rst = 1, start = 0, ready = 0;
  logic out_valid, out_last, busy;
  logic [1:0][7:0] out_data;
  int checks = 0, failures = 0, got = 0;
  logic [15:0] model;

  carlos_pattern_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s);
    // taps 16, 14, 13, 11
    return {s[14:0], ^(s & 16'b1011_0100_0000_0000)};
  endfunction

  always @(posedge clk) if (!rst && out_valid) begin
    checks++;
    if (out_data[0] != model[7:0] || out_data[1] != model[15:8] || out_last != (got == 199)) begin
      failures++; $display("vector %0d: %h want %h last %0b", got, out_data, model, out_last);
    end
    model = step(model);
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 2; run++) begin
      model = 16'hACE1; got = 0;
      start = 1; @(posedge clk); #1 start = 0;
      while (busy) begin
        ready = ($urandom_range(0, 2) != 0);
        @(posedge clk); #1;
      end
      ready = 0;
      repeat (5) @(posedge clk); #1;
      checks++;
      if (got != 200) begin failures++; $display("%0d vectors, want 200", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
