// tb_carlos_encoder: checks the code and length of every 8-bit value against
// the reference table, the end-of-event flag, and the one-cycle latency.
module tb_carlos_encoder;
  import carlos_pkg::*;
  import carlos_tb_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_last;
  logic [9:0] out_code;
  logic [3:0] out_len;
  int checks = 0, failures = 0;

  carlos_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] rc; int rl;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int v = 0; v < 256; v++) begin
      in_valid <= 1; in_data <= 8'(v); in_last <= (v == 255);
      @(posedge clk);
      in_valid <= 0; in_last <= 0;
      #1;
      // registered: result visible right after the edge that took the input
      ref_encode(8'(v), rc, rl);
      checks++;
      if (!out_valid || out_code != rc || out_len != 4'(rl) || out_last != (v == 255)) begin
        failures++;
        $display("value %0d: got valid=%0b code=%b len=%0d last=%0b, want code=%b len=%0d",
                 v, out_valid, out_code, out_len, out_last, rc, rl);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("valid held too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
