// tb_carlos_channel: sends events of random samples (a mix of small and large
// values) through one channel, pops the FIFO at random, and decodes the words
// of each event back into samples with the reference decoder. Also checks the
// closed flag and that the FIFO never overflows under the chip's throttling
// rule (no sample while more than DEPTH-5 words are stored).
module tb_carlos_channel;
  import carlos_pkg::*;
  import carlos_tb_pkg::*;
  localparam int D = 32;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0, rd = 0, event_sent = 0;
  logic [7:0] in_data = 0;
  logic [14:0] rdata;
  logic empty, closed, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, throttled = 0;

  carlos_channel #(.FIFO_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("timeout: closed %0b empty %0b count %0d got %0d", closed, empty, count, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_q_t sent;
  word_q_t got;

  // reader: pops at random, collects words
  bit reading = 0;
  always @(posedge clk) begin
    if (!rst && rd && !empty) got.push_back(rdata);
    rd <= reading && ($urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    reading = 1;
    for (int ev = 0; ev < 40; ev++) begin
      int n;
      byte_q_t dec;
      n = 1 + $urandom_range(0, 300);
      sent = {}; got = {};
      for (int i = 0; i < n; i++) begin
        logic [7:0] v;
        case ($urandom_range(0, 2))
          0: v = 8'($urandom_range(0, 7));
          1: v = 8'($urandom_range(8, 39));
          default: v = 8'($urandom);
        endcase
        while (count > 6'(D - 5)) begin
          in_valid <= 0; throttled++;
          @(posedge clk);
        end
        in_valid <= 1; in_data <= v; in_last <= (i == n - 1);
        sent.push_back(v);
        @(posedge clk);
      end
      in_valid <= 0; in_last <= 0;
      // wait for the event to close and drain
      while (!(closed && empty)) @(posedge clk);
      repeat (2) @(posedge clk);
      checks++;
      if (!decode_words(got, n, dec) || dec != sent) begin
        failures++; $display("event %0d: %0d samples, %0d words, decode mismatch", ev, n, got.size());
      end
      event_sent <= 1; @(posedge clk); event_sent <= 0; @(posedge clk);
      checks++;
      if (closed) begin failures++; $display("closed not cleared"); end
    end
    checks++;
    if (overflow || throttled == 0) begin
      failures++; $display("overflow %0b throttled %0d", overflow, throttled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
