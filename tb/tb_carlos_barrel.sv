// tb_carlos_barrel: drives random codes (4..10 bits, random gaps) in events of
// random length and compares the packed words with a bit-queue model: words
// must carry the code bits MSB first, the last word of an event must be zero
// padded and flagged, and a word must appear two cycles after the code that
// completes it.
module tb_carlos_barrel;
  import carlos_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_last = 0;
  logic [9:0] in_code = 0;
  logic [3:0] in_len = 4;
  logic out_valid, out_last;
  logic [14:0] out_word;
  int checks = 0, failures = 0;
  int splits = 0, flushes2 = 0;

  carlos_barrel dut (.*);

  always #5 clk = ~clk;

  // expected words with the cycle they are due
  typedef struct { logic [14:0] w; bit last; longint due; } exp_t;
  exp_t exp_q[$];
  bit   bitq[$];
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: bits of each code taken at a clock edge are queued; a word that
  // becomes complete (or the end of an event) is due two cycles later
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected word %h", out_word);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (e.w != out_word || e.last != out_last || e.due != cyc) begin
          failures++;
          $display("cycle %0d: got %h last=%0b, want %h last=%0b due %0d",
                   cyc, out_word, out_last, e.w, e.last, e.due);
        end
      end
    end
    if (!rst && in_valid) begin
      int held;
      held = bitq.size();
      for (int b = int'(in_len) - 1; b >= 0; b--) bitq.push_back(in_code[b]);
      if (bitq.size() >= 15) begin
        if (held + int'(in_len) > 15) splits++;
        push_word(in_last && bitq.size() == 15, cyc + 2);
        if (in_last && bitq.size() > 0) begin push_word(1, cyc + 3); flushes2++; end
      end else if (in_last) push_word(1, cyc + 2);
    end
  end

  task automatic push_word(bit last, longint due);
    exp_t e; e.w = '0;
    for (int b = 14; b >= 0; b--) e.w[b] = (bitq.size() > 0) ? bitq.pop_front() : 1'b0;
    e.last = last; e.due = due;
    exp_q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int ev = 0; ev < 300; ev++) begin
      int n;
      n = 1 + $urandom_range(0, 40);
      for (int i = 0; i < n; i++) begin
        int l;
        logic [9:0] c;
        bit last;
        l = $urandom_range(4, 10);
        c = 10'($urandom) & ((10'd1 << l) - 1);
        last = (i == n - 1);
        // inputs change one time unit after the clock edge
        in_valid = 1; in_code = c; in_len = 4'(l); in_last = last;
        @(posedge clk); #1;
        in_valid = 0; in_last = 0;
        if (last || $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        if (last) begin @(posedge clk); #1; end
      end
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    checks++;
    if (splits == 0 || flushes2 == 0) begin
      failures++; $display("split %0d / two-word flush %0d never happened", splits, flushes2);
    end
    $display("codes split across words: %0d, end-of-event double words: %0d", splits, flushes2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
