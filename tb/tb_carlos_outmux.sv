// tb_carlos_outmux: the channel and trigger FIFOs are modelled by queues. Each
// event puts a random number of words into each channel at a random rate, so
// that the multiplexer sometimes finds a channel empty. Every packet is
// checked: three header words {1, evcnt[2:0], trigger word}, data words in
// alternate channel-0 / channel-1 cycles with the right payloads in order,
// dummy words 16'h8000 where a channel had nothing, an even number of data
// words, two footers {F, evcnt} and {F, ~evcnt}, one word per clock, and
// event_sent with the last footer.
module tb_carlos_outmux;
  import carlos_pkg::*;

  logic clk = 0, rst = 1;
  logic enable = 0, trig_bypass = 0;
  logic [11:0] trig_rdata = 0;
  logic [3:0]  trig_count = 0;
  logic trig_rd;
  logic [1:0][14:0] ch_rdata = '0;
  logic [1:0] ch_empty = 2'b11, ch_closed = 2'b00, ch_rd;
  logic [11:0] evcnt = 0;
  logic event_sent;
  logic [15:0] out_word;
  logic out_valid, out_first, out_last, dummy, in_packet;
  int checks = 0, failures = 0, dummies = 0, packets = 0;

  carlos_outmux #(.TRIG_CW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [14:0] chq[2][$];       // words waiting in the channel FIFOs
  logic [14:0] expw[2][$];      // words of the current event not yet seen at the output
  logic [11:0] trq[$];
  logic [11:0] trexp[$];
  int to_send[2];
  bit producing = 0;

  // FIFO models and producer
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (ch_rd[c] && chq[c].size() > 0) void'(chq[c].pop_front());
      if (producing && to_send[c] > 0 && $urandom_range(0, 3) == 0) begin
        logic [14:0] w;
        w = 15'($urandom);
        chq[c].push_back(w); expw[c].push_back(w);
        to_send[c]--;
      end
    end
    if (trig_rd && trq.size() > 0) void'(trq.pop_front());
    if (event_sent) evcnt <= evcnt + 1;
    #1;
    for (int c = 0; c < 2; c++) begin
      ch_empty[c] = (chq[c].size() == 0);
      ch_rdata[c] = (chq[c].size() > 0) ? chq[c][0] : 15'h0;
      ch_closed[c] = producing && to_send[c] == 0;
    end
    trig_count = 4'(trq.size());
    trig_rdata = (trq.size() > 0) ? trq[0] : 12'h0;
  end

  // packet checker
  int pos = 0, ndata = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    logic [15:0] want;
    checks++;
    if (pos < 3) begin
      want = {1'b1, evcnt[2:0], trexp[pos]};
      if (out_word != want || out_first != (pos == 0)) begin
        failures++; $display("header %0d: %h want %h", pos, out_word, want);
      end
      pos++;
    end else if (out_word[15:12] == 4'hF && pos >= 3) begin
      // footer
      want = (pos == 3) ? {4'hF, evcnt} : {4'hF, ~evcnt};
      if (out_word != want) begin failures++; $display("footer %h want %h", out_word, want); end
      if (pos == 4) begin
        if (!out_last || !event_sent || (ndata % 2) != 0 || expw[0].size() || expw[1].size()) begin
          failures++; $display("end: last %0b sent %0b ndata %0d left %0d %0d", out_last,
                               event_sent, ndata, expw[0].size(), expw[1].size());
        end
        pos = 0; ndata = 0; packets++;
      end else pos = 4;
    end else begin
      int c;
      c = ndata % 2;
      if (out_word == DUMMY_WORD) dummies++;
      else if (expw[c].size() == 0 || out_word != {1'b0, expw[c][0]}) begin
        failures++; $display("data slot %0d ch %0d: %h", ndata, c, out_word);
      end else void'(expw[c].pop_front());
      ndata++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; enable <= 1;
    for (int ev = 0; ev < 60; ev++) begin
      trexp = {};
      for (int k = 0; k < 3; k++) begin trexp.push_back(12'($urandom)); trq.push_back(trexp[k]); end
      to_send[0] = $urandom_range(1, 30);
      to_send[1] = $urandom_range(1, 30);
      producing = 1;
      @(posedge clk iff event_sent);
      producing = 0;
      repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (packets != 60 || dummies == 0) begin
      failures++; $display("packets %0d dummies %0d", packets, dummies);
    end
    $display("packets %0d, dummy words %0d", packets, dummies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
