// tb_carlos_top: end-to-end test of the chip core at its default parameters.
//
// 1. Power-on: the chip must be IDLE and refuse data.
// 2. Over JTAG: RESET_PIPE, then BIST. The BIST packet is captured, both
//    channels are decoded and compared with an independent model of the
//    pattern generator, the packet's signature is computed by a model of the
//    signature register, and the result register read back on tdo must be FF.
// 3. RESET_PIPE, then RUN. Events of random length and content are sent on
//    both channels while a second process sends their trigger records (TTC
//    words and trigger line) up to five events ahead. Every output packet is
//    parsed and decoded, as the offline receiving software would, and compared
//    with what was sent: header trigger words, event count in header and
//    footers, an even number of data words, the samples of both channels.
// 4. BIST again with a stuck-at-1 bit forced on channel 1's packed words (one
//    bad channel): the result read on tdo must be 55.
// Mechanisms that must each occur at least once (a failure is counted if one
// never does): input stall on full FIFOs, dummy words, codes split across two
// 15-bit words, zero-padded end-of-event words, trigger busy, more than one
// event's trigger record buffered, the BIST pass and fail codes, mode switches.
module tb_carlos_top;
  import carlos_pkg::*;
  import carlos_tb_pkg::*;

  localparam int NUM_EVENTS = 40;

  logic clk = 0, rst_n = 0;
  logic [1:0][7:0] ch_data = '0;
  logic in_valid = 0, in_last = 0, in_ready;
  logic [11:0] ttc_data = 0;
  logic bcnt_str = 0, evcnt_l_str = 0, evcnt_h_str = 0;
  logic trigger_in = 0, trigger_busy;
  logic tck = 0, tms = 1, tdi = 0, tdo;
  logic [15:0] data_out;
  logic data_valid, data_first, data_last;
  cm_state_t mode;
  logic error;

  carlos_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_dummy = 0, n_split = 0, n_pad = 0, n_busy = 0, n_multi = 0;
  int n_bist_pass = 0, n_bist_fail = 0, n_mode = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- JTAG master ----------------
  task automatic jclock(input bit m, input bit d, output bit o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  task automatic jshift(input bit ir, input int n, input logic [15:0] v, output logic [15:0] o);
    bit b;
    o = '0;
    jclock(1, 0, b);
    if (ir) jclock(1, 0, b);
    jclock(0, 0, b);
    jclock(0, 0, b);
    for (int i = 0; i < n; i++) begin
      jclock(i == n - 1, v[i], b);
      o[i] = b;
    end
    jclock(1, 0, b);
    jclock(0, 0, b);
  endtask

  task automatic command(cm_state_t c);
    logic [15:0] o;
    cm_state_t before_cmd;
    before_cmd = mode;
    jshift(1, 3, 16'(IR_CMD), o);
    jshift(0, 2, 16'(c), o);
    repeat (2) @(posedge clk);
    check(mode == c, $sformatf("mode %0d after command %0d", mode, c));
    if (mode != before_cmd) n_mode++;
  endtask

  // ---------------- output packet capture ----------------
  logic [15:0] pkt[$];
  logic [15:0] packets[$][$];
  always @(posedge clk) if (rst_n && data_valid) begin
    if (data_first && pkt.size() != 0) begin
      failures++; $display("FAIL: packet start inside a packet");
      pkt = {};
    end
    pkt.push_back(data_out);
    if (data_last) begin
      packets.push_back(pkt);
      pkt = {};
    end
  end

  // count codes crossing a word boundary and end-of-event padding
  function automatic void count_packing(byte_q_t s);
    int bits, l;
    logic [9:0] c;
    bits = 0;
    foreach (s[i]) begin
      ref_encode(s[i], c, l);
      if ((bits % 15) + l > 15) n_split++;
      bits += l;
    end
    if (bits % 15 != 0) n_pad++;
  endfunction

  // split a packet into header, channel words and footer; returns 0 on format error
  function automatic bit parse(logic [15:0] p[$], int evn, output logic [11:0] trig[3],
                               output word_q_t w0, output word_q_t w1);
    int nd;
    w0 = {}; w1 = {};
    if (p.size() < 5) return 0;
    for (int k = 0; k < 3; k++) begin
      if (p[k][15] != 1'b1 || p[k][14:12] != 3'(evn)) return 0;
      trig[k] = p[k][11:0];
    end
    if (p[p.size()-2] != {4'hF, 12'(evn)} || p[p.size()-1] != {4'hF, ~12'(evn)}) return 0;
    nd = p.size() - 5;
    if (nd % 2 != 0) return 0;
    for (int i = 0; i < nd; i++) begin
      logic [15:0] d;
      d = p[3 + i];
      if (d == DUMMY_WORD) begin n_dummy++; continue; end
      if (d[15]) return 0;
      if (i % 2 == 0) w0.push_back(d[14:0]); else w1.push_back(d[14:0]);
    end
    return 1;
  endfunction

  function automatic logic [15:0] misr(logic [15:0] s, logic [15:0] w);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]} ^ w;
  endfunction

  // ---------------- run-mode traffic ----------------
  typedef struct { logic [11:0] trig[3]; } trig_rec_t;
  trig_rec_t trig_sent[$];
  byte_q_t   ev_s0[$], ev_s1[$];
  int        n_trig = 0, n_data_ev = 0, n_pkt_done = 0;
  bit        traffic = 0;

  task automatic send_trigger();
    trig_rec_t r;
    for (int k = 0; k < 3; k++) r.trig[k] = 12'($urandom);
    trig_sent.push_back(r);
    // trigger line from the trigger chip, then the TTC record
    @(posedge clk); #1 trigger_in = 1;
    repeat (3) @(posedge clk); #1 trigger_in = 0;
    for (int k = 0; k < 3; k++) begin
      ttc_data = r.trig[k];
      bcnt_str = (k == 0); evcnt_l_str = (k == 1); evcnt_h_str = (k == 2);
      @(posedge clk); #1;
      bcnt_str = 0; evcnt_l_str = 0; evcnt_h_str = 0;
      @(posedge clk); #1;
    end
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic send_event(int e);
    int n, style;
    byte_q_t s0, s1;
    n = $urandom_range(1, 700);
    style = e % 4;     // 0 mostly small values, 1 mixed, 2 large (expanding), 3 random
    for (int i = 0; i < n; i++) begin
      logic [7:0] v[2];
      for (int c = 0; c < 2; c++) begin
        case (style)
          0: v[c] = 8'($urandom_range(0, 12));
          1: v[c] = ($urandom_range(0, 1) == 1) ? 8'($urandom_range(0, 39)) : 8'($urandom);
          2: v[c] = 8'($urandom_range(40, 255));
          default: v[c] = 8'($urandom);
        endcase
      end
      s0.push_back(v[0]); s1.push_back(v[1]);
      ch_data[0] = v[0]; ch_data[1] = v[1];
      in_valid = 1; in_last = (i == n - 1);
      @(negedge clk);
      while (!in_ready) begin n_stall++; @(negedge clk); end
      @(posedge clk); #1;
      in_valid = 0; in_last = 0;
      if (style == 1 && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    ev_s0.push_back(s0); ev_s1.push_back(s1);
    count_packing(s0); count_packing(s1);
  endtask

  initial begin
    logic [15:0] o;
    logic [15:0] bsig;
    logic [15:0] lf;
    byte_q_t exp0, exp1, dec;
    logic [11:0] trig[3];
    word_q_t w0, w1;

    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    check(mode == CM_IDLE && !in_ready, "IDLE and no input accepted after power-on");
    in_valid = 1; repeat (4) @(posedge clk); #1 in_valid = 0;
    check(packets.size() == 0, "no output in IDLE");

    // -------- BIST --------
    begin
      bit b;
      repeat (5) jclock(1, 0, b);   // Test-Logic-Reset
      jclock(0, 0, b);              // Run-Test/Idle
    end
    command(CM_RESET_PIPE);
    command(CM_BIST);
    wait (packets.size() == 1);
    repeat (4) @(posedge clk);
    lf = 16'hACE1;
    for (int i = 0; i < 200; i++) begin
      exp0.push_back(lf[7:0]); exp1.push_back(lf[15:8]);
      lf = {lf[14:0], lf[15] ^ lf[13] ^ lf[12] ^ lf[10]};
    end
    check(parse(packets[0], 0, trig, w0, w1), "BIST packet format");
    check(trig[0] == 0 && trig[1] == 0 && trig[2] == 0, "BIST header carries no trigger words");
    check(decode_words(w0, 200, dec) && dec == exp0, "BIST channel 0 decodes to the 200 vectors");
    check(decode_words(w1, 200, dec) && dec == exp1, "BIST channel 1 decodes to the 200 vectors");
    bsig = 0;
    foreach (packets[0][i]) bsig = misr(bsig, packets[0][i]);
    $display("BIST packet: %0d words, signature %h", packets[0].size(), bsig);
    jshift(1, 3, 16'(IR_RESULT), o);
    jshift(0, 8, 16'h0, o);
    check(o[7:0] == BIST_PASS, $sformatf("BIST result on tdo %h, want FF", o[7:0]));
    if (o[7:0] == BIST_PASS) n_bist_pass++;
    void'(packets.pop_front());

    // -------- RUN --------
    command(CM_RESET_PIPE);
    command(CM_RUN);
    check(!trigger_busy, "trigger not busy in RUN");
    traffic = 1;
    fork
      // trigger source: as far ahead as the chip allows
      begin
        while (n_trig < NUM_EVENTS) begin
          if (trigger_busy) begin
            n_busy++;
            @(posedge clk iff !trigger_busy); #1;
          end
          if (n_trig - n_pkt_done >= 1) n_multi++;
          send_trigger();
          n_trig++;
        end
      end
      // data source: an event's data follow its trigger
      begin
        for (int e = 0; e < NUM_EVENTS; e++) begin
          while (n_trig <= e) @(posedge clk);
          #1;
          send_event(e);
          n_data_ev++;
        end
      end
      // receiver
      begin
        while (n_pkt_done < NUM_EVENTS) begin
          wait (packets.size() > 0);
          begin
            byte_q_t d0, d1;
            bit ok;
            ok = parse(packets[0], n_pkt_done, trig, w0, w1);
            check(ok, $sformatf("packet %0d format", n_pkt_done));
            check(trig == trig_sent[n_pkt_done].trig, $sformatf("packet %0d trigger words", n_pkt_done));
            wait (ev_s0.size() > n_pkt_done);
            check(decode_words(w0, ev_s0[n_pkt_done].size(), d0) && d0 == ev_s0[n_pkt_done],
                  $sformatf("packet %0d channel 0 data", n_pkt_done));
            check(decode_words(w1, ev_s1[n_pkt_done].size(), d1) && d1 == ev_s1[n_pkt_done],
                  $sformatf("packet %0d channel 1 data", n_pkt_done));
            void'(packets.pop_front());
            n_pkt_done++;
          end
        end
      end
    join
    repeat (20) @(posedge clk);
    check(!error, "no overflow or protocol error flagged");
    command(CM_IDLE);
    check(!in_ready && trigger_busy, "IDLE again refuses data and triggers");

    // -------- BIST on a chip with a faulty channel --------
    // a stuck-at-1 bit on channel 1's packed words must give the fail code
    force dut.g_ch[1].u_channel.bar_word[4] = 1'b1;
    command(CM_RESET_PIPE);
    command(CM_BIST);
    wait (packets.size() == 1);
    repeat (4) @(posedge clk);
    jshift(1, 3, 16'(IR_RESULT), o);
    jshift(0, 8, 16'h0, o);
    check(o[7:0] == BIST_FAIL, $sformatf("faulty-channel BIST result %h, want 55", o[7:0]));
    if (o[7:0] == BIST_FAIL) n_bist_fail++;
    release dut.g_ch[1].u_channel.bar_word[4];
    void'(packets.pop_front());

    $display("stalls %0d, dummy words %0d, split codes %0d, padded words %0d, trigger busy %0d,",
             n_stall, n_dummy, n_split, n_pad, n_busy);
    $display("events triggered ahead %0d, BIST passes %0d, BIST fails %0d, mode switches %0d",
             n_multi, n_bist_pass, n_bist_fail, n_mode);
    check(n_stall > 0, "input stall happened");
    check(n_dummy > 0, "dummy words happened");
    check(n_split > 0, "split codes happened");
    check(n_pad > 0, "padded end-of-event words happened");
    check(n_busy > 0, "trigger busy happened");
    check(n_multi > 0, "several trigger records buffered");
    check(n_bist_pass > 0, "BIST pass happened");
    check(n_bist_fail > 0, "BIST fail code happened");
    check(n_mode >= 5, "mode switches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
