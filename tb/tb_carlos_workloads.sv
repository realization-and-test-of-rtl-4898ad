// tb_carlos_workloads: runs the acquisition workloads the chip was tested with
// through the whole core at its default parameters, and checks every packet by
// decoding it back to the samples sent (the job of the offline checking
// program used with the real chip).
//   1. JTAG configuration (TAP reset, RESET_PIPE, RUN), then two events of
//      1024 sample pairs: the post-layout test vector set.
//   2. One event of 48k (49152) sample pairs with uniformly random values,
//      the worst case for the encoder (mostly 10-bit codes, heavy stalling).
//   3. One event of 48k sample pairs drawn from a clipped gaussian
//      (mean 20, sigma about 8, approximated by a sum of uniform numbers),
//      standing in for baseline-subtracted detector data.
//   4. 83k (83000) short events of 1..8 sample pairs, the length of the
//      data-link chain test; the 12-bit event counter wraps 20 times.
// The sample distributions and the short event length of step 4 are choices
// of this testbench; the event counts and sizes are those of the chip tests.
module tb_carlos_workloads;
  import carlos_pkg::*;
  import carlos_tb_pkg::*;

  localparam int LONG_EVENT  = 49152;
  localparam int CHAIN_EVENTS = 83000;

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

  int checks = 0, failures = 0, n_ev = 0, n_stall = 0, n_wrap = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- JTAG master ----------------
  task automatic jclock(input bit m, input bit d);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  task automatic jshift(input bit ir, input int n, input logic [15:0] v);
    jclock(1, 0);
    if (ir) jclock(1, 0);
    jclock(0, 0);
    jclock(0, 0);
    for (int i = 0; i < n; i++) jclock(i == n - 1, v[i]);
    jclock(1, 0);
    jclock(0, 0);
  endtask

  task automatic command(cm_state_t c);
    jshift(1, 3, 16'(IR_CMD));
    jshift(0, 2, 16'(c));
    repeat (2) @(posedge clk);
    check(mode == c, $sformatf("mode %0d after command %0d", mode, c));
  endtask

  // ---------------- output capture ----------------
  logic [15:0] pkt[$];
  logic [15:0] packets[$][$];
  always @(posedge clk) if (rst_n && data_valid) begin
    pkt.push_back(data_out);
    if (data_last) begin packets.push_back(pkt); pkt = {}; end
  end

  // ---------------- one event ----------------
  logic [11:0] trig[3];

  task automatic send_trigger();
    for (int k = 0; k < 3; k++) trig[k] = 12'($urandom);
    #1 trigger_in = 1;
    repeat (2) @(posedge clk); #1 trigger_in = 0;
    for (int k = 0; k < 3; k++) begin
      ttc_data = trig[k];
      bcnt_str = (k == 0); evcnt_l_str = (k == 1); evcnt_h_str = (k == 2);
      @(posedge clk); #1;
      bcnt_str = 0; evcnt_l_str = 0; evcnt_h_str = 0;
    end
  endtask

  function automatic logic [7:0] sample(int kind);
    int g;
    case (kind)
      0: return ($urandom_range(0, 1) == 1) ? 8'($urandom_range(0, 39)) : 8'($urandom);
      1: return 8'($urandom);
      default: begin
        // sum of 4 uniforms on 0..16: mean 32 - 12 = 20, sigma about 9.8
        g = 0;
        for (int k = 0; k < 4; k++) g += $urandom_range(0, 16);
        g -= 12;
        if (g < 0) g = 0;
        return 8'(g);
      end
    endcase
  endfunction

  task automatic run_event(int n, int kind);
    byte_q_t s0, s1, d0, d1;
    word_q_t w0, w1;
    logic [15:0] p[$];
    int evn, nd;
    bit ok;
    send_trigger();
    for (int i = 0; i < n; i++) begin
      ch_data[0] = sample(kind); ch_data[1] = sample(kind);
      s0.push_back(ch_data[0]); s1.push_back(ch_data[1]);
      in_valid = 1; in_last = (i == n - 1);
      @(negedge clk);
      while (!in_ready) begin n_stall++; @(negedge clk); end
      @(posedge clk); #1;
    end
    in_valid = 0; in_last = 0;
    wait (packets.size() > 0);
    p = packets.pop_front();
    evn = n_ev % 4096;
    if (n_ev > 0 && evn == 0) n_wrap++;
    ok = (p.size() >= 5) && (p.size() % 2 == 1);
    for (int k = 0; k < 3 && ok; k++)
      if (p[k] != {1'b1, 3'(evn), trig[k]}) ok = 0;
    if (ok && (p[p.size()-2] != {4'hF, 12'(evn)} || p[p.size()-1] != {4'hF, ~12'(evn)})) ok = 0;
    nd = p.size() - 5;
    for (int i = 0; i < nd && ok; i++) begin
      if (p[3+i] == DUMMY_WORD) continue;
      if (p[3+i][15]) ok = 0;
      else if (i % 2 == 0) w0.push_back(p[3+i][14:0]);
      else w1.push_back(p[3+i][14:0]);
    end
    check(ok, $sformatf("event %0d packet format", n_ev));
    check(decode_words(w0, n, d0) && d0 == s0, $sformatf("event %0d channel 0", n_ev));
    check(decode_words(w1, n, d1) && d1 == s1, $sformatf("event %0d channel 1", n_ev));
    n_ev++;
  endtask

  initial begin
    longint t0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) jclock(1, 0);
    jclock(0, 0);
    command(CM_RESET_PIPE);
    command(CM_RUN);

    t0 = cycles;
    run_event(1024, 0);
    run_event(1024, 0);
    $display("two 1k-word events: %0d clocks", cycles - t0);

    t0 = cycles; n_stall = 0;
    run_event(LONG_EVENT, 1);
    $display("48k-word random event: %0d clocks, %0d input stalls", cycles - t0, n_stall);
    check(n_stall > 0, "random data must stall the input");

    t0 = cycles; n_stall = 0;
    run_event(LONG_EVENT, 2);
    $display("48k-word gaussian event: %0d clocks, %0d input stalls", cycles - t0, n_stall);

    t0 = cycles;
    for (int e = 0; e < CHAIN_EVENTS; e++) run_event($urandom_range(1, 8), 0);
    $display("%0d short events: %0d clocks, event counter wrapped %0d times",
             CHAIN_EVENTS, cycles - t0, n_wrap);
    check(n_wrap >= 20, "event counter wrap");
    check(!error, "no error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
