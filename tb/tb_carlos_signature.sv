// tb_carlos_signature: feeds random word streams into the signature register
// and compares with a separately written model; checks done/pass at finish,
// first with EXPECTED set to the model's signature of a fixed stream, then
// with one word of that stream changed.
module tb_carlos_signature;
  import carlos_pkg::*;
  localparam logic [15:0] EXP = 16'h3C5A;

  logic clk = 0, rst = 1, clear = 0, en = 0, finish = 0;
  logic [15:0] word = 0, sig;
  logic done, pass;
  int checks = 0, failures = 0;
  logic [15:0] model;

  carlos_signature #(.EXPECTED(EXP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] misr(logic [15:0] s, logic [15:0] w);
    logic fb;
    fb = s[15] ^ s[13] ^ s[12] ^ s[10];
    return {s[14:0], fb} ^ w;
  endfunction

  // a stream whose signature is EXP: 200 random words, then one word chosen
  // so that the register ends at EXP
  logic [15:0] stream[$];

  task automatic run(bit corrupt, output bit p, output bit d);
    clear = 1; @(posedge clk); #1 clear = 0;
    model = 0;
    foreach (stream[i]) begin
      en = 1; word = stream[i];
      if (corrupt && i == 57) word = word ^ 16'h0100;
      model = misr(model, word);
      finish = (i == stream.size() - 1);
      @(posedge clk); #1;
      checks++;
      if (sig != model) begin failures++; $display("word %0d sig %h want %h", i, sig, model); end
    end
    en = 0; finish = 0;
    p = pass; d = done;
  endtask

  initial begin
    bit p, d;
    logic [15:0] s;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    s = 0;
    for (int i = 0; i < 200; i++) begin
      stream.push_back(16'($urandom));
      s = misr(s, stream[i]);
    end
    stream.push_back({s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]} ^ EXP);
    run(0, p, d);
    checks++;
    if (!(p && d)) begin failures++; $display("good stream not passed"); end
    run(1, p, d);
    checks++;
    if (!(d && !p)) begin failures++; $display("corrupted stream passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
