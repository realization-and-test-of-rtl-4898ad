// carlos_tb_pkg: reference functions shared by the CARLOS testbenches.
//
// ref_encode gives the expected variable-length code of a sample from the code
// table (4, 7 or 10 bits). decode_words is the inverse of a channel: it takes
// the 15-bit words of one event, reads their bits MSB first and parses prefix
// codes until n samples are recovered. Both are written from the code table,
// not from the RTL.
package carlos_tb_pkg;

  typedef logic [7:0]  byte_q_t[$];
  typedef logic [14:0] word_q_t[$];

  function automatic void ref_encode(input logic [7:0] v, output logic [9:0] code,
                                     output int len);
    if (v <= 7) begin
      len = 4;  code = 10'(v);                      // 0vvv
    end else if (v <= 39) begin
      len = 7;  code = 10'(7'b1000000 + (v - 8));   // 10 + 5 bits
    end else begin
      len = 10; code = 10'(10'b1100000000 + v);     // 11 + 8 bits
    end
  endfunction

  // returns 1 when the words decode to exactly n samples, padding being zeros
  function automatic bit decode_words(input word_q_t words, input int n,
                                      output byte_q_t samples);
    bit bits[$];
    int pos;
    samples = {};
    foreach (words[i])
      for (int b = 14; b >= 0; b--) bits.push_back(words[i][b]);
    pos = 0;
    while (samples.size() < n) begin
      int v;
      if (pos >= bits.size()) return 0;
      if (bits[pos] == 0) begin
        if (pos + 4 > bits.size()) return 0;
        v = 0;
        for (int k = 1; k < 4; k++) v = v * 2 + bits[pos+k];
        pos += 4;
      end else if (bits[pos+1] == 0) begin
        if (pos + 7 > bits.size()) return 0;
        v = 0;
        for (int k = 2; k < 7; k++) v = v * 2 + bits[pos+k];
        v += 8;
        pos += 7;
      end else begin
        if (pos + 10 > bits.size()) return 0;
        v = 0;
        for (int k = 2; k < 10; k++) v = v * 2 + bits[pos+k];
        pos += 10;
      end
      samples.push_back(8'(v));
    end
    // the rest must be zero padding inside the last word
    if (bits.size() - pos >= 15) return 0;
    for (int k = pos; k < bits.size(); k++) if (bits[k] != 0) return 0;
    return 1;
  endfunction

endpackage
