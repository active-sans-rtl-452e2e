// tb_md5_user_circuit: self-checking test of the MD5 user circuit.
// Checks the published digests of "", of "The quick brown fox jumps over the
// lazy dog." (44 bytes) and of the 80-digit string from the MD5 test suite
// (two blocks, the padding in the second), then random messages of 0..70 words
// against an MD5 model in this testbench, whose round constants are a
// written-out table. A-side valid and C-side ready stall at random. Also
// checks that a non-zero sub-operator gives an empty result and that a new
// start in the middle of a digest starts over.
module tb_md5_user_circuit;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ckt_in_t  ci;
  ckt_out_t co;
  md5_user_circuit dut (.clk, .rst_n, .ci, .co);

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam logic [31:0] KT [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee, 32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be, 32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa, 32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed, 32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c, 32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05, 32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039, 32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1, 32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391};
  localparam int SH [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};

  function automatic word_t rl(word_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // reference digest of whole words
  function automatic void md5_ref(word_t msg [$], output word_t d [4]);
    word_t w [$];
    word_t h [4], a, b, c, dd, f;
    int g;
    w = msg;
    w.push_back(32'h80);
    while (w.size() % 16 != 14) w.push_back(0);
    w.push_back(word_t'(msg.size() * 32));
    w.push_back(0);
    h = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
    for (int blk = 0; blk < w.size(); blk += 16) begin
      a = h[0]; b = h[1]; c = h[2]; dd = h[3];
      for (int i = 0; i < 64; i++) begin
        if (i < 16)      begin f = (b & c) | (~b & dd); g = i; end
        else if (i < 32) begin f = (dd & b) | (~dd & c); g = (5 * i + 1) % 16; end
        else if (i < 48) begin f = b ^ c ^ dd; g = (3 * i + 5) % 16; end
        else             begin f = c ^ (b | ~dd); g = (7 * i) % 16; end
        f = f + a + KT[i] + w[blk + g];
        a = dd; dd = c; c = b;
        b = b + rl(f, SH[(i / 16) * 4 + i % 4]);
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += dd;
    end
    d = h;
  endfunction

  function automatic void str_words(string s, output word_t w [$]);
    w = {};
    for (int i = 0; i < s.len(); i += 4)
      w.push_back({s[i + 3], s[i + 2], s[i + 1], s[i]});
  endfunction

  function automatic void hex_words(string s, output word_t w [4]);
    string pair;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 4; j++) begin
        pair = s.substr(8 * k + 2 * j, 8 * k + 2 * j + 1);
        w[k][8 * j +: 8] = 8'(pair.atohex());
      end
  endfunction

  int stall_pct = 0;

  task automatic run(subop_t op, word_t msg [$], output word_t got [$], output int clocks);
    int ai = 0, t = 0;
    got = {};
    @(negedge clk);
    ci = '0;
    ci.start = 1'b1; ci.subop = op; ci.a_len = vlen_t'(msg.size()); ci.b_len = '0;
    @(negedge clk);
    ci.start = 1'b0;
    while (!co.done && t < 20000) begin
      ci.a_valid = ai < msg.size() && ($urandom_range(99) >= stall_pct);
      ci.a_data  = ci.a_valid ? msg[ai] : 32'hx;
      ci.c_ready = $urandom_range(99) >= stall_pct;
      @(posedge clk);
      if (ci.a_valid && co.a_ready) ai++;
      if (co.c_valid && ci.c_ready) got.push_back(co.c_data);
      @(negedge clk);
      t++;
    end
    ci = '0;
    clocks = t;
    check(ai == msg.size(), $sformatf("consumed %0d of %0d words", ai, msg.size()));
  endtask

  task automatic digest_check(word_t msg [$], word_t want [4], string what);
    word_t got [$];
    int clk_n;
    run(8'h00, msg, got, clk_n);
    check(got.size() == 4, {what, ": four digest words"});
    for (int k = 0; k < 4 && k < got.size(); k++)
      check(got[k] == want[k], $sformatf("%s: word %0d %h want %h", what, k, got[k], want[k]));
  endtask

  initial begin
    word_t msg [$], want [4], got [$];
    int clk_n;
    ci = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // published digests
    msg = {};
    hex_words("d41d8cd98f00b204e9800998ecf8427e", want);
    digest_check(msg, want, "empty message");
    str_words("The quick brown fox jumps over the lazy dog.", msg);
    hex_words("e4d909c290d0fb1ca068ffaddf22cbd0", want);
    digest_check(msg, want, "fox");
    str_words("12345678901234567890123456789012345678901234567890123456789012345678901234567890", msg);
    hex_words("57edf4a22be3c955ac49da2e2107b67a", want);
    digest_check(msg, want, "digits");

    // the model agrees with the published digests too
    md5_ref(msg, want);
    check(want[0] == 32'ha2f4ed57, "reference model");

    // full-rate timing: 1 block = 16 load + 64 steps + 4 out
    msg = {32'h1, 32'h2};
    run(8'h00, msg, got, clk_n);
    check(clk_n <= 16 + 64 + 4 + 2, $sformatf("one block in %0d clocks", clk_n));

    // random messages, random stalls
    for (int n = 0; n < 60; n++) begin
      int len;
      stall_pct = (n % 3) * 30;
      len = (n < 40) ? n % 20 + (n / 20) * 45 : $urandom_range(70);
      msg = {};
      repeat (len) msg.push_back($urandom);
      md5_ref(msg, want);
      digest_check(msg, want, $sformatf("random %0d words", len));
    end
    stall_pct = 0;

    // bad sub-operator: empty result, port A untouched
    msg = {};
    run(8'h01, msg, got, clk_n);
    check(got.size() == 0, "bad sub-operator gives no words");

    // restart in the middle of a digest
    @(negedge clk);
    ci = '0; ci.start = 1'b1; ci.a_len = 20'd5;
    @(negedge clk);
    ci.start = 1'b0; ci.a_valid = 1'b1; ci.a_data = 32'hdead;
    repeat (3) @(negedge clk);
    ci = '0;
    str_words("The quick brown fox jumps over the lazy dog.", msg);
    hex_words("e4d909c290d0fb1ca068ffaddf22cbd0", want);
    digest_check(msg, want, "after restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
