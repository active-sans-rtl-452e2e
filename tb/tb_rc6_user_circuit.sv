// tb_rc6_user_circuit: self-checking test of the RC6 user circuit.
// Checks the two published RC6-32/20/16 test vectors (all-zero key and
// plaintext; key 0123456789abcdef0112233445566778), then random round counts
// (0..40 and the maximum 1024), random key lengths (0..40 bytes and the
// maximum 1024, with junk in the unused bytes of the last key word) and 0..4
// blocks, encrypting and decrypting, against an RC6 model in this testbench.
// Every ciphertext is also decrypted back. Port valid/ready signals stall at
// random. Out-of-range sub-operator, round count, key length and a B vector
// shorter than the key must give an empty result.
module tb_rc6_user_circuit;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ckt_in_t  ci;
  ckt_out_t co;
  rc6_user_circuit dut (.clk, .rst_n, .ci, .co);

  int checks = 0, failures = 0;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic word_t rl(word_t x, int n);
    n = n % 32;
    return n == 0 ? x : (x << n) | (x >> (32 - n));
  endfunction
  function automatic word_t rr(word_t x, int n);
    return rl(x, 32 - n % 32);
  endfunction

  // reference: key schedule then each block
  function automatic void rc6_ref(bit dec, int r, byte unsigned key [$], word_t din [$],
                                  output word_t dout [$]);
    word_t s [], l [], a, b, c, d, t, u, tmp;
    int nc, ns, i, j;
    nc = (key.size() + 3) / 4;
    if (nc == 0) nc = 1;
    l = new[nc];
    foreach (l[k]) l[k] = 0;
    foreach (key[k]) l[k / 4] |= word_t'(key[k]) << (8 * (k % 4));
    ns = 2 * r + 4;
    s = new[ns];
    s[0] = 32'hB7E15163;
    for (int k = 1; k < ns; k++) s[k] = s[k - 1] + 32'h9E3779B9;
    a = 0; b = 0; i = 0; j = 0;
    for (int k = 0; k < 3 * (ns > nc ? ns : nc); k++) begin
      a = rl(s[i] + a + b, 3); s[i] = a;
      b = rl(l[j] + a + b, int'((a + b) & 31)); l[j] = b;
      i = (i + 1) % ns; j = (j + 1) % nc;
    end
    dout = {};
    for (int blk = 0; blk + 4 <= din.size(); blk += 4) begin
      a = din[blk]; b = din[blk + 1]; c = din[blk + 2]; d = din[blk + 3];
      if (!dec) begin
        b += s[0]; d += s[1];
        for (int q = 1; q <= r; q++) begin
          t = rl(b * (2 * b + 1), 5); u = rl(d * (2 * d + 1), 5);
          a = rl(a ^ t, int'(u & 31)) + s[2 * q];
          c = rl(c ^ u, int'(t & 31)) + s[2 * q + 1];
          tmp = a; a = b; b = c; c = d; d = tmp;
        end
        a += s[2 * r + 2]; c += s[2 * r + 3];
      end else begin
        c -= s[2 * r + 3]; a -= s[2 * r + 2];
        for (int q = r; q >= 1; q--) begin
          tmp = d; d = c; c = b; b = a; a = tmp;
          u = rl(d * (2 * d + 1), 5); t = rl(b * (2 * b + 1), 5);
          c = rr(c - s[2 * q + 1], int'(t & 31)) ^ u;
          a = rr(a - s[2 * q], int'(u & 31)) ^ t;
        end
        d -= s[1]; b -= s[0];
      end
      dout.push_back(a); dout.push_back(b); dout.push_back(c); dout.push_back(d);
    end
  endfunction

  int stall_pct = 0;

  task automatic run(subop_t op, word_t bv [$], word_t av [$], output word_t got [$]);
    int ai = 0, bi = 0, t = 0;
    got = {};
    @(negedge clk);
    ci = '0;
    ci.start = 1'b1; ci.subop = op; ci.a_len = vlen_t'(av.size()); ci.b_len = vlen_t'(bv.size());
    @(negedge clk);
    ci.start = 1'b0;
    while (!co.done && t < 100000) begin
      ci.a_valid = ai < av.size() && ($urandom_range(99) >= stall_pct);
      ci.a_data  = ci.a_valid ? av[ai] : 32'hx;
      ci.b_valid = bi < bv.size() && ($urandom_range(99) >= stall_pct);
      ci.b_data  = ci.b_valid ? bv[bi] : 32'hx;
      ci.c_ready = $urandom_range(99) >= stall_pct;
      @(posedge clk);
      if (ci.a_valid && co.a_ready) ai++;
      if (ci.b_valid && co.b_ready) bi++;
      if (co.c_valid && ci.c_ready) got.push_back(co.c_data);
      @(negedge clk);
      t++;
    end
    ci = '0;
    check(co.done, "done reached");
  endtask

  // B vector for a key; junk fills the bytes past the key length
  function automatic void key_vec(int r, byte unsigned key [$], output word_t bv [$]);
    word_t w;
    bv = {word_t'(r), word_t'(key.size())};
    for (int k = 0; k < key.size(); k += 4) begin
      w = $urandom;
      for (int m = 0; m < 4 && k + m < key.size(); m++) w[8 * m +: 8] = key[k + m];
      bv.push_back(w);
    end
  endfunction

  function automatic void bytes_words(byte unsigned by [$], output word_t w [$]);
    w = {};
    for (int k = 0; k < by.size(); k += 4)
      w.push_back({by[k + 3], by[k + 2], by[k + 1], by[k]});
  endfunction

  task automatic compare(word_t got [$], word_t want [$], string what);
    check(got.size() == want.size(), $sformatf("%s: %0d words, want %0d", what, got.size(), want.size()));
    foreach (want[k])
      if (k < got.size())
        check(got[k] == want[k], $sformatf("%s: word %0d %h want %h", what, k, got[k], want[k]));
  endtask

  task automatic one_case(int r, byte unsigned key [$], word_t pt [$], string what);
    word_t bv [$], ct [$], want [$], back [$];
    key_vec(r, key, bv);
    rc6_ref(1'b0, r, key, pt, want);
    run(8'h00, bv, pt, ct);
    compare(ct, want, {what, " encrypt"});
    ct = want;
    for (int k = pt.size() & ~3; k < pt.size(); k++) ct.push_back(32'h0);  // a partial block is ignored
    run(8'h01, bv, ct, back);
    want = pt[0 : (pt.size() & ~3) - 1];
    if ((pt.size() & ~3) == 0) want = {};
    compare(back, want, {what, " decrypt"});
  endtask

  initial begin
    byte unsigned key [$], by [$];
    word_t pt [$], want [$], got [$], bv [$];
    ci = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // published vectors, RC6-32/20/16
    key = {}; repeat (16) key.push_back(8'h00);
    pt = {0, 0, 0, 0};
    by = {8'h8f, 8'hc3, 8'ha5, 8'h36, 8'h56, 8'hb1, 8'hf7, 8'h78,
          8'hc1, 8'h29, 8'hdf, 8'h4e, 8'h98, 8'h48, 8'ha4, 8'h1e};
    bytes_words(by, want);
    key_vec(20, key, bv);
    run(8'h00, bv, pt, got);
    compare(got, want, "zero key vector");
    rc6_ref(1'b0, 20, key, pt, got);
    compare(got, want, "model on zero key vector");

    key = {8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
           8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    by = {8'h02, 8'h13, 8'h24, 8'h35, 8'h46, 8'h57, 8'h68, 8'h79,
          8'h8a, 8'h9b, 8'hac, 8'hbd, 8'hce, 8'hdf, 8'he0, 8'hf1};
    bytes_words(by, pt);
    by = {8'h52, 8'h4e, 8'h19, 8'h2f, 8'h47, 8'h15, 8'hc6, 8'h23,
          8'h1f, 8'h51, 8'hf6, 8'h36, 8'h7e, 8'ha4, 8'h3f, 8'h18};
    bytes_words(by, want);
    key_vec(20, key, bv);
    run(8'h00, bv, pt, got);
    compare(got, want, "second vector");
    run(8'h01, bv, want, got);
    compare(got, pt, "second vector decrypt");

    // random cases
    for (int n = 0; n < 40; n++) begin
      int r, kb, nw;
      stall_pct = (n % 3) * 30;
      r  = (n < 4) ? n : $urandom_range(40);
      kb = (n < 8) ? n : $urandom_range(40);
      nw = $urandom_range(18);
      key = {}; repeat (kb) key.push_back(8'($urandom));
      pt = {};  repeat (nw) pt.push_back($urandom);
      one_case(r, key, pt, $sformatf("r=%0d b=%0d words=%0d", r, kb, nw));
    end

    // the largest round count and key length
    stall_pct = 20;
    key = {}; repeat (1024) key.push_back(8'($urandom));
    pt = {}; repeat (8) pt.push_back($urandom);
    one_case(1024, key, pt, "r=1024 b=1024");
    stall_pct = 0;

    // out of range: empty results
    key = {}; repeat (16) key.push_back(8'h11);
    pt = {1, 2, 3, 4};
    key_vec(20, key, bv);
    run(8'h02, bv, pt, got);
    check(got.size() == 0, "bad sub-operator");
    key_vec(1025, key, bv);
    run(8'h00, bv, pt, got);
    check(got.size() == 0, "too many rounds");
    bv = {20, 1025}; repeat (257) bv.push_back(0);
    run(8'h00, bv, pt, got);
    check(got.size() == 0, "key too long");
    key_vec(20, key, bv);
    void'(bv.pop_back());
    run(8'h00, bv, pt, got);
    check(got.size() == 0, "B vector shorter than the key");
    // still fine afterwards
    one_case(12, key, pt, "after the bad cases");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
