// tb_des_user_circuit: self-checking test of the DES user circuit.
// Checks the textbook vector (key 133457799BBCDFF1, plaintext
// 0123456789ABCDEF, ciphertext 85E813540F0AB405) and key 0E329232EA6D0D73
// taking 8787878787878787 to zero, both ways; eight further vectors made
// with a separate DES model; and, on random keys and data, three properties
// of DES that hold whatever its tables: decryption undoes encryption, the
// complement property E(~k, ~p) = ~E(k, p), and that encrypting twice with
// the weak key 0101010101010101 gives the plaintext back. Messages carry
// 0..5 blocks with random stalls on every port; an odd trailing word is
// ignored. A bad sub-operator or a short key vector gives an empty result.
module tb_des_user_circuit;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ckt_in_t  ci;
  ckt_out_t co;
  des_user_circuit dut (.clk, .rst_n, .ci, .co);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  typedef logic [63:0] blk_t;
  localparam blk_t VEC [8][3] = '{   // key, plaintext, ciphertext
    '{64'hf2a74de452e6b438, 64'h6513270e269e0d37, 64'h391bbccb4492fc51},
    '{64'h0c5c7fd0a6a3a450, 64'hd23f0824128b2f33, 64'h57a4490e488dd87a},
    '{64'h1818e811892f902b, 64'h9531985d5d9dc9f8, 64'h1c83b420f9b5ac73},
    '{64'he8e25d940ed90475, 64'h36f675cc81e74ef5, 64'h39cee5c11cdb1c39},
    '{64'h1600a35a099950d8, 64'h6b0d549b6f03675a, 64'h2850d47958dfd9ec},
    '{64'h3d9c172411e20b8f, 64'h8d116ece1738f7d9, 64'h62ce54688eeb83ca},
    '{64'h0f21ddb66cad4a26, 64'h90c192cfd3ac94af, 64'hd27e0cb82efff308},
    '{64'hf28c105d1fb17c23, 64'ha170b33839263059, 64'hd90560ea56fa3dcf}};

  int stall_pct = 0;

  task automatic run(subop_t op, word_t bv [$], word_t av [$], output word_t got [$]);
    int ai = 0, bi = 0, t = 0;
    got = {};
    @(negedge clk);
    ci = '0;
    ci.start = 1'b1; ci.subop = op; ci.a_len = vlen_t'(av.size()); ci.b_len = vlen_t'(bv.size());
    @(negedge clk);
    ci.start = 1'b0;
    while (!co.done && t < 20000) begin
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

  // blocks through the circuit
  task automatic crypt(bit dec, blk_t k, blk_t din [$], bit odd, output blk_t dout [$]);
    word_t av [$], bv [$], got [$];
    bv = {k[63:32], k[31:0]};
    av = {};
    foreach (din[i]) begin av.push_back(din[i][63:32]); av.push_back(din[i][31:0]); end
    if (odd) av.push_back($urandom);
    run(dec ? 8'h01 : 8'h00, bv, av, got);
    check(got.size() == 2 * din.size(), $sformatf("%0d words out, want %0d", got.size(), 2 * din.size()));
    dout = {};
    for (int i = 0; i + 1 < got.size(); i += 2) dout.push_back({got[i], got[i + 1]});
  endtask

  task automatic one(bit dec, blk_t k, blk_t p, blk_t want, string what);
    blk_t din [$], dout [$];
    din = {p};
    crypt(dec, k, din, 1'b0, dout);
    check(dout.size() == 1 && dout[0] == want, $sformatf("%s: %h want %h", what, dout[0], want));
  endtask

  initial begin
    blk_t k, din [$], c1 [$], c2 [$], back [$];
    word_t got [$];
    ci = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    one(0, 64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405, "textbook encrypt");
    one(1, 64'h133457799BBCDFF1, 64'h85E813540F0AB405, 64'h0123456789ABCDEF, "textbook decrypt");
    one(0, 64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0, "zero ciphertext");
    one(1, 64'h0E329232EA6D0D73, 64'h0, 64'h8787878787878787, "zero ciphertext decrypt");
    for (int i = 0; i < 8; i++) begin
      one(0, VEC[i][0], VEC[i][1], VEC[i][2], $sformatf("vector %0d encrypt", i));
      one(1, VEC[i][0], VEC[i][2], VEC[i][1], $sformatf("vector %0d decrypt", i));
    end

    for (int n = 0; n < 30; n++) begin
      int nb;
      stall_pct = (n % 3) * 30;
      k = {$urandom, $urandom};
      nb = $urandom_range(5);
      din = {};
      repeat (nb) din.push_back({$urandom, $urandom});
      crypt(0, k, din, 1'(n % 2), c1);
      crypt(1, k, c1, 1'b0, back);
      check(back == din, $sformatf("round trip of %0d blocks", nb));
      foreach (din[i]) din[i] = ~din[i];
      crypt(0, ~k, din, 1'b0, c2);
      foreach (c1[i]) check(i < c2.size() && c2[i] == ~c1[i], "complement property");
      crypt(0, 64'h0101010101010101, din, 1'b0, c1);
      crypt(0, 64'h0101010101010101, c1, 1'b0, back);
      check(back == din, "weak key: encrypting twice is the identity");
    end
    stall_pct = 0;

    run(8'h02, '{32'h1, 32'h2}, '{32'h3, 32'h4}, got);
    check(got.size() == 0, "bad sub-operator");
    run(8'h00, '{32'h1}, '{32'h3, 32'h4}, got);
    check(got.size() == 0, "key vector too short");
    one(0, 64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405, "after the bad cases");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
