// tb_user_area: self-checking test of circuit selection in the user area.
// Runs the same sub-operator code through the built-in circuit (identifier 0)
// and the ALU core (identifier 1), where it means different operations, and
// checks each result; runs the MD5 core (identifier 3) on an empty message
// and checks its digest; gives the RC6 core (identifier 2) a bad sub-operator
// and checks that its done comes back; runs the DES core (identifier 4) on
// the textbook vector; checks that an absent identifier
// returns nothing, and the presence lookup used for function faults.
module tb_user_area;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cid_t     sel_cid, query_cid;
  logic     query_present;
  ckt_in_t  ci;
  ckt_out_t co;
  user_area dut (.clk, .rst_n, .sel_cid, .ci, .co, .query_cid, .query_present);

  int checks = 0, failures = 0;
  bit des_vec = 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run `n` elements of A = i+10, B = 3 through circuit `cid` with sub-op `op`
  task automatic run(cid_t cid, subop_t op, int n, output word_t res [8], output int got,
                     output bit done);
    int ai = 0, bi = 0, k = 0;
    got = 0;
    sel_cid = cid;
    @(negedge clk);
    ci = '0; ci.start = 1'b1; ci.subop = op; ci.a_len = vlen_t'(n); ci.b_len = vlen_t'(n);
    @(negedge clk);
    ci.start = 1'b0;
    for (k = 0; k < 3 * n + 100; k++) begin
      ci.a_valid = ai < n; ci.a_data = word_t'(ai + 10);
      ci.b_valid = ai < n; ci.b_data = 32'd3;
      if (des_vec) begin
        // DES: the textbook key on B, its plaintext block on A
        ci.a_data = (ai == 0) ? 32'h01234567 : 32'h89ABCDEF;
        ci.b_valid = bi < 2;
        ci.b_data = (bi == 0) ? 32'h13345779 : 32'h9BBCDFF1;
      end
      ci.c_ready = 1'b1;
      #1;
      @(posedge clk);
      if (co.c_valid) begin
        res[got] = co.c_data;
        got++;
      end
      if (co.a_ready) ai++;
      if (co.b_ready && ci.b_valid) bi++;
      @(negedge clk);
    end
    done = co.done;
    ci = '0;
  endtask

  initial begin
    word_t r [8];
    int got;
    bit done;
    ci = '0; sel_cid = '0; query_cid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // sub-op 2: built-in = add, ALU core = multiply
    run(CID_BUILTIN, 8'd2, 6, r, got, done);
    check(got == 6, "built-in produced 6 words");
    for (int i = 0; i < 6; i++) check(r[i] == word_t'(i + 13), "built-in add");
    run(CID_ALU, 8'd2, 6, r, got, done);
    check(got == 6, "ALU core produced 6 words");
    for (int i = 0; i < 6; i++) check(r[i] == word_t'(3 * (i + 10)), "ALU core multiply");
    run(CID_MD5, 8'd0, 0, r, got, done);
    check(got == 4 && done, "MD5 core produced 4 words");
    check(r[0] == 32'hd98c1dd4 && r[3] == 32'h7e42f8ec, "MD5 of the empty message");
    run(CID_RC6, 8'd9, 4, r, got, done);
    check(got == 0 && done, "RC6 core answers a bad sub-operator with done only");
    des_vec = 1'b1;
    run(CID_DES, 8'd0, 2, r, got, done);
    des_vec = 1'b0;
    check(got == 2 && done && r[0] == 32'h85E81354 && r[1] == 32'h0F0AB405, "DES textbook vector");
    run(8'h05, 8'd2, 4, r, got, done);
    check(got == 0 && !done, "absent circuit produces nothing");
    check(!co.done && !co.a_ready, "absent circuit is idle");
    for (int q = 0; q < 256; q++) begin
      query_cid = cid_t'(q);
      #1;
      check(query_present == (q <= 4), "presence lookup");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
