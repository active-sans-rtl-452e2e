// tb_builtin_circuit: self-checking test of the built-in circuit.
// Streams random vectors through every sub-operator with random gaps on the
// A/B valid and C ready signals and compares each output word with a result
// computed here. A full-rate run checks the one-clock latency and the
// one-element-per-clock throughput; an unknown code must give no output.
module tb_builtin_circuit;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ckt_in_t  ci;
  ckt_out_t co;
  builtin_circuit dut (.clk, .rst_n, .ci, .co);

  int checks = 0, failures = 0;
  word_t A [64], B [64];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_op(int op, word_t a, word_t b);
    case (op)
      0: return a;
      1: return b;
      2: return a + b;
      3: return word_t'(longint'(a) * longint'(b));
      4: return a & b;
      5: return a | b;
      6: return a ^ b;
      7: return (int'(a) < int'(b)) ? a : b;
      8: return (int'(a) > int'(b)) ? a : b;
      default: return '0;
    endcase
  endfunction

  // run one operation; gaps = 1 inserts random stalls on every handshake
  task automatic run(int op, int alen, int blen, bit gaps, output int cycles);
    int ai = 0, bi = 0, ci_n = 0, expn, t0;
    expn = (op == 0) ? alen : (op == 1) ? blen : (alen < blen ? alen : blen);
    if (op > 8) expn = 0;
    @(negedge clk);
    ci = '0;
    ci.start = 1'b1; ci.subop = subop_t'(op); ci.a_len = vlen_t'(alen); ci.b_len = vlen_t'(blen);
    @(negedge clk);
    ci.start = 1'b0;
    t0 = $time;
    cycles = 0;
    while (!(co.done && ci_n == expn) && cycles < 2000) begin
      ci.a_valid = (ai < alen) && (!gaps || ($urandom % 3 != 0));
      ci.a_data  = A[ai % 64];
      ci.b_valid = (bi < blen) && (!gaps || ($urandom % 3 != 0));
      ci.b_data  = B[bi % 64];
      ci.c_ready = !gaps || ($urandom % 4 != 0);
      #1;
      @(posedge clk);
      if (co.c_valid && ci.c_ready) begin
        checks++;
        if (co.c_data !== ref_op(op, A[ci_n], B[ci_n])) begin
          failures++;
          $display("op %0d word %0d: got %h want %h", op, ci_n, co.c_data, ref_op(op, A[ci_n], B[ci_n]));
        end
        ci_n++;
      end
      if (ci.a_valid && co.a_ready) ai++;
      if (ci.b_valid && co.b_ready) bi++;
      @(negedge clk);
      cycles++;
    end
    ci = '0;
    checks++;
    if (ci_n != expn) begin
      failures++;
      $display("op %0d: %0d outputs, want %0d", op, ci_n, expn);
    end
  endtask

  initial begin
    int cyc;
    ci = '0;
    for (int i = 0; i < 64; i++) begin
      A[i] = $urandom;
      B[i] = (i % 5 == 0) ? A[i] : $urandom;
    end
    A[3] = 32'h8000_0000; B[3] = 32'h7fff_ffff;   // signed extremes for min/max
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op <= 8; op++) begin
      run(op, 40, 37, 1'b1, cyc);
      run(op, 20, 30, 1'b0, cyc);
    end
    // full rate: n results in n+1 clocks (one-clock latency)
    run(2, 32, 32, 1'b0, cyc);
    checks++;
    if (cyc != 33) begin
      failures++;
      $display("full-rate run took %0d clocks, want 33", cyc);
    end
    // unknown sub-operator: empty result
    run(9, 8, 8, 1'b0, cyc);
    run(8'h12, 8, 8, 1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
