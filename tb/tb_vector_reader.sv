// tb_vector_reader: self-checking test of a vector port reader.
// SRAM banks are behavioural models filled with an address-derived pattern
// (bank * 2^24 + offset). The grant line and the consumer's ready are driven
// at random; every delivered word is compared with the pattern at the address
// it must come from. Also checked: continuation from scratchpad bank 1 into
// bank 2, restart in the middle of a vector, and that with no stalls n words
// leave the port within n + 3 clocks of the start pulse.
module tb_vector_reader;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start;
  vloc_t      loc;
  vlen_t      len;
  agent_req_t req;
  logic       gnt, rvalid;
  word_t      rdata;
  logic       s_valid, s_ready, idle;
  word_t      s_data;

  vector_reader dut (.clk, .rst_n, .start, .loc, .len, .req, .gnt, .rvalid, .rdata,
                     .s_valid, .s_data, .s_ready, .idle);

  // bank models: the pattern is computed, not stored
  bit    rnd_gnt;
  bank_t rbank;
  waddr_t raddr;
  assign gnt = req.en && (!rnd_gnt || ($urandom % 3 != 0));
  always_ff @(posedge clk) begin
    rvalid <= req.en && gnt;
    rbank  <= req.bank;
    raddr  <= req.addr;
  end
  assign rdata = {6'(rbank), 7'd0, raddr};

  function automatic word_t pat(bank_t b, waddr_t a);
    return {6'(b), 7'd0, a};
  endfunction

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bank_t b, waddr_t off, int n, bit rnd, int abort_after, output int cyc);
    int got = 0;
    bank_t  eb = b;
    waddr_t ea = off;
    rnd_gnt = rnd;
    @(negedge clk);
    start = 1'b1; loc = '{bank: b, offset: off}; len = vlen_t'(n);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (got < n && cyc < 20 * n + 20 && !(abort_after >= 0 && got == abort_after)) begin
      s_ready = !rnd || ($urandom % 4 != 0);
      #1;
      @(posedge clk);
      if (s_valid && s_ready) begin
        checks++;
        if (s_data !== pat(eb, ea)) begin
          failures++;
          $display("word %0d: got %h want %h", got, s_data, pat(eb, ea));
        end
        got++;
        if (&ea && eb == BANK_SP0) eb = BANK_SP1;
        ea++;
      end
      @(negedge clk);
      cyc++;
    end
    s_ready = 1'b0;
    if (abort_after < 0) begin
      checks++;
      if (got != n) begin failures++; $display("only %0d of %0d words", got, n); end
      repeat (3) @(negedge clk);
      checks++;
      if (!idle || s_valid) begin failures++; $display("not idle after the vector"); end
    end
  endtask

  initial begin
    int cyc;
    start = 1'b0; loc = '0; len = '0; s_ready = 1'b0; rnd_gnt = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(BANK_INQ, 19'd1032, 50, 1'b1, -1, cyc);
    run(BANK_SP0, 19'h7FFF8, 20, 1'b1, -1, cyc);   // crosses into bank 2
    run(BANK_SP1, 19'h00100, 30, 1'b1, 7, cyc);    // abandoned after 7 words
    run(BANK_OUTQ, 19'd5, 40, 1'b1, -1, cyc);      // restart must forget the rest
    run(BANK_SP1, 19'h00200, 64, 1'b0, -1, cyc);
    checks++;
    if (cyc > 64 + 3) begin failures++; $display("64 words took %0d clocks", cyc); end
    run(BANK_SP0, 19'h0, 0, 1'b0, -1, cyc);        // empty vector
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
