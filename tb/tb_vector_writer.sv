// tb_vector_writer: self-checking test of the port C writer.
// A producer pushes numbered words with random gaps while the grant line
// stalls at random; every granted write is compared with the address and data
// it must carry, including the continuation from scratchpad bank 1 into bank
// 2. With no stalls, n words must be written within n + 2 clocks.
module tb_vector_writer;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start;
  vloc_t      loc;
  logic       s_valid, s_ready, gnt, idle;
  word_t      s_data;
  agent_req_t req;
  vlen_t      written;

  vector_writer dut (.clk, .rst_n, .start, .loc, .s_valid, .s_data, .s_ready,
                     .req, .gnt, .written, .idle);

  bit rnd_gnt;
  assign gnt = req.en && (!rnd_gnt || ($urandom % 3 != 0));

  int checks = 0, failures = 0;
  int wr_seen;
  bank_t  eb;
  waddr_t ea;
  word_t  base;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write monitor
  always @(posedge clk) if (rst_n && req.en && gnt) begin
    checks++;
    if (!req.we || req.bank != eb || req.addr != ea || req.wdata != base + word_t'(wr_seen)) begin
      failures++;
      $display("write %0d: bank %0d addr %h data %h", wr_seen, req.bank, req.addr, req.wdata);
    end
    wr_seen++;
    if (&ea && eb == BANK_SP0) eb = BANK_SP1;
    ea++;
  end

  task automatic run(bank_t b, waddr_t off, int n, bit rnd, output int cyc);
    int sent = 0;
    rnd_gnt = rnd;
    @(negedge clk);
    start = 1'b1; loc = '{bank: b, offset: off};
    eb = b; ea = off; wr_seen = 0; base = $urandom;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while ((sent < n || !idle) && cyc < 20 * n + 20) begin
      s_valid = (sent < n) && (!rnd || ($urandom % 3 != 0));
      s_data  = base + word_t'(sent);
      #1;
      @(posedge clk);
      if (s_valid && s_ready) sent++;
      @(negedge clk);
      cyc++;
    end
    s_valid = 1'b0;
    checks++;
    if (wr_seen != n || written != vlen_t'(n)) begin
      failures++;
      $display("%0d writes seen, count %0d, want %0d", wr_seen, written, n);
    end
  endtask

  initial begin
    int cyc;
    start = 1'b0; loc = '0; s_valid = 1'b0; s_data = '0; rnd_gnt = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(BANK_SP0, 19'h100, 60, 1'b1, cyc);
    run(BANK_SP0, 19'h7FFFA, 16, 1'b1, cyc);      // crosses into bank 2
    run(BANK_OUTQ, 19'd1040, 33, 1'b1, cyc);
    run(BANK_SP1, 19'h40, 64, 1'b0, cyc);
    checks++;
    if (cyc > 64 + 2) begin failures++; $display("64 words took %0d clocks", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
