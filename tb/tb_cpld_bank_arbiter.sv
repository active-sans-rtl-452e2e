// tb_cpld_bank_arbiter: self-checking test of the card's bank arbitration
// and switching. Directed cases check earliest-request ownership, exclusive
// holding until release, hand-over to a waiting request, the tie rule and the
// one-clock grant delay; a random phase checks on every clock that no bank is
// granted to both sides, that a grant is only held while requested, that
// every request is served within a bound, and that each bank port carries
// exactly its owner's access.
module tb_cpld_bank_arbiter;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NBANKS-1:0] fpga_req, fpga_gnt, host_req, host_gnt;
  sram_req_t fpga_mem [NBANKS], host_mem [NBANKS], bank_mem [NBANKS];

  cpld_bank_arbiter dut (.clk, .rst_n, .fpga_req, .fpga_gnt, .fpga_mem,
                         .host_req, .host_gnt, .host_mem, .bank_mem);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic check_switch();
    for (int b = 0; b < NBANKS; b++) begin
      if (fpga_gnt[b])      check(bank_mem[b] == fpga_mem[b], "bank carries FPGA access");
      else if (host_gnt[b]) check(bank_mem[b] == host_mem[b], "bank carries host access");
      else                  check(!bank_mem[b].en, "free bank idle");
    end
  endtask

  initial begin
    int wait_f [NBANKS], wait_h [NBANKS];
    fpga_req = '0; host_req = '0;
    for (int b = 0; b < NBANKS; b++) begin
      fpga_mem[b] = '{en: 1'b1, we: 1'b1, addr: waddr_t'(b), wdata: 32'hF0 + b};
      host_mem[b] = '{en: 1'b1, we: 1'b0, addr: waddr_t'(b + 8), wdata: 32'hA0 + b};
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(fpga_gnt == 0 && host_gnt == 0, "nothing owned after reset");
    check_switch();
    // FPGA asks first for bank 0, host a clock later
    fpga_req[0] = 1'b1;
    #1 check(!fpga_gnt[0], "grant is registered");
    @(negedge clk);
    check(fpga_gnt[0], "free bank granted one clock later");
    host_req[0] = 1'b1;
    repeat (5) @(negedge clk);
    check(fpga_gnt[0] && !host_gnt[0], "owner keeps the bank");
    check_switch();
    fpga_req[0] = 1'b0;
    @(negedge clk);
    check(!fpga_gnt[0] && host_gnt[0], "waiting host takes over on release");
    check_switch();
    fpga_req[0] = 1'b1;
    repeat (3) @(negedge clk);
    check(host_gnt[0] && !fpga_gnt[0], "host keeps the bank");
    host_req[0] = 1'b0;
    @(negedge clk);
    check(fpga_gnt[0], "FPGA takes over on host release");
    fpga_req[0] = 1'b0;
    @(negedge clk);
    check(!fpga_gnt[0] && !host_gnt[0], "bank free again");
    // host first on bank 3
    host_req[3] = 1'b1;
    @(negedge clk);
    fpga_req[3] = 1'b1;
    @(negedge clk);
    check(host_gnt[3] && !fpga_gnt[3], "earliest request (host) wins");
    host_req[3] = 1'b0; fpga_req[3] = 1'b0;
    repeat (2) @(negedge clk);
    // same clock on bank 2
    host_req[2] = 1'b1; fpga_req[2] = 1'b1;
    @(negedge clk);
    check(fpga_gnt[2] && !host_gnt[2], "tie goes to the FPGA");
    check_switch();
    host_req = '0; fpga_req = '0;
    repeat (2) @(negedge clk);

    // random phase
    for (int b = 0; b < NBANKS; b++) begin wait_f[b] = 0; wait_h[b] = 0; end
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int b = 0; b < NBANKS; b++) begin
        if (fpga_req[b] && fpga_gnt[b] && ($urandom % 6 == 0)) fpga_req[b] = 1'b0;
        else if (!fpga_req[b] && ($urandom % 5 == 0))          fpga_req[b] = 1'b1;
        if (host_req[b] && host_gnt[b] && ($urandom % 6 == 0)) host_req[b] = 1'b0;
        else if (!host_req[b] && ($urandom % 5 == 0))          host_req[b] = 1'b1;
        fpga_mem[b].wdata = $urandom; host_mem[b].wdata = $urandom;
      end
      @(negedge clk);
      for (int b = 0; b < NBANKS; b++) begin
        check(!(fpga_gnt[b] && host_gnt[b]), "exclusive ownership");
        wait_f[b] = (fpga_req[b] && !fpga_gnt[b]) ? wait_f[b] + 1 : 0;
        wait_h[b] = (host_req[b] && !host_gnt[b]) ? wait_h[b] + 1 : 0;
        check(wait_f[b] < 200 && wait_h[b] < 200, "request served");
      end
      check_switch();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
