// tb_sram_interface: self-checking test of the FPGA-side bank router.
// Four agents issue random reads and writes to random banks and addresses
// (a small address range, so reads often hit earlier writes) while bank
// ownership changes at random. Each clock the grants are compared with the
// fixed priority controller > port C > port A > port B applied per owned
// bank, and every read's data, returned one clock later, is compared with a
// shadow copy of the memory kept here.
module tb_sram_interface;
  import asan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NBANKS-1:0] own;
  agent_req_t areq   [4];
  logic       agnt   [4];
  logic       arvalid[4];
  word_t      ardata [4];
  sram_req_t  breq   [NBANKS];
  word_t      brdata [NBANKS];

  sram_interface dut (.clk, .rst_n, .own, .areq, .agnt, .arvalid, .ardata, .breq, .brdata);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    sram_bank_model #(.AW(4)) u_bank (.clk, .req(breq[b]), .rdata(brdata[b]));
  end

  int checks = 0, failures = 0;
  word_t shadow [NBANKS][16];
  word_t exp_rd [4];
  bit    exp_rv [4];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prio [4] = '{0, 3, 1, 2};
    bit  want [4];
    bit  used [NBANKS];
    int  grants [4];
    for (int b = 0; b < NBANKS; b++) for (int i = 0; i < 16; i++) shadow[b][i] = '0;
    for (int a = 0; a < 4; a++) begin areq[a] = '0; exp_rv[a] = 0; grants[a] = 0; end
    own = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // data of last clock's reads
      for (int a = 0; a < 4; a++) if (exp_rv[a]) begin
        checks++;
        if (!arvalid[a] || ardata[a] != exp_rd[a]) begin
          failures++;
          $display("cycle %0d agent %0d: read data %h (valid %0d), want %h", cyc, a, ardata[a], arvalid[a], exp_rd[a]);
        end
      end else begin
        checks++;
        if (arvalid[a]) begin failures++; $display("agent %0d: unexpected rvalid", a); end
      end
      if (cyc % 50 == 0) own = 4'($urandom) | 4'b0001;
      for (int a = 0; a < 4; a++) begin
        areq[a].en    = ($urandom % 2) == 0;
        areq[a].we    = ($urandom % 3) == 0;
        areq[a].bank  = bank_t'($urandom);
        areq[a].addr  = waddr_t'($urandom % 16);
        areq[a].wdata = $urandom;
      end
      #1;
      for (int b = 0; b < NBANKS; b++) used[b] = 0;
      for (int p = 0; p < 4; p++) begin
        int a;
        a = prio[p];
        want[a] = areq[a].en && own[areq[a].bank] && !used[areq[a].bank];
        if (want[a]) used[areq[a].bank] = 1;
      end
      for (int a = 0; a < 4; a++) begin
        checks++;
        if (agnt[a] != want[a]) begin
          failures++;
          $display("cycle %0d agent %0d: grant %0d want %0d", cyc, a, agnt[a], want[a]);
        end
        exp_rv[a] = want[a] && !areq[a].we;
        if (exp_rv[a]) exp_rd[a] = shadow[areq[a].bank][areq[a].addr[3:0]];
        if (want[a]) grants[a]++;
      end
      for (int a = 0; a < 4; a++)
        if (want[a] && areq[a].we) shadow[areq[a].bank][areq[a].addr[3:0]] = areq[a].wdata;
    end
    // every agent must have won some accesses, port B (lowest) included
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (grants[a] == 0) begin failures++; $display("agent %0d never granted", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
