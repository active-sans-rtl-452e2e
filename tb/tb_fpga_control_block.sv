// tb_fpga_control_block: self-checking test of the message controller on
// its own, with the user area attached and a simple bank owner that grants
// every request one clock later. Messages are placed straight into the bank
// models while the controller does not own bank 0, and results are read
// straight from them. The queues are cut to 4 slots and the poll interval to
// 8 clocks so the full-queue wait comes quickly.
// Checks: the poll protocol (banks 0/3 owned only while working, scratchpad
// banks always), directory update, store, forward with the next-stage header,
// the wait on a full outgoing queue and its release, the function fault with
// flushed state and resume after the host skips the message, and recycle.
module tb_fpga_control_block;
  import asan_pkg::*;

  localparam int unsigned SLOTS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NBANKS-1:0] bank_req, bank_gnt;
  sram_req_t mem [NBANKS];
  word_t     mem_rdata [NBANKS];
  cid_t      sel_cid, query_cid, fault_cid;
  ckt_in_t   ci;
  ckt_out_t  co;
  logic      query_present, func_fault, fault_clear;
  ctl_ev_t   ev;

  fpga_control_block #(.POLL_INTERVAL(8), .IQ_SLOTS(SLOTS), .OQ_SLOTS(SLOTS)) dut (
    .clk, .rst_n, .bank_req, .bank_gnt, .mem, .mem_rdata,
    .sel_cid, .ci, .co, .query_cid, .query_present,
    .func_fault, .fault_cid, .fault_clear, .ev
  );
  user_area u_user (.clk, .rst_n, .sel_cid, .ci, .co, .query_cid, .query_present);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    sram_bank_model u_bank (.clk, .req(mem[b]), .rdata(mem_rdata[b]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bank_gnt <= '0; else bank_gnt <= bank_req;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int n_msg = 0, n_full = 0, n_bad_own = 0;
  always @(posedge clk) if (rst_n) begin
    n_msg  += int'(ev.msg_done);
    n_full += int'(ev.oq_full);
    // the scratchpad is requested from reset on and never given back
    if (!(bank_req[1] && bank_req[2])) n_bad_own++;
  end

  localparam word_t PAY = 32'h8000_0000;
  int tail = 0;

  // wait until bank 0 is free, then write a message and bump the tail
  task automatic put(cid_t c, subop_t s, fid_t f, word_t aa, int al, word_t ba, int bl,
                     word_t ca, word_t pay [$]);
    waddr_t slot;
    while (bank_req[0] || bank_gnt[0]) @(negedge clk);
    slot = IQ_BASE + waddr_t'(tail * SLOT_WORDS);
    g_bank[0].u_bank.mem[slot + 0] = {c, s, f, 8'h00};
    g_bank[0].u_bank.mem[slot + 1] = aa;
    g_bank[0].u_bank.mem[slot + 2] = word_t'(al);
    g_bank[0].u_bank.mem[slot + 3] = ba;
    g_bank[0].u_bank.mem[slot + 4] = word_t'(bl);
    g_bank[0].u_bank.mem[slot + 5] = ca;
    foreach (pay[i]) g_bank[0].u_bank.mem[slot + waddr_t'(PAYLOAD_OFF + i)] = pay[i];
    tail = (tail + 1) % SLOTS;
    g_bank[0].u_bank.mem[IQ_TAIL_ADDR] = word_t'(tail);
  endtask

  task automatic wait_msgs(int n);
    int t = 0;
    while (n_msg < n && t < 20000) begin @(negedge clk); t++; end
    check(n_msg == n, $sformatf("%0d messages done, want %0d", n_msg, n));
  endtask

  function automatic word_t ent(fwd_action_e a, int dest, cid_t nc, subop_t ns, fid_t nf);
    fwd_entry_t e;
    e.action = a; e.dest = 6'(dest); e.next_cid = nc; e.next_subop = ns; e.next_fid = nf;
    return word_t'(e);
  endfunction

  initial begin
    word_t p [$];
    int t;
    fault_clear = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    check(!bank_req[0] && !bank_req[3], "queue banks released while idle");
    check(ev.empty_poll == 0 || 1, "");

    // directory: fid 4 store, fid 5 forward to endpoint 9, fid 6 recycle
    p = {32'd4, ent(FWD_STORE, 0, 0, 0, 0),
         32'd5, ent(FWD_FORWARD, 9, CID_BUILTIN, 8'(BI_MAX), 8'd11),
         32'd6, ent(FWD_RECYCLE, 0, CID_BUILTIN, 8'(BI_NOP_A), 8'd4)};
    put(CID_DIR_UPDATE, 0, 0, PAY, 6, 0, 0, 0, p);
    wait_msgs(1);
    check(g_bank[0].u_bank.mem[DIR_BASE + 4] == p[1], "entry 4");
    check(g_bank[0].u_bank.mem[DIR_BASE + 5] == p[3], "entry 5");
    check(g_bank[0].u_bank.mem[DIR_BASE + 6] == p[5], "entry 6");
    check(g_bank[0].u_bank.mem[IQ_HEAD_ADDR] == 1, "in-queue head advanced");

    // store: ALU SUB of payload halves into scratchpad bank 1
    p = {32'd100, 32'd200, 32'd300, 32'd5, 32'd50, 32'd500};
    put(CID_ALU, 8'(AL_SUB), 8'd4, PAY, 3, PAY | 32'd3, 3, 32'h40, p);
    wait_msgs(2);
    check(g_bank[1].u_bank.mem[19'h40] == 95 && g_bank[1].u_bank.mem[19'h41] == 150 &&
          g_bank[1].u_bank.mem[19'h42] == -200, "stored differences");

    // recycle: built-in MIN, then copied by the next stage to the same place
    p = {32'd1, 32'd9, 32'd4, 32'd3};
    put(CID_BUILTIN, 8'(BI_MIN), 8'd6, PAY, 2, PAY | 32'd2, 2, 32'h8_0000, p);
    wait_msgs(3);
    check(g_bank[2].u_bank.mem[19'h0] == 1 && g_bank[2].u_bank.mem[19'h1] == 3, "recycled minimum");

    // forwards: the 4-slot outgoing queue holds 3, the 4th must wait
    for (int k = 0; k < 4; k++) begin
      p = {word_t'(k), word_t'(10 * k)};
      put(CID_BUILTIN, 8'(BI_ADD), 8'd5, PAY, 1, PAY | 32'd1, 1, word_t'(k), p);
      t = 0;
      while (n_msg < 4 + k && t < 2000) begin @(negedge clk); t++; end
    end
    check(n_msg == 6, "three forwards done, fourth waits");
    check(n_full > 0, "full outgoing queue seen");
    for (int k = 0; k < 3; k++) begin
      waddr_t s;
      s = OQ_BASE + waddr_t'(k * SLOT_WORDS);
      check(g_bank[3].u_bank.mem[s] == {CID_BUILTIN, 8'(BI_MAX), 8'd11, 8'h00}, "next-stage header");
      check(g_bank[3].u_bank.mem[s + 2] == 1, "next-stage A length");
      check(g_bank[3].u_bank.mem[s + 5] == word_t'(k), "C address carried");
      check(g_bank[3].u_bank.mem[s + 7] == {8'd9, 8'd0, 16'd1}, "routing word");
      check(g_bank[3].u_bank.mem[s + PAYLOAD_OFF] == word_t'(11 * k), "forwarded sum");
    end
    check(g_bank[3].u_bank.mem[OQ_TAIL_ADDR] == 3, "out-queue tail");
    // consumer frees one slot
    while (bank_req[3] || bank_gnt[3]) @(negedge clk);
    g_bank[3].u_bank.mem[OQ_HEAD_ADDR] = 1;
    wait_msgs(7);
    check(g_bank[3].u_bank.mem[OQ_BASE + 3 * SLOT_WORDS + PAYLOAD_OFF] == 33, "fourth forward after space");

    // function fault
    p = {32'd1};
    put(8'h77, 0, 8'd4, PAY, 1, 0, 0, 32'h80, p);
    t = 0;
    while (!func_fault && t < 2000) begin @(negedge clk); t++; end
    check(func_fault && fault_cid == 8'h77, "function fault raised");
    repeat (3) @(negedge clk);
    check(!bank_req[0] && !bank_req[3], "queue banks released during the fault");
    check(g_bank[0].u_bank.mem[SAVE_HEAD_ADDR] == 3 && g_bank[0].u_bank.mem[SAVE_TAIL_ADDR] == 0 &&
          g_bank[0].u_bank.mem[SAVE_FID_ADDR] == 32'h77, "runtime state flushed");
    repeat (50) @(negedge clk);
    check(func_fault && n_msg == 7, "nothing happens until the host answers");
    // host skips the message in the flushed state
    g_bank[0].u_bank.mem[SAVE_HEAD_ADDR] = 0;
    g_bank[0].u_bank.mem[IQ_HEAD_ADDR] = 0;
    fault_clear = 1'b1; @(negedge clk); fault_clear = 1'b0;
    @(negedge clk);
    check(!func_fault, "fault cleared");
    p = {32'd42};
    put(CID_BUILTIN, 8'(BI_NOP_A), 8'd4, PAY, 1, 0, 0, 32'h90, p);
    wait_msgs(8);
    check(g_bank[1].u_bank.mem[19'h90] == 42 && g_bank[1].u_bank.mem[19'h80] == 0,
          "resumed from restored state, skipped message not run");
    check(n_bad_own == 0, "scratchpad banks held throughout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
