// tb_asan_card: end-to-end test of the active NI card at its default sizes.
//
// Four behavioural 2 MB SRAM banks hang off the card. A host model on the
// PCI side acquires and releases banks through the card's arbiter and
// writes messages into the incoming queue (bank 0) and reads the outgoing
// queue (bank 3), as the host CPU or the network interface would. The
// scratchpad (banks 1-2) belongs to the FPGA; the test preloads and inspects
// it directly in the models. Expected results are computed here from the
// message contents.
//
// Sequence:
//   1. a directory-update message installs forwarding entries
//      (fid 1 store, fid 2 forward, fid 3 recycle into NOT then store,
//      fid 4 forward to NOT at the next stage),
//   2. built-in ADD of payload and scratchpad, stored in bank 2,
//   3. a 4 KB message copied (built-in no-op) and forwarded: the outgoing
//      message carries the next stage's header; the header fetch must take
//      7 clocks and the 1024-word stream at most 1024 + 6 clocks,
//   4. ALU multiply of two payload vectors (ports A and B on the same bank,
//      so they stall each other), recycled through NOT and stored,
//      then an RC6 encryption, an MD5 digest and a DES encryption checked
//      against published test vectors,
//   5. a message for a circuit that is not loaded: function fault; the host
//      finds the flushed state, consumes the message itself and clears the
//      fault; the FPGA restores its state and goes on,
//   6. forwarded messages until the outgoing queue is full and the FPGA
//      waits; the host then drains and checks the outgoing queue,
//   7. a two-stage pipeline: a forwarded result is fed back in as the next
//      stage's message, whose header the first stage wrote, and runs there.
// Each mechanism is counted and must have happened at least once.
module tb_asan_card;
  import asan_pkg::*;

  localparam int unsigned SLOTS = 64;   // queue depth of the card's defaults
  localparam string FOX = "The quick brown fox jumps over the lazy dog.";

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NBANKS-1:0] host_req, host_gnt;
  sram_req_t host_mem [NBANKS];
  sram_req_t sram_mem [NBANKS];
  word_t     sram_rdata [NBANKS];
  logic      func_fault, fault_clear;
  cid_t      fault_cid;
  ctl_ev_t   ev;

  asan_card dut (
    .clk, .rst_n, .host_req, .host_gnt, .host_mem,
    .sram_mem, .sram_rdata, .func_fault, .fault_cid, .fault_clear, .ev
  );

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    sram_bank_model u_bank (.clk, .req(sram_mem[b]), .rdata(sram_rdata[b]));
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL (cycle %0d): %s", cycle, what); end
  endtask

  // ------------------------------------------------------------ event counters
  int n_msg, n_empty, n_fault, n_oqfull, n_recycle, n_forward, n_store, n_dir;
  int n_conflict, n_host_wait, hdr_len, run_len, last_hdr, last_run;
  initial begin
    n_msg = 0; n_empty = 0; n_fault = 0; n_oqfull = 0; n_recycle = 0;
    n_forward = 0; n_store = 0; n_dir = 0; n_conflict = 0; n_host_wait = 0;
    hdr_len = 0; run_len = 0; last_hdr = 0; last_run = 0;
  end
  always @(posedge clk) if (rst_n) begin
    n_msg     += int'(ev.msg_done);
    n_empty   += int'(ev.empty_poll);
    n_fault   += int'(ev.fault);
    n_oqfull  += int'(ev.oq_full);
    n_recycle += int'(ev.recycle);
    n_forward += int'(ev.forward);
    n_store   += int'(ev.store);
    n_dir     += int'(ev.dir_update);
    // port A or B waiting for a bank another agent holds
    if (ev.streaming && ((dut.u_ctrl.areq[1].en && !dut.u_ctrl.agnt[1]) ||
                         (dut.u_ctrl.areq[2].en && !dut.u_ctrl.agnt[2]))) n_conflict++;
    for (int b = 0; b < NBANKS; b++) if (host_req[b] && !host_gnt[b]) n_host_wait++;
    if (ev.hdr_fetch) hdr_len++; else if (hdr_len != 0) begin last_hdr = hdr_len; hdr_len = 0; end
    if (ev.streaming) run_len++; else if (run_len != 0) begin last_run = run_len; run_len = 0; end
  end

  // ------------------------------------------------------------ host model
  task automatic acquire(int b);
    host_req[b] = 1'b1;
    while (!host_gnt[b]) @(negedge clk);
  endtask
  task automatic release_bank(int b);
    host_req[b] = 1'b0;
    @(negedge clk);
  endtask
  task automatic hw(int b, waddr_t a, word_t d);
    host_mem[b] = '{en: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    host_mem[b] = '0;
  endtask
  task automatic hr(int b, waddr_t a, output word_t d);
    host_mem[b] = '{en: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    host_mem[b] = '0;
    d = sram_rdata[b];
  endtask

  function automatic word_t w0(cid_t c, subop_t s, fid_t f);
    return {c, s, f, 8'h00};
  endfunction
  localparam word_t PAY = 32'h8000_0000;   // address flag: message payload

  // put one message into the incoming queue, waiting while it is full
  task automatic inject(cid_t c, subop_t s, fid_t f, word_t aa, int al, word_t ba, int bl,
                        word_t ca, word_t pay [$]);
    word_t head, tail;
    waddr_t slot;
    forever begin
      acquire(0);
      hr(0, IQ_HEAD_ADDR, head);
      hr(0, IQ_TAIL_ADDR, tail);
      if ((tail + 1) % SLOTS != head) break;
      release_bank(0);
      repeat (300) @(negedge clk);
    end
    slot = IQ_BASE + waddr_t'(tail * SLOT_WORDS);
    hw(0, slot + 0, w0(c, s, f));
    hw(0, slot + 1, aa);
    hw(0, slot + 2, word_t'(al));
    hw(0, slot + 3, ba);
    hw(0, slot + 4, word_t'(bl));
    hw(0, slot + 5, ca);
    foreach (pay[i]) hw(0, slot + waddr_t'(PAYLOAD_OFF + i), pay[i]);
    hw(0, IQ_TAIL_ADDR, (tail + 1) % SLOTS);
    release_bank(0);
  endtask

  task automatic wait_msgs(int n);
    int t = 0;
    while (n_msg < n && t < 100000) begin @(negedge clk); t++; end
    check(n_msg >= n, $sformatf("%0d messages consumed", n));
  endtask

  // expected outgoing messages: header word 0, C word, routing word, payload
  typedef struct { word_t w0; word_t c; word_t route; word_t pay [$]; } out_msg_t;
  out_msg_t expq [$];
  int n_pipeline = 0;

  word_t oq_head_host = 0;
  task automatic drain_out_queue(output int n);
    word_t tail, d;
    waddr_t slot;
    out_msg_t e;
    n = 0;
    acquire(3);
    hr(3, OQ_TAIL_ADDR, tail);
    while (oq_head_host != tail) begin
      slot = OQ_BASE + waddr_t'(oq_head_host * SLOT_WORDS);
      check(expq.size() > 0, "an outgoing message was expected");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        hr(3, slot + 0, d); check(d == e.w0, $sformatf("out header word 0 %h want %h", d, e.w0));
        hr(3, slot + 1, d); check(d == PAY, "out header: A is the payload");
        hr(3, slot + 2, d); check(d == word_t'(e.pay.size()), "out header: A length");
        hr(3, slot + 4, d); check(d == 0, "out header: no B vector");
        hr(3, slot + 5, d); check(d == e.c, "out header: C address carried forward");
        hr(3, slot + 7, d); check(d == e.route, $sformatf("routing word %h want %h", d, e.route));
        foreach (e.pay[i]) begin
          hr(3, slot + waddr_t'(PAYLOAD_OFF + i), d);
          check(d == e.pay[i], $sformatf("out payload word %0d: %h want %h", i, d, e.pay[i]));
        end
      end
      oq_head_host = (oq_head_host + 1) % SLOTS;
      n++;
    end
    hw(3, OQ_HEAD_ADDR, oq_head_host);
    release_bank(3);
  endtask

  function automatic word_t entry(fwd_action_e act, int dest, cid_t nc, subop_t ns, fid_t nf);
    fwd_entry_t e;
    e.action = act; e.dest = 6'(dest); e.next_cid = nc; e.next_subop = ns; e.next_fid = nf;
    return word_t'(e);
  endfunction

  word_t sp [64];   // scratchpad vector at bank 1, word 0x100

  initial begin
    word_t pay [$], pay2 [$], d, saved;
    int n, msgs;
    out_msg_t e;
    host_req = '0; fault_clear = 1'b0;
    for (int b = 0; b < NBANKS; b++) host_mem[b] = '0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      sp[i] = $urandom;
      g_bank[1].u_bank.mem[19'h100 + i] = sp[i];
    end
    rst_n = 1'b1;
    msgs = 0;

    // 1. forwarding directory through the update handler
    pay = {32'd1, entry(FWD_STORE, 0, 0, 0, 0),
           32'd2, entry(FWD_FORWARD, 5, CID_ALU, 8'(AL_SUB), 8'd7),
           32'd3, entry(FWD_RECYCLE, 0, CID_ALU, 8'(AL_NOT), 8'd1),
           32'd4, entry(FWD_FORWARD, 9, CID_ALU, 8'(AL_NOT), 8'd1)};
    inject(CID_DIR_UPDATE, 0, 0, PAY, pay.size(), 0, 0, 0, pay);
    msgs++; wait_msgs(msgs);
    check(g_bank[0].u_bank.mem[DIR_BASE + 2] == pay[3], "directory entry 2 written");
    check(n_dir == 4, "four directory entries updated");

    // 2. built-in ADD: payload + scratchpad, stored in bank 2
    pay = {};
    for (int i = 0; i < 48; i++) pay.push_back($urandom);
    inject(CID_BUILTIN, 8'(BI_ADD), 8'd1, PAY, 48, 32'h100, 48, 32'h8_0010, pay);
    msgs++; wait_msgs(msgs);
    for (int i = 0; i < 48; i++)
      check(g_bank[2].u_bank.mem[19'h10 + i] == pay[i] + sp[i], $sformatf("stored sum %0d", i));

    // 3. a 4 KB message copied and forwarded
    pay = {};
    for (int i = 0; i < MAX_PAYLOAD; i++) pay.push_back($urandom);
    inject(CID_BUILTIN, 8'(BI_NOP_A), 8'd2, PAY, MAX_PAYLOAD, 0, 0, 32'h00ABC, pay);
    e.w0 = w0(CID_ALU, 8'(AL_SUB), 8'd7); e.c = 32'h00ABC;
    e.route = {8'd5, 8'd0, 16'(MAX_PAYLOAD)}; e.pay = pay;
    expq.push_back(e);
    msgs++; wait_msgs(msgs);
    check(last_hdr == 7, $sformatf("header fetch took %0d clocks, want 7", last_hdr));
    check(last_run <= MAX_PAYLOAD + 6, $sformatf("4 KB stream took %0d clocks", last_run));
    $display("4 KB message: header %0d clocks, stream %0d clocks", last_hdr, last_run);

    // 4. ALU multiply of two payload vectors, recycled through NOT, stored
    pay = {};
    for (int i = 0; i < 40; i++) pay.push_back($urandom);
    inject(CID_ALU, 8'(AL_MUL), 8'd3, PAY, 20, PAY | 32'd20, 20, 32'h300, pay);
    msgs++; wait_msgs(msgs);
    for (int i = 0; i < 20; i++)
      check(g_bank[1].u_bank.mem[19'h300 + i] == ~(pay[i] * pay[20 + i]),
            $sformatf("recycled product %0d", i));

    // 4b. RC6 encryption (published RC6-32/20/16 vector), MD5 digest and DES
    //     encryption (textbook vector), vectors from the payload, stored in bank 1
    pay = {32'h35241302, 32'h79685746, 32'hbdac9b8a, 32'hf1e0dfce,      // plaintext
           32'd20, 32'd16,                                              // rounds, key bytes
           32'h67452301, 32'hefcdab89, 32'h34231201, 32'h78675645};     // key
    inject(CID_RC6, 8'd0, 8'd1, PAY, 4, PAY | 32'd4, 6, 32'h700, pay);
    msgs++; wait_msgs(msgs);
    check(g_bank[1].u_bank.mem[19'h700] == 32'h2f194e52 && g_bank[1].u_bank.mem[19'h701] == 32'h23c61547 &&
          g_bank[1].u_bank.mem[19'h702] == 32'h36f6511f && g_bank[1].u_bank.mem[19'h703] == 32'h183fa47e,
          "RC6 ciphertext stored");
    pay = {};
    for (int i = 0; i < 44; i += 4) pay.push_back({FOX[i + 3], FOX[i + 2], FOX[i + 1], FOX[i]});
    inject(CID_MD5, 8'd0, 8'd1, PAY, pay.size(), 0, 0, 32'h710, pay);
    msgs++; wait_msgs(msgs);
    check(g_bank[1].u_bank.mem[19'h710] == 32'hc209d9e4 && g_bank[1].u_bank.mem[19'h711] == 32'h1cfbd090 &&
          g_bank[1].u_bank.mem[19'h712] == 32'hadff68a0 && g_bank[1].u_bank.mem[19'h713] == 32'hd0cb22df,
          "MD5 digest stored");
    pay = {32'h01234567, 32'h89ABCDEF, 32'h13345779, 32'h9BBCDFF1};      // block, key
    inject(CID_DES, 8'd0, 8'd1, PAY, 2, PAY | 32'd2, 2, 32'h720, pay);
    msgs++; wait_msgs(msgs);
    check(g_bank[1].u_bank.mem[19'h720] == 32'h85E81354 && g_bank[1].u_bank.mem[19'h721] == 32'h0F0AB405,
          "DES ciphertext stored");

    // 5. circuit 0x42 is not loaded: function fault
    pay = {32'd1, 32'd2};
    inject(8'h42, 0, 8'd1, PAY, 2, 0, 0, 32'h500, pay);
    n = 0;
    while (!func_fault && n < 20000) begin @(negedge clk); n++; end
    check(func_fault && fault_cid == 8'h42, "function fault for circuit 0x42");
    acquire(0);
    hr(0, SAVE_HEAD_ADDR, saved);
    check(saved == word_t'(msgs % SLOTS), "flushed in-queue head points at the faulting message");
    hr(0, SAVE_FID_ADDR, d);
    check(d == 32'h42, "flushed state names the missing circuit");
    // the host handles the message itself and consumes it
    hw(0, SAVE_HEAD_ADDR, (saved + 1) % SLOTS);
    hw(0, IQ_HEAD_ADDR, (saved + 1) % SLOTS);
    release_bank(0);
    fault_clear = 1'b1; @(negedge clk); fault_clear = 1'b0;
    check(g_bank[1].u_bank.mem[19'h500] == 0, "faulting message was not executed");
    // the FPGA must carry on with the next message
    pay = {32'd7, 32'd9};
    inject(CID_BUILTIN, 8'(BI_NOP_A), 8'd1, PAY, 2, 0, 0, 32'h600, pay);
    msgs++; wait_msgs(msgs);
    check(g_bank[1].u_bank.mem[19'h600] == 7 && g_bank[1].u_bank.mem[19'h601] == 9,
          "message after the fault processed");

    // 6. forward until the outgoing queue is full (one slot already used)
    for (int k = 0; k < SLOTS; k++) begin
      pay2 = {};
      for (int i = 0; i < 4; i++) pay2.push_back($urandom);
      inject(CID_BUILTIN, 8'(BI_ADD), 8'd2, PAY, 4, 32'h100, 4, word_t'(k), pay2);
      e.w0 = w0(CID_ALU, 8'(AL_SUB), 8'd7); e.c = word_t'(k);
      e.route = {8'd5, 8'd0, 16'd4};
      e.pay = {};
      for (int i = 0; i < 4; i++) e.pay.push_back(pay2[i] + sp[i]);
      expq.push_back(e);
      msgs++;
    end
    n = 0;
    while (n_oqfull == 0 && n < 100000) begin @(negedge clk); n++; end
    check(n_oqfull > 0, "the FPGA waited on a full outgoing queue");
    drain_out_queue(n);
    check(n == SLOTS - 1, $sformatf("drained %0d outgoing messages, want %0d", n, SLOTS - 1));
    wait_msgs(msgs);
    repeat (200) @(negedge clk);
    drain_out_queue(n);
    check(expq.size() == 0, "every forwarded message came out");

    // 7. a two-stage pipeline: stage 1 adds and forwards, the outgoing
    //    message is delivered back as the input of stage 2 (as the network
    //    would deliver it to the next card), which inverts and stores
    pay = {};
    for (int i = 0; i < 32; i++) pay.push_back($urandom);
    inject(CID_BUILTIN, 8'(BI_ADD), 8'd4, PAY, 16, PAY | 32'd16, 16, 32'h8_0800, pay);
    e.w0 = w0(CID_ALU, 8'(AL_NOT), 8'd1); e.c = 32'h8_0800;
    e.route = {8'd9, 8'd0, 16'd16}; e.pay = {};
    for (int i = 0; i < 16; i++) e.pay.push_back(pay[i] + pay[16 + i]);
    expq.push_back(e);
    msgs++; wait_msgs(msgs);
    drain_out_queue(n);
    check(n == 1, "stage 1 produced one outgoing message");
    inject(CID_ALU, 8'(AL_NOT), 8'd1, PAY, 16, 0, 0, 32'h8_0800, e.pay);
    msgs++; wait_msgs(msgs);
    for (int i = 0; i < 16; i++)
      check(g_bank[2].u_bank.mem[19'h800 + i] == ~(pay[i] + pay[16 + i]), $sformatf("stage 2 result %0d", i));
    n_pipeline++;

    // every mechanism must have happened
    $display("messages %0d, empty polls %0d, faults %0d, full-queue waits %0d, recycles %0d,",
             n_msg, n_empty, n_fault, n_oqfull, n_recycle);
    $display("forwards %0d, stores %0d, directory writes %0d, port bank conflicts %0d, host waits %0d",
             n_forward, n_store, n_dir, n_conflict, n_host_wait);
    check(n_empty > 0,     "empty poll seen");
    check(n_fault == 1,    "one function fault");
    check(n_recycle > 0,   "recycle seen");
    check(n_forward == SLOTS + 2, "every forward seen");
    check(n_pipeline == 1, "two-stage pipeline completed");
    check(n_store > 0,     "store seen");
    check(n_conflict > 0,  "bank conflict between ports seen");
    check(n_host_wait > 0, "host waited for a bank held by the FPGA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
