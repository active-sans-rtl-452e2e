// fpga_control_block: the FPGA control block of the active network interface.
//
// It is the communication software of the card turned into hardware. It
// keeps SRAM banks 1 and 2 (the scratchpad) for itself from reset on, and
// takes banks 0 (incoming queue) and 3 (outgoing queue) only while it works
// on them. Every POLL_INTERVAL clocks it:
//   1. acquires banks 0 and 3 from the card's bank arbiter,
//   2. reads the in-queue tail and the out-queue head; if the in-queue is
//      empty it releases the banks and waits for the next poll,
//   3. fetches the 6-word header of the oldest message (one word per clock),
//   4. checks that the circuit named in the header is loaded; if not it
//      flushes its runtime state (in-queue head, out-queue tail, missing
//      circuit) to bank 0, releases the banks and raises `func_fault` until
//      the host answers with `fault_clear`; it then restores its state from
//      bank 0 and retries, so the host may also have consumed the message
//      itself by advancing the saved head,
//   5. reads the forwarding-directory entry named by the message's
//      forwarding identifier (256 entries in bank 0),
//   6. streams up to two input vectors through ports A and B into the circuit
//      and its output through port C: into the scratchpad at the header's C
//      address (store, recycle) or into the payload of a new outgoing message
//      (forward), one word per clock when the banks do not collide,
//   7. recycle: runs the result through the directory's next circuit, in
//      this FPGA, with the next forwarding identifier; forward: writes the
//      next stage's header and a routing word into the outgoing slot and
//      advances the out-queue tail; a forward waits, leaving the message in
//      the queue, while the outgoing queue is full,
//   8. advances the in-queue head and releases banks 0 and 3.
// A message for circuit CID_DIR_UPDATE is handled here instead: its A vector
// is a list of (index, entry) pairs written into the forwarding directory.
//
// Queue pointers are slot indices kept in bank 0 / bank 3 words (asan_pkg).
// The sequence of steps, the forwarding directory and its three actions, the
// function fault with state flush and restore, and the bank allocation follow
// the document. Word layouts, the poll interval, the queue depth, the
// full-queue wait and the recycle semantics are this design's choices.
module fpga_control_block
  import asan_pkg::*;
#(
  parameter int unsigned POLL_INTERVAL = 64,
  parameter int unsigned IQ_SLOTS      = 64,
  parameter int unsigned OQ_SLOTS      = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // card bank arbiter
  output logic [NBANKS-1:0] bank_req,
  input  logic [NBANKS-1:0] bank_gnt,
  output sram_req_t mem       [NBANKS],
  input  word_t     mem_rdata [NBANKS],
  // user circuit API
  output cid_t      sel_cid,
  output ckt_in_t   ci,
  input  ckt_out_t  co,
  output cid_t      query_cid,
  input  logic      query_present,
  // function fault to the host
  output logic      func_fault,
  output cid_t      fault_cid,
  input  logic      fault_clear,
  // monitoring
  output ctl_ev_t   ev
);

  localparam int unsigned IQW = $clog2(IQ_SLOTS);
  localparam int unsigned OQW = $clog2(OQ_SLOTS);

  if (POLL_INTERVAL < 2) begin : g_bad_poll
    $error("fpga_control_block: POLL_INTERVAL must be at least 2");
  end
  if ((32'(IQ_BASE) + IQ_SLOTS * SLOT_WORDS) > (1 << BANK_AW) ||
      (32'(OQ_BASE) + OQ_SLOTS * SLOT_WORDS) > (1 << BANK_AW)) begin : g_bad_q
    $error("fpga_control_block: queues do not fit in a bank");
  end

  typedef enum logic [4:0] {
    S_RST_ACQ, S_RST_RD0, S_RST_RD1, S_RST_RD2,
    S_IDLE, S_ACQ, S_PTR0, S_PTR1, S_PTR2, S_CHECK,
    S_HDR, S_HLOAD, S_DECODE, S_FWD0, S_FWD1, S_PLAN,
    S_RUN_START, S_RUN, S_AFTER, S_OHDR, S_OTAIL, S_UPD, S_REL,
    S_DIRUPD, S_FAULT, S_FAULT_WAIT
  } state_e;

  state_e state;

  // ------------------------------------------------------------ agents
  agent_req_t areq   [4];
  logic       agnt   [4];
  logic       arvalid[4];
  word_t      ardata [4];
  logic [NBANKS-1:0] own;

  assign own = bank_gnt;

  sram_interface u_sif (
    .clk, .rst_n, .own,
    .areq, .agnt, .arvalid, .ardata,
    .breq(mem), .brdata(mem_rdata)
  );

  // ------------------------------------------------------------ state
  logic           want03;
  logic           restore_from_save;
  logic [IQW-1:0] iq_head, iq_tail;
  logic [OQW-1:0] oq_head, oq_tail;
  logic [$clog2(POLL_INTERVAL+1)-1:0] poll_cnt;
  word_t          hdr [HDR_WORDS];
  logic [3:0]     issue_i, cap_i;
  cid_t           cur_cid;
  subop_t         cur_subop;
  fid_t           cur_fid;
  vloc_t          a_loc, b_loc, c_loc, w_loc;
  vlen_t          a_len, b_len, produced;
  fwd_entry_t     entry;
  logic           pair_phase;
  fid_t           pair_idx;
  vlen_t          consumed;

  waddr_t slot_base, slot_payload, oslot_base;
  assign slot_base    = IQ_BASE + waddr_t'(32'(iq_head) * SLOT_WORDS);
  assign slot_payload = slot_base + waddr_t'(PAYLOAD_OFF);
  assign oslot_base   = OQ_BASE + waddr_t'(32'(oq_tail) * SLOT_WORDS);

  logic [IQW-1:0] iq_head_nx;
  logic [OQW-1:0] oq_tail_nx;
  assign iq_head_nx = (32'(iq_head) == IQ_SLOTS-1) ? '0 : iq_head + 1'b1;
  assign oq_tail_nx = (32'(oq_tail) == OQ_SLOTS-1) ? '0 : oq_tail + 1'b1;

  logic oq_full;
  assign oq_full = (oq_tail_nx == oq_head);

  // ------------------------------------------------------------ vector ports
  logic       ra_start, rb_start, wc_start, flush;
  logic       ra_valid, rb_valid, ra_ready, rb_ready;
  word_t      ra_data, rb_data;
  logic       wc_ready, wc_idle;
  vlen_t      wc_written;

  assign flush    = (state == S_AFTER) || (state == S_DIRUPD && consumed == a_len);
  assign ra_start = (state == S_RUN_START) || flush ||
                    (state == S_DECODE && cur_cid == CID_DIR_UPDATE);
  assign rb_start = (state == S_RUN_START) || flush;
  assign wc_start = (state == S_RUN_START);

  vector_reader u_port_a (
    .clk, .rst_n, .start(ra_start), .loc(a_loc), .len(flush ? '0 : a_len),
    .req(areq[1]), .gnt(agnt[1]), .rvalid(arvalid[1]), .rdata(ardata[1]),
    .s_valid(ra_valid), .s_data(ra_data), .s_ready(ra_ready), .idle()
  );
  vector_reader u_port_b (
    .clk, .rst_n, .start(rb_start), .loc(b_loc), .len(flush ? '0 : b_len),
    .req(areq[2]), .gnt(agnt[2]), .rvalid(arvalid[2]), .rdata(ardata[2]),
    .s_valid(rb_valid), .s_data(rb_data), .s_ready(rb_ready), .idle()
  );
  vector_writer u_port_c (
    .clk, .rst_n, .start(wc_start), .loc(w_loc),
    .s_valid(co.c_valid), .s_data(co.c_data), .s_ready(wc_ready),
    .req(areq[3]), .gnt(agnt[3]), .written(wc_written), .idle(wc_idle)
  );

  assign ra_ready = (state == S_DIRUPD) ? 1'b1 : co.a_ready;
  assign rb_ready = co.b_ready;

  always_comb begin
    ci         = '0;
    ci.start   = (state == S_RUN_START);
    ci.subop   = cur_subop;
    ci.a_len   = a_len;
    ci.b_len   = b_len;
    ci.a_valid = ra_valid && (state == S_RUN);
    ci.a_data  = ra_data;
    ci.b_valid = rb_valid && (state == S_RUN);
    ci.b_data  = rb_data;
    ci.c_ready = wc_ready;
  end
  assign sel_cid   = cur_cid;
  assign query_cid = cur_cid;

  // ------------------------------------------------------------ controller access
  function automatic agent_req_t rd(bank_t b, waddr_t a);
    agent_req_t r;
    r = '0; r.en = 1'b1; r.bank = b; r.addr = a;
    return r;
  endfunction
  function automatic agent_req_t wr(bank_t b, waddr_t a, word_t d);
    agent_req_t r;
    r = '0; r.en = 1'b1; r.we = 1'b1; r.bank = b; r.addr = a; r.wdata = d;
    return r;
  endfunction

  hdr_w0_t hdr0;
  assign hdr0 = hdr_w0_t'(hdr[0]);

  hdr_w0_t out_w0;
  route_t  out_route;
  always_comb begin
    out_w0       = '0;
    out_w0.cid   = entry.next_cid;
    out_w0.subop = entry.next_subop;
    out_w0.fid   = entry.next_fid;
    out_route      = '0;
    out_route.dest = 8'(entry.dest);
    out_route.len  = 16'(produced);
  end

  word_t out_word;
  always_comb begin
    unique case (issue_i)
      4'd0:    out_word = word_t'(out_w0);
      4'd1:    out_word = 32'h1 << ADDR_PAYLOAD_BIT;   // A = payload of the new message
      4'd2:    out_word = word_t'(produced);
      4'd5:    out_word = hdr[5];                      // C address carried forward
      4'd7:    out_word = word_t'(out_route);
      default: out_word = '0;                          // no B vector
    endcase
  end

  always_comb begin
    areq[0] = '0;
    unique case (state)
      S_RST_RD0: areq[0] = rd(BANK_INQ, restore_from_save ? SAVE_HEAD_ADDR : IQ_HEAD_ADDR);
      S_RST_RD1: areq[0] = restore_from_save ? rd(BANK_INQ, SAVE_TAIL_ADDR)
                                             : rd(BANK_OUTQ, OQ_TAIL_ADDR);
      S_PTR0:    areq[0] = rd(BANK_INQ, IQ_TAIL_ADDR);
      S_PTR1:    areq[0] = rd(BANK_OUTQ, OQ_HEAD_ADDR);
      S_HDR:     if (32'(issue_i) < HDR_WORDS)
                   areq[0] = rd(BANK_INQ, slot_base + waddr_t'(issue_i));
      S_FWD0:    areq[0] = rd(BANK_INQ, DIR_BASE + waddr_t'(cur_fid));
      S_OHDR:    areq[0] = wr(BANK_OUTQ, oslot_base + waddr_t'(issue_i), out_word);
      S_OTAIL:   areq[0] = wr(BANK_OUTQ, OQ_TAIL_ADDR, word_t'(oq_tail_nx));
      S_UPD:     areq[0] = wr(BANK_INQ, IQ_HEAD_ADDR, word_t'(iq_head_nx));
      S_DIRUPD:  if (ra_valid && pair_phase)
                   areq[0] = wr(BANK_INQ, DIR_BASE + waddr_t'(pair_idx), ra_data);
      S_FAULT:   unique case (issue_i)
                   4'd0:    areq[0] = wr(BANK_INQ, SAVE_HEAD_ADDR, word_t'(iq_head));
                   4'd1:    areq[0] = wr(BANK_INQ, SAVE_TAIL_ADDR, word_t'(oq_tail));
                   default: areq[0] = wr(BANK_INQ, SAVE_FID_ADDR,  word_t'(cur_cid));
                 endcase
      default:   areq[0] = '0;
    endcase
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_RST_ACQ;
      want03            <= 1'b1;
      restore_from_save <= 1'b0;
      iq_head <= '0; iq_tail <= '0; oq_head <= '0; oq_tail <= '0;
      poll_cnt <= '0;
      for (int i = 0; i < HDR_WORDS; i++) hdr[i] <= '0;
      issue_i <= '0; cap_i <= '0;
      cur_cid <= '0; cur_subop <= '0; cur_fid <= '0;
      a_loc <= '0; b_loc <= '0; c_loc <= '0; w_loc <= '0;
      a_len <= '0; b_len <= '0; produced <= '0;
      entry <= '0;
      pair_phase <= 1'b0; pair_idx <= '0; consumed <= '0;
      func_fault <= 1'b0;
      fault_cid  <= '0;
    end else begin
      unique case (state)
        // restore runtime state: from the queue pointers after reset, from
        // the flushed copy after a function fault
        S_RST_ACQ: begin
          want03 <= 1'b1;
          if (own[BANK_INQ] && own[BANK_OUTQ]) state <= S_RST_RD0;
        end
        S_RST_RD0: state <= S_RST_RD1;
        S_RST_RD1: begin
          iq_head <= IQW'(ardata[0]);
          state   <= S_RST_RD2;
        end
        S_RST_RD2: begin
          oq_tail <= OQW'(ardata[0]);
          state   <= S_REL;
        end

        S_IDLE: begin
          if (poll_cnt == '0) begin
            want03 <= 1'b1;
            state  <= S_ACQ;
          end else begin
            poll_cnt <= poll_cnt - 1'b1;
          end
        end
        S_ACQ:  if (own[BANK_INQ] && own[BANK_OUTQ]) state <= S_PTR0;
        S_PTR0: state <= S_PTR1;
        S_PTR1: begin
          iq_tail <= IQW'(ardata[0]);
          state   <= S_PTR2;
        end
        S_PTR2: begin
          oq_head <= OQW'(ardata[0]);
          state   <= S_CHECK;
        end
        S_CHECK: begin
          issue_i <= '0;
          cap_i   <= '0;
          state   <= (iq_tail == iq_head) ? S_REL : S_HDR;
        end

        // header: one read issued per clock, data captured a clock later
        S_HDR: begin
          if (32'(issue_i) < HDR_WORDS) issue_i <= issue_i + 1'b1;
          if (arvalid[0]) begin
            hdr[cap_i[2:0]] <= ardata[0];
            cap_i      <= cap_i + 1'b1;
            if (32'(cap_i) == HDR_WORDS-1) state <= S_HLOAD;
          end
        end
        S_HLOAD: begin
          cur_cid   <= hdr0.cid;
          cur_subop <= hdr0.subop;
          cur_fid   <= hdr0.fid;
          a_loc     <= decode_vaddr(hdr[1], slot_payload);
          a_len     <= vlen_t'(hdr[2]);
          b_loc     <= decode_vaddr(hdr[3], slot_payload);
          b_len     <= vlen_t'(hdr[4]);
          c_loc     <= decode_vaddr(hdr[5], slot_payload);
          state     <= S_DECODE;
        end
        S_DECODE: begin
          issue_i <= '0;
          if (cur_cid == CID_DIR_UPDATE) begin
            pair_phase <= 1'b0;
            consumed   <= '0;
            state      <= S_DIRUPD;
          end else if (!query_present) begin
            state <= S_FAULT;
          end else begin
            state <= S_FWD0;
          end
        end
        S_FWD0: state <= S_FWD1;
        S_FWD1: begin
          entry <= fwd_entry_t'(ardata[0]);
          state <= S_PLAN;
        end
        S_PLAN: begin
          if (entry.action == FWD_FORWARD && oq_full) begin
            state <= S_REL;                       // retry at the next poll
          end else begin
            w_loc <= (entry.action == FWD_FORWARD)
                   ? vloc_t'{bank: BANK_OUTQ, offset: oslot_base + waddr_t'(PAYLOAD_OFF)}
                   : c_loc;
            state <= S_RUN_START;
          end
        end
        S_RUN_START: state <= S_RUN;
        S_RUN: begin
          if (co.done && wc_idle) begin
            produced <= wc_written;
            state    <= S_AFTER;
          end
        end
        S_AFTER: begin
          issue_i <= '0;
          unique case (entry.action)
            FWD_RECYCLE: begin
              cur_cid   <= entry.next_cid;
              cur_subop <= entry.next_subop;
              cur_fid   <= entry.next_fid;
              a_loc     <= c_loc;
              a_len     <= produced;
              b_len     <= '0;
              state     <= S_DECODE;
            end
            FWD_FORWARD: state <= S_OHDR;
            default:     state <= S_UPD;
          endcase
        end
        S_OHDR: begin
          issue_i <= issue_i + 1'b1;
          if (32'(issue_i) == PAYLOAD_OFF-1) state <= S_OTAIL;
        end
        S_OTAIL: begin
          oq_tail <= oq_tail_nx;
          state   <= S_UPD;
        end
        S_UPD: begin
          iq_head <= iq_head_nx;
          state   <= S_REL;
        end
        S_REL: begin
          want03   <= 1'b0;
          poll_cnt <= ($clog2(POLL_INTERVAL+1))'(POLL_INTERVAL - 1);
          state    <= S_IDLE;
        end

        // forwarding-directory update handler
        S_DIRUPD: begin
          if (consumed == a_len) begin
            state <= S_UPD;
          end else if (ra_valid) begin
            consumed   <= consumed + 1'b1;
            pair_phase <= !pair_phase;
            if (!pair_phase) pair_idx <= fid_t'(ra_data);
          end
        end

        // function fault: flush state, release the queues, wait for the host
        S_FAULT: begin
          issue_i <= issue_i + 1'b1;
          if (issue_i == 4'd2) begin
            want03     <= 1'b0;
            func_fault <= 1'b1;
            fault_cid  <= cur_cid;
            state      <= S_FAULT_WAIT;
          end
        end
        S_FAULT_WAIT: begin
          if (fault_clear) begin
            func_fault        <= 1'b0;
            restore_from_save <= 1'b1;
            state             <= S_RST_ACQ;
          end
        end
        default: state <= S_RST_ACQ;
      endcase
    end
  end

  // scratchpad banks are held from reset on; the queue banks only on demand
  always_comb begin
    bank_req           = '0;
    bank_req[BANK_INQ]  = want03;
    bank_req[BANK_OUTQ] = want03;
    bank_req[BANK_SP0]  = 1'b1;
    bank_req[BANK_SP1]  = 1'b1;
  end

  always_comb begin
    ev            = '0;
    ev.msg_done   = (state == S_UPD);
    ev.empty_poll = (state == S_CHECK) && (iq_tail == iq_head);
    ev.fault      = (state == S_FAULT) && (issue_i == 4'd0);
    ev.oq_full    = (state == S_PLAN) && (entry.action == FWD_FORWARD) && oq_full;
    ev.recycle    = (state == S_AFTER) && (entry.action == FWD_RECYCLE);
    ev.forward    = (state == S_OTAIL);
    ev.store      = (state == S_AFTER) && (entry.action inside {FWD_STORE, FWD_DROP});
    ev.dir_update = (state == S_DIRUPD) && ra_valid && pair_phase;
    ev.hdr_fetch  = (state == S_HDR);
    ev.streaming  = (state == S_RUN);
  end

  // the controller is the highest-priority agent: its accesses must always
  // find their bank owned
  assert property (@(posedge clk) disable iff (!rst_n) areq[0].en |-> agnt[0])
    else $error("fpga_control_block: controller access to a bank not owned");

endmodule
