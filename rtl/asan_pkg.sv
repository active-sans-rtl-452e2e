// asan_pkg: types and constants shared by the active-NI FPGA card.
//
// The card carries four single-ported SRAM banks of 2 MB each (512K words of
// 32 bits), as on the prototype card. Bank 0 holds the incoming message queue
// and the 256-entry forwarding directory, bank 3 holds the outgoing message
// queue, banks 1 and 2 form the 4 MB scratchpad that only user circuits use.
// Those numbers follow the document. The word layout of the queues, the
// message header, the forwarding-directory entry and the circuit identifiers
// below are this design's own choices: the document says which fields exist
// (circuit identifier, sub-operator, forwarding identifier, address and length
// of two input vectors) but not how they are packed.
package asan_pkg;

  // ---------------------------------------------------------------- SRAM
  localparam int unsigned NBANKS  = 4;     // four banks on the card
  localparam int unsigned BANK_AW = 19;    // 2 MB / 4 B = 512K words
  localparam int unsigned DW      = 32;    // each bank provides 32-bit data

  typedef logic [BANK_AW-1:0] waddr_t;
  typedef logic [DW-1:0]      word_t;
  typedef logic [1:0]         bank_t;

  // One access on one bank port: read when we = 0; read data returns one
  // clock later.
  typedef struct packed {
    logic   en;
    logic   we;
    waddr_t addr;
    word_t  wdata;
  } sram_req_t;

  // An access request of one FPGA agent, carrying the bank it targets.
  typedef struct packed {
    logic   en;
    logic   we;
    bank_t  bank;
    waddr_t addr;
    word_t  wdata;
  } agent_req_t;

  localparam bank_t BANK_INQ  = 2'd0;  // incoming queue + forwarding directory
  localparam bank_t BANK_SP0  = 2'd1;  // scratchpad, lower 2 MB
  localparam bank_t BANK_SP1  = 2'd2;  // scratchpad, upper 2 MB
  localparam bank_t BANK_OUTQ = 2'd3;  // outgoing queue

  // A place in SRAM where a vector starts.
  typedef struct packed {
    bank_t  bank;
    waddr_t offset;
  } vloc_t;

  localparam int unsigned LEN_W = 20;  // up to 1M words: the whole scratchpad
  typedef logic [LEN_W-1:0] vlen_t;

  // ------------------------------------------------------- bank 0 layout
  localparam waddr_t IQ_HEAD_ADDR   = 19'd0;  // consumer index, written by the FPGA
  localparam waddr_t IQ_TAIL_ADDR   = 19'd1;  // producer index, written by host/NI
  localparam waddr_t SAVE_HEAD_ADDR = 19'd2;  // flushed runtime state: in-queue head
  localparam waddr_t SAVE_TAIL_ADDR = 19'd3;  // flushed runtime state: out-queue tail
  localparam waddr_t SAVE_FID_ADDR  = 19'd4;  // identifier of the missing circuit
  localparam waddr_t DIR_BASE       = 19'd256;
  localparam int unsigned DIR_ENTRIES = 256;  // forwarding directory size
  localparam waddr_t IQ_BASE        = 19'd1024;

  // ------------------------------------------------------- bank 3 layout
  localparam waddr_t OQ_HEAD_ADDR   = 19'd0;  // consumer index, written by host/NI
  localparam waddr_t OQ_TAIL_ADDR   = 19'd1;  // producer index, written by the FPGA
  localparam waddr_t OQ_BASE        = 19'd1024;

  // ------------------------------------------------------- message slots
  // A slot holds a 6-word header, a 2-word gap (word 7 carries routing in the
  // outgoing queue) and up to 1024 payload words (a 4 KB message).
  localparam int unsigned HDR_WORDS    = 6;
  localparam int unsigned PAYLOAD_OFF  = 8;
  localparam int unsigned MAX_PAYLOAD  = 1024;
  localparam int unsigned SLOT_WORDS   = PAYLOAD_OFF + MAX_PAYLOAD;
  localparam int unsigned ROUTE_WORD   = 7;

  // Header word 0.
  typedef logic [7:0] cid_t;    // circuit (= active message handler) identifier
  typedef logic [7:0] subop_t;  // sub-operator identifier
  typedef logic [7:0] fid_t;    // forwarding identifier (directory index)

  typedef struct packed {
    cid_t   cid;
    subop_t subop;
    fid_t   fid;
    logic [7:0] rsvd;
  } hdr_w0_t;

  // Header words 1..5: A address, A length, B address, B length, C address.
  // An address with bit 31 set points into the payload of the message being
  // processed (offset in bits 18:0); otherwise bits 19:0 are a scratchpad word
  // address, bit 19 choosing bank 2 over bank 1.
  localparam int unsigned ADDR_PAYLOAD_BIT = 31;

  localparam cid_t CID_BUILTIN    = 8'h00;  // built-in circuit, present in every configuration
  localparam cid_t CID_ALU        = 8'h01;  // "ALU Operations" user-defined core
  localparam cid_t CID_RC6        = 8'h02;  // RC6 encryption/decryption core
  localparam cid_t CID_MD5        = 8'h03;  // MD5 message digest core
  localparam cid_t CID_DES        = 8'h04;  // DES encryption/decryption core
  localparam cid_t CID_DIR_UPDATE = 8'hFF;  // handler that rewrites forwarding-directory entries

  // Forwarding-directory entry.
  typedef enum logic [1:0] {
    FWD_STORE   = 2'd0,  // leave the result in the scratchpad at C
    FWD_RECYCLE = 2'd1,  // run the result through another circuit in this FPGA
    FWD_FORWARD = 2'd2,  // send the result as a message to another endpoint
    FWD_DROP    = 2'd3   // result stored at C, like STORE (reserved code)
  } fwd_action_e;

  typedef struct packed {
    fwd_action_e action;
    logic [5:0]  dest;       // destination endpoint for FORWARD
    cid_t        next_cid;   // circuit of the next pipeline stage
    subop_t      next_subop;
    fid_t        next_fid;   // pipeline identifier at the next stage
  } fwd_entry_t;

  // Outgoing-slot routing word (slot word 7).
  typedef struct packed {
    logic [7:0]  dest;
    logic [7:0]  rsvd;
    logic [15:0] len;
  } route_t;

  // ------------------------------------------------------- circuit API
  // Bundle the control block drives into every circuit (Fig. 7 ports A, B, C).
  typedef struct packed {
    logic   start;   // one-clock pulse: begin an operation
    subop_t subop;
    vlen_t  a_len;
    vlen_t  b_len;
    logic   a_valid;
    word_t  a_data;
    logic   b_valid;
    word_t  b_data;
    logic   c_ready;
  } ckt_in_t;

  // Bundle a circuit returns.
  typedef struct packed {
    logic   a_ready;
    logic   b_ready;
    logic   c_valid;
    word_t  c_data;
    logic   done;    // high once the whole output vector has left the circuit
  } ckt_out_t;

  localparam ckt_out_t CKT_IDLE = '{default: '0};

  // Built-in circuit sub-operators.
  typedef enum logic [3:0] {
    BI_NOP_A = 4'd0,  // copy A to C
    BI_NOP_B = 4'd1,  // copy B to C
    BI_ADD   = 4'd2,
    BI_MUL   = 4'd3,
    BI_AND   = 4'd4,
    BI_OR    = 4'd5,
    BI_XOR   = 4'd6,
    BI_MIN   = 4'd7,
    BI_MAX   = 4'd8
  } builtin_op_e;

  // ALU user-core sub-operators.
  typedef enum logic [3:0] {
    AL_ADD = 4'd0,
    AL_SUB = 4'd1,
    AL_MUL = 4'd2,
    AL_MIN = 4'd3,
    AL_MAX = 4'd4,
    AL_AND = 4'd5,
    AL_OR  = 4'd6,
    AL_XOR = 4'd7,
    AL_NOT = 4'd8    // bitwise NOT of A, B unused
  } alu_op_e;

  // Element-wise operation codes of the shared streaming engine.
  typedef enum logic [3:0] {
    EW_PASS_A, EW_PASS_B, EW_ADD, EW_SUB, EW_MUL, EW_AND, EW_OR, EW_XOR,
    EW_MIN, EW_MAX, EW_NOT_A, EW_BAD
  } ew_op_e;

  // Signed 32-bit integer operators; the product keeps its low 32 bits.
  function automatic word_t ew_apply(ew_op_e op, word_t a, word_t b);
    word_t r;
    unique case (op)
      EW_PASS_A: r = a;
      EW_PASS_B: r = b;
      EW_ADD:    r = a + b;
      EW_SUB:    r = a - b;
      EW_MUL:    r = a * b;
      EW_AND:    r = a & b;
      EW_OR:     r = a | b;
      EW_XOR:    r = a ^ b;
      EW_MIN:    r = ($signed(a) < $signed(b)) ? a : b;
      EW_MAX:    r = ($signed(a) > $signed(b)) ? a : b;
      EW_NOT_A:  r = ~a;
      default:   r = '0;
    endcase
    return r;
  endfunction

  function automatic logic ew_uses_a(ew_op_e op);
    return op != EW_PASS_B;
  endfunction

  function automatic logic ew_uses_b(ew_op_e op);
    return !(op inside {EW_PASS_A, EW_NOT_A});
  endfunction

  // One-clock event pulses of the message controller, for monitoring.
  typedef struct packed {
    logic msg_done;    // a message was consumed from the incoming queue
    logic empty_poll;  // the queue was polled and found empty
    logic fault;       // a function fault was raised
    logic oq_full;     // a result had to wait: the outgoing queue was full
    logic recycle;     // a result was sent through another circuit
    logic forward;     // a result was queued as an outgoing message
    logic store;       // a result was left in the scratchpad
    logic dir_update;  // a forwarding-directory entry was rewritten
    logic hdr_fetch;   // level: a message header is being fetched
    logic streaming;   // level: vectors are streaming through a circuit
  } ctl_ev_t;

  // Decode a header address into a bank location. slot_payload is the word
  // address of the current message's payload in bank 0.
  function automatic vloc_t decode_vaddr(word_t a, waddr_t slot_payload);
    vloc_t l;
    if (a[ADDR_PAYLOAD_BIT]) begin
      l.bank   = BANK_INQ;
      l.offset = slot_payload + a[BANK_AW-1:0];
    end else begin
      l.bank   = a[BANK_AW] ? BANK_SP1 : BANK_SP0;
      l.offset = a[BANK_AW-1:0];
    end
    return l;
  endfunction

endpackage
