// vector_writer: the output vector port (port C of Fig. 7).
//
// A start pulse loads the location the result vector is written to and
// clears the word count. Words from the active circuit enter a DEPTH-entry
// FIFO through a valid/ready stream; the writer requests one write per clock
// from the SRAM interface at linearly increasing addresses and removes a word
// when the request is granted, so it sustains one word per clock without a
// bank conflict. `written` counts the words stored since start and `idle` is
// high when nothing is left to write. As in the reader, a vector running off
// scratchpad bank 1 continues in bank 2.
// Linear writing is the document's; buffering and protocol are this design's.
module vector_writer
  import asan_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  vloc_t      loc,
  // stream side
  input  logic       s_valid,
  input  word_t      s_data,
  output logic       s_ready,
  // SRAM interface side
  output agent_req_t req,
  input  logic       gnt,
  output vlen_t      written,
  output logic       idle
);

  vloc_t cur;
  logic  empty, full;
  word_t head;
  logic [$clog2(DEPTH+1)-1:0] count;

  always_comb begin
    req       = '0;
    req.en    = !empty && !start;
    req.we    = 1'b1;
    req.bank  = cur.bank;
    req.addr  = cur.offset;
    req.wdata = head;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      written <= '0;
    end else if (start) begin
      cur     <= loc;
      written <= '0;
    end else if (req.en && gnt) begin
      written    <= written + 1'b1;
      cur.offset <= cur.offset + 1'b1;
      if (&cur.offset && cur.bank == BANK_SP0) cur.bank <= BANK_SP1;
    end
  end

  sync_fifo #(.WIDTH(DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start),
    .push(s_valid && s_ready), .din(s_data),
    .pop(req.en && gnt), .dout(head),
    .empty, .full, .count
  );

  assign s_ready = !full && !start;
  assign idle    = empty;

endmodule
