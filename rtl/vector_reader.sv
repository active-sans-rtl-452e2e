// vector_reader: one input vector port (port A or port B of Fig. 7).
//
// A start pulse loads a start location (bank and word offset) and a length in
// words and empties the port. The reader then requests one read per clock
// from the SRAM interface, at linearly increasing addresses, as long as its
// buffer has room for the data still in flight. Read data arrives one clock
// after a granted request and is buffered in a DEPTH-entry FIFO that feeds the
// circuits through a valid/ready stream. With no bank conflict the port
// delivers one word per clock. A vector that runs off the end of scratchpad
// bank 1 continues in bank 2, so the scratchpad reads as one 4 MB space.
// The linear reading follows the document; the buffering, request protocol
// and bank continuation are this design's choice.
module vector_reader
  import asan_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  vloc_t      loc,
  input  vlen_t      len,
  // SRAM interface side
  output agent_req_t req,
  input  logic       gnt,
  input  logic       rvalid,
  input  word_t      rdata,
  // stream side
  output logic       s_valid,
  output word_t      s_data,
  input  logic       s_ready,
  output logic       idle
);

  vloc_t cur;
  vlen_t remaining;
  logic  pend;
  logic  empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic room;
  assign room = (32'(count) + (pend ? 32'd1 : 32'd0)) < DEPTH;

  always_comb begin
    req       = '0;
    req.en    = (remaining != '0) && room && !start;
    req.we    = 1'b0;
    req.bank  = cur.bank;
    req.addr  = cur.offset;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      remaining <= '0;
      pend      <= 1'b0;
    end else if (start) begin
      cur       <= loc;
      remaining <= len;
      pend      <= 1'b0;
    end else begin
      pend <= req.en && gnt;
      if (req.en && gnt) begin
        remaining  <= remaining - 1'b1;
        cur.offset <= cur.offset + 1'b1;
        if (&cur.offset && cur.bank == BANK_SP0) cur.bank <= BANK_SP1;
      end
    end
  end

  sync_fifo #(.WIDTH(DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start),
    .push(rvalid && pend), .din(rdata),
    .pop(s_ready && s_valid), .dout(s_data),
    .empty, .full, .count
  );

  assign s_valid = !empty;
  assign idle    = (remaining == '0) && !pend && empty;

endmodule
