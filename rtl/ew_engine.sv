// ew_engine: element-wise streaming engine shared by the built-in circuit and
// the ALU user core.
//
// On a start pulse it latches the operation and works out the output length:
// the A length for operations on A only, the B length for a copy of B, and
// the shorter of the two for operations on both. It then takes one element
// from each vector port it uses, applies the operation and hands the result
// to port C through a single output register, so the compute latency is one
// clock and one element is produced per clock while C accepts. `done` rises
// once the last result has been taken by port C and stays high until the next
// start. A bad operation code produces an empty output (done at once).
// The one-clock latency follows the document's timing table; the rest is this
// design's choice.
module ew_engine
  import asan_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ew_op_e  op,      // sampled with ci.start
  input  ckt_in_t ci,
  output ckt_out_t co
);

  ew_op_e op_q;
  vlen_t  remaining;
  logic   out_v;
  word_t  out_d;
  logic   active;

  logic need_a, need_b, take;
  assign need_a = ew_uses_a(op_q);
  assign need_b = ew_uses_b(op_q);

  // An element moves when every used input has one and the output register
  // is free or being emptied.
  assign take = active && (remaining != '0)
             && (!need_a || ci.a_valid) && (!need_b || ci.b_valid)
             && (!out_v || ci.c_ready);

  vlen_t start_len;
  always_comb begin
    if (op == EW_BAD)                         start_len = '0;
    else if (ew_uses_a(op) && ew_uses_b(op))  start_len = (ci.a_len < ci.b_len) ? ci.a_len : ci.b_len;
    else if (ew_uses_a(op))                   start_len = ci.a_len;
    else                                      start_len = ci.b_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q      <= EW_PASS_A;
      remaining <= '0;
      out_v     <= 1'b0;
      out_d     <= '0;
      active    <= 1'b0;
    end else if (ci.start) begin
      op_q      <= op;
      remaining <= start_len;
      out_v     <= 1'b0;
      active    <= 1'b1;
    end else begin
      if (take) begin
        out_v     <= 1'b1;
        out_d     <= ew_apply(op_q, ci.a_data, ci.b_data);
        remaining <= remaining - 1'b1;
      end else if (ci.c_ready) begin
        out_v <= 1'b0;
      end
    end
  end

  always_comb begin
    co         = CKT_IDLE;
    co.a_ready = take && need_a;
    co.b_ready = take && need_b;
    co.c_valid = out_v;
    co.c_data  = out_d;
    co.done    = active && (remaining == '0) && !out_v;
  end

endmodule
