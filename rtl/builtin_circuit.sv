// builtin_circuit: the computational circuit present in every FPGA
// configuration.
//
// It offers linear 32-bit operations on the vectors streamed in through ports
// A and B (add, multiply, AND, OR, XOR, signed min and max, result to port C)
// and a no-operation that copies port A or port B to port C unchanged, which
// gives scratchpad-to-scratchpad memory copies. The operation is chosen by the
// sub-operator identifier of the message (builtin_op_e, low four bits); an
// unknown code produces an empty result. Latency is one clock, throughput one
// element per clock. The list of operations is the document's; the
// encodings, signed comparison and the low-32-bit product are this design's.
module builtin_circuit
  import asan_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ckt_in_t  ci,
  output ckt_out_t co
);

  ew_op_e op;
  always_comb begin
    unique case (ci.subop[3:0])
      BI_NOP_A: op = EW_PASS_A;
      BI_NOP_B: op = EW_PASS_B;
      BI_ADD:   op = EW_ADD;
      BI_MUL:   op = EW_MUL;
      BI_AND:   op = EW_AND;
      BI_OR:    op = EW_OR;
      BI_XOR:   op = EW_XOR;
      BI_MIN:   op = EW_MIN;
      BI_MAX:   op = EW_MAX;
      default:  op = EW_BAD;
    endcase
    if (ci.subop[7:4] != 4'd0) op = EW_BAD;
  end

  ew_engine u_eng (.clk, .rst_n, .op, .ci, .co);

endmodule
