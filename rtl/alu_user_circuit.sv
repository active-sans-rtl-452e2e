// alu_user_circuit: the "ALU Operations" user-defined core.
//
// A set of 32-bit integer operators applied element by element to the vectors
// on ports A and B: add, subtract (A - B), multiply (low 32 bits), signed min
// and max, and the logical operators AND, OR, XOR and NOT (of A, B unused).
// The operator is the message's sub-operator identifier (alu_op_e); an unknown
// code yields an empty result. Latency one clock, one element per clock.
// The operator list follows the document; its exact membership of the
// logical operators and all encodings are this design's choice.
module alu_user_circuit
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
      AL_ADD:  op = EW_ADD;
      AL_SUB:  op = EW_SUB;
      AL_MUL:  op = EW_MUL;
      AL_MIN:  op = EW_MIN;
      AL_MAX:  op = EW_MAX;
      AL_AND:  op = EW_AND;
      AL_OR:   op = EW_OR;
      AL_XOR:  op = EW_XOR;
      AL_NOT:  op = EW_NOT_A;
      default: op = EW_BAD;
    endcase
    if (ci.subop[7:4] != 4'd0) op = EW_BAD;
  end

  ew_engine u_eng (.clk, .rst_n, .op, .ci, .co);

endmodule
