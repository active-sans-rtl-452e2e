// user_area: the part of the FPGA that houses the computational circuits, and
// the user-circuit API between them and the control block (Fig. 7).
//
// Ports A and B of the control block are broadcast to every circuit and the
// circuits' C outputs are joined into port C. Only the circuit whose
// identifier equals `sel_cid` sees the start pulse and the C ready signal, and
// only its A/B ready, C data and done signals are returned, so one circuit
// runs at a time. `query_cid` is looked up combinationally against the
// identifiers present in this configuration; `query_present` low is what
// makes the control block raise a function fault.
//
// This configuration holds the built-in circuit (identifier CID_BUILTIN) and
// the four user-defined circuits the document names: the ALU Operations core
// at ALU_CID, the RC6 core at RC6_CID, the MD5 core at MD5_CID and the DES
// core at DES_CID. The area is sized for up to MAX_USER_CIRCUITS = 8 user
// circuits, as the document states. The circuit identifiers are this
// design's choice.
module user_area
  import asan_pkg::*;
#(
  parameter cid_t        ALU_CID           = CID_ALU,
  parameter cid_t        RC6_CID           = CID_RC6,
  parameter cid_t        MD5_CID           = CID_MD5,
  parameter cid_t        DES_CID           = CID_DES,
  parameter int unsigned MAX_USER_CIRCUITS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cid_t     sel_cid,
  input  ckt_in_t  ci,
  output ckt_out_t co,
  input  cid_t     query_cid,
  output logic     query_present
);

  localparam int unsigned NUM_USER_CIRCUITS = 4;
  localparam int unsigned NC = NUM_USER_CIRCUITS + 1;   // with the built-in circuit
  localparam cid_t IDS [5] = '{CID_BUILTIN, ALU_CID, RC6_CID, MD5_CID, DES_CID};

  if (NUM_USER_CIRCUITS > MAX_USER_CIRCUITS) begin : g_too_many
    $error("user_area: more user circuits than the user area holds");
  end
  for (genvar i = 1; i < NC; i++) begin : g_id_check
    if (IDS[i] == CID_BUILTIN || IDS[i] == CID_DIR_UPDATE) begin : g_reserved
      $error("user_area: a user circuit id collides with a reserved identifier");
    end
    for (genvar j = 1; j < i; j++) begin : g_dup
      if (IDS[i] == IDS[j]) begin : g_same
        $error("user_area: two user circuits share an identifier");
      end
    end
  end

  ckt_in_t  cin  [NC];
  ckt_out_t cout [NC];
  logic [NC-1:0] sel;

  for (genvar i = 0; i < NC; i++) begin : g_sel
    assign sel[i] = (sel_cid == IDS[i]);
    always_comb begin
      cin[i]         = ci;
      cin[i].start   = ci.start & sel[i];
      cin[i].c_ready = ci.c_ready & sel[i];
    end
  end

  builtin_circuit  u_builtin (.clk, .rst_n, .ci(cin[0]), .co(cout[0]));
  alu_user_circuit u_alu     (.clk, .rst_n, .ci(cin[1]), .co(cout[1]));
  rc6_user_circuit u_rc6     (.clk, .rst_n, .ci(cin[2]), .co(cout[2]));
  md5_user_circuit u_md5     (.clk, .rst_n, .ci(cin[3]), .co(cout[3]));
  des_user_circuit u_des     (.clk, .rst_n, .ci(cin[4]), .co(cout[4]));

  always_comb begin
    co = CKT_IDLE;
    for (int i = 0; i < NC; i++)
      if (sel[i]) co = cout[i];
  end

  always_comb begin
    query_present = 1'b0;
    for (int i = 0; i < NC; i++)
      if (query_cid == IDS[i]) query_present = 1'b1;
  end

endmodule
