// des_user_circuit: the DES user-defined circuit, encryption and decryption
// with a 56-bit key, fed and emptied 32 bits at a time.
//
// Sub-operator 0 encrypts, 1 decrypts; any other value gives an empty result.
// Vector B carries the key as two words, the usual 64-bit DES key with its
// parity bits (bit 1 of the standard, the first bit, is bit 31 of word 0; the
// eight parity bits are ignored, leaving 56 key bits). Vector A carries the
// data; each 64-bit DES block is two words, the first word holding the
// block's first 32 bits. The result on port C has 2 * floor(a_len / 2) words
// in the same layout. A B vector shorter than two words gives an empty result.
// Per message the key is loaded once (2 clocks) and permuted by PC-1. Each
// block then takes 2 load clocks, 16 round clocks and 2 output clocks; the
// round keys are made on the fly by rotating the C and D halves (left for
// encryption, right for decryption, so that they are back at their start
// after 16 rounds).
// The DES algorithm and its tables follow the published standard (FIPS 46).
// The document names a wrapper around a third-party DES core that handles
// 32-bit words and a 56-bit key; this core is written here from the standard,
// and its interface is this design's own choice.
module des_user_circuit
  import asan_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ckt_in_t  ci,
  output ckt_out_t co
);

  // tables of the standard, bit positions counted from 1 at the left
  localparam int IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7};
  localparam int E_T [48] = '{
    32, 1, 2, 3, 4, 5, 4, 5, 6, 7, 8, 9, 8, 9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32, 1};
  localparam int P_T [32] = '{
    16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
    2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25};
  localparam int PC1_T [56] = '{
    57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18,
    10, 2, 59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15, 7, 62, 54, 46, 38, 30, 22,
    14, 6, 61, 53, 45, 37, 29, 21, 13, 5, 28, 20, 12, 4};
  localparam int PC2_T [48] = '{
    14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10,
    23, 19, 12, 4, 26, 8, 16, 7, 27, 20, 13, 2,
    41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};
  localparam int SH_T [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};
  // S-boxes, entry 16 * row + column
  localparam logic [3:0] SB_T [8][64] = '{
    '{4'd14, 4'd4, 4'd13, 4'd1, 4'd2, 4'd15, 4'd11, 4'd8, 4'd3, 4'd10, 4'd6, 4'd12, 4'd5, 4'd9, 4'd0, 4'd7, 4'd0, 4'd15, 4'd7, 4'd4, 4'd14, 4'd2, 4'd13, 4'd1, 4'd10, 4'd6, 4'd12, 4'd11, 4'd9, 4'd5, 4'd3, 4'd8, 4'd4, 4'd1, 4'd14, 4'd8, 4'd13, 4'd6, 4'd2, 4'd11, 4'd15, 4'd12, 4'd9, 4'd7, 4'd3, 4'd10, 4'd5, 4'd0, 4'd15, 4'd12, 4'd8, 4'd2, 4'd4, 4'd9, 4'd1, 4'd7, 4'd5, 4'd11, 4'd3, 4'd14, 4'd10, 4'd0, 4'd6, 4'd13},
    '{4'd15, 4'd1, 4'd8, 4'd14, 4'd6, 4'd11, 4'd3, 4'd4, 4'd9, 4'd7, 4'd2, 4'd13, 4'd12, 4'd0, 4'd5, 4'd10, 4'd3, 4'd13, 4'd4, 4'd7, 4'd15, 4'd2, 4'd8, 4'd14, 4'd12, 4'd0, 4'd1, 4'd10, 4'd6, 4'd9, 4'd11, 4'd5, 4'd0, 4'd14, 4'd7, 4'd11, 4'd10, 4'd4, 4'd13, 4'd1, 4'd5, 4'd8, 4'd12, 4'd6, 4'd9, 4'd3, 4'd2, 4'd15, 4'd13, 4'd8, 4'd10, 4'd1, 4'd3, 4'd15, 4'd4, 4'd2, 4'd11, 4'd6, 4'd7, 4'd12, 4'd0, 4'd5, 4'd14, 4'd9},
    '{4'd10, 4'd0, 4'd9, 4'd14, 4'd6, 4'd3, 4'd15, 4'd5, 4'd1, 4'd13, 4'd12, 4'd7, 4'd11, 4'd4, 4'd2, 4'd8, 4'd13, 4'd7, 4'd0, 4'd9, 4'd3, 4'd4, 4'd6, 4'd10, 4'd2, 4'd8, 4'd5, 4'd14, 4'd12, 4'd11, 4'd15, 4'd1, 4'd13, 4'd6, 4'd4, 4'd9, 4'd8, 4'd15, 4'd3, 4'd0, 4'd11, 4'd1, 4'd2, 4'd12, 4'd5, 4'd10, 4'd14, 4'd7, 4'd1, 4'd10, 4'd13, 4'd0, 4'd6, 4'd9, 4'd8, 4'd7, 4'd4, 4'd15, 4'd14, 4'd3, 4'd11, 4'd5, 4'd2, 4'd12},
    '{4'd7, 4'd13, 4'd14, 4'd3, 4'd0, 4'd6, 4'd9, 4'd10, 4'd1, 4'd2, 4'd8, 4'd5, 4'd11, 4'd12, 4'd4, 4'd15, 4'd13, 4'd8, 4'd11, 4'd5, 4'd6, 4'd15, 4'd0, 4'd3, 4'd4, 4'd7, 4'd2, 4'd12, 4'd1, 4'd10, 4'd14, 4'd9, 4'd10, 4'd6, 4'd9, 4'd0, 4'd12, 4'd11, 4'd7, 4'd13, 4'd15, 4'd1, 4'd3, 4'd14, 4'd5, 4'd2, 4'd8, 4'd4, 4'd3, 4'd15, 4'd0, 4'd6, 4'd10, 4'd1, 4'd13, 4'd8, 4'd9, 4'd4, 4'd5, 4'd11, 4'd12, 4'd7, 4'd2, 4'd14},
    '{4'd2, 4'd12, 4'd4, 4'd1, 4'd7, 4'd10, 4'd11, 4'd6, 4'd8, 4'd5, 4'd3, 4'd15, 4'd13, 4'd0, 4'd14, 4'd9, 4'd14, 4'd11, 4'd2, 4'd12, 4'd4, 4'd7, 4'd13, 4'd1, 4'd5, 4'd0, 4'd15, 4'd10, 4'd3, 4'd9, 4'd8, 4'd6, 4'd4, 4'd2, 4'd1, 4'd11, 4'd10, 4'd13, 4'd7, 4'd8, 4'd15, 4'd9, 4'd12, 4'd5, 4'd6, 4'd3, 4'd0, 4'd14, 4'd11, 4'd8, 4'd12, 4'd7, 4'd1, 4'd14, 4'd2, 4'd13, 4'd6, 4'd15, 4'd0, 4'd9, 4'd10, 4'd4, 4'd5, 4'd3},
    '{4'd12, 4'd1, 4'd10, 4'd15, 4'd9, 4'd2, 4'd6, 4'd8, 4'd0, 4'd13, 4'd3, 4'd4, 4'd14, 4'd7, 4'd5, 4'd11, 4'd10, 4'd15, 4'd4, 4'd2, 4'd7, 4'd12, 4'd9, 4'd5, 4'd6, 4'd1, 4'd13, 4'd14, 4'd0, 4'd11, 4'd3, 4'd8, 4'd9, 4'd14, 4'd15, 4'd5, 4'd2, 4'd8, 4'd12, 4'd3, 4'd7, 4'd0, 4'd4, 4'd10, 4'd1, 4'd13, 4'd11, 4'd6, 4'd4, 4'd3, 4'd2, 4'd12, 4'd9, 4'd5, 4'd15, 4'd10, 4'd11, 4'd14, 4'd1, 4'd7, 4'd6, 4'd0, 4'd8, 4'd13},
    '{4'd4, 4'd11, 4'd2, 4'd14, 4'd15, 4'd0, 4'd8, 4'd13, 4'd3, 4'd12, 4'd9, 4'd7, 4'd5, 4'd10, 4'd6, 4'd1, 4'd13, 4'd0, 4'd11, 4'd7, 4'd4, 4'd9, 4'd1, 4'd10, 4'd14, 4'd3, 4'd5, 4'd12, 4'd2, 4'd15, 4'd8, 4'd6, 4'd1, 4'd4, 4'd11, 4'd13, 4'd12, 4'd3, 4'd7, 4'd14, 4'd10, 4'd15, 4'd6, 4'd8, 4'd0, 4'd5, 4'd9, 4'd2, 4'd6, 4'd11, 4'd13, 4'd8, 4'd1, 4'd4, 4'd10, 4'd7, 4'd9, 4'd5, 4'd0, 4'd15, 4'd14, 4'd2, 4'd3, 4'd12},
    '{4'd13, 4'd2, 4'd8, 4'd4, 4'd6, 4'd15, 4'd11, 4'd1, 4'd10, 4'd9, 4'd3, 4'd14, 4'd5, 4'd0, 4'd12, 4'd7, 4'd1, 4'd15, 4'd13, 4'd8, 4'd10, 4'd3, 4'd7, 4'd4, 4'd12, 4'd5, 4'd6, 4'd11, 4'd0, 4'd14, 4'd9, 4'd2, 4'd7, 4'd11, 4'd4, 4'd1, 4'd9, 4'd12, 4'd14, 4'd2, 4'd0, 4'd6, 4'd10, 4'd13, 4'd15, 4'd3, 4'd5, 4'd8, 4'd2, 4'd1, 4'd14, 4'd7, 4'd4, 4'd10, 4'd8, 4'd13, 4'd15, 4'd12, 4'd9, 4'd0, 4'd3, 4'd5, 4'd6, 4'd11}};

  // output bit i (counted from 1 at the left, as in the standard) takes input bit T[i]
  function automatic logic [63:0] ip(logic [63:0] x);
    for (int i = 0; i < 64; i++) ip[63 - i] = x[64 - IP_T[i]];
  endfunction
  function automatic logic [63:0] fp(logic [63:0] x);
    for (int i = 0; i < 64; i++) fp[64 - IP_T[i]] = x[63 - i];
  endfunction
  function automatic logic [47:0] expand(logic [31:0] x);
    for (int i = 0; i < 48; i++) expand[47 - i] = x[32 - E_T[i]];
  endfunction
  function automatic logic [31:0] pbox(logic [31:0] x);
    for (int i = 0; i < 32; i++) pbox[31 - i] = x[32 - P_T[i]];
  endfunction
  function automatic logic [55:0] pc1(logic [63:0] x);
    for (int i = 0; i < 56; i++) pc1[55 - i] = x[64 - PC1_T[i]];
  endfunction
  function automatic logic [47:0] pc2(logic [55:0] x);
    for (int i = 0; i < 48; i++) pc2[47 - i] = x[56 - PC2_T[i]];
  endfunction
  function automatic logic [31:0] sboxes(logic [47:0] x);
    logic [5:0] b;
    for (int k = 0; k < 8; k++) begin
      b = x[47 - 6 * k -: 6];
      sboxes[31 - 4 * k -: 4] = SB_T[k][{b[5], b[0], b[4:1]}];
    end
  endfunction
  function automatic logic [55:0] rot_cd(logic [55:0] cd, logic left, logic two);
    logic [27:0] c, d;
    c = cd[55:28];
    d = cd[27:0];
    if (left) begin
      c = two ? {c[25:0], c[27:26]} : {c[26:0], c[27]};
      d = two ? {d[25:0], d[27:26]} : {d[26:0], d[27]};
    end else begin
      c = two ? {c[1:0], c[27:2]} : {c[0], c[27:1]};
      d = two ? {d[1:0], d[27:2]} : {d[0], d[27:1]};
    end
    return {c, d};
  endfunction

  typedef enum logic [2:0] {D_IDLE, D_KLOAD, D_LOAD, D_ROUND, D_OUT, D_DONE} dstate_e;
  dstate_e st;

  logic        dec;
  word_t       key_hi;
  logic [55:0] cd;
  logic [31:0] l, r;
  logic [63:0] res;
  vlen_t       nblk, blk;
  logic [3:0]  rnd;
  logic        wi;

  // one round
  logic        two;
  logic [55:0] cd_next;
  logic [47:0] k;
  logic [31:0] f;
  always_comb begin
    two     = dec ? (SH_T[15 - int'(rnd)] == 2) : (SH_T[int'(rnd)] == 2);
    cd_next = rot_cd(cd, !dec, two);
    k       = dec ? pc2(cd) : pc2(cd_next);
    f       = pbox(sboxes(expand(r) ^ k));
  end

  logic take_a, take_b, give_c;
  assign take_b = (st == D_KLOAD) && ci.b_valid;
  assign take_a = (st == D_LOAD) && ci.a_valid;
  assign give_c = (st == D_OUT) && ci.c_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE;
      dec <= 1'b0; key_hi <= '0; cd <= '0; l <= '0; r <= '0; res <= '0;
      nblk <= '0; blk <= '0; rnd <= '0; wi <= 1'b0;
    end else if (ci.start) begin
      dec  <= ci.subop[0];
      nblk <= ci.a_len >> 1;
      blk  <= '0;
      wi   <= 1'b0;
      st   <= (ci.subop[7:1] == '0 && ci.b_len >= vlen_t'(2)) ? D_KLOAD : D_DONE;
    end else begin
      unique case (st)
        D_KLOAD: if (take_b) begin
          wi <= !wi;
          if (!wi) key_hi <= ci.b_data;
          else begin
            cd <= pc1({key_hi, ci.b_data});
            st <= (nblk == '0) ? D_DONE : D_LOAD;
          end
        end
        D_LOAD: if (take_a) begin
          wi <= !wi;
          if (!wi) res[63:32] <= ci.a_data;
          else begin
            {l, r} <= ip({res[63:32], ci.a_data});
            rnd    <= '0;
            st     <= D_ROUND;
          end
        end
        D_ROUND: begin
          l   <= r;
          r   <= l ^ f;
          cd  <= cd_next;
          rnd <= rnd + 1'b1;
          if (rnd == 4'd15) begin
            res <= fp({l ^ f, r});
            st  <= D_OUT;
          end
        end
        D_OUT: if (give_c) begin
          wi <= !wi;
          if (wi) begin
            blk <= blk + 1'b1;
            st  <= (blk + 1'b1 == nblk) ? D_DONE : D_LOAD;
          end
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    co         = CKT_IDLE;
    co.a_ready = take_a;
    co.b_ready = take_b;
    co.c_valid = (st == D_OUT);
    co.c_data  = wi ? res[31:0] : res[63:32];
    co.done    = (st == D_DONE);
  end

endmodule
