// rc6_user_circuit: the RC6 user-defined circuit, RC6-32/r/b encryption and
// decryption of 128-bit blocks with up to MAX_ROUNDS rounds and keys of up to
// MAX_KEY_BYTES bytes.
//
// Sub-operator 0 encrypts, 1 decrypts; any other value gives an empty result.
// Vector B carries the key: word 0 = rounds r, word 1 = key length b in
// bytes, then ceil(b/4) key words, bytes little-endian (key byte 0 in bits
// 7:0). Vector A carries the data, four words per block, word 0 = register A
// of RC6 (block bytes 0-3, little-endian) up to word 3 = register D. The
// result on port C has the same layout and 4 * floor(a_len / 4) words;
// trailing words that do not make a block are ignored.
// Per message the circuit first runs the RC6 key schedule (load the key,
// 2r+4 clocks to fill S with P32 + i*Q32, then 3*max(c, 2r+4) mixing clocks,
// one step per clock), then each block takes 4 load clocks, one whitening
// clock, r round clocks, one whitening clock and 4 output clocks.
// A message whose r, b or b_len is out of range gives an empty result.
// The round keys S and the key words L are arrays read combinationally
// (distributed RAM on an FPGA) and are not reset.
// The limits (1024 rounds, 1024-byte keys, 32-bit words) come from the
// document. RC6 itself follows its published definition. How the key and the
// round count reach the circuit is this design's own choice.
module rc6_user_circuit
  import asan_pkg::*;
#(
  parameter int unsigned MAX_ROUNDS    = 1024,
  parameter int unsigned MAX_KEY_BYTES = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ckt_in_t  ci,
  output ckt_out_t co
);

  localparam int unsigned S_WORDS = 2 * MAX_ROUNDS + 4;
  localparam int unsigned L_WORDS = (MAX_KEY_BYTES + 3) / 4;
  localparam int unsigned SW      = $clog2(S_WORDS + 1);
  localparam int unsigned LW      = $clog2(L_WORDS + 1);
  localparam int unsigned LIW     = (L_WORDS > 1) ? $clog2(L_WORDS) : 1;
  localparam int unsigned RW      = $clog2(MAX_ROUNDS + 1);
  localparam int unsigned BW      = $clog2(MAX_KEY_BYTES + 1);
  localparam int unsigned VW      = SW + 2;
  localparam word_t P32 = 32'hB7E1_5163;
  localparam word_t Q32 = 32'h9E37_79B9;

  function automatic word_t rotl(word_t x, logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction
  function automatic word_t rotr(word_t x, logic [4:0] n);
    return (x >> n) | (x << (6'd32 - {1'b0, n}));
  endfunction
  // f(x) = (x * (2x + 1)) <<< 5
  function automatic word_t fmix(word_t x);
    word_t p;
    p = x * {x[30:0], 1'b1};
    return rotl(p, 5'd5);
  endfunction

  typedef enum logic [3:0] {
    R_IDLE, R_KLOAD, R_KINIT, R_KMIX, R_LOAD, R_PRE, R_ROUND, R_POST, R_OUT, R_DONE
  } rstate_e;
  rstate_e st;

  word_t s_tab [S_WORDS];
  word_t l_tab [L_WORDS];

  logic          dec;
  logic [RW-1:0] r;
  logic [BW-1:0] b;
  logic [LW-1:0] c;               // key words used by the schedule, at least 1
  logic [SW-1:0] t;               // 2r + 4
  vlen_t         bi, nblk, blk;
  logic [SW-1:0] si;
  logic [LIW-1:0] lj;
  logic [VW-1:0] vi, v;
  word_t         ka, kb, ksum;
  word_t         ra, rb, rc, rd;
  logic [RW-1:0] ri;
  logic [1:0]    wi;

  // key word from port B, bytes past the key length cleared
  word_t   key_word;
  logic [BW-1:0] kw;              // key words present in vector B
  always_comb begin
    key_word = ci.b_data;
    if (bi == vlen_t'(kw) + 1'b1 && b[1:0] != 2'd0)
      key_word = ci.b_data & ~(32'hFFFF_FFFF << {b[1:0], 3'b000});
  end
  assign kw = BW'(({2'b00, b} + (BW+2)'(3)) >> 2);

  // key word 1 (b) is checked as it arrives
  logic [BW+1:0] kw_in;
  logic          b_bad;
  always_comb begin
    kw_in = (ci.b_data[BW+1:0] + (BW+2)'(3)) >> 2;
    b_bad = ci.b_data > word_t'(MAX_KEY_BYTES) ||
            ci.b_len < vlen_t'(kw_in) + vlen_t'(2);
  end

  // key schedule mixing step
  word_t mix_a, mix_b;
  always_comb begin
    mix_a = rotl(s_tab[si] + ka + kb, 5'd3);
    mix_b = rotl(l_tab[lj] + mix_a + kb, 5'(mix_a + kb));
  end

  // one round, encryption or decryption
  word_t ft, fu, e_a, e_c, d_a, d_c;
  logic [SW-1:0] s2i;
  always_comb begin
    s2i = SW'({ri, 1'b0});
    if (!dec) begin
      ft  = fmix(rb);
      fu  = fmix(rd);
      e_a = rotl(ra ^ ft, fu[4:0]) + s_tab[s2i];
      e_c = rotl(rc ^ fu, ft[4:0]) + s_tab[s2i + 1'b1];
      d_a = '0; d_c = '0;
    end else begin
      // registers first rotate right: (a, b, c, d) = (D, A, B, C)
      fu  = fmix(rc);
      ft  = fmix(ra);
      d_c = rotr(rb - s_tab[s2i + 1'b1], ft[4:0]) ^ fu;
      d_a = rotr(rd - s_tab[s2i], fu[4:0]) ^ ft;
      e_a = '0; e_c = '0;
    end
  end

  logic take_b, take_a, give_c;
  assign take_b = (st == R_KLOAD) && ci.b_valid;
  assign take_a = (st == R_LOAD) && ci.a_valid;
  assign give_c = (st == R_OUT) && ci.c_ready;

  always_ff @(posedge clk) begin
    if (st == R_KLOAD && take_b) begin
      if (bi == vlen_t'(1) && ci.b_data == '0) l_tab[0] <= '0;
      if (bi >= vlen_t'(2)) l_tab[LIW'(bi - vlen_t'(2))] <= key_word;
    end
    if (st == R_KINIT) s_tab[si] <= ksum;
    if (st == R_KMIX) begin
      s_tab[si] <= mix_a;
      l_tab[lj] <= mix_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE;
      dec <= 1'b0; r <= '0; b <= '0; c <= '0; t <= '0;
      bi <= '0; nblk <= '0; blk <= '0; si <= '0; lj <= '0; vi <= '0; v <= '0;
      ka <= '0; kb <= '0; ksum <= '0;
      ra <= '0; rb <= '0; rc <= '0; rd <= '0; ri <= '0; wi <= '0;
    end else if (ci.start) begin
      dec  <= ci.subop[0];
      nblk <= ci.a_len >> 2;
      bi   <= '0;
      blk  <= '0;
      st   <= (ci.subop[7:1] == '0 && ci.b_len >= vlen_t'(2)) ? R_KLOAD : R_DONE;
    end else begin
      unique case (st)
        R_KLOAD: if (take_b) begin
          bi <= bi + 1'b1;
          if (bi == '0) begin
            r <= RW'(ci.b_data);
            if (ci.b_data > word_t'(MAX_ROUNDS)) st <= R_DONE;
          end else if (bi == vlen_t'(1)) begin
            b <= BW'(ci.b_data);
            c <= (ci.b_data == '0) ? LW'(1) : LW'(kw_in);
            t <= SW'({r, 1'b0}) + SW'(4);
            si <= '0;
            ksum <= P32;
            if (b_bad) st <= R_DONE;
            else if (ci.b_data == '0) st <= R_KINIT;
          end else if (bi == vlen_t'(kw) + 1'b1) begin
            st <= R_KINIT;
          end
        end
        R_KINIT: begin
          ksum <= ksum + Q32;
          si   <= si + 1'b1;
          if (si == t - 1'b1) begin
            si <= '0; lj <= '0; vi <= '0; ka <= '0; kb <= '0;
            v  <= 2'd3 * ((VW'(c) > VW'(t)) ? VW'(c) : VW'(t));
            st <= R_KMIX;
          end
        end
        R_KMIX: begin
          ka <= mix_a;
          kb <= mix_b;
          si <= (si == t - 1'b1) ? '0 : si + 1'b1;
          lj <= (LW'(lj) == c - 1'b1) ? '0 : lj + 1'b1;
          vi <= vi + 1'b1;
          if (vi == v - 1'b1) begin
            wi <= '0;
            st <= (nblk == '0) ? R_DONE : R_LOAD;
          end
        end
        R_LOAD: if (take_a) begin
          unique case (wi)
            2'd0: ra <= ci.a_data;
            2'd1: rb <= ci.a_data;
            2'd2: rc <= ci.a_data;
            default: rd <= ci.a_data;
          endcase
          wi <= wi + 1'b1;
          if (wi == 2'd3) st <= R_PRE;
        end
        R_PRE: begin
          if (!dec) begin
            rb <= rb + s_tab[0];
            rd <= rd + s_tab[1];
            ri <= RW'(1);
          end else begin
            rc <= rc - s_tab[t - 1'b1];
            ra <= ra - s_tab[t - SW'(2)];
            ri <= r;
          end
          st <= (r == '0) ? R_POST : R_ROUND;
        end
        R_ROUND: begin
          if (!dec) begin
            ra <= rb; rb <= e_c; rc <= rd; rd <= e_a;
            ri <= ri + 1'b1;
            if (ri == r) st <= R_POST;
          end else begin
            ra <= d_a; rb <= ra; rc <= d_c; rd <= rc;
            ri <= ri - 1'b1;
            if (ri == RW'(1)) st <= R_POST;
          end
        end
        R_POST: begin
          if (!dec) begin
            ra <= ra + s_tab[t - SW'(2)];
            rc <= rc + s_tab[t - 1'b1];
          end else begin
            rd <= rd - s_tab[1];
            rb <= rb - s_tab[0];
          end
          wi <= '0;
          st <= R_OUT;
        end
        R_OUT: if (give_c) begin
          wi <= wi + 1'b1;
          if (wi == 2'd3) begin
            blk <= blk + 1'b1;
            st  <= (blk + 1'b1 == nblk) ? R_DONE : R_LOAD;
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
    co.c_valid = (st == R_OUT);
    unique case (wi)
      2'd0:    co.c_data = ra;
      2'd1:    co.c_data = rb;
      2'd2:    co.c_data = rc;
      default: co.c_data = rd;
    endcase
    co.done    = (st == R_DONE);
  end

endmodule
