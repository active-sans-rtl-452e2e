// md5_user_circuit: the MD5 user-defined circuit: a message digest that
// gives a 128-bit identifier of the data stream on port A.
//
// The message is vector A, taken as whole 32-bit words whose bytes are in
// little-endian order (byte 0 in bits 7:0), so its length is 4 * a_len bytes.
// The circuit pads the message itself, as MD5 requires: a 0x80 byte, zero
// bytes up to 56 mod 64, then the 64-bit bit length. Each 16-word block is
// loaded one word per clock (message words from port A, then padding) and
// compressed in 64 clocks, one MD5 step per clock. After the last block the
// four digest words A, B, C, D (little-endian, so the usual hexadecimal
// digest is their bytes from bit 7:0 upwards) leave on port C. Port B is not
// used; the sub-operator must be 0, anything else gives an empty result.
// Latency: about 80 clocks per 64-byte block plus 4 output clocks.
// The MD5 function follows its published definition (RFC 1321); the
// document names the core and its purpose only. The round constants are
// computed at elaboration time from their definition, floor(2^32 |sin(i+1)|).
module md5_user_circuit
  import asan_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ckt_in_t  ci,
  output ckt_out_t co
);

  typedef logic [63:0][31:0] ktab_t;
  function automatic ktab_t make_k();
    ktab_t t;
    real s;
    for (int i = 0; i < 64; i++) begin
      s = $sin(real'(i + 1));
      if (s < 0.0) s = -s;
      t[i] = 32'(longint'($floor(s * 4294967296.0)));
    end
    return t;
  endfunction
  localparam ktab_t K = make_k();

  function automatic logic [4:0] shift_of(logic [5:0] i);
    unique case ({i[5:4], i[1:0]})
      4'b00_00: return 5'd7;   4'b00_01: return 5'd12;  4'b00_10: return 5'd17;  4'b00_11: return 5'd22;
      4'b01_00: return 5'd5;   4'b01_01: return 5'd9;   4'b01_10: return 5'd14;  4'b01_11: return 5'd20;
      4'b10_00: return 5'd4;   4'b10_01: return 5'd11;  4'b10_10: return 5'd16;  4'b10_11: return 5'd23;
      default:  case (i[1:0])
                  2'd0:    return 5'd6;
                  2'd1:    return 5'd10;
                  2'd2:    return 5'd15;
                  default: return 5'd21;
                endcase
    endcase
  endfunction

  function automatic word_t rotl(word_t x, logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

  typedef enum logic [2:0] {M_IDLE, M_LOAD, M_ROUND, M_OUT, M_DONE} mstate_e;
  mstate_e st;

  word_t       m [16];
  word_t       a0, b0, c0, d0, ra, rb, rc, rd;
  vlen_t       n;
  logic [LEN_W:0] gi, total;
  logic [5:0]  rnd;
  logic [1:0]  oi;

  // next padded word when the message itself is used up
  word_t pad_word;
  always_comb begin
    if (gi == {1'b0, n})            pad_word = 32'h0000_0080;
    else if (gi == total - (LEN_W+1)'(2))    pad_word = {7'd0, n, 5'd0};   // bit length, low word
    else                            pad_word = '0;                // zeros and high word
  end

  logic from_a, load_word;
  assign from_a    = gi < {1'b0, n};
  assign load_word = (st == M_LOAD) && (!from_a || ci.a_valid);

  // one MD5 step
  word_t f, g_word, step_b;
  logic [3:0] g;
  always_comb begin
    unique case (rnd[5:4])
      2'd0: begin f = (rb & rc) | (~rb & rd); g = rnd[3:0]; end
      2'd1: begin f = (rd & rb) | (~rd & rc); g = 4'(5 * rnd + 1); end
      2'd2: begin f = rb ^ rc ^ rd;           g = 4'(3 * rnd + 5); end
      default: begin f = rc ^ (rb | ~rd);     g = 4'(7 * rnd); end
    endcase
    g_word = m[g];
    step_b = rb + rotl(f + ra + K[rnd] + g_word, shift_of(rnd));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      for (int i = 0; i < 16; i++) m[i] <= '0;
      a0 <= '0; b0 <= '0; c0 <= '0; d0 <= '0;
      ra <= '0; rb <= '0; rc <= '0; rd <= '0;
      n <= '0; gi <= '0; total <= '0; rnd <= '0; oi <= '0;
    end else if (ci.start) begin
      n     <= ci.a_len;
      total <= (({1'b0, ci.a_len} + (LEN_W+1)'(3 + 15)) >> 4) << 4;
      gi    <= '0;
      a0 <= 32'h6745_2301; b0 <= 32'hefcd_ab89; c0 <= 32'h98ba_dcfe; d0 <= 32'h1032_5476;
      oi    <= '0;
      st    <= (ci.subop == '0) ? M_LOAD : M_DONE;
    end else begin
      unique case (st)
        M_LOAD: if (load_word) begin
          m[gi[3:0]] <= from_a ? ci.a_data : pad_word;
          gi         <= gi + 1'b1;
          if (gi[3:0] == 4'd15) begin
            ra <= a0; rb <= b0; rc <= c0; rd <= d0;
            rnd <= '0;
            st  <= M_ROUND;
          end
        end
        M_ROUND: begin
          ra <= rd; rd <= rc; rc <= rb; rb <= step_b;
          rnd <= rnd + 1'b1;
          if (rnd == 6'd63) begin
            a0 <= a0 + rd; b0 <= b0 + step_b; c0 <= c0 + rb; d0 <= d0 + rc;
            st <= (gi == total) ? M_OUT : M_LOAD;
          end
        end
        M_OUT: if (ci.c_ready) begin
          oi <= oi + 1'b1;
          if (oi == 2'd3) st <= M_DONE;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    co         = CKT_IDLE;
    co.a_ready = load_word && from_a;
    co.c_valid = (st == M_OUT);
    unique case (oi)
      2'd0:    co.c_data = a0;
      2'd1:    co.c_data = b0;
      2'd2:    co.c_data = c0;
      default: co.c_data = d0;
    endcase
    co.done    = (st == M_DONE);
  end

endmodule
