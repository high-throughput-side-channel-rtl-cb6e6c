// lol_pkg: types, constants and pure functions shared by the LOL2.0-Mini
// engines.
//
// Holds the 128-bit block type, the state records of the encryption state S
// (L, H, N, S0, S1, S2 plus the intermediate register G) and of the
// authentication state E (E0..E3), the enums for mode, architecture,
// schedule items, schedule lists and phases, and the linear building blocks:
//   * lambda() and sigma(), the two halves of the LFSR feedback
//     f(H, L) = lambda(H) xor sigma(L). Both work on eight 16-bit words,
//     word 7 in bits 127:112 and word 0 in bits 15:0; the word-level shifts
//     are logical (zero-filling) shifts inside each 16-bit word.
//   * the AES S-box (multiplicative inverse in GF(2^8) modulo
//     x^8+x^4+x^3+x+1 followed by the AES affine map), ShiftRows and
//     MixColumns. The round function R used here is
//     R(x) = MixColumns(ShiftRows(SubBytes(x))), an AES round without the key
//     addition; bytes are numbered from the most significant end, byte 4c+r
//     being row r of column c.
// lambda, sigma, the 128-bit register sizes, the 256-bit key, the 128-bit IV
// and the use of the AES S-box inside R follow the published LOL2.0 hardware
// description; the linear part of R (ShiftRows, MixColumns) is this design's
// choice.
package lol_pkg;

  typedef logic [127:0] blk_t;

  // Encryption state S with the intermediate register G.
  typedef struct packed {
    blk_t l;
    blk_t h;
    blk_t n;
    blk_t s0;
    blk_t s1;
    blk_t s2;
    blk_t g;
  } sstate_t;

  // Authentication state E.
  typedef struct packed {
    blk_t e0;
    blk_t e1;
    blk_t e2;
    blk_t e3;
  } estate_t;

  typedef enum logic {MODE_SC = 1'b0, MODE_AEAD = 1'b1} mode_e;
  typedef enum logic {ARCH_COMPACT = 1'b0, ARCH_FAST = 1'b1} arch_e;

  // What one R core is given in one cycle.
  typedef enum logic [3:0] {
    IT_NONE = 4'd0,
    IT_S2   = 4'd1,
    IT_S1   = 4'd2,
    IT_S0   = 4'd3,
    IT_N    = 4'd4,
    IT_G    = 4'd5,
    IT_E0   = 4'd6,
    IT_E1   = 4'd7,
    IT_E2   = 4'd8,
    IT_E3   = 4'd9
  } item_e;
  localparam int unsigned NITEMS = 10;

  // Schedule lists: initialization/tag generation, SC keystream, AEAD
  // keystream, and E-only absorption (associated data, length block).
  typedef enum logic [1:0] {
    LIST_INIT = 2'd0,
    LIST_SC   = 2'd1,
    LIST_AEAD = 2'd2,
    LIST_EABS = 2'd3
  } list_e;

  typedef enum logic [3:0] {
    PH_IDLE = 4'd0,
    PH_LOAD = 4'd1,
    PH_INIT = 4'd2,
    PH_COPY = 4'd3,
    PH_AD   = 4'd4,
    PH_MSG  = 4'd5,
    PH_LEN  = 4'd6,
    PH_FINX = 4'd7,
    PH_FIN  = 4'd8
  } phase_e;

  // Fresh random bits consumed by one masked S-box gadget per invocation.
  localparam int unsigned SBOX_RND = 46;
  // Fresh random bits consumed by one 128-bit masked R core per cycle.
  localparam int unsigned CORE_RND = 16 * SBOX_RND;
  // Latency of a masked R core in cycles.
  localparam int unsigned R_LAT = 2;

  // ---------------------------------------------------------------- LFSR
  function automatic logic [15:0] w16(input blk_t x, input int unsigned i);
    return x[16*i +: 16];
  endfunction

  function automatic blk_t lambda(input blk_t x);
    logic [15:0] h [8];
    for (int i = 0; i < 8; i++) h[i] = w16(x, i);
    return {(h[7] << 5) ^ (h[6] >> 11),
            (h[6] << 5),
            (h[5] << 5) ^ (h[4] >> 11),
            (h[4] >> 6),
            (h[3] >> 6),
            (h[2] << 5),
            (h[1] << 5) ^ (h[0] >> 11),
            (h[0] >> 6)};
  endfunction

  function automatic blk_t sigma(input blk_t x);
    logic [15:0] w [8];
    for (int i = 0; i < 8; i++) w[i] = w16(x, i);
    return {w[5], w[0], w[3], w[6], w[4], w[7], w[2], w[1]};
  endfunction

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = gf_mul(a, a);
    a4   = gf_mul(a2, a2);
    a8   = gf_mul(a4, a4);
    a16  = gf_mul(a8, a8);
    a32  = gf_mul(a16, a16);
    a64  = gf_mul(a32, a32);
    a128 = gf_mul(a64, a64);
    return gf_mul(gf_mul(gf_mul(a2, a4), gf_mul(a8, a16)),
                  gf_mul(gf_mul(a32, a64), a128));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // ---------------------------------------------------------------- R linear part
  function automatic logic [7:0] byte_of(input blk_t x, input int unsigned k);
    return x[127 - 8*k -: 8];
  endfunction

  function automatic blk_t shift_rows(input blk_t x);
    blk_t y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = byte_of(x, 4*((c + r) % 4) + r);
    return y;
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] col);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic blk_t mix_columns(input blk_t x);
    blk_t y;
    for (int c = 0; c < 4; c++)
      y[127 - 32*c -: 32] = mix_column(x[127 - 32*c -: 32]);
    return y;
  endfunction

  // Linear part of R, applied after the S-box layer.
  function automatic blk_t r_linear(input blk_t x);
    return mix_columns(shift_rows(x));
  endfunction

endpackage
