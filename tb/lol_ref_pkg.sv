// lol_ref_pkg: software reference model of the cipher, for testbenches only.
//
// Written independently of the RTL helpers: the S-box table is built by
// searching for each inverse and applying the affine map as rotations, R works
// on a 4x4 byte matrix, and the round, load, copy and feedback steps are
// restated from the specification in the RTL headers. lol_ref_model runs a
// whole operation (SC or AEAD) and returns the ciphertext blocks and the tag.
package lol_ref_pkg;

  typedef logic [127:0] b128_t;
  typedef b128_t        bq_t [$];

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv;
    inv = 8'h00;
    if (a != 0)
      for (int c = 1; c < 256; c++) if (gmul(a, 8'(c)) == 8'h01) inv = 8'(c);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  class lol_ref_model;
    logic [7:0] tbl [256];
    // state
    b128_t L, H, N, S0, S1, S2, G;
    b128_t E0, E1, E2, E3;

    function new();
      for (int i = 0; i < 256; i++) tbl[i] = ref_sbox(8'(i));
    endfunction

    function b128_t R(input b128_t x);
      logic [7:0] m [4][4];   // m[row][col]
      logic [7:0] t [4][4];
      b128_t y;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          m[r][c] = tbl[x[127 - 8*(4*c + r) -: 8]];
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          t[r][c] = m[r][(c + r) % 4];
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          y[127 - 8*(4*c + r) -: 8] = gmul(8'h02, t[r][c]) ^ gmul(8'h03, t[(r+1)%4][c])
                                     ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
      return y;
    endfunction

    static function b128_t lam(input b128_t x);
      logic [31:0] p;
      b128_t y;
      // word i of x is x[16i+15:16i]
      p = x[127:96];                       // words 7,6
      y[127:112] = 16'((p << 5) >> 16);    // (h7<<5) ^ (h6>>11) as a 32-bit shift
      y[111:96]  = {x[106:96], 5'b0};
      p = x[95:64];                        // words 5,4
      y[95:80]   = 16'((p << 5) >> 16);
      y[79:64]   = {6'b0, x[79:70]};
      y[63:48]   = {6'b0, x[63:54]};
      y[47:32]   = {x[42:32], 5'b0};
      p = x[31:0];                         // words 1,0
      y[31:16]   = 16'((p << 5) >> 16);
      y[15:0]    = {6'b0, x[15:6]};
      return y;
    endfunction

    static function b128_t sig(input b128_t x);
      int src [8] = '{1, 2, 7, 4, 6, 3, 0, 5};  // output word i takes x word src[i]
      b128_t y;
      for (int i = 0; i < 8; i++) y[16*i +: 16] = x[16*src[i] +: 16];
      return y;
    endfunction

    function void load(input logic [255:0] key, input b128_t iv);
      L = iv; H = key[127:0]; N = key[255:128];
      S0 = '0; S1 = '0; S2 = '0; G = '0;
      E0 = '0; E1 = '0; E2 = '0; E3 = '0;
    endfunction

    // One round; returns Z.
    function b128_t round(input bit fb, input bit us, input bit ue, input b128_t x);
      b128_t rs2, rs1, rs0, rn, rg, re0, re1, re2, re3, z, f;
      b128_t nL, nH;
      rs2 = R(S2); rs1 = R(S1); rs0 = R(S0); rn = R(N); rg = R(G);
      re0 = R(E0); re1 = R(E1); re2 = R(E2); re3 = R(E3);
      z = rg ^ S1 ^ L;
      f = fb ? z : '0;
      if (ue) begin
        {E0, E1, E2, E3} = {re3 ^ x, re0 ^ E2, re1 ^ E3, re2 ^ E0};
      end
      if (us) begin
        nL = H ^ f;
        nH = lam(H) ^ sig(L) ^ f;
        {S2, S1, S0, N, G} = {rs1 ^ L, rs0 ^ H, rn ^ S2, N ^ rg, rs2 ^ H};
        L = nL; H = nH;
      end
      return z;
    endfunction

    // Whole operation. For SC mode ad is ignored and tag is left 0.
    function void run(input bit aead, input int n_init, input int n_fin,
                      input logic [255:0] key, input b128_t iv,
                      input bq_t ad, input bq_t msg,
                      output bq_t ct, output b128_t tag);
      b128_t z;
      ct = {};
      tag = '0;
      load(key, iv);
      for (int i = 0; i < n_init; i++) void'(round(1, 1, 0, '0));
      if (aead) begin
        {E0, E1, E2, E3} = {S0, S1, S2, N};
        foreach (ad[i]) void'(round(0, 0, 1, ad[i]));
      end
      foreach (msg[i]) begin
        z = round(0, 1, aead, msg[i]);
        ct.push_back(msg[i] ^ z);
      end
      if (aead) begin
        void'(round(0, 0, 1, {64'(ad.size()) * 64'd128, 64'(msg.size()) * 64'd128}));
        S0 ^= E0; S1 ^= E1; S2 ^= E2; N ^= E3;
        for (int i = 0; i < n_fin; i++) tag = round(1, 1, 0, '0);
      end
    endfunction
  endclass

endpackage
