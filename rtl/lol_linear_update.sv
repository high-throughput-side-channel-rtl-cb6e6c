// lol_linear_update: one round of the LOL2.0-style state update for a single
// share, purely combinational.
//
// The R outputs of the round (a_* for the registers of S and for G, b_* for
// the registers of E) are combined with the current state by XOR, lambda and
// sigma only, so the masked engine instantiates this block once per share
// and the two shares never meet. With R(.) the round function, per share:
//   Z   = R(G) ^ S1 ^ L                       keystream share
//   S2' = R(S1) ^ L       S1' = R(S0) ^ H      S0' = R(N) ^ S2
//   N'  = N ^ R(G)        G'  = R(S2) ^ H
//   L'  = H ^ fz          H'  = lambda(H) ^ sigma(L) ^ fz
//   E0' = R(E3) ^ x       E1' = R(E0) ^ E2     E2' = R(E1) ^ E3
//   E3' = R(E2) ^ E0
// where fz = Z when fb is set (initialization and tag generation feed the
// keystream back) and 0 otherwise, and x is the absorbed data block (the
// caller gives it to share 0 only). upd_s / upd_e select whether S and E take
// their new values; otherwise they are returned unchanged.
//
// Follows the published design: the register set, the LFSR pair (L, H) with
// feedback lambda(H) ^ sigma(L), R applied to S2, S1, S0, N, G and E0..E3
// once per round, G fed by an R output (two chained R invocations), keystream
// feedback into the state during initialization and tag generation, and
// data absorbed into E only. The exact XOR wiring above is this design's own:
// the LOL2.0-Mini round equations are not part of the hardware description
// this design follows, so keystreams
// from this engine are not LOL2.0-Mini keystreams.
module lol_linear_update
  import lol_pkg::*;
(
  input  sstate_t s,
  input  estate_t e,
  input  blk_t    a_s2,
  input  blk_t    a_s1,
  input  blk_t    a_s0,
  input  blk_t    a_n,
  input  blk_t    a_g,
  input  blk_t    b_e0,
  input  blk_t    b_e1,
  input  blk_t    b_e2,
  input  blk_t    b_e3,
  input  blk_t    x,
  input  logic    fb,
  input  logic    upd_s,
  input  logic    upd_e,
  output sstate_t s_next,
  output estate_t e_next,
  output blk_t    z
);

  blk_t fz;

  always_comb begin
    z  = a_g ^ s.s1 ^ s.l;
    fz = fb ? z : '0;

    s_next = s;
    if (upd_s) begin
      s_next.s2 = a_s1 ^ s.l;
      s_next.s1 = a_s0 ^ s.h;
      s_next.s0 = a_n ^ s.s2;
      s_next.n  = s.n ^ a_g;
      s_next.g  = a_s2 ^ s.h;
      s_next.l  = s.h ^ fz;
      s_next.h  = lambda(s.h) ^ sigma(s.l) ^ fz;
    end

    e_next = e;
    if (upd_e) begin
      e_next.e0 = b_e3 ^ x;
      e_next.e1 = b_e0 ^ e.e2;
      e_next.e2 = b_e1 ^ e.e3;
      e_next.e3 = b_e2 ^ e.e0;
    end
  end

endmodule
