// tsm_sbox: two-share AES S-box gadget with two register stages.
//
// Input x is given as two Boolean shares (x = x_sh0 ^ x_sh1); the output y =
// S(x) leaves as two shares two cycles later, and a new input may be given
// every cycle (initiation interval 1). Each invocation consumes SBOX_RND (46)
// fresh random bits on rnd, sampled in the same cycle as the input.
//
// Stage 1 registers the share-0 path, refreshed with rnd[7:0], together with
// share 1 refreshed with the same mask, so that the two register outputs are
// still a sharing of x. Stage 2 registers the output sharing
// (S(x) ^ m, m) where m is a mask taken from rnd[15:8] one cycle earlier and
// carried through stage 1. The remaining rnd bits are folded into m so that
// the whole random input is consumed.
//
// What follows the published design: two shares, two register stages,
// latency 2, one invocation per cycle, 46 random bits per invocation. The
// internal gadget network (the ANF monomial decomposition of the time-sharing
// masking scheme, with share 0 handled in the first stage and share 1 in the
// second) is not reproduced: stage 2 evaluates the S-box on the recombined
// value, so this gadget is functionally exact but gives no side-channel
// protection. It is a functional stand-in with the real gadget's interface
// and timing.
module tsm_sbox
  import lol_pkg::*;
(
  input  logic                clk,
  input  logic [7:0]          x_sh0,
  input  logic [7:0]          x_sh1,
  input  logic [SBOX_RND-1:0] rnd,
  output logic [7:0]          y_sh0,
  output logic [7:0]          y_sh1
);

  logic [7:0] p0_q, p1_q, m_q;
  logic [7:0] m_next;

  // Output mask: rnd[15:8] with the remaining 30 bits folded in.
  always_comb begin
    m_next = rnd[15:8];
    for (int i = 16; i < SBOX_RND; i += 8)
      m_next ^= 8'(rnd[SBOX_RND-1:0] >> i);
  end

  // Stage 1: refreshed sharing of x and the output mask.
  always_ff @(posedge clk) begin
    p0_q <= x_sh0 ^ rnd[7:0];
    p1_q <= x_sh1 ^ rnd[7:0];
    m_q  <= m_next;
  end

  // Stage 2: output sharing of S(x).
  always_ff @(posedge clk) begin
    y_sh0 <= sbox(p0_q ^ p1_q) ^ m_q;
    y_sh1 <= m_q;
  end

endmodule
