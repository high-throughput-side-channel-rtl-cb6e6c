// masked_r_core: 128-bit masked R function, pipelined, latency R_LAT = 2.
//
// R(x) = MixColumns(ShiftRows(SubBytes(x))). The input block arrives as two
// Boolean shares; sixteen tsm_sbox gadgets form the masked S-box layer and
// the linear part is then applied to each share separately, so the shares are
// never combined outside the gadgets. The gadget registers are the only
// pipeline registers: an input given in cycle t appears at the output, as two
// shares, in cycle t+2 (combinationally after the stage-2 registers). A new
// input may be given every cycle.
//
// Ports: in_sh0/in_sh1 (input shares), rnd (CORE_RND = 16*46 = 736 fresh
// bits per cycle, 46 per byte, byte k using rnd[46k +: 46]), out_sh0/out_sh1.
// The sixteen parallel 8-bit gadgets, the 736 random bits per invocation and
// the two-cycle latency with initiation interval 1 follow the published
// design; the linear layer of R (ShiftRows then MixColumns) is this design's
// choice.
module masked_r_core
  import lol_pkg::*;
(
  input  logic                clk,
  input  blk_t                in_sh0,
  input  blk_t                in_sh1,
  input  logic [CORE_RND-1:0] rnd,
  output blk_t                out_sh0,
  output blk_t                out_sh1
);

  blk_t sb_sh0, sb_sh1;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    tsm_sbox u_sbox (
      .clk  (clk),
      .x_sh0(in_sh0[8*k +: 8]),
      .x_sh1(in_sh1[8*k +: 8]),
      .rnd  (rnd[SBOX_RND*k +: SBOX_RND]),
      .y_sh0(sb_sh0[8*k +: 8]),
      .y_sh1(sb_sh1[8*k +: 8])
    );
  end

  always_comb begin
    out_sh0 = r_linear(sb_sh0);
    out_sh1 = r_linear(sb_sh1);
  end

endmodule
