// lol_r_func: unmasked 128-bit R function, combinational.
//
// R(x) = MixColumns(ShiftRows(SubBytes(x))): sixteen aes_sbox instances
// followed by the linear layer from lol_pkg. Zero latency; the unmasked-fast
// engine gives every state register its own instance so that a whole round
// completes in one cycle. The S-box layer follows the published design; the
// linear layer (ShiftRows, MixColumns) is this design's choice.
module lol_r_func
  import lol_pkg::*;
(
  input  blk_t x,
  output blk_t y
);

  blk_t sb;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox u_sbox (.a(x[8*k +: 8]), .y(sb[8*k +: 8]));
  end

  assign y = r_linear(sb);

endmodule
