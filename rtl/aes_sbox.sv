// aes_sbox: unmasked 8-bit AES S-box, purely combinational.
//
// The output is the AES affine map applied to the multiplicative inverse of
// the input in GF(2^8) (polynomial x^8+x^4+x^3+x+1, 0 maps to 0); the
// arithmetic lives in lol_pkg::sbox(). It is the nonlinear element of the
// unmasked R function: four of them form a 32-bit R column unit, sixteen a
// full 128-bit R.
//
// Ports: a (input byte), y (S-box output byte). No clock; zero latency.
// The S-box itself is the AES standard one that LOL2.0 embeds in R; writing
// it as inversion plus affine map instead of a table is this design's choice.
module aes_sbox
  import lol_pkg::*;
(
  input  logic [7:0] a,
  output logic [7:0] y
);

  always_comb y = sbox(a);

endmodule
