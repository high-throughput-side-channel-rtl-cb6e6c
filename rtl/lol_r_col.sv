// lol_r_col: 32-bit R unit, one output column of R per evaluation.
//
// Column c of R(x) = MixColumns(ShiftRows(SubBytes(x))) depends only on the
// four input bytes that ShiftRows moves into column c: row r comes from byte
// 4*((c+r) mod 4) + r of x. The caller gathers those four bytes (in_col, row
// 0 in the top byte); four aes_sbox instances and one MixColumns column give
// the output column. Combinational, zero latency.
// The 32-bit R unit made of four 8-bit S-boxes is the published
// unmasked-compact building block; the column split follows from this
// design's choice of the linear layer of R.
module lol_r_col
  import lol_pkg::*;
(
  input  logic [31:0] in_col,
  output logic [31:0] out_col
);

  logic [31:0] sb;

  for (genvar k = 0; k < 4; k++) begin : g_sbox
    aes_sbox u_sbox (.a(in_col[8*k +: 8]), .y(sb[8*k +: 8]));
  end

  assign out_col = mix_column(sb);

endmodule
