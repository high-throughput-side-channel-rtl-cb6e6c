// lol2_top: the LOL2.0-Mini style engines side by side.
//
// The design space has three engines that share no logic and run
// independently on the common clock and reset, each with its own ports:
//   m_*   lol2_masked, the first-order masked engine (main design), in the
//         fast architecture by default (ARCH_COMPACT selects the one-core
//         variant); two-share key and keystream, NCORES * 736 random bits
//         per cycle on m_rnd
//   uf_*  lol2_unmasked_fast, one round per cycle
//   uc_*  lol2_unmasked_compact, three 32-bit R units
// All three compute the same cipher, so for the same key, IV and data they
// return the same ciphertext and tag; only their timing differs. The port
// meanings and timing are those of the engines (see their headers). N_INIT,
// N_FIN and CNT_W apply to all three.
module lol2_top
  import lol_pkg::*;
#(
  parameter arch_e       ARCH   = ARCH_FAST,
  parameter int unsigned N_INIT = 12,
  parameter int unsigned N_FIN  = 12,
  parameter int unsigned CNT_W  = 32,
  localparam int unsigned RND_W = ((ARCH == ARCH_FAST) ? 5 : 1) * CORE_RND
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             m_start,
  input  mode_e            m_mode_i,
  input  blk_t             m_iv,
  input  logic [CNT_W-1:0] m_ad_blocks_i,
  input  logic [CNT_W-1:0] m_msg_blocks_i,
  input  blk_t             m_din,
  input  logic             m_din_valid,
  output logic             m_din_ready,
  output blk_t             m_dout,
  output logic             m_dout_valid,
  output blk_t             m_tag,
  output logic             m_tag_valid,
  output logic             m_busy,
  output logic             m_done,
  input  logic [255:0]     m_key_sh0,
  input  logic [255:0]     m_key_sh1,
  output blk_t             m_z_sh0,
  output blk_t             m_z_sh1,
  input  logic [RND_W-1:0] m_rnd,
  input  logic             uf_start,
  input  mode_e            uf_mode_i,
  input  blk_t             uf_iv,
  input  logic [CNT_W-1:0] uf_ad_blocks_i,
  input  logic [CNT_W-1:0] uf_msg_blocks_i,
  input  blk_t             uf_din,
  input  logic             uf_din_valid,
  output logic             uf_din_ready,
  output blk_t             uf_dout,
  output logic             uf_dout_valid,
  output blk_t             uf_tag,
  output logic             uf_tag_valid,
  output logic             uf_busy,
  output logic             uf_done,
  input  logic [255:0]     uf_key,
  output blk_t             uf_z,
  input  logic             uc_start,
  input  mode_e            uc_mode_i,
  input  blk_t             uc_iv,
  input  logic [CNT_W-1:0] uc_ad_blocks_i,
  input  logic [CNT_W-1:0] uc_msg_blocks_i,
  input  blk_t             uc_din,
  input  logic             uc_din_valid,
  output logic             uc_din_ready,
  output blk_t             uc_dout,
  output logic             uc_dout_valid,
  output blk_t             uc_tag,
  output logic             uc_tag_valid,
  output logic             uc_busy,
  output logic             uc_done,
  input  logic [255:0]     uc_key,
  output blk_t             uc_z
);

  lol2_masked #(.ARCH(ARCH), .N_INIT(N_INIT), .N_FIN(N_FIN), .CNT_W(CNT_W)) u_masked (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (m_start),
    .mode_i       (m_mode_i),
    .iv           (m_iv),
    .ad_blocks_i  (m_ad_blocks_i),
    .msg_blocks_i (m_msg_blocks_i),
    .din          (m_din),
    .din_valid    (m_din_valid),
    .din_ready    (m_din_ready),
    .dout         (m_dout),
    .dout_valid   (m_dout_valid),
    .tag          (m_tag),
    .tag_valid    (m_tag_valid),
    .busy         (m_busy),
    .done         (m_done),
    .key_sh0      (m_key_sh0),
    .key_sh1      (m_key_sh1),
    .z_sh0        (m_z_sh0),
    .z_sh1        (m_z_sh1),
    .rnd          (m_rnd)
  );

  lol2_unmasked_fast #(.N_INIT(N_INIT), .N_FIN(N_FIN), .CNT_W(CNT_W)) u_unmasked_fast (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (uf_start),
    .mode_i       (uf_mode_i),
    .iv           (uf_iv),
    .ad_blocks_i  (uf_ad_blocks_i),
    .msg_blocks_i (uf_msg_blocks_i),
    .din          (uf_din),
    .din_valid    (uf_din_valid),
    .din_ready    (uf_din_ready),
    .dout         (uf_dout),
    .dout_valid   (uf_dout_valid),
    .tag          (uf_tag),
    .tag_valid    (uf_tag_valid),
    .busy         (uf_busy),
    .done         (uf_done),
    .key          (uf_key),
    .z            (uf_z)
  );

  lol2_unmasked_compact #(.N_INIT(N_INIT), .N_FIN(N_FIN), .CNT_W(CNT_W)) u_unmasked_compact (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (uc_start),
    .mode_i       (uc_mode_i),
    .iv           (uc_iv),
    .ad_blocks_i  (uc_ad_blocks_i),
    .msg_blocks_i (uc_msg_blocks_i),
    .din          (uc_din),
    .din_valid    (uc_din_valid),
    .din_ready    (uc_din_ready),
    .dout         (uc_dout),
    .dout_valid   (uc_dout_valid),
    .tag          (uc_tag),
    .tag_valid    (uc_tag_valid),
    .busy         (uc_busy),
    .done         (uc_done),
    .key          (uc_key),
    .z            (uc_z)
  );

endmodule
