// lol2_unmasked_fast: unmasked LOL2.0-Mini style engine, one round per
// cycle.
//
// Every register that goes through R in a round (S2, S1, S0, N, G and, in
// AEAD mode, E0..E3) has its own combinational lol_r_func, so the whole
// round, R functions and linear update, is evaluated in a single cycle and
// the state is written at the end of it. It computes exactly the same round,
// phases and outputs as lol2_masked, on unshared values.
//
// Interface: as lol2_masked, with a plain key and a plain keystream z and no
// randomness input. A round starts in any cycle in which its phase allows it
// (and, for AD and message blocks, din_valid is high, the block being
// accepted in that cycle) and ends in the same cycle; dout/z (dout_valid) and
// tag (tag_valid) appear one cycle later. rst_n is asynchronous, active low,
// and clears the control state.
//
// The one-cycle round with a dedicated R per state register is the published
// unmasked-fast architecture; the round wiring, phase details and N_INIT =
// N_FIN = 12 (inferred from the published cycle counts) are this design's choices, as in lol2_masked.
module lol2_unmasked_fast
  import lol_pkg::*;
#(
  parameter int unsigned N_INIT = 12,
  parameter int unsigned N_FIN  = 12,
  parameter int unsigned CNT_W  = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mode_e            mode_i,
  input  logic [255:0]     key,
  input  blk_t             iv,
  input  logic [CNT_W-1:0] ad_blocks_i,
  input  logic [CNT_W-1:0] msg_blocks_i,
  input  blk_t             din,
  input  logic             din_valid,
  output logic             din_ready,
  output blk_t             dout,
  output logic             dout_valid,
  output blk_t             z,
  output blk_t             tag,
  output logic             tag_valid,
  output logic             busy,
  output logic             done
);

  phase_e           phase;
  mode_e            mode;
  logic [CNT_W-1:0] ad_blocks, msg_blocks;
  logic             round_en, fb, upd_s, upd_e, need_data, x_len;
  logic             load, copy, finx, last_round;
  list_e            list;
  logic             round_done;

  lol_phase_ctrl #(.N_INIT(N_INIT), .N_FIN(N_FIN), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .mode_i, .ad_blocks_i, .msg_blocks_i, .round_done,
    .phase, .mode, .ad_blocks, .msg_blocks, .round_en, .list, .fb, .upd_s,
    .upd_e, .need_data, .x_len, .load, .copy, .finx, .last_round, .more(), .busy, .done
  );

  // The schedule list only matters to the multi-cycle engines.
  list_e unused_list;
  mode_e unused_mode;
  assign unused_list = list;
  assign unused_mode = mode;

  assign round_done = round_en && (!need_data || din_valid);
  assign din_ready  = round_en && need_data;

  sstate_t s_q, s_next;
  estate_t e_q, e_next;
  blk_t    x, z_c;
  blk_t    a_s2, a_s1, a_s0, a_n, a_g, b_e0, b_e1, b_e2, b_e3;

  assign x = x_len ? {64'(ad_blocks) << 7, 64'(msg_blocks) << 7}
                   : (need_data ? din : '0);

  lol_r_func u_r_s2 (.x(s_q.s2), .y(a_s2));
  lol_r_func u_r_s1 (.x(s_q.s1), .y(a_s1));
  lol_r_func u_r_s0 (.x(s_q.s0), .y(a_s0));
  lol_r_func u_r_n  (.x(s_q.n),  .y(a_n));
  lol_r_func u_r_g  (.x(s_q.g),  .y(a_g));
  lol_r_func u_r_e0 (.x(e_q.e0), .y(b_e0));
  lol_r_func u_r_e1 (.x(e_q.e1), .y(b_e1));
  lol_r_func u_r_e2 (.x(e_q.e2), .y(b_e2));
  lol_r_func u_r_e3 (.x(e_q.e3), .y(b_e3));

  lol_linear_update u_lin (
    .s(s_q), .e(e_q), .a_s2, .a_s1, .a_s0, .a_n, .a_g, .b_e0, .b_e1, .b_e2,
    .b_e3, .x, .fb, .upd_s, .upd_e, .s_next, .e_next, .z(z_c)
  );

  always_ff @(posedge clk) begin
    if (load) begin
      s_q    <= '{l: iv, h: key[127:0], n: key[255:128], default: '0};
      e_q    <= '0;
    end else if (copy) begin
      e_q    <= '{e0: s_q.s0, e1: s_q.s1, e2: s_q.s2, e3: s_q.n};
    end else if (finx) begin
      s_q.s0 <= s_q.s0 ^ e_q.e0;
      s_q.s1 <= s_q.s1 ^ e_q.e1;
      s_q.s2 <= s_q.s2 ^ e_q.e2;
      s_q.n  <= s_q.n  ^ e_q.e3;
    end else if (round_done) begin
      s_q <= s_next;
      e_q <= e_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      tag_valid  <= 1'b0;
      dout       <= '0;
      z          <= '0;
      tag        <= '0;
    end else begin
      dout_valid <= round_done && (phase == PH_MSG);
      tag_valid  <= round_done && last_round;
      if (round_done && phase == PH_MSG) begin
        dout <= x ^ z_c;
        z    <= z_c;
      end
      if (round_done && last_round) tag <= z_c;
    end
  end

endmodule
