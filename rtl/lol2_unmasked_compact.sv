// lol2_unmasked_compact: unmasked LOL2.0-Mini style engine built around
// three 32-bit R units (twelve AES S-boxes in all).
//
// A round needs R of five registers (S2, S1, S0, N, G) in SC mode and of
// nine (E3, E0, E1, E2 as well) in AEAD mode. Each 128-bit R is split into
// its four output columns, giving 20 or 36 column jobs per round; the three
// lol_r_col units take jobs in list order, three per cycle, and write the
// columns into a result buffer. In the last cycle of the round the linear
// update reads the buffer, with that cycle's columns forwarded, and the new
// state is written. A round therefore takes ceil(jobs / 3) cycles: 7 for
// initialization, SC keystream and tag generation, 12 for AEAD keystream,
// 6 for the E-only absorption of AD and length blocks.
//
// Interface and phases are those of lol2_unmasked_fast: a round may start
// when its phase allows it and, for AD and message blocks, din_valid is high
// (the block is accepted in the round's first cycle). dout/z and tag come one
// cycle after the round's last cycle. rst_n is asynchronous, active low.
//
// The three 32-bit R units and the time-multiplexed schedule follow the
// published unmasked-compact architecture, and the AEAD round of 12 cycles
// matches it; the published SC round takes 8 cycles where this one takes 7,
// because the round wiring here (see lol_linear_update) has no dependency
// between R results of one round. Round wiring, job order and
// N_INIT = N_FIN = 12 (inferred from the published short-message cycle counts)
// are this design's choices.
module lol2_unmasked_compact
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

  localparam int unsigned NUNITS = 3;

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

  mode_e unused_mode;
  assign unused_mode = mode;

  // Items of each list in job order (four column jobs per item).
  localparam item_e SEQ_S [5] = '{IT_S2, IT_S1, IT_S0, IT_N, IT_G};
  localparam item_e SEQ_A [9] = '{IT_E3, IT_E0, IT_E1, IT_E2, IT_S2, IT_S1, IT_S0, IT_N, IT_G};

  logic [3:0] n_items, n_cycles;
  always_comb begin
    unique case (list)
      LIST_AEAD: n_items = 4'd9;
      LIST_EABS: n_items = 4'd4;
      default:   n_items = 4'd5;
    endcase
    n_cycles = 4'((4 * n_items + NUNITS - 1) / NUNITS);
  end

  function automatic item_e item_of(input list_e l, input logic [5:0] job);
    logic [3:0] idx;
    idx = 4'(job >> 2);
    unique case (l)
      LIST_AEAD: return (idx < 9) ? SEQ_A[idx] : IT_NONE;
      LIST_EABS: return (idx < 4) ? SEQ_A[idx] : IT_NONE;
      default:   return (idx < 5) ? SEQ_S[idx[2:0]] : IT_NONE;
    endcase
  endfunction

  // ---------------------------------------------------------------- sequencing
  logic       running, round_start;
  logic [3:0] cyc, grp;

  assign round_start = round_en && !running && (!need_data || din_valid);
  assign din_ready   = round_en && !running && need_data;
  assign grp         = running ? cyc : 4'd0;
  assign round_done  = running ? (cyc == n_cycles - 4'd1) : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cyc     <= '0;
    end else if (round_start) begin
      running <= 1'b1;
      cyc     <= 4'd1;
    end else if (round_done) begin
      running <= 1'b0;
      cyc     <= '0;
    end else if (running) begin
      cyc <= cyc + 4'd1;
    end
  end

  // ---------------------------------------------------------------- state and R units
  sstate_t s_q, s_next;
  estate_t e_q, e_next;
  blk_t    x_q, z_c;
  blk_t    [NITEMS-1:0] res_q, res;

  function automatic blk_t pick(input item_e it, input sstate_t s, input estate_t e);
    unique case (it)
      IT_S2:   return s.s2;
      IT_S1:   return s.s1;
      IT_S0:   return s.s0;
      IT_N:    return s.n;
      IT_G:    return s.g;
      IT_E0:   return e.e0;
      IT_E1:   return e.e1;
      IT_E2:   return e.e2;
      IT_E3:   return e.e3;
      default: return '0;
    endcase
  endfunction

  item_e       [NUNITS-1:0] u_item;
  logic [NUNITS-1:0][1:0]  u_col;
  logic [NUNITS-1:0][31:0] u_in, u_out;

  for (genvar u = 0; u < NUNITS; u++) begin : g_unit
    logic [5:0] job;
    blk_t       src;
    assign job       = 6'(grp * NUNITS + u);
    assign u_item[u] = (running || round_start) ? item_of(list, job) : IT_NONE;
    assign u_col[u]  = job[1:0];
    assign src       = pick(u_item[u], s_q, e_q);
    // ShiftRows gather: row r of output column c from byte 4*((c+r)%4)+r.
    for (genvar r = 0; r < 4; r++) begin : g_row
      logic [1:0] sc;
      assign sc = 2'(u_col[u] + 2'(r));
      assign u_in[u][31 - 8*r -: 8] = src[127 - 8*(4*sc + r) -: 8];
    end
    lol_r_col u_r (.in_col(u_in[u]), .out_col(u_out[u]));
  end

  always_comb begin
    res = res_q;
    for (int u = 0; u < NUNITS; u++)
      if (u_item[u] != IT_NONE) res[u_item[u]][127 - 32*u_col[u] -: 32] = u_out[u];
  end

  always_ff @(posedge clk) res_q <= res;

  lol_linear_update u_lin (
    .s(s_q), .e(e_q), .a_s2(res[IT_S2]), .a_s1(res[IT_S1]), .a_s0(res[IT_S0]),
    .a_n(res[IT_N]), .a_g(res[IT_G]), .b_e0(res[IT_E0]), .b_e1(res[IT_E1]),
    .b_e2(res[IT_E2]), .b_e3(res[IT_E3]), .x(x_q), .fb, .upd_s, .upd_e,
    .s_next, .e_next, .z(z_c)
  );

  always_ff @(posedge clk) begin
    if (round_start)
      x_q <= x_len ? {64'(ad_blocks) << 7, 64'(msg_blocks) << 7} : (need_data ? din : '0);
    if (load) begin
      s_q <= '{l: iv, h: key[127:0], n: key[255:128], default: '0};
      e_q <= '0;
    end else if (copy) begin
      e_q <= '{e0: s_q.s0, e1: s_q.s1, e2: s_q.s2, e3: s_q.n};
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
        dout <= x_q ^ z_c;
        z    <= z_c;
      end
      if (round_done && last_round) tag <= z_c;
    end
  end

endmodule
