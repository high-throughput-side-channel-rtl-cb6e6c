// lol2_masked: first-order masked LOL2.0-Mini style stream cipher / AEAD
// engine (top level).
//
// Every secret-dependent register is held as two Boolean shares: the
// encryption state S = (L, H, N, S0, S1, S2) with the intermediate register
// G, and in AEAD mode the authentication state E = (E0..E3). The nonlinear
// work is done by NCORES pipelined masked R cores (latency 2, a new input
// every cycle). Each cycle the scheduler names, per core, which register to
// feed it (input select); two cycles later the output select stores each
// core's result in the result register of that item. When the last result
// of a traversal arrives, the linear update network (one instance per share)
// combines the results with the state and the new state is written in the
// same cycle, two cycles after the last issue.
//
// Traversals of the same phase overlap where the schedule allows it: the
// next traversal starts in the cycle right after the last issue of the
// previous one, and its first two items are taken from the pending new state
// (the linear update's output), whose inputs have arrived by then. This holds
// for the initialization / tag-generation list and for the compact SC and
// AEAD lists, giving one traversal every n_steps cycles: 5 for
// initialization and tag generation, 5 for compact SC, 9 for compact AEAD.
// The fast SC and AEAD lists and the E-only list issue registers whose new
// values need results of the same traversal that are not out yet, so there
// the next traversal waits for the commit: n_steps + 2 cycles (4 for fast
// SC and AEAD). The first traversal of a
// phase, and one whose input block comes late, also starts after the commit.
//
// Interface (one operation at a time):
//   start with mode, key shares, IV and the block counts; these are sampled
//   at start and may change afterwards. AD and message blocks come in on
//   din with a valid/ready handshake, one block per traversal, accepted in
//   the cycle in which the traversal starts. For each message block the
//   engine returns, one cycle after its traversal commits, the ciphertext block
//   dout = din ^ Z (dout_valid) together with the keystream shares z_sh0,
//   z_sh1. In AEAD mode the tag follows with tag_valid after the tag
//   generation phase. done pulses when the operation's last traversal ends.
//   rnd must carry NCORES * 736 fresh random bits in every cycle.
//   Reset (rst_n, asynchronous, active low) clears the control state only;
//   the datapath registers are written by the LOAD step before any use.
//
// Follows the published design: share-split S and E registers, input and
// output select around the pipelined masked R cores, Reg G fed from the
// output select, the linear update with lambda and sigma, the schedule lists,
// one core (compact) or five cores (fast, three of them used in SC mode),
// 736 random bits per core per cycle, back-to-back traversals (5 / 9 cycles
// per block compact, 5 per initialization round). Own choices: the XOR wiring
// of the round (see lol_linear_update), the barrier before the first
// traversal of a phase and on the fast SC / AEAD lists (the published engine
// reaches 2 cycles per block there; this one takes 4), the load and
// length-block formats, the handshakes, and the defaults N_INIT = N_FIN = 12
// (inferred from the published cycle counts for short messages, which fit 12
// initialization and 12 tag rounds).
module lol2_masked
  import lol_pkg::*;
#(
  parameter arch_e       ARCH   = ARCH_FAST,
  parameter int unsigned N_INIT = 12,
  parameter int unsigned N_FIN  = 12,
  parameter int unsigned CNT_W  = 32,
  localparam int unsigned NCORES = (ARCH == ARCH_FAST) ? 5 : 1,
  localparam int unsigned RND_W  = NCORES * CORE_RND
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mode_e            mode_i,
  input  logic [255:0]     key_sh0,
  input  logic [255:0]     key_sh1,
  input  blk_t             iv,
  input  logic [CNT_W-1:0] ad_blocks_i,
  input  logic [CNT_W-1:0] msg_blocks_i,
  input  blk_t             din,
  input  logic             din_valid,
  output logic             din_ready,
  output blk_t             dout,
  output logic             dout_valid,
  output blk_t             z_sh0,
  output blk_t             z_sh1,
  output blk_t             tag,
  output logic             tag_valid,
  input  logic [RND_W-1:0] rnd,
  output logic             busy,
  output logic             done
);

  // ---------------------------------------------------------------- control
  phase_e           phase;
  mode_e            mode;
  logic [CNT_W-1:0] ad_blocks, msg_blocks;
  logic             round_en, fb, upd_s, upd_e, need_data, x_len;
  logic             load, copy, finx, last_round, more;
  list_e            list;
  logic             round_done;

  lol_phase_ctrl #(.N_INIT(N_INIT), .N_FIN(N_FIN), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .mode_i, .ad_blocks_i, .msg_blocks_i, .round_done,
    .phase, .mode, .ad_blocks, .msg_blocks, .round_en, .list, .fb, .upd_s,
    .upd_e, .need_data, .x_len, .load, .copy, .finx, .last_round, .more, .busy, .done
  );

  // ---------------------------------------------------------------- traversal sequencing
  // A traversal issues its list in steps 0..n_steps-1 (step 0 in the start
  // cycle) and commits two cycles after its last issue (lp2). The next
  // traversal of the same phase may start right after the last issue (lp1)
  // when the list allows it: its first two items then read the pending new
  // state (see the input select). Otherwise it starts after the commit.
  logic       iss;          // steps 1.. of a traversal are being issued
  logic [3:0] step;
  logic [3:0] n_steps;
  logic       lp1, lp2;     // the last issue was one / two cycles ago
  logic       overlap_ok, can_start, round_start, issuing, last_issue, fwd;
  logic [3:0] grp;
  item_e [NCORES-1:0] item;

  // Lists whose next traversal finds each of its first two items ready in
  // time (checked against the round equations of lol_linear_update).
  assign overlap_ok  = (list == LIST_INIT) ||
                       (ARCH == ARCH_COMPACT && (list == LIST_SC || list == LIST_AEAD));
  assign can_start   = (round_en && !iss && !lp1 && !lp2) || (lp1 && overlap_ok && more);
  assign round_start = can_start && (!need_data || din_valid);
  assign din_ready   = can_start && need_data;
  assign grp         = iss ? step : 4'd0;
  assign issuing     = round_start || iss;
  assign last_issue  = issuing && (grp == n_steps - 4'd1);
  assign round_done  = lp2;
  assign fwd         = lp1 || lp2;

  lol_scheduler #(.ARCH(ARCH), .NCORES(NCORES)) u_sched (
    .list, .step(grp), .item, .n_steps
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss  <= 1'b0;
      step <= '0;
      lp1  <= 1'b0;
      lp2  <= 1'b0;
    end else begin
      lp1 <= last_issue;
      lp2 <= lp1;
      if (last_issue) begin
        iss  <= 1'b0;
        step <= '0;
      end else if (issuing) begin
        iss  <= 1'b1;
        step <= grp + 4'd1;
      end
    end
  end

  // ---------------------------------------------------------------- state registers
  sstate_t [1:0] s_q;
  estate_t [1:0] e_q;
  blk_t          x_q, x_c;   // data block of the issuing / committing traversal
  blk_t          x_in;
  sstate_t [1:0] s_next;
  estate_t [1:0] e_next;
  blk_t    [1:0] z;

  // ---------------------------------------------------------------- input select and R cores
  blk_t  [NCORES-1:0][1:0] core_in, core_out;
  item_e [NCORES-1:0]      it_p1, it_p2;

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

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    item_e it_issue;
    assign it_issue = issuing ? item[c] : IT_NONE;

    // While a commit is pending the next traversal reads the new state.
    for (genvar j = 0; j < 2; j++) begin : g_share
      assign core_in[c][j] = fwd ? pick(it_issue, s_next[j], e_next[j])
                                 : pick(it_issue, s_q[j], e_q[j]);
    end

    masked_r_core u_core (
      .clk,
      .in_sh0 (core_in[c][0]),
      .in_sh1 (core_in[c][1]),
      .rnd    (rnd[c*CORE_RND +: CORE_RND]),
      .out_sh0(core_out[c][0]),
      .out_sh1(core_out[c][1])
    );

    // Item tags travel alongside the data through the two core stages.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        it_p1[c] <= IT_NONE;
        it_p2[c] <= IT_NONE;
      end else begin
        it_p1[c] <= it_issue;
        it_p2[c] <= it_p1[c];
      end
    end
  end

  // ---------------------------------------------------------------- output select
  // res_q holds each item's latest R output; res is that view with the
  // results arriving in this cycle forwarded.
  blk_t [NITEMS-1:0][1:0] res_q, res;

  always_ff @(posedge clk) begin
    for (int c = 0; c < NCORES; c++)
      if (it_p2[c] != IT_NONE) res_q[it_p2[c]] <= core_out[c];
  end

  always_comb begin
    res = res_q;
    for (int c = 0; c < NCORES; c++)
      if (it_p2[c] != IT_NONE) res[it_p2[c]] = core_out[c];
  end

  // ---------------------------------------------------------------- linear update, per share
  for (genvar j = 0; j < 2; j++) begin : g_lin
    lol_linear_update u_lin (
      .s     (s_q[j]),
      .e     (e_q[j]),
      .a_s2  (res[IT_S2][j]),
      .a_s1  (res[IT_S1][j]),
      .a_s0  (res[IT_S0][j]),
      .a_n   (res[IT_N][j]),
      .a_g   (res[IT_G][j]),
      .b_e0  (res[IT_E0][j]),
      .b_e1  (res[IT_E1][j]),
      .b_e2  (res[IT_E2][j]),
      .b_e3  (res[IT_E3][j]),
      .x     ((j == 0) ? x_c : '0),
      .fb,
      .upd_s,
      .upd_e,
      .s_next(s_next[j]),
      .e_next(e_next[j]),
      .z     (z[j])
    );
  end

  // ---------------------------------------------------------------- state write
  blk_t theta;
  assign theta = {64'(ad_blocks) << 7, 64'(msg_blocks) << 7};

  assign x_in = x_len ? theta : (need_data ? din : '0);

  always_ff @(posedge clk) begin
    if (round_start)
      x_q <= x_in;
    if (last_issue)
      x_c <= round_start ? x_in : x_q;

    for (int j = 0; j < 2; j++) begin
      if (load) begin
        s_q[j].l  <= (j == 0) ? iv : '0;
        s_q[j].h  <= (j == 0) ? key_sh0[127:0]   : key_sh1[127:0];
        s_q[j].n  <= (j == 0) ? key_sh0[255:128] : key_sh1[255:128];
        s_q[j].s0 <= '0;
        s_q[j].s1 <= '0;
        s_q[j].s2 <= '0;
        s_q[j].g  <= '0;
        e_q[j]    <= '0;
      end else if (copy) begin
        e_q[j].e0 <= s_q[j].s0;
        e_q[j].e1 <= s_q[j].s1;
        e_q[j].e2 <= s_q[j].s2;
        e_q[j].e3 <= s_q[j].n;
      end else if (finx) begin
        s_q[j].s0 <= s_q[j].s0 ^ e_q[j].e0;
        s_q[j].s1 <= s_q[j].s1 ^ e_q[j].e1;
        s_q[j].s2 <= s_q[j].s2 ^ e_q[j].e2;
        s_q[j].n  <= s_q[j].n  ^ e_q[j].e3;
      end else if (round_done) begin
        s_q[j] <= s_next[j];
        e_q[j] <= e_next[j];
      end
    end
  end

  // ---------------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_valid <= 1'b0;
      tag_valid  <= 1'b0;
      dout       <= '0;
      z_sh0      <= '0;
      z_sh1      <= '0;
      tag        <= '0;
    end else begin
      dout_valid <= round_done && (phase == PH_MSG);
      tag_valid  <= round_done && last_round;
      if (round_done && phase == PH_MSG) begin
        dout  <= x_c ^ z[0] ^ z[1];
        z_sh0 <= z[0];
        z_sh1 <= z[1];
      end
      if (round_done && last_round)
        tag <= z[0] ^ z[1];
    end
  end

  // ---------------------------------------------------------------- rules
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load, copy, finx, round_done}));
  a_done_in_round: assert property (@(posedge clk) disable iff (!rst_n)
    round_done |-> round_en);
  a_no_start_while_issuing: assert property (@(posedge clk) disable iff (!rst_n)
    iss |-> !round_start);
  a_overlap_same_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (round_start && lp1) |=> round_en && !load && !copy && !finx);

endmodule
