// tb_lol2_top: end-to-end test of lol2_top at its default parameters
// (masked engine in the fast architecture, N_INIT = N_FIN = 12). The same
// operations are run on the three engines at once: SC and AEAD operations with
// and without AD and message blocks, some with every input block offered at
// once (timed: block period and time to the first SC block are checked), some
// with random input gaps (stalls). Every ciphertext block, keystream (shares
// recombined for the masked engine) and tag is checked against the reference
// model, and each mechanism (SC, AEAD, AD absorption, stall, keystream
// feedback, copy of S into E, E into S, tag) must have happened in each engine,
// and the masked engine must have started a traversal before the previous one
// committed (overlap).
`define LOL_OP(TNAME, P, KEYSET, ZVAL, PER_SC, PER_AE, INIT_T, INIT_X)              \
  task automatic TNAME(input mode_e m, input int nad, input int nmsg, input bit timed, \
                       input logic [255:0] key, input blk_t ivv, input bq_t ad,        \
                       input bq_t msg, input bq_t ct, input blk_t exp_tag);            \
    bq_t inq;                                                                          \
    int got, tags, t_first, t_prev, bad, ndone, per;                                   \
    inq = (m == MODE_AEAD) ? {ad, msg} : msg;                                          \
    per = (m == MODE_AEAD) ? PER_AE : PER_SC;                                          \
    @(negedge clk);                                                                    \
    KEYSET;                                                                            \
    P``iv = ivv; P``mode_i = m; P``ad_blocks_i = 32'(nad);                             \
    P``msg_blocks_i = 32'(nmsg); P``start = 1;                                         \
    @(negedge clk);                                                                    \
    P``start = 0;                                                                      \
    got = 0; tags = 0; t_first = -1; t_prev = -1; bad = 0; ndone = 0;                  \
    for (int cyc = 0, idle = 0; cyc < 20000 && idle < 3; cyc++) begin                  \
      P``din_valid = (inq.size() > 0) && (timed || ($urandom % 3 != 0));               \
      P``din = (inq.size() > 0) ? inq[0] : '0;                                         \
      @(posedge clk);                                                                  \
      if (P``din_valid && P``din_ready) void'(inq.pop_front());                        \
      if (P``done) ndone++;                                                            \
      if (P``dout_valid) begin                                                         \
        chk($sformatf("%s ct block %0d", `"P`", got), got < nmsg && P``dout == ct[got]); \
        chk($sformatf("%s keystream %0d", `"P`", got),                                 \
            got < nmsg && (ZVAL) == (P``dout ^ msg[got]));                             \
        if (t_prev >= 0 && cyc - t_prev != per) bad++;                                 \
        if (t_first < 0) t_first = cyc;                                                \
        t_prev = cyc;                                                                  \
        got++;                                                                         \
      end                                                                              \
      if (P``tag_valid) begin chk({`"P`", " tag"}, P``tag == exp_tag); tags++; end     \
      idle = P``busy ? 0 : idle + 1;                                                   \
      @(negedge clk);                                                                  \
    end                                                                                \
    P``din_valid = 0;                                                                  \
    chk($sformatf("%s %s ad=%0d msg=%0d block count %0d", `"P`", m.name(), nad, nmsg, got), \
        got == nmsg);                                                                  \
    chk({`"P`", " tag count"}, tags == ((m == MODE_AEAD) ? 1 : 0));                    \
    chk({`"P`", " one done pulse"}, ndone == 1);                                       \
    if (timed) begin                                                                   \
      chk($sformatf("%s block period %0d", `"P`", per), bad == 0);                     \
      if (m == MODE_SC && nmsg > 0)                                                    \
        chk($sformatf("%s first SC block at %0d", `"P`", t_first),                     \
            t_first == 1 + 12 * (INIT_T) + (INIT_X) + PER_SC);                         \
    end                                                                                \
  endtask

module tb_lol2_top;
  import lol_pkg::*;
  import lol_ref_pkg::*;

  localparam int unsigned RND_W = 5 * CORE_RND;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // masked engine
  logic m_start = 0, m_din_valid = 0, m_din_ready, m_dout_valid, m_tag_valid, m_busy, m_done;
  mode_e m_mode_i = MODE_SC;
  logic [255:0] m_key_sh0, m_key_sh1;
  blk_t m_iv, m_din, m_dout, m_z_sh0, m_z_sh1, m_tag;
  logic [31:0] m_ad_blocks_i, m_msg_blocks_i;
  logic [RND_W-1:0] m_rnd;
  // unmasked fast
  logic uf_start = 0, uf_din_valid = 0, uf_din_ready, uf_dout_valid, uf_tag_valid, uf_busy, uf_done;
  mode_e uf_mode_i = MODE_SC;
  logic [255:0] uf_key;
  blk_t uf_iv, uf_din, uf_dout, uf_z, uf_tag;
  logic [31:0] uf_ad_blocks_i, uf_msg_blocks_i;
  // unmasked compact
  logic uc_start = 0, uc_din_valid = 0, uc_din_ready, uc_dout_valid, uc_tag_valid, uc_busy, uc_done;
  mode_e uc_mode_i = MODE_SC;
  logic [255:0] uc_key;
  blk_t uc_iv, uc_din, uc_dout, uc_z, uc_tag;
  logic [31:0] uc_ad_blocks_i, uc_msg_blocks_i;

  lol2_top dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk)
    for (int k = 0; k < RND_W; k += 32) m_rnd[k +: 32] = $urandom;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters, per engine: 0 masked, 1 unmasked fast, 2 unmasked compact
  int n_sc [3], n_aead [3], n_ad [3], n_stall [3], n_tag [3], n_fb [3], n_copy [3], n_finx [3];
  int n_overlap;  // masked engine: traversal started before the previous one committed

  always @(posedge clk) if (rst_n) begin
    if (m_din_ready && !m_din_valid) n_stall[0]++;
    if (uf_din_ready && !uf_din_valid) n_stall[1]++;
    if (uc_din_ready && !uc_din_valid) n_stall[2]++;
    if (m_din_ready && m_din_valid && dut.u_masked.phase == PH_AD) n_ad[0]++;
    if (uf_din_ready && uf_din_valid && dut.u_unmasked_fast.phase == PH_AD) n_ad[1]++;
    if (uc_din_ready && uc_din_valid && dut.u_unmasked_compact.phase == PH_AD) n_ad[2]++;
    if (dut.u_masked.round_done && dut.u_masked.fb) n_fb[0]++;
    if (dut.u_unmasked_fast.round_done && dut.u_unmasked_fast.fb) n_fb[1]++;
    if (dut.u_unmasked_compact.round_done && dut.u_unmasked_compact.fb) n_fb[2]++;
    if (dut.u_masked.round_start && dut.u_masked.lp1) n_overlap++;
    if (dut.u_masked.copy) n_copy[0]++;
    if (dut.u_unmasked_fast.copy) n_copy[1]++;
    if (dut.u_unmasked_compact.copy) n_copy[2]++;
    if (dut.u_masked.finx) n_finx[0]++;
    if (dut.u_unmasked_fast.finx) n_finx[1]++;
    if (dut.u_unmasked_compact.finx) n_finx[2]++;
    if (m_tag_valid) n_tag[0]++;
    if (uf_tag_valid) n_tag[1]++;
    if (uc_tag_valid) n_tag[2]++;
  end

  function automatic blk_t r128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  `LOL_OP(op_m, m_, begin m_key_sh1 = {r128(), r128()}; m_key_sh0 = key ^ m_key_sh1; end,
          m_z_sh0 ^ m_z_sh1, 4, 4, 5, 2)
  `LOL_OP(op_uf, uf_, uf_key = key, uf_z, 1, 1, 1, 0)
  `LOL_OP(op_uc, uc_, uc_key = key, uc_z, 7, 12, 7, 0)

  task automatic op(input mode_e m, input int nad, input int nmsg, input bit timed);
    lol_ref_model ref_m;
    bq_t ad, msg, ct;
    blk_t exp_tag, ivv;
    logic [255:0] key;
    ref_m = new();
    key = {r128(), r128()};
    ivv = r128();
    for (int i = 0; i < nad; i++) ad.push_back(r128());
    for (int i = 0; i < nmsg; i++) msg.push_back(r128());
    ref_m.run(m == MODE_AEAD, 12, 12, key, ivv, ad, msg, ct, exp_tag);
    fork
      op_m(m, nad, nmsg, timed, key, ivv, ad, msg, ct, exp_tag);
      op_uf(m, nad, nmsg, timed, key, ivv, ad, msg, ct, exp_tag);
      op_uc(m, nad, nmsg, timed, key, ivv, ad, msg, ct, exp_tag);
    join
    for (int e = 0; e < 3; e++) if (m == MODE_SC) n_sc[e]++; else n_aead[e]++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-34s happened %0d times", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", what); end
  endtask

  initial begin
    string en [3] = '{"masked", "unmasked fast", "unmasked compact"};
    repeat (3) @(negedge clk);
    rst_n = 1;
    op(MODE_SC,   0, 6, 1'b1);
    op(MODE_AEAD, 2, 5, 1'b1);
    op(MODE_AEAD, 3, 4, 1'b0);
    op(MODE_SC,   0, 3, 1'b0);
    op(MODE_AEAD, 0, 1, 1'b0);
    op(MODE_AEAD, 2, 0, 1'b0);
    op(MODE_SC,   0, 0, 1'b0);
    for (int e = 0; e < 3; e++) begin
      need({en[e], " SC operation"}, n_sc[e]);
      need({en[e], " AEAD operation"}, n_aead[e]);
      need({en[e], " AD absorption"}, n_ad[e]);
      need({en[e], " input stall"}, n_stall[e]);
      need({en[e], " keystream feedback"}, n_fb[e]);
      need({en[e], " copy S to E"}, n_copy[e]);
      need({en[e], " E into S"}, n_finx[e]);
      need({en[e], " tag output"}, n_tag[e]);
    end
    need("masked overlapped traversal", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
