// lol2_masked_harness: drives one lol2_masked instance through a list of
// SC and AEAD operations and checks every ciphertext block, keystream share
// pair and tag against lol_ref_pkg::lol_ref_model. Input blocks are offered
// with random gaps (din_valid low while the engine waits: a stall) except in
// one timed operation, where the cycles per block and per initialization are
// checked: back-to-back traversals where the
// list allows it (INIT/FIN and the compact SC and AEAD lists: n_steps cycles),
// n_steps + 2 otherwise. Fresh random bits change every cycle.
// Mechanism counters are brought out so the enclosing testbench can check
// that each mechanism happened.
module lol2_masked_harness
  import lol_pkg::*;
  import lol_ref_pkg::*;
#(
  parameter arch_e       ARCH   = ARCH_FAST,
  parameter int unsigned N_INIT = 12,
  parameter int unsigned N_FIN  = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished,
  output int   n_sc_ops,
  output int   n_aead_ops,
  output int   n_ad_blocks,
  output int   n_stalls,
  output int   n_tags,
  output int   n_fb_rounds,
  output int   n_copy,
  output int   n_finx,
  output int   n_overlaps
);

  localparam int unsigned NCORES = (ARCH == ARCH_FAST) ? 5 : 1;
  localparam int unsigned RND_W  = NCORES * CORE_RND;

  logic start;
  mode_e mode_i;
  logic [255:0] key_sh0, key_sh1;
  blk_t iv, din, dout, z_sh0, z_sh1, tag;
  logic [31:0] ad_blocks_i, msg_blocks_i;
  logic din_valid, din_ready, dout_valid, tag_valid, busy, done;
  logic [RND_W-1:0] rnd;

  lol2_masked #(.ARCH(ARCH), .N_INIT(N_INIT), .N_FIN(N_FIN)) dut (
    .clk, .rst_n, .start, .mode_i, .key_sh0, .key_sh1, .iv, .ad_blocks_i,
    .msg_blocks_i, .din, .din_valid, .din_ready, .dout, .dout_valid, .z_sh0,
    .z_sh1, .tag, .tag_valid, .rnd, .busy, .done
  );

  always @(negedge clk)
    for (int k = 0; k < RND_W; k += 32) rnd[k +: 32] = $urandom;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (din_ready && !din_valid) n_stalls++;
    if (dut.round_done && dut.fb) n_fb_rounds++;
    if (dut.copy) n_copy++;
    if (dut.finx) n_finx++;
    if (dut.round_start && dut.lp1) n_overlaps++;
    if (din_ready && din_valid && dut.phase == PH_AD) n_ad_blocks++;
  end

  function automatic blk_t r128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s", ARCH.name(), what);
    end
  endtask

  task automatic op(input mode_e m, input int nad, input int nmsg, input bit timed);
    lol_ref_model ref_m;
    bq_t ad, msg, ct, inq;
    blk_t exp_tag;
    logic [255:0] key;
    int got_blocks, got_tags, t_start, t_first, t_prev, per_block_bad, n_done;
    int expect_period;

    ref_m = new();
    key = {r128(), r128()};
    iv  = r128();
    for (int i = 0; i < nad; i++) ad.push_back(r128());
    for (int i = 0; i < nmsg; i++) msg.push_back(r128());
    ref_m.run(m == MODE_AEAD, N_INIT, N_FIN, key, iv, ad, msg, ct, exp_tag);
    inq = (m == MODE_AEAD) ? {ad, msg} : msg;

    key_sh1 = {r128(), r128()};
    key_sh0 = key ^ key_sh1;
    @(negedge clk);
    mode_i = m; ad_blocks_i = 32'(nad); msg_blocks_i = 32'(nmsg); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t_start = 0; t_first = -1; t_prev = -1; per_block_bad = 0;
    got_blocks = 0; got_tags = 0; n_done = 0;
    expect_period = (ARCH == ARCH_FAST) ? 4 : ((m == MODE_AEAD) ? 9 : 5);

    for (int cyc = 0, idle = 0; cyc < 20000 && idle < 3; cyc++) begin
      din_valid = (inq.size() > 0) && (timed || ($urandom % 3 != 0));
      din = (inq.size() > 0) ? inq[0] : '0;
      @(posedge clk);
      if (din_valid && din_ready) void'(inq.pop_front());
      if (done) n_done++;
      if (dout_valid) begin
        chk($sformatf("ct block %0d", got_blocks),
            got_blocks < ct.size() && dout == ct[got_blocks]);
        chk($sformatf("keystream shares block %0d", got_blocks),
            got_blocks < msg.size() && (z_sh0 ^ z_sh1) == (dout ^ msg[got_blocks]));
        if (t_prev >= 0 && cyc - t_prev != expect_period) per_block_bad++;
        if (t_first < 0) t_first = cyc;
        t_prev = cyc;
        got_blocks++;
      end
      if (tag_valid) begin
        chk("tag", tag == exp_tag);
        got_tags++;
      end
      idle = busy ? 0 : idle + 1;
      @(negedge clk);
    end
    din_valid = 1'b0;
    chk($sformatf("%s ad=%0d msg=%0d: blocks out", m.name(), nad, nmsg), got_blocks == nmsg);
    chk("tags out", got_tags == ((m == MODE_AEAD) ? 1 : 0));
    chk("one done pulse", n_done == 1);
    chk("engine idle at end", !busy);
    if (timed) begin
      // LOAD (1) + N_INIT back-to-back traversals of 5 cycles + 2 to drain,
      // then the first block's traversal (n_steps + 2, it follows a phase
      // change); dout is registered one cycle after its traversal ends.
      chk($sformatf("block period %0d cycles", expect_period), per_block_bad == 0);
      if (m == MODE_SC && nmsg > 0)
        chk($sformatf("first block at cycle %0d, expected %0d", t_first,
                      1 + N_INIT * 5 + 2 + ((ARCH == ARCH_FAST) ? 4 : 7)),
            t_first == 1 + int'(N_INIT) * 5 + 2 + ((ARCH == ARCH_FAST) ? 4 : 7));
    end
    if (m == MODE_SC) n_sc_ops++; else n_aead_ops++;
    if (m == MODE_AEAD && got_tags == 1) n_tags++;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    n_sc_ops = 0; n_aead_ops = 0; n_ad_blocks = 0; n_stalls = 0; n_tags = 0;
    n_fb_rounds = 0; n_copy = 0; n_finx = 0; n_overlaps = 0;
    start = 0; din_valid = 0; din = '0; mode_i = MODE_SC;
    ad_blocks_i = 0; msg_blocks_i = 0; key_sh0 = '0; key_sh1 = '0; iv = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    op(MODE_SC,   0, 6, 1'b1);
    op(MODE_AEAD, 2, 5, 1'b1);
    op(MODE_AEAD, 3, 4, 1'b0);
    op(MODE_SC,   0, 5, 1'b0);
    op(MODE_AEAD, 0, 1, 1'b0);
    op(MODE_AEAD, 2, 0, 1'b0);
    op(MODE_SC,   0, 0, 1'b0);
    finished = 1;
  end
endmodule
