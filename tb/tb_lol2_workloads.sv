// tb_lol2_workloads: message-length sweep over all four engine variants.
//
// SC and AEAD operations (no associated data) with messages of 2, 8, 16, 128
// and 1024 blocks of 128 bits (32 B to 16384 B) are run on the masked engine
// in the fast architecture (inside lol2_top at its defaults), on a second
// masked engine in the compact architecture, and on the two unmasked engines
// of lol2_top. Every input block is offered at once, so the engines run at
// their full rate. Every ciphertext block, keystream and tag is checked
// against the reference model. The number of cycles from start to done is
// recorded per length and checked to grow by exactly the engine's block
// period per extra block (fast masked 4, compact masked 5 / 9, unmasked fast
// 1, unmasked compact 7 / 12 cycles for SC / AEAD). The resulting
// throughput at each variant's clock (2.22 GHz masked, 1.43 GHz unmasked
// fast, 4 GHz unmasked compact) is printed.
`define WL_OP(TNAME, P, KEYSET, ZVAL)                                                    \
  task automatic TNAME(input mode_e m, input int nmsg, input logic [255:0] key,          \
                       input blk_t ivv, input bq_t msg, input bq_t ct, input blk_t exp_tag, \
                       output int cycles);                                                \
    bq_t inq;                                                                             \
    int got, tags, ndone, bad;                                                            \
    inq = msg;                                                                            \
    @(negedge clk);                                                                       \
    KEYSET;                                                                               \
    P``iv = ivv; P``mode_i = m; P``ad_blocks_i = 0;                                       \
    P``msg_blocks_i = 32'(nmsg); P``start = 1;                                            \
    @(negedge clk);                                                                       \
    P``start = 0;                                                                         \
    got = 0; tags = 0; ndone = 0; bad = 0; cycles = -1;                                   \
    for (int cyc = 1; cyc < 40000 && ndone == 0; cyc++) begin                             \
      P``din_valid = (inq.size() > 0);                                                    \
      P``din = (inq.size() > 0) ? inq[0] : '0;                                            \
      @(posedge clk);                                                                     \
      if (P``din_valid && P``din_ready) void'(inq.pop_front());                           \
      if (P``dout_valid) begin                                                            \
        if (!(got < nmsg && P``dout == ct[got] && (ZVAL) == (P``dout ^ msg[got]))) bad++; \
        got++;                                                                            \
      end                                                                                 \
      if (P``tag_valid) begin                                                             \
        chk($sformatf("%s tag, %0d blocks", `"P`", nmsg), P``tag == exp_tag);             \
        tags++;                                                                           \
      end                                                                                 \
      if (P``done) begin ndone++; cycles = cyc; end                                       \
      @(negedge clk);                                                                     \
    end                                                                                   \
    P``din_valid = 0;                                                                     \
    repeat (3) begin                                                                      \
      @(posedge clk);                                                                     \
      if (P``dout_valid) begin                                                            \
        if (!(got < nmsg && P``dout == ct[got] && (ZVAL) == (P``dout ^ msg[got]))) bad++; \
        got++;                                                                            \
      end                                                                                 \
      if (P``tag_valid) begin                                                             \
        chk($sformatf("%s tag, %0d blocks", `"P`", nmsg), P``tag == exp_tag);             \
        tags++;                                                                           \
      end                                                                                 \
      @(negedge clk);                                                                     \
    end                                                                                   \
    chk($sformatf("%s %s %0d blocks: all blocks correct", `"P`", m.name(), nmsg),         \
        bad == 0 && got == nmsg);                                                         \
    chk($sformatf("%s %s %0d blocks: tag count", `"P`", m.name(), nmsg),                  \
        tags == ((m == MODE_AEAD) ? 1 : 0));                                              \
    chk($sformatf("%s %s %0d blocks: done", `"P`", m.name(), nmsg), ndone == 1);          \
  endtask

module tb_lol2_workloads;
  import lol_pkg::*;
  import lol_ref_pkg::*;

  localparam int unsigned RND_W = 5 * CORE_RND;
  localparam int NSIZES = 5;
  localparam int SIZES [NSIZES] = '{2, 8, 16, 128, 1024};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // masked engine of lol2_top (fast architecture)
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
  // masked engine, compact architecture
  logic mc_start = 0, mc_din_valid = 0, mc_din_ready, mc_dout_valid, mc_tag_valid, mc_busy, mc_done;
  mode_e mc_mode_i = MODE_SC;
  logic [255:0] mc_key_sh0, mc_key_sh1;
  blk_t mc_iv, mc_din, mc_dout, mc_z_sh0, mc_z_sh1, mc_tag;
  logic [31:0] mc_ad_blocks_i, mc_msg_blocks_i;
  logic [CORE_RND-1:0] mc_rnd;

  lol2_top dut (.*);

  lol2_masked #(.ARCH(ARCH_COMPACT)) u_mc (
    .clk, .rst_n, .start(mc_start), .mode_i(mc_mode_i), .key_sh0(mc_key_sh0),
    .key_sh1(mc_key_sh1), .iv(mc_iv), .ad_blocks_i(mc_ad_blocks_i),
    .msg_blocks_i(mc_msg_blocks_i), .din(mc_din), .din_valid(mc_din_valid),
    .din_ready(mc_din_ready), .dout(mc_dout), .dout_valid(mc_dout_valid),
    .z_sh0(mc_z_sh0), .z_sh1(mc_z_sh1), .tag(mc_tag), .tag_valid(mc_tag_valid),
    .rnd(mc_rnd), .busy(mc_busy), .done(mc_done)
  );

  always #5 clk = ~clk;
  always @(negedge clk) begin
    for (int k = 0; k < RND_W; k += 32) m_rnd[k +: 32] = $urandom;
    for (int k = 0; k < CORE_RND; k += 32) mc_rnd[k +: 32] = $urandom;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic blk_t r128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  `WL_OP(op_m, m_, begin m_key_sh1 = {r128(), r128()}; m_key_sh0 = key ^ m_key_sh1; end,
         m_z_sh0 ^ m_z_sh1)
  `WL_OP(op_mc, mc_, begin mc_key_sh1 = {r128(), r128()}; mc_key_sh0 = key ^ mc_key_sh1; end,
         mc_z_sh0 ^ mc_z_sh1)
  `WL_OP(op_uf, uf_, uf_key = key, uf_z)
  `WL_OP(op_uc, uc_, uc_key = key, uc_z)

  // cycles per operation: [engine][mode][size]; engines 0 masked fast,
  // 1 masked compact, 2 unmasked fast, 3 unmasked compact
  int cyc [4][2][NSIZES];

  task automatic run(input mode_e m, input int si);
    lol_ref_model ref_m;
    bq_t ad, msg, ct;
    blk_t exp_tag, ivv;
    logic [255:0] key;
    int nmsg;
    nmsg = SIZES[si];
    ref_m = new();
    key = {r128(), r128()};
    ivv = r128();
    for (int i = 0; i < nmsg; i++) msg.push_back(r128());
    ref_m.run(m == MODE_AEAD, 12, 12, key, ivv, ad, msg, ct, exp_tag);
    fork
      op_m(m, nmsg, key, ivv, msg, ct, exp_tag, cyc[0][m][si]);
      op_mc(m, nmsg, key, ivv, msg, ct, exp_tag, cyc[1][m][si]);
      op_uf(m, nmsg, key, ivv, msg, ct, exp_tag, cyc[2][m][si]);
      op_uc(m, nmsg, key, ivv, msg, ct, exp_tag, cyc[3][m][si]);
    join
  endtask

  localparam string EN [4] = '{"masked fast", "masked compact", "unmasked fast", "unmasked compact"};
  localparam real GHZ [4] = '{2.22, 2.22, 1.43, 4.0};
  localparam int PER [4][2] = '{'{4, 4}, '{5, 9}, '{1, 1}, '{7, 12}};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 2; mi++)
      for (int si = 0; si < NSIZES; si++) run(mode_e'(mi), si);
    for (int e = 0; e < 4; e++)
      for (int mi = 0; mi < 2; mi++)
        for (int si = 0; si < NSIZES; si++) begin
          $display("%-16s %-9s %5d B: %6d cycles, %7.2f Gbps", EN[e], mode_e'(mi),
                   16 * SIZES[si], cyc[e][mi][si],
                   128.0 * SIZES[si] * GHZ[e] / cyc[e][mi][si]);
          chk($sformatf("%s %s %0d blocks: cycles %0d grow by %0d per block", EN[e],
                        mode_e'(mi), SIZES[si], cyc[e][mi][si], PER[e][mi]),
              cyc[e][mi][si] - cyc[e][mi][0] == (SIZES[si] - SIZES[0]) * PER[e][mi]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
