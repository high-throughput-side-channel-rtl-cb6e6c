// tb_lol2_masked: end-to-end test of the masked engine in both
// architectures (fast and compact) with shortened initialization and tag
// generation (N_INIT = 4, N_FIN = 3). Every ciphertext block, keystream share
// pair and tag is checked against the reference model, the block period and
// initialization time are checked in timed operations, and each mechanism
// (SC and AEAD operations, AD absorption, input stalls, keystream feedback,
// copy of S into E, E fed back into S, tag output, a traversal started
// before the previous one committed) must have happened.
module tb_lol2_masked;
  import lol_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  int c_f, f_f, c_c, f_c;
  logic fin_f, fin_c;
  int sc_f, ae_f, ad_f, st_f, tg_f, fbr_f, cp_f, fx_f, ov_f;
  int sc_c, ae_c, ad_c, st_c, tg_c, fbr_c, cp_c, fx_c, ov_c;

  always #5 clk = ~clk;

  lol2_masked_harness #(.ARCH(ARCH_FAST), .N_INIT(4), .N_FIN(3)) h_fast (
    .clk, .rst_n, .checks(c_f), .failures(f_f), .finished(fin_f),
    .n_sc_ops(sc_f), .n_aead_ops(ae_f), .n_ad_blocks(ad_f), .n_stalls(st_f),
    .n_tags(tg_f), .n_fb_rounds(fbr_f), .n_copy(cp_f), .n_finx(fx_f), .n_overlaps(ov_f));

  lol2_masked_harness #(.ARCH(ARCH_COMPACT), .N_INIT(4), .N_FIN(3)) h_compact (
    .clk, .rst_n, .checks(c_c), .failures(f_c), .finished(fin_c),
    .n_sc_ops(sc_c), .n_aead_ops(ae_c), .n_ad_blocks(ad_c), .n_stalls(st_c),
    .n_tags(tg_c), .n_fb_rounds(fbr_c), .n_copy(cp_c), .n_finx(fx_c), .n_overlaps(ov_c));

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-28s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_f + c_c, failures + f_f + f_c);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin_f && fin_c);
    need("fast SC operation", sc_f);
    need("fast AEAD operation", ae_f);
    need("fast AD absorption", ad_f);
    need("fast input stall", st_f);
    need("fast tag output", tg_f);
    need("fast keystream feedback", fbr_f);
    need("fast copy S to E", cp_f);
    need("fast E into S", fx_f);
    need("compact SC operation", sc_c);
    need("compact AEAD operation", ae_c);
    need("compact AD absorption", ad_c);
    need("compact input stall", st_c);
    need("compact tag output", tg_c);
    need("compact keystream feedback", fbr_c);
    need("compact copy S to E", cp_c);
    need("compact E into S", fx_c);
    need("fast overlapped traversal", ov_f);
    need("compact overlapped traversal", ov_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_f + c_c, failures + f_f + f_c);
    $finish;
  end
endmodule
