// tb_lol_linear_update: random states, R outputs and control flags; the
// block's new state and keystream are compared with the reference round,
// whose R results are replaced by the same random values.
module tb_lol_linear_update;
  import lol_pkg::*;
  import lol_ref_pkg::*;

  sstate_t s, s_next;
  estate_t e, e_next;
  blk_t a_s2, a_s1, a_s0, a_n, a_g, b_e0, b_e1, b_e2, b_e3, x, z;
  logic fb, upd_s, upd_e;
  int checks = 0, failures = 0;

  lol_linear_update dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_t r128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    blk_t ez, eL, eH, eN, eS0, eS1, eS2, eG, eE0, eE1, eE2, eE3, f;
    for (int t = 0; t < 400; t++) begin
      s = {r128(), r128(), r128(), r128(), r128(), r128(), r128()};
      e = {r128(), r128(), r128(), r128()};
      {a_s2, a_s1, a_s0, a_n, a_g} = {r128(), r128(), r128(), r128(), r128()};
      {b_e0, b_e1, b_e2, b_e3, x}  = {r128(), r128(), r128(), r128(), r128()};
      {fb, upd_s, upd_e} = 3'($urandom);
      #1;
      ez = a_g ^ s.s1 ^ s.l;
      f  = fb ? ez : '0;
      if (upd_s) begin
        eL = s.h ^ f;
        eH = lol_ref_model::lam(s.h) ^ lol_ref_model::sig(s.l) ^ f;
        eS2 = a_s1 ^ s.l; eS1 = a_s0 ^ s.h; eS0 = a_n ^ s.s2;
        eN = s.n ^ a_g; eG = a_s2 ^ s.h;
      end else begin
        {eL, eH, eN, eS0, eS1, eS2, eG} = s;
      end
      if (upd_e) {eE0, eE1, eE2, eE3} = {b_e3 ^ x, b_e0 ^ e.e2, b_e1 ^ e.e3, b_e2 ^ e.e0};
      else       {eE0, eE1, eE2, eE3} = e;
      checks++;
      if (z !== ez) begin failures++; $display("FAIL z at %0d", t); end
      checks++;
      if (s_next !== {eL, eH, eN, eS0, eS1, eS2, eG}) begin
        failures++; $display("FAIL S at %0d (fb=%0d us=%0d)", t, fb, upd_s);
      end
      checks++;
      if (e_next !== {eE0, eE1, eE2, eE3}) begin failures++; $display("FAIL E at %0d", t); end
    end
    // lambda on single-bit words, against shifts worked out by hand
    s = '0; s.h = 128'h0001_0000_0000_0000_0000_0000_0000_0000; // bit 0 of word 7
    s.l = '0; a_g = '0; fb = 0; upd_s = 1; upd_e = 0;
    #1; checks++;
    if (s_next.h !== 128'h0020_0000_0000_0000_0000_0000_0000_0000) begin
      failures++; $display("FAIL lambda word 7: %032h", s_next.h);
    end
    s.h = 128'h0000_8000_0000_0000_0000_0000_0000_0000; // bit 15 of word 6
    #1; checks++;
    if (s_next.h !== 128'h0010_0000_0000_0000_0000_0000_0000_0000) begin
      failures++; $display("FAIL lambda carry 6->7: %032h", s_next.h);
    end
    s.h = '0; s.l = 128'h0000_0000_0000_0000_0000_0000_0000_ABCD; // word 0
    #1; checks++;
    if (s_next.h !== 128'h0000_ABCD_0000_0000_0000_0000_0000_0000) begin
      failures++; $display("FAIL sigma word 0 -> word 6: %032h", s_next.h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
