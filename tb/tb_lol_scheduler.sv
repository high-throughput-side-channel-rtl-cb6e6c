// tb_lol_scheduler: the compact and fast schedule tables, step by step,
// against the schedule lists written out here item by item.
module tb_lol_scheduler;
  import lol_pkg::*;

  list_e list;
  logic [3:0] step, ns_c, ns_f;
  item_e [0:0] it_c;
  item_e [4:0] it_f;
  int checks = 0, failures = 0;

  lol_scheduler #(.ARCH(ARCH_COMPACT)) u_c (.list, .step, .item(it_c), .n_steps(ns_c));
  lol_scheduler #(.ARCH(ARCH_FAST))    u_f (.list, .step, .item(it_f), .n_steps(ns_f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected tables: per list, per step, the item of each fast core, and the
  // compact sequence.
  item_e c_init [5] = '{IT_S2, IT_S1, IT_S0, IT_N, IT_G};
  item_e c_aead [9] = '{IT_E3, IT_E0, IT_E1, IT_E2, IT_S2, IT_S1, IT_S0, IT_N, IT_G};
  item_e f_sc   [2][5] = '{'{IT_S0, IT_S1, IT_S2, IT_NONE, IT_NONE},
                           '{IT_N,  IT_G,  IT_NONE, IT_NONE, IT_NONE}};
  item_e f_aead [2][5] = '{'{IT_E3, IT_E2, IT_E1, IT_E0, IT_G},
                           '{IT_S1, IT_N,  IT_S2, IT_S0, IT_NONE}};
  item_e f_eabs [5]    = '{IT_E3, IT_E2, IT_E1, IT_E0, IT_NONE};

  initial begin
    // compact
    list = LIST_INIT; step = 0; #1; chk("compact init steps", ns_c, 5); chk("fast init steps", ns_f, 5);
    for (int s = 0; s < 5; s++) begin
      step = 4'(s);
      list = LIST_INIT; #1;
      chk($sformatf("compact init %0d", s), it_c[0], c_init[s]);
      chk($sformatf("fast init core0 %0d", s), it_f[0], c_init[s]);
      for (int c = 1; c < 5; c++) chk($sformatf("fast init core%0d idle", c), it_f[c], IT_NONE);
      list = LIST_SC; #1;
      chk($sformatf("compact sc %0d", s), it_c[0], c_init[s]);
    end
    list = LIST_AEAD; step = 0; #1; chk("compact aead steps", ns_c, 9);
    for (int s = 0; s < 9; s++) begin
      step = 4'(s); #1;
      chk($sformatf("compact aead %0d", s), it_c[0], c_aead[s]);
    end
    list = LIST_EABS; step = 0; #1; chk("compact eabs steps", ns_c, 4);
    for (int s = 0; s < 4; s++) begin
      step = 4'(s); #1;
      chk($sformatf("compact eabs %0d", s), it_c[0], c_aead[s]);
    end
    // fast
    list = LIST_SC; step = 0; #1; chk("fast sc steps", ns_f, 2);
    list = LIST_AEAD; #1; chk("fast aead steps", ns_f, 2);
    list = LIST_EABS; #1; chk("fast eabs steps", ns_f, 1);
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 5; c++) begin
        step = 4'(s);
        list = LIST_SC;   #1; chk($sformatf("fast sc %0d core %0d", s, c), it_f[c], f_sc[s][c]);
        list = LIST_AEAD; #1; chk($sformatf("fast aead %0d core %0d", s, c), it_f[c], f_aead[s][c]);
      end
    step = 0; list = LIST_EABS; #1;
    for (int c = 0; c < 5; c++) chk($sformatf("fast eabs core %0d", c), it_f[c], f_eabs[c]);
    // past the end of a list every core is idle
    step = 4'd2; list = LIST_AEAD; #1;
    for (int c = 0; c < 5; c++) chk("fast aead idle after end", it_f[c], IT_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
