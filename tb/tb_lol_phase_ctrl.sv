// tb_lol_phase_ctrl: drives the phase controller with a model engine that
// ends each round three cycles after it may start, and checks for SC and
// AEAD operations (with and without AD and message blocks) the number of
// rounds in each phase, the one-cycle steps, the control flags per phase,
// the last-round flag, the more flag (another round of the same phase
// follows) and the single done pulse.
module tb_lol_phase_ctrl;
  import lol_pkg::*;

  localparam int unsigned NI = 3, NF = 2;

  logic clk = 0, rst_n = 0, start = 0, round_done;
  mode_e mode_i, mode;
  logic [31:0] ad_blocks_i, msg_blocks_i, ad_blocks, msg_blocks;
  phase_e phase;
  logic round_en, fb, upd_s, upd_e, need_data, x_len, load, copy, finx, last_round, more, busy, done;
  list_e list;
  logic more_q = 0, rd_q = 0;
  phase_e phase_q;
  int checks = 0, failures = 0;

  lol_phase_ctrl #(.N_INIT(NI), .N_FIN(NF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model engine: a round lasts three cycles.
  int age;
  always_ff @(posedge clk) age <= (round_en && !round_done) ? age + 1 : 0;
  assign round_done = round_en && (age == 2);

  int rounds [phase_e];
  int steps_load, steps_copy, steps_finx, n_done, n_last, flag_err;

  always @(posedge clk) if (rst_n) begin
    if (round_done) rounds[phase] = rounds.exists(phase) ? rounds[phase] + 1 : 1;
    if (load) steps_load++;
    if (copy) steps_copy++;
    if (finx) steps_finx++;
    if (done) n_done++;
    if (round_done && last_round) n_last++;
    // more: another round of the same phase follows
    if (rd_q && ((phase == phase_q) != more_q)) flag_err++;
    rd_q    = round_done;
    more_q  = more;
    phase_q = phase;
    // flags per phase
    case (phase)
      PH_INIT, PH_FIN: if (!(fb && upd_s && !upd_e && !need_data && list == LIST_INIT)) flag_err++;
      PH_AD:  if (!(!fb && !upd_s && upd_e && need_data && list == LIST_EABS)) flag_err++;
      PH_MSG: if (!(!fb && upd_s && (upd_e == (mode == MODE_AEAD)) && need_data &&
                    list == ((mode == MODE_AEAD) ? LIST_AEAD : LIST_SC))) flag_err++;
      PH_LEN: if (!(upd_e && !upd_s && x_len && !need_data && list == LIST_EABS)) flag_err++;
      default: if (round_en) flag_err++;
    endcase
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int nr(phase_e p);
    return rounds.exists(p) ? rounds[p] : 0;
  endfunction

  task automatic run(input mode_e m, input int nad, input int nmsg);
    rounds.delete();
    steps_load = 0; steps_copy = 0; steps_finx = 0; n_done = 0; n_last = 0; flag_err = 0;
    @(negedge clk);
    mode_i = m; ad_blocks_i = 32'(nad); msg_blocks_i = 32'(nmsg); start = 1;
    @(negedge clk);
    start = 0;
    mode_i = (m == MODE_SC) ? MODE_AEAD : MODE_SC;  // must have been sampled
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    chk($sformatf("%s ad=%0d msg=%0d INIT rounds", m.name(), nad, nmsg), nr(PH_INIT), NI);
    chk("MSG rounds", nr(PH_MSG), nmsg);
    chk("AD rounds", nr(PH_AD), (m == MODE_AEAD) ? nad : 0);
    chk("LEN rounds", nr(PH_LEN), (m == MODE_AEAD) ? 1 : 0);
    chk("FIN rounds", nr(PH_FIN), (m == MODE_AEAD) ? NF : 0);
    chk("LOAD steps", steps_load, 1);
    chk("COPY steps", steps_copy, (m == MODE_AEAD) ? 1 : 0);
    chk("FINX steps", steps_finx, (m == MODE_AEAD) ? 1 : 0);
    chk("done pulses", n_done, 1);
    chk("last-round rounds", n_last, (m == MODE_AEAD) ? 1 : 0);
    chk("flag errors", flag_err, 0);
  endtask

  initial begin
    mode_i = MODE_SC; ad_blocks_i = 0; msg_blocks_i = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(MODE_SC, 0, 4);
    run(MODE_AEAD, 2, 3);
    run(MODE_AEAD, 0, 0);
    run(MODE_SC, 5, 0);
    run(MODE_AEAD, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
