// tb_lol2_unmasked_fast: SC and AEAD operations on the one-round-per-cycle
// unmasked engine (N_INIT = 4, N_FIN = 3), checked block by block and tag by
// tag against the reference model. A timed SC operation with din_valid held
// high checks one block per cycle and the initialization time; the other
// operations insert random input gaps.
module tb_lol2_unmasked_fast;
  import lol_pkg::*;
  import lol_ref_pkg::*;

  localparam int unsigned NI = 4, NF = 3;

  logic clk = 0, rst_n = 0, start = 0;
  mode_e mode_i = MODE_SC;
  logic [255:0] key;
  blk_t iv, din, dout, z, tag;
  logic [31:0] ad_blocks_i, msg_blocks_i;
  logic din_valid = 0, din_ready, dout_valid, tag_valid, busy, done;
  int checks = 0, failures = 0, n_stalls = 0, n_sc = 0, n_aead = 0;

  lol2_unmasked_fast #(.N_INIT(NI), .N_FIN(NF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && din_ready && !din_valid) n_stalls++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_t r128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input mode_e m, input int nad, input int nmsg, input bit timed);
    lol_ref_model ref_m;
    bq_t ad, msg, ct, inq;
    blk_t exp_tag;
    int got, tags, t_first, t_prev, bad;
    ref_m = new();
    key = {r128(), r128()};
    iv = r128();
    for (int i = 0; i < nad; i++) ad.push_back(r128());
    for (int i = 0; i < nmsg; i++) msg.push_back(r128());
    ref_m.run(m == MODE_AEAD, NI, NF, key, iv, ad, msg, ct, exp_tag);
    inq = (m == MODE_AEAD) ? {ad, msg} : msg;
    @(negedge clk);
    mode_i = m; ad_blocks_i = 32'(nad); msg_blocks_i = 32'(nmsg); start = 1;
    @(negedge clk);
    start = 0;
    got = 0; tags = 0; t_first = -1; t_prev = -1; bad = 0;
    for (int cyc = 0, idle = 0; cyc < 5000 && idle < 3; cyc++) begin
      din_valid = (inq.size() > 0) && (timed || ($urandom % 3 != 0));
      din = (inq.size() > 0) ? inq[0] : '0;
      @(posedge clk);
      if (din_valid && din_ready) void'(inq.pop_front());
      if (dout_valid) begin
        chk($sformatf("ct block %0d", got), got < nmsg && dout == ct[got] && z == (dout ^ msg[got]));
        if (t_prev >= 0 && cyc - t_prev != 1) bad++;
        if (t_first < 0) t_first = cyc;
        t_prev = cyc;
        got++;
      end
      if (tag_valid) begin chk("tag", tag == exp_tag); tags++; end
      idle = busy ? 0 : idle + 1;
      @(negedge clk);
    end
    din_valid = 0;
    chk($sformatf("%s ad=%0d msg=%0d: block count", m.name(), nad, nmsg), got == nmsg);
    chk("tag count", tags == ((m == MODE_AEAD) ? 1 : 0));
    if (timed) begin
      chk("one block per cycle", bad == 0);
      // LOAD, N_INIT one-cycle rounds, then the first block; dout registered.
      if (m == MODE_SC)
        chk($sformatf("first block at cycle %0d", t_first), t_first == 1 + NI + 1);
    end
    if (m == MODE_SC) n_sc++; else n_aead++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    op(MODE_SC, 0, 8, 1);
    op(MODE_AEAD, 2, 4, 1);
    op(MODE_AEAD, 3, 5, 0);
    op(MODE_SC, 0, 3, 0);
    op(MODE_AEAD, 0, 0, 0);
    chk("input stalls happened", n_stalls > 0);
    chk("SC and AEAD operations ran", n_sc > 0 && n_aead > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
