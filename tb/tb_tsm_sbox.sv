// tb_tsm_sbox: feeds a new random two-share input with fresh randomness in
// every cycle and checks that the recombined output equals the S-box of the
// input exactly two cycles later (latency 2, one input per cycle), and that
// the output shares change with the randomness.
module tb_tsm_sbox;
  import lol_pkg::SBOX_RND;
  import lol_ref_pkg::*;

  logic clk = 0;
  logic [7:0] x_sh0, x_sh1, y_sh0, y_sh1;
  logic [SBOX_RND-1:0] rnd;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];
  int share_varies = 0;

  tsm_sbox dut (.clk, .x_sh0, .x_sh1, .rnd, .y_sh0, .y_sh1);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, last_sh1;
    last_sh1 = 0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      x     = 8'($urandom);
      x_sh1 = 8'($urandom);
      x_sh0 = x ^ x_sh1;
      rnd   = {$urandom, $urandom};
      hist.push_back(x);
      @(posedge clk);
      #1;
      if (cyc >= 2) begin
        logic [7:0] xi;
        xi = hist[cyc - 1];
        checks++;
        if ((y_sh0 ^ y_sh1) !== ref_sbox(xi)) begin
          failures++;
          $display("FAIL cycle %0d: S(%02h) shares %02h^%02h", cyc, xi, y_sh0, y_sh1);
        end
        if (y_sh1 != last_sh1) share_varies++;
        last_sh1 = y_sh1;
      end
    end
    checks++;
    if (share_varies < 100) begin
      failures++;
      $display("FAIL output share does not follow the randomness");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
