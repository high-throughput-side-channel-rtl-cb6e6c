// tb_masked_r_core: random shared blocks, one per cycle with fresh
// randomness, checked against the reference R two cycles later.
module tb_masked_r_core;
  import lol_pkg::CORE_RND;
  import lol_ref_pkg::*;

  logic clk = 0;
  b128_t in_sh0, in_sh1, out_sh0, out_sh1;
  logic [CORE_RND-1:0] rnd;
  int checks = 0, failures = 0;
  b128_t hist [$];
  lol_ref_model ref_m;

  masked_r_core dut (.clk, .in_sh0, .in_sh1, .rnd, .out_sh0, .out_sh1);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic b128_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    b128_t x;
    ref_m = new();
    for (int cyc = 0; cyc < 300; cyc++) begin
      x      = (cyc == 0) ? '0 : rand128();
      in_sh1 = rand128();
      in_sh0 = x ^ in_sh1;
      for (int k = 0; k < CORE_RND; k += 32) rnd[k +: 32] = $urandom;
      hist.push_back(x);
      @(posedge clk);
      #1;
      if (cyc >= 2) begin
        checks++;
        if ((out_sh0 ^ out_sh1) !== ref_m.R(hist[cyc - 1])) begin
          failures++;
          $display("FAIL cycle %0d: R(%032h) = %032h exp %032h", cyc, hist[cyc - 1],
                   out_sh0 ^ out_sh1, ref_m.R(hist[cyc - 1]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
