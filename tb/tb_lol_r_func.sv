// tb_lol_r_func: the unmasked 128-bit R function on random blocks and on
// zero, against the reference R.
module tb_lol_r_func;
  import lol_ref_pkg::*;

  b128_t x, y;
  int checks = 0, failures = 0;
  lol_ref_model ref_m;

  lol_r_func dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = new();
    for (int t = 0; t < 300; t++) begin
      x = (t == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (y !== ref_m.R(x)) begin
        failures++;
        $display("FAIL R(%032h) = %032h expected %032h", x, y, ref_m.R(x));
      end
    end
    // R(0): every S-box gives 63, MixColumns of a constant column is the column
    x = '0;
    #1;
    checks++;
    if (y !== {16{8'h63}}) begin failures++; $display("FAIL R(0) = %032h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
