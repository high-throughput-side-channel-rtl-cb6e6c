// tb_lol_r_col: the 32-bit R unit. For random blocks x, the four bytes that
// ShiftRows brings into column c are gathered here and the unit's output is
// compared with column c of the reference R(x).
module tb_lol_r_col;
  import lol_ref_pkg::*;

  logic [31:0] in_col, out_col;
  int checks = 0, failures = 0;
  lol_ref_model ref_m;

  lol_r_col dut (.in_col, .out_col);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b128_t x, rx;
    ref_m = new();
    for (int t = 0; t < 200; t++) begin
      x  = {$urandom, $urandom, $urandom, $urandom};
      rx = ref_m.R(x);
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 4; r++)
          in_col[31 - 8*r -: 8] = x[127 - 8*(4*((c + r) % 4) + r) -: 8];
        #1;
        checks++;
        if (out_col !== rx[127 - 32*c -: 32]) begin
          failures++;
          $display("FAIL column %0d of R(%032h): %08h expected %08h", c, x, out_col,
                   rx[127 - 32*c -: 32]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
