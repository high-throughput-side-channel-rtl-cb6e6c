// tb_aes_sbox: exhaustive check of the AES S-box against an independently
// computed table and four published AES S-box values.
module tb_aes_sbox;
  import lol_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] in, input logic [7:0] exp);
    a = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL S(%02h) = %02h, expected %02h", in, y, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) check(8'(i), ref_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
