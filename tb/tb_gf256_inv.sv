// tb_gf256_inv: exhaustive check of the composite-field GF(2^8) inverter against a
// brute-force inverse (a * a^-1 = 1, 0 -> 0), all 256 inputs.
module tb_gf256_inv;
  import aes_ref_pkg::*;
  logic [7:0] a, a_inv;
  int checks = 0, failures = 0;

  gf256_inv dut (.a(a), .a_inv(a_inv));

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (a_inv !== r_ginv(a)) begin
        failures++;
        $display("FAIL: inv(%h) = %h, expected %h", a, a_inv, r_ginv(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
