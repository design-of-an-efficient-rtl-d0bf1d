// tb_mixcol_pe: random coefficients, data and partial sums; checks the registered
// result p_out = p_in ^ coef*d_in and the one-cycle data pass d_out.
module tb_mixcol_pe;
  import aes_ref_pkg::*;
  logic clk = 0, coef_ld = 0;
  logic [7:0] coef_in = 0, d_in = 0, p_in = 0, d_out, p_out;
  int checks = 0, failures = 0;

  mixcol_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] c;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t % 10 == 0) begin
        c = 8'($urandom);
        coef_ld = 1;  coef_in = c;
        @(negedge clk);
        coef_ld = 0;  coef_in = 8'($urandom);
      end
      d_in = 8'($urandom);  p_in = 8'($urandom);
      @(negedge clk);
      checks += 2;
      if (p_out !== (p_in ^ r_mul(c, d_in))) begin
        failures++;
        $display("FAIL: p_out %h exp %h", p_out, p_in ^ r_mul(c, d_in));
      end
      if (d_out !== d_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
