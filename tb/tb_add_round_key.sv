// tb_add_round_key: random words on all three sources; checks that X loads the selected
// source XOR the key word only when ld is high.
module tb_add_round_key;
  import aes_pkg::*;
  logic clk = 0, ld = 0;
  xsrc_e src = XSRC_IO;
  word_t io_word = 0, arr_word = 0, byp_word = 0, key_word = 0, x;
  int checks = 0, failures = 0;

  add_round_key dut (.*);
  always #5 clk = ~clk;

  initial begin
    word_t exp_x;
    @(negedge clk);
    ld = 1;  io_word = 32'h12345678;  key_word = 32'h0f0f0f0f;  src = XSRC_IO;
    @(negedge clk);
    exp_x = 32'h12345678 ^ 32'h0f0f0f0f;
    for (int t = 0; t < 300; t++) begin
      io_word = $urandom;  arr_word = $urandom;  byp_word = $urandom;  key_word = $urandom;
      ld = ($urandom % 4) != 0;
      src = xsrc_e'($urandom % 3);
      @(negedge clk);
      if (ld) exp_x = key_word ^ (src == XSRC_IO ? io_word : src == XSRC_ARR ? arr_word : byp_word);
      checks++;
      if (x !== exp_x) begin
        failures++;
        $display("FAIL: t %0d x %h exp %h", t, x, exp_x);
      end
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
