// tb_aes_sbox: all 256 bytes in both directions through the pipelined S-box, one load
// per cycle, checking that each result is valid exactly one cycle after its load and
// that the direction is taken per load (alternating modes).
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic clk = 0, ld = 0, inv = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp_q;
    logic       have = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (dout !== exp_q) begin
          failures++;
          $display("FAIL: step %0d dout %h expected %h", i, dout, exp_q);
        end
      end
      ld  = 1;
      din = 8'(i >> 1);
      inv = i[0];
      exp_q = inv ? r_isbox(din) : r_sbox(din);
      have = 1;
    end
    @(negedge clk);
    ld = 0;
    checks++;
    if (dout !== exp_q) failures++;
    // holds its value while not loaded
    @(negedge clk);
    checks++;
    if (dout !== exp_q) failures++;
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
