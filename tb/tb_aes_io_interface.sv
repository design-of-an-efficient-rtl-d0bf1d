// tb_aes_io_interface: key words go straight to the key unit with their index and a
// key_done on the fourth; data words are buffered, blk_go comes with the fourth, with the
// direction of the first; the buffered words are read back in stream order (reversed
// for decryption); result words get their column index; writes while not ready are
// ignored.
module tb_aes_io_interface;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, ready = 1;
  logic bus_wr = 0, bus_key = 0, bus_dec = 0;
  word_t bus_din = 0, dout, key_word, io_word, res_word = 0;
  logic dout_valid, key_wr, key_done, blk_go, blk_dec, dec = 0, res_valid = 0;
  logic [1:0] dout_idx, key_idx, x_idx = 0;
  int checks = 0, failures = 0;

  aes_io_interface dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    word_t w [4];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      bit d;
      d = n[0];
      // key words
      for (int i = 0; i < 4; i++) begin
        w[i] = $urandom;
        bus_wr = 1;  bus_key = 1;  bus_din = w[i];
        #1;
        chk(key_wr && key_idx == 2'(i) && key_word == w[i] && key_done == (i == 3), "key word");
        @(negedge clk);
      end
      // ignored write while busy
      ready = 0;  bus_wr = 1;  bus_key = 0;  bus_din = 32'hdeadbeef;
      #1 chk(!key_wr, "write while busy");
      @(negedge clk);
      ready = 1;
      // data words
      for (int i = 0; i < 4; i++) begin
        w[i] = $urandom;
        bus_wr = 1;  bus_key = 0;  bus_dec = (i == 0) ? d : !d;  bus_din = w[i];
        #1 chk(blk_go == (i == 3), "blk_go with the fourth word");
        if (i == 3) chk(blk_dec == d, "blk_dec from the first word");
        @(negedge clk);
      end
      bus_wr = 0;
      #1 chk(!blk_go, "blk_go one cycle");
      dec = d;
      for (int i = 0; i < 4; i++) begin
        x_idx = 2'(i);
        #1 chk(io_word == w[d ? 3 - i : i], $sformatf("stream word %0d", i));
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        res_valid = 1;  res_word = $urandom;
        #1 chk(dout_valid && dout == res_word && dout_idx == 2'(d ? 3 - i : i), "result word");
        @(negedge clk);
      end
      res_valid = 0;
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
