// tb_aes_key_unit: loads random cipher keys, lets the real micro-program run key setup and
// whole blocks, and stands in for the data unit's S-boxes with a behavioural model (the
// requested word is substituted one cycle after sb_key). Checks round key 10 after key
// setup, and at every X load the key word against the reference schedule: round 0..10
// words for encryption; round 10, InvMixColumns(round 9..1) and round 0 words for
// decryption.
module tb_aes_key_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_done = 0, blk_go = 0, blk_dec = 0;
  logic key_wr = 0;
  logic [1:0] key_idx = 0;
  word_t key_in = 0;
  ctrl_t ctrl;
  logic dec, coef_ld, key_start, setup_begin, setup_end, bwd, ready;
  word_t sbox_req, sbox_in, key_word;
  int checks = 0, failures = 0;

  aes_control_unit u_ctrl (.*);
  aes_key_unit dut (.*);

  always #5 clk = ~clk;

  // behavioural S-box stand-in: forward S-box, one cycle after the load
  always @(posedge clk)
    if (ctrl.sb_key)
      sbox_in <= {r_sbox(sbox_req[31:24]), r_sbox(sbox_req[23:16]), r_sbox(sbox_req[15:8]), r_sbox(sbox_req[7:0])};

  rks_t rks;
  int   arr_loads;
  always @(posedge clk) begin
    if (key_start) arr_loads <= 0;
    else if (ctrl.x_ld && ctrl.x_src == XSRC_ARR) arr_loads <= arr_loads + 1;
  end

  // compare at every X load
  always @(negedge clk) begin
    if (rst_n && ctrl.x_ld) begin
      int r, col;
      blk_t k;
      col = dec ? 3 - ctrl.x_idx : ctrl.x_idx;
      r   = 1 + arr_loads / 4;
      if (ctrl.x_src == XSRC_IO)       k = dec ? rks[10] : rks[0];
      else if (ctrl.x_src == XSRC_BYP) k = dec ? rks[0] : rks[10];
      else                             k = dec ? mc(rks[10 - r], 1) : rks[r];
      checks++;
      if (key_word !== k[127 - 32*col -: 32]) begin
        failures++;
        $display("FAIL: dec=%0d src=%0d r=%0d col=%0d got %h exp %h", dec, ctrl.x_src, r, col, key_word, k[127-32*col -: 32]);
      end
    end
  end

  initial begin
    blk_t key;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      key = rand_blk();
      rks = expand(key);
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        key_wr = 1;  key_idx = 2'(i);  key_in = key[127-32*i -: 32];  key_done = (i == 3);
      end
      @(negedge clk);
      key_wr = 0;  key_done = 0;
      while (!ready) @(negedge clk);
      checks++;
      if ({dut.dk[0], dut.dk[1], dut.dk[2], dut.dk[3]} !== rks[10]) begin
        failures++;
        $display("FAIL: round key 10 after setup %h exp %h", {dut.dk[0], dut.dk[1], dut.dk[2], dut.dk[3]}, rks[10]);
      end
      for (int b = 0; b < 2; b++) begin
        @(negedge clk);
        blk_go = 1;  blk_dec = b[0];
        @(negedge clk);
        blk_go = 0;
        @(negedge clk);
        while (!ready) @(negedge clk);
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
