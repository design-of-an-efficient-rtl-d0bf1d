// tb_aes_systolic_top: end-to-end test of the AES-128 engine at its default configuration.
//
// Loads the FIPS-197 example key and checks the example ciphertext, then decrypts it back;
// then, for several random keys, encrypts and decrypts random blocks (several blocks per
// key, directions mixed) against the reference model. Checks the cycle count of a block
// (hand-over to last result word), that the S-boxes take the state in exactly four
// cycles per round (40 per block), and counts how often each mechanism ran: key load, key
// setup, encryption, decryption, MixColumns rounds, bypass rounds, key-unit use of the
// S-boxes, held bytes of the ShiftRows registers.
module tb_aes_systolic_top;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_key = 0, bus_dec = 0;
  logic [31:0] bus_din = 0;
  logic ready, dout_valid;
  logic [31:0] dout;
  logic [1:0] dout_idx;
  int checks = 0, failures = 0;
  int cyc = 0;

  aes_systolic_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_keyload = 0, n_setup = 0, n_enc = 0, n_dec = 0;
  int n_mix = 0, n_byp = 0, n_keysbox = 0, n_held = 0, n_sbdata = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.setup_end) n_setup++;
    if (dut.ctrl.sb_key && dut.u_ctrl.state == dut.u_ctrl.S_RUN) n_keysbox++;
    if (dut.ctrl.sb_ld) n_sbdata++;
    if (|dut.ctrl.r_held) n_held++;
    if (dut.ctrl.x_ld && dut.ctrl.x_src == aes_pkg::XSRC_ARR) n_mix++;
    if (dut.ctrl.x_ld && dut.ctrl.x_src == aes_pkg::XSRC_BYP) n_byp++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_ready();
    while (!ready) @(posedge clk);
  endtask

  task automatic load_key(blk_t key);
    wait_ready();
    for (int i = 0; i < 4; i++) begin
      bus_wr <= 1;  bus_key <= 1;  bus_din <= key[127-32*i -: 32];
      @(posedge clk);
    end
    bus_wr <= 0;  bus_key <= 0;
    n_keyload++;
    @(posedge clk);
    wait_ready();
  endtask

  task automatic run_block(blk_t din, bit dec, output blk_t res, output int lat);
    int t0, got;
    int sb0;
    wait_ready();
    for (int i = 0; i < 4; i++) begin
      bus_wr <= 1;  bus_key <= 0;  bus_dec <= dec;  bus_din <= din[127-32*i -: 32];
      @(posedge clk);
    end
    bus_wr <= 0;
    t0 = cyc;
    sb0 = n_sbdata;
    got = 0;
    res = '0;
    while (got < 4) begin
      @(posedge clk);
      if (dout_valid) begin
        res[127 - 32*dout_idx -: 32] = dout;
        got++;
      end
    end
    lat = cyc - t0;
    chk(n_sbdata - sb0 == 40, $sformatf("S-box data loads per block %0d, expected 40", n_sbdata - sb0));
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    blk_t key, pt, ct, res, exp_ct;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // FIPS-197 Appendix C.1
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    load_key(key);
    run_block(pt, 0, res, lat);
    chk(res == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS enc got %h", res));
    chk(lat == 92, $sformatf("block latency %0d, expected 92", lat));
    run_block(res, 1, res, lat);
    chk(res == pt, $sformatf("FIPS dec got %h", res));
    chk(lat == 92, $sformatf("dec block latency %0d, expected 92", lat));

    for (int k = 0; k < 4; k++) begin
      key = rand_blk();
      load_key(key);
      for (int b = 0; b < 3; b++) begin
        bit dec;
        dec = (b == 1) ? 1'b1 : (b == 2) ? ($urandom % 2 == 1) : 1'b0;
        pt = rand_blk();
        exp_ct = dec ? decrypt(pt, key) : encrypt(pt, key);
        run_block(pt, dec, res, lat);
        chk(res == exp_ct, $sformatf("key %h dec=%0d in %h: got %h exp %h", key, dec, pt, res, exp_ct));
      end
    end

    chk(n_keyload > 0 && n_setup == n_keyload, "key load / key setup did not run");
    chk(n_enc > 0, "no encryption");
    chk(n_dec > 0, "no decryption");
    chk(n_mix > 0, "no MixColumns round");
    chk(n_byp > 0, "no bypass round");
    chk(n_keysbox > 0, "key unit never used the S-boxes");
    chk(n_held > 0, "ShiftRows registers never released a byte");
    $display("cycles=%0d last latency=%0d", cyc, lat);
    $display("mechanisms: keyload=%0d setup=%0d enc=%0d dec=%0d mixcols=%0d bypass=%0d key_sbox=%0d held=%0d",
             n_keyload, n_setup, n_enc, n_dec, n_mix, n_byp, n_keysbox, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
