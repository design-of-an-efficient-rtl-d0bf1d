// tb_aes_data_unit: runs whole blocks through the data unit under the real micro-program
// and a behavioural stand-in for the key unit, in both directions.
//
// The stand-in supplies, for every X load, the round key word the schedule calls for
// (computed by the reference model; InvMixColumns keys for decryption's middle rounds),
// so the test covers S-boxes, ShiftRows registers, systolic array, bypass, alignment and
// AddRoundKey together. Checks every result column against the reference cipher and the
// number of cycles from hand-over to the last result column.
module tb_aes_data_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_done = 0, blk_go = 0, blk_dec = 0;
  ctrl_t ctrl;
  logic dec, coef_ld, key_start, setup_begin, setup_end, bwd, ready;
  word_t io_word, key_word, sbox_out, out_word;
  logic out_valid;
  int checks = 0, failures = 0;

  aes_control_unit u_ctrl (.*);
  aes_data_unit dut (
    .clk(clk), .ctrl(ctrl), .dec(dec), .coef_ld(coef_ld), .io_word(io_word),
    .key_word(key_word), .key_sbox_in(32'h0), .sbox_out(sbox_out),
    .out_word(out_word), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  blk_t in_blk;
  rks_t rks;
  int   arr_loads;

  // I/O side: stream position -> column
  always_comb io_word = in_blk[127 - 32*(dec ? 3 - ctrl.x_idx : ctrl.x_idx) -: 32];

  // key unit stand-in
  always_comb begin
    int r, col;
    blk_t k;
    col = dec ? 3 - ctrl.x_idx : ctrl.x_idx;
    r   = 1 + arr_loads / 4;
    if (ctrl.x_src == XSRC_IO)       k = dec ? rks[10] : rks[0];
    else if (ctrl.x_src == XSRC_BYP) k = dec ? rks[0] : rks[10];
    else                             k = dec ? mc(rks[10 - r], 1) : rks[r];
    key_word = k[127 - 32*col -: 32];
  end
  always @(posedge clk) begin
    if (u_ctrl.key_start) arr_loads <= 0;
    else if (ctrl.x_ld && ctrl.x_src == XSRC_ARR) arr_loads <= arr_loads + 1;
  end

  initial begin
    blk_t key, res, exp_r;
    int t0, got, lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 8; b++) begin
      bit d;
      d = b[0];
      key = rand_blk();
      rks = expand(key);
      in_blk = rand_blk();
      exp_r = d ? decrypt(in_blk, key) : encrypt(in_blk, key);
      @(negedge clk);
      blk_go = 1;  blk_dec = d;
      @(negedge clk);
      blk_go = 0;
      t0 = 0;  got = 0;  res = '0;  lat = 0;
      while (got < 4) begin
        @(posedge clk);
        t0++;
        #1;
        if (out_valid) begin
          res[127 - 32*(d ? 3 - got : got) -: 32] = out_word;
          got++;
          lat = t0;
        end
      end
      checks++;
      if (res !== exp_r) begin
        failures++;
        $display("FAIL: block %0d dec=%0d got %h exp %h", b, d, res, exp_r);
      end
      checks++;
      if (lat != 91) begin
        failures++;
        $display("FAIL: block %0d last result after %0d cycles, expected 91", b, lat);
      end
      @(posedge clk);
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
