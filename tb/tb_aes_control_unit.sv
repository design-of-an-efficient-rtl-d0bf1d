// tb_aes_control_unit: runs key setup and blocks through the micro-program and checks
// its schedule by counting: key setup = 10 S-box uses, captures and key steps bracketed
// by setup_begin / setup_end, 33 cycles; a block = 40 S-box data loads (4 per round),
// 4 X loads from I/O, 36 from the array, 4 from the bypass, 4 result words, 10 key steps,
// 10 key S-box uses, 93 clock edges from blk_go to ready (1 idle-to-PRE, 1 PRE, 1 START, 90 rounds), and no S-box cycle used twice.
module tb_aes_control_unit;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, key_done = 0, blk_go = 0, blk_dec = 0;
  ctrl_t ctrl;
  logic dec, coef_ld, key_start, setup_begin, setup_end, bwd, ready;
  int checks = 0, failures = 0;

  aes_control_unit dut (.*);
  always #5 clk = ~clk;

  int n_sb, n_key, n_sw, n_upd, n_io, n_arr, n_byp, n_out, n_clash, n_sb_run, n_first_x, n_cyc;
  always @(posedge clk) begin
    n_cyc++;
    if (ctrl.sb_ld) n_sb++;
    if (ctrl.sb_key) n_key++;
    if (ctrl.sb_ld && ctrl.sb_key) n_clash++;
    if (ctrl.key_sw) n_sw++;
    if (ctrl.key_upd) n_upd++;
    if (ctrl.x_ld && ctrl.x_src == XSRC_IO) n_io++;
    if (ctrl.x_ld && ctrl.x_src == XSRC_ARR) n_arr++;
    if (ctrl.x_ld && ctrl.x_src == XSRC_BYP) n_byp++;
    if (ctrl.out_v) n_out++;
  end

  task automatic clr();
    n_sb = 0; n_key = 0; n_sw = 0; n_upd = 0; n_io = 0; n_arr = 0; n_byp = 0; n_out = 0;
    n_clash = 0; n_cyc = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      @(negedge clk);
      key_done = 1;
      clr();
      @(negedge clk);
      key_done = 0;
      chk(setup_begin && !ready, "setup_begin");
      while (!setup_end) @(negedge clk);
      @(negedge clk);
      chk(ready, "ready after setup");
      chk(n_key == 10 && n_sw == 10 && n_upd == 10 && n_sb == 0, $sformatf("key setup counts %0d %0d %0d", n_key, n_sw, n_upd));
      chk(n_cyc == 33, $sformatf("key setup took %0d cycles", n_cyc));
      for (int b = 0; b < 2; b++) begin
        blk_go = 1;  blk_dec = b[0];
        clr();
        @(negedge clk);
        blk_go = 0;
        chk(!ready && coef_ld && key_start && dec == b[0], "hand-over");
        while (!ready) @(negedge clk);
        chk(n_cyc == 93, $sformatf("block took %0d cycles", n_cyc));
        chk(n_sb == 40, $sformatf("S-box data loads %0d", n_sb));
        chk(n_io == 4 && n_arr == 36 && n_byp == 4 && n_out == 4, $sformatf("X loads %0d %0d %0d out %0d", n_io, n_arr, n_byp, n_out));
        chk(n_upd == 10 && n_key == 10 && n_sw == 10, $sformatf("key steps %0d %0d %0d", n_upd, n_key, n_sw));
        chk(n_clash == 0, "S-box used twice in a cycle");
        @(negedge clk);
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
