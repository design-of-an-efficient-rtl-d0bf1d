// tb_aes_block_stream: the throughput workload. One key, then a stream of 16 blocks written
// as fast as ready allows (8 encryptions, then the 8 results decrypted back), checked
// against the reference model. Reports the cycles per block from the first block word to
// the last result word of the stream and checks it against the schedule: 4 bus cycles and
// 92 cycles of processing per block and 1 cycle in which the control unit returns to
// idle, one block in flight (97 cycles, 1.32 bit/cycle; the S-boxes are busy 40 of them).
module tb_aes_block_stream;
  import aes_ref_pkg::*;

  localparam int NBLK = 8;
  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_key = 0, bus_dec = 0;
  logic [31:0] bus_din = 0;
  logic ready, dout_valid;
  logic [31:0] dout;
  logic [1:0] dout_idx;
  int checks = 0, failures = 0, cyc = 0;

  aes_systolic_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  blk_t pts [NBLK];
  blk_t res [2*NBLK];
  int   nres = 0, wcnt = 0;

  always @(posedge clk) begin
    if (dout_valid) begin
      res[nres][127 - 32*dout_idx -: 32] <= dout;
      wcnt <= wcnt + 1;
      if (wcnt % 4 == 3) nres <= nres + 1;
    end
  end

  task automatic write_words(blk_t v, bit key, bit dec);
    while (!ready) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      bus_wr <= 1;  bus_key <= key;  bus_dec <= dec;  bus_din <= v[127-32*i -: 32];
      @(posedge clk);
    end
    bus_wr <= 0;
    @(posedge clk);
  endtask

  initial begin
    blk_t key;
    int t0, t1;
    real per_blk;
    repeat (2) @(posedge clk);
    rst_n = 1;
    key = rand_blk();
    write_words(key, 1, 0);
    foreach (pts[i]) pts[i] = rand_blk();
    while (!ready) @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < NBLK; i++) write_words(pts[i], 0, 0);
    while (nres < NBLK) @(posedge clk);
    for (int i = 0; i < NBLK; i++) write_words(res[i], 0, 1);
    while (nres < 2*NBLK) @(posedge clk);
    t1 = cyc;
    for (int i = 0; i < NBLK; i++) begin
      checks += 2;
      if (res[i] !== encrypt(pts[i], key)) begin
        failures++;  $display("FAIL: block %0d ciphertext %h", i, res[i]);
      end
      if (res[NBLK+i] !== pts[i]) begin
        failures++;  $display("FAIL: block %0d decrypted %h exp %h", i, res[NBLK+i], pts[i]);
      end
    end
    per_blk = real'(t1 - t0) / (2*NBLK);
    $display("stream: %0d blocks in %0d cycles, %0.2f cycles/block, %0.2f bit/cycle",
             2*NBLK, t1 - t0, per_blk, 128.0 / per_blk);
    checks++;
    if (t1 - t0 > 2*NBLK*97 + 4) begin
      failures++;  $display("FAIL: stream slower than 97 cycles per block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
