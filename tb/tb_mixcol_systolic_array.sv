// tb_mixcol_systolic_array: streams random state columns, one per cycle, with row k
// delayed k cycles, in both directions, and checks every output byte against the
// reference MixColumns / InvMixColumns at its cycle: output row j of the column entered
// at cycle t is on col_out[j] N+j = 4+j cycles later.
module tb_mixcol_systolic_array;
  import aes_ref_pkg::*;
  localparam int N = 4;
  localparam int NCOL = 40;
  logic clk = 0, coef_ld = 0, inv = 0;
  logic [7:0] row_in [N];
  logic [7:0] col_out [N];
  int checks = 0, failures = 0;

  mixcol_systolic_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int mode = 0; mode < 2; mode++) begin
      logic [31:0] cols [NCOL];
      blk_t ref_blk;
      foreach (cols[i]) cols[i] = $urandom;
      @(negedge clk);
      inv = mode[0];  coef_ld = 1;
      @(negedge clk);
      coef_ld = 0;  inv = ~mode[0];   // coefficients must be held, not follow inv
      // cycle t: row k carries column t-k
      for (int t = 0; t < NCOL + 12; t++) begin
        for (int k = 0; k < N; k++)
          row_in[k] = (t - k >= 0 && t - k < NCOL) ? cols[t-k][31-8*k -: 8] : 8'h00;
        #1;
        for (int j = 0; j < N; j++) begin
          int c;
          c = t - (N + j);
          if (c >= 0 && c < NCOL) begin
            ref_blk = mc({cols[c], 96'h0}, mode[0]);
            checks++;
            if (col_out[j] !== ref_blk[127-8*j -: 8]) begin
              failures++;
              $display("FAIL: mode %0d col %0d row %0d got %h exp %h", mode, c, j, col_out[j], ref_blk[127-8*j -: 8]);
            end
          end
        end
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
