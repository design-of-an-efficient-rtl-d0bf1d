// tb_shift_rows_regs: streams the four columns of random states through the R0..R5
// network with the round schedule (capture in the first r cycles, release four cycles
// later) and checks that row k feeds bytes in the systolic entry order: at entry step i
// (cycle 1+i+k of the round) row k carries the byte of column (i+k) mod 4, i.e. the
// ShiftRows order D1 D5 D9 D13 / D6 D10 D14 D2 / D11 D15 D3 D7 / D16 D4 D8 D12.
module tb_shift_rows_regs;
  import aes_pkg::*;
  logic clk = 0;
  col_t din, dout;
  logic [3:1] shift, held;
  int checks = 0, failures = 0;

  shift_rows_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    byte_t st [4][4];   // st[row][col]
    for (int rnd = 0; rnd < 20; rnd++) begin
      foreach (st[r, c]) st[r][c] = 8'($urandom);
      // cycles u = 1..7 of a round; S-box column u-1 on din during u = 1..4
      for (int u = 1; u <= 7; u++) begin
        @(negedge clk);
        for (int k = 0; k < 4; k++) din[k] = (u <= 4) ? st[k][u-1] : 8'($urandom);
        for (int k = 1; k <= 3; k++) begin
          shift[k] = (u >= 1 && u <= k) || (u >= 5 && u <= 4 + k);
          held[k]  = (u >= 5 && u <= 4 + k);
        end
        #1;
        for (int k = 0; k < 4; k++) begin
          int i;
          i = u - 1 - k;
          if (i >= 0 && i <= 3) begin
            checks++;
            if (dout[k] !== st[k][(i + k) % 4]) begin
              failures++;
              $display("FAIL: round %0d u %0d row %0d got %h exp %h", rnd, u, k, dout[k], st[k][(i+k)%4]);
            end
          end
        end
      end
      @(negedge clk);
      shift = '0;  held = '0;
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
