// shift_rows_regs: the R0..R5 register network that performs ShiftRows without logic of
// its own.
//
// The S-boxes deliver one state column per cycle (columns in stream order 0,1,2,3). Row 0
// passes straight through. Row r (1..3) owns a shift register of depth r (row 1: R0;
// row 2: R1,R2; row 3: R3,R4,R5). While the first r columns go by, row r captures their
// bytes (shift[r]=1) and feeds the array live bytes of the later columns; afterwards it
// feeds the r captured bytes out in order (held[r]=1, shift[r]=1 pops one per cycle).
// Together with a one-cycle skew per row this yields exactly the entry order of the
// systolic array: row r sees columns r, r+1, ... (mod 4), i.e. the rotated row.
// For decryption the column stream runs 3,2,1,0 and the same schedule gives the
// right rotation of InvShiftRows. The register counts follow the published design; the shift /
// hold schedule that the control unit drives is this design's reading of it.
//
// Timing: dout[0] and live bytes are combinational from din; held bytes come from the
// registers. Registers have no reset: a byte is always written before it is read.
module shift_rows_regs
  import aes_pkg::*;
(
  input  logic       clk,
  input  col_t       din,
  input  logic [3:1] shift,
  input  logic [3:1] held,
  output col_t       dout
);

  byte_t r1 [1];   // R0
  byte_t r2 [2];   // R1, R2
  byte_t r3 [3];   // R3, R4, R5

  always_ff @(posedge clk) begin
    if (shift[1]) r1[0] <= din[1];
    if (shift[2]) begin
      r2[0] <= r2[1];
      r2[1] <= din[2];
    end
    if (shift[3]) begin
      r3[0] <= r3[1];
      r3[1] <= r3[2];
      r3[2] <= din[3];
    end
  end

  always_comb begin
    dout[0] = din[0];
    dout[1] = held[1] ? r1[0] : din[1];
    dout[2] = held[2] ? r2[0] : din[2];
    dout[3] = held[3] ? r3[0] : din[3];
  end

endmodule
