// mixcol_pe: one processing element (P0..P15) of the MixColumns systolic array.
//
// Holds a coefficient register (the MixColumns or InvMixColumns matrix entry, loaded with
// coef_ld) and a result register. Each cycle it multiplies the byte arriving from the left
// by the coefficient in GF(2^8), XORs the partial sum arriving from above, and stores the
// sum in the result register (p_out); the data byte is passed to the right through a
// register (d_out). Both outputs are registered: one cycle per cell horizontally and
// vertically. The coefficient and result registers follow the published design; the horizontal
// data register is this design's choice. No reset: every value read was written first.
module mixcol_pe
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  coef_ld,
  input  byte_t coef_in,
  input  byte_t d_in,
  input  byte_t p_in,
  output byte_t d_out,
  output byte_t p_out
);

  byte_t coef;

  always_ff @(posedge clk) begin
    if (coef_ld) coef <= coef_in;
    d_out <= d_in;
    p_out <= p_in ^ gmul(coef, d_in);
  end

endmodule
