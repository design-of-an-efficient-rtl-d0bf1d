// mixcol_systolic_array: N x N systolic array for MixColumns / InvMixColumns (N = 4).
//
// The product out = M * s (M the 4x4 MixColumns matrix, s a state column) is computed by a
// weight-stationary array: PE(k,j) holds M[j][k]. The bytes of state row k enter at the left
// of PE row k and move right one cell per cycle; partial sums move down one cell per cycle
// and are XORed in every cell, so output byte row j leaves the bottom of PE column j.
// Streaming the state columns one per cycle with row k delayed k cycles (the entry order
// of the published design's systolic diagram) makes column c's output byte row j leave at
// col_out[j] N+j cycles after row 0 of that column entered: one column per cycle, each
// output column skewed by one cycle per row. Loading coefficients with coef_ld sets the
// direction (inv=1: {0E,0B,0D,09}); this takes one cycle. A zero input byte adds nothing,
// so idle slots are fed zero.
module mixcol_systolic_array
  import aes_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic  clk,
  input  logic  coef_ld,
  input  logic  inv,
  input  byte_t row_in  [N],
  output byte_t col_out [N]
);

  byte_t d [N][N+1];   // d[k][j]: data entering PE(k,j) from the left
  byte_t p [N+1][N];   // p[k][j]: partial sum entering PE(k,j) from above

  for (genvar k = 0; k < N; k++) begin : g_row
    assign d[k][0] = row_in[k];
    for (genvar j = 0; j < N; j++) begin : g_col
      mixcol_pe u_pe (
        .clk    (clk),
        .coef_ld(coef_ld),
        .coef_in(mc_coef(j, k, inv)),
        .d_in   (d[k][j]),
        .p_in   (p[k][j]),
        .d_out  (d[k][j+1]),
        .p_out  (p[k+1][j])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    assign p[0][j]    = '0;
    assign col_out[j] = p[N][j];
  end

endmodule
