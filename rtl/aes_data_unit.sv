// aes_data_unit: the round datapath. One 32-bit state column moves per clock cycle.
//
//   X0..X3 --DEMUX2--> S0..S3 (Res + S-box) --> R0..R5 --DEMUX1--> 4x4 MixColumns array --+
//      ^                                                     \----> bypass --------------+
//      +---- AddRoundKey <-- MUX <-- align (array) / align (bypass) / I/O word ----------+
//
// A round streams the four columns of the state through the S-boxes in four consecutive
// cycles. The R0..R5 network turns the column stream into the skewed, row-rotated stream
// the systolic array needs (ShiftRows), the array applies MixColumns (or InvMixColumns),
// the alignment registers rebuild whole columns and AddRoundKey stores them in X, from
// where the next round starts. Timing, counted from the cycle in which X holds column 0
// (u = 0): S-box Res loads at the ends of u = 0..3, array columns leave aligned at
// u = 8..11 and are loaded into X then, so a round with MixColumns repeats every 9 cycles.
// The final round takes the bypass: columns are aligned at u = 4..7. S0..S3 are idle
// after u = 4, and the key unit borrows them (sb_key) in forward mode.
// Every control signal comes from the control word ctrl; dec selects the S-box
// direction for data loads and the array coefficients at coef_ld.
// The structure follows the published design's data unit diagram; the alignment registers and the
// exact cycle schedule are this design's own.
module aes_data_unit
  import aes_pkg::*;
(
  input  logic  clk,
  input  ctrl_t ctrl,
  input  logic  dec,           // block direction
  input  logic  coef_ld,       // load array coefficients for dec
  input  word_t io_word,       // block word from the I/O interface
  input  word_t key_word,      // round key word for the column being loaded
  input  word_t key_sbox_in,   // word the key unit sends through S0..S3
  output word_t sbox_out,      // S0..S3 results, also read by the key unit
  output word_t out_word,      // X towards the I/O interface
  output logic  out_valid
);

  word_t x;
  col_t  s_out, r_out;
  byte_t arr_in [4];
  byte_t byp_in [4];
  byte_t arr_out [4];
  word_t arr_word, byp_word;

  // S0..S3: row k of the column in X (or of the key unit's word)
  for (genvar k = 0; k < 4; k++) begin : g_sbox
    aes_sbox u_sbox (
      .clk (clk),
      .ld  (ctrl.sb_ld | ctrl.sb_key),
      .inv (ctrl.sb_ld & dec),
      .din (ctrl.sb_key ? key_sbox_in[31-8*k -: 8] : x[31-8*k -: 8]),
      .dout(s_out[k])
    );
    assign sbox_out[31-8*k -: 8] = s_out[k];
  end

  shift_rows_regs u_rnet (
    .clk  (clk),
    .din  (s_out),
    .shift(ctrl.r_shift),
    .held (ctrl.r_held),
    .dout (r_out)
  );

  // DEMUX1: array or bypass; rows carry zero when idle
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      arr_in[k] = (ctrl.feed[k] && !ctrl.byp) ? r_out[k] : '0;
      byp_in[k] = (ctrl.feed[k] &&  ctrl.byp) ? r_out[k] : '0;
    end
  end

  mixcol_systolic_array #(.N(4)) u_array (
    .clk    (clk),
    .coef_ld(coef_ld),
    .inv    (dec),
    .row_in (arr_in),
    .col_out(arr_out)
  );

  align_skew #(.N(4)) u_align_arr (.clk(clk), .din(arr_out), .dout(arr_word));
  align_skew #(.N(4)) u_align_byp (.clk(clk), .din(byp_in),  .dout(byp_word));

  add_round_key u_ark (
    .clk     (clk),
    .ld      (ctrl.x_ld),
    .src     (ctrl.x_src),
    .io_word (io_word),
    .arr_word(arr_word),
    .byp_word(byp_word),
    .key_word(key_word),
    .x       (x)
  );

  // The key unit may borrow S0..S3 only in a cycle in which the state does not use them.
  a_sbox_shared: assert property (@(posedge clk) !(ctrl.sb_ld && ctrl.sb_key))
    else $error("S-boxes requested by the state and the key unit in the same cycle");

  // DEMUX2
  assign out_word  = x;
  assign out_valid = ctrl.out_v;

endmodule
