// aes_systolic_top: AES-128 encryption and decryption engine built around a 4x4 systolic
// MixColumns array, four shared S-boxes and a microprogrammed control unit.
//
// Use: write the four cipher key words (bus_key=1), wait for ready (key setup computes
// round key 10 for decryption), then write the four words of a block (bus_key=0, bus_dec
// on the first word selects decryption). The four result columns appear on dout with
// dout_valid, dout_idx giving the state column (encryption 0..3, decryption 3..0).
// Words are state columns, row 0 in bits 31:24 (byte 0 of a FIPS-197 block is bits
// 127:120 of word 0). Timing: a key takes 4 bus cycles, then ready is low for 33 cycles of
// key setup. A block takes 4 bus cycles; its last result word comes 92 cycles after the
// last block word (key/coefficient start, START, 10 rounds of 9 cycles). The
// S-boxes take the state in 4 cycles per round. Only one block is in flight.
// The partition into I/O interface, data unit, key unit and control unit follows the
// document; see the units for which details are this design's own.
module aes_systolic_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_wr,
  input  logic       bus_key,
  input  logic       bus_dec,
  input  word_t      bus_din,
  output logic       ready,
  output word_t      dout,
  output logic       dout_valid,
  output logic [1:0] dout_idx
);

  ctrl_t      ctrl;
  logic       dec, coef_ld, key_start, setup_begin, setup_end, bwd;
  logic       key_wr, key_done, blk_go, blk_dec;
  logic [1:0] key_idx;
  word_t      key_in, io_word, key_word, sbox_req, sbox_out, x_word;
  logic       x_out_v;

  aes_io_interface u_io (
    .clk(clk), .rst_n(rst_n), .ready(ready),
    .bus_wr(bus_wr), .bus_key(bus_key), .bus_dec(bus_dec), .bus_din(bus_din),
    .dout(dout), .dout_valid(dout_valid), .dout_idx(dout_idx),
    .key_wr(key_wr), .key_idx(key_idx), .key_word(key_in), .key_done(key_done),
    .blk_go(blk_go), .blk_dec(blk_dec), .dec(dec), .x_idx(ctrl.x_idx), .io_word(io_word),
    .res_valid(x_out_v), .res_word(x_word)
  );

  aes_control_unit u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .key_done(key_done), .blk_go(blk_go), .blk_dec(blk_dec),
    .ctrl(ctrl), .dec(dec), .coef_ld(coef_ld), .key_start(key_start),
    .setup_begin(setup_begin), .setup_end(setup_end), .bwd(bwd), .ready(ready)
  );

  aes_key_unit u_key (
    .clk(clk), .rst_n(rst_n),
    .key_wr(key_wr), .key_idx(key_idx), .key_in(key_in),
    .setup_begin(setup_begin), .setup_end(setup_end), .key_start(key_start),
    .bwd(bwd), .dec(dec), .ctrl(ctrl),
    .sbox_req(sbox_req), .sbox_in(sbox_out), .key_word(key_word)
  );

  aes_data_unit u_data (
    .clk(clk), .ctrl(ctrl), .dec(dec), .coef_ld(coef_ld),
    .io_word(io_word), .key_word(key_word), .key_sbox_in(sbox_req),
    .sbox_out(sbox_out), .out_word(x_word), .out_valid(x_out_v)
  );

endmodule
