// aes_io_interface: the 32-bit bus side of the engine.
//
// External writes (bus_wr) carry one 32-bit word per cycle, word 0 first; each word is one
// state column with row 0 in bits 31:24. bus_key marks cipher key words, which go straight
// to the key unit (key_wr, key_idx); the fourth raises key_done. Data words are buffered;
// the fourth raises blk_go in its own cycle; bus_dec of the first word is the direction
// of the block (blk_dec). The data unit reads the
// buffered block at stream position x_idx: column x_idx for encryption, column 3-x_idx for
// decryption, whose column stream runs 3,2,1,0. Result columns leave on dout with
// dout_valid and dout_idx (the state column they are), one per cycle.
// Writes while ready is low are ignored. A key or block takes four bus cycles, as in the
// document; the buffering, word order and handshake are this design's choice.
module aes_io_interface
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ready,
  // external bus
  input  logic       bus_wr,
  input  logic       bus_key,
  input  logic       bus_dec,
  input  word_t      bus_din,
  output word_t      dout,
  output logic       dout_valid,
  output logic [1:0] dout_idx,
  // key unit
  output logic       key_wr,
  output logic [1:0] key_idx,
  output word_t      key_word,
  output logic       key_done,
  // control / data unit
  output logic       blk_go,
  output logic       blk_dec,
  input  logic       dec,
  input  logic [1:0] x_idx,
  output word_t      io_word,
  input  logic       res_valid,
  input  word_t      res_word
);

  word_t      dbuf [4];
  logic [1:0] kcnt, dcnt, ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kcnt <= '0;  dcnt <= '0;  ocnt <= '0;
      blk_dec <= 1'b0;
    end else begin
      if (ready && bus_wr && bus_key) kcnt <= kcnt + 2'd1;
      if (ready && bus_wr && !bus_key) begin
        dcnt <= dcnt + 2'd1;
        if (dcnt == 2'd0) blk_dec <= bus_dec;
      end
      if (res_valid) ocnt <= ocnt + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (ready && bus_wr && !bus_key) dbuf[dcnt] <= bus_din;
  end

  assign key_wr   = ready && bus_wr && bus_key;
  assign key_idx  = kcnt;
  assign key_word = bus_din;
  assign key_done = key_wr && (kcnt == 2'd3);

  // the fourth block word starts the block in the same edge in which it is stored
  assign blk_go = ready && bus_wr && !bus_key && (dcnt == 2'd3);

  assign io_word    = dbuf[dec ? 2'(3 - x_idx) : x_idx];
  assign dout       = res_word;
  assign dout_valid = res_valid;
  assign dout_idx   = dec ? 2'(3 - ocnt) : ocnt;

endmodule
