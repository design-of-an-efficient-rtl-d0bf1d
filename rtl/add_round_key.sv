// add_round_key: the multiplexer in front of X0..X3, the AddRoundKey XOR and X itself.
//
// When ld=1 the column chosen by src (I/O interface for the initial round, aligned array
// output for normal rounds, aligned bypass for the final round) is XORed with the 32-bit
// round key word and stored in X0..X3 (x). x feeds DEMUX2: back to the S-boxes or out to
// the I/O interface. One cycle from inputs to x. X has no reset; it is written before use.
module add_round_key
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  ld,
  input  xsrc_e src,
  input  word_t io_word,
  input  word_t arr_word,
  input  word_t byp_word,
  input  word_t key_word,
  output word_t x
);

  word_t sel;

  always_comb begin
    unique case (src)
      XSRC_IO:  sel = io_word;
      XSRC_ARR: sel = arr_word;
      default:  sel = byp_word;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ld) x <= sel ^ key_word;
  end

endmodule
