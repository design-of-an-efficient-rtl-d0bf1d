// aes_key_unit: stores the cipher key and round key 10 and steps through the round keys.
//
// The AES-128 key schedule is computed one round key at a time in the working register
// rk (four words). A step needs SubWord(RotWord(w)) of one word; the key unit has no
// S-boxes of its own: it sends RotWord(w) to the data unit's S0..S3 (sbox_req, loaded when
// the control word has sb_key), captures the result in sw (key_sw) and applies the step
// (key_upd):
//   forward  (encryption, key setup): rk_{j+1} from rk_j, w = rk_j[3]
//   backward (decryption):            rk_{j-1} from rk_j, w = rk_j[3] ^ rk_j[2] = rk_{j-1}[3]
// Key setup (after each cipher key load) runs ten forward steps from the cipher key and
// stores round key 10 in dk, the first key decryption needs. key_start loads rk from the
// cipher key (encryption) or dk (decryption) before a block.
// key_word is the round key word for the column being loaded into X: word x_idx for
// encryption, word 3-x_idx for decryption (whose column stream runs 3..0). Decryption
// rounds with MixColumns use the equivalent inverse cipher, so their key words pass
// through InvMixColumns here. That step, the sw register and the cycle schedule are this
// design's choices; storing the keys, iterating the schedule and borrowing the data
// unit's S-boxes follow the published design. Reset clears the round index only.
module aes_key_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // cipher key load from the I/O interface
  input  logic       key_wr,
  input  logic [1:0] key_idx,
  input  word_t      key_in,
  // sequencing
  input  logic       setup_begin,  // rk <= cipher key, forward
  input  logic       setup_end,    // dk <= rk (round key 10)
  input  logic       key_start,    // rk <= cipher key or dk for a block
  input  logic       bwd,          // backward steps (decryption run)
  input  logic       dec,          // block direction (word order, InvMixColumns)
  input  ctrl_t      ctrl,
  // S-box sharing
  output word_t      sbox_req,
  input  word_t      sbox_in,
  // to AddRoundKey
  output word_t      key_word
);

  word_t ek [4];   // cipher key
  word_t dk [4];   // round key 10
  word_t rk [4];   // working round key
  word_t sw;       // SubWord result
  logic [3:0] jr;  // index of the round key in rk

  byte_t rc;
  always_comb begin
    rc = '0;
    for (int unsigned i = 1; i <= ROUNDS; i++)
      if (jr == 4'(bwd ? i : i - 1)) rc = rcon(i);
  end

  assign sbox_req = rot_word(bwd ? (rk[3] ^ rk[2]) : rk[3]);

  always_ff @(posedge clk) begin
    if (key_wr) ek[key_idx] <= key_in;
    if (ctrl.key_sw) sw <= sbox_in;
    if (setup_end) dk <= rk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           jr <= '0;
    else if (setup_begin) jr <= '0;
    else if (key_start)   jr <= dec ? 4'(ROUNDS) : 4'd0;
    else if (ctrl.key_upd) jr <= bwd ? jr - 4'd1 : jr + 4'd1;
  end

  always_ff @(posedge clk) begin
    if (setup_begin) begin
      rk <= ek;
    end else if (key_start) begin
      rk <= dec ? dk : ek;
    end else if (ctrl.key_upd) begin
      if (bwd) begin
        rk[3] <= rk[3] ^ rk[2];
        rk[2] <= rk[2] ^ rk[1];
        rk[1] <= rk[1] ^ rk[0];
        rk[0] <= rk[0] ^ sw ^ {rc, 24'h0};
      end else begin
        rk[0] <= rk[0] ^ sw ^ {rc, 24'h0};
        rk[1] <= rk[1] ^ rk[0] ^ sw ^ {rc, 24'h0};
        rk[2] <= rk[2] ^ rk[1] ^ rk[0] ^ sw ^ {rc, 24'h0};
        rk[3] <= rk[3] ^ rk[2] ^ rk[1] ^ rk[0] ^ sw ^ {rc, 24'h0};
      end
    end
  end

  word_t w_sel;
  assign w_sel    = rk[dec ? 2'(3 - ctrl.x_idx) : ctrl.x_idx];
  assign key_word = (dec && ctrl.x_src == XSRC_ARR) ? inv_mix_word(w_sel) : w_sel;

endmodule
