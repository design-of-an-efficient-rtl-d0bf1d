// aes_pkg: types, constants and GF arithmetic shared by the systolic AES-128 engine.
//
// A 32-bit word is one state column; byte row 0 sits in bits 31:24, row 3 in bits 7:0.
// The GF(2^8) helpers use the AES polynomial x^8+x^4+x^3+x+1; the GF(2^4) helpers use
// x^4+x+1, the ground field of the composite-field S-box. ctrl_t is the control word the
// microprogrammed control unit drives into the data and key units, one field per control
// signal (the field list is this design's own; the published design gives none).
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;
  typedef byte_t       col_t [4];

  // Source of the column loaded into X0..X3 (the multiplexer in front of AddRoundKey).
  typedef enum logic [1:0] {
    XSRC_IO  = 2'd0,   // block word from the I/O interface (initial round)
    XSRC_ARR = 2'd1,   // aligned output of the MixColumns array (normal rounds)
    XSRC_BYP = 2'd2    // aligned bypass around the array (final round)
  } xsrc_e;

  // One control word. Widths follow the number of rows / columns they drive.
  typedef struct packed {
    logic       sb_ld;     // S0..S3 load Res from X (data)
    logic       sb_key;    // S0..S3 load Res from the key unit (forward S-box)
    logic [3:1] r_shift;   // shift enable of the R0..R5 row registers, rows 1..3
    logic [3:1] r_held;    // row k feeds the held (wrapped) byte instead of the live one
    logic [3:0] feed;      // DEMUX1: row k carries a valid byte this cycle
    logic       byp;       // DEMUX1: send the rows to the bypass instead of the array
    logic       x_ld;      // load X0..X3
    xsrc_e      x_src;     // MUX in front of X
    logic [1:0] x_idx;     // stream position of the column being loaded (0..3)
    logic       out_v;     // DEMUX2: X goes to the I/O interface
    logic       key_sw;    // key unit captures the S-box result
    logic       key_upd;   // key unit steps to the next round key
  } ctrl_t;

  localparam int unsigned ROUNDS   = 10;   // AES-128
  localparam int unsigned ROUND_LEN = 9;   // cycles from X to X for one round

  // ---------------- GF(2^8) ----------------
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = xtime(t);
    end
    return r;
  endfunction

  // MixColumns matrix entry M[row][col]: circulant {02,03,01,01} or {0E,0B,0D,09}.
  function automatic byte_t mc_coef(int unsigned row, int unsigned col, logic inv);
    byte_t enc_c [4];
    byte_t dec_c [4];
    enc_c = '{8'h02, 8'h03, 8'h01, 8'h01};
    dec_c = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    return inv ? dec_c[(col - row) & 3] : enc_c[(col - row) & 3];
  endfunction

  // Round constant used to form round key j (j = 1..10): x^(j-1) in GF(2^8).
  function automatic byte_t rcon(int unsigned j);
    byte_t r;
    r = 8'h01;
    for (int unsigned i = 1; i < j; i++) r = xtime(r);
    return r;
  endfunction

  // ---------------- GF(2^4), ground field x^4+x+1 ----------------
  function automatic logic [3:0] g4_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] g4_sq(logic [3:0] a);
    return g4_mul(a, a);
  endfunction

  // Multiplication by the constant {e} of n(x) = x^2 + x + {e}.
  function automatic logic [3:0] g4_mul_e(logic [3:0] a);
    return g4_mul(a, 4'he);
  endfunction

  // GF(2^4) inverse as a^14 (three squarings and multiplications); 0 maps to 0.
  function automatic logic [3:0] g4_inv(logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = g4_sq(a);
    a4 = g4_sq(a2);
    a8 = g4_sq(a4);
    return g4_mul(g4_mul(a8, a4), a2);
  endfunction

  // ---------------- S-box affine maps ----------------
  function automatic byte_t aff_fwd(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  function automatic byte_t aff_inv(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i + 2) % 8] ^ b[(i + 5) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h05;
  endfunction

  // InvMixColumns of one column word (used on decryption round keys).
  function automatic word_t inv_mix_word(word_t w);
    byte_t a [4];
    word_t r;
    for (int i = 0; i < 4; i++) a[i] = w[31 - 8*i -: 8];
    for (int row = 0; row < 4; row++) begin
      byte_t s;
      s = '0;
      for (int k = 0; k < 4; k++) s ^= gmul(mc_coef(row, k, 1'b1), a[k]);
      r[31 - 8*row -: 8] = s;
    end
    return r;
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
