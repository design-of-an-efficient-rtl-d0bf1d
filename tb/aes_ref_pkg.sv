// aes_ref_pkg: straightforward FIPS-197 AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the S-box is the affine map applied to a brute-force
// GF(2^8) inverse, MixColumns uses repeated doubling, decryption is the plain inverse
// cipher (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns). A block is 128 bits,
// FIPS byte 0 in bits 127:120; state column c is bits 127-32c -: 32.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] r_xt(logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] r_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = r_xt(a);
    end
    return p;
  endfunction

  function automatic logic [7:0] r_ginv(logic [7:0] a);
    if (a == 0) return 0;
    for (int x = 1; x < 256; x++) if (r_mul(a, 8'(x)) == 8'h01) return 8'(x);
    return 0;
  endfunction

  function automatic logic [7:0] r_sbox(logic [7:0] a);
    logic [7:0] b, s;
    b = r_ginv(a);
    s = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic logic [7:0] r_isbox(logic [7:0] a);
    for (int x = 0; x < 256; x++) if (r_sbox(8'(x)) == a) return 8'(x);
    return 0;
  endfunction

  function automatic logic [7:0] gb(blk_t s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic blk_t sb(blk_t s, bit inv);
    blk_t o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = inv ? r_isbox(s[127-8*i -: 8]) : r_sbox(s[127-8*i -: 8]);
    return o;
  endfunction

  function automatic blk_t sr(blk_t s, bit inv);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = inv ? gb(s, r, (c - r + 4) % 4) : gb(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic blk_t mc(blk_t s, bit inv);
    blk_t o;
    logic [7:0] m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 0;
        for (int k = 0; k < 4; k++) acc ^= r_mul(m[(k - r + 4) % 4], gb(s, k, c));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  // round keys rk[0..10]
  typedef blk_t rks_t [11];
  function automatic rks_t expand(blk_t key);
    rks_t rk;
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {r_sbox(t[31:24]), r_sbox(t[23:16]), r_sbox(t[15:8]), r_sbox(t[7:0])} ^ {rc, 24'h0};
        rc = r_xt(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= 10; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    rks_t rk = expand(key);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = sr(sb(s, 0), 0);
      if (r != 10) s = mc(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    rks_t rk = expand(key);
    blk_t s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sb(sr(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mc(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
