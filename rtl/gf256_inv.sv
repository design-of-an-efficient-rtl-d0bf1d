// gf256_inv: multiplicative inverse in GF(2^8) (AES polynomial), 0 mapped to 0.
//
// Combinational. The byte is mapped by a linear isomorphism into GF((2^4)^2), written
// a = a_h*x + a_l with n(x) = x^2 + x + {e}. There
//   d     = (a_h^2 * {e}) ^ (a_l^2) ^ (a_h * a_l)
//   a^-1  = (a_h * d^-1) x + ((a_h ^ a_l) * d^-1)
// so only one GF(2^4) inversion is needed; the result is mapped back. The dataflow
// (map, squarers, constant multiplier, two adders, inverter, two multipliers, inverse map)
// follows the published design's inversion diagram. The map matrices and the GF(2^4) polynomial
// x^4+x+1 are those of the cited composite-field S-box; they were checked exhaustively
// against plain GF(2^8) inversion.
module gf256_inv
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t a_inv
);

  logic [3:0] ah, al;      // after map
  logic [3:0] d, d_inv;
  logic [3:0] qh, ql;      // inverse in the composite field

  // map: GF(2^8) -> GF((2^4)^2)
  always_comb begin
    logic t_a, t_b, t_c;
    t_a = a[1] ^ a[7];
    t_b = a[5] ^ a[7];
    t_c = a[4] ^ a[6];
    al[0] = t_c ^ a[0] ^ a[5];
    al[1] = a[1] ^ a[2];
    al[2] = t_a;
    al[3] = a[2] ^ a[4];
    ah[0] = t_c ^ a[5];
    ah[1] = t_a ^ t_c;
    ah[2] = t_b ^ a[2] ^ a[3];
    ah[3] = t_b;
  end

  always_comb begin
    d     = g4_mul_e(g4_sq(ah)) ^ g4_sq(al) ^ g4_mul(ah, al);
    d_inv = g4_inv(d);
    qh    = g4_mul(ah, d_inv);
    ql    = g4_mul(ah ^ al, d_inv);
  end

  // map^-1: GF((2^4)^2) -> GF(2^8)
  always_comb begin
    logic t_a, t_b;
    t_a = ql[1] ^ qh[3];
    t_b = qh[0] ^ qh[1];
    a_inv[0] = ql[0] ^ qh[0];
    a_inv[1] = t_b ^ qh[3];
    a_inv[2] = t_a ^ t_b;
    a_inv[3] = t_b ^ ql[1] ^ qh[2];
    a_inv[4] = t_a ^ t_b ^ ql[3];
    a_inv[5] = t_b ^ ql[2];
    a_inv[6] = t_a ^ ql[2] ^ ql[3] ^ qh[0];
    a_inv[7] = t_b ^ ql[2] ^ qh[3];
  end

endmodule
