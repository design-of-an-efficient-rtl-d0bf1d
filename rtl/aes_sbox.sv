// aes_sbox: one pipelined S-box for both directions (S0..S3 of the data unit).
//
// On a clock edge with ld=1 the byte and its direction are stored in the input register
// Res; during the following cycle the combinational path computes the result:
//   encryption  dout = Aff(inv(Res))
//   decryption  dout = inv(Aff^-1(Res))
// with the two 2:1 multiplexers of the published design's S-box diagram choosing whether each
// affine stage is used. Latency: one cycle (dout is valid the cycle after the load and
// stays valid until the next load). Storing the direction bit in Res together with the
// byte is this design's choice: it lets the key unit borrow the S-box in forward mode
// between decryption loads. Res has no reset; it is only read after a load.
module aes_sbox
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  ld,
  input  logic  inv,     // 1: inverse S-box for this byte
  input  byte_t din,
  output byte_t dout
);

  byte_t res;
  logic  res_inv;
  byte_t pre, inverse;

  always_ff @(posedge clk) begin
    if (ld) begin
      res     <= din;
      res_inv <= inv;
    end
  end

  assign pre = res_inv ? aff_inv(res) : res;

  gf256_inv u_inv (.a(pre), .a_inv(inverse));

  assign dout = res_inv ? inverse : aff_fwd(inverse);

endmodule
