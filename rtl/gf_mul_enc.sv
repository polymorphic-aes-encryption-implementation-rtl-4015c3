// gf_mul_enc: constant multiplier for MixColumns. From one byte X it produces X, 2X and
// 3X in GF(2^8). 2X is X shifted left by one with 0x1B XORed in when the shifted-out bit
// is set (four XOR gates, one per set bit of 0x1B); 3X = 2X ^ X, so one multiplier serves
// both coefficients of a byte. Combinational.
// The structure (shift, conditional 0x1B, 3X from 2X) follows the published multiplier.
module gf_mul_enc
  import aes_pkg::*;
(
  input  byte_t x,
  output byte_t x1,
  output byte_t x2,
  output byte_t x3
);
  always_comb begin
    x1 = x;
    x2 = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    x3 = x2 ^ x;
  end
endmodule
