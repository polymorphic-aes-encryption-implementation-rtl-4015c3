// gf_mul_dec: constant multiplier for InvMixColumns. From one byte Y it builds 2Y, 4Y
// and 8Y by three chained reducing doublings (shift left, subtract 0x1B on overflow),
// then adds the partial products: 9Y = 8Y+Y, BY = 8Y+2Y+Y, DY = 8Y+4Y+Y and EY = 8Y+4Y+2Y,
// where addition is XOR. 3Y and 5Y are the shared intermediate sums used for BY and DY.
// Combinational.
// The doubling chain with 2Y, 3Y, 4Y, 5Y and 8Y follows the published multiplier; the EY
// output, which it does not show, is added the same way.
module gf_mul_dec
  import aes_pkg::*;
(
  input  byte_t y,
  output byte_t y9,
  output byte_t yb,
  output byte_t yd,
  output byte_t ye
);
  byte_t y2, y3, y4, y5, y8;

  always_comb begin
    y2 = {y[6:0],  1'b0} ^ (y[7]  ? 8'h1b : 8'h00);
    y4 = {y2[6:0], 1'b0} ^ (y2[7] ? 8'h1b : 8'h00);
    y8 = {y4[6:0], 1'b0} ^ (y4[7] ? 8'h1b : 8'h00);
    y3 = y2 ^ y;
    y5 = y4 ^ y;
    y9 = y8 ^ y;
    yb = y8 ^ y3;
    yd = y8 ^ y5;
    ye = y8 ^ y4 ^ y2;
  end
endmodule
