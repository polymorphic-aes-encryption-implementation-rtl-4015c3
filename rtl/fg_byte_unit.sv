// fg_byte_unit: fine grain column computation for one state byte. The byte goes through
// the S-box (or the inverse S-box) and then through the constant multiplier; the products
// are packed into a 32-bit contribution word, most significant byte first, that this byte
// adds to the four rows of its column when it sits in row 0:
//   encryption {2S', 1S', 1S', 3S'}   (column 0 of the MixColumns matrix)
//   decryption {eS', 9S', dS', bS'}   (column 0 of the InvMixColumns matrix)
// A byte in row k uses the same word rotated right by k bytes, which is wiring only.
// This is the same word the memory based ROM stores, so both styles share one round.
// Combinational.
// S-box followed by a multiplier per byte follows the published fine grain column; packing
// the products into one rotated word is this design's choice.
module fg_byte_unit
  import aes_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  byte_t s,
  output word_t w
);
  byte_t sb;

  aes_sbox #(.INVERSE(DECRYPT)) u_sbox (.a(s), .y(sb));

  if (!DECRYPT) begin : g_enc
    byte_t m1, m2, m3;
    gf_mul_enc u_mul (.x(sb), .x1(m1), .x2(m2), .x3(m3));
    assign w = {m2, m1, m1, m3};
  end else begin : g_dec
    byte_t m9, mb, md, me;
    gf_mul_dec u_mul (.y(sb), .y9(m9), .yb(mb), .yd(md), .ye(me));
    assign w = {me, m9, md, mb};
  end
endmodule
