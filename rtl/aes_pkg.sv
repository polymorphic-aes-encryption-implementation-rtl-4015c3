// aes_pkg: types, constants and GF(2^8) helpers shared by the AES functional unit.
//
// A 128-bit block is stored with byte n of the block (FIPS-197 input order, n = 0..15)
// in bits [127-8n -: 8]; state byte S(r,c) is byte r + 4c. On the 64-bit memory bus the
// first word of a block (lower address) carries bytes 0..7 in bits [63:0] big-endian, as
// the PowerPC host stores it. The S-box tables are computed at elaboration from the
// definition of SubBytes (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// followed by the affine map b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i with
// c = 0x63), so no table has to be typed in. The inverse table is the inverse permutation.
// The byte order and bus layout are this design's choice; the field arithmetic and S-box
// definition are those of the AES standard.
package aes_pkg;

  localparam int unsigned NR_MAX   = 14;     // AES-256
  localparam int unsigned BUS_W    = 64;     // main memory data bus
  localparam int unsigned ADDR_W   = 32;     // byte address width

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [BUS_W-1:0] bus_t;
  typedef logic [127:0] block_t;
  typedef logic [3:0]   round_t;        // round index, the 4-bit "Round" signal

  typedef byte_t sbox_table_t [256];

  // Implementation style of the round: fine grain (logic S-box + multipliers) or
  // memory based (S-box and multiplication merged into dual-port ROMs).
  typedef enum logic {ARCH_FG = 1'b0, ARCH_MB = 1'b1} arch_e;

  // Multiplication by x (02) with reduction by 0x11B.
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add; used only at elaboration.
  function automatic byte_t gmul(input byte_t x, input byte_t y);
    byte_t p = 8'h00;
    byte_t acc = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) p ^= acc;
      acc = xtime(acc);
    end
    return p;
  endfunction

  // Multiplicative inverse as b^254 (0 maps to 0).
  function automatic byte_t ginv(input byte_t b);
    byte_t r = 8'h01;
    byte_t sq = b;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);     // 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(input byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return o ^ 8'h63;
  endfunction

  function automatic sbox_table_t gen_sbox(input bit inverse);
    sbox_table_t t;
    byte_t s;
    for (int i = 0; i < 256; i++) begin
      s = affine(ginv(byte_t'(i)));
      if (inverse) t[s] = byte_t'(i);
      else         t[i] = s;
    end
    return t;
  endfunction

  // State byte (r,c) of a block.
  function automatic byte_t st_byte(input block_t b, input int r, input int c);
    return b[127 - 8*(r + 4*c) -: 8];
  endfunction

endpackage
