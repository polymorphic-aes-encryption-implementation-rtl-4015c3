// aes_ref_pkg: behavioural AES reference for the testbenches, written independently of
// the RTL. The S-box is built by searching for each byte's multiplicative inverse and
// applying the affine map bit by bit; the cipher works on a 4x4 byte state with the
// textbook operation order (FIPS-197), the inverse cipher in its direct form
// (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns). The key schedule helpers
// produce what host software would store for the unit: the encryption schedule, and the
// equivalent-inverse-cipher schedule in order of use.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef logic [31:0]  u32;

  u8  sb  [256];
  u8  isb [256];
  bit ready = 0;

  function automatic u8 mul(input u8 a, input u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic void init();
    u8 inv, o;
    if (ready) return;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++)
        if (mul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++)
        o[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
      sb[x] = o;
      isb[o] = u8'(x);
    end
    ready = 1;
  endfunction

  function automatic u32 subword(input u32 w);
    return {sb[w[31:24]], sb[w[23:16]], sb[w[15:8]], sb[w[7:0]]};
  endfunction

  // Key expansion: nk = 4, 6, 8 words; returns nb*(nr+1) words in w[0..].
  function automatic void expand(input logic [255:0] key, input int nk, output u32 w [60]);
    int nr = nk + 6;
    u32 t;
    u8 rc = 8'h01;
    init();
    for (int i = 0; i < 60; i++) w[i] = 0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = subword(t);
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic u128 rk(input u32 w [60], input int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u8 gb(input u128 s, input int r, input int c);
    return s[127 - 8*(r + 4*c) -: 8];
  endfunction

  function automatic u128 mixcol(input u128 s, input bit inverse);
    u128 o;
    u8 a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = gb(s, 0, c); a1 = gb(s, 1, c); a2 = gb(s, 2, c); a3 = gb(s, 3, c);
      if (!inverse) begin
        o[127 - 8*(0 + 4*c) -: 8] = mul(a0, 2) ^ mul(a1, 3) ^ a2 ^ a3;
        o[127 - 8*(1 + 4*c) -: 8] = a0 ^ mul(a1, 2) ^ mul(a2, 3) ^ a3;
        o[127 - 8*(2 + 4*c) -: 8] = a0 ^ a1 ^ mul(a2, 2) ^ mul(a3, 3);
        o[127 - 8*(3 + 4*c) -: 8] = mul(a0, 3) ^ a1 ^ a2 ^ mul(a3, 2);
      end else begin
        o[127 - 8*(0 + 4*c) -: 8] = mul(a0, 14) ^ mul(a1, 11) ^ mul(a2, 13) ^ mul(a3, 9);
        o[127 - 8*(1 + 4*c) -: 8] = mul(a0, 9) ^ mul(a1, 14) ^ mul(a2, 11) ^ mul(a3, 13);
        o[127 - 8*(2 + 4*c) -: 8] = mul(a0, 13) ^ mul(a1, 9) ^ mul(a2, 14) ^ mul(a3, 11);
        o[127 - 8*(3 + 4*c) -: 8] = mul(a0, 11) ^ mul(a1, 13) ^ mul(a2, 9) ^ mul(a3, 14);
      end
    end
    return o;
  endfunction

  function automatic u128 subshift(input u128 s, input bit inverse);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inverse) o[127 - 8*(r + 4*c) -: 8] = sb[gb(s, r, (c + r) % 4)];
        else          o[127 - 8*(r + 4*c) -: 8] = isb[gb(s, r, (c + 4 - r) % 4)];
    return o;
  endfunction

  function automatic u128 encrypt(input u128 pt, input u32 w [60], input int nr);
    u128 s;
    init();
    s = pt ^ rk(w, 0);
    for (int r = 1; r < nr; r++) s = mixcol(subshift(s, 0), 0) ^ rk(w, r);
    return subshift(s, 0) ^ rk(w, nr);
  endfunction

  function automatic u128 decrypt(input u128 ct, input u32 w [60], input int nr);
    u128 s;
    init();
    s = ct ^ rk(w, nr);
    for (int r = nr - 1; r >= 1; r--) s = mixcol(subshift(s, 1) ^ rk(w, r), 1);
    return subshift(s, 1) ^ rk(w, 0);
  endfunction

  // Schedule as stored in memory for the unit, 128-bit keys in order of use.
  // Encryption: rk(0) .. rk(nr). Decryption (equivalent inverse cipher):
  // rk(nr), InvMixColumns(rk(nr-1)) .. InvMixColumns(rk(1)), rk(0).
  function automatic u128 stored_key(input u32 w [60], input int nr, input int i, input bit dec);
    if (!dec) return rk(w, i);
    if (i == 0 || i == nr) return rk(w, nr - i);
    return mixcol(rk(w, nr - i), 1);
  endfunction

endpackage
