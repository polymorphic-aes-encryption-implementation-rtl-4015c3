// tbox_bram: one FPGA block RAM used as two coarse grain memory banks. Each of its two
// independent ports takes a state byte as the 8-bit address and returns, one clock later,
// the 32-bit word that merges byte substitution and the column-mix multiplications:
//   encryption {2S', 1S', 1S', 3S'}, decryption {eS', 9S', dS', bS'}
// with S' the (inverse) S-box of the address, most significant byte first (the same word
// fg_byte_unit computes in logic). The read is synchronous with a per-port enable, as in
// a block RAM; the output holds while the enable is low. The contents are computed at
// elaboration. Only 256 of the RAM's words are used.
// Merging S-box and multiplications into a dual-port 8-to-32-bit memory follows the published
// memory based design; the product order in the word is this design's choice.
module tbox_bram
  import aes_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic  clk,
  input  logic  en_a,
  input  byte_t addr_a,
  output word_t dout_a,
  input  logic  en_b,
  input  byte_t addr_b,
  output word_t dout_b
);
  typedef word_t rom_t [256];

  function automatic rom_t gen_rom();
    rom_t t;
    sbox_table_t s;
    s = gen_sbox(DECRYPT);
    for (int i = 0; i < 256; i++) begin
      if (!DECRYPT)
        t[i] = {xtime(s[i]), s[i], s[i], xtime(s[i]) ^ s[i]};
      else
        t[i] = {gmul(s[i], 8'h0e), gmul(s[i], 8'h09), gmul(s[i], 8'h0d), gmul(s[i], 8'h0b)};
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_rom();

  always_ff @(posedge clk) begin
    if (en_a) dout_a <= ROM[addr_a];
    if (en_b) dout_b <= ROM[addr_b];
  end
endmodule
