// aes_round: the one main round of the folded AES core, used Nr-1 times per block.
// It applies SubBytes, ShiftRows, MixColumns and AddRoundKey (encryption) or
// InvSubBytes, InvShiftRows, InvMixColumns and AddRoundKey (decryption; the round keys
// are then those of the equivalent inverse cipher, prepared by software).
// ShiftRows is wiring: output column c reads row k from input column (c+k) mod 4
// (encryption) or (c-k) mod 4 (decryption). Each of the 16 selected bytes yields a 32-bit
// contribution word; a 4-input XOR tree per column adds the four words of a column and
// the round key column is XORed on.
//   ARCH_FG: the words come from 16 fg_byte_unit (S-box + multiplier in logic); the
//            round result is stored in a 128-bit state register.
//   ARCH_MB: the words come from 8 dual-port tbox_bram; the block RAM output registers
//            are the state register, and the round key is registered next to them.
// Timing, identical for both: when en is high in a cycle, state_in and key of that cycle
// are processed and state_out shows the result from the next cycle on, held until the
// next en. One round per clock.
// The one-round-per-clock folded round and both styles follow the published design; where
// the registers sit in the memory based style is this design's choice.
module aes_round
  import aes_pkg::*;
#(
  parameter arch_e ARCH    = ARCH_MB,
  parameter bit    DECRYPT = 1'b0
) (
  input  logic   clk,
  input  logic   en,
  input  block_t state_in,
  input  block_t key,
  output block_t state_out
);
  // bytes after (inverse) ShiftRows, indexed by 4*c + k (column c, row k)
  byte_t sel [16];
  word_t contrib [16];
  word_t col [4];

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++)
        sel[4*c + k] = st_byte(state_in, k, DECRYPT ? (c + 4 - k) % 4 : (c + k) % 4);
  end

  if (ARCH == ARCH_FG) begin : g_fg
    word_t raw [16];
    block_t state_q;
    for (genvar i = 0; i < 16; i++) begin : g_byte
      fg_byte_unit #(.DECRYPT(DECRYPT)) u_unit (.s(sel[i]), .w(raw[i]));
    end
    always_comb begin
      for (int i = 0; i < 16; i++) contrib[i] = raw[i];
    end
    always_ff @(posedge clk) begin
      if (en) state_q <= {col[0], col[1], col[2], col[3]} ^ key;
    end
    assign state_out = state_q;
  end else begin : g_mb
    word_t raw_q [16];
    block_t key_q;
    for (genvar j = 0; j < 8; j++) begin : g_bram
      tbox_bram #(.DECRYPT(DECRYPT)) u_bram (
        .clk   (clk),
        .en_a  (en), .addr_a(sel[2*j]),     .dout_a(raw_q[2*j]),
        .en_b  (en), .addr_b(sel[2*j + 1]), .dout_b(raw_q[2*j + 1])
      );
    end
    always_comb begin
      for (int i = 0; i < 16; i++) contrib[i] = raw_q[i];
    end
    always_ff @(posedge clk) begin
      if (en) key_q <= key;
    end
    assign state_out = {col[0], col[1], col[2], col[3]} ^ key_q;
  end

  // Row k's word is rotated right by k bytes; XOR tree over the four rows of a column.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      col[c] = contrib[4*c] ^ {contrib[4*c+1][7:0],  contrib[4*c+1][31:8]}
                            ^ {contrib[4*c+2][15:0], contrib[4*c+2][31:16]}
                            ^ {contrib[4*c+3][23:0], contrib[4*c+3][31:24]};
    end
  end
endmodule
