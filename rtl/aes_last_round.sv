// aes_last_round: the final round, which has no column mixing: (Inv)SubBytes through 16
// aes_sbox lookup tables, (Inv)ShiftRows as wiring, and the XOR with the last round key.
// It has its own hardware, so it can work on one block while the main round is free.
// The S-boxes are logic in both architectures (the block RAMs of the memory based style
// are all taken by the main round and the key store). Combinational; its result is
// captured by the output buffer.
// A separate final round follows the published design; logic S-boxes here are this design's
// choice.
module aes_last_round
  import aes_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  block_t state_in,
  input  block_t key,
  output block_t state_out
);
  byte_t sub [16];   // substituted byte of state position r + 4c
  block_t shifted;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox #(.INVERSE(DECRYPT)) u_sbox (.a(state_in[127 - 8*i -: 8]), .y(sub[i]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shifted[127 - 8*(r + 4*c) -: 8] = sub[r + 4*(DECRYPT ? (c + 4 - r) % 4 : (c + r) % 4)];
    state_out = shifted ^ key;
  end
endmodule
