// aes_sbox: the byte substitution as a 256-entry lookup table (SubBytes, or
// InvSubBytes when INVERSE = 1). The design maps it onto FPGA LUTs, as the fine grain
// architecture does; the table is computed at elaboration by aes_pkg::gen_sbox from the
// inverse-plus-affine definition. Purely combinational: y follows a in the same cycle.
// Using a table rather than a logic network follows the published fine grain design; computing
// it at elaboration is this implementation's choice.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t a,
  output byte_t y
);
  localparam sbox_table_t TABLE = gen_sbox(INVERSE);

  always_comb y = TABLE[a];
endmodule
