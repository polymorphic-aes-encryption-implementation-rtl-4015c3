// data_in_buf: reassembles a 128-bit block from two 64-bit bus words. A word on din is
// stored in the upper half (addr = 0, the word at the lower memory address) or the lower
// half (addr = 1) at the clock edge when we is high. The whole block is always visible
// on blk. No reset: the block is only used after both halves were written.
// Follows the published 64-bit-in, 128-bit-out receive register; which half comes first is
// this design's choice.
module data_in_buf
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   we,
  input  logic   addr,
  input  bus_t   din,
  output block_t blk
);
  always_ff @(posedge clk) begin
    if (we) begin
      if (addr) blk[63:0]   <= din;
      else      blk[127:64] <= din;
    end
  end
endmodule
