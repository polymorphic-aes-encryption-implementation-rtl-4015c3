// data_out_buf: holds a processed 128-bit block until it has been written back over the
// 64-bit bus. load captures blk at the clock edge; dout shows the upper half (addr = 0,
// written to the lower memory address) or the lower half (addr = 1), combinationally.
// Follows the published 128-bit-in, 64-bit-out send register; a combinational read is this
// design's choice.
module data_out_buf
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   load,
  input  block_t blk,
  input  logic   addr,
  output bus_t   dout
);
  block_t q;

  always_ff @(posedge clk) begin
    if (load) q <= blk;
  end

  assign dout = addr ? q[63:0] : q[127:64];
endmodule
