// key_register: local store for the expanded key, which software computes and the
// control unit copies from main memory 64 bits at a time. The key words arrive in the
// order of use, numbered by widx (64-bit word index from the start of the key):
//   words 0,1            -> first-key register (prologue key, read combinationally)
//   words 2 .. 2*nr-1    -> memory bank, row widx/2 = round number 1 .. nr-1
//   words 2*nr, 2*nr+1   -> last-key register (key of the last round)
// Within a 128-bit key the even word is the upper half. The memory bank is built from
// four 32-bit wide memories (as with 32-bit block RAM ports), each holding one column of
// every round key; a 64-bit write fills two of them. Reading is synchronous: rd_addr
// (the round number) in one cycle gives that round's 128-bit key in the next.
// The first and last keys sit in registers because they are used in the same cycles as
// the bank. Nothing is reset: the store keeps its contents between calls, so a key can
// be reused without reloading.
// First/last registers and a bank of four 32-bit memories follow the published key store;
// the routing by word index is this design's choice.
module key_register
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = NR_MAX       // bank rows, rounds 1 .. DEPTH-1
) (
  input  logic   clk,
  input  logic   we,
  input  logic [4:0] widx,
  input  bus_t   wdata,
  input  round_t nr,
  input  round_t rd_addr,
  output block_t key_first,
  output block_t key_round,
  output block_t key_last
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t bank0 [DEPTH];
  word_t bank1 [DEPTH];
  word_t bank2 [DEPTH];
  word_t bank3 [DEPTH];

  logic [3:0]    row;
  logic [AW-1:0] wrow, rrow;
  logic          to_first, to_last;

  assign row      = widx[4:1];
  assign to_first = (row == 4'd0);
  assign to_last  = (row == nr);
  assign wrow     = AW'(row);
  assign rrow     = AW'(rd_addr);

  always_ff @(posedge clk) begin
    if (we) begin
      if (to_first) begin
        if (widx[0]) key_first[63:0] <= wdata; else key_first[127:64] <= wdata;
      end else if (to_last) begin
        if (widx[0]) key_last[63:0]  <= wdata; else key_last[127:64]  <= wdata;
      end else if (widx[0]) begin
        bank2[wrow] <= wdata[63:32];
        bank3[wrow] <= wdata[31:0];
      end else begin
        bank0[wrow] <= wdata[63:32];
        bank1[wrow] <= wdata[31:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    key_round <= {bank0[rrow], bank1[rrow], bank2[rrow], bank3[rrow]};
  end
endmodule
