// aes_core: the folded (fully rolled) AES cipher datapath. A block enters through the
// 64-to-128-bit input buffer, gets the initial key addition (prologue, first round key),
// and passes through the multiplexer into the one main round, whose output is fed back
// through the same multiplexer for the following rounds. After Nr-1 main rounds the
// separate last round (no column mixing, last round key) produces the result, which the
// 128-to-64-bit output buffer keeps for write-back.
//
// Commands come from the control unit. cmd_first, cmd_mid and cmd_last, given with the
// round number in the same cycle, are executed in the next cycle: the round number is
// passed straight on as the read address of the key register, whose registered output
// delivers that round's key in the execution cycle.
//   cmd_first : round 1 on (input block ^ key_first)
//   cmd_mid   : next main round on the fed-back state
//   cmd_last  : last round into the output buffer; blk_done is high one cycle later,
//               from the first cycle in which dout shows the result.
// One main round per clock, so a block takes Nr cycles of the datapath.
// The block structure follows the published folded architecture; the one-clock command
// delay and the command encoding are this design's choice.
module aes_core
  import aes_pkg::*;
#(
  parameter arch_e ARCH    = ARCH_MB,
  parameter bit    DECRYPT = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  // input buffer write, from the memory data bus
  input  bus_t   bus_din,
  input  logic   din_we,
  input  logic   din_addr,
  // round commands
  input  logic   cmd_first,
  input  logic   cmd_mid,
  input  logic   cmd_last,
  input  round_t round,
  // key register
  output round_t key_addr,
  input  block_t key_first,
  input  block_t key_round,
  input  block_t key_last,
  // output buffer read, towards the memory data bus
  input  logic   dout_addr,
  output bus_t   bus_dout,
  output logic   blk_done
);
  logic   first_q, mid_q, last_q;
  block_t din_blk, prologue, round_in, round_out, last_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first_q  <= 1'b0;
      mid_q    <= 1'b0;
      last_q   <= 1'b0;
      blk_done <= 1'b0;
    end else begin
      first_q  <= cmd_first;
      mid_q    <= cmd_mid;
      last_q   <= cmd_last;
      blk_done <= last_q;
    end
  end

  assign key_addr = round;

  data_in_buf u_din (.clk(clk), .we(din_we), .addr(din_addr), .din(bus_din), .blk(din_blk));

  // prologue: initial key addition, then the round input multiplexer
  assign prologue = din_blk ^ key_first;
  assign round_in = first_q ? prologue : round_out;

  aes_round #(.ARCH(ARCH), .DECRYPT(DECRYPT)) u_round (
    .clk(clk), .en(first_q | mid_q), .state_in(round_in), .key(key_round), .state_out(round_out)
  );

  aes_last_round #(.DECRYPT(DECRYPT)) u_last (.state_in(round_out), .key(key_last), .state_out(last_out));

  data_out_buf u_dout (.clk(clk), .load(last_q), .blk(last_out), .addr(dout_addr), .dout(bus_dout));

  // a block enters only when the round is free; commands are mutually exclusive
  a_cmd_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (2'(cmd_first) + 2'(cmd_mid) + 2'(cmd_last)) <= 2'd1);
endmodule
