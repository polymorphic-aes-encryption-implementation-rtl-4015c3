// molen_aes: AES cipher functional unit for a polymorphic (MOLEN-style) processor.
// The host fills the XREG with the call parameters (Nr, key begin/end address, data
// begin/end address), pulses start, and gets a stop pulse when every block between the
// data begin and end addresses has been ciphered in place in main memory. The unit holds
// the expanded key locally (key_register), computes one AES round per clock in a folded
// datapath (aes_core) and is driven by a two-state-machine control unit.
//
// Parameters: ARCH selects the fine grain (ARCH_FG) or memory based (ARCH_MB, default)
// round; DECRYPT = 0 builds the encryption core (default), 1 the decryption core, which
// expects the equivalent-inverse-cipher key schedule stored in order of use.
//
// Interfaces: XREG read port (3-bit word address, 32-bit data, combinational read);
// main memory single port, 64-bit data, byte addresses stepping by 8, read data one
// clock after mem_rd, write on mem_wr. Blocks are 16-byte aligned and big-endian.
// Throughput: one block per Nr clocks once the burst runs.
// The connection of control unit, key register and core follows the published functional
// unit; the port protocols are this design's choice.
module molen_aes
  import aes_pkg::*;
#(
  parameter arch_e ARCH    = ARCH_MB,
  parameter bit    DECRYPT = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              stop,
  output logic              busy,
  output logic [2:0]        xreg_addr,
  input  logic [31:0]       xreg_rdata,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  output bus_t              mem_wdata,
  input  bus_t              mem_rdata
);
  logic   key_we, din_we, din_addr, cmd_first, cmd_mid, cmd_last, dout_addr, blk_done;
  logic [4:0] key_widx;
  round_t nr, round, key_addr;
  block_t key_first, key_round, key_last;

  control_unit u_ctrl (
    .clk, .rst_n, .start, .stop, .busy, .xreg_addr, .xreg_rdata,
    .mem_addr, .mem_rd, .mem_wr,
    .key_we, .key_widx, .nr,
    .din_we, .din_addr, .cmd_first, .cmd_mid, .cmd_last, .round, .dout_addr, .blk_done
  );

  key_register u_keys (
    .clk, .we(key_we), .widx(key_widx), .wdata(mem_rdata), .nr,
    .rd_addr(key_addr), .key_first, .key_round, .key_last
  );

  aes_core #(.ARCH(ARCH), .DECRYPT(DECRYPT)) u_core (
    .clk, .rst_n, .bus_din(mem_rdata), .din_we, .din_addr,
    .cmd_first, .cmd_mid, .cmd_last, .round,
    .key_addr, .key_first, .key_round, .key_last,
    .dout_addr, .bus_dout(mem_wdata), .blk_done
  );
endmodule
