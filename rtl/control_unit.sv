// control_unit: the two state machines that generate all control signals of the AES
// functional unit. The main state machine (ctrl_main_fsm) fetches parameters, loads the
// key, reads data blocks and sequences rounds; the write state machine (ctrl_write_fsm)
// writes results back and raises stop. They are coupled only by the one-bit sync line
// (plus the data address values latched on it and the output-buffer handshake). This
// module also shares the single main memory port: a read of the main state machine wins,
// and the write state machine waits while the port is busy.
// Two state machines with one-bit synchronisation follow the published control unit; giving
// reads priority on the shared port is this design's choice.
module control_unit
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              stop,
  output logic              busy,
  // XREG
  output logic [2:0]        xreg_addr,
  input  logic [31:0]       xreg_rdata,
  // main memory port (address and strobes; data goes to/from the datapath)
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  // key register
  output logic              key_we,
  output logic [4:0]        key_widx,
  output round_t            nr,
  // AES core
  output logic              din_we,
  output logic              din_addr,
  output logic              cmd_first,
  output logic              cmd_mid,
  output logic              cmd_last,
  output round_t            round,
  output logic              dout_addr,
  input  logic              blk_done
);
  logic              sync, dout_busy, main_busy, wr_busy;
  logic [ADDR_W-1:0] data_beg, data_end, raddr, waddr;

  ctrl_main_fsm u_main (
    .clk, .rst_n, .start, .xreg_addr, .xreg_rdata,
    .mem_rd, .mem_raddr(raddr),
    .key_we, .key_widx, .din_we, .din_addr, .nr,
    .sync, .data_beg, .data_end, .dout_busy,
    .cmd_first, .cmd_mid, .cmd_last, .round, .busy(main_busy)
  );

  ctrl_write_fsm u_write (
    .clk, .rst_n, .sync, .data_beg, .data_end, .blk_done,
    .port_busy(mem_rd), .mem_wr, .mem_waddr(waddr), .dout_addr, .dout_busy,
    .stop, .busy(wr_busy)
  );

  assign mem_addr = mem_rd ? raddr : waddr;
  assign busy     = main_busy | wr_busy;
endmodule
