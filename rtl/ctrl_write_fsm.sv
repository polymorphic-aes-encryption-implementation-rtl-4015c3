// ctrl_write_fsm: write state machine of the control unit. It writes each processed
// block from the output buffer back to main memory and signals the end of the function.
//
// On the one-bit sync line from the main state machine it copies the data begin and end
// addresses into its own write address registers. It then performs a one-time wait for
// the pipeline to fill (the first processed block), after which it loops: wait until a
// processed block is pending and the memory port is free, write the two 64-bit words
// (upper half first, address incremented by 8 after each), and when the write address
// equals the end address pulse stop for one cycle and return to idle. An empty data
// range gives stop right after sync.
//
// The memory has one port, and reads of the main state machine take precedence:
// port_busy high holds a write state for that cycle. dout_busy tells the sequencer that
// the output buffer still holds a block that has not been fully written.
// The one-time fill wait, the inner wait loop and stop after the last write follow the
// published write state machine; port priority and pulse lengths are this design's choice.
module ctrl_write_fsm
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,
  input  logic [ADDR_W-1:0] data_beg,
  input  logic [ADDR_W-1:0] data_end,
  input  logic              blk_done,
  input  logic              port_busy,
  output logic              mem_wr,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic              dout_addr,
  output logic              dout_busy,
  output logic              stop,
  output logic              busy
);
  typedef enum logic [2:0] {W_IDLE, W_FILL, W_WAIT, W_WR0, W_WR1} wstate_e;

  wstate_e           state;
  logic [ADDR_W-1:0] waddr, wend;
  logic              pending;

  assign mem_waddr = waddr;
  assign dout_addr = (state == W_WR1);
  assign mem_wr    = (state == W_WR0 || state == W_WR1) && !port_busy;
  assign dout_busy = pending;
  assign busy      = (state != W_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= W_IDLE;
      waddr   <= '0;
      wend    <= '0;
      pending <= 1'b0;
      stop    <= 1'b0;
    end else begin
      stop <= 1'b0;
      if (blk_done) pending <= 1'b1;
      unique case (state)
        W_IDLE: if (sync) begin
          waddr <= data_beg;
          wend  <= data_end;
          if (data_beg == data_end) stop  <= 1'b1;
          else                      state <= W_FILL;
        end
        W_FILL: if (pending) state <= W_WAIT;        // pipeline has filled once
        W_WAIT: if (pending) state <= W_WR0;         // next block processed
        W_WR0: if (!port_busy) begin
          waddr <= waddr + ADDR_W'(8);
          state <= W_WR1;
        end
        W_WR1: if (!port_busy) begin
          waddr   <= waddr + ADDR_W'(8);
          pending <= 1'b0;
          if (waddr + ADDR_W'(8) == wend) begin
            stop  <= 1'b1;
            state <= W_IDLE;
          end else begin
            state <= W_WAIT;
          end
        end
        default: state <= W_IDLE;
      endcase
    end
  end

  // a new block must never arrive while the previous one is still unwritten
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) blk_done |-> !pending);
endmodule
