// ctrl_main_fsm: main state machine of the control unit, with the round sequencer that
// runs in its wait state.
//
// Flow after a start pulse: read the number of rounds and the begin and end byte
// addresses of the expanded key from the XREG; copy the key from main memory into the
// key register, one 64-bit word per cycle, incrementing the address by 8 until it equals
// the end address (begin = end loads nothing and keeps the stored key); copy the begin
// and end data addresses (two states); pulse sync to the write state machine; then loop:
// read the two words of a block into the input buffer, wait until the sequencer has
// taken the block, and repeat until the read address equals the data end address.
//
// XREG word map (this design's choice): 0 = Nr, 1 = key begin, 2 = key end,
// 3 = data begin, 4 = data end; the XREG is read combinationally. Main memory reads
// return data one cycle after mem_rd; the state machine tags each read so the returning
// word goes to the key register (key_we, key_widx) or the input buffer (din_we, din_addr).
//
// Sequencer: when a block is in the input buffer and the round is free it issues
// cmd_first (round 1), then cmd_mid for rounds 2 .. Nr-1, then cmd_last, one per cycle,
// so each block holds the datapath for Nr cycles. cmd_last waits while the output buffer
// still holds an unwritten block (dout_busy). round is the key register read address.
// The state sequence follows the published main state machine; the XREG map, the read
// latency and the exact round schedule are this design's choices.
module ctrl_main_fsm
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [2:0]        xreg_addr,
  input  logic [31:0]       xreg_rdata,
  // main memory read side
  output logic              mem_rd,
  output logic [ADDR_W-1:0] mem_raddr,
  // routing of returned words
  output logic              key_we,
  output logic [4:0]        key_widx,
  output logic              din_we,
  output logic              din_addr,
  output round_t            nr,
  // to the write state machine
  output logic              sync,
  output logic [ADDR_W-1:0] data_beg,
  output logic [ADDR_W-1:0] data_end,
  input  logic              dout_busy,
  // round commands to the AES core
  output logic              cmd_first,
  output logic              cmd_mid,
  output logic              cmd_last,
  output round_t            round,
  output logic              busy
);
  typedef enum logic [3:0] {
    S_IDLE, S_X_NR, S_X_KBEG, S_X_KEND, S_KLOAD, S_X_DBEG, S_X_DEND,
    S_SYNC, S_RD0, S_RD1, S_WAIT
  } state_e;

  localparam logic [2:0] XR_NR = 3'd0, XR_KBEG = 3'd1, XR_KEND = 3'd2,
                         XR_DBEG = 3'd3, XR_DEND = 3'd4;

  state_e            state;
  logic [ADDR_W-1:0] addr, end_addr;
  logic [4:0]        widx;
  logic              din_full;
  // tag of the read issued in the previous cycle
  logic              tag_key, tag_data, tag_half;
  logic [4:0]        tag_widx;
  // sequencer
  logic              seq_busy;
  round_t            cnt;

  always_comb begin
    xreg_addr = XR_NR;
    unique case (state)
      S_X_KBEG: xreg_addr = XR_KBEG;
      S_X_KEND: xreg_addr = XR_KEND;
      S_X_DBEG: xreg_addr = XR_DBEG;
      S_X_DEND: xreg_addr = XR_DEND;
      default:  xreg_addr = XR_NR;
    endcase
  end

  assign mem_raddr = addr;
  assign mem_rd    = (state == S_KLOAD && addr != end_addr) || state == S_RD0 || state == S_RD1;
  assign sync      = (state == S_SYNC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr     <= '0;
      end_addr <= '0;
      widx     <= '0;
      nr       <= 4'd10;
      data_beg <= '0;
      data_end <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (start) state <= S_X_NR;
        S_X_NR:   begin nr <= round_t'(xreg_rdata); state <= S_X_KBEG; end
        S_X_KBEG: begin addr <= xreg_rdata; widx <= '0; state <= S_X_KEND; end
        S_X_KEND: begin end_addr <= xreg_rdata; state <= S_KLOAD; end
        S_KLOAD: begin
          if (addr == end_addr) state <= S_X_DBEG;
          else begin
            addr <= addr + ADDR_W'(8);
            widx <= widx + 5'd1;
          end
        end
        S_X_DBEG: begin addr <= xreg_rdata; data_beg <= xreg_rdata; state <= S_X_DEND; end
        S_X_DEND: begin end_addr <= xreg_rdata; data_end <= xreg_rdata; state <= S_SYNC; end
        S_SYNC:   state <= (addr == end_addr) ? S_IDLE : S_RD0;
        S_RD0:    begin addr <= addr + ADDR_W'(8); state <= S_RD1; end
        S_RD1:    begin addr <= addr + ADDR_W'(8); state <= S_WAIT; end
        S_WAIT: begin
          if (!din_full) state <= (addr == end_addr) ? S_IDLE : S_RD0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // read tags: returned data is routed one cycle after the read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_key  <= 1'b0;
      tag_data <= 1'b0;
      tag_half <= 1'b0;
      tag_widx <= '0;
    end else begin
      tag_key  <= (state == S_KLOAD && addr != end_addr);
      tag_data <= (state == S_RD0 || state == S_RD1);
      tag_half <= (state == S_RD1);
      tag_widx <= widx;
    end
  end

  assign key_we   = tag_key;
  assign key_widx = tag_widx;
  assign din_we   = tag_data;
  assign din_addr = tag_half;

  // sequencer
  always_comb begin
    cmd_first = !seq_busy && din_full;
    cmd_mid   = seq_busy && (cnt < nr);
    cmd_last  = seq_busy && (cnt == nr) && !dout_busy;
    round     = cmd_first ? 4'd1 : cnt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      din_full <= 1'b0;
      seq_busy <= 1'b0;
      cnt      <= 4'd1;
    end else begin
      // the block is complete in the buffer from the cycle after the second read
      if (state == S_RD1)  din_full <= 1'b1;
      else if (cmd_first)  din_full <= 1'b0;
      if (cmd_first) begin
        seq_busy <= 1'b1;
        cnt      <= 4'd2;
      end else if (cmd_mid) begin
        cnt      <= cnt + 4'd1;
      end else if (cmd_last) begin
        seq_busy <= 1'b0;
      end
    end
  end

  assign busy = (state != S_IDLE) || seq_busy || din_full;

  // the round loop needs at least two main rounds between blocks
  a_nr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_KLOAD) |-> (nr >= 4'd4 && nr <= 4'(NR_MAX)));
endmodule
