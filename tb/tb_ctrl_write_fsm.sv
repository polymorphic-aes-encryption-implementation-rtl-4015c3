// tb_ctrl_write_fsm: drives sync with a data range, delivers processed-block pulses
// spaced like the datapath does, and keeps the memory port randomly busy. Checks that
// writes go to consecutive addresses from the data begin address, with the upper half
// (dout_addr = 0) at the lower address, never while the port is busy, that dout_busy
// covers each pending block, and that stop is a single pulse right after the last write
// (or right after sync for an empty range).
module tb_ctrl_write_fsm;
  import aes_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              sync, blk_done, port_busy, mem_wr, dout_addr, dout_busy, stop, busy;
  logic [ADDR_W-1:0] data_beg, data_end, mem_waddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_write_fsm dut (.clk, .rst_n, .sync, .data_beg, .data_end, .blk_done, .port_busy,
    .mem_wr, .mem_waddr, .dout_addr, .dout_busy, .stop, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [ADDR_W-1:0] exp_addr;
  int n_wr, n_stop, n_busy_hold;
  bit empty_call;
  longint last_wr_cyc, cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mem_wr) begin
      check(!port_busy, "write while port busy");
      check(mem_waddr == exp_addr, $sformatf("write to %h, expected %h", mem_waddr, exp_addr));
      check(dout_addr == exp_addr[3], "half select follows address");
      check(dout_busy, "dout_busy low during write");
      exp_addr += 8; n_wr++; last_wr_cyc = cyc;
    end
    if (port_busy && (dut.state == dut.W_WR0 || dut.state == dut.W_WR1)) n_busy_hold++;
    if (stop) begin
      n_stop++;
      if (!empty_call) check(cyc == last_wr_cyc + 1, "stop one clock after the last write");
    end
  end

  task automatic call(input logic [31:0] db, input int blocks);
    int stop0 = n_stop;
    int wr0 = n_wr;
    empty_call = (blocks == 0);
    data_beg = db; data_end = db + 32'(16 * blocks); exp_addr = db;
    @(negedge clk) sync = 1'b1;
    @(negedge clk) sync = 1'b0;
    for (int b = 0; b < blocks; b++) begin
      repeat (b == 0 ? 15 : 9) @(negedge clk);
      while (dout_busy) @(negedge clk);    // the sequencer never overruns the buffer
      blk_done = 1'b1;
      @(negedge clk) blk_done = 1'b0;
    end
    repeat (30) @(negedge clk);
    check(n_wr - wr0 == 2 * blocks, $sformatf("%0d writes", n_wr - wr0));
    check(n_stop - stop0 == 1, "one stop");
    check(!busy && !dout_busy, "idle at the end");
  endtask

  initial begin
    sync = 0; blk_done = 0; port_busy = 0; data_beg = '0; data_end = '0;
    n_wr = 0; n_stop = 0; n_busy_hold = 0; cyc = 0; empty_call = 0; last_wr_cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      forever begin @(negedge clk); port_busy = ($urandom_range(2, 0) == 0); end
    join_none
    call(32'h1000, 6);
    call(32'h8000, 1);
    call(32'h9000, 0);
    check(n_busy_hold > 0, "port busy never held a write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
