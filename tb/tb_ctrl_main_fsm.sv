// tb_ctrl_main_fsm: runs the main state machine against an XREG model and a memory
// model whose read data encodes the address. Checks the key fetch (addresses stepping by
// 8, word index and data routed one clock later), key reuse (begin = end: no key read),
// the data block reads, the round command sequence per block (first with round 1, mids
// with rounds 2..Nr-1, then last), a block period of Nr clocks, the sync pulse, and that
// cmd_last waits while dout_busy is held high.
module tb_ctrl_main_fsm;
  import aes_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start, mem_rd, key_we, din_we, din_addr, sync, dout_busy;
  logic              cmd_first, cmd_mid, cmd_last, busy;
  logic [2:0]        xreg_addr;
  logic [31:0]       xreg_rdata;
  logic [ADDR_W-1:0] mem_raddr, data_beg, data_end;
  logic [4:0]        key_widx;
  round_t            nr, round;
  logic [31:0]       xreg [8];
  logic [ADDR_W-1:0] rd_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_main_fsm dut (.clk, .rst_n, .start, .xreg_addr, .xreg_rdata, .mem_rd, .mem_raddr,
    .key_we, .key_widx, .din_we, .din_addr, .nr, .sync, .data_beg, .data_end, .dout_busy,
    .cmd_first, .cmd_mid, .cmd_last, .round, .busy);

  assign xreg_rdata = xreg[xreg_addr];

  // memory model: remembers the address read one clock ago
  always_ff @(posedge clk) if (mem_rd) rd_q <= mem_raddr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor
  int n_keyw, n_dinw, n_first, n_mid, n_last, n_sync, n_stall, n_stalled;
  longint cyc, last_first;
  round_t exp_round;
  logic [ADDR_W-1:0] exp_kaddr, exp_daddr;
  int cur_nr;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (key_we) begin
      check(rd_q == exp_kaddr, $sformatf("key word from %h, expected %h", rd_q, exp_kaddr));
      check(key_widx == 5'(n_keyw), $sformatf("key index %0d, expected %0d", key_widx, n_keyw));
      exp_kaddr += 8; n_keyw++;
    end
    if (din_we) begin
      check(rd_q == exp_daddr, $sformatf("data word from %h, expected %h", rd_q, exp_daddr));
      check(din_addr == exp_daddr[3], "data half");
      exp_daddr += 8; n_dinw++;
    end
    if (cmd_first) begin
      check(round == 4'd1, "first uses round 1");
      if (last_first >= 0) check(cyc - last_first == longint'(cur_nr) + n_stall,
                             $sformatf("block period %0d", cyc - last_first));
      last_first = cyc; n_first++; exp_round = 4'd2; n_stall = 0;
    end
    if (cmd_mid) begin
      check(round == exp_round, $sformatf("mid round %0d, expected %0d", round, exp_round));
      exp_round++; n_mid++;
    end
    if (cmd_last) begin
      check(exp_round == round_t'(cur_nr), "last after Nr-1 main rounds");
      n_last++;
    end
    if (dout_busy && dut.seq_busy && dut.cnt == nr) begin n_stall++; n_stalled++; end
    if (sync) n_sync++;
  end

  task automatic call(input int nrv, input logic [31:0] kb, input logic [31:0] ke,
                      input logic [31:0] db, input logic [31:0] de, input int stall_at);
    int blocks = (de - db) / 16;
    int keyw0, dinw0, first0, mid0, last0, sync0;
    xreg[0] = nrv; xreg[1] = kb; xreg[2] = ke; xreg[3] = db; xreg[4] = de;
    cur_nr = nrv; exp_kaddr = kb; exp_daddr = db;
    keyw0 = n_keyw; dinw0 = n_dinw; first0 = n_first; mid0 = n_mid; last0 = n_last; sync0 = n_sync;
    n_keyw = 0; last_first = -1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (busy) begin
      @(negedge clk);
      // hold the output buffer busy for a while once
      dout_busy = (stall_at > 0 && n_first - first0 == stall_at && dut.seq_busy && dut.cnt == round_t'(nrv)
                   && n_stall < 5);
    end
    dout_busy = 1'b0;
    check(n_keyw == (ke - kb) / 8, $sformatf("%0d key words", n_keyw));
    check(n_dinw - dinw0 == 2 * blocks, "data words");
    check(n_first - first0 == blocks && n_last - last0 == blocks, "first/last per block");
    check(n_mid - mid0 == blocks * (nrv - 2), "mids per block");
    check(n_sync - sync0 == 1, "one sync");
    check(data_beg == db && data_end == de, "data addresses passed on");
    check(nr == round_t'(nrv), "nr latched");
  endtask

  initial begin
    for (int i = 0; i < 8; i++) xreg[i] = '0;
    start = 0; dout_busy = 0; cyc = 0; last_first = 0;
    n_keyw = 0; n_dinw = 0; n_first = 0; n_mid = 0; n_last = 0; n_sync = 0; n_stall = 0; n_stalled = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    call(10, 32'h100, 32'h100 + 176, 32'h1000, 32'h1000 + 64, 0);    // AES-128, 4 blocks
    call(10, 32'h100, 32'h100, 32'h2000, 32'h2000 + 48, 0);          // key reused
    call(14, 32'h200, 32'h200 + 240, 32'h3000, 32'h3000 + 80, 2);    // AES-256, output stall
    call(12, 32'h300, 32'h300 + 208, 32'h4000, 32'h4000, 0);         // empty data range
    check(n_stalled > 0, "cmd_last never waited");
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
