// tb_control_unit: the two state machines together, with XREG and memory models and a
// datapath stand-in that answers cmd_last with blk_done two clocks later. Checks the full
// main memory access trace (key words, then block reads interleaved with write-backs to
// the same addresses), that a read and a write never share a cycle, one stop per call
// after the last write, and the steady block period of Nr clocks.
module tb_control_unit;
  import aes_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start, stop, busy, mem_rd, mem_wr, key_we, din_we, din_addr;
  logic              cmd_first, cmd_mid, cmd_last, dout_addr, blk_done;
  logic [2:0]        xreg_addr;
  logic [31:0]       xreg_rdata;
  logic [ADDR_W-1:0] mem_addr;
  logic [4:0]        key_widx;
  round_t            nr, round;
  logic [31:0]       xreg [8];
  logic              last_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .start, .stop, .busy, .xreg_addr, .xreg_rdata,
    .mem_addr, .mem_rd, .mem_wr, .key_we, .key_widx, .nr,
    .din_we, .din_addr, .cmd_first, .cmd_mid, .cmd_last, .round, .dout_addr, .blk_done);

  assign xreg_rdata = xreg[xreg_addr];
  always_ff @(posedge clk) begin
    last_q   <= rst_n && cmd_last;
    blk_done <= rst_n && last_q;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_kr, n_dr, n_dw, n_stop, n_blk;
  logic [ADDR_W-1:0] exp_k, exp_r, exp_w;
  longint cyc, prev_done;
  int cur_nr;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(!(mem_rd && mem_wr), "read and write in one cycle");
    if (mem_rd && dut.u_main.state == dut.u_main.S_KLOAD) begin
      check(mem_addr == exp_k, $sformatf("key read %h, expected %h", mem_addr, exp_k));
      exp_k += 8; n_kr++;
    end else if (mem_rd) begin
      check(mem_addr == exp_r, $sformatf("data read %h, expected %h", mem_addr, exp_r));
      exp_r += 8; n_dr++;
    end
    if (mem_wr) begin
      check(mem_addr == exp_w, $sformatf("write %h, expected %h", mem_addr, exp_w));
      check(exp_w < exp_r, "block written before it was read");
      check(dout_addr == mem_addr[3], "output half");
      exp_w += 8; n_dw++;
    end
    if (blk_done) begin
      if (n_blk > 0) check(cyc - prev_done == longint'(cur_nr), $sformatf("period %0d", cyc - prev_done));
      prev_done = cyc; n_blk++;
    end
    if (stop) begin
      n_stop++;
      check(exp_w == exp_r, "stop before all blocks were written");
    end
  end

  task automatic call(input int nrv, input logic [31:0] kb, input logic [31:0] ke,
                      input logic [31:0] db, input int blocks);
    int s0 = n_stop;
    xreg[0] = nrv; xreg[1] = kb; xreg[2] = ke; xreg[3] = db; xreg[4] = db + 32'(16 * blocks);
    exp_k = kb; exp_r = db; exp_w = db; cur_nr = nrv;
    n_kr = 0; n_dr = 0; n_dw = 0; n_blk = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (n_stop == s0) @(negedge clk);
    @(negedge clk);
    check(!busy, "busy after stop");
    check(n_kr == (ke - kb) / 8, "key reads");
    check(n_dr == 2 * blocks && n_dw == 2 * blocks, "data reads and writes");
  endtask

  initial begin
    for (int i = 0; i < 8; i++) xreg[i] = '0;
    start = 0; cyc = 0; n_stop = 0; prev_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    call(10, 32'h0, 32'd176, 32'h400, 16);
    call(10, 32'h0, 32'h0,   32'h800, 3);
    call(12, 32'h0, 32'd208, 32'h400, 5);
    call(14, 32'h0, 32'd240, 32'h400, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
