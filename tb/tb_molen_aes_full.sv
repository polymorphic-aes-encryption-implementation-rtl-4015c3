// tb_molen_aes_full: the unit at its default build (memory based, encryption, AES-128
// operation) on the three message sizes of the original evaluation: one 16-byte block,
// 512 bytes and 16 KiB, each with the expanded key loaded, plus a single block with the
// key already resident. Every block is checked against the reference; the steady block
// period must be Nr = 10 clocks. The clock counts from start to stop are printed with
// the throughput they give at a 100 MHz clock.
module tb_molen_aes_full;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int MEMW = 4096;               // 32 KiB of 64-bit words
  localparam logic [31:0] KEY_AT  = 32'h0000_0000;
  localparam logic [31:0] DATA_AT = 32'h0000_0400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, stop, busy, mem_rd, mem_wr;
  logic [2:0]  xreg_addr;
  logic [31:0] xreg_rdata, mem_addr;
  bus_t        mem_wdata, mem_rdata;
  bus_t        mem [MEMW];
  logic [31:0] xreg [8];
  int checks = 0, failures = 0;
  longint cyc = 0, prev_done = -1;
  int n_period_bad = 0, n_period = 0;

  always #5 clk = ~clk;

  molen_aes u_dut (
    .clk, .rst_n, .start, .stop, .busy, .xreg_addr, .xreg_rdata,
    .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata
  );

  assign xreg_rdata = xreg[xreg_addr];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mem_rd) mem_rdata <= mem[mem_addr[14:3]];
    if (mem_wr) mem[mem_addr[14:3]] <= mem_wdata;
    if (u_dut.blk_done) begin
      if (prev_done >= 0) begin
        n_period <= n_period + 1;
        if (cyc - prev_done != 10) n_period_bad <= n_period_bad + 1;
      end
      prev_done <= cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input u32 w [60], input bit load_key, input int bytes);
    int nblk = bytes / 16;
    u128 pt [1024];
    u128 got;
    longint t0, cycles;
    for (int i = 0; i <= 10; i++) begin
      mem[(KEY_AT >> 3) + 2*i]     = rk(w, i)[127:64];
      mem[(KEY_AT >> 3) + 2*i + 1] = rk(w, i)[63:0];
    end
    for (int b = 0; b < nblk; b++) begin
      pt[b] = {$urandom, $urandom, $urandom, $urandom};
      mem[(DATA_AT >> 3) + 2*b]     = pt[b][127:64];
      mem[(DATA_AT >> 3) + 2*b + 1] = pt[b][63:0];
    end
    xreg[0] = 10;
    xreg[1] = KEY_AT;
    xreg[2] = load_key ? KEY_AT + 32'd176 : KEY_AT;
    xreg[3] = DATA_AT;
    xreg[4] = DATA_AT + 32'(bytes);
    prev_done = -1;
    @(negedge clk) start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    while (!stop) @(negedge clk);
    cycles = cyc - t0;
    for (int b = 0; b < nblk; b++) begin
      got = {mem[(DATA_AT >> 3) + 2*b], mem[(DATA_AT >> 3) + 2*b + 1]};
      check(got == encrypt(pt[b], w, 10), $sformatf("%0d bytes: block %0d wrong", bytes, b));
    end
    $display("%0d bytes, key %s: %0d clocks start to stop, %0.1f Mbit/s at 100 MHz",
             bytes, load_key ? "loaded" : "resident", cycles, 100.0 * bytes * 8 / cycles);
  endtask

  initial begin
    u32 w [60];
    start = 1'b0;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 8; i++) xreg[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expand({$urandom, $urandom, $urandom, $urandom, 128'h0}, 4, w);
    run(w, 1, 16);
    run(w, 1, 512);
    run(w, 1, 16384);
    run(w, 0, 16);
    check(n_period > 1000, "burst periods observed");
    check(n_period_bad == 0, $sformatf("%0d block periods differ from 10 clocks", n_period_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
