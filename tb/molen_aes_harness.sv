// molen_aes_harness: host-side model for one molen_aes instance, used by tb_molen_aes.
// It plays the PowerPC (writes the expanded key and data into main memory, fills the
// XREG, pulses start, waits for stop), models the single-port 64-bit main memory
// (read data one clock after mem_rd) and the XREG, and checks every ciphered block
// against aes_ref_pkg. Scenarios: FIPS-197 known answer, key reuse without reload,
// AES-192 and AES-256 mode switches, a 32-block burst with its block period, and an
// empty data range. It counts how often each control mechanism occurred.
module molen_aes_harness
  import aes_pkg::*;
  import aes_ref_pkg::*;
#(
  parameter arch_e ARCH    = ARCH_MB,
  parameter bit    DECRYPT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MEMW = 1024;               // 8 KiB
  localparam logic [31:0] KEY_AT  = 32'h0000_0000;
  localparam logic [31:0] DATA_AT = 32'h0000_0400;

  logic              start, stop, busy, mem_rd, mem_wr;
  logic [2:0]        xreg_addr;
  logic [31:0]       xreg_rdata;
  logic [31:0]       mem_addr;
  bus_t              mem_wdata, mem_rdata;

  bus_t        mem [MEMW];
  logic [31:0] xreg [8];

  molen_aes #(.ARCH(ARCH), .DECRYPT(DECRYPT)) u_dut (
    .clk, .rst_n, .start, .stop, .busy, .xreg_addr, .xreg_rdata,
    .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata
  );

  assign xreg_rdata = xreg[xreg_addr];

  always_ff @(posedge clk) begin
    if (mem_rd) mem_rdata <= mem[mem_addr[12:3]];
    if (mem_wr) mem[mem_addr[12:3]] <= mem_wdata;
  end

  // mechanism counters
  int n_key_load, n_key_reuse, n_burst, n_fill_wait, n_port_wait, n_empty, n_kat;
  int n_mode [3];
  longint cyc;
  longint wr_cyc [64];
  int     n_wr;
  logic [255:0] stored;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (u_dut.u_ctrl.u_write.state == u_dut.u_ctrl.u_write.W_FILL && !u_dut.u_ctrl.u_write.pending)
      n_fill_wait <= n_fill_wait + 1;
    if ((u_dut.u_ctrl.u_write.state == u_dut.u_ctrl.u_write.W_WR0 ||
         u_dut.u_ctrl.u_write.state == u_dut.u_ctrl.u_write.W_WR1) && mem_rd)
      n_port_wait <= n_port_wait + 1;
    if (u_dut.blk_done && n_wr < 64) begin
      wr_cyc[n_wr] <= cyc;
      n_wr <= n_wr + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [arch=%0d dec=%0d] %s", ARCH, DECRYPT, what);
    end
  endtask

  task automatic put_key(input u32 w [60], input int nr);
    u128 k;
    for (int i = 0; i <= nr; i++) begin
      k = stored_key(w, nr, i, DECRYPT);
      mem[(KEY_AT >> 3) + 2*i]     = k[127:64];
      mem[(KEY_AT >> 3) + 2*i + 1] = k[63:0];
    end
  endtask

  // one call of the hardware function; returns the start-to-stop cycle count
  task automatic call(input int nr, input bit load_key, input int nblk, output longint cycles);
    longint t0;
    xreg[0] = nr;
    xreg[1] = KEY_AT;
    xreg[2] = load_key ? KEY_AT + 32'(16*(nr+1)) : KEY_AT;
    xreg[3] = DATA_AT;
    xreg[4] = DATA_AT + 32'(16*nblk);
    n_wr = 0;
    @(negedge clk) start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    fork
      begin : wait_stop
        while (!stop) @(negedge clk);
      end
      begin : guard
        repeat (20000) @(negedge clk);
        check(0, "stop never came");
      end
    join_any
    disable fork;
    cycles = cyc - t0;
    @(negedge clk);
    check(!busy, "busy after stop");
  endtask

  task automatic run(input logic [255:0] key, input int nk, input bit load_key, input int nblk,
                     input bit kat, input u128 kat_in, input u128 kat_out);
    u32 w [60];
    u128 pt [64];
    u128 got, exp;
    longint cycles;
    int nr = nk + 6;
    if (!load_key) key = stored;       // the unit still holds the previous key
    stored = key;
    expand(key, nk, w);
    if (load_key) put_key(w, nr);
    for (int b = 0; b < nblk; b++) begin
      pt[b] = kat && b == 0 ? kat_in : {$urandom, $urandom, $urandom, $urandom};
      mem[(DATA_AT >> 3) + 2*b]     = pt[b][127:64];
      mem[(DATA_AT >> 3) + 2*b + 1] = pt[b][63:0];
    end
    call(nr, load_key, nblk, cycles);
    for (int b = 0; b < nblk; b++) begin
      got = {mem[(DATA_AT >> 3) + 2*b], mem[(DATA_AT >> 3) + 2*b + 1]};
      exp = DECRYPT ? decrypt(pt[b], w, nr) : encrypt(pt[b], w, nr);
      check(got == exp, $sformatf("nk=%0d block %0d got %h exp %h", nk, b, got, exp));
      if (kat && b == 0) begin
        check(got == kat_out, $sformatf("known answer nk=%0d got %h", nk, got));
        n_kat++;
      end
    end
    // block period of the datapath: one finished block per Nr clocks
    for (int b = 1; b < nblk; b++)
      check(wr_cyc[b] - wr_cyc[b-1] == nr,
            $sformatf("block period %0d, expected %0d", wr_cyc[b] - wr_cyc[b-1], nr));
    if (load_key) n_key_load++; else n_key_reuse++;
    if (nblk > 1) n_burst++;
    n_mode[(nk - 4) / 2]++;
    $display("[arch=%0d dec=%0d] nk=%0d blocks=%0d key %s: %0d cycles start to stop",
             ARCH, DECRYPT, nk, nblk, load_key ? "loaded" : "reused", cycles);
  endtask

  localparam logic [255:0] FIPS_KEY = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam u128 FIPS_PT = 128'h00112233445566778899aabbccddeeff;

  initial begin
    longint cyc0;
    checks = 0; failures = 0; done = 1'b0; start = 1'b0;
    cyc = 0; n_wr = 0;
    n_key_load = 0; n_key_reuse = 0; n_burst = 0; n_fill_wait = 0; n_port_wait = 0;
    n_empty = 0; n_kat = 0; n_mode = '{0, 0, 0};
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 8; i++) xreg[i] = '0;
    wait (go);
    // FIPS-197 appendix C vectors (ciphertexts as published)
    if (!DECRYPT) begin
      run({FIPS_KEY[255:128], 128'h0}, 4, 1, 1, 1, FIPS_PT, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
      run({FIPS_KEY[255:64], 64'h0}, 6, 1, 1, 1, FIPS_PT, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
      run(FIPS_KEY, 8, 1, 1, 1, FIPS_PT, 128'h8ea2b7ca516745bfeafc49904b496089);
    end else begin
      run({FIPS_KEY[255:128], 128'h0}, 4, 1, 1, 1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, FIPS_PT);
      run({FIPS_KEY[255:64], 64'h0}, 6, 1, 1, 1, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, FIPS_PT);
      run(FIPS_KEY, 8, 1, 1, 1, 128'h8ea2b7ca516745bfeafc49904b496089, FIPS_PT);
    end
    // random keys: load, then reuse the stored key; 192- and 256-bit bursts
    run({$urandom, $urandom, $urandom, $urandom, 128'h0}, 4, 1, 3, 0, '0, '0);
    run('0, 4, 0, 5, 0, '0, '0);        // same key, not reloaded
    run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 64'h0}, 6, 1, 8, 0, '0, '0);
    run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}, 8, 1, 8, 0, '0, '0);
    // 512-byte burst with AES-128
    run({$urandom, $urandom, $urandom, $urandom, 128'h0}, 4, 1, 32, 0, '0, '0);
    // empty data range: stop without processing
    begin
      longint c;
      call(10, 0, 0, c);
      check(c < 20, $sformatf("empty range took %0d cycles", c));
      n_empty++;
    end
    cyc0 = cyc;
    $display("[arch=%0d dec=%0d] mechanisms: key_load=%0d key_reuse=%0d burst=%0d fill_wait=%0d port_wait=%0d aes128=%0d aes192=%0d aes256=%0d empty=%0d known_answer=%0d",
             ARCH, DECRYPT, n_key_load, n_key_reuse, n_burst, n_fill_wait, n_port_wait,
             n_mode[0], n_mode[1], n_mode[2], n_empty, n_kat);
    check(n_key_load > 0,  "key load never happened");
    check(n_key_reuse > 0, "key reuse never happened");
    check(n_burst > 0,     "burst never happened");
    check(n_fill_wait > 0, "pipeline fill wait never happened");
    check(n_port_wait > 0, "write never waited for the memory port");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "not all key sizes ran");
    check(n_empty > 0,     "empty range never ran");
    done = 1'b1;
  end
endmodule
