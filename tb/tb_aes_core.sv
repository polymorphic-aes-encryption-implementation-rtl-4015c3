// tb_aes_core: drives the folded datapath directly, as the control unit would, for the
// memory based and fine grain encryption cores and the memory based decryption core.
// A small key store model answers key_addr one clock later. Each block is loaded as two
// bus words, then given cmd_first, Nr-2 cmd_mid and cmd_last; blk_done must come two
// clocks after cmd_last, and the two output words must match the reference for
// Nr = 10, 12 and 14.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  bus_t   bus_din;
  logic   din_we, din_addr, cmd_first, cmd_mid, cmd_last, dout_addr;
  round_t round;
  round_t key_addr [3];
  block_t key_first, key_last;
  block_t key_round [3];
  bus_t   bus_dout [3];
  logic   blk_done [3];
  block_t keys [15];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_core #(.ARCH(ARCH_MB), .DECRYPT(1'b0)) u_me (.clk, .rst_n, .bus_din, .din_we, .din_addr,
    .cmd_first, .cmd_mid, .cmd_last, .round, .key_addr(key_addr[0]), .key_first,
    .key_round(key_round[0]), .key_last, .dout_addr, .bus_dout(bus_dout[0]), .blk_done(blk_done[0]));
  aes_core #(.ARCH(ARCH_FG), .DECRYPT(1'b0)) u_fe (.clk, .rst_n, .bus_din, .din_we, .din_addr,
    .cmd_first, .cmd_mid, .cmd_last, .round, .key_addr(key_addr[1]), .key_first,
    .key_round(key_round[1]), .key_last, .dout_addr, .bus_dout(bus_dout[1]), .blk_done(blk_done[1]));
  aes_core #(.ARCH(ARCH_MB), .DECRYPT(1'b1)) u_md (.clk, .rst_n, .bus_din, .din_we, .din_addr,
    .cmd_first, .cmd_mid, .cmd_last, .round, .key_addr(key_addr[2]), .key_first,
    .key_round(key_round[2]), .key_last, .dout_addr, .bus_dout(bus_dout[2]), .blk_done(blk_done[2]));

  // key store model with a registered read
  always_ff @(posedge clk)
    for (int i = 0; i < 3; i++) key_round[i] <= keys[key_addr[i]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    u32 w [60];
    u128 pt, ee, ed;
    logic [255:0] key;
    int nr, nk;
    din_we = 0; din_addr = 0; cmd_first = 0; cmd_mid = 0; cmd_last = 0; dout_addr = 0;
    round = 4'd1; bus_din = '0;
    for (int i = 0; i < 15; i++) keys[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      nk = 4 + 2 * (t % 3);
      nr = nk + 6;
      key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      expand(key, nk, w);
      pt = {$urandom, $urandom, $urandom, $urandom};
      ee = encrypt(pt, w, nr);
      ed = decrypt(pt, w, nr);
      // the encryption cores use the plain schedule; the decryption core is checked in a
      // separate pass below with its own schedule
      for (int i = 0; i <= nr; i++) keys[i] = stored_key(w, nr, i, 1'b0);
      key_first = keys[0]; key_last = keys[nr];
      @(negedge clk); din_we = 1; din_addr = 0; bus_din = pt[127:64];
      @(negedge clk); din_we = 1; din_addr = 1; bus_din = pt[63:0];
      @(negedge clk); din_we = 0;
      cmd_first = 1; round = 4'd1;
      for (int r = 2; r < nr; r++) begin
        @(negedge clk); cmd_first = 0; cmd_mid = 1; round = round_t'(r);
      end
      @(negedge clk); cmd_mid = 0; cmd_last = 1;
      @(negedge clk); cmd_last = 0;
      check(!blk_done[0], "blk_done one clock after cmd_last");
      @(negedge clk);
      check(blk_done[0] && blk_done[1], "blk_done two clocks after cmd_last");
      dout_addr = 0; #1;
      check(bus_dout[0] == ee[127:64], $sformatf("mb enc nr=%0d upper %h", nr, bus_dout[0]));
      check(bus_dout[1] == ee[127:64], $sformatf("fg enc nr=%0d upper %h", nr, bus_dout[1]));
      dout_addr = 1; #1;
      check(bus_dout[0] == ee[63:0], $sformatf("mb enc nr=%0d lower", nr));
      check(bus_dout[1] == ee[63:0], $sformatf("fg enc nr=%0d lower", nr));
      @(negedge clk);
      check(!blk_done[0], "blk_done is a single pulse");
      // decryption pass
      for (int i = 0; i <= nr; i++) keys[i] = stored_key(w, nr, i, 1'b1);
      key_first = keys[0]; key_last = keys[nr];
      @(negedge clk); din_we = 1; din_addr = 0; bus_din = pt[127:64];
      @(negedge clk); din_we = 1; din_addr = 1; bus_din = pt[63:0];
      @(negedge clk); din_we = 0;
      cmd_first = 1; round = 4'd1;
      for (int r = 2; r < nr; r++) begin
        @(negedge clk); cmd_first = 0; cmd_mid = 1; round = round_t'(r);
      end
      @(negedge clk); cmd_mid = 0; cmd_last = 1;
      @(negedge clk); cmd_last = 0;
      @(negedge clk);
      check(blk_done[2], "dec blk_done");
      dout_addr = 0; #1;
      check(bus_dout[2] == ed[127:64], $sformatf("mb dec nr=%0d upper %h", nr, bus_dout[2]));
      dout_addr = 1; #1;
      check(bus_dout[2] == ed[63:0], $sformatf("mb dec nr=%0d lower", nr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
