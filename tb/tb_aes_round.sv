// tb_aes_round: the main round in all four builds (fine grain / memory based,
// encryption / decryption) on random states and keys, against the reference round
// (MixColumns(ShiftRows(SubBytes(s))) ^ k, and its inverse counterpart). Checks that
// the result appears exactly one clock after en, and holds while en is low.
module tb_aes_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  logic   en;
  block_t s, k;
  block_t o [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_round #(.ARCH(ARCH_FG), .DECRYPT(1'b0)) u_fe (.clk, .en, .state_in(s), .key(k), .state_out(o[0]));
  aes_round #(.ARCH(ARCH_MB), .DECRYPT(1'b0)) u_me (.clk, .en, .state_in(s), .key(k), .state_out(o[1]));
  aes_round #(.ARCH(ARCH_FG), .DECRYPT(1'b1)) u_fd (.clk, .en, .state_in(s), .key(k), .state_out(o[2]));
  aes_round #(.ARCH(ARCH_MB), .DECRYPT(1'b1)) u_md (.clk, .en, .state_in(s), .key(k), .state_out(o[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    u128 ee, ed, prev [4];
    init();
    en = 1'b0; s = '0; k = '0;
    // FIPS-197 appendix B, round 1: start of round -> start of round 2
    @(negedge clk);
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = 128'ha0fafe1788542cb123a339392a6c7605; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(o[0] == 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS round 1 (fine grain)");
    check(o[1] == 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS round 1 (memory based)");
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      ee = mixcol(subshift(s, 0), 0) ^ k;
      ed = mixcol(subshift(s, 1), 1) ^ k;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      check(o[0] == ee, $sformatf("fg enc %h", o[0]));
      check(o[1] == ee, $sformatf("mb enc %h", o[1]));
      check(o[2] == ed, $sformatf("fg dec %h", o[2]));
      check(o[3] == ed, $sformatf("mb dec %h", o[3]));
      // inputs change with en low: outputs hold
      prev = o;
      s = ~s; k = ~k;
      @(negedge clk);
      for (int i = 0; i < 4; i++) check(o[i] == prev[i], $sformatf("output %0d did not hold", i));
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
