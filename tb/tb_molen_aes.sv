// tb_molen_aes: end-to-end test of the AES functional unit in all four configurations
// (fine grain and memory based, encryption and decryption), each driven by its own
// host/memory model (molen_aes_harness) in parallel. Every block is checked against the
// reference model, the block period against Nr clocks, and each control mechanism
// (key load, key reuse, burst, pipeline fill wait, port wait, three key sizes, empty
// range) must have occurred.
module tb_molen_aes;
  import aes_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic go = 1'b0;
  logic done [4];
  int   chk [4];
  int   fail [4];
  int   checks, failures;

  always #5 clk = ~clk;

  molen_aes_harness #(.ARCH(ARCH_MB), .DECRYPT(1'b0)) h0 (.clk, .rst_n, .go, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  molen_aes_harness #(.ARCH(ARCH_FG), .DECRYPT(1'b0)) h1 (.clk, .rst_n, .go, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  molen_aes_harness #(.ARCH(ARCH_MB), .DECRYPT(1'b1)) h2 (.clk, .rst_n, .go, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  molen_aes_harness #(.ARCH(ARCH_FG), .DECRYPT(1'b1)) h3 (.clk, .rst_n, .go, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    go = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
