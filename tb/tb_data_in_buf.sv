// tb_data_in_buf: writes random 64-bit halves in both orders and checks the assembled
// 128-bit block, and that nothing changes while we is low.
module tb_data_in_buf;
  import aes_pkg::*;

  logic   clk = 1'b0;
  logic   we, addr;
  bus_t   din;
  block_t blk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_in_buf dut (.clk, .we, .addr, .din, .blk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bus_t hi, lo;
    we = 1'b0; addr = 1'b0; din = '0;
    for (int t = 0; t < 100; t++) begin
      hi = {$urandom, $urandom}; lo = {$urandom, $urandom};
      @(negedge clk); we = 1'b1; addr = t[0];  din = t[0] ? lo : hi;
      @(negedge clk); we = 1'b1; addr = !t[0]; din = t[0] ? hi : lo;
      @(negedge clk); we = 1'b0; din = ~din;
      check(blk == {hi, lo}, $sformatf("block %h", blk));
      @(negedge clk);
      check(blk == {hi, lo}, "changed with we low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
