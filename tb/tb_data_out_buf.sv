// tb_data_out_buf: loads random blocks and reads both 64-bit halves, checking the
// hold behaviour while load is low.
module tb_data_out_buf;
  import aes_pkg::*;

  logic   clk = 1'b0;
  logic   load, addr;
  block_t blk;
  bus_t   dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_out_buf dut (.clk, .load, .blk, .addr, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    block_t b;
    load = 1'b0; addr = 1'b0; blk = '0;
    for (int t = 0; t < 100; t++) begin
      b = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); load = 1'b1; blk = b;
      @(negedge clk); load = 1'b0; blk = ~b;
      addr = 1'b0; #1 check(dout == b[127:64], "upper half");
      addr = 1'b1; #1 check(dout == b[63:0],   "lower half");
      @(negedge clk);
      addr = 1'b0; #1 check(dout == b[127:64], "held upper half");
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
