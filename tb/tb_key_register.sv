// tb_key_register: writes complete stored key schedules for Nr = 10, 12 and 14 (64-bit
// words in order of use, in a shuffled write order) and checks the first and last key
// registers and every round read from the bank, with its one-clock read latency.
module tb_key_register;
  import aes_pkg::*;

  logic       clk = 1'b0;
  logic       we;
  logic [4:0] widx;
  bus_t       wdata;
  round_t     nr, rd_addr;
  block_t     key_first, key_round, key_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_register dut (.clk, .we, .widx, .wdata, .nr, .rd_addr, .key_first, .key_round, .key_last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    block_t k [15];
    int order [30];
    int n, j, tmp;
    we = 1'b0; widx = '0; wdata = '0; nr = 4'd10; rd_addr = 4'd1;
    for (int m = 0; m < 3; m++) begin
      nr = round_t'(10 + 2*m);
      n = 2 * (nr + 1);
      for (int i = 0; i <= nr; i++) k[i] = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < n; i++) order[i] = i;
      for (int i = n - 1; i > 0; i--) begin
        j = $urandom_range(i, 0); tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        we = 1'b1; widx = 5'(order[i]);
        wdata = order[i][0] ? k[order[i] / 2][63:0] : k[order[i] / 2][127:64];
      end
      @(negedge clk);
      we = 1'b0;
      check(key_first == k[0],  $sformatf("nr=%0d first key %h", nr, key_first));
      check(key_last  == k[nr], $sformatf("nr=%0d last key %h", nr, key_last));
      for (int r = 1; r < nr; r++) begin
        rd_addr = round_t'(r);
        @(negedge clk);
        check(key_round == k[r], $sformatf("nr=%0d round %0d key %h", nr, r, key_round));
      end
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
