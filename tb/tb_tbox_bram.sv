// tb_tbox_bram: reads every word of the encryption and decryption ROMs through both
// ports (with different addresses on A and B), checks the one-clock read latency and
// that an output holds while its enable is low.
module tb_tbox_bram;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic  clk = 1'b0;
  logic  en_a, en_b;
  byte_t addr_a, addr_b;
  word_t ea, eb, da, db;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tbox_bram #(.DECRYPT(1'b0)) u_enc (.clk, .en_a, .addr_a, .dout_a(ea), .en_b, .addr_b, .dout_b(eb));
  tbox_bram #(.DECRYPT(1'b1)) u_dec (.clk, .en_a, .addr_a, .dout_a(da), .en_b, .addr_b, .dout_b(db));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t te(input int i);
    u8 f = sb[i];
    return {mul(f, 2), f, f, mul(f, 3)};
  endfunction
  function automatic word_t td(input int i);
    u8 v = isb[i];
    return {mul(v, 14), mul(v, 9), mul(v, 13), mul(v, 11)};
  endfunction

  initial begin
    word_t hold_a;
    init();
    en_a = 1'b0; en_b = 1'b0; addr_a = '0; addr_b = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      en_a = 1'b1; en_b = 1'b1;
      addr_a = byte_t'(i); addr_b = byte_t'(255 - i);
      @(negedge clk);
      en_a = 1'b0; en_b = 1'b0;
      check(ea == te(i),       $sformatf("enc A[%0d] = %h", i, ea));
      check(eb == te(255 - i), $sformatf("enc B[%0d] = %h", 255 - i, eb));
      check(da == td(i),       $sformatf("dec A[%0d] = %h", i, da));
      check(db == td(255 - i), $sformatf("dec B[%0d] = %h", 255 - i, db));
    end
    // hold: a new address without enable must not change the output
    hold_a = ea;
    addr_a = 8'h5a;
    @(negedge clk);
    check(ea == hold_a, "output changed with enable low");
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
