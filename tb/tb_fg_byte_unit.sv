// tb_fg_byte_unit: exhaustive test of the encryption and decryption byte units: the
// contribution word must be {2S,S,S,3S} of the S-box value, or {eS,9S,dS,bS} of the
// inverse S-box value.
module tb_fg_byte_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  byte_t s;
  word_t we, wd;
  int checks = 0, failures = 0;

  fg_byte_unit #(.DECRYPT(1'b0)) u_enc (.s, .w(we));
  fg_byte_unit #(.DECRYPT(1'b1)) u_dec (.s, .w(wd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    u8 f, v;
    init();
    for (int i = 0; i < 256; i++) begin
      s = byte_t'(i);
      #1;
      f = sb[i];
      v = isb[i];
      check(we == {mul(f, 2), f, f, mul(f, 3)}, $sformatf("enc %h -> %h", s, we));
      check(wd == {mul(v, 14), mul(v, 9), mul(v, 13), mul(v, 11)}, $sformatf("dec %h -> %h", s, wd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
