// tb_gf_mul_dec: exhaustive test of the 9Y, BY, DY, EY multiplier against a
// shift-and-add GF(2^8) product.
module tb_gf_mul_dec;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  byte_t y, y9, yb, yd, ye;
  int checks = 0, failures = 0;

  gf_mul_dec dut (.y, .y9, .yb, .yd, .ye);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      y = byte_t'(i);
      #1;
      check(y9 == mul(y, 8'h09), $sformatf("9*%h = %h", y, y9));
      check(yb == mul(y, 8'h0b), $sformatf("b*%h = %h", y, yb));
      check(yd == mul(y, 8'h0d), $sformatf("d*%h = %h", y, yd));
      check(ye == mul(y, 8'h0e), $sformatf("e*%h = %h", y, ye));
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
