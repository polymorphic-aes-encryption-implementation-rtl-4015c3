// tb_gf_mul_enc: exhaustive test of the X, 2X, 3X multiplier against a shift-and-add
// GF(2^8) product, plus the worked example 2*D7 = B5, 3*D7 = 62.
module tb_gf_mul_enc;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  byte_t x, x1, x2, x3;
  int checks = 0, failures = 0;

  gf_mul_enc dut (.x, .x1, .x2, .x3);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = byte_t'(i);
      #1;
      check(x1 == x, "1X");
      check(x2 == mul(x, 8'h02), $sformatf("2*%h = %h", x, x2));
      check(x3 == mul(x, 8'h03), $sformatf("3*%h = %h", x, x3));
    end
    x = 8'hd7; #1;
    check(x2 == 8'hb5, "2*D7 must be B5");
    check(x3 == 8'h62, "3*D7 must be 62");
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
