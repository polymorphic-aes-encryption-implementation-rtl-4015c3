// tb_aes_sbox: exhaustive test of the forward and inverse S-box tables against the
// reference S-box (built by inverse search and the affine map), plus the FIPS-197
// examples S(0x53) = 0xED and S(0x00) = 0x63.
module tb_aes_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  byte_t a, yf, yi;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) u_fwd (.a(a), .y(yf));
  aes_sbox #(.INVERSE(1'b1)) u_inv (.a(a), .y(yi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    init();
    for (int i = 0; i < 256; i++) begin
      a = byte_t'(i);
      #1;
      check(yf == sb[i],  $sformatf("S(%h) = %h, expected %h", a, yf, sb[i]));
      check(yi == isb[i], $sformatf("InvS(%h) = %h, expected %h", a, yi, isb[i]));
    end
    a = 8'h53; #1; check(yf == 8'hed, "S(53) must be ED");
    a = 8'h00; #1; check(yf == 8'h63, "S(00) must be 63");
    a = 8'hed; #1; check(yi == 8'h53, "InvS(ED) must be 53");
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
