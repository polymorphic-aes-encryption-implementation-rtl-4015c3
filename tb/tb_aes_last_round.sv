// tb_aes_last_round: the final round (no column mix) for encryption and decryption on
// the FIPS-197 appendix B last round and random states, against the reference model.
module tb_aes_last_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  block_t s, k, oe, od;
  int checks = 0, failures = 0;

  aes_last_round #(.DECRYPT(1'b0)) u_e (.state_in(s), .key(k), .state_out(oe));
  aes_last_round #(.DECRYPT(1'b1)) u_d (.state_in(s), .key(k), .state_out(od));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    init();
    s = 128'heb40f21e592e38848ba113e71bc342d2; k = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    #1;
    check(oe == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS last round");
    for (int t = 0; t < 500; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(oe == (subshift(s, 0) ^ k), $sformatf("enc %h", oe));
      check(od == (subshift(s, 1) ^ k), $sformatf("dec %h", od));
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
