// tb_add_round_key: self-checking testbench for add_round_key.
//
// Applies the FIPS-197 Appendix B round-1 key addition and 200 random
// state/key pairs, comparing with a byte-wise XOR computed in the testbench.
module tb_add_round_key;
  logic [127:0] din, key, dout, exp;
  int checks = 0, failures = 0;

  add_round_key dut (.state_in(din), .round_key(key), .state_out(dout));

  task automatic check();
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%h key=%h out=%h exp=%h", din, key, dout, exp);
    end
  endtask

  initial begin
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    key = 128'ha0fafe1788542cb123a339392a6c7605;
    exp = 128'ha49c7ff2689f352b6b5bea43026a5049;
    #1 check();
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 16; b++) exp[8*b +: 8] = din[8*b +: 8] ^ key[8*b +: 8];
      #1 check();
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
