// tb_key_scheduler: self-checking testbench for the key scheduler.
//
// For every key length it expands the FIPS-197 example key and random keys,
// checks that done comes 4*(Nr+1)-Nk cycles after start, and compares every
// round key with the reference expansion. The last AES-128 round key of the
// FIPS-197 Appendix A.1 example is also checked as a literal.
module tb_key_scheduler;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0, busy, done;
  keylen_e      keylen = KL_128;
  logic [255:0] key_in = '0;
  logic [3:0]   rd_round = '0;
  logic [127:0] rd_key;
  int checks = 0, failures = 0;

  key_scheduler dut (.clk, .rst_n, .start, .keylen, .key_in, .busy, .done, .rd_round, .rd_key);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL keylen=%0d round=%0d: %s", keylen, rd_round, what);
    end
  endtask

  task automatic run(keylen_e kl, logic [255:0] key);
    int nk = 4 + 2*int'(kl), nr = nk + 6, cyc = 0;
    words_t w = ref_expand(key, nk);
    @(negedge clk);
    keylen = kl; key_in = key; start = 1;
    @(negedge clk);
    start = 0;
    key_in = rand256();   // must not matter after start
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 4*(nr+1) - nk, $sformatf("latency %0d", cyc));
    for (int r = 0; r <= nr; r++) begin
      rd_round = 4'(r);
      #1 check(rd_key == ref_round_key(w, r), "round key");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(KL_128, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    rd_round = 4'd10;
    #1 check(rd_key == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 last round key");
    for (int k = 0; k < 3; k++) begin
      run(keylen_e'(k), 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
      for (int t = 0; t < 3; t++) run(keylen_e'(k), rand256());
    end
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
