// tb_crypto_processor: end-to-end testbench of the whole processor, at its
// default parameters.
//
// Encrypts a stream of blocks: first the FIPS-197 Appendix C plaintext with
// the key 000102..1f, whose cipher text is known for all three key lengths,
// then random blocks and keys. For every block it checks the key length
// drawn, the header (number of ones in the range of that key length and
// equal to hdr_ones), the cipher text against the known answer or the
// reference model, the order header-then-cipher on Data out, and the
// latency start -> cipher text: D + L + 4*Nr + 5 cycles, with D the draw
// cycles and L = 4*(Nr+1)-Nk the key expansion. It counts the mechanisms the
// design has, and fails if one never happened: each of the three key
// lengths, a redraw of code 11, and a header of every count of each range.
module tb_crypto_processor;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLOCKS = 60;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] data_in = '0, data_out;
  logic [255:0] key_in = '0;
  logic         out_valid, out_is_hdr, busy, done;
  keylen_e      keylen;
  logic [5:0]   hdr_ones;
  int checks = 0, failures = 0;
  int n_kl [3];
  int n_redraw = 0, n_known = 0;
  bit hdr_count_seen [64];

  crypto_processor dut (.clk, .rst_n, .start, .data_in, .key_in, .data_out, .out_valid,
                        .out_is_hdr, .busy, .done, .keylen, .hdr_ones);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam logic [127:0] FIPS_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [255:0] FIPS_KEY = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] FIPS_CT [3] = '{128'h69c4e0d86a7b0430d8cdb78070b4c55a,
                                          128'hdda97ca4864cdfe06eaf70a0ec0d7191,
                                          128'h8ea2b7ca516745bfeafc49904b496089};

  task automatic encrypt(logic [127:0] pt, logic [255:0] key, bit known);
    int cyc = 0, hdr_at = -1, ct_at = -1, draws = 0, k, nk, nr, lo, n;
    logic [39:0]  hdr = '0;
    logic [127:0] ct = '0;
    @(negedge clk);
    data_in = pt; key_in = key; start = 1;
    @(negedge clk);
    start = 0;
    while (ct_at < 0 && cyc < 1000) begin
      cyc++;
      if (dut.rng_en) draws++;
      if (out_valid && out_is_hdr) begin hdr_at = cyc; hdr = data_out[39:0]; end
      else if (out_valid) begin ct_at = cyc; ct = data_out; end
      @(negedge clk);
    end
    data_in = rand128(); key_in = rand256();
    k = int'(keylen); nk = 4 + 2*k; nr = nk + 6;
    check(k < 3, "valid key length");
    if (k < 3) n_kl[k]++;
    if (draws > 1) n_redraw++;
    check(draws >= 1 && draws <= 3, $sformatf("draw cycles %0d", draws));
    check(hdr_at > 0 && ct_at == hdr_at + 1, "header then cipher text");
    check(ct_at == draws + (4*(nr+1) - nk) + 4*nr + 5, $sformatf("latency %0d", ct_at));
    n  = popcount40(hdr);
    lo = 10*(k+1) + 1;
    check(n == int'(hdr_ones) && n >= lo && n <= lo + 6,
          $sformatf("header %h has %0d ones for AES-%0d", hdr, n, 128 + 64*k));
    hdr_count_seen[n] = 1;
    if (known) begin
      check(ct == FIPS_CT[k], $sformatf("FIPS-197 AES-%0d: %h", 128 + 64*k, ct));
      n_known++;
    end
    check(ct == ref_encrypt(pt, key, nk), $sformatf("cipher text AES-%0d", 128 + 64*k));
    check(!busy, "idle after the block");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) encrypt(FIPS_PT, FIPS_KEY, 1'b1);
    for (int i = 0; i < NBLOCKS; i++) encrypt(rand128(), rand256(), 1'b0);
    for (int k = 0; k < 3; k++) begin
      $display("AES-%0d blocks: %0d", 128 + 64*k, n_kl[k]);
      check(n_kl[k] > 0, $sformatf("AES-%0d used", 128 + 64*k));
    end
    $display("redraws: %0d, known-answer blocks: %0d", n_redraw, n_known);
    check(n_redraw > 0, "redraw happened");
    for (int k = 0; k < 3; k++)
      for (int c = 1; c <= 7; c++)
        check(hdr_count_seen[10*(k+1) + c], $sformatf("header with %0d ones", 10*(k+1) + c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
