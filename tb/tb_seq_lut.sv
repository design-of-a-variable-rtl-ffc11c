// tb_seq_lut: self-checking testbench for the sequencing look-up table.
//
// For each key length the program is read word by word until the word
// marked last. The testbench checks its length (4*Nr+1), that each word
// enables at most one unit, the number of each operation, and then runs the
// program on the reference model: the sub-operations it names, applied in
// its order with the round keys it loads, must encrypt random blocks to the
// same cipher text as the reference AES.
module tb_seq_lut;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  keylen_e           keylen;
  logic [STEP_W-1:0] step;
  ctrl_t             ctrl;
  int checks = 0, failures = 0;

  seq_lut dut (.keylen, .step, .ctrl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL keylen=%0d step=%0d: %s", keylen, step, what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) begin
      automatic int nk = 4 + 2*k, nr = 10 + 2*k;
      for (int t = 0; t < 4; t++) begin
        automatic logic [255:0] key = rand256();
        automatic logic [127:0] pt  = rand128();
        automatic words_t       w   = ref_expand(key, nk);
        automatic logic [127:0] s   = pt, rk = '0;
        automatic int n = 0, nsub = 0, nshift = 0, nmix = 0, nark = 0, nkld = 0;
        keylen = keylen_e'(k);
        for (int i = 0; i < 64; i++) begin
          step = 6'(i);
          #1;
          n++;
          if (t == 0)
            check($countones({ctrl.en_sub, ctrl.en_shift, ctrl.en_mix, ctrl.en_ark}) <= 1,
                  "one unit per word");
          if (ctrl.en_sub)   begin s = ref_sub_bytes(s);   nsub++;   end
          if (ctrl.en_shift) begin s = ref_shift_rows(s);  nshift++; end
          if (ctrl.en_mix)   begin s = ref_mix_columns(s); nmix++;   end
          if (ctrl.en_ark)   begin s = s ^ rk;             nark++;   end
          if (ctrl.kld)      begin rk = ref_round_key(w, int'(ctrl.round)); nkld++; end
          if (ctrl.last) break;
        end
        check(s == ref_encrypt(pt, key, nk), "program encrypts like AES");
        if (t == 0) begin
          check(n == 4*nr + 1, "program length");
          check(nsub == nr && nshift == nr && nmix == nr - 1, "sub/shift/mix counts");
          check(nark == nr + 1 && nkld == nr + 1, "key add/load counts");
        end
      end
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
