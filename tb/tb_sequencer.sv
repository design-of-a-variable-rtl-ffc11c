// tb_sequencer: self-checking testbench for the sequencer and timing /
// control unit, run together with the look-up table it reads.
//
// The testbench plays the random number generator (it chooses b1b0, and
// presents code 11 first in some runs to force a redraw) and the key
// scheduler (done L = 4*(Nr+1)-Nk cycles after ks_start). For each run it
// checks: state_load with start, one rng_en per draw cycle, the latched key
// length, one ks_start and one hdr_gen, the number of each unit enable and
// key load, that no unit is enabled outside the program, sel_hdr followed by
// sel_ct with done, busy, and the cycle of done after start:
// D + L + 4*Nr + 4 for D draw cycles.
module tb_sequencer;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, b0 = 0, b1 = 0, ks_done = 0;
  logic rng_en, ks_start, key_load, state_load, en_sub, en_shift, en_mix, en_ark;
  logic hdr_gen, sel_hdr, sel_ct, busy, done;
  logic [3:0] key_round;
  keylen_e keylen, ks_keylen;
  logic [STEP_W-1:0] step;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int redraws = 0;

  seq_lut   u_lut (.keylen, .step, .ctrl);
  sequencer dut (.clk, .rst_n, .start, .b0, .b1, .rng_en, .keylen, .step, .ctrl,
                 .ks_start, .ks_keylen, .ks_done, .key_load, .key_round, .state_load,
                 .en_sub, .en_shift, .en_mix, .en_ark, .hdr_gen, .sel_hdr, .sel_ct,
                 .busy, .done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int code, bit force_redraw);
    int nk = 4 + 2*code, nr = nk + 6, L = 4*(nr+1) - nk;
    int d = force_redraw ? 2 : 1;
    int cyc = 0, nrng = 0, nks = 0, nhdr = 0, nsub = 0, nshift = 0, nmix = 0, nark = 0;
    int nkld = 0, ks_at = -1, done_at = -1, hdr_at = -1;
    @(negedge clk);
    check(!busy, "idle before start");
    start = 1;
    #1 check(state_load, "state_load with start");
    @(negedge clk);
    start = 0;
    {b1, b0} = force_redraw ? 2'b11 : 2'(code);
    while (done_at < 0 && cyc < 400) begin
      #1;
      cyc++;
      check(busy, "busy during operation");
      check(!state_load, "no reload while busy");
      if (rng_en) begin
        nrng++;
        if ({b1, b0} == 2'b11) redraws++;
      end
      if (ks_start) begin
        nks++; ks_at = cyc;
        check(ks_keylen == keylen_e'(code), "key length passed to key scheduler");
      end
      if (hdr_gen) nhdr++;
      nsub += int'(en_sub); nshift += int'(en_shift); nmix += int'(en_mix); nark += int'(en_ark);
      nkld += int'(key_load);
      if (sel_hdr) hdr_at = cyc;
      if (sel_ct) check(hdr_at == cyc - 1, "cipher right after header");
      if (done) begin
        done_at = cyc;
        check(sel_ct, "done with cipher beat");
      end
      @(negedge clk);
      if (rng_en) {b1, b0} = 2'(code);
      ks_done = (ks_at > 0 && cyc == ks_at + L);
    end
    ks_done = 0;
    check(keylen == keylen_e'(code), "key length latched");
    check(nrng == d, $sformatf("draw cycles %0d", nrng));
    check(nks == 1 && nhdr == 1, "one key schedule and one header per block");
    check(nsub == nr && nshift == nr && nmix == nr-1 && nark == nr+1, "unit enables");
    check(nkld == nr+1, "key loads");
    check(done_at == d + L + 4*nr + 4, $sformatf("done at cycle %0d", done_at));
    #1 check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) run(i % 3, i >= 6);
    check(redraws == 6, "code 11 redrawn");
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
