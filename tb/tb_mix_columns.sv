// tb_mix_columns: self-checking testbench for mix_columns.
//
// Applies the FIPS-197 Appendix B round-1 example and 200 random states
// and compares the output with the reference model in aes_ref_pkg.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  mix_columns dut (.state_in(din), .state_out(dout));

  task automatic check(logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", din, dout, exp);
    end
  endtask

  initial begin
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1 check(128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(ref_mix_columns(din));
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
