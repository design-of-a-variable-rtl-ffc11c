// tb_shift_rows: self-checking testbench for shift_rows.
//
// Applies the FIPS-197 Appendix B round-1 example and 200 random states
// and compares the output with the reference model in aes_ref_pkg.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  shift_rows dut (.state_in(din), .state_out(dout));

  task automatic check(logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", din, dout, exp);
    end
  endtask

  initial begin
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1 check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(ref_shift_rows(din));
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
