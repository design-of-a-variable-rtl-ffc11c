// tb_sbox: exhaustive self-checking testbench for the S-box ROM.
//
// All 256 inputs are compared with the reference S-box of aes_ref_pkg,
// which is computed a different way (x^254 by repeated multiplication), and
// two values from the FIPS-197 table are checked directly.
module tb_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  sbox dut (.in(din), .out(dout));

  task automatic check(logic [7:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", din, dout, exp);
    end
  endtask

  initial begin
    din = 8'h00; #1 check(8'h63);
    din = 8'h53; #1 check(8'hed);
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1 check(ref_sbox(din));
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
