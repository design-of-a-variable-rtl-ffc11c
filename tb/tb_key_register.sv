// tb_key_register: self-checking testbench for the key register.
//
// Checks the reset value, that a load strobe captures key and round number
// on the next rising edge, and that the register holds while load is low.
module tb_key_register;
  import aes_ref_pkg::*;
  logic         clk = 0, rst_n = 0, load = 0;
  logic [3:0]   round_in = '0, round_out;
  logic [127:0] key_in = '0, key_out, exp_key;
  logic [3:0]   exp_round;
  int checks = 0, failures = 0;

  key_register dut (.clk, .rst_n, .load, .round_in, .key_in, .key_out, .round_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s key=%h exp=%h", what, key_out, exp_key);
    end
  endtask

  initial begin
    exp_key = '0; exp_round = '0;
    repeat (2) @(posedge clk);
    #1 check(key_out == '0 && round_out == '0, "reset");
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      load     = ($urandom % 3) == 0;
      key_in   = rand128();
      round_in = 4'($urandom);
      if (load) begin
        exp_key   = key_in;
        exp_round = round_in;
      end
      @(posedge clk); #1;
      check(key_out == exp_key && round_out == exp_round, load ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
