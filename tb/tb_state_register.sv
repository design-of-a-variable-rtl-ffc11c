// tb_state_register: self-checking testbench for the state register.
//
// Random load / write-enable patterns: load must capture data_in and win
// over we, we must capture d, and with neither the value must hold.
module tb_state_register;
  import aes_ref_pkg::*;
  logic         clk = 0, rst_n = 0, load = 0, we = 0;
  logic [127:0] data_in = '0, d = '0, q, exp_q;
  int checks = 0, failures = 0;
  int nboth = 0;

  state_register dut (.clk, .rst_n, .load, .data_in, .we, .d, .q);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s q=%h exp=%h", what, q, exp_q);
    end
  endtask

  initial begin
    exp_q = '0;
    repeat (2) @(posedge clk);
    #1 check(q == '0, "reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = ($urandom % 4) == 0;
      we   = ($urandom % 2) == 0;
      data_in = rand128();
      d       = rand128();
      if (load && we) nboth++;
      if (load)    exp_q = data_in;
      else if (we) exp_q = d;
      @(posedge clk); #1;
      check(q == exp_q, "update");
    end
    check(nboth > 0, "load and we together exercised");
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
