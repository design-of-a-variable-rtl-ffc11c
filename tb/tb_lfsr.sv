// tb_lfsr: self-checking testbench for the pseudo-noise generator.
//
// Checks the reset (seed) value, that the register holds while en is low,
// each step against the shift-right rule computed here (new left bit =
// q[1] ^ q[0]), that b0/b1 are the two low bits, and that the period is 7
// with all seven non-zero states visited.
module tb_lfsr;
  logic       clk = 0, rst_n = 0, en = 0;
  logic [2:0] q, exp_q;
  logic       b0, b1;
  int checks = 0, failures = 0;
  bit seen [8];

  lfsr dut (.clk, .rst_n, .en, .q, .b0, .b1);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s q=%b exp=%b", what, q, exp_q);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == 3'b001, "reset value");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 check(q == 3'b001, "hold while en low");
    en = 1;
    exp_q = q;
    for (int i = 0; i < 21; i++) begin
      exp_q = {exp_q[1] ^ exp_q[0], exp_q[2:1]};
      @(posedge clk); #1;
      check(q == exp_q, "step");
      check(b0 == q[0] && b1 == q[1], "b0/b1");
      check(q != 3'b000, "never zero");
      if (i < 7) seen[q] = 1;
      if (i == 6) check(q == 3'b001, "period 7");
    end
    for (int s = 1; s < 8; s++) check(seen[s], "all states visited");
    en = 0;
    exp_q = q;
    repeat (4) @(posedge clk);
    #1 check(q == exp_q, "hold after en low");
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
