// tb_header_gen: self-checking testbench for the header generation unit.
//
// Generates many headers for each b1b0 code at random moments. Each header
// must hold exactly as many ones as the unit reports, and that number must
// lie in the range of its key length (11-17, 21-27, 31-37; code 11 as 256).
// Over the run every one of the seven counts of each range must appear, and
// the same count must appear at more than one rotation. valid must rise the
// cycle after the first gen, and the header must hold between gens.
module tb_header_gen;
  import aes_ref_pkg::*;
  logic        clk = 0, rst_n = 0, gen = 0, b0 = 0, b1 = 0, valid;
  logic [39:0] header, held;
  logic [5:0]  ones;
  int checks = 0, failures = 0;
  bit   seen [64];
  logic [39:0] first_pat [64];
  bit   rotated_seen [64];

  header_gen dut (.clk, .rst_n, .gen, .b0, .b1, .header, .ones, .valid);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s hdr=%h ones=%0d", what, header, ones);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(!valid, "not valid after reset");
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      automatic int code = $urandom % 4;
      int lo, n;
      repeat ($urandom % 5) @(negedge clk);
      @(negedge clk);
      {b1, b0} = 2'(code);
      gen = 1;
      @(negedge clk);
      gen = 0;
      n  = popcount40(header);
      lo = (code == 3) ? 31 : 10*(code+1) + 1;
      check(valid, "valid");
      check(n == int'(ones), "ones match header");
      check(n >= lo && n <= lo + 6, $sformatf("count in range for code %0d", code));
      if (!seen[n]) begin
        seen[n] = 1;
        first_pat[n] = header;
      end else if (header != first_pat[n]) rotated_seen[n] = 1;
      held = header;
      {b1, b0} = ~{b1, b0};
      @(negedge clk);
      check(header == held, "header holds without gen");
    end
    for (int k = 0; k < 3; k++)
      for (int c = 1; c <= 7; c++) begin
        check(seen[10*(k+1) + c], $sformatf("count %0d produced", 10*(k+1) + c));
        check(rotated_seen[10*(k+1) + c], $sformatf("count %0d at several rotations", 10*(k+1) + c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
