// tb_out_mux: self-checking testbench for the Data out multiplexer.
//
// Sends header-then-cipher pairs with idle gaps and checks data_out,
// out_valid and out_is_hdr one cycle after each select.
module tb_out_mux;
  import aes_ref_pkg::*;
  logic         clk = 0, rst_n = 0, sel_hdr = 0, sel_ct = 0;
  logic [39:0]  header = '0;
  logic [127:0] cipher = '0, data_out;
  logic         out_valid, out_is_hdr;
  int checks = 0, failures = 0;

  out_mux dut (.clk, .rst_n, .sel_hdr, .sel_ct, .header, .cipher, .data_out, .out_valid,
               .out_is_hdr);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s data=%h v=%b h=%b", what, data_out, out_valid, out_is_hdr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(!out_valid, "reset");
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      automatic logic [39:0]  h = 40'(rand128());
      automatic logic [127:0] c = rand128();
      @(negedge clk);
      header = h; cipher = c; sel_hdr = 1;
      @(negedge clk);
      check(out_valid && out_is_hdr && data_out == {88'h0, h}, "header beat");
      sel_hdr = 0; sel_ct = 1; header = ~h;
      @(negedge clk);
      check(out_valid && !out_is_hdr && data_out == c, "cipher beat");
      sel_ct = 0;
      repeat ($urandom % 3) begin
        @(negedge clk);
        check(!out_valid, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
