// tb_aes_block: self-checking testbench for the AES transformation block.
//
// For random states and keys, each of the four enables in turn must give
// the reference result of its transformation with the write strobe high;
// with no enable the strobe must be low.
module tb_aes_block;
  import aes_ref_pkg::*;
  logic         clk = 0;
  logic         en_sub = 0, en_shift = 0, en_mix = 0, en_ark = 0, state_we;
  logic [127:0] state_in = '0, round_key = '0, state_out, exp;
  int checks = 0, failures = 0;

  aes_block dut (.clk, .en_sub, .en_shift, .en_mix, .en_ark, .state_in, .round_key,
                 .state_out, .state_we);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s out=%h exp=%h", what, state_out, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      state_in  = rand128();
      round_key = rand128();
      {en_sub, en_shift, en_mix, en_ark} = 4'b0000;
      #1 check(!state_we, "no unit enabled");
      for (int u = 0; u < 4; u++) begin
        {en_sub, en_shift, en_mix, en_ark} = 4'b1000 >> u;
        case (u)
          0: exp = ref_sub_bytes(state_in);
          1: exp = ref_shift_rows(state_in);
          2: exp = ref_mix_columns(state_in);
          default: exp = state_in ^ round_key;
        endcase
        #1 check(state_we && state_out == exp, $sformatf("unit %0d", u));
      end
      {en_sub, en_shift, en_mix, en_ark} = 4'b0000;
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
