// byte_sub: the ByteSub (SubBytes) unit of the AES block.
//
// All 16 bytes of the 128-bit state are replaced in parallel through 16
// S-box ROMs, so the transformation is a single memory fetch per byte, as the
// design describes it. Combinational; the state register captures the result
// on the clock edge of the cycle in which the sequencer enables this unit.
module byte_sub (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    sbox u_sbox (.in(state_in[8*i +: 8]), .out(state_out[8*i +: 8]));
  end
endmodule
