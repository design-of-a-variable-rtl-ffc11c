// add_round_key: the AddRoundKey (key addition layer) unit of the AES block.
//
// A bitwise XOR of the 128-bit round key, taken from the key register, into
// the state. Combinational.
module add_round_key (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out
);
  assign state_out = state_in ^ round_key;
endmodule
