// sbox: the AES substitution box as a 256 x 8 read-only memory.
//
// ByteSub is a "memory fetch": each state byte addresses a 256-entry table.
// The table is filled at elaboration from aes_pkg::make_sbox(), which derives
// it from the GF(2^8) inverse and the affine map, so no table is typed in.
// Purely combinational: out follows in within the same cycle.
module sbox (
  input  logic [7:0] in,
  output logic [7:0] out
);
  import aes_pkg::*;

  localparam sbox_t ROM = make_sbox();

  assign out = ROM[in];
endmodule
