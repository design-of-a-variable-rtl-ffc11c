// shift_rows: the ShiftRows unit of the AES block.
//
// Row r of the 4x4 state is rotated left by r byte positions. With the
// state stored column by column (byte 4*c+r at bits [127-8*(4*c+r) -: 8]),
// output byte (r, c) is input byte (r, (c+r) mod 4). This is pure wiring.
module shift_rows (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end
endmodule
