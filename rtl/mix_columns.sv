// mix_columns: the MixColumns unit of the AES block.
//
// Each column (a0..a3) is multiplied by the fixed polynomial
// {03}x^3 + {01}x^2 + {01}x + {02} in GF(2^8). The product is formed with
// the xtime (multiply-by-{02}) reduction only: b_r = 2*a_r ^ 3*a_{r+1} ^
// a_{r+2} ^ a_{r+3}, and 3*a = 2*a ^ a. No general GF multiplier is needed
// because the matrix holds only 1, 2 and 3. Combinational, one cycle.
module mix_columns (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);
  import aes_pkg::*;

  always_comb begin
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 8*(4*c + r) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] =
            xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
