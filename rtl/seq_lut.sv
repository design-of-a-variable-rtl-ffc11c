// seq_lut: the look-up table that holds the encryption program.
//
// The processor is driven by control words read from a ROM instead of a
// state machine: each entry is the bit pattern that enables one of the four
// AES units for one machine cycle. The key length picks one of three programs
// and the step counter of the sequencer picks the entry within it.
//
// The ROM is filled at elaboration by build_rom(). For Nr rounds
// (10, 12, 14) the program is:
//   step 0                 load key register with round key 0
//   step 1                 AddRoundKey
//   rounds 1..Nr-1         ByteSub (+ load round key r), ShiftRows,
//                          MixColumns, AddRoundKey
//   round Nr               ByteSub (+ load round key Nr), ShiftRows,
//                          AddRoundKey, marked last
// giving 4*Nr+1 words (41, 49, 57). The ordering of the four operations is
// AES's; the word format and the key-load slot are this design's choices.
// Combinational read.
module seq_lut
  import aes_pkg::*;
(
  input  keylen_e           keylen,
  input  logic [STEP_W-1:0] step,
  output ctrl_t             ctrl
);
  localparam int unsigned DEPTH = 2**STEP_W;
  typedef logic [$bits(ctrl_t)-1:0] rom_t [3*DEPTH];

  function automatic rom_t build_rom();
    rom_t   rom;
    int     nr, s;
    ctrl_t  w;
    for (int i = 0; i < 3*DEPTH; i++) rom[i] = '0;
    for (int k = 0; k < 3; k++) begin
      nr = 10 + 2*k;
      s  = k*DEPTH;
      w = '0; w.kld = 1'b1; w.round = 4'd0;
      rom[s] = w; s = s + 1;
      w = '0; w.en_ark = 1'b1; w.round = 4'd0;
      rom[s] = w; s = s + 1;
      for (int r = 1; r <= nr; r++) begin
        w = '0; w.en_sub = 1'b1; w.kld = 1'b1; w.round = 4'(r);
        rom[s] = w; s = s + 1;
        w = '0; w.en_shift = 1'b1; w.round = 4'(r);
        rom[s] = w; s = s + 1;
        if (r != nr) begin
          w = '0; w.en_mix = 1'b1; w.round = 4'(r);
          rom[s] = w; s = s + 1;
        end
        w = '0; w.en_ark = 1'b1; w.round = 4'(r); w.last = (r == nr);
        rom[s] = w; s = s + 1;
      end
    end
    return rom;
  endfunction

  localparam rom_t ROM = build_rom();

  // The longest program (AES-256) must fit in one slot.
  initial assert (STEPS_MAX <= DEPTH) else $error("seq_lut: program longer than its slot");

  always_comb begin
    if (keylen == KL_128 || keylen == KL_192 || keylen == KL_256)
      ctrl = ctrl_t'(ROM[{keylen, step}]);
    else
      ctrl = '0;
  end
endmodule
