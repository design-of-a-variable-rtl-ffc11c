// aes_pkg: types, constants and functions shared by the variable key length
// AES encryption processor.
//
// The processor encrypts one 128-bit block with AES-128, AES-192 or AES-256,
// the key length being drawn at random for every block. This package holds
// the key-length encoding, the control word read from the sequencing look-up
// table, the GF(2^8) helpers and the S-box table. The S-box is computed here
// from its definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the FIPS-197 affine map) rather than typed in,
// so every instance is a 256-entry ROM built at elaboration time.
//
// Byte order: a 128-bit block is written big-endian, byte 0 in bits
// [127:120], and bytes fill the 4x4 state column by column, as in FIPS-197.
package aes_pkg;

  // Key length selected for one block. The encoding is this design's own.
  typedef enum logic [1:0] {
    KL_128 = 2'd0,
    KL_192 = 2'd1,
    KL_256 = 2'd2
  } keylen_e;

  // Maximum key words and number of rounds (AES-256).
  localparam int unsigned NK_MAX     = 8;
  localparam int unsigned NR_MAX     = 14;
  localparam int unsigned NW_MAX     = 4 * (NR_MAX + 1);   // 60 expanded key words
  // Control words per key length: key load, initial AddRoundKey, 4 per middle
  // round, 3 in the last round -> 4*Nr+1 (41, 49, 57).
  localparam int unsigned STEPS_MAX  = 4 * NR_MAX + 1;
  localparam int unsigned STEP_W     = 6;                   // indexes 0..63
  localparam int unsigned HDR_W      = 40;                  // header length

  // One entry of the sequencing look-up table: one bit per AES unit, a
  // key-register load strobe, the round whose key is loaded and an end mark.
  typedef struct packed {
    logic       en_sub;     // ByteSub
    logic       en_shift;   // ShiftRows
    logic       en_mix;     // MixColumns
    logic       en_ark;     // AddRoundKey
    logic       kld;        // load key register with round key `round`
    logic [3:0] round;      // round number 0..14
    logic       last;       // last control word of the program
  } ctrl_t;

  function automatic int unsigned nk_of(keylen_e kl);
    case (kl)
      KL_192:  return 6;
      KL_256:  return 8;
      default: return 4;
    endcase
  endfunction

  function automatic int unsigned nr_of(keylen_e kl);
    return nk_of(kl) + 6;
  endfunction

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Full S-box table. Inverses come from a log/antilog table with
  // generator 0x03; 0 maps to 0 before the affine map.
  typedef logic [7:0] sbox_t [256];

  function automatic sbox_t make_sbox();
    sbox_t        tbl;
    logic [7:0]   alog [256];
    logic [7:0]   lg   [256];
    logic [7:0]   p, inv, s;
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      alog[i] = p;
      p = p ^ xtime(p);           // p *= 3
    end
    for (int i = 0; i < 256; i++) lg[i] = 8'h00;
    for (int i = 0; i < 255; i++) lg[alog[i]] = 8'(i);
    for (int i = 0; i < 256; i++) begin
      if (i == 0) inv = 8'h00;
      else        inv = alog[(255 - int'(lg[i])) % 255];
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
              ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      tbl[i] = s;
    end
    return tbl;
  endfunction

endpackage
