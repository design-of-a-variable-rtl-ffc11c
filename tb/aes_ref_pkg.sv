// aes_ref_pkg: a reference model of AES encryption for the testbenches.
//
// Written independently of the RTL: the S-box is computed by raising each
// byte to the power 254 with a shift-and-add GF(2^8) multiplier (which gives
// the inverse), the state is a flat array of 16 bytes, and the key schedule
// is computed in full from the FIPS-197 recurrence with Rcon kept as a table
// of powers of two. Blocks are big-endian 128-bit vectors, byte 0 in
// [127:120]; a key is a 256-bit vector whose leftmost Nk words are used.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] r = 8'h01;
    logic [7:0] y;
    for (int i = 0; i < 254; i++) r = gmul(r, x);      // x^254 = x^-1
    if (x == 8'h00) r = 8'h00;
    y = 8'h63;
    for (int i = 0; i < 8; i++)
      y[i] = y[i] ^ r[i] ^ r[(i+4)%8] ^ r[(i+5)%8] ^ r[(i+6)%8] ^ r[(i+7)%8];
    return y;
  endfunction

  typedef logic [7:0] blk_t [16];

  function automatic blk_t to_bytes(logic [127:0] v);
    blk_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(blk_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v);
    blk_t b = to_bytes(v);
    for (int i = 0; i < 16; i++) b[i] = ref_sbox(b[i]);
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v);
    blk_t a = to_bytes(v);
    blk_t b;
    for (int i = 0; i < 16; i++) b[i] = a[(i + 4*(i%4)) % 16];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v);
    blk_t a = to_bytes(v);
    blk_t b;
    for (int c = 0; c < 4; c++) begin
      b[4*c+0] = gmul(a[4*c+0], 2) ^ gmul(a[4*c+1], 3) ^ a[4*c+2] ^ a[4*c+3];
      b[4*c+1] = a[4*c+0] ^ gmul(a[4*c+1], 2) ^ gmul(a[4*c+2], 3) ^ a[4*c+3];
      b[4*c+2] = a[4*c+0] ^ a[4*c+1] ^ gmul(a[4*c+2], 2) ^ gmul(a[4*c+3], 3);
      b[4*c+3] = gmul(a[4*c+0], 3) ^ a[4*c+1] ^ a[4*c+2] ^ gmul(a[4*c+3], 2);
    end
    return from_bytes(b);
  endfunction

  typedef logic [31:0] words_t [60];

  // Expanded key for nk = 4, 6 or 8.
  function automatic words_t ref_expand(logic [255:0] key, int nk);
    words_t w;
    logic [31:0] t;
    logic [7:0]  rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                             8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    int total = 4 * (nk + 7);
    for (int i = 0; i < 60; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < total; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc[i/nk - 1];
      end else if (nk > 6 && i % nk == 4) begin
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] ref_round_key(words_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [255:0] key, int nk);
    words_t w = ref_expand(key, nk);
    int nr = nk + 6;
    logic [127:0] s = pt ^ ref_round_key(w, 0);
    for (int r = 1; r <= nr; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != nr) s = ref_mix_columns(s);
      s = s ^ ref_round_key(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

  function automatic int popcount40(logic [39:0] h);
    int n = 0;
    for (int i = 0; i < 40; i++) n += int'(h[i]);
    return n;
  endfunction

endpackage
