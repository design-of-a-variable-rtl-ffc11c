// crypto_processor: variable key length AES encryption processor (top).
//
// Encrypts one 128-bit block per start with AES-128, AES-192 or AES-256,
// the key length being chosen at random for every block by a 3-bit
// pseudo-noise generator, and sends a 40-bit header, whose number of ones
// encodes the key length, ahead of the cipher text.
//
// Blocks and connections (as in the block diagram of the design):
//   random number generator -> sequencer (key length) and header unit
//   look-up table <-> sequencer & timing/control unit
//   sequencer -> AES block (unit enables), key register (load), header unit
//   Key In -> key scheduler -> key register -> AES block
//   Data In -> state register <-> AES block
//   header unit and AES block (state) -> Data out multiplexer -> Data out
//
// Interface: present data_in and key_in (eight words, word 0 in
// [255:224]; AES-128 uses the leftmost four, AES-192 the leftmost six) and
// pulse start while busy is low. data_in is captured with start, key_in
// when the key length has been drawn (one or two cycles later); both must
// be held until then. keylen is valid from the end of the draw to the next
// start. Data out then carries the header (out_is_hdr high, 40 bits in
// [39:0]) and, one cycle later, the cipher text, each with out_valid.
//
// Latency from start to the cipher text on data_out, for D draw cycles
// (1 to 3, as the 3-bit generator can show code 11 twice in a row):
// 1 + D + (4*(Nr+1)-Nk) + 1 + (4*Nr+1) + 2, that is 85+D, 99+D and 113+D
// cycles for AES-128, -192 and -256; the header comes one cycle earlier.
// A new start is accepted the cycle after done.
module crypto_processor
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [127:0]     data_in,
  input  logic [255:0]     key_in,
  output logic [127:0]     data_out,
  output logic             out_valid,
  output logic             out_is_hdr,
  output logic             busy,
  output logic             done,
  output keylen_e          keylen,
  output logic [5:0]       hdr_ones
);
  // random number generator
  logic       rng_en, b0, b1;
  logic [2:0] rng_q;
  // sequencer / look-up table
  logic [STEP_W-1:0] step;
  ctrl_t             ctrl;
  // key path
  keylen_e      ks_keylen;
  logic         ks_start, ks_done, ks_busy, key_load;
  logic [3:0]   key_round, key_round_q;
  logic [127:0] rd_key, round_key;
  // data path
  logic         state_load, en_sub, en_shift, en_mix, en_ark, state_we;
  logic [127:0] state_q, state_d;
  // header and output
  logic             hdr_gen, hdr_valid, sel_hdr, sel_ct;
  logic [HDR_W-1:0] header;

  lfsr #(.WIDTH(3), .TAPS(3'b011), .SEED(3'b001)) u_rng (
    .clk, .rst_n, .en(rng_en), .q(rng_q), .b0, .b1
  );

  seq_lut u_lut (.keylen, .step, .ctrl);

  sequencer u_seq (
    .clk, .rst_n, .start, .b0, .b1, .rng_en, .keylen, .step, .ctrl,
    .ks_start, .ks_keylen, .ks_done, .key_load, .key_round, .state_load,
    .en_sub, .en_shift, .en_mix, .en_ark, .hdr_gen, .sel_hdr, .sel_ct,
    .busy, .done
  );

  key_scheduler u_ks (
    .clk, .rst_n, .start(ks_start), .keylen(ks_keylen), .key_in, .busy(ks_busy),
    .done(ks_done), .rd_round(key_round), .rd_key
  );

  key_register u_key_reg (
    .clk, .rst_n, .load(key_load), .round_in(key_round), .key_in(rd_key),
    .key_out(round_key), .round_out(key_round_q)
  );

  state_register u_state (
    .clk, .rst_n, .load(state_load), .data_in, .we(state_we), .d(state_d),
    .q(state_q)
  );

  aes_block u_aes (
    .clk, .en_sub, .en_shift, .en_mix, .en_ark, .state_in(state_q),
    .round_key, .state_out(state_d), .state_we
  );

  header_gen u_hdr (
    .clk, .rst_n, .gen(hdr_gen), .b0, .b1, .header, .ones(hdr_ones),
    .valid(hdr_valid)
  );

  out_mux u_out (
    .clk, .rst_n, .sel_hdr, .sel_ct, .header, .cipher(state_q), .data_out,
    .out_valid, .out_is_hdr
  );

  // The key register must hold the key of the round being added.
  a_key_round: assert property (@(posedge clk) disable iff (!rst_n)
                                en_ark |-> key_round_q == ctrl.round)
    else $error("crypto_processor: AddRoundKey with the key of another round");
  a_hdr_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                sel_hdr |-> hdr_valid && !ks_busy)
    else $error("crypto_processor: header not ready");
endmodule
