// aes_block: the AES transformation block.
//
// Holds the four independent units of one Rijndael round: ByteSub,
// ShiftRows, MixColumns and AddRoundKey. All four see the current state;
// the sequencer enables one of them per machine cycle and this block passes
// that unit's result to the state register with a write strobe. With no
// unit enabled the write strobe is low and the state is kept. Enabling more
// than one unit at a time is a control error and is flagged by an
// assertion. Combinational; the state register closes the loop.
module aes_block
  import aes_pkg::*;
(
  input  logic         clk,         // only used by the assertion
  input  logic         en_sub,
  input  logic         en_shift,
  input  logic         en_mix,
  input  logic         en_ark,
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out,
  output logic         state_we
);
  logic [127:0] sub_q, shift_q, mix_q, ark_q;

  byte_sub      u_byte_sub   (.state_in(state_in), .state_out(sub_q));
  shift_rows    u_shift_rows (.state_in(state_in), .state_out(shift_q));
  mix_columns   u_mix_cols   (.state_in(state_in), .state_out(mix_q));
  add_round_key u_add_key    (.state_in(state_in), .round_key(round_key), .state_out(ark_q));

  always_comb begin
    unique case (1'b1)
      en_sub:   state_out = sub_q;
      en_shift: state_out = shift_q;
      en_mix:   state_out = mix_q;
      en_ark:   state_out = ark_q;
      default:  state_out = state_in;
    endcase
  end

  assign state_we = en_sub | en_shift | en_mix | en_ark;

  a_one_unit: assert property (@(posedge clk) $onehot0({en_sub, en_shift, en_mix, en_ark}))
    else $error("aes_block: more than one unit enabled");
endmodule
