// sequencer: the sequencer and timing/control unit.
//
// It runs one encryption from start to the output of header and cipher
// text. The order of the AES sub-operations is not coded here: it is read,
// one control word per machine cycle, from the look-up table (seq_lut), and
// the word's enable bits are routed to the AES units and its key-load strobe
// to the key register. The unit itself only sequences the phases around
// that program:
//   IDLE   wait for start; the data block is loaded into the state register
//   DRAW   read b1b0 from the random number generator and step it; the
//          code 2'b11 names no key length, so it is redrawn next cycle
//          (the 3-bit generator shows 11 at most twice in a row);
//          otherwise the key length is latched (00: 128, 01: 192, 10: 256),
//          the key scheduler is started and the header unit generates
//   KEYEXP wait for the key scheduler to finish
//   RUN    step through the look-up table program until its last word
//   HDR    send the header to Data out
//   CT     send the cipher text to Data out, pulse done
// busy is high from start until done. The split into phases, the redraw of
// 2'b11 and the key-length encoding are this design's choices; reading
// control words from a ROM, drawing the key length at random, expanding the
// key before use and appending the header follow the design.
module sequencer
  import aes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // random number generator
  input  logic              b0,
  input  logic              b1,
  output logic              rng_en,
  // look-up table
  output keylen_e           keylen,
  output logic [STEP_W-1:0] step,
  input  ctrl_t             ctrl,
  // key scheduler and key register
  output logic              ks_start,
  output keylen_e           ks_keylen,   // key length for ks_start
  input  logic              ks_done,
  output logic              key_load,
  output logic [3:0]        key_round,
  // state register and AES block
  output logic              state_load,
  output logic              en_sub,
  output logic              en_shift,
  output logic              en_mix,
  output logic              en_ark,
  // header unit and output multiplexer
  output logic              hdr_gen,
  output logic              sel_hdr,
  output logic              sel_ct,
  output logic              busy,
  output logic              done
);
  typedef enum logic [2:0] {S_IDLE, S_DRAW, S_KEYEXP, S_RUN, S_HDR, S_CT} state_e;
  state_e st;

  logic draw_ok;
  assign draw_ok = ({b1, b0} != 2'b11);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      keylen <= KL_128;
      step   <= '0;
    end else begin
      unique case (st)
        S_IDLE:   if (start) st <= S_DRAW;
        S_DRAW:   if (draw_ok) begin
                    keylen <= keylen_e'({b1, b0});
                    st     <= S_KEYEXP;
                  end
        S_KEYEXP: if (ks_done) begin
                    step <= '0;
                    st   <= S_RUN;
                  end
        S_RUN:    if (ctrl.last) st <= S_HDR;
                  else           step <= step + 1'b1;
        S_HDR:    st <= S_CT;
        S_CT:     st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rng_en     = (st == S_DRAW);
    ks_start   = (st == S_DRAW) && draw_ok;
    ks_keylen  = keylen_e'({b1, b0});
    hdr_gen    = (st == S_DRAW) && draw_ok;
    state_load = (st == S_IDLE) && start;
    en_sub     = (st == S_RUN) && ctrl.en_sub;
    en_shift   = (st == S_RUN) && ctrl.en_shift;
    en_mix     = (st == S_RUN) && ctrl.en_mix;
    en_ark     = (st == S_RUN) && ctrl.en_ark;
    key_load   = (st == S_RUN) && ctrl.kld;
    key_round  = ctrl.round;
    sel_hdr    = (st == S_HDR);
    sel_ct     = (st == S_CT);
    busy       = (st != S_IDLE);
    done       = (st == S_CT);
  end
endmodule
