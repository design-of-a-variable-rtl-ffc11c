// key_scheduler: AES key expansion for 128-, 192- and 256-bit cipher keys.
//
// From the Nk = key length / 32 words of the cipher key it builds the
// 4*(Nr+1) words of the expanded key (44, 52 or 60), one word per clock,
// and keeps them in a 60 x 32-bit register file. The usual recurrence is
// used: w[i] = w[i-Nk] ^ temp, where temp is SubWord(RotWord(w[i-1])) ^ Rcon
// when i mod Nk = 0, SubWord(w[i-1]) when Nk = 8 and i mod Nk = 4, and
// w[i-1] otherwise. SubWord uses four S-box ROMs, the same table as the
// ByteSub unit. i mod Nk is kept as a wrapping counter and Rcon as a byte
// that is doubled in GF(2^8) after each use, so no divider is needed.
//
// Interface: key_in holds up to eight words, word 0 in bits [255:224]; a
// shorter key uses the leftmost Nk words. start (one cycle, while idle)
// captures key_in and keylen. busy stays high during expansion and done
// pulses for one cycle after the last word is written, 4*(Nr+1)-Nk cycles
// after start (40, 46 or 52). rd_key is the round key rd_round
// (words 4r..4r+3), read combinationally.
//
// Expanding the whole key ahead of encryption, word-serially, is this
// design's choice; the design only asks for a key scheduler that feeds the
// key register.
module key_scheduler
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  keylen_e      keylen,
  input  logic [255:0] key_in,
  output logic         busy,
  output logic         done,
  input  logic [3:0]   rd_round,
  output logic [127:0] rd_key
);
  logic [31:0] w [NW_MAX];
  logic [5:0]  idx;        // index of the word being produced
  logic [2:0]  imod;       // idx mod Nk
  logic [7:0]  rcon;
  logic [3:0]  nk;
  logic [5:0]  nw;         // 4*(Nr+1)

  logic [31:0] prev, far, sub_in, sub_out, temp, new_w;

  assign prev = w[idx - 6'd1];
  assign far  = w[idx - 6'(nk)];

  // RotWord before SubWord at i mod Nk == 0.
  assign sub_in = (imod == 3'd0) ? {prev[23:0], prev[31:24]} : prev;

  for (genvar b = 0; b < 4; b++) begin : g_sub
    sbox u_sbox (.in(sub_in[8*b +: 8]), .out(sub_out[8*b +: 8]));
  end

  always_comb begin
    if (imod == 3'd0)                        temp = sub_out ^ {rcon, 24'h0};
    else if (nk == 4'd8 && imod == 3'd4)     temp = sub_out;
    else                                     temp = prev;
    new_w = far ^ temp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      idx  <= '0;
      imod <= '0;
      rcon <= 8'h01;
      nk   <= 4'd4;
      nw   <= 6'd44;
      for (int i = 0; i < NW_MAX; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        for (int i = 0; i < NK_MAX; i++) w[i] <= key_in[255 - 32*i -: 32];
        nk   <= 4'(nk_of(keylen));
        nw   <= 6'(4 * (nr_of(keylen) + 1));
        idx  <= 6'(nk_of(keylen));
        imod <= '0;
        rcon <= 8'h01;
        busy <= 1'b1;
      end else if (busy) begin
        w[idx] <= new_w;
        if (imod == 3'd0) rcon <= xtime(rcon);
        imod <= (imod == 3'(nk - 4'd1)) ? 3'd0 : imod + 3'd1;
        idx  <= idx + 6'd1;
        if (idx == nw - 6'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++) rd_key[127 - 32*j -: 32] = w[6'(4 * rd_round) + 6'(j)];
  end
endmodule
