// header_gen: the header generation unit ("N-marker counter").
//
// Every encrypted block is preceded by a 40-bit header whose number of ones
// tells the receiver the key length: 11..17 ones for AES-128, 21..27 for
// AES-192 and 31..37 for AES-256. The exact count and the positions of the
// ones are random, so the header does not show the key length at a glance.
//
// How it works: b1b0 from the main random number generator select a row of
// LUT1 and the 3-bit state Q of a local random number generator (1..7,
// never 0) selects a column; LUT1 gives the number of ones, 10*(row+1)+Q.
// The same row/column address picks one of the 21 rows of a 21 x 40 pattern
// memory; row (k, q) holds a 40-bit word with exactly LUT1[k][q] ones,
// spread evenly (bit i is set when floor((i+1)*n/40) != floor(i*n/40)). The
// word is then rotated left by a free-running 0..39 counter, which moves the
// ones without changing their number.
//
// Follows the design: the 40-bit header, the count ranges of each key
// length, LUT1 addressed by b0/b1 and the three local bits, the 21 x 40
// memory and the rotation. This design's choices: the ranges 11..17, 21..27
// and 31..37 (seven counts each, one per local state), the pattern formula,
// the rotation counter and the one-cycle handshake. A plain (non-circular)
// shift is not used because it would change the number of ones.
//
// Timing: on gen (one cycle), header and ones are registered and valid is
// high from the next cycle until the next gen. keylen code 2'b11 is not
// valid and is treated as AES-256.
module header_gen
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gen,
  input  logic             b0,
  input  logic             b1,
  output logic [HDR_W-1:0] header,
  output logic [5:0]       ones,     // number of ones placed in the header
  output logic             valid
);
  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 7;

  typedef logic [5:0]       lut1_t [ROWS*COLS];
  typedef logic [HDR_W-1:0] pat_t  [ROWS*COLS];

  function automatic lut1_t build_lut1();
    lut1_t t;
    for (int k = 0; k < ROWS; k++)
      for (int c = 0; c < COLS; c++)
        t[k*COLS + c] = 6'(10*(k+1) + c + 1);
    return t;
  endfunction

  function automatic pat_t build_pat();
    pat_t             p;
    logic [HDR_W-1:0] word;
    int               n;
    for (int k = 0; k < ROWS; k++)
      for (int c = 0; c < COLS; c++) begin
        n = 10*(k+1) + c + 1;
        for (int i = 0; i < HDR_W; i++)
          word[i] = (((i+1)*n) / HDR_W) != ((i*n) / HDR_W);
        p[k*COLS + c] = word;
      end
    return p;
  endfunction

  localparam lut1_t LUT1 = build_lut1();
  localparam pat_t  PAT  = build_pat();

  // Local random number generator, Q0..Q2.
  logic [2:0] q;
  logic       q_b0, q_b1;
  lfsr #(.WIDTH(3), .TAPS(3'b011), .SEED(3'b101)) u_local_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .q(q), .b0(q_b0), .b1(q_b1)
  );

  // Free-running rotation amount 0..39.
  logic [5:0] rot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     rot <= '0;
    else if (rot == 6'(HDR_W - 1))  rot <= '0;
    else                            rot <= rot + 6'd1;
  end

  logic [1:0]         row;
  logic [2:0]         col;
  logic [HDR_W-1:0]   pat;
  logic [2*HDR_W-1:0] dbl;
  logic [HDR_W-1:0]   rotated;

  assign row     = ({b1, b0} == 2'b11) ? 2'd2 : {b1, b0};
  assign col     = (q == 3'd0) ? 3'd0 : q - 3'd1;   // q is never 0
  logic [4:0]         addr;
  assign addr    = 5'(row) * 5'(COLS) + 5'(col);
  assign pat     = PAT[addr];
  assign dbl     = {pat, pat};
  assign rotated = dbl[7'(2*HDR_W-1) - 7'(rot) -: HDR_W];   // rotate left by rot

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      header <= '0;
      ones   <= '0;
      valid  <= 1'b0;
    end else if (gen) begin
      header <= rotated;
      ones   <= LUT1[addr];
      valid  <= 1'b1;
    end
  end
endmodule
