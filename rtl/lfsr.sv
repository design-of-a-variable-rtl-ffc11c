// lfsr: the pseudo-noise (random number) generator.
//
// A Fibonacci linear feedback shift register. Every enabled clock all bits
// move one place to the right and the new left-most bit is the XOR of the
// tapped bits; the right-most bit is the serial output. The design uses a
// 3-bit register whose two low bits, b0 and b1, choose the key length of the
// next block. The same module, with another seed, is the local generator of
// the header unit (outputs Q0..Q2).
//
// The 3-bit width, the XOR feedback and the enable/clock/clear inputs with
// b0/b1 outputs follow the design. The tap mask (bits 0 and 1, a maximal
// length register with period 7), the seed, the rising clock edge and the
// active-low asynchronous clear are this implementation's choices.
//
// Timing: q changes on the rising edge of clk when en is high; b0/b1 are
// q[0]/q[1] and so follow q directly.
module lfsr #(
  parameter int unsigned          WIDTH = 3,
  parameter logic [WIDTH-1:0]     TAPS  = 3'b011,
  parameter logic [WIDTH-1:0]     SEED  = 3'b001
) (
  input  logic             clk,
  input  logic             rst_n,   // clear, active low, asynchronous
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             b0,
  output logic             b1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {^(q & TAPS), q[WIDTH-1:1]};
  end

  assign b0 = q[0];
  assign b1 = q[1];

  // A zero seed would lock the register at zero.
  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
endmodule
