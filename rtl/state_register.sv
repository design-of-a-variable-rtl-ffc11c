// state_register: the 128-bit state register of the processor.
//
// Captures the incoming data block when load is high (start of an
// encryption) and otherwise the output of the AES block whenever that block
// asserts its write strobe, so it holds the intermediate state between
// sub-operations and the ciphertext at the end. load has priority. Rising
// edge, active-low asynchronous reset to zero (this design's choice).
module state_register (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] data_in,
  input  logic         we,
  input  logic [127:0] d,
  output logic [127:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= data_in;
    else if (we)   q <= d;
  end
endmodule
