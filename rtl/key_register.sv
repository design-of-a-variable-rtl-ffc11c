// key_register: holds the round key used by AddRoundKey.
//
// When the sequencer's control word carries a key-load strobe (kld), the
// register captures the round key that the key scheduler presents for that
// round; otherwise it keeps its value. The loaded round number is kept too,
// so the controller and a test can see which key is in place. Loaded on the
// rising clock edge; cleared by the active-low reset (the reset value is
// this design's choice).
module key_register (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [3:0]   round_in,
  input  logic [127:0] key_in,
  output logic [127:0] key_out,
  output logic [3:0]   round_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_out   <= '0;
      round_out <= '0;
    end else if (load) begin
      key_out   <= key_in;
      round_out <= round_in;
    end
  end
endmodule
