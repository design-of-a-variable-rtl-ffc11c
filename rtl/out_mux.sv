// out_mux: the Data out multiplexer.
//
// The encrypted data leave the processor as a header followed by the cipher
// text, over one 128-bit output. In the cycle after sel_hdr the 40-bit
// header appears in the low bits of data_out (upper bits zero) with
// out_valid and out_is_hdr high; in the cycle after sel_ct the 128-bit
// cipher text appears with out_valid high. The output is registered.
// Sending the header first on a shared bus is this design's choice.
module out_mux
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel_hdr,
  input  logic             sel_ct,
  input  logic [HDR_W-1:0] header,
  input  logic [127:0]     cipher,
  output logic [127:0]     data_out,
  output logic             out_valid,
  output logic             out_is_hdr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out   <= '0;
      out_valid  <= 1'b0;
      out_is_hdr <= 1'b0;
    end else begin
      out_valid  <= sel_hdr | sel_ct;
      out_is_hdr <= sel_hdr;
      if (sel_hdr)     data_out <= {{(128-HDR_W){1'b0}}, header};
      else if (sel_ct) data_out <= cipher;
    end
  end

  a_one_sel: assert property (@(posedge clk) disable iff (!rst_n) !(sel_hdr && sel_ct))
    else $error("out_mux: header and cipher selected together");
endmodule
