// byte_shift_reg: collects the selected random bit stream into bytes.
//
// Each valid input bit is shifted in at bit 0 and the register moves left, so
// the first bit of a byte ends up in bit W-1. The edge that takes the W-th
// bit registers the full byte on byte_o with byte_valid high for one clock,
// and collection of the next byte starts at once (no lost bits). clr
// drops a partial byte. The 8-bit shift register follows the source design;
// the bit order is this design's choice.
//
// Interface: clk, rst_n (synchronous, active low), clr, din/din_valid ->
// byte_o/byte_valid.
`timescale 1ps/1ps
module byte_shift_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         din,
  input  logic         din_valid,
  output logic [W-1:0] byte_o,
  output logic         byte_valid
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-2:0]  sr;  // the first W-1 bits of the byte being collected
  logic [CW-1:0] nbits;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      sr         <= '0;
      nbits      <= '0;
      byte_o     <= '0;
      byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (din_valid) begin
        sr <= {sr[W-3:0], din};
        if (nbits == CW'(W - 1)) begin
          byte_o     <= {sr, din};
          byte_valid <= 1'b1;
          nbits      <= '0;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end
endmodule
