// von_neumann: Von Neumann corrector that removes bias from the raw bits.
//
// Raw bits are taken in non-overlapping pairs. A pair 00 or 11 is discarded;
// for 01 or 10 the first bit is output and the second dropped. For
// independent input bits with any fixed bias the output is unbiased, at an
// average of one output bit per four input bits (128 out of 512). This
// follows the source design. clr forgets a half-collected pair.
//
// Interface: clk, rst_n (synchronous, active low), clr, din/din_valid ->
// dout/dout_valid. Timing: outputs are registered; dout_valid is high for the
// one clock that follows the edge taking the second bit of a differing pair.
`timescale 1ps/1ps
module von_neumann (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic din,
  input  logic din_valid,
  output logic dout,
  output logic dout_valid
);
  logic have_first;  // first bit of the current pair is held
  logic first;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      have_first <= 1'b0;
      first      <= 1'b0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (din_valid) begin
        if (!have_first) begin
          first      <= din;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          if (din != first) begin
            dout       <= first;
            dout_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
