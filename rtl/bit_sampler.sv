// bit_sampler: samples the asynchronous XOR-tree output into raw random bits.
//
// On each clock with tick high the first flip-flop captures din, the XOR of
// all rings. Because din is asynchronous this flip-flop may go metastable; a
// second flip-flop gives it a full clock period to settle before the bit is
// used. bit_o/valid_o therefore show the sample taken at a clock edge with
// tick high one clock later (two edges counting the sampling edge), one valid
// bit per tick. Sampling the XOR output with the system clock
// follows the source design; the second flip-flop is this design's choice.
//
// Interface: clk, rst_n (synchronous, active low), tick, din -> bit_o, valid_o.
`timescale 1ps/1ps
module bit_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic din,
  output logic bit_o,
  output logic valid_o
);
  logic s1, v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1      <= 1'b0;
      v1      <= 1'b0;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      if (tick) s1 <= din;
      v1      <= tick;
      bit_o   <= s1;
      valid_o <= v1;
    end
  end
endmodule
