// sample_divider: clock-enable divider for the sampling rate.
//
// When the system clock is faster than the wanted sampling frequency, tick
// goes high on one clock out of every DIV while en is high; with DIV = 1 (the
// default, a 24 MHz system clock sampling at 24 MHz) tick simply equals en.
// The divider is suggested by the source design; making it a clock enable
// rather than a divided clock is this design's choice. The count restarts
// whenever en is low, so the first tick comes DIV clocks after en rises
// (on the same clock for DIV = 1).
//
// Interface: clk, rst_n (synchronous, active low), en -> tick.
`timescale 1ps/1ps
module sample_divider #(
  parameter int unsigned DIV = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) cnt <= '0;
    else if (cnt == CW'(DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign tick = en && (cnt == CW'(DIV - 1));
endmodule
