// pdl_inverter: behavioural model (not synthesizable) of a programmable delay
// line built from one 4-input LUT.
//
// The LUT is configured so that its output O is always the inverse of input A1.
// The other three inputs A2..A4 do not change the logic value, but they select
// which path through the LUT's internal multiplexer tree the A1 signal travels,
// so they set the delay: shortest for A2A3A4 = 000, longest for 111 (8 levels).
// That behaviour follows the source design. The numbers are this model's own:
// delay = BASE_PS + ctrl * STEP_PS, plus a fresh uniform random jitter of
// 0..JITTER_PS on every transition to stand in for thermal noise.
//
// Interface: a (A1), ctrl (A2..A4), y (O). Time unit is 1 ps. On silicon the
// block is one LUT4 primitive placed by hand; this file exists to simulate it.
`timescale 1ps/1ps
module pdl_inverter #(
  parameter int unsigned BASE_PS   = 600,  // delay at ctrl = 000
  parameter int unsigned STEP_PS   = 12,   // added delay per level
  parameter int unsigned JITTER_PS = 10    // peak random jitter per transition
) (
  input  logic       a,
  input  logic [2:0] ctrl,
  output logic       y
);
  // The output follows ~a after the delay selected by ctrl at the moment a
  // changes; a change of ctrl alone does not move the output.
  always begin
    #(BASE_PS + int'(ctrl) * STEP_PS + $urandom_range(JITTER_PS, 0));
    y = ~a;
    @(a);
  end
endmodule
