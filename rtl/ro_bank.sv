// ro_bank: behavioural model (not synthesizable) of the bank of free-running
// ring oscillators that is the TRNG's entropy source.
//
// NUM_RO identical rings (32 in the source design) are switched on together
// by one enable. Ring k takes delay level codes[k*LEVEL_BITS +: LEVEL_BITS].
// Rings of equal length lock onto nearly equal frequencies; changing each
// ring's delay level at every sample clock spreads their phases apart. To
// stand in for placement differences, ring k gets a fixed extra delay of
// (k*7) mod 11 ps on its enable gate; that offset is this model's own.
//
// Interface: en, codes[NUM_RO*LEVEL_BITS-1:0], ro[NUM_RO-1:0] (asynchronous).
`timescale 1ps/1ps
module ro_bank
  import trng_pkg::*;
#(
  parameter int unsigned NUM_RO     = NUM_RO_DEF,
  parameter int unsigned LEVEL_BITS = LEVEL_BITS_DEF,
  parameter int unsigned JITTER_PS  = 10
) (
  input  logic                         en,
  input  logic [NUM_RO*LEVEL_BITS-1:0] codes,
  output logic [NUM_RO-1:0]            ro
);
  for (genvar k = 0; k < NUM_RO; k++) begin : g_ro
    ring_oscillator #(
      .JITTER_PS  (JITTER_PS),
      .MISMATCH_PS((k * 7) % 11)
    ) u_ro (
      .en    (en),
      .code  (codes[k*LEVEL_BITS +: 3]),
      .ro_out(ro[k])
    );
  end
endmodule
