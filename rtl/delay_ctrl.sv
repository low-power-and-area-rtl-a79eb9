// delay_ctrl: generates a new delay level for every ring at each sample clock.
//
// Each ring's programmable-delay inverters take a 3-bit level (8 delays). The
// source design applies arbitrary levels at every sample clock so that rings of
// equal length do not lock to each other; how the levels are produced is this
// design's choice: a 128-bit Fibonacci LFSR, x^128 + x^126 + x^101 + x^99 + 1
// (maximal length), advanced NUM_RO*LEVEL_BITS steps on every tick. Each step
// shifts the register left by one and inserts
// s[127] ^ s[125] ^ s[100] ^ s[98] at bit 0, so after a tick the low
// NUM_RO*LEVEL_BITS bits are all new; they are the codes, ring k taking
// codes[k*LEVEL_BITS +: LEVEL_BITS]. Codes change one clock after a tick.
//
// Interface: clk, rst_n (synchronous, active low, loads SEED), tick -> codes.
`timescale 1ps/1ps
module delay_ctrl
  import trng_pkg::*;
#(
  parameter int unsigned  NUM_RO     = NUM_RO_DEF,
  parameter int unsigned  LEVEL_BITS = LEVEL_BITS_DEF,
  parameter logic [127:0] SEED       = 128'h5A5A_C3C3_0F0F_9669_1234_5678_9ABC_DEF1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tick,
  output logic [NUM_RO*LEVEL_BITS-1:0] codes
);
  localparam int unsigned CODE_W = NUM_RO * LEVEL_BITS;

  logic [127:0] state, next_state;

  always_comb begin
    next_state = state;
    for (int unsigned i = 0; i < CODE_W; i++)
      next_state = {next_state[126:0],
                    next_state[127] ^ next_state[125] ^ next_state[100] ^ next_state[98]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= SEED;
    else if (tick) state <= next_state;
  end

  assign codes = state[CODE_W-1:0];

  initial begin
    assert (CODE_W <= 128) else $error("delay_ctrl: NUM_RO*LEVEL_BITS must not exceed 128");
    assert (SEED != '0)    else $error("delay_ctrl: SEED must be non-zero");
  end
endmodule
