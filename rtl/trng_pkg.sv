// trng_pkg: constants and types shared by the ring-oscillator TRNG.
//
// The generator has 32 free-running rings, each tuned by a 3-bit delay level
// (8 levels, one LUT4 inverter's three spare inputs), and packs its output into
// bytes held in a 64-byte FIFO. These numbers follow the source design. The
// control-state and stream-select encodings are this design's own.
`timescale 1ps/1ps
package trng_pkg;
  localparam int unsigned NUM_RO_DEF     = 32;  // rings in the bank
  localparam int unsigned LEVEL_BITS_DEF = 3;   // delay-control inputs per LUT4 inverter
  localparam int unsigned BYTE_W         = 8;   // shift-register / FIFO width
  localparam int unsigned FIFO_DEPTH_DEF = 64;  // FIFO entries (bytes)

  // Which bit stream is packed into bytes.
  typedef enum logic {
    STREAM_RAW       = 1'b0,  // sampled XOR-tree bits
    STREAM_PROCESSED = 1'b1   // Von Neumann corrected bits
  } stream_e;

  // Control-logic state.
  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } ctrl_state_e;
endpackage
