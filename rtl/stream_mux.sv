// stream_mux: selects the raw or the post-processed bit stream.
//
// With sel = STREAM_PROCESSED the Von Neumann corrector's output goes to the
// byte shift register, otherwise the raw sampled bits do; the valid strobe is
// switched with the bit. Purely combinational. The selection multiplexer
// follows the source design.
`timescale 1ps/1ps
module stream_mux
  import trng_pkg::*;
(
  input  stream_e sel,
  input  logic    raw_bit,
  input  logic    raw_valid,
  input  logic    pp_bit,
  input  logic    pp_valid,
  output logic    bit_o,
  output logic    valid_o
);
  always_comb begin
    if (sel == STREAM_PROCESSED) begin
      bit_o   = pp_bit;
      valid_o = pp_valid;
    end else begin
      bit_o   = raw_bit;
      valid_o = raw_valid;
    end
  end
endmodule
