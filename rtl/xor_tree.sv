// xor_tree: multi-input XOR that combines the ring-oscillator outputs.
//
// The output is the parity of all N inputs, built as a balanced tree of
// 2-input XORs (log2(N) levels). The inputs come straight from free-running
// rings and are asynchronous; the tree is purely combinational and its output
// is sampled by bit_sampler. Combining the rings by XOR follows the source
// design; the tree shape is this design's own.
`timescale 1ps/1ps
module xor_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] in_bits,
  output logic         x
);
  // Level-by-level reduction; a level with an odd count passes its last
  // element through unchanged.
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] lvl [LEVELS+1];

  always_comb begin
    int unsigned cnt;
    for (int l = 0; l <= LEVELS; l++) lvl[l] = '0;
    lvl[0] = in_bits;
    cnt = N;
    for (int l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (2*i + 1 < cnt)       lvl[l+1][i] = lvl[l][2*i] ^ lvl[l][2*i+1];
        else if (2*i + 1 == cnt) lvl[l+1][i] = lvl[l][2*i];
      end
      cnt = (cnt + 1) / 2;
    end
    x = lvl[LEVELS][0];
  end
endmodule
