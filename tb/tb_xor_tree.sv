// tb_xor_tree: compares the XOR tree with a bit-count parity for N = 32
// (the default) on single-hot, all-ones and 2000 random input vectors.
`timescale 1ps/1ps
module tb_xor_tree;
  localparam int N = 32;
  logic [N-1:0] in_bits;
  logic x;
  int checks = 0, failures = 0;

  xor_tree #(.N(N)) dut (.in_bits(in_bits), .x(x));

  task automatic apply(input logic [N-1:0] v);
    int ones;
    in_bits = v;
    #10;
    ones = 0;
    for (int i = 0; i < N; i++) ones += int'(v[i]);
    checks++;
    if (x != logic'(ones % 2)) begin
      failures++;
      $display("FAIL: in=%h x=%b expected %0d", v, x, ones % 2);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < N; i++) apply(N'(1) << i);
    repeat (2000) apply(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
