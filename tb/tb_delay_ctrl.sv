// tb_delay_ctrl: checks the delay-level generator against a reference LFSR
// kept in the testbench. The reference is a Galois-form description of the
// same x^128 + x^126 + x^101 + x^99 + 1 sequence stepped one bit at a time:
// the new bit is the XOR of the bits 128, 126, 101 and 99 steps back in the
// produced bit history. Also checked: codes hold when tick is low, and every
// ring sees all 8 levels within 200 ticks.
`timescale 1ps/1ps
module tb_delay_ctrl;
  localparam int N = 32, LB = 3, CW = N * LB;
  localparam logic [127:0] SEED = 128'h5A5A_C3C3_0F0F_9669_1234_5678_9ABC_DEF1;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [CW-1:0] codes;
  int checks = 0, failures = 0;
  bit hist [$];  // bit history, oldest first
  bit [7:0] seen [N];

  delay_ctrl #(.NUM_RO(N), .LEVEL_BITS(LB), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .codes(codes));

  always #20_833 clk = ~clk;

  function automatic logic [CW-1:0] ref_codes();
    logic [CW-1:0] r;
    // the most recent bit is bit 0, the one prev_codes bit 1, ...
    for (int i = 0; i < CW; i++) r[i] = hist[hist.size() - 1 - i];
    return r;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] prev_codes;
    for (int i = 127; i >= 0; i--) hist.push_back(SEED[i]);
    foreach (seen[k]) seen[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    checks++;
    if (codes != ref_codes()) begin failures++; $display("FAIL: codes after reset"); end
    for (int n = 0; n < 300; n++) begin
      tick <= logic'($urandom_range(3, 0) != 0);
      prev_codes = codes;
      @(posedge clk); #1;
      if (tick) begin
        for (int s = 0; s < CW; s++) begin
          int L;
          L = hist.size();
          hist.push_back(hist[L-128] ^ hist[L-126] ^ hist[L-101] ^ hist[L-99]);
        end
        while (hist.size() > 256) void'(hist.pop_front());
      end else begin
        checks++;
        if (codes != prev_codes) begin failures++; $display("FAIL: codes moved without tick"); end
      end
      checks++;
      if (codes != ref_codes()) begin
        failures++;
        $display("FAIL: n=%0d codes=%h expected %h", n, codes, ref_codes());
      end
      for (int k = 0; k < N; k++) seen[k][codes[k*LB +: LB]] = 1'b1;
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (seen[k] != 8'hFF) begin failures++; $display("FAIL: ring %0d saw levels %b", k, seen[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
