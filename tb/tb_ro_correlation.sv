// tb_ro_correlation: ring-to-ring correlation test on the full design.
//
// With the generator running (delay levels changing at every 24 MHz sample),
// every ring output is sampled on each clock, as a separate flip-flop per
// ring would, for N_SAMPLES clocks. The sample Pearson correlation
// coefficient is computed for all 496 pairs of the 32 rings; every one must
// stay within +/-MAX_ABS_R. The reference figure for hardware is 50,000
// samples per ring with all coefficients within +/-0.06; this test takes
// 20,000 to keep the run short. The statistical spread at that length,
// about 4/sqrt(N_SAMPLES) = 0.028 for the extreme of 496 pairs, stays well
// inside the bound.
`timescale 1ps/1ps
module tb_ro_correlation;
  import trng_pkg::*;
  localparam int N = NUM_RO_DEF;
  localparam int N_SAMPLES = 20_000;
  localparam real MAX_ABS_R = 0.06;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] fifo_rd_data;
  logic fifo_empty, fifo_full, running, overflow;
  logic [6:0] fifo_count;
  int checks = 0, failures = 0;
  longint s1 [N];
  longint s11 [N][N];

  trng_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(1'b0), .proc_sel(1'b0),
    .fifo_rd_en(1'b1), .fifo_rd_data(fifo_rd_data), .fifo_empty(fifo_empty),
    .fifo_full(fifo_full), .fifo_count(fifo_count), .running(running), .overflow(overflow));

  always #20_833 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    real r, rmax, num, den;
    foreach (s1[i]) begin
      s1[i] = 0;
      foreach (s11[i][j]) s11[i][j] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < N_SAMPLES; n++) begin
      @(posedge clk);
      v = dut.u_bank.ro;
      for (int i = 0; i < N; i++) if (v[i]) begin
        s1[i]++;
        for (int j = i + 1; j < N; j++) if (v[j]) s11[i][j]++;
      end
    end
    rmax = 0.0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (s1[i] == 0 || s1[i] == N_SAMPLES) begin
        failures++; $display("FAIL: ring %0d sampled constant", i);
        continue;
      end
      for (int j = i + 1; j < N; j++) begin
        num = real'(N_SAMPLES) * real'(s11[i][j]) - real'(s1[i]) * real'(s1[j]);
        den = $sqrt((real'(N_SAMPLES) * real'(s1[i]) - real'(s1[i]) ** 2) *
                    (real'(N_SAMPLES) * real'(s1[j]) - real'(s1[j]) ** 2));
        r = (den > 0.0) ? num / den : 1.0;
        if ((r < 0 ? -r : r) > rmax) rmax = (r < 0 ? -r : r);
        checks++;
        if (r > MAX_ABS_R || r < -MAX_ABS_R) begin
          failures++;
          $display("FAIL: rings %0d and %0d correlation %f", i, j, r);
        end
      end
    end
    $display("largest |correlation| over all ring pairs: %f (%0d samples)", rmax, N_SAMPLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
