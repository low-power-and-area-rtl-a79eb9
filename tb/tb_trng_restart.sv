// tb_trng_restart: restart experiment on the full design.
//
// The generator is reset and started six times from the same initial state:
// same reset, same delay-code seed, rings started on the same clock phase.
// After each start the first 20 raw sampled bits are recorded. A
// deterministic (pseudo-random) source would give the same 20 bits every
// time; here the ring jitter must make the sequences differ, so no two of
// the six may be equal. Each sequence is printed.
`timescale 1ps/1ps
module tb_trng_restart;
  localparam int RESTARTS = 6, NBITS = 20;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] fifo_rd_data;
  logic fifo_empty, fifo_full, running, overflow;
  logic [6:0] fifo_count;
  int checks = 0, failures = 0;
  logic [NBITS-1:0] seq [RESTARTS];

  trng_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(1'b0), .proc_sel(1'b0),
    .fifo_rd_en(1'b1), .fifo_rd_data(fifo_rd_data), .fifo_empty(fifo_empty),
    .fifo_full(fifo_full), .fifo_count(fifo_count), .running(running), .overflow(overflow));

  always #20_833 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < RESTARTS; r++) begin
      int k;
      rst_n <= 1'b0;
      repeat (20) @(posedge clk);  // rings settle to their stopped state
      rst_n <= 1'b1;
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      k = 0;
      while (k < NBITS) begin
        @(posedge clk);
        if (dut.u_samp.valid_o) begin
          seq[r][NBITS-1-k] = dut.u_samp.bit_o;
          k++;
        end
      end
      $display("restart %0d: first %0d bits %b", r + 1, NBITS, seq[r]);
    end
    for (int a = 0; a < RESTARTS; a++)
      for (int b = a + 1; b < RESTARTS; b++) begin
        checks++;
        if (seq[a] == seq[b]) begin
          failures++;
          $display("FAIL: restarts %0d and %0d gave the same bits", a + 1, b + 1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
