// tb_von_neumann: feeds biased random bits with random gaps and compares the
// corrector's output with a reference pairing model: for each pair of valid
// input bits, 01 gives 0, 10 gives 1, 00 and 11 give nothing. The output must
// be registered by the clock edge that takes the pair's second bit. A clr in
// the middle of a pair must make the next bit start a new pair. Also counts that both discarded
// and accepted pairs occurred and that the output ratio is near 1/4 for
// unbiased input (128 of 512 on average).
`timescale 1ps/1ps
module tb_von_neumann;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, din = 1'b0, din_valid = 1'b0;
  logic dout, dout_valid;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_drop = 0, n_clr = 0;
  bit   have = 0, first = 0;
  bit   exp_v = 0, exp_b = 0;

  von_neumann dut (.clk(clk), .rst_n(rst_n), .clr(clr), .din(din), .din_valid(din_valid),
                   .dout(dout), .dout_valid(dout_valid));

  always #20_833 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 8000; n++) begin
      int bias;
      bias = (n < 4000) ? 50 : 80;  // percent ones
      din_valid <= logic'($urandom_range(9, 0) < 8);
      din       <= logic'($urandom_range(99, 0) < bias);
      clr       <= logic'($urandom_range(499, 0) == 0);
      @(posedge clk);
      #1;
      // reference update for the edge just taken
      exp_v = 0;
      if (clr) begin
        have = 0; n_clr++;
      end else if (din_valid) begin
        if (n < 4000) n_in++;
        if (!have) begin first = din; have = 1; end
        else begin
          have = 0;
          if (din != first) begin exp_v = 1; exp_b = first; if (n < 4000) n_out++; end
          else n_drop++;
        end
      end
      checks++;
      if (dout_valid != exp_v || (exp_v && dout != exp_b)) begin
        failures++;
        $display("FAIL: n=%0d out v=%b b=%b expected v=%b b=%b", n, dout_valid, dout, exp_v, exp_b);
      end
    end
    checks++;
    if (n_drop == 0 || n_out == 0 || n_clr == 0) begin
      failures++; $display("FAIL: drop=%0d out=%0d clr=%0d", n_drop, n_out, n_clr);
    end
    checks++;
    if (n_out * 100 < n_in * 20 || n_out * 100 > n_in * 30) begin
      failures++; $display("FAIL: %0d out of %0d unbiased bits", n_out, n_in);
    end
    $display("unbiased input: %0d bits in, %0d out; pairs dropped %0d", n_in, n_out, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
