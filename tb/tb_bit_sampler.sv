// tb_bit_sampler: drives random data and tick patterns; the sampler must
// present, one clock after each sampling edge with tick high, the value din
// had at that edge, with valid high exactly then.
`timescale 1ps/1ps
module tb_bit_sampler;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, din = 1'b0;
  logic bit_o, valid_o;
  int checks = 0, failures = 0;
  logic [1:0] t_hist, d_hist;
  logic held;

  bit_sampler dut (.clk(clk), .rst_n(rst_n), .tick(tick), .din(din), .bit_o(bit_o), .valid_o(valid_o));

  always #20_833 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    t_hist = '0; d_hist = '0; held = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      tick <= (n < 500) ? 1'b1 : logic'($urandom_range(1, 0));
      din  <= logic'($urandom_range(1, 0));
      @(posedge clk);
      #1;
      // reference: the value captured at the previous clock edge if tick was high
      checks++;
      if (valid_o != t_hist[0] || (t_hist[0] && bit_o != d_hist[0])) begin
        failures++;
        $display("FAIL: n=%0d valid=%b bit=%b expected valid=%b bit=%b", n, valid_o, bit_o, t_hist[0], d_hist[0]);
      end
      t_hist = {t_hist[0], tick};
      d_hist = {d_hist[0], tick ? din : d_hist[0]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
