// tb_sample_divider: with DIV = 3 the tick must come on every third enabled
// clock, the first one three clocks after en rises, and never while en is
// low; with DIV = 1 (the default) tick must equal en.
`timescale 1ps/1ps
module tb_sample_divider;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic tick3, tick1;
  int checks = 0, failures = 0;

  sample_divider #(.DIV(3)) dut3 (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick3));
  sample_divider             dut1 (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick1));

  always #20_833 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since_en;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int burst = 0; burst < 20; burst++) begin
      int len;
      len = $urandom_range(20, 1);
      since_en = 0;
      for (int c = 0; c < len; c++) begin
        en <= 1'b1;
        #1;
        since_en++;
        check(tick3 == (since_en % 3 == 0), $sformatf("DIV=3: tick=%b at enabled clock %0d", tick3, since_en));
        check(tick1 == 1'b1, "DIV=1: no tick while enabled");
        @(posedge clk);
      end
      en <= 1'b0;
      #1;
      check(tick3 == 1'b0 && tick1 == 1'b0, "tick while disabled");
      repeat ($urandom_range(3, 1)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
