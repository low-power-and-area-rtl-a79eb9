// tb_byte_fifo: the 64-byte FIFO against a queue model. Random writes and
// reads, including simultaneous ones; phases that fill it to full (writes
// beyond that must be dropped with an overflow pulse) and drain it to empty
// (reads then are ignored). Data, count, empty and full are compared every
// clock.
`timescale 1ps/1ps
module tb_byte_fifo;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [6:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0, n_empty_rd = 0, n_both = 0;
  byte unsigned q [$];
  bit exp_ovf = 0;

  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .rd_en(rd_en), .rd_data(rd_data),
    .empty(empty), .full(full), .count(count), .overflow(overflow));

  always #20_833 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

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
    @(posedge clk); #1;
    for (int n = 0; n < 6000; n++) begin
      int phase, pw, pr;
      bit w, r, dw, dr;
      phase = (n / 500) % 3;  // 0: random, 1: filling, 2: draining
      pw = (phase == 1) ? 90 : (phase == 2) ? 10 : 50;
      pr = (phase == 1) ? 10 : (phase == 2) ? 90 : 50;
      w = ($urandom_range(99, 0) < pw);
      r = ($urandom_range(99, 0) < pr);
      // compare state before the edge
      check(count == 7'(q.size()), $sformatf("count %0d expected %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("rd_data %h expected %h", rd_data, q[0]));
      check(overflow == exp_ovf, "overflow pulse");
      if (full) n_full++;
      wr_en   <= w;
      rd_en   <= r;
      wr_data <= 8'($urandom);
      @(posedge clk); #1;
      dw = w && (q.size() < DEPTH);
      dr = r && (q.size() > 0);
      exp_ovf = w && (q.size() == DEPTH);
      if (exp_ovf) n_ovf++;
      if (r && q.size() == 0) n_empty_rd++;
      if (dw && dr) n_both++;
      if (dr) void'(q.pop_front());
      if (dw) q.push_back(wr_data);
    end
    check(n_full > 0 && n_ovf > 0 && n_empty_rd > 0 && n_both > 0,
          $sformatf("not all cases seen: full=%0d ovf=%0d empty_rd=%0d both=%0d", n_full, n_ovf, n_empty_rd, n_both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
