// tb_byte_shift_reg: random bits with random gaps and occasional clr. A
// reference model packs bits first-bit-in-MSB; each completed byte must
// appear with a one-clock byte_valid pulse from the edge that takes its
// eighth bit.
// With a bit on every clock a byte must come every 8 clocks.
`timescale 1ps/1ps
module tb_byte_shift_reg;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, din = 1'b0, din_valid = 1'b0;
  logic [7:0] byte_o;
  logic byte_valid;
  int checks = 0, failures = 0;
  bit [7:0] acc = 0;
  int nb = 0;
  bit exp_v = 0;
  bit [7:0] exp_b = 0;
  int last_byte_cyc = -1, n_bytes_dense = 0;

  byte_shift_reg #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .din(din), .din_valid(din_valid),
                               .byte_o(byte_o), .byte_valid(byte_valid));

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
    for (int n = 0; n < 6000; n++) begin
      bit dense;
      dense = (n >= 3000);
      din_valid <= dense ? 1'b1 : logic'($urandom_range(2, 0) != 0);
      din       <= logic'($urandom_range(1, 0));
      clr       <= dense ? 1'b0 : logic'($urandom_range(199, 0) == 0);
      @(posedge clk);
      #1;
      exp_v = 0;
      if (clr) begin acc = 0; nb = 0; end
      else if (din_valid) begin
        acc = {acc[6:0], din};
        nb++;
        if (nb == 8) begin exp_v = 1; exp_b = acc; nb = 0; end
      end
      checks++;
      if (byte_valid != exp_v || (exp_v && byte_o != exp_b)) begin
        failures++;
        $display("FAIL: n=%0d byte v=%b %h expected v=%b %h", n, byte_valid, byte_o, exp_v, exp_b);
      end
      if (dense && byte_valid) begin
        if (last_byte_cyc >= 0) begin
          checks++;
          if (n - last_byte_cyc != 8) begin failures++; $display("FAIL: byte interval %0d", n - last_byte_cyc); end
        end
        last_byte_cyc = n;
        n_bytes_dense++;
      end
    end
    checks++;
    if (n_bytes_dense < 370) begin failures++; $display("FAIL: only %0d bytes in dense run", n_bytes_dense); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
