// tb_trng_control: drives start, stop, stream selection and FIFO overflow
// and checks the control outputs against a reference state machine every
// clock: run/ro_en follow start and stop, clr pulses on start and on a
// selection change while running, mode latches the selection, and the sticky
// overflow flag sets while running and clears on start.
`timescale 1ps/1ps
module tb_trng_control;
  import trng_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0, proc_sel = 1'b0, fifo_overflow = 1'b0;
  logic ro_en, run, clr, overflow;
  stream_e mode;
  int checks = 0, failures = 0;
  bit r_run = 0, r_clr = 1, r_mode = 0, r_ovf = 0;
  int n_start = 0, n_stop = 0, n_switch = 0, n_ovf = 0;

  trng_control dut (.clk(clk), .rst_n(rst_n), .start(start), .stop(stop), .proc_sel(proc_sel),
                    .fifo_overflow(fifo_overflow), .ro_en(ro_en), .run(run), .clr(clr), .mode(mode),
                    .overflow(overflow));

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
    @(posedge clk); #1;
    r_clr = 0;
    for (int n = 0; n < 5000; n++) begin
      bit s, p, ps, o;
      s  = ($urandom_range(29, 0) == 0);
      p  = ($urandom_range(39, 0) == 0);
      ps = (n % 97 == 0) ? !proc_sel : proc_sel;
      o  = ($urandom_range(49, 0) == 0);
      start <= s; stop <= p; proc_sel <= ps; fifo_overflow <= o;
      @(posedge clk); #1;
      r_clr = 0;
      if (!r_run) begin
        if (s) begin r_run = 1; r_mode = ps; r_clr = 1; r_ovf = 0; n_start++; end
      end else begin
        if (p) begin r_run = 0; n_stop++; end
        if (ps != r_mode) begin r_mode = ps; r_clr = 1; n_switch++; end
        if (o) begin r_ovf = 1; n_ovf++; end
      end
      checks++;
      if (run != r_run || ro_en != r_run || clr != r_clr || mode != stream_e'(r_mode) || overflow != r_ovf) begin
        failures++;
        $display("FAIL: n=%0d run=%b ro_en=%b clr=%b mode=%b ovf=%b expected %b %b %b %b %b",
                 n, run, ro_en, clr, mode, overflow, r_run, r_run, r_clr, r_mode, r_ovf);
      end
    end
    checks++;
    if (n_start == 0 || n_stop == 0 || n_switch == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL: start=%0d stop=%0d switch=%0d ovf=%0d", n_start, n_stop, n_switch, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
