// tb_pdl_inverter: checks the programmable-delay LUT inverter model.
//
// For each of the 8 delay levels the input is toggled 20 times; every output
// edge must be the inverse of the input and arrive within
// [BASE + level*STEP, BASE + level*STEP + JITTER] ps. Level 7 must be slower
// than level 0 on average, and a change of ctrl alone must not move the
// output.
`timescale 1ps/1ps
module tb_pdl_inverter;
  localparam int unsigned BASE = 600, STEP = 12, JIT = 10;
  logic a = 1'b0;
  logic [2:0] ctrl = 3'd0;
  logic y;
  int checks = 0, failures = 0;
  longint sum_d [8];

  pdl_inverter #(.BASE_PS(BASE), .STEP_PS(STEP), .JITTER_PS(JIT)) dut (.a(a), .ctrl(ctrl), .y(y));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, dt, lo, hi;
    #2000;
    check(y == ~a, "initial output is not the inverse of a");
    for (int lvl = 0; lvl < 8; lvl++) begin
      sum_d[lvl] = 0;
      ctrl = 3'(lvl);
      #2000;
      for (int n = 0; n < 20; n++) begin
        a = ~a;
        t0 = $time;
        @(y);
        dt = $time - t0;
        lo = BASE + lvl * STEP;
        hi = lo + JIT;
        sum_d[lvl] += dt;
        check(y == ~a, $sformatf("level %0d: y not inverse of a", lvl));
        check(dt >= lo && dt <= hi, $sformatf("level %0d: delay %0d outside [%0d,%0d]", lvl, dt, lo, hi));
        #1500;
      end
    end
    check(sum_d[7] > sum_d[0] + 20 * (7 * STEP - JIT), "level 7 not slower than level 0");
    // ctrl changes alone do not toggle the output
    begin
      logic y0;
      y0 = y;
      for (int k = 0; k < 8; k++) begin ctrl = 3'(k); #300; end
      #2000;
      check(y == y0, "output moved without an input edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
