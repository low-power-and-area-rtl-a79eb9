// tb_ring_oscillator: checks one enable-gated ring of three PDL inverters.
//
// With en low the ring must stay still. With en high, for every delay level,
// each measured period must lie in
// [2*(AND + 3*(BASE + level*STEP)), 2*(AND + 3*(BASE + level*STEP + JITTER))]
// and the periods must vary (jitter). Dropping en must stop the ring again.
`timescale 1ps/1ps
module tb_ring_oscillator;
  localparam int AND_D = 600, BASE = 600, STEP = 12, JIT = 10;
  logic en = 1'b0;
  logic [2:0] code = 3'd0;
  logic ro;
  int checks = 0, failures = 0;
  int edges = 0;

  ring_oscillator #(.AND_PS(AND_D), .BASE_PS(BASE), .STEP_PS(STEP), .JITTER_PS(JIT)) dut (
    .en(en), .code(code), .ro_out(ro));

  always @(ro) edges++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_prev, per, lo, hi, pmin, pmax;
    #10_000;
    edges = 0;
    #50_000;
    check(edges == 0, "ring toggles while disabled");
    for (int lvl = 0; lvl < 8; lvl++) begin
      code = 3'(lvl);
      en = 1'b1;
      repeat (3) @(posedge ro);
      t_prev = $time;
      lo = 2 * (AND_D + 3 * (BASE + lvl * STEP));
      hi = 2 * (AND_D + 3 * (BASE + lvl * STEP + JIT));
      pmin = 1 << 30; pmax = 0;
      repeat (40) begin
        @(posedge ro);
        per = $time - t_prev;
        t_prev = $time;
        if (per < pmin) pmin = per;
        if (per > pmax) pmax = per;
        check(per >= lo && per <= hi, $sformatf("level %0d: period %0d outside [%0d,%0d]", lvl, per, lo, hi));
      end
      check(pmax > pmin, $sformatf("level %0d: no period jitter", lvl));
      en = 1'b0;
      #20_000;
      edges = 0;
      #20_000;
      check(edges == 0, "ring still toggles after disable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
