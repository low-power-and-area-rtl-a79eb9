// tb_ro_bank: checks the bank of 32 rings under one enable.
//
// Disabled, no ring may move. Enabled with random delay levels that change
// every 41.666 ns (one 24 MHz sample period), every ring must toggle at a
// rate matching its level (between 1/(2*(AND+3*(BASE+7*STEP+JIT)+MISMATCH))
// and 1/(2*(AND+3*BASE)) toggles per ps), and the rings must not run in
// lockstep: their edge counts over the run must not all be equal.
`timescale 1ps/1ps
module tb_ro_bank;
  localparam int N = 32, LB = 3;
  localparam longint RUN_PS = 2_000_000;
  logic en = 1'b0;
  logic [N*LB-1:0] codes = '0;
  logic [N-1:0] ro;
  int checks = 0, failures = 0;
  int cnt [N];

  ro_bank #(.NUM_RO(N), .LEVEL_BITS(LB)) dut (.en(en), .codes(codes), .ro(ro));

  for (genvar k = 0; k < N; k++) begin : g_cnt
    always @(posedge ro[k]) cnt[k]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mn, mx;
    #20_000;
    foreach (cnt[k]) cnt[k] = 0;
    #50_000;
    foreach (cnt[k]) check(cnt[k] == 0, $sformatf("ring %0d toggles while disabled", k));
    en = 1'b1;
    #10_000;
    foreach (cnt[k]) cnt[k] = 0;
    fork
      begin
        for (longint t = 0; t < RUN_PS; t += 41_666) begin
          for (int k = 0; k < N*LB; k += 32) codes[k +: 32] = $urandom;
          #41_666;
        end
      end
    join
    mn = 1 << 30; mx = 0;
    foreach (cnt[k]) begin
      // periods 2*(600+3*600)=4800 ps .. 2*(600+10+3*(600+84+10))=5384 ps
      check(cnt[k] >= RUN_PS / 5384 - 2 && cnt[k] <= RUN_PS / 4800 + 2,
            $sformatf("ring %0d: %0d rising edges in %0d ps", k, cnt[k], RUN_PS));
      if (cnt[k] < mn) mn = cnt[k];
      if (cnt[k] > mx) mx = cnt[k];
    end
    check(mx > mn, "all rings ran in lockstep");
    en = 1'b0;
    #20_000;
    foreach (cnt[k]) cnt[k] = 0;
    #20_000;
    foreach (cnt[k]) check(cnt[k] == 0, $sformatf("ring %0d toggles after disable", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
