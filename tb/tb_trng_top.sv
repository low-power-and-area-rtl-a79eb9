// tb_trng_top: end-to-end test of the TRNG at its default size (32 rings,
// 3-bit delay levels, 64-byte FIFO, sampling on every 24 MHz clock).
//
// A reference model follows the raw sampled bits and the control state inside
// the design, applies its own Von Neumann pairing, stream selection, byte
// packing and FIFO (drop when full), and every byte read from the FIFO is
// compared with it. The sequence: start in raw mode and let the FIFO fill
// until bytes overflow; drain it; switch to processed mode while running;
// switch back; stop, drain and restart. Also checked: the first raw bit two
// clocks after start, one byte per 8 clocks in raw mode, a processed rate
// near 1/4 of that, a raw ones fraction between 40% and 60%, the delay codes
// changing at every sample, and no writes while stopped. Each mechanism
// (start, stop, restart, both mode switches, pair dropped, pair accepted,
// FIFO full, overflow, FIFO read) is counted and must happen at least once.
`timescale 1ps/1ps
module tb_trng_top;
  import trng_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0, proc_sel = 1'b0, fifo_rd_en = 1'b0;
  logic [7:0] fifo_rd_data;
  logic fifo_empty, fifo_full, running, overflow;
  logic [6:0] fifo_count;
  int checks = 0, failures = 0;

  trng_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(stop), .proc_sel(proc_sel),
    .fifo_rd_en(fifo_rd_en), .fifo_rd_data(fifo_rd_data), .fifo_empty(fifo_empty),
    .fifo_full(fifo_full), .fifo_count(fifo_count), .running(running), .overflow(overflow));

  always #20_833 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- reference model ----------------
  bit   m_have = 0, m_first = 0, m_pp_v = 0, m_pp_b = 0;
  bit [7:0] m_sr = 0, m_byte = 0;
  int   m_nb = 0;
  bit   m_byte_v = 0;
  byte unsigned m_q [$];
  // mechanism counters
  int n_start = 0, n_stop = 0, n_to_pp = 0, n_to_raw = 0, n_drop_pair = 0, n_acc_pair = 0;
  int n_full = 0, n_ovf = 0, n_read = 0, n_raw = 0, n_ones = 0, n_writes = 0, n_code_same = 0, n_ticks = 0;
  bit prev_run = 0;
  stream_e prev_mode = STREAM_RAW;
  logic [95:0] prev_codes;
  bit prev_tick = 0;

  always @(posedge clk) begin
    bit run, clr, rv, rb, sel_v, sel_b, nxt_pp_v, nxt_pp_b, nxt_byte_v;
    stream_e mode;
    run  = dut.u_ctrl.run;
    clr  = dut.u_ctrl.clr;
    mode = dut.u_ctrl.mode;
    rv   = dut.u_samp.valid_o;
    rb   = dut.u_samp.bit_o;
    if (rst_n) begin
      if (run && !prev_run) n_start++;
      if (!run && prev_run) n_stop++;
      if (run && prev_run && mode != prev_mode) begin
        if (mode == STREAM_PROCESSED) n_to_pp++; else n_to_raw++;
      end
      prev_run = run; prev_mode = mode;
      // codes move one clock after each tick, so compare on back-to-back ticks
      if (dut.u_div.tick && prev_tick) begin
        n_ticks++;
        if (dut.u_dctl.codes == prev_codes) n_code_same++;
      end
      prev_tick = dut.u_div.tick;
      prev_codes = dut.u_dctl.codes;
      if (run && rv) begin n_raw++; n_ones += int'(rb); end
      // FIFO read (value before the edge)
      if (fifo_rd_en && m_q.size() > 0) begin
        check(fifo_rd_data == m_q[0], $sformatf("read %h expected %h", fifo_rd_data, m_q[0]));
        void'(m_q.pop_front());
        n_read++;
      end
      // FIFO write of the byte registered at the previous edge
      if (m_byte_v && run) begin
        n_writes++;
        if (m_q.size() < 64) m_q.push_back(m_byte);
        else n_ovf++;
      end
      // stream selection uses the corrector output registered last edge
      sel_v = (mode == STREAM_PROCESSED) ? m_pp_v : rv;
      sel_b = (mode == STREAM_PROCESSED) ? m_pp_b : rb;
      nxt_pp_v = 0; nxt_pp_b = m_pp_b; nxt_byte_v = 0;
      if (clr) begin
        m_have = 0; m_nb = 0; m_sr = 0; nxt_pp_b = 0;
      end else begin
        if (rv && run) begin
          if (!m_have) begin m_first = rb; m_have = 1; end
          else begin
            m_have = 0;
            if (rb != m_first) begin nxt_pp_v = 1; nxt_pp_b = m_first; n_acc_pair++; end
            else n_drop_pair++;
          end
        end
        if (sel_v && run) begin
          m_sr = {m_sr[6:0], sel_b};
          m_nb++;
          if (m_nb == 8) begin nxt_byte_v = 1; m_byte = m_sr; m_nb = 0; end
        end
      end
      m_pp_v = nxt_pp_v; m_pp_b = nxt_pp_b; m_byte_v = nxt_byte_v;
      if (fifo_full) n_full++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_start(input bit sel);
    proc_sel <= sel; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
  endtask

  task automatic pulse_stop();
    stop <= 1'b1;
    @(posedge clk); stop <= 1'b0;
  endtask

  task automatic drain();
    while (!fifo_empty) begin
      fifo_rd_en <= 1'b1;
      @(posedge clk);
    end
    fifo_rd_en <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    int c0, w0, r0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    #1;
    check(!running && fifo_empty && fifo_count == 0, "state after reset");

    // 1. raw mode: latency of the first raw bit and one byte per 8 clocks
    @(posedge clk);
    pulse_start(1'b0);
    #1;
    check(running, "not running after start");
    c0 = 0;
    while (!dut.u_samp.valid_o) begin @(posedge clk); #1; c0++; end
    check(c0 == 2, $sformatf("first raw bit %0d clocks after the start edge, expected 2", c0));
    w0 = n_writes;
    repeat (400) @(posedge clk);
    #1;
    check(n_writes - w0 >= 49 && n_writes - w0 <= 50, $sformatf("raw mode: %0d bytes in 400 clocks", n_writes - w0));
    // 2. no reads: the FIFO fills and overflows
    repeat (300) @(posedge clk);
    #1;
    check(fifo_full && fifo_count == 64, "FIFO not full after 700 clocks of raw bytes");
    check(overflow, "overflow flag not set");
    drain();

    // 3. switch to processed while running, reading continuously
    proc_sel <= 1'b1;
    w0 = n_writes;
    fifo_rd_en <= 1'b1;
    repeat (3200) @(posedge clk);
    #1;
    check((n_writes - w0) >= 3200 / 32 * 6 / 10 && (n_writes - w0) <= 3200 / 32 * 14 / 10,
          $sformatf("processed mode: %0d bytes in 3200 clocks, expected about 100", n_writes - w0));
    // 4. back to raw, mid-byte
    proc_sel <= 1'b0;
    repeat (205) @(posedge clk);
    fifo_rd_en <= 1'b0;
    // 5. stop: no more writes
    pulse_stop();
    repeat (5) @(posedge clk);
    w0 = n_writes;
    repeat (100) @(posedge clk);
    #1;
    check(!running, "still running after stop");
    check(n_writes == w0, "bytes written while stopped");
    drain();
    // 6. restart in processed mode: overflow cleared
    pulse_start(1'b1);
    #1;
    check(!overflow, "overflow not cleared by start");
    repeat (1000) @(posedge clk);
    pulse_stop();
    repeat (5) @(posedge clk);
    drain();
    #1;
    check(m_q.size() == 0 && fifo_empty, "model and FIFO disagree on emptiness");

    check(n_raw > 1000 && n_ones * 100 > n_raw * 40 && n_ones * 100 < n_raw * 60,
          $sformatf("raw bits: %0d ones of %0d", n_ones, n_raw));
    check(n_code_same == 0, $sformatf("delay codes unchanged at %0d of %0d ticks", n_code_same, n_ticks));
    check(n_start >= 2, $sformatf("start/restart seen %0d times", n_start));
    check(n_stop >= 2, "stop not seen");
    check(n_to_pp >= 1, "switch to processed not seen");
    check(n_to_raw >= 1, "switch to raw not seen");
    check(n_drop_pair >= 1, "no pair dropped");
    check(n_acc_pair >= 1, "no pair accepted");
    check(n_full >= 1, "FIFO never full");
    check(n_ovf >= 1, "no overflow");
    check(n_read >= 64, "too few reads");
    $display("mechanisms: start=%0d stop=%0d to_processed=%0d to_raw=%0d pairs_dropped=%0d pairs_accepted=%0d full_clocks=%0d overflows=%0d reads=%0d raw_bits=%0d ones=%0d",
             n_start, n_stop, n_to_pp, n_to_raw, n_drop_pair, n_acc_pair, n_full, n_ovf, n_read, n_raw, n_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
