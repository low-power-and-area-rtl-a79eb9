// trng_control: control logic of the TRNG.
//
// A two-state machine (IDLE, RUN) driven by single-clock start and stop
// commands. In RUN it enables all ring oscillators (ro_en) and the sampling,
// post-processing, shift-register and FIFO-write path (run). The stream
// selection proc_sel is latched into mode; when it changes while running, or
// when a run starts, clr pulses for one clock so that the corrector and the
// shift register drop any half-collected pair or byte and no byte mixes raw
// and processed bits. A FIFO overflow sets the sticky overflow flag, cleared
// by the next start. Start/stop control and raw/processed selection follow
// the source design; the command pulses, the clear on mode change and the
// sticky flag are this design's own.
//
// Interface: clk, rst_n (synchronous, active low), start, stop, proc_sel,
// fifo_overflow -> ro_en, run, clr, mode, overflow. All outputs are
// registered: run and ro_en rise one clock after start.
`timescale 1ps/1ps
module trng_control
  import trng_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    stop,
  input  logic    proc_sel,
  input  logic    fifo_overflow,
  output logic    ro_en,
  output logic    run,
  output logic    clr,
  output stream_e mode,
  output logic    overflow
);
  ctrl_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      mode     <= STREAM_RAW;
      clr      <= 1'b1;
      overflow <= 1'b0;
    end else begin
      clr <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state    <= ST_RUN;
          mode     <= stream_e'(proc_sel);
          clr      <= 1'b1;
          overflow <= 1'b0;
        end
        ST_RUN: begin
          if (stop) state <= ST_IDLE;
          if (stream_e'(proc_sel) != mode) begin
            mode <= stream_e'(proc_sel);
            clr  <= 1'b1;
          end
          if (fifo_overflow) overflow <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign run   = (state == ST_RUN);
  assign ro_en = (state == ST_RUN);
endmodule
