// trng_top: ring-oscillator true random number generator with programmable
// delay lines, Von Neumann post-processing and a 64-byte output FIFO.
//
// Entropy comes from the timing jitter of NUM_RO free-running ring
// oscillators (ro_bank). Their outputs are XORed (xor_tree) and the result is
// sampled with the system clock (bit_sampler) on every sample tick
// (sample_divider, one tick per clock at the default SAMPLE_DIV = 1, i.e. the
// 24 MHz sampling of the source design). At each tick delay_ctrl also puts a
// new 3-bit delay level on every ring's LUT-based inverters, so that rings of
// equal length keep drifting apart instead of locking together. The raw bits
// either go straight on or pass through the Von Neumann corrector
// (von_neumann); stream_mux picks one stream, byte_shift_reg packs it into
// bytes and byte_fifo buffers them for an external USB bridge, which reads
// with fifo_rd_en. trng_control starts and stops everything and latches the
// raw/processed selection.
//
// The ring bank is a behavioural timing model (gate delays with random
// jitter), so this top is a simulation model; all other blocks are
// synthesizable, and on an FPGA the bank is built from hand-placed LUTs.
//
// Interface: clk (24 MHz), rst_n (synchronous, active low), start/stop
// (one-clock command pulses), proc_sel (1 = processed), the FIFO read port
// and status. Timing: with SAMPLE_DIV = 1 the raw stream gives one byte every
// 8 clocks (24 Mbit/s at 24 MHz); the processed stream about a quarter of
// that on average. The first raw bit leaves the sampler two clocks after the
// edge that takes start.
`timescale 1ps/1ps
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned NUM_RO     = NUM_RO_DEF,
  parameter int unsigned LEVEL_BITS = LEVEL_BITS_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEPTH_DEF,
  parameter int unsigned SAMPLE_DIV = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        stop,
  input  logic                        proc_sel,
  input  logic                        fifo_rd_en,
  output logic [BYTE_W-1:0]           fifo_rd_data,
  output logic                        fifo_empty,
  output logic                        fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic                        running,
  output logic                        overflow
);
  logic    ro_en, run, clr;
  stream_e mode;
  logic    tick;
  logic [NUM_RO*LEVEL_BITS-1:0] codes;
  logic [NUM_RO-1:0] ro;
  logic    xor_out;
  logic    raw_bit, raw_valid;
  logic    pp_bit, pp_valid;
  logic    sel_bit, sel_valid;
  logic [BYTE_W-1:0] byte_d;
  logic    byte_valid;
  logic    fifo_ovf;

  trng_control u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .stop         (stop),
    .proc_sel     (proc_sel),
    .fifo_overflow(fifo_ovf),
    .ro_en        (ro_en),
    .run          (run),
    .clr          (clr),
    .mode         (mode),
    .overflow     (overflow)
  );

  sample_divider #(.DIV(SAMPLE_DIV)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (run),
    .tick (tick)
  );

  delay_ctrl #(.NUM_RO(NUM_RO), .LEVEL_BITS(LEVEL_BITS)) u_dctl (
    .clk  (clk),
    .rst_n(rst_n),
    .tick (tick),
    .codes(codes)
  );

  ro_bank #(.NUM_RO(NUM_RO), .LEVEL_BITS(LEVEL_BITS)) u_bank (
    .en   (ro_en),
    .codes(codes),
    .ro   (ro)
  );

  xor_tree #(.N(NUM_RO)) u_xor (
    .in_bits(ro),
    .x      (xor_out)
  );

  bit_sampler u_samp (
    .clk    (clk),
    .rst_n  (rst_n),
    .tick   (tick),
    .din    (xor_out),
    .bit_o  (raw_bit),
    .valid_o(raw_valid)
  );

  von_neumann u_vn (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .din       (raw_bit),
    .din_valid (raw_valid && run),
    .dout      (pp_bit),
    .dout_valid(pp_valid)
  );

  stream_mux u_mux (
    .sel      (mode),
    .raw_bit  (raw_bit),
    .raw_valid(raw_valid),
    .pp_bit   (pp_bit),
    .pp_valid (pp_valid),
    .bit_o    (sel_bit),
    .valid_o  (sel_valid)
  );

  byte_shift_reg #(.W(BYTE_W)) u_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .din       (sel_bit),
    .din_valid (sel_valid && run),
    .byte_o    (byte_d),
    .byte_valid(byte_valid)
  );

  byte_fifo #(.WIDTH(BYTE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (byte_valid && run),
    .wr_data (byte_d),
    .rd_en   (fifo_rd_en),
    .rd_data (fifo_rd_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count),
    .overflow(fifo_ovf)
  );

  assign running = run;
endmodule
