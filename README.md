# Ring-oscillator TRNG with LUT programmable delay lines

A true random number generator for small FPGAs. Its entropy comes from the
timing jitter of 32 free-running ring oscillators. Each ring is built from
look-up tables (LUTs), and the delay of those LUTs is changed at random at
every sample clock. Their outputs are XORed, sampled at 24 MHz, optionally
de-biased with a Von Neumann corrector, packed into bytes and buffered in a
64-byte FIFO for a USB bridge to read.

The main idea is the re-programming of the delays. Rings of equal length
placed on an FPGA have almost the same delay. They tend to pull into step,
so the XOR of their outputs carries little randomness. Here every inverter in
a ring is a LUT whose unused inputs pick one of 8 internal signal paths, so
its delay can be set from outside. A new delay level goes to every ring at
each sample clock. The rings' phases then keep drifting apart from cycle to
cycle, and the ring outputs stay uncorrelated with each other.

The ring oscillators are analog in nature. In this repository they are
**behavioural timing models** (gate delays plus random jitter) for simulation.
Everything downstream of them is synthesizable RTL.

## Block diagram

```
            start/stop/proc_sel
                   |
             trng_control ----------------------------------+ run, clr, mode
               | ro_en                                      |
               v                                            v
  delay_ctrl --codes--> ro_bank (32 x ring_oscillator) --> xor_tree --> bit_sampler
    ^  (128-bit LFSR,     each ring = AND + 3 x pdl_inverter               |  raw bit, 1 per tick
    |   96 bits/tick)                                                      +------------+
    |                                                                      v            |
  sample_divider --tick-------------------------------------------->  von_neumann       |
  (tick every SAMPLE_DIV clocks)                                           |            |
                                                                           v            v
                                                                      stream_mux (raw / processed)
                                                                           |
                                                                     byte_shift_reg (8 bits)
                                                                           |
                                                                      byte_fifo (64 x 8) --> USB bridge
```

| File | Kind | Role |
|---|---|---|
| `rtl/trng_pkg.sv` | package | sizes, stream-select and state enums |
| `rtl/pdl_inverter.sv` | behavioural | LUT4 inverter with 8 delay levels |
| `rtl/ring_oscillator.sv` | behavioural | AND gate + 3 PDL inverters in a loop |
| `rtl/ro_bank.sv` | behavioural | 32 rings with one common enable |
| `rtl/xor_tree.sv` | RTL | 32-input XOR as a balanced tree |
| `rtl/bit_sampler.sv` | RTL | sampling flip-flop + settling flip-flop |
| `rtl/sample_divider.sv` | RTL | sample-clock enable (divider) |
| `rtl/delay_ctrl.sv` | RTL | new 3-bit delay level per ring each tick |
| `rtl/von_neumann.sv` | RTL | bias removal |
| `rtl/stream_mux.sv` | RTL | raw / processed selection |
| `rtl/byte_shift_reg.sv` | RTL | 8-bit packing |
| `rtl/byte_fifo.sv` | RTL | 64-byte FIFO, first-word fall-through |
| `rtl/trng_control.sv` | RTL | start/stop state machine, mode latch |
| `rtl/trng_top.sv` | top | wires it all together |

## The programmable delay inverter

A 4-input LUT is a tree of 2:1 multiplexers, with the inputs choosing a path
through the tree. Program the LUT so that its output is the inverse of input
A1 whatever A2..A4 are. A2..A4 then no longer change the logic value, but
they still select which branch of the tree the A1 transition passes through.
Path lengths differ, so A2A3A4 sets the delay: 000 is the shortest path and
111 the longest. One LUT is therefore an inverter with a 3-bit delay control
and 8 levels.

`pdl_inverter` models this as

    delay = BASE_PS + ctrl * STEP_PS + U(0, JITTER_PS)      (defaults 600, 12, 10 ps)

A fresh uniform jitter term is drawn on every transition. The delay is taken
when the input changes. A change of `ctrl` alone never moves the output, as
in the real LUT. The numbers are placeholders: a Spartan-3E LUT plus local
routing is in this range, but the real spread between levels depends on
placement. Change the parameters to match a measured device.

## Rings and the bank

`ring_oscillator` is one AND gate (the enable, also one LUT) and three PDL
inverters in a loop. While `en` is low the AND output holds the loop still at
a fixed state. When `en` goes high, the three inversions around the loop make
it oscillate. Its period is 2·(AND + 3·inverter delay), 4.8 to 5.4 ns with
the default numbers (about 190 to 210 MHz). All three inverters of a ring
share the ring's 3-bit level. The loop is intentionally combinational: it
is the oscillator.

`ro_bank` holds 32 rings with a common enable. Ring *k* takes
`codes[3k+2:3k]`. To stand in for placement differences, ring *k* also gets
a fixed extra delay of (7k mod 11) ps. Without the per-sample level changes,
rings would differ only by these few picoseconds.

On an FPGA each ring is four LUT primitives, instantiated directly and kept
from optimisation. `xor_tree` and the sampler follow them. The model files
exist only so that the rest of the design can be simulated with real,
jittery ring signals.

## Sampling and delay-level generation

`xor_tree` reduces the 32 ring outputs to one bit. `bit_sampler` captures it
on every clock with `tick` high. A second flip-flop gives a metastable
capture one clock to settle. The raw bit appears one clock after its
sampling edge, one bit per tick.

`sample_divider` makes `tick`. With the default `SAMPLE_DIV = 1` and a
24 MHz clock, every clock is a sample. A larger value lets the design run
from a faster clock while it keeps sampling at 24 MHz. It produces a clock
enable, not a derived clock.

`delay_ctrl` supplies the 96 level bits (32 rings × 3) and replaces all of
them at every tick. It is a 128-bit Fibonacci LFSR with the maximal-length
polynomial x¹²⁸+x¹²⁶+x¹⁰¹+x⁹⁹+1. The LFSR is advanced 96 steps per tick by
an unrolled loop, so the low 96 bits are all new each time. The levels only
have to be arbitrary and unrelated to the rings; they are not the entropy
source. An LFSR is the cheapest way to get them. The LFSR restarts from
`SEED` at reset.

## Post-processing and output path

`von_neumann` takes raw bits in non-overlapping pairs. It discards 00 and 11,
and outputs the first bit of 01 or 10. If the input bits are independent,
the output is unbiased whatever the input bias. The cost is rate: on average
one output bit per four input bits, or 128 out of 512.

`stream_mux` chooses the raw or the corrected stream. `byte_shift_reg` shifts
bits in at bit 0, so the first bit of a byte ends up in bit 7, and it pulses
`byte_valid` on the edge that takes the eighth bit. `byte_fifo` buffers 64
bytes. Its output is first-word fall-through: `fifo_rd_data` shows the
oldest byte whenever `fifo_empty` is low, and `fifo_rd_en` pops it.

**Full FIFO.** When the FIFO is full, a new byte is dropped. The generator is
not stalled, and `trng_control` sets a sticky `overflow` flag. The reader
simply misses some random bytes, which is harmless for a random source.

## Control and interface

`trng_control` is a two-state machine (IDLE, RUN):

* `start` (one clock, in IDLE) enters RUN. It enables the rings and the
  datapath, latches `proc_sel` as the stream selection, clears the sticky
  overflow flag, and pulses `clr`. The `clr` pulse empties the corrector's
  half pair and the shift register's partial byte.
* `stop` (in RUN) returns to IDLE. The rings stop, no new bytes are
  written, and the FIFO can still be read.
* Changing `proc_sel` during RUN switches the stream on the next clock. It
  also pulses `clr`, so that no byte holds bits from both streams.

Top-level ports of `trng_top`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 24 MHz system / sampling clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `start`, `stop` | in | 1 | command pulses |
| `proc_sel` | in | 1 | 1 = Von Neumann processed, 0 = raw |
| `fifo_rd_en` | in | 1 | pop the head byte |
| `fifo_rd_data` | out | 8 | head byte |
| `fifo_empty`, `fifo_full` | out | 1 | FIFO state |
| `fifo_count` | out | 7 | bytes held (0..64) |
| `running` | out | 1 | in RUN |
| `overflow` | out | 1 | sticky: a byte was dropped since the last start |

Timing at the defaults:

* The first raw bit leaves the sampler two clocks after the edge that takes
  `start`.
* Raw mode writes one byte every 8 clocks, which is 24 Mbit/s.
* Processed mode averages one byte every 32 clocks, about 6 Mbit/s.

Parameters: `NUM_RO` (32), `LEVEL_BITS` (3; the ring model needs 3),
`FIFO_DEPTH` (64) and `SAMPLE_DIV` (1). `NUM_RO·LEVEL_BITS` must not
exceed 128.

The USB bridge (an FTDI FT2232D in the original setup) is not part of this
RTL. Connect its FIFO-mode write side to the FIFO read port. A full-speed USB
link carries about 1 MB/s, less than the raw byte rate. With raw output, many
bytes will therefore be dropped at the FIFO. Processed output is closer to
the link rate.

## Where this differs from the original design, and what is assumed

* **Rate after post-processing.** The original reports 8 Mbit/s after
  post-processing at 24 MHz. It also states that the corrector needs 512 raw
  bits for 128 output bits. Those two figures do not agree: a one-bit-per-clock
  sampler at 24 MHz with a standard Von Neumann corrector gives at most
  6 Mbit/s. This RTL implements the corrector as described, so its rate is
  about 6 Mbit/s.
* **Delay levels.** The original applies levels "arbitrarily" at each sample
  and does not say where they come from. Here an LFSR supplies them, and the
  three inverters of a ring share one level.
* **Flip-flops after the XOR.** The number is not given. Two are used: a
  sampling flip-flop and a settling flip-flop.
* **Interfaces.** The command interface (pulses), the bit order within a
  byte, the FIFO's single clock and fall-through output, the drop-on-full
  policy and the clear on a mode switch are all this design's choices.
* **Delay values.** The absolute delays, jitter and mismatch in the ring
  model are illustrative, not measured.
* **Out of scope.** The 6-input-LUT variant (5 control bits, 32 levels) is
  mentioned as an option for larger FPGAs and is not built.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_pdl_inverter` | logic value; every delay inside its level's window; level 7 slower than 0; `ctrl` alone does not toggle |
| `tb_ring_oscillator` | still when disabled; every period inside the window for each level; period jitter present |
| `tb_ro_bank` | 32 rings toggle at the expected rate with changing levels; not in lockstep; stop on disable |
| `tb_xor_tree` | parity against bit count, 2034 vectors |
| `tb_bit_sampler` | value and timing of each sample, with random tick patterns |
| `tb_sample_divider` | tick spacing for DIV = 3 and DIV = 1 |
| `tb_delay_ctrl` | codes against an independently written bit-serial LFSR model; hold without tick; all 8 levels reach every ring |
| `tb_von_neumann` | pairing against a reference with gaps, bias and `clr`; output ratio near 1/4 |
| `tb_stream_mux` | all input combinations |
| `tb_byte_shift_reg` | bytes against a reference; one byte per 8 clocks when dense |
| `tb_byte_fifo` | against a queue model through fill, overflow, drain and simultaneous read/write |
| `tb_trng_control` | against a reference state machine under random commands |
| `tb_trng_top` | whole design at default size, described below |

**`tb_trng_top`.** This runs the whole design at its default size. A
reference model follows the raw bits and applies its own corrector, stream
selection, packing and FIFO; every byte read must match it. The run goes:

1. Start in raw mode and let the FIFO fill and overflow.
2. Drain the FIFO.
3. Switch to processed mode while running, then switch back.
4. Stop, drain, and restart.

Along the way it checks the start latency, the 8-clock byte rate, the
processed rate, the raw ones fraction (40–60 %), and that the delay codes
change at every sample. It also counts each mechanism and requires each to
occur at least once.

Two more testbenches run the original design's own experiments on the model:

* **`tb_ro_correlation`** samples all 32 rings on every clock for 20,000
  clocks while the generator runs. It then computes the Pearson correlation
  of all 496 ring pairs; every one must be within ±0.06, the figure reported
  for the hardware (which used 50,000 samples). The largest value seen is
  about 0.03.
* **`tb_trng_restart`** resets and restarts the generator six times from the
  same state. It records the first 20 raw bits each time, and all six
  sequences must differ.

The statistical evaluations of the original (AIS-31 entropy on 80 million
bits, the NIST suite on 10⁹ bits) need far more bits than a gate-level ring
model can simulate. Run them on hardware captures. Keep in mind that the
randomness seen in simulation comes from the simulator's random-number
generator inside the jitter model, so it says nothing about a real device.
The simulations check the logic and the mechanism, not the entropy.

## Simulating

Verilator 5 with timing support is needed, because the ring model uses
delays. From the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/trng_pkg.sv \
          tb/tb_trng_top.sv --top-module tb_trng_top -o sim
./obj_dir/sim
```

Replace `tb_trng_top` with any other testbench name. The package file has to
come first; the other modules are found through `-y rtl`. Run times:

* Most testbenches: a few seconds.
* `tb_trng_top`: under a minute.
* `tb_ro_correlation`: about 2–3 minutes, because it simulates 32 rings at
  about 200 MHz, in picosecond steps, for 20,000 sample clocks.

For synthesis, leave out `pdl_inverter`, `ring_oscillator` and `ro_bank`.
Replace `ro_bank` with a hand-placed version built from the FPGA vendor's
LUT primitives (LUT4 configured as an inverter of input 0, plus an AND
LUT). Keep the same ports and mark it so the tools keep it and do not
optimise it away.
