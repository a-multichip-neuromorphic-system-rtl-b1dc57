# Spike-routing IFAT: a reconfigurable silicon cortex for address-event vision

This is a vision system that works entirely with spikes. A silicon retina of
80 x 60 pixels turns light into spike trains, and a silicon cortex of 4800
integrate-and-fire neurons processes them. The neurons have no wiring of their
own. Every spike travels as an *address event* (AE), meaning the address of the
neuron that fired. A lookup table in memory says where each spike goes, with
what weight and with what synaptic reversal (equilibrium) potential.
Reprogramming that table turns the same cortex into a network of oriented
filters, a salience detector, a foveating resampler or a recurrent MAX
network.

The digital heart of the system is the event router of the IFAT
(integrate-and-fire array transceiver) board. The RTL here implements that
router, the retina/CPU multiplexer in front of it, and behavioural models of
the two analog parts it drives: the 8-bit DAC and the I&F neuron chips.

```
 retina (80x60) --AER--+
                       +-- mux_demux ==ext AER== ifat_fpga ==int AER== iaf_chip x2 (2 x 2400 neurons)
 CPU -----------AER----+      |                   |      |                 ^
     <--------AER-------------+                  RAM    DAC --- E (mV) ----+
                                          (lookup table, off board)
```

## The path of one spike

1. The retina (or the CPU) raises an AER request with the address of the pixel
   that fired.
2. `mux_demux` merges the retina and CPU buses. It tags each event with its
   source (bit 13: 0 for the retina, 1 for the CPU) and forwards it on the
   external bus.
3. `ifat_fpga` receives the event. A retina event first passes
   `fovea_remap`, which adds a signed offset to its row and column. The
   event then becomes a 14-bit lookup index `{0, addr}`. A spike from cortex
   chip `c` at `{row, col}` becomes `{1, c, row, col}` instead. The external
   input and the two chips are merged by a round-robin `aer_arbiter`.
4. `lut_router` reads RAM lines `{index, offset}` with offset 0, 1, 2, ...
   Each line is one synapse.
5. For a cortex target, the router sets the DAC to the synapse's equilibrium
   potential (if it is not already there) and waits `DAC_SETTLE` cycles.
6. The router then sends a command (who, weight) on the internal AER bus. The
   addressed neurons move their membrane potential toward that potential.
   Any neuron that crosses threshold emits a spike, which re-enters at step 3.
   This closes recurrent networks such as the MAX circuit inside the cortex.

A synapse can instead name an *external* target. The event then leaves on the
external output bus and reaches the CPU, or in a larger system the next board.

## The lookup table

The RAM has 2^22 = 4,194,304 lines, addressed `{index[13:0], offset[7:0]}`.
A presynaptic neuron therefore owns 256 consecutive lines: its synapse list.

| bits   | field  | meaning |
|--------|--------|---------|
| 35:20  | target | postsynaptic target (encoding below); `0xFFFF` = stop code |
| 19:16  | weight | size of the postsynaptic response (`w`, 0..15) |
| 15:12  | nev    | number of events to issue for this synapse (0..15) |
| 11:8   | prob   | probability code `p`: each try passes with probability (p+1)/16 |
| 7:0    | erev   | equilibrium potential, written to the 8-bit DAC |

The overall synaptic strength is the product of weight, event count and
probability. The router stops at the first line whose target is `0xFFFF`, or
after line `0xFF`. For each other line it makes `nev` tries. A try passes when
the low 4 bits of a 16-bit LFSR are `<= prob`, so `0xF` always passes. Every
passing try produces one command.

Target word (`ifat_pkg`):

| target[15:14] | meaning | remaining bits |
|---|---|---|
| `00` | one cortex neuron | `[12]` chip, `[11:6]` row, `[5:0]` column |
| `01` | external event | `[12:0]` address sent to the external output bus |
| `10` | broadcast | `[13:12]`: `00` one row of a chip (`[6]` chip, `[5:0]` row), `01` a whole chip (`[6]` chip), `1x` both chips |
| `11` | reserved | `0xFFFF` ends the list; other values are skipped |

Broadcasts activate many neurons with a single event. Examples are a global
"leak" (equilibrium potential 0 on every neuron) and row-wide inhibition.

The layout of the table follows the example table of the source design: the
field order and widths, the stop word, and base index plus offset counter.
The field widths add up to 36 bits, so the RAM word here is 36 bits, not the
32 bits quoted for the memory chip. The target-word encoding and the
probability rule are this implementation's own.

## Address spaces

* Retina: 13 bits `{row[5:0], col[6:0]}`, row < 60 and column < 80.
* CPU: any 13-bit address. It shares the external half of the table with the
  retina, so choose CPU addresses that no pixel uses (for example rows 60-63).
  CPU events never get the fovea offset.
* Cortex: two chips, each organised as 40 rows of 60 neurons. A neuron is
  `{chip, row[5:0], col[5:0]}`.

## Moving the fovea

In spatial acuity modulation, the synapse table pools many peripheral pixels
onto one cortical cell and few pixels per cell in the centre. To move the
centre of vision, the table is not rewritten. Instead, `fovea_remap` shifts
incoming retina addresses by (`fovea_row_off`, `fovea_col_off`), which are
signed 7- and 8-bit values. A pixel shifted off the 80 x 60 field has no
synapses and is dropped; `st_fovea_drop` pulses when that happens.

## Handshakes and timing

* All AER buses use a four-phase, bundled-data handshake: data valid, then
  `req` up, then `ack` up, then `req` down, then `ack` down. Each receiver
  synchronises the incoming `req` or `ack` with two flip-flops, so the
  external devices may run without a clock. `aer_rx` does not acknowledge a
  new event until the previous one has been taken. Back-pressure therefore
  reaches the sender as a late acknowledge, and no event is dropped.
* One command word on the internal bus is seen by both chips. Only the chips
  it addresses acknowledge. For a broadcast to both chips, the request is
  withdrawn only after both have acknowledged.
* The router costs 3 cycles per line plus the RAM latency, then 1 cycle per
  try plus the handshake, plus `DAC_SETTLE` cycles whenever the equilibrium
  potential changes. In the end-to-end test, 4800 spikes are routed back
  through the table in 35,747 cycles, about 7.4 cycles each. The source
  system is quoted at about one million events per second; this design needs
  a clock of only about 10 MHz for that rate. The clock frequency is not
  fixed by the design.
* Reset (`rst_n`) is asynchronous and active low.

## The analog parts (behavioural models)

`ifat_dac` and `iaf_chip` stand in for analog hardware. They exist so that the
system can be simulated end to end. They are not logic to synthesise.

* `ifat_dac`: latches `code` on a rising `wr` edge and outputs
  `code * VREF_MV / 256` millivolts, as an integer. It is ideal and settles
  instantly.
* `iaf_chip`: 2400 neurons. A command changes every selected neuron by
  `V += w * (E - V) / 64`, in millivolts. This is a conductance-like synapse:
  the step shrinks as V nears E, and E below V inhibits. At `V >= VTH_MV`
  (500) the neuron resets to 0 and its address is queued. Queued spikes go
  out in firing order. A spike that finds the 4096-entry queue full is lost.
  The potentials live in a memory, and the model visits the selected neurons
  one per clock cycle (1 for a cell, 60 for a row, 2400 for a chip) before it
  acknowledges. The real chip updates them in parallel, so the model's command
  time is not the chip's, but the effect on each neuron is the same. After
  reset the model spends 2400 cycles clearing its memory. It runs on the
  system clock for convenience. The real chip's pins and its analog constants
  are not reproduced.

The lookup RAM, the retina and the host computer are off-board parts. Their
buses are ports of `neuromorphic_system`. `tb/lut_ram_model.sv` models the
RAM with a fixed read latency. The testbenches play the roles of the retina
and the CPU.

## Capacity against the intended networks

* Oriented simple cells, 4 retina inputs each, 4800 cells (~19,200 synapses):
  fits. Each pixel's list has at most 4 lines per orientation.
* Salience pooling (8 x 8 windows stepped by 4 pixels): fits. It runs as a
  separate pass over logged simple-cell events, as in the source experiments.
* Foveation with a 16 x 16 fovea and 3 rings (~60,736 synapses): fits. The
  mean list length is about 13 lines.
* MAX network with N inputs: needs 2N+1 neurons and N+N^2 synapses. Each y
  neuron's list holds N lines, so N <= 255 fits. N = 300 does not fit in one
  list without splitting the y cells or using broadcasts.

## Files

| file | role |
|---|---|
| `rtl/ifat_pkg.sv` | widths, RAM line struct, target and command encodings |
| `rtl/neuromorphic_system.sv` | top level |
| `rtl/mux_demux.sv` | retina/CPU merge and return path |
| `rtl/ifat_fpga.sv` | IFAT router: receivers, fovea offset, merge, walker, senders |
| `rtl/lut_router.sv` | synapse-list walker |
| `rtl/fovea_remap.sv` | fovea offset |
| `rtl/aer_rx.sv`, `rtl/aer_tx.sv` | four-phase AER receiver and sender |
| `rtl/aer_arbiter.sv` | round-robin merge |
| `rtl/lfsr16.sv` | random source for probabilistic synapses |
| `rtl/ifat_dac.sv`, `rtl/iaf_chip.sv` | behavioural models of the DAC and the I&F chip |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/tb_feature_extraction.sv`, `tb/tb_salience.sv`, `tb/tb_acuity_modulation.sv`, `tb/tb_max_network.sv` | network workloads, described below |
| `tb/lut_ram_model.sv` | RAM model used by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. A
watchdog ends a run that hangs. For example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ifat_pkg.sv \
    tb/tb_neuromorphic_system.sv --top-module tb_neuromorphic_system -Mdir obj
./obj/Vtb_neuromorphic_system
```

Replace the testbench name to run another block's test. The end-to-end test
runs the design at its default size. It fires one neuron through several
events per synapse, a row of 60 neurons, a global leak, and all 4800 neurons
at once, each spike being looked up again. It also covers a probabilistic
synapse, a 256-line list, and retina events through the fovea offset while the
CPU competes for the bus. It counts each of these mechanisms and fails if one
never happened. The simulator is two-state, so every register that is read has
a reset value.

## Four networks run on the full-size system

Four testbenches program the table with a real network and feed it spikes.

* `tb_feature_extraction`: oriented simple cells. Every cortex neuron is a
  cell with a horizontal 4 x 1 receptive field. The two left pixels excite
  it (E = 781 mV) and the two right pixels inhibit it (E = 0), all with weight
  8. The balance matters. Under uniform light a cell's potential cycles
  between about 340 and 443 mV and never reaches the 500 mV threshold. The
  retina shows a bright vertical band for 10 frames. Only the three cells per
  row whose field straddles the band's right (bright-to-dark) edge fire. The
  left edge has the opposite polarity and stays silent. The testbench
  predicts every cell's spike count with its own copy of the neuron update
  and compares all 4800 counts.
* `tb_max_network`: the MAX circuit. Inputs x_i excite neurons y_i. Each
  y_i excites the output neuron z and inhibits every other y_j (6 events,
  E = 0). The input rates are in the ratio 50 : 30 (strongest : others). Going
  from 1 input to 8, the z count rises only about 1.7x (e.g. 21 to 37 spikes).
  With the inhibition switched off, the same 8 inputs give about 111 z
  spikes. The test asserts these bounds. The ideal MAX would give the same
  z rate whatever the weaker inputs do, and this run only approaches that.
  The model neuron has no leak, so the weaker y cells still fire now and then.
  The constants were picked by hand and are not tuned.
* `tb_acuity_modulation`: a foveated map. A 16 x 16 fovea gives each pixel
  its own cell. Outside it, each 8 x 8 block of pixels is pooled onto one
  cell with a small weight. (A full design would use several rings of
  decreasing resolution and overlapping kernels.) A small bright patch drives
  one pooled cell. When the fovea offset brings the patch into the fovea, it
  drives 16 fovea cells instead. When the offset shifts it off the field,
  every event is dropped. The table is the same in all three runs, and every
  count is checked against a reference model.
* `tb_salience`: the pooling stage of a salience detector, run as a second
  pass. The CPU plays back logged simple-cell events, each carrying its grid
  position. 266 cells pool 8 x 8 windows stepped by 4 positions, so every
  event reaches up to four overlapping windows. An edge segment of events
  makes the windows covering it fire, and an isolated event does not. The
  test checks every window's count against a reference model.

## What to trust, and what is this design's own

The following come from the source design: the system partition, the table
organisation (base index plus offset counter, stop code, per-synapse weight,
event count, probability and equilibrium potential), the 8-bit DAC,
2 x 2400 neurons, the 80 x 60 retina, reserved words that activate many
neurons at once, and the fovea moved by address arithmetic.

The following are choices of this implementation: the handshake style, the
source tag, the target-word encoding, the 40 x 60 chip organisation, the
probability comparison, the DAC-reuse rule, the neuron update constants and
everything about the models' timing. Change any of them in `ifat_pkg` or the
module concerned. The testbenches check behaviour against their own reference
calculations, so they show where a change has consequences.
