# PLAS — a pipelined, asymmetric switched-capacitor analog memory with no readout dead time

PLAS is the front-end of a 32-channel waveform digitiser for a silicon pad detector. Every input is
sampled at 200 MS/s (both edges of a 100 MHz clock). When a channel triggers, a 1.12 µs window
(32 samples before the trigger, 192 after) is kept. The window is stored as charge on capacitors,
then sent out slowly: one analog sample per 20 ns on a single differential line, in a frame that
also carries digital data (channel, timestamp, ECC). An external ADC digitises it.

A classic analog memory gives every channel a full-length switched-capacitor array (SCA). That channel
is then dead from its trigger until its slow readout has finished. PLAS splits the memory into two
stages instead:

* **First stage, one per channel.** A short 32-cell SCA samples continuously as a ring buffer. It
  always holds the last 32 samples (160 ns).
* **Second stage, shared.** Eight *slots*. Each slot has a 192-cell post-trigger SCA and a 32-cell
  storage buffer. A full-mesh 32 × 8 switching matrix connects any channel to any slot.

On a trigger, the channel's ring buffer is frozen and a free slot is connected. The slot's 192-cell
SCA records what comes after the trigger. During those 192 samples, the frozen 32 cells are copied
into the slot's storage buffer. When the 192 cells are full, the copy is done and the channel
samples again at once. The channel's dead time therefore does not depend on the readout. The chip
only loses events when all eight slots hold unread events. The slots act as an analog FIFO: they
are read out in the order they were filled.

The cost is 32 × 32 + 8 × 224 = 2816 capacitor cells. Full channels would need 32 × 224 = 7168.

This repository is a SystemVerilog model of the whole chip. The digital control is written as
synthesizable RTL. The analog parts are behavioural models in which every voltage is a
millivolt-valued integer: the input amplifier, comparators, DACs, capacitor arrays, matrix switches
and output amplifier.

## The clock and what a "tick" is

The chip writes on both edges of a 100 MHz write clock. The model uses one clock, `clk`, with one
tick per write-clock edge (5 ns, 200 MHz). Everything is in that one domain:

| quantity | ticks | time |
|---|---|---|
| one sample | 1 | 5 ns |
| timestamp LSB (one write-clock period) | 2 | 10 ns |
| one readout step (one output symbol) | 4 | 20 ns (50 MHz) |
| copying one pre-trigger cell | 4 | 20 ns |
| post-trigger capture, channel lock | 192 | 960 ns |
| one event frame | 299 × 4 = 1196 | 5.98 µs |

The readout step is derived from the same clock (divide by 4). `rd_step` marks the last tick of
each step, which is when a receiver should sample `out_p`/`out_n`.

## Life of an event

This is the part that needs care. Times are in ticks; edge E0 is the clock edge on which the trigger
is granted.

1. **Sampling (before E0).** `pretrig_ctrl` advances a write pointer `wp` once per tick and closes
   the switch pairs of cells `wp` and `wp+1`. Two cells are active at any time: cell `wp` takes its
   final value at this edge, and cell `wp+1` already tracks the input. `sca_channel` models a cell
   as following the input while its switch pair is closed and keeping the last value once it opens.
2. **Trigger (edge E0).** `trigger_logic` raises `trig` for one tick. In the same tick,
   `queue_ctrl` grants slots from its write pointer onward, combinationally, to every channel
   asking. If several channels ask in one tick, the lowest channel number goes first. A channel
   that finds no free slot loses its trigger. At E0:
   * the granted channel's `pretrig_ctrl` latches `trig_pos = wp` and locks. On this one tick the
     look-ahead cell `wp+1` is left open, so the 32 cells hold exactly samples E0−31 … E0;
   * the slot's `slot_ctrl` latches the channel number, `trig_pos` and the timestamp, and closes its
     matrix column.
3. **Capture (ticks 1 … 192 after E0).** The slot's 192-cell SCA samples the channel input with the
   same two-cell window; cell *k* holds sample E0+1+*k*. At the same time the channel's SCA is in
   read mode (switch `r` closed): it puts cell 0, 1, … 31 on its output for 4 ticks each. The slot's
   storage buffer writes the same cell index from the matrix. The copy takes 128 ticks, well inside
   the 192 (both controllers assert this).
4. **Re-arm (tick 192).** The channel unlocks and continues its ring at `trig_pos+1`. A new trigger
   is accepted at once. The ring holds 32 fresh samples 32 ticks later.
5. **Waiting.** The slot is *ready* and waits in the FIFO. `EMPTY` and `FULL` show the queue state.
   While `FULL` is high, every channel's trigger is blocked.
6. **Readout.** `readout_ctrl` sends the head slot when `start` is high, then frees the slot.

The pre-trigger cells are copied in physical order, not in time order. The receiver puts them in
time order using the start position: the oldest pre-trigger sample is in buffer cell
`(start_pos + 1) mod 32`.

## Triggering

Each channel has two comparators on its amplified signal, with thresholds set by per-channel DACs.
`trigger_logic` combines four sources, each enabled per channel:

* **leading edge:** comparator 1 becomes active;
* **hysteresis** (option on the leading edge): after a trigger, comparator 1 is ignored until
  comparator 2 (lower threshold) reports that the signal has fallen back. A noisy falling edge
  cannot retrigger;
* **external:** rising edge of the channel's board trigger input `ext_trig[c]`;
* **global:** rising edge of any of the four `gtrig` lines whose bit is set in the channel's mask.

Inputs are registered once before edge detection, so `trig` follows an input edge by two ticks.
`trig` is suppressed while the channel is locked or the queue is full. `trigger_out` is high when
any channel issues a trigger.

## The event frame

The output shows one symbol per 50 MHz step:

| part | steps | content |
|---|---|---|
| idle | any | 0, 1, 0, 1, … (training pattern) |
| header | 4 | `1100` (the idle pattern never has two equal bits in a row) |
| input channel | 7 | channel that triggered |
| start position | 5 | pre-trigger cell written on the trigger tick |
| output channel | 4 | slot that held the event |
| timestamp | 36 | write-clock periods since `ts_rst` |
| reserved | 5 | 0 |
| ECC | 7 | SEC-DED check bits over the 57 bits above |
| samples | 7 × (1 + 32) | for each 32-cell section: one wait step, then 32 samples |

Bits go MSB first. The samples are storage-buffer cells 0–31 (pre-trigger), then post-trigger cells
0–191. The total is 4 + 64 + 231 = 299 steps = 5.98 µs.

The ECC is a Hamming(63,57) code plus an overall parity bit. The 57 information bits, MSB first,
occupy the codeword positions 1…63 that are not powers of two. Check bit *p_j* is the parity of all
positions with bit *j* set. The ECC field is `{overall, p5 … p0}`. A receiver XORs the positions of
all set bits (check bits at positions 1, 2, 4, … 32). A zero result with even overall parity means
no error. A non-zero result with odd parity gives the position of a single error. A non-zero result
with even parity means a double error.

On the analog output, digital 0/1 become 0.3 V/1.5 V. Wait steps are 0.9 V. Samples are the stored
voltage. `out_p` and `out_n` are symmetric about 0.9 V.

## Configuration (I2C)

`i2c_config` is an I2C slave at address `0x2A`. It samples SCL/SDA with the sample clock, and SDA is
open drain (`sda_oe` = pull low). It uses an 8-bit register pointer with auto-increment:
`S 0x54 A ptr A data A … P` to write; `S 0x54 A ptr A Sr 0x55 A data M … N P` to read.

| address | bits | meaning |
|---|---|---|
| 4c + 0 | 5: `pol`, 4: `test_sel`, 3: `vref_sel`, 2: `en_ext`, 1: `en_hyst`, 0: `en_lead` | channel c trigger mode, input and reference selection |
| 4c + 1 | 3:0 `gmask` | sensitivity to the global triggers |
| 4c + 2 | `thr_hi` | comparator 1 threshold, 8 mV per LSB |
| 4c + 3 | `thr_lo` | comparator 2 threshold, 8 mV per LSB |
| 128 + 2g + r | code | reference r (0: Vref1, 1: Vref2) of channel group g (channels 8g … 8g+7), 8 mV per LSB |

Every register resets to 0, so all channels start with every trigger source off.

## The analog models and how far to trust them

* `input_stage`: `sig = Vref − (R2/R1)·(vin − Vref)`, clipped to 0.3–1.5 V. The input is
  either the pin or the common `test_in`. Vref is one of the group's two references. By default
  R2/R1 = 1. `pol` flips both comparators to fire below their threshold.
* `sca_channel`: ideal capacitors. There is no charge injection, droop, noise or settling; a cell's
  value is the input at the last tick its switch pair was closed.
* `switch_matrix`: ideal switches; an open column reads 0.
* `output_driver`: ideal DAC, multiplexer and differential amplifier.

The models have the real parts' switch-level ports (w, r, f, a_i/b_i of each SCA; the matrix
columns). The digital sequencing can therefore be checked against them, but they say nothing about
analog performance. They are synthesizable, but they describe analog circuits, not gates.

## Modules

```
plas_top
├── i2c_config           configuration registers
├── timestamp_counter    36-bit, counts write-clock periods, cleared by ts_rst
├── g_ch[32]
│   ├── input_stage      (behavioural) amplifier, DACs, comparators
│   ├── trigger_logic
│   ├── pretrig_ctrl     ring sequencer, lock, copy, re-arm
│   └── sca_channel      (behavioural) 32-cell pre-trigger SCA
├── queue_ctrl           slot FIFO, grants, EMPTY/FULL
├── switch_matrix        (behavioural) 32 x 8
├── g_slot[8]
│   ├── slot_ctrl        ID/position/timestamp registers, capture and copy, read access
│   ├── sca_channel      (behavioural) 192-cell post-trigger SCA
│   └── sca_channel      (behavioural) 32-cell storage buffer
├── readout_ctrl         frame generator, contains ecc_secded
└── output_driver        (behavioural) DAC, output mux, differential amplifier
```

`plas_pkg` holds the sizes, the frame field widths, the header, the millivolt coding, the
configuration struct `ch_cfg_t` and the frame struct `frame_info_t`. `plas_top` has parameters `NC`
(channels, 32) and `NS` (slots, 8, a power of two).

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/plas_pkg.sv tb/tb_plas_top.sv \
          -y rtl -y tb --top-module tb_plas_top -Mdir obj_top
./obj_top/Vtb_plas_top
```

It builds in about 20 s and runs in under a second. `tb_plas_top` configures all 32 channels over
I2C, drives pulses, board and global triggers and the test input, and decodes the output like a
receiver: it finds the header, checks the ECC, and re-orders the pre-trigger samples. It then
requires each frame's 224 samples to equal 224 consecutive values of the stimulus. It covers and
counts:

* leading edge;
* hysteresis suppressing a re-crossing, and the same waveform retriggering without hysteresis;
* retriggering right after re-arm;
* external, global and test-input triggers;
* several slots capturing at once;
* a full queue refusing triggers;
* FIFO order;
* readout held off by `start`;
* timestamp reset;
* frame length.

`tb/tb_plas_rate.sv` runs the event-rate workload at full size, in about 4 s. It sends 60
pulses on random channels at an average of 50 k events/s. Every pulse must come out as a correct
frame, and the queue never holds more than two events. It then sends a 1 M events/s burst. The
eight slots fill, further triggers are refused, and frames leave back to back every 300 steps:
a 299-step frame plus one idle step, 6.0 µs.

The unit testbenches compare against models written independently of the RTL. Examples are a
reference FIFO for `queue_ctrl`, a syndrome decoder for `ecc_secded`, and an I2C master for
`i2c_config`.

## Where this model departs from, or adds to, the described chip

* **One clock.** The double-edge write clock is one tick per edge. READ CLK is not a separate
  input: readout runs from the same clock divided by 4, and `rd_step` is an added output.
* **`start`** is treated as a readout enable.
* **This design's own choices:** the frame header value (`1100`), the place of the wait step (at
  the start of each 32-cell section), the ECC bit mapping, and the output levels.
* **I2C and registers:** the I2C address, register map and protocol are this design's. So are the
  8-bit/8 mV DACs and the comparator polarity bit.
* **Copy:** runs at 50 MHz in physical cell order. The receiver un-rotates the samples with the start
  position.
* **Lost triggers:** simultaneous requests are served lowest channel first. A refused trigger is
  lost, not held.
* **Timestamp:** counts write-clock periods (10 ns). The start position gives the sample within the
  window.
* **Not modelled:** the charge preamplifiers, the board's shaping and trigger circuit, the external
  line driver, and the back-end ADC and FPGA. They appear only as the top's pins (`vin`,
  `ext_trig`, `out_p`/`out_n`).
