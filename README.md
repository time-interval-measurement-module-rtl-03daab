# Time interval measurement module for a Zynq-class SoC FPGA

This design measures the time between a START edge and a STOP edge with
sub-picosecond resolution, and moves the raw results into processor memory
fast enough for calibration runs of a million measurements. Two ideas carry it:

* **Three stages of timing.** A 500 MHz counter gives the coarse count of
  whole 2 ns periods. A 16-phase clock places each edge within 125 ps. Tapped
  delay lines then place it within that 125 ps step, about 0.49 ps per tap.
  The interval is

      T = N*T0 + (T_ST1 + T_ST2) - (T_SP1 + T_SP2)

  Here N is the period count and T0 = 2 ns. T_x1 is the first-stage (phase)
  delay of an edge and T_x2 its second-stage (delay line) delay.
* **No processor in the data path.** The counter hands each result over as one
  896-bit frame on a clock-free four-phase handshake. A *translation module*
  cuts the frame into 32-bit AXI-Stream words for a DMA engine, which writes
  them to DDR memory. The processor only writes the number of measurements it
  wants, then reads memory. The counter has its own clock and knows nothing of
  AXI.

The hardware never decodes the delay-line codes into picoseconds. Calibration
and decoding are left to software; the hardware only removes conversion errors
and compresses the codes without loss.

```
             AXI4-Lite (CTRL, COUNT)              AXI-Stream 32 b
 processor ------------------------> translation ------------------> DMA -> DDR
                                      module
                                        ^  READY / VALID / FRAME[895:0]
                        src_sel=0       |       src_sel=1
           START,STOP -> tic  ----------+-------- frame_generator <- AXI4-Lite
           clk500 ------/                         (software-loaded frame)
```

`tim_top` holds everything the FPGA fabric contains. The DMA engine, the
processor system and its memory are not part of the RTL. Their sides of the
buses are the top's ports.

## The counter (`tic`)

Each input (START and STOP) has its own *interpolator* channel. Both channels
share the period counter and the counter interface.

### Multi-phase clock and first stage (`mpc`, `fis`)

`mpc` makes 16 copies of the 500 MHz clock. Each copy is delayed 125 ps more
than the one before (0, 22.5, ... 337.5 degrees). In silicon this is a chain of
buffers. Here it is a **behavioural model** built from delays.

When a hit arrives, `fis` samples the 16 phases on its rising edge. The 16
samples form a rotated thermometer code. Its single 1→0 boundary gives the
4-bit number of the phase after which the hit came (`code`). A first-stage
delay of `(15 - code) * 125 ps` is one consistent way to use it; the
testbenches decode it that way. The same block gives two more outputs:

* `hit_flag` is set by the first hit and held until `rst`. It is the trigger
  for the period counter.
* `sync` is the rising edge of the first phase that follows the hit. It
  latches the second stage.

Later hits are ignored until `rst` (single-shot operation).

### Second stage: pattern generator, delay lines and code converter (`tcdl`, `sis_code_converter`)

This is the least obvious part of the design.

**Delay line.** The hit starts a *pattern*: a square wave with six edges. The
pattern travels along a 256-tap delay line that spans exactly one phase step
(125 ps / 256 = 0.488 ps per tap). At the `sync` edge, delayed by Δt to match
the pattern generator's own delay, the 256 taps are latched. The positions of
the pattern edges in the latched word tell how long ago the hit was, measured
from the sync edge. Six edges, each falling at a slightly different
place within its tap, average out the taps' unequal widths. For the same
reason each channel has **three** such lines. Their patterns are offset by a
third of a tap so that their quantisation steps interleave.

`tcdl` is a **behavioural model** of the generator and one line. The model's
parameters are:

* `PG_DELAY_PS`, the pattern generator delay;
* `EDGE_GAP_TAPS`, the spacing of the six edges;
* `DT_PS`, the latch delay Δt.

A real line is a placed carry chain and cannot be written as portable RTL.

**Code converter.** The latched word holds "bubbles": single taps that are on
the wrong side of an edge because of uneven tap delays and flip-flop skew.
`sis_code_converter` is synthesizable logic that works in three steps:

1. A 3-tap majority vote low-pass filters the word (the two ends are padded by
   repeating the end taps). This removes one-tap bubbles.
2. An XOR of neighbouring taps gives the derivative of the word. Each bit is 1
   where a pattern edge sits. Tap 0 never marks an edge.
3. The 256 edge marks are cut into 32 groups of 8. The edge spacing
   guarantees that a group holds one of only 15 patterns, so each group fits
   in 4 bits. That gives 2:1 compression, 256 → 128 bits, without loss.

| code  | pattern in the 8-bit group (bit index of each edge) |
|-------|------------------------------------------------------|
| 0     | no edge                                              |
| 1..8  | one edge at bit 0..7                                 |
| 9..14 | two edges at (0,5) (0,6) (0,7) (1,6) (1,7) (2,7)     |
| 15    | anything else: error                                 |

Two edges in one group are only legal when they are at least 5 taps apart.
This requires that the real edge spacing and pattern timing be trimmed. With
six edges 20 taps apart, a group never holds more than one edge in practice.
The pair codes exist for tighter patterns.

### Period counter (`period_counter`)

A 30-bit counter of 500 MHz periods. The two first-stage trigger flags each
pass an equal two-flop synchroniser. The counter counts every clock edge at
which START has been seen and STOP has not. `done` rises when both have been
seen, and the count is then final. The counter covers 2^30 × 2 ns = 2.1 s.
A 32-bit counter would give over 4 s and still fit the 32-bit PERIOD field of
the frame; `CNT_W` sets it.

### Counter interface and frame (`tic_interface`)

This block runs on the 500 MHz clock. It performs the following sequence:

1. It waits for READY.
2. It resets both channels and the counter with a 2-cycle pulse on
   `meas_rst`. Hits that arrived while nothing was asked for are thrown away.
3. It waits for `done`, then `SETTLE` (3) cycles so that the second-stage
   latches and converters are stable.
4. It registers the frame, increments the frame number and raises VALID.
5. When READY falls, it drops VALID.

The 896-bit frame is seven 128-bit words. Narrow fields are zero-extended:

| bits     | content                                                                        |
|----------|--------------------------------------------------------------------------------|
| 127:0    | generic word: FIS STOP [127:96], FIS START [95:64], PERIOD [63:32], FRAME NO [31:0] |
| 255:128  | START line 0 codes                                                             |
| 383:256  | STOP line 0 codes                                                              |
| 511:384  | START line 1 codes                                                             |
| 639:512  | STOP line 1 codes                                                              |
| 767:640  | START line 2 codes                                                             |
| 895:768  | STOP line 2 codes                                                              |

Of the 896 bits, 806 carry measurement data: 30 + 2×4 + 2×384.

The `tim_pkg` package defines this layout as the packed struct `tic_frame_t`.

### Decoding a frame

`tb/tb_tic.sv` shows how software turns a frame into time. For each channel:

1. Find the pattern edges in each line's 128-bit code.
2. Convert the edge positions into the fine time from the hit to the next
   phase edge. The line's generator delay and Δt must be known.
3. Add `(15 - FIS) * 125 ps`.

Then combine with the period count. In the model, the measured interval agrees
with the true one to within two taps (about 1 ps). Real hardware needs the statistical
calibration that the large calibration runs serve. Calibration is not part of
this RTL.

## The frame bus

The counter and the translation module share no clock. They use a four-phase
handshake:

1. The master (translation module) raises **READY** to ask for a measurement.
2. The slave measures, puts the frame on **FRAME** and raises **VALID**. FRAME
   stays stable while VALID is high.
3. The master copies FRAME and drops READY.
4. The slave drops VALID. When both lines are low again, a new request may
   start.

Each side passes the other's line through a two-flop synchroniser. FRAME needs
no synchroniser, because it is stable whenever VALID is seen.

## The translation module (`translation_module` = `register_bank` + `stream_ctrl`)

### Registers (AXI4-Lite, 32-bit, byte strobes honoured)

| offset | name   | contents                                                                            |
|--------|--------|-------------------------------------------------------------------------------------|
| 0x00   | CTRL   | bit 0 nRES: 0 holds the stream controller in reset (value after power-up: 0)        |
| 0x04   | COUNT  | number of measurements per run                                                      |
| 0x08   | STATUS | bits 2:0 controller state (0 RESET, 1 IDLE, 2 REQ, 3 WR, 4 STEP); bit 3 run done     |
| 0x0C   | FRAMES | frames sent since the last reset                                                    |

The stream controller is held in reset by the power-on reset (asynchronous) or
by CTRL.nRES = 0 (synchronous). The register bank itself only follows the
power-on reset. A typical run goes like this:

1. Write COUNT.
2. Write CTRL = 1.
3. Start the DMA.
4. Wait for the DMA to finish.
5. Write CTRL = 0 to prepare the next run.

### Stream controller state machine (`stream_ctrl`)

* **RESET**: all registers at their defaults.
* **IDLE**: COUNT is sampled here and only here. The run starts when the DMA
  shows TREADY, COUNT is not zero and no old VALID is still high.
* **REQ**: READY is high. When VALID is seen, the frame is captured and the
  state moves to WR.
* **WR**: the frame goes out as 28 words, one per TREADY cycle. Each 128-bit
  frame word is sent big endian (bits 127:96 first), in table order. The first
  four words of a frame are therefore FIS STOP, FIS START, PERIOD and
  FRAME NO. TLAST marks the last word of the last frame; after it everything
  drops and the state returns to IDLE. After the last word of any other frame,
  READY and TVALID drop and the state moves to STEP.
* **STEP**: the remaining-frames counter is decremented. The state waits for
  the counter to drop VALID, then goes to REQ.

A DMA stall (TREADY low) holds the current word. A slow counter simply
lengthens REQ.

Timing per frame:

* 28 WR cycles;
* about 3 aclk cycles for READY to reach the slave;
* the slave's measurement time;
* 2–3 cycles to see VALID;
* about 5 cycles of STEP.

With the frame generator and no extra delay, the simulated steady state is
41 cycles per 112-byte frame (28 words plus 13 cycles of handshake). At a
100 MHz aclk that is about 273 MB/s. A single frame takes 28 cycles from
its first word to its last. Memory-side throughput of a Zynq-class device
saturates lower, near 200 MB/s, so the stream is not the bottleneck.

## The frame generator (`frame_generator`)

The frame generator stands in for the counter when the board cannot host it,
for example because it lacks the low-jitter input buffers START and STOP need.
Software writes a 28-word frame at offsets 0x000–0x06C; word i is frame bits
32i+31:32i. It also sets DELAY at 0x100. The generator then answers every
READY like the counter would, raising VALID DELAY+4 aclk cycles after READY
rises and dropping it 3 cycles after READY falls. It always serves the same
frame, so software can test the whole memory path and the decoding code with
known data.

## Top level (`tim_top`)

`tim_top` has the following ports:

* two AXI4-Lite slaves: `tm_axil_*` for the translation module and `fg_axil_*`
  for the frame generator;
* the AXI-Stream master `m_axis_*`, towards the DMA;
* `clk500`, `start` and `stop` for the counter.

`src_sel` selects the frame source: 0 for the counter, 1 for the frame
generator. The source that is not selected sees READY low.

Having both sources behind a select pin is a convenience of this
implementation. The original system used one source or the other depending
on the board.

`aclk` and `clk500` are independent clocks.

## What is synthesizable

The following modules are synthesizable RTL:

* `tim_pkg`, `axil_regif`
* `register_bank`, `stream_ctrl`, `translation_module`
* `frame_generator`
* `fis`, `sis_code_converter`, `period_counter`, `tic_interface`

`mpc` and `tcdl` are behavioural models: they use delays and real-valued time.
Because of them, `interpolator`, `tic` and `tim_top` simulate but do not
synthesize as they stand. To build the real counter, replace `mpc` and `tcdl`
with placed buffer chains and carry-chain delay lines for the target FPGA.
Their ports stay the same.

`fis` and the latches in the delay-line model are clocked by the hit and
phase signals themselves, as the method requires. They therefore need timing
constraints written for the specific device.

## Departures and choices

* **Delay-line length.** The delay lines cover one phase step of 125 ps: 256
  taps of 0.488 ps.
* **Grouping.** The code converter groups 8 taps per 4-bit code. This gives
  32 groups and 128 bits per line, the 2:1 compression the original describes.
  A grouping of 16 taps would not reach 128 bits.
* **Counter width.** The period counter is 30 bits, as carried in the frame,
  rather than the 32 bits mentioned for a 4 s range.
* **Design choices of this implementation:**
  * the register map and the STATUS/FRAMES registers;
  * the frame generator's register map and DELAY register;
  * the legal pair patterns of the code converter and their code numbers;
  * the pattern timing of the delay-line model (six edges 20 taps apart,
    20 ps generator delay, Δt = generator delay + 2 taps);
  * the one-third-tap offsets between the three lines;
  * SETTLE, the 2-cycle reset pulse, and frame numbering starting at 0.
* **Stream timing.** All stream outputs change just after the rising edge of
  aclk, as in standard AXI. The original describes them changing on the
  falling edge. Either way, the receiver samples them on the rising edge.
* **Ignored requests.** A COUNT of zero keeps the controller idle.
* **Not included.** The DMA engine, the processor system, the processors'
  mailbox protocol and the graphic LCD controller.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs. The models `tb/axil_master.sv` (AXI4-Lite bus tasks) and
`tb/tic_slave_model.sv` (a frame-bus slave with random delays) are shared.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/tim_pkg.sv tb/tb_tim_top.sv --top-module tb_tim_top
./obj_dir/Vtb_tim_top
```

Replace `tb_tim_top` with any other testbench name. The sources are plain
IEEE 1800-2017. `-Wno-fatal` is needed because Verilator warns about the
randomised delay statements of some testbenches.

| testbench                | what it checks                                                                                    |
|--------------------------|---------------------------------------------------------------------------------------------------|
| `tb_stream_workload`     | the throughput sweep: 16 B to 64 KiB in doubling steps, each as ceil(size/112) frames through the frame generator, with frames built like the emulation software's calibration and measurement modes; every word checked, every frame decoded back to its edge positions, cycles per frame bounded |
| `tb_tim_top`             | whole design at default sizes:                                                                    |
|                          | • 3 frames from the frame generator, word for word                                                |
|                          | • a switch to the counter, then 2 real START/STOP measurements (frame number, period count, interval to ±130 ps) |
|                          | • counts of DMA stalls, STEP passes, TLASTs, source switches and soft resets                      |
| `tb_translation_module`  | runs over the register interface against a random-delay counter; word order, TLAST, nRES          |
| `tb_stream_ctrl`         | every word and TLAST against random-TREADY stalls, one word per cycle at full TREADY, state visits, reset |
| `tb_register_bank`       | register reads and writes, byte strobes, reset values                                             |
| `tb_frame_generator`     | buffer, DELAY latency (DELAY+4), release timing                                                   |
| `tb_tic`                 | 441 checks over random intervals from 0.3 ns to 100 µs, decoded to within 2 taps                  |
| `tb_tic_interface`       | reset pulse, settle time, frame layout, frame numbers, bus protocol                               |
| `tb_period_counter`      | count and `done` timing against clock edges counted independently, random trigger times           |
| `tb_fis`                 | phase code, sync edge and hit flag for hits at random times; reset clears them                    |
| `tb_mpc`                 | phase i follows the clock by i × 125 ps, 2000 ps period on every phase                            |
| `tb_tcdl`                | six pattern edges at the right taps for random elapsed times; reset; a second trigger is ignored  |
| `tb_sis_code_converter`  | random words with up to six edges, either polarity, isolated bubbles; codes computed from the edge positions; illegal groups give 15 |

Everything runs at the default sizes: 896-bit frames, 16 phases, 256 taps,
3 lines and a 30-bit counter. The counter's testbenches advance time in
femtoseconds, so they are the slowest.

## How far it has been verified

Every testbench above passes. Each block's testbench was also run against a
copy of the block with one deliberate fault, such as:

* TLAST on every frame;
* byte strobes ignored;
* a phase code off by one;
* no bubble filter;
* a swapped frame field;
* the counter started by the wrong trigger.

Each of these faults was caught. The whole design runs end to end at its
default sizes, both from the frame generator and from real START/STOP edges.

What simulation cannot show:

* **Delay-line model.** The second-stage results come from the behavioural
  delay-line model, which has ideal, equal taps. On silicon, tap widths vary.
  The code converter's bubble removal and the three interleaved lines are
  there for that, and the calibration that absorbs it is done in software.
* **Clocking of the first stage.** The hit-clocked logic of the first stage
  needs device-specific placement and constraints. Its behaviour has only been
  checked in simulation.
* **Run length.** The longest stream simulated is 586 frames in one run
  (1,179 frames over the whole sweep). The 32-bit counters would allow runs of
  a million frames and more.
* **DMA.** The DMA engine is represented by a simple always-ready or
  randomly stalling sink.
