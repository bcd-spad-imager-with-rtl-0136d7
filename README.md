# Reconfigurable-macropixel SPAD imager: photon counting, timing and coincidence

This RTL describes the digital part of a 32×32 single-photon avalanche diode (SPAD)
imager. The SPADs are grouped into 16×16 **macropixels** of 2×2 SPADs. A
time-to-digital converter (TDC) takes a lot of area, so each macropixel has only
one TDC, and the four SPADs share it. What the macropixel does with its four
detectors can be set at run time:

* **Single-photon mode.** The first photon in a gate window stops the TDC. A
  WHO register records which SPAD fired, and the timestamp goes into that SPAD's
  own storage register. The image therefore keeps its full 32×32 resolution,
  even though there is one TDC per four SPADs.
* **Two-photon (coincidence) mode.** The TDC stops only when at least two of
  the four SPADs fire within the same event-pulse window (about 1 ns). This
  suppresses uncorrelated background light, at the cost of 16×16 resolution,
  so the macropixel acts like a small 2×2 SiPM.

Each SPAD also has a 5-bit event counter, which gives photon counting (2D
intensity) at the same time as timing. After a frame, a distributed one-hot
shift register reads the array out over 23-bit row buses. The number of words
per macropixel (1, 2 or 4) depends on the readout mode.

## Time measurement

The TDC has 12 bits and a 75 ps LSB, which gives about 300 ns full scale:

| field  | bits | source |
|--------|------|--------|
| coarse | 7    | counts periods of the 415 MHz reference clock (here 2400 ps = 32 × 75 ps) |
| fine   | 5    | 32 bins of 75 ps within one period |
| gate   | 6    | index of the gate window (up to 64 per frame) |

**Fine interpolation with 16 lines for 32 bins.** The clock generator sends 16
column clock lines, `CK<0>`…`CK<15>`. `CK<k>` is the reference clock delayed by
k × 75 ps, with a 50 % duty cycle. Rising edges split the first half-period
into 16 bins and falling edges split the second half. This "dual-edge"
interpolator needs half the clock lines of a design that uses rising edges
only. When STOP arrives, the pixel latches the 16 line levels. In bin b the
latched pattern is a 32-state Johnson code:

* b < 16: lines 0..b are high and the rest are low.
* b ≥ 16: lines 0..b−16 are low and the rest are high.

`thermo_to_bin` decodes this code as `CK<0> ? popcount−1 : 31−popcount`.

**Where the 16 lines come from.** `multiphase_clock_gen` is a behavioural
model with delays, built as a chain of stages:

1. A 16-tap DLL makes taps 150 ps apart. Together they span one period.
2. An edge interpolator adds an edge halfway between neighbouring taps,
   which gives 32 clocks 75 ps apart.
3. Each of the 32 clocks passes a calibration delay, `cal_trim[j]`.
4. A combiner builds line k from two of them. The line rises with clock k
   and falls with clock k+16. Its duty cycle can therefore be trimmed too.
5. A per-line clock-tree delay, `tree_trim[k]`, comes last.

A trim code is 3 bits, and each step is 5 ps. With every code at mid-scale
(4), the lines are ideal. The model has no mismatch, so the trims only move
edges away from the ideal. They are there for testing calibration
procedures.

**Coarse count.** The START latch is global and STOP is per pixel. The coarse
counter counts every reference rising edge that arrives while START is latched
and STOP is not. START has its own global fine interpolator. Its phase is kept
per gate in the START conversion memory, a 64 × 5-bit array addressed by gate
index. The interval is therefore recovered off chip as

    t_STOP − t_START = (coarse·32 + fine_STOP − fine_START[gate]) × 75 ps

The coarse counter stops at 127 (saturates), which marks an out-of-range stop.

## One frame, step by step

All acquisition logic runs on `ref_clk`. `gate` and `frame_rst` must be
synchronous to `ref_clk`. `start` and the SPAD event lines are asynchronous.

1. `frame_rst` clears the counters, the storage registers, the gate counters
   and every TDC. In each TDC, START latch and WHO register, the frame reset
   and the per-gate reset are ORed into one asynchronous clear.
2. A gate window opens when `gate` rises. One `ref_clk` edge later, the pixel
   TDCs and the START latch come out of reset.
3. The `start` pulse sets the global START latch. It must come at least one
   clock after the gate opens.
4. Each macropixel's discriminator lets events through only while `gate` is
   high (soft gating). It raises STOP on the first event, or on two
   overlapping events in two-photon mode. The STOP latch, the coarse counter
   and the fine latch then freeze.
5. `gate` falls. On the first `ref_clk` edge that samples it low, each pixel
   does two things:
   * It stores its conversion, if it was stopped.
   * It advances its gate counter. The global unit writes the START phase
     into its memory at the same edge.
6. From the next edge until one edge after the next gate opens, the TDCs and
   the WHO register are held in reset. The result is one conversion per gate
   window, for up to 64 windows per frame.

The storage rules are:

* **Single-photon mode.** Each SPAD keeps the first timestamp it produced in
  the frame. A later hit by the same SPAD is dropped.
* **Two-photon mode.** The first four coincidences of the frame fill
  registers A, B, C, D in order.

A register that was never written reads as all ones. The macropixel also
records which register holds the frame's first event.

**Event counters.** Counters B, C and D always count their SPAD's pulses,
gated or not, because the counters are fed before soft gating. Counter A counts
SPAD A's pulses in single-photon mode and coincidences in two-photon mode. All
counters saturate at 31.

## Readout

Every macropixel holds a four-stage section of a one-hot shift register. The
sections are chained along the row, from the previous macropixel to the
following one. The static lines FAST, COUNT and FIRST_ONLY, together with
SINGLE/DOUBLE, bypass stages so that the token spends k = 4, 2 or 1 shifts in
each macropixel. The stage that holds the token selects the word the
macropixel drives onto its row bus. The row bus is a precharged shared bus,
modelled as a wired OR.

| mode (`cfg`)                | k | words on the 23-bit bus |
|-----------------------------|---|-------------------------|
| single, normal              | 4 | `{STORE_i[17:0], count_i[4:0]}` for i = A..D |
| single, FAST                | 2 | `{first ts, WHO[1:0], 000}`, then `{000, cntD, cntC, cntB, cntA}` |
| single, FIRST_ONLY          | 1 | `{first ts, WHO, 000}` |
| COUNT (either mode)         | 1 | `{000, cntD, cntC, cntB, cntA}` |
| double, normal (FAST too)   | 4 | `{STORE_i, count_i}`, count_A being the coincidence count |
| double, FIRST_ONLY          | 1 | `{first coincidence ts, coincidence count}` |

Where more than one of COUNT, FIRST_ONLY and FAST is set, COUNT wins, then
FIRST_ONLY, then FAST. A timestamp word is `{gate[5:0], coarse[6:0], fine[4:0]}`.

`array_readout` drives the token, the shifts and the row selector. Every row's
shift register moves in lockstep, so one column of macropixels is selected at
a time. While that column is selected, the row selector scans all 16 row
buses, one per `rd_clk`. Only then does the token advance, so each selected
macropixel has a whole row scan to precharge and drive its bus.

* Output order: column, then word, then row. `rd_row`, `rd_col` and `rd_word`
  label each word.
* A full readout takes `16·16·k + 1` `rd_clk` cycles from `rd_start` to
  `rd_done`.

## Modules

| file | role |
|------|------|
| `spad_pkg.sv` | widths, `tdc_word_t`, `pix_cfg_t`, readout-mode decoding |
| `spad_imager_top.sv` | 16×16 macropixels, clock generator, START unit, row buses, readout |
| `macropixel.sv` | composition of one macropixel |
| `discriminator.sv` | soft gating, first-photon STOP and WHO register, "≥2" coincidence STOP, counter-input mux |
| `pixel_tdc.sv` | STOP latch, 7-bit coarse counter, fine latch, gate counter |
| `thermo_to_bin.sv` | Johnson-code to 5-bit fine code |
| `tdc_start_unit.sv` | global START latch and interpolator, START conversion memory |
| `pixel_control.sv` | per-gate store strobe, gate-counter advance, TDC reset |
| `storage_logic.sv` | STORE_A..D registers, keep-first / first-four policies |
| `event_counters.sv` | four 5-bit saturating counters clocked by their event lines |
| `pixel_readout.sv` | in-pixel shift-register section and word selection |
| `array_readout.sv` | token injection, lockstep shifting, row selector |
| `multiphase_clock_gen.sv` | **behavioural model** (delays, not synthesizable) of the DLL, edge interpolator, calibration, combiner and clock tree |

The SPADs, quenching circuits, edge-interpolator circuits, clock drivers and
supplies are analog. They are not part of this RTL. The top takes the
quenching circuits' event pulses as its `spad_event[row][col][spad]` inputs.
The width of those pulses sets the coincidence window.

## How far to trust it, and where it departs from the original chip

Taken from the chip description:

* the array and macropixel organisation;
* the single-photon, two-photon and counting modes;
* WHO, the per-SPAD registers and the first-four-events rule;
* the TDC split (7 + 5 bits, 75 ps, 64 gates) and the dual-edge fine
  interpolation with 16 lines;
* the global START interpolator and its memory;
* the 5-bit counters;
* the 23-bit row bus with the one-hot distributed shift register, the three
  readout control lines and the cycle counts per mode.

Choices made in this design:

* the gate, reset and store timing described above;
* saturation of the counters and of the coarse counter;
* the bit layout of the bus words and the all-ones empty value;
* the mode priority for combinations not in the table;
* the scan order of the readout;
* lowest-index priority for exactly simultaneous first photons;
* the counter-clock qualification, built as a count enable instead of a gated
  clock;
* `gate` synchronous to `ref_clk`.

Not implemented:

* The "sliding scale" feature of the TDC is named but not described, so it
  is not built.
* The clock generator is a model with ideal stages. It has no
  mismatch, no frequency multiplier and no dummy guard lines. The trim
  width and step are this design's choice.
* The simulations use a 2400 ps period (exactly 32 × 75 ps) instead of
  1/415 MHz ≈ 2410 ps.

Timing-critical asynchronous paths are written as edge-triggered flops:

* the STOP latch is clocked by STOP;
* the fine latch is clocked by the STOP latch output;
* the event counters are clocked by their event lines.

The logic is correct in simulation. On silicon these paths need the usual
full-custom care: metastability between the coarse count and the fine code
near a clock edge, and pulse widths. The store decision samples the STOP
latch directly, without a synchronizer. This is safe because soft gating
closes the STOP path a full clock period before the sampling edge.

## Parameters and sizes

`spad_imager_top` has two parameters, `ROWS = 16` and `COLS = 16`. The other
sizes are the package constants `COARSE_W = 7`, `FINE_W = 5`, `GATE_W = 6`,
`CNT_W = 5`, `BUS_W = 23`, `N_PHASE = 16`, and the clock-trim
format `TRIM_W = 3`, `TRIM_PS = 5`. At the default size the design
has about 31,500 flip-flops. The START memory has 320 bits.

## Simulating

All files use `timescale 1ps/1ps`. The testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. For example, the end-to-end test on a 3×3
array:

    verilator --binary --timing -Irtl -Itb rtl/spad_pkg.sv tb/tb_util_pkg.sv \
      tb/tb_mp_model_pkg.sv tb/tb_spad_imager_top.sv --top-module tb_spad_imager_top
    ./obj_dir/Vtb_spad_imager_top

`tb_spad_imager_full` runs the same test at the default 16×16 size, with six
frames, one per readout mode. It needs about 20 s of simulation after a
one-minute build.

* The unit testbenches are named `tb_<module>`.
* `tb_util_pkg` holds the timing reference: the fine bin of an instant, and
  the coarse count between two instants.
* `tb_mp_model_pkg` is an independent behavioural model of a macropixel. It
  predicts every bus word from the photon pulses the testbench drives.
* The imager testbenches count each mechanism and fail if one never occurs:
  single and double stops, rejected lone photons, WHO ≠ A, dropped hits,
  saturations, empty registers, gates without START, multi-gate tagging and
  every readout mode.

Event and START instants are placed in the middle of a 75 ps bin, so no
latch ever samples a phase line exactly on its edge.
