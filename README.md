# LATRIC0 — event-driven ring-oscillator TDC for strip LGAD timing

LATRIC0 is a single-channel prototype readout chip for AC-coupled LGAD
microstrip sensors. Each hit is timed with about 30 ps resolution at very low
average power. The main idea is that the time-to-digital converter (TDC) is
**event driven**. A ring oscillator (RO) of 15 NAND delay cells sits stopped
until a hit arrives. The hit's leading edge starts the ring. One delay line
then serves three measurements:

| measurement | from | to | purpose |
|---|---|---|---|
| TOA (time of arrival) | leading edge | next rising clock edge (R1) | hit time relative to the clock |
| CAL (calibration)     | leading edge | the rising edge after that (R2) | R2 − R1 is exactly one clock period |
| TOT (time over threshold) | leading edge | trailing edge | pulse width, for time-walk correction |

CAL − TOA is one clock period measured in cell delays, so every event carries
its own LSB calibration. Once all three values are captured, the ring stops
again. The results leave the chip on two serial lines: a 128-bit raw frame and
a 40-bit encoded frame.

This repository holds SystemVerilog for the whole channel:

- synthesizable RTL for the digital parts;
- behavioural models for the two analog parts: the front-end amplifier with
  its discriminator, and the delay cells of the ring;
- self-checking testbenches for every block and for the whole chip.

## Block structure

```
latric0_top
├── fe_model            front end: amplifier + discriminator   (behavioural)
├── pulse_mux           FE output or external test pulse
├── tdc_core
│   ├── timing_controller   RO_key, gated clock, latch strobes, stop
│   ├── ro_delay_line       15 NAND cells + S2D, 30 phases       (behavioural)
│   ├── coarse_counter      7-bit count of RO periods
│   ├── latch_groups        group1 / group2 / group3
│   └── tdc_encoder         30 phases -> 5-bit fine code
├── shift_serializer #(128) raw frame    -> dout128
└── shift_serializer #(40)  encoded frame -> dout40
```

`latric0_pkg` holds the sizes, the frame structs and the header patterns.

## One measurement, step by step

The timing controller is the hardest part to follow, because it works on
edges of three unrelated signals: the hit pulse, the external clock `clk`,
and a gated copy of the clock.

1. **Idle.** `ro_key` = 0. The ring is held in its reset pattern and the
   coarse counter is at 0. The gated clock `clk_ref = clk | ~ro_key` is held
   high.
2. **Leading edge.** A flip-flop clocked by the pulse sets `ro_key`. The ring
   starts at that instant, and `clk_ref` now follows `clk`.
3. **F0** is the first falling edge of `clk_ref`. It is the next falling
   clock edge, or the arrival itself if `clk` is low at that moment.
   `clk_latch2` rises here and copies group1 into group2. That copy holds
   nothing useful; it is overwritten at F1.
4. **R1**, the next rising clock edge. `clk_latch1` rises, and group1
   samples the 30 ring phases and the coarse count. This is **TOA**.
5. **F1.** `clk_latch2` rises and copies TOA from group1 into group2.
6. **R2.** `clk_latch1` rises again, and group1 samples **CAL**. This
   overwrites TOA, which is now safe in group2.
7. **Trailing edge** (at any point above, or later). `tot_latch` rises,
   and group3 samples **TOT**.
8. **Stop.** On the first falling clock edge after both R2 and the trailing
   edge, the flip-flop `stop` is set. It clears `ro_key`, which stops and
   resets the ring, clears the coarse counter and the edge counters, and
   returns `clk_ref` to static high. `stop` doubles as `data_valid`. It is
   high across exactly one rising clock edge, and on that edge both
   serializers load their frames.
9. `stop` falls at the next falling clock edge, and the channel can accept a
   new hit. A leading edge that arrives while `ro_key` or `stop` is high is
   ignored.

Two small counters, clocked by the falling and rising edges of `clk_ref`,
select which edges produce strobes. `clk_latch1` is enabled after F0 and F1;
`clk_latch2` is enabled before R2. The enables change only while the strobe
they gate is held low by the clock phase, so the strobes have no glitches.

Latency: for a pulse shorter than R2, `data_valid` comes 1.5 to 2.5 clock
periods after the hit. The ring runs for that long; a pulse that ends after
R2 keeps it running until the falling clock edge after its trailing edge.
This is what keeps the dynamic power proportional to the hit rate. The chip
is specified for oscillation of up to about two clock cycles per hit; this
design stops half a cycle after R2 so that the stop cannot race with the CAL
capture, which allows up to 2.5 cycles. The test clock is 720 MHz, a period
of 1389 ps.

## The ring, the fine code and the coarse count

`ro_delay_line` has 15 two-input NAND cells in a ring. `ro_key` drives the
second input of the first cell. All the other cells have that input tied
high, so they act as inverters. With `ro_key` low, the chain rests at
1,0,1,0,… When `ro_key` rises, an edge runs around the ring, one cell every
`STAGE_DELAY_PS` (30 ps), and the ring oscillates with a period of 30 cell
delays (900 ps).

Each cell output passes through a single-to-differential (S2D) converter that
gives a true/complement pair. After polarity correction this yields 30
phases, numbered so that `phase[k]` rises (k+1) cell delays after start,
modulo 30. At m cell delays after start, with f = m mod 30, the 30-bit word
reads:

- f < 15:  `phase[14:0]` has f ones from bit 0 up, `phase[14]` = 0;
- f ≥ 15: `phase[14]` = 1, and `phase[29:15]` has f − 15 ones from bit 15 up;
- always `phase[15+k] = ~phase[k]`.

`tdc_encoder` uses `phase[14]` to choose a half, then counts the ones in it:
fine = popcount(low half), or 15 + popcount(high half). Counting ones, rather
than searching for the edge, also absorbs a single bubble.

`phase[29]` rises exactly once per period, at the wrap from fine value 29 to
0. It clocks the 7-bit `coarse_counter`. A measured interval is therefore

    t = (coarse * 30 + fine) * STAGE_DELAY_PS      (floor, in cell delays)

with a range of 128 × 30 = 3840 codes (115 ns). The counter wraps beyond
that.

## Output frames

Both frames are sent least significant bit first, one bit per `clk` cycle,
starting in the cycle after the load edge. The line is 0 when idle. A
frame's first bit (header bit 0) is 1, so a receiver can find the start of
the frame.

| frame | bits (MSB … LSB) | size |
|---|---|---|
| `dout128` raw | TOT[36:0], TOA[36:0], CAL[36:0], header 17'h15A53 | 128 |
| `dout40` encoded | TOT[11:0], TOA[11:0], CAL[11:0], header 4'b1011 | 40 |

Each raw field is {coarse[6:0], phase[29:0]}, and each encoded field is
{coarse[6:0], fine[4:0]}. A 128-bit frame lasts 178 ns at 720 MHz. A hit that
ends within that time reloads both serializers, which cuts off the raw frame
still being sent.

## What is modelled, and what was chosen here

Taken from the chip's published description:

- the block structure;
- the 15 NAND cells, with only the first gated, and the 30 S2D phases;
- the TOA/CAL/TOT scheme, with its F0/R1/F1/R2 edges and the group1 →
  group2 transfer;
- the gated reference clock, which is static high when idle;
- the stop condition;
- all field and frame widths;
- the shift-register serializers.

Choices made in this design, where the description gives nothing:

- header bit patterns, the field order inside a field (coarse above fine),
  the serial bit order, and the load instant;
- the exact stop instant, and the `data_valid` hand-off;
- the dead time, and the rule that a hit during a measurement is ignored;
- an asynchronous active-low `rst_n` everywhere, which clears the same state
  as `ro_key` low;
- the ring's phase numbering, and coarse counting on `phase[29]`;
- the ones-counting encoder;
- the `sel_test_pulse` select input, and the front end's threshold as a
  `real` input.

Simplifications to keep in mind when trusting the numbers:

- **Ideal analog parts.** Every cell has exactly `STAGE_DELAY_PS`. The S2D
  converters have no skew. The front end is an ideal inverting gain (20) with
  an ideal comparator and a fixed 400 ps delay: no noise, jitter or time walk.
  The simulated DNL, INL and precision are therefore ideal. They say nothing
  about silicon, whose measured LSB was about 31 ps with DNL and INL within
  ±1 LSB.
- **Latch strobes.** The chip strobes its gated SR latches with short pulses.
  Here each group is a register that samples on the rising edge of its
  strobe, which needs no delay elements.
- **Coarse/fine consistency.** Sampling exactly at the fine wrap is a race
  between the coarse counter and the phases. The real chip must resolve it in
  a way that is not described, and this design does not resolve it. The
  testbenches skip the few sample times that fall within 10⁻⁴ cell delays of
  a cell boundary.
- **Flip-flops with two asynchronous clears.** The edge counters and the
  coarse counter are cleared both by `ro_key` low and by `rst_n` low. A
  synthesis flow that allows only one asynchronous load per flip-flop must
  merge the two into one clear net.
- **Behavioural models.** `fe_model` and `ro_delay_line` are not
  synthesizable. The real-valued front end also keeps `latric0_top` from
  being synthesized as a whole. The synthesizable parts are `pulse_mux`,
  `timing_controller`, `coarse_counter`, `latch_groups`, `tdc_encoder` and
  `shift_serializer`.

The future multi-channel chip adds clock fan-out, a configuration block and
channel framing. Those blocks are not part of this single-channel design.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `latric0_top`, `tdc_core`, `ro_delay_line` | `STAGE_DELAY_PS` | 30.0 | delay of one NAND cell, in ps (the LSB) |
| `fe_model` | `GAIN`, `DELAY_PS` | 20.0, 400.0 | front-end gain and output delay |
| `shift_serializer` | `WIDTH` | 128 | chain length (40 for the encoded frame) |
| `latric0_pkg` | `HEADER128`, `HEADER40` | 17'h15A53, 4'b1011 | frame headers |

All modules declare `timeunit 1ps; timeprecision 1fs;`, so real-valued
delays hold their sub-picosecond values.

## Testbenches

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs.
Expected values come from `tb/tdc_ref_pkg.sv`, which derives them from
measured times alone:

    m = floor(dt / 30 ps), coarse = m / 30, fine = m % 30

| testbench | what it checks |
|---|---|
| `tb_latric0_top` | The whole chip at default parameters. It sends test-pulse hits and 16.8 mV analog hits. It deserializes both lines and compares every raw and encoded field with the times it applied. It checks the LSB derived from CAL − TOA. It also counts each mechanism: both modes, arrival in either clock phase, a pulse ending before R1, a pulse outlasting R2, a coarse count above 0, a 210 ps pulse, and an ignored pulse. |
| `tb_latric0_scans` | TOA and TOT transfer-curve scans: 25 ns in 1 ns steps, 1 ns in 6 ps steps, and 5–6 ns in 10 ps steps. It fits the LSB, derives the calibrated LSB, and checks DNL. |
| `tb_tdc_core` | 66 hits at random sub-ps times. It checks raw and encoded fields, CAL − TOA, `data_valid` timing, and that a second pulse is ignored. |
| `tb_timing_controller` | The time of every strobe edge against F0, R1, F1, R2 and the trailing edge. Also the `clk_ref` gating, the stop, and that `data_valid` lasts one edge. |
| `tb_ro_delay_line` | The reset pattern, the phase pattern at every cell interval, and one wrap per 900 ps. |
| `tb_coarse_counter`, `tb_latch_groups`, `tb_tdc_encoder`, `tb_shift_serializer`, `tb_pulse_mux`, `tb_fe_model` | Block-level behaviour, as described in each file's header. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/latric0_pkg.sv tb/tdc_ref_pkg.sv tb/tb_latric0_top.sv \
  --top-module tb_latric0_top -o sim
./obj_dir/sim
```

Replace `tb_latric0_top` with any other testbench name. `-Wno-fatal` is needed
because Verilator warns (ZERODLY) about delays taken from task arguments.
Each run takes well under a second of CPU time.
