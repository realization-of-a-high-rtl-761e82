# Digital instantaneous frequency measurement for a 625 MSPS I/Q receiver

This RTL measures the carrier frequency of a radar pulse from its I and Q
samples. It is the phase-and-frequency path of an ELINT digital receiver. Its
main idea is that frequency is the rate of phase change. Every sample's phase
is read from a table. The phase advance between samples T, 4T and 16T apart
is then estimated robustly, and the three estimates are combined into one
phase that is both precise and unambiguous. That phase, rounded to whole
degrees, is the address of an external table holding frequencies. One result
comes out for every 128 samples (204.8 ns) while a pulse is present.

Part of the behaviour follows a published description of the receiver: its
structure, rates and sizes. The rest is this design's own choice. Where the
two differ, the section "Decisions this design makes" says so.

## The measurement, step by step

For a tone of frequency f sampled at fs = 625 MSPS, the phase of I + jQ
advances by 360·f/fs degrees per sample. Over a lag of L samples it advances
by L·360·f/fs degrees. You only ever see that advance modulo 360.

1. **Phase per sample.** Each 7-bit sample (a sign and a 6-bit magnitude) of
   I and Q addresses a 4096-entry table with {|I|, |Q|}. The table holds the
   first-quadrant angle atan(|Q|/|I|) in whole degrees (0..90). The two sign
   bits fold that angle into 0..359:

   | I sign | Q sign | phase   |
   |--------|--------|---------|
   | +      | +      | a       |
   | −      | +      | 180 − a |
   | −      | −      | 180 + a |
   | +      | −      | 360 − a (0 stays 0) |

2. **Phase differences.** 128 consecutive phases are latched. For each lag
   L in {1, 4, 16}, every pair (n, n+L) inside the window gives a
   difference d = ph[n+L] − ph[n]. One turn (360) is added when the result
   is negative. This gives 127, 124 and 112 differences.

3. **Modal filter.** The differences of one lag are sorted into 16 groups of
   22.5 degrees each. The group holding the most differences is taken (on a
   tie, the lowest group number). The estimate is the mean of the
   differences in that group. Samples hit by noise, interference or a
   pulse edge produce differences scattered over other groups. Those are
   simply ignored, where a plain average over all differences would be
   pulled off. The three estimates are φT, φ4T and φ16T, in 1/8 degree
   (12 bits: 9 integer and 3 fractional bits).

4. **Ambiguity resolution.** φT is coarse but unambiguous over the full
   0..fs range. φ16T is sixteen times as sensitive but known only modulo
   360. The resolver unwraps in two steps. Each step picks the number of
   whole turns that puts the finer phase closest to four times the coarser
   unwrapped phase:

       u4  = φ4T  + k·360,  k = 0..3,   nearest to 4·φT   (around a circle of 4 turns)
       u16 = φ16T + m·360,  m = 0..15,  nearest to 4·u4   (around a circle of 16 turns)

   u16 lies in 0 .. 16·360 degrees and equals 16·360·f/fs. Each step is
   right as long as four times the coarser phase's error plus the finer
   phase's error stays below 180 degrees. With the modal filter the errors
   are a few degrees, so there is a wide margin.

5. **Frequency.** `freq_lut_addr = round(u16)` (0..5759, where 5760 wraps to
   0) addresses the external frequency table. One address step is
   fs/5760 ≈ 108.5 kHz. What frequency each address holds depends on the
   analog down-conversion ahead of the ADC, which is why the table is
   external and loaded by the host processor.

## Data path and timing

Everything runs on one clock, `clk` = 625/4 MHz = 156.25 MHz (6.4 ns). The
625/8 MHz block rate is a one-cycle strobe every second clock, not a second
clock.

| Stage | Module | Rate / latency |
|-------|--------|----------------|
| DDR input registers | `ddr_capture` | 2 lanes per channel (I/Id, Q/Qd), both edges: 4 I + 4 Q samples per clock |
| Buffer, sign-magnitude | `block_formatter` | 8 + 8 samples per block, one block per 2 clocks |
| Phase tables, 8 sets | `phase_lut_bank` (8 × `phase_lut`, each 7 × `bram_4kx1`) | 8 phases per block, 2 clocks latency |
| Controller and 128-phase latch | `phase_capture_ctrl` | one window per 16 blocks = 32 clocks |
| Modal filters, lags 1, 4, 16 | `modal_filter` × 3 | 39 clocks from window to estimate; a new window can enter every 32 |
| Ambiguity resolver | `ambiguity_resolver` | 2 clocks |
| Address rounding | `difm_top` | 1 clock |
| Configuration | `spi_config` | phase table and DAC code from the host |
| Trigger, pulse width | `pulse_width_meter` | 2-flop synchroniser; width in clocks |

Within one clock, the samples on the lanes are taken in time order as:
direct lane on the rising edge, delayed lane on the rising edge, direct lane
on the falling edge, delayed lane on the falling edge.

Each modal filter has two stages that overlap. The **histogram stage**
forms 8 differences per clock and adds each to its group's count and sum.
It finishes a window in 16 clocks. The **select-and-divide stage** picks
the largest group. It then computes round(8·sum/count) with a restoring
divider that produces one quotient bit per clock (20 clocks). The
histogram stage is free again after 17 clocks and the divider after 22,
both within the 32-clock window period. So the filter keeps up with
back-to-back windows for as long as a pulse lasts. Assertions in
`modal_filter` flag a window that arrives while either stage is still busy.

From the last sample of a window at the pins to `freq_lut_valid`, the
latency is about 47 clocks. Successive results of one pulse are exactly 32
clocks apart.

## Windows and the data-valid trigger

The video channel is compared with a threshold outside the FPGA. The
threshold comes from a DAC whose code the host writes over SPI (`dac_code`).
The comparator output `thr_in` is synchronised into `dv`, the data-valid
trigger:

* A window starts at a block boundary while `dv` is high. Windows follow each
  other without gaps while it stays high.
* If `dv` falls before 16 blocks are in, the partial window is dropped and
  `win_abort` pulses. Only complete 128-sample windows are measured.
* When `dv` falls, `pw_count` reports how many clocks it was high (6.4 ns
  steps, saturating at 65535), with `pw_valid`.

`dv` lags `thr_in` by two clocks, and the samples reach the latch about six
clocks after the pins. The trigger and the data are therefore not aligned
to the sample. A window can include a few samples from before the
comparator fired. This is one of the things the modal filter is there to
absorb.

## Loading the phase table: SPI frames

The host writes 24-bit frames. The bus uses SPI mode 0 (MOSI sampled on
SCLK rising), MSB first, with CS_N low for the frame:

| bits 23:20 | bits 19:8 | bits 7:0 | action |
|-----------|-----------|----------|--------|
| `1` | table address {\|I\|[5:0], \|Q\|[5:0]} | angle 0..90 in bits 6:0 | write the phase table (all 8 sets at once) |
| `2` | ignored | DAC code | set `dac_code` |
| other | – | – | nothing |

A frame that CS_N cuts short writes nothing. SCLK, MOSI and CS_N are
oversampled by the system clock, so SCLK must stay below clk/4 (39 MHz).
The table content is

    table[{i, q}] = round(atan2(q, i) · 180/π),   i, q = 0..63,   table[{0, 0}] = 0

4096 frames load it, which takes about 4 ms at an SCLK of clk/6. The table
RAMs have no reset. The outputs are meaningless until the table is loaded.

## Number formats

| Quantity | Width | Unit / range |
|----------|-------|--------------|
| ADC sample on a lane | 7 | two's complement; −64 is read as magnitude 63 |
| Phase of a sample | 9 | whole degrees 0..359 |
| φT, φ4T, φ16T | 12 | 1/8 degree, 0..2879 |
| `phi16_unwrapped` | 16 | 1/8 degree, 0..46079 (16 turns) |
| `freq_lut_addr` | 13 | whole degrees of unwrapped φ16T, 0..5759 |
| `pw_count` | 16 | clocks of 6.4 ns |

Shared sizes and types are in `difm_pkg`.

## What is outside this RTL

The top brings these out as ports: the analog IF conditioning and 3 dB
hybrid, the 625 MSPS ADCs (`adc_i`, `adc_q`), the comparator (`thr_in`), the
threshold DAC (`dac_code`), the external frequency table (`freq_lut_addr`,
`freq_lut_valid`) and the host processor (`spi_*`). Differential lane
receivers are FPGA pad primitives, so the lanes enter single-ended.
Amplitude measurement from the second video channel is not implemented.

## Decisions this design makes

The source description fixes the structure: the DDR capture at 625/4 MHz,
the 6+1-bit samples, the blocks of 8, the 4K×7 tables built from seven 4K×1
RAMs in 8 sets, the 0–90° table with sign folding to a 9-bit phase, the 128
latched phases, the differences with a one-turn offset at lags T, 4T and
16T, the 16 groups with the mean of the fullest one, the unwrapped φ16T
addressing an external table, the SPI link and the programmable threshold.
It leaves the following open, and this design chooses:

* two's complement samples, with −64 saturating to magnitude 63;
* the sample order on the DDR lanes;
* table address order {|I|, |Q|} and a two-clock table read;
* all 8 table sets written together;
* the 9.3 fixed-point estimate (a 12-bit estimator output);
* equal 22.5° groups, with a tie going to the lowest group;
* the nearest-turn unwrapping rule;
* the 13-bit whole-degree table address;
* the trigger gating and the dropping of partial windows;
* the SPI frame format and an 8-bit DAC code;
* the pulse width counter;
* a single clock domain with a block strobe;
* an asynchronous active-low reset.

Differences near 0/360 fall into groups 0 and 15, which are not merged.
When a lag's true phase advance sits right at 0/360, its estimate is the
mean of whichever side holds more differences. It is then within about a
degree of the wrap point, and the circular unwrapping handles it.

## How far it has been checked

Each module has a self-checking testbench in `tb/` that compares its
outputs with a reference computed independently of the RTL. Each
testbench was also run against a deliberately broken copy of its module,
to confirm that it fails.

The end-to-end test, `difm_top_tb`, runs at the full default size. It
loads all 4096 table entries over SPI and writes the DAC code. It then
plays 64 pulses. Each pulse is a full-scale complex tone at a random
frequency, quantised to 7 bits, with about one sample in 48 replaced by a
random value. Most frequencies lie between 0.03·fs and 0.97·fs; every fourth
lies within 0.03·fs of 0 or fs, where every phase estimate sits at its wrap
point. Every result address lies within
6 addresses (about 0.65 MHz) of 5760·f/fs. Results are spaced exactly 32
clocks apart, and the pulse widths are exact. The test also counts
dropped partial windows, filter groups that excluded differences, and
unwrapping beyond two turns; each of these occurs.

Behaviour with real radar signals (chirps, phase codes, low SNR, two
signals at once) has not been simulated.

## Simulating

Any testbench builds with plain Verilator 5 (the testbenches carry a
`timescale`, the RTL does not, hence `--timescale`):

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
        rtl/difm_pkg.sv tb/difm_top_tb.sv --top-module difm_top_tb -Mdir obj -o sim
    ./obj/sim

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. Change the pulse count and the width of the
trigger window with the `PULSES` and `HIGH` parameters at the top of
`difm_top_tb`. The full-size test takes a few seconds; loading the table
over SPI is most of it.

## Files

* `rtl/difm_pkg.sv`: sizes, types, SPI command codes
* `rtl/difm_top.sv`: top level
* `rtl/ddr_capture.sv`, `rtl/block_formatter.sv`: acquisition
* `rtl/bram_4kx1.sv`, `rtl/phase_lut.sv`, `rtl/phase_lut_bank.sv`: phase tables
* `rtl/phase_capture_ctrl.sv`: controller and 128-phase latch
* `rtl/modal_filter.sv`: per-lag phase estimator
* `rtl/ambiguity_resolver.sv`: unwrapping
* `rtl/spi_config.sv`: host interface
* `rtl/pulse_width_meter.sv`: trigger and pulse width
* `tb/<module>_tb.sv`: one testbench per module
