# Toroid beam-loss interlock: FPGA logic of one TPS unit

A linac that carries tens of kilowatts of beam in a sub-millimetre spot can melt
hardware within microseconds if the beam goes astray. The Toroid Protection System
(TPS) watches for this by measuring the charge of every bunch twice: with a
current toroid upstream and another downstream. Any charge that enters the section
but does not leave it was lost on the way. A downstream charge that is too high
also counts: when the beam scrapes material between the toroids, secondary
electrons can add to the downstream signal. In either case the TPS raises an
interlock alarm that switches off the photo-injector laser.

This repository holds synthesizable SystemVerilog for the digital part of one TPS
unit. It covers the FPGA that receives the four ADC streams and decides on the
alarms. At FLASH four such units each guard one section of the machine. Each unit
would be one instance of `tps_top`.

## Measuring a bunch charge: differential sampling

A toroid answers a bunch with a short pulse sitting on a baseline that wanders
(offset, droop after each pulse). Each toroid therefore feeds two 14-bit ADCs:

* the **top** ADC is clocked so that it samples the peak of the pulse;
* the **bottom** ADC is clocked later in the bunch period, on the baseline.

The bunch charge is `top - bottom`. Tuning the two sampling instants is an analog
calibration step (programmable delay lines on the ADC clocks, set by a
microcontroller) and is not part of this RTL.

Number scale: the ADCs span -2 V..+2 V in two's complement. The front end gives
500 mV/nC, so the full range is -4 nC..+4 nC. One ADC code is 0.488 pC, and
**1 nC = 2048 codes**. A charge needs 15 bits (`tps_pkg::charge_t`).

## Data path

```
adc_up_top ─ tps_shift_reg (DLY_UT) ─┐
adc_up_bot ─ tps_shift_reg (DLY_UB) ─┤                ┌ tps_charge_sub ─────────────── q_up ─┐
adc_dn_top ─ tps_shift_reg (DLY_DT) ─┼ tps_sample_latch┤                                      ├─ tps_cv_mode     ─ alarm.cv
adc_dn_bot ─ tps_shift_reg (DLY_DB) ─┘       ▲        └ tps_charge_sub ─ tps_amp_corr ─ q_dn ─┤  tps_single_mode ─ alarm.single
                                             │ ena                          ▲ dn_coef         ├─ tps_slice_mode  ─ alarm.slice
{mp_start,bunch_gate} ─ tps_shift_reg (BG_DELAY) ─ bg_out                                     └─ tps_integ_mode  ─ alarm.integ
```

Everything runs on one clock, the machine clock (9 MHz at FLASH). Each ADC
delivers one word per clock. Bunches arrive at 1, 2.25 or 9 MHz, i.e. every 9,
4 or 1 clocks. A one-cycle `bunch_gate` marks each bunch.

### Synchronisation: the part that has to be right

The ADC word that belongs to a bunch reaches the FPGA some clocks after the bunch
gate. The delay has three parts: the ADC pipeline latency, the beam's time of
flight, and the cable lengths. Each of the four sample streams and the gate pass
through their own delay lines (`tps_shift_reg`). The latch then captures the four
words in the clock where the delayed gate is high.

The rule to remember:

> the latch takes, from each channel, the ADC word that appeared
> `BG_DELAY - DLY_xx` clocks after the bunch gate.

With the defaults (`BG_DELAY = 7`, `DLY_* = 4`) that offset is 3 clocks. This
matches the pipeline latency of a 14-bit pipelined ADC of the AD9240 kind. When
one toroid's signal arrives later, for example because of a longer cable or the
beam's flight time, lower that channel's `DLY_*` by the extra clocks. Channel
delays can be set per channel, so top and bottom ADCs with different clock
phases can also be aligned.

The delays and the latch are plain registers on the common clock. All arithmetic
sits after the latch, so it sees stable operands for the whole bunch period.
At a 9 MHz bunch rate that period is one clock.

### Charge and amplitude correction

`tps_charge_sub` forms `top - bottom` for each toroid. The two toroids and their
electronics never have exactly the same gain. `tps_amp_corr` therefore multiplies
the downstream charge by `dn_coef`, an unsigned fixed-point gain with 10
fractional bits (1024 = 1.0, range 0 to 3.999). The result is rounded to nearest
and saturated to 15 bits. `dn_coef` is a static input: set it once after
calibrating with beam (for example 1126 when the downstream chain reads about
9 % low).

## The four protection modes

All four modes look at the same latched bunch, in parallel. Each has one alarm
line. Let `up` and `dn` be the upstream and corrected downstream charges, in
codes.

| mode | module | fails when | default |
|---|---|---|---|
| charge validation | `tps_cv_mode` | `up` is below the minimum charge | 0.3 nC |
| single bunch | `tps_single_mode` | `abs(up - dn) * 100 > up * PCT` | 25 % |
| slice | `tps_slice_mode` | `abs(Σ(up - dn)) * 100 > Σup * PCT` over the last `SLICE_LEN` bunches | 3 %, 16 bunches |
| integration | `tps_integ_mode` | `abs(Σ(up - dn))` since the macropulse start exceeds the limit | 24 nC |

Why four modes:

* **Single bunch** catches a large, sudden loss in one bunch, for example a bunch
  kicked out of the train.
* **Slice** catches losses of a few percent that are hidden in the noise of a single
  bunch but clear after summing a handful of bunches.
* **Integration** catches a small, steady loss that never reaches 3 % of a slice
  but adds up over a long macropulse. 24 nC equals 3 % of 1 nC over 800 bunches.
* **Charge validation** catches a beam too weak for the relative modes to mean
  much.

The slice and integration sums use the signed difference. Random noise then
averages out while a real loss grows. Only the magnitude of the sum is compared.
All comparisons use exact integer arithmetic. The percentage thresholds are whole
percent. The charge thresholds are given in pC and compared as `codes * 1000`
against `pC * 2048`, with no rounding.

The thresholds are parameters of `tps_top` (`CV_TH_PC`, `SGL_PCT`, `SLICE_PCT`,
`SLICE_LEN`, `INT_TH_PC`). Changing them means rebuilding the FPGA.

### Alarm timing

* Each mode's `trip` bit pulses for one clock per failing bunch.
* The matching `alarm` bit is set on the same edge and **stays set** until
  `alarm_clr`. If a trip and a clear arrive together, the clear wins.
* Latency from the bunch gate to the latched charge (`q_valid`) is `BG_DELAY + 1`
  clocks, 8 with the defaults.
* Latency from the bunch gate to the alarm is `BG_DELAY + 2` clocks: 9 clocks,
  1 µs at 9 MHz.

The interlock system outside still adds its own reaction time before the laser
stops.

### Macropulse boundaries

`mp_start` is a one-cycle pulse. It must come at least one clock before the first
bunch gate of a macropulse. It travels through the same delay line as the gate,
so it always reaches the modes in the right order. It empties the slice window and
clears the integration sum. Until the window has filled again, the slice mode
judges the bunches it has seen so far.

## Top-level interface (`tps_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | machine clock; synchronous active-high reset |
| `adc_up_top`, `adc_up_bot`, `adc_dn_top`, `adc_dn_bot` | in | 14 | ADC words, two's complement |
| `bunch_gate` | in | 1 | one clock per bunch |
| `mp_start` | in | 1 | one clock before each macropulse |
| `alarm_clr` | in | 1 | clears all sticky alarms |
| `dn_coef` | in | 12 | downstream gain, 1024 = 1.0 |
| `alarm` | out | 4 | `tps_pkg::alarm_t` `{integ, slice, single, cv}`, sticky; one interlock line each |
| `trip` | out | 4 | same layout, one-clock pulse per failing bunch |
| `q_up`, `q_dn`, `q_valid` | out | 15, 15, 1 | latched charges for read-back |
| `bg_out` | out | 1 | delayed bunch gate |
| `int_acc` | out | 32 | integration running sum, codes |

## Capacity

* One bunch per clock is supported. A 9 MHz train of 7200 bunches (an 800 µs
  macropulse) runs without gaps.
* The 32-bit integration sum cannot overflow within such a macropulse: at most
  7200 × 32767 ≈ 2.4·10^8 codes.
* Only the slice window is stored, as 16 entries of upstream charge and
  difference.

## What is assumed

The overall structure is the TPS design's: shift-register synchronisation, a
four-channel latch on the delayed bunch gate, top-minus-bottom charge, amplitude
correction, four modes with the thresholds 0.3 nC, 25 %, 3 % and about 24 nC, and
four alarm lines. The following are this implementation's own choices and should
be checked before use on a machine:

* **Delay lengths.** 4 stages for the samples and 7 for the gate are defaults
  only. The real values depend on the installation.
* **Slice definition.** The window length (16 bunches) and the use of a sliding
  window, rather than consecutive blocks, are chosen here.
* **Signed sums.** The slice and integration modes sum `up - dn` with its sign and
  compare the magnitude of the sum.
* **Per-macropulse reset.** The `mp_start` input and the restart of the slice and
  integration state at each macropulse are chosen here.
* **Alarm handling.** Sticky alarms and the `alarm_clr` input are chosen here, as
  is the absence of any gating between modes. For example, the single bunch mode
  still judges a bunch that the charge validation mode rejects.
* **Correction side and format.** The correction acts on the downstream charge
  only, with a 12-bit gain of 10 fractional bits.
* **Alarm line allocation.** The four lines carry the four modes. Another
  allocation, three beam interlocks plus one hardware-failure line, is possible;
  no hardware-failure monitor is implemented.
* **No runtime thresholds.** Thresholds are build-time parameters. Loading them at
  run time, for example from the microcontroller over a UART, is not implemented.

Not included: the ADCs, the clock delay generators and their microcontroller, the
RS422 line drivers and the interlock/control systems around the unit.

## Files

* `rtl/tps_pkg.sv` holds the ADC and charge types, the alarm struct and the charge
  scale.
* `rtl/tps_shift_reg.sv`, `tps_sample_latch.sv`, `tps_charge_sub.sv` and
  `tps_amp_corr.sv` form the data path.
* `rtl/tps_cv_mode.sv`, `tps_single_mode.sv`, `tps_slice_mode.sv` and
  `tps_integ_mode.sv` are the protection modes.
* `rtl/tps_top.sv` is one TPS unit.
* `tb/tb_<module>.sv` holds one self-checking testbench per module. Each compares
  the module with an independent model written in the testbench.
* `tb/ttf2_toroid_sim.sv` is a behavioural signal generator for the end-to-end
  test. It plays macropulses at any of the three bunch rates. Loss settings:
  per-channel amplitude reduction, pseudo-random modulation (common or per
  channel), falling or rising downstream ramps, a kicked-out bunch and a
  downstream gain error. It includes a 3-clock ADC pipeline.
* `tb/tb_tps_top.sv` runs `tps_top` at its default parameters through ten
  macropulses, about 11,000 bunches in all:
  * nominal beam;
  * weak charge;
  * a kicked bunch;
  * a 6 % loss at 2.25 MHz;
  * a 2 % loss of 2 nC bunches;
  * a gain error, first uncorrected and then corrected;
  * falling and rising ramps;
  * a 7200-bunch train at 9 MHz.

  A reference model checks every latched charge, the 8- and 9-clock latencies,
  every trip and alarm bit, and which modes each scenario must or must not trip.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each also has a watchdog. Run from the repository root with
Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/tps_pkg.sv tb/tb_tps_top.sv \
          --top-module tb_tps_top -o sim -Mdir obj_tb_tps_top
./obj_tb_tps_top/sim
```

Replace `tb_tps_top` with any other `tb_*` name to run a module test. The
end-to-end test takes a few seconds. To lint the RTL:

```sh
verilator --lint-only -Wall -Irtl rtl/tps_pkg.sv rtl/tps_top.sv
```
