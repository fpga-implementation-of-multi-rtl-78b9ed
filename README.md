# 8-core DDS: a 2 GSPS sine synthesiser built from 250 MHz logic

An MRI transmitter has to produce an intermediate-frequency carrier, here the
64 MHz proton resonance, directly in digital form. A plain direct digital
synthesiser (DDS) makes one sample per clock. So a 2 GSPS DAC would need
2 GHz logic, which an FPGA cannot run. This design keeps the logic at
250 MHz and computes **eight consecutive samples in every clock cycle**. It
behaves like eight DDS cores running in parallel, but it has a single phase
accumulator. The eight samples are then serialised: two per 1 GHz tick on
two data paths, which are interleaved into one 2 GSPS stream.

The carrier comes straight out of the DDS at its final frequency, so the
usual baseband → mixer → filter up-conversion chain is not needed.

```
freq_hz ─► phase register ─► phase accumulator ─► sine LUT module ─────────────► mock DAC ─► SINE / PHASE
           dF, k·dF, 8·dF     acc + k·dF, k=0..7    8 LUTs │ counter + MUX1..4    Switch1/2    2 GSPS
           (250 MHz)          (250 MHz)             (250)  │ DB0/DB1, Phase_DB0/1 (2 GHz)
                                                           │ (1 GHz each)
```

## The multi-phase idea

A DDS adds a tuning word dF to an N-bit phase accumulator on every sample.
The top bits of the phase address a sine table. The output frequency is

    f_out = dF · f_s / 2^N        dF = floor(f_out · 2^N / f_s)

Here f_s = 2 GHz, the rate of the output stream, and N = 28. This N is
chosen so that the 64 MHz tone has the tuning word 8589934. Sample *n* of
the stream has phase `n·dF mod 2^28`.

With eight lanes, the core cycle *m* must produce samples 8m … 8m+7. One
accumulator `acc` steps by `8·dF` per core cycle, and eight adders form

    phase[k] = acc + k·dF          k = 0..7

The accumulator wraps modulo 2^28. This overflow is the end of one output
cycle, the "phase wheel" turning once. When dF changes, only the slope
changes; the accumulated phase is kept, so a frequency change causes no
phase jump.

Each lane has its own sine table. All eight samples are therefore
converted within the one 250 MHz cycle.

## Rates and clocking

The design has three rates: 250 MHz for the core, 1 GSPS for each of the
two data paths, and 2 GSPS for the output. It uses **one clock at the
sample rate** (`clk`, 2 GHz nominal) and two clock enables from
`dds_ce_gen`:

| enable    | period      | nominal rate | used by |
|-----------|-------------|--------------|---------|
| `ce_slow` | 1 clk in 8  | 250 MHz      | phase register, accumulator, LUTs |
| `ce_fast` | 1 clk in 2  | 1 GHz        | counter and multiplexers |
| (none)    | every clk   | 2 GHz        | mock DAC switches |

`ce_slow` is high only on a cycle where `ce_fast` is also high (the last
fast tick of each core cycle); an assertion checks this.

A real FPGA build would run the core from a genuine 250 MHz clock. It would
also replace the multiplexers and mock DAC with the device's serialisers and
a DAC interface. Those parts are not modelled. The single-clock form is
simply the easiest way to simulate all three rates together.

## Blocks

| module | role |
|--------|------|
| `dds_pkg` | constants (CORES=8, PHASE_W=28, FS_HZ=2e9, FREQ_W=30, LUT_AW=10, AMP_W=14, FRAC_W=51) and elaboration-time functions |
| `dds_ce_gen` | clock-enable divider |
| `dds_phase_register` | Hz → dF, offsets k·dF, step 8·dF |
| `dds_phase_accumulator` | accumulator plus eight offset adders |
| `dds_sine_lut` | one 1024 × 14-bit full-cycle sine ROM, registered read |
| `dds_sine_lut_module` | eight LUTs, 2-bit counter, MUX1–MUX4 |
| `dds_dac_mock` | Switch1 (DB0/DB1 → SINE) and Switch2 (Phase_DB0/1 → PHASE) |
| `multi_dds_top` | the chain above |

### Phase register: frequency in Hz to tuning word

`freq_hz` is an unsigned integer in Hz. Dividing it by f_s would need a
divider, so it is multiplied by a constant reciprocal
`K = ceil(2^(28+51) / 2e9)`, a 49-bit value computed at elaboration. The
product is then shifted right by 51.

Because K is rounded up, the product is never below the exact quotient. The
exact quotient `f·2^18/1953125` has fractional steps of 1/1953125. With 51
fraction bits the error of K stays below one such step for every 30-bit
input. The truncated result is therefore exactly `floor(f·2^28/2e9)` for
every input, which the testbench checks. Truncation, not rounding, is used
because that is what gives 8589934 for 64 MHz.

There are three pipeline stages on `ce_slow`: input, product and outputs.
`ftw`, `step` and all offsets update on the same enable. So the accumulator
never mixes an old step with new offsets.

### Sine LUT module: the counter and four multiplexers

The eight amplitudes are registered once per core cycle. The phases are
delayed by one stage next to them, so each sample keeps its phase. A 2-bit
counter then advances on `ce_fast`. At count *c*:

* MUX1 puts sample 2c+1 on DB0 and MUX3 puts sample 2c+2 on DB1. Samples
  are numbered 1..8: count 0 → samples 1,2; count 1 → 3,4; count 2 → 5,6;
  count 3 → 7,8.
* MUX2 and MUX4 do the same with the phases, on Phase_DB0 and Phase_DB1.

The counter restarts at 0 on the `ce_slow` tick. On that same tick the
muxes send the last pair (count 3) of the old word, and the LUT bank loads
the new word. The four counts thus fill exactly one core cycle, four pairs
per 250 MHz cycle.

### Mock DAC: why DB1 goes out on the `ce_fast` edge

The mux outputs change on each `ce_fast` edge. The switch therefore sends
DB0 on the edge *after* a pair is loaded. It sends DB1 on the following
`ce_fast` edge, which still sees the old pair because that pair is only
replaced at that edge. No holding register is needed. Sending DB0 on the
`ce_fast` edge instead would pair DB0 of one word with DB1 of the next,
which scrambles the stream. The end-to-end test catches exactly that
error.

### Latency

* A new `freq_hz`, sampled on a `ce_slow` edge, appears on `ftw` 3 core
  cycles later.
* The first phase using it is presented one core cycle after that, and its
  amplitude one core cycle later again.
* Serialisation then adds 2–9 clocks, depending on the lane.

The output frequency therefore changes about 5 core cycles (≈20 ns at
250 MHz) after the input. It is not instantaneous. After reset the
accumulator sits at phase 0 until the first tuning word arrives.

## Sizes and what is assumed

These come from the design itself:

* 8 lanes, 250 MHz core, 2 GSPS output, 1 GSPS per data path.
* The 64 MHz example with dF = 8589934, from which N = 28 follows.
* The 100 kHz–750 MHz tuning range. 750 MHz is below the 1 GHz Nyquist
  limit, and the tuning step is 2e9/2^28 ≈ 7.45 Hz.

Chosen here, where nothing was specified:

* Sine table 1024 entries × 14 bits, full cycle, contents
  `round(sin(2π·a/1024)·8191)`. The phase is truncated to its top 10 bits;
  there is no dithering or interpolation.
* Frequency input width 30 bits, and 51 reciprocal fraction bits.
* Synchronous active-low reset of every register. This includes the LUT
  output register, so amplitude and phase both read 0 after reset.
* MUX1/MUX3 carry the sine samples and MUX2/MUX4 the phases; DB0 goes out
  before DB1.
* The depth of each pipeline stage.

Known departures and limits:

* The mock DAC and the multiplexers are simulation stand-ins. They keep the
  block structure, not a real high-speed interface. An FPGA at 250 MHz
  cannot clock the 1 GHz and 2 GHz stages shown here.
* Timing closure at 250 MHz has not been checked. The storage is small: 8 ×
  14 Kbit of ROM, about 930 flip-flops.
* Frequency changes take effect after the latency above, not on the next
  sample.
* The real DAC chip and the on-chip logic analyser used for measurement are
  outside the design. Every signal the analyser would look at is a port of
  `multi_dds_top`.

## Simulating

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The shared
reference models (the exact integer tuning word and the real-valued sine)
are in `tb/dds_tb_pkg.sv`.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_multi_dds_top rtl/dds_pkg.sv tb/dds_tb_pkg.sv tb/tb_multi_dds_top.sv
./obj_dir/Vtb_multi_dds_top
```

Replace the top module and file name to run another testbench. The
testbenches sample outputs a fraction of a nanosecond after each clock edge.
They therefore need the `1ns/1ps` timescale: without it those delays round
to zero. Verilator's lint warnings are not fatal to the design, but plain
`verilator` stops on them; add `-Wno-fatal` if your version reports any.

| testbench | what it checks |
|-----------|----------------|
| `tb_multi_dds_top` | The whole design at its default sizes, taken through 64 MHz, 750 MHz, 100 kHz, four random frequencies and 64 MHz again. Checks on every clock: one new sample, a phase step equal to the tuning word in force (one clean switch per change), SINE equal to the table entry of PHASE, and consecutive parallel phases. Also checks the 3-cycle tuning-word latency and the number of output cycles per segment (for example, 320 cycles in 10000 samples = 64 MHz). Counts accumulator overflows, frequency changes, each mux count and both switch halves, and fails if any never happens. |
| `tb_dds_phase_register` | Exact tuning words for the 64 MHz example, range ends, integer-boundary cases and 2000 random inputs; step and offsets; latency under an irregular enable. |
| `tb_dds_phase_accumulator` | `acc + k·dF` against its own accumulator, wrap-around, a phase-continuous step change, and holding between enables. |
| `tb_dds_sine_lut` | All 1024 table entries through full 28-bit phases, reset, and latency. |
| `tb_dds_sine_lut_module` | Parallel outputs, and the pair order and counter value on DB0/DB1 and Phase_DB0/1 over 3000 core cycles. |
| `tb_dds_dac_mock` | DB0-then-DB1 interleaving, one sample per clock. |

All of them run in well under a second. To change a size, override the
parameters of `multi_dds_top` (or edit `dds_pkg`). `CORES` must be a power
of two and at least 4. `LUT_AW` must not exceed `PHASE_W`.
