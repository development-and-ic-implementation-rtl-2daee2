# Digital power-management platform: time-based ADCs and a ring-oscillator DPWM

A digitally controlled switching power supply needs two converters around its control law. An
ADC turns the output voltage into a number, and a digital pulse-width modulator (DPWM) turns
the controller's duty-cycle number back into a switching pulse. Both normally need analog
circuits or a very fast clock. This design builds both from nothing but standard digital cells
and measures everything in units of **one cell delay**:

* **Voltage to time.** An RC one-shot timer with a logic-gate threshold produces a pulse whose
  width is `T = RC * ln(VDD / (V_sample - V_threshold))`.
* **Time to number.** The pulse runs into a chain of buffers. The number of buffers it got
  through before it ended is the result.
* **Number to time (DPWM).** A ring of buffers is restarted at the start of every switching
  period. The output pulse is ended after `value + 1` cell delays.

Three converters use the time-to-number idea:

| converter | module | cells | result | idea |
|---|---|---|---|---|
| delay-line ADC | `dl_adc` | 1023 buffers | 10 bits | one long line, count the cells passed |
| ring ADC | `ring_adc` | 128-stage ring | 10 bits | short ring, 3-bit lap counter for the MSBs, ring position for the 7 LSBs |
| window ADC | `window_adc` | 32 buffers | 5 bits | converts only the *difference* between a pulse and a reference pulse |

The ring ADC, the window ADC and a full-adder test macro share one test chip (`dpmp_chip`), with
a 2-bit mode input and shared result pins. The top level `dpm_platform` places next to it:

* the stand-alone delay-line ADC;
* the ring-oscillator DPWM (`ring_dpwm`);
* a decimal seven-segment read-out of the chip result.

## Module map

```
dpm_platform                      top: three independent designs side by side
├── dpmp_chip                     ADC test chip, mode 00 off / 01 window / 10 ring / 11 adder
│   ├── ring_adc
│   │   ├── ring_oscillator       gating stage + 127 buffers       (behavioural delays)
│   │   ├── edge_counter          rising + falling saturating counters
│   │   ├── tap_register  x2      capture on the pulse's falling edge
│   │   ├── wallace_tree          ones counter, 127 -> 7 bits
│   │   └── ring_normalizer       invert the LSBs on an odd lap
│   ├── window_adc
│   │   ├── phase_detector        PD-High / PD-Low of the variable pulse
│   │   ├── delay_line            32 cells                          (behavioural delays)
│   │   ├── tap_register
│   │   └── wallace_tree          32 -> 6 bits, saturated to 5
│   └── full_adder_macro
├── seven_segment_display         binary -> 4 decimal digits
├── dl_adc
│   ├── delay_line                1023 cells                        (behavioural delays)
│   ├── tap_register
│   └── wallace_tree              1023 -> 10 bits
└── ring_dpwm
    ├── delay_line                K-cell stretch of the period start
    ├── ring_oscillator           K = 32 stages
    └── delay_line                K-1 cell fine line
one_shot_timer                    behavioural RC one-shot, used by the testbenches
dpmp_pkg                          mode enum and the default sizes
full_adder                        the 1-bit cell the Wallace trees are built from
```

Nothing here has a clock except the DPWM's reference clock. Each converter is timed by the pulse
it measures. The registers are edge-triggered flip-flops clocked by that pulse, with asynchronous
clears.

## Delays and how they are modelled

Every result is a count of cell delays, so the delay cells are the part that cannot be plain
synthesizable RTL. `delay_line` and `ring_oscillator` model each buffer as a process with a
transport delay of `CELL_PS` picoseconds (`q <= #CELL_PS d`). Each cell's output is declared
with an initial value of 0, so a line starts empty. In silicon each cell is a standard-cell
buffer, and the ring's first stage is an AND gate with the inverted last tap.

The default delays are the design's own numbers, not measured values:

| where | cell delay |
|---|---|
| ring ADC and delay-line ADC | 300 ps |
| window ADC | 500 ps |
| DPWM | 538 ps |

The DPWM delay is chosen so that a 100 kHz period holds about 18 600 cells. The source FPGA
prototype measured 440 ps per cell. All files use `` `timescale 1ps/1ps ``.

Synthesis sees the delays as plain wires. The ring oscillator then becomes a combinational loop,
which is the intended circuit: a real implementation keeps the buffers with don't-touch or
keep constraints.

`one_shot_timer` is a behavioural model of the analog front end and is not part of any
converter. It has a `real` voltage input and computes the pulse width from the RC equation. The
width is capped at 10 RC when the input is at or below the threshold.

## Delay-line ADC (`dl_adc`)

While `input_pulse` (gated by `enable`) is high, a 1 runs down a line of 1023 buffers. At the
pulse's falling edge a 1023-bit tap register freezes the line. The frozen taps are a thermometer
code: ones for every cell the edge has passed, zeros after it.

A Wallace tree turns the code into binary. It does not look for the 1-to-0 boundary; it counts
the ones with a tree of full adders. A stray 0 or 1 (a bubble from metastability or uneven cell
delays) therefore moves the result by one LSB instead of by a large jump.

The result is `floor(T / CELL_PS)`, and it stops at 1023 when the pulse outlives the line.
`sample_ready` goes high at the falling edge and stays high until the next pulse starts. The
line needs 1023 cells of time to empty before the next sample.

## Ring ADC (`ring_adc`): the hardest part

A 10-bit delay line costs 1023 cells. The ring ADC splits the 10 bits:

* **m = 3 MSBs** count how many times the wave has gone round a short ring.
* **n − m = 7 LSBs** give the wave's position inside the ring.

With K = 2^(n−m) = 128 stages, the ring covers 1024 cells of time with 128 cells of area. The
stages are one gating stage and 127 buffers.

**The wave.** With `input_pulse & adc_enable` high, the gating stage feeds the ring with the
inverse of the last tap. After power-up the ring is all zeros, so a wave of ones runs in. When
it reaches the end, the gating stage starts a wave of zeros, then ones again, and so on.

Take a snapshot of the taps `t` cell delays after the pulse start:

| lap | time | tap pattern | last tap `tap[K-1]` |
|---|---|---|---|
| even (0, 2, 4 …) | `t = 2iK + r` | first `r` taps are 1, the rest 0 | 0 |
| odd (1, 3, 5 …) | `t = (2i+1)K + r` | first `r` taps are 0, the rest 1 | 1 |

`r` runs from 0 to K−1.

**The LSBs.** The Wallace tree counts the ones in taps 0..K−2, which gives `r` on an even lap
and `K−1−r` on an odd one. The last tap tells which lap it was, since it is exactly the ring's
feedback. `ring_normalizer` therefore passes the count unchanged when the value entering the
first buffer (`~tap[K-1]`) is 1, and inverts all 7 bits when it is 0. Inverting 7 bits is
`127 − x`, which turns `K−1−r` back into `r`. The last tap itself is left out of the count,
because it only decides the polarity.

**The MSBs.** A full lap corresponds to one edge of the last tap: a rising edge after an even
lap, a falling edge after an odd one. `edge_counter` therefore counts both edges. It uses two
3-bit saturating counters, one per edge, and adds them:

* The sum's low 3 bits are the lap count.
* Its bit 3 flags overflow.
* `Rising_0`, `Falling_0` and `Edge_0` show the LSBs of the three counts.

`reset_msb` (pin Reset_MSB) holds both counters cleared whenever the ring is stopped. With
`external_ring_en` the counters count the `external_ring` input instead of the last tap, so the
counter path can be tested on its own.

**Capture.** At the falling edge of `input_pulse`, two tap registers freeze the 128 taps and
the `{overflow, count}` word together. The result is then

```
adc_result = overflow ? 1023 : {count, normalise(ones(tap_q[126:0]), tap_q[127])}
           = min(floor(T / CELL_PS), 1023)
```

For example, a 1000.5-cell pulse stops on lap 7 (odd), 104 cells in. At that moment taps 0..103
are 0 and taps 104..127 are 1, so the tree counts 23 ones. 127 − 23 = 104, and
`{3'd7, 7'd104}` = 1000.

**Timing rules:**

* The result is valid from the falling edge of the pulse until the next rising edge.
* When the pulse stops, the ring empties in K cell delays (38.4 ns at 300 ps). Input pulses
  must therefore be at least K cells apart, or the next conversion starts from a ring that
  is not empty.
* A pulse longer than 1023 cells reads 1023 (saturation).

## Window ADC (`window_adc`)

A feedback controller mostly needs the error around a set point, not the full voltage. The
window ADC runs two one-shots from the same trigger:

* a **stable pulse** from a fixed bias voltage (3.66 V in the bench);
* a **variable pulse** from the sampled voltage.

Only the time by which the variable pulse outlasts the stable one is converted, on a short line
of 32 cells.

* `phase_detector` tracks whether the variable pulse is still running (PD-High) or has ended
  (PD-Low). It uses two toggle flip-flops, one on each edge of the variable pulse, and XORs
  them, so it needs no self-reset. `enable` low clears both.
* The error window is `enable & ~stable_pulse & pd_high`: after the stable pulse has ended
  but before the variable one has. It feeds the delay line.
* The tap register is clocked by `stable_pulse | pd_high`, so it captures when both pulses
  are over.
* The Wallace tree counts 0..32 ones, and the result saturates at 31.
* A variable pulse shorter than the stable one gives no error window and reads 0.
* With `SIGNED_RESULT = 1` the MSB is inverted, giving count − 16 in two's complement
  (offset binary). The default is unsigned.
* `en_external_pulse` replaces the window with `external_pulse`, to test the line and the
  tree directly.

## Ring-oscillator DPWM (`ring_dpwm`)

The DPWM makes pulses with the resolution of one cell delay without a fast clock. The
reference clock sets the switching period, and a period starts at each falling edge of
`ref_clk`.

1. **Ring reset window.** At the period start the ring is stopped for K cell delays, so it
   restarts from empty at the same point every period. The window is the falling edge of
   `ref_clk` stretched through a K-cell delay line. `new_value_req` is high during it; that is
   when the new value is taken.
2. **Counting laps without a dual-edge counter.** `tick = tap[0] ^ tap[K/2]` has one rising
   edge per pass of the wave through the K stages. A single rising-edge counter `cnt` counts
   these ticks, and the first tick arrives one cell after the ring starts.
3. **Rough PWM.** `rough` is high from the ring start while `cnt <= value[W-1:L]`, i.e. for
   `MSB*K + 1` cells.
4. **Fine PWM.** `rough` also runs down a K−1-cell line. `fine` is the OR of taps 0..LSB of
   that line plus `rough` itself: the rough pulse stretched by LSB cells. The output therefore
   lasts exactly `(value + 1)` cell delays and starts K cells after the period start.
   * An OR is used rather than a single mux tap ORed with `rough`. When MSB = 0 the rough
     pulse is one cell long, and a single delayed copy would leave a gap.
   * At MSB = 0 neighbouring taps hand over at the same instant, so an event simulator may
     show zero-width glitches there.
5. **Calibration and limiter.**
   * At each period start `max_value = cnt * K` is stored: the largest value that fits in the
     period just measured. It follows 1/f automatically when the reference frequency changes.
   * A value ≥ `max_value` holds the output at 1 for the whole period.
   * Value 0 keeps the output at 0.
   * Until one period start has been seen (`max_value = 0`), the output stays low.
6. **Updates.** Value, `max_value` and the calibration change only at the falling edge of
   `ref_clk`.

Simulated at the defaults (K = 32, 538 ps cells, 18-bit value), with value 2502:

| f_ref | max_value | duty (value 2502) |
|---|---|---|
| 100 kHz | 18560 | 13.47 % |
| 200 kHz | 9280 | 26.93 % |
| 300 kHz | 6176 | 40.40 % |
| 400 kHz | 4640 | 53.86 % |

The maximum is a whole number of laps, so it moves in steps of K = 32.

A value in the top K codes just below `max_value` can run up to K−1 cells past the period end,
because the ring was stopped for K cells at the start. Such a pulse is cut off by the next
period start.

## Test chip (`dpmp_chip`)

`mode` is `dpmp_pkg::chip_mode_e`:

| mode | code | what runs |
|---|---|---|
| `MODE_SHUTDOWN` | 00 | nothing; all outputs low |
| `MODE_WINDOW_ADC` | 01 | window ADC |
| `MODE_RING_ADC` | 10 | ring ADC (also needs `adc_enable`) |
| `MODE_FULL_ADDER` | 11 | full adder macro (needs `fa_enable`) |

The mode decode is each converter's enable, so leaving a mode clears that converter's
registers.

`sample_adc_ready`, `pulse_before_delay`, `pulse_after_delay` and the 10-bit `adc_result` are
shared: they show the ring ADC in mode 10, and the window ADC (zero-extended) in mode 01. In
modes 00 and 11 they are low.

The ring-ADC counter pins are separate: `reset_msb`, `edge_0`, `rising_0` and `falling_0`.

`pulse_before_delay` and `pulse_after_delay` are the signal entering the line or ring and the
last tap, for observing the cell delay on the bench. The top level brings the mode out as two
plain bits, `chip_mode`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ring_adc` | `N_BITS`, `CNT_BITS`, `CELL_PS` | 10, 3, 300 | result bits, counter bits (K = 2^(N−CNT)), cell delay |
| `window_adc` | `CELLS`, `BITS`, `CELL_PS`, `SIGNED_RESULT` | 32, 5, 500, 0 | line length, result bits, cell delay, offset-binary output |
| `dl_adc` | `N`, `CELL_PS` | 1023, 300 | cells, cell delay |
| `ring_dpwm` | `W`, `L`, `CELL_PS` | 18, 5, 538 | value bits, fine bits (K = 2^L), cell delay |
| `wallace_tree` | `N` | 32 | input bits; output `$clog2(N+1)` bits |
| `one_shot_timer` | `R_OHM`, `C_PF`, `VDD`, `VTH`, `MAX_TAU` | 1000, 500, 3.3, 1.6, 10 | RC network and thresholds |
| `seven_segment_display` | `W` | 10 | input bits; digits follow from it |

The shared defaults live in `dpmp_pkg`.

## Where this design departs from or adds to its source

These are this design's own reading or choice:

* **Ring ADC**
  * The counter width m = 3 follows K = 2^(n−m) with n − m = 7.
  * The polarity of the LSB inversion follows from the arithmetic above.
  * Saturation at 1023, the ready flag and the use of `external_ring` are not specified by
    the source.
* **Window ADC**
  * The phase detector is built from toggle flip-flops.
  * Negative errors read 0.
  * The signed option is offset binary.
  * The result is 5 bits, although one application uses a 6-bit window converter. Set
    `CELLS = 64, BITS = 6` for that.
* **DPWM**
  * The ring reset window comes from a K-cell line after the falling edge of `ref_clk`, so any
    reference duty cycle works. The source uses a reference with a duty cycle close to 100 %,
    whose low phase is the reset.
  * The fine stage uses an OR of taps instead of a single-tap multiplexer.
  * K = 32, the 18-bit value and the cell delay are chosen here.
  * The resulting maxima are within 1–2 % of the reference numbers (18600 / 9373 / 6232 /
    4672), not equal to them.
* **Test chip mode 11** runs the full-adder macro, as the chip's mode table defines it. An
  overview elsewhere describes that mode as a gyrator controller, which is not built.
* **Not built:**
  * the current-programmed-mode and SC-buck control loops of the application experiments,
    whose control laws and coefficients are not given;
  * the pads and package.
* **All cell delays are model numbers.** On silicon they depend on process, voltage and
  temperature, and the converters would need calibration.

## Simulating

Verilator 5 with `--timing` runs everything. For example, the end-to-end bench:

```
verilator --binary --timing --top-module tb_dpm_platform -y rtl -y tb \
          rtl/dpmp_pkg.sv tb/tb_dpm_platform.sv -o sim
./obj_dir/sim
```

Notes for two-state simulation:

* Flip-flops start at random values. The asynchronous clears act only on an edge of their
  enable, so every testbench drives each enable high, then low, then high at the start.
* The delay cells start at 0 by declaration.
* Verilator shows the real-valued one-shot model and the transport delays as intended; other
  simulators that support `#` delays in `always` blocks do the same.

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dpm_platform` | Whole platform at default sizes, with RC one-shots in front of every ADC (≈2.5 min). Covers: ring ADC over and beyond its range; odd and even laps; the external ring counter; window ADC around 3.66 V (positive, negative, saturated); the external pulse; the full adder; shutdown; delay-line ADC incl. saturation; DPWM pulse, zero, limiter and frequency change; the decimal display. Every mechanism is counted, and one that never occurs is a failure. |
| `tb_dpmp_chip` | Each mode, the shared pins, clearing on mode change, `adc_enable` gating, the adder truth table. |
| `tb_ring_adc` | All 1024 codes, odd-lap and saturation counts, the external counter source, `sample_ready`. |
| `tb_window_adc` | Error of −4…40 cells, unsigned and signed instances, the external pulse. |
| `tb_dl_adc` | All 1024 codes and beyond (≈70 s). |
| `tb_ring_dpwm` | Exact high time and start of the pulse; `max_value` at 100–400 kHz; random values; 0, limit and full scale; `new_value_req` width; disable. |
| `tb_wallace_tree`, `tb_tap_register`, `tb_edge_counter`, `tb_ring_normalizer`, `tb_phase_detector`, `tb_delay_line`, `tb_ring_oscillator`, `tb_one_shot_timer`, `tb_full_adder_macro`, `tb_seven_segment_display` | Each leaf block against an independent reference. |

The expected values come from formulas in the benches (`floor(T / cell)`, RC equation,
propagation counts), not from the RTL.
