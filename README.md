# A 0.5 V all-digital PLL: 25 MHz in, 400 MHz out

This is an all-digital phase-locked loop (ADPLL) built to run from a 0.5 V
supply, about the voltage of a single solar cell. It multiplies a 25 MHz
reference by 16 to give a 400 MHz clock. At 0.5 V, a ring oscillator made of
ordinary inverters is slow and sensitive to process, because its transistors
work close to threshold. The oscillator here uses *bootstrapped* delay cells
instead. Each cell pumps its own output swing out to -VSUP..2VSUP through two
small capacitors, so the next stage is driven well above threshold. The rest
of the loop is digital: a phase-frequency detector, a Vernier
time-to-digital converter, a proportional-integral loop filter, and a
sigma-delta modulator that dithers the oscillator's least significant bit.

The design follows a published 90 nm ADPLL (Yang and Su, NCTU, 2011). This
SystemVerilog is an independent reconstruction of it:

* **Synthesizable RTL** for the digital loop: loop filter, sigma-delta
  modulator, the two code converters, and the divider.
* **Behavioural models** for the circuits whose job is timing rather than
  logic: the PFD, phase selector, Vernier delay lines and their comparators,
  the bootstrapped cell, and the DCO.

Together they simulate the closed loop in plain Verilator.

## The loop

```
            UP  +----------+ LEAD +-------------+  code[3:0]  +-----+
 ref_input --->|          |----->|             |------------>|     |  word = 9.4 fixed point
   25 MHz      |   PFD    |  DN  |  phase sel. | SIGN        | DLF |----+-----------------+
          +--->|          |----->|  + Vernier  |------------>|     |    | code[8:0]        | frac[3:0]
          |    +----------+ LAG  |     TDC     |             +--^--+    v                  v
          |                      +-------------+                |   +-----------+     +---------+
          |                                             ~ref_input  | bin2therm |<----|   SDM   |<-+
          |                                                         | (fine 4b  | y   | 1st ord.|  |
          |                                                         |  + dither)|     +---------+  |
          |                                                         +-----------+                  |
          |                                           coarse[4:0]  T1..T16 |                       |
          |                                                 +-----v--------v--+                    |
          |                                                 | DCO: PMOS array |--- ph1 (400 MHz) --+--> out
          |    +-------------+                              | + 5 bootstrap   |--- ph2
          +----| divide by 16|<-----------------------------|   cells (ring)  |
  divider_out  +-------------+                              +-----------------+
```

Two clocks run the loop. The loop filter runs once per reference period. The
sigma-delta modulator and the divider run on the DCO output.

| Quantity | Value | Origin |
|---|---|---|
| Reference / output | 25 MHz / 400 MHz, divide by 16 | original design |
| DCO control | 9 bits: 5 binary coarse + 4 fine (thermometer) | original design |
| Dither | 4-bit fraction, first-order SDM on the DCO LSB | original design |
| TDC | 4-bit Vernier, 20 ps step | original design |
| Loop filter | Kp = 2^-1, Ki = 2^-4 | original design |
| DCO gain | 563 kHz per code | original design (typical corner) |
| DCO range in the model | 220 MHz + 563 kHz x code, i.e. 220-508 MHz | this design's choice |

## One reference cycle, edge by edge

The interplay of edges inside one reference period is the least obvious part
of the design. It is also where this implementation had to make its own
decisions.

1. **PFD** (`pfd`). A rising reference edge sets UP, and a rising feedback
   (divider) edge sets DN. When both are set, a delayed common clear takes
   both low. The earlier input therefore gives a pulse as wide as the phase
   error plus the clear delay, and the later input gives a short pulse of
   just the clear delay. The original circuit uses two dynamic registers and a
   NOR gate. The model uses a 400 ps clear delay (`RST_DELAY_PS`), for the
   reason given in step 3.
2. **Phase selector** (`phase_selector`). A latch comparator decides which of
   UP and DN rose first and holds that as `SIGN`: 1 means the reference led,
   so the DCO is too slow. UP and DN are each delayed by 30 ps so that SIGN
   settles first. A pair of multiplexers then routes the earlier pulse to
   LEAD and the later one to LAG. After this step the TDC only ever measures
   a positive time.
3. **Vernier TDC** (`vernier_tdc`). LEAD runs down 15 delay elements of
   T + dT, and LAG runs down 15 elements of T, with T = 40 ps and dT = 20 ps.
   The gap between the two edges shrinks by 20 ps per stage. The comparator
   at stage k records whether LEAD is still ahead after k stages, so the
   thermometer code has k ones for an error between 20k and 20(k+1) ps. It
   saturates at 15, which is 300 ps or more. `therm2bin` counts the ones.
   Each comparator is a cross-coupled NAND latch. Such a latch changes its
   mind if the later input arrives after the earlier one has already fallen.
   The short LAG pulse must therefore outlast the largest mismatch along the
   line (15 x 20 ps = 300 ps); hence the 400 ps PFD clear delay.
4. **Loop filter** (`dlf`). Each period it forms e = ±code, with the sign
   from SIGN, and updates

       I <- I + e/16             (Ki = 2^-4)
       OUT = I + e/2             (Kp = 2^-1)

   in 9.4 fixed point. Both values are clamped to 0..511+15/16. The 9
   integer bits drive the DCO and the 4 fraction bits drive the modulator.
   **The filter is clocked on the falling reference edge.** The original
   design specifies only that the filter runs at the reference rate. On the
   rising edge, a cycle in which the reference leads is still being measured
   when the filter samples, so the filter would use the previous cycle's
   error. That extra cycle of delay makes the loop limit-cycle at about
   ±600 ps in simulation. At mid-period, every measurement is complete
   whichever clock led.
5. **DCO word** (`bin2therm`, `sdm`, `dco`). The 5 coarse bits drive
   binary-weighted PMOS devices. The 4 fine bits, plus the modulator's
   1-bit output, are decoded into 16 thermometer lines T1..T16: fine + dither
   = 0..16 lines on. Adding the dither before decoding is why there are 16
   fine lines rather than 15. The modulator is an accumulator clocked by the
   DCO. Its carry is 1 on x of every 16 DCO cycles, so the mean code is
   code + x/16. This improves the effective DCO resolution 16-fold: at
   400 MHz, one code step is 3.5 ps of period and one dithered step is
   0.22 ps.
6. **Divider** (`divider`). A 4-bit counter whose output is high for the
   second half of each 16 DCO cycles. Its rising edge is the next feedback
   edge.

## Loop dynamics, and where they hold

At 400 MHz, one code step moves the feedback edge by
16 x 563 kHz / (400 MHz)^2 ≈ 56 ps per reference cycle. With Kp = 1/2 and
20 ps per TDC step, the proportional gain per cycle is about 1.4. A sampled
loop of this kind is stable below 2, so at 400 MHz and 480 MHz the loop
settles to within about one TDC step: the simulated worst-case skew is 21 ps.

That gain grows as 1/f² for a DCO of constant gain in Hz per code. It is 2.2
at 320 MHz and 3.9 at 240 MHz. There the model stays frequency-locked (the
mean output frequency is exact), but its phase cycles by up to about 0.4 ns
and 0.9 ns. The original chip was measured locking across 240-480 MHz. Its
real DCO gain at the low end is not known here, so take this as a property of
the linear DCO model combined with the published loop gains. To get tight
lock at the low end in the model, raise `KP_SHIFT` (a smaller Kp)
or give the DCO model a gain that falls with frequency.

Acquisition from the reset code (256, which is 364 MHz) to lock at 400 MHz
takes a few hundred reference cycles. While the TDC is saturated, the loop
slews at Ki x 15 ≈ 0.94 codes per cycle.

## What is synthesizable and what is a model

| Module | Kind | Role |
|---|---|---|
| `adpll_top` | top (structural) | the loop; also exposes its internal words |
| `dlf` | RTL | PI loop filter, 9.4 fixed point, clamped |
| `sdm` | RTL | first-order sigma-delta modulator (accumulator + carry) |
| `bin2therm` | RTL | fine bits + dither to T1..T16 |
| `therm2bin` | RTL | TDC thermometer to 4-bit count |
| `divider` | RTL | divide by N (16) |
| `adpll_pkg` | package | widths, gains, analog constants, DLF word struct |
| `pfd` | model | phase-frequency detector with delayed clear |
| `phase_comparator` | model | NAND-latch arbiter (TDC stages, phase selector) |
| `phase_selector` | model | SIGN, delays, LEAD/LAG multiplexers |
| `vernier_tdc` | model | two delay lines, 15 comparators, `therm2bin` |
| `delay_elem` | model | transport delay used by the models above |
| `bootstrap_cell` | model | inverter with a supply-dependent (input) delay |
| `dco` | model | 5-cell ring; code to frequency; enable gate |

The models use real-valued delays with `timeunit 1ps; timeprecision 1fs`,
and every file declares the same time unit. The bootstrapped cell's boosted
swing and the PMOS array's analog behaviour are not represented. The DCO maps
n = 16·coarse + (fine lines on) to f = 220 MHz + 563 kHz·n and gives each of
its five cells a delay of 1/(10f).

Ports of `adpll_top`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ref_input` | in | 1 | 25 MHz reference |
| `rst_n` | in | 1 | active-low reset (see below) |
| `ph1`, `ph2` | out | 1 | DCO output: last ring stage, and the stage before it |
| `divider_out` | out | 1 | feedback clock |
| `dco_code`, `dco_frac` | out | 9, 4 | loop-filter word |
| `tdc_code`, `tdc_sign` | out | 4, 1 | last phase measurement |
| `dither` | out | 1 | modulator output |
| `dlf_sat` | out | 1 | loop filter clamped in the last cycle |

## Choices made here

The original design leaves these points open, or this implementation departs
from it:

* **Reset.** The chip has no reset pin. `rst_n` is added. It holds the PFD
  clear, stops the ring (an enable gate on its input), clears the modulator
  and divider, and loads the filter with code 256.0.
* **Filter clock edge.** The filter samples on the falling reference edge
  (see step 4).
* **DCO curve.** The DCO model is linear at 563 kHz/code from 220 MHz. The
  original chip's free-running frequency (586 MHz) and its measured corner
  gains are not reproduced.
* **Timing numbers.** PFD clear delay 400 ps, selector delay 30 ps, Vernier
  base delay 40 ps, and comparator delay 5 ps are all chosen here. Only the
  20 ps Vernier step comes from the original.
* **`ph2`.** It is taken one stage before `ph1`. The original names two
  400 MHz outputs but not their taps.
* **Decoders.** `therm2bin` counts ones, which tolerates bubbles in the code.
  The fine decoder adds the dither bit before decoding.
* **PFD circuit.** The original detector is built from two dynamic
  half-transparent registers whose reset goes through a NOR gate. Here it is
  modelled as two edge-set flags with a common delayed clear. The pulses
  behave the same way, but the circuit is not reproduced.
* **Supply voltage, jitter and power.** The models have no supply input, so
  they cannot reproduce the reported runs at 0.4 V (144-240 MHz) and 0.3 V
  (64-80 MHz). Clock jitter (about 69 ps peak to peak at 400 MHz) and power
  (about 70 µW) are properties of the analog circuit. The simulation does not
  produce them.
* **Left out.** The I/O buffers and pads, and the stand-alone bootstrapped
  oscillator test structure that shares the die, are not included.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert --no-sched-zero-delay -Irtl \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

The DCO cell's delay is a run-time value, so Verilator warns that it might be
zero. It never is, and `--no-sched-zero-delay` states that. Replace the
testbench name to run any other test. Each one simulates in under a second.

| Testbench | What it shows |
|---|---|
| `tb_adpll_top` | default parameters. Lock at 400 MHz (16 DCO cycles per reference, mean 400.000 MHz, skew < 100 ps). A 35 MHz reference, beyond the DCO range, drives the filter into its clamp at code 511. Return to 25 MHz and relock. It counts that each mechanism occurred: both SIGN values, TDC saturation, filter clamp, dither pulses, and a carry into T16. |
| `tb_adpll_lock_range` | lock at 240, 320, 400 and 480 MHz (15-30 MHz references), with the phase bounds discussed above |
| `tb_dco_dither` | modulator + decoder + DCO: mean period interpolates in 1/16-code steps, including across a coarse boundary |
| `tb_dlf` | filter against a real-number model over 2000 random cycles, reaching both clamps |
| `tb_sdm` | x = 1/16 gives one carry per 16 clocks; every x against an accumulator model |
| `tb_vernier_tdc` | transfer curve 3-403 ps in 10 ps steps: code = floor(delay/20 ps), limited to 15 |
| `tb_pfd`, `tb_phase_selector`, `tb_phase_comparator` | pulse widths, SIGN, and LEAD/LAG routing and timing |
| `tb_dco`, `tb_bootstrap_cell` | code-to-period map, enable, cell delay |
| `tb_divider`, `tb_bin2therm`, `tb_therm2bin` | exhaustive or random checks of the small blocks |

To change the design:

* **Loop gains.** `KP_SHIFT` and `KI_SHIFT` in `adpll_pkg`, or the `dlf`
  parameters.
* **DCO range.** `F_MIN_HZ` and `K_DCO_HZ` in `adpll_pkg`.
* **Division ratio.** The top's `DIV_N` parameter.
* **TDC.** `T_PS` and `DT_PS` on `vernier_tdc`. If the line gets longer,
  keep the PFD clear delay above STAGES x DT_PS.
