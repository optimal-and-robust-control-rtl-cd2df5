# A small-area frequency-locked loop with a one-gain integral controller

In a chip split into many voltage/frequency islands, each island needs its own
clock generator, and a PLL per island costs too much area. This design is a
frequency-locked loop (FLL) small enough to replicate per island: a
digitally-controlled ring oscillator (DCO), a counter that measures its
frequency, and a controller made of one subtractor, one multiplier by a
constant-width gain and one accumulator. The whole control law is

    u_k = u_{k-1} + K * (set_point - M_k)

where `u` is the 8-bit DCO word, `M_k` the counter's reading and `K` a single
gain. The gain `K = 0.392` was chosen so that the loop has no overshoot, no
static error and the shortest settling time over the whole spread of oscillator
gains and offsets that process, voltage and temperature can cause. With it, a
step from 1 GHz to 4 GHz settles into the 5% band in 6 samples of 60 ns.

## The loop

```
 set_point ─►(+)─ e ─► fll_controller ── u[7:0] ──► dco_model ──┬─► clk_div2 ─► clk_out (f/2, 50% duty)
             (−)         (K, integral)                          │
              ▲                                                 │ dco_raw (f)
              └──────── meas = M_k ◄── freq_sensor ◄────────────┘
                                     (count, one sample late)
```

* **Oscillator.** The DCO is linear in its word: `f = b + K_DCO * u`. Across
  corners `K_DCO` ranges from about 10 to 30 MHz per LSB and the offset `b`
  varies by several GHz. The offset drops out of the loop dynamics; only
  `K_DCO` changes the loop gain. The raw oscillation has no guaranteed duty
  cycle, so the usable clock is the raw signal divided by two.
* **Sensor.** A counter counts raw DCO edges in a fixed window once per
  sample. Its reading describes the previous sample, so the loop contains one
  sample of delay: `M_k = Ks * f_{k-1}`.
* **Controller.** It compares the reading with the set point and integrates the
  difference with gain `K`.

Closed loop, the error obeys `e_{k+1} = (1 - K*Ks*K_DCO) * e_k` (plus
disturbance terms). The pole `1 - K*Ks*K_DCO` must lie in (0, 1). Below 1 the
loop is stable. Above 0 it does not overshoot. The larger `K` is, the faster the
loop settles. `K` is the largest gain that keeps the pole positive and robustly
stable at every corner, and that still rejects an additive disturbance on the
oscillator frequency. It was computed offline; the hardware only stores it.

## Numbers and units

| Quantity | Value | Where it comes from |
|---|---|---|
| DCO word `u` | 8 bits, 0..255 | oscillator interface |
| Sampling period | 60 ns = 30 cycles of a 500 MHz control clock | period given; clock rate is this design's choice |
| Counting window | first 50 ns (25 cycles) of each period | this design's choice, see below |
| Sensor gain `Ks` | 50 counts per GHz of raw DCO frequency | follows from the 50 ns window |
| Set point | 8 bits, in counts (`Ks*fr`): 200 = 4 GHz raw = 2 GHz output clock | |
| Gain `K` | 8 bits, 7 fractional: `8'b0011_0010` = 0.3906 ≈ 0.392 | |
| Sensor range | 255 counts = 5.1 GHz; the stated maximum input is 5 GHz | |

The set point and the count are in the same unit, so the controller never
deals with GHz. To lock the output clock at `F` GHz, set
`set_point = 100 * F` (raw frequency `2F`, 50 counts per GHz).

## The controller's arithmetic (`fll_controller`)

The accumulator is 15 bits: the 8-bit DCO word plus 7 fractional bits, the
same number of fractional bits as `K`. Each update adds `K * e` (a 9-bit signed
error times the 8-bit gain) to the full accumulator, and `u` is the integer
part. Keeping the fraction matters: a small error whose `K*e` is below one LSB
is not lost but builds up over the following samples. Rounding or truncating
each step to whole LSBs would lose it, leaving a static error and a different
transient. A recorded transient of the original implementation checks this:
with errors 150, 92, 56, 34, 21, 14, 8, 5, 3, 2 it moved the word
52 → 111 → 147 → 169 → 182 → 190 → 196 → 199 → 201 → 202 → 203. This
accumulator reproduces that sequence exactly. Neither rounding nor truncating
each step does.

The sum is clipped at 0 and at 255 + 127/128, so the word cannot wrap. An update
that was clipped raises `sat_lo` or `sat_hi` until the next update. Clipping
happens when the set point lies outside the oscillator's reachable range at the
current corner. The loop then holds the nearest end of the range and recovers
without windup once the set point is reachable again.

The registers change only on the clock edge where `meas_valid` is high, one
control cycle after the sensor's reading appears. `k_gain` and `set_point` are
plain inputs, sampled at that edge, so the gain can be reprogrammed at run
time.

## The sensor and the timing inside one sample (`freq_sensor`)

This part is the least obvious, because it crosses between two unrelated
clocks and must still give the loop exactly one sample of delay.

* A 10-bit counter runs freely on the raw DCO clock. It is kept in Gray code,
  so only one bit changes per edge.
* The control clock samples the Gray value through two flip-flops and converts
  it back to binary. A sample taken while the counter is moving is off by at
  most one count and is never torn.
* At cycle 0 of each period the binary value is stored. At cycle 25 the stored
  value is subtracted from the current one. The difference, modulo 1024, is the
  number of edges in exactly 25 control cycles. It is clipped to 255
  (`meas_ovf`) and presented with a one-cycle `meas_valid` strobe.
* The controller updates at cycle 26. The two-flop synchronizer delays the
  window by about 2 cycles, so the next window really starts at about cycle 28.
  The DCO therefore runs on one word for the whole of each window. The reading
  of window k is used to compute the word for window k+1: this is the one
  sample of delay the gain was designed for, and no more.

If the window filled the whole period, the controller's update would land
inside the next window. Part of that window would then count the old word,
which adds a fractional extra delay and, at high loop gain, overshoot. The
10 ns gap avoids that. Because the window is 50 ns rather than 60 ns, the sensor
gain is 50 counts/GHz.

The free-running counter never needs to be reset to measure correctly, because
only differences are used. It still has a reset, released synchronously to the
DCO clock. If the oscillator stops (the word asks for a frequency below its
range), the counter stops with it and the reading is 0.

## The oscillator model (`dco_model`)

The real DCO is a standard-cell ring oscillator. This repository has only a
behavioural model of it, so `fll_top` is a simulation top. For
implementation, replace `u_dco` with the oscillator macro, which has the same
`u` input and raw output. Every other block is synthesizable.

The model produces `f = B_GHZ + KDCO_GHZ*u + w_mhz/1000` GHz, with a 50% duty
square wave. A change of `u` or `w_mhz` takes effect at the next half period.
Below 50 MHz it stops, with its output low. `w_mhz` is the disturbance input
used by the tests; it is not a port of the real oscillator. The three corners
used in the tests:

| Corner | KDCO (MHz/LSB) | offset (MHz) | reachable raw range (GHz) | loop pole `1 - K*Ks*KDCO` |
|---|---|---|---|---|
| syst 1 (default) | 19.83 | −31.5 | 0 .. 5.03 | 0.61 |
| syst 2 | 14.25 | 4578.5 | 4.58 .. 8.21 | 0.72 |
| syst 3 | 25.50 | 2078.5 | 2.08 .. 8.58 | 0.50 |

Above 5.1 GHz the sensor saturates, so at syst 2 and syst 3 only the lower part
of the oscillator range can be locked with the 8-bit count.

## Where this design departs from the original FLL

* **Sensor gain.** The original design uses a sensor gain of 85 counts/GHz to
  compute `K`, but the recorded transient of its implementation shows
  50 counts/GHz. This design uses 50, which also fits inside a 60 ns period
  (85 counts/GHz would need an 85 ns window). With 50 the loop is slower than
  the gain was tuned for: the pole is 0.61 at syst 1 instead of 0.34. It still
  has no overshoot and reaches the 5% band in 6 samples at syst 1. Use a longer
  window and a longer period to get a higher `Ks`.
* **Control clock, window placement, Gray-code crossing, fixed-point format,
  saturation, reset values.** The original gives none of these. They are the
  choices described above.
* **Corner ranges.** Some published step tests (1 → 4 GHz at syst 2 and syst 3)
  ask for frequencies below those corners' offsets. An 8-bit word from 0 to 255
  cannot reach them. The tests use steps inside each corner's range, and check
  that an unreachable set point pins the word at 0.
* The offline computation of `K` is not hardware and is not included. Neither
  is the supply-voltage actuator that a complete frequency and voltage scaling
  scheme would pair with this clock generator.

## Files

| File | Contents |
|---|---|
| `rtl/fll_pkg.sv` | widths, default gain, sampling constants |
| `rtl/fll_controller.sv` | comparator and integral law |
| `rtl/freq_sensor.sv` | Gray counter, synchronizer, window timer |
| `rtl/dco_model.sv` | behavioural oscillator (simulation only) |
| `rtl/clk_div2.sv` | divide-by-two output clock |
| `rtl/fll_top.sv` | the loop |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_fll_pvt` and `tb_fll_corner_switch` (loop-level scenarios) |

Parameters of `fll_top`: `SAMPLE_CYC` (30), `WINDOW_CYC` (25, must be less than
`SAMPLE_CYC` minus about 4 cycles for the window/update gap), `KDCO_GHZ` and
`B_GHZ` (corner of the oscillator model). If you change the window, change the
set-point scale with it: `Ks = 2 * WINDOW_CYC` counts per GHz at 500 MHz.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops by itself. Every file has a
`timeunit`, and the oscillator model uses `#` delays, so Verilator needs
`--timing`:

```
verilator --binary --timing --assert -y rtl rtl/fll_pkg.sv tb/tb_fll_top.sv --top-module tb_fll_top
./obj_dir/Vtb_fll_top
```

Replace `tb_fll_top` with the name of any other testbench.

* `tb_fll_controller`: replays the recorded transient above exactly. It then
  compares 2000 random updates (random counts, set points and gains, and gaps
  between strobes) against an integer model, saturation flags included.
* `tb_freq_sensor`: counts at 0.3 to 6 GHz within ±1, overflow, a stopped
  oscillator, the 30-cycle strobe spacing, and a reading that covers only the
  window after a change.
* `tb_dco_model`: frequency law within 0.5%, stop and restart.
* `tb_clk_div2`: toggling, 50% duty, reset.
* `tb_fll_top` (default sizes, syst 1): lock at 1 GHz. A step to 4 GHz, checked
  sample by sample against the recorded transient (±2 counts), with no
  overshoot, the 5% band within 7 samples and a 2 GHz output clock. Then
  disturbance rejection, sensor overflow, run-time gain change, upper and lower
  saturation and oscillator stop, with each of these counted.
* `tb_fll_pvt`: the three corners side by side. Step responses are checked
  against the settling time that follows from each corner's pole, with no
  overshoot. It also checks recovery from ±500 MHz disturbance pulses and the
  out-of-range set point at syst 2.
* `tb_fll_corner_switch`: the loop is locked at 4 GHz while the oscillator's
  characteristic is switched at run time from syst 1 to syst 3 and back. The
  switch is emulated through the disturbance input. The sensor saturates after
  the first switch. Disturbance pulses are added. The loop must relock from
  each side without crossing the set point, within the settling bound of the
  new corner's pole. A switch to syst 2 pins the word at 0.

Each testbench simulates a few microseconds and runs in well under a second.
