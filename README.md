# Delta-sigma DLL clock synchronizer (50-250 MHz)

## The idea

A delay-locked loop locks a chain of equal delay cells so that the delay up
to one feedback tap equals one clock period. Each tap then gives the clock
shifted by a whole number of cell delays. That alone is a coarse phase grid:
at 100 MHz and about ten cells per period the step is roughly 1 ns.

This design makes the grid fine without adding cells. The feedback tap is not
fixed. A first-order delta-sigma modulator switches it from cycle to cycle
among four neighbouring taps. The loop then locks to the average tap index:

    N_avg = base + 1 + K / 2^m,    Td = Tclk / N_avg

Here `base` is 8 (taps 8..11) or 7 (taps 7..10). K is an m-bit word, with m
from 5 to 7. Changing K by one LSB changes the cell delay a little. It
therefore moves every tap by a small, well-defined time: between about 2 and
60 ps, depending on the tap and the frequency. The loop filter averages out
the switching, which the modulator pushes to high frequencies.

An outer loop uses this. A coarse phase detector compares the chosen output
tap with an incoming clock `phi_in`. A controller first walks the output tap
until it lies within one cell delay before `phi_in`. It then sets K bit by bit
(successive approximation), so the output slides to within one fine step
before `phi_in`.

## Block map

| Block | File | Kind |
|---|---|---|
| shared constants and types | `rtl/dll_pkg.sv` | package |
| 13-cell delay line | `rtl/vcdl.sv` | behavioural (real-valued delay) |
| 13-to-1 tap multiplexer (4 copies) | `rtl/phase_mux.sv` | RTL |
| delta-sigma modulator | `rtl/ds_modulator.sv` | RTL |
| 25-bit PRBS for dither | `rtl/prbs25.sv` | RTL |
| phase detector | `rtl/phase_detector.sv` | behavioural |
| anti-harmonic-lock detector (AHD) | `rtl/ahd.sv` | RTL |
| charge pump | `rtl/charge_pump.sv` | behavioural (real current) |
| adaptive loop filter | `rtl/loop_filter.sv` | behavioural (real voltages) |
| coarse phase detector (CPD) | `rtl/cpd.sv` | RTL |
| synchronization controller | `rtl/sync_fsm.sv` | RTL |
| top level | `rtl/dll_top.sv` | structural |

The analog parts are event-driven models built on `real` values and `#delay`
statements. They simulate, but they cannot be synthesized. The digital parts
(modulator, PRBS, multiplexer, AHD, CPD, controller) are synthesizable RTL.

## The core loop with the dithered feedback tap

### Delay line

The line has 13 cells. Each cell delays both edges by

    Td = 0.357 ns·V / (2.189 V - V_F)

This follows the first-order law for a current-starved cell: load
capacitance over a current that grows with the square of the overdrive. The
two constants were fitted so that Td is 0.30 ns at V_F = 1.0 V and 4.0 ns at
2.1 V, the end points of the published delay curve. Td is clamped to
0.2..12 ns so the model stays finite outside that range.

Each edge keeps the delay it entered the cell with. This is a transport
delay, so a change of V_F never swallows or reorders edges already in flight.

### Reference path and start-up

The reference clock passes through a copy of the tap multiplexer before it
enters the line. This matches the multiplexer delay in the feedback path,
which the published design handles the same way. After reset, the reference
is kept off the line until the first falling edge of `phi_ref`. The line
therefore starts empty, and the AHD's two shift registers start in step.

### Modulator (the hardest part to get right)

`ds_modulator` works in 16-bit two's complement with 10 fraction bits. It
computes:

    x = 1 + K/2^m
    s = x + e
    y = clamp(round(s + d), 0, 3)
    e <= s - y

The dither `d` is uniform in [-1, 1) quantizer step. It comes from the low
bits of a 25-bit maximal-length PRBS (x^25 + x^22 + 1). The error stays within
±1.5 steps, so the long-run mean of `y` equals `x` exactly. That makes the
average tap `base + 1 + K/2^m`. Only the top m bits of K and of the dither are
used. An m below 5 acts as 5.

The offset of 1 is this design's choice. It centres the mean inside the four
levels, so the first-order loop never saturates. The published design says
only that the average runs from 8 to 10.

**Clocking the modulator.** The feedback tap changes every cycle, so the
select must never change while the selected tap is high. Otherwise the
feedback sees a false edge. The published text does not say which clock the
modulator uses. Here it is clocked by the falling edge of the last tap of the
active group (tap 11 or 10). This tap comes from a fourth copy of the
multiplexer, so it follows the group switch. When that edge arrives, all four
candidate taps have finished their high phase. The next rising edge on any of
them is at least half a period minus three cell delays away.

This is glitch-free whenever Td < Tclk/6, which covers normal lock
(Td ≈ Tclk/9 to Tclk/10). An earlier version clocked on the rising edge of
the tap before the group. It produced false feedback edges when the loop
started far above the locking delay (V_F = 1.8 V at 200 MHz), and the loop
then did not recover.

### Phase detector, AHD and charge pump

- **Phase detector.** A three-state phase-frequency detector with a 50 ps
  reset path. It ignores the first reference edge after reset, because the
  matching feedback edge comes from the previous reference edge.
- **AHD.** Two 4-bit one-hot rings. One advances on each falling edge of
  `phi_ref`, the other on each rising edge of `phi_DLL`. Their offset shows
  where the feedback edge lies:
  - more than 1.5 periods late: OVER (ring offset 2);
  - less than half a period: UNDER (ring offset 3, i.e. -1).

  Both override the phase detector: UNDER pumps up (more delay) and OVER
  pumps down.
- **Charge pump.** The current is a copy of the cell current,
  `I = (code/16)·K_P/2·(2.189 - V_F)^2`. It scales with the delay, as in the
  published replica-bias scheme. The 5-bit `icp_code` is the programmable
  ratio; 16 is unity.

### Adaptive loop filter

The pump charges C1 = 300 pF. A resistor R joins C1 to C2 = 30 pF, and V_F is
the voltage on C2. R is a MOSFET in the published design, with
1/R = α·g_m of the cell transistor. The model uses α = 0.11, which puts the
ratio of the two poles near the published value of about 2.2. R therefore
tracks the operating point, and the loop dynamics scale with the clock
period.

The filter is solved by forward Euler. It updates whenever the pump current
changes, and also on a 1 ns tick.

**Settling.** The loop time constant is several hundred to a few thousand
reference cycles. At 50 MHz after the last successive-approximation step, the
slowest tail is several thousand cycles.

## The synchronization loop

### Coarse phase detector

Two three-cell chains are used: `phi_in` delayed by 1, 2 and 3 cells, and
`phi_out` delayed by 3 cells. The chains are copies of the main cell and share
V_F. The delayed `phi_out` samples the three delayed copies of `phi_in`. This
splits the period into ten intervals of one cell delay. The outputs are
`HOLD = q1·q2·¬q3` and `UPDN = q3`:

| phi_out is in | HOLD | UPDN |
|---|---|---|
| E: within one cell delay before phi_in | 1 | 0 |
| F..J: just after phi_in | 0 | 1 (move earlier) |
| A..D | 0 | 0 (move later) |

These equations come from the described intervals, not from the gate
drawing.

### Controller (`sync_fsm`)

The controller runs on the reference clock. It makes one decision every
`decision_div + 1` clocks. HOLD and UPDN pass through two-flop
synchronizers. The steps are:

1. **Coarse.** Start at tap 8, with K all ones and group 8..11 (shortest cell
   delay). On each decision:
   - HOLD: go to fine tuning;
   - otherwise UPDN = 1: move to the earlier tap; UPDN = 0: move to the later
     tap.

   The taps run 4..13 and wrap around.
2. **Fine.** Successive approximation from the MSB. Clearing a bit lowers
   N_avg, which lengthens Td and moves the output later. The bit stays cleared
   if HOLD still holds after one decision interval. Otherwise the output has
   crossed into interval F and the bit is restored. After m decisions the
   output is within one fine step before `phi_in`.
3. **Group switch.** Suppose every bit was cleared (K = 0 in group 8..11,
   N_avg = 9) and HOLD still holds. The group becomes 7..10 with K all ones,
   and the search repeats there. If HOLD is lost right after the switch, the
   switch is undone (K = 0, group 8..11). This undo check is this design's
   own addition.
4. **Locked, then revalidate.** After `REVAL_TICKS` decisions (default 32),
   the controller starts again from the coarse step. This follows drift of
   `phi_in`, in the spirit of the published periodic revalidation.

`decision_div` must be long compared with the core loop's settling time.
Otherwise HOLD is judged before the output has reached its new phase. Values
that work: 1023 at 200 MHz, and 8191 for all four frequencies.

## Where this departs from the published design

- The delay law follows the device equation, fitted to the two published end
  points. It is not a fit of the whole curve.
  - Final V_F for the same lock: about 2.01 V at 50 MHz (published 1.89 V);
    about 1.52 V at 200 MHz (published 1.55 V).
  - The absolute V_F values should not be trusted. The timing (Td = Tclk/N_avg)
    is set by the loop, so it does not depend on the fit.
- The phase-detector type, the reset path and the first-edge rule are this
  design's choices. Only "a PD" is given.
- The AHD ring length, its reset pattern and the CPD gate equations were
  derived from the described behaviour.
- The modulator's offset of 1, its clock source and its reset values are this
  design's choices.
- The PRBS polynomial and seed, the revalidation count, the tap wrap-around,
  the synchronizers and the group-switch undo check are this design's
  choices.
- The multiplexers have zero delay. The reference-path copy exists to show
  the structure; with zero delay it changes nothing.
- Not modelled: the serial-to-parallel control interface, the master bias, the
  differential-to-single-ended and output buffers, the replica-bias circuit
  (folded into the cell and pump equations), supply noise and mismatch. The
  control words (`m_res`, `icp_code`, `decision_div`, `start`) are plain
  ports.

## How far it can be trusted

Every block has its own self-checking testbench in `tb/`. The expected values
are worked out independently:

- the PRBS against a reference LFSR;
- the modulator's mean and noise shaping;
- every multiplexer select;
- the AHD windows;
- the ten CPD intervals;
- the controller against an exhaustive search over K;
- the delay law, the filter's step response and the pump current against
  their equations.

`tb_dll_top` runs the whole design at 200 MHz:

- lock from too little delay (UNDER);
- lock from about 1.6 periods of delay (OVER);
- coarse search in both directions;
- fine tuning with kept and restored bits;
- the group switch;
- revalidation after `phi_in` moves.

The final phase error lies between minus one fine step and zero. In one run it
was -2.7 ps against an 8.5 ps step, and -6.9 ps against a 13.9 ps step.

`tb_dll_full` runs the full design at 50, 100, 200 and 250 MHz, with m = 7, 6,
5 and 5. It checks:

- the core lock against Tclk/N_avg;
- that the lock holds after a settling wait;
- the mean output error against minus one fine step, allowing for the
  measured dither wander.

Results of one run of `tb_dll_full` (the error is the mean of phi_out minus
phi_in over 400 cycles):

| Clock | m | Result | Error | Fine step |
|---|---|---|---|---|
| 250 MHz | 5 | tap 11, K 24 | -7.2 ps | 14.5 ps |
| 200 MHz | 5 | tap 5, K 20 | -2.6 ps | 8.5 ps |
| 100 MHz | 6 | tap 8, K 57 | -11.5 ps | 12.8 ps |
| 50 MHz | 7 | tap 13, K 63 | -9.0 ps | 22.6 ps |

All four ended in group 8..11 with HOLD on every sampled cycle.

Known limits:

- **Harmonic lock.** Recovery from very large initial delays (Td above about
  Tclk/6) is not guaranteed. It has not been simulated. When the modulator is
  clocked too late, false feedback edges can upset the AHD. Start-up from the
  reset value (0.5 V, short delay) is the intended path.
- **Settling at 50 MHz.** The core settling at 50 MHz is slow. With a short
  decision interval, the controller can judge HOLD too early and end one fine
  step off.
- **Charge-pump gain.** A pump ratio much above 1 (for example `icp_code` 31)
  made the modelled loop unstable.
- **Mismatch and noise.** There is no mismatch and no noise, so the jitter
  figures of the published chip are not reproduced.

## Simulating with Verilator

Verilator 5 with `--timing` is required, because the analog models use
delays. To build and run one testbench, for example the top-level one:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/dll_pkg.sv tb/tb_dll_top.sv --top-module tb_dll_top -Mdir build_top -o sim
    ./build_top/sim

Replace `tb_dll_top` with any other `tb/tb_*.sv` to run that testbench.
`tb_dll_full` (the four frequencies) takes a few minutes. `tb/dll_sync_run.sv`
is a helper module that `tb_dll_full` uses; it is not a testbench on its own.
Each testbench ends with a line `TB_RESULT checks=N failures=M`.
