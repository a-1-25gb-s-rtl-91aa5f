# Digitally-controlled dual-loop CDR with a delay-buffer fine step (1.25 Gb/s)

A clock and data recovery circuit for chips with many serial channels. One
reference PLL is shared by all channels and makes a clean 1.25 GHz clock in
quadrature (I and Q). Each channel has no oscillator of its own. Instead it
rotates the phase of the shared clock until the clock samples its incoming
1.25 Gb/s data in the middle of each bit.

A digitally-controlled phase rotator has a resolution problem. A bang-bang
loop always dithers around lock by a few phase steps, so coarse steps mean
jitter. A phase interpolator (PI) is hard to build with more than about 4 bits.
This design keeps a 4-bit PI and adds a small digitally-controlled delay buffer
(DCDB) after it. The buffer adds 0, 1, 2 or 3 quarter-steps of delay. Four
quadrants × 16 PI levels × 4 DCDB steps give **256 phase positions per bit
period**, about 3.1 ps at 1.25 Gb/s, from a 4-bit interpolator.

```
 ext_clk 156.25 MHz ─► PFD ─► charge pump/VCO ─┬─► I ──► MUX_I (I or /I) ─┐
                        ▲                      └─► Q ──► MUX_Q (Q or /Q) ─┤
                        └──────── ÷8 ◄──── I                              ▼
                                                         phase interpolator (16 levels)
                                                                          ▼
                                                         DCDB (4 delay steps) ──► rclk
 din ─► BBPD ─UP/DOWN─► Up/Down filter ─UP_F/DOWN_F─► controller ─┬─ MUX code (2 b)
          └─► rdata                                               ├─ PI code (15 b thermometer)
                                                                  └─ DCDB code (2 b)
```

## The phase pointer

Most of this design is one 8-bit phase pointer, built as three chained
controllers. Each `UP_F` moves the recovered clock one position (1/256 of a
bit) later. Each `DOWN_F` moves it one position earlier. The pointer wraps
around the full circle.

| pointer bits | controller | hardware | what it selects |
|---|---|---|---|
| `[7:6]` | `mux_ctrl`, 2-bit up/down counter in **Gray order 0, 1, 3, 2** | two 2:1 clock MUXes | quadrant: which of I or /I and Q or /Q are mixed |
| `[5:2]` | `pi_ctrl`, 15-bit bidirectional shift register | PI current DAC | 16 levels between the two selected clocks |
| `[1:0]` | `dcdb_ctrl`, 2-bit up/down counter | delay buffer | 4 fine delay steps inside one PI level |

The chaining is the part that takes the most care:

* **DCDB to PI.** The DCDB counter runs 0, 1, 2, 3 inside a PI level. When it
  wraps (3→0 going up, 0→3 going down) it raises `carry` or `borrow`
  combinationally. The PI register then moves on the same clock edge.
* **PI to MUX, and the "snake".** The four quadrants are

  | MUX code | clocks mixed | phase range | thermometer code as phase grows |
  |---|---|---|---|
  | 0 (`00`) | I, Q | 0°–90° | fills (0 → 15 ones) |
  | 1 (`01`) | /I, Q | 90°–180° | empties (15 → 0 ones) |
  | 3 (`11`) | /I, /Q | 180°–270° | fills |
  | 2 (`10`) | I, /Q | 270°–360° | empties |

  `sel[0]` inverts I and `sel[1]` inverts Q. Because the MUX code is Gray, only
  one clock is inverted at each quadrant change. The thermometer direction
  reverses in alternate quadrants, so the inverted clock is always the one
  with the smallest weight at that moment. This keeps the step at a quadrant
  change small. At a quadrant end the PI register does not shift. It raises
  `carry`/`borrow` for the MUX counter, and the next quadrant starts from the
  same thermometer code, read in the other direction. `mux_ctrl` tells
  `pi_ctrl` the direction through its `rising` output.
* The pointer resets to 0: quadrant 0, empty thermometer code, DCDB step 0.

Reading the position back from the codes: with q = quadrant index (0..3 in the
order above), k = number of ones and d = DCDB code,
`pointer = 64·q + 4·(q is 0 or 2 ? k : 15 − k) + d`.
`tb/cdr_ref_pkg.sv` is this formula written as a lookup.

The PI level for k ones is modelled as the fraction (k + 0.5)/16 of the way
between the two clocks. The half-unit offset makes the 64 PI positions evenly
spaced over the circle, including at quadrant changes. The DCDB step is
1/256 of the period, i.e. a quarter PI level.

## The loop

* **Bang-bang phase detector** (`bbpd`). This is an Alexander (early/late)
  detector. Data is sampled on the rising edge of the recovered clock (this
  gives `rdata`) and on the falling edge (edge sample). When two adjacent bits
  differ, the edge sample between them decides:
  * equal to the earlier bit: the clock is early, so `up` (move later);
  * equal to the later bit: the clock is late, so `dn`.

  `up`/`dn` are registered one-cycle pulses, two rising edges after the
  deciding data sample. At lock, the falling edge sits on the data transitions
  and the rising edge sits mid-bit.
* **Up/Down filter** (`ud_filter`, `N = 2`). It passes a correction only after
  two equal decisions in a row. Cycles without a data transition neither count
  nor break a run. An opposite decision restarts the run. This suppresses the
  ±1-step dither of a bare bang-bang loop. It also halves the maximum slew to
  1 step per 2 decisions. At most 1/512 UI per bit is about 1950 ppm of
  trackable frequency offset, which is well above ±400 ppm.
* **Controller** (`cdr_controller`). Codes change on the rising edge after
  `UP_F`/`DOWN_F`. From data sample to code change the loop latency is about
  four recovered-clock cycles.
* Everything in the channel runs on the recovered clock itself. No divided
  clock is used.

## Reference PLL

The reference PLL has the classic structure: `pfd` (tri-state PFD), `cp_vco`
(charge pump, loop filter and quadrature VCO), and `clk_div` (÷8). From a
156.25 MHz external clock it makes I and Q at 1.25 GHz, with Q a quarter period
after I. In `tb_ref_pll` the VCO starts 1 % slow and settles to 800.000 ps
within 300 reference cycles.

## Logic versus behavioural models

Synthesizable logic:
* `bbpd`, `ud_filter`, `dcdb_ctrl`, `pi_ctrl`, `mux_ctrl`, `cdr_controller`
* `clk_mux2`, `pfd`, `clk_div`
* the package `cdr_pkg`

Behavioural timing models of analog parts (simulation only, `#` delays and
`real` arithmetic):
* `phase_interp`: linear mixing of edge times, fixed 100 ps delay.
* `dcdb`: delay = 50 ps + code × 3.125 ps × (1 + `ERR_PCT`/100).
* `cp_vco`: proportional and integral period correction per PFD comparison,
  tuning range ½ to 2× the free-running period.

`ref_pll`, `cdr_core` and `cdr_top` contain these models, so they are
simulation models as a whole. A silicon implementation replaces the three
models with circuits and keeps the rest.

`DCDB_ERR_PCT` (on `cdr_top` and `cdr_core`) is the relative error of the DCDB
step: (actual step − ideal step) / ideal step. In silicon, process, voltage and
temperature set it. Here it is a parameter, so its effect on jitter can be
studied.

## Design choices

These points are this design's choices where the underlying description was
silent or only sketched:

* Alexander phase detector, the polarity of UP, and registered outputs.
* Filter behaviour on idle cycles and after an output.
* Bit-to-MUX mapping, the fill side of the thermometer register, and the
  combinational carry/borrow chaining.
* Controller clocked by the full-rate recovered clock. A real 1.25 GHz
  implementation may need to run the controller on a divided clock. That adds
  loop latency, and each added cycle of latency adds about two steps of
  peak-to-peak dither.
* All resets asynchronous, active low, to phase 0.
* The PI model is linear. A real interpolator bends the phase curve, which
  shows as uneven steps. A MUX switch disturbs one output edge by at most
  1/32 UI in the model. This is the main part of the ~50 ps peak-to-peak
  sampling error seen in simulation.
* The PLL loop gains (`KP = 0.03`, `KI = 0.002`) and the free-running period
  (808 ps) are illustrative.
* Differential clocks are carried single-ended. "Inverted" stands for swapping
  the pair.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* Unit tests compare against independent models. Examples: the controller
  against the pointer formula; the BBPD against the bits sent; the PI and
  DCDB models against their timing formulas within 0.01 ps.
* `tb_cdr_core`: one channel with ideal clocks. Data arrives at +200 ppm, then
  −200 ppm. Helper modules: `data_source` (PRBS7 at a settable ppm offset and
  jitter) and `cdr_monitor` (checks and counters).
* `tb_cdr_top`: the whole design at default parameters, including PLL lock.
  It checks every code against the pointer formula, the retimed data against
  the PRBS7 recurrence, and the sampling phase within ±0.1 UI of the bit
  centre. It also requires that each mechanism occurred: BBPD UP and DOWN, a
  decision swallowed by the filter, `UP_F`, `DOWN_F`, DCDB wraps, PI shifts,
  quadrant changes in both directions, and both PFD polarities.
* `tb_cdr_workloads`: seven full CDRs side by side. Four run clean data at
  +200 ppm with DCDB step errors of −50/0/+50/+100 % over 10000 bits. One runs
  +400 ppm, one −400 ppm, and one has data whose transitions are delayed by a
  random 0–0.53 UI.

* `tb_phase_transfer`: the open-loop phase-versus-code curve of the MUX, PI
  and DCDB chain over all 256 positions.
  * With an ideal buffer every step is 3.125 ps, including at PI-level and
    quadrant changes.
  * With the buffer step 50 % too large the steps are 4.69 ps inside a PI
    level, and the phase goes back 1.56 ps at each PI-level change. A wrong
    buffer step makes the curve non-monotonic but leaves the PI levels where
    they were.

Results of `tb_cdr_workloads` (all error-free after lock):

| case | RMS sampling jitter | peak-to-peak |
|---|---|---|
| DCDB error −50 %, +200 ppm | 4.9 ps | 52 ps |
| DCDB error 0 %, +200 ppm | 3.5 ps | 53 ps |
| DCDB error +50 %, +200 ppm | 4.0 ps | 46 ps |
| DCDB error +100 %, +200 ppm | 5.3 ps | 50 ps |
| ±400 ppm | 3.5 ps | 53–60 ps |
| input eye closed by 0.53 UI | 13.5 ps | 84 ps |

These are the model's numbers. They follow the expected trend: lowest at 0 %
step error and degrading gently either way. They are not predictions for
silicon.

## Simulating

All files use `` `timescale 1ps/1fs ``. Testbenches need `--timing`.
Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cdr_pkg.sv tb/cdr_ref_pkg.sv tb/tb_cdr_top.sv --top-module tb_cdr_top
./obj_dir/Vtb_cdr_top
```

Swap in any other `tb_*` as top. Each run takes well under a second of wall
time.

To change the design:
* Pointer widths are in `cdr_pkg`. `pi_ctrl`, `dcdb_ctrl` and the PI model
  take them as parameters. `cdr_ref_pkg` and `cdr_monitor` in `tb/` assume
  256 positions.
* The filter length is `FILTER_N`.
* The DCDB step error is `DCDB_ERR_PCT`.
