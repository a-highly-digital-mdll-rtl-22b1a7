# MDLL clock multiplier with a digitally tuned, self-scrambling GRO TDC

A multiplying delay-locked loop (MDLL) multiplies a clean reference clock
(50 MHz) to a high-frequency output (1.6 GHz, N = 32). It does this by taking
a free-running ring oscillator and, once every N output cycles, replacing one
of its edges with a reference edge. That resets the ring's accumulated phase
noise every reference cycle, but if the ring's natural period T is slightly
wrong, the cycle that holds the reference edge comes out as T + delta
instead of T. The result is a periodic error ("deterministic jitter", seen as
a reference spur).

This design removes delta with a loop that is almost entirely digital:

* Twice per reference cycle a time-to-digital converter (TDC) measures one
  output period: once the period that holds the reference edge (T + delta)
  and once an ordinary period (T). Both measurements come through the same
  path.
* A correlator subtracts the two (correlated double sampling). Any offset or
  mismatch in the measurement path is common to both samples, so it cancels.
  What is left is a quantised estimate of delta.
* An accumulator integrates these estimates. A first-order sigma-delta
  modulator turns the accumulator's 16-bit tuning word into an 8-bit DAC
  code. An RC low-pass then makes the analog tuning voltage Vtune for the
  ring's fine-tuning port.

A TDC step is about 45 ps, far coarser than the sub-picosecond target. The
loop still works because the TDC is a *gated ring oscillator* (GRO) that
keeps its phase between measurements, so its quantisation error changes from
sample to sample. Averaging over many samples inside the loop then gives a
much finer effective resolution.

## Block map

```
 clk_100m ─► ref_divider ─► ref ─► ring_osc_mux ─► clk_out (1.6 GHz)
                                    ▲   │ Out1  │ Outbuf_n
                            Sel ────┘   ▼       ▼
                              select_logic ◄─ Div ─ edge_generator ◄─ mdll_divider (÷N)
                                                    │ en      │ dis
                                                    ▼         ▼
                                               gro_tdc (gro_tdc_logic + gro_ring)
                                                    │ Enable, 10-bit result
                                                    ▼
                fpga_tuning_loop: clk_div2 ─► correlator ─► accumulator ─► sigma_delta
                                                    │ 16-bit code (8 MSBs used)
                                                    ▼
                                         dac16 ─► rc_filter ─► Vtune ─► ring_osc_mux
```

| Module | Kind | What it is |
|---|---|---|
| `mdll_top` | system model | Closed loop of everything below |
| `mdll_core` | structural | MDLL core chip: reference divider, ring, select logic, ÷N, edge generator |
| `ring_osc_mux` | behavioural | 5-stage multiplexed ring oscillator with reference buffers |
| `select_logic` | RTL | Generates Sel, which lets one reference edge into the ring every N cycles |
| `mdll_divider` | RTL | ÷N counter producing raw Div and Div2x |
| `edge_generator` | RTL | Retiming flops producing Div, en and dis |
| `ref_divider` | RTL | 100 MHz → 100/50/25/12.5 MHz |
| `gro_tdc` | structural | GRO TDC chip: `gro_ring` + `gro_tdc_logic` |
| `gro_ring` | behavioural | 15-stage gated ring that holds its phase while gated off |
| `gro_tdc_logic` | RTL | SR latch (Enable), per-phase edge counters, adder, output register |
| `fpga_tuning_loop` | RTL | `clk_div2`, `correlator`, `accumulator`, `sigma_delta` |
| `dac16`, `rc_filter` | behavioural | 16-bit DAC and 3 MHz RC low-pass |
| `mdll_pkg` | package | Shared widths, types, reference-select enum |

All the RTL modules can be synthesised. The behavioural modules model analog
circuits or bought-in parts. They use `real` signals and delays and are only
for simulation.

## How the period windows are made (the subtle part)

Everything depends on the TDC windows lining up exactly with the right ring
cycles. The chain is:

1. **Divider.** `mdll_divider` counts rising edges of Outbuf_n (the inverted
   third ring stage). It outputs `div_raw = ~cnt[L-1]` and
   `div2x_raw = ~cnt[L-2]`, where N = 2^L. Both rise together at the counter
   wrap. `div2x_raw` also rises a second time, half-way through the count.
2. **Edge generator.** `edge_generator` passes Div through two flops and
   Div2x through two flops (one for metastability, one to make `en`). So Div
   and `en` rise on the *same* Outbuf_n edge. `dis` is `en` one Outbuf_n
   cycle later. The window from rising `en` to rising `dis` is therefore
   exactly one output period.
3. **Select logic.** When Div rises, `select_logic` arms. Sel goes high with
   the next rising Out1 (the first ring stage), which is in the middle of a
   ring half-cycle. The ring then waits at the multiplexer for the reference
   edge. Sel drops on the following falling Out1 and the logic disarms. The
   window opened by this `en` therefore contains the reference edge and lasts
   T + delta. The window opened by the mid-count Div2x edge lasts T.
4. **GRO latch.** In `gro_tdc_logic`, a reset-dominant SR latch turns en/dis
   into Enable. Enable is high from rising `en` to rising `dis`. Rising `dis`
   loads the sum of all edge counters into the output register and then
   holds the counters at zero.
5. **Divide-by-2 and correlator.** `clk_div2` toggles on every rising Enable.
   The correlator reads the TDC result on the *next* rising Enable, when the
   register has long settled. When the divide-by-2 output is 0 it stores the
   sample; when it is 1 it outputs `stored − current` = TDC(T+delta) − TDC(T).
   The divide-by-2 resets to 1. The divider resets to zero, where raw Div and
   Div2x are high, and the retiming flops reset low. So the first rising
   `en` after reset comes together with a rising Div, as at a counter wrap.
   The first window is therefore a T+delta window, and the pair order is
   right. If the pair order were wrong, the loop's feedback sign would flip.
   The first two pair slots after reset are blanked (corr = 0). The first
   window after reset stretches from reset to the first reference edge, up
   to a whole reference period. Without blanking, that one false sample is
   large enough at 12.5 MHz to push the ring so slow that the reference edge
   arrives before Sel, and the loop never recovers.
6. **Accumulator and modulator.** The rising edge of the divide-by-2 output
   (once per reference cycle) clocks `accumulator` and `sigma_delta`:
   `acc -= corr << gain_shift`, saturating at both ends.

Sign convention: a positive delta means the ring finished its N−1 ordinary
cycles early and waited for the reference, i.e. it runs fast. So the
accumulator lowers the tuning word, and a higher Vtune means a faster ring.

### Why the GRO helps (and what `tb_gro_tdc` proves)

While Enable is high, one transition runs round the 15 inverters. Every
rising and falling edge of every stage is counted, so the count goes up once
per inverter delay (45 ps). When Enable falls the ring freezes part-way
through a stage, and the next window starts from that point. The leftover
part of one window is credited to the next, so the error of sample k is
q[k] − q[k−1] (first-order noise shaping). Two consequences are checked in
the testbench:

* the sum of any number of results equals ⌊total enabled time / 45 ps⌋
  exactly;
* a fixed 625 ps window reads 13 or 14 in the ratio that averages to 13.89,
  instead of always reading the same value.

In the MDLL loop the alternating subtraction folds the shaped noise back to
low frequencies. The benefit that remains is the scrambling, which lets the
accumulator average the quantisation error away.

## Interfaces and settings (`mdll_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk_100m` | in | 100 MHz reference |
| `rst_n` | in | Active-low asynchronous reset of all logic |
| `mode` | in | 1: edge injection on; 0: free-running ring |
| `ref_sel` | in | `REF_100M`, `REF_50M`, `REF_25M`, `REF_12M5` |
| `n_log2` | in | N = 2^n_log2 (2..7); 5 for 50 MHz → 1.6 GHz |
| `gain_shift` | in | Loop gain: left shift 0..15 of the correlator output |
| `tune_c` | in, real | Coarse tuning voltage, set by hand |
| `clk_out` | out | Multiplied clock |
| `ref_o`, `sel`, `enable` | out | Divided reference, mux select, TDC window |
| `tdc`, `corr`, `tune`, `dac_code` | out | TDC result, delta estimate, 16-bit tuning word, DAC code |
| `vtune` | out, real | Fine tuning voltage |

**Loop gain.** The loop gain per reference cycle is about 2^gain_shift ×
4.0e-6, with the default model constants (200 MHz/V fine gain, 1.2 V DAC,
N = 32). `gain_shift = 8` gives about 8 kHz of loop bandwidth, below the
10 kHz the design aims for. `gain_shift = 12` settles within a few hundred
reference cycles and is useful for acquisition.

**Start-up.** The ring must be running slightly *fast* when the loop starts.
A fast ring just waits at the multiplexer for the reference. If the
reference edge arrives before Sel rises (the ring is too slow), the multiplexer can cut a ring
pulse short, and the behavioural model gives no reliable answer for that
case. Set `tune_c` so that the ring is a little
fast at mid-scale Vtune. Release `rst_n` just after a `clk_100m` edge, so
that the first Sel pulse comes before the first reference edge.

## What follows the published design and what is this design's own

Follows the published design:

* The overall loop structure.
* Five ring stages with a 2:1 input mux and a reference buffered by two
  matched delay cells.
* Fine and coarse tuning ports.
* The select-logic behaviour: Div arms, Sel follows Out1, and Sel is cleared
  on the falling Out1.
* The retiming chain of the edge generator (Div twice; Div2x once, then en,
  then dis).
* The 100 MHz reference divided to 100/50/25/12.5 MHz.
* A 15-stage GRO with state hold, a 10-bit result and 45 ps steps.
* Set/reset Enable formation and per-phase counters with an adder and
  register.
* The correlator subtracting consecutive pairs.
* An accumulator with bit-shift gain.
* A first-order sigma-delta driving the 8 MSBs of a 16-bit DAC, at the
  reference rate.
* An RC pole at 3 MHz.

This design's own choices:

* **Select-logic implementation.** The original is a flip-flop with reset
  plus gates. It clears itself asynchronously after the falling Out1 edge,
  which relies on gate delays that zero-delay RTL does not have. Here the
  arming bit is the XOR of two toggle flops: one set by rising Div, one
  cleared by rising Out1_n. Both are clocked, so the behaviour does not depend
  on gate delays. Sel still rises after the first rising Out1 that follows
  Div, and falls on the next falling Out1.
* **Divider encoding and N.** N is limited to powers of two and set at run
  time.
* **Counters.** One rising-edge and one falling-edge counter per GRO phase,
  each as wide as the output (wrapping).
* **Reset.** All flops use an asynchronous active-low reset. Reset values
  (divide-by-2 = 1, divider at zero, accumulator and DAC code at mid-scale)
  are chosen so that the correlator's pair order is right. The correlator
  blanks its first two pair slots after reset (`BLANK_PAIRS`).
* **Clock assignment in the tuning loop.** The correlator runs on Enable.
  The accumulator and modulator run on Enable/2.
* **Widths.** A 24-bit saturating accumulator whose top 16 bits form the
  tuning word. A shift range of 0..15. An error-feedback modulator that
  saturates at the top code.
* **Analog model constants.** The ring's tuning law
  f = 1.6 GHz + 200 MHz/V·(Vf − 0.6) + 1 GHz/V·(Vc − 0.6), with the coarse
  gain five times the fine gain, as the relative device sizes suggest. A
  1.2 V DAC full scale. The RC filter starts at 0.6 V.

Not modelled:

* Noise of any kind. Jitter, spur and phase-noise figures cannot be
  reproduced.
* Electrical design points with no logic effect: the doubled second and
  third ring stages, the load balancing on Out1 and Out3, matched NAND
  loads, and the hand-adjusted GRO supply.
* The GRO dead zones (imperfect state hold that can trap the ring in a
  preferred phase).
* The PC/USB control link (its settings are plain ports).
* The output pad buffer.
* The bench variable-delay generator used to test the GRO alone.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mdll_core` (open loop, fixed voltages) checks windows against the
  formulas T = 1/f and delta = Tref − N·T to 1 fs. It covers a fast ring
  (long stall), a slightly slow ring (reference edge early), N = 64 and 128,
  and free-running mode.
* `tb_mdll_top` (closed loop, top at its defaults) runs these phases:
  acquisition at 50 MHz (`gain_shift = 12`), tracking at `gain_shift = 8`,
  restarts at 25 MHz (N = 64), 12.5 MHz (N = 128) and 100 MHz (N = 16,
  `gain_shift = 13`), and finally free-running mode. Each locked phase must
  show a small mean delta, Vtune within 5 mV of the analytic lock voltage
  (0.45 V for `tune_c = 0.63`), and N output cycles per reference cycle.
  Results from one run (they move by a few tenths of a picosecond with the
  random start-up state):

  | Phase | Mean delta | Cycles averaged | Vtune |
  |---|---|---|---|
  | 50 MHz, `gain_shift = 12` | 0.44 ps | 300 | 0.4497 V |
  | 50 MHz, `gain_shift = 8` | 0.015 ps | 1500 | 0.4500 V |
  | 25 MHz, N = 64 | −2.3 ps | 300 | 0.4498 V |
  | 12.5 MHz, N = 128 | 0.17 ps | 300 | 0.4500 V |
  | 100 MHz, N = 16 | 0.78 ps | 300 | 0.4494 V |

  The short phases use the fast acquisition gain, so their averages are
  coarser than the 8 kHz tracking case.

  The testbench also counts edge injections, ring stalls, early reference
  edges, sigma-delta activity, the gain change, the reference-mode change and
  free-running, and requires each to occur. The run takes a few seconds.
* `tb_gro_tdc` checks the exact-sum (noise-shaping) property, scrambling at
  a fixed width, and a window modulated by a 780 kHz sine.

Simulate any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert rtl/mdll_pkg.sv -y rtl tb/tb_mdll_top.sv \
          --top tb_mdll_top -o sim && ./obj_dir/sim
```

All files declare `timeunit 1ps; timeprecision 1fs;`. Femtosecond precision
is needed because delta is resolved well below a picosecond. Every stage
delay in the behavioural models is rounded to 1 fs, and `tb_mdll_core`
accounts for that rounding.
