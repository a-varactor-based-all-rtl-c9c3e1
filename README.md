# Varactor-based all-digital multi-phase PLL with random-sampling spur suppression

An all-digital PLL (ADPLL) updates its oscillator's control word once per
reference period. Because every update lands at the same instant in every
period, the small frequency step it causes repeats at the reference rate. That
repetition shows up as spurs at multiples of f_ref around the carrier. This design
keeps the loop unchanged but moves that instant. Once the loop has locked, the
registers that load the DCO are clocked by one of P copies of the reference.
The copies are spaced one DCO period apart, and a pseudo-random sequence picks
a new one every period. There is still exactly one update per reference period,
so the loop bandwidth and stability are unchanged. Consecutive updates are
now (1 ± m/N) reference periods apart, with |m| ≤ P−1. The update rate is thus
spread over 2P−1 discrete frequencies instead of one.

The reference configuration is a 10 MHz reference, division ratio N = 10
(100 MHz output) and P = 8 phases. The oscillator is a 4-stage differential
ring DCO with 8 phases, loaded by 256 unary NMOS-varactor units plus 3
dithering units. Its range is 134.5 MHz empty down to about 90 MHz, in 14 ps
steps. The DCO is the one analog part, and it is given here as a behavioural
model. Everything else is synthesizable SystemVerilog.

## Structure

```
            +---------------------------- digital control system ---------------------------+
 CK_ref --->| ADPLL engine                                                                  |
            |  PA1 (+N per CK_ref) --\                                                      |
            |                         PFD (PA2-PA1) -> DLF (alpha/beta, slicer) -> code[13:0]|
 DCO_OUT -->|  PA2 (DCO cycle count) /        ^                                    |        |
            |  ADPLL controller: FA -> PA -> DITHER -> RSS, gains, sdm_en, Spur_En |        |
            |                                                                      v        |
            | DCO engine:  code[13:6] -> row/column decoder -> local decoder -> 256 enables |
            |              code[5:0]  -> sigma-delta modulator -> 3 dither enables          |
            |                                                                               |
            | RSS engine:  PRBS-7 -> RM_N (3 bit)                                            |
            |              CK_ref --(DFF chain on DCO_OUT)--> CK_ref[1:P] -> select -> RM_ref|
            +-------------------------------------------------------------------------------+
            +------------------------------- DCO system ------------------------------------+
            | RM_clk = Spur_En ? RM_ref : CK_ref                                             |
            | synchronized registers (259 bits, on RM_clk) -> 4-stage varactor ring DCO      |
            +-------------------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `adpll_pkg` | Widths, the `mode_e` enum, the `adpll_cfg_t` configuration struct, the default configuration |
| `adpll_top` | The whole PLL |
| `adpll_engine` | `phase_acc_ref` (PA1), `phase_acc_dco` (PA2), `pfd`, `dlf`, `adpll_ctrl` |
| `dco_engine` | `sdm`, `rowcol_dec`, `local_dec` |
| `rss_engine` | `prbs7`, `multiphase_gen`, `rs_phase_gen` |
| `dco_sync_regs` | RM_clk selection and the registers that load the DCO |
| `dco` | Behavioural model of the ring DCO (simulation only) |

## The control word

The loop filter produces a 14-bit unsigned word in Q8.6 format.

* **Integer part (8 bits).** This part drives the 256 unary varactor units. The upper
  nibble is thermometer-coded to 16 row signals (`row[i] = i <= code[7:4]`), and the lower
  nibble to 16 column signals (`col[j] = j < code[3:0]`). Each unit's local
  decoder is `row[i+1] | (row[i] & col[j])`. Exactly `code[7:0]` units are
  enabled, always the lowest-numbered ones, so one more code step enables one
  more unit. The frequency step is therefore monotonic by construction.
* **Fractional part (6 bits).** A second-order MASH 1-1 sigma-delta modulator
  clocked by CK_ref turns this into a count of 0..3 dithering units with mean
  `1 + frac/64`. Outside the dithering modes the count is held at 1. Because
  that equals the modulator's mean offset, switching dithering on does not
  move the average frequency.

An enabled unit adds load and slows the DCO. The period model is
`T = 7435 ps + 14 ps × (enabled units + enabled dither units)`. About 183 loaded
units give 100 MHz.

## Loop and gains

PA1 adds N on every reference edge. PA2 counts DCO cycles in Gray code, and
the reference clock samples that count, so a sample taken mid-transition is
off by at most one. The PFD is a subtractor: `phi_e = PA2 − PA1`, in whole DCO
cycles, saturated to 10 bits. A positive value means the DCO is ahead, which
raises the code and slows the DCO.

The loop filter is a proportional-integral filter with power-of-two gains:

```
u        = use_slicer ? (phi_e > 0 ? +1 : -1) : phi_e
phi_int += u << alpha_sh          (saturated to 0..16383)
code     = phi_int + (u << beta_sh)
```

Both shifts count in fractional LSBs (1/64 of a code step). The tracking gains
alpha = 1/64 and beta = 1/8 of a code step are therefore `alpha_sh = 0` and
`beta_sh = 3`. With the two-level slicer, each Up/Down moves the integral by
one fractional LSB and the output by eight. In frequency acquisition the
filter sees the linear phase error with larger gains (`fa_alpha_sh = 6`,
`fa_beta_sh = 10`, i.e. 1 and 16 code steps per cycle of error). At 100 MHz
these gains give a well-damped type-II loop that settles in roughly 60
reference cycles.

## Mode sequencing

`adpll_ctrl` moves through four modes on its own:

| Mode | Filter input, gains | Leaves when |
|---|---|---|
| FA | linear `phi_e`, FA gains | → PA after `|phi_e| <= 1` for 64 consecutive cycles |
| PA | slicer Up/Down, alpha/beta | → DITHER at the end of a 32-cycle window in which the sum of slicer decisions is within `pa_sum_th` and `phi_int` moved by no more than `pa_int_th` |
| DITHER | as PA, sigma-delta on; `locked` = 1 | → RSS after 32 cycles if `cfg.rss_en` |
| RSS | as DITHER, `Spur_En` = 1 | → DITHER when `cfg.rss_en` clears |

The window test uses the long-term averages of the phase error and of the
integral path as the lock criterion. From PA, DITHER or RSS, `|phi_e| > 8`
returns to FA, for example after N is changed. From reset the default
configuration reaches RSS in about 850 reference cycles (85 µs).

## Random-sampling spur suppression

This is the part that needs the closest reading.

**Phases.** `multiphase_gen` samples CK_ref with DCO_OUT and shifts it down a
chain of flip-flops clocked by DCO_OUT. Tap k is the reference delayed by k
DCO periods. Taps 0..P−1 are the P reference phases, and tap P is one extra stage.
Because the phases come from the DCO itself, their spacing is exactly one DCO
period, with no delay-line mismatch to calibrate.

**Selection without glitches.** Multiplexing free-running phases directly
would make edges when the select changes. With N = 10, P = 8 and a 50 % duty
reference, there is no moment when all eight phases are at the same level.
`rs_phase_gen` therefore multiplexes the rising-edge detect of the chosen
phase, `ck_ph[k] & ~ck_ph[k+1]`, and registers it on DCO_OUT. RM_ref is a
clean pulse one DCO period wide, rising k+1 DCO edges after tap 0. The select
register loads `RM_N mod P` when the last phase rises. That comes after any
pulse of the current period and before the next one. RM_N changed at the
reference edge many DCO cycles earlier, so it is stable when loaded.

**Update spacing.** With select values s₁ and s₂ in consecutive periods, the
updates are `N + (s₂ − s₁)` DCO periods apart. This gives the bounds
`(1 ± (P−1)/N)·T_ref`: 0.3 to 1.7 T_ref for P = 8 and N = 10, with 2P−1 possible
spacings. Sampling CK_ref with DCO_OUT can move the sampled edge by one DCO
period when the two edges nearly coincide. This happens because the
bang-bang loop dithers the DCO phase around the reference edge. Measured
spacings can therefore reach N ± P.

**Pseudo-random source.** `prbs7` is a 7-bit LFSR (x⁷ + x⁶ + 1) that shifts
once per reference period. RM_N is its three lowest bits. Consecutive RM_N
values share two bits, so a change of select from 0 to 7 can never happen, and
some spacings never occur. In the 8-phase simulation 9 of the 15 possible
spacings appear. A true random source would fill in the rest.

**Switching RM_clk.** `dco_sync_regs` uses a plain gate,
`RM_clk = Spur_En ? RM_ref : CK_ref`. Spur_En changes just after a CK_ref
rising edge, while RM_ref is normally low, so the switch adds no rising edge.
At most one period's update is lost at the switch. Spur_En enters the DCO
domain through a two-flip-flop synchroniser.

**Timing budget.** The control word changes right after each CK_ref edge. The
latest RM_ref pulse comes P+1 DCO periods after it, which for P = 8 and N = 10
is before the next reference edge. So every update loads the word of the
current period, and no update can coincide with a code change. Keep P ≤ N−1
if this margin matters. P = N still works, as the source allows, but then the
last phase's update falls on the next sampled reference edge.

## Configuration (`adpll_cfg_t`)

| Field | Default | Meaning |
|---|---|---|
| `n_div` | 10 | division ratio N |
| `fa_alpha_sh`, `fa_beta_sh` | 6, 10 | FA gains (shifts in 1/64 code steps) |
| `alpha_sh`, `beta_sh` | 0, 3 | PA/locked gains: 1/64 and 1/8 code step |
| `pa_sum_th` | 8 | max \|sum of slicer decisions\| in a 32-cycle window |
| `pa_int_th` | 64 | max change of `phi_int` in a window (one code step) |
| `rss_en` | 1 | allow the spur suppression mode |

Module parameters include `P` (phases, default 8), `PHASE_W` (accumulator
width, 16) and `ERR_W` (phase-error width, 10). `adpll_ctrl` also takes
`FA_LOCK_N` (64), `AVG_W` (window 2^5), `DITHER_WAIT` (32) and `UNLOCK_TH` (8).
The DCO model takes `T_MIN_PS` (7435) and `T_LSB_PS` (14).

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. Build one with Verilator 5 from the
repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          --top-module tb_adpll_top -o sim && ./obj_dir/sim
```

* `tb_adpll_top` runs the whole PLL at its defaults. It locks from reset
  through FA, PA and DITHER to RSS. It checks 1000 ± 2 DCO cycles per 100
  reference periods, and one RM_clk update per period in RSS with spacings
  inside 0.3..1.7 T_ref. Then it leaves RSS, changes N to 12, and checks the
  loss of lock and the relock at 120 MHz. It counts each mechanism and fails
  if one never happened. It takes about two seconds.
* `tb_rss_workloads` runs three PLLs side by side: P = 8 / N = 8 and
  P = 2 / N = 8 from 12.5 MHz, and P = 2 / N = 10 from 10 MHz. It prints the
  histogram of update spacings and delays for each.
* Every other module has its own testbench, named `tb_<module>`.
  `rss_probe` is a helper that measures update spacings.

The DCO model uses a 1 fs time unit, and the other files use 1 ps / 1 fs.

## How far it can be trusted, and what is this design's own

The block structure, widths and reference values come from the published
design. These are: the mode sequence, PA1/PA2/PFD/DLF, the 14-bit word with 8
decoded and 6 dithered bits, 16+16 row/column signals, 256 + 3 units, a 7-bit
PRBS giving a 3-bit index, a DFF chain on DCO_OUT, a phase multiplexer, RM_clk
switching, P = 8, N = 10 and alpha/beta = 1/64 and 1/8. The following are
choices made here, and are the first places to look when adapting the design:

* The exact mode-transition rules and thresholds, FA gains and window lengths.
* Power-of-two gains, the two-level slicer, saturation and the mid-scale reset
  value of the loop filter.
* The sigma-delta order (MASH 1-1), its +1 offset and its CK_ref clock.
* The LFSR polynomial and bit choice. The edge-detect-and-register form of the
  phase selection (one sampling flip-flop and one extra chain stage beyond the
  seven delay flip-flops). The Gray-code crossing of PA2.
* The varactor direction (more units = slower) and ideal DCO linearity.
  With 14 ps per unit the model's lowest frequency is 90.4 MHz; the silicon
  reached 90.8 MHz.

The published loop bandwidth is about 100 kHz at a 10 MHz reference. Once
locked, this loop is a bang-bang loop, so its bandwidth depends on the jitter
amplitude. That figure has not been checked in simulation. The model's
frequency step at 134.5 MHz is about 250 kHz, or 0.19 %, which matches the
published 252 kHz per LSB.

Not modelled: phase noise, jitter, supply sensitivity and spur levels. The DCO
model is noiseless, so spectra cannot be compared in simulation. The supply
regulator and closed-loop voltage scaling around the PLL, and the output pad
buffers, are not part of this RTL. There is no metastability modelling: a
two-state simulator cannot show it. The flip-flops that sample CK_ref with
DCO_OUT, and DCO_OUT-derived data with CK_ref, are real synchronisation points
in silicon.

`adpll_top` contains the behavioural DCO and is therefore a simulation top.
For implementation, use `adpll_engine`, `dco_engine`, `rss_engine` and
`dco_sync_regs` with the real oscillator.
