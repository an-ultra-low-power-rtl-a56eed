# Counter-and-DTC ADPLL for Bluetooth Low Energy

A fractional-N all-digital PLL usually spends most of its power in its time-to-digital
converter (TDC). The TDC measures, every reference cycle, where the reference edge falls
between two edges of the oscillator. This design has no TDC. The loop already knows, from
the frequency control word (FCW), where the reference edge *should* fall. So it delays the
reference by that predicted amount with a digital-to-time converter (DTC). If the prediction
is right, the delayed reference lands exactly on an oscillator edge. One flip-flop, a
bang-bang phase detector (BBPD), then only has to report "early" or "late". The whole
number of oscillator cycles is counted by a small 7-bit counter. The frequency control
is split over three capacitor banks of the DCO (PVT, acquisition, tracking), which are
tuned one after the other.

The SystemVerilog models the full loop. The digital part is synthesizable. The DTC, the
clock-gating "time freezer" and the DCO are real-valued behavioural models, so that the
loop can be closed and simulated end to end.

Numbers used throughout:

| quantity | value |
|---|---|
| reference `fref` | 32 MHz |
| DCO range (model) | 2.15 … 2.98 GHz (BLE: 2402 … 2480 MHz) |
| counted clock | CKVD2 = DCO / 2 |
| FCW | unsigned 7.16, `f_dco = 2 · FCW · fref` |
| default channel | FCW = 38 + 6/65536 (a close-to-integer channel, the hardest case for spurs) |
| DTC | 16 coarse cells × 58 ps + 32 fine cells × 2 ps |
| DCO steps (model) | PVT 21.83 MHz, acquisition 2.467 MHz, tracking 30.56 kHz |

## Clock domains and the order of events in one reference cycle

1. The reference `fref` enters the DTC (`dtc_coarse_fine`). The DTC delays it by the coarse and fine
   cells that are switched on.
2. The time freezer (`time_freezer`) waits for the delayed reference. It then lets exactly one
   rising edge of CKVD2 through as `ckvd2f` and closes again. Two CKVD2 periods later it
   emits CKR, the reference re-timed to the oscillator. Gating the clock this way means the
   phase detector and the rest of the logic toggle once per reference cycle, not at 1.2 GHz.
3. The BBPD (`bbpd`) is a single flip-flop. It is clocked by the frozen edge `ckvd2f` and samples
   `ref_cmp`. `ref_cmp` is the delayed reference after a dummy path that matches the gating path.
   `bb = 1` means the oscillator edge came late, so the DCO must speed up.
4. On CKR, all the low-speed digital logic (`adpll_digital`) runs once. It samples the
   variable counter (`ckv_counter`, running on CKVD2), forms the phase error, updates the
   bank words, and computes the DTC word for the *next* reference edge.

Everything in `adpll_digital` is a single synchronous CKR domain. The SPI slave runs on its own SCLK.
The counter runs on CKVD2 and is sampled on CKR without a synchroniser. This is safe because CKR is
derived two CKVD2 periods after the frozen edge, so the counter is stable.

## Phase prediction and the phase error

`phase_error_detector` does the arithmetic. Each CKR cycle it does three things:

- **Integer part.** The difference of two successive counter samples is the number of CKVD2 edges in the
  last reference period. The detector subtracts it from the integer FCW plus the carry of the
  fractional accumulator. The result `fe` is the integer frequency error. It is accumulated into
  `phe_int`, which is a whole-cycle phase error. With a 7-bit counter the difference is taken modulo 128.
  That is enough for every FCW below 64.
- **Fractional part.** The FCW fraction is accumulated. At the next reference edge, the nearest
  following CKVD2 edge lies `p = 1 − frac` of a period later. The DTC must delay the reference by
  `p · T_ckvd2`. The factor `inv_kdtc` (Q4.12) is the number of coarse cells per CKVD2 period, so
  `x = p · inv_kdtc` is the delay in coarse cells:
  - the coarse word is the integer part of `x`;
  - the fine word is the remainder times `cf_ratio`, where `cf_ratio` is the coarse/fine step ratio (29 for 58 ps / 2 ps).
- **Bang-bang part.** The BB bit is turned into `±kres` and added below the binary point of
  `phe_int`. The result is the loop's phase error `phe`: signed, 12 integer and 16 fraction bits, in CKVD2
  periods.

While the loop is far from lock, `phe_int` dominates and the loop behaves linearly. Once locked,
`phe_int` stays at 0 and only the sign from the BBPD is left, scaled by `kres`.

`locked` is raised after 32 consecutive CKR cycles with `fe = 0` and `phe_int = 0`.

### DTC gain calibration (`kdtc_lms`)

The prediction is only as good as `inv_kdtc`. If the DTC is slower or faster than assumed, the BB
decisions correlate with the prediction `p`: large `p` values come out consistently early or
consistently late. The LMS update is

    inv_kdtc += sign(bb) · (p − 0.5) >> mu

This drives that correlation to zero. The error is only observable on channels whose fraction sweeps
the whole 0…1 range quickly (for example FCW 37.15). On a nearly integer channel, `p` hardly moves
and the estimate simply stays where it is. Enable it with register 15 bit 4. The register default
for `inv_kdtc` (0xE2DC = 14.18 coarse cells) matches the nominal 58 ps cell at the default channel.

### Dynamic element matching (`lfsr4_galois`, `dem_rotator`)

Both DTC words are converted to thermometer codes (16 coarse, 32 fine cells). The codes are
rotated by an index from a 4-bit Galois LFSR (x⁴ + x³ + 1), which advances every CKR cycle. The
same delay is then built from different physical cells each cycle, which turns cell mismatch into noise
instead of a periodic spur. Rotation is switched by register 18 bit 1. The behavioural DTC model
has an optional per-cell mismatch parameter (`MISMATCH_PCT`) so that this can be exercised.
`tb_adpll_dem` does so: with 10 % cell mismatch on the channel FCW = 38.125, the DTC codes repeat
every 8 reference cycles. Without rotation, this shows up as tones at multiples of fref/8 in the
tracking word. Rotation lowers their summed power about twentyfold.

## Bank sequencing and the loop filter

`bank_fsm` runs the frequency search when register 18 bit 3 (`search`) rises:

| `bank_sel` | state | duration (CKR cycles) | filter |
|---|---|---|---|
| 0 | open loop (while `search` is low) | — | none, SPI words |
| 1 | PVT | `16 << pvt_mode` (default 32) | proportional |
| 2 | acquisition | `16 << ab_mode` (default 128) | proportional |
| 3 | tracking | until the next search | proportional + integral, optional IIR |

Banks whose `bank_en` bit (register 0) is clear are skipped.

When a bank is left, its word is frozen, and `zph` clears the integer phase error so that
the next bank starts from zero phase. This is the zero-phase restart.

`loop_filter` holds the three words:

    otw_pvt = mem_pvt + round(phe · kdco_p · 2^-alpha_p)          (type I)
    otw_acq = mem_acq + round(phe · kdco_a · 2^-alpha_a)          (type I)
    trk     = mem_trk + iir(phe) · kdco_t · 2^-alpha_t
                      + Σ phe · kdco_t · 2^-rho                   (type II)

The tracking word carries 9 integer and 5 fraction bits. The fraction is dithered onto
one extra tracking cell by a first-order 5-bit sigma-delta modulator (`sigma_delta_mod`), which
gives 1 kHz effective resolution from a 30 kHz step. The modulator is clocked by CKR or, for a higher
dither rate, by CKVD2/16 taken from counter bit 3 (register 18 bit 2). The optional IIR (`iir_filter4`) has four
first-order stages with pole `2^-lambda` on the proportional path. With `search = 0` the loop
is open and the DCO sits at the `mem_*` words from SPI.

## Two-point modulation (`tx_interface`)

GFSK data (`tx_data`, 10-bit signed, one sample per CKR cycle) is applied at two points:

- It is added to the FCW at its last fractional bit (one LSB = 2⁻¹⁶ · 64 MHz ≈ 977 Hz of DCO frequency). The phase detector therefore expects the new frequency.
- It is sent, scaled by `inv_kdcomod · 2^-9` tracking LSBs, straight to the tracking bank. The DCO
  therefore jumps there at once.

With the default `inv_kdcomod = 17`, `tx = ±256` gives ±250 kHz, which is the BLE deviation. If the
direct-path gain is wrong, the loop corrects the error at its own bandwidth. The path is enabled by
register 7 bit 6.

## SPI register map

SPI mode 0, 16-bit frames, MSB first: a read/write bit (1 = read), a 7-bit address, then 8 data bits.
A write takes effect on the 16th SCLK edge. Addresses 32–44 read back internal state (phase error,
bank words, DTC words, `inv_kdtc`, `{locked, bank_sel}`). `spi_rst_n` restores the defaults.

| reg | field (bits) | default |
|---|---|---|
| 0 | div_off (0), spi_dtc (1), dcopath (4:2), bank_en (7:5) | 0xE1 |
| 1–2 | inv_kdtc, Q4.12 | 0xE2DC |
| 3 | SPI DTC coarse (3:0) / fine (7:4) | 0x00 |
| 4–6 | FCW 7.16 (LSB first) | 38 + 6/65536 |
| 7 | inv_kdcomod (5:0), mod_on (6) | 0x11 |
| 8, 9 | mem_pvt, mem_acq | 4, 6 |
| 10–11 | mem_trk (9 bits), alpha_a (11:5:4), alpha_p (11:7:6) | 256, 0, 2 |
| 12 | rho (4:0), alpha_t (7:5) | 8, 0 |
| 13 | pvt_mode (2:0), buff_en (3), iir_en (4), lambda (7:5) | 0x49 |
| 14 | kdco_p (4:2), ab_mode (7:5) | 3, 3 |
| 15 | dtc_mu (3:0), dtc_cal (4), kdco_a (7:5) | 11, 0, 1 |
| 16 | kdco_t | 255 |
| 17–18 | kres (9 bits), rotate_en (18:1), sd_clk_sel (18:2), search (18:3) | 511, 1, 0, 1 |
| 19 | cf_ratio | 29 |

The exact field layout is in the `adpll_cfg_t` struct in `rtl/adpll_pkg.sv`.

## Behavioural models

- `dtc_coarse_fine`: `delay = 150 ps + n_coarse · 58 ps + n_fine · 2 ps`, counted from the
  thermometer codes, with optional random cell mismatch. Its full scale is 1142 ps. The span above the fixed
  delay is 992 ps, which covers one CKVD2 period for any DCO frequency above about 2.02 GHz.
- `time_freezer`: an event-driven model of the gating window, with a 30 ps gate delay and a 3 ps
  compensating-path offset.
- `dco`: frequency is the sum of the three bank contributions plus the dither cell, above 2.15 GHz. Optional
  cycle jitter is available (`JITTER_FS`).

The models need `timeunit 1ps; timeprecision 1fs` and real arithmetic. They do not synthesize. The synthesizable
boundary is `adpll_core`.

## Module hierarchy

    adpll_top
    ├── dtc_coarse_fine, time_freezer, dco         (behavioural)
    └── adpll_core                                  (synthesizable)
        ├── spi_slave, div2, ckv_counter, bbpd
        └── adpll_digital
            ├── bank_fsm, tx_interface, phase_error_detector, kdtc_lms
            ├── loop_filter (iir_filter4), sigma_delta_mod
            └── lfsr4_galois, dem_rotator ×2

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints `FAIL: ...` for a failed check and ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example, the full loop:

    verilator --binary --timing -Wno-fatal --top-module tb_adpll_top \
        rtl/adpll_pkg.sv $(ls rtl/*.sv | grep -v adpll_pkg) tb/tb_adpll_top.sv
    ./obj_dir/Vtb_adpll_top

The package must come first. `tb_adpll_top` keeps every parameter at its default. It runs these checks:

- lock on the default channel;
- the frequency, averaged over 1024 reference cycles, within ±20 kHz;
- the IIR path;
- ±250 kHz modulation;
- a channel change to 37.15 with relock;
- LMS recovery of a 15 % DTC gain error;
- open loop;
- SPI-driven DTC words.

Verilator simulates a few hundred µs of loop time per second, so this run takes a few seconds.

In the default configuration, the loop reaches lock in about 6 µs. The mean frequency error after 60 µs is well under
1 kHz. The BLE hop requirement is 65 µs to within ±150 kHz.

## Where this design departs from the description it is based on

- **Loop-gain encodings and defaults.** The field names and positions of the register table are kept. How `kdco_*`, `alpha_*`,
  `rho` and `kres` scale the phase error is this design's own definition. The defaults are chosen to lock
  with it: rho 8, alpha_t 0, kdco_p 3, ab_mode 3, kdco_a 1, kdco_t 255, kres 511. The original
  table lists other values for these fields, which do not lock with these encodings. In particular, the
  bang-bang step `kres` was meant to span twice the 2 ps fine DTC step (about 320 in `kres` units at a
  1.2 GHz CKVD2). The default 511 (about 6.4 ps) gave faster pull-in and smaller limit cycles here.
- **Lock detector.** The lock indicator uses a simple rule (32 cycles with zero integer error).
- **Sequencer timing.** The duration encoding `16 << mode` and the `mem_trk` mid-scale default are choices of this design.
- **LMS.** The LMS correlates with a centred prediction `p − 0.5` and uses a shift-only step.
- **Not modelled.** The reference input buffer is a wire. The supply-noise replica delay line, which cancels
  supply bounce on the DTC, has no logical function and is left out.
- **Alternatives not implemented.** A quadrature-phase DTC and TDC-assisted fast locking are discussed as
  options for this architecture but are not built here. Neither is duty-cycling of the loop after lock
  (running the detector only every few reference cycles to save power).
- **Timing margins.** The time freezer and DTC timing are idealised. Metastability of the BB flip-flop, power and
  phase noise are not represented.
