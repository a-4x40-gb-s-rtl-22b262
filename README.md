# Quad-lane 40 Gb/s digital CDR with shared frequency tracking

This is the synthesizable core of a four-lane, 40 Gb/s-per-lane receiver clock-and-data recovery
(CDR) loop. It recovers the clock from an input eye that carries heavy data-dependent jitter, and
it is built around three ideas:

* **DDJ-filtering phase detector.** The bang-bang phase detector ignores any transition that
  starts or ends inside a ±α band around zero. Those transitions come from ISI-heavy bit
  patterns, and their zero crossings are the ones displaced in time. Only crossings between two
  well-settled levels steer the loop, so the edge distribution the loop sees is narrow.
* **Split feedback.** One loop output drives two phase interpolators (PIs). The edge PI of the
  phase detector gets every update at once, which keeps loop latency and dithering low. The data
  PI of the DFE gets the same code through a programmable averaging filter. The data sampling
  clock is therefore quiet without lowering the loop bandwidth.
* **Shared frequency tracking.** The frequency offset between the far-end transmitter and the
  local reference is the same for all four lanes. So the lanes' frequency integrators are added
  and drive a phase rotator inside the feedback path of the shared PLL, through a delta-sigma
  modulator. The PLL becomes a fractional-N PLL that follows the incoming bit rate. Each lane's
  own phase accumulator only has to correct phase, not rotate continuously.

The loop logic runs at 625 MHz on 64-UI words: a 1:64 deserialization of a quarter-rate,
10 GHz sampling clock. Phase codes resolve 64 steps per UI, so an 8-bit code spans one 4-UI
clock period and wraps around at its end.

## Structure

```
                    +---------------- quad_cdr_top ------------------------------------+
 samplers of lane n |  cdr_lane (x4)                                                    |
 sp sn e  (edge PI) |   deserializer x5 -> ddj_filter_pd -> decimator -> cdr_loop_filter-+--> edge_code[n]  (edge PI)
 dp dn    (data PI) |                                                      |   |  integ  |
                    |                           jitter_smoothing_filter <--+   |         |--> data_code[n]  (data PI)
                    |   dfe_unrolled ------------------------------------------+---------+--> data_word[n]
                    |                                                          v         |
                    |  shared_freq_track:  sum of 4 integ -> >>Ks -> dsm_mash11 -> acc ---+--> rot_code  (PLL feedback rotator)
                    |  divide-by-16 counter -> word_stb (625 MHz clock enable)          |
                    +------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `cdr_pkg` | Sizes, the per-lane sampler bundle `lane_samples_t`, and the settings structs `lane_cfg_t` and `shared_cfg_t` |
| `quad_cdr_top` | Four lanes, the shared tracking, and the 625 MHz clock enable |
| `cdr_lane` | One lane: five deserializers, PD, decimator, loop filter, smoothing filter, DFE |
| `deserializer` | Shifts in 4 samples per 10 GHz clock and emits a 64-bit word (bit 0 is the earliest UI) |
| `ddj_filter_pd` | Threshold-qualified Alexander phase detector over one word |
| `decimator` | Adds the votes of D = 2^k words and outputs their sign (+1/0/−1) |
| `cdr_loop_filter` | Frequency integrator, KI and KP paths, phase accumulator; outputs the edge code |
| `jitter_smoothing_filter` | Exponential average of the edge code; outputs the data code |
| `shared_freq_track` | Adds the lane integrators, scales by Ks, runs the delta-sigma modulator, accumulates the rotator code |
| `dsm_mash11` | Second-order MASH 1-1 delta-sigma modulator |
| `dfe_unrolled` | Loop-unrolled first-tap DFE: picks the +h1 or −h1 sampler by the previous bit |

The analog parts sit outside the RTL, and their digital controls are the top's ports:

* the 20 GHz LC PLL with its dividers, and the rotator in its feedback path (`rot_code`);
* the per-lane DLL and the two phase interpolators (`edge_code`, `data_code`);
* the samplers (`smp`);
* the duty-cycle corrector and the clock distribution.

## Clocking, timing and the sign of a phase code

The RTL has a single clock, `clk`, which is the 10 GHz quarter-rate sampling clock. A
divide-by-16 counter in the top produces `word_stb`, which is high on one clock in 16. It stands
in for the 625 MHz digital clock. Every register outside the deserializers updates only when
`word_stb` is high, or on a valid derived from it. To close timing at the real 625 MHz, move
these registers to a divided clock; their behaviour is unchanged.

All lanes share `word_stb`. This is sound because every lane clock comes from the one shared PLL,
so the lanes differ in phase but not in frequency. Retiming each lane's words into the common
domain is not modelled.

**Latency.** Take the rising edge on which `word_stb` is high as edge 0. On that edge each
deserializer captures its word. The edge code reflects the word on edge 3, after the PD,
decimator (D = 1) and loop-filter registers. The data code follows on the next `word_stb`.

**Sign.** A larger code means a later sampling instant, for both the PIs and the PLL rotator.
The PD votes +1 for "clock early" (the edge sample equals the bit before it) and the loop then
raises the code. Codes are modulo 256, one clock period. Wrap-around is normal and means the
clock has slipped by a whole period.

## The DDJ-filtering phase detector

Each UI brings three PD samples, all taken on the edge PI clock:

* `sp`: the data sample compared against +α;
* `sn`: the data sample compared against −α;
* `e`: the edge sample compared against 0, taken half a UI earlier.

So `e[i]` lies on the boundary between UI i−1 and UI i. For every boundary, including the one
between the previous word's last UI and bit 0:

* a **rising** boundary counts if UI i−1 is below −α (`sn=0`) and UI i is above +α (`sp=1`);
* a **falling** boundary counts if UI i−1 is above +α (`sp=1`) and UI i is below −α (`sn=0`);
* a counted boundary votes **early** (+1) if `e` equals the bit before it, otherwise **late** (−1).

Transitions with a level inside the band, which are the ones most displaced by ISI, never reach
the loop. α itself is an analog sampler offset, not a register here. Setting α = 0 makes
`sp = sn`, and the detector then becomes a plain Alexander PD that uses every transition. The
tests use this to check that lock holds with the filter off. `pd_valid_cnt` reports how many
boundaries of each word passed the filter.

A loop-unrolled DFE only helps the data samplers, not the edge samplers. The loop therefore has
to lock on the unequalized eye, and this filter is what keeps the lock point from being pulled
by the ISI.

## Loop filter and split path

Each decimated decision `bb` ∈ {−1, 0, +1} updates the lane loop:

```
integ <= sat(integ + bb)                                   20-bit signed
phase <= phase + bb*2^kp_shift + (integ*2^6) >>> ki_shift  (if ki_en), 8.16 fixed point, mod 2^24
edge_code = phase[23:16]
```

The data code is an exponential average that follows the edge code across the wrap:

```
acc <= acc + wrap(edge_code*2^8 - acc) >>> avg_shift      8.8 fixed point
data_code = round(acc / 2^8)
```

`avg_shift = 0` turns the split path off: the data code equals the edge code, one word later.
Larger values remove more of the bang-bang dithering. The filter is outside the loop, so it adds
no loop latency.

Settings (`lane_cfg_t`) and the values the testbenches use:

| Field | Meaning | Test value |
|---|---|---|
| `dec_log2` | D = 2^dec_log2 words per loop update | 0 (also 1) |
| `kp_shift` | proportional step = 2^kp_shift / 2^16 codes | 16 (1 code) |
| `ki_shift` | integral gain = 2^(6−ki_shift) / 2^16 codes per integrator LSB | 0 or 2 |
| `ki_en` | local integral path on | 1 |
| `avg_shift` | smoothing weight 2^−avg_shift | 3 |

## Shared frequency tracking

Every 625 MHz cycle, `shared_freq_track` does the following:

1. It adds the four lane integrators, each sign-extended.
2. It shifts the sum right by `ks_shift` (Ks) to get a rotation rate. The rate is in rotator
   codes per cycle, with 10 fraction bits.
3. The MASH 1-1 modulator turns the rate into an integer step y, whose average equals the rate
   exactly. Its quantization noise is pushed to high frequencies, where the PLL's low-pass
   response removes it.
4. The step is added to the 8-bit rotator code `rot_code`.

The PLL's output phase, and so every lane's clock, then follows the rotator. With `ft_en` low,
the rotator holds.

The lane integrators feed both their own phase accumulator (KI) and the shared sum (Ks). When
locked, the total rotation rate is KI·integ + Ks·Σinteg, and the shared part dominates when
Ks·4 ≫ KI. With the test settings (`ks_shift = 0`, `ki_shift = 2`) the ideal shared share is
16/17. The end-to-end test measures 94 % of a 300 ppm offset carried by the PLL rotator. To make
the PLL carry the whole offset, clear `ki_en`. The lane loops then keep only their proportional
path.

The rotator code has the same resolution as a lane PI: 256 codes per 10 GHz period. Tracking
±344 ppm needs 64 × 64 × 344e-6 ≈ 1.41 codes per 625 MHz cycle. The modulator output is a 4-bit
signed step, so the integer part of the rate may be at most ±5 codes per cycle, which is about
±1200 ppm. A simulation assertion in `dsm_mash11` flags a rate outside that range.

## Where this RTL departs from the original design, and what it assumes

These parts follow the original design:

* four lanes, 40 Gb/s per lane, quarter-rate 10 GHz clocking, 1:64 deserialization and a
  625 MHz loop clock;
* 64 phase codes per UI;
* the loop structure: decimator, integrator with KI, KP path, phase accumulator;
* the shared chain: sum, Ks, delta-sigma modulator, accumulator, rotator in the PLL feedback;
* the split path, with a fast edge PI and a smoothed data PI;
* the ±α-qualified phase detector;
* a loop-unrolled first DFE tap.

The following are this implementation's own choices:

* **PD qualification rule.** The original describes ±α data thresholds that select "reduced-ISI"
  zero crossings. The rule used here, requiring a strong level on both sides of the boundary, is
  one reading of that.
* **Decimator.** It adds the votes and takes their sign; D is a power of two.
* **Gains.** KP, KI and Ks are powers of two, set as shifts.
* **Widths.** All fixed-point widths: 16 phase fraction bits, a 20-bit integrator, 10 fraction
  bits for the rotation rate.
* **Smoothing filter.** A first-order exponential average. The original says only that the
  averaging is programmable.
* **Modulator.** Second order (MASH 1-1).
* **Rotator resolution.** Equal to the PI resolution.
* **Clocking.** A single clock with an enable; all lanes share one word strobe.
* **DFE placement.** The DFE selection is done on deserialized words. In silicon it happens at
  the samplers.
* **Reset.** Synchronous and active-low; every code starts at zero.

Not modelled: the retiming of each lane's deserialized words into a common clock domain, and any
control or calibration of α or h1. Those are analog settings.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_deserializer` | word contents and order; valid one clock after the strobe |
| `tb_ddj_filter_pd` | vote and count against a bit-level reference, with and without α; all-early word |
| `tb_decimator` | sign of the sum over D = 1, 2, 4, 8; no output inside a window |
| `tb_cdr_loop_filter` | code and integrator against an integer reference for random gains; saturation |
| `tb_jitter_smoothing_filter` | exact reference; bypass; settling; dither suppression; wrap-around |
| `tb_dsm_mash11` | exact MASH 1-1 reference; long-run mean equals the input |
| `tb_shared_freq_track` | exact reference; hold when disabled; rotation rate |
| `tb_dfe_unrolled` | reference selection; exact recovery of a channel with a first post-cursor |
| `tb_cdr_lane` | open loop: 1 code per word with 3-edge latency; closed loop at 200 ppm: error-free data, rotation equal to the offset, data code almost never reverses while the edge code dithers |
| `tb_quad_cdr_top` | whole core at default size, closed loop at 300 ppm (see below) |
| `tb_quad_cdr_workloads` | 100, +344 and −344 ppm; 100 ppm with shared tracking off (lane PIs rotate alone); 0.5 UIpp SJ at 1 MHz; 0.2 UIpp SJ at 80 MHz; an eye with 0.8 UIpp DDJ, with α = 55 and with α = 0 |

The closed-loop tests use a behavioural front end written in the testbench. Each lane's data is
pseudo-random, sent through a channel with one pre-cursor and one post-cursor (levels 100, 30,
30) and interpolated linearly between bit centres, which gives about 0.43 UIpp of DDJ. Each
sampler is placed in time by the unwrapped PI code plus the rotator code. The PLL is treated as
following its rotator instantly.

`tb_quad_cdr_top` locks all four lanes at 300 ppm and then checks several things:

* every recovered bit, after the DFE;
* the sampling position, within 16 codes of the eye centre;
* the total rotation, within 5 % of the offset;
* the PLL's share of the rotation, above 60 %.

It then switches to D = 2 and to α = 0, and checks that lock holds. It also counts that each
mechanism happened at least once: DDJ rejections, split-path smoothing, modulator steps, rotator
and PI wrap-around.

These tests check behaviour against this repository's own channel model. They do not reproduce
the jitter-tolerance or jitter-transfer measurements of real silicon. The channel model is
symmetric (equal pre- and post-cursor), so the lock point is the eye centre with or without the
±α filter. The 0.8 UIpp DDJ case therefore shows only that the loop locks and recovers data from
the quarter of the transitions the filter keeps. It does not show the filter correcting a static
phase offset, which needs an asymmetric, post-cursor-dominated channel and a physical pulse
shape.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cdr_pkg.sv tb/tb_quad_cdr_top.sv \
          --top-module tb_quad_cdr_top -Mdir obj_top
./obj_top/Vtb_quad_cdr_top
```

Replace the testbench name to run any other one. Every testbench finishes in well under a
minute; the top-level ones take about a second of simulation time. To change sizes, edit the
localparams in `cdr_pkg` and the parameter defaults, which all derive from them.
