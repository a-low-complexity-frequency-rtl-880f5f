# Low-complexity frequency synchronizers for OFDM receivers

An OFDM receiver must remove the carrier frequency offset (CFO) between the
transmitter's and its own oscillator before the FFT. If it does not, the
subcarriers leak into each other. The usual method has two steps:

- **Estimate.** Correlate each preamble sample with its repetition one or more
  symbols later. The angle of the summed products is the phase the carrier
  turned in that time.
- **Compensate.** Rotate every following sample back by a phase that grows
  linearly with time.

At 20 MS/s (IEEE 802.11a) this is cheap. At 528 MS/s (multiband OFDM
ultra-wideband) the straightforward design has two costs:

- It needs four parallel copies of the correlator, of its sample memory and of
  the phasor generator.
- It runs the full estimation on every packet.

This RTL holds two synchronizers built around one idea: do only as much
arithmetic as the accuracy requirement really needs.

* **`uwb_freq_sync`**: the main design. It carries 528 MS/s as four samples
  per 132 MHz clock and combines three mechanisms:
  - **data-partition estimation**: correlate only every 4th sample;
  - **power-aware estimation**: a very cheap coarse estimate decides per packet
    whether the fine estimate must run at all;
  - **approximate phasor compensation**: one phasor per clock is shared by
    the four samples of that clock.
* **`wlan_freq_sync`**: an 802.11a synchronizer that correlates only half the
  preamble samples. It picks the half by measuring which sample parity carries
  more power.

`freq_sync_top` places the two side by side. They share nothing and have
separate clocks and resets.

All phases in the design are signed fractions of a turn. A `PHASE_W` = 16 bit
value p means 2π·p/65536 rad, so ±½ turn wraps for free in two's complement.
The compensators accumulate phase with 24 bits (`NCO_W`).

---

## 1. UWB synchronizer (`uwb_freq_sync`)

```
            4 samples/clk                                        4 samples/clk
 in_re/im ──┬──────────────────────────────────────────► cfo_compensator ──► out_re/im
            │                                          ▲ (phase_acc, sincos_lut,
            │          cfo_estimator                   │  4 × cplx_mult)
            └─► dp_controller ─► sample_regfile ─┐     │
                  (1 of 4 lanes)   (82 × 2×4 b)   ▼     │ est_phase / est_valid
                                corr_mac ─► cordic_atan ─► power_aware_decision
```

### 1.1 What is measured

Multiband OFDM UWB hops over three bands. A given band, and with it the same
preamble symbol, comes back every three symbols. The estimator therefore
correlates a sample with the sample D = 3·N = 495 samples later, where N = 165
is the symbol length with its prefix. D lasts 0.9375 µs.

The estimate `est_phase` is the carrier rotation over those 495 samples.
The unambiguous range is ±½ turn per 0.9375 µs, which is ±533 kHz. That covers
±40 ppm (transmitter plus receiver) at the top of the band, 10.6 GHz
(±424 kHz). One LSB of `est_phase` is 528 MHz / 495 / 65536 ≈ 16.3 Hz.

### 1.2 Data partition: `dp_controller` and `sample_regfile`

A full correlation over one symbol needs 165 products and 165 stored samples.
The data-partition estimator uses only every λ-th sample: r₀, r_λ, r₂λ, …,
for ⌊N/λ⌋ samples per symbol. With λ = 4 that is 41 samples, a quarter of the
memory and of the multiplications, for very little loss in accuracy.

To guard against a burst of noise hitting one symbol, the estimate is taken
twice and the two correlations are summed. Two symbols are correlated with the
two symbols three later, so the store holds 2 × 41 = 82 samples. At 4-bit I
and Q that is 656 bits.

The store is an addressed register file, not a shift register. Each sample is
written once and read once, so only one word toggles per access.

The choice λ = 4 matches the four input lanes. Because λ ≥ LANES, any one
clock holds at most one wanted sample. The controller therefore picks that one
lane per clock, and everything after it runs on a single sample per clock.

How the controller knows which sample it sees:

- It keeps `cur`, the packet index of the sample on lane 0 of the current
  input word.
- The packet starts on lane `start_lane` of the word flagged `pkt_start`, so
  `cur` = −`start_lane` there. After that `cur` grows by 4 per valid word.
  Words with `in_valid` = 0 are simply skipped.
- A pass walks the list of wanted indices, given below. When the next one falls
  inside the current word, its lane is selected.

```
   index = (sym0 + b + p·3)·165 + λ·n      b = 0,1 (which symbol)
                                           p = 0 store, p = 1 correlate
                                           n = 0 .. ⌊165/λ⌋−1
   register-file address = b·⌊165/λ⌋ + n   (same in both phases)
```

For each selected sample:

- In the store phase it is written to the register file.
- In the correlate phase the register file returns the sample from three
  symbols earlier. `corr_mac` then adds cur·conj(ref).

After the last product, `cordic_atan` (an iterative vectoring CORDIC, one
micro-rotation per clock, 14 iterations) turns the complex sum into the
16-bit angle.

### 1.3 Power-aware estimation: `power_aware_decision` and the pass schedule

The fine estimate is needed only when the offset has moved. Every packet
therefore gets two passes on the same hardware:

| pass   | λ  | symbols stored → correlated | products | used for                |
|--------|----|-----------------------------|----------|-------------------------|
| coarse | 64 | 0, 1 → 3, 4                 | 4        | the decision only       |
| fine   | 4  | 6, 7 → 9, 10                | 82       | the estimate in use     |

The fine pass runs when at least one of these holds:

- |coarse − last fine estimate| > `thr`, with the difference taken modulo one
  turn;
- no fine estimate exists yet;
- `pa_enable` = 0.

Otherwise the fine pass stays off and the previous fine estimate is kept. The
coarse value is never used to correct the signal.

The threshold is a run-time input that matches the speed of the offset drift:

- **Slowly varying offset** (80 ppm within 50 ms): use 10 ppm, which is
  100 kHz, so `thr` = 6144 (`fsync_pkg::UWB_THR_SV`).
- **Fast variation** (80 ppm within 5 ms): use 2 ppm, so `thr` = 1229
  (`UWB_THR_FV`).

A larger threshold skips more fine passes. That saves more power but leaves a
larger residual error.

The two passes never overlap in time, which is why they can share the
controller, register file, multiplier and arc-tangent. The estimator state
machine (`cfo_estimator`, states in `fsync_pkg::est_state_t`) runs in this
order:

```
IDLE ─pkt_start─► COARSE ─pass_done─► C_ATAN ─► DECIDE ─fine_on─► FINE ─► F_ATAN ─► IDLE
                                                       └─skip────────────────────► IDLE
```

A new `pkt_start` in any state abandons the old packet and starts a coarse
pass.

**Timing.** Word 0 is the word that carries `pkt_start`, and s is
`start_lane`. The last sample of the deciding pass is sample 724 (coarse only)
or sample 1810 (fine). `est_valid` is visible after the clock edge of word
⌊(last + s)/4⌋ + 18, which is:

- clock ≈ 199 (1.5 µs) when fine is skipped;
- clock ≈ 470 (3.6 µs) when fine runs.

The 18 clocks cover the selection register, the accumulator, a start delay,
15 CORDIC clocks and the decision. The multiband preamble has 21
packet-synchronization symbols, and the fine pass ends in symbol 10. Later
preamble symbols and all data are therefore corrected with the current
packet's estimate.

`fine_ran` reports which path was taken. `coarse_phase` shows the coarse
value.

### 1.4 Approximate phasor compensation: `cfo_compensator`

Exact compensation multiplies sample k by exp(−j2π ε̂ kT), which needs a new
phasor every sample (528 M/s). The approximation holds one phasor for λ = 4
samples: exp(−j2π ε̂ ⌊k/4⌋·4T). At a 424 kHz offset the phasor moves by
less than 1° in three samples, so the error is small. Because there are four
samples per clock, one phasor per clock is enough, and only the multipliers
are replicated:

* `phase_acc`: one 24-bit accumulator. Its step per word is
  `inc = −est_phase · 4 / 495`, computed as `−(est_phase · K) >> 16` with
  `K = round(4 · 2^(24−16+16) / 495)`.
  - It restarts at phase 0 on `pkt_start`.
  - A new estimate (`load` = `est_valid`) changes the step from the next word
    on, with no jump in phase.
  - The constant phase that remains is removed later by channel estimation.
* `sincos_lut`: phase-to-I/Q table addressed with the top 10 bits of the
  accumulator, rounded.
  - Only the first octant, 0–45°, is stored: 129 entries, each holding cos and
    sin together, so one read gives a complex value.
  - Above 45° within a quadrant it reads the mirrored entry and swaps cos and
    sin. The quadrant is then applied by swaps and sign changes.
  - The table is computed at elaboration: T[j] = round(127·cos(jπ/512)),
    round(127·sin(jπ/512)).
* `cplx_mult` × 4: each lane computes sample × phasor, rounded. The 8-bit
  phasor and the 4-bit sample give a 6-bit output with one integer guard bit
  (a rotation can reach √2 × full scale) and one extra fraction bit.

The pipeline has two registers: table read, then multiply. `out_*` belongs to
the word captured two edges earlier, and `out_valid` follows `in_valid`. The
throughput is one word, four samples, per clock, also across gaps in the
input.

---

## 2. 802.11a synchronizer (`wlan_freq_sync`)

The 802.11a preamble has ten 16-sample short symbols and then a 32-sample
guard followed by two 64-sample long symbols. Within a short symbol the
per-sample power is not flat. Depending on the channel, either the even-indexed
or the odd-indexed samples are stronger. The long symbols tend to show the
opposite pattern.

The synchronizer spends one short symbol measuring the pattern and then
correlates only the better half. One sample arrives per clock. Index k counts
from `pkt_start`, which marks the first sample of the measuring short symbol.
The short symbols before it belong to packet detection and AGC.

| k        | what happens |
|----------|--------------|
| 0–15     | `sample_power_detector` sums the even-index power and the odd-index power. The stronger parity wins; a tie counts as even. |
| 16–63    | Coarse estimate. Three short symbols give two correlations at distance 16, each over the 8 samples of the stronger parity. The result φc is the turn per 16 samples, range ±½ turn = ±625 kHz. |
| 96–223   | The two long symbols are rotated by the coarse estimate as they arrive. The fine estimate uses the 32 samples of the other parity at distance 64. The result φf is the residual turn per 64 samples. |
| from 96  | Every sample is rotated by the accumulated phase. The step per sample is −φc/16 once φc is known, and −(φc/16 + φf/64) once φf is known (about k = 245). |

The two stages use different samples at different times, so they share:

- one 32-entry register file (half a long symbol of 2 × 8-bit samples);
- one correlator and one CORDIC.

The compensator is one 24-bit accumulator, the same octant table and one
complex multiplier. The output is 10 bits.

`coarse_valid` comes 17 clocks after the last coarse sample. `est_valid` comes
19 clocks after the last fine sample. `out_*` is two clocks behind the input.
`odd_coarse` reports the parity used for the coarse stage.

---

## 3. Interfaces and parameters

The top-level ports are the two blocks' ports with prefixes `uwb_` and
`wlan_`:

| UWB port | meaning |
|----------|---------|
| `in_valid`, `in_re[4]`, `in_im[4]` | four consecutive 4-bit samples, lane 0 first |
| `pkt_start`, `start_lane` | the word and lane of preamble sample 0, from packet detection |
| `pa_enable`, `thr` | power-aware switch and threshold (2⁻¹⁶ turn per 495 samples) |
| `out_valid`, `out_re[4]`, `out_im[4]` | compensated samples, 6 bits |
| `est_phase`, `est_valid`, `fine_ran`, `coarse_phase` | estimate in use, its strobe, whether the fine pass ran, the coarse value |

| WLAN port | meaning |
|-----------|---------|
| `in_valid`, `in_re`, `in_im`, `pkt_start` | 8-bit samples; `pkt_start` on the first power-detection sample |
| `out_valid`, `out_re`, `out_im` | compensated samples, 10 bits |
| `coarse_phase`, `coarse_valid`, `fine_phase`, `est_valid`, `odd_coarse` | the two estimates, their strobes, the parity chosen |

Main parameters (defaults in `rtl/fsync_pkg.sv`):

| parameter | default | meaning |
|-----------|---------|---------|
| `UWB_LANES` | 4 | samples per clock (528 MS/s at 132 MHz) |
| `UWB_SYM_LEN` | 165 | samples per UWB symbol |
| `UWB_DIST` | 3 | correlation distance in symbols |
| `UWB_LAMBDA_FINE` / `_COARSE` | 4 / 64 | partition factors of the two passes |
| `UWB_NUM_EST` | 2 | symbols summed per estimate ("twice" estimation) |
| `UWB_DATA_W` | 4 | UWB sample bits per I/Q |
| `WLAN_DATA_W` | 8 | 802.11a sample bits per I/Q |
| `PHASE_W`, `NCO_W` | 16, 24 | phase and accumulator widths |
| `PHASOR_W`, `LUT_IDX_W` | 8, 7 | phasor width; octant table has 2^7+1 entries |

The estimator needs λ_fine ≥ `UWB_LANES`. An assertion in `dp_controller`
checks this, together with a check that no wanted sample is ever skipped.

Synthesis of the whole top with yosys gives about 785 flip-flops and 10 kbit
of table and register-file storage. The UWB part is 419 flip-flops and
5.1 kbit: the 656-bit sample store, the sin/cos table and the CORDIC angle
table.

---

## 4. Where this RTL departs from, or adds to, the described design

* **Packet detection, AGC and timing are not included.** The UWB block expects
  `pkt_start`/`start_lane` at preamble sample 0. The WLAN block expects
  `pkt_start` at the first sample of the fourth-last short symbol.
* **Placement of the passes in the preamble** (coarse on symbols 0/1 against
  3/4, fine on 6/7 against 9/10) is this design's choice. The parameters
  `COARSE_SYM0` and `FINE_SYM0` move them.
* **The phasor holds for one input word**, not for a λ-sample group counted
  from preamble sample 0. With `start_lane` ≠ 0 the groups are shifted by
  that many samples. Phase error and hardware are the same either way.
* **The step changes without a phase jump** when a new estimate arrives in the
  middle of a packet. The constant phase offset that results is left to
  channel estimation.
* **The estimator's arc-tangent is a CORDIC.** Only "an arc-tangent circuit"
  is specified. The CORDIC's accuracy is ±3 LSB of 2⁻¹⁶ turn.
* **Word lengths are this design's own:** 16-bit phase, 24-bit accumulator,
  8-bit phasor, 1024-step table, 18-bit UWB accumulator, and UWB output with
  one extra fraction bit. The 4-bit UWB sample, the 82-entry store and the
  λ values are the specified ones. The 8-bit 802.11a sample width is assumed.
* **`pa_enable`** (force the fine pass always) and the explicit `est_valid` /
  `fine_ran` strobes are additions that make the mechanism observable and
  testable.
* **WLAN compensation** applies the coarse estimate from the first long-symbol
  sample and the combined estimate from the clock after the fine angle is
  ready. The fine estimate never corrects the long symbols it was measured on.
* **The conventional four-way parallel synchronizer** is not included. It
  serves only as the baseline for the gate-count and power comparison.

---

## 5. Verification and simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if
something hangs.

The stimulus generators (`tb/uwb_sig_pkg.sv`, `tb/wlan_sig_pkg.sv`) build
preambles with known offsets, noise and 4-bit or 8-bit quantisation. They also
keep the clean transmitted samples, so the compensated output can be compared
with them.

The end-to-end test, `tb_freq_sync_top`, runs both synchronizers at their
default sizes. On the UWB side it:

- recomputes the power-aware decision independently for each packet;
- checks the estimate against the true offset (within 600 LSB ≈ 10 kHz);
- checks the rotation left in the compensated data;
- checks output rate and delay, and the time at which `est_valid` arrives.

It fails if one of these events never happens:

- a fine pass run;
- a fine pass skipped;
- a fine pass forced by the 2 ppm threshold;
- `pa_enable` = 0;
- each of the four start lanes;
- gaps in the input;
- both WLAN parities.

`tb_uwb_cfo_env` runs the UWB block through three offset environments, with
one packet per millisecond:

| environment | offset | threshold | fine passes |
|-------------|--------|-----------|-------------|
| constant | 40 ppm | 10 ppm | 1 of 24 |
| slow drift | 80 ppm per 50 ms | 10 ppm | 4 of 24 |
| fast drift | 80 ppm per 5 ms | 2 ppm | 24 of 24 |

It also checks that the estimate in use never strays from the true offset by
more than the threshold plus the estimation tolerance.

To build and run a testbench with plain Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fsync_pkg.sv tb/uwb_sig_pkg.sv tb/wlan_sig_pkg.sv \
    tb/tb_freq_sync_top.sv --top-module tb_freq_sync_top -Mdir obj_top
./obj_top/Vtb_freq_sync_top
```

Replace `tb_freq_sync_top` by any other `tb_*` module to test one block. The
other sources are found through `-Irtl`. Every test finishes in seconds.

Accuracy seen in simulation at the default sizes:

| synchronizer | measurement | result |
|--------------|-------------|--------|
| UWB | fine estimate error, moderate noise | within 600 LSB of 2⁻¹⁶ turn per 0.9375 µs (≈ 10 kHz, under 1 ppm at 10.6 GHz) in every test packet |
| 802.11a | combined coarse + fine estimate error | under 100 LSB of 2⁻¹⁶ turn per 16 samples, typically ≈ 20 (≈ 0.07 ppm) |
| 802.11a | residual phase drift over 300 data samples | under 0.15 rad |
