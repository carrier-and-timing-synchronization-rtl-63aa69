# Pilotless BPSK timing and carrier synchronizer driven by LDPC feedback

A BPSK receiver working near the limit of a strong LDPC code sees a symbol
SNR around 0 dB. At that SNR the usual synchronizers struggle. A Costas loop
loses most of its loop SNR to squaring loss. A blind timing detector is
dominated by noise. Pilots cost power the link cannot spare.

This design takes the information it needs from the decoder instead. It
never looks at pilots, only at what the decoder reports:

* **How many parity checks are satisfied.** This number peaks when the
  timing hypothesis is right. Window searches over symbol-frequency offset
  and time delay are scored with it.
* **Soft symbol estimates.** These remove the data modulation before the
  carrier phase-locked loop. That turns the BPSK signal into a near-pure
  tone, so the PLL has almost no squaring loss once the decoder starts to
  converge.
* **Hard decisions.** A decision-directed Mueller–Müller timing loop uses
  them to track random walk and residual timing error.

The synchronizer works on one codeword at a time. It captures the samples of
one codeword and then processes them over and over, alternating with decoder
iterations. Timing and carrier estimates and decoded data all improve
together.

The LDPC decoder itself is not part of this RTL. The design is built for a
rate-1/2 (1944, 972) irregular code of the kind used in IEEE 802.11n, and it
talks to the decoder through a small streaming protocol, described below.
The testbenches use a behavioural stand-in for the decoder.

## Signal model and number formats

The receiver gets complex baseband `x_c`, `x_s` at four samples per symbol
(Ts = T/4). These carry:

* an unknown carrier phase θ;
* a time delay D;
* a symbol-frequency offset in ppm, i.e. a sample clock running fast or slow
  against the symbol clock;
* a random walk of the sampling instant.

All arithmetic is two's-complement fixed point. The shared package
`bpsk_sync_pkg` defines these formats:

| quantity | width | scale |
|---|---|---|
| samples, matched-filter outputs, symbols, soft estimates | 16 | 1.0 = 2^12 |
| sin/cos values (carrier weights) | 16 | 1.0 = 2^14 |
| carrier phase | 32 | one full turn = 2^32 |
| timing offsets (delay estimate, loop-2 offset) | 20 | one Ti = T/2 = 2^12 |
| frequency offset | 20 | 1/16 ppm per LSB |
| fractional interval μ | 12 | 1.0 = 2^12 |
| carrier error e | 18 | full-amplitude symbol ≈ 2^12 |
| LLR to the decoder | 16 | 1.0 = 2^4 |

Arithmetic saturates wherever a result can overflow.

## Symbol timing chain (`symbol_timing`, one per channel)

There are two identical chains, one for I and one for Q. Each holds one
codeword of samples in `sample_buffer` (8192 × 16 bit). That covers
4·1944 samples plus a 48-sample guard.

A *timing pass* re-reads this buffer and produces one symbol-rate value per
symbol. It runs in two phases.

### Phase A: resampling and matched filtering

Phase A runs only in loop-1 passes, at one input sample per clock.

* **Interpolation control (`timing_nco`).** The NCO register η is
  decremented by a control word w once per input sample. An underflow marks
  the current sample as the base point of an interpolant.
* **Control word.** The nominal word w = 0.5 gives interpolants at Ti = T/2.
  A frequency offset of v ppm turns this into w = 0.5·(1 + v·10⁻⁶). The new
  word takes effect on the next sample step, so it changes only on the Ts
  grid.
* **Fractional interval (`fractional_interval`).** At the base point,
  μ = η/w, computed with a divider.
* **Interpolation (`linear_interpolator`).** The interpolant is
  y = x[m] + μ·(x[m+1] − x[m]).
* **Matched filter (`rrc_matched_filter`).** A 17-tap root-raised-cosine
  filter at 2 samples per symbol, roll-off 0.5, spanning ±4 symbols. The
  taps are in Q14. They come from the closed-form RRC impulse response,
  divided by its energy at 2 samples per symbol. A noiseless pulse sampled
  at that rate therefore comes out of the filter with a peak of 1.0.
* **Storage.** The filter outputs q[j] go into a second buffer.

### Phase B: symbol placement

Phase B runs in every pass, at five clocks per symbol. Symbol i nominally
sits at position 2i + 8 in Ti units; the 8 is the filter's group delay.

* **Interpolator 2** reads q at that position plus the time-delay estimate
  p. Its output z[i] is the loop-1 output.
* **Interpolator 3** adds the loop-2 offset c[i] on top. Its output s[i] is
  the loop-2 output.
* **Offset resolution.** Offsets are fractions of Ti, so a sub-sample delay
  becomes an integer read address plus a μ.

### Loop 2: Mueller–Müller tracking (`mm_ted`, `timing_loop_filter`)

In a loop-2 pass each symbol updates the timing error detector:

    u[i] = (d[i-1]·s[i] − d[i]·s[i-1]) · w_chan

* d[i] are the decoder's hard decisions from the previous iteration.
* w_chan weights the detector by the carrier's projection onto this channel:
  cos θ̂ for I and sin θ̂ for Q, mapped back through the quadrant swap/flip.
  This gives the detector the right sign whatever the carrier phase. It also
  gives the stronger channel the larger weight.

The loop filter is first order: c[i+1] = c[i] + u[i]/8, clamped to ±2 Ti.
c restarts at zero in every pass. Loop 2 therefore follows the drift within
the codeword, on top of the loop-1 estimates, rather than carrying state
from one pass to the next.

## Loop 1: window searches scored by satisfied checks (`window_search`)

There are two instances of `window_search`: one for frequency and one for
delay. They run one after the other.

**Frequency search.** There are 17 hypotheses at a fixed 250 ppm step,
covering ±2000 ppm.

* Each hypothesis is tried at two delays, p = −T/4 and p = +T/4. Each try
  is one loop-1 pass.
* LLRs are formed from the stronger channel, since the carrier loop has not
  run yet.
* The decoder runs 3 iterations from scratch.
* The better of the two satisfied-check counts becomes the score S[n].

**Why two delays.** The frequency search has to work before the delay is
known. Suppose it ran at p = 0 while the true delay is near T/2. Then every
symbol would be sampled on a transition at the right frequency. A wrong
frequency does better: its drift sweeps the sampling instant through the
right timing for part of the block. In simulation that biased the frequency
estimate by about 400 ppm. Trying the two delays ±T/4 puts every true delay
within T/4 of one of them, and the right frequency wins again. This is a
coarse form of the two-dimensional search suited to combined offsets. It
costs 34 passes instead of 17.

**Delay search.** There are 9 hypotheses at T/8 steps, covering ±0.5 T. It
runs the same way, at the frequency estimate.

**Estimate from the scores.** Picking the best grid point alone would limit
the resolution to the step. Instead, the best point b and its two
neighbours are fitted with a parabola, and the estimate is its vertex:

    est = hyp[b] + STEP · (S[b-1] − S[b+1]) / (2·(S[b-1] − 2·S[b] + S[b+1]))

At the edge of the window, or on a flat top, the estimate is hyp[b].

Only one division runs per search, in a single finishing cycle. The
combinational divider is small next to the rest of the design.

## Carrier phase: quadrant, π orientation and the DDCS loop

### Quadrant (`quadrant`)

After the final loop-1 pass, the block compares the power of the two
timing-corrected channels over the codeword. If Σz_s² > Σz_c², it swaps the
channels. The swap is a reflection, θ → π/2 − θ. Afterwards the carrier
lies within ±π/4 of the I axis or of its negative, so only a sign is left
open.

The remaining π ambiguity is settled with the decoder, which is
sign-sensitive:

1. Each orientation is tried in turn, normal and negated (`flip`).
2. Each trial is one carrier pass followed by 4 decoder iterations.
3. The orientation with more satisfied *odd-degree* checks is kept. A wrong
   sign inverts every bit, which leaves even-degree checks satisfied but
   breaks odd-degree ones.

### Decision-directed carrier synchronization (`ddcs_carrier_loop`)

The carrier loop is built from `ddcs_phase_detector`, `pll_loop_filter` and
`sincos_lut`. Per symbol it computes:

    u_c = z_c·ŷ,   u_s = z_s·ŷ                  (modulation removed)
    e   = u_s·cos θ̂ − u_c·sin θ̂                 (≈ A·sin(θ − θ̂))
    θ̂[k+1] = θ̂[k] + Kp·e[k] + Ki·e[k−1]          (H(z) = (Kp + Ki z⁻¹)/(1 − z⁻¹))

* **Soft decision ŷ.** This is the decoder's soft symbol estimate. In the
  first carrier passes no decoder output exists yet, so ŷ is seeded with the
  stronger, post-swap channel itself.
* **Phase state.** The accumulator holds the phase directly, as 32 bits per
  turn. A 1024-entry cosine table gives cos θ̂ and sin θ̂. The table is built
  at elaboration time by a constant function using an integer Taylor series,
  so there is no data file.
* **Gains.** The gains are Kp = 8.92·10⁻⁵ and Ki = −8.75·10⁻⁵. Their meaning
  depends on the scale of e, which is not fixed by the loop equations. Here
  they are applied as if a full-amplitude symbol gave e = 128. Converted to turns and 8
  extra fractional bits, this gives the integer gains KP = 487792 and
  KI = −478496.
* **Settling.** At this scale the loop settles in about ten passes over a
  1944-symbol block, which is the settling the DDCS loop is known for.
* **Why Kp + Ki is small.** The zero sits very close to the pole, so
  Kp + Ki is tiny. In effect the loop is a nearly proportional one with a
  very weak integrator.

### LLR former (`llr_compute`)

    Q[k] = scale · (z_c·cos θ̂ + z_s·sin θ̂)

This projects the received symbol onto the estimated carrier axis and scales
it by 2/σ². The scale comes in on the `llr_scale` port (Q8), because it
depends on the operating SNR.

## The sequence for one codeword (`sync_controller`)

Once 4·1944 + 48 samples are captured, `sync_controller` runs the whole
sequence on its own:

| step | timing passes | carrier passes | decoder runs |
|---|---|---|---|
| frequency search (17 points × 2 delays × 3 iterations) | 34 loop-1 | 34 (loop off, LLRs only) | 34 restarts |
| delay search (9 points × 3 iterations) | 9 loop-1 | 9 (loop off, LLRs only) | 9 restarts |
| final loop-1 pass, quadrant decision | 1 loop-1 | – | – |
| π orientation (2 trials × 4 iterations) | – | 2 (seeded) | 2 restarts |
| restart of the decoder | – | 1 (seeded) | 1 restart, 1 iteration |
| tracking, 49 rounds | 49 loop-2 | 49 (ŷ from decoder) | 49 × 1 iteration, continuing |

In total that is 93 timing passes, 95 carrier passes and 95 decoder runs, of
which 46 start from scratch.

After each carrier pass, the freshly derotated LLRs are streamed to the
decoder as updated channel observations. Each tracking round therefore runs
loop 2, then the carrier loop, then one decoder iteration. Every round uses
the previous round's decisions.

`sync_done` rises after the 50th iteration. The decoder's last output is the
data.

With the testbenches' stand-in decoder, a whole codeword takes about
1.81 M clock cycles. Most of that is the 44 loop-1 passes, about 17.5 k
cycles each, plus the 95 LLR/soft-output exchanges.

### Decoder interface

The decoder protocol belongs to this design, not to a standard:

1. Before each `dec_start`, the synchronizer streams 1944 LLRs in symbol
   order on `llr_valid`, `llr`, `llr_idx`.
2. `dec_start` pulses with `dec_iters` (how many iterations to run) and
   `dec_reinit`:
   * 1: start again from these LLRs;
   * 0: continue, taking the LLRs as updated channel values.
3. The decoder answers with 1944 soft estimates on `dec_soft_valid` /
   `dec_soft` (1.0 = 2^12, in order).
4. It then pulses `dec_done`, together with its satisfied-check count
   `dec_sat` and its satisfied odd-degree-check count `dec_odd_sat`.

The top also brings out the live estimates: `f_est`, `p_est`, `theta_hat`,
`swap`, `flip` and the loop-2 offset.

## Module map

| module | role |
|---|---|
| `bpsk_ldpc_sync` | top: two timing chains, quadrant, carrier loop, LLR former, controller, symbol memories |
| `sync_controller` | the sequence above; holds both `window_search` instances |
| `symbol_timing` | one channel's timing chain, phases A and B, loop 2 |
| `sample_buffer` | single-port-write, registered-read block memory |
| `timing_nco`, `fractional_interval`, `linear_interpolator` | interpolation control and interpolators |
| `rrc_matched_filter` | 17-tap RRC filter |
| `mm_ted`, `timing_loop_filter` | loop-2 detector and filter |
| `window_search` | loop-1 hypothesis sweep with parabolic refinement |
| `quadrant` | power-based swap and π flip |
| `ddcs_phase_detector`, `pll_loop_filter`, `sincos_lut`, `ddcs_carrier_loop` | carrier PLL |
| `llr_compute` | LLR former |
| `bpsk_sync_pkg` | shared widths, types and saturation helpers |

## Where this design departs from, or goes beyond, the published scheme

**Fixed points of the published scheme:**

* Ts = T/4 and Ti = T/2.
* Linear interpolation ahead of the matched filter.
* Loop 1 before loop 2.
* 17 frequency points at 250 ppm with 3 iterations each, then interpolation.
* A delay limited to ±0.5 T.
* A first-order decision-directed Mueller–Müller loop 2.
* Power-based swap, with the π ambiguity settled by odd-degree checks over
  up to 4 iterations.
* The DDCS error signal, and the filter form and gains of the DDCS loop.
* Seeding ŷ from the stronger channel.
* Alternating carrier and loop-2 updates.
* The LLR as the projection onto the estimated carrier.

**Choices of this design:**

* **Block processing.** One captured codeword is processed again and again.
  Passes and decoder runs are sequenced by a controller. Each pass is
  serialised at one sample or five clocks per symbol.
* **Delay search.** The grid of 9 points at T/8 is this design's own.
* **Frequency search at two delays.** Scoring each frequency point at ±T/4
  is this design's coarse version of a two-dimensional search. It doubles
  the frequency-search iterations from 51 to 102.
* **Interpolation form.** Loop-1 refinement uses a three-point parabola.
* **Matched filter.** It has 17 taps with roll-off 0.5. Neither the length
  nor the roll-off is given by the scheme.
* **Loop-2 details.**
  * The gain is 1/8.
  * The offset is clamped to ±2 Ti.
  * c restarts at zero every pass.
  * Loop-2 passes reuse the stored matched-filter output.
  * The detector is weighted by the carrier projection onto each channel.
* **Carrier details.**
  * The error scale is 128 units for a full symbol.
  * The phase accumulator doubles as the NCO phase.
  * The sin/cos table has 1024 entries.
* **Schedule.**
  * Both π orientations are always tried.
  * After the restart, iterations are counted so that 50 decoder iterations
    follow the π decision.
* **Control.** Decoder protocol, word widths, synchronous active-high reset.
* **Outside this RTL.** The LDPC decoder, the analog down-conversion and the
  sampling ADC. The ports carry their signals instead.

## How far it has been verified

Every module has a self-checking testbench in `tb/` that compares it with an
independent model: real-valued arithmetic, closed-form expectations or a
reference loop. Each prints `TB_RESULT checks=N failures=M`. The
system-level tests are:

* **`tb_bpsk_ldpc_sync`** (default parameters, one full codeword).
  * Channel: 1500 ppm, 0.3 T delay, random walk, carrier phase 2.3 rad,
    noise σ = 0.4 per sample.
  * Checks the frequency and delay estimates.
  * Checks the carrier-phase lock, to within 0.1 rad of the true phase.
  * Checks the run counts of every step of the sequence.
  * Checks that the swap, interpolation and loop-2 mechanisms act.
  * Checks the final hard-decision error rate.
* **`tb_fig5_scenarios`** runs four cases back to back on one instance:
  * carrier π/4 with a 0.5 T delay;
  * carrier π/4 with −2000 ppm;
  * carrier π/4 with a random walk of 0.5 % of Ts per sample (σ_d = 0.005);
  * all of them together.

**Limits of these tests.** The stand-in decoder does not decode. It scores
checks against the known transmitted bits and returns hard ±1 estimates. The
system tests therefore show that the synchronizer locks and that the
sequence is right. They do not show coded frame-error-rate performance near
1 dB Eb/N0, which needs a real decoder.

Known sensitivity: the stand-in's score is flat-topped near the correct
frequency, so the residual frequency error biases the delay estimate. Loop 2
absorbs the difference.

## Simulating

With Verilator 5 (tested with 5.050), from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bpsk_sync_pkg.sv tb/tb_bpsk_pkg.sv tb/tb_bpsk_ldpc_sync.sv \
        --top-module tb_bpsk_ldpc_sync -o sim
    ./obj_dir/sim

* **Other testbenches.** Replace `tb_bpsk_ldpc_sync` by any other testbench
  name (for example `tb_symbol_timing`, `tb_ddcs_carrier_loop`,
  `tb_fig5_scenarios`). The package files must stay first on the command
  line.
* **Run time.** The full-size system test runs in about a second; the
  four-scenario test takes about five.
* **Parameters.** All sizes are parameters of `bpsk_ldpc_sync` with the
  values above as defaults:
  * `NSYM`;
  * the search grids: `FREQ_POINTS`, `FREQ_STEP`, `DELAY_POINTS`,
    `DELAY_STEP`;
  * the iteration counts: `ITERS_PER_POINT`, `PI_ITERS`, `MAX_ITERS`;
  * the gains: `KP`, `KI`, `KT_SHIFT`.
* **Matched filter.** A different roll-off or length needs new taps in
  `rrc_matched_filter` and a matching `MF_DELAY` in `symbol_timing`. The
  taps are h(nT/2)/Σh(mT/2)², n, m = −8…8, in Q14, where h is the RRC
  pulse.
