# Brain-heart monitoring chip with a 4-channel ICA processor

This is the digital core of a wearable monitor. It records four EEG
channels, three EKG channels and a near-infrared optical sensor array, and
it can remove artifacts from the EEG on the chip before anything is
transmitted. For that, a hardware Independent Component Analysis (ICA)
processor runs the Infomax algorithm continuously on sliding 64-sample windows
of the 4-channel EEG. Each window produces an unmixing matrix `W`, and the
processor outputs the four separated components instead of the raw
electrode signals.

Around the ICA processor sit the parts of a small sensor-hub chip:
- **System controller (SCU):** decodes an 8-bit activation command and gates
  each processor's clock.
- **Front-end interface controller (FICU):** schedules every conversion of the
  shared 10-bit ADC.
- **Prioritized data selector (PDS):** merges the data streams in front of a
  lossless compressor. The data then goes out over a UART and Bluetooth.

The design follows the architecture of a published thesis design. The HRV
(heart-rate variability) processor, the optical tomography (DOT) processor,
the compressor, the UART and the analog front end were not designed here.
Their signals are ports of the top module `bhm_soc`.

Everything is SystemVerilog-2017, synthesizable (the ADC model in `tb/`
excepted), and runs in Verilator 5.

## Chip-level data flow

```
            rx_mode ──► SCU ──► internal reset, mode, gated clocks, trigger
                                                │
 AIC/ADC ◄─ clocks, START, CHSEL ── FICU ◄──────┘
 AIC/ADC ── EOC, DATA ────────────► FICU
                                    │ EEG words (4 ch, 128 Hz)
                                    ├──► ICA processor (mode bit 1) ─┐
                                    ├──► raw EEG FIFO   (bit 1 = 0) ─┤ EEG/ICA
                                    │ EKG words (3 ch, 256 Hz)       │
                                    ├──► raw EKG FIFO ───────────────┤ EKG
                                    ├──► hrv_ekg_* port              │
                                    │ DOT words (24 per frame)       │
                                    └──► dot_raw_* port              │
                hrv_valid/data ──────────────────────────────────────┤ HRV
                dot_valid/data ──────────────────────────────────────┤ DOT
                                                                     ▼
                                       PDS ──► comp_valid/data/src/bypass
```

The activation command (`rx_mode`) sets one bit per function:

| bit | meaning |
|---|---|
| 0 | acquire EEG |
| 1 | run ICA on the EEG |
| 2 | acquire EKG |
| 3 | run HRV on the EKG |
| 4 | acquire near-infrared (DOT) data and run DOT |
| 5, 6, 7 | bypass compression for EEG, EKG, DOT |

## The ICA processor

ICA assumes that the electrodes see linear mixtures of independent sources.
It looks for the matrix that makes the outputs as independent as possible.
The processor does this in three steps per window:
1. Centre the data.
2. Whiten it, so that its covariance becomes the identity.
3. Train `W` on the whitened samples with the natural-gradient Infomax rule.

The final unmixing matrix is `W·P`, where `P` is the whitening matrix. It is
applied to the newest half-window.

### Windows and the three-bank buffer (`ica_ibu`)

Samples arrive one channel at a time (channel 1 to 4). The buffer has three
banks of 32 words, and each word is one sampling instant of all four channels
(40 bits). One bank fills with the incoming half-window. The other two hold
the current 64-sample window. When a bank fills:
- training starts on the window made of the previous half and the new half;
- component output starts for the previous half-window, using the previous
  `W` and `P`.

This overlaps training of window *k* with output of window *k−1*. The first
half-window is never output. The latency from a sample to its component is
between half a window and one window (0.25–0.5 s at 128 Hz).

If a bank fills while training is still running, that window is skipped and
the sticky `overrun` flag is set. At the real rates this cannot happen (see
the budget below).

### Mean, covariance and centring (`ica_meancov`, `ica_ctr`)

One shared multiply-accumulate unit makes 14 sums per sample: 4 channel sums
and the 10 upper-triangle products. That is 64·14 accumulations plus an
11-cycle finish. Mean and covariance are divided by 64 with a 6-bit shift:
- the mean is unsigned Q10.6;
- the covariance uses 6 fraction bits.

The centring unit is four parallel subtractors. Its output is valid only
once the window's mean is valid.

### Whitening: Jacobi EVD with CORDICs (`ica_wu`)

This is the most involved unit. The whitening matrix is
`P = E·D^-1/2·E^T`, where `C = E·D·E^T` is the eigen-decomposition of the
4×4 covariance. It is computed as follows:

- **Cyclic Jacobi sweeps.** A 4×4 matrix has six off-diagonal index pairs.
  They fall into three rounds of two disjoint pairs:
  `{(1,2),(3,4)}`, `{(1,3),(2,4)}`, `{(1,4),(2,3)}`.
- **Angles.** In each round, two *angle* CORDICs (vectoring mode,
  `ica_cordic_angle`) find the rotation angles that zero the two chosen
  elements.
- **Rotations.** Eight *rotation* CORDICs (`ica_cordic_rotate`) then rotate:
  1. the affected columns of `C`;
  2. then its rows;
  3. then the columns of the eigenvector matrix `E`.

  That is `C ← JᵀCJ`, `E ← EJ`.
- **Sweep count.** Six sweeps are run (`NSWEEP`). This is a fixed count,
  chosen here; convergence is not tested.
- **CORDIC details.** Both CORDICs are iterative (one micro-rotation per
  cycle, 16 iterations). They have a 40-bit datapath and 32-bit angles.
  - The angle CORDIC maps the left half-plane by negating both coordinates.
  - The rotation CORDIC removes its gain with one constant multiply at the
    end.
  - Latencies are 17 and 18 cycles.
- **Post-processing.**
  - The diagonal of the rotated `C` is `D`.
  - `ica_inv_sqrt` computes `D^-1/2` (63 cycles). It uses a bit-serial
    square root and then a restoring division of 2^37 by the root.
    Non-positive eigenvalues are clamped.
  - One shared group of four multipliers with an adder tree ("vector
    product") builds `F = E·D^-1/2` (4 cycles), then `P = F·Eᵀ` (16 cycles).

The TU often needs whitened samples `z = P(x − mean)`. They are not stored.
The whitening unit recomputes them from the sample buffer each time the
training unit asks (request `z_req`/`z_idx`, answer `z_valid`/`z` five cycles
later), using the same vector product unit, one row of `P` per cycle. This
replaces a 64×4 store of whitened data with a few cycles of latency per
request. The TU prefetches, so it never waits.

### Training unit (`ica_tu`)

Per iteration, over the 64 whitened samples `z_j` of the window:

```
u_j = W z_j
T   = 64·I + Σ_j f(u_j) u_jᵀ,      f(u) = 1 − 2/(1 + e^−u)
W  ← W + R·T·W                     R = 7.4768e-4
```

All arithmetic goes through one array of sixteen 16×16 multipliers and one
array of sixteen 32-bit adders. An eight-state machine routes them:

| state | cycles | work |
|---|---|---|
| `S_WAIT` | 1 | T = 64·I, load z₀ |
| `S_CAL_U` | 1 | u = W z (four 4-term dot products in the adder chains) |
| `S_LOOKUP_Y` | 4 | f(u_r) through one lookup unit, one channel per cycle |
| `S_UPDATE_T` | 1 | T += f(u) uᵀ (16 products), load next z |
| `S_CAL_DELW` | 5 | T = R·T, then one row of dW = T·W per cycle |
| `S_UPDATE_W` | 1 | W += dW |
| `S_COMPARE` | 1 | Σ dW² (multipliers square, adders sum) against the threshold |
| `S_OUTPUT` | 1 or 16 | next iteration, or stream W out row by row |

A 4-bit counter sequences the sub-steps. One iteration takes
6·64 + 9 = 393 cycles, and 512 iterations take 201,237 cycles. `W` starts
as the identity after reset. After that it carries over from window to
window, so each window starts from the previous solution.

Training stops after `MAX_ITER_P` = 512 iterations, or when Σ dW² ≤
`THRESH_LSB`, counted in units of 2^-24. The reference threshold is
1.0012e-8, which is 0.17 of one such unit. So the default is
`THRESH_LSB = 0` (stop only when dW is exactly zero), and in practice every
window runs the full 512 iterations. A
larger `THRESH_LSB` gives an early exit. The unit test shows one that stops
after 39 iterations.

**Why `64·I` and not `I`.** The update sums `f(u)uᵀ` over 64 samples. A
single identity would be outweighed 64:1, and the rule would settle with
|u| around 0.2. That is below the resolution of the lookup table, and the
outputs would not separate. Adding one identity per sample, which is the
usual block form of Infomax, fixes this. This choice is this design's own.

### Non-linear lookup (`ica_nl_lookup`)

`f(u)` is odd, so only `u ≥ 0` is stored: 32 entries at a step of 1/4 over
0 ≤ u < 8. That is equivalent to a 64-entry table over ±8.
- Entry *k* is `round((1 − 2/(1+e^(−k/4)))·2^14)`.
- The last entry is −1.0, so that |u| ≥ 8 saturates.
- The table is computed in SystemVerilog at elaboration time.
- For negative `u`, the index is the bit-inverted `u[10:6]` and the output
  word is inverted: one's-complement mirroring, with no adder in the path.

Input bits `u[5:0]` (finer than the table step) are not used.

### Computation unit (`ica_cu`)

The CU does two things:
1. Once per window, it forms `Wu = W·P` from the streamed `W` words and the
   held `P`.
2. For each of the 32 samples of the half-window being output, it produces
   the four components `y = Wu·(x − mean)`.

Components leave one 16-bit word at a time (Q7.8) under valid/ready. An
assertion checks that a word waiting for `out_ready` does not change.

### Fixed-point formats

| quantity | format |
|---|---|
| ADC sample | unsigned 10 bit |
| mean | unsigned Q10.6 |
| covariance | 32-bit, 6 fraction bits |
| E (eigenvectors) | 40-bit, 28 fraction bits |
| P (whitening matrix) | 32-bit, 24 fraction bits |
| z, u, output y | signed Q7.8 (16 bit) |
| W | signed Q3.12 |
| f(u) | signed Q1.14 |
| T accumulator | 32-bit, 16 fraction bits |
| R | 12544 / 2^24 = 7.4768e-4 |

### Bypass

With `bypass` high, each input word goes straight to the output,
zero-extended, under the same handshake. At chip level this is the test input
`ica_bypass`. The activation command has no bit for it.

## System control (`bhm_scu`, `bhm_clock_gate`)

After the external reset the chip is idle until a command arrives. Then the
SCU:
1. stores the command as the mode;
2. sends a one-cycle internal reset to every block;
3. waits for `comp_init_done` from the compressor (about 96 cycles in the
   reference system);
4. enables the clocks and pulses the FICU trigger.

A new command repeats the sequence.

Each processor clock runs only when its data is both acquired and processed:
- ICA clock: bits 0 and 1;
- HRV clock: bits 2 and 3;
- DOT clock: bit 4.

This follows the rule that a processor whose signal is off, or sent raw, has
its clock stopped. The gate is a latch that is transparent while the clock
is low, followed by an AND gate.

## Front-end control (`bhm_ficu`)

- **Clocks.** The FICU divides the 24 MHz system clock into the front end's
  10 kHz clock (÷2400) and the ADC's 1.2 MHz clock (÷20). `adc_reset` is
  released synchronously.
- **Schedule.**
  - A 256 Hz tick requests an EKG acquisition (three channels) every time.
  - Every other 256 Hz tick also requests an EEG acquisition (four channels).
  - A 24 Hz tick requests one DOT sensor value.
- **Event queue.** Requests wait in an 8-entry queue. Requests that fall due
  together enter in ADC priority order: EEG, EKG, DOT. A lost request sets
  `event_overflow`.
- **Conversion sequence.** The ADC input multiplexer needs time to settle.
  So every real conversion is preceded by a dummy one on the same channel,
  whose result is discarded. The state machine steps through:
  1. set `adc_chsel`;
  2. pulse `adc_start_conversion`;
  3. wait for `adc_eoc`;
  4. start the real conversion;
  5. wait for EOC again;
  6. hand the word to its engine.

  A conversion takes 12 ADC clocks including the start cycle, and EOC is high
  for one ADC clock.
- **DOT frames.** A frame is 6 LEDs × 4 sensors = 24 conversions. `led_sel`
  moves to the next LED right after the fourth conversion of the current
  one. `dot_chsel` selects the four photodiodes around each LED. For LED
  *n* the base is {0,1,2,4,5,6}[n], and the offsets are 0, 4, 1 and 5.
  `adc_chsel` codes 0–3 select EEG channels 1–4, codes 4–6 select EKG
  channels 1–3, and code 7 selects the DOT board.

The divider values are parameters (`DIV_ADC`, `DIV_10K`, `DIV_256HZ`,
`DIV_24HZ`), so that tests can run at compressed time.

## Data selector and backpressure (`bhm_pds`, `bhm_fifo`)

The compressor takes one 16-bit word at a time. The selector grants the
highest-priority valid source in the order EKG, EEG/ICA, HRV, DOT. It loads
its output register whenever the register is empty or being read. Each word
carries:
- a 2-bit source tag;
- a bypass flag from mode bits 5–7. HRV results are always marked bypassed,
  because HRV data is not compressed.

Backpressure runs in three stages:
1. the compressor drops `comp_ready`;
2. the selector holds its register and grants nothing;
3. each source holds its word.

The ICA processor holds its output. Raw EEG and EKG words go through 8-word
FIFOs. When a FIFO is full, new words are dropped and `raw_overflow` is set.

## Departures from the reference design

- **IBU word width.** The reference gives the buffer banks both as
  32 words × 10 bits and as 3840 bits in total. This design uses 40-bit
  words (one sampling instant of four channels), which matches the total.
- **Lookup table size.** The reference gives both a 32-entry table at a
  1/2 step and a 64-entry table at a 1/4 step. This design follows the bit
  fields printed in the reference's drawing of the lookup unit (`u[10:6]`):
  32 stored entries at a 1/4 step, mirrored to cover ±8.
- **Identity term.** It is `64·I` instead of `I` (see the training unit).
- **Convergence threshold.** The threshold cannot be represented at 16 bits,
  so windows normally run the full 512 iterations. The reference reports
  about one iteration per window once converged; that behaviour is not
  reproduced.
- **Fixed counts and formats.** The Jacobi sweep count (6), the CORDIC
  iteration count (16), the 1/sqrt circuit and all fixed-point formats are
  this design's choices.
- **Whitened data.** It is recomputed on demand instead of stored.
- **Raw EEG path.** When ICA is off, raw EEG reaches the selector through a
  FIFO. The reference only says that raw data can be sent.
- **Output handshake.** The ICA output handshake (`out_ready`) and the FIFO
  depths (8) are this design's choices.
- **EKG rate.** EKG is acquired at 256 Hz, and every EKG word goes to the
  HRV port. The reference describes the HRV processor's input as 128 Hz;
  an external HRV processor must decimate if it needs that.
- **Window timing.** One window takes 203,771 cycles from the start of
  mean/covariance to the end of training. The reference worst case is
  203,757. A half-window lasts 6,000,000 cycles at 24 MHz and 128 Hz, so
  the margin is about 29×. At the reference's low-power point (0.817 MHz,
  128 Hz) the worst case still fits, with 479 cycles to spare. At its
  high-rate point (60 MHz, 9.708 kHz input) it does not fit: with the full
  512 iterations the highest input rate is about 9.42 kHz. A nonzero
  `THRESH_LSB` brings training time down once windows converge.

## Outside this design

The top module `bhm_soc` exposes these as ports:

| Part | Ports |
|---|---|
| AIC and ADC | `aic_clk10k`, `adc_*`, `dot_chsel`, `led_sel` |
| HRV processor | `gclk_hrv`, `hrv_ekg_*` (EKG words), `hrv_valid/data/ready` (results) |
| DOT processor | `gclk_dot`, `dot_raw_*` (words and conversion number), `dot_valid/data/ready` |
| Compressor | `comp_reset`, `comp_init_done`, `comp_valid/data/src/bypass/ready` |
| UART receiver | `rx_mode_valid`, `rx_mode` |

Status outputs: `running`, `current_mode`, `raw_overflow`, `event_overflow`,
`ica_overrun`, `ica_training`, `ica_train_done`, `ica_converged`,
`ica_iterations`.

## Simulation

Every block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. `tb/aic_adc_model.sv` is a behavioural ADC:
12-cycle conversions, EOC pulses, and a settling model where the first
conversion after a channel change returns a wrong value. Build any
testbench like this:

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/ica_pkg.sv rtl/ica_cordic_pkg.sv rtl/bhm_pkg.sv \
  tb/tb_bhm_soc.sv --top-module tb_bhm_soc
./obj_dir/Vtb_bhm_soc
```

Notable tests:
- **`tb_ica_nl_lookup`:** every 16-bit input.
- **`tb_ica_tu`:** the 201,237-cycle training time, the early exit with a
  nonzero threshold, and separation quality.
- **`tb_ica_processor`:** mixes four heavy-tailed random sources and feeds
  them at the low-power operating point: one word every 1595 cycles, which
  is 128 Hz × 4 channels on a 0.817 MHz clock. It checks that no window is
  skipped at that rate. It also checks the training time against the
  203,757-cycle budget, the bypass path and the output stalls. The mean
  |correlation| between outputs and sources is about 0.97.
- **`tb_bhm_soc`:** the whole chip with compressed timing. Three activation
  commands cover:
  - ICA with all processors;
  - EEG and EKG raw with compression bypass;
  - ICA bypass.

  It counts every mechanism (dummy conversions, priorities, LED switches,
  arbitrations, compressor stalls, bypass flags, trainings, raw paths, clock
  gating) and fails any that never happened. It runs in a few seconds.
- **`tb_bhm_soc_full`:** the top at default parameters: 24 MHz timing,
  30 M cycles = 1.25 s of chip time, about 30 s to simulate. A full window
  is trained and its components are checked against the sources (mean
  |correlation| ≈ 0.98).

Known lint notes are explained at the top of the files concerned:
- `ica_inv_sqrt`: the top bit of its trial remainder is unused.
- `ica_nl_lookup`: `u[5:0]` is unused.
