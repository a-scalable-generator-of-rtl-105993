# Spine: one panel of a distributed massive-MIMO uplink receiver

A massive-MIMO base station has many antennas, from tens to hundreds. A
centralized receiver would have to bring every antenna's sample stream to
one place, and that interconnect becomes the bottleneck. This design splits
the receiver into identical *Spines*. Each Spine serves a few antennas (M)
and does all the per-antenna work locally:

- filtering and front-end correction;
- channel estimation from pilots;
- time alignment;
- its share of a maximum-ratio-combining (MRC) beamformer.

Spines are connected in a daisy chain. Each one adds its K beamformed user
streams to the sum coming from the Spine above and passes the result down.
The chain's bandwidth depends on the number of users K, not on the number of
antennas. Adding Spines adds antennas without adding bandwidth.

MRC needs no matrix inversion. User k's estimate is
`y_k = sum over all antennas m of conj(h_mk) * x_m`. This sum splits exactly
into one partial sum per Spine, which is why the chain works.

The RTL is SystemVerilog-2017. It is parameterized, with these defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 4 | antenna channels per Spine |
| `K` | 2 | users |
| `B` | 8 | datapath bits (I and Q each, Q0.7) |
| `P` | 8 | samples per clock per channel (parallel lanes) |
| `OS` | 2 | oversampling: samples per symbol |
| `L` | 64 | Golay pilot half-length |
| `NT` | 65 | RRC filter taps |
| `LL` | 1 | half-order of the Lagrange interpolators (2·LL+1 points) |
| `QD` | 8 | fine-delay resolution is 1/QD sample |
| `WS` | 8 | peak-detector averaging window, in samples |
| `MAXD` | 64 | largest coarse channel delay, in samples |
| `SW` | 12 | daisy-chain word width (B+4, room for 16 Spines) |

At a 50 MHz clock, each channel takes 400 MS/s, which is 200 MHz of signal
bandwidth at OS=2. The chain carries K·P/OS = 8 complex symbols per clock.
That is 2·f·B·P·K/OS = 6.4 Gb/s. A 32-antenna, 2-user system is eight of
these Spines in a chain.

## Datapath

```
             per channel m (x M)                              per user k (x K)
adc_i/q[m] -> signal_correction -+-> coarse_delay_sync -> fine_delay_sync -+
             (RRC, IQ, DC)       |                                         |
                                 +-> delay_estimator (channel)             v
                                          |                        mrc_beamformer
                                          v                                |
                              sequencing_controller  <------ delay_estimator (user)
                              (weights, delays, windows)                   |
                                                          fine_delay_sync -> downsampler -> panel_sum
                                                                                up_* ---^     |
                                                                                              v dn_*
```

All blocks follow one streaming convention:

- A word is P samples. Lane 0 is the oldest sample.
- A block's registers advance only on cycles where its `in_valid` is high.
- `out_valid` is `in_valid` delayed by the block's pipeline.
- Latencies are counted in valid words, so an input stream with gaps works
  unchanged.
- Lane-crossing operations (FIR taps, delays, correlator delays) read from
  `par_history`, a shift register of previous words. It is indexed by
  sample age.

### Signal correction (`signal_correction`)

Each channel passes through three stages:

1. **RRC filter** (`fir_filter`). It is symmetric, with 65 taps at run-time
   coefficients. Only the 33 unique coefficients are inputs, and each pair of
   mirrored samples is pre-added before the multiply.
2. **IQ-imbalance correction** (`iq_correction`). A 2×2 real matrix
   `[a b; c d]` is applied to (I, Q), with Q0.7 entries.
3. **DC-offset removal** (`dc_cancel`).

Each stage rounds half-up and saturates back to B bits. The RRC output is
delayed by its centre tap, 32 samples. Total latency is 4 words plus 32
samples.

The correction parameters (RRC taps, IQ matrix, DC offsets) are inputs. They
are estimated off-chip.

### Pilots and the Golay correlator (`golay_correlator`)

A packet opens with one pilot slot per user. User k sends a Golay
complementary pair in its slot, each chip oversampled OS times. Every user
shares the delay vector D[n] = 2^n. Each user has its own seed vector W of
log2(L) bits, where bit n set means w[n] = −1.

A Golay pair is generated by log2(L) butterfly stages, starting from an
impulse:

```
a'(t) = w·a(t) + b(t − D·OS)
b'(t) = w·a(t) − b(t − D·OS)
```

Running the received stream through the same stages filters it by the two
sequences, with no multipliers. The transmitted pilot is reverse(gA)
followed by reverse(gB). The correlation is:

```
R(t) = a_N(t − L·OS) + b_N(t)
```

The autocorrelations of gA and gB sum to a single spike. At the peak, R is
2L times the complex channel coefficient h. The estimate is therefore
`h = sat(round(R / 2L))`. This estimate becomes the beamformer weight
directly, with no division.

The correlator runs at the oversampled rate, with P lanes per clock. It uses
B+log2(2L) = 15-bit arithmetic. Latency is log2(L)+1 = 7 words.

The seed is a run-time input. The sequencing controller switches it at every
slot boundary, so one correlator per channel serves all users.

### Peak detection and fine delay (`delay_estimator`)

`delay_estimator` combines these parts:

- **Power.** Each lane computes |R|² (30 bits).
- **`lane_peak_detector`**, one per lane.
  - It keeps a moving sum of the lane's last WS powers.
  - A power counts as a hit when it exceeds `threshold × average` and also
    the absolute floor `lower`. The test is done without division:
    `2·WS·p > thr_x2·sum`, where `thr_x2` is the threshold with one fraction
    bit.
  - After a hit, it tracks the maximum over the following WS samples.
  - It then reports `done`. States: WAIT, DETECT, DONE.
- **`global_peak_detector`**.
  - It keeps the last WS+2 words of R and power from all lanes.
  - When any lane reports `done`, it searches the last WS+1 words for the
    largest power.
  - If the peak's later neighbours have not arrived yet, it waits one more
    word.
  - Outputs: the complex R at the peak, its position in samples since the
    last `clear`, and the 2LL+1 powers around it.
- **`fine_delay_estimator`**.
  - It fits a Lagrange polynomial through the 2LL+1 powers.
  - It evaluates the polynomial at the 2QD+1 sub-sample offsets q/QD.
  - It returns the offset q with the largest value.
  - The weights for each offset are elaboration-time constants with 14
    fraction bits, so the search needs no loop and no divider.

Only the first peak after each `clear` is reported. The reported position
includes the correlator latency. It is therefore consistent between the
channel and user estimators, but it is not the pilot's start.

### Time alignment (`coarse_delay_sync`, `fine_delay_sync`)

Each channel's samples reach the Spine with a slightly different delay. The
channels are aligned in two steps:

- **Coarse.** `coarse_delay_sync` adds a run-time delay of 0..MAXD whole
  samples. It selects lanes from the word history.
- **Fine.** `fine_delay_sync` resamples the stream at t + q/QD using
  (2LL+1)-point Lagrange interpolation.
  - The weights for each q are computed at elaboration, in B+2 bits with B
    fraction bits, so 1.0 is exact.
  - The run-time q picks one set of weights, which feeds a non-symmetric
    `fir_filter` on I and on Q.
  - Latency is 2 words plus LL samples.

The same fine synchronizer aligns each user after the beamformer.

### Beamformer (`mrc_beamformer`)

The beamformer is a weight-stationary systolic array of M×K processing
elements:

- PE (m,k) holds `conj(w_mk)`. The weights are loaded with `w_load`.
- Channel m enters row m, skewed by m words.
- Partial sums move down the columns, and samples move along the rows.
- The user columns are deskewed at the bottom.
- Each result is shifted right by B−1 with rounding and saturated to B bits.
  Inputs, weights and outputs therefore all use the datapath format.

Latency is M+K words at the defaults.

### Per-user back end (`downsampler`, `panel_sum`)

After its own delay estimation and fine alignment, each user's stream goes
through the `downsampler`:

- It keeps lanes `j·OS + phase`, which gives P/OS symbols per word.
- It passes words only while the user's payload window is open.

`panel_sum` then works per user:

- It adds the local symbols to the upper neighbour's word, with separate
  valids per user.
- It saturates the sum to SW bits.
- It registers the result onto `dn_*`.

A missing upper or local word counts as zero. The bottom Spine's `dn_*`
output is the system's beamformed result.

## Packet timing (`sequencing_controller`)

The controller counts valid ADC words from `beacon`, which marks word 0 of a
packet. A packet has:

- K pilot slots of `slot_len` words, starting at `slot_start`. User k owns
  slot k.
- A payload, which all users send at the same time.

| When | What happens |
|---|---|
| each slot start | Channel estimators are cleared and get the slot owner's seed. |
| each channel peak in slot k | The channel's h is stored as weight w_mk. Its delay (position·QD + q) is added to the channel's total. |
| end of the last slot | Weights are loaded (`w_load`). Each channel's delay sum is divided by K, with rounding. The result is used only if the channel found every user's pilot. |
| slot start + `user_ofs` | The user's estimator (on the beamformed stream) is cleared. It uses the user's own seed. |
| next `beacon` | New channel and user settings take effect. |

The channel settings are computed relative to the channel that arrives
last. Every other channel gets the extra delay (latest − own). The integer
part goes to its coarse synchronizer and the remainder to its fine one.

The user settings are computed from user k's peak position relative to
`user_ref`, which is the position of a user with no delay. This gives the
user's fine step, downsampling phase and payload start. The payload window
is counted in words at the downsampler input, starting `pay_start` samples
after the beacon. It stays open for `pay_len` words.

A channel or user whose pilot was not found keeps its previous settings.
`ch_ok`/`u_ok` flag this.

Settings measured in one packet apply from the next. The first packet after
reset therefore only trains. The second aligns the channels, and from the
third on the payload windows are exact.

`user_ref` and `pay_start` need a one-time calibration. The peak position
includes all the pipeline latencies. A system integrator reads `u_pos` once
from a known-aligned user and writes `user_ref` back, as the end-to-end test
does. At the defaults, the ADC-to-downsampler latency with zero coarse delay
is 15 words plus 34 samples (154 samples).

## Interface of `spine`

- `adc_valid`, `adc_i/q[M][P]`, `beacon`: the sample input. The design is
  synchronous, with `clk` and an active-low asynchronous reset, `rst_n`.
- Configuration: `rrc_coef[33]`, `iq_a..d[M]`, `dc_i/q[M]`, and detector
  thresholds `thr_*` and `lower_*` for the channel and user estimators.
  Also the slot timing (`slot_start`, `slot_len`, `user_ofs`), the payload
  timing (`user_ref`, `pay_start`, `pay_len`) and the user seeds
  `w_seed[K]`. All are plain inputs. A system would drive them from a
  register bank behind a debug bus.
- Daisy chain: `up_valid[K]`, `up_i/q[K][P/OS]` in, and `dn_*` out.
- Status: the current estimates (`ch_pos`, `ch_q`, `u_pos`, `u_q`), weights
  (`w_i/q`), settings (`cs_delay`, `fs_q`) and `ch_ok`/`u_ok`.

## Where this RTL follows the original design and where it chooses

These parts follow the original Spine generator:

- the block structure and order;
- the Golay butterfly correlator with run-time seeds;
- the three-state lane peak detector with a threshold-over-average test and
  an absolute floor;
- the global search and Lagrange fine-delay search;
- Lagrange fractional-delay synchronizers for channels and users;
- the weight-stationary systolic MRC;
- a daisy-chained panel sum;
- settings that apply with the next packet;
- the FPGA instance's sizes.

These are this implementation's own choices:

- Number formats and rounding: Q0.7 samples and coefficients, round
  half-up, saturation at every stage, and h = R/2L.
- SW = B+4 for the chain.
- LL=1, QD=8, WS=8, MAXD=64.
- Peak-detector buffer depth and a linear comparator scan.
- The payload-window mechanism, and `user_ref` calibration as the user
  reference.
- The channel-delay averaging rule. It is the mean over users, and the
  latest channel is the reference.

These points differ from the original's number formats or behaviour:

- **Detector lower bound.** The original gives the lower bound as a
  fraction in (−1, 1) with B+1 fraction bits. Here `lower_*` is compared
  directly with the 30-bit correlation power, which is simpler to set from
  an expected peak level.
- **Fine-sync coefficients.** The original gives these as (−1, 1) with B+1
  fraction bits. Here they have B fraction bits in B+2-bit words, so the
  weight 1.0 of a zero shift is exact and q = 0 passes samples unchanged.
- **What the beacon resets.** The original resets all registers and state
  machines at the beacon. Here the beacon restarts the controller's
  counters and applies the new settings. It also clears every
  delay estimator, and the channel estimators are cleared again at each
  slot start.
  Filter and delay-line contents are kept, so no samples are lost across
  packets.

The original filled its coefficient tables from software. Here they are
computed at elaboration from the Lagrange formula:

```
w_i(s) = prod over j != i of (s − j)/(i − j)
```

Not included: the FPGA emulation shell around the core (sample memories,
DMA, DDR4 controller, debug bus, clocking) and the payload demapper. Both
are outside the Spine.

## Verification

Every block has a self-checking testbench in `tb/`, named
`tb_<module>.sv`. Each compares against an independent model and ends with
`TB_RESULT checks=N failures=M`. `tb/tb_util.svh` holds the check macros
and the watchdog.

`tb_spine` runs one Spine at its default parameters through five packets.
It uses random channel coefficients, per-channel delays of {0,5,2,7}
samples, a 2-sample offset between the users, and QPSK payloads. It
checks:

- the weights against a matched-filter model;
- the coarse settings;
- the relative user delay;
- every payload symbol of both users at the downsampler, against the
  reference model;
- every daisy-chain sum.

It also puts channel 0's pilot half a sample late and requires a non-zero
fine step. It counts seed switches, peak reports, weight loads, non-zero
coarse and fine settings, chain additions and payload words, and fails if
any of them never happened.

`tb_spine_chain` connects two default Spines: Spine 1's upper input is
Spine 0's output, which gives 8 antennas and 2 users. It sends a 16-QAM
payload. Each Spine has its own channels and channel delays, and Spine 1
receives its samples and beacon one clock after Spine 0. That step equals
the one-clock register of the panel sum, so the same payload word from
both Spines meets in Spine 1's adder. The test checks each Spine's payload
against the model, checks that both windows carry the same symbols, and
checks that the chain output is the saturated sum of both. In a longer
chain, each Spine's beacon and samples must arrive one clock after those of
the Spine above it.

To run any testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb -Irtl -Itb \
  rtl/mimo_pkg.sv tb/tb_spine.sv --top-module tb_spine
./obj_dir/Vtb_spine
```

`tb_spine` takes well under a minute. The block testbenches take seconds.

Known limits:

- Sub-sample delays are tested with a two-sample split pulse only, not with
  band-limited fractional delays.
- The thresholds in the test are set for noiseless signals. No
  bit-error-rate measurement is done in RTL simulation.
