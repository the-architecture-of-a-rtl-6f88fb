# DVB-S2 IF receiver: synchronisation chain in SystemVerilog

This is the digital part of a DVB-S2 satellite receiver. The input is a real
intermediate-frequency (IF) signal sampled by a 12-bit ADC. The output is the
soft bits of each FEC frame, in codeword order, ready for an LDPC decoder.

The work is recovering every unknown of the link, in this order:

1. carrier frequency;
2. symbol timing;
3. frame position;
4. residual frequency, phase and amplitude.

After that, each symbol is turned into likelihood ratios. Every stage is RTL
and runs in one clock domain at the ADC rate, taking at most one ADC sample
per clock.

The reference operating point is 26 Mbaud with roll-off 0.35:

- the ADC samples at 208 MSps, 8 samples per symbol;
- the down-converter outputs 104 MSps, 4 samples per symbol;
- the matched filter outputs one sample per symbol.

Roll-offs 0.20 and 0.25 (30 and 28.5 Mbaud, ADC at 180 and 199.5 MSps) use the
same structure. Only the resampler step changes at run time, and the
`ROLLOFF` parameter at elaboration.

The LDPC and BCH decoders, and the packet/IP processing behind them, are not
part of this RTL.

## Signal chain

```
ADC -> ddc -> str -> matched_filter -> frame_sync -> pl_descrambler
         ^                                              |
         |                                     pilot_demux #1
         |                                     |            |
         +---- coarse_cfr (freq. word) <-------+            |
                                        fine_cfr <----------+
                                           |
                                    pilot_demux #2 -> phase_est
                                           |
                                    pilot_demux #3 -> dagc -> nda_phase_loop
                                                                |
                               bit_deinterleaver <- demapper <--+
```

`dvbs2_rx_top` wires the chain. The shared types are in `dvbs2_pkg`:

- `cplx_t` is a 16-bit signed I/Q pair;
- `sym_tag_t` is a symbol's position in the frame;
- `mod_t` is the modulation.

After frame lock, every symbol carries a tag from the frame synchroniser
through the rest of the chain. The tag gives:

- the field: header, data or pilot;
- the index inside that field;
- first/last flags.

Later stages use only the tag to find pilots and frame boundaries. None of
them counts symbols on its own.

### Number formats

- **Samples and symbols.** 16-bit signed. After the digital AGC a constellation
  point of unit energy has amplitude `UNIT = 4096`.
- **Phases.** 16 bits for one full turn.
- **NCO frequencies.** 32 bits for one turn per sample.
- **Soft bits.** 6-bit signed, saturated at ±31. A positive value favours bit 0.

### Down-converter (`ddc`, `nco`)

The conversion to baseband happens in two stages.

1. **Fixed mix at Fs/4.** A quadrature mix by the sequence 1, −j, −1, +j
   needs no multiplier. It is followed by a 23-tap windowed-sinc low-pass
   filter and decimation by two.
2. **Programmable mix at Fs/2.** An NCO (32-bit accumulator, 1024-entry
   cos/sin table) drives a complex multiplier. The NCO frequency is the
   nominal word `cfg_freq` plus the correction from the coarse
   carrier-recovery loop. That loop is the only feedback path that crosses
   blocks.

A linear-interpolation resampler then sets the output rate. Its step is
`cfg_rs_step`, in input samples per output sample, Q2.16. At the 0.35
roll-off point the step is exactly 1.0. At the other two points it is 0.75
and 0.875.

A power meter integrates |y|² against `cfg_pwr_target` into `agc_ctrl`. That
word is meant for the analog AGC amplifier ahead of the ADC.

### Symbol timing (`str`)

A Farrow cubic (Lagrange) interpolator produces 4 samples per symbol at the
right instants. The fractional position comes from an accumulator, so the
loop can follow a symbol-clock offset.

- **Timing error.** A Gardner detector computes one value per symbol from the
  on-time samples and the sample midway between them. It needs neither the
  data nor carrier lock.
- **Loop filter.** Proportional-integral, with gains set by right shifts.
- **Integrator precision.** The integrator keeps 16 extra fraction bits.
  Without them, the rounding of the shift (always downward) biases the rate
  estimate.
- **Output.** An `on_time` strobe marks the symbol-centre sample.

`matched_filter` is a root-raised-cosine FIR spanning ±4 symbols, with
unit-energy taps computed at elaboration. It outputs only on the strobe.

### Frame synchronisation (`frame_sync`)

Every PL frame starts with a 26-symbol start-of-frame (SOF) field in
π/2-BPSK.

**Correlator.** Each symbol is multiplied by the conjugate of the previous
one. This turns a frequency offset into a constant phase. The 25 products are
correlated with the products the SOF word would give. A hit needs the L1
magnitude of the correlation to reach 6/8 of the summed L1 magnitudes of the
products. That test does not depend on the signal level.

**State machine.**

| State  | Behaviour |
| ------ | --------- |
| SEARCH | Tests every symbol. |
| VERIFY | Demands the next SOF exactly one frame later. Two hits in a row lead to LOCK. |
| LOCK   | Keeps counting. Three consecutive missed SOFs drop back to SEARCH. |

The frame geometry is configured, not decoded from the header's PLS code:

- `cfg_slots` is the number of 90-symbol slots;
- `cfg_pilots` says whether pilots are present;
- a 36-symbol pilot block follows every 16 slots.

### Descrambling and pilot extraction

`pl_descrambler` regenerates the DVB-S2 physical-layer Gold sequence for
scrambling code 0. It undoes the rotation by j^R on data and pilot symbols,
restarting after each header.

The second m-sequence branch needs the x sequence 131072 steps ahead. That is
a fixed linear mask, x^(2^17) mod p(x), computed at elaboration by repeated
squaring.

`pilot_demux` copies the pilots, with block first/last flags, to the
estimators. Three instances tap the stream at the three places that need
pilots:

- after descrambling;
- after fine frequency correction;
- after phase correction.

### Carrier frequency: coarse loop and fine estimator

Both use only the pilot blocks.

**Coarse loop (`coarse_cfr`).** A delay-and-multiply detector sums
Im{p(k)·p*(k−1)} over each block. A PI filter turns that into a frequency word
for the down-converter's NCO. The loop therefore corrects before the timing
loop and the matched filter. The loop gain grows with the square of the pilot
amplitude at that point. With the shipped gains and pilots near unit level,
its time constant is a few tens of pilot blocks. The final word can differ
from the true offset by a few times 10^-5 cycles per symbol; the fine
estimator and the pilot phase interpolation absorb the remainder.

**Fine estimator (`fine_cfr`).** This is a feed-forward Luise & Reggiannini
style estimator.

1. Within a block it sums p(k)·p*(k−m) for lags m = 1..8.
2. It averages those sums over blocks (weight 1/4).
3. It takes the argument with a CORDIC.

The argument is the phase advance per symbol times the mean lag. Because
lag m has 36−m products, the weighted mean lag is S1/S0 = 4.33, not 4.5.
Using 4.5 would bias every estimate low by 3.7 %.

The estimate feeds a phase integrator and a table-based rotator applied to
every symbol. The estimator sees pilots before the corrector, so it measures
the whole residual, not an error. It runs at the same time as the coarse loop
and simply tracks what that loop leaves.

### Phase recovery (`phase_est`, `nda_phase_loop`)

**Pilot-aided estimate.** The maximum-likelihood phase of each pilot block is
arg Σ p(k)·(1−j).

Symbols wait in a FIFO (4096 entries) until the next pilot block has been
estimated. The phase for the symbols between two blocks is then interpolated
linearly:

- a 32-cycle sequential divider gives the step: wrapped difference ÷ symbol
  count;
- each symbol is de-rotated as it leaves the FIFO.

Because the difference is wrapped, the phase can keep turning past ±180°, so
a small residual frequency is absorbed too.

Consequences of this look-ahead:

- The output runs up to one pilot period (1476 symbols) behind the input.
- Symbols after the last pilot block of a burst stay in the FIFO until another
  block arrives.
- The first segment after lock gets a constant phase (no earlier estimate).

**Digital AGC (`dagc`).** A data-aided vector tracker. On each pilot it
projects the scaled pilot onto the known pilot direction. It then moves the
gain by 1/8 of the difference to `UNIT`. The gain is frozen on all other
symbols.

**NDA loop (`nda_phase_loop`).** For 16APSK and 32APSK a decision-free loop
follows the AGC.

- **Detector.** It takes θ = arg(y) of each data symbol and forms
  e = wrap(Q·θ − π), with Q = 3 for 16APSK and Q = 4 for 32APSK. With the ring
  offsets used here, every ring maps to a set of angles symmetric about π, so e
  averages to zero at the right phase.
- **Ambiguity.** The 12-point ring repeats every 30°, so the loop can only
  hold a phase within ±15° of the true one. The pilot estimate ahead of it
  guarantees that.
- **Loop gains.** Deliberately low: the detector output is very noisy,
  spanning ±135° per symbol. The loop needs a few tens of thousands of symbols
  to settle.
- **Precision.** The integrator and the phase carry extra fraction bits to
  avoid the shift-rounding drift.
- **Other modulations.** For QPSK and 8PSK the loop holds phase zero.

### Demapper and deinterleaver

**Demapper (`demapper`).** Computes the squared distance from the symbol to
every constellation point, for up to 32 points in parallel. For each bit it
forms the max-log LLR: (min over points whose bit is 1) − (min over points
whose bit is 0), scaled and saturated.

- QPSK and 8PSK use the DVB-S2 bit labels.
- 16APSK (4+12) and 32APSK (4+12+16) use ring radius ratios given as
  parameters: 2.85, and 2.84 / 5.27.
- The APSK labels are a Gray-style numbering (label = gray(point index),
  counting from the outer ring). They are **not** the standard's labels.

**Deinterleaver (`bit_deinterleaver`).** Collects the soft bits of a frame's
data symbols in one of two frame buffers (ping-pong), one symbol word per
cycle. It reads them back in codeword order. Codeword bit c·(N/b)+r sits in
symbol r, bit c. The read address steps by b and restarts at the next column
when it passes N, so no divider is needed. QPSK frames are read in arrival
order.

- Frame length is 64800 or 16200 (`cfg_frame_bits`).
- Reading takes one soft bit per cycle.
- A frame that arrives while both buffers are full sets the sticky `overrun`
  flag.

## Using the top level

Top-level parameters:

| Parameter  | Default | Meaning |
| ---------- | ------- | ------- |
| `ADC_BITS` | 12      | ADC sample width |
| `SPS`      | 4       | samples per symbol after the DDC |
| `ROLLOFF`  | 0.35    | matched-filter roll-off |
| `MAX_BITS` | 64800   | frame buffer size |

Run-time configuration:

- **`cfg_freq`**: the second-stage NCO word. For an IF at f_IF (in units of
  Fs) it is 2·(f_IF − 1/4)·2^32.
- **`cfg_rs_step`**: (Fs/2) / (4·symbol rate), in Q2.16.
- **`cfg_pwr_target`**: the power that the analog AGC word regulates to.
- **`cfg_mod`**: the modulation.
- **`cfg_slots`**: 90-symbol slots per frame, for example:
  - normal frames: 360, 240, 180 and 144 for QPSK, 8PSK, 16APSK and 32APSK;
  - short frames: a quarter of those.
- **`cfg_pilots`**: whether pilots are present. Pilots are required: every
  estimator after frame sync works on pilots.
- **`cfg_frame_bits`**: 64800 or 16200.

Outputs:

- **`llr_valid` / `llr` / `llr_first` / `llr_last`**: the soft-bit stream.
- **Status strobes**: one per loop or estimator update, which makes each
  mechanism observable.
- **`error_flag`**: a FIFO or frame buffer overran.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/dvbs2_pkg.sv \
    tb/tb_dvbs2_rx_top.sv --top tb_dvbs2_rx_top
./obj_dir/Vtb_dvbs2_rx_top
```

Replace the testbench name to run another one.

### End-to-end testbench (`tb_dvbs2_rx_top`)

Runs the top at its default parameters. A transmitter model builds the
signal:

- DVB-S2 PL frames: header with the SOF, pilots, scrambling;
- root-raised-cosine shaping at 8 samples per symbol;
- an IF carrier at 70/208·Fs with a frequency offset of 2·10⁻⁴ cycles per
  symbol;
- quantisation to 12 bits.

It runs nine QPSK short frames, then, after a reset, nine 16APSK short frames.
It compares each received frame's hard decisions with the transmitted
codewords.

It requires, per run:

- at least four error-free frames;
- at least one occurrence of every mechanism: lock, timing updates, coarse
  and fine frequency updates, phase estimates, DAGC and NDA updates,
  resampling, output frames;
- no buffer overrun.

It takes a few seconds.

### Second operating point (`tb_dvbs2_rx_workloads`)

The same transmitter model at roll-off 0.20:

- 30 Mbaud, ADC at 180 MSps (6 samples per symbol);
- resampler step 0.75, so the DDC outputs 120 MSps;
- receiver built with `ROLLOFF = 0.20`;
- 14 short frames of 8PSK, then 14 of 32APSK.

It needs at least four error-free frames per run. The first few 8PSK frames
fail while the coarse loop is still settling, because 8PSK has the smallest
phase margin of the two. Later frames are error-free.

Which frames fail, and why:

- **The last one or two frames of each run** are missing or wrong. No pilot
  block follows them (see phase recovery).
- **The first frame after lock** can also fail. Its phase is held constant
  until the second pilot estimate exists.

The unit testbenches check each block against a model written independently
inside the testbench:

- the floating-point max-log demapper;
- the bit-serial Gold sequence;
- the interleaver definition;
- closed-loop channel models for the coarse frequency and NDA phase loops.

## Limits and departures

**Not built:**

- LDPC and BCH decoding;
- the packet/IP processing behind the decoders;
- the analog front end, and decoding of the PLS code. Modulation and frame
  size are configured, i.e. constant coding and modulation.

**Assumed from the DVB-S2 standard, not specific to this receiver:**

- the frame geometry: SOF word, pilot period;
- the Gold scrambler;
- the QPSK/8PSK labels.

**Chosen freely:**

- the APSK bit labels and the fixed ring ratios. For interoperable APSK, the
  labels must be replaced by the standard's tables;
- all loop gains and filter lengths;
- all widths.

**Known simplifications:**

- **Column twist.** The 8PSK rate-3/5 column twist of the interleaver is not
  applied.
- **Fine CFR timing.** The fine frequency stage is not held back until the
  coarse loop converges.
- **Fixed roll-off.** The matched filter's roll-off is fixed at elaboration.
- **No timing closure.** Nothing has been synthesised for timing, so the
  208 MHz clock rate is unverified. The arithmetic is mostly single-cycle, and
  the demapper evaluates 32 distances in one cycle. Both would need pipelining
  for an FPGA at that rate.
- **Sample rate above one per clock.** The design assumes at most one ADC
  sample per clock. A faster ADC would need a polyphase front end.
