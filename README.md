# DS/CDMA modem for a station-to-mobile link

This is the digital baseband of a point-to-point DS/CDMA modem. It carries
three data streams and a pilot from a ground station to a fast-moving mobile:
- a 512 kbit/s telemetry stream (TLM);
- two 1.024 Mbit/s video streams.

All four channels share one 8.192 Mchip/s complex-spread signal. Each
channel is told apart by its Walsh code. The receiver has to do four things
before any data comes out:
- find the transmitter's PN code phase;
- lock its chip timing to a transmitter clock that drifts (10 ppm);
- remove a carrier frequency offset of several kHz;
- undo a slowly changing channel phase.

Most of the design, and most of what follows, is about those four loops.

The RTL holds both ends:
- `cdma_tx`: the station transmitter;
- `cdma_rx`: the mobile receiver;
- `cdma_modem_top`: both side by side, for loopback testing.

Everything runs from one 32.768 MHz clock, one sample per clock, 4 samples
per chip. Parts outside the FPGA logic are not in the RTL:
- the A/D and D/A converters;
- the Viterbi decoders (external decoder chips);
- the controller CPU.

The receiver ends with 3-bit soft symbols for the Viterbi decoders. The CPU's
registers (thresholds, AGC reference, channel gains) are plain ports.

## Signal format

| Item | Value |
|---|---|
| Chip rate | 8.192 Mchip/s (4 samples/chip at 32.768 MHz) |
| Frame | 8 ms = 65536 chips; interleaver blocks and PN restart align to it |
| Spreading codes | order-17 m-sequences, I: D^17+D^3+1, Q: D^17+D^3+D^2+D+1 |
| Channel codes | 8-chip Walsh rows: 0 pilot, 1 TLM, 2 video 1, 3 video 2 |
| Spread factor | 8 for pilot and video, 16 for TLM |
| FEC | convolutional, K = 7, rate 1/2, generators 171/133 (octal) |
| Interleaver | block, one frame: video 64 x 128 symbols, TLM 64 x 64 |
| Modulation | QPSK: coded bit from 171 on I, from 133 on Q |
| Spreading | complex: s = (d_I + j d_Q)(p_I + j p_Q) |
| Pulse | 48-tap square-root raised cosine, roll-off 0.35 |
| A/D input | 6-bit I and Q |
| D/A output | 12-bit I and Q |

The rates work out exactly. A video bit becomes two coded bits, which make
one QPSK symbol. 1.024 Msymbol/s × SF 8 = 8.192 Mchip/s. TLM gives 512
ksymbol/s × SF 16, the same chip rate. The transmitter therefore asks for one
video bit every 8 chips and one TLM bit every 16 (`*_req` strobes). It takes
the bit in the same cycle.

The PN generators restart at every frame boundary. The 131071-chip
m-sequence is therefore used as a 65536-chip segment that repeats each frame.
This is what lets the receiver know where a frame starts: once it has
acquired the PN phase, its local chip counter is the frame position.

## Transmitter (`cdma_tx`)

Sample 0 of each chip requests source bits. The encoders (`conv_encoder`)
produce the coded pair one clock later. It is written into the interleaver
(`block_interleaver`) at the symbol's position in the frame.

The interleaver has two banks that swap at each frame:
- it writes row by row into one bank;
- it reads column by column from the other.

So a frame's symbols go out during the next frame. The read symbol is held
for its spread factor.

At sample 3 of each chip, `walsh_combiner` forms the chip. It maps each
channel's bits to ±gain, multiplies by the channel's Walsh chip and adds the
four channels. The pilot is the constant symbol (+1, +1). `complex_spreader`
then multiplies by the PN pair.

The spread chip enters a pair of 48-tap `srrc_fir` filters at sample 0,
followed by three zeros (4× upsampling by zero stuffing). The four channels
are added before filtering. By linearity this equals filtering each channel
on its own, with one filter pair instead of four. The chip-exact testbench
finds a 10-clock pipeline offset from the bit request to the filter input.

## Receiver front end

```
adc -> dc_remover -> srrc_fir (matched) -> dagc -> rx_timing -> nco_rotator -> despreaders
```

- **dc_remover**
  - A first-order loop: dc += (x − dc)·2^-5, and the output is x − dc.
  - The estimate keeps 8 fraction bits; the output keeps 2.
  - With K = 2^-5 an offset is gone after a few tens of samples. The
    loop gain trades settling time against residual ripple; 2^-5 and 2^-6
    are both reasonable.
- **srrc_fir**
  - The same 48 taps as the transmitter (centre taps = 256).
  - The transmit and receive filters together give a raised cosine, which
    has no inter-chip interference at the right sampling moment.
- **dagc**
  - A gain loop that holds the mean |I| + |Q| at the output at `agc_ref`.
  - Gain format 8.8; loop gain 2^-6.
  - This keeps every later threshold independent of the received level.

## Timing: interpolating decimator (`rx_timing`)

This block is the receiver's clock. It turns 4 samples per chip into one set
of values per chip:
- on-time, half a chip early and half a chip late samples;
- the local PN chips;
- the chip's position in the frame.

It offers 8 sampling moments per chip. A 9-sample delay line gives the
even moments directly. The odd ones come from the sum of two neighbouring
samples, a linear interpolation.

The on-time moment is a delay index `d` in eighths of a chip, from 4 to 11:
- early uses d + 4;
- late uses d − 4.

Timing moves in two ways:

| Request | Source | Effect |
|---|---|---|
| `fine_adj` + `fine_late` | CTL; searcher once after acquisition | d − 1 (later) or d + 1 (earlier). At the range ends, d jumps by 4 and that chip lasts 6 or 2 clocks instead of 4. |
| `slew_hold` | searcher | the PN generator skips one step: local code one chip later |
| `slew_adv` | searcher | the PN generator takes two steps in one chip: one chip earlier |

A request waits (`busy`) until the next chip strobe and is then applied
there. Requesters wait for `busy` to fall before issuing another.

## Acquisition (`searcher`)

The searcher tests one hypothesis at a time for the local PN phase. Pilot
correlations over 128 chips come from two despreaders half a chip apart
(dual search). Each hypothesis passes through three steps:
1. **Discard.** The first correlation after a slew mixes two hypotheses, so
   it is thrown away.
2. **Detect.** The energy Σ|corr|² over NN = 2 correlations is compared with
   `thr_low`. This is non-coherent combining: the carrier phase does not
   matter. A failure slews one chip (`slew_hold`) to the next hypothesis.
3. **Verify.** NV = 4 more correlations are compared with the much higher
   `thr_high`. A failure is counted in `false_alarms` and the search moves
   on.

The first verified hypothesis wins. If the half-chip-early correlator was
the stronger one, four `fine_adj` steps move the timing there. Then
`acquired` rises, and that enables the CTL and the AFC.

The initial search covers all 65536 phases of a frame, repeating until it
finds one: at worst about 3 s. Loss of lock (`lose_lock` from the CTL) starts
a reacquisition:
1. The searcher advances the PN by REACQ_SPAN/2 = 512 chips with `slew_adv`
   pulses. This puts the last locked phase in the middle of a window.
2. It scans the REACQ_SPAN = 1024-chip window, about 48 ms.
3. If the window runs out, it falls back to the full search.

Choosing the two thresholds is up to the controller. Energy scales with the
square of `agc_ref`. At `agc_ref` = 64 and the testbench's gains, the true
peak measured about 30000 and noise-only hypotheses stayed below 7000. The
end-to-end tests use `thr_low` = 15000, `thr_high` = 36000 and `lock_thr` =
5000.

## Code tracking loop (`ctl`)

This is an early-late gate. Once per 128-chip pilot correlation, it takes
the error as the sign of |late|² − |early|². Energies are used, so the error
does not depend on the carrier phase. A stronger late correlation means the
sampling should move later.

The loop filter has two paths:
- a proportional path of ±2^14;
- an integral path that adds ±2^6 per update and learns the clock drift.

The filter output accumulates, and each time the accumulator passes ±2^16
the decimator steps 1/8 chip. A 10 ppm drift needs one step every 15 updates
or so. The testbench shows the integral settling at the value that gives
this drift's step rate.

The lock detector counts how often the on-time energy beats `lock_thr` in
each block of 32 correlations. Fewer than 16 passes clears `locked` and
pulses `lose_lock`.

## Carrier frequency loop (`afc`, `nco_rotator`)

The on-time chips are de-rotated by the NCO before despreading. The AFC
runs once per 128 chips (64 kHz) on the de-rotated pilot sum S = S_I + jS_Q:

1. **Sector.** The plane is cut into 16 sectors by eight lines through the
   origin:
   - at 0, ±26.6, ±45, ±63.4 and 90 degrees;
   - so the signs of S_Q, S_I ± 2S_Q, S_I ± S_Q, 2S_I ± S_Q and S_I place S
     with no multiplier or arctangent.
   - The sectors are numbered 0 to 15 counter-clockwise from +I. They are
     not equal in size, which only matters as detector gain.
2. **Phase difference.** The difference from the previous sector, mod 16, is
   mapped to {0, 1, 2, 3, 4, 3, 2, 1, 0, −1, −2, −3, −4, −3, −2, −1}.
   - A difference of 8 (half a turn) has no known direction, so it counts 0.
   - Differences near 8 are folded down, so a fast clockwise rotation is not
     mistaken for a fast counter-clockwise one.
   - The usable range is about ±90° per update, ±16 kHz.
3. **Loop filter.** freq += pdd·2^12; phase += freq >> 8. freq = 2^24 means
   one cycle per update.
4. **NCO.** The top 8 bits of the phase address a 256-angle table of
   e^(−jθ). The table is generated from a 65-entry quarter-sine table
   (round(127·sin(πk/128))) in `cdma_pkg`. `nco_rotator` multiplies by it and
   scales back by 2^-7.

**Lock detector.** It watches the signs of I and Q of successive pilot sums:
- Each single sign change is a quarter turn, counted +1 or −1 by its
  direction.
- A change of both signs at once is ambiguous and counts 0.
- The AFC is locked when the net count over 64 updates is within ±2.

Counting net rotation rather than all sign changes is deliberate. This loop
is a frequency lock, not a phase lock, so it leaves the pilot at a fixed but
arbitrary phase. In practice that phase sits on a sector edge, where the
detector hunts back and forth. When that edge is an I or Q axis, raw sign
changes would keep saying "unlocked".

## Data path: despreading, channel phase, soft decisions, deinterleaving

- **despreader**
  - Multiplies by the conjugate PN and the channel's Walsh chip, and sums
    over LEN chips.
  - Dumps at frame positions that are multiples of LEN, so symbols line up
    with the transmitter's.
  - Each symbol carries its index within the frame.
  - The receiver has seven despreaders:
    - three 128-chip pilot correlators (on-time, early, late);
    - one 8-chip pilot symbol for the channel estimator;
    - TLM (16 chips), video 1 and video 2 (8 chips).
- **channel_estimator**
  - The last N = 8 pilot symbols are summed: a moving-average estimate h.
  - Data symbols are delayed by N/2 symbols to sit in the middle of that
    window.
  - The output is d·conj(h)·(1 + j); the (1 + j) removes the known pilot
    phase.
  - Only the phase is corrected; the DAGC already holds the amplitude.
- **qpsk_soft_demod**
  - Turns each part into 3-bit sign-magnitude: a sign bit, then |x| >> MSH
    limited to 3.
  - The width matches a 3-bit soft-decision Viterbi decoder.
- **block_interleaver** in deinterleave mode (`DEINT = 1`)
  - Writes each soft symbol at the position given by its index.
  - Reads in order one frame later.
  - Frames received only partly while acquired are not output. `*_first`
    marks the first symbol of each frame.
  - The symbol index, derived from the local PN position, is what aligns the
    deinterleaver blocks with the transmitter's frames, with no separate
    delay stage.

## Measured behaviour

These are measured in simulation, with a noiseless channel except for 6-bit
quantisation:
- carrier offset of +8 kHz or −5 kHz;
- DC offset;
- 10 ppm timing drift in `tb_cdma_rx`.

- **Acquisition and reacquisition** work. A cut link gives `lose_lock`, then
  reacquisition within the window.
- **AFC** settles to the offset; the CTL follows the drift without losing
  lock.
- **Raw channel symbols** (the hard decision of the soft output, before the
  Viterbi decoder):
  - TLM: essentially error-free (1 error in 16384 symbols at full size);
  - video: about 0.5–0.7% symbol errors.

  The residual comes from the low processing gain at SF 8, together with
  1/8-chip timing quantisation, 7-bit NCO values and a short channel
  estimator. A K = 7 soft-decision Viterbi decoder corrects errors at this
  rate easily, but none is in the loop here. The end-to-end tests therefore
  accept a frame with up to 2% (4% in `tb_cdma_rx`) wrong raw symbols. A
  misaligned or wrongly despread frame shows about 75% (a random 2-bit symbol matches one time in four).
- **Worst-case carrier offset.** The largest offset the link must
  handle is about 11.4 kHz: ±5 kHz oscillator error plus 6.4 kHz Doppler.
  `FOFF_HZ` in `tb_cdma_modem_top` was set to 11400 for one run:
  - everything still worked: acquisition, loss of lock, reacquisition, and
    CTL and AFC lock;
  - raw video symbol errors rose to about 1.4%, and one frame reached 2.1%;
  - the residual frequency costs energy in the 128-chip correlations, and
    the AFC needs about 12 ms to pull in.
- **Two-path fade channel** (`tb_cdma_fade`): a line-of-sight path plus a
  reflection at 0.96 of its amplitude, 3 chips later, whose phase turns at
  200 Hz.
  - The receiver acquires one path and holds CTL and AFC lock without
    losing it. Frames come out aligned.
  - Each path now carries only about half the energy, so the searcher
    thresholds were lowered to 6000/12000 and `lock_thr` to 2500.
  - Raw symbol errors are about 25% on video and 5–6% on TLM. The other
    path is interference at nearly full power, carrying all four channels,
    and despreading suppresses it by only 9 dB at SF 8 (12 dB at SF 16).
  - In a channel like this, video depends entirely on the Viterbi decoder
    and on interleaving. The receiver has no RAKE combining or equalizer;
    it corrects only the phase of the one path it tracks.
- **Not tested:**
  - flat fading (reflection delay under one chip), with its deep fades;
  - offsets beyond 11.4 kHz, up to the ±16 kHz pull-in limit.

## Where this design departs from, or adds to, the modem specification

- **Verification is done in hardware.** In the original system a controller
  CPU reads the correlation peaks, ranks them and applies both thresholds.
  Here the searcher does detection and verification itself. It takes the
  first hypothesis that verifies, not the best of several peaks. This makes
  it weaker against a strong multipath echo. The CPU's registers are ports.
- **Timing step size.** The tracking loop steps 1/8 chip, the
  interpolator's resolution. The original description mentions 1/4-chip
  slews.
- **CTL error.** The error is the sign of the early/late energy difference,
  not its value.
- **Frame alignment** uses the PN restart and the symbol index (see above).
  The choice of a PN restart per frame is this design's.
- **Channels** are combined before one filter pair in the transmitter.
- **Sizes not given by the specification are this design's choices:**
  - Walsh row assignment;
  - interleaver shape 64 rows;
  - N_c = 128, NN = 2, NV = 4;
  - reacquisition window 1024;
  - CE length N = 8;
  - all loop gains and word widths.
- **Soft decisions.** The specification is inconsistent here: 3-bit soft
  decisions for the hardware decoder, hard decisions in its software model.
  3-bit soft output was built.
- **Not in the RTL:**
  - the Viterbi decoders;
  - the CPU;
  - the A/D, D/A, oscillator, configuration memory and FPGA PLLs.

## Files

| File | Contents |
|---|---|
| `rtl/cdma_pkg.sv` | SRRC taps, quarter-sine table, Walsh and sin/cos functions |
| `rtl/cdma_modem_top.sv` | transmitter and receiver side by side |
| `rtl/cdma_tx.sv`, `rtl/cdma_rx.sv` | the two ends |
| `rtl/pn_gen.sv` `walsh_gen.sv` `conv_encoder.sv` `block_interleaver.sv` `walsh_combiner.sv` `complex_spreader.sv` `srrc_fir.sv` | transmit blocks (the interleaver, FIR and PN generator are also used by the receiver; `walsh_gen` serves the despreaders, while the combiner uses the same formula from the package) |
| `rtl/dc_remover.sv` `dagc.sv` `rx_timing.sv` `searcher.sv` `ctl.sv` `afc.sv` `nco_rotator.sv` `despreader.sv` `channel_estimator.sv` `qpsk_soft_demod.sv` | receive blocks |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_cdma_modem_top.sv` | end-to-end loopback: 4096-chip frames, link cut and reacquisition |
| `tb/tb_cdma_modem_full.sv` | the same at full size (all defaults) |
| `tb/tb_cdma_rx.sv` | receiver tracking a 10 ppm drift and −5 kHz offset |
| `tb/tb_cdma_fade.sv` | receiver through the two-path fade channel |

Every module opens with a comment on its interface and timing. Each
parameter's default is the full-size value. The testbenches shrink frames
through `FRAME_CHIPS`, `ILV_ROWS` and `REACQ_SPAN`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/cdma_pkg.sv tb/tb_cdma_modem_top.sv \
          --top-module tb_cdma_modem_top -Mdir obj && ./obj/Vtb_cdma_modem_top
```

Any other testbench is run the same way. Each one prints
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog. The
full-size loopback runs in about 6 seconds, the reduced one in about 1.5.
The loopback testbenches print a trace every 20000 clocks, with the searcher
state, last energy and loop status, which helps when tuning thresholds.
