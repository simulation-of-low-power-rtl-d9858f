# QPSK software-defined radio for an intersatellite link

This is a complete digital QPSK modem for a low-power satellite-to-satellite link, written in
synthesizable SystemVerilog. The transmitter turns a stream of framed text messages into a real
intermediate-frequency (IF) sample stream for a D/A converter. The receiver takes real IF samples
from an A/D converter and brings back the text. It finds gain, carrier frequency, carrier phase,
symbol timing and frame position on its own, all from the signal. Everything outside the digital
domain stays outside the RTL: the RF chain, the power amplifier, the LNA and the converters. Their
digital sides are the top-level ports `dac_out` and `adc_in`.

```
 transmitter (sdr_transmitter)
   bit_generator -> scrambler -> qpsk_modulator -> RRC filter (2 sps) -> digital_up_converter -> dac_out
                                                                          (x4 interpolation, NCO mixer)
 receiver (sdr_receiver)
   adc_in -> digital_down_converter -> agc -> RRC filter -> coarse_freq_comp -> symbol_synchronizer
          -> carrier_synchronizer -> preamble_detector -> frame_synchronizer -> data_decoder
          -> characters + bit error count
```

`sdr_top` holds both chains side by side. They share the clock and reset and nothing else, so the
receiver can be fed from any source.

## Numbers at a glance

| quantity | value |
|---|---|
| symbol rate | 50 ksymbol/s (one symbol per 8 DAC ticks) |
| filter rate | 2 samples per symbol (100 ksample/s) |
| DAC / ADC rate | 8 samples per symbol (400 ksample/s), set by `dac_tick` / `adc_valid` |
| IF | run-time input `*_lo_freq`, 32-bit word in units of f_sample / 2^32; the tests use f_sample/4 |
| sample format | 16-bit two's complement per component, full scale ±32767 |
| QPSK amplitude | ±8192 per component (a quarter of full scale) |
| pulse shaping | root raised cosine, roll-off 0.5, 21 taps (10 symbols) |
| frame | 2126 bits = 1063 symbols |

The clock has no fixed relation to the sample rate. Each stage moves one sample for each strobe
and has no back-pressure. The only requirement is that strobes are no closer than one clock apart.
At 8 DAC ticks per symbol, a 50 ksymbol/s link therefore needs a clock of at least 400 kHz.

## Frame format

A frame starts with a 26-bit header, followed by 20 text messages.

- **Header.** The header is the 13-bit Barker code with every bit sent twice. Each bit pair becomes
  one QPSK symbol, so the header is 13 symbols, each on the ±(1+j) diagonal.
- **Messages.** Each message is `Hello world ###`, where `###` runs 000, 001, ..., 099 and then
  wraps. The number carries on from frame to frame.
- **Characters.** Each character is 7-bit ASCII, most significant bit first.
- **Scrambling.** The payload goes through a self-synchronising scrambler, 1 + z^-1 + z^-2 + z^-4.
  The scrambler is cleared at the start of each frame's payload. The header is not scrambled.

The package `sdr_pkg` holds the format constants, the `msg_char()` function that gives the expected
text, and all filter and CORDIC tables. Each table carries the formula it was computed from.

## Transmitter

- **Bits.** `bit_generator` produces one bit for each request.
- **Symbols.** `qpsk_modulator` pairs the bits into Gray-coded, π/4-offset symbols. The first bit
  of a pair sets the sign of Q and the second sets the sign of I; a `1` means negative.
- **Pulse shaping.** The root-raised-cosine filter (`fir_filter` with `RRC_COEF`) runs at 2 samples
  per symbol: one symbol, then one zero.
- **Up-conversion.** `digital_up_converter` zero-stuffs by 4 and filters with a 33-tap
  Hamming-windowed low-pass at gain 4. It then mixes to the IF as `I·cos − Q·sin`, using an NCO
  built from a 32-bit phase accumulator and a 16-stage CORDIC rotator.

Within one symbol the work is scheduled on fixed ticks (see `sdr_transmitter.sv`). So the
transmitter's output rate is exactly `dac_tick`.

## Receiver: the synchronisation chain

The receiver is the hard part. Each stage strips one unknown off the signal.

1. **Down-conversion** (`digital_down_converter`) computes `x·cos` and `−x·sin` with its own NCO.
   It applies the same 33-tap low-pass filter at gain 2 and keeps every fourth sample. That leaves
   2 samples per symbol.

2. **AGC** (`agc`) multiplies by a Q4.12 gain. The gain comes from an integrator that drives the
   mean of |I|+|Q| at its output towards `REF`. `REF` is that mean for a clean transmit-filter
   output at the nominal amplitude. The loop step is 2^-`MU_SHIFT`. The AGC sits in front of the
   receive filter, so it sees the signal at 2 samples per symbol.

3. **Receive filter.** This is the matched root-raised-cosine filter. Together with the transmit
   filter it forms a raised-cosine (Nyquist) pulse.

4. **Coarse frequency compensation** (`coarse_freq_comp`) works as follows:
   - It raises each sample to the 4th power, which removes the QPSK modulation.
   - It correlates each result with the previous one over a block of 256 samples.
   - A CORDIC in vectoring mode gives the angle. A quarter of that angle is the offset per sample.
   - Successive block estimates are averaged with weight 1/8.
   - The input is rotated by a phase accumulator stepping at minus the average.

   The estimate is open loop: it is measured on the uncorrected input. It is unambiguous below 1/8
   of the 2-sample-per-symbol rate, which is 12.5 kHz at 100 ksample/s.

5. **Symbol timing** (`symbol_synchronizer`) uses a Gardner timing error detector in a
   proportional-integral (PI) loop.
   - **Interpolation.** A piecewise-parabolic Farrow interpolator (α = ½) over four samples places
     interpolants every `1 + v` input samples. Symbol strobes alternate with mid points.
   - **Error.** At each symbol, e = Re{(y[k] − y[k−1])·conj(y[k−½])}.
   - **Loop filter.** The integrator adds up the full error. Only its output is shifted, by
     `KI_SHIFT`. Shifting the input instead would floor small errors and bias the lock point.
   - **Skip and stuff.** When the interpolation point crosses a whole input sample, one input gives
     no interpolant (`skip`) or two (`stuff`). In this way a transmit clock that is fast or slow
     never loses or repeats a symbol.
   - **Why parabolic.** A linear interpolator was not accurate enough at 2 samples per symbol. It
     left a timing bias large enough to hurt the carrier loop.

6. **Carrier recovery** (`carrier_synchronizer`) is a second-order PLL.
   - **DDS.** A phase accumulator drives a CORDIC rotator that derotates each symbol.
   - **Phase detector.** e = sign(I)·Q − sign(Q)·I, which has a stable point at each of the four
     QPSK phases.
   - **Loop filter.** A PI filter updates the phase: θ += e·KP + integ, and integ += (e·KI) >> 8.
   - **Gains.** KP and KI come from the standard second-order design with damping 1 and normalised
     loop bandwidth 0.01, for symbols at amplitude 8192. The detector gain is taken near lock.

   The loop removes the residual frequency left by step 4, and the phase. It leaves a quarter-turn
   ambiguity.

7. **Preamble detection** (`preamble_detector`) correlates the last 13 symbols with the header
   pattern s_k(1+j). It raises `det` when |c|² reaches `THRESHOLD`, the square of 75 % of the
   correlation magnitude for a clean, undistorted header. The metric uses the magnitude, so it works whatever the quarter-turn
   ambiguity is.

8. **Frame synchronisation** (`frame_synchronizer`) delays the symbols by 13. A detection then
   lines up with the first header symbol. The block streams the frame out with an index
   (0..1062) and pulses `frame_valid` on the last symbol. Frames are not buffered.
   - **Locking.** A detection at the expected position (re)locks.
   - **While locked.** Detections in the middle of a frame are ignored. This stops a chance
     correlation in the payload from breaking a good lock.
   - **Losing lock.** A missing header drops the lock. While unlocked, any detection starts a new
     frame.

9. **Data decoding** (`data_decoder`) works through the frame as follows:
   - It correlates the 13 header symbols with the known pattern. The quadrant of the result gives
     the ambiguity `rot` in quarter turns.
   - It derotates the payload by (−j)^rot.
   - It makes hard decisions and descrambles.
   - It packs the bits into 7-bit characters.
   - It compares the 12 fixed characters `Hello world ` of every message with the known text,
     which is 84 bits per message. Errors are added to `bit_errors`/`bits_checked` only when the
     frame completes with `frame_valid`.

   The three digits are not counted, because the receiver cannot know which message number a frame
   starts with. They are still output as characters.

All stages are one sample per strobe with a latency of one or two clocks. The detailed timing of
each is in the comment at the top of its file.

## Interfaces of `sdr_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `dac_tick` | in | one transmit sample per tick |
| `tx_lo_freq`, `tx_lo_phase` | in | transmit IF: 2^-32 and 2^-16 turn units |
| `dac_out`, `dac_valid` | out | real IF sample for the D/A converter |
| `tx_sym`, `tx_sym_valid`, `tx_frame_start` | out | transmitted symbols, first of frame |
| `adc_valid`, `adc_in` | in | real IF sample from the A/D converter |
| `rx_lo_freq`, `rx_lo_phase` | in | receive IF |
| `rx_char`, `rx_char_valid` | out | decoded characters |
| `rx_bit_errors`, `rx_bits_checked`, `rx_frames` | out | error counters |
| `rx_rot`, `rx_rot_valid`, `rx_locked`, `rx_preamble_det` | out | frame and ambiguity status |
| `rx_agc_gain`, `rx_coarse_freq`, `rx_timing_skip`, `rx_timing_stuff`, `rx_sym`, `rx_sym_valid` | out | synchroniser observation |

The top has no parameters. Loop gains and thresholds are parameters of the individual modules.

## Where this design departs from its source description, or fills gaps

The architecture follows a published description of a MATLAB/Simulink QPSK SDR:

- digital up- and down-converters around a baseband processor;
- a transmitter of bit generation, QPSK and a square-root filter;
- a receiver of AGC, filter, coarse frequency compensation, Gardner symbol synchroniser, PLL
  carrier synchroniser with DDS, Barker preamble detector, frame synchroniser and data decoding;
- 50 ksymbol/s at 100 ksample/s, roll-off 0.5, damping 1 and loop bandwidth 0.01.

That description names the following functions but gives no circuits or numbers for them. Their
details here are this design's own:

- **Channel coding.** The description mentions LDPC coding with a min-sum decoder but gives no
  code, matrix or decoder structure. There is no channel coder here. Frames carry uncoded,
  scrambled text.
- **Converter rate.** The interpolation and decimation factor of 4 and the IF are this design's
  choice. The IF is a run-time input.
- **Fixed point.** All word widths, the QPSK amplitude and the filter lengths are this design's.
- **Filter type.** The filters are a root-raised-cosine pair. The source text speaks of
  raised-cosine filters, while its block diagrams say "square root".
- **Text and scrambler.** The scrambler polynomial and reset, the 7-bit characters and their bit
  order are chosen here.
- **Estimators and loops.** These are chosen here:
  - the AGC detector and loop;
  - the form of the coarse estimator, its block length and its averaging;
  - the Farrow interpolator and the timing-loop gains;
  - the carrier phase detector;
  - the detection threshold;
  - the frame-lock rule;
  - the header-based ambiguity resolution.
- **Timing-loop gains.** The source suggests gain and bandwidth defaults of 1 for the timing loop,
  which cannot be a stable normalised bandwidth. The gains here were found by simulation.
- **BER counting.** The bit error count covers only the fixed text, as explained above.
- **Channel.** The channel (noise, offsets, delay) is not hardware. It appears only as a model
  inside the end-to-end testbench.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. Some examples:

| testbench | what it checks |
|---|---|
| `tb_bit_generator` | every bit of several frames against the format |
| `tb_scrambler` | a scrambler/descrambler round trip and the polynomial, against a reference model |
| `tb_fir_filter` | the impulse response |
| `tb_nco` | cos/sin against real-valued references |
| `tb_digital_up_converter` | constant baseband values mixed up, against I·cos − Q·sin |
| `tb_digital_down_converter` | an IF tone mixed down to the expected complex value |
| `tb_agc` | convergence of gain and output level at two input levels |
| `tb_coarse_freq_comp` | the estimate and the remaining rotation for several offsets of both signs |
| `tb_symbol_synchronizer` | lock and eye opening with a clock 0.3 % fast and slow, including a skip and a stuff |
| `tb_carrier_synchronizer` | phase and frequency lock |
| `tb_preamble_detector`, `tb_frame_synchronizer`, `tb_data_decoder` | header detection, lock rules, ambiguity and error counting |

`tb_sdr_top` runs the whole radio at its default parameters over several frames.

- **Loopback.** It loops the DAC output back to the ADC input through a delay, a gain of ½ and
  noise.
- **Offsets.** The receive LO is about 1 kHz off the transmit LO. Two runs use receive phases a
  quarter turn apart, so the ambiguity resolution sees both a zero and a non-zero rotation.
- **Timing drift.** A third run samples the transmitter's output with an A/D clock 0.2 % slower
  than the DAC clock. The channel model does this with a 16-tap windowed-sinc interpolator. The
  symbol synchroniser must then stuff about one symbol in 500. The test checks that it stuffed at
  least 10 times, and that the text still decodes.
- **Checks.** Every message after the first frame must decode exactly, with zero bit errors in the
  counted text.
- **Mechanisms.** It also counts each mechanism and fails if one never happened: AGC movement,
  coarse estimate, detection, lock, a timing skip or stuff, and a non-zero rotation.

It finishes in well under a second.

To simulate with Verilator 5, for example the whole radio:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
    rtl/sdr_pkg.sv tb/tb_sdr_top.sv --top-module tb_sdr_top
./obj_dir/Vtb_sdr_top
```

Any other block works the same way: replace the testbench file and the top-module name. The `-y rtl`
option lets Verilator find the submodules.

## Limits

- **Frequency offset.** The coarse estimator can be aliased by offsets beyond ±12.5 kHz at
  100 ksample/s.
- **Timing loop.** The timing loop was tested for clock differences of 0.2 % (whole radio) and 0.3 %
  (synchroniser alone, both signs).
- **Noise.** Noise performance (BER against Eb/N0) has not been characterised. The testbenches
  use light noise.
- **First frame.** The first frame after reset can have bit errors while the loops settle.
- **Verification depth.** The testbenches check the function of each block and the radio end to
  end. They are not an exhaustive verification.
