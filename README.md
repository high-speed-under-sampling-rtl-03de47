# Under-sampling frequency meter

This design measures the frequency of a tone up to 2 GHz. It uses three ADCs that
each sample at only 184, 192 or 200 MHz. Each ADC sees the tone folded down
(aliased) into its own 0..f_s/2 band. Every rate folds it differently. Only one
frequency in the band is consistent with all three folded values, and the
hardware searches for it.

The ADCs sample the real signal directly. No I/Q down-converter is needed, and there is
one ADC per rate instead of an I/Q pair. Each channel runs a 2048-point FFT and
takes the strongest bin as its aliased frequency. A small resolver then combines
the three aliased frequencies into one estimate of the analog frequency.

```
            +-----------+    +--------------+    +-------------+
 analog --->| ADC 184MHz|--->| FFT 2048 pt  |--->| peak picker |--f_u1--+
 0..2 GHz   +-----------+    +--------------+    +-------------+        |    +-----------+
       |--->| ADC 192MHz|--->| FFT 2048 pt  |--->| peak picker |--f_u2--+--->| resolver  |--> F
       |    +-----------+    +--------------+    +-------------+        |    +-----------+
       +--->| ADC 200MHz|--->| FFT 2048 pt  |--->| peak picker |--f_u3--+
            +-----------+    +--------------+    +-------------+
             (outside)        fft_r2sdf           peak_picker             freq_resolver
                              \____________________ usfm_top ______________________/
```

## Aliasing as the measurement

A real tone at F, sampled at f_s, appears at

    f_u = |F - k*f_s|   for the integer k that puts it in 0..f_s/2.

Seen the other way round, one measured f_u allows every analog frequency
`k*f_s + f_u` and `k*f_s - f_u` for k = 0, 1, 2, .... These "alias images" lie on a comb. Each
channel has its own comb. The true F lies on all three combs at once. A wrong
image of one channel generally misses the images of the others by several MHz.

Here is the 968 MHz example:

| channel | f_s     | f_u    | images near 968 MHz       |
|---------|---------|--------|---------------------------|
| 0       | 184 MHz | 48 MHz | 5*184 + 48 = 968          |
| 1       | 192 MHz | 8 MHz  | 5*192 + 8  = 968          |
| 2       | 200 MHz | 32 MHz | 5*200 - 32 = 968          |

The frequency most easily confused with 968 MHz at these rates is 600 MHz.
Across the 0..2 GHz band, the three combs never bring two different
frequencies closer than 8 MHz in every channel at once. So the answer stays
unique as long as each measured f_u is off by less than about 2 MHz, a quarter
of that distance. The FFT bins are 90 to 98 kHz wide, which leaves a wide margin.
The rates 184/192/200 MHz were chosen offline to make this minimum distance as
large as possible. The hardware only carries them as parameters (`FS_HZ` in
`usfm_pkg`).

## The resolver (`freq_resolver`)

The resolver is where the aliasing is undone.

1. **Candidates from channel 0.** For k = 0 .. ceil(F_MAX/f_s0) it forms
   `F1 = k*f_s0 + f_u0` and `F1 = k*f_s0 - f_u0`. That is 24 candidates at the
   defaults, one per clock. A candidate outside [0, F_MAX) is discarded.
2. **Bracketing images in every other channel.** For channel i it finds the
   largest multiple `q*f_si` not above F1. It does this with a row of comparators
   against the constant multiples, so no divider is needed. The two images of
   channel i that bracket F1 are then `q*f_si + f_ui` and `(q+1)*f_si - f_ui`.
3. **Spread.** Each way of picking one bracketing image per channel (2^(P-1)
   ways, four at the defaults) gives a set of images `F_i`, with `F_0 = F1`. Its
   spread is `max(F_i) - min(F_i)`, the largest distance between any two of the
   images. The candidate's cost is the smallest spread over these choices. The
   search keeps the candidate with the smallest cost. On a tie it keeps the first
   one found, in the order k = 0, 1, ... with `+f_u0` before `-f_u0`.
4. **Estimate.** The output is the mean of the winning candidate's P images,
   `F = (F_0 + ... + F_{P-1}) / P`. The division by P is a multiply by a wide
   constant reciprocal, and it gives exactly `floor(sum/P)`. `spread_hz` is output
   as well. It is near zero for a clean measurement and grows with the
   measurement error, so it works as a confidence figure.

Timing: `start` is a single-clock pulse. `fu_hz` must stay stable until `done`.
`done` pulses `NCAND + 2` clocks after `start`, which is 26 clocks at the
defaults. `f_hat_hz` and `spread_hz` hold until the next search. A `start`
pulse while `busy` is high is ignored.

The method minimises this largest distance over every choice of image in
every channel. Restricting each channel to the two images that bracket F1 is a
simplification made in this design. Any other image lies further from F1 than
one of those two. At the true frequency every image lies within the measurement
error of F1. The testbench checks random tones with measurement errors of up to
±1.9 MHz per channel, just under the 2 MHz limit.

## The FFT channel (`fft_r2sdf`, `fft_r2sdf_stage`)

Each channel is a streaming radix-2 FFT with single-path delay feedback (R2SDF),
decimation in frequency. It takes one sample per clock, so a channel keeps up with
its ADC without buffering. It has log2(N) = 11 stages. Stage s pairs samples
D = N/2^(s+1) apart:

- In the first D samples of each 2D block, the input goes into a D-deep delay line.
  At the same time the differences left there by the previous block come out,
  multiplied by the twiddle `exp(-j*pi*t/D)`.
- In the next D samples, the stage adds the delayed sample to the incoming one
  and sends the sum on. It stores the difference in the delay line.

Results leave in bit-reversed order. `out_bin` gives each output's natural bin
index, and `out_last` marks the end of a frame. There is no scaling. The data path is
`IN_W + log2(N) + 1` = 26 bits throughout, so it cannot overflow. Twiddles are
18-bit signed with 16 fraction bits. They are computed when the design is
loaded, by an integer sin/cos evaluation (a Taylor series in Q30), so the tables
need no data files. The complex multiply rounds back to 26 bits.

Timing: a frame's outputs are pushed out by the samples of the next frame,
exactly as with an ADC that never stops. The first bin of a frame appears
log2(N) clocks after the frame's last sample (one register per stage), and the
N bins follow at the input rate. The pipeline advances only on `in_valid`, so
strobed input with gaps is fine. With N = 64, random input matches a
double-precision DFT to within about 5 LSB on values up to about 2^19.

## Peak picking (`peak_picker`)

For every bin in 1..N/2, the peak picker forms the power `re^2 + im^2` and keeps a
running maximum. The upper half of the spectrum mirrors the lower half for a real
input. Bin 0 is skipped so that an ADC offset cannot win. One clock after the last
bin of a frame, it reports the bin, its power and

    f_u = round(bin * f_s / N)  Hz

The error is therefore at most half a bin, about 49 kHz at 200 MHz. No
interpolation between bins and no detection threshold are applied. `peak_pow`
is available for a threshold.

## Putting it together (`usfm_top`)

The whole meter runs on one clock. Each channel has a sample strobe
`adc_valid[i]` and data `adc_data[i]` (14-bit signed). A channel sampled at
f_si must therefore deliver f_si/f_clk strobes per clock, so the clock must
be at least 200 MHz at the defaults. The ADCs and the crossing from their clocks
are outside this RTL.

The channels finish frames at different times because their rates differ. The
top keeps the latest result of every channel together with a "fresh" flag. When all
channels are fresh and the resolver is idle, it freezes the set, starts the resolver
and clears the flags. A channel that finishes another frame first simply replaces its
older result. A complete set that arrives while the resolver is busy waits for it.
Per-channel results (`fu_valid`, `fu_hz`, `peak_bin`, `peak_pow`) are brought
out next to the estimate (`f_valid`, `f_hat_hz`, `spread_hz`).

## Frame alignment and pulses (`frame_sync`)

Free-running channels cut frames of different lengths: 2048 samples last 11.13,
10.67 and 10.24 us at 184, 192 and 200 MHz. Their frame boundaries drift apart
by about a microsecond per frame. For a steady tone this does not matter. For a
short pulse, it can mean that one channel's pulse frame is collected together
with another channel's noise-only frame. The estimate made from such a set is
then wrong.

`frame_sync` handles this. A single-clock pulse restarts the framing of every
channel at once:

- the FFTs drop the frames in flight;
- the peak pickers drop their partial search;
- the collector forgets the results it has not yet handed to the resolver.

The next sample of each channel is sample 0 of a new frame. Pulse `frame_sync`
when a pulse begins, for example from a repetition timer. The first estimate
after it is then made from frames that all start with the pulse. Tie it low for
free-running use.

Parameters of `usfm_top` (defaults): `NCH` = 3, `N` = 2048, `IN_W` = 14,
`TWW` = 18, `FW` = 32, `FS` = {200, 192, 184} MHz (channel 0 = 184 MHz),
`FMAX` = 2 GHz. Frequencies are unsigned integers in Hz.

## Accuracy and limits

- Each f_u is within half a bin of the true alias. Noise or leakage from the
  mirror image can move the peak one bin further. The estimate averages three
  such values. In simulation at full size with noisy input, estimates were within
  30 kHz of steady tones. For pulses of 0.5 to 15 us, the first estimate after
  `frame_sync` was within 44 kHz.
- A tone whose alias lands in bin 0 of any channel is missed by that channel.
  This is a tone within about one bin of a multiple of 184, 192 or 200 MHz. The
  estimate for such a tone cannot be trusted.
- Only the strongest tone is measured. Two tones at once are not separated.
- The input is real, with one ADC per rate. Complex (I/Q) sampling is not
  supported.
- Sensitivity to weak or short pulses depends on the analog front end and the
  ADCs, which are not part of this RTL.

## Choices made in this design

These parts of the method are taken as given: the three sampling rates, the
2048-point FFTs, the peak-of-spectrum detection, the 0..2 GHz band, the candidate
search and the final mean.

These are choices made in this design:

- the R2SDF FFT structure, in place of a vendor FFT core;
- the 14-bit sample width and the unscaled 26-bit data path;
- skipping bin 0;
- the single clock with strobes;
- the collect-and-freeze hand-over;
- the `frame_sync` restart;
- limiting the resolver to the two bracketing images per channel;
- the one-candidate-per-clock schedule of the resolver;
- the reciprocal-multiply mean;
- asynchronous active-low reset everywhere.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and
stops on a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/usfm_pkg.sv tb/tb_usfm_full.sv --top-module tb_usfm_full
./obj_dir/Vtb_usfm_full
```

| testbench          | what it runs |
|--------------------|--------------|
| `tb_fft_r2sdf`     | 64-point FFT against a direct DFT, bin order, `out_last`, latency, one output per clock, gapped input, restart by `sync` |
| `tb_peak_picker`   | 32-bin frames: DC and upper-half bins ignored, band edges, ties, result timing, `sync` |
| `tb_freq_resolver` | 968 MHz vs 600 MHz, band edges, 700 random tones with no error, ±1 MHz and ±1.9 MHz error, 26-clock latency, `start` while busy |
| `tb_usfm_top`      | whole meter with 64-point FFTs over many tones and a pulsed tone, plus a 16-point instance whose frames outrun the resolver; checks that every search starts on a new result from every channel; counts syncs, frames, replaced results, rejected candidates and waiting sets |
| `tb_usfm_full`     | whole meter at its defaults: 968 MHz and three more tones with noise, one of them pulsed |
| `tb_usfm_pulses`   | whole meter at its defaults: one pulse per 100 us, widths 0.5 to 15 us, in noise, with `frame_sync` at each pulse; the first estimate of each period must be within one bin |

`tb/adc_model.sv` is a behavioural ADC (not synthesizable). It samples an exact
cosine at its rate, adds uniform noise, and delivers strobes in the meter's
clock domain.

To change the configuration, override the parameters of `usfm_top`:
`FS` and `FMAX` set the rates and the band, `N` the FFT length, and `NCH` the
number of channels. `FS` must then have `NCH` entries, channel 0 first. Choosing a
new set of rates is an offline step. Pick rates whose alias combs keep distinct
frequencies far apart over the whole band, since that distance sets how much
measurement error the resolver tolerates.
