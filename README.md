# Frequency-domain auto-tune

This design corrects the pitch of a voice or instrument in the frequency domain.
Audio is cut into frames of 2048 samples. Each frame is Hann-windowed and transformed
with an FFT. The strongest bin in the vocal range is taken as the pitch and snapped to
the nearest note of the equal-tempered scale. A pure sine tone at that note is then
played back, with optional harmony, octave-up and octave-down effects. The same
spectra are written into a 512 × 512 memory and drawn on a 1024 × 768 VGA screen as
a scrolling spectrogram.

Commercial pitch correction usually works in the time domain (pitch-synchronous
overlap-add). This design takes the other route. It spends memory and an FFT core,
and in return it is simple: pitch detection is a comparison over a stream of
magnitudes, and resynthesis is a phase accumulator.

The RTL here covers everything except two vendor parts: the FFT core and the on-chip
ADC. Their ports are ports of the top module, `autotune_top`. The testbenches replace
the FFT core with a behavioural DFT model (`tb/fft_core_model.sv`).

## Signal path and rates

```
 ADC 12 bit, 1 Msps ──► oversampler 64x ─┐                        ┌─► peak_detector ─► note_lut ─► fcw
                                        ├─► frame RAM ─► bram_2_fft ─► FFT core ─► fft_magnitude ─┤           │
 test tone (sine_generator) ─► 16x ─────┘   2048 x 16    Hann window   (external)    |X|, 24 bit  │     resynthesis ─► playback (PWM)
                                                                                                  └─► stft_bram ◄─ spectrogram ◄─ xvga
```

| quantity | microphone path | test-tone path |
|---|---|---|
| input trigger | 1 MHz (ADC) | every 400 clocks (260 kHz at 104 MHz) |
| oversampling | 64× | 16× |
| audio rate *fs* | 15 625 Hz | 16 250 Hz |
| sample width after averaging | 15 bits (stored as 16 with a leading 0) | same |
| frame | 2048 samples = 131 ms | 2048 samples = 126 ms |
| FFT bin width | 7.63 Hz | 7.93 Hz |

The audio rate *fs* also paces the output tone. Each oversampled input sample yields
one output sample, so a frame in becomes a frame of output, and a note lasts as long
at the output as at the input. The pitch can change only once per frame, about every
130 ms. Faster note changes within a frame are not followed.

## Frame construction (`oversampler`, `stft_fsm`, `bram_sdp`)

The **oversampler** adds 2^k input samples and keeps the top 15 bits of the sum. With
k = 6 that is sum/8: the average, with the three extra bits of resolution that
64× averaging buys. With k = 4 it is sum/2, so both paths have the same scale.
`done_osample` pulses once per group, and the result is held for the whole next group.

**stft_fsm** uses the selected source's `done_osample` to write the frame RAM, but
only two source triggers later. This two-trigger delay mirrors the source design, whose
oversampler produced unusable data for its first two triggers. Because `osample` is
held, the delayed write still stores the right value.

`sample_counter` (11 bits) addresses the writes. When address 2047 is written,
`frame_done` pulses for one clock and starts `bram_2_fft`. Streaming a frame out takes
2051 clocks, and refilling the RAM takes 13 million, so the next frame can overwrite
address 0 as soon as reading has begun.

If the source switch moves in the middle of a frame, that frame holds samples from
both sources. Nothing resynchronises the frame to the switch.

## Windowing and the FFT interface (`bram_2_fft`, `hann_rom`, `fft_magnitude`)

**bram_2_fft** reads the frame RAM and the Hann table (`w[n] = 0.5(1 − cos 2πn/N)`,
unsigned Q0.16, computed at elaboration) at the same address. It multiplies the two
and sends `(sample × w) >> 16` as the real part of a 32-bit AXI-Stream word. The
imaginary part, bits 31:16, is zero. `frame_tlast` marks sample 2047.

The two-stage pipeline advances only when its output register is empty or the FFT
accepts the word. Backpressure from the core therefore stalls it without losing or
repeating a sample; an assertion checks that a waiting word stays stable. Without
backpressure, a frame leaves in 2048 clocks, 3 clocks after `start`.

The **FFT core** this is built for is a 2048-point forward transform with pipelined
streaming I/O, natural-order output and 16-bit real and imaginary parts. It is
configured once with the word `0x01` (forward), on `s_axis_config_*`.

**fft_magnitude** slices each output word into real and imaginary parts, squares
them, adds the squares and takes an exact integer square root (16 restoring steps).
This is an 18-stage pipeline that accepts one bin per clock and never stalls. `tvalid`
and `tlast` are carried along the same pipeline. The 16-bit root is zero-extended to
the 24-bit magnitude word the peak detector takes.

## Picking the pitch: the eight-rule peak detector (`peak_detector`)

This is the part of the design that needs the most care. The FFT of a real voice, and
even of a clean test tone after averaging and windowing, shows spurious peaks. The
strongest bin also tends to jump between neighbours from frame to frame. The detector
therefore does not take a plain maximum. It applies a set of thresholds that favour a
peak which is large, has large neighbours, and is consistent with the previous window.

Magnitudes stream in one per clock. When bin *b* arrives it is `current_val`. Two
registers hold bin *b−1* (`prev_val1`, the candidate) and bin *b−2* (`prev_val2`).
`current_sum = prev_val2 + current_val` is the sum of the candidate's two neighbours.
The candidate becomes the window's best bin when all eight rules hold:

| # | rule | purpose |
|---|---|---|
| 1 | *b−1* > 10 | skip DC and the lowest bins (< 76 Hz) |
| 2 | *b−1* < 141 | nothing above ~C6 |
| 3 | `prev_val1` > `highest_val` − 5000 | close to or above the best so far this window |
| 4 | `prev_val1` > `prev_highest_val` − 2000 | close to or above the previous window's best |
| 5 | `prev_val1` > 15000 | absolute floor against noise |
| 6 | `current_sum` > 30 | neighbours not empty |
| 7 | `current_sum` > `highest_sum` | broader than the best so far |
| 8 | `current_sum` > `prev_highest_sum` − 5 | about as broad as the previous window's best |

On a match, `highest_val ← prev_val1`, `highest_sum ← current_sum` and the window's
best bin becomes *b−1*. After bin 2047 the window closes:

- `prev_highest_val` and `prev_highest_sum` take the window's highest values. These are
  zero if nothing matched.
- `highest_*`, `prev_val1` and `prev_val2` are cleared.
- If the window found a bin, it becomes `best_index`. Otherwise the previous note is
  kept.

`window_done` and `peak_found` pulse when the window closes, and `fcw` is valid one
clock later. Subtractions are compared as additions on the other side, so nothing
wraps below zero.

Things to know before reusing it:

- **The thresholds are absolute.** They were tuned against the magnitude scale of the
  original FFT core and square-root stage. With a different core scaling, adjust
  `MIN_VAL`, `VAL_MARGIN` and the others, which are parameters. The testbench FFT model
  divides the DFT by 256. With that scaling, a 1500-LSB tone on the 12-bit ADC gives
  peaks of about 20 000.
- **Rule 7 leans to the lower neighbour.** Take a clean tone whose energy is centred
  on one bin. Its lower neighbour is tested first, and that neighbour's "neighbour sum"
  already contains the peak. The true peak then only ties on rule 7 and loses. The
  detector therefore often reports bin *p−1*. Since neighbouring bins usually map to
  the same note, this rarely changes the output, but it does shift the boundaries
  between notes by about half a bin.
- **Rule 4 can hold a loud note.** A much quieter note right after a loud one is
  rejected for one window. After that window, the previous-window values are zero and
  the new note is accepted.
- The best bin is published once per window rather than every time the running best
  changes. As a result, the tone only changes at frame boundaries.

## From bin to note (`note_lut`)

The 9-bit bin number indexes two 512-entry tables of 32-bit frequency control words,
`fcw = round(2³² · f_note / fs)`. One table uses *fs* = 15 625 Hz and the other
16 250 Hz, selected by `is_sine`. Both tables are computed at elaboration:

1. The bin frequency is *b* × 15 625 / 2048 Hz, i.e. 7.63 Hz per bin.
2. The nearest equal-tempered note (A4 = 440 Hz, nearest in Hz) is chosen.
3. The note is clamped to B2 … C6: bins 0–16 give B2, and bins from 134 up give C6.

Both tables use the microphone bin width. The test-tone path actually has 7.93 Hz
bins, so a test tone is read about 4 % flat: a 277.7 Hz tone, exactly on bin 35,
comes out as C4 (261.6 Hz). This follows the source design, which built its two
columns from the same bin-to-note mapping.

## Tone output and effects (`sine_generator`, `resynthesis`, `playback`)

**sine_generator** is a 32-bit phase accumulator. It steps by `phase_incr` on each
audio sample, and its top 9 bits index a 512 × 12-bit table holding
`round(2047.5 + 2047.5 sin(2πk/512))`, i.e. values 0 … 4095. The output frequency is
`phase_incr · f_step / 2³²`.

**resynthesis** runs two such generators, both stepping on the audio strobe. The
effect input (`effect_sw`, switches 2:1) selects:

| code | effect | main generator step | output |
|---|---|---|---|
| 0 | none | fcw | main |
| 1 | major-third harmony | fcw | (main + third) / 2, third at fcw + fcw/4 |
| 2 | "chipmunk", octave up | 2·fcw | main |
| 3 | "Darth Vader", octave down | fcw/2 | main |

**playback** turns the 12-bit sample into PWM with a 4096-clock period. It captures
the sample at each period start and outputs a duty cycle of sample/4096. A board
low-pass filter then drives the speaker.

The same `sine_generator` also produces the test tone. It steps on the test-tone
trigger with `phase_incr = test_fcw`, so the tone frequency is `test_fcw × 260 kHz / 2³²`
at the default divider.

## Spectrogram (`stft_bram`, `spectrogram`, `xvga`)

**stft_bram** stores the first 512 bins of every window as 16-bit words, the low
16 bits of the magnitude. Window *w* goes to column *w* mod 512, at addresses
`col·512 + bin`. After 512 windows it overwrites the oldest column, so the picture
updates in place, left to right.

**spectrogram** places the image at (`x_in`, `y_in`), by default (256, 128). For
column *c* = `hcount − x_in` and row *r* = `vcount − y_in` it requests
`(c + 1)·512 − (r + 1)`, which puts bin 0 at the bottom. The colour is the word's low
12 bits split as red 11:8, green 7:4 and blue 3:0. Outside the image the pixel is black.

The path from `hcount`/`vcount` to pixel is three clocks long: address register,
memory read, colour register. Sync and blank are delayed by the same amount, and the
top adds one more output register for all of them.

The source design added `hcount − 270` to the address to hide a misalignment in its
own display pipeline. That term is available here as `SKEW_FIX = 1` (with
`SKEW_OFFSET = 270`), but it is off by default because this pipeline is aligned.

**xvga** produces standard 1024 × 768 @ 60 Hz timing: 1344 × 806 total, negative
syncs. It counts on every clock, so on hardware the design clock must be the 65 MHz
pixel clock, or the VGA part must be moved to its own clock domain. Everything in
this design runs on one clock.

## Top-level interface (`autotune_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `is_sine` | in | 1 | 1 = on-chip test tone through 16×, 0 = microphone through 64× |
| `effect_sw` | in | 2 | effect, see table above |
| `test_fcw` | in | 32 | test-tone phase step per test-tone trigger |
| `adc_trig`, `adc_data` | in | 1, 12 | ADC sample strobe (1 Msps) and sample |
| `s_axis_config_*` | out/in | 8 | FFT configuration (constant 1) |
| `s_axis_data_*` | out/in | 32 | windowed frame to the FFT core |
| `m_axis_data_*` | in/out | 32 | FFT output (imaginary 31:16, real 15:0); `tready` is always 1 |
| `audio_pwm`, `audio_sample` | out | 1, 12 | speaker PWM and the sample behind it |
| `fcw`, `best_index` | out | 32, 11 | current note and its bin |
| `frame_done`, `window_done`, `peak_found`, `audio_strobe` | out | 1 | status pulses |
| `vga_r/g/b`, `vga_hs`, `vga_vs` | out | 4, 1 | VGA |

Parameters: `SINE_TRIG_DIV` (400), `SPEC_WINDOWS` (512), `SPEC_X` (256) and `SPEC_Y` (128).

## Where this RTL departs from, or fills in, the source design

- **Vendor cores replaced by plain RTL.** The square-root CORDIC, the multipliers and
  the AXI register slice behind the FFT are replaced by one fixed pipeline
  (`fft_magnitude`). The FFT core and the ADC themselves are not included.
- **Display skew correction.** The `hcount − 270` address correction is off by default
  (see above).
- **Tone step rate.** The tone generators step once per audio sample rather than every
  clock. This is what makes the output run at the audio rates the source states.
- **Single-clock pulses.** `frame_done` is one clock long. The peak detector publishes
  once per window, and it clears `highest_sum` at window end together with
  `highest_val`.
- **Choices where the source is silent:**
  - the Hann coefficient format;
  - the harmony mix, which averages the two tones;
  - the PWM playback;
  - the VGA timing constants;
  - the test-tone divider (104 MHz / (16 × 16.25 kHz) = 400);
  - the image position;
  - the use of the low 16 magnitude bits in the spectrogram;
  - reset behaviour, which clears counters and phases but not memory contents.
- **Not built.** The source tried, and abandoned, an FIR anti-alias filter after the
  oversampler. It is not part of this design. Neither are the debug displays
  (seven-segment digits, logic analyser).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_oversampler` | 64× and 16× averages against a running sum; one output per 64/16 triggers |
| `tb_bram_sdp` | write/read of all 2048 words, hold while `re` is low, read-during-write |
| `tb_hann_rom` | all 2048 coefficients against sin²(πn/N), symmetry, end points |
| `tb_bram_2_fft` | windowed values, order, `tlast`, N + 3 clocks per frame, random backpressure |
| `tb_fft_magnitude` | exact integer root for random and extreme inputs, 18-clock latency, `tlast` |
| `tb_stft_fsm` | 64-sample frames through both source paths, loop-back "FFT", frame period, config word |
| `tb_note_lut` | all 1024 entries against an independent log-based note search |
| `tb_peak_detector` | eight hand-built windows exercising the range, threshold, neighbour-sum and keep-previous rules |
| `tb_sine_generator`, `tb_resynthesis` | samples against the sine formula for all four effects |
| `tb_stft_bram` | column layout, bin cut-off, wrap-around (reduced size) |
| `tb_spectrogram` | address formula, colour, black border, 3-clock sync delay |
| `tb_xvga`, `tb_playback` | full-frame timing; PWM duty cycle |
| `tb_autotune_top` | whole system, see below |
| `tb_autotune_full` | whole system at default parameters |
| `tb_sweep` | a rising and falling tone sweep, like the one the spectrogram was shown with |

**tb_autotune_top** runs the full-size datapath (2048-point frames, real oversampling
ratios, 512-bin columns, full VGA frame) with two reductions: a 4-clock test-tone
trigger and a 4-column spectrogram. The ADC triggers every second clock. The run:

1. A 440 Hz microphone tone must give fcw = A4 at 15.625 kHz.
2. The output frequency is measured by zero crossings for each of the four effects.
3. Silence must keep the note.
4. A test tone through the 16× path must give C4 at 16.25 kHz.
5. Every displayed pixel is compared with the memory word it maps to.

The run also counts each mechanism: both paths, FFT input stalls (the model drops
`tready` at random), found and kept windows, each effect, and spectrogram wrap. A
mechanism that never occurred counts as a failure. The run takes a few seconds.

**tb_sweep** glides the microphone tone from 300 Hz to 600 Hz over eight frames and
back over eight more. For every window, the strongest stored spectrogram bin must be
within 3 bins of the sweep frequency at mid-frame. Every accepted detector result must
meet the same bound. The detected note must rise and then fall. In this run the
detector keeps the previous note in about one window in four, because rules 3, 4 and 8
hold it back. That is the intended trade-off of those rules: a stable note at the cost
of following fast glides.

**tb_autotune_full** uses the top's defaults and ADC triggers every 100 clocks, so
one frame takes 13.1 million clocks. It checks the note of two consecutive windows,
the exact frame period and the output tone frequency. It runs in about 20 seconds.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/autotune_pkg.sv tb/tb_autotune_top.sv --top-module tb_autotune_top
./obj_dir/Vtb_autotune_top
```

Variables that are read are reset, because Verilator has only two-state values.

## Files

`rtl/` holds one module per file plus `autotune_pkg.sv`, which has the shared widths,
sample rates and the effect enum. `tb/` holds the testbenches and the behavioural FFT
model. All tables (Hann window, sine, note → fcw) are computed by constant functions
at elaboration, so no data files are needed. The formulas are given above and in the
file headers.
