# Video ghost canceller: adaptive deghosting core

A television picture received over the air often carries faint copies of
itself: the same signal, reflected by buildings or hills, arrives a few
microseconds early or late and shows up as shifted "ghosts". Broadcasters
insert a known test waveform, the ghost cancelling reference (GCR), on one
line in the vertical blanking interval. A receiver that knows what the GCR
should look like can compare it with what actually arrived, work out the
echo pattern, and run the video through an equalizing filter that undoes it.

This repository holds the digital core of such a canceller as synthesizable
SystemVerilog. It takes 10-bit video at four times the colour subcarrier
(14.318 MHz for NTSC, one sample per clock), finds the reference line,
adapts a 576-tap equalizer with a multiplier-free LMS update, and delivers
clean video to a DAC decoder and a digital output. It also contains the
timing support around it: sync separation, clamp timing and a numerically
controlled oscillator for clock synthesis. The analog parts of a complete
chip (input clamp and gain, ADC, DAC current sources, PLL) are outside this
core; their control signals are ports of the top.

```
 adc_data ─┐                 ┌─► gc_filter (8 x 72 taps) ─► offset_gain ─┐
           ├─ in_sel ─ -lvl ─┤                                           ├─ select ─► dac_decoder ─► cells / bin
 dig_in  ──┘      │          └─► gc_bypass_delay ───────► offset_gain ───┘    │                    └► dout
                  │                                                         mode
                  ▼                                                           ▲
              sync_sep ── GCR window ──► gcr_avg ─► gcr_detect ─► adapt_ctrl ─┘
                  │  └─ line timing error ─► nco ─► dac_decoder ─► nco_cells / nco_bin
                  └─ hs ─► clamp_ctrl ─► clamp, clamp_ref
```

## The filter: 576 taps with few delay lines

Echoes worth cancelling can be anything from about 6 us before the main
signal to about 42 us after it, which at 14.318 MHz is 88 samples ahead and
596 samples behind. A filter covering that span with a tap at every sample
would need almost 700 multipliers, yet in practice only a few short stretches
of it hold significant coefficients. The filter therefore has only 576 taps,
grouped into **8 sections of 72 consecutive taps**, and gives every section
its own **programmable delay line** (a RAM with one write and one read
port, up to 1024 samples). Setting a section's delay places its 72 taps
wherever in time an echo is.

Each section is also assigned to one of two roles:

* **FIR** sections take the input video. They handle echoes that arrive
  *before* the main signal (precursors) and short echoes close to it, where
  a recursive filter would be unstable or would amplify noise.
* **IIR** sections take the filter's own output. A single recursive tap
  cancels a post-echo completely, including the echo of the echo, so IIR
  sections handle the long post-cursor range cheaply.

The main signal does not use a section: a separate **unity-gain path** with
its own delay (`main_dly`) carries it. With `main_dly = 88`, an FIR section
at delay 0 covers the 88 samples before the main signal, a second FIR
section at delay 72 covers 56 samples after it, and the remaining six
sections can be spread over the post-cursor range as IIR sections: five of
them as one contiguous 360-tap block, and the last one as two floating
36-tap blocks for rare long echoes. For that, the last section has a second
delay line: with `split` set, its upper 36 taps restart from that line
(`split_dly`) instead of continuing the tap chain, so the two halves can sit
anywhere independently. The output is

```
y[n] = x[n-main_dly-1] + sum over enabled sections  sum_j c_j * s[n-dly-1-j]
       s = x for FIR sections, s = y for IIR sections
```

Arithmetic: samples are signed 10-bit (the input code minus a programmable
input level), coefficients signed 8-bit with 7 fraction bits (-1.0 to
+0.992), 10 x 8 products, section sums and the total saturated to an 18-bit
word, and the output rounded and saturated back to 10 bits. An IIR section
reads the registered output, so its first tap is two samples behind the
output sample it corrects. The delay of `main_dly + 2` samples from input to
filter output is matched by the bypass delay, so switching between the
filtered and the bypassed video does not shift the picture.

## Adapting 576 coefficients without multipliers

While the GCR line passes through the filter, each output sample is
compared with the stored reference: `e = ref - y`. A textbook LMS update
would add `mu * e * x_j` to every coefficient, which needs a second
multiplier per tap. Instead each tap (`gc_section`) combines two
simplifications:

1. **Thresholds.** The error and the tap's sample are each reduced to
   -1, 0 or +1; values smaller than `th_e` or `th_y` count as zero, so
   noise and small residues do not move the coefficients.
2. **Accumulation.** The product of the two signs is added into a small
   per-tap register. Only when that register reaches `+acc_lim` or
   `-acc_lim` does the coefficient step by one LSB (and the register
   restarts). The limit sets the effective step size.

The update is therefore an 8-bit add and compare per tap, and the
coefficient word can stay at 8 bits. `acc_lim` is also what distinguishes
the two adaptation speeds: a small limit in Fast mode, a large one in Slow
mode.

## Acquisition and the adaptation sequence

Before adapting, the canceller has to be sure the reference is there.

* **Averaging (`gcr_avg`).** The GCR window (768 samples from `win_start` on
  line `gcr_line`) is accumulated over 8 fields. The reference is sent with a
  polarity that changes from field to field in a fixed 8-field pattern
  (`cfg.pol_seq`); each field is added or subtracted according to its
  polarity, so DC, sync, burst and any static picture content cancel and the
  reference adds up.
* **Detection (`gcr_detect`).** The average is correlated with the stored
  reference at 128 lags, one multiply-accumulate per clock (32768 clocks per
  run, well inside a field). The largest correlation magnitude must reach
  `det_th` for the GCR to count as present. Each echo leaves a weaker
  correlation peak at its own delay, so the four strongest local maxima and
  their lags are reported (`gcr_pk_mag`, `gcr_pk_lag`). A lag minus the main
  lag is an echo's delay in samples, which tells the host where to place
  filter sections.
* **Modes (`adapt_ctrl`).** Without a confirmed GCR the video takes the
  **bypass** path unprocessed. When detection succeeds the coefficients are
  cleared and **Fast** adaptation starts. Fast mode ends when the summed
  |error| of a GCR line drops below `conv_th` or after `fast_lines` GCR
  lines; **Slow** mode then keeps tracking changes in the echoes. If a line's
  error sum ever exceeds `unstab_th`, the filter is considered unstable: the
  coefficients are cleared and Fast adaptation starts again (counted in
  `reinit_cnt`). A channel change, or a detection run that no longer finds
  the GCR, returns to bypass.

The reference used for the error is the stored waveform with the current
field's polarity applied plus `ref_dc`, delayed together with a window flag
by `main_dly` so that it lines up with the filter output.

## Line timing, clamp and clock synthesis

`sync_sep` slices sync at `sync_th`. A falling edge at least 3/4 of a line
after the last accepted one starts a new line, so equalizing and serration
pulses at half-line spacing are ignored. A sync pulse longer than 256
samples is a broad vertical pulse and starts a new field. The measured line
length minus 910 is the **timing error**. `clamp_ctrl` opens the clamp
`clamp_pos` samples after each line start for `clamp_len` samples (on the
sync tip or on the back porch) and passes the choice of clamp reference.

`nco` is a 24-bit phase accumulator advanced by `nco_freq - (terr << nco_k)`:
the desired frequency corrected by the timing error. The top 10 phase bits
address a sine table held as a 256-entry quarter wave, computed at
elaboration with Bhaskara's rational approximation
`sin x ~ 16x(pi-x) / (5pi^2 - 4x(pi-x))` (error below 0.2 %). Its samples
drive a second DAC decoder; filtering and squaring that DAC's output into
the clock is analog and outside the core.

## DAC decoder and its switching order

The 10-bit DACs are segmented: the 6 MSBs switch up to 63 equal unit
current cells, the 4 LSBs a binary-weighted array. Bits 9..7 go through a
row decoder and bits 6..4 through a column decoder into 8 + 8 thermometer
lines; logical cell k is on when k <= code[9:4]. The logical cells are not
placed in order on the 4 x 16 array. Consecutive cells are spread out
symmetrically, so that gradients in the current sources across the die
cancel instead of accumulating into integral nonlinearity. Physical array
(row-major in `cells[]`), each number being the order in which the cell
turns on:

```
62 58 54 50 49 53 57 61 31 27 23 19 20 24 28 32
46 42 38 34 33 37 41 45 15 11  7  3  4  8 12 16
14 10  6  2  1  5  9 13 47 43 39 35 36 40 44 48
30 26 22 18 17 21 25 29 63 59 55 51 52 56 60 64
```

The LSBs pass through a matching register stage (the "dummy decoder") so all
switches change on the same edge. Latency is 2 clocks. A registered copy of
the code is the 10-bit digital output.

## Configuration

All settings are one packed record, `gc_pkg::gc_cfg_t`, on the top's `cfg`
port (a host interface maps onto it): input select and level, `main_dly`,
per-section enable / FIR-IIR / delay, the thresholds and accumulator limits
above, detection threshold, the 8-field polarity pattern, the reference DC
level, the split of the last section and the delay of its upper half, a
forced bypass, offset and gain for each output path (gain 128 =
1.0), sync level, GCR line and window start, clamp settings, and the NCO
frequency word and loop gain. The reference waveform is written through
`ref_we/ref_waddr/ref_wdata`; coefficients can be written and read through
`coef_we/coef_sec/coef_idx/coef_wd/coef_rd`.

| Path | Latency |
|---|---|
| video input to `dout` / DAC switches (either path) | `main_dly + 5` clocks |
| filter input to filter output | `main_dly + 2` |
| offset/gain | 1 |
| DAC decoder | 2 |
| correlator run | 128 x 256 + 2 clocks |

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing rtl/gc_pkg.sv $(ls rtl/*.sv | grep -v gc_pkg) \
          tb/tb_gc_top.sv --top-module tb_gc_top -Mdir obj_tb_gc_top
obj_tb_gc_top/Vtb_gc_top
```

Replace `tb_gc_top` by any other testbench (`tb_gc_filter`, `tb_nco`, ...).
`tb_gc_top` runs the whole core at its default sizes (about 7.4 million
clocks, roughly a minute). It synthesizes composite video, adds a 0.15 echo
10 samples early and a 0.3 echo 20 samples late, inserts a pseudo-random
reference with an 8-field polarity pattern from field 9 on, and checks:
bypass output sample-exact while no GCR is present, detection with both
echoes found at their delays among the correlation peaks, Fast and then
Slow mode, a fall of the GCR-line error to under a quarter of its starting
value, picture lines more than ten times closer to the echo-free video than
the bypassed ones, the split floating section in use, a forced re-initialisation, a channel change, forced bypass,
ADC input selection and output saturation. Each of these events is counted
and a missing one is a failure. `tb_gc_filter` compares the full 8 x 72
filter sample by sample against a model and shows an IIR tap adapting to
cancel a 0.5 echo. `tb_ghost_span` runs the full-size filter against the
widest echo span: a 0.1 echo 88 samples (6.15 us) early, a 0.25 echo 420
samples late and a 0.5 (-6 dB) echo 596 samples (41.6 us) late, the two late
ones served by the two halves of a split section. After Fast and then Slow
adaptation the taps at the echoes sit at -13/128, -33/128 and -64/128, and the
mean residual error is about 1.5 % of the signal amplitude (about -37 dB).

## Where this design makes its own choices

The structure (8 x 72-tap sections on programmable delay lines, FIR/IIR
assignment, unity main path, 10-bit samples, 10 x 8 multipliers, 18-bit
internal word, threshold-plus-accumulation update, Fast/Slow/re-init
sequence, averaging and correlation to confirm the GCR, offset and gain
after the filter, programmable clamp, NCO steered by a timing error, 6 + 4
segmented DAC with the switching order above) follows the original
canceller. The following are this implementation's own:

* The update rule in detail (sign x sign into a symmetric accumulator) and
  all transition criteria of the mode controller (line error sums, a
  maximum number of Fast lines).
* Adaptation is done in the filter hardware during the GCR window, rather
  than by a programmable DSP working on a stored copy of the line.
* Only the last section can be split into two floating halves.
* The GCR polarity of each field comes from a programmed 8-field pattern
  and a field counter restarted on a channel change; the canceller does not
  discover the phase of the sequence by itself.
* Echo delays are reported from the correlation (lags within -64..+63
  samples of the main signal, four peaks), but sections are not placed
  automatically. The host sets the section delays.
* The NCO sine table is fixed, and the frequency is set by the phase
  increment; the original keeps a table that its controller can rewrite.
* Line length (910, NTSC) and the GCR line (19) are defaults; PAL needs
  `LINE_LEN = 1135`.
* The programmable DSP, its memories, the host serial interface and the
  boot ROM interface are not included; the `cfg` record and the memory
  ports stand in for them.

Known limits: with 8-bit coefficients, every tap that should be zero
dithers by about one LSB, and the sum of that dither over all enabled taps
sets the floor of the residual error. Enable sections only where echoes
are, and use a long accumulator limit for Slow mode. `tb_gc_top` uses
deliberately coarse thresholds and cuts the picture error by a factor of
more than ten. Enabling many IIR sections at once with large steps can drive the
loop into saturation. The stability monitor then re-initialises it.
