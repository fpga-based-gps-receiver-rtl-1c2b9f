# A GPS L1 C/A receiver in SystemVerilog: from 1-bit samples to GPS time

This design is the digital part of a GPS receiver for an FPGA. Its input is the
GPS L1 signal after an RF front end: complex baseband at about 4 Msps,
quantised to one bit per component (the sign of I and the sign of Q). Its
output is the time from the satellites' navigation message: the day of the
week, hour and minute, and the year and month. These are shown on an 8-digit
seven-segment display, together with the code phase, Doppler and lock state of
the tracked satellites.

The chain has four stages:

1. **Acquisition.** A brute-force time-domain search correlates a 2 ms piece
   of the signal against every code phase and every Doppler bin, for all 32
   satellites at once.
2. **Hand-over.** Each new detection goes to one of eight tracking channels.
3. **Tracking.** Each channel follows its satellite with a delay-locked loop
   on the spreading code and a Costas loop on the carrier. The sign of its
   in-phase correlation is the 50 bit/s navigation data.
4. **Decoding.** A navigation decoder per channel finds the bit edges and the
   subframe preamble, checks parity, and extracts the time of week and the
   week number. A small converter then turns these into calendar values.

No position is computed. The receiver stops at time.

```
 adc_i, adc_q, adc_clk
        |
  adc_interface ---- sample_valid, I/Q signs, 1 ms epoch (sync)
        |                                  |
   td_search (32 satellites)               |
        | detected[31:0], phase, Doppler   |
 handoff_controller                        |
        | new_sat[t], {PRN, phase, Doppler}|
 gps_tracker x8 <--------------------------+
        | 1 ms NAV symbols
 nav_decoder x8
        | seconds of week, week number
  time_display --> seven_seg --> seg[6:0], an[7:0]
```

## Conventions used throughout

- **Samples.** Each sample is two sign bits, and `1` means -1. The default
  rate is `FS` = 4 MHz. One C/A code period (1 ms, 1023 chips) is therefore
  `SAMPLES_PER_MS` = 4000 samples, and sample n of a period carries chip
  `floor(n*1023/4000)`.
- **Millisecond epoch.** `adc_interface` counts samples modulo
  `SAMPLES_PER_MS` from reset. The first sample of each count is the epoch,
  and every block uses this one shared time reference.
- **Code phase.** The number of samples from the epoch to the start of chip 0
  of the received code (12 bits, 0..3999). The search reports it and the
  trackers report it in the same form.
- **Doppler.** Signed Hz (16 bits). Every carrier NCO is a 32-bit phase
  accumulator with frequency word `fcw = f * 2^32 / FS`. Its 1-bit sine is
  phase bit 31, and its 1-bit cosine is bit 31 xor bit 30.
- **Wipe-off.** `cmplx_mult` forms `(I + jQ)(cos - j sin)` and halves it, so
  each part is -1, 0 or +1. An 8000-sample sum then fits 14 bits, and its
  squared magnitude fits 28 bits.
- **Satellite id.** Satellite ids are 0..31 and stand for PRN 1..32.

## Acquisition: `td_search`

This is the largest block, and its cost sets how long the receiver takes to
start.

**Capture.** At an epoch, the search writes `N_CORR + N_PHASE` = 8000 + 4000
consecutive samples (3 ms) into one of two 12000 x 2-bit `sample_buffer`
banks. Because the capture starts on an epoch, a code phase measured in the
capture is also the phase relative to the live epoch that the trackers use.

**Ping-pong.** The two banks alternate. While one is searched, the other is
filled with a fresh capture, so the next pass can start as soon as the
current one ends. Each bank moves through the states EMPTY, FILLING, FULL and
SEARCH.

**One pass.** `conv_controller` runs three nested loops, one index per clock:

- outer: the Doppler bins
- middle: the 4000 code phases
- inner: the 8000 samples of a correlation

Each clock it reads one stored sample (buffer address `phase + n`) and one
32-bit word of `ca_code_rom` (address `n`; the code table holds two code
periods). The carrier NCO of the current bin wipes off the Doppler, and the
result goes to 32 `corr_accumulator`s in parallel, one per PRN, each with its
own code bit. Every 8000 clocks each accumulator dumps `|sum|^2`. Each
satellite's `peak_detector` keeps the largest value of the pass, with its code
phase and bin.

At the end of the pass, `param_memory` stores phase and Doppler for every
satellite whose peak exceeds `THRESHOLD`. It also sets that satellite's bit
in `detected`.

**Cost.** A full pass over 100 bins takes 8000 x 4000 x 100 = 3.2e9 clocks,
which is 32 s at 100 MHz for all 32 satellites together.

**Doppler window.** The bins are 200 Hz wide and centred on 0 Hz; bin k is at
`(k - 50) * 200` Hz, which covers -10 kHz .. +9.8 kHz. Two 4-bit inputs set
the window:

- `search_offset` (signed, kHz) is the centre.
- `search_range` (kHz) is the half-width. A value of 10 or more with offset 0
  searches everything.

Narrowing the window shortens a pass in proportion to the number of bins.

**Pipeline.** In clock t the controller issues the indices. In t+1 the
buffer, ROM and NCO outputs are registered. In t+2 the sample is accumulated,
and the dump strobe comes at the last sample. In t+3 the peak is updated.
The end-of-pass store is the controller's `done` delayed by three clocks.

**Threshold.** The default `THRESHOLD` is 256000 = 32 x `N_CORR`. With these
scalings, noise alone gives a mean `|sum|^2` of about `N_CORR`, so 256000 is
32 times the noise mean. A satellite at -6 dB against the noise before
correlation peaks near 2e6.

Very strong signals at 0 dB can push another PRN over this fixed threshold
when a data bit changes inside the 2 ms correlation. Such a false detection
is dispatched, fails to lock, and is released after `LOSS_MS`.

## Hand-over: `handoff_controller`

The dispatcher looks at `detected` and takes the lowest-numbered satellite.
It compares that satellite with the mask of satellites held by busy trackers:

- If the satellite is not tracked yet, it goes to the lowest-numbered free
  tracker as a one-cycle `new_sat` strobe, carrying the id, phase and Doppler.
- If it is already tracked, or all eight trackers are busy, the detection is
  dropped.

Either way the detection is consumed, which clears its bit. The dispatcher
makes one decision every two clocks, so the chosen tracker can raise `busy`
before the next decision.

## Tracking channel: `gps_tracker`

**Control states.**

- `WAITING_INFO`: the channel is free.
- `WAITING_SYNC`: it has a satellite and waits for the next epoch. At that
  epoch the local code counter starts at `SAMPLES_PER_MS - phase`, which puts
  chip 0 of the local code where the search saw it, and the NCO is loaded
  with the handed-over Doppler.
- `TRACKING`: normal operation.

A channel that has not been locked for `LOSS_MS` (1 s) returns to
`WAITING_INFO`. A later search pass can then hand the satellite over again.

**Correlators.** There are three integrate-and-dump correlators: early,
prompt and late. They read the same 4000-entry code table through three read
ports, offset by plus and minus half a chip (2 samples at 4 Msps). Each
integration covers one local code period (1 ms). The loops below update once
per millisecond and act three clocks after the dump.

**Delay-locked loop (code).** The error is `|late|^2 - |early|^2`:

- If it exceeds `|prompt|^2 / 8`, the incoming code is late. The code counter
  holds for one sample, and the reported phase grows by one.
- If it is below minus that bound, the counter skips one sample.

So the code moves by at most one sample (a quarter chip) per millisecond.
That is plenty for code Doppler, which is a few samples per second.

**Costas loop (carrier).**

1. The error is the product `I*Q` of the prompt sums. A power of two near
   `(|I|+|Q|)^2` normalises it, which acts as a crude gain control so the loop
   gain does not depend on signal strength.
2. A first-order low-pass filter smooths the error (`LPF_SHIFT`).
3. The filtered error goes back to the NCO in two ways. It is added to the
   frequency word (a right shift of 1 at 4 Msps, scaled with
   `SAMPLES_PER_MS`). It is also added, shifted left by `KP_SHIFT` = 17, as a
   one-off phase step.

The phase step matters. Frequency feedback alone pulls in slowly, while the
direct phase correction brings the channel to lock 10-25 ms after hand-over.
This holds anywhere within half a search bin (100 Hz), with the satellite
6-10 dB below the noise before correlation.

**Lock detector.** An up/down counter (0..15) rises in every millisecond where
`|I| > 2|Q|` and `|I| >= SAMPLES_PER_MS/32`, and falls otherwise. The channel
reports `locked` while the counter is 8 or more.

**Outputs.**

- `nav_sym`: the sign of the prompt I sum, once per millisecond. The Costas
  loop can settle with either sign, so the data may be inverted.
- `cur_phase`: refreshed at each epoch.
- `cur_doppler`: `fcw * FS / 2^32`.

## Navigation data: `nav_decoder`

Decoding only runs while the channel is locked.

**Bit sync.** The decoder first lets `STABLE_MS` (40) symbols pass. It then
waits for a sign change between two milliseconds; that is a bit edge. From
there it takes a majority vote over every 20 symbols to form one 50 bit/s
bit.

**Frame sync.** The last 92 bits are kept: the last two bits (D29, D30) of the
previous word, then three 30-bit words. When the window starts with the
preamble `1000 1011`, or its inverse, the decoder checks the three words. It
takes them in the matching polarity and applies the six standard GPS parity
equations, each seeded with D29/D30 of the word before. The three words are
the telemetry word, the hand-over word and word 3.

**Values.** If all three words pass:

- The 17-bit TOW count in the hand-over word gives `seconds = 6 * TOW`. This
  is the time at the start of the next subframe, in seconds since Sunday
  00:00.
- If the subframe id is 1, bits 1-10 of word 3 are the week number. The
  transmitted week is 10 bits and rolls over every 1024 weeks, so
  `WEEK_ERA * 1024` is added (default era 1, i.e. August 1999 to April 2019)
  to give an 11-bit week.

## Time display: `time_display` and `seven_seg`

**Time of week.** `time_display` splits the seconds of week by repeated
subtraction, one step per clock: whole days, then hours, then minutes.

**Date.** Days since 6 January 1980 (week x 7 + day of week) are reduced year
by year (365 or 366 days), then month by month. Leap years are every fourth
year, which is correct from 1901 to 2099. A conversion takes at most a few
hundred clocks. `valid` pulses when a new result is on the outputs.

**Display pages.** `seven_seg` multiplexes eight active-low digits, one every
2^17 clocks. `disp_mode` selects the page:

| `disp_mode` | shows (leftmost digit first)                                     |
|-------------|------------------------------------------------------------------|
| 0           | day of week, hour, minute: `d HH MM`                              |
| 1           | year and month: `YYYY MM`                                         |
| 2           | PRN (hex), lock flag, Doppler (hex) of tracker `disp_sel`         |
| 3           | PRN (hex), lock flag, code phase (hex) of tracker `disp_sel`      |

## Parameters of `gps_receiver_top`

| parameter        | default | meaning                                                        |
|------------------|---------|----------------------------------------------------------------|
| `NUM_TRACKERS`   | 8       | tracking channels, each with a NAV decoder                     |
| `SAMPLES_PER_MS` | 4000    | samples per code period; also the number of code phases searched |
| `FS`             | 4000000 | sample rate in Hz (sets NCO words and Doppler read-out)        |
| `N_CORR`         | 8000    | samples per search correlation (2 ms)                          |
| `N_BINS`         | 100     | Doppler bins                                                   |
| `BIN_HZ`         | 200     | bin width in Hz                                                |
| `THRESHOLD`      | 256000  | detection threshold on `|sum|^2`                               |
| `STABLE_MS`      | 40      | symbols ignored after lock before bit sync                     |
| `WEEK_ERA`       | 1       | 1024-week rollovers added to the transmitted week              |
| `SCAN_BITS`      | 17      | log2 of clocks per display digit                               |

The tracker's loop constants are parameters of `gps_tracker`: `DLL_SHIFT`,
`LPF_SHIFT`, `KP_SHIFT`, `LOCK_N`, `LOCK_MIN` and `LOSS_MS`.

Shared types and constants are in `gps_pkg`: satellite id, code phase,
Doppler, the hand-over struct `sat_info_t`, and a C/A code generator
function. The code tables are not stored as data files. `ca_code_rom`
computes them at elaboration from the G1/G2 shift registers, using the
standard G2 tap pairs for each PRN.

Memories:

- two sample banks, 2 x 12000 x 2 bits
- the search code table, 8000 x 32 bits
- one code table per tracker, 4000 x 32 bits

## What is specified and what is chosen here

These parts follow a published design:

- the overall structure: one parallel time-domain search, a dispatcher, eight
  tracker and decoder channels, and a time display
- the search dimensions: 8000-sample correlations, 4000 phases, 100 bins of
  200 Hz, 32 satellites in parallel
- the buffer and table sizes (12K x 2 bits; 32-bit-wide code tables of 8000
  and 4000 entries)
- the 28-bit correlation magnitude, the 12-bit phase and the 16-bit Doppler
  widths
- the dispatcher rule: first detected, untracked satellite to the first free
  tracker
- the tracker's three states
- the half-chip early/late spacing and the sign of the DLL error
- a Costas loop with both frequency and explicit phase feedback, and lock in
  about 100 ms
- the decoder's steps: wait, bit edge, preamble `10001011`, parity, 17-bit
  TOW, 10-bit week
- a counter-based time and date conversion

These are this design's own choices:

- the 1-bit NCO and the halved wipe-off
- the detection threshold
- the ping-pong use of the two buffers
- the units of the search window inputs
- the epoch counter shared by all blocks
- all loop gains: DLL step rule, LPF, frequency and phase feedback, lock
  detector, release after 1 s
- the decoder's 40 ms wait and the majority vote
- the week era
- the display layout

Where the original descriptions differ, this design uses:

- 3 bits for the day of week
- 12 bits for the tracker code phase
- a 13-bit index into the 8000-entry search table
- in the Costas loop, the product of I and Q is formed first and then
  low-pass filtered

GPS facts not specified by the source design come from the public GPS
interface specification: G2 taps, parity equations, bit positions of TOW,
subframe id and week, and 20 ms per bit.

The sample source (a microcontroller replaying recordings, or an SDR with a
1-bit quantiser) and the RF front end are outside this RTL. The top takes
their three lines, `adc_i`, `adc_q` and `adc_clk`, as inputs.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
The shared test code is in `tb/gps_tb_pkg.sv`:

- a reference C/A generator built from the G2-delay table, independent of the
  RTL's tap-pair generator
- GPS word encoding with parity
- approximately Gaussian noise
- a satellite signal class with code phase, Doppler, code drift and a NAV bit
  stream

Example with plain Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/gps_pkg.sv tb/gps_tb_pkg.sv tb/gps_tracker_tb.sv \
    --top-module gps_tracker_tb -o sim && ./obj_dir/sim
```

**End-to-end tests.** Two testbenches run the whole receiver. They share
`gps_receiver_harness`, which plays two satellites (PRN 5 and 20) through the
ADC pins and checks acquisition, hand-over, lock, DLL movement, frame sync,
and the decoded time and date. It also counts each mechanism and fails any
that never happened:

- search pass, and a second pass on the other bank
- hand-over, and discard of an already tracked satellite
- lock and DLL step
- frame sync
- display conversion

The two testbenches:

- `gps_receiver_top_tb` runs at reduced size: one sample per chip
  (`SAMPLES_PER_MS` = 1023, `N_CORR` = 2046). It takes about 30 s.
- `gps_receiver_full_tb` runs the top with every parameter at its default. It
  searches one Doppler bin per pass (32 M clocks) and runs about 0.75 s of signal.
  It takes about 2.5 minutes.

The other testbenches:

- `gps_tracker_tb` runs a single channel at 4 Msps. It checks lock within
  100 ms, the code phase, the Doppler, and the NAV symbols.
- `td_search_tb` runs at one sample per chip and checks the exact pass length
  of `N_CORR x N_PHASE` clocks per bin.

A full 100-bin pass at the defaults (3.2e9 clocks) has not been simulated.

**Synthesis.** Because the code tables are computed in `initial` blocks,
synthesis front ends must evaluate about 10^5 loop steps at elaboration.
Some front ends need their constant-evaluation step limit raised for this.
