# Sound localization with an eight-microphone I2S array

This design estimates the direction a sound comes from. A row of eight
INMP441 MEMS microphones, all spaced the same distance `d` apart, records a
tone, for example from a loudspeaker that is moved around the room. The FPGA
works through the recording in blocks of 1024 samples. For each block it
finds the tone's frequency and reports the angle of arrival between −90° and
+90°.

The method is delay-and-sum (Bartlett) beamforming at a single frequency:

1. The FPGA captures 1024 samples from every microphone.
2. It takes a 1024-point FFT of every channel. The strongest bin of
   channel 0 is taken as the *frequency of interest* `k`.
3. It takes the eight FFT values at bin `k`, `X_0 … X_7`. These are one
   narrow-band "snapshot" of the array.
4. For every candidate angle θ it rotates each `X_i` back by the phase a
   plane wave from θ would have at microphone `i`, sums the eight, and
   squares the magnitude. The angle where this power `P(θ)` is largest is the
   answer.

Everything runs in one 50 MHz clock domain. No external memory or processor
is involved. The raw samples and the results are brought out as ports, for
example for an Arm host that records wave files or draws the location.

## Signal chain

```
 SD[3:0] ──► i2s_rx ×4 ──► acq_writer ──► time_series_ram ──► doa_controller
   ▲            ▲         (24→14 bit,     (2 banks ×         │  ├─► fft_radix2 (shared, 1024-pt)
 SCK,WS ◄── i2s_clkgen     chunks)         1024 × 8 ch)      │  ├─► peak_bin_finder (channel 0)
                                                             │  └─► bartlett_doa ──► angle, P(θ)
 pcm_valid / pcm_data ◄── raw 24-bit frames (always on, the only output in test mode)
```

| module | role |
|---|---|
| `sl_pkg` | shared sizes and the complex type `cplx_t` |
| `i2s_clkgen` | SCK, WS and a sample strobe, generated from the system clock |
| `i2s_rx` | decodes one SD line, i.e. one microphone pair |
| `acq_writer` | truncates to 14 bits, fills 1024-sample chunks, double buffering, overflow count |
| `time_series_ram` | 2048 × 112-bit memory: eight 14-bit samples per word |
| `fft_radix2` | iterative radix-2 decimation-in-time FFT, one butterfly per clock |
| `cos_sin_lut` | cosine/sine ROM, built at elaboration (helper) |
| `peak_bin_finder` | strongest bin in 1..511 |
| `bartlett_doa` | beamformer over the angle grid, with the argmax |
| `doa_controller` | works through each chunk; test-mode bypass |
| `sound_localizer` | top level |

## Capturing the microphones

The microphones sit in pairs on four data lines. SCK and WS go to all eight.
The microphone of a pair strapped as *left* drives SD while WS is low. Its
partner drives SD while WS is high. Each slot is 32 SCK periods long, so
`f_SCK = 64·f_WS`. A word is 24 bits, two's complement, MSB first. It starts
one SCK period after the WS edge (the one-bit I2S delay). Microphone `2p` is
the left one on line `p`, and microphone `2p+1` is the right one. Microphone 0
is the phase reference.

`i2s_clkgen` divides the 50 MHz clock by `2·SCK_HALF` to make SCK. It then
counts 64 SCK periods per frame, and WS is the top bit of that count. The
default is `SCK_HALF = 8`, which gives:

- SCK = 3.125 MHz;
- a sample rate `fs` = 50 MHz / 1024 = 48.828 kHz;
- one frame every 1024 clocks.

SCK is only an output; it never clocks anything. The generator also produces
`sck_rise`, a one-clock strobe in the first cycle that SCK is high.

`i2s_rx` samples SD on `sck_rise`, after a two-flop synchronizer. SD changed
half an SCK period earlier, so it is stable when sampled. A 5-bit counter
restarts at every WS change:

- count 0 is the delay bit;
- counts 1–24 are shifted in;
- counts 25–31 are ignored.

An IDLE/LEFT/RIGHT state machine follows WS. After reset, IDLE waits for the
first WS falling edge, so no half-received frame is ever reported. When the
24th right-slot bit arrives, `valid` pulses once with both words. All four
receivers see the same SCK and WS, so they complete in the same clock; an
assertion in the top checks this.

## Chunks and the time-series memory

`acq_writer` keeps the 14 most significant bits of every 24-bit word. It
writes the eight results as one 112-bit RAM word at `{bank, index}`. After
1024 frames the chunk is complete:

- **Processing idle:** `chunk_ready` pulses with the bank number, and capture
  moves to the other bank.
- **Processing still busy:** the new chunk is dropped. Capture refills the
  same bank, and `overflows` counts the loss.

At the default rates there is no loss: processing takes 51,518 clocks, while
capturing a chunk takes 1,048,576 (21 ms).

## Frequency of interest: FFT and peak search

`fft_radix2` is a textbook in-place radix-2 decimation-in-time FFT:

- **Load:** samples are written in natural order and stored at the
  bit-reversed address; imaginary parts are cleared.
- **Transform:** `start` runs 10 stages of 512 butterflies each. Stage `s`
  pairs elements `i` and `i+2^s`, with twiddle
  `W = exp(−j2π·(i mod 2^s)·N/2^(s+1)/N)`.
  One butterfly is done per clock, so a transform takes 5120 clocks.
- **Read:** one bin per clock, with one clock of latency.

Number formats:

- Data are 26-bit signed per real or imaginary part. Twiddles are 16-bit
  with 15 fraction bits.
- There is no scaling between stages, so the output is the plain DFT
  `X[k] = Σ x[n]·e^{−j2πkn/N}`.
- A 14-bit input cannot exceed 2^23 in magnitude, so 26 bits never
  overflow.
- Measured error is about 1.2·10⁻⁴ of the largest bin. It comes mostly from
  the twiddle amplitude 32767/32768.

The working memory has two read ports and two write ports. It maps to
registers or distributed RAM, not to a single block RAM. To use block RAM,
split the memory by address parity or pipeline the butterfly over two clocks.

`peak_bin_finder` reads bins 1 to 511 through the same read port. It
compares `re² + im²` and keeps the strongest bin; on a tie the lower bin
wins. DC and the mirrored upper half are excluded. A search takes 513
clocks.

## The beamformer (`bartlett_doa`)

This block is the heart of the design and the part most worth understanding
before changing anything.

**Model.** A plane wave from angle θ reaches microphone `i` later than
microphone 0 by `τ_i = i·d·sinθ / c`. At frequency `f = k·fs/N`, that delay
is a phase lag

```
φ_i(θ) = 2π·i·k·K·sinθ,        K = d·fs / (N·c)   [turns per bin per spacing]
```

The steering vector is `a_i = e^{−jφ_i}`. The Bartlett spectrum for one
snapshot is

```
P(θ) = |aᴴX|² = |Σ_i X_i·e^{+jφ_i(θ)}|²
```

The usual division by `aᴴa = M` is a constant and is left out. Positive
angles mean the sound reaches microphone 0 first.

**Snapshot averaging.** Each chunk gives one snapshot. The textbook
covariance averages T snapshots, `R = (1/T)·Σ_t X_t X_tᴴ`. Since
`aᴴRa = (1/T)·Σ_t |aᴴX_t|²`, averaging R is the same as averaging `P(θ)`.
The block therefore keeps a per-angle accumulator and adds the spectra of
`T_SNAP` consecutive chunks. It reports the sum, which is T times the
average; the factor does not move the maximum. A result (`valid`, `spec_*`)
comes only after every `T_SNAP`-th chunk. The default `T_SNAP = 1` gives a
result per chunk, so a moving source is followed without lag.

**Stored constants.** The only stored table is `KSIN[a] = K·sin(θ_a)` for
each of the 181 grid angles. It is computed at elaboration from
`MIC_SPACING_M`, `SOUND_MPS`, `FS_HZ` and the grid parameters, and held as a
fixed-point fraction of a turn with 24 fraction bits.

**Per angle** (10 clocks: setup, 8 multiply-accumulate steps, evaluate):

1. `step = k·KSIN[a]` modulo one turn, using one multiplier.
2. For `i = 0…7`: the phase is `i·step`, built by accumulation. It is
   rounded to 10 bits and looked up in a cosine/sine table (`cos_sin_lut`).
   Then `X_i·(cos + j·sin)` is added to a 30-bit complex accumulator.
3. `P = re² + im²` (60 bits) is added to the angle's accumulator. In the
   last run of an averaging window the sum is streamed out (`spec_*`) and
   compared with the best so far.

**Timing.** The whole grid takes 181·10 + 1 = 1811 clocks. `best_deg` is the
winning angle, from −90 to +90 in 1° steps.

**Accuracy.** The 10-bit phase table limits the sidelobe accuracy of `P` to
about 2·10⁻⁴ of the peak. This does not move the maximum. Near ±90° the
spectrum is very flat, because sinθ barely changes. The angle is exact to
the degree within ±60° in the tests and within a few degrees towards endfire.

**Spatial aliasing.** The array is only unambiguous while `d ≤ λ/2`. With the
default `d = 4 cm` that means tones below 4.29 kHz, i.e. bin 89 or lower. The
peak search does not enforce this. A higher tone gives a grating-lobe
ambiguity, and the reported angle may be wrong.

## Sequencing and test mode

`doa_controller` starts when `chunk_ready` arrives and `test_mode` is low.
It holds `busy` high (so capture leaves its bank alone) and, for each
channel 0…7:

1. **LOAD:** copy the channel's 1024 samples from the RAM into the FFT
   (1025 clocks).
2. **FFT:** run the transform (5120 clocks).
3. **PEAK:** on channel 0 only, run the peak search and latch `k`.
4. **GRAB:** read `X_ch[k]` into the snapshot.

It then runs the beamformer. The total is 51,518 clocks from `chunk_ready`
to `doa_valid`.

With `test_mode` high, chunks are captured but never processed. Only the raw
24-bit frames on `pcm_valid`/`pcm_data` are active, for recording the
microphones without the FFT. `test_mode` is looked at when a chunk arrives;
a chunk already being processed finishes.

## Top-level interface (`sound_localizer`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 50 MHz clock; synchronous reset, active high |
| `test_mode` | in | 1 | 1 = bypass processing, stream raw frames only |
| `sck`, `ws` | out | 1 | I2S clock and word select for all microphones |
| `sd` | in | 4 | I2S data, one line per microphone pair |
| `pcm_valid`, `pcm_data` | out | 1, 8×24 | raw frame, microphone 0..7, one per 1024 clocks |
| `busy` | out | 1 | a chunk is being processed |
| `doa_valid` | out | 1 | one-clock pulse: new result |
| `doa_angle_deg` | out | 16 signed | angle of arrival in degrees |
| `doa_angle_idx`, `doa_power` | out | 8, 60 | grid index and `P` of the maximum |
| `peak_bin` | out | 10 | frequency-of-interest bin `k` (f = k·fs/1024) |
| `spec_valid`, `spec_idx`, `spec_pow` | out | 1, 8, 60 | `P(θ)` for every grid angle, in order, for display |
| `overflows`, `chunks_done` | out | 16 | chunks lost / processed |

Parameters, with defaults:

| parameter | default | note |
|---|---|---|
| `SCK_HALF` | 8 | sets the sample rate |
| `CLK_HZ` | 50e6 | used only to derive `fs` for the steering table |
| `N` | 1024 | chunk and FFT length |
| `N_ANG`, `ANG_MIN_DEG`, `ANG_STEP_DEG` | 181, −90, 1 | angle grid |
| `MIC_SPACING_M` | 0.04 | microphone spacing `d` in metres; **set this to the real array** |
| `SOUND_MPS` | 343.0 | speed of sound in m/s |
| `T_SNAP` | 1 | chunks averaged per result; widens `doa_power`/`spec_pow` by `clog2(T_SNAP)` bits |

The microphone count (8), the word sizes (24 bits captured, 14 bits stored),
the FFT length and the algorithms are fixed by the design. The following are
this implementation's own choices:

- the spacing, the speed of sound, the sample rate and the angle grid;
- the fixed-point widths;
- the bank scheme and overflow policy;
- the single shared FFT.

## Limits and departures

- **Angle only.** A far-field linear-array spectrum gives no distance, and
  the design has no ranging method.
- **Snapshots come from separate chunks.** Averaging (`T_SNAP > 1`)
  combines whole chunks. It does not average several shorter FFT frames
  within one chunk.
- **Peak frequency from channel 0 only.** All eight channels are
  transformed, because the beamformer needs every channel's value at that
  bin.
- **No host interface.** The Arm-side bus bridge, wave-file recording and
  display are software and are not included.
- **FFT memory.** Its working memory is a multi-port register file; see
  above.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/inmp441_pair_model.sv` is a
behavioural model of a microphone pair on one SD line.

| testbench | what it checks |
|---|---|
| `tb_i2s_clkgen` | SCK period, WS only on SCK falling edges, 32 SCK per slot, strobes |
| `tb_i2s_rx` | random words through the microphone model are decoded exactly |
| `tb_acq_writer` | truncation, addresses, bank alternation, overflow |
| `tb_time_series_ram` | random read/write against a reference, read-before-write |
| `tb_fft_radix2` | four 1024-point inputs against a double-precision DFT; 5121-clock latency |
| `tb_peak_bin_finder` | argmax, ties, range limits, 513-clock search |
| `tb_bartlett_doa` | plane-wave snapshots: angle, every `P(θ)` against a reference, 1811 clocks; a second instance averaging three runs |
| `tb_doa_controller` | at N = 64: channel order, peak bin, snapshot values against a DFT, angle, test-mode bypass |
| `tb_sound_localizer` | whole design at default parameters, from bit streams to angle (about 10 s) |
| `tb_sound_localizer_avg` | whole design at N = 64 with `T_SNAP = 2` and noisy microphones: a result every second chunk |

`tb_sound_localizer` runs three phases:

1. test mode, with the frames checked word for word and no processing
   allowed;
2. a 2861 Hz source at +30°, which must give bin 60 and +30°;
3. the source moved to −40°.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sound_localizer rtl/sl_pkg.sv tb/tb_sound_localizer.sv
./obj_dir/Vtb_sound_localizer
```

Replace the top module and file for any other testbench.
