# MFCC feature-extraction core

This core turns a block of 16-bit speech samples into Mel-frequency cepstral
coefficient (MFCC) vectors, the usual front end of a speech or speaker
recogniser. Per frame of speech it produces 12 cepstral coefficients, the
log energy and the 13 delta (velocity) coefficients of those, 26 signed 16-bit
words in all.

The architecture follows the FPGA MFCC core of V.-L. Dao, V.-D. Nguyen,
H.-D. Nguyen and V.-P. Hoang, *Hardware Implementation of MFCC Feature
Extraction for Speech Recognition on FPGA* (AISC 538, 2017). That work gives
the chain of blocks, their bus widths, the arithmetic of each block and a
two-state controller. It does not give the sequencing, the memory sizes, the
number formats or the filter bank size. Those are this design's own choices
and are listed under [Choices made here](#choices-made-here).

## The main idea: frames built from sub-frames

A textbook MFCC front end cuts the speech into overlapping frames, for
example 256 samples advanced by 100, and runs a full FFT on every frame, so
each sample passes through the FFT more than once. This core cuts the speech
into **non-overlapping 80-sample sub-frames** instead. It runs one 128-point
FFT per sub-frame (80 samples plus 48 zeros) and makes the overlap later,
where it costs only additions:

```
frame n  =  sub-frame n  +  sub-frame n+1            (160 samples, 20 ms at 8 kHz)

S'_k(n)  =  SF_k(n) + SF_k(n+1)      mel filter outputs of the two sub-frames
E(n)     =  sum s^2 over sub-frame n + sum s^2 over sub-frame n+1
```

Each sub-frame therefore goes through the FFT and the filter bank exactly
once, and its filter outputs are used by two frames. That is why there is a
"previous SF" register next to the filter bank and an equivalent
"previous energy" register inside the energy unit. It is also why frame `n`
exists only once sub-frame `n+1` has been processed: `N` sub-frames give
`N-1` frames. The first sub-frame of a run produces no output of its own.

Note what this changes compared with a per-frame FFT. The Hamming window is
applied to each 80-sample sub-frame, and the power of the frame is
approximated by adding the magnitude-weighted filter outputs of its two
halves. It is not the spectrum of the 160-sample frame.

## Datapath

```
 speech RAM ─16─► pre-emphasis ─17─► window (x ham(l)) ─21─► FFT 128 ─40+40─► amplitude
     │            s - 31/32 s_prev        5-bit coefs          8-bit twiddles    max+min/4
     │                                                                             │41
     │                                                                    amplitude register (65)
     │                                                                             │41
     │                                                    mel filter bank (20) + overlap ◄─45─► SF' register (20)
     │                                                                             │46
     └─16─► energy (two sub-frames) ─39─────────────────────────────────────► log2 ≈ k + m
                                                                                   │16
                                                 log power register (20) ◄─────────┤
                                                        │16                        │16 (log energy)
                                      cos table ─8─► cepstrum (DCT, 12) ─16─► MFCC RAM ◄─16─► delta
                                                                                   │
                                                                              host read port
```

| Block | Module | What it computes | Latency / rate |
|---|---|---|---|
| Speech RAM | `speech_ram` | 8000 x 16-bit samples; host write port, core read port | read 1 clock |
| Pre-emphasis | `pre_emphasis` | `s_i - 31/32 s_(i-1)`, exact, floor | 1 clock |
| Window coefficients | `hamming_rom` | `round(16 (0.54 - 0.46 cos(2 pi l / 79)))`, l = 0..79 | 1 clock |
| Windowing | `windowing` | `x * ham(l)` | 1 clock |
| Twiddle factors | `twiddle_rom` | `round(64 cos) - j round(64 sin)` of `2 pi k / 128` | combinational |
| FFT | `fft` | in-place radix-2 DIT, 1 butterfly per clock | 448 clocks + 1 |
| Amplitude | `amplitude` | `max(\|I\|,\|Q\|) + min(\|I\|,\|Q\|)/4` | 1 clock |
| Register files | `coef_buffer` | amplitude (65 x 41), previous SF (20 x 45), log power (20 x 16) | read 1 clock |
| Mel bank + overlap | `mel_filter` | 20 triangular filters, then `S' = SF + SF_prev` | 65 + 20 + 3 clocks |
| Logarithm | `log2_approx` | `log2 N ≈ k + m`, shared by the mel and energy paths | 1 clock |
| Energy | `energy` | sum of squares of raw samples, plus previous sub-frame | 1 clock after `finish` |
| DCT coefficients | `cos_rom` | `round(128 cos((k - 0.5) p pi / 20))`, p = 1..12 | 1 clock |
| Cepstrum | `cepstrum` | `C_p = sum_k log S'_k cos(...)`, 1 MAC per clock | 242 clocks |
| Delta | `delta` | `d_n = 2(c_(n+2) - c_(n-2)) + (c_(n+1) - c_(n-1))` | 6 clocks per coefficient |
| MFCC RAM | `mfcc_ram` | 99 frames x 26 words; one write port, two read ports | read 1 clock |
| Controller | `controller` | Idle/Active FSM and step sequencing | — |
| Top | `mfcc_core` | wiring, write-port arbitration of the MFCC RAM | ≈985 clocks per sub-frame |

`mfcc_pkg` holds the widths, the sizes, the control types and the functions
that compute every coefficient table at elaboration. No table file is read.

### Mel filter bank

The 20 filters are triangles with unity peak. Their 22 edge frequencies are
equally spaced on the mel scale `Mel(f) = 2595 log10(1 + f/700)` from 0 Hz to
4 kHz, which is half of the assumed 8 kHz sample rate. In FFT bins the edges
run from 0, 1.06, 2.23, ... up to 57.5 and 64. Because neighbouring triangles
share their edges, every bin `l` lies between two edges `j` and `j+1` and
feeds only two filters:

```
filter j+1 (rising side)  += |X(l)| * w(l)        >> 7
filter j   (falling side) += |X(l)| * (128 - w(l)) >> 7
w(l) = round(128 (l - edge_j) / (edge_(j+1) - edge_j))
```

So the bank needs one bin per clock, two multipliers and a 65-entry table of
`(j, w)` pairs instead of a 20 x 65 weight matrix. Filter 0 and filter 21 are
discard accumulators for the two ends of the spectrum. After the 65 bins the
unit walks through the filters. For each one it reads the previous
sub-frame's `SF_k`, outputs `S'_k = SF_k + SF_k(prev)` and writes the new
`SF_k` back in its place.

### Logarithm

`log2_approx` takes the position `k` of the leading one as the integer part
and the next ten bits as the fraction. This is exact at powers of two and
reads at most 0.086 low in between. The result is unsigned Q6.10 and covers
inputs up to 2^64.

## Number formats

| Signal | Width | Format |
|---|---|---|
| speech sample | 16 | signed integer |
| pre-emphasised sample | 17 | signed integer (never overflows: \|s - 31/32 s'\| ≤ 64,512) |
| Hamming coefficient | 5 | unsigned, 16 = 1.0 (values 1..16) |
| windowed sample | 21 | signed integer (17 x 5 bits, fits because the coefficient is at most 16) |
| twiddle factor | 8 + 8 | signed Q1.6, so +1 and -1 are exact |
| FFT output | 40 + 40 | signed integer, no scaling between stages (growth ≤ 7 bits) |
| amplitude | 41 | unsigned |
| mel weight | 8 | unsigned, 128 = 1.0 |
| SF / S' | 45 / 46 | unsigned |
| energy | 39 | unsigned |
| log2 | 16 | unsigned Q6.10 |
| DCT coefficient | 8 | signed Q0.7 (-128 = -1.0 exact, +1.0 clipped to 127) |
| cepstral coefficient | 16 | signed Q11.4 (`sum(log x cos) >>> 13`, cannot overflow with 20 filters) |
| log energy word | 16 | Q6.9, i.e. log2(E) x 512, always positive |
| delta | 16 | same scale as its coefficient, saturated |

## Controller and timing

The controller has exactly two states. `rst_n` low puts it in **Idle**. In
either state `start = 1` keeps the state and `start = 0` moves to the other
one. In practice `start` is an active-low request: hold it high, pull it
low for one clock to start a run, and pull it low again to leave the
finished run or abandon a run in progress. `start` must not stay low, or the
state changes on every clock.

While **Active**, a step register walks through every sub-frame. The step
sequencing is this design's own. The clock counts below are for the default
sizes:

| Step | Clocks | What happens |
|---|---|---|
| LOAD | 83 | 80 samples: RAM → pre-emphasis → window → FFT input (bit-reversed); raw samples → energy |
| PAD | 48 | zeros into FFT inputs 80..127 |
| FFT | 450 | 7 x 64 butterflies |
| AMP | 66 | bins 0..64 → amplitude → amplitude register |
| MEL | ≈90 | filter bank, overlap, log of S' → log power register |
| ENERGY | 4 | close the sub-frame energy, log, write word 12 of the frame |
| CEP | ≈243 | 12 x 20 MACs → words 0..11 (skipped for sub-frame 0) |
| NEXT | 1 | next sub-frame, or go to DELTA |

After the last sub-frame, DELTA reads four neighbours per coefficient and
writes words 13..25 of every frame. That takes 6 clocks per coefficient, or
7,722 clocks for 99 frames. The controller then sits in DONE with `done`
high. A full default run over 100 sub-frames (1 s of speech at 8 kHz) takes
105,881 clocks. That is about 0.8 ms at 139 MHz, far below real time.

The first sub-frame of a run starts from a clean history. The pre-emphasis
previous sample and both energy sums are cleared when Idle → Active. The
previous-SF register is not cleared, because the first sub-frame's overlap
sums are never used.

## Using the core

Ports of `mfcc_core` (parameters: `N_SUBFRAMES = 100`, from which the RAM
sizes follow):

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | active-low run request (see above) |
| `spch_we`, `spch_waddr`, `spch_wdata` | in | write a speech sample at address `n` (sample `n` of the utterance) |
| `mfcc_raddr` | in | read address into the MFCC RAM |
| `mfcc_rdata` | out | word at `mfcc_raddr`, one clock later |
| `active` | out | controller is Active |
| `done` | out | all frames and deltas are written |

The address of word `i` of frame `n` is `26 n + i`:

| `i` | content |
|---|---|
| 0..11 | C1..C12, Q11.4 |
| 12 | log2 of the frame energy, Q6.9 |
| 13..24 | delta of C1..C12 |
| 25 | delta of the log energy |

Load the speech before starting. The speech RAM must not be written while a
run is Active.

## Choices made here

Where the source gives a value, the RTL uses it: the 80-point sub-frame, the
128-point FFT, all bus widths (16, 17, 5, 21, 8, 40, 41, 45, 46, 39, 16), the
pre-emphasis factor 31/32, the amplitude approximation, the `k + m`
logarithm, the DCT and delta formulas, 12 cepstra plus energy, and the
two-state controller with its transitions. The following are this design's
own:

* **Sample rate 8 kHz and 20 mel filters.** Neither is given. 8 kHz makes a
  160-sample frame 20 ms long.
* **Sizes of the two RAMs:** 8000 samples (1 s) and 99 frames.
* **Every number format** in the table above, including the scaling of the
  window, twiddle, mel and DCT coefficients and the 13-bit cepstrum shift.
* **The pre-emphasis factor is 31/32, not 0.95.** The algorithm is often
  described with 0.95. The core uses 31/32, which needs only a shift.
* **The delta formula is the five-frame one above**, not the simpler
  `(c(t+1) - c(t-1)) / 2`. Frames beyond either end are replaced by the
  nearest frame, and the result is saturated to 16 bits.
* **The frame energy is the sum of the two sub-frame energies**, taken from
  the raw (not pre-emphasised) samples.
* **The log energy is stored as Q6.9** so that it reads as a positive signed
  word. The deltas are computed on that scale.
* **The FFT organisation:** in-place radix-2, one butterfly per clock, no
  inter-stage scaling.
* **The step sequencing inside Active** and the one-clock registered reads of
  every memory.
* **No double-delta features are computed.** Acceleration features (39 per
  frame) are common in MFCC front ends, but the core's block diagram has no
  block for them.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed independently: floating-point formulas for the
tables, a floating-point DFT with tolerance plus a separate fixed-point FFT
model for the FFT, and bit loops for the logarithm. The top-level
testbenches use `mfcc_ref_pkg`, a behavioural model of the whole chain.
`tb_mfcc_core` (6 sub-frames) and `tb_mfcc_core_full` (the default 100
sub-frames) check every word of the MFCC RAM bit for bit over two complete
runs. They also cover an abandoned run and the Idle/Active transitions, and
they count how often each step happened. The test speech is synthetic (two
tones plus noise, with silent and near-full-scale sub-frames).

Not checked:

* synthesis on an FPGA, timing or resource use;
* how well the fixed-point features agree with a floating-point MFCC
  implementation, or recognition accuracy;
* inputs other than the synthetic signal above.

The quantisation is coarse in places. The 5-bit window and the 8-bit
twiddles limit the spectral accuracy, and the testbench accepts FFT errors
up to 3 % of the input's L1 norm against an exact DFT. Widen `HAM_W`/`TW_W`
in `mfcc_pkg` if that matters. The tables follow, but the bus widths
downstream must then be adjusted by hand.

## Simulating

With plain Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mfcc_pkg.sv tb/mfcc_ref_pkg.sv tb/tb_mfcc_core_full.sv \
    --top-module tb_mfcc_core_full -o sim
./obj_dir/sim
```

Any other testbench builds the same way: replace the file and the top module
with `tb_<module>`. Packages must come first on the command line. Every
testbench prints one line `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog, if the design hangs. The full-size run takes well under a
second.

## Changing it

* `N_SUBFRAMES` on `mfcc_core` sets the utterance length. The RAM depths and
  the frame count follow from it.
* `NFILT`, `NCEP`, `SUBFRAME`, `NFFT` and `FS_HZ` in `mfcc_pkg` change the
  filter bank, the number of cepstra, the framing and the mel edges. The
  coefficient tables are recomputed at elaboration. The fixed 7-bit index
  buses in `mfcc_core` assume `NFFT = 128`, and the cepstrum shift assumes
  about 20 filters.
* The testbench model `mfcc_ref_pkg` takes the filter count as an argument,
  but it has 80, 128 and 8 kHz written in. Change it together with the RTL.
