# DMT transceiver core for VDSL

Discrete multi-tone (DMT) modulation splits a copper line into thousands
of narrow sub-channels. Each sub-channel (tone) carries a QAM point, and
one inverse FFT turns all of them into a block of line samples. A short
copy of the block's tail, the cyclic prefix, goes in front, so the
channel's echo only rotates and scales each tone. The receiver then needs
just one complex multiplication per tone to undo the channel.

This RTL is the digital core of such a transceiver for VDSL:

- **Transmitter:** a variable-length IFFT (512 to 8192 points) followed by
  cyclic-prefix insertion.
- **Receiver:**
  - an adaptive time-domain equaliser (TEQ) that shortens long channels;
  - a correlation-based symbol synchroniser and prefix removal;
  - the same variable-length FFT;
  - an adaptive one-tap frequency-domain equaliser (FEQ) with QAM decisions;
  - a pilot-tone timing-recovery loop that drives the sampling clock.

The main hardware idea is the FFT. It is one pipeline that handles all
five transform sizes, so the same block serves as modulator and
demodulator.

Everything is parameterised. The defaults are the 8192-point mode:
4096 tones, a 640-sample prefix and pilot tone 64.

## The variable-length pipelined FFT (`vdsl_fft`)

### Structure

The transform is a single-path delay-feedback (SDF) pipeline. It takes one
complex sample per clock, and every stage is a radix-2 butterfly with a
delay line. In the first half of a block, the stage writes its input into
the delay line and outputs the sample that was waiting there. In the
second half, it outputs the sum and difference of the waiting sample and
the new one: one result goes out and the other is stored.

There are seven stages:

| stage | kind | delay words |
|---|---|---|
| 1–4 | radix-2 (`fft_sdf_stage`) | 4096, 2048, 1024, 512 |
| 5 | radix-2/4/8 element (`fft_r248_pe`), M = 512 | 256+128+64 = 448 |
| 6 | radix-2/4/8 element, M = 64 | 32+16+8 = 56 |
| 7 | radix-2/4/8 element, M = 8 | 4+2+1 = 7 |

The total is 8191 words, the minimum for an 8192-point SDF pipeline.

### Radix-2/4/8 elements

A radix-2/4/8 (radix-2^3) element is three SDF butterflies in a row. Only
the third needs a general twiddle multiplier:

- after the first butterfly, a trivial multiplication by −j;
- after the second, a multiplication by a power of W8 (±1, ±j, or
  a multiple of 1/√2, which needs only a constant multiplication);
- after the third, a general twiddle W_M^(n·k) from `fft_twiddle_rom`.

This is what makes radix-2^3 cheaper than radix-2: there is one full
complex multiplier per three butterflies.

### Modes

The `mode` input (1..5 = 512, 1024, 2048, 4096, 8192 points) chooses
where a block enters the pipeline:

- 8192 points use every stage;
- 4096 points skip stage 1;
- and so on, down to 512 points, which enter the first radix-2/4/8 element.

Stages before the entry point are bypassed. Their twiddle index is scaled
to the smaller size, so one 8192-entry twiddle table serves every mode.
The twiddle table holds a quarter wave, round(2^14·cos) and
round(2^14·sin), computed at elaboration. Quadrant logic covers the rest
of the circle.

### IFFT

The IFFT uses the same pipeline: the real and imaginary parts are
exchanged at the input and again at the output.

### Scaling

Each butterfly may halve its result, under one bit of `scale`, counted
from the entry stage. All ones gives DFT/N, and with `inverse` set, the
plain inverse DFT.

### Timing and output order

- One sample per clock when `in_valid` is high. Idle cycles simply stall
  the pipeline.
- `in_sof` marks the first sample of each block.
- The first output of a block appears after N−1+S further valid input
  samples, where S is the number of butterflies the mode uses. Blocks may
  follow back to back.
- Output is in bit-reversed order. `out_bin` gives the bin number of every
  output sample, and `out_sof` marks the first output of each block.

## Transmit side

### Tone input

`tx_bin_*` carries one complex value per bin. Bins N/2+1..N−1 must be the
conjugates of bins 1..N/2−1, so that the line signal is real. Producing
this is the job of the bit-mapping stage in front, which is not part of
this core.

### Prefix insertion (`cp_insert`)

The IFFT output goes into one half of a double buffer, at the address
given by its bin number. This puts the block back into natural order.

The other half is read out through a valid/ready interface to the DAC:
first the last CP_LEN samples (the prefix), then all N samples. `overrun`
flags an IFFT block that arrives while both halves are still full.

## Receive side

### TEQ (`teq`)

The TEQ is an NT-tap FIR filter on the ADC samples. It is trained by LMS
so that its output matches the transmitted reference, filtered by a short
target response b and delayed by `delta`:

- e = b∗x(n−Δ) − w∗y
- w += μ·e·y

μ = 2^−(30+mu_shift) against the Q2.30 coefficients. Taps start at a unit
impulse. With `adapt` low, the coefficients are held.

### Symbol synchronisation (`sym_sync`)

The prefix repeats the block's last CP_LEN samples, so samples N apart
correlate strongly only inside the prefix. The synchroniser:

- multiplies each sample by the conjugate of the sample N earlier;
- keeps a running sum of that product over CP_LEN samples;
- searches each symbol period (N+CP_LEN samples) for the peak of |re|+|im|.

The peak position is reported as the boundary once per period. Neighbouring
samples often give almost the same metric, so the estimate can alternate
between two adjacent positions.

### Prefix removal (`cp_remove`)

`cp_remove` passes on the N samples after each prefix, marking the first
one with `out_sof`.

The window starts BACKOFF (4) samples early, still inside the prefix. A
one-sample-late estimate therefore never reaches into the next symbol. The
early start only rotates each tone's phase, and the FEQ absorbs that.

Moves of the boundary by up to TOL (1) sample are ignored. The top level's
`sync_track` input also lets the window be frozen once training has settled.

### FFT

A second `vdsl_fft` instance runs forward. The FEQ takes only bins below
N/2.

### FEQ and decisions (`feq`, `qam_slicer`)

Each of the 4096 tones has one complex coefficient C, held in a memory
and read once per tone:

- Y = C·X
- the slicer turns Y into the nearest QAM point Ỹ
- LMS update: C += μ·e·conj(X), with e = Ỹ − Y

**Training:** while `train` is high, the error is taken against the known
reference `ref_sym` instead of Ỹ.

**Initial value:** a tone's coefficient reads as 1.0 until it is first
updated.

**Bit loading:** a table written through `bt_*` gives each tone's bit
count (0..15). Tones with 0 bits are neither decided nor adapted.

**Constellation:** the grid has spacing 2^(DSH+1), with points at odd
multiples of 2^DSH. Even bit counts give square QAM. Odd bit counts give a
rectangular constellation with one more bit on the real axis.

### Timing recovery (`timing_recovery`)

On the pilot tone (bin 64), the phase detector forms Im(X·conj(P)) against
the known pilot point P. The error then passes through two filters:

- a first-order low-pass prefilter;
- a proportional-integral loop filter.

All gains are powers of two set by shift inputs. The output `vco_ctrl`
is the word for the DAC that steers the sampling VCO. Together with the
VCO, the loop is second order and tracks a constant frequency offset.

## Number formats

| quantity | format |
|---|---|
| samples | 16-bit two's complement, complex as `cplx_t {re, im}` (`vdsl_pkg`) |
| twiddles | Q2.14 |
| TEQ coefficients | Q2.30 |
| FEQ coefficients | 32 bits with 24 fractional bits |

All rounding is round-half-up, followed by saturation to 16 bits.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and ends with `$finish`.

```
verilator --binary --timing -j 4 --top-module tb_vdsl_fft \
  -Irtl rtl/vdsl_pkg.sv rtl/*.sv tb/tb_vdsl_fft.sv
./obj_dir/Vtb_vdsl_fft +verilator+rand+reset+2
```

`tb_vdsl_transceiver` runs the whole core at its default size and takes a
few seconds:

1. Sixteen random 4-QAM symbols go through IFFT and prefix insertion.
2. They pass through a two-tap echo channel and the TEQ.
3. The receiver synchronises and demodulates them.
4. The FEQ trains on the first ten symbols, and all data-symbol decisions
   must match what was sent.

The testbench counts every mechanism (prefixes, boundary reports, FFT
frames, TEQ updates, FEQ training and decisions, timing updates) and
fails if one never happens.

## Departures and own choices

- **FEQ update:** the update uses conj(X). The LMS form without the
  conjugate does not converge for complex data.
- **Prefix length:** 640 samples (for 8192 points) is a typical VDSL value,
  not a number from the design's source.
- **Unspecified sizes:** the TEQ length (16 taps, 8-tap target, delay up to
  32), all word lengths and all step sizes are own choices.
- **Mode-fixed framing:** the FFTs switch among all five modes, but the
  prefix, synchroniser and FEQ blocks are instantiated for one size (the
  NFFT parameter). Other modes need other parameter values.
- **FFT instances:** transmit and receive use separate FFT instances.
- **Not included:**
  - the data interface, Reed-Solomon coding, interleaving, deinterleaving
    and the decoder;
  - the RFI canceller;
  - the analog front end: DAC, filters, line driver, transformer, AGC,
    ADC and VCO.

  Their signals are ports of `vdsl_transceiver`.
