# CAF engine: joint time-delay and Doppler search in SystemVerilog

A signal that reaches a receiver by way of a moving relay (a satellite, for
instance) arrives late and shifted in frequency. Comparing it with a stored
copy of what was sent gives two numbers: the time difference of arrival (the
delay) and the frequency difference of arrival (the Doppler offset). Both come
from the peak of the *complex ambiguity function* (CAF):

    chi(k, f) = sum_{m=0}^{N-1} conj(ref[m]) * cap[k+m] * exp(+i*2*pi*f*m/f_s)

`ref` is an N-sample reference, `cap` the received signal, `k` a trial delay
and `f` a trial frequency offset. The engine in this repository evaluates
chi(k, f) directly, as dot products, for every delay k = 0..N and for NF
frequency offsets in parallel, and returns the (k, f) of the largest |chi|^2.
No FFT is used: each trial frequency is a numerically controlled oscillator and
a complex multiplier in front of a multiply-accumulate correlator. The default
build has N = 1000, NF = 49, a 12-bit oscillator phase and 8-bit samples.

The RTL is synthesizable SystemVerilog-2017 with AXI4-Stream style
valid/ready interfaces throughout.

## Dataflow

```
             s_ref_*                     s_cap_*
                |                           |
        reference_buffer (N)        capture_buffer (2N)
                |                           |
                +-------- lag_sequencer ----+      replays cap[k..k+N-1] for k = 0..N
                             |  ref[m], cap[k+m], lag k, last-of-lag
         +-------------------+--------------------+   (broadcast to NF lanes)
         |                   |                    |
   freq_shift_0         freq_shift_1   ...   freq_shift_NF-1   (sig_gen + cpx_multiply)
         |                   |                    |
      xcorr_0             xcorr_1      ...     xcorr_NF-1      (conj(ref) * x, accumulate N)
         |                   |                    |
      argmax_0            argmax_1     ...     argmax_NF-1     (best lag of the lane)
         +-------------------+--------------------+
                             |
                        max_select  ------------------------->  m_res_* (lag, lane, |chi|^2)
```

One *lane* per trial frequency. The reference travels through the
frequency-shift pipeline in the side-band (`tuser`) of the capture sample it
belongs to, so the pair stays aligned through any stall.

### Why the capture is 2N long and there are N+1 lags

The reference is N samples long. To let the reference slide fully across a
window of the same length, the capture holds 2N samples and the window
cap[k..k+N-1] is taken for k = 0..N: N+1 dot products of N terms each. A
signal delayed by D samples in the capture (0 <= D <= N) peaks at k = D. The
lag axis is an offset into the capture, not a signed delay: a reader who wants
the signed delay relative to the centre subtracts N/2 (or whatever alignment
the capture was started with).

### How a frame runs

1. Load a reference (N samples on `s_ref_*`). It stays until replaced;
   `ref_loaded` is high once N samples have been written.
2. Stream 2N samples on `s_cap_*`. When the capture is full and a reference is
   loaded, the frame starts (`busy` high). From then on the capture port and
   the reference port refuse data (`tready` low).
3. The `lag_sequencer` reads ref[m] and cap[k+m] for every k and m, one pair per
   clock, and broadcasts them to all lanes. Each lane:
   - `freq_shift` multiplies cap[k+m] by the oscillator sample for index m. The
     oscillator restarts at phase 0 at every new lag, which is exactly the
     exp(i*2*pi*f*m/f_s) term of the equation above.
   - `xcorr` multiplies by conj(ref[m]) and accumulates; at m = N-1 it emits
     chi(k, f_j).
   - `argmax` keeps the k with the largest |chi|^2 (the earliest k on ties).
4. `max_select` compares the NF lane winners (the lowest lane index on ties)
   and offers lag, lane and |chi|^2 on `m_res_*`.
5. Accepting the result empties the capture buffer; the next capture can be
   streamed in. A new reference may be loaded at this point too.

**Timing.** The replay takes (N+1)*N clocks; with the pipelines and the lane
scan the result is valid about (N+1)*N + NF + 13 clocks after the last capture
sample is accepted (1,001,062 clocks at the defaults, roughly 4 ms at
250 MHz). Nothing stalls inside a frame unless `m_res_tready` is held low.

## The oscillator (`sig_gen`)

A PHASE_BITS-bit accumulator advances by PHASE_INC for every sample consumed.
The phase addresses a *half-sine* table of 2^(PHASE_BITS-1) entries covering
[0, pi); the phase MSB negates the value for the second half period. The cosine
is read from the same table a quarter period (2^(PHASE_BITS-2)) ahead. Table
entry k is

    round((2^(N_BITS-1) - 1) * sin(pi * k / 2^(PHASE_BITS-1)))

computed at elaboration time (no data file), rounded half away from zero. The
amplitude is 127 for 8 bits rather than 128 so the waveform is symmetric about
zero and negating it never overflows.

Frequency relations, with f_s the rate at which samples are consumed:

    f_out      = PHASE_INC * f_s / 2^PHASE_BITS
    resolution = f_s / 2^PHASE_BITS        (152.6 Hz for f_s = 625 kHz, 12 bits)
    PHASE_BITS = ceil(log2(f_s / resolution))

Negative frequencies are produced with `CONJ = 1`, which negates the sine
(complex conjugate) instead of using a negative increment.

In the `caf` top, lane j uses the offset o_j = (j - (NF-1)/2) * FREQ_STEP_INC
phase steps: the lanes are centred on zero, `PHASE_INC = |o_j|` and
`CONJ = (o_j < 0)`. With the defaults the 49 lanes cover -24..+24 steps,
i.e. +/-3.66 kHz in 152.6 Hz steps at f_s = 625 kHz. `m_res_freq` is the lane
index j; the offset in Hz is o_j * f_s / 2^PHASE_BITS. Note the sign: lane j
undoes a Doppler shift of -o_j steps in the capture.

## Arithmetic and word widths

All samples are signed two's complement and must be *symmetric*: the most
negative code (-128 for 8 bits) must not occur. This keeps every complex
product inside the width of the product, so the adders need no extra bit.

| Point                         | Width (defaults)                  | Rule |
|-------------------------------|-----------------------------------|------|
| reference, capture I and Q    | SIG_BITS = 8                      | symmetric |
| oscillator cos, sin           | N_BITS = 8                        | amplitude 2^(N_BITS-1)-1 |
| after `freq_shift`            | 8                                 | top 8 of the 16-bit products (a scaling by 1/256, i.e. about x/2 at full oscillator amplitude) |
| `xcorr` product               | 16                                | full width |
| `xcorr` accumulator           | ACC_BITS = 2*SIG_BITS + clog2(N) = 26 | cannot overflow for N terms |
| squared magnitude             | MAG_BITS = 2*ACC_BITS = 52        | x^2 + y^2, unsigned |

`cpx_multiply` is a three-stage pipeline: the four partial products, then
I = xi*yi - xq*yq and Q = xi*yq + xq*yi, then truncation to the top
I_BITS/Q_BITS. All stages share one enable, so the pipeline holds while its
output is waiting; it takes one sample per clock and has a latency of 3. Set
I_BITS/Q_BITS to the full product width to disable truncation (as `xcorr` does).

The magnitude is compared as x^2 + y^2: the square root is monotonic, so the
arg-max is the same and no square-root or CORDIC unit is needed.

## Interfaces of `caf`

All streams use `tvalid`/`tready`; `tdata` packs `{Q, I}`, SIG_BITS each.

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `s_ref_tvalid/tready/tdata` | in/out/in | 1/1/2*SIG_BITS | reference load, written to addresses 0..N-1 (then wraps) |
| `s_cap_tvalid/tready/tdata` | in/out/in | 1/1/2*SIG_BITS | capture, 2N samples per frame |
| `m_res_tvalid/tready` | out/in | 1/1 | one result per frame |
| `m_res_lag` | out | clog2(N+1) | k of the peak, 0..N |
| `m_res_freq` | out | clog2(NF) | lane index of the peak |
| `m_res_mag` | out | 2*ACC_BITS | |chi|^2 at the peak |
| `ref_loaded`, `busy` | out | 1 | status |

Every valid/ready output keeps its data stable while it waits; concurrent
assertions in `cpx_multiply`, `xcorr`, `argmax`, `max_select` and `caf` check
this in simulation.

## Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N` | 1000 | reference length; capture is 2N; lags 0..N |
| `NF` | 49 | number of frequency lanes |
| `PHASE_BITS` | 12 | oscillator phase width |
| `N_BITS` | 8 | oscillator amplitude bits |
| `SIG_BITS` | 8 | I and Q width of reference and capture |
| `FREQ_STEP_INC` | 1 | lane spacing in phase steps |

The default sizes, the 2N capture, the half-sine oscillator, the three-stage
multiplier, the squared-magnitude arg-max and the capture -> frequency-shift ->
correlate -> maximum dataflow follow the published design this RTL implements.
The following are this implementation's own choices, made where that design
leaves the details open:

- how the lags are produced (replaying the capture from the buffer, one sample
  per clock, (N+1)*N clocks per frame);
- the lane offset spacing (centred, FREQ_STEP_INC apart), since no list of
  offsets is fixed;
- loading the reference at run time over a stream, where the published flow
  fixes it when the hardware is generated;
- the frame handshake (fill, freeze, release on result) and the side-band use
  of `tlast`/`tuser`;
- the accumulator width (full precision), the tie rules and the sequential
  lane scan in `max_select`;
- reset behaviour.

Known differences in cost: each lane here holds two complex multipliers (eight
real multipliers: four 8x8 in the frequency shift, four 8x8 in the
correlator), its own 2048-entry oscillator table, and a 26-bit complex
accumulator. The published 49-lane build reports 196 DSP blocks, i.e. four per
lane, so it evidently maps part of this arithmetic differently (the 8x8
products may also go to LUTs). Sharing one table between two lanes, or a
quarter-sine table, would shrink the oscillator memory; neither is done here.
The memories, on the other hand, line up with the published figure of 25.5
block RAMs: 49 oscillator tables of 2048 x 8 bits (half a 36-kbit block each)
plus the 2000 x 16 capture and the 1000 x 16 reference come to about 26.

Scaling of the result: at a perfect match |chi| is about
N * |ref|^2 * (2^(N_BITS-1)-1) / 2^N_BITS (the last factor is the gain of the
frequency shift, 127/256 by default). Divide by |ref|^2 times that gain to get
a peak equal to the correlation length N.

Not part of this RTL: the processor system that drives the streams (on the
original board an ARM core with DDR memory, through the FPGA overlay), and the
RF receiver, downconversion, filtering and decimation in front of the capture.
The `s_cap_*` port is where that front end connects, and the three streams are
where a DMA engine or processor connects.

## Files

| File | Content |
|------|---------|
| `rtl/caf_pkg.sv` | default sizes, half-sine table function |
| `rtl/caf.sv` | top level |
| `rtl/reference_buffer.sv`, `rtl/capture_buffer.sv` | sample memories with synchronous read |
| `rtl/lag_sequencer.sv` | address generator for the lag replay |
| `rtl/sig_gen.sv` | oscillator |
| `rtl/cpx_multiply.sv` | pipelined complex multiplier |
| `rtl/freq_shift.sv` | oscillator x sample |
| `rtl/xcorr.sv` | dot-product correlator |
| `rtl/argmax.sv` | per-lane peak search |
| `rtl/max_select.sv` | cross-lane peak search |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/caf_checker.sv` | stimulus and bit-exact reference model for the top level |

## Verification

Every testbench is self-checking: it compares against values computed
independently in the testbench (integer or `real` arithmetic), has a watchdog,
and ends with a line `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it shows |
|-----------|---------------|
| `tb_cpx_multiply` | random operands under random stalls, 8x8->8 truncating and 12x8->20 full width; latency 3, one sample per clock |
| `tb_sig_gen` | 20 kHz at 625 kHz sample rate (increment 131) and a conjugated -3.5 kHz; every sample, phase restart, amplitude +/-127 |
| `tb_freq_shift` | exact outputs under stalls for both signs; a 50 kHz tone shifted by 131 steps comes out at 69.989 kHz |
| `tb_xcorr` | dot products of random frames, a full-scale frame (no overflow), latency 4 |
| `tb_argmax` | running maximum over frames of random length with ties, latency 2 |
| `tb_max_select` | lane results arriving in random order, ties, acknowledge timing |
| `tb_capture_buffer`, `tb_reference_buffer` | fill/freeze/release, lock, wrap, read latency and hold |
| `tb_caf` | whole engine, N = 32, NF = 5: four frames with planted delay and Doppler (positive, negative, zero offset), reference reload, refused capture and reference writes, result back-pressure; bit-exact against a model and equal to the planted (delay, lane) |
| `tb_caf_full` | the same at the default size (N = 1000, NF = 49), four frames of about a million clocks each |
| `tb_caf_xcorr250` | default-size engine running a 250-sample correlation (reference zero-padded to 1000): copy planted 100 samples in is found at lag 100 in the zero-offset lane |

`caf_checker` builds a pseudo-random +/-100 reference (a PRN-like sequence on
I and Q), plants it in the capture at a random delay with a Doppler offset
equal to one lane's offset, surrounds it with independent random samples, and
computes the expected result with the same integer arithmetic as the hardware.
At N = 1000 the correct lane wins against its neighbours one phase step away:
their oscillator drifts by 1000/4096 of a cycle over the window, which lowers
|chi| by about 10% (sin(pi*x)/(pi*x) with x = 0.244).

To run a testbench with Verilator 5 (example: the small top-level test):

```
verilator --binary --timing --assert -Irtl -Itb rtl/caf_pkg.sv tb/tb_caf.sv \
          --top-module tb_caf -Mdir obj_tb_caf
./obj_tb_caf/Vtb_caf
```

Replace `tb_caf` by any other testbench name. `tb_caf_full` and
`tb_caf_xcorr250` take about a minute to build; they run in about 25 s and 6 s.
