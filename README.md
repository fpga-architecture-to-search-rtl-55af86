# FDAS: an FPGA engine for Fourier-domain acceleration search

A pulsar in a tight binary orbit changes its apparent spin frequency during an
observation. In the power spectrum of the time series its harmonics are then
smeared over many Fourier bins and can fall below the noise. The Fourier-domain
acceleration search (FDAS) undoes this drift. It correlates the complex spectrum
with a bank of matched filters, one per trial acceleration. Each filter's output
power forms one row of the **filter-output plane (FOP)**. The engine then sums
the power at the expected positions of up to eight harmonics to find weak
periodic signals.

This RTL implements the FPGA architecture described in *"FPGA architecture to
search for accelerated pulsars with SKA"*. Its main configuration is:

* a spectrum of 2^22 complex bins (one dispersion measure);
* 85 matched filters, numbered −42 … +42 (filter 0 is zero acceleration);
* a 1024-point FFT convolution that handles the 85 filters in six iterations;
* a column-ordered FOP in external memory;
* harmonic summing of up to eight harmonics;
* host control with diagnostic modes.

The structure, the sizes above and the harmonic-position rules come from that
paper. The word widths, bus protocols, filter length, lane count, the
overlap-save scheme and the register map are this implementation's own choices.
They are marked as such below and in each file header.

```
 spectrum ──► matched_filter ───────────────► fop_arbiter ◄──► external FOP memory
 (stream)     ring buffer → FFT → ×template        ▲  ▲
              (+p and −p) → 16 IFFT lanes          │  │
              → |.|² → FOP writes                  │  │
                 ▲                                 │  │
            template_mem ◄── fdas_regs ────────────┘  │   (host FOP readout)
                             ▲  (host bus)            │
                             │                        │
                      harmonic_summer ────────────────┘ ──► detections (stream)
```

## Matched filtering by FFT convolution

Each filter is an FIR of up to `NTAPS` = 421 taps (this design's choice) that
runs along the frequency bins of the spectrum. All filters are applied by
**overlap-save** FFT convolution (`matched_filter.sv`):

1. **Segments.** The input is cut into 1024-bin segments that overlap by
   420 bins, so each segment adds V = 604 new bins. A 1024-word ring buffer
   holds the current segment. Only V new inputs are needed per segment. Bins
   before bin 0 and after the last bin read as zero.
2. **Forward FFT.** Each segment is transformed once. The result stays in the
   forward FFT core for the rest of the segment.
3. **Template products in lane pairs.** The templates are the FFTs of the
   filters. They are applied in six iterations of eight *lane pairs*. In
   iteration `i`, lane pair `l` reads template `p = 8i + l`. It forms both
   `X·T_p` and `X·conj(T_p)` from one set of four real multiplications
   (`conj_pair_mult.sv`).
4. **Inverse FFTs.** The sixteen lanes then run their inverse FFTs together.
5. **Detection and write-back.** The 604 valid outputs of every lane are
   detected (`|y|²`, `power_detect.sv`) and written to the FOP.

**Why the conjugate gives the negative filter, and why templates are centred.**
A positive and a negative acceleration of the same size give responses that
are complex conjugates of each other, reversed in frequency. In the FFT domain
of the convolution, that makes the template of filter −p the complex conjugate
of the template of +p. So only templates 0..42 are stored (`template_mem.sv`,
43 × 1024 words).

Conjugation also reverses the filter in bin order. A causal filter would turn
into an anti-causal one and break the overlap-save window. The engine therefore
expects **centred** templates: template p is the 1024-point FFT of the taps
h_p[−210..210], with tap j placed at circular index j mod 1024. The conjugate
then has the same support, so filters +p and −p share one valid window
(segment positions 210..813). Output bin c of every filter also lines up with
input bin c:

    y_{+p}[c] = Σ_j h_p[j]·x[c−j],     y_{−p}[c] = Σ_j conj(h_p[−j])·x[c−j],   j = −210..210

Template coefficients are signed Q1.15 pairs `{re[31:16], im[15:0]}`, and every
template bin must have magnitude below 1.0. Computing the templates, including
the frequency reversal and conjugation of the matched filter, is done by the
host.

**Fixed-point scaling.** Inputs are 16-bit signed per component. The engine
shifts them left by 14 bits into the 32-bit FFT datapath. Both FFTs halve every
stage, so neither can overflow. The lane output is the true convolution times
2^14/N (×16 for N = 1024). The stored FOP word is `(re²+im²) >> PSHIFT`,
saturated to 32 bits. `PSHIFT` (default 16) sets where the 32-bit word sits in
the dynamic range: pick it for the expected signal level. At N = 1024 the
amplitude error is a few output LSBs, from rounding in ten FFT stages.

**The FFT core** (`fdas_fft.sv`) is an in-place radix-2 decimation-in-time
engine:

* Samples are loaded in natural order and stored bit-reversed.
* It runs one butterfly per clock, 5120 clocks per 1024-point transform.
* Results are read in natural order.
* Twiddles (16 fractional bits) are computed at elaboration.

## The filter-output plane

The FOP is one 32-bit power word per (bin, filter). It is stored **column
ordered**: all 85 filters of one bin are adjacent.

    address(bin c, filter f) = c·85 + f + 42          (filter +42 at the highest address of a column)

With this layout the summer reads each neighbourhood of a harmonic as a single
linear burst. The FOP (85 × 2^22 words, 1.43 GB) lives in external memory. The
engine's `mem_*` port is a plain one-word request/grant interface:

* a request is accepted when `mem_req && mem_gnt`;
* read data returns in order on `mem_rvalid` with any latency.

A DDR controller bridge goes there. `fop_arbiter.sv` shares the port between
three users by fixed priority:

1. FOP writes from the matched filter;
2. harmonic-summer reads;
3. host readout.

It routes each read's data back to the user that asked for it through a FIFO
of requester IDs.

## Harmonic summing

For a fundamental at bin b and filter f (`harmonic_summer.sv`):

* **Where harmonic h can be.** The fundamental need not be bin-centred: it
  lies anywhere in b ± 0.5, so harmonic h lies in h·b ± h/2. The summer takes
  bins h·b − ⌊h/2⌋ … h·b + ⌊h/2⌋: 1, 3, 3, 5, 5, 7, 7 and 9 bins for
  h = 1..8, 40 in all.
* **Which filter.** The frequency drift caused by acceleration grows in
  proportion to the harmonic number, so harmonic h is recovered by filter h·f.
  Sums whose filter h·f falls outside −42..42 are not formed. This means the
  full eight-harmonic sum exists only for |f| ≤ 5.
* **Per fundamental bin.** The summer reads the 40 columns as eight linear
  bursts (3400 words). For every filter row it keeps the **maximum** over each
  harmonic's neighbouring bins.
* **Per filter row.** It then runs the adder chain S_k = S_{k−1} + H_k[k·f]
  for k = 1..8. It compares each S_k with its own threshold T_k. The chain
  has a register after every adder, so a new filter row enters each clock
  and its result leaves eight clocks later. A detection that waits on the
  output stream holds the whole chain.
* **Detections.** Any row with a sum over threshold emits a detection
  (`det_t`): bin, filter, an 8-bit mask of which S_k passed, and the largest
  passing sum.

Combining neighbouring bins by maximum and using one threshold per harmonic
count are this design's choices. The source does not fix them.

## Host control and diagnostics

`fdas_regs.sv` is the register side of the host link. In the system that link
is a PCIe core, which is not part of this RTL. The bus is simple:

* writes take effect at the clock edge;
* a read returns `host_rvalid` one clock later for plain registers, two clocks
  later for template read-back, and after the memory latency for FOP reads.

| addr | register | use |
|---|---|---|
| 0x00 | CTRL (W) | bit0 start matched filter, bit1 start harmonic summing, bit2 single step |
| 0x01 | MODE | bit0 single-step mode: halt after each segment / fundamental bin |
| 0x02 | STATUS (R) | bit0 mf busy, bit1 hs busy, bit2 waiting for step, bit3 mf done, bit4 hs done |
| 0x03/0x04 | HS_BSTART / HS_BEND | range of fundamental bins to search |
| 0x05 | DETCNT (R) | detections in the last search |
| 0x06 | BLKCNT (R) | segments finished |
| 0x10 | TPL_ADDR | template p [23:16], bin k [15:0] |
| 0x11 | TPL_DATA | write coefficient / read it back; advances k, then p |
| 0x12 | FOP_ADDR | FOP word address for host readout |
| 0x13 | FOP_DATA (R) | read one FOP word straight from memory; advances the address |
| 0x20–0x27 | THRESH k | threshold of the sum of k harmonics |

A typical run:

1. Load the 43 templates.
2. Start the matched filter and stream the spectrum.
3. Wait for STATUS.mf_done.
4. Set the bin range and thresholds.
5. Start harmonic summing and collect detections from the `det_*` stream.

The host may read the FOP or the templates at any point. The sizes (FFT length,
filters, lanes, spectrum length) are module parameters. They are not registers.

## Parameters (`fdas_pkg.sv`, `fdas_top.sv`)

| parameter | default | origin |
|---|---|---|
| `NP` / `NPTS` | 4,194,304 (2^22) | source design |
| `NF` / `NFILT` | 85 (−42..42) | source design |
| `N` / `NFFT` | 1024 | source design |
| `NHARM` | 8 | source design |
| `TAPS` / `NTAPS` | 421 (odd) | own choice |
| `LP` / `LANE_PAIRS` | 8 → ⌈43/8⌉ = 6 iterations | own choice, chosen to match the six iterations |
| `IN_W`, `FFT_W`, `TPL_W`, `POW_W`, `SUM_W` | 16, 32, 16, 32, 36 | own choice |
| `PSHIFT` | 16 | own choice |

## Throughput and how it compares

One segment takes about 101,600 clocks:

* fill: 604;
* load: 1024;
* forward FFT: 5122;
* six iterations of multiply (1025) + inverse FFT (5122) + 604 × 16 FOP writes.

A whole 2^22-bin spectrum needs 6945 segments, about 706 M clocks. Harmonic
summing needs about 3,500 clocks per fundamental bin. The source estimates
500 ms per spectrum for its prototype. This implementation does not reach that
at realistic clocks: at 300 MHz the matched filtering alone takes about 2.4 s.
The limits are the one-word-per-clock FOP port (356 M words, 1.19 s at
300 MHz) and the single butterfly per FFT core. A wider memory port and more
lanes or a pipelined FFT would be the first changes.

## Where this departs from, or goes beyond, the source description

* The source gives 84 filters in one place and 85 everywhere else. This design
  uses 85.
* Filter length, overlap-save, centred templates, widths, scaling, lane count,
  bus protocols, the register map and the arbitration are own choices.
* The harmonic summer's neighbourhood maximum and per-k thresholds are own
  choices. The source's summing-tree details beyond the adder chain are not
  modelled.
* The prototype's two DDR4 modules are modelled as one FOP port. The DDR4
  devices, their controller and PHY, and the PCIe core are outside this RTL.
* Proposed extensions (a new summing tree, 16 harmonics on the zero-acceleration
  row) are not implemented.
* The engine does not compute templates. The host supplies them.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_fdas_fft` | forward (scaled) and inverse transforms against a double-precision DFT; N/2·log2N clocks per transform |
| `tb_conj_pair_mult`, `tb_power_detect` | arithmetic against real/128-bit references, saturation |
| `tb_template_mem` | host write/read-back and banked lane reads |
| `tb_matched_filter` | every FOP word against a direct time-domain convolution; single-step, stalls, input gaps, padding |
| `tb_harmonic_summer` | detections against a reference search, with backpressure and single-step |
| `tb_fop_arbiter` | priority and in-order routing of read data to three users |
| `tb_fdas_regs` | register map, pulses, status, template and FOP access |
| `tb_fdas_top` | end to end at a small size (16-point FFT, 9 filters, 64 bins); counts every mechanism |
| `tb_fdas_top_n1024` | end to end with the default FFT length, filter length, filter count and lanes (1024, 421, 85, 8) on a 1208-bin spectrum (two segments) |

The end-to-end harness `tb/fdas_top_e2e.sv` does the following:

* loads the templates through the registers and reads them back;
* runs the matched filter in single-step mode with a gapped input stream;
* checks the whole FOP against direct convolution;
* runs the summer while the host reads the FOP through the diagnostic path,
  so the two compete for the memory port;
* compares the detections with a reference search.

`tb/fop_mem_model.sv` is a behavioural external memory with random stalls and
fixed read latency.

The largest size simulated is N = 1024, 85 filters, 421 taps and 8 lane pairs
on 1208 bins. A full 2^22-bin spectrum (706 M clocks, a 356 M-word FOP) is too
large to simulate with a reference model.

To run one, for example:

```
verilator --binary --timing --assert -Irtl rtl/fdas_pkg.sv -y rtl -y tb tb/tb_fdas_top_n1024.sv \
          --top-module tb_fdas_top_n1024 -o sim && ./obj_dir/sim
```

All RTL is synthesizable SystemVerilog-2017. Memories are plain arrays: the
FFT working memories, the ring buffer and the template banks. Assertions check
the FFT load rule, stable requests under stall, and the arbiter's response
bookkeeping.
