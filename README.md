# Two-stage filter-bank channelizer for a dual-mode GSM / W-CDMA base station

A base-station receiver that digitises a whole IF band must cut it into
individual radio channels, bring each to baseband and lower its sample rate.
A single DFT filter bank does this cheaply, but only for one channel spacing:
its channel width is fixed by the sample rate and the number of channels. GSM
(200 kHz channels, 270.8 ksym/s) and W-CDMA (5 MHz channels, 3.84 Mchip/s)
need different banks.

This RTL implements the two-stage answer to that problem, following the
published multistage filter-bank (MSFB) channelizer architecture:

1. a **fixed front-end DFT filter bank** with a coarse channel spacing
   (5 MHz) whose passbands **overlap**, so that no narrow channel falls into a
   gap between two coarse channels;
2. a **sample rate changer (SRC)** per receive path, converting the coarse
   channel's rate fractionally so that it fits the next stage;
3. for narrow standards, a **back-end DFT filter bank** that splits the coarse
   channel into the fine channels (200 kHz).

Every fixed coefficient product (prototype filter taps, FFT twiddles, SRC
filter taps) is a canonical-signed-digit (CSD) shift-and-add, so the filter
banks contain no multipliers.

## Signal flow and rates

```
 ADC 80 Msps (real, 16 bit)
   │
   ▼
 front-end DFT filter bank   16 channels, ↓2, 144 taps, overlap d = 0.04
   │ 16 complex channels at 40 Msps, 5 MHz apart
   ├── select gsm_fe_sel ──► SRC 4/25 (no upsampling) ─► 6.4 Msps
   │                          └─► back-end DFT filter bank  32 channels, ↓8, 256 taps
   │                                └─► 32 GSM channels at 800 ksps, 200 kHz apart
   └── select wcdma_fe_sel ─► SRC 12/125 (upsampling by 4) ─► 3.84 Msps W-CDMA
```

| Stage | Channels K | Decimation M | Oversampling K/M | Prototype taps | Passband edge | Stopband edge |
|---|---|---|---|---|---|---|
| Front end | 16 | 2 | 8 | 144 | 1.04·π/16 | 2π/16 |
| Back end | 32 | 8 | 4 | 256 | π/32 | 2π/32 |

| Rate changer | Ratio out/in | Upsampling L | Interpolation |
|---|---|---|---|
| GSM | 4/25 (40 → 6.4 Msps) | 1 | linear |
| W-CDMA | 12/125 (40 → 3.84 Msps) | 4 | linear |

The overlap factor follows d = K·f'/Fs with f' the narrower channel spacing:
16 · 200 kHz / 80 MHz = 0.04. It stretches each front-end passband by half a
GSM channel past the midpoint between two front-end centres (2.5 → 2.6 MHz),
so the outermost GSM slot of a front-end channel (centred 2.4 MHz from it) is
passed whole. The back end needs no overlap.

The GSM output is at 800 ksps, not a multiple of the 270.8 ksym/s symbol rate.
The final conversion to the symbol rate is left to the baseband processor,
where the rate is already low. That processor is not part of this RTL.

## How the DFT filter bank works (`dft_filterbank`)

Channel k of a K-channel bank is centred at w_k = 2πk/K. Its output is the
input shifted down by w_k, low-pass filtered by the prototype h0 and kept
every M-th sample:

    y_k[m] = Σ_r h0[r] · x[n_f − r] · exp(−j·w_k·(n_f − r)),   n_f = newest sample of frame m

Evaluating that for all K channels at once is done in three steps:

* **Polyphase folding** (`polyphase_filter`). The last N samples sit in a
  delay line. Each time M new samples have arrived (a *frame*), the line is
  multiplied tap by tap with h0 and folded modulo K:
  u_l = Σ_p h0[pK+l] · x[n_f − pK − l]. These are the K polyphase branch
  filters E_l. Because the line moves by M < K samples per frame, this is the
  oversampled form of the bank.
* **Output modulation as a rotation.** Writing the sum with an IDFT gives
  y_k = exp(−j·w_k·n_f) · Σ_l u_l · exp(+j·2πkl/K). The leading phase factor
  is the per-channel modulation exp(−jMn·w_k) of the classic polyphase
  diagram. Since w_k·n_f is a multiple of 2π/K, that factor is applied exactly
  by rotating the IDFT input: v_l = u_((l + n_f) mod K). It costs a K-way
  barrel shift instead of K complex multipliers. `polyphase_filter` reports
  n_f mod K with each frame (`u_rot`).
* **IDFT** (`idft_radix2`). This is a fully parallel radix-2
  decimation-in-time FFT with the + sign, unscaled. Trivial twiddles (1, j)
  cost nothing. Every other twiddle is four CSD constant products rounded at
  14 fraction bits.

For the real ADC input, channel k and channel K−k carry mirror images. The
front-end channels 0..8 are the distinct ones; channel 8 sits at 40 MHz.

### Prototype filters

The prototype coefficients are computed during elaboration (`msfb_pkg`,
`polyphase_filter`). No coefficient file is used. Each prototype is an ideal
low-pass with its cutoff midway between the passband edge (1+d)·π/K and the
stopband edge 2π/K. It is shaped by a Kaiser window, scaled to unity DC gain
and rounded to 16-bit words. The words use as many fraction bits as the
centre tap allows: 18 for the front end and 19 for the back end. The Kaiser β
is chosen by Kaiser's formulas so that the transition band exactly spans the
two edges at the given length. That gives 6.71 (about 70 dB) for the front
end and 6.23 (about 65 dB) for the back end.

This is a **departure**. The target is 80 dB stopband (ripple 1e-4) and
5e-4 passband ripple, reached with equiripple (Remez) designs of 144 and
256 taps. A window design of the same length cannot reach 80 dB. Measured in
simulation: a tone on a front-end channel centre is 71 dB down in the
neighbouring channels, and 67 dB down in the back end. The passband is
flat within 0.003 dB up to the edges. To reach 80 dB, replace `design_coefs()`
in `polyphase_filter.sv` with equiripple coefficients. Nothing else depends
on their values.

## How the sample rate changer works (`sample_rate_changer`)

The SRC chain is: upsample by L, apply the L-band filter H_L(z), then
interpolate. Linear interpolation is cheap but distorts a signal that fills a
large share of its Nyquist band. Upsampling by L first makes the signal
narrow relative to the grid that is interpolated. The distortion bound is
SDR ≥ 80·L⁴/w_x⁴ (w_x the signal bandwidth in rad/sample):

* GSM: w_x ≈ 0.0135π, L = 1 → 2.5·10⁷;
* W-CDMA: w_x ≈ 0.192π, L = 4 → 1.6·10⁵. L = 1 would give only about 600.

Both must exceed the 10⁵ target.

* `lband_interp` computes the L upsampled-and-filtered samples belonging to
  each input sample in polyphase form, so the zero-stuffed samples are never
  processed. H_L is an L-th band (Nyquist) windowed sinc with 31 taps for
  L = 4 (Kaiser β 5.65, about 60 dB). The centre phase is therefore a pure
  delay of the input. The filter shape and length are this design's choice.
  A cascade of two half-band filters is the other way to build H_4.
* `linear_interp` walks through the upsampled grid with step
  S = L·(input/output ratio): 25/4 for GSM and 125/3 for W-CDMA. The position
  is kept exactly as an integer offset plus a remainder r modulo the step's
  denominator. So the output count is exactly R_NUM per R_DEN inputs, with no
  drift. The fractional position mu = r/S_DEN becomes a 20-bit fraction by
  one constant scaling. Each output is a + mu·(b − a). That product uses
  ordinary multipliers, because mu changes from output to output. The step
  must be at least L, so each input block yields at most one output. Every
  ratio here is a decimation.

With L = 1 (GSM) there is no filter ahead of the interpolator, exactly as
configured. Content of the 40 Msps front-end channel beyond ±3.2 MHz
therefore aliases into the 6.4 Msps stream. The front end has already
attenuated it: its stopband starts 5 MHz from the channel centre, and its
transition band lies between 2.6 and 5 MHz. A strong carrier of the
neighbouring front-end channel, lying 3.2 to 5 MHz from the centre, is only
partly attenuated in that transition band. It folds onto GSM slots −12..−7
(or +7..+12 from the other side). A low-pass ahead of the GSM interpolator
would remove it. No such filter is specified, so none is built.

## Interfaces and timing

All blocks use one clock, an active-low **synchronous** reset, and a `valid`
strobe per sample or frame with no back-pressure. The top takes one ADC
sample per clock, so the clock runs at 80 MHz.

| Port group (`msfb_channelizer`) | Rate at 80 MHz clock | Content |
|---|---|---|
| `adc_valid`, `adc_data[15:0]` | every clock | real IF samples |
| `gsm_fe_sel[3:0]`, `wcdma_fe_sel[3:0]` | sampled each front-end frame | front-end channel feeding each path |
| `fe_valid`, `fe_re/fe_im[16]` (18 bit) | 1 per 2 clocks | all front-end channels |
| `gsm_valid`, `gsm_re/gsm_im[32]` (18 bit) | 1 per 100 clocks | 32 GSM channels; k at k·200 kHz, 16..31 negative |
| `wcdma_valid`, `wcdma_re/wcdma_im` (18 bit) | 1 per 20.83 clocks on average | W-CDMA at 3.84 Msps |

Latencies, in clock edges: a filter bank's frame appears 3 edges after the
frame's last input. Channel selection adds 1. The GSM rate changer adds 1 and
the W-CDMA one 3.

Fixed point: channel samples keep the ADC's LSB, so an in-band real tone of
amplitude A appears with amplitude A/2 at 18 bits. Inside the banks, the
folded branch sums keep log2(K)+4 extra fraction bits. The FFT words grow by
log2(K)+1 bits. Outputs are rounded to nearest and saturated.

## Parameters

Defaults are the dual-mode configuration and sit in `rtl/msfb_pkg.sv`. The
generic blocks are parameterised as follows:

* `dft_filterbank #(K, M, N, D_PERMIL, BETA, COEF_W, IN_W, OUT_W)`. K must be
  a power of two and N a multiple of K. D_PERMIL is the overlap d in
  thousandths. BETA defaults to the value that fits the transition band.
* `sample_rate_changer #(R_NUM, R_DEN, L, PL, W)`. The ratio is output/input.
  L·R_DEN/R_NUM must be at least L.
* `csd_const_mult #(IN_W, C, OUT_W)` computes any constant product.

A different standard mix changes these numbers: the front-end K with its
d = K·f'/Fs, the SRC ratio that maps the coarse channel onto the back-end
grid, and the back-end K. The rates follow f_out = Fs·M_src/(M1·M2).

## What is not included

* **Sharing adders between coefficients (multiplier block).** Each
  coefficient is its own CSD shift-and-add, which uses more adders than a
  multiple-constant-multiplication network would.
* **One path per front-end channel.** The general architecture has one SRC
  and one back-end bank per front-end output. This top has one GSM path and
  one W-CDMA path, each switchable to any front-end channel. More paths are
  more instances of the same blocks.
* **Run-time programming of the rate changers.** Ratios are elaboration-time
  parameters.
* The W-CDMA rate changer converts 40 → 3.84 Msps in one step (ratio 12/125,
  upsampling by 4). Another valid drawing of the same chain takes W-CDMA from
  the 6.4 Msps GSM-path signal with a 3/5 converter. The overall ratio is the
  same.
* The ADC and the baseband processor.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| Testbench | What it establishes |
|---|---|
| `tb_csd_const_mult` | bit-exact x·C for 8 constants, including −32768 and runs of ones |
| `tb_idft_radix2` | K = 16 and 32 against a floating-point DFT, impulses and random data |
| `tb_polyphase_filter` | bit-exact branch sums against an independently coded prototype, frame timing, rotation index, DC gain |
| `tb_dft_filterbank` | every channel against the direct formula for y_k, random input with gaps; tone selectivity |
| `tb_frontend_channelizer` | 0 dB in-channel and mirror gain, ≥ 65 dB adjacent rejection, both channels pass a tone midway between centres (overlap), 40 Msps frame rate |
| `tb_backend_channelizer` | channel placement of positive and negative tones, ≥ 60 dB rejection, baseband phase step, frame rate |
| `tb_lband_interp` | bit-exact polyphase outputs, Nyquist pass-through phase, DC gain |
| `tb_linear_interp` | outputs against exact linear interpolation for both steps, timing, exact output count |
| `tb_sample_rate_changer` | both converters against an ideal resampled tone (error below −56 dB), exact ratio |
| `tb_gsm_band` | workload: 13 GSM carriers on alternate slots of one front-end channel, incl. both outermost slots; occupied slots within 0.13 dB, empty slots below −56 dB |
| `tb_wcdma_band` | workload: four tones across the W-CDMA band; all within 0.01 dB after the rate changer, empty DFT bins below −75 dB |
| `tb_msfb_channelizer` | full-size end to end: three carriers through both paths, GSM channels 5, 12 (outermost slot), 27 and 20 after switching to mirror channels, W-CDMA magnitude and phase step, all three output rates |

The end-to-end and workload testbenches run the top with its default
parameters. Each runs for 7 000 to 12 500 clocks, well under a second.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/msfb_pkg.sv \
    tb/tb_msfb_channelizer.sv --top tb_msfb_channelizer
./obj_dir/Vtb_msfb_channelizer
```

Replace the testbench name to run another. The coefficient design runs inside
Verilator during elaboration. The whole top builds in about 15 s.
