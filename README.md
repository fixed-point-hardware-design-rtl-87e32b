# Fixed-point plane-wave Stolt migration accelerator

Coherent plane-wave compounding (CPWC) ultrasound imaging fires several
unfocused plane waves, each steered to a different angle. Each firing
records one frame of raw channel data, P(t, x), with time t and transducer
element x. It then reconstructs an image from every frame and adds the
images coherently. Stolt's migration does the reconstruction in the Fourier
domain. It transforms the frame to (f, k_x), moves every temporal-frequency
sample f to its depth wavenumber k_z (an interpolation plus a weight), and
goes back to (k_z, x). There a per-channel phase ramp undoes the steering
of the plane wave. The compounded spectrum is then turned into an analytic
signal along depth. The magnitude of that signal is the envelope from which
a B-mode image is made.

This RTL computes that chain in fixed point, using block floating point. It
is one accelerator, `stolt_hardware`, that is called once per emission angle.
Every call reconstructs one angle and adds it into the compounded frame C.
The call for the last angle also runs the Hilbert stage. That stage writes
Re(H), Im(H) and the envelope |H|. All large arrays sit in external
memories that the accelerator reaches through simple address/data ports.
The host computes the angle-dependent tables (M, A, R) in advance.

Default size: 4096-point temporal FFT, 256-point spatial FFT, 128 channels,
2048 output depth samples. One full-size angle with the Hilbert stage takes
22,830,732 clock cycles, about 285 ms at 80 MHz.

## Number format: block floating point

Every data word holds a signed fraction in [-1, +1]. Each word or group of
words also carries an unsigned 8-bit exponent s, so the true value is
`word * 2^s`. Scaling values down to stay in range costs nothing in
precision as long as the exponent records it. Adding two values first
*equalises* them: the one with the smaller exponent is shifted right by the
difference.

| quantity | meaning | format |
|---|---|---|
| P | raw channel samples | Q1.14, 16 bit |
| F, K | spectra inside the reconstruction | Q1.14, 16 bit, plus exponents |
| M | f-bin position to read for each (k_z, k_x) | unsigned Q12.12, 24 bit |
| A | weight for each (k_z, k_x) | Q1.14, 16 bit |
| R | phase increment per k_z bin, per channel, in units of pi | signed Q3.12, 16 bit |
| C, H | compounded spectrum, analytic output | Q1.22, 24 bit, plus one exponent |
| FFT twiddles | cos/sin | Q1.14 |

Exponents are tracked at three granularities:

* **Inside the FFT (`fft_bfp`).** Every element has its own exponent. A
  butterfly equalises its two inputs to the larger exponent and computes
  the sum and the twiddled difference. It then shifts each result right by
  0 to 4 bits, according to whether max(|re|, |im|) exceeds 1, 2, 4 or 8,
  and adds that shift to the result's exponent. At the end the engine
  reports `smax`, the largest exponent. Its read ports return every element
  already equalised to `smax`, in natural order.
* **Per vector.** The reconstruction keeps one exponent per column or row:
  `sx[x]` after the temporal FFT, `sf[k]` after the spatial FFT, `skz[k]`
  after the spatial inverse FFT. Before each next transform it equalises
  the vectors to the largest one.
* **Per frame.** The angle frame K leaves the reconstruction with one
  exponent, `s_k`. C carries `c_s` and H carries `h_s`; both are ports. The
  true image is `H * 2^h_s`.

All scaling shifts round to nearest (`stolt_pkg::sra_round`). Plain
truncation adds a constant -1/2 LSB to every element. After the spatial
inverse FFT, such a constant collects in channel 0 and shows up as a short
burst of error along depth. In a full-size test that burst was 8 % of the
channel peak; with rounding it stays below 2 %.

## One call, step by step

`reconstruction` runs fourteen numbered steps, visible on `rec_step`. It
works in a local memory of NT_FFT/2 x NX_FFT complex words: only the
positive half of the temporal spectrum is kept, because P is real.

1. **Temporal FFT of two channels at once (steps 1 to 3).** Channels x and
   x+1 are loaded as the real and imaginary parts of one complex sequence
   and transformed with the 16-bit NT_FFT-point engine. The two real
   spectra are then separated with X[k] = (Z[k] + Z*[N-k]) / 2 and
   Y[k] = (Z[k] - Z*[N-k]) / 2j. The halving is an arithmetic shift. This
   needs NX/2 transforms instead of NX.
2. **Equalise along x, spatial FFT (steps 4 to 6).** Each f row is brought
   to the common column exponent and transformed with the NX_FFT-point
   engine, channels 0..NX-1 followed by zero padding.
3. **Equalise along f, remap and weight (steps 7 and 8).** For each k_x bin
   m, the column is copied to a buffer at a common exponent. Then, for every
   k_z bin, `remap_multiply` interpolates linearly between the bins
   floor(M) and floor(M)+1, at the fractional position given by M, and
   multiplies by A. Positions past the end of the half spectrum read as
   zero. M and A are stored only for m = 0..NX_FFT/2. Negative k_x bins
   use the mirror row NX_FFT - m, so one table of NT_FFT/2 x (NX_FFT/2+1)
   entries serves all bins.
4. **Spatial inverse FFT (steps 9 to 11).** The same NX_FFT-point engine
   is used on conjugated data (conj, FFT, conj), and only the NX channel
   columns are kept. There is no 1/N factor: it is a constant the host can
   fold into its final scaling.
5. **Phase rotation (steps 12 to 14).** Rows are equalised to the largest
   k_z exponent. Every element K[k_z][x] is rotated by
   exp(j*pi*k_z*R[x]) in `cordic_rotator`. The angle is accumulated per
   channel as k_z * R[x], modulo 2. The k_z = 0 row has angle 0 and skips
   the rotator.

`compounding` then streams C from external memory and adds K to it.
`hilbert` runs after that, but only if `last_flag` was set at `start`.

## Compounding and the overflow flag

C and K are brought to the exponent T = max(s_k, c_s + of). K is first
widened from Q1.14 to Q1.22. Each sum is saturated to 24 bits. If any sum
left [-1, +1], `of_out` is raised. The host passes `c_s_out` and `of_out`
back as `c_s_in` and `of_in` on the next call. A set `of_in` means the
stored C may hold saturated values near full scale. The compounding and
Hilbert stages therefore read C shifted right one extra bit, and they count
that bit in the exponent. The value represented is unchanged, and the next
sum has headroom. Overflow is rare when the exponents differ. It is likely
when two similar frames with the same exponent are added, and the
end-to-end test forces exactly that case.

## Analytic signal without a Hilbert filter

C holds only positive k_z bins. The analytic signal of the depth profile is
the inverse transform of a one-sided spectrum, so no separate Hilbert
filter is needed. For each channel, `hilbert` builds an NT_FFT-point
spectrum with:

* bin 0 at half weight,
* bins 1 .. NT_FFT/2-1 as stored,
* bin NT_FFT/2 equal to half the last stored bin,
* everything above it zero.

It runs the inverse transform with a second, 24-bit FFT engine (conj, FFT,
conj) and writes the first NZ depth samples to the Re and Im planes of H.
Every channel comes out of the FFT with its own exponent. A second pass
therefore reads each channel back, equalises it to the largest exponent,
and writes Re, Im and `|H| = sqrt(Re^2 + Im^2)` (from `magnitude`, an exact
integer square root). `h_s` = largest FFT exponent + c_s + of_in.

## Modules

| module | role |
|---|---|
| `stolt_pkg` | scale type, word formats, rounding shift, bit reversal |
| `fft_bfp` | in-place radix-2 DIF FFT with per-element exponents; load port, start/done, two read ports |
| `cordic_rotator` | pipelined CORDIC rotation by an angle in units of pi, with gain correction |
| `remap_multiply` | linear interpolation between two bins and multiplication by A |
| `magnitude` | pipelined sqrt(re^2 + im^2) |
| `reconstruction` | steps 1 to 14 for one angle; owns the 16-bit FFT engines and the local K memory |
| `compounding` | C = C + K with exponent alignment, saturation and overflow flag |
| `hilbert` | analytic spectrum, 24-bit inverse FFT, equalisation, envelope |
| `stolt_hardware` | top: sequencing per call, C-port sharing, external memory ports |

The temporal and spatial transforms use two `fft_bfp` instances of width 16,
sized NT_FFT and NX_FFT. The spatial instance serves both the forward
transform and the inverse transform. `hilbert` has its own 24-bit NT_FFT
instance.

## Top-level interface

Per call: drive `start` for one cycle with `last_flag`, `c_s_in` and
`of_in` valid. `busy` stays high until `done` pulses. Then `c_s_out`,
`of_out` and, after a last call, `h_s_out` are valid. The caller must not
pulse `start` while busy; an assertion checks this.

All external memories are plain synchronous RAMs with one cycle of read
latency:

| memory | size (words) | address | ports |
|---|---|---|---|
| P | NT_FFT x NX, 16 bit | x*NT_FFT + t | `p_en`, two read addresses (a channel pair) |
| M, A | NT_FFT/2 x (NX_FFT/2+1) | g*NT_FFT/2 + k_z | `ma_en`, `ma_addr`; 24-bit M and 16-bit A read together |
| R | NX, 16 bit | x | `r_en`, `r_addr` |
| C | NT_FFT/2 x NX, 2 x 24 bit | x*NT_FFT/2 + k_z | one read and one write port |
| H | NT_FFT x NX, 3 planes | x*NT_FFT + z | write enables {abs, im, re}; one read port for the equalisation pass |

Before the first angle, clear C and set `c_s_in = 0` and `of_in = 0`. For
11 steering angles, make 11 calls and set `last_flag` on the eleventh.
`rec_step` and `active` only let a test bench observe which unit is
working.

## Timing

`fft_bfp` processes one butterfly every two cycles. An N-point transform
takes N/2 * log2(N) * 2 + 1 cycles from `start` to `done` (49,153 cycles for
4096 points, 2,049 for 256). Every other pass streams one element per cycle,
plus its pipeline depth: CORDIC NITER+2 cycles, magnitude 25, remap 2.
Measured cycles per call:

| configuration | reconstruct + compound | with Hilbert |
|---|---|---|
| NT_FFT 4096, NX_FFT 256, NX 128, NZ 2048 (default) | 15,486,857 | 22,830,732 |
| NT_FFT 64, NX_FFT 16, NX 8, NZ 32 | 9,985 | 14,324 |

A complete 11-angle compounded image at the default size takes
10 x 15,486,857 + 22,830,732 = 177,699,302 cycles, about 2.2 s at 80 MHz.
The frame length does not matter (3328 or 1536 recorded samples), because
the transforms always run at NT_FFT.

Most of the time goes to the FFTs, and the transforms in a call run one
after another. The temporal FFT runs NX/2 = 64 times, the spatial FFT
2 x 2048 times and the Hilbert FFT 128 times.

## Verification

Each module has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_fft_bfp`: 64-point 16-bit and 32-point 24-bit transforms of random
  data and of a tone against a direct DFT, and the cycle count.
* `tb_cordic_rotator`, `tb_remap_multiply`, `tb_magnitude`: random vectors
  against real-arithmetic or exact integer models, and the latency.
* `tb_reconstruction`: one angle at NT_FFT 64 / NX_FFT 16 / NX 8 against a
  DFT-based model. The test covers channel amplitudes that differ by 16x,
  M positions past the last bin, and R over the full phase range.
* `tb_compounding`: bit-exact against a model in both alignment directions,
  with and without `of_in`, plus saturation.
* `tb_hilbert`: against a DFT model; `|H|` exact; `of_in` must not change
  the represented value.
* `tb_stolt_hardware`: three angles end to end at the small size, against a
  model of the whole algorithm. It counts each of the 14 steps, the
  compounding and Hilbert runs, the overflow flag, and H not being written
  before the last call.
* `tb_stolt_full`: one full-size angle with the default parameters. The
  input is eight random echoes, so the reference stays cheap. Three
  channels are checked against the model within 2 % of the peak, `|H|` is
  checked everywhere, and the cycle count is printed. It runs in about half
  a minute with Verilator.
* `tb_stolt_workload`: a complete compounded image at full size. It makes
  eleven calls with 3328-sample frames of 128 channels. C, its exponent
  and the overflow flag are passed from call to call, and `last_flag` is
  set on the eleventh. The P, M, A and R tables are synthetic (random
  echoes and random tables within their formats). Three channels of H are
  checked against the model of the whole chain. It takes about three and a
  half minutes with `-O3`.

To simulate, list the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_stolt_hardware \
  rtl/stolt_pkg.sv rtl/fft_bfp.sv rtl/cordic_rotator.sv rtl/remap_multiply.sv \
  rtl/magnitude.sv rtl/reconstruction.sv rtl/compounding.sv rtl/hilbert.sv \
  rtl/stolt_hardware.sv tb/tb_stolt_hardware.sv
./obj_dir/Vtb_stolt_hardware
```

The accuracy limits of the test benches are 1 to 2 % of the peak for the
multi-transform paths and a few LSB for the single units. These are
measured error levels of this fixed-point datapath, not figures from a
reference implementation.

## Where this design departs from the reference algorithm, and open points

* The FFT is radix-2 decimation in frequency, not split radix. Results
  equal a DFT up to rounding; only the operation count differs.
* Rounding to nearest in all scaling shifts (see above). Saturation on
  overflow.
* CORDIC: 14 iterations, a half-turn fold for angles beyond +-90 degrees,
  and a final multiplication by 1/K. The iteration count and the gain
  correction are choices of this design.
* M is a 0-based bin position. Negative k_x bins mirror the stored rows.
* NZ = 2048 output samples per channel is a choice. Envelope sections of
  1216 rows, as used for 5 to 50 mm of depth, fit inside.
* The variant with four parallel spatial FFTs, which cuts latency, is not
  built. The sequential datapath is.
* The design has not been synthesised. The local K memory is
  2048 x 256 x 32 bit (16 Mbit, roughly 455 block RAMs of 36 kbit on a
  Virtex-7 class FPGA). The FFT engines each hold N x 2W data bits plus
  8-bit exponents. Expect block-RAM-dominated utilisation of a large FPGA.
