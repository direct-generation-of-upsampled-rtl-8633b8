# Upsampling FIR filter by waveform playback, in distributed arithmetic

An interpolating FIR filter normally inserts K-1 zeros between input samples and then runs an
N·K-tap filter at the output rate. This design skips both steps. While one input sample is
current, the filter output is a short piece of waveform. That piece depends only on the last N
input bits of each bit plane, so all 2^N possible pieces can be stored in advance. A small counter
then plays the K samples of the right piece. The same waveform memory serves every bit of a B-bit
sample, distributed-arithmetic style. An adder with a ×2 feedback weights the bit planes and sums
them. There are no multipliers, one adder per filter, and an N-row input register in place of an
N·K-tap delay line.

The RTL holds two forms of the method:

* `bit_waveform_gen` is for a single bit stream, for example to band-limit binary data before a
  DAC. Each output sample is one memory word, with no arithmetic at run time.
* `upfir_da_filter` is for B-bit unsigned samples. It can also run several filters on one input
  (`NUM_FILTERS`), sharing the input register, counter and address.

`upfir_top` places the two side by side. The defaults are the example filter: a raised cosine with
roll-off 0.3, upsampling K = 5, and N = 5 input samples per output.

## What is computed

With coefficients c[0..N·K-1], the upsampled output for input sample n and phase k = 0..K-1 is

    y[nK+k] = sum_{i=0}^{N-1} c[iK+k] · x[n-i]

Split x into bit planes, x[n] = sum_b 2^b · x_b[n]. Then

    y[nK+k] = sum_b 2^b · W_{m_b}[k],   W_m[k] = sum_i m[i] · c[iK+k]

Here m_b is the N-bit pattern (x_b[n], x_b[n-1], …, x_b[n-N+1]). `W` is the waveform memory:
2^N patterns × K samples. It is addressed by {A_H = pattern, A_L = k}.

The sum over b is done in Horner form over B clocks, MSB plane first:

    acc = 2·acc + W_{m_b}[k]

## Structure

```
 x_in ──► shift_rotate_reg (N rows × B bits) ──A_H (one bit per row)──┐
                                                                      ▼
 upfir_sequencer ── bit counter (0..B-1) ── A_L counter (0..K-1) ─► waveform_lut ─D_O─►
                 └─ first / last / rotate / load strobes                              │
                                                                                      ▼
                                        da_accumulator (one per filter): acc = 2·acc + D_O
                                                                      └─► y, y_valid
```

| module | role |
|---|---|
| `upfir_pkg` | default sizes, coefficient format, the two raised-cosine coefficient sets |
| `shift_rotate_reg` | N×B input register; shifts a new sample in vertically, rotates rows horizontally |
| `upfir_sequencer` | bit counter and sample counter A_L, plus the control strobes |
| `waveform_lut` | ROM of the W_m[k] words, computed at elaboration from `COEFS`; one column per filter |
| `da_accumulator` | adder with ×2 feedback, clear at each new output sample, output register |
| `upfir_da_filter` | the B-bit filter: all of the above |
| `bit_waveform_gen` | the single-bit form: sequencer and register with B = 1, LUT, output register |
| `upfir_top` | both filters, each with its own ports |

## Timing, the part to read carefully

Everything runs on one clock `clk`, the bit clock. Its rate is B·K·f_x for the DA filter, where
f_x is the input sample rate.

* **Bit clock.** `bit_cnt` runs 0..B-1. Each clock presents one bit plane to the memory. The
  planes come MSB first because of the Horner accumulation.
* **Output sample.** When `bit_cnt` wraps, A_L steps through 0..K-1. One output sample therefore
  takes B clocks.
* **Input sample.** One input sample lasts B·K clocks. `x_take` (the `load` strobe) is high on
  the last bit clock of phase K-1. The register captures `x_in` at that clock edge, so hold the
  next sample on `x_in` whenever `x_take` is high. The filter runs freely after reset and never
  stalls; the source must keep pace.
* **The input register.** Every row rotates left once per bit clock. The memory reads bit B-1
  of each row, so after B rotations a row is back in natural order. The load takes the place of
  the B-th rotation of the last phase. Rows move down in their rotated-once form, so all rows are
  aligned again for the next sample.
* **The accumulator.** On the first bit clock the accumulator loads D_O without the doubled old
  value. This is the clear, and it costs no extra clock. On the last bit clock the finished sum
  goes to `y`. `y_valid` pulses on the following clock, and `y` then holds for B clocks.
* **Which output is which.** Count outputs j = 0, 1, … from reset. Output j is
  y[nK+k] with n = j/K − 1 and k = j mod K. The first K outputs belong to the cleared register and
  are zero. The K outputs after the first load belong to x[0].

The single-bit generator uses the same sequencer with B = 1. It gives one output per clock and
takes a bit every K clocks (`bit_take`). `w_out` is registered, so it comes one clock after the
memory read, and `w_valid` stays high from the first clock after reset.

## Coefficients and memory contents

Coefficients are 12-bit signed, with 1.0 = 1024. By default they are computed at elaboration
(`upfir_pkg::rc_coef`) from the raised-cosine pulse with roll-off β = `ROLL_OFF`:

    h(t) = sinc(t/K) · cos(π·β·t/K) / (1 − (2·β·t/K)²)

It is sampled as c[j] = round(1024·h(j − ⌊N/2⌋·K)), j = 0..N·K−1, with rounding half away from
zero. For N = 5, K = 5 these are the 25 central samples of the pulse. The package also exports
two fixed 5×5 sets, `RC_BETA03` and `RC_BETA05`, for two-filter builds.

The alignment puts the peak of the middle input sample, x[n−⌊N/2⌋], at phase k = 0. At k = 0
every other tap lands on a zero of the pulse. So at the sample instants the output is exactly
1024·x[n−2] for N = 5. The testbenches use this property as an end-to-end check. The filter
delay is ⌊N/2⌋ input samples.

The memory has 2^(N + ⌈log2 K⌉) words of COEF_W + ⌈log2 N⌉ bits (256 × 15 bits by default); words
with A_L ≥ K are zero. Choosing K as a power of two removes that padding. Any other coefficient
set can be passed through `COEFS`: `NUM_FILTERS × N·K` entries, c[0] first and filter 0 first
(concatenate the sets, for example `{RC_BETA05, RC_BETA03}`).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 5 | N, input samples that shape one output (memory has 2^N patterns) |
| `UPSAMPLE` | 5 | K, output samples per input sample |
| `SAMPLE_W` | 8 | B, input sample width (unsigned); this width is a free choice |
| `COEF_W` | 12 | coefficient width; LUT word = COEF_W + ⌈log2 N⌉ |
| `NUM_FILTERS` | 1 | filters sharing one input; 2 gives the two-filter form with outputs y and z |
| `ROLL_OFF` | 0.3 | roll-off of the default raised-cosine coefficients |
| `COEFS` | raised cosine of `ROLL_OFF` | coefficient sets of the DA filter, `NUM_FILTERS × N·K` entries |
| `BIT_COEFS` | `COEFS[0]` | coefficient set of the single-bit generator (top only) |

The computed default of `COEFS` covers up to 256 coefficients in all (`upfir_pkg::MAX_COEFS`).
Larger builds must pass `COEFS` explicitly.

The output width is COEF_W + ⌈log2 N⌉ + B (23 bits by default). Sums never overflow: with
full-scale input the roll-off 0.3 output overshoots to about 1.2 × 255 × 1024.

## Choices made here, and limits

The method fixes the structure: the input register of N rows, the counter on the low address
bits, the waveform memory, and the single adder with ×2 feedback and per-sample clear. The
following are choices of this RTL:

* One clock with strobes, instead of separate shift and counter clocks.
* Unsigned samples. A two's-complement input would need a subtraction on the MSB plane, which is
  not implemented.
* MSB-first bit-plane order. Horner accumulation requires this order.
* The word widths and the coefficient alignment described above.
* Combinational (ROM) memory read. An FPGA block RAM with registered read would need one
  pipeline stage between the sequencer and the accumulator.
* Output registers on both filters.
* A synchronous active-low reset that clears all registers, including the input history.
* The input stage is the two-dimensional shift+rotate register. The equivalent alternative, one
  long N·B-bit shift register, is not built.
* The example pulse, truncated to 51 samples, spans 11 input samples. The default N = 5 keeps
  only its 25 central samples, which cover the peaks of five pulses, and needs a 256-word memory.
  `TAPS = 11` holds the whole pulse in a 16384 × 16-bit memory. It is tested, but it takes
  noticeably longer to elaborate.
* The filters have no input handshake and no back-pressure.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`. Give verilator the
package first, and let it find the other modules in `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
  rtl/upfir_pkg.sv tb/tb_upfir_top.sv --top-module tb_upfir_top -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_shift_rotate_reg` | register column against a model of unrotated samples plus rotation counts |
| `tb_upfir_sequencer` | counters and strobes against the cycle count, for B = 8 and B = 1 |
| `tb_waveform_lut` | computed coefficients against a table of expected values and the formula; every memory word |
| `tb_da_accumulator` | Horner sums, extreme words, output spacing and hold |
| `tb_upfir_da_filter` | two-filter form against direct convolution; load and output rates |
| `tb_bit_waveform_gen` | bit stream against direct convolution; exact 0 / 1024 at sample instants |
| `tb_upfir_top` | whole design at default parameters; counts every mechanism (load, rotation, wrap, restart, multi-plane sums, negative outputs, overshoot, exact sample instants) |
| `tb_upfir_fig7` | the binary streams 10100110010101111 and 11110001011010100011010101001100 at roll-off 0.5, through the bit generator and a two-filter build; prints the waveforms |
| `tb_upfir_51tap` | N = 11 build, covering the whole 51-sample pulse, against direct convolution |

All of them finish in seconds, except `tb_upfir_51tap`, which needs about half a minute to build.
