# Input-aware approximate multiplier for a constant-coefficient FIR filter

A general-purpose approximate multiplier is designed to be "good on average"
over all possible operands. In a FIR filter one operand of every product is a
filter coefficient: a constant known at design time. If the handful of
coefficients never set some bits, the parts of the multiplier that only work on
those bits can be deleted with no error at all for this filter, even though the
result would be badly wrong for other operands. This repository holds such an
*input-aware* multiplier and the low-pass FIR filter built around it, together
with testbenches that measure its accuracy the input-aware way: weighted by the
operands the filter really uses, not by all operands.

## The filter and its coefficients

The filter computes `y_n = sum_i b_i * x_(n-i)`. Samples `x` and coefficients
`b` are signed Q1.7 (8 bits: sign/integer bit and 7 fraction bits); a product is
signed Q2.14 (16 bits). The filter uses only five distinct coefficient codes:

| code (binary) | value      | share of the multiplications |
|---------------|------------|------------------------------|
| `0000_0000`   | 0          | 0.0027 |
| `0000_0011`   | 0.0234375  | 0.0523 |
| `0000_1110`   | 0.109375   | 0.2157 |
| `0001_1101`   | 0.2265625  | 0.4478 |
| `0010_0100`   | 0.28125    | 0.2815 |

Bits 7 and 6 are zero in all of them, and bit 5 is set only in 0.28125. The
shares are the coefficient distribution of the reference filter; they are used
as weights by the accuracy testbench.

## The cut Baugh-Wooley multiplier (`ia_bw_mult`)

The base circuit is an 8 x 8 Baugh-Wooley signed multiplier. Coefficient bit
`b[j]` gates one row of partial products `x[i] & b[j]`, shifted by `j`. For two's
complement operands Baugh-Wooley inverts the terms that mix a sign bit with a
magnitude bit (they become NANDs) and adds a constant that undoes the
inversions; for the full 8 x 8 array that constant is `2^8 + 2^15`.

The input-aware version removes the rows of coefficient bits that the filter
never uses. Parameter `CUT_MSB` is the number of top coefficient bits removed:

| `CUT_MSB` | rows kept | what it is | error on the filter's coefficients |
|-----------|-----------|------------|------------------------------------|
| 0 | 8 | full signed Baugh-Wooley array | none |
| 2 (default) | 6 | rows of b7 and b6 removed | none |
| 3 | 5 | row of b5 removed as well | `x * 0.25` whenever b = 0.28125 |

Once the sign row of `b` is gone, `b` is effectively an unsigned number of
`8 - CUT_MSB` bits. Each kept row still has one inverted term (its product
with the sample's sign bit `x[7]`), worth `-2^(7+j)` of correction. The module
adds the sum of exactly those corrections, which is `0xE080` for 6 rows and
`0xF080` for 5 rows (modulo 2^16). The result is then exactly
`signed(x) * b[7-CUT_MSB:0]`: a removed bit costs precisely `x` times its weight
and nothing else. This constant is what makes the default configuration exact
on the filter's coefficients. A constant left over from the full array
would give a large fixed offset instead. The error figures below confirm the
choice: they match the published characterisation of these multipliers.

The partial-product tree is written as a sum of the shifted rows plus the
constant. The adder structure is left to synthesis. The multiplier is purely
combinational.

## Accuracy: it depends on the workload

`tb/tb_accuracy_char.sv` measures both cut configurations under two workloads:
every (x, b) pair equally likely, and the five filter coefficients weighted by
their shares (x uniform). Error probability (EP) is the fraction of wrong
scenarios. Mean error distance (MED) is the probability-weighted mean of
|approx - exact|. Worst-case error (AWCE) is the largest |approx - exact|.
Errors are in real units (1 LSB of Q2.14 = 2^-14).

| configuration | workload      | EP     | MED     | AWCE |
|---------------|---------------|--------|---------|------|
| 2 rows cut    | all inputs    | 0.7471 | 0.25    | 1.0  |
| 2 rows cut    | coefficients  | 0      | 0       | 0    |
| 3 rows cut    | all inputs    | 0.8716 | 0.25    | 1.0  |
| 3 rows cut    | coefficients  | 0.1992 | 0.03519 | 0.25 |

Judged on all inputs, the default multiplier looks like a very poor one: three
quarters of its results are wrong, and wrong by up to 1.0. Judged on the
operands it actually receives, it is exact. The testbench also prints the mean
relative error distance.

## The filter datapath (`ia_fir`, the top)

`ia_fir` uses a single `ia_bw_mult` and walks the taps one per clock, so that
the one multiplier sees exactly the coefficient stream described above.

* **Delay line**: `x_hist[0..NTAPS-1]`, with `x_hist[i] = x_(n-i)`. It shifts
  when a sample is taken and is cleared by reset, so samples from before a
  reset read as zero.
* **Coefficient ROM**: the parameter `TAPS`. The default is 9 symmetric taps
  `0, 3, 14, 29, 36, 29, 14, 3, 0` (in units of 2^-7). They use every code
  above and add up to exactly 1.0, giving unity gain at DC.
* **Tap counter and accumulator**: a two-state controller (idle, MAC) steps the
  tap index `k`, selects `x_hist[k]` and `TAPS[k]`, and adds the product into
  an accumulator of `16 + $clog2(NTAPS)` bits (20 bits at the default sizes).
  This width cannot overflow.
* **Output**: `out_y` is the full accumulator, signed Q(2+G).14 with
  G = `$clog2(NTAPS)` guard bits. It is not rounded or saturated.

Handshake and timing:

* A sample is taken on a clock edge where `in_valid && in_ready`.
* The taps are processed on the next `NTAPS` edges.
* `out_valid` is a one-cycle pulse that is seen `NTAPS + 1` edges after the
  sample was taken. An assertion in the RTL checks this.
* `in_ready` is high when the filter is idle and also during the last tap
  cycle. Samples can therefore be taken back to back, one every `NTAPS` clocks.
  At other times the source is stalled.
* The output has no back-pressure.
* `rst_n` is a synchronous, active-low reset.

Shared constants, types and the coefficient codes are in `rtl/iaa_pkg.sv`.

## How far this follows the reference design

These parts follow the reference filter:

* the number formats;
* the coefficient codes and their distribution;
* the Baugh-Wooley base multiplier;
* which rows are removed in the two configurations.

The measured EP, MED and AWCE values agree with its published figures.

These are this implementation's own choices, because the reference does not
give them:

* **Filter length and tap order.** Only the five distinct values are known. The
  9-tap arrangement is an assumption. Its tap-count shares (2/9, 2/9, ...) do
  not reproduce the distribution in the table. That distribution is used only
  in the accuracy measurements.
* **Cutoff frequency.** The reference filter is a low-pass with a 500 Hz cutoff
  and 60 dB stopband attenuation. That depends on a sample rate that is not
  stated, so the default taps are not claimed to meet it.
* **Architecture.** The filter organisation (one shared multiplier, one tap per
  clock), the handshake, the latency, the reset and the output precision are
  all choices made here.
* **Gate-level netlists.** The reference multipliers were gate-level netlists
  synthesised for a 45 nm library. Here the cut is expressed in RTL, and delay,
  area and power are not reproduced.
* **Filter-level accuracy.** The reference reports a PSNR of about 12 dB for
  the filter with the 3-row multiplier, on a test signal that is not described.
  `tb/tb_fir_psnr.sv` measures 18.4 dB on its own two-tone test signal. The
  default filter is bit-identical to an exact filter.
* **Comparison multipliers.** The approximate multipliers that the reference
  compared against came from an automatic generation tool and are not included.

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/iaa_pkg.sv tb/tb_ia_fir.sv --top-module tb_ia_fir -o sim
./obj_dir/sim
```

Replace `tb_ia_fir` with another testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_ia_bw_mult` | All 65,536 operand pairs on the 0-, 2- and 3-row configurations, against integer arithmetic. Also checks that the default is exact on the five codes. |
| `tb_ia_fir` | The filter at its default parameters, over 3000 samples with random gaps, stalls, back-to-back samples and a reset mid-stream. Checks every output against an exact model, the latency, and that no output is lost. |
| `tb_fir_psnr` | Default and 3-row filters side by side. Each is checked against its model, and the PSNR of each against the exact filter is printed. |
| `tb_accuracy_char` | The accuracy table above. |

To use the filter with other coefficients, override `TAPS` and `NTAPS`, and set
`CUT_MSB` to the number of top bits that are zero in every coefficient. Then
rerun `tb_accuracy_char` with your coefficient codes and weights to see what a
larger cut would cost.
