# Multiplier-less DWT filters with compressed distributed-arithmetic tables

This design computes a single-level discrete wavelet transform (DWT) with
two FIR filters, a low-pass and a high-pass one, and uses no multiplier.
Each filter works by *distributed arithmetic* (DA). All sums of the filter
taps are precomputed in a look-up table (LUT), and the input samples are fed
to it bit slice by bit slice. The LUT grows as 2^taps words, so it is the
part that costs memory. Here every LUT is stored in **compressed** form:
each bit column of the table is kept either as the short list of entries
where it toggles, or raw when that list would be longer than the column.
A small comparator network rebuilds the table word from the address on
every read.

The top level, `dwt_top`, has a 4-bit low-pass input and a 6-bit high-pass
input, with 9-bit and 13-bit results. The two filters are independent and
each has its own input. Both are instances of one parameterised filter,
`da_filter`.

## Distributed arithmetic in two bits per clock

A filter computes `y[n] = sum_k c[k] * x[n-k]` over `TAPS` = 4 taps. Write
each `IN_W`-bit two's-complement sample as bits `b_j`. Then

    y = sum_j  2^j * L(b_j of x[n], b_j of x[n-1], ..., b_j of x[n-3])   (j < IN_W-1)
        - 2^(IN_W-1) * L(sign bits)

Here `L(a)` is the LUT entry at address `a`: the sum of the taps `c[k]`
whose address bit `a[k]` is 1. The products have become table reads,
shifts and additions.

The filter takes **two bit slices per clock**, so one result needs
`P = IN_W/2` clocks: 2 for the low-pass filter and 3 for the high-pass one.
There are two copies of the (compressed) LUT. One copy is addressed by the
even-weight bit slice, the other by the odd-weight slice. The odd-weight
word is shifted left by one and added to the even-weight word. On the last
clock the odd-weight slice holds the sign bits, so its word is subtracted
instead.

Slices are processed LSB first. The accumulator therefore shifts *right*:

    acc <= (acc_in >>> 2) + (partial << (IN_W - 2))      acc_in = 0 on the first slice

Each partial is added at the weight of the last slice. After `P` steps the
earliest one has been shifted down to weight 1. Every bit that a right
shift drops is zero, so the result is exact.

The samples sit in one circulating shift register per tap
(`da_input_regs`). Each enabled clock, every register rotates right by two
bits, so its two LSBs are the current slice. After `P` rotations a
register is back in its original order. That last rotation is combined
with the move down the chain: register k takes register k-1 and register 0
takes the new sample.

## The compressed look-up table

`da_clut` takes the uncompressed table as a parameter and compresses it
during elaboration. The worked example below is the default table of
`da_clut`: 7 entries of 8 bits, 56 bits in all.

* **Column toggles.** Read column c from entry 0 downwards, starting from
  an implicit 0 before entry 0. Each change of value is a toggle, and its
  entry index is recorded. A column that is 1 everywhere toggles once, at
  index 0.
* **Compress or keep raw.** A column is stored as its toggle indices when
  `ntog * ADDR_W < ENTRIES`, that is, when the indices take fewer bits
  than the column. Otherwise the column is stored raw, one bit per entry.
  In the example 3-bit indices pay off for up to two toggles. Seven columns
  compress and one stays raw: 7 + 9×3 = **34 bits**.
* **Improved index width** (`IMPROVED = 1`, the default). An index below
  `2^(ADDR_W-1)` has a zero MSB, so it is stored with `ADDR_W-1` bits. In
  the example six indices shrink to 2 bits: 7 + 3×3 + 6×2 = **28 bits**.
  Every field width is fixed when the ROM is built, so the decoder knows
  where each field starts. `IMPROVED = 0` gives the plain scheme, which
  decodes to the same words.

The stored bits form one constant vector, `STORED_BITS` long. Column 0
(the word LSB) comes first. Within a column the indices follow in toggle
order, or the raw bits follow in entry order.

**Decoding** (`clut_col_decoder`, one per column) compares the address with
every stored index of the column. An address at or above an index
contributes a 1. The column bit is the XOR of these comparisons, i.e. the
parity of the toggles passed so far. With one index this is just
`addr >= index`. With two indices it is a run of ones between them. A raw
column is indexed by the address directly. Decoding is combinational, so
the filter reads its LUT in the same clock as it addresses it.

For DA tables in natural address order the gain is modest. The low-pass
table of this design is 80 bits raw and 72 compressed. The high-pass table
is 112 bits raw and 91 compressed (92 with full-width indices). DA tables
have many toggles in their low-order columns, so those columns stay raw.

## Interface and timing

| port | width | meaning |
|---|---|---|
| `clk`, `reset` | 1 | clock; synchronous, active-high reset |
| `clk_enable` | 1 | when low, nothing in either filter advances |
| `filter_in1` | 4 | low-pass input sample, signed |
| `filter_in` | 6 | high-pass input sample, signed |
| `lpf_take`, `hpf_take` | 1 | the sample on the matching input is captured at this clock edge |
| `LPF_OUT`, `HPF_OUT` | 9, 13 | signed filter results |
| `lpf_valid`, `hpf_valid` | 1 | one-clock pulse: a kept (decimated) result is on the output |

* **Sample rate.** A filter takes one sample every `P` enabled clocks: 2
  for the low-pass filter and 3 for the high-pass one. `*_take` is high
  during the clock whose rising edge captures the input.
* **Latency.** The result that includes a sample is registered `P` enabled
  clocks after that sample was taken, at the same edge that takes the next
  sample. The filter's valid flag is high during the following clock.
* **Decimation by two.** The filters compute every output `y[n]`. The top
  keeps `y[0], y[2], ...`, counting from the first sample after reset,
  so the decimated outputs come every 4 and 6 clocks. The result of the
  empty history just after reset is dropped.

## Filter taps and word widths

The taps are the Daubechies-4 analysis filters, rounded to integers. Each
is scaled as far as its LUT word allows:

* low-pass ×8: `{4, 7, 2, -1}`, with 5-bit LUT words;
* high-pass ×64: `{-8, -14, 54, -31}`, with 7-bit LUT words.

A result has at most `IN_W + LUT_W` bits: 9 and 13. The outputs are not
rescaled. Samples and taps are plain integers. If you read the samples as
fractions below one, the output is the same value times a fixed power of
two. `da_filter` stops elaboration with an error if a tap sum does
not fit the LUT word.

The taps, word widths and `DA_BITS` are parameters, in `da_dwt_pkg` and on
`dwt_top` / `da_filter`. Other wavelets can be used by changing them.
`IN_W` must be a multiple of `DA_BITS`. The internal accumulator of
`da_scaling_acc` is `IN_W + LUT_W + 1` bits wide. If you change the taps,
make sure `OUT_W` still holds every result.

## Where this differs from the original description, and what is assumed

* **Taps.** The description gives no filter coefficients. Daubechies-4 fits
  its four-coefficient LUT and its sketches of a four-input inner product
  with one negative term.
* **Table sizes.** The published low-pass table is 80 bits raw, which
  matches this design. It compresses to 40 bits there, against 72 here:
  with other taps, or another order of the table, the compression would
  differ. The published high-pass table is 256 bits raw. That does not
  follow from a 6-bit input, a 13-bit output and four taps, so the port
  widths were followed (112 bits).
* **Parallel structure.** The "even/odd" split is implemented as the split
  of bit weights between the two LUT copies (the `<<` before the adder).
  It is not a polyphase split of the samples.
* **Added by this design.** The handshake strobes (`*_take`, `*_valid`),
  the decimation, the reset behaviour and the ROM bit layout.
* **Not built.** The compressed table is a constant vector computed at
  elaboration, so synthesis may fold it into logic instead of placing it
  in a RAM block. There is no 2-D transform: no image source, no row and
  column passes and no transposition memory. Image pixels would also need
  wider inputs than the 4-bit low-pass port.

## Module map

| module | role |
|---|---|
| `dwt_top` | low-pass and high-pass filter, decimation by two |
| `da_filter` | one DA filter: builds its LUT from the taps and wires the parts below |
| `da_seq_ctrl` | slice counter: first / last slice of a sample period |
| `da_input_regs` | circulating tap shift registers, two bit slices per clock |
| `da_clut` | compressed LUT: compression at elaboration, one decoder per column |
| `clut_col_decoder` | rebuilds one column bit from toggle indices or the raw column |
| `da_scaling_acc` | combines the two LUT words, subtracts the sign slice, right-shifting accumulator |
| `da_dwt_pkg` | widths and tap constants |

## Verification and simulation

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M`.

* `tb_dwt_top` runs the top at its default parameters on two random
  sample streams, with and without clock-enable stalls. It compares every
  kept output with a direct convolution and checks the sample and output
  periods. It also counts that stalls, negative and most-negative samples,
  dropped and kept outputs all occurred.
* `tb_da_filter` checks both filter configurations, the latency and the
  period, and that full-width indices give the same results. It also runs
  a low-pass filter with 8-bit samples, which takes 4 clocks per result.
* `tb_da_clut` checks the worked example (all entries, 28 and 34 bits) and
  both DA tables of the design.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        --top-module tb_dwt_top rtl/da_dwt_pkg.sv tb/tb_dwt_top.sv
    ./obj_dir/Vtb_dwt_top
