# Six-tap low-pass FIR filter: direct form and delay-free convolution structure

This design computes the same 6-coefficient low-pass FIR filter,

    y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) + b3 x(n-3) + b4 x(n-4) + b5 x(n-5)

in two different ways, so that the two can be built and compared side by side:

* **Direct form** (`fir_direct`): the textbook structure. A chain of five
  registers holds the past samples. Each clock, the current sample and the five
  stored ones are multiplied by their coefficients and summed.
* **Convolution structure** (`fir_conv`): a filter with no registers at all.
  Six input samples x(0) .. x(5) are presented at once. A 3-bit address `a`
  chooses which output y(a) of their convolution with the coefficients appears
  at the output. The past samples a tap needs are picked out by a decoder and
  banks of AND and OR gates, not by a delay line.

Both use the same coefficients and the same arithmetic. For the same samples
they produce bit-identical outputs.

## The filter and its number format

The filter is a symmetric low-pass design made with a rectangular window and
specified with a normalised cut-off of 0.25. Its coefficients are 0.01, 0.064,
0.443, 0.443, 0.064, 0.01. For hardware they are approximated by multiples of
1/256:

| tap k | b(k)  | hardware value | word (x 1/256) | binary   |
|-------|-------|----------------|----------------|----------|
| 0, 5  | 0.01  | 0.015625       | 4              | 00000100 |
| 1, 4  | 0.064 | 0.0625         | 16             | 00010000 |
| 2, 3  | 0.443 | 0.4453125      | 114            | 01110010 |

These words are `fir_pkg::COEFS`.

Samples and outputs are 16-bit two's-complement numbers with 8 fraction bits
(Q8.8). So 1.0 is `16'h0100`, and the range is -128 .. +127.996.

Every product is computed exactly; each is 24 bits wide. The six products are
added exactly, the sum is shifted right by 8, and the low 16 bits are kept.
The shift rounds toward minus infinity. There is no saturation: a result
outside the Q8.8 range wraps around. The coefficients add up to 268/256, about
1.047. So a sum can wrap only when the inputs are close to full scale.

An impulse of 1.0 produces `0004, 0010, 0072, 0072, 0010, 0004`, which is the
coefficient list itself. A step of 1.0 produces the running sums `0004, 0014,
0086, 00f8, 0108, 010c`.

The coefficients are symmetric, so the phase is linear: -2.5 w, a delay of 2.5
samples. The gain of the hardware coefficients is H(w) = sum b(k) e^(-jwk).
The frequency-response testbench measured these values, and they agree with
the formula to better than 0.002:

| w (x pi) | 0    | 0.1  | 0.2   | 0.3   | 0.4   | 0.5   | 0.6   | 0.7    | 0.8    | 0.9    | 1.0 |
|----------|------|------|-------|-------|-------|-------|-------|--------|--------|--------|-----|
| gain dB  | 0.40 | 0.11 | -0.72 | -2.04 | -3.73 | -5.69 | -7.86 | -10.37 | -13.75 | -19.61 | -inf (exact zero) |

The gain is about 6 dB down at 0.5 pi rad/sample, which is a quarter of the
sampling rate.

### Constant multipliers

No general multiplier is used. `coef_mult` multiplies by a constant using only
shifted copies of the sample, one for each set bit of the coefficient:

* 4x = x<<2
* 16x = x<<4
* 114x = (x<<6) + (x<<5) + (x<<4) + (x<<1)

The shifts are just wiring, so the only logic is the adders for coefficient
114.

## Direct form (`fir_direct`)

```
x ──┬── z^-1 ──┬── z^-1 ──┬── z^-1 ──┬── z^-1 ──┬── z^-1 ──┐
   b0        b1         b2         b3         b4         b5
    └──── + ────── + ───────── + ───────── + ───────── + ──── y
```

* `delay_line` holds x(n-1) .. x(n-5) in five 16-bit registers. They are
  clocked on the rising edge of `ck`. `rstbar` is an active-low asynchronous
  reset that clears all five registers.
* Six `coef_mult` instances form the products.
* A chain of five adders sums the products, from tap 0 to tap 5.

**Timing.** The output is not registered. y(n) is a combinational function of
the current input x(n) and the delay line. It is valid in the same clock period
as x(n), after the adder chain has settled. The rising edge of `ck` then moves
x(n) into the delay line. Each clock takes one sample in and gives one result
out.

## Convolution structure (`fir_conv`)

This is the less obvious of the two. Once the six samples are all available,
the convolution sum for output n is

    y(n) = sum over k = 0 .. n of  b(k) x(n-k)        (n = 0 .. 5)

Terms with n-k < 0 are zero; this is the same as the direct form starting from
a cleared delay line. The structure has six multiplier lanes, one per
coefficient. Lane k must receive x(n-k) for the selected n, or 0 if n < k.

```
a ─► decoder_3to8 ─► D0..D7
                        │
x0..x5 ─► and_gate_bank (gate (k,j) passes x(j) when D(j+k) = 1)
                        │
          or_gate_bank  (lane k = OR of its gates = x(n-k) or 0)
                        │
          coef_mult x 6 (lane k times b(k))
                        │
          adder_tree    ((p0+p1) + (p2+p3)) + (p4+p5)  ─► y
```

**Decoder.** `decoder_3to8` turns `a` into one active line D(a).

**AND gate bank.** Lane k has one 16-bit AND gate for each sample it can ever
need: x(0) .. x(5-k). That makes 6, 5, 4, 3, 2 and 1 gates for lanes 0 to 5,
21 gates in all. Gate (k, j) passes x(j) only when line D(j+k) is active:

| address a | active line | lane 0 | lane 1 | lane 2 | lane 3 | lane 4 | lane 5 |
|-----------|-------------|--------|--------|--------|--------|--------|--------|
| 0         | D0          | x0     | 0      | 0      | 0      | 0      | 0      |
| 1         | D1          | x1     | x0     | 0      | 0      | 0      | 0      |
| 2         | D2          | x2     | x1     | x0     | 0      | 0      | 0      |
| 3         | D3          | x3     | x2     | x1     | x0     | 0      | 0      |
| 4         | D4          | x4     | x3     | x2     | x1     | x0     | 0      |
| 5         | D5          | x5     | x4     | x3     | x2     | x1     | x0     |
| 6, 7      | D6, D7      | 0      | 0      | 0      | 0      | 0      | 0      |

**OR gate bank.** Only one line is active at a time, so at most one gate in a
lane passes a value. The OR of the lane's gates is therefore the selected
sample, or 0. This is a multiplexer built from a one-hot select.

**Multipliers and adders.** Each lane then goes through its constant multiplier
and the six products are added in a tree. The final scaling is the same as in
the direct form.

**Spare addresses.** Decoder lines D6 and D7 are not connected to any gate. For
`a` = 6 or 7 every lane is 0 and y = 0. They are reserved for a larger sample
block.

**Timing.** The structure is purely combinational: no clock, no reset, zero
cycles of latency. Its delay is the path decoder → AND → OR → multiplier →
three adder levels. Compare this with the direct form's path through five
chained adders. To get all six outputs of a block, step `a` from 0 to 5. The
structure computes only the first six outputs of a 6-sample block, each
starting from zero history. It keeps no state between blocks.

## Top level (`fir_top`)

`fir_top` places the two filters side by side with separate ports:

| port               | dir | width   | filter        | meaning                              |
|--------------------|-----|---------|---------------|--------------------------------------|
| `ck`               | in  | 1       | direct        | sample clock, rising edge            |
| `rstbar`           | in  | 1       | direct        | async active-low reset of the delay line |
| `x`                | in  | 16      | direct        | sample x(n), Q8.8                    |
| `y`                | out | 16      | direct        | output y(n), Q8.8                    |
| `a`                | in  | 3       | convolution   | index of the output to form          |
| `x0` .. `x5`       | in  | 16 each | convolution   | samples x(0) .. x(5), Q8.8           |
| `y_conv`           | out | 16      | convolution   | output y(a), Q8.8                    |

Feed the direct form x0, x1, ... on successive clocks after a reset. In the
period where x(n) is applied, `y` equals `y_conv` with `a = n`.

## Where this design makes its own choices

The structure of both filters, the coefficient words, the 16-bit ports and the
3:8 decoder are those of the design being reproduced. The following are
choices of this implementation:

* **Signed samples.** Samples are treated as signed Q8.8. All of the reference
  impulse and step data are positive, so an unsigned reading would give the
  same results on them.
* **Exact arithmetic, one final scaling.** Products are exact and the sum is
  scaled once, with floor rounding and wrap-around. There is no saturation.
* **Combinational direct-form output.** The direct form's output has no
  register after the adder chain.
* **Asynchronous reset.** The delay line reset is asynchronous, active low, and
  clears to zero.
* **Multiplication.** The "shift" multiplication is fixed wiring plus adders,
  not a clocked shift register. This works because every coefficient is a
  constant.
* **Adder grouping.** The convolution structure uses a pairwise adder tree. The
  direct form uses a linear adder chain. Addition is exact, so the grouping
  never changes the result.
* **No latches.** The convolution structure contains no storage of any kind.
  A build of the reference design reported six latches; their purpose is not
  known, and none are built here.
* **Register count.** The direct form has 80 flip-flops (five 16-bit stages).
  A build of the reference design reported 64.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | tap count, coefficient words, widths |
| `rtl/coef_mult.sv` | shift-and-add constant multiplier |
| `rtl/delay_line.sv` | z^-1 register chain |
| `rtl/fir_direct.sv` | direct-form filter |
| `rtl/decoder_3to8.sv` | one-hot address decoder |
| `rtl/and_gate_bank.sv` | AND gate bank, 21 word gates |
| `rtl/or_gate_bank.sv` | OR gate bank, one OR per lane |
| `rtl/adder_tree.sv` | six-input adder tree |
| `rtl/fir_conv.sv` | convolution structure |
| `rtl/fir_top.sv` | both filters side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_fir_freq_response.sv` | frequency-response measurement |

The filters' only parameter is `DATA_W`, the sample width, which defaults to 16.
The building blocks also take widths (`COEF_W`, `IN_W`, `ADDR_W`), the depth
of the delay line (`DEPTH`) and the constant `COEF` of each multiplier; the
filters set these themselves. The tap count and the coefficients
are package constants. Changing them means editing `fir_pkg`; the AND bank
and the adder tree are written for six taps.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, to run the end-to-end test
with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

To run another testbench, replace `tb_fir_top` with its name.

* `tb_fir_top` runs at the default sizes. It does a series of operations: an
  impulse, a step, 300 random sample blocks and one full-scale block. Each
  operation resets the direct form and clocks in six samples. The same six
  samples go to the convolution structure while `a` steps from 0 to 5. Each
  output is checked against an independent integer model and against the
  other filter. The test also checks the spare addresses 6 and 7, runs the
  direct form past the six-sample block, and checks that each of these
  behaviours actually happened: reset, every address, the spare addresses,
  output wrap-around, and streaming.
* `tb_fir_direct` and `tb_fir_conv` check the impulse words `0004 0010 0072
  0072 0010 0004`, the step response, and long random sequences. These include
  full-scale inputs and a reset in the middle of a stream.
* `tb_fir_freq_response` sends sinusoids at 0.1 pi .. 0.9 pi through the
  direct form. It correlates the output with sine and cosine to get the complex
  gain at each frequency, and compares that gain with the formula above. It
  also checks the exact DC gain (64.0 in, 67.0 out) and the exact zero at pi.
* The unit testbenches cover the blocks exhaustively or randomly:
  * every decoder address;
  * every AND gate under every one-hot select;
  * single-hot and dense OR inputs;
  * extreme and random adder inputs;
  * delay-line contents after every clock, including an asynchronous reset
    between clock edges;
  * products for all three coefficients with random and extreme samples.

All testbenches pass with Verilator 5. Each one has been shown to fail when
its module is deliberately broken.
