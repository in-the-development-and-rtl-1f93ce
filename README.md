# A serial systolic processor for high-order 2-D image moments

The moment of order p = m + n of an N x M gray-level image is

    M_mn = sum_{x=1..N} sum_{y=1..M}  x^m  y^n  f(x,y)

Computed directly, it costs (m + n) multiplications per pixel, so the time
grows with the order. This processor takes one pixel per clock whatever the
order. It uses two ideas:

* **Powers by binary exponent.** x^m is the product of the powers x^(2^i)
  whose bit b_i of m is set. A pipeline of k stages squares the power in
  each stage and multiplies it into a running product when the bit is 1. It
  produces one x^m per clock, using 2k multipliers. With k = 3, any m up to 7
  is reached.
* **One processing element for the whole image.** The moment is the
  vector-matrix-vector product X F Y, with X = [1^m ... N^m] and
  Y = [1^n ... M^n]. Folded onto a single element, it becomes a stream.
  For every image line x, the power core first computes x^m, which is kept
  in a register. It then computes y^n f(x,y) for each column. A last
  multiplier forms x^m y^n f(x,y), and an adder accumulates the result.

All arithmetic is in a 19-bit floating-point format, because the moments span
a very wide range. The whole processor has 2k + 1 multipliers and one adder:
7 multipliers for the default k = 3.

This RTL implements the architecture published in "In the Development and
Evaluation of Specialized Processors for Computing High-Order 2-D Image
Moments in Real-Time". It follows the arrangement used there for the ASIC
and FPGA processors: 512 x 512 images, orders m, n <= 7, and a two-stage
adder.

## Block structure

```
            +-----------------+    +---------------------------+    +----------------------+
 start ---->| input_sequencer |    | power_core (K x           |    | moment_accumulator   |
 pix ------>|  (module A')    |--->|   power_stage, modules B) |--->|  (module A'')        |---> moment, done
 pix_rd <---| counters x, y   |    | x^m or y^n * data         |    | x^m reg, mul, adder  |
            +-----------------+    +---------------------------+    +----------------------+
                                      ^ m_q, n_q (order registers, loaded at start)
```

| module | role |
|---|---|
| `fp_pkg` | number format (`fp_t`), constants |
| `moment_pkg` | control word `ctl_t` that travels with every sample |
| `fp_mul` | combinational floating-point multiplier |
| `fp_add` | floating-point adder, registered output, optional middle register (`SPLIT`) |
| `int2fp` | unsigned integer to floating point (counters, pixels) |
| `power_stage` | one stage of the power core |
| `power_core` | K stages in a chain |
| `input_sequencer` | scans the image and issues one sample per clock |
| `moment_accumulator` | holds x^m, forms the products, accumulates |
| `moment_processor` | top level |

## The number format

| bit 18 | bits 17..8 | bits 7..0 |
|---|---|---|
| sign s | fraction f (10 bits, hidden leading 1) | exponent e (bias 127) |

The value is (-1)^s x 1.f x 2^(e-127). The published format gives the field
widths and the order (sign, mantissa, exponent) but no codes for special
values. This implementation adds these rules:

* exponent 0 means zero, and the all-zero word is the zero every unit produces;
* exponent 255 is an ordinary exponent, so the largest value is about 2^129;
* a result that is too large saturates to the largest magnitude;
* a result below 2^-126 flushes to zero;
* rounding is to nearest, with ties away from zero.

The multiplier multiplies the 11-bit mantissas, normalises by at most one
place, rounds, and adds the exponents less the bias. The sign is the XOR of
the operand signs.

The adder works like this:
1. It orders the operands by magnitude.
2. It shifts the smaller mantissa right by the exponent difference. The
   shift keeps guard, round and sticky bits.
3. It adds or subtracts, according to the signs.
4. It normalises and rounds.

The result is therefore always the exact sum, rounded once.

## How the image is streamed

The input sequencer has two counters: x runs over 1..N and y over 0..M.
Each line takes M + 1 clocks:

| y | sample into the power core | data | exponent bits used | what the accumulator does |
|---|---|---|---|---|
| 0 | x | 1 | of m | stores the result x^m in the x^m register; adds 0 |
| 1..M | y | f(x,y) | of n | multiplies y^n f(x,y) by x^m; adds it |

The pixel is read only in the clocks where y >= 1. `pix_rd` marks those
clocks. An image therefore takes N(M+1) clocks: for 512 x 512 that is
262,656 clocks, of which 512 are line clocks.

A 4-bit control word (`ctl_t`: valid, sel_m, first, last) travels with every
sample, one register per stage. In each stage, `sel_m` selects whether the
exponent bit comes from m or from n. The same line tells the accumulator
when to load the x^m register.

## The power core

Stage i holds the power x^(2^i):
* stage 0 multiplies its input by 1;
* every later stage squares the power it receives.

The stage's second multiplier multiplies the running product either by that
power or by 1, chosen by exponent bit b_i. Each stage has three registers:
* the power, after the squaring multiplier;
* the selected factor, after the multiplexer;
* the product, after the second multiplier.

Because the factor is registered before it is used, **the product runs one
clock behind the power and the control word**. The input sequencer sets up
this skew: its data path has two registers, its index path one. Every stage
then keeps the skew. The control word and the power leave the core K clocks
after they enter it, and so does the product.

Stage 0's "multiply by 1" wastes a multiplier. It is kept so that all stages
are alike and the multiplier count matches the published 2k + 1.

## The accumulator and its two partial sums

This is the least obvious part of the design.

The adder is too slow for a single clock at the target frequency, so it is
split into two stages: align and add, then normalise and round. A sum then
takes two clocks. The value on the feedback path is therefore the sum from
two samples earlier, not from one. Instead of stalling, the accumulator
**keeps two independent running sums**: one over the even-numbered samples
and one over the odd-numbered samples of the image. They alternate through
the adder: one sits in the adder's middle register while the other is in its
output register.

Two multiplexers feed the adder:

* operand a: the new product. It is 0 in line clocks. At the very end of the
  image it is the feedback delayed by one more clock.
* operand b: the feedback (the adder output). It is 0 for the first two
  samples of an image, which clears both running sums.

If the last sample enters the adder at clock T, the image finishes like this:

| clock | a | b | meaning |
|---|---|---|---|
| T | last product | feedback | last update of partial sum A |
| T+1 | 0 | feedback (partial sum B, final) | lets B pass once more |
| T+2 | feedback delayed one clock (B) | feedback (A, final) | B + A |
| T+4 | | | the adder output is the moment; `done` follows one clock later |

With `SPLIT = 0` (a single-stage adder, as in the basic serial processor
without the extra register) there is one running sum and no final step.

Summing in two interleaved chains rounds differently from one running sum.
The testbenches model both orders bit for bit.

## Timing

| arrangement | clocks from the edge that takes `start` to `done` |
|---|---|
| two-stage adder (default) | N(M+1) + K + 7 |
| single-stage adder (`SPLIT_ADDER = 0`) | N(M+1) + K + 4 |

The published processing time for the serial processor is
N(M+1) + t_pow + 2 operation times, with t_pow = k + 2. That matches the
single-stage count here. The two-stage arrangement adds one clock for the
extra adder stage and two for combining the partial sums.

For 512 x 512 and K = 3 the default takes 262,666 clocks. The published
processors ran at about 10 MHz (FPGA) and 23.4 MHz (ASIC), giving
26.1 ms and 11.2 ms per image respectively.

`busy` stays high from `start` to `done`. Any other `start` pulse in that
time is ignored, except one in the clock where `done` is high, which begins
the next image at once. The pixel source must present f(x,y) in every clock
where `pix_rd` is high: the pipeline has no stall.

## Accuracy and range

The 10-bit fraction is the weak point for large images:

* **Long sums lose small terms.** Once the running sum is about 2^11 times
  larger than a new term, the term is rounded away. For the full-size test
  (512 x 512, a hashed pseudo-random image, M_3,2) the result is 65 % below
  the exact moment. The hardware still matches, bit for bit, a model of the
  same operations, so this is a property of the format and not a fault. The
  two interleaved partial sums help only slightly. The deviation depends on
  how evenly the terms are spread. Terms that grow steeply toward the end of
  the scan (high m) suffer least. Simulated deviations:

  | image | moment | deviation from exact |
  |---|---|---|
  | 512 x 512 | M_3,2 | -65 % |
  | 640 x 480 | M_2,3 | -72 % |
  | 256 x 256 | M_5,1 | -21 % |
  | 256 x 256 (K = 4) | M_9,4 | -8 % |
  | 6 x 5, 5 x 4 | all tested | within 2 % |
* **High orders overflow.** For a bright 512 x 512 image, M_7,7 is about
  (512^8 / 8)^2 x 255, roughly 2^146. That is beyond the largest value
  (about 2^129), so the result saturates. Moments of moderate order, such
  as M_3,2 at about 2^66, are far from the limit.

If you need accurate moments of large images, widen `FRAC_W` in `fp_pkg`.
All units are written in terms of `FRAC_W`, `EXP_W` and `BIAS`; the
testbench reference model in `tb/fpref_pkg.sv` assumes the 19-bit layout and
would need the same change.

## Interface of `moment_processor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | begin an image; loads `m_order`, `n_order` |
| `m_order`, `n_order` | in | K | the orders m and n (0 .. 2^K - 1) |
| `pix` | in | PIX_W | pixel f(x,y), raster order (x outer, y inner) |
| `pix_rd` | out | 1 | the pixel on `pix` is taken in this clock |
| `busy` | out | 1 | image in progress |
| `done` | out | 1 | one-clock pulse: `moment` is valid |
| `moment` | out | 19 | M_mn in the format above; held until the next image ends |

| parameter | default | meaning |
|---|---|---|
| `N`, `M` | 512, 512 | image lines and columns (fixed at synthesis) |
| `K` | 3 | power-core stages; orders m, n < 2^K |
| `PIX_W` | 8 | pixel width |
| `SPLIT_ADDER` | 1 | two-stage adder with two partial sums (1) or a single-stage adder (0) |

Four stages (`K = 4`) give orders up to 15 in each coordinate (p <= 30).

## Choices made in this implementation

The datapath, meaning the counters, multiplexers, multipliers, adder and
register positions, follows the published block diagrams. The following
points are not given there and were chosen here:

* the zero, saturation, flush-to-zero and rounding rules of the number format;
* guard, round and sticky bits in the adder;
* which adder steps go before and after the middle register;
* integer-to-floating-point conversion of the counters and pixels (`int2fp`);
  the diagrams draw the counters straight into the multipliers;
* an 8-bit pixel, and the start/busy/done/pix_rd framing;
* the control word, with its first/last flags, that drives the clearing and
  finishing of the two partial sums;
* the result register behind the adder;
* an asynchronous active-low reset.

The mantissa multiplier is a plain `*`. The published units were built from
carry-save arrays and Wallace trees; that choice is left to synthesis.

The processor covers the moment engine only. The video digitiser that
supplies pixels and the link that carries results to a host are outside it:
connect them to `pix`/`pix_rd` and `moment`/`done`.

## Testbenches and simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. The reference arithmetic is
`tb/fpref_pkg.sv`. It works with real numbers, independently of the RTL's
bit manipulation.

| testbench | what it covers |
|---|---|
| `tb_fp_mul` | hand-worked products, rounding ties, zero, saturation, flush; 6,000 random pairs |
| `tb_fp_add` | both adder forms at one pair per clock, with latency; cancellation, far alignment, ties; 6,000 random pairs |
| `tb_power_stage` | first and later stages, random selects and bits, skewed product |
| `tb_power_core` | x = 1, 2, 3, ... for all 64 pairs (m, n) <= 7, latency, exact small powers |
| `tb_input_sequencer` | raster order, flags, pixel reads, N(M+1) busy clocks, start ignored while busy |
| `tb_moment_accumulator` | both adder forms, images of many sizes, done latency |
| `tb_moment_processor` | end to end: 6 x 5 images for all m, n <= 7 in both adder forms, a K = 4 processor up to order 15; exact clock counts |
| `tb_moment_full` | one 512 x 512 image at the default parameters: bit-exact result and 262,666 clocks |
| `tb_moment_workloads` | a 640 x 480 frame and a 256 x 256 image (K = 3), and a 256 x 256 image with K = 4 at order 13, through the helper `moment_image_run` |

To run one with plain Verilator (packages first, the rest is found by name):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv rtl/moment_pkg.sv tb/fpref_pkg.sv tb/tb_moment_processor.sv \
    --top-module tb_moment_processor -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps the width warnings of the testbenches from stopping the
build. Replace the testbench name to run another. The full-size run takes a few
seconds.
