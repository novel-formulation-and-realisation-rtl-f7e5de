# Prime-length DCT by distributed arithmetic

This is a pipelined hardware DCT for an odd prime transform length N. It
is written in synthesizable SystemVerilog, and the default is N = 7. Apart
from N-1 final scalings, it has no multipliers. The core of the transform
is recast as two cyclic correlations of length (N-1)/2. Each correlation
is evaluated by *distributed arithmetic* (DA): the input words are fed in
one bit-plane at a time, a small ROM holds every possible sum of
coefficients, and an adder accumulates the ROM outputs with a shift. The N-1
scalings are done by a bit-serial shift-add circuit. So the whole datapath
is made of memories, adders and registers.

The architecture follows the article *Novel Formulation and Realisation of
Discrete Cosine Transform using Distributed Arithmetic*: the algorithm, the
three-stage pipeline, table-lookup permutations, DA correlators and the
shift-add scaler. The word widths, bit orders, handshakes and number formats
are not given there. They are this implementation's own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## The algorithm in five steps

The transform computed is

    Y(k) = sum_{i=0..N-1} y(i) cos(pi (2i+1) k / 2N),   k = 0..N-1.

1. **Alternating prefix sums.** Set x(N-1) = y(N-1) and x(i) = y(i) - x(i+1).
   Then for k >= 1

       Y(k) = (2 T(k) + x(0)) cos(k pi / 2N),   T(k) = sum_{i=1..N-1} x(i) cos(pi i k / N),

   and Y(0) = sum y(i).
2. **Even/odd split.** T(2k) is a sum of x(i) cos(2 pi i k / N). T(N-2k)
   is the same sum taken over e(i) = (-1)^i x(i). Together they cover every
   T(1..N-1).
3. **Rader-style reindexing.** N is prime, so a primitive root g makes
   v -> <g^v>_N a permutation of 1..N-1. Reindexing both sums through it
   turns them into cyclic correlations of length N-1, with coefficients
   C(n) = cos(2 pi <g^n>_N / N).
4. **Folding.** C(n + (N-1)/2) = C(n), so each correlation folds to length
   L = (N-1)/2. Its input is the sum x''(i) = x'(i) + x'(i+L), where
   x'(v) = x(<g^v>_N):

       T'(k) = sum_{i=1..L} x''(i) C(i+k),   T'(k) = T(fold(2 <g^k>_N)),
       T''(k) = same with e'',               T''(k) = T(|N - 2 <g^k>_N|),

   Here fold(m) = m when m <= N, and 2N - m otherwise (T(m) = T(2N-m)).
5. **Scaling.** Y(k) = (2T(k) + x(0)) cos(k pi / 2N), done with one serial
   multiplier.

### The index maps for N = 7, g = 3

The powers <3^v>_7 for v = 1..6 are 3, 2, 6, 4, 5, 1. This one sequence sets
every table in the design:

| table | contents |
|---|---|
| input permutation x'(1..6) | x(3), x(2), x(6), x(4), x(5), x(1) |
| folded inputs x''(1..3) | x(3)+x(4), x(2)+x(5), x(6)+x(1) |
| sign of e'(v) | v = 1, 5, 6 negated (those v with <3^v>_7 odd) |
| folded inputs e''(1..3) | x(4)-x(3), x(2)-x(5), x(6)-x(1) |
| correlation row k = 1 | C(2), C(3), C(1) = cos 4a, cos 12a, cos 8a, a = pi/7 |
| branch A outputs T'(1..3) | T(6), T(4), T(2) |
| branch B outputs T''(1..3) | T(1), T(3), T(5) |

All of these tables are computed during elaboration from the parameters N
and G, by the functions in `rtl/dct_pkg.sv`. The module `dct_prime_da`
stops elaboration with an error if G is not a primitive root of N.

## Pipeline

```
            stage 1                  stage 2 (tk_realisation)                    stage 3
 y(i) --> stage1_xgen --x(i)--> [perm_network PRE] --x'(v)--+--> hw_module A --> T(2j)   --+
            |   |                 (2-bank buffer)           |    (pre_add, corr_da,        |
            |   +--x(0), Y(0)---------------------------+   |     perm_network POST_EVEN)  |--> stage3_scale --> Y(k)
            |                                           |   +--sign_mult--> hw_module B --> T(2j-1) -+   (cos table,
            |                                           |        e'(v)   (POST_ODD)                  shift_add_mult)
            +-------------------------------------------+------------- per-bank side registers ------+
```

- **Stage 1 (`stage1_xgen`).** It takes one sample per cycle. Each sample
  passes one subtractor and a register to give x(i), and one adder and a
  register to give Y(0). x(1..N-1) are written into the input permutation
  network's RAM at their natural addresses. x(0) and Y(0) go into side
  registers that travel with the block.
- **Stage 2 (`tk_realisation`).** The sequencer reads the input network by
  index v = 1..N-1, one read per cycle. The network's ROM turns each index
  into the address <g^v>_N, so the RAM returns x'(v). Each sample goes to
  branch A as it is, and to branch B through `sign_mult`. Each branch
  (`hw_module`) folds its samples (`pre_add`), runs the DA correlation
  (`corr_da`), and writes output k into its own output permutation network.
- **Stage 3 (`stage3_scale`).** It outputs Y(0) first. Then, for k = 1..N-1,
  it reads T(k): even k from branch A's network, odd k from branch B's. It
  rounds T(k) to an integer, forms z = 2 round(T(k)) + x(0), and multiplies
  z by round(2^12 cos(k pi / 2N)) in the bit-serial `shift_add_mult`.

**Buffers and flow control.** Each permutation RAM has two banks, and these
banks are the buffers between the stages. Each buffer has a full flag per
bank, a write pointer and a read pointer. So stage 1 can collect block
n+2 while stage 2 processes block n+1 and stage 3 outputs block n. A stage
starts when its input bank is full and its output bank is empty. When a
stage finishes, it clears one flag, sets the next, and moves both pointers.
While both input banks are full, `in_ready` falls and the source must hold
its sample.

## The DA correlator (`corr_da`)

This is the least obvious part of the design.

- **Inputs.** A ring of L shift registers holds the words s(1..L). These
  are x'' or e'', M = 12 bits each, in two's complement.
- **ROM address.** Every cycle each word rotates left by one bit. The L bits
  that leave the words' most significant ends form an L-bit address a.
- **ROM contents.** The ROM has 2^L words (8 for N = 7). Word a holds
  round(2^F · sum_p a[p] C(p+2)), where p counts from 0 and F = 12.
- **Accumulation.** An adder and a register compute
  acc = 2·acc + ROM[a], starting from 0. The first bit plane is the sign
  plane, so its ROM word is subtracted instead of added. After M cycles,
  acc = 2^F · T(k), except for ROM rounding, which is at most
  2^(M-F-1) = 0.5.
- **Next output.** After M one-bit rotations the words are back in their
  starting places. In the same cycle, the ring also rotates by one whole
  word (position p takes the word from position p-1). This turns the fixed
  ROM into the next row of the correlation matrix, C(i+k+1). Only the data
  moves; the ROM never changes.
- **Throughput.** There are L outputs, M cycles each, so one correlation
  takes L·M = 36 cycles for N = 7.

Taking the bits most significant first with a left-shifting accumulator
keeps the result exact. The more usual LSB-first form would need the
accumulator to shift right and drop bits.

The multiplier in `shift_add_mult` uses the same method, with one bit of z
per cycle ANDed with the coefficient word.

## Interface of the top, `dct_prime_da`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake; a sample is taken when both are high |
| `in_y` | in | W_IN | sample, two's complement; each block is sent **y(N-1) first, down to y(0)** |
| `out_valid` | out | 1 | one coefficient this cycle (no back-pressure) |
| `out_k` | out | clog2(N) | k, from 0 up to N-1 |
| `out_y` | out | YW | Y(k), two's complement with CF = 12 fraction bits |
| `out_last` | out | 1 | marks Y(N-1) |
| `stat_pre_full`, `stat_post_full`, `stat_busy` | out | 2, 2, 3 | buffer flags and stage activity, for observation |

### Widths at the defaults

- Input samples: W_IN = 8.
- x(i) and Y(0): XW = W_IN + clog2(N) = 11.
- DA word length: M = XW + 1 = 12.
- T(k): TW = M + F + clog2(L+1) + 1 = 27, with 12 fraction bits.
- Multiplicand z: ZW = TW - F + 2 = 17.
- Output: YW = ZW + CF + 1 = 30.

All of these are derived parameters, so they follow N and W_IN.

### Timing at the defaults (cycles)

| what | formula | N = 7 |
|---|---|---|
| stage 1 per block | N | 7 |
| stage 2 per block | N + 4 + L·M | 47 |
| stage 3 per block | 2 + (N-1)(ZW+4) | 128 |
| last input sample to Y(N-1) | 2 + (N + 4 + L·M) + (N-1)(ZW+4) | 175 |

Stage 3 is the slowest stage, so it sets the block rate: one block every
128 cycles. The article expects stage 2 to dominate and the work to be
spread evenly over the stages. That would need z to be about as long as
the DA word, or more than one scaler. This design keeps the single scaler
of the block diagram.

### Accuracy

The outputs differ from a double-precision DCT because of three
roundings: in the DA ROM, of T(k) to an integer, and in the cosine table.
The worst-case bound is 2·(2^(M-F-1) + 0.5) + |z|max·2^-(CF+1) output
units, about 3.4 at the defaults. In simulation the largest error seen is
about 1 unit, at N = 7 and at the other lengths tested. Y(0) is exact.

## Departures and own choices

- **Sample order.** The order y(N-1), ..., y(0) comes from running the
  recursion for x(i) directly on the input stream.
- **Output order.** Y(0) is delayed so that it leaves with the rest of its
  block, as the first output.
- **The buffers.** They are the permutation RAMs with two banks. The
  article only draws a "buffer" between stages.
- **Output-side index maps.** The even branch folds 2<g^k>_N back into range
  with T(m) = T(2N - m), as the worked N = 7 example does.
- **DA details.** Bits go most significant first, and the sign plane is
  subtracted, so the correlator adder is an adder/subtractor. The figure
  draws the word ring starting at x''(k). Here the words are arranged so
  that one fixed ROM serves every k.
- **Rounding T(k).** T(k) is rounded to an integer before the shift-and-add
  of x(0). This keeps the serial multiplier at 17 cycles instead of 28.
- **Fixed-point formats.** F = CF = 12 fraction bits, and all rounding is to
  nearest.
- **Status outputs and assertions.** The `stat_*` ports and the SVA
  assertions (bank overwrite, branch lock-step, no overrun) are additions.
- **Not built: the cheaper variant.** The article mentions a version with
  only one correlation module, at twice the stage-2 time. Only the
  two-module configuration is built.

## Changing the design

- **Length.** Set `N` to another odd prime and `G` to a primitive root of
  it. Every table, width and counter follows. The lengths tested in
  simulation are N = 5, 11 and 13 with G = 2, and N = 17 with G = 3.
- **Precision.** `W_IN` sets the input width, `F` the DA ROM precision and
  `CF` the cosine table precision.
- **ROM size.** The DA ROM has 2^((N-1)/2) words, so its size is what limits
  the practical length.

## Files and simulation

`rtl/` holds one module or package per file:

- `dct_pkg.sv`: table builders and the permutation-mode enum.
- `dct_prime_da.sv`: the top and the buffer control.
- The stages: `stage1_xgen.sv`, `tk_realisation.sv`, `stage3_scale.sv`.
- Their parts: `perm_network.sv`, `sign_mult.sv`, `hw_module.sv`,
  `pre_add.sv`, `corr_da.sv`, `shift_add_mult.sv`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>`:

- **Block testbenches.** Each compares its module with values computed
  independently in the testbench: double-precision sums, the index maps of
  the N = 7 example, and exact integer products. Each also checks the
  module's cycle timing.
- **`tb_dct_prime_da`.** This is the end-to-end test at the default
  parameters. It sends 40 blocks: extremes, impulses, alternating signs and
  random data, first with random input gaps, then back to back. It compares
  every Y(k) with a double-precision DCT and checks the latency and the
  steady-state block period. It also counts input stalls, both banks of
  each buffer full, and all three stages busy at once.
- **`tb_dct_prime_lengths`.** This runs the pipeline at N = 5, 11, 13
  and 17 side by side, through the helper `dct_len_harness`, and checks
  every output against the same worst-case error bound.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/dct_pkg.sv tb/tb_dct_prime_da.sv \
          --top-module tb_dct_prime_da -o sim && ./obj_dir/sim
```
