# Direct-form FIR filter with radix-4 modified Booth multipliers

A finite impulse response filter computes

    y[n] = h[0]·x[n] + h[1]·x[n-1] + ... + h[T-1]·x[n-T+1]

and almost all of its cost goes into the T multiplications. This design
lowers that cost by building each multiplier as a radix-4 (modified) Booth
multiplier. Booth recoding turns an L-bit multiplier into L/2 signed digits
instead of L bits, so only L/2 partial products have to be added. The filter
itself uses the direct form. Past samples wait in a chain of L-bit
registers, and the products are summed by a chain of adders. The transposed
form would instead keep wide partial sums in its registers. So the direct
form needs less register area, but it has a long combinational path.

Default configuration: 8-bit two's-complement samples and coefficients,
4 taps, 18-bit full-precision output.

## Structure

```
                 x_n ──┬──────────────┬──────────────┬──────────────┐
                       │         ┌────┴───┐     ┌────┴───┐     ┌────┴───┐
                       │  en ──► │  D-FF  ├──┬─►│  D-FF  ├──┬─►│  D-FF  │  delay_line
                       │         └────────┘  │  └────────┘  │  └────┬───┘
                       ▼                     ▼              ▼       ▼
           h[0] ─► booth_multiplier  h[1] ─► ...    h[2] ─► ...  h[3] ─► ...
                       │                     │              │       │
                       └──────► cla_adder ───┴─► cla_adder ─┴► cla_adder ─► y_n
```

| module             | role |
|--------------------|------|
| `fir_booth_top`    | the filter: delay line, one multiplier per tap, adder chain |
| `delay_line`       | D flip-flop chain holding x[n-1] ... x[n-T+1] |
| `booth_multiplier` | signed L×L → 2L product |
| `booth_encoder`    | recodes 3 overlapping multiplier bits into one radix-4 digit |
| `booth_pp_gen`     | Booth decoder: picks 0, X or 2X and inverts it for negative digits |
| `wallace_tree`     | layers of 3:2 carry-save adders, reducing N rows to two |
| `csa_3to2`         | one row of full adders (the cell of the Wallace tree) |
| `cla_adder`        | W-bit carry look-ahead adder built from `cla4` groups |
| `cla4`             | 4-bit look-ahead group with group generate/propagate |
| `fir_booth_pkg`    | default sizes and the `booth_digit_t` struct |

## Radix-4 Booth recoding

The multiplier Y (the coefficient) is read in overlapping 3-bit windows
`{y[2i+1], y[2i], y[2i-1]}`, with `y[-1] = 0`. Each window gives one digit:

    d_i = -2·y[2i+1] + y[2i] + y[2i-1]      d_i ∈ {-2, -1, 0, +1, +2}

    bits  000 001 010 011 100 101 110 111
    d_i    0  +1  +1  +2  -2  -1  -1   0

so that `Y = Σ d_i · 4^i` over `i = 0 .. L/2-1`. The digits are exact for
two's-complement Y: the top window's `-2·y[L-1]` term supplies the sign
weight. `booth_encoder` outputs the digit as three select lines, `neg`,
`one` (|d| = 1) and `two` (|d| = 2).

`booth_pp_gen` turns a digit into a partial product of the multiplicand X.
It selects `X` (sign-extended to L+1 bits) or `2X` (X shifted left). For a
negative digit it inverts that value. The +1 that completes the two's
complement leaves as a separate `neg` bit, so the decoder needs no carry
chain.

## Summing the partial products

`booth_multiplier` arranges the rows as follows (W = 2L):

* Row i (i = 0 .. L/2-1) is the (L+1)-bit decoder output. It is
  sign-extended to W bits and shifted left by 2i.
* One extra row holds the `neg` bits, the one of row i at bit 2i.

For L = 8 that is 5 rows of 16 bits. `wallace_tree` takes the rows in
groups of three. Each group goes through a row of full adders, which
outputs a sum row and a carry row shifted left by one. Rows left over pass
down unchanged. A layer of n rows leaves `2·⌊n/3⌋ + n mod 3` rows, and
layers are added until two rows remain. Five rows need three layers:
5 → 4 → 3 → 2. The last two rows go into `cla_adder`. All of this is
modulo 2^W, which is exact for an L×L signed product. Carries out of the
top bit are dropped.

`cla_adder` pads its operands to a multiple of 4 bits. Each 4-bit group
(`cla4`) computes its internal carries directly from its generate and
propagate signals. The carry between groups is `C(j+1) = G(j) | P(j)·C(j)`.
That is one gate level per group, not four, but the carry still passes
through the groups one after another. The full 2-level look-ahead tree is
not built.

## Filter timing and interface

`fir_booth_top #(L = 8, TAPS = 4)`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1 | clock of the delay line |
| `rst_n` | in  | 1 | asynchronous, active low; clears the sample history |
| `en`    | in  | 1 | sample enable: the delay line takes `x_n` on a rising edge with `en = 1` |
| `x_n`   | in  | L | current sample x[n] |
| `coef`  | in  | TAPS×L packed, `coef[k]` = h[k] | coefficients; h[0] multiplies x[n] |
| `y_n`   | out | 2L + clog2(TAPS) | y[n], two's complement, full precision |

* `y_n` is combinational. It depends on the current `x_n` and on the
  delay-line registers. Nothing is registered between the input and the
  output, so the critical path runs input → Booth multiplier → T-1 chained
  adders → output.
* Present x[n] and read y[n] in the same cycle, then clock with `en = 1`.
  With `en` tied to 1 the filter takes one sample per clock and has no
  latency beyond the combinational delay.
* With `en = 0` the history is held, so the source can pause.
* The output has clog2(TAPS) guard bits and cannot overflow, even when
  every product is (-128)·(-128).

The coefficient is the Booth-recoded operand and the sample is the
multiplicand. If the coefficients are held constant, a synthesis tool can
therefore fold the encoders away.

## Where this design makes its own choices

The filter structure is a D-FF delay line, Booth multipliers and an adder
chain. The multiplier structure is a Booth encoder, a Booth decoder, a
Wallace tree and a carry look-ahead adder, and the word length is 8 bits.
All of these follow the design as described. The following are this
design's own choices:

* **Tap count.** 4 taps; no order is specified. `TAPS` is a parameter
  (at least 2).
* **Coefficients as ports.** The coefficients are input ports, not
  constants, so one netlist can serve any filter of the chosen order.
* **No pipelining.** No pipeline registers between adders and no output
  register. This matches a single combinational input-to-output path.
  Adding registers after the multipliers is the obvious change for a
  higher clock rate.
* **Full-precision output.** The products and the sum are kept at full
  precision. A fixed-width variant would return only L bits per product
  and drop the low half. Its usual goal is an output as wide as the input,
  with the truncation error reduced by a compensation circuit that
  estimates the lost carries (a multilevel conditional-probability
  estimator). That estimator is not included, because its equations are
  not available here. Without it, truncation only adds error, so the
  output stays exact.
* **Parallel, not sequential, multiplier.** A radix-4 multiplier can also
  be built as a sequential unit that spends L/2 clock cycles per product.
  This design builds the parallel version: all L/2 partial products exist
  at once and are summed in the tree.
* **Row layout.** Sign extension by replication and a separate row for the
  negation bits. Both are simple and correct, but not the smallest
  possible (sign-extension-prevention constants would save area).
* **Reset and enable.** An asynchronous active-low reset and the `en`
  sample enable.
* **Width.** `L` must be even and at least 4; `booth_multiplier` stops
  elaboration with an error otherwise, as `fir_booth_top` does for
  `TAPS < 2`. `booth_pp_gen` asserts that a digit never selects X and 2X
  at once.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_encoder`    | all 8 windows against the digit formula |
| `tb_booth_pp_gen`     | every 8-bit X with every digit: `pp + neg == d·X` |
| `tb_wallace_tree`     | random rows, 5×16 and 9×20 (four layers), against the plain sum |
| `tb_cla_adder`        | 16- and 18-bit widths: full carry chains, corners, 20000 random |
| `tb_booth_multiplier` | all 65536 signed 8×8 pairs, all 4×4 pairs, 20000 random 12×12 |
| `tb_delay_line`       | shifting, holding while `en = 0`, asynchronous reset |
| `tb_fir_booth_top`    | whole filter at its default size against an integer model |

`tb_fir_booth_top` instantiates the filter with its default parameters. It
runs an impulse response (which reads the coefficients back out in order),
a step response, the all-(-128) worst case, and 10000 random samples with
200 random coefficient sets. During the random part it stalls on about one
clock in five and resets once in the middle of the stream. It counts each
Booth digit value (-2 .. +2), the stalls, the reset and the outputs beyond
16 bits, and fails if any of them never occurred.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_fir_booth_top rtl/fir_booth_pkg.sv tb/tb_fir_booth_top.sv
./obj_dir/Vtb_fir_booth_top
```

Substitute any other testbench name; the package file must come first.

What is not verified: timing and power. The design is written to be
synthesizable, but no delay or power figure has been measured for it.
