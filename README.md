# DA-based delayed-LMS adaptive FIR filter with carry-save accumulation

An adaptive FIR filter needs an inner product `y = Σ w_k·x_k` per sample and
an update of every weight, `w_k += μ·e·x_k`. This design computes both without
a single multiplier:

* **Filtering by distributed arithmetic (DA), with the weights as the
  address.** The taps are cut into 4-point blocks. Each block keeps, in 15
  registers, every sum of a subset of its four current input samples. One bit
  slice of its four weights (bit `b` of `w0..w3`) forms a 4-bit address that
  selects one of those sums. Adding the L selected sums with the right powers
  of two gives the inner product. The additions use carry-save form, so one
  bit cycle costs one register read plus one full-adder delay.
* **Updating by shifts.** `μ·e` is rounded to a sign and a power of two. Each
  weight then moves by a shifted copy of its input sample, added or
  subtracted.

The filter runs on a fast bit clock. A sample takes `L` bit cycles. All other
work happens once per sample: loading the table, forming the output and error,
and updating the weights.

The main configuration has 32 taps and 8-bit samples and weights (`N = 32`,
`L = 8`). It is built from two 16-tap data computing blocks, each holding
four 4-point DA blocks. Setting `N` to 4, 8 or 16 builds the smaller filters
of the same family.

## Number formats

| quantity | bits | meaning |
|---|---|---|
| `x(n)`, `d(n)` | L (8) | two's-complement integers |
| weight `w_k` | L (8) | two's-complement fraction `W_k / 2^(L-1)`, range [-1, 1) |
| `y(n)` | L + log2 N + 1 (14) | integer, same units as `x` |
| `e(n)` | L (8) | `d - y`, saturated to ±(2^(L-1) − 1) |

The output is computed per 4-point block `b` and then summed:

    y(n) = Σ_b floor( Σ_{j<4} W_{4b+j} · x(n-4b-j) / 2^(L-1) )

So `y` is exact up to dropping the fraction bits of each block's sum.

## The 4-point DA block

### Table and its one-cycle refresh (`da_table`)

Entry `k` (1..15) holds `C_k = Σ_j k_j·x(n-j)`, the sum of the samples whose
bit is set in `k`. Entry 0 is always zero and needs no register. When a new
sample arrives, the sample vector moves by one place. That gives each entry's
new value from the old table:

    C_{2k}(n)   = C_k(n-1)             (even entries: moved, no adder)
    C_{2k+1}(n) = x(n) + C_k(n-1)      (odd entries: one adder each, k = 1..7)

`C_1` is the new sample itself. Seven adders therefore refresh the whole table
in one cycle. Entries are `L+2` bits wide.

### Signed carry-save shift accumulation (`csa_accumulator`)

This is the part of the design that needs the most care.

Write `w = −w_0 + Σ_{l≥1} w_l·2^-l`, where `w_0` is the sign bit. Then
`y = Σ_{l≥1} 2^-l·y_l − y_0`, where `y_l` is the table entry selected by
slice `l`. Slices are fed least significant first. Let `P_0 .. P_{L-1}` be the
table outputs in that order. The accumulator computes

    V = Σ_{i<L-1} P_i · 2^(i-(L-1))  −  P_{L-1}

It keeps a sum word `S` and a carry word `C`, both `W = L+2` bits. In every
bit cycle one row of full adders adds three words:

    a = S >>> 1          (arithmetic shift)
    b = C                (not shifted)
    p = P_i XOR {W{neg}}  (neg is high only for the sign slice)
    S' = a ^ b ^ p,  C' = majority(a, b, p)

The integer held is `S + 2·C`. A full adder's carry has twice the weight of
its sum bit, so `C` needs no shift. Halving the held value is then just
`(S >>> 1) + C`. The bit shifted out of `S` is an exact fraction bit of `V` and
is dropped.

The words are signed, so `a`, `b` and `p` are taken as sign-extended to
infinite width. Above bit `W-1`, every full adder sees the same three input
bits, so it gives the same outputs as bit `W-1`. `S'` and `C'` sign-extended
are therefore the exact infinite-width result. No overflow can build up,
however large `C` becomes, as long as every table output fits in `W` bits.

The sign slice uses the one's complement `~P = −P − 1`. The missing `+1`
enters at the final adder. After the last slice:

    floor(V) = S + 2·C + 1

With more than one block, the `+1` of every block is supplied by carry-ins
(see below). The testbench of this module checks the identity for random and
extreme table values.

### Hold registers

At the first slice of the next sample, the finished `S` and `C` are copied to
output registers, and the accumulator restarts from zero in the same cycle.
The slow output logic then has a whole sample period to settle.

## Combining blocks (`adder_tree`, `data_compute_block`)

A data computing block holds `P` 4-point blocks (`P = 4` for 16 or more taps).
One binary adder tree adds their held sum words and a second one adds their
carry words. Each first-level adder of the carry tree gets a carry-in of 1,
which adds `P/2` carry units. Carry words have double weight, so this equals
`P` in sum units: exactly the `+1` correction of each block. The 32-tap filter
adds the sum words of its two data computing blocks, and then their carry
words. The final adder forms `y = S_tot + 2·C_tot`. A lone 4-point filter
(`N = 4`) has no tree and puts the `+1` on the final adder's carry-in instead.

## Error and weight update (`error_unit`, `ctrl_word_gen`, `weight_increment4`)

* The error is `e = d − y`, saturated to ±127 for `L = 8`. It is then split
  into a sign and a 7-bit magnitude.
* The step size is `μ = 2^-MU_I / N`, which is `1/N` by default. It is applied
  as a right shift: `r = |e| >> (log2 N + MU_I)`.
* The control word `t` counts the leading zeros of `r`:

  | first set bit of r | r6 | r5 | r4 | r3 | r2 | r1 | r0 | none |
  |---|---|---|---|---|---|---|---|---|
  | t | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 (no update) |

* Every weight moves by `inc_k = x(n−2−k) >>> (t+1)`. The increment is added
  when `e ≥ 0` and subtracted when `e < 0`. The extra one-bit shift converts
  integer samples to weights with `L−1` fraction bits. Weights wrap modulo
  2^L.
* The sign, `t` and the update enable are shared by all weight increment
  blocks.

## Timing and interface (`da_adaptive_fir`, `da_controller`)

Everything runs on the bit clock `clk`. `da_controller` counts `L` cycles per
sample. Its strobe `sample_req` (called `tick` inside) is high in the last
cycle of each sample period. All sample-rate registers load at that edge,
including the `x_in` and `d_in` registers. The slow clock is therefore a
clock enable, and the sample-rate paths are multicycle paths of `L` bit
cycles.

For the sample `x(n)` taken at sample edge `n`:

| sample period | what happens |
|---|---|
| n (edges n .. n+1) | slices of `w(n)` read the table holding `x(n)..x(n−3)`; carry-save accumulation |
| n+1 | result held; adder trees, final adder, `e(n) = d(n) − y(n)`, `r`, `t` settle |
| edge n+2 | `y_out`, `e_out`, sign, `t` registered; `out_valid` high |
| edge n+3 | weights updated with `e(n)` and `x(n−k)` |

This gives the delayed LMS recursion with an adaptation delay of two:

    w_k(n+1) = w_k(n) ± (x(n−2−k) >>> (t(e(n−2)) + 1))

An `N+2` deep input delay line feeds two things. The DA table of block `b`
takes the sample entering tap `4b`. The weight update takes `x(n−2−k)`.
Reset (`rst_n`, asynchronous, active low) clears all samples, weights and
pipeline state. Updates are suppressed until the first real error has gone
through the pipeline.

Ports of `da_adaptive_fir`: `clk`, `rst_n`, `x_in[L]`, `d_in[L]`,
`sample_req`, `y_out[YW]`, `e_out[L]`, `out_valid`, and `w_out[N][L]` (the
current weights). `y_out` and `e_out` read just before sample edge `m` belong
to the sample taken at edge `m−3`.

## Files

| file | content |
|---|---|
| `rtl/da_fir_pkg.sv` | defaults (L, N, adaptation delay) and width functions |
| `rtl/da_controller.sv` | bit-cycle counter, slice index, sign control, sample strobe |
| `rtl/da_table.sv` | 15-register DA table with seven adders |
| `rtl/csa_accumulator.sv` | signed carry-save shift accumulator and hold registers |
| `rtl/inner_product4.sv` | 4-point block: table, 16:1 mux, accumulator |
| `rtl/barrel_shifter.sv` | arithmetic right shifter built from mux stages |
| `rtl/weight_increment4.sv` | four weight registers, barrel shifters, adder/subtractors |
| `rtl/adder_tree.sv` | binary adder tree with first-level carry-ins |
| `rtl/data_compute_block.sv` | P 4-point blocks plus sum and carry trees |
| `rtl/error_unit.sv` | final adder, error, saturation, sign/magnitude, μ shift |
| `rtl/ctrl_word_gen.sv` | leading-one encoder for `t` |
| `rtl/da_adaptive_fir.sv` | top: delay lines, blocks, error stage, weight update |

Every module has a self-checking testbench `tb/tb_<module>.sv`.
`tb/tb_da_adaptive_fir.sv` runs the default 32-tap filter (no parameter
overrides) together with 4-, 8- and 16-tap filters. Each filter runs in a
`tb/tb_fir_env.sv` harness that drives a system-identification stimulus,
including forced large errors and quiet phases. Every output, error and
weight is compared with an integer model of the recursion above. The harness
also counts additions, subtractions, skipped updates, saturations in both
directions, and the control words used. Any of these that never occurs is a
failure.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb -Irtl \
        --top-module tb_da_adaptive_fir rtl/da_fir_pkg.sv tb/tb_da_adaptive_fir.sv
    ./obj_dir/Vtb_da_adaptive_fir

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. The unit benches
build the same way; replace the testbench name. The end-to-end run
takes well under a second.

## How far to trust it

* Every module compiles with Verilator (`--lint-only -Wall`) and with the
  slang front end of Yosys. Verilator warns only about unused package
  constants, unused redundant top bits, and the reset used by an assertion.
* All testbenches pass, bit-exact against the integer models, for `N` = 4,
  8, 16 and 32.
* Each testbench was also run against a copy of its module with one
  deliberate fault. Every such fault was detected.
* No timing closure or FPGA implementation has been done. The slice and LUT
  counts reported for the original Spartan-3E implementation (for example,
  1287 slices, 1376 flip-flops and 2313 4-input LUTs at `N = 32`) have not
  been reproduced.
* The quality of adaptation has not been evaluated. The weight update uses
  only a sign and a power of two, and weights have 8 bits. In the test
  stimulus the error falls only a little, and it stays at a level set by this
  coarse update. The tests check arithmetic and timing, not convergence.

## Where this RTL departs from, or adds to, the original paper

The original description leaves several details open. The choices made here:

* Both clocks come from one bit clock plus a sample-rate enable, not two
  separate clocks.
* The output alignment is the design's own. The paper speaks of shifting the
  sum word right by one before adding the carry word, and of a final-adder
  carry-in of one. Here the carry word simply has twice the weight, and
  `y = S + 2C + (number of blocks)`, which is exact.
* The error is saturated to `L` bits, symmetrically, so that its magnitude
  fits the 7-bit word `r`.
* The weight increment has an extra one-bit alignment shift. A zero `r`
  means no update. Weights wrap instead of saturating.
* Pipelining and the hold registers were chosen to give the adaptation delay
  of two that the update rule uses. The paper's text also names the filter
  output `y(n−1)`. The alignment of `d` with `y` used here is this design's.
* The widths of the output, the trees and the internal words are this
  design's.
* Reset behaviour and the input interface are not in the original
  description. No handshake is used: a sample is taken every `L` cycles.
* Offset-binary coding of the DA table, mentioned as future work, is not
  implemented.
