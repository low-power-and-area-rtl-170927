# Three-parallel symmetric FIR filter with a BEC carry select adder

A linear-phase FIR filter has symmetric coefficients, `h(i) = h(N-1-i)`, so a
direct-form filter can share one multiplier between each pair of mirrored taps.
A parallel filter that takes three samples per clock loses most of that saving
when it is built from a fast FIR algorithm (FFA). The FFA splits the filter into
polyphase sub-filters, and most of those sub-filters are not symmetric.

This design rearranges the three-parallel FFA for an odd length `N` that is a
multiple of 3. With that rearrangement, four of the six sub-filters have
symmetric or antisymmetric coefficients, and each of those four needs only half
its multipliers. The price is five more adders in the pre- and
post-processing networks than the usual three-parallel FFA needs. That number
does not grow with `N`. Those adders are improved carry select adders, in which
a binary to excess-1 converter (BEC) replaces the second ripple carry adder of
each group.

The default build is an 81-tap filter with 8-bit signed samples and
coefficients and a 32-bit full-precision output. It has 110 multipliers and 171
adders.

## Polyphase view and the six sub-filters

Write the input, the output and the coefficients in three phases:
`Xj = {x(3k+j)}`, `Yj = {y(3k+j)}` and `Hj = {h(3m+j)}`. Each `Hj` has
`M = N/3` taps. `D` is a delay of one block, which is one clock here or three
samples. A three-parallel filter must compute:

    Y0 = H0X0 + D(H1X2 + H2X1)
    Y1 = H0X1 + H1X0 + D(H2X2)
    Y2 = H0X2 + H1X1 + H2X0

When `h` is symmetric, `N` is odd and `3 | N`, then `H1` is symmetric and `H2`
is `H0` reversed. It follows that `H0+H2` and `H0+H1+H2` are symmetric and
`H0-H2` is antisymmetric, with a zero middle tap. The design uses these six
sub-filters:

| sub-filter  | input         | coefficient form | multipliers   |
|-------------|---------------|------------------|---------------|
| `H0`        | `X0`          | general          | `M`           |
| `H1`        | `X1`          | symmetric        | `ceil(M/2)`   |
| `H1+H2`     | `X1+X2`       | general          | `M`           |
| `H0+H1+H2`  | `X0+X1+X2`    | symmetric        | `ceil(M/2)`   |
| `H0+H2`     | `X0+X2`       | symmetric        | `ceil(M/2)`   |
| `H0-H2`     | `X0-X2`       | antisymmetric    | `ceil(M/2)`   |

Call the outputs of these sub-filters `a, b, q, p, e, f`, in table order.
The terms the filter needs follow from them:

    e + f = 2(H0X0 + H2X2)          e - f = 2(H0X2 + H2X0)
    t  = (e + f)/2 - a                        = H2X2
    Y0 = a + D((q - b) - t)
    Y1 = ((p - q) - e) + t + D(t)
    Y2 = b + (e - f)/2

`e + f` and `e - f` are always even, so the halving is an exact arithmetic
shift. The `H0±H2` sub-filters therefore use whole integer coefficients and
are not scaled by ½.

### Cost

- **Multipliers:** `2M + 4*ceil(M/2)`.
- **Adders:** `6(M-1) + 15`. That is `M-1` per sub-filter, 4 in
  pre-processing and 11 in post-processing.

For 27 taps this gives 38 multipliers and 63 adders. For 81 taps it gives 110
and 171. The antisymmetric sub-filter keeps a multiplier for its middle tap even
though that coefficient is always zero. This keeps the counts equal to the
published ones for this structure. A fixed-coefficient build could drop that
multiplier.

## Sharing a multiplier between two taps

`fir_subfilter` is a transposed direct-form filter:

- The input sample is multiplied once by each distinct coefficient.
- The products are added into a chain of `M-1` registers that shifts towards
  the output.
- Tap `m` and its mirror `M-1-m` use the same product. In the antisymmetric
  form the product is subtracted at the mirrored taps.
- The middle tap of an odd-length set uses its own product.

Every form uses `M-1` adders, and the output is combinational:
`y = c0*x + r[1]`.

## Improved carry select adder

`csla_bec` splits a 16-bit addition into groups at bits `[1:0]`, `[3:2]`,
`[6:4]`, `[10:7]` and `[15:11]`:

- **Lowest group:** a ripple carry adder (`rca`) fed by the carry-in.
- **Every other group of `n` bits:**
  - an `n`-bit RCA with carry-in 0, which gives `{carry, sum}`;
  - an `(n+1)`-bit BEC (`bec`, which adds one) on that word, which gives the
    result for carry-in 1;
  - a 2:1 mux of `(n+1)`-bit words, steered by the carry out of the group
    below. For 16 bits these are the 6:3, 8:4, 10:5 and 12:6 muxes.

Compared with a carry select adder that has two RCAs per group, the BEC needs
fewer gates. The cost is one extra BEC delay in each group.

For other widths the group sizes continue 6, 7, … and the last group is cut to
fit, which is this design's own rule. The 32-bit adders of the post-processor
are grouped 2, 2, 3, 4, 5, 6, 7, 3.

The pre- and post-processing adders are `csla_bec` instances. Subtraction is
`a + ~b` with carry-in 1. The `M-1` accumulation adders inside each sub-filter
are plain `+` operators. The carry select adder is meant for the extra adders
of the pre- and post-processing networks.

## Modules

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | `sub_kind_e` (general / symmetric / antisymmetric) and the carry select group-size functions |
| `rtl/fir3_sym_ffa.sv` | top: coefficient split, pre-processing, six sub-filters, post-processing, output register |
| `rtl/ffa3_preproc.sv` | `X1+X2`, `X0+X2`, `X0-X2`, `X0+X1+X2` (4 carry select adders) |
| `rtl/fir_subfilter.sv` | length-`M` transposed FIR with multiplier sharing |
| `rtl/ffa3_postproc.sv` | 11 carry select adders and the two block-delay registers |
| `rtl/csla_bec.sv` | improved square-root carry select adder |
| `rtl/rca.sv` | ripple carry adder |
| `rtl/bec.sv` | binary to excess-1 converter |

## Interface and timing of `fir3_sym_ffa`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active low; clears every delay, so the filter restarts from zero history |
| `in_valid` | in | 1 | take the block on `x` at this edge; when low, all state is held (stall) |
| `x[0..2]` | in | 3 × `DW` | `x(3k)`, `x(3k+1)`, `x(3k+2)`, signed |
| `h_half[i]` | in | `(N+1)/2` × `CW` | `h(i) = h(N-1-i)`, signed; hold it constant while filtering and reset after changing it |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `y[0..2]` | out | 3 × `AW` | `y(3k)`, `y(3k+1)`, `y(3k+2)`, signed, registered |

The latency is one clock. A block taken at edge `t` appears on `y` right after
edge `t`, and `out_valid` is high at the same time. Everything from `x` to the
output register is combinational: the pre-adders, the multipliers, the first
tap adder and the post-adders. No pipelining is added.

The parameters are `N = 81`, `DW = 8`, `CW = 8` and `AW = 32`. `N` must be odd
and a multiple of 3, and elaboration fails otherwise. The output width of 32
holds the full-precision result for the defaults. The worst case,
`81 · 128 · 128`, needs 22 bits, and the intermediate sub-filter sums need up to
about 26. If you raise `DW`, `CW` or `N` a lot, check `AW`.

The coefficients enter as a port. The six sub-filter coefficient sets are
formed from them by small adders in the top module. For a fixed filter, tie
`h_half` to constants and synthesis will fold these adders away.

## Where this departs from, or adds to, the source description

- **Structure.** The equations of the rearranged FFA, the six sub-filters,
  multiplier sharing in the symmetric sub-filters, the BEC-based carry select
  adder with its 16-bit grouping, and the use of that adder in the pre- and
  post-processing networks all follow the published design.
- **Output equations.** Each output is built exactly as listed above. Those
  forms equal the three-parallel convolution, and the testbenches check them
  against a direct convolution.
- **½ factors.** The source scales the `H0±H2` sub-filters by ½. This design
  halves the sum and difference of their outputs instead, so integer
  coefficients stay exact.
- **This design's own choices.** Data widths, the valid/stall handshake, the
  asynchronous reset, the output register, the transposed sub-filter form, the
  BEC gate network, the carry select grouping for widths other than 16, and
  the coefficient port.
- **Not included.** The classic three-parallel FFA and the classic carry select
  adder with two RCAs per group are the baselines the design is compared
  against, so they are not part of this RTL. Power and delay figures for an
  FPGA are not reproduced here.

## Verification

Each testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_bec` | published 4-bit truth-table rows; exhaustive 3/4/5/6-bit `b+1` |
| `tb_rca` | exhaustive 5-bit and 2-bit, both carry-ins |
| `tb_csla_bec` | 16, 32 and 10 bits against `a+b+cin`: carry-chain corner cases and 20 000 random operands; every group of the 16-bit adder must select its BEC result at least once |
| `tb_fir_subfilter` | general, symmetric and antisymmetric forms at `M = 9`, and `M = 1`, against direct convolution, with random stalls and a reset in mid-stream |
| `tb_ffa3_preproc` | all sign extremes and random samples |
| `tb_ffa3_postproc` | random cross terms `Hi·Xj` turned into the six sub-filter values; checks the three convolution identities including the block delay, stalls and reset |
| `tb_fir3_sym_ffa` | full-size 81-tap filter, end to end. Phases: worst-case magnitude (all values at −128), random symmetric coefficients and samples with stalls and a mid-stream reset, then an impulse. Every output block is compared with a direct convolution, and `out_valid` must follow `in_valid` by one clock. Stalls, resets and blocks that use the block delays are counted, and each must occur |
| `tb_fir3_workloads` | 9, 27 and 81 taps against direct convolution; checks the multiplier and adder counts (14/27, 38/63, 110/171); counts the clocks in which the post-processor's carry select adder picks a BEC result |

`tb/fir3_driver.sv` is the shared stimulus and reference model of the two
end-to-end testbenches.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_fir3_sym_ffa rtl/fir_pkg.sv tb/tb_fir3_sym_ffa.sv
    ./obj_dir/Vtb_fir3_sym_ffa

Replace the top module and file name to run the others. All of them finish in
well under a second.

Lint reports unconnected `cout` pins on the carry select adders. These are
intentional: the adder widths already hold every result, so the carry out is
not needed.
