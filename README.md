# Parallel FIR filters for symmetric taps, built on the fast FIR algorithm

A linear-phase FIR filter has even-symmetric taps, h(i) = h(N-1-i). A
single-rate direct-form filter can exploit that to halve its multipliers. A
parallel filter, which produces L outputs per clock, usually cannot: the
polyphase split scatters the symmetry across the sub-filters. The fast FIR
algorithm (FFA) already cuts an L-parallel filter from L² sub-filters to 3
(L = 2) or 6 (L = 3). The structures here go one step further. They rewrite
the FFA equations so that several of the sub-filters work on *sums and
differences* of polyphase sets, such as H0+H1 and H0−H1. Those inherit the
symmetry of h, so each can be folded to half its multipliers. The price is a
few more adders in the pre- and post-processing, which do not grow with N.
The multiplier saving does grow with N.

Two filters are provided, a two-parallel one and a three-parallel one. They
are independent and sit side by side in the top module `fir_ffa_sym_top`.

## Notation

- `x(n)` is the serial input and `y(n) = Σ h(i) x(n−i)` the serial output.
- For L-parallel processing, block k holds `Xp = x(Lk+p)` and produces
  `Yp = y(Lk+p)`, for p = 0 … L−1.
- `Hp = { h(Lj+p) }`, j = 0 … M−1, are the polyphase tap sets, with M = N/L.
- `HaXb` is the block-rate filter of sequence Xb with taps Ha.
- `z^-L` at the sample rate is one block, which is one enabled clock here.

## Two-parallel structure (`ffa2_sym_fir`)

    Y0 = { ½[(H0+H1)(X0+X1) + (H0−H1)(X0−X1)] − H1X1 } + z^-2 H1X1
    Y1 =   ½[(H0+H1)(X0+X1) − (H0−H1)(X0−X1)]

Half the sum of the two folded products is `H0X0 + H1X1`. Half their
difference is `H0X1 + H1X0`. So the structure gives exactly the polyphase
result `Y0 = H0X0 + z^-2 H1X1`, `Y1 = H0X1 + H1X0`.

It has three sub-filters of length N/2:

| sub-filter | input   | taps                 | symmetry of taps | realisation                |
|------------|---------|----------------------|------------------|----------------------------|
| H0+H1      | X0+X1   | h(2j)+h(2j+1)        | symmetric        | folded, ⌈M/2⌉ multipliers  |
| H0−H1      | X0−X1   | h(2j)−h(2j+1)        | antisymmetric    | folded, ⌊M/2⌋ multipliers  |
| H1         | X1      | h(2j+1)              | none (mirror of H0) | direct, M multipliers   |

That is N multipliers in total, against 3N/2 for the ordinary two-parallel
FFA.

## Three-parallel structure (`ffa3_sym_fir`)

This is the hardest part of the design to follow. It uses the six sub-filter
products

    A01 = (H0+H1)(X0+X1)   B01 = (H0−H1)(X0−X1)
    A02 = (H0+H2)(X0+X2)   B02 = (H0−H2)(X0−X2)
    P1  = H1X1             A12 = (H1+H2)(X1+X2)

The post-processing works in three steps.

1. Halve four sums and differences:
   `½(A01+B01) = H0X0+H1X1`, `½(A01−B01) = H0X1+H1X0`,
   `½(A02+B02) = H0X0+H2X2` and `½(A02−B02) = H0X2+H2X0`.
2. Recover the direct products without any extra sub-filter:
   `H0X0 = ½(A01+B01) − P1`, then `H2X2 = ½(A02+B02) − H0X0`.
   The cross term follows as `H1X2 + H2X1 = A12 − P1 − H2X2`.
3. Form the outputs:

       Y0 = H0X0 + z^-3 (H1X2 + H2X1)
       Y1 = ½(A01−B01) + z^-3 H2X2
       Y2 = ½(A02−B02) + P1

   These are the polyphase equations of a three-parallel filter. The `z^-3`
   terms are held in two registers, `c_d` and `h22_d` in `ffa3_post`.

For even-symmetric h with N a multiple of 3, three of the six sub-filters have
symmetric taps and are folded:

- H0+H2 is symmetric.
- H0−H2 is antisymmetric.
- H1 is symmetric by itself.

H0±H1 and H1+H2 are direct form. Their taps are mirror images of each other
(H0+H1 reversed is H1+H2), not symmetric. The multiplier count is
`4M + ⌈M/2⌉`, against 6M for the ordinary three-parallel FFA. For example,
N = 24 needs 36 multipliers instead of 48. Published descriptions of this
structure speak of *four* symmetric sub-filters and a saving of N/3
multipliers. The equations as written give the three listed above, and the
RTL follows the equations. See "Departures and open points".

## Folded sub-filters (`fir_subfilter_sym`, `fir_subfilter`)

Each sub-filter runs at the block rate on one input word per clock. It has a
direct-form delay line of M−1 words and computes

    g(j) = h(Lj+PA) + SB·h(Lj+PB)      (or h(Lj+PA) alone when PB = −1)
    y    = Σ_j g(j) · x[n−j]

The derived taps g(j) are computed at elaboration from the filter's parameter
array `H`.

`fir_subfilter_sym` adds the extra parameter `FOLD`:

- `FOLD = +1` means `g(j) = g(M−1−j)`.
- `FOLD = −1` means `g(j) = −g(M−1−j)`.

Before multiplying, the module adds (or subtracts) each pair of words that
share a coefficient. The centre tap of an odd-length antisymmetric sub-filter
is zero and gets no multiplier. Elaboration stops with `$error` if the taps do
not have the declared symmetry. The filter modules likewise refuse taps that
are not even-symmetric, and lengths that are not a multiple of L.

## Word widths and exactness

All arithmetic is exact, with no rounding anywhere:

- Samples are `XW` bits and taps are `CW` bits (16 and 16 by default).
- Pre-adders grow one bit. Derived taps are `CW+1` bits.
- Sub-filter outputs and post-processing use `int_width() = XW+CW+⌈log2 N⌉+3`
  bits.
- Outputs are `out_width() = XW+CW+⌈log2 N⌉` bits, which holds any exact
  N-tap result. Both functions are in `fir_ffa_pkg`.

The ½ factors are arithmetic right shifts of sums that are always even. An
assertion in each post-processing module checks this in simulation.

## Interface and timing

Each filter has the following ports:

- `clk`, and `rst_n` (asynchronous, active low). Reset clears all history, so
  the filter starts from zero initial conditions.
- `in_valid` and `x[L]`: one block of L samples, taken on a rising edge while
  `in_valid` is high. `x[0]` is the oldest sample of the block.
- `out_valid` and `y[L]`: the output block for the input block of the previous
  clock. Latency is one clock and throughput is one block per clock.

While `in_valid` is low the filter stalls. No delay line, block-delay register
or output changes, and `out_valid` is low. Sub-filters are combinational from
the input word; only the post-processing outputs are registered.

`fir_ffa_sym_top` brings both filters out with `_l2` and `_l3` port suffixes.
Its parameters are:

| parameter | default                            | meaning                          |
|-----------|------------------------------------|----------------------------------|
| `XW`, `CW` | 16, 16                            | sample and tap widths            |
| `N2`, `H2` | 2, {16384, 16384}                 | two-parallel taps (Q15 0.5, 0.5) |
| `N3`, `H3` | 3, {8192, 16384, 8192}            | three-parallel taps (0.25, 0.5, 0.25) |

The default lengths, 2 and 3 taps, are the sizes at which this structure
family is usually compared. The default tap values are only examples. Override
`N2`/`H2` and `N3`/`H3` for real filters: `N2` must be even, `N3` a multiple
of 3, and both tap sets even-symmetric.

## Cost at the default sizes

With one tap per sub-filter, the H0−H1 (or H0−H2) sub-filter is identically
zero and costs nothing. Counting the multipliers and post/pre adders:

| structure      | multipliers | adders (pre + post) |
|----------------|-------------|---------------------|
| two-parallel   | 2           | 2 + 4 = 6           |
| three-parallel | 5           | 5 + 11 = 16         |

Usual comparisons list 2 multipliers and 6 adders for the two-parallel
structure, and 5 multipliers and 17 adders for the three-parallel one.

## Files

| file | contents |
|------|----------|
| `rtl/fir_ffa_pkg.sv` | width functions |
| `rtl/fir_subfilter.sv` | direct-form sub-filter |
| `rtl/fir_subfilter_sym.sv` | folded sub-filter for symmetric or antisymmetric taps |
| `rtl/ffa2_pre.sv`, `rtl/ffa2_post.sv` | two-parallel pre-adders, and post-adders with the block delay |
| `rtl/ffa3_pre.sv`, `rtl/ffa3_post.sv` | three-parallel pre-adders, and post-adders with the block delays |
| `rtl/ffa2_sym_fir.sv`, `rtl/ffa3_sym_fir.sv` | the two filters |
| `rtl/fir_ffa_sym_top.sv` | both filters side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fir_ffa_sym_top_full.sv` | the top at its default parameters |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on a
watchdog. Each one checks its block against a model written independently
inside the testbench:

- The filter and top-level tests rebuild the serial input from the accepted
  blocks. They compare every output sample with a direct convolution
  `Σ h(i) x(n−i)`.
- They check the one-clock latency through `out_valid`.
- They insert random stalls and feed full-scale inputs (±32767/−32768) against
  full-scale taps.
- `tb_fir_ffa_sym_top` uses 24-tap filters, so every fold case occurs. It also
  counts stalls, output blocks, outputs that depend on the previous block, and
  full-scale inputs, and fails if any of these never occurred.
- The sub-filter tests cover odd and even sub-filter lengths and both fold
  signs.
- The post-processing tests drive the sub-filter outputs from random cross
  products Hi·Xj.

Each testbench was also run against a deliberately broken copy of its module
and reported failures.

To simulate with Verilator, for example:

    verilator --binary --timing --assert -Irtl rtl/fir_ffa_pkg.sv \
        tb/tb_fir_ffa_sym_top.sv --top-module tb_fir_ffa_sym_top
    ./obj_dir/Vtb_fir_ffa_sym_top

The other modules are found through `-Irtl`. Replace the testbench name to run
another one.

## Departures and open points

- **Symmetric sub-filters in the three-parallel structure.** Published
  descriptions claim four. The equations implemented here, with the usual
  split Hp = h(3j+p), give three. The RTL follows the equations, which are
  verified against direct convolution. The structure needs 4M + ⌈M/2⌉
  multipliers. An ordinary FFA that also folds its own two symmetric
  sub-filters (H1 and H0+H1+H2) needs about 5M. Against that, the saving is
  about M/2 = N/6 multipliers, not N/3.
- **Y0 of the three-parallel structure** is the fast-FIR form
  `H0X0 + z^-3[(H1+H2)(X1+X2) − H1X1 − H2X2]`. It reuses H0X0 and H2X2 from
  the folded products, so the sub-filter count stays at six.
- **Fixed taps.** The taps are elaboration-time parameters. There is no
  coefficient load port.
- **Own choices.** These are not taken from any reference:
  - the sample and tap widths and full-precision arithmetic
  - the valid/stall handshake
  - the one-clock latency, with unpipelined sub-filters
  - asynchronous reset

  For long filters at high clock rates, insert pipeline registers in the
  sub-filters. Keep the delay of all six (or three) sub-filter paths equal
  when you do.
- **Not included.** The following are not part of this design:
  - serial-to-parallel and parallel-to-serial converters (the ports carry
    whole blocks)
  - the traditional parallel filter and the plain FFA structures that these
    structures are compared against
