# Delayed-LMS adaptive noise canceller: direct, pipelined and unfolded

A speech signal `s(n)` picked up by a primary microphone arrives with noise:
`d(n) = s(n) + n1(n)`. A second, reference microphone hears only the noise
source, `n0(n)`, which is related to `n1` through an unknown acoustic path.
An adaptive FIR filter learns that path from the data: it filters the
reference noise into an estimate `y(n)` of `n1(n)` and subtracts it, so that
the error `e(n) = d(n) - y(n)` is the cleaned speech. The error also drives the
adaptation (least mean squares, LMS):

    y(n)   = w(n)^T u(n),        u(n) = [n0(n), n0(n-1), ..., n0(n-N+1)]
    e(n)   = d(n) - y(n)
    w(n+1) = w(n) + 2*mu * e(n-m) * u(n-m)

With `m = 0` this is plain LMS. In plain LMS the weights for the next sample
depend on the error of this sample, so one clock period must hold a
multiplier, the tap adder chain, the subtractor, a second multiplier and the
weight adder: for 4 taps, two multipliers and five adders. The delayed LMS
(DLMS) allows the update to use an error that is `m` samples old. The
algorithm converges almost as well, and the `m` delays in the loop can then
be moved around (retimed) to cut that long path into short pieces.

This repository holds three hardware implementations of the same 4-tap DLMS
with `m = 5`, which trade area, latency and samples per clock against each
other, plus a small loop that shows the unfolding transformation in
isolation:

| module                   | samples/clock | latency          | longest path (by construction)            |
|--------------------------|---------------|------------------|-------------------------------------------|
| `dlms_filter`            | 1             | 1 cycle          | multiplier + 3 tap adders + subtractor    |
| `pipelined_dlms_filter`  | 1             | 3 cycles         | one multiplier, or an adder and the subtractor |
| `unfolded_dlms_filter`   | 2             | 2 cycles         | multiplier + 3-input weight adder, or tap adders + subtractor |
| `iir9_filter`            | 1             | combinational    | `y(n) = x(n) + a*y(n-9)`                   |
| `iir9_unfold2`           | 2             | combinational    | the same loop, unfolded by 2              |

All three cancellers produce **bit-identical** results for the same input:
they share one fixed-point definition of the arithmetic (`anc_pkg`) and
differ only in where the registers sit. This is what the testbenches check,
and it is what makes the retimed and unfolded versions trustworthy: each is
compared sample by sample with an integer model of the equations above.

## Number formats and arithmetic (`anc_pkg`)

| quantity              | format                          |
|-----------------------|---------------------------------|
| `x = n0`, `d`, `e`, `y` | 16-bit two's complement, Q1.15 |
| weights `w`           | 24-bit two's complement, Q2.22  |
| tap products          | 40 bits, summed in 44 bits      |

* `y` is the tap sum shifted right by 22 (floor) and saturated to 16 bits;
  `e = d - (sum >> 22)` is formed at full width and then saturated.
* The step size is a power of two, `2*mu = 2^-MU_SHIFT` (default
  `MU_SHIFT = 4`), so the increment is `(e * u) >>> (8 + MU_SHIFT)`.
* Weights wrap on overflow. With the default step size and inputs below
  about half of full scale they stay well inside +/-2.

None of these widths are fixed by the algorithm; they are this design's
choice and can be changed in `anc_pkg` (all variants follow).

## The direct form (`dlms_filter`)

The straightforward reading of the DLMS block diagram: the filter, the
subtraction and the weight update all happen in the cycle that accepts a
sample. The `m = DELAY_M` delays are lumped into a shift register on the
error, and the sample history is `m` samples longer so that the update can
use the matching `u(n-m)`. Setting `DELAY_M = 0` gives plain LMS, with the
two-multiplier, five-adder path described above.

## The retimed, pipelined form (`pipelined_dlms_filter`)

The structure is split into a filtering block (F) and a weight-update block
(WUD). The five loop delays are distributed as

* `D1 = 4` on the way from the filter to the update: registered tap products,
  registered half sums of the taps, registered error, registered increments
  `2*mu*e*u`;
* `D2 = 1` on the way back: the F block multiplies by a registered copy of the
  weight accumulators, `w(n - D2)`.

Because `w_used(n) = w(n - D2)` and the accumulators see errors `D1` samples
late, the weights used for sample `n` are exactly those of DLMS with
`m = D1 + D2 = 5`. Nothing in the arithmetic changes, only the timing: the
result for sample `n` appears in the third cycle after the sample was
presented (with back-to-back samples), and no path holds more than one
multiplier or the adder tree over half of the taps. `TAPS` must be even.

## The unfolded form (`unfolded_dlms_filter`)

Unfolding by `J` copies every operation `J` times so that one clock handles
`J` consecutive samples. An edge with `w` delays from node U to node V becomes,
for copy `i`, an edge from `U_i` to `V_((i+w) mod J)` with
`floor((i+w)/J)` delays. The example loop (`iir9_filter`, `iir9_unfold2`)
shows it plainly: the nine delays of `y(n) = x(n) + a*y(n-9)` become a 5-delay
edge from the odd copy to the even one (`y(2k-9) = y(2(k-5)+1)`) and a 4-delay
edge from the even copy to the odd one (`y(2k-8) = y(2(k-4))`).

For the DLMS with `m = 5` and `J = 2`, block `k` holds samples `2k` and `2k+1`
and, with `D(j) = 2*mu*e(j)*u(j)`:

    w(2k+1) = w(2k)   + D(2k-5)      D(2k-5): odd lane, 3 blocks back
    w(2k+2) = w(2k+1) + D(2k-4)      D(2k-4): even lane, 2 blocks back

The module keeps two weight registers, `w(2k)` for the even lane and
`w(2k+1)` for the odd lane, and advances each by two increments per clock:

    w_ev <= w_ev + D(2k-5) + D(2k-4)
    w_od <= w_od + D(2k-4) + D(2k-3)

The spare delays are used as pipeline registers: each lane registers its tap
products and its error; the increments are formed from the registered errors
one clock later, and the odd increment is held one more clock for the even
weights. Block `k`'s two results appear two cycles after the block was
presented. Per sample this doubles the throughput at the cost of two copies
of the filter and the update.

## Interfaces and timing

All modules use one clock, an active-low **synchronous** reset `rst_n` that
clears all state, and an `in_valid` input that acts as a clock enable: every
register advances only on an accepted sample (or block). Delays are
therefore sample delays, and gaps in the input change nothing but the time at
which results come out.

* `dlms_filter`: `e_out`, `y_out` with `out_valid` one cycle after the sample.
* `pipelined_dlms_filter`: result `n` appears in the cycle after sample `n+2`
  is accepted. The last two results of a stream leave only when more samples
  (for example zeros) are pushed in.
* `unfolded_dlms_filter`: `x_in[0]`, `d_in[0]` are the earlier sample `2k`,
  index 1 the later one. Block `k`'s results appear in the cycle after block
  `k+1` is accepted.
* `w_out` shows the weights in use (`w(n)`, `w(n - D2)` and `w(2k)`
  respectively).
* `iir9_filter`, `iir9_unfold2`: the outputs are the combinational adder
  outputs for the sample(s) present; the delay lines advance on `in_valid`.

`anc_top` places six units side by side with separate ports, prefixed
`lms_` (the direct form with `DELAY_M = 0`), `dlms_`, `pipe_`, `unf_`,
`iir_` and `iiru_`; its parameters `TAPS`,
`DELAY_M` (direct form only) and `MU_SHIFT` are passed down.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The cancellers are checked against `anc_ref_pkg::lms_ref`, an integer model
written directly from the equations, on a synthetic test scene
(`make_scene`): voiced, speech-like bursts of a few harmonics with pauses,
white reference noise, and `n1 = h * n0` with the path
`h = (0.6, -0.3, 0.2, 0.1)`.

| testbench                  | what it shows |
|----------------------------|---------------|
| `dlms_filter_tb`           | DLMS (`m = 5`) and LMS (`m = 0`) bit-exact against the model with random input gaps; weights converge to `h`; over 20 dB noise reduction |
| `pipelined_dlms_filter_tb` | bit-exact against the same `m = 5` model; result timing after gaps and 3-cycle latency back to back |
| `unfolded_dlms_filter_tb`  | bit-exact at two samples per clock; block timing and 2-cycle latency |
| `iir9_filter_tb`, `iir9_unfold2_tb` | both loops against the recursion, four coefficients, saturation reached |
| `anc_top_tb`               | the whole top at default parameters, 270,000 samples through all four cancellers at once (LMS against the `m = 0` model), with gaps, loud clicks that saturate the error, and the example loops compared with each other; counts that each of these happened |

On the test scene the cancellers reduce the noise by about 29-34 dB once
adapted.

Simulate with Verilator 5, for example:

    verilator --binary --timing -y rtl -y tb rtl/anc_pkg.sv tb/anc_ref_pkg.sv \
        tb/anc_top_tb.sv --top-module anc_top_tb
    ./obj_dir/Vanc_top_tb

The two packages are named explicitly; `-y` finds the modules by file name.
Replace `anc_top_tb` by any other testbench name to run that one. The whole
top-level run takes a few seconds.

## How far this follows the original design, and where it departs

Taken from the original design: the noise-canceller arrangement, the LMS and
DLMS equations, 4 taps, `m = 5` for the 4-tap DLMS, the F/WUD split of the
retimed filter with its `D1` and `D2` delays and weights `w(n - D2)`,
unfolding by 2, and the example loop with its 9 / 5 / 4 delays.

This design's own choices:

* all word lengths, the Q formats, rounding, saturation and weight wrap;
* the step size and its restriction to a power of two;
* the valid/clock-enable interface, synchronous reset and output registers;
* the values `D1 = 4`, `D2 = 1` and the exact position of each pipeline
  register in the retimed filter (only their sum, 5, is given); one
  accumulator register per weight instead of a chain of adders;
* the whole unfolded DLMS datapath, derived with the unfolding rule; the
  original describes the technique and reports results but does not draw
  the unfolded LMS;
* in the retimed filter the step size is applied together with the
  product `e*u` after the error delay; the original drawing scales the error
  by `mu` before its delay. The result is the same up to where the
  truncation happens, which here is once, on the product;
* the unfolded filter owes its short path per clock to the pipeline
  registers it places in the spare loop delays, not to unfolding itself;
  unfolding alone doubles the samples per clock but keeps, per lane, the
  path of the direct form;
* the register counts: the original counts `3N - 2` delays for the LMS and
  `5N` for the DLMS structure, which these modules do not reproduce one for
  one.

Reported for the original FPGA implementations (4 taps): 16 LUTs and
16.61 ns for the DLMS, 29 LUTs and 12.03 ns pipelined, 16 LUTs and 6.22 ns
unfolded, 0.060 W static power each. Those numbers belong to a specific,
unnamed FPGA and tool flow and are not reproduced here; this RTL has not
been timed on an FPGA.
