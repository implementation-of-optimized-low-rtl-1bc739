# Reconfigurable low-power FIR filter with Russian Peasant tap multipliers

A direct-form FIR filter spends most of its power in its multipliers. Many
of the products it computes are negligible: a small input sample times a
small coefficient adds almost nothing to the output. This filter finds those
products and switches their multipliers off, which lowers switching activity
at the cost of a small, controllable error. The order of the filter then in
effect shrinks and grows with the input signal.

Two ideas make this work:

* **A decision window against flicker.** Switching a multiplier off on every
  small sample would make it toggle on and off whenever the input hovers
  around the threshold. The filter only switches off when the input stays
  small for at least `m` samples in a row. The part that makes this decision
  is called the multiplier control signal decision window (MCSD).
* **A cheaper multiplier.** Each tap multiplier is a shift-and-add Russian
  Peasant multiplier with no right shifter. Its adder is built from
  carry-select slices that need only one carry-generation chain.

The filter computes

    y[n] = sum_{i=0}^{TAPS-1} C_i * x[n-i]

with 16-bit Q1.15 samples and coefficients. Each product is quantized to
16 bits (Q1.15), and the output is 24 bits wide. The default length is 75
taps.

## Block structure

```
reconf_fir                      top: delay line, taps, adder chain, output register
├── mcsd_window                 decides which taps hold "small-run" samples
│   ├── amp_detect              |x| < 2^x_th ?
│   └── ctrl_sig_gen            counts consecutive small samples
├── amp_detect  (one per tap)   |C_i| < 2^c_th ?
└── mult_unit   (one per tap)   signed Q1.15 multiply, quantize, switch-off
    └── rpm_mult                unsigned Russian Peasant multiplier
        └── csla_adder          W-bit adder made of 4-bit slices
            └── csla_rcg4       4-bit carry-select slice, reduced carry generation
fir_pkg                         word widths, default sizes, types
```

## When a multiplier is switched off

This is the part of the design that takes the most care.

Tap `i` holds sample `x[n-i]` and coefficient `C_i`. Its multiplier is off
when both of these hold:

1. `C_i` is small: `-2^c_th <= C_i < 2^c_th`. One `amp_detect` per tap
   tests this.
2. The sample in tap `i` is part of a run of at least `m` consecutive small
   input samples (`-2^x_th <= x < 2^x_th`) that has already fully entered
   the filter. The MCSD window marks these samples with bit `in_ct[i]`.

When a multiplier is off, its operands are forced to zero. The array then
does not switch, and the tap adds 0 to the sum.

### Amplitude detector

A two's-complement word satisfies `-2^k <= v < 2^k` exactly when its bits
from the sign bit down to bit `k` are all equal. An AND of those bits detects
"all ones" (small negative values). An OR of those bits detects "all zeros"
(small positive values) when it is 0. The threshold exponent `k` is a run-time
input, and a mask picks which bits take part. The thresholds are therefore
powers of two.

### Control signal generator

A saturating counter holds the number of consecutive small samples seen
before the current one. It is cleared by any sample that is not small. For
the incoming sample, `ctrl = small && count >= m-1`. In words, `ctrl` is 1
when this sample completes a run of `m` small samples.

### Control-bit delay line with OR gates

`in_ct` is a one-bit shift register that advances together with the sample
delay line. Stage 0 loads `ctrl`. Each stage `i` with `1 <= i < m` loads
`in_ct[i-1] | ctrl`. Stages from `m` onward simply shift.

Why the OR gates are needed: when `ctrl` rises, the `m-1` samples before the
current one were also small, and they already sit in taps `1..m-1`. The OR
gates mark them at that moment too. Without the OR gates, only the sample
that completed the run would be marked. After that, every following small
sample raises `ctrl` itself, until a large sample ends the run.

The result is that the sample in tap `i` is marked exactly when some sample
`t` that arrived at most `m-1` samples after it (and is already in the
filter) completed a run of `m` small samples. The testbenches use this rule
as their reference model. Runs shorter than `m` are never marked.

The OR gates are built for the first `M_MAX-1` stages (default
`M_MAX = 16`) and enabled by the run-time `m`. If `m` changes while samples
are flowing, each `ctrl` pulse marks back as far as the `m` in force when it
was raised.

## Tap multiplier

### Modified Russian Peasant multiplier (`rpm_mult`)

The classic Russian Peasant method halves the multiplier and doubles the
multiplicand, and it adds the doubled multiplicand whenever the halved
multiplier is odd. In hardware the "halving" only serves to bring bit `i` of
the multiplier to the LSB, so this version drops the right shifter. Stage
`i` works like this:

* a 2:1 multiplexer, selected directly by bit `a[i]`, passes either the
  multiplicand shifted left `i` places (a chain of one-bit left shifters) or
  zero;
* the `W` selected terms are summed by a pairwise tree of `csla_adder`
  instances (`W-1` adders, each `2W` bits wide).

The module is unsigned and has a parameter `W`. Its default of 8 is the
8 x 8 unit. The filter uses `W = 16`.

### Signed Q1.15 wrapper (`mult_unit`)

* The operands are converted to sign and magnitude. A magnitude of up to
  2^15 still fits in 16 unsigned bits.
* The magnitudes are multiplied, and the 32-bit product is negated if the
  signs differ.
* The Q2.30 product is shifted right arithmetically by 15. This is a floor,
  not a rounding.
* `(-1) x (-1) = +1` is the only product that does not fit in Q1.15. It
  saturates to `0x7FFF`.

### Reduced-carry-generation carry-select adder (`csla_rcg4`, `csla_adder`)

A conventional carry-select adder builds two carry chains, one for carry-in 0
and one for carry-in 1, and then selects between them. The 4-bit slice here
works like this:

* Four half adders produce generate `g = a&b` and propagate `p = a^b`.
* There is a single carry chain for carry-in 0, built from three AND and
  three OR gates: `c0[0] = g0`, `c0[i] = g_i | p_i & c0[i-1]`.
* The real carry-in reaches bit `i` only through an unbroken run of
  propagates, so the carry into bit `i` is `c0[i-1] | (&p[i-1:0] & cin)`.
* The sum bit is `p[i]` XOR that carry.
* `cout = c0[3] | (&p & cin)`.

`csla_adder` chains `ceil(W/4)` slices. Each slice's carry-out feeds the
next slice's carry-in, and operands are zero-padded to a multiple of four
bits.

## Interface and timing of `reconf_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears delay lines, counter, output) |
| `x_valid` | in | 1 | a sample is presented; the delay line advances at this clock edge |
| `x_in` | in | 16 | input sample, Q1.15 |
| `coeff[TAPS]` | in | 16 each | coefficients `C_0..C_{TAPS-1}`, Q1.15; `coeff[i]` multiplies `x[n-i]` |
| `x_th_log2` | in | 4 | input threshold exponent: small when `-2^k <= x < 2^k` |
| `c_th_log2` | in | 4 | coefficient threshold exponent |
| `m_len` | in | 5 | window length `m`, 1..16 (0 behaves as 1) |
| `y_valid` | out | 1 | one-cycle pulse: `y_out` holds a new output |
| `y_out` | out | 24 | `y[n]`, Q9.15 (24 bits, 15 fractional) |
| `mult_off` | out | TAPS | which taps were switched off for this `y_out` |

* **Latency.** A sample taken at clock edge `k` produces its output at edge
  `k+1`: `y_valid` is high in the cycle after that edge, so the result
  arrives two edges after the sample was presented. Samples may arrive
  every cycle, or with gaps.
* **Inputs held by the user.** Coefficients, thresholds and `m` are not
  registered inside the filter, so they should be held stable. Changes to
  `x_th_log2` and `m_len` act only on samples that enter afterwards, because
  a sample's "small" decision is made as it enters. `c_th_log2` and the
  coefficients act at once on the next registered output.
* **Output range.** 75 products, each below 2^15 in magnitude, cannot
  overflow 24 bits.
* **Path length.** The adder chain across the taps is combinational and
  ends in the output register. It is a long path, as in any direct-form
  filter.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `TAPS` | 75 | `reconf_fir`, `mcsd_window` | filter length (order 74) |
| `M_MAX` | 16 | `reconf_fir`, `mcsd_window`, `ctrl_sig_gen` | longest window; this design's choice |
| `DATA_W`, `FRAC_W` | 16, 15 | `fir_pkg` | sample/coefficient format |
| `PROD_W`, `OUT_W` | 16, 24 | `fir_pkg` | quantized product and output widths |
| `W` | 8 / 16 / 16 | `rpm_mult` / `mult_unit` / `csla_adder` | operand width |

## What is specified and what is chosen here

These points follow the reference description of the filter:

* the block structure and the switch-off rule;
* the OR-gated control-bit delay line;
* the AND/OR amplitude detector;
* the Russian Peasant multiplier with no right shifter, whose terms are
  summed by reduced-carry-generation carry-select adders;
* 16-bit Q1.15 data and coefficients, 16-bit products, a 24-bit output, and
  75 taps.

These are this design's own choices:

* **Thresholds.** They are powers of two, set by run-time exponents. No
  threshold values or window lengths are prescribed; only the knobs are.
* **Window range.** `m` can be set from 1 to 16.
* **Counter.** The control generator counts with a saturating counter.
* **Signed arithmetic.** `mult_unit` uses sign and magnitude, floors the
  quantized product and saturates the one overflowing case.
* **Multiplier adder.** Inside `rpm_mult` the terms are summed by an adder
  tree.
* **Filter adder.** The filter's adder chain uses ordinary `+` adders. The
  reference gives no internals for it.
* **Coefficients.** They come in as a plain input array. No coefficient
  memory or loading protocol is defined.
* **Control and timing.** The sample strobe, the output register, the reset
  and the `mult_off` status output.

There is one inconsistency in the reference. It gives the multiplier output
as 16 bits, while its block diagram labels the product nets 24 bits wide.
This design quantizes each product to 16 bits and sign-extends it into the
24-bit adder chain.

Not included:

* the Vedic multiplier of the conventional filter, which is only a baseline
  for comparison;
* FPGA area, delay and power numbers, which depend on a synthesis flow and
  are not reproduced;
* the filter coefficients (for example the 75-tap equi-ripple design) and
  the audio test signals. The testbenches use random coefficients and
  synthetic signals instead.
* a simulation of the full 75-tap filter (see Verification).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_csla_rcg4`: all 512 input combinations.
* `tb_csla_adder`: random and carry-ripple corner cases, at 16 bits and at
  10 bits (the padded case).
* `tb_rpm_mult`: exhaustive at 8 x 8; random and corner cases at 16 x 16.
* `tb_mult_unit`: random signed operands, the saturation case, and
  switch-off.
* `tb_amp_detect`: the boundary values around `±2^k` for every `k`, plus
  random words.
* `tb_ctrl_sig_gen`: random runs with gaps in `x_valid` and changing `m`,
  including runs longer than `M_MAX`.
* `tb_mcsd_window`: every control bit of a 24-tap window, checked each
  cycle against the marking rule above.
* `tb_reconf_fir`: end-to-end, with 16 taps and `M_MAX = 16`.

The end-to-end test drives loud stretches and quiet runs of random length,
with gaps in `x_valid`, and changes `m` (over 1..16) and both thresholds
between phases. Each output is checked for its value, its `mult_off` pattern
and its latency. The test also confirms that the following all happen:

* a tap is switched off;
* a tap is switched off only because of the window's OR gates;
* a small run shorter than `m` leaves its multipliers on;
* `x_valid` has a gap;
* `m` changes;
* a product saturates.

It also prints the share of cancelled multiplications, and the mean square
error against the same filter with switch-off disabled.

**Largest size simulated: 16 taps.** The default 75-tap filter lints and
synthesizes cleanly, but it is large for Verilator: about 9,000 adder slices
are flattened into a C++ model of several hundred megabytes. Compiling that
model takes well over half an hour, so it has not been simulated. Because
the 16-tap filter is built from the same tap, window and adder-chain code,
the 75-tap filter differs only in the number of generated taps and in the
longer delay lines. At 16 taps the simulation model builds in about
2 minutes with `-j 4`.

## Simulating

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary -j 4 --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_reconf_fir.sv --top-module tb_reconf_fir -o sim
./obj_dir/sim
```

To run another test, replace `tb_reconf_fir` with its name. To change the
filter length, set `localparam TAPS` in the testbench (it is passed to
`reconf_fir`), or set `TAPS` on your own instance of `reconf_fir`. To allow
longer windows, set `M_MAX`; the width of `m_len` follows it.
