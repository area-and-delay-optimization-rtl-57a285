# Reconfigurable RRC interpolation filter with 2-bit BCSE multipliers

A digital up converter for several radio standards needs a root-raised-cosine
(RRC) pulse-shaping filter that also raises the sample rate. The rate and the
roll-off change with the standard. This design gives one datapath for six such
filters:

| INTP_SEL | interpolation L | taps N | FLT_SEL 0 | FLT_SEL 1 |
|----------|-----------------|--------|-----------|-----------|
| 0        | 4               | 25     | roll-off 0.22 | roll-off 0.35 |
| 1        | 6               | 37     | roll-off 0.22 | roll-off 0.35 |
| 2 (or 3) | 8               | 49     | roll-off 0.22 | roll-off 0.35 |

Two ideas keep it small:

1. **Every filter has N = 6L + 1 taps.** Split into polyphase branches, each of
   the six filters becomes L branch filters of exactly seven taps. One set of
   seven multipliers and six adders therefore computes every filter, one branch
   per output clock. The coefficient sets are multiplexed in front of the
   multipliers. Six separate seven-tap branch filters would need 42
   multiplications and 36 additions per output; this design needs 7 and 6.
2. **The multipliers are 2-bit binary common sub-expression (BCSE) multipliers.**
   The 16-bit coefficient is read as eight 2-bit groups. The only non-trivial
   group product is 3x = x + 2x, which is formed once per input. Every group
   then just selects 0, x, 2x or 3x. The multiplier costs one adder, eight 4:1
   multiplexers and a three-level adder tree.

The filter coefficients are built into the RTL. The tap counts, the seven-tap
branch, the two roll-off sets, the 16-bit coefficient word, the coding passes
and the 2-bit BCS multiplier structure follow the published architecture. The
roll-off values, the coefficient scaling, all interface details and the
truncation compensation value are this design's own. They are listed under
[Design choices](#design-choices-and-departures).

## Polyphase operation

Let x[n] be the input at the low rate and y[nL + k] the output at the high
rate, with k = 0 .. L-1 the branch (phase). Interpolating by L with an N-tap
filter h gives

    y[nL + k] = sum_{j=0..6} x[n-j] * h[j*L + k]        (h[m] = 0 for m >= N)

Branch k uses taps k, L+k, 2L+k, ... . Since N = 6L + 1, tap j = 6 exists only
for k = 0. The clock runs at the output rate:

    clock      : |  0  |  1  |  2  |  3  |  4  |  5  | ...   (L = 4)
    input taken:   x[n]                    x[n+1]
    branch     :      k=0   k=1   k=2   k=3   k=0  ...
    rrcout     :         y0    y1    y2    y3    y0' ...

`data_generator` takes one input sample every L clocks and shifts it into a
seven-sample delay line. It then counts k from 0 to L-1. The products of one
branch are formed combinationally from the delay line and k. `accum_unit` sums
them into a register. If no input is offered when a new sample is due, the
filter stalls: it keeps its delay line and produces no output until a sample
arrives.

## The 2-bit BCSE constant multiplier

The coefficient magnitude c (16 bits, bits c15..c0) is cut into groups
G_g = c[2g+1:2g], g = 0..7, so that

    x * c = sum_g (x * G_g) * 4^g,   x * G_g in {0, x, 2x, 3x}

| block | contents | on the critical path |
|-------|----------|----------------------|
| `bcse_ppg` (partial product generator) | x, 2x by wiring, 3x = x + 2x | 1 adder |
| `bcse_mux_unit` (multiplexer unit) | eight 4:1 multiplexers, select = G_g | one 4:1 mux |
| `bcse_final_add` (final addition) | preshift by 2g, 8 -> 4 -> 2 -> 1 adder tree, sign | 3 adders + sign |

That gives a logic depth of log2(2) + log2(16/2) = 4 adders. The path from the
delay line to the output register is 4 adders, one 4:1 multiplexer, the sign
stage and the 7-input sum in `accum_unit`. The coefficient reaches the
multiplier only as multiplexer selects. With a constant coefficient, synthesis
reduces the multiplier to a fixed shift-and-add network. Here the coefficients
are constants multiplexed by mode and branch, so the selects come from the
coefficient path.

Coefficients are **sign-magnitude**. The sign is applied at the end by a 2:1
multiplexer between the sum and its negation. The negation (`-sum`) is a
carry-propagating incrementer. It adds delay that the four-adder count above
leaves out.

### Truncation and compensation

Computing the full 32-bit product is wasteful: the filter output only needs
the integer part (in units of the input LSB). So `bcse_final_add` cuts each
preshifted term (x * G_g * 4^g, 18 + 2g bits) at weight 2^15 before the adder
tree. This is an arithmetic right shift by `FRAC_DROP` = 15. Term g then keeps
2g + 3 bits: 3, 5, ..., 17 bits, or 2N + 1 bits for N = 1..8. The adders shrink
to match.

Each cut term is low by less than one LSB, so the eight together are low by
less than 8 LSB. To centre the error, a constant of half the number of cut
terms (4) is added in the same tree, before the sign. It is added only when the
coefficient is non-zero, so that zero taps contribute exactly zero. As a result:

* each product is within **4 LSB** of x*c / 2^15 (checked; 4.0 LSB is reached);
* each output is within 7 x 4 = **28 LSB** of the exact sum (the largest error
  seen in the end-to-end test was about 14.7 LSB).

`FRAC_DROP = 0` gives the exact product instead: 32 bits, 15 fraction bits, no
compensation. It is a parameter of `rrc_interp_filter`, `coef_generator`,
`bcse_const_mult` and `bcse_final_add`. The output width follows it:
35 - FRAC_DROP bits.

## Coefficient path

`coef_generator` holds the coefficient path and the seven multipliers:

* **First coding pass (`coef_fcp`).** There are three coding blocks, one per
  filter length, side by side. In each, every coefficient bit is a 2:1
  multiplexer between roll-off set A and set B, steered by FLT_SEL. Where the
  two sets have the same bit, the multiplexer becomes a constant. Because the
  filters are linear phase (h[m] = h[N-1-m]), only taps 0 .. (N-1)/2 exist:
  13, 19 and 25 words.
* **Second coding pass (`coef_scp`).** A 3:1 multiplexer per word picks one of
  the three sets by INTP_SEL and gives a 25-word set. Words beyond a shorter
  set are zero.
* **Coefficient selector (`coef_selector`).** For branch k it routes tap
  m = jL + k to multiplier j. It folds m > (N-1)/2 to N-1-m and gives zero for
  m >= N.

### Coefficient values

The tables live in `rtl/rrc_pkg.sv` as `H25_A`, `H37_A`, `H49_A` (roll-off
0.22) and `H25_B`, `H37_B`, `H49_B` (roll-off 0.35). Each runs from tap 0 to
the centre tap. They come from

    h[m] = rrc((m - (N-1)/2) / L, beta) / rrc(0, beta)
    rrc(0) = 1 - beta + 4 beta / pi
    rrc(t) = [sin(pi t (1-beta)) + 4 beta t cos(pi t (1+beta))] / [pi t (1 - (4 beta t)^2)]

The filter spans six symbols. Each value is quantised as sign plus
mag = floor(|h| * 2^15 + 0.5): one integer bit and 15 fraction bits, with the
centre tap exactly 1.0 = 16'h8000. None of the six filters hits the
singular point |t| = 1/(4 beta). The testbench package `tb/rrc_ref_pkg.sv`
recomputes every entry from this formula. To use other filters, replace the
six tables. The only limits are a 16-bit magnitude and N = 6L + 1.

Every branch has a DC gain between 0.90 and 0.99. For any branch, the sum of
the absolute tap values is at most 1.67. The largest possible output is
therefore below 1.67 x 32768, about 54,700, which fits in 17 bits. The 20-bit
output cannot overflow, and the accumulator has 3 spare bits for other tables.

## Interface of `rrc_interp_filter`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | output-rate clock |
| rst_n | in | 1 | asynchronous reset, active low; clears the delay line |
| intp_sel | in | 2 | 0: L=4/25 taps, 1: L=6/37 taps, 2 or 3: L=8/49 taps |
| flt_sel | in | 1 | 0: roll-off 0.22, 1: roll-off 0.35 |
| rrcin | in | 16 | input sample, two's complement |
| rrcin_valid | in | 1 | rrcin holds a sample |
| rrcin_ready | out | 1 | the filter takes rrcin on this rising edge if rrcin_valid |
| rrcout | out | 35 - FRAC_DROP (20) | output sample, two's complement, in units of 2^(FRAC_DROP-15) input LSB |
| rrcout_valid | out | 1 | rrcout holds a new sample |
| rrcout_phase | out | 3 | branch index k of rrcout |

* `rrcin_ready` is high when the filter is idle and in the last branch of a
  sample. With input always available, a sample is taken exactly every L
  clocks and an output comes out every clock.
* Branch k of the sample taken at rising edge t is on `rrcout` from edge
  t + 1 + k.
* `intp_sel` and `flt_sel` are captured with each accepted sample. A change
  applies from the next sample on. The delay line is not cleared, so the first
  six outputs after a change mix old samples with new coefficients.

## Files

| file | module | role |
|------|--------|------|
| `rtl/rrc_pkg.sv` | package | widths, `coef_t`, select encodings, coefficient tables |
| `rtl/rrc_interp_filter.sv` | top | data generator -> coefficient generator -> accumulation unit |
| `rtl/data_generator.sv` | | input handshake, 7-sample delay line, branch counter, stall |
| `rtl/coef_generator.sv` | | coding passes, selector, seven multipliers |
| `rtl/coef_fcp.sv` | | first coding pass (roll-off) |
| `rtl/coef_scp.sv` | | second coding pass (length) |
| `rtl/coef_selector.sv` | | polyphase coefficient steering and symmetric fold |
| `rtl/bcse_const_mult.sv` | | 2-bit BCSE multiplier |
| `rtl/bcse_ppg.sv`, `rtl/bcse_mux_unit.sv`, `rtl/bcse_final_add.sv` | | its three stages |
| `rtl/accum_unit.sv` | | 7-input sum and output register |

After synthesis with yosys (coarse, word level), the top is about 530 cells
and 143 flip-flop bits. The flip-flops are the delay line, counter,
configuration and output register.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_bcse_ppg`, `tb_bcse_mux_unit`, `tb_bcse_final_add`, `tb_bcse_const_mult`
  compare against integer arithmetic. Both the exact and the truncating
  variants are tested. The tests include the all-ones worst-case coefficient,
  -32768 inputs and every single-group pattern.
* `tb_coef_fcp` recomputes all 114 table entries from the RRC formula in
  double precision and requires equality.
* `tb_coef_scp` and `tb_coef_selector` use random tables and an independently
  built full symmetric filter.
* `tb_coef_generator` checks all six filters and all branches, exact and
  truncated.
* `tb_data_generator` checks, cycle by cycle, ready, the delay line, the
  branch sequence, stalls and the L-clock input rate.
* `tb_accum_unit` checks the sum, the latency and the tags.
* `tb_rrc_interp_filter` runs the top at its default parameters end to end.
  For each of the six filters it sends an impulse (the response must reproduce
  the taps) and 300 random samples with random gaps. It then sends 2000 samples
  with frequent mode changes and full-scale values. Every output is checked in
  value, branch and exact clock against a reference model. The test counts
  stalls, mode changes, uses of each filter, L-clock input intervals and
  negative outputs, and fails if any of these never occurred. It finishes in
  well under a second.

Run any of them with Verilator 5 from the repository root, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rrc_pkg.sv tb/rrc_ref_pkg.sv tb/tb_rrc_interp_filter.sv \
        --top-module tb_rrc_interp_filter
    ./obj_dir/Vtb_rrc_interp_filter

## Design choices and departures

The published description fixes the structure. It leaves the following open,
and this design fills them in as stated:

* **Coefficient values.** The original coefficients are not available. The roll-offs
  0.22 and 0.35 and the six-symbol RRC above are assumptions. The hardware does
  not depend on them.
* **Truncation constant.** The original adds a precomputed truncation-error
  constant in the multiplier's last adder, but its value is not known. Here it
  is half the number of cut terms (4), added only for non-zero coefficients.
  Adding the full maximum error (8) instead would make every product an upper
  bound, with an error of up to +8 LSB.
* **Where the coefficient selector sits.** The architecture names a
  coefficient selector that steers data to the accumulation unit by
  interpolation factor, and also says the multiplexed coefficients select the
  partial products. Here the selector steers coefficients into the
  multipliers' multiplexer selects. So the right products reach the
  accumulation unit without a separate product multiplexer.
* **Coding-pass sharing.** The vertical bit matching between coefficient sets
  is written as plain constant multiplexers. The sharing is left to logic
  synthesis and is not hand-coded bit by bit.
* **Interface.** The valid/ready input handshake, the stall behaviour, the
  capture of the configuration per sample, the asynchronous active-low reset,
  the 16-bit input and the unrounded 20-bit output are all this design's own.
* **Not included.** The rest of the up converter (direct digital synthesizer
  and carrier mixer) is not included: the filter output is where it would
  attach. Only the 2-bit BCS multiplier is built; the 3-bit BCS, constant-shift
  and programmable-shift multipliers it is compared with are left out. The
  reported area, delay and power results depend on a technology that is not
  known, so they have not been reproduced.
