# SPT-coefficient FIR filter: multiplier-free filtering with a budget of terms

A direct-sampling radio receiver digitises the RF signal at a very high rate
(hundreds of MHz) and must filter and decimate it before any baseband work. At
that rate the filters have to be small and fast, and general multipliers are
the expensive part. This design removes them. Every filter coefficient is
restricted to a few *SPT terms* (signed-power-of-two terms). A tap then needs
one shifted copy of the sample per term and an adder to join the copies. The
number of terms therefore sets the number of adders, and so the area.

The main idea is how the coefficients are chosen. The design starts from any
conventionally designed ("standard") filter. It then picks, for a fixed
**total** number of terms over all taps, the coefficient set closest to the
standard one. Terms go where they reduce the error most. The budget is a single
knob that trades area against filter response.

The RTL implements the 8-tap, 16-bit-coefficient low-pass filter of the
published design (*Fast SPT-Term Allocation and Efficient FPGA Implementation
of FIR Filters for Software Defined Radio Applications*).
The main configuration uses 20 terms. The allocation runs inside
SystemVerilog while the design is elaborated, so changing one parameter
rebuilds the filter for another budget.

## Files

| file | contents |
|---|---|
| `rtl/spt_pkg.sv` | coefficient type, standard coefficients, the three-step allocation as constant functions |
| `rtl/spt_mult.sv` | shift-and-add multiplier by a constant SPT coefficient |
| `rtl/fir_spt.sv` | the filter (top level): delay line, 8 `spt_mult`, sum, output register |
| `tb/spt_ref_pkg.sv` | brute-force reference allocation (full scans, exhaustive search) |
| `tb/fir_ref_monitor.sv` | scoreboard: reference convolution, output and latency checks |
| `tb/tb_spt_pkg.sv`, `tb/tb_spt_mult.sv`, `tb/tb_fir_spt.sv`, `tb/tb_fir_workloads.sv` | self-checking testbenches |

## Coefficient format and the SPT number

A coefficient is an unsigned 16-bit fraction:

    h = sum_{i=1..16} s_i * 2^-i,   s_i in {0, 1}

Bit 15 weighs 2^-1 and bit 0 weighs 2^-16. The *SPT number* of a coefficient
is its count of `1` digits. Multiplying a sample `x` by `h` means adding `x`
shifted once for every `1`. For example, `0.1011 x 0.0101` is
`0.1011 >> 2 + 0.1011 >> 4`. A coefficient with k terms costs k-1 adders and
zero digits cost nothing. So the cost follows the number of ones, not the
word length. A longer coefficient word is free as long as the term count
stays the same.

Only the digits 0 and 1 are used, so the coefficients are positive and
unsigned. The filter's coefficients are all positive, so this is enough. The
format has no negative digits (no canonical signed-digit recoding).

## Allocating a budget of terms (`spt_pkg`)

This is the part that needs explaining. Given standard coefficients
h(1)..h(m) and a total budget of T terms, the allocation finds coefficients
h*(n) that together use at most T terms and minimise

    F_total = sum_n |h(n) - h*(n)|

The search over all 2^(16m) coefficient sets is hopeless. It is done in three
steps:

1. **SPT number of every value** (`spt_count`): the popcount of a 16-bit word.
2. **Best value per term count** (`spt_best(x, k)`): for each coefficient and
   each k = 0..16, the value with at most k ones that is closest to it. This
   table holds everything step 3 needs about one coefficient.
3. **Best split of the budget** (`spt_allocate(h, B)`): choose k_n for every
   coefficient with sum k_n <= B and take `spt_best(h(n), k_n)`. The choice
   minimises F_total.

A linear-phase filter has h(n) = h(m+1-n), so only the first half is
allocated. A total of T terms over all 8 taps is a budget of T/2 over
h(1)..h(4), mirrored onto h(8)..h(5).

How the RTL computes the steps:

* **Step 2 without a scan.** The closest value with at most k ones is one of
  two candidates. The first is `x` truncated to its k leading ones, which is
  the largest such value not above `x`. The second is that truncation plus
  its lowest kept one. The carry ripples up to the next zero, which gives the
  smallest such value not below `x`. The function compares the two. A tie
  keeps the smaller one, and a round-up that would leave the 16-bit range is
  dropped. Example: `0x12C6` with k = 3 truncates to `0x1280` (error 70)
  and rounds up to `0x1300` (error 58), so the result is `0x1300`.
* **Step 3 by dynamic programming.** `cost[n][s]` is the least error of the
  first n coefficients using at most s terms. Each row is built from the one
  before by trying k = 0..16 terms for the next coefficient. The result is the
  same minimum as trying every combination, in about 4 x 65 x 17 steps, which
  a tool evaluates quickly during elaboration. When extra terms cannot lower
  the error, the chosen split may use fewer terms than the budget.

Results for the standard filter used here (values in units of 2^-16):

| standard | 0x0012 (0.0003) | 0x12C6 (0.0733) | 0x2D38 (0.1767) | 0x3FEC (0.2497) | F (half) |
|---|---|---|---|---|---|
| T = 6  | 0 | 0x1000 | 0x2000 | 0x4000 | 4132 |
| T = 14 | 0 | 0x1200 | 0x2D00 | 0x4000 | 292 |
| **T = 20** | **0** | **0x12C0 (0.0732)** | **0x2D40 (0.1768)** | **0x4000 (0.25)** | **52** |

With 20 terms every coefficient is within 0.0005 of the standard one.

## The standard filter

The filter is an 8-tap linear-phase low-pass designed by frequency sampling.
Its main requirement is a null at fs/4, so that the ADC's DC offset does not
disturb the signal. The centre coefficient `0x3FEC` (0.2497)
is the value for which h(1) - h(2) - h(3) + h(4) = 0, which places that null
exactly.

With a fs/4 input (x = A, 0, -A, 0, ...) the output of the quantised filters
becomes:

* T = 20: 0 exactly. The null survives, because 0 - 0x12C0 - 0x2D40 + 0x4000 = 0.
* T = 14: A x 0x100 at each output. The gain at fs/4 is about -45 dB, so the
  null is nearly kept.
* T = 6: A x 0x1000 at each output. The gain at fs/4 rises to about -21 dB.

The DC gain is the coefficient sum. It is exactly 1 for T = 20, and 0.875
and 1.117 for T = 6 and 14.

## The filter datapath (`fir_spt`, `spt_mult`)

    x_in --> [d0]-[d1]-[d2]-[d3]-[d4]-[d5]-[d6]-[d7]      delay line (IN_W each)
               |    |    |    |    |    |    |    |
             h(1) h(2) h(3) h(4) h(4) h(3) h(2) h(1)     spt_mult, shift-and-add
               \____\____\____\__+_/____/____/____/
                                 |
                              [y_out]                    output register

* The delay line shifts on every cycle with `in_valid` high. When `in_valid`
  is low the delay line holds its contents.
* Each tap has its own `spt_mult`, a combinational sum of the sample shifted
  by the position of each `1` digit of the constant. The two taps of a
  symmetric pair are multiplied separately. The whole filter therefore adds
  exactly T shifted copies. For T = 20 that is 19 two-input additions in
  total: 14 inside the multipliers and 5 joining the six non-zero products.
  h(1) = 0 disappears entirely.
* The sum is registered once.

Interface (defaults `IN_W = 8`, `SPT_TOTAL = 20`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears delay line, output and valid |
| `in_valid` | in | 1 | take `x_in` on this edge |
| `x_in` | in | IN_W | signed sample |
| `out_valid` | out | 1 | `y_out` is a new output |
| `y_out` | out | IN_W+19 | signed sum(h(n+1) x[k-n]) in units of 2^-16 of the input, full precision |

Timing: the edge that takes x[k] updates the delay line. The next edge
registers y[k] and raises `out_valid`. So `out_valid` follows `in_valid` by
two cycles, and the filter accepts one sample every cycle. A DC input `x`
gives `y_out = x * 65536` at T = 20. Drop the low 16 bits to get back to
the input scale.

Parameters of `fir_spt`:

* `SPT_TOTAL` is the total term budget over all eight taps. It rebuilds the
  coefficients and the adders.
* `STD_COEF` holds the standard h(1)..h(4) as a packed `coef_half_t`
  (index 0 = h(1)). Any symmetric 8-tap filter with positive coefficients
  below 1 can be dropped in.
* `IN_W` is the sample width.

The tap count (8) and the coefficient width (16) are constants in `spt_pkg`.

## Choices made in this implementation

The allocation steps, the coefficient format, the standard coefficients, the
20-term configuration and the shift-and-add multiplication follow the
published design. The following were not specified there and are this
design's own:

* The filter is direct form with both taps of a pair multiplied. This keeps
  the adder count tied to the term count. A folded form (pre-adding the pairs)
  would halve the multipliers at the cost of four pre-adders.
* Samples are 8-bit two's complement. The sample width is not specified;
  8 bits is consistent with the published multiplier area figures, which
  grow by about 8 logic elements per added term.
* The valid handshake, the synchronous reset, the single output register
  (latency 2) and the full-precision output are this design's choices. No
  pipelining is inserted inside the adder chains. For a clock near the
  published 912 MHz sample rate the sum would need pipelining or a polyphase
  arrangement with the decimator, and neither is specified.
* Step 2 ties keep the smaller value. Step 3 uses dynamic programming instead
  of a literal enumeration; the result is the same minimum.

Not included: the RF-sampling ADC and the multilevel decimator that the filter
serves. Neither is specified in enough detail to build. The filter's
input and output are plain ports for connecting them. The unquantised
filter, the vendor-tool multiplier and the Booth multiplier that the
published design is compared against are baselines and not part of it.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog that fails the run if it hangs.

* `tb_spt_pkg`: checks step 1 against `$countones` for all 65,536 values.
  Checks step 2 for every k against a scan of all 65,536 values, for the
  standard coefficients, 0xFFFF and 35 random values, plus worked examples (`0x0012`,
  `0x12C6`, `0x2819` cut to two terms). Checks step 3 against an exhaustive
  split for budgets 0..34 and random filters (same minimum, within budget),
  plus the exact sets for T = 6, 14, 20.
* `tb_spt_mult`: all 256 signed inputs times `0x5B`, `0x5F` (8-bit),
  `0x005B`, `0x4984`, `0x4000` (16-bit), compared with the integer product.
* `tb_fir_spt`: end to end at the default parameters. Covers impulse response
  = coefficients, unity DC gain, exact fs/4 null, full-scale inputs of both
  signs, 400 random samples with random gaps in `in_valid`, and a reset in the
  middle of a stream. The scoreboard checks every output and the latency, and
  the test fails if any of those behaviours never occurred.
* `tb_fir_workloads`: the 6-, 14- and 20-term filters side by side. Checks
  term counts, impulse responses, DC outputs, the fs/4 residue of each, the
  zero at fs/2, and random streams.

To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/spt_pkg.sv tb/spt_ref_pkg.sv tb/tb_fir_spt.sv --top-module tb_fir_spt
    ./obj_dir/Vtb_fir_spt

Replace `tb_fir_spt` with any other testbench name. All of them finish in a
few seconds.

## How far to trust it

The filter and the multiplier are checked value by value against models that
share no code with the RTL. The allocation is checked against literal
brute-force versions of each step. The 20-term coefficients equal the
published set. No timing closure or FPGA area has been measured for this RTL.
The published area figures (about 160 logic elements for the 20-term filter
against 400 for the multiplier-based one) belong to the original
implementation, not to this code.
