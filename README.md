# Multiplier-less IIR filters with delay-bounded multiplier blocks

A fixed-coefficient IIR filter does not need hardware multipliers. Every product with a constant
can be made from shifts (free wires) and additions. The products that share an input signal can
also share adders, so a product formed for one coefficient becomes a partial sum of another. The
combined shift-add network for one signal is called a **multiplier block**.

Minimising only the number of adders tends to give long chains, with one coefficient built from
the next. The delay of a multiplier block is counted in **adder-steps**: the number of adders on
the longest path from the input to any product. This design builds multiplier blocks whose
adder-step count is capped by a parameter, `MAX_STEPS`. Within that cap it looks for as much
adder sharing as it can. Lowering the cap makes the block faster and usually costs a few more
adders. Raising it does the reverse.

The multiplier blocks are placed in the two filter structures where they fit naturally:

* a **transposed direct form II** filter, with one block on the input and one on the output;
* a **transposed cascade** of second-order sections, with one block at each junction between
  sections.

Everything is synthesizable SystemVerilog. The adder graph is computed at elaboration time by
constant functions, so each parameter set gives a plain netlist of adders, wires and registers.

## Files

| file | content |
|---|---|
| `rtl/mb_pkg.sv` | graph encoding shared by all blocks (`mb_add_t`, `mb_out_t`) |
| `rtl/mult_block.sv` | the multiplier block and its elaboration-time graph search |
| `rtl/tdf2_core.sv` | adder/delay column of a transposed direct form II filter |
| `rtl/iir_df2t.sv` | order-N transposed direct form II filter |
| `rtl/iir_cascade.sv` | cascade of second-order sections with merged junction blocks |
| `rtl/iir_top.sv` | top level: both filters side by side |
| `tb/iir_ref_pkg.sv` | reference models (direct form I, ordinary multiplication) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_filter2` (elliptic example) |

## The multiplier block (`mult_block`)

### Graph representation

Node 0 is the input `x`. Adder `k` makes node `k` from two earlier nodes:

    node[k] = (+/-)(node[a] << sa) + (+/-)(node[b] << sb)

Each output `prod[j]` selects one node, shifts it left and may negate it. A zero coefficient
gives the constant 0. The output is exactly `x * COEF[j]`. Internal nodes are `XW+CW+1` bits
wide and products are `XW+CW` bits. Two's-complement wrap-around in an intermediate sum is
harmless, because every node value is a small multiple of `x` that fits its width. The block is
purely combinational. `NADD` and `ADDER_STEPS` are localparams that give the adder count and the
depth of the graph that was built.

### How the built-in graph is found

Each coefficient is first reduced to its *fundamental*, the odd part of its magnitude. The
power-of-two factor becomes an output shift, so 6, 12 and -24 all share the single node `3x`.
The search then runs these steps:

1. **Free reuse.** A fundamental already equal to a node value (up to sign) costs nothing. Such
   nodes include the partial sums inside trees built earlier.
2. **One adder.** If `f = ±(n1 << s) ± n2` for existing nodes `n1` and `n2`, one adder is added.
   The step checks every pair and shift, keeps the pair that gives the shallowest new node, and
   rejects pairs whose new node would exceed `MAX_STEPS`. Steps 1 and 2 repeat until neither
   realises anything more.
3. **Two adders.** For the first fundamental still missing, the step tries a new intermediate
   node `t = (n1 << s) ± n2`, with `f = ±(t << s') ± n3` or `f = ±(n3 << s') ± t`. Again the
   shallowest option within the cap wins.
4. **Minimum adder-step tree.** If that also fails, the fundamental is written in canonic signed
   digit (CSD) form. Its non-zero digits are summed in a balanced binary tree, paired from the
   least significant digit upward. For example, 797 = 1024 − 256 + 32 − 4 + 1 becomes
   (1 − 4) and (32 − 256) at the first level, their sum at the second and + 1024 at the third.
   This is the fastest any single coefficient can be: ceil(log2(digits)) adder-steps. The tree's
   partial sums join the node set, and the search goes back to step 1.

The greedy reuse search can sometimes spend an adder on a value that a later CSD tree would have
produced anyway. To guard against this, a second graph is built with plain CSD trees only
(steps 1 and 4). The block keeps the cheaper of the two: fewer adders first, then fewer
adder-steps.

If a coefficient's CSD tree alone is deeper than `MAX_STEPS`, the cap cannot be met. An
immediate assertion at time 0 then reports the violation.

Example (tested): the coefficients {35, 146, 217, 206} need 10 adders as separate CSD trees, in
2 adder-steps. With no cap, the search finds 7 adders in 3 steps. With `MAX_STEPS = 2` it finds
8 adders in 2 steps.

### External graphs

A graph made by an off-line tool can be supplied instead: set `EXT_NADD > 0` and pass
`EXT_ADDS` (one `mb_add_t` per adder, in order) and `EXT_OUTS` (one `mb_out_t` per coefficient).
The block builds that graph verbatim and still reports and checks its depth. Example, from
`tb_mult_block`: 7x = 8x − x; 105x = 16·7x − 7x; 15x = 16x − x; −30x = −(15x << 1). That graph
has 3 adders and 2 adder-steps.

## Filter structures

Both filters use the convention

    y[n] = 2^-FRAC · ( Σ_{k=0..N} b_k x[n−k] + Σ_{k=1..N} a_k y[n−k] )

The integer feedback coefficients `A` are stored with the sign they are **added** with. They are
the negated denominator coefficients of the usual `1 + Σ a_k z^-k` form.

### Adder/delay column (`tdf2_core`)

The multiplier blocks deliver the products `bp[k] = b_k·x` and `ap[k] = a_k·y`. The column
computes:

    acc   = bp[0] + s[1]
    y     = saturate(acc >>> FRAC)                  (floor, then clip to YW bits)
    s[k] <= bp[k] + ap[k] + s[k+1]    when en       (s[N+1] = 0)

The states keep full precision, with `GW` guard bits over the product width. Only the output is
rounded down and saturated. `ap` depends on `y` within the same cycle, but it feeds only the
state registers, so there is no combinational loop. `rst` is synchronous and clears the states.

### Direct form II (`iir_df2t`)

One multiplier block computes all `N+1` numerator products of `x`. The other computes all `N`
denominator products of `y`. The critical path runs from `x_i` through the input block and one
adder to `y`, and from `y` through the output block and two adders into the states. The default
size is order 6 with 10-bit coefficients.

### Cascade (`iir_cascade`)

The output of section *s* feeds both its own feedback multipliers (a1, a2) and the numerator
multipliers (b0, b1, b2) of section *s+1*. All five products of that one signal are merged into a
single multiplier block, so the blocks sit at the junctions:

| junction | signal | products |
|---|---|---|
| 0 | `x` | b0, b1, b2 of section 0 |
| s (1..NSEC−1) | output of section s−1 | a1, a2 of section s−1; b0, b1, b2 of section s |
| NSEC | filter output | a1, a2 of the last section |

Each section output is floored and saturated to `XW` bits before it enters the next junction.
The combinational path from `x_i` runs through every section, NSEC times (multiplier block +
adder). The coefficient arrays are flat: section s uses `B[3s..3s+2]` and `A[2s..2s+1]`. The
default size is four sections (order 8) with 8-bit coefficients.

### Interface and timing (both filters)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `x_valid` | in | 1 | a sample is presented on `x_i` this cycle |
| `x_i` | in | XW | signed input sample |
| `y_valid` | out | 1 | `y_o` holds a new output |
| `y_o` | out | XW | signed output sample |

A filter accepts one sample per clock. The output for a sample appears exactly one clock after
the sample. When `x_valid` is low, the states and the output register hold their values.

`iir_top` holds one filter of each kind, with ports prefixed `df_` and `cas_`, a shared clock
and reset, and a shared `MAX_STEPS` (default 3).

## Default parameters and where they come from

| parameter | default | origin |
|---|---|---|
| direct form order / coefficient width | 6 / 10 bits | a published test filter (7 taps, 10-bit words) |
| cascade sections / coefficient width | 4 / 8 bits | a published test filter (9 taps, 8-bit words) |
| sample width `XW` | 12 | own choice |
| `MAX_STEPS` | 3 in the filters and top, 0 (none) in `mult_block` | own choice; published results span 2 to 7 |
| coefficient values | see below | own choice |
| `FRAC` | 8 (direct form), 6 (cascade) | own choice |

The published test filters are elliptic low-pass designs whose coefficient values were not
given, so the defaults are Butterworth low-pass filters of the same order and coefficient width:

* direct form, cutoff at 0.5 of Nyquist: `B = {8, 45, 114, 151, 114, 45, 8}`,
  `A = {0, −199, 0, −29, 0, 0}` (scale 2^-8);
* cascade, order 8, cutoff at 0.25 of Nyquist, each section scaled to unity DC gain:
  `B = {6,12,6, 6,12,6, 7,14,7, 8,16,8}`, `A = {53,−12, 57,−17, 65,−28, 80,−48}` (scale 2^-6).

With `MAX_STEPS = 3`, the direct form blocks build with 6 + 4 adders (3 and 2 adder-steps). The
cascade junctions build with 1, 3, 3, 2 and 2 adders (1, 2, 2, 1 and 1 adder-steps). To use
other coefficients, pass `B`/`A` (and `N`/`NSEC`, `CW`, `FRAC`) to the filter. Lower-order
filters also fit a larger instance, because zero coefficients cost nothing.

## Example: a sixth-order elliptic low-pass

`tb/tb_workload_filter2.sv` runs a realistic filter on `iir_cascade`. The filter is an elliptic
low-pass with cutoff at 0.1 of Nyquist, 0.1 dB ripple and 50 dB attenuation, built as three
sections with 9-bit coefficients and 7 fractional bits:

    B = {3,-2,3,  34,-58,34,  73,-132,73}      A = {216,-93,  227,-109,  237,-123}

(`NSEC = 3`, `CW = 9`, `FRAC = 7`.) The section gains are spread for unity DC gain per section;
overall DC gain is about 0.8. The same filter is built under three caps:

| `MAX_STEPS` | adders in all junction blocks | worst adder-steps |
|---|---|---|
| 2 | 18 | 2 |
| 3 | 16 | 3 |
| none | 16 | 3 |

This is the speed/area trade-off in a small case: two more adders buy one adder-step less on
every junction's path. All three versions produce bit-identical outputs. A passband tone passes
at about 0.84 of its amplitude. A stopband tone is attenuated to the level of the rounding
noise.

Narrow-band elliptic filters of higher order need care with coefficient scaling. For example, an
order-8 design with cutoff 0.05 quantized to 8-bit words puts a pole pair on the unit circle, and
direct-form denominators of such filters reach magnitudes near 17. Choose `CW` and `FRAC` (and the
cascade form) accordingly.

## How far to trust it

* The graph search is a simplified version of the step-limited reuse method. It does not search
  right shifts of sums. It tries the two-adder step only for the first missing coefficient. A
  coefficient left over is built as one whole CSD tree, not one digit pair at a time. Its adder
  counts are therefore not optimal, but it never exceeds the cap.
* Arithmetic is exact inside each multiplier block and in the states. The only quantisation is
  the floor-and-saturate on each filter or section output, which is this design's choice. No
  overflow analysis is built in: `GW` guard bits must cover the filter's internal gain.
* Every testbench compares the hardware with an independent model that uses ordinary
  multiplication. In the filters that is a direct form I difference equation. The testbenches
  cover:
  * impulses;
  * full-scale steps that drive the outputs into saturation;
  * random samples;
  * random idle cycles;
  * a mid-run reset;
  * one-clock latency, checked for every sample;
  * output produced by feedback alone.

  `tb_mult_block` also checks the adder counts and depths of several graphs against values
  worked out separately, including the cap trade-off above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    # lint the whole design
    verilator --lint-only -Wall -Irtl rtl/mb_pkg.sv rtl/iir_top.sv

    # end-to-end test of both filters at the default parameters
    verilator --binary --timing --assert -Irtl -Itb rtl/mb_pkg.sv tb/iir_ref_pkg.sv \
        tb/tb_iir_top.sv --top-module tb_iir_top
    ./obj_dir/Vtb_iir_top

The same pattern runs `tb_mult_block`, `tb_tdf2_core`, `tb_iir_df2t`, `tb_iir_cascade` and
`tb_workload_filter2`. Only the filter testbenches need `tb/iir_ref_pkg.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and finishes in well under a second.
