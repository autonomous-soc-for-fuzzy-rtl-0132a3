# Fuzzy path-tracking co-processor

A car-like mobile robot that has to follow a drawn path needs, many times a
second, a steering curvature. This design computes that curvature in hardware
with a small fuzzy controller. The controller looks at two angles:

- φ1: the bearing of a path point relative to the robot's heading.
- φ2: the direction of the path's tangent at that point.

From them it returns a signed 12-bit curvature κ. The controller is a
zero-order Takagi-Sugeno system: 9 triangular or trapezoidal membership
functions (MFs) per input, 81 rules whose consequents are constants
("singletons"), min as AND, product as implication, and a weighted average as
defuzzifier.

The hardware is a digital fuzzy logic processor (DFLP) wrapped as a Fast
Simplex Link (FSL) co-processor. FSL is a point-to-point FIFO link into the
pipeline of a soft processor. The processor sends a word with both angles and
later reads back the curvature. Everything around this call is software on the
processor and is not part of this RTL: decoding the robot's packets, odometry,
the closest-point search, the "spatial window" average, and the conversion to
wheel commands (see *The system around the core*).

## The main idea: process only the active rules

The MFs of each input overlap by exactly two. At any input value at most two
adjacent sets are non-zero, so of the 9 × 9 = 81 rules at most 2² = 4 can
fire. The processor never touches the other 77 rules. For each sample it:

1. Finds, per input, the lower active set `lo` and the degrees of truth of
   sets `lo` and `lo+1`.
2. Walks through the 4 combinations, one rule per clock. Rule number `r` takes
   the upper set of input k when bit k of `r` is 1.
3. For each rule, takes the min of the two degrees (the firing strength α).
   In parallel it looks up the rule's singleton `s` in a ROM.
4. Accumulates Σα and Σα·s.
5. Divides once per sample.

A new sample can therefore enter every 4 clocks. The input rate is
clk / 2^IP_NO in general.

```
             +-> addr_gen_p (rule counter r = 0..3, first/last flags) ------------+
x1,x2 -> ip_set                                                                   v
             +-> trap_gen_p x2 (lo_k, mu_lo_k, mu_hi_k) -----------------> rule_sel_p
                                                                                  |
                 +---------------------- alpha_1, alpha_2 ------------------------+
                 v                                                                | idx_1, idx_2
             minmax_p (min) --alpha--+                              cons_map_p <--+
                                     |                                  |  addr = i1 + 9*i2
                                     v                                  v
                                dflp_mult <-------- s --------------- s_rom (81 x 8 bit)
                                  |  alpha*s          alpha
                                  v                     v
                               int_sig                int_uns
                                  |  sum alpha*s        |  sum alpha
                                  +------> div_array (or div_lut) <---+
                                                |
                                                v
                              y = 16 * sum(alpha*s) / sum(alpha)
```

## Fuzzification without a divider (`trap_gen_p`)

Each MF is stored as a trapezoid: feet `a`, `d` and shoulders `b`, `c`, with
`a ≤ b ≤ c ≤ d`. It is a triangle when `b = c`. Each MF also carries two
slopes that are precomputed when the table is built:

    s_up = round(255 · 256 / (b − a)),   s_dn = round(255 · 256 / (d − c))

The degree of truth (8 bits, with 255 meaning 1.0) is then one multiply and a
shift:

| input range            | degree                                   |
|------------------------|------------------------------------------|
| `x < a` or `x > d`     | 0                                        |
| `b ≤ x ≤ c`            | 255                                      |
| `a ≤ x < b`            | `min(255, ((x − a) · s_up) >> 8)`        |
| `c < x ≤ d`            | `min(255, ((d − x) · s_dn) >> 8)`        |

The active pair is found by counting how many sets k ≥ 1 have their left
foot `a_k` at or below x. That count minus one (never below 0) is `lo`.
The MF tables must therefore be ordered by left foot, and no more than two
sets may overlap anywhere.

The default table (`dflp_pkg::DEFAULT_MF`) has 9 evenly spaced triangles:
- centres at 0, 512, …, 3584, 4095;
- left and right shoulders at the two ends;
- every edge is 512 codes wide (slope code 128), so a degree changes by 1 every
  two input codes.

## Rule base and output scaling

The consequent address of a rule is `i1 + 9·i2`, where `i1` and `i2` are its
set indices. This covers the whole 81-entry rule base (`cons_map_p`,
`s_rom`). Singletons are signed 8-bit values.

The output is the weighted average scaled by 16:

    y = trunc(16 · Σ α_r · s_r / Σ α_r)

The scaling maps the ±128 singleton range onto the 12-bit range
-2048 … 2047. The result is truncated toward zero and saturated. When no rule
fires, y = 0. The software normalises y by 2048 and multiplies it by the
largest curvature the robot may use.

The default rule table is only a placeholder:

    s(i1, i2) = clamp(40 · ((i1 − 4) + (i2 − 4)), −128, 127)

It steers harder the further both angles are from the centre. Its gain (40)
was picked so that the closed-loop test below follows its paths. The real
tracker's rule table and MF breakpoints are not published. Load your own
tables through the `MF` and `CONS` parameters of `dflp_core` (types
`mf_set_t` and `cons_tab_t`, built with `dflp_pkg::make_mf`).

## Pipeline depth, alignment and timing

Every component has a parameterised number of register stages after its
logic:

| component    | CPR parameter | default |
|--------------|---------------|---------|
| `addr_gen_p` | CPR1          | 1       |
| `cons_map_p` | CPR2          | 1       |
| `trap_gen_p` | CPR3          | 1       |
| `rule_sel_p` | CPR4          | 1       |
| `minmax_p`   | CPR5          | 2       |
| `dflp_mult`  | CPR6          | 1       |
| `int_uns`    | CPR7          | 0       |
| `int_sig`    | CPR8          | 0       |
| divider      | CPR9          | 2       |

Where two paths run in parallel, synchronisation delays are added to the
shorter one. These pairs are addr_gen ∥ trap_gen, minmax ∥ (cons_map + ROM),
the strength next to the multiplier, and the two integrators. The delays are
computed from the CPR values, so any setting stays aligned (the testbench runs
a second, quite different setting).

With the defaults, a rule passes 9 register stages from the input register to
the output:

    ip_set 1 + trap_gen/addr_gen 1 + rule_sel 1 + minmax 2 + mult 1 + integrator 1 + divider 2

The handshake of `dflp_core`:
- `in_ready` is high when the core is idle and in the clock that issues the
  last rule of the current sample, so samples can follow each other without a
  gap.
- `out_valid` pulses with `y` LATENCY clocks after the accepting edge:

      LATENCY = 2^IP_NO + max(CPR1,CPR3) + CPR4 + max(CPR5,CPR2+1) + CPR6 + 1 + max(CPR7,CPR8) + CPR9

  This is 12 clocks with the defaults (the 9 stages plus the 3 later rules of
  the sample).
- The core has no stall input.

At the 71 MHz system clock the processor was built for, that is one sample
every 56 ns and 169 ns from input to result.

`minmax_p` also offers product, max and probabilistic OR (`SEL_OP` 1..3).
These are scaled so that 255 means 1.0.

## Two dividers

`DIV_TYPE = 0` (the default) selects `div_array`. This is a combinational
restoring divider of 23 stages, one per bit of the magnitude of
16·Σα·s. The sign is put back afterwards. The result is exact.

`DIV_TYPE = 1` selects `div_lut`. It multiplies by `round(2^20 / den)`, taken
from a 1024-entry table computed at elaboration. It costs one multiplier
instead of the array. The result may be one LSB away from the exact
quotient; in a random test, 400 of 2000 results were off by one.

## The FSL wrapper (`flc_ip_top`)

`flc_ip_top` is the top level. Its ports are the two FSL channels:

| direction                | bits  | content                       |
|--------------------------|-------|-------------------------------|
| processor → co-processor | 11:0  | input 1 (φ1 code)             |
| processor → co-processor | 27:16 | input 2 (φ2 code)             |
| co-processor → processor | 31:0  | `y`, sign-extended            |

- Slave channel: a word is taken by raising `fsl_s_read` in a cycle where
  `fsl_s_exists` is high.
- Master channel: `fsl_m_write` is raised whenever a result waits and
  `fsl_m_full` is low.
- Control bits are ignored on input and driven 0 on output.

The core cannot stall, so results go into a 4-entry FIFO (`OUT_FIFO_DEPTH`).
The wrapper counts credits: the samples in flight plus the results waiting.
It only takes a word when a FIFO place is reserved for its result. When the
processor keeps reading, the link runs at the full rate of one word per 4
clocks. The first result appears 13 clocks after its word was read. When the
processor stops reading, the wrapper stops taking words, and no result is
lost.

Inputs are unsigned codes 0 … 4095 of the angle range. A signed angle maps to
this by inverting its most significant bit.

## The system around the core

The co-processor is one part of a system-on-chip on a Spartan-3 FPGA. The
remaining parts are the soft processor with its local-memory and peripheral
buses, block RAM, UARTs for the robot and the monitoring PC, GPIO, and two
clock managers. These are vendor IP and are not included here. The control
loop in software does the following:

- It decodes the robot's status packets and accumulates odometry in wide
  variables. This works around the 16-bit position fields, which wrap.
- It finds the closest path point by squared distance.
- For each point j of a "spatial window" it computes (φ1ʲ, φ2ʲ) and calls the
  co-processor. The window is given by its order (number of points), its step
  (points skipped) and its offset (shift along the path).
- It averages the window's curvatures: κ = (κ1 + … + κn) / n.
- It turns κ into an angular-velocity command at the measured speed v':

      ω' = (κ / 2048) · κmax · v' · 180 / (1000 π)

## How far to trust it

Parts that are taken from the processor's specification:
- the FIS type;
- the widths: 2 × 12-bit inputs, 9 MFs, 8-bit degrees, 81 × 8-bit
  singletons, 12-bit output;
- overlap of two, and one active rule per clock;
- min AND, product implication, weighted-average defuzzification;
- the stage counts of minmax (2), multiplier (1), integrators (0) and
  divider (2);
- the sel_op and divider-type options.

Parts that are choices of this design:
- the internals of every component;
- CPR1–CPR4 = 1, picked so that the total is the 9-stage pipeline the
  processor is specified with;
- synchronisation delays derived from the CPR values instead of set by hand;
- the slope coding of the MFs;
- the rule address order;
- the output scaling (× 16);
- the FSL word format and the credit-based result FIFO;
- synchronous active-high reset;
- the default MF and rule tables.

Known departures:
- The default tables are placeholders, not the path tracker's tuned
  controller.
- The input rate is one sample per 2^IP_NO clocks. A specification of
  clk / (4·IP_NO) would allow only one sample per 8 clocks with two inputs;
  this design takes the faster, rule-count-based rate.
- Only one output is supported.
- The MF and rule tables are fixed at elaboration (ROMs). They cannot be
  loaded at run time.

Each component has a self-checking testbench in `tb/`. The testbenches
compare against a separate reference model (`tb/tb_ref_pkg.sv`), which
computes the default tables in closed form and the defuzzified output in plain
integer arithmetic. They cover:

- every input code of the fuzzifier;
- all 81 rule addresses;
- every sel_op mode;
- both dividers over their full input ranges;
- the core at two pipeline settings, with symmetric and asymmetric rule
  tables, including latency and back-to-back rate;
- the wrapper under sink back-pressure.

`tb/tb_path_tracking.sv` closes the loop. A unicycle robot model at 1 m/s
runs in the testbench, together with the software side described above:
- closest-point search;
- a spatial window of order 3, step 2 and offset 2;
- the mean curvature;
- angular-velocity commands rounded to whole deg/s, with κmax = 1 rad/m.

Every curvature goes through the FSL links of `flc_ip_top`. The test runs two
paths of about 25 m each:
- a straight path, started 1 m off it, which must track within 0.1 m after
  the first 8 m;
- an S-shaped path, y = 2 sin(2πx/20), which must track within 0.2 m.

With the placeholder tables it reaches 0.02 m and 0.11 m. This shows the loop
and the data path working. It does not measure the accuracy of the real,
tuned tracker.

## Files and simulation

- `rtl/dflp_pkg.sv`: configuration constants, types, default tables.
- `rtl/pipe_delay.sv`: register chain used for all pipeline and alignment
  stages.
- `rtl/trap_gen_p.sv`, `addr_gen_p.sv`, `rule_sel_p.sv`, `minmax_p.sv`,
  `cons_map_p.sv`, `s_rom.sv`, `dflp_mult.sv`, `int_uns.sv`, `int_sig.sv`,
  `div_array.sv`, `div_lut.sv`: the components.
- `rtl/dflp_core.sv`: the processor. `rtl/flc_ip_top.sv`: the FSL top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`. `tb/tb_flc_ip_top.sv` runs the whole
  design at its default parameters. `tb/tb_path_tracking.sv` is the
  closed-loop test. `tb/tb_ref_pkg.sv` is the shared reference model.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dflp_pkg.sv tb/tb_ref_pkg.sv tb/tb_flc_ip_top.sv --top-module tb_flc_ip_top
./obj_dir/Vtb_flc_ip_top
```

To change the controller, pass your own `MF` / `CONS` tables and, if you like,
`SEL_OP`, `DIV_TYPE` or the CPR depths to `dflp_core`. To change the number of
inputs, MFs or widths, edit the constants in `dflp_pkg`. The wrapper's word
packing assumes two inputs. The reference model in `tb/tb_ref_pkg.sv` follows
the default tables, so update it along with them.
