# Multibody-simulation co-processor

Real-time multibody models (a vehicle for virtual sensing, a mechanism for
model-based testing) have to run on small embedded processors. In a
semi-recursive formulation, three steps of every Newton-Raphson iteration or
time step dominate the run time:

* assembling the **mass matrix** in joint coordinates, M = Rᵀ·M̄·R;
* **post-processing**: recovering the absolute motion of every body and
  joint from the joint angles and rates;
* **solving the linear system** of the Newton-Raphson iteration.

This RTL puts each of these steps into a hardware unit that sits next to the
host processor. The host keeps the rest of the simulation: the integrator, the
constraint terms, and building the tangent matrix and the residual. All
arithmetic is IEEE-754 single precision, so the host can exchange data with the
units bit for bit.

The design follows the paper *Hardware acceleration of multibody simulations
for real-time embedded applications*. The paper built its accelerators with a
high-level-synthesis tool for a Zynq-7000 (ARM Cortex-A9 plus Artix-7) and
reports their schedules, latencies and resource use, but not their circuits.
Which tasks are offloaded, the equations they evaluate and the model sizes come
from the paper. The datapaths, schedules, host port and number-format details
here are this design's own. The departures are listed at the end.

## The units

| unit | module | default size | work per run |
|---|---|---|---|
| global mass matrix | `mass_matrix_unit` | NB = 9 bodies | 159 cycles (9-body chain) |
| post-processing | `postprocess_unit` (+ `trig_unit`) | NB = 9 bodies | 330 cycles |
| Gauss-Jordan solver | `gauss_jordan_solver` | N = 9 unknowns | 137 cycles |
| body mass matrices only | `indiv_mass_unit` | NB = 29 bodies | 1 cycle |

`mb_accel_top` instantiates all four behind one host port. The default sizes
are the paper's two models:

* a planar chain of five cranks joined by four couplers (the "N-four-bar
  linkage": 9 moving bodies, 9 joint coordinates);
* a vehicle with 29 bodies and 42 integrable variables. For this model only
  the individual body matrices and a 42-unknown solver were feasible on the
  paper's device.

The units are independent and can run at the same time.

## Body coordinates and the mass matrix

This is the least obvious part of the design.

Each body *i* has six **body coordinates** Zᵢ. The first three are the velocity
of the body point that currently coincides with the global origin. The last
three are the angular velocity. A joint *i* between body *p* (the parent) and
body *i* adds its rate żᵢ along a 6-vector bᵢ:

    Zᵢ = Z_p + bᵢ żᵢ

So Z = R ż. Column *j* of R holds b_j in the rows of body *j* and of every body
further out on the same branch. For a revolute joint with global axis u
through point r, b = [r × u ; u]. The unit does not assume a joint type: bᵢ
is an input computed by the host.

The mass matrix of one body, in body coordinates, with mass m, global centre
of mass g, global inertia J about the centre of mass, and g̃ = skew(g), is

    M̄ᵢ = [ m·I      −m·g̃          ]
         [ m·g̃    J − m·g̃·g̃      ]

`body_mass_matrix` evaluates this combinationally. It uses
J − m·g̃·g̃ = J + m·((g·g)I − g·gᵀ), which needs six multiplies and a few
adds.

Forming Rᵀ·M̄·R directly would waste almost all its work on zeros.
`mass_matrix_unit` uses the tree structure instead, in three operations:

* **A.** Evaluate every M̄ᵢ, one body per cycle. Each result starts the
  body's accumulator Sᵢ.
* **B.** From the last body to the first, add each body's accumulator into
  its parent's: S_p += Sᵢ. Afterwards Sᵢ is the inertia of the whole subtree
  hanging from body *i*. One 6-element row is added per cycle.
* **C.** For each joint *j*, form w = S_j·b_j, one row per cycle through a
  6-term dot-product unit. Then M(j,j) = b_j·w. Walking up through every
  ancestor *i* of *j*, M(i,j) = M(j,i) = bᵢ·w, one pair per cycle. Joints on
  different branches give zero.

This is exact: M(i,j) = Σₖ bᵢᵀ M̄ₖ b_j summed over the bodies *k* that both
joints move, and those are the subtree of the outer joint.

Bodies must be numbered so that every parent comes before its children. The
parent of each body is a run-time input (0 means the ground), so one unit
serves any tree up to NB bodies. Closed loops, such as the four-bar chain, are
cut into a tree; their closure conditions are constraint terms for the host.

Latency, counted from the edge that samples `start` to the edge after which
`done` is high:

    NB + Σᵢ (parentᵢ ≠ ground ? 6 : 1) + Σⱼ (7 + depthⱼ) + 2

where depthⱼ is the number of ancestors of body *j*.

## Post-processing

`postprocess_unit` handles bodies in order, parents first. Each body *i* is
connected to its parent p by a revolute joint with:

* angle z and rate ż;
* unit axis u and joint point r, both given in the parent's frame;
* the body's centre of mass g, given in its own frame.

The ground is the root: R = I, and its position and velocities are zero. For
each body the unit computes:

| step | quantity | formula |
|---|---|---|
| A | joint axis, angular velocity | a = R_p u, ω = ω_p + a ż |
| E | joint position | d = R_p r, o = o_p + d |
| F | joint-point velocity | v = v_p + ω_p × d |
| B | sin z, cos z | `trig_unit`, computed one body ahead |
| C | rotation matrix | R = R_p (cos z I + sin z [u]× + (1 − cos z) u uᵀ) |
| G | centre of mass and its velocity | e = R g, G = o + e, v_G = v + ω × e |

Each body produces 27 result words: R, o, a, ω, v, G and v_G.

The datapath has LANES (default 3) multiply-adds, dst = c ± a·b, driven by a
94-step micro-program. The program is built by a constant function at
elaboration time, so no table file is needed. A second constant function
packs it, in order, into bundles of up to LANES independent micro-ops; a
bundle closes when the next micro-op touches a register the bundle writes.
With three lanes the program becomes 32 bundles. An operand address (7 bits) selects one of:

* the constants 0 and 1;
* the current body's input words;
* the parent's result words (or the ground's values);
* the body's own result words;
* 32 scratch registers.

Results go straight to the output memory. A bundle flagged `wt` stalls until
the body's sine and cosine are ready.

The sine and cosine are computed one body ahead: as soon as a body takes its
own pair, the CORDIC starts on the next body's angle, while the lanes work
through the rest of the current body. Steps A, E and F need no trigonometry
and come first. With the defaults the CORDIC sets the pace, at one body
every ITER + 4 = 34 cycles. Nine bodies take 330 cycles, independent of the
data.

`trig_unit` works as follows:

1. Convert the angle to fixed point with 28 fractional bits.
2. Reduce it to [−π, π] by subtracting round(a/2π)·2π.
3. Fold it into [−π/2, π/2]. This shifts the angle by π, which negates both
   results.
4. Run 30 CORDIC rotations on 34-bit values with 30 fractional bits,
   starting from x = 1/K.
5. Convert back to single precision.

The arctangent table is atan(2⁻ⁱ)·2³⁰. From i = 10 on it equals 2³⁰⁻ⁱ and is
computed. Accuracy is about 1e-8 before rounding; latency is ITER + 2
cycles.

## Gauss-Jordan solver

`gauss_jordan_solver` holds the augmented matrix [A | r] in registers. For
each column k:

* **Pivot.** Scan rows k…N−1 for the largest |a(i,k)|, one row per cycle.
  Bring the winner into place by swapping two entries of a row-permutation
  table, so no data moves.
* **Normalise.** Take one reciprocal and multiply the pivot row by it, in one
  cycle.
* **Eliminate.** Subtract a multiple of the pivot row from every other row,
  one row per cycle, using N+1 multiply-add lanes.

The last column then holds the solution. A pivot whose magnitude does not
exceed `PIV_MIN` (default 1e-6) raises `singular`. The threshold is needed
because rounding keeps the pivot of a singular matrix from being exactly zero.
Latency is N(N+1)/2 + N + N² + 2 cycles: 137 for N = 9 and 2795 for N = 42.

## Individual body matrices for large models

For the 29-body vehicle, the paper found that the full assembly did not fit
its device. It therefore computed only the independent body matrices, all at
once. `indiv_mass_unit` does the same: one `body_mass_matrix` per body, with
the results registered on `start` and `done` one cycle later. The host
projects them onto the joints.

## Host port and word maps

Each unit has an input memory that the host writes while the unit is idle, a
`start` pulse, a one-cycle `done` pulse (plus `busy`), and a combinational
result read. The word maps are in `mb_types_pkg`:

| mass matrix input word | | post-process input word | |
|---|---|---|---|
| 0 | m | 0 | z |
| 1–3 | g (x, y, z) | 1 | ż |
| 4–9 | J: xx, yy, zz, xy, xz, yz | 2–4 | u (parent frame) |
| 10–15 | b | 5–7 | r (parent frame) |
| 16 | parent number + 1 (integer, 0 = ground) | 8–10 | g (body frame) |
| | | 11 | parent number + 1 (integer) |

Post-process result words:

| words | quantity |
|---|---|
| 0–8 | R, row-major |
| 9–11 | joint position |
| 12–14 | joint axis |
| 15–17 | ω |
| 18–20 | joint-point velocity |
| 21–23 | centre of mass |
| 24–26 | centre-of-mass velocity |

On `mb_accel_top`, `wr_unit`, `start_unit` and `rd_unit` select the unit
(`UNIT_MASS`, `UNIT_POST`, `UNIT_GJ`, `UNIT_IND`). The other address fields
are:

| field | mass matrix | post-process | solver | individual matrices |
|---|---|---|---|---|
| `wr_a` | body | body | row | body |
| `wr_b` | word | word | column (N = right-hand side) | word |
| `rd_a` | row of M | body | index of x | body |
| `rd_b` | column of M | result word | unused | row·8 + column |

`busy` and `done` are 4-bit vectors indexed by `unit_t`.

## Number format

All four units use the functions in `mbfp_pkg`: add, multiply, divide,
multiply-add, and conversions to and from fixed point. They round to nearest
even, flush subnormals to zero and overflow to infinity. NaN is not handled
specially. A multiply-add rounds twice, like a separate multiplier and adder.

## How far to trust it, and where it departs from the paper

* **Computed quantities.** These follow the paper's equations: the body mass
  matrix, M = Rᵀ·M̄·R, the Gauss-Jordan solution, and the list of
  post-processed quantities. The post-processing formulas and frame
  conventions are this design's own. The paper lists the quantities but
  defers the formulas to other work.
* **Latency.** The paper's numbers came from pipelined HLS schedules. The
  paper's cycle counts include data transfer in and out, which here is the
  host's business.

  | task | this RTL (cycles) | paper (cycles) |
  |---|---|---|
  | mass matrix (nine bodies) | 159 | 266, plus 56 + 179 for transfers |
  | post-process (nine bodies) | 330 | 355 (494 with transfers) |
  | solver, 9 unknowns | 137 | 913 |
  | vehicle body matrices | 1 | 52 |
  | vehicle solver, 42 unknowns | 2795 | 18,266 |

* **Post-processing overlap.** The paper's post-processing starts a new body
  every 10 cycles, overlapping consecutive bodies deeply. Here only the
  sine/cosine of the next body overlaps the current body, and a new body
  starts every 34 cycles. The total is still below the paper's because the
  three lanes shorten each body.
* **Vehicle suspension post-processing.** The paper reused one circuit for
  the four suspensions, with sines and cosines supplied by the host. It is
  not built, because the suspension's bodies and joints are not specified.
  The general `postprocess_unit` handles trees of revolute joints.
* **Clock rate.** The paper's clock was 125 MHz (100 MHz for the vehicle
  versions). No clock rate has been established for this RTL. The
  combinational floating-point paths (a full multiply-add per cycle, a
  6-term dot product, a divider in the solver's normalise step) are long.
  Pipelining them is the first change for an FPGA target.
* **Topology and b-vectors.** The paper generates code per model and prunes
  terms that are always zero. Here the topology and the b-vectors are
  run-time inputs, so nothing is pruned.
* **Pivoting.** The solver's partial pivoting and its singularity threshold
  are this design's choices.
* **Reset.** Reset clears control state only. Data memories must be written
  before a run.

## Simulating

Every testbench checks itself against a double-precision model, counts checks
and failures, has a watchdog, and prints `TB_RESULT checks=… failures=…`.

| testbench | what it runs |
|---|---|
| `tb_mbfp_pkg` | arithmetic against the simulator's real arithmetic |
| `tb_body_mass_matrix` | 200 random bodies |
| `tb_mass_matrix_unit` | chains, random trees, and a tree with two children; result and latency |
| `tb_trig_unit` | special and random angles, including many turns |
| `tb_postprocess_unit` | random 3-D trees and a planar chain |
| `tb_gauss_jordan_solver` | 9 unknowns: ordered, shuffled and singular systems |
| `tb_gj_vehicle` | 42 unknowns |
| `tb_indiv_mass_unit` | 29 bodies, two runs |
| `tb_mb_accel_top` | the whole flow on the nine-body linkage at default sizes |

The full-flow test goes post-process → host builds the body data → mass
matrix (with the 29-body unit running alongside) → three solves. It also
counts that each mechanism happened: CORDIC waits, angle folds, accumulation
into a parent and into the ground, pivot exchanges, a singular system, and
overlapping units.

Example with plain Verilator:

    verilator --binary --timing -Irtl -Itb \
      rtl/mbfp_pkg.sv rtl/mb_types_pkg.sv tb/mbtb_pkg.sv \
      rtl/dot6.sv rtl/body_mass_matrix.sv rtl/mass_matrix_unit.sv \
      rtl/trig_unit.sv rtl/postprocess_unit.sv rtl/gauss_jordan_solver.sv \
      rtl/indiv_mass_unit.sv rtl/mb_accel_top.sv tb/tb_mb_accel_top.sv \
      --top-module tb_mb_accel_top -Mdir obj && ./obj/Vtb_mb_accel_top

For another testbench, substitute its file and top module. The packages must
come first. Every testbench finishes in well under a second.

## Files

* `rtl/mbfp_pkg.sv`: single-precision arithmetic functions.
* `rtl/mb_types_pkg.sv`: word maps and the unit selector.
* `rtl/body_mass_matrix.sv`, `rtl/dot6.sv`: combinational building blocks.
* `rtl/mass_matrix_unit.sv`, `rtl/postprocess_unit.sv`, `rtl/trig_unit.sv`,
  `rtl/gauss_jordan_solver.sv`, `rtl/indiv_mass_unit.sv`: the units.
* `rtl/mb_accel_top.sv`: the top level.
* `tb/mbtb_pkg.sv`: testbench helpers (single/double conversion, tolerance
  compare).
* `tb/tb_*.sv`: the testbenches listed above.
