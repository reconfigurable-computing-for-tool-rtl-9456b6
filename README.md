# Multi-Rotator accelerator for virtual-digitising tool paths

Virtual digitising is a way to compute CNC tool paths. It makes no assumptions about
the machine, so it also works for non-standard machining. For every tool position it
"touches" a digitised surface. The surface is transformed so that it faces the tool.
Then, for every surface point, the distance the tool can still travel along its attack
axis is computed. The smallest distance fixes where the tool centre goes. On a turning
lathe the part spins under the tool, so every surface point is visited at every angle
of a round. The work grows as

    tool positions x surface points x angles per round

With about 20,000 points and 20,000 positions for a shoe last, this is far too slow in
software. This RTL moves the innermost loop into hardware. Three units run in a chain:

| task | operation                                   | unit             |
|------|---------------------------------------------|------------------|
| 1    | rotate the point about the lathe axis X (or a general 4×4 transform) | `multi_rotator` (`point_transform`) |
| 2    | distance from the point to the torus tool   | `torus_distance` |
| 3    | keep the smallest distance seen             | `min_select`     |

The main idea is the **Multi-Rotator (MR)**. The angles of a round are equally spaced
(0, Δ, 2Δ, …). So each rotation of a point can be built from the previous one by
multiplying with just two constants, cos Δ and sin Δ. Products by constants reduce to
table look-ups and additions (distributed arithmetic). The result is a bit-serial
rotator that delivers one rotation every n+1 clock cycles for n-bit coordinates. It uses
four shift registers, two 4-word tables and four accumulators. There are no angle
approximations as in CORDIC, and no general multipliers.

Task 1 depends on the machine and the tool path strategy. So the top also has a
second configuration for motions that are not a round about X: a general 4×4 point
transformation (`point_transform`). `cfg_mode` picks between the two.

## Data flow of the top level (`vd_top`)

```
            pt_x ─────────────────────────► x (held beside the MR) ──┐
 point ──►  pt_y, pt_z ─► multi_rotator ─► (y', z'), rotation i ─────┼─► torus_distance ─► D / miss ─► min_select ─► res_*
 stream     (valid/ready)  rotates (y,z)     (valid/ready, stall)     │      (tag: point, i)              (Min_dist, tag)
                           by Δ, 2Δ … kΔ                              │
 tool: tx, ty, R, r ──────────────────────────────────────────────────┘
```

For each tool translation position the host:

1. While the unit is idle, writes the step constants and the rotations per round
   (`cfg_we`, `cfg_cos`, `cfg_sin`, `cfg_num_rot`). Sets the tool: `tx`, `ty`, `big_r`,
   `small_r`.
2. Pulses `pass_start`. This sets Min_distance to infinity and restarts the point count.
3. Streams all surface points on `pt_valid`/`pt_ready` and marks the last one with
   `pt_last`.
4. Waits for the one-cycle `res_valid` pulse. It then reads `res_found`, `res_dist`
   (the minimum distance), `res_point` (the index of the winning point, counted from
   `pass_start`) and `res_rot` (its rotation number i, so the angle is i·Δ).

The host turns these into the tool centre and moves to the next translation position.
That step is not described in enough detail to build (see "Not included").

With `cfg_mode = 1` (written together with the other configuration), each point goes
through `point_transform` instead of the MR. It is transformed once, as the row
(x, y, z, 1), by the matrix held in `cfg_m` (3×3 part) and `cfg_t` (translation row).
Then it is measured and reported as rotation 0. On a reconfigurable device this
choice would be a different configuration loaded into the device; here it is a
register. The transform takes one point per cycle and adds one cycle of latency.

The MR rotates in its own (a, b) plane. The top wires that plane to (y, z), so the
rotation is about X:

    y' = y·cos θ − z·sin θ,  z' = z·cos θ + y·sin θ

x is unchanged. It is latched when the point is accepted and travels beside the MR. A new
point is accepted only when two things hold: the MR is idle, and its last result has been
taken. This keeps the latched x and point index matched to the rotation in flight.

Ports of `vd_top` (N = 32 by default):

| port | width | meaning |
|------|-------|---------|
| `cfg_cos`, `cfg_sin` | N+1 | cos Δ, sin Δ, signed, N−1 fraction bits |
| `cfg_num_rot` | ROT_W (16) | rotations per point; a whole round is 360°/Δ |
| `cfg_mode` | 1 | 0: MR round per point, 1: one general transform per point |
| `cfg_m`, `cfg_t` | 3×3 × (N+1), 3 × (N+3) | matrix (N−1 fraction bits) and translation of the general transform |
| `tx`, `ty`, `big_r`, `small_r` | N+3 | torus centre (x, y) and major/minor radius, same unit as the points |
| `pt_x`, `pt_y`, `pt_z` | N | surface point, signed integers |
| `res_dist` | N+5 | minimum distance (signed) |
| `res_point`, `res_rot` | PT_W (16), ROT_W | index of the winning point and its rotation number |
| `mr_stall`, `min_updated` | 1 | status: MR waiting for the distance unit; minimum replaced |

## The Multi-Rotator (`multi_rotator`)

### The recursion

Take the point (x, y) and let C_i = cos(iΔ), S_i = sin(iΔ). The rotated point is

    x_i = x·C_i − y·S_i,   y_i = y·C_i + x·S_i

The angle-addition rules express the four products of rotation i through those of
rotation i−1, with C_Δ = cos Δ and S_Δ = sin Δ:

    x·C_i = (x·C_{i−1})·C_Δ − (x·S_{i−1})·S_Δ
    y·S_i = (y·S_{i−1})·C_Δ + (y·C_{i−1})·S_Δ
    y·C_i = (y·C_{i−1})·C_Δ − (y·S_{i−1})·S_Δ
    x·S_i = (x·S_{i−1})·C_Δ + (x·C_{i−1})·S_Δ

So the unit stores four numbers, x·C, x·S, y·C and y·S. Each step is four two-term sums
of products by the fixed pair (C_Δ, S_Δ). The start is θ₀ = 0: x·C = x, y·C = y,
x·S = y·S = 0. So even rotation 1 needs no real multiplier.

### Distributed arithmetic

A two-coefficient MAC ("2-C MAC") computes a·C_Δ ± b·S_Δ bit-serially. In each cycle
it takes one bit of a and one bit of b, LSB first. The bit pair addresses a 4-word
table (`coef_lut`) that holds 0, C_Δ, ±S_Δ and C_Δ ± S_Δ. A scaling accumulator
(`scaling_acc`) adds the word it reads, then shifts right by one place. The last word
belongs to the two's-complement sign bits, so it is subtracted and not followed by a
shift. After n cycles the accumulator holds

    P = floor((a·C_Δ ± b·S_Δ) / 2^(n−1))

That is the product in coordinate units, because C_Δ and S_Δ carry n−1 fraction bits.
The accumulator is n+2 bits wide. The bits shifted out are dropped, so the rounding is
toward −∞.

The four MACs pair up as follows:

| MAC | result | a, b | LUT |
|-----|--------|------|-----|
| 1 | x·C_i | x·C, x·S | "−" table, port 0 |
| 2 | y·S_i | y·S, y·C | "+" table, port 0 |
| 3 | y·C_i | y·C, y·S | "−" table, port 1 |
| 4 | x·S_i | x·S, x·C | "+" table, port 1 |

MACs 1 and 3 read the same table contents, and so do MACs 2 and 4. So there are only two
dual-port tables of 4 × (n+1) bits. Each n-bit shift register (`mr_sreg`) has a
multiplexer in front of it. The multiplexer selects one of three sources:

- the coordinate, for the cosine registers on a new point;
- zero, for the sine registers on a new point;
- the new product, in the last cycle of each rotation.

The product comes from an n+2-bit accumulator. It is saturated to n bits, but only a
point at the very edge of the range can need this.

### Timing

| cycle (point taken in cycle 0) | action |
|---|---|
| 0 | S-Regs load x, 0, y, 0 |
| 1 … n | n MAC steps |
| n+1 | final cycle: `x_i = P1 − P2`, `y_i = P3 + P4` go into the output register (n+3 bits); the S-Regs load P1…P4 |
| from n+2 | `out_valid` high with `out_idx` = i and `out_last` on the last rotation |

A new rotation follows every **n+1 cycles** (33 at n = 32). The output uses a valid/ready
handshake. If the previous result has not been taken when the next one is ready, the
unit waits in the final cycle and raises `stall`. Assertions check two rules: a held
result must stay stable, and configuration is written only while the unit is idle.

### Variants (parameters)

- `DIGITS = 2`: 2-bit parallel distributed arithmetic. Even and odd bits are processed
  together, giving **n/2 + 1 cycles** per rotation. It doubles the tables (four) and the
  accumulators (eight; each shifts two places). Each MAC's two partial sums are combined
  as floor((even + 2·odd)/2). The even and odd sums are each rounded down first, so the
  results can differ from the serial unit by a unit or two in the last place.
- `SHARED_ADDSUB = 1`: one add/subtract block replaces the adder and the subtracter. It
  is used in two successive cycles, giving **n + 2 cycles** (n/2 + 2 with `DIGITS = 2`).

The default is the serial unit with one adder and one subtracter.

### Accuracy

Every rotation builds on the rounded products of the previous one, so the error grows
with the rotation count. `tb_mr_precision` runs a whole round on a point at about ¾ of
the range and measures the worst error:

| word | step | rotations | max relative error | max error (LSB) | erroneous bits |
|------|------|-----------|--------------------|-----------------|----------------|
| 32 bit | 0.5° | 720 | 2.4e−7 | 382 | 8.6 |
| 32 bit | 2.5° | 144 | 4.8e−8 | 78 | 6.3 |
| 32 bit | 5° | 72 | 2.3e−8 | 37 | 5.2 |
| 16 bit | 0.5° | 720 | 7.8e−3 | 191 | 7.6 |
| 16 bit | 2.5° | 144 | 2.2e−3 | 55 | 5.8 |
| 16 bit | 5° | 72 | 1.4e−3 | 35 | 5.1 |

For shoe-last work the relative error must stay below 1%. A 32-bit unit meets that by
orders of magnitude. After a few hundred rotations about nine low bits are wrong. That is
about a quarter of a 32-bit word. The 16-bit unit loses the same number of bits out of a word half as
long, so 32 bits is the default (`N = 32`). The relative errors above are lower than
figures reported for an FPGA implementation of the same scheme. That implementation's
number format and rounding are not known, so the two cannot be compared in detail.

## Torus distance (`torus_distance`, `isqrt`)

The lathe tool is a double cutting wheel, modelled as a torus. Its major radius is R and
its minor radius is r. Its centre is at (Tx, Ty) and its axis is Z. The attack
direction is Y. For a point (x, y, z) the unit computes

    D = Ty − y − sqrt( (R + sqrt(r² − (x − Tx)²))² − z² )

This is how far the tool can still move towards the point. If either radicand is
negative, the tool cannot touch the point at any depth. The result is then flagged
`miss`, meaning infinite distance.

The unit is sequential. It has one iterative integer square root (`isqrt`, digit by
digit, one result bit per cycle, rounded down), used for the inner root and then for the
outer one. Counting the cycle in which the point is taken as 0, the result appears:

- in cycle 3 for a miss in x;
- in cycle W+5 for a miss in z;
- in cycle 2W+6 for a hit (W = N+3 = 35, so 76 cycles).

This is slower than the MR's 33 cycles per rotation. In the full chain, therefore, the
MR stalls and a touched point costs about 77 cycles per rotation. Points outside the
tool's x-range cost the MR's 33.

## Minimum selection (`min_select`)

This unit applies `if Cur_dist < Min_dist then Min_dist = Cur_dist` to the stream of
distances. Misses never win. The comparison is strict, so the first of several equal
minima is kept. With the minimum it stores the sample's tag (point index, rotation
number). `clr` (the top's `pass_start`) starts a new search.

## General point transformation (`point_transform`)

The unit computes p' = (x, y, z, 1) · TR for one point per cycle. Only the affine part
of the 4×4 matrix is built: the last column is taken as (0, 0, 0, 1), so there is no
divide. Each output coordinate is a sum of three products with the matrix column.
The sum is shifted right by N−1 (rounded down) and the translation is added. Nine
multipliers work in parallel and feed one output register with a valid/ready
handshake. The method names this task only by its function. The formats follow the MR's,
and the circuit is this design's own.

## Number formats

- Coordinates are signed integers in one common length unit, for example micrometres. A
  200 mm part then needs 18 bits; 32-bit words leave headroom.
- `cfg_cos` and `cfg_sin` are signed with N−1 fraction bits in N+1 bits:
  `round(cos Δ · 2^(N−1))`. The N+1 bits leave room for the table word C+S ≈ 1.41.
- Rotated coordinates, tool parameters and distances are N+3 bits wide (N+5 for the
  distance).

## Design choices not fixed by the method

These parts are this implementation's own:

- rounding toward −∞ everywhere;
- saturation of the reloaded products;
- the product/result widths: accumulators and products are n+2 bits, and the final
  sums x_i, y_i are n+3 bits;
- the valid/ready handshakes and the stall;
- asynchronous active-low reset;
- loading the table contents from C_Δ and S_Δ through a write strobe, where an FPGA
  would fix them in its configuration;
- the way the two partial sums of the 2-bit variant are combined;
- the whole micro-architecture of the distance and minimum units: only their functions
  are given by the method;
- the tag that travels with every rotated point;
- the general transformation's circuit and its selection by a mode register;
- bringing points in as a stream rather than reading them from a shared memory.

Min_distance is reset once per tool translation position and kept over all points and
angles. The winning angle is reported with it.

## Not included

- The **host processor**. It picks the machine/tool configuration, reprograms the
  reconfigurable devices and runs the outer loops (tool translation,
  `Get_centre_point`, `Add_trajectory`).
- The **main memory** that holds the surface.
- The **configuration memory** of the reconfigurable devices.
- The **tool-centre computation** from the minimum. It is named but not specified.

The top's configuration, stream and result ports are where these would connect.

## Files

| file | content |
|------|---------|
| `rtl/vd_pkg.sv` | shared constants (default widths) and state/select enums |
| `rtl/vd_top.sv` | top level: MR (or general transform) → distance → minimum |
| `rtl/multi_rotator.sv` | Multi-Rotator: sequencer, 2-C MACs, final add/sub, variants |
| `rtl/mr_sreg.sv` | S-Reg with input multiplexer |
| `rtl/coef_lut.sv` | dual-port 4-word coefficient table |
| `rtl/scaling_acc.sv` | scaling accumulator |
| `rtl/torus_distance.sv` | torus distance along Y |
| `rtl/isqrt.sv` | iterative integer square root |
| `rtl/min_select.sv` | comparison and conditional assignment |
| `rtl/point_transform.sv` | general 4×4 (affine) point transformation |
| `tb/tb_<unit>.sv` | self-checking testbench of each unit |
| `tb/tb_multi_rotator_variants.sv` | 2-bit PDA and shared add/sub variants, bit-exact and cycle counts |
| `tb/tb_mr_precision.sv` | 16/32-bit accuracy over whole rounds |
| `tb/tb_vd_top.sv` | end-to-end: several passes; stalls, misses in x and z, configuration change, general-transform pass, pass with no contact |
| `tb/tb_vd_top_full.sv` | one full pass: 130 × 120 points × 90 rotations (1.4 M rotations), default parameters |
| `tb/vd_ref_pkg.sv` | reference model (equations, wide integers) and test surface used by the two top-level testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/vd_pkg.sv tb/vd_ref_pkg.sv tb/tb_vd_top.sv --top-module tb_vd_top
./obj_dir/Vtb_vd_top
```

Replace `tb_vd_top` with any other testbench. `tb/vd_ref_pkg.sv` is needed only by the
two top-level ones. Runtimes:

- `tb_vd_top_full`: about half a minute. About 51 M clock cycles plus the reference
  model.
- Each of the others: a few seconds.

For lint, run `verilator --lint-only -Wall -y rtl +libext+.sv rtl/vd_pkg.sv rtl/vd_top.sv`.
The only remaining warning is that `rst_n` is used both as the asynchronous reset and in
the assertions' `disable iff`.

## How far it is verified

What the testbenches check:

- **Multi-Rotator, all variants:** every result is compared bit for bit with a model
  written from the angle-addition equations (wide integers). Results are also checked
  against floating-point rotation, within a tolerance that grows with the rotation
  count. The rotation period (n+1, n/2+1, n+2, n/2+2) is checked cycle by cycle. With
  back-pressure, the stall and hold behaviour is checked.
- **General transformation:** random matrices and points with back-pressure, bit for
  bit against wide-integer products; latency and tags are checked too.
- **Distance unit:** compared with an integer model and with the real-valued formula,
  including the latency of each case.
- **Whole chain:** compared with a reference model of all three tasks. Every rotation
  must reach the distance unit. The cycle count of a pass must lie within 2% of a
  per-rotation estimate. Each mechanism (stall, miss in x, miss in z, minimum update,
  configuration change, switch to the general transformation and back, pass without
  contact) must occur.

For each unit, a copy with a deliberate error was also run; its testbench detects it.

What is not covered:

- Timing closure and FPGA resource use have not been measured.
- The arithmetic has been checked only against the equations, not against a real
  machining result.
