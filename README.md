# Non-bonded force pipeline for molecular dynamics

Molecular dynamics spends most of its time on non-bonded forces: van der
Waals and electrostatic interactions between every pair of atoms closer than a
cut-off. A CPU finds those pairs with a cell list: the box is cut into cells,
each cell is paired with its neighbours, and every atom of one cell is paired
with every atom of the other. Written as nested loops, that search maps badly
onto a hardware pipeline. The inner loop lengths depend on how many atoms
happen to sit in each cell, so the outer loop stalls while an inner loop
finishes.

This design follows the architecture of the OpenCL accelerator described in
*Architecture of an FPGA Accelerator for Molecular Dynamics Simulation Using
OpenCL*, and its main idea is to split the work:

* **Host:** walks the cell-pair list and writes out a flat **atom-pair list**
  `(i, j)`. This is a cheap search.
* **Accelerator:** runs a single loop over that list. It is one deep pipeline
  that takes one pair per clock cycle, never stalls, and adds each pair's force
  into per-atom force records that the host reads back.

Bonded forces, motion updates and building the pair list stay on the host.
They are not part of this RTL.

The RTL is written in SystemVerilog-2017 and is synthesizable. All arithmetic
is fixed point.

## Data path

```
 pair stream ──► S0 atom table ──► S1 LJ table ──► S2 force pipeline (76) ──► S3 force accumulator
 (i, j)          md_atom_store      md_lj_table     md_force_pipe               md_force_accum
                 read i and j       read (type_i,   distance, sqrt, 1/r,        F[i] += f
                 (1 cycle)          type_j) (1)     powers, products            F[j] -= f
```

From the cycle a pair is accepted to the cycle its force is in the
accumulator takes 79 cycles. One pair is accepted per cycle whenever the
stream offers one. A run over `n_pairs` pairs of a system with `n_atoms` atoms
takes

    cycles = n_atoms (clear) + n_pairs + starved cycles + 79

The `starved cycles` are cycles in which the stream offered no pair. At the
202 MHz clock reported for the OpenCL accelerator, this is 4.95 ns per pair.

### The force pipeline (`md_force_pipe`)

For a pair with displacement `d = r_i - r_j` and distance `r`, the force on
atom `i` is

    F_i = d * (1/r^2) * ( A/r^12 - B/r^6 + qq/r ),   F_j = -F_i

* `A = 12*C12` and `B = 6*C6` are the 12-6 Lennard-Jones coefficients of the
  two atom types.
* `qq = qi*qj` is the Coulomb term. Charges are stored pre-multiplied by the
  square root of the Coulomb constant, so `qq` already includes that constant.
  For kcal/mol and Angstrom, the constant is 332.06.

| stages | unit | what happens |
|---|---|---|
| 2 | `md_pair_distance` | `d` per axis with the periodic minimum-image rule, then `r^2` and the range test |
| 26 | `md_isqrt_pipe` | `r = sqrt(r^2)`, one result bit per stage |
| 41 | `md_div_pipe` | `1/r = 2^60 / r`, one quotient bit per stage |
| 7 | product stages | `1/r^2` and `qq`; `1/r^4` and `qq/r`; `1/r^6`; `1/r^12` and `B/r^6`; `A/r^12` and the sum; times `1/r^2`; times `d` |

Data that a later stage needs (indices, `d`, charges, coefficients, the range
flag) travels beside the arithmetic in `md_delay` shift registers. Idle cycles
travel through the pipeline as bubbles. Nothing in the pipeline can stall.

A pair counts as **in range** when `1 A^2 <= r^2 < cutoff2`.

* A pair out of range still flows through the pipeline, but its force is
  forced to zero at the last stage.
* The lower limit removes self pairs (`r = 0`) and bounds the fixed-point
  range. Pairs closer than 1 A therefore contribute nothing, so pairs that
  should never be that close (bonded neighbours) must be left out of the list.
* Out-of-range pairs are fed `r^2 = 1` into the root and divider, so those
  units never see an operand outside their range.

### Lanes

The parameter `LANES` (default 1, the configuration the OpenCL accelerator
actually ran) replicates the path from pair stream to force pipeline. The
accelerator's authors estimate that four copies would fit once more of the
device is used.

* **Pair stream.** Each lane has its own `pair_valid[l]`, `pair_i[l]` and
  `pair_j[l]`. In a `pair_ready` cycle, every lane that offers a pair has it
  taken. The source must never offer more pairs than remain of `n_pairs`.
* **Atom table.** It has two read ports per lane. On an FPGA, that means one
  dual-port copy per lane.
* **Coefficient table.** It has one read port per lane.
* **Accumulator.** It has two update slots per lane. Slots that name the same
  atom in one cycle are first summed, and the sum is written once.

With `LANES = 4`, the end-to-end test list of about 211,000 pairs runs in
56,574 cycles, against 223,079 cycles with one lane.

### Periodic box

The box is a cube whose edge is `box_len`. Coordinates must lie in
`[0, box_len)`. A displacement component above `+box_len/2` has `box_len`
subtracted, and one below `-box_len/2` has `box_len` added. As a result, a
pair that spans a face of the box gets its nearest image without the host
shifting coordinates.

### Force accumulation (`md_force_accum`)

Each cycle the accumulator adds `f` to atom `i` and subtracts it from atom
`j`, so every pair is computed once. With several lanes, each lane does this
for its own pair. All read-modify-writes finish within the cycle. Pairs that
come back to back and share an atom therefore see each other's updates, with
no forwarding and no stalls. This case is the common one: the list runs
through all partners of one atom in a row.

The price is that this memory has two update ports per lane and asynchronous
reads, which makes it registers rather than block RAM. At the default 22,795 atoms it
is 4.4 Mbit of state. A block-RAM version would need a small write-combining
buffer in front of it. Sums wrap on overflow.

### Control (`md_kernel_ctrl`)

A launch (`start`, with `n_atoms` and `n_pairs`) goes through four steps:

1. **CLEAR:** clears the force records of atoms `0 .. n_atoms-1`, one per
   cycle.
2. **RUN:** holds `pair_ready` high until `n_pairs` pairs have been taken.
3. **DRAIN:** counts pairs in flight and waits until the last one has reached
   the accumulator.
4. **DONE:** holds `done` high.

The controller counts kernel cycles, starved cycles and accepted pairs. The
top also counts in-range pairs. A `start` while busy is ignored.

## Number formats (`md_pkg`)

| quantity | format | range |
|---|---|---|
| coordinate, displacement | signed 32 bit, 20 fraction bits | ±2048 A |
| `r^2`, `cutoff2` | unsigned 32 bit, 20 fraction bits | < 4096 A^2, so the cut-off is < 64 A |
| `r` | unsigned 26 bit, 20 fraction bits | 1 .. 64 A |
| `1/r` | unsigned 41 bit, 40 fraction bits | ≤ 1 |
| `1/r^2`, `1/r^6`, `1/r^12` | unsigned 49 bit, 48 fraction bits | ≤ 1 |
| charge × sqrt(332.06) | signed 32 bit, 24 fraction bits | ±128 |
| `A`, `B` | unsigned 32 bit, 8 fraction bits | < 1.6e7 |
| force | signed 64 bit, 32 fraction bits | ±2.1e9, saturated per pair |

These are the units the testbenches use. Any consistent unit system works if
the host scales `A`, `B` and the charges accordingly.

Accuracy against double precision is limited mainly by truncating `r` to 20
fraction bits. Per pair, the force error is about 1e-5 relative, plus 1e-4
absolute.

## Using the top (`md_accel_top`)

1. **Load the atom table.** Write each atom's record `{x, y, z, q, type}` on
   `atom_wr_*`.
2. **Load the coefficient table.** Write `{A, B}` on `lj_wr_*` for each
   ordered type pair. Write both `(a, b)` and `(b, a)`.
3. **Set the box and cut-off.** Drive `box_len` and `cutoff2`. Keep them
   stable during a run.
4. **Start the run.** Pulse `start` with `n_atoms` and `n_pairs`.
5. **Stream the pairs.** Drive `pair_valid[l]`, `pair_i[l]` and `pair_j[l]`
   for each lane `l`. In a cycle where `pair_ready` is high, every lane whose
   `pair_valid` bit is set has its pair taken.
6. **Read the forces.** After `done`, put an atom index on `force_rd_addr`. Its
   force `{x, y, z}` appears on `force_rd_data` one cycle later.

The tables keep their contents across runs, so the next time step only
reloads the atoms that moved and streams a new list.

The pair stream and the load and read ports take the place of the board DRAM
and PCIe link of the OpenCL accelerator, which this RTL does not contain.

Parameters:

* `N_ATOMS` (default 22,795) sets the depth of the atom and force memories.
  The default is the size of the system the OpenCL accelerator was evaluated
  on.
* `NTYPES` (default 32) sets the number of atom types.
* `LANES` (default 1) sets the number of parallel pipelines. See Lanes above.

## What follows the original architecture and what does not

Taken from it:

* The host/accelerator split.
* The flat atom-pair list that replaces the nested cell loops.
* A single pipelined loop, so one pair enters per cycle.
* Van der Waals plus electrostatic forces.
* The cut-off and the periodic box.
* The clock target of 202 MHz.

Chosen here, because the architecture leaves these open:

* **Force formulas.** Plain 12-6 Lennard-Jones and cut-off Coulomb. There is
  no switching or long-range correction.
* **Arithmetic.** Fixed point, where the OpenCL kernel most likely used
  floating point.
* **Square root and division.** Digit-recurrence units.
* **Memories.** The atom table and the force records are on chip. The force
  accumulates per atom, not per pair.
* **Coefficients.** Stored in a per-type-pair table.
* **Control.** The 1 A lower distance limit, the control FSM and all port
  protocols.

Not built:

* The host, PCIe, board memory and OpenCL runtime.
* How the four-lane version would share memory is left open by the original
  architecture. The `LANES` scheme described above is this design's own.

## Files and simulation

`rtl/`:

* `md_pkg` holds the types, formats and latencies.
* The units are `md_delay`, `md_isqrt_pipe`, `md_div_pipe`,
  `md_pair_distance`, `md_force_pipe`, `md_atom_store`, `md_lj_table`,
  `md_force_accum` and `md_kernel_ctrl`.
* `md_accel_top` is the top level.

`tb/` has one self-checking testbench per module, named `tb_<module>`. The
tests of `md_force_accum` and `md_kernel_ctrl` use four and two lanes. Each
one prints `TB_RESULT checks=N failures=M` and checks latencies as well as
values. `tb_md_accel_top` is the system test:

* It places 1,000 atoms in a 32 A periodic box.
* It builds the cell list and pair list the way the host would (8 A cells,
  half-shell neighbours), which gives about 211,000 pairs.
* It streams the list with random gaps, twice.
* It compares every atom's force against an all-pairs double-precision
  reference.
* It checks the cycle formula above.
* It requires each mechanism to occur at least once: starved cycles, cut-off
  rejection, minimum-image correction, pairs under 1 A, back-to-back updates
  of one atom, and clearing between runs.

It runs the top at its default parameters in about 10 s.
`tb_md_accel_top_4lane` runs the same test with `LANES = 4`.
`tb_md_accel_top_22795` loads a system of the evaluated size: 22,795 atoms
at water-like density in a 61.1 A box, with 7 x 7 x 7 cells and an 8 A
cut-off. The full pair list has about 20 million pairs, which is too long to
simulate. The test therefore streams the complete list of six cells, about
375,000 pairs. It checks all 22,795 force records against a double-precision
sum over those pairs, and checks the cycle formula (405,350 cycles, about
2 ms at 202 MHz).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/md_pkg.sv tb/tb_md_accel_top.sv --top-module tb_md_accel_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. To lint the RTL:

```
verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/md_pkg.sv rtl/md_accel_top.sv
```

Lint reports only warnings, and all of them are harmless:

* **Reset.** The assertions sample the asynchronous reset, which Verilator
  reports as a signal used both synchronously and asynchronously.
* **Unused bits.** The type field of an atom record is unused after the
  coefficient lookup, and the coefficients are unused after the last product
  stage.
* **Unused package constants.** Some constants in `md_pkg` document formats
  that no module reads.
