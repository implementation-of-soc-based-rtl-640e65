# Parallel hardware for real-time electromagnetic transient simulation

An electromagnetic transient (EMT) simulator steps a power network through time in
steps of tens of microseconds. At every step it:

1. turns each inductor and capacitor into a conductance plus a "history" current source
   (trapezoidal rule);
2. builds the nodal equations `G v = I`;
3. solves them;
4. updates the history sources from the new voltages.

In real time, all of this must fit inside the step: 20 µs or 50 µs in the target cases.
On an embedded processor a network of 50 to 80 nodes takes 20 to 50 times longer.

This design meets the deadline in two ways:

* **Splitting the network.** Cutting the network at a few branches leaves subsystems that
  are joined only by the currents in those branches (*link currents*). The compensation
  theorem then lets each subsystem be solved on its own:
  * first as if it stood alone, giving Thevenin voltages `v_th` and impedance columns
    `z_j` at its link nodes;
  * then, once the few link currents are known, corrected by superposition:
    `v = v_th − Σ z_j·i_j`.
* **One hardware unit per subsystem.** Each subsystem gets its own unit, called a
  **SEMETS** (small EMT simulator). All units work in parallel, and each solves its
  equations with a **parallel Gauss-Jordan solver** that has one processing core per
  matrix row.

The top level, `emt_simulator`, holds four SEMETS units behind a memory-mapped host bus.
A processor on that bus:
* loads the netlists;
* starts the units;
* solves the small link-current system each step;
* reads the voltages back.

Arithmetic is IEEE-754 binary32 throughout. Rounding is to nearest-even, and subnormals
are flushed to zero.

## One time step inside a SEMETS

`semets_control` runs the step as a fixed sequence:

| # | Unit | What happens | Cycles |
|---|------|--------------|--------|
| 1 | `source_generator` | Each source's value for this step: linear interpolation in a shared one-period waveform table, scaled by an amplitude. A 32-bit phase accumulator per source sets the frequency. | n_src + 1 |
| 2 | `gi_update` and `lss` together | GU clears and restamps G and I (one branch, source or history element per cycle), then streams the augmented rows. The solver takes the stream during its initialisation phase and solves. | see below |
| 3 | link exchange | Only with link ports in use: the unit raises `link_req` and sets status bit 2, then waits for the processor's "go" write. | processor |
| 4 | `link_compensation` | `v = v_th − Σ z_j·i_j`, one row per cycle. | n + 1 |
| 5 | `history_source_update` | `h ← α·h + β·(v_k − v_m)` for every history element, one per cycle. | n_hist + 1 |

The rows GU streams in step 2 have the form
`[G(r,1..n) | I(r) | e(r, link1) e(r, link2) e(r, link3)]`.

Two run modes are set by the `period` register:
* **Offline** (`period = 0`): each step follows the previous one immediately.
* **Real time:** a step starts every `period` clock cycles, which is 5000 cycles for 20 µs
  at 250 MHz.
  * A unit that finishes early waits, and counts the cycles it waited.
  * A step that ends after its period counts an *overrun*. The next step then starts as
    soon as possible.

Measured in simulation at the default sizes (4 sources, 3 link columns), an offline step
takes

    steps = 1 + (n_src+2) + (T_lss+1) + (n+2) + (n_hist+2) + (n_br + n_src + n_hist)

cycles, plus the processor's time in the link exchange. With 64 branches and 64 history
elements this comes to:

| Subsystem size | Cycles per step | Time at 250 MHz |
|----------------|-----------------|-----------------|
| 17 nodes | 1297 | 5.2 µs |
| 21 nodes | 1721 | 6.9 µs |
| 24 nodes | 2081 | 8.3 µs |

These are well inside 20 µs and 50 µs.

## The Gauss-Jordan solver (`lss`)

This is the largest and most intricate part of the design. It solves an n×n system,
n ≤ N = 26, with `NRHS` right-hand-side columns. In a SEMETS, `NRHS = 1 + NLINK = 4`: the
current vector plus one unit-injection column per link port.

### Structure

* **`core_gj` × N.** Core *r* owns matrix row *r*. The row sits in its own dual-port RAM,
  `gj_row_ram`:
  * the read port is driven by the core's *upper* sequencer;
  * the write port is driven by the *lower* sequencer.

  A position decoder compares the core's ID with `reference_row`. Register `den` holds the
  pivot and register `fac` holds the elimination factor. Both feed `vector_arith_unit`, a
  4-stage pipeline that computes either `a / s` or `a − s·b`.
* **`lss_global_control`.** Steps `solution_phase` through INIT → ELIM → RETURN, and
  `reference_row` through 1..n within each phase. For each (phase, row) it issues one
  `valid` pulse, then waits until every core has pulsed `done`.
* **`early_start`.** A latency counter that restarts at each ELIM `valid`. It fires two
  strobes at fixed cycle counts, which are the constants in `emt_pkg`:
  * `es_lu_elimination` at count 5: the non-reference cores start reading their rows, so
    that element *j* of their row meets element *j* of the normalised row.
  * `es_lu_writeBackRE` at count 10: the non-reference cores start writing the results
    back as they leave the pipeline.

  The cores therefore need no handshake with each other. Their pipelines fill while the
  reference core is still dividing.
* **`gj_interconnect`.** A registered multiplexer that puts the reference core's output
  word on the bus seen by all cores and by the solver output.

### Phases

| Phase | Reference core (row i) | Other cores |
|-------|------------------------|-------------|
| INIT | Stores its row from the input stream. | Idle. |
| ELIM | Reads `a_ii` into `den`, then streams its row through the divider. The normalised row is written back and broadcast. | Read `a_ki` into `fac`, compute `row_k − a_ki·normalised_row` as the broadcast arrives, and write it back. |
| RETURN | Sends the NRHS solution words of its row. | Idle. |

After n elimination passes the matrix part is the identity and the right-hand-side
columns hold the solution. There is no pivoting. Nodal conductance matrices are
diagonally dominant, so the pivots are never zero.

### Timing

With `W = n + NRHS`, the solver takes

    T_lss = 1 + n·(W+2) + n·(W+12) + n·(NRHS+3)   cycles.

The testbench checks this exactly for n = 5, 17 and 26. With one right-hand side, n = 17
takes 919 cycles (3.7 µs at 250 MHz) and n = 24 takes 1633 cycles.

Each elimination pass costs about `W + 12` cycles: the row length plus the two pipeline
latencies and the bus. The passes do not overlap. Overlapping them is the obvious next
speed-up.

## Describing a network

Each SEMETS holds one subsystem. Node 0 is ground. Everything below is written through
the register interface.

* **Branches** (`NBR` = 64). A branch is a conductance between nodes k and m, given by
  `{k, m, g_on, g_off, switch flag, initial state, switching step}`.
  * Resistors, and the trapezoidal equivalents of inductors (`g = Δt/2L`) and capacitors
    (`g = 2C/Δt`), are plain branches.
  * A switch uses `g_on` while closed and `g_off` while open. Its state is the initial
    state, inverted from the switching step on, so a fault is scheduled before the run.
  * Parallel conductances between the same pair of nodes may be merged into one branch.
* **Sources** (`NSRC` = 4). A source is a current injection into one node, defined by
  `{phase, phase increment per step, amplitude, node}`. A zero increment gives a constant
  source.
* **History elements** (`NHIST` = 64). An element is `{k, m, α, β, h0}`. The element's
  branch current is `g·v_km + h`, and h is updated as `h ← α·h + β·v_km`:

  | Element | α | β |
  |---------|---|---|
  | Inductor | 1 | 2g |
  | Capacitor | −1 | −2g |

* **Link ports** (`NLINK` = 3). A port is a node where a link current leaves the
  subsystem. The processor writes each port's current, signed as leaving the subsystem,
  every step.

## Host interface

### Top level

Words are addressed by `addr[19:0]`:
* `addr[19:16]` selects the unit; `4'hF` writes to all units at once.
* `addr[15:0]` is the register inside the unit.

A read returns data with `rvalid` one cycle later.

### Inside a unit

`addr[15:12]` selects the region:

| Region | Contents | Offset |
|--------|----------|--------|
| 0 | Control registers (below) | register |
| 1 | Waveform table, 256 binary32 points | point |
| 2 | Sources | `index*4 + field` (phase, increment, amplitude, node) |
| 3 | Branches | `index*4 + field` (see below) |
| 4 | History elements | `index*4 + field` (see below) |
| 5 | Final node voltages | node |
| 6 | Link ports | `index*4 + field` (0 node, 1 current) |
| 7 | Thevenin voltages | node |
| 8 | Impedance columns | `port*32 + node` |

Branch fields:
* 0: `{m[15:8], k[7:0]}`
* 1: `g_on`
* 2: `g_off`
* 3: `{switching step[31:8], initial[1], switch[0]}`

History-element fields:
* 0: nodes
* 1: α
* 2: β
* 3: h, which can also be read back

### Control registers (region 0)

| Offset | Register |
|--------|----------|
| 0x0 | Start. Write 1 to start a run. |
| 0x1 | Node count. |
| 0x2 | Step count. |
| 0x3 | Branch count. |
| 0x4 | Source count. |
| 0x5 | History element count. |
| 0x6 | Period in cycles; 0 means offline. |
| 0x7 | Status: `{overruns[31:16], link wait[2], run finished[1], busy[0]}`. |
| 0x8 | Completed steps. |
| 0x9 | Cycles spent waiting for the period. |
| 0xA | Switches closed in the current step. |
| 0xB | Link port count. |
| 0xC | Write 1 to continue after the link exchange. |

### Link exchange

The processor's part of each step, when subsystems are linked:
1. Wait until every linked unit shows the link-wait status bit.
2. Read each unit's `v_th` and `z_j` at the link nodes.
3. Solve the small system in which every link obeys its own branch equation (for a
   resistive link, `v_k − v_m = R·i`).
4. Write the port currents.
5. Broadcast the continue write.

`tb_link_split` does exactly this for a 30-node network split into three subsystems.
It matches a direct solution of the unsplit network.

## How far to trust it, and where it departs from the original design

What the simulations verify:
* Every module has a self-checking testbench.
* Values are compared against independent double-precision models.
  * The whole SEMETS is checked against an RLC ladder with a scheduled fault.
  * The four-unit top level is checked with subsystems of 21, 21, 21 and 24 nodes.
  * The split-network run is checked against the unsplit solution.
* Cycle counts are checked where they are fixed.

Only simulation has been done; nothing has been tried on an FPGA.

Departures and simplifications:

* **Arithmetic.** The floating-point operators are behavioural, single-cycle functions
  (`emt_pkg`), wrapped in a register pipeline of the stated latency. They handle neither
  NaN nor infinity, and flush subnormals to zero. For a real FPGA build, replace them with
  vendor floating-point cores of the same latency, and retune the Early Start constants
  if the latencies change.
* **Core instruction set.** The original row processor also has `num` and `row`
  registers, and a small instruction set. Only the operations Gauss-Jordan needs are
  built.
* **Early Start strobes.** Its forward and backward substitution strobes (`es_fw_*`,
  `es_bw_*`) belong to a substitution flow that this solver does not use, and are
  omitted.
* **Host bus.** The processor connection in the original is an AXI bus. Here it is a
  single-cycle word interface with the same decoding; an AXI-lite adapter would sit in
  front of `host_bus`.
* **Link currents.** These are solved by the processor. The hardware provides the
  Thevenin data and applies the result.
* **Transmission lines.** Distributed-parameter (Bergeron) line models are not
  supported. A line must be modelled as LC sections, as in the target study cases.
* **G/I update.** `gi_update` keeps the full (N+1)×(N+1) matrix in registers and
  restamps it every step. This is simple and corresponds to the worst case of a full
  reconfiguration. It costs area, and it makes generic synthesis of that module slow.
* **Resets.** Resets are asynchronous and active low. The `rst_n` lint warning about
  mixed synchronous and asynchronous use comes from the `disable iff` clauses of the
  assertions, not from the logic.

## Files and simulation

`rtl/` has one module per file:

| File | Contents |
|------|----------|
| `emt_pkg.sv` | Types, latencies, register map and the binary32 functions. |
| `emt_simulator.sv` | Top level. |
| `host_bus.sv` | Host bus decoder. |
| `semets.sv` | One SEMETS unit. |
| `semets_control.sv` | Time-step controller. |
| `source_generator.sv` | Source values. |
| `gi_update.sv` | G and I stamping and streaming. |
| `lss.sv` | Linear system solver. |
| `lss_global_control.sv` | Solver phase and row sequencing. |
| `early_start.sv` | Elimination timing strobes. |
| `core_gj.sv` | Row processor. |
| `vector_arith_unit.sv` | Divide and multiply-subtract pipeline. |
| `gj_row_ram.sv` | Dual-port row memory. |
| `gj_interconnect.sv` | Reference-row bus. |
| `link_compensation.sv` | Final voltages from the link currents. |
| `history_source_update.sv` | History source update. |

`tb/` has one testbench per module, `tb_<module>.sv`, plus:
* `tb_link_split.sv`: the split-network run;
* `tb_fp_pkg.sv`: binary32 conversion helpers;
* `tb_emt_ref_pkg.sv`: the double-precision network model.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`, and has a watchdog.
Packages must come first on the command line. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_semets \
        rtl/emt_pkg.sv tb/tb_fp_pkg.sv tb/tb_emt_ref_pkg.sv \
        $(ls rtl/*.sv | grep -v emt_pkg) tb/tb_semets.sv -o sim
    ./obj_dir/sim

`tb_emt_simulator` runs the top level at its default parameters:
* four units with 21, 21, 21 and 24 nodes;
* one unit in real time with waiting, one with overruns, and two offline;
* a broadcast load and start;
* a fault switch in each unit.

It counts each of these mechanisms and fails if one never occurs. It builds in about a
minute and runs in under a second.

To change sizes, use the parameters:

| Parameter | Meaning |
|-----------|---------|
| `NSEMETS` | Number of units. |
| `N` | Maximum nodes per unit. |
| `NBR` | Branch table size. |
| `NSRC` | Source table size. |
| `NHIST` | History element table size. |
| `NLINK` | Link ports per unit. |
| `TAB_DEPTH` | Waveform table depth: a power of two, at most 256. |

The register-map offsets assume `N < 32` for the impedance region and at most 1024
entries per table.
