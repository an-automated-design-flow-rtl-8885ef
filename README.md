# Sequential simulator for large homogeneous synchronous designs

A many-core chip or network-on-chip often consists of tens or hundreds of
identical cells (routers, processor tiles) connected by wires. Such a design is
too large to place on one FPGA as it is, yet a cycle- and bit-accurate
simulation in software is slow. This RTL takes the other route: it keeps
**one** copy of a cell's combinational logic, stores the registers of every
cell in a RAM, and evaluates the cells one after the other. One clock of the
simulated chip (a *system cycle*) is computed in a number of simulator clocks
(*delta cycles*), each of which evaluates one cell. The result after every
system cycle is exactly the register state the parallel chip would have.

The hard part is that cells talk to each other through plain wires. A cell's
outputs may depend combinationally on its inputs (a Mealy machine), so the
value a cell reads from a neighbour is only final once that neighbour has been
evaluated, and no fixed evaluation order works for every topology. The
simulator therefore schedules evaluations dynamically, driven by a
*has-been-read* bit on every link. That mechanism is described first below.

## The simulated system

The simulator models `NUM_CELLS` cells (default 64) in a ring. Each cell has
`NPORT` input and `NPORT` output link ports (default 1). A cell is described by
two functions of its inputs `I` and its register state `S`:

    S[t+1] = F(I[t], S[t])      next state
    O[t]   = G(I[t], S[t])      outputs, may depend on I directly

Output port `p` of cell `c` drives link `c*NPORT + p`. Input port `p` of cell
`c` reads the link of output port `p` of cell `c-1` for even `p` and of cell
`c+1` for odd `p` (indices wrap around). With `NPORT = 1` this is a
unidirectional ring (0 → 1 → 2 → … → 0); with `NPORT = 2` a second ring runs in
the opposite direction. The topology functions are in `rtl/seqsim_pkg.sv`.

The parallel system must be free of combinational loops, as any synthesizable
synchronous design is. The example cell guarantees this because cell 0's
outputs depend on its state only.

## Link memory and the has-been-read (HBR) rule

Links have no registers in the real chip, so the link memory (`link_mem`)
keeps only the latest value of each link, one word per link, plus one HBR bit.
A cell is **stable** when the HBR bits of all its input links are set.

* At the start of every system cycle all HBR bits are cleared, so every cell
  is non-stable and is evaluated at least once (a cell may change its outputs
  without any input change, since its state changed).
* When a cell is evaluated, the HBR bits of its input links are set: it has
  now seen their current values.
* For each output it writes, the word is compared with the stored one. If it
  differs, the word is updated and that link's HBR bit is cleared, so the
  consumer becomes non-stable and will be evaluated (again). If it is equal,
  nothing happens, so an unchanged value causes no extra work.
* When no cell is non-stable, every cell has seen the final values of its
  inputs, the new states written during the cycle are all correct, and the
  system cycle is over.

A stale read is thus always repaired: if a consumer read a link before its
producer wrote the final value, the write clears the bit and the consumer runs
again. Because the parallel design has no combinational loop, changes can only
ripple a finite distance and the process ends.

Example with three cells in a unidirectional ring, evaluated 0, 1, 2: cell 0
first reads link 2, which still holds last cycle's value. Cells 1 and 2 read
freshly written links. If cell 2 then writes a different value to link 2, the
HBR bit cell 0 had set is cleared and cell 0 is evaluated once more, in a
fourth delta cycle; if the value is the same, the system cycle ends after
three delta cycles.

## State memory

The state memory (`state_mem`) holds two banks of `NUM_CELLS` words: the
current state `S[t]` and the new state `S[t+1]`. Evaluations read the current
bank and write the new bank, so a cell evaluated twice simply overwrites its
new state, and no cell ever sees a neighbour's next state. At the end of a
system cycle the banks swap roles (a single `bank` bit flips); nothing is
copied.

The memory has one read and one write port. The read address is the cell
being issued; the write address is that same address delayed by one clock,
matching the one-clock read latency, so the new state of the cell read in
clock `k` is written at the end of clock `k+1`.

## Scheduling and timing

`sim_ctrl` contains the round-robin scheduler (`rr_scheduler`) and the
system-cycle sequencer. Evaluation is a two-stage pipeline (shown for one
hypercell; see below for several):

| stage    | what happens                                                           |
|----------|------------------------------------------------------------------------|
| issue    | scheduler grants a non-stable cell; its state is read from `state_mem` |
| evaluate | hypercell computes `O` and `S[t+1]`; link memory reads inputs, writes changed outputs and updates HBR bits; new state is written |

A new cell can be issued every clock. The cell in the evaluate stage is hidden
from the scheduler, since its HBR bits change only at the end of that clock.
The scheduler's pointer returns to cell 0 at every system cycle, so every
system cycle starts 0, 1, 2, …

A system cycle is:

1. one `CLEAR` clock (all HBR bits cleared, pointer to 0);
2. `RUN` clocks until no cell is in flight and all cells are stable;
3. the banks swap and the next system cycle starts, or the run ends.

For the unidirectional ring with one hypercell this takes `NUM_CELLS + 3`
clocks, or `NUM_CELLS + 5` clocks when cell 0 has to be evaluated again (one
empty issue slot while the last cell's result is pending, plus the extra
evaluation). With other topologies the count depends on how many
re-evaluations occur.

## Several hypercells

With `LANES > 1` the simulator holds that many copies of the hypercell. The
scheduler then grants up to `LANES` distinct non-stable cells per clock (the
first ones found from its pointer), and the state memory and link memory have
one port per copy. Copies evaluated in the same clock all read the link words
as they were before that clock. If one of them changes a link another one has
just read, the clear caused by the change wins over the other's read mark, so
the reader becomes non-stable and is evaluated again. The results therefore
stay identical to the parallel system; only the number of clocks per system
cycle drops, down to about `NUM_CELLS / LANES` when few re-evaluations are
needed. The default is a single copy.

## State extraction and the hypercell

The cell logic used by the simulator is the original cell with every
flip-flop removed. Each flip-flop is replaced by an `xff` primitive: its `Q`
output becomes the old state read from memory, and its `D` input, passed
through the flip-flop's own control logic, becomes the new state:

| original flip-flop          | new state `S[t+1]`               |
|-----------------------------|----------------------------------|
| plain D flip-flop           | `D`                              |
| with enable                 | `en ? D : S[t]`                  |
| with synchronous clear      | `clr ? CLR_VAL : (en ? D : S[t])`|

Only rising-edge flip-flops are handled. Cells that differ only slightly (for
instance by their address) share one *hypercell*, which receives the number of
the cell being evaluated (`cell_id`) and selects the differing parts.

`hypercell` is a small example cell built this way, so that the simulator can
be run and checked. It is a Mealy cell with two 16-bit registers:

    cell 0:  O[p] = acc ^ cnt ^ p           (state only)
    cell c:  O[p] = I[p] + acc              (c > 0, combinational path)
    acc'  = I[0][0] ? acc + (xor of all I[p]) + cell_id : acc   (flip-flop with enable)
    cnt'  = I[0][3:0] == 4'hF ? 0 : cnt + 1                       (flip-flop with sync clear)

To simulate a different design, replace `hypercell` with its own
state-extracted logic, adapt `cell_state_t` and `LINK_W` in `seqsim_pkg`, and
adapt the topology functions if the cells are not connected in a ring. The
rest of the simulator does not depend on what the cell computes.

## Top level and host interface

`seq_simulator` wires the four parts together. Its ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | simulator clock, asynchronous active-low reset (clears link words, HBR bits, controller) |
| `host_ld_en`, `host_ld_entity`, `host_ld_state` | in | 1, `CELL_W`, 32 | while idle: write a cell's state into the current bank (initial state) |
| `host_rd_entity` / `host_rd_state` | in / out | `CELL_W` / 32 | while idle: a cell's current state, one clock after the address |
| `host_link_idx` / `host_link_val` | in / out | `LIDX_W` / 16 | stored value of a link, combinational |
| `start`, `num_cycles` | in | 1, 32 | run `num_cycles` system cycles (ignored when 0 or busy) |
| `busy`, `done` | out | 1 | run in progress; one-clock pulse when the run ends |
| `sys_cycles`, `evals`, `changes`, `rereads` | out | 32 each | completed system cycles, delta cycles, changed link writes, links invalidated after being read |

`CELL_W = $clog2(NUM_CELLS)`, `LIDX_W = $clog2(NUM_CELLS*NPORT)`. The state
memory is not reset; load every cell before the first run.

## Files

| file | contents |
|------|----------|
| `rtl/seqsim_pkg.sv` | widths, `cell_state_t`, ring topology functions |
| `rtl/seq_simulator.sv` | top level |
| `rtl/sim_ctrl.sv` | system-cycle controller, pipeline, statistics |
| `rtl/rr_scheduler.sv` | round-robin choice among non-stable cells |
| `rtl/link_mem.sv` | link words, HBR bits, stable flags |
| `rtl/topology_map.sv` | cell port → link address |
| `rtl/state_mem.sv` | two-bank state memory |
| `rtl/hypercell.sv` | example state-extracted cell |
| `rtl/xff.sv` | flip-flop replacement primitive |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus system tests |

Top-level parameters: `NUM_CELLS` (64), `NPORT` (1), `LANES` (1). The cell's
widths are in `seqsim_pkg`.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

* `tb_seq_simulator` (default parameters, 64 cells): loads random states, runs
  34 system cycles in runs of 1, 5 and 17, and after each run compares every
  state and every link with a reference model of the parallel ring, computed
  independently by settling the outputs in ring order and updating all
  registers at once. It also checks the number of evaluations and of busy
  clocks per system cycle, and that system cycles with and without
  re-evaluation, unchanged writes, bank swaps, multi-cycle runs and both
  flip-flop variants all occurred (the host reloads cell 0 now and then so
  that a cycle without re-evaluation arises).
* `tb_seq_simulator_ring3`: the three-cell ring; checks the delta order
  0, 1, 2 (, 0) of every system cycle and sees cycles with and without the
  extra evaluation of cell 0.
* `tb_seq_simulator_bidir`: five cells, two ports (a ring in each direction),
  where every fixed order reads some links too early. The results must still
  match the parallel reference, which settles outputs by repeated passes.
* `tb_seq_simulator_lanes`: the same with seven cells and three hypercells,
  checking that several evaluations per clock occur.
* One testbench per module (`tb_xff`, `tb_hypercell`, `tb_topology_map`,
  `tb_link_mem`, `tb_rr_scheduler`, `tb_state_mem`, `tb_sim_ctrl`) against
  models of the rules above.

Run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_seq_simulator \
        -y rtl -y tb +libext+.sv -Irtl rtl/seqsim_pkg.sv tb/tb_seq_simulator.sv
    ./obj_dir/Vtb_seq_simulator

Concurrent assertions in the RTL check the pipeline rules (no evaluation
during an HBR clear, no cell issued while it is being evaluated, grants only
to requesting cells, no host load during an evaluation write).

## Where this design makes its own choices

The simulator architecture follows a published description of FPGA-based
sequential simulation: per-cell state in a two-part state memory, a link
memory with one word and one has-been-read bit per link, round-robin
scheduling of non-stable cells, and flip-flop replacement primitives for
state extraction. The following are not given there and were chosen here:

* **The cell.** The published simulator uses a packet-switched NoC router as
  its hypercell; that router is not described, so `hypercell` is a stand-in
  example. Widths (`LINK_W = 16`, 32-bit state) belong to it.
* **Bank swap instead of copying** the new state into the current state. The
  source mentions copying; its worked example shows the two state copies
  alternating, which is what is built.
* **Pipeline and timing**: one evaluation per clock with a two-stage
  issue/evaluate pipeline, link memory read and updated in one clock.
* **Sharing work between several hypercells**: the source allows more than
  one copy of a hypercell but does not say how they are scheduled; the
  multi-grant scheduler and per-copy memory ports are this design's own.
* **Host interface**, run control and statistics counters.
* **Reset**: link words and HBR bits are cleared by reset; states are loaded.
* **Topology**: only rings (one or two directions) are provided.

Not implemented:

* several different hypercells for heterogeneous designs (one cell type
  only);
* replacement primitives for flip-flops sensitive to both clock edges;
* the software flow that produces a hypercell from a netlist (graph
  conversion, partitioning, automated extraction, simulator generation).
