# Ultrascalar register datapaths in SystemVerilog

A conventional superscalar core renames registers, wakes up waiting
instructions, bypasses results and checkpoints state for branch recovery.
Those circuits grow quadratically in delay with the issue width and window
size. The Ultrascalar family does all of it with one regular structure. A row
of *execution stations* each holds one in-flight instruction in program order,
and a network of prefix circuits hands each station the newest value of every
register written by the instructions before it. Renaming, forwarding,
out-of-order completion and misprediction recovery all fall out of that
network. There is no rename table, reorder buffer or wake-up matrix.

This repository implements three variants of the idea as synthesizable RTL.
All three share one instruction set and one execution core:

| Variant | Module | How register values move | Default size |
|---|---|---|---|
| Ultrascalar I | `us1_core` | Each station gets the full register file through one cyclic segmented parallel-prefix (CSPP) circuit per register. | 64 stations, 32 registers |
| Ultrascalar II | `us2_core` | A grid of comparators and multiplexers routes to each station only the two registers it reads. | 32 stations, 32 registers |
| Hybrid | `hybrid_core` | Ultrascalar II grids inside clusters; Ultrascalar I CSPPs between clusters. | 4 clusters x 32 stations, 32 registers |

The hybrid is the variant that scales best. The other two are its building
blocks and its points of comparison. `ultrascalar_top` places all three side by
side, each with its own ports.

## Instruction set and execution core

`us_pkg` defines the machine:
- 32-bit integer registers; the number of logical registers `L` is a parameter.
- Instructions read at most two registers and write at most one.
- Operations: `ADD SUB MUL DIV AND OR XOR ADDI LOAD STORE BR NOP`.
- Latencies: 1 cycle for add-like operations, 3 for multiply, 10 for divide.
- Division is unsigned; dividing by zero gives all ones.
- An instruction is a struct (`instr_t`): valid bit, opcode, `rd`, `rs1`, `rs2`, 32-bit immediate, and the predicted branch direction.
- A register value travels with its *ready* bit as `rv_t`, 33 bits in all.

`BR` is a conditional branch, taken when `rs1` is non-zero. It carries the
direction the fetch unit predicted. The target address belongs to the fetch
unit and is not modelled.

`us_exec` is the core inside every station:
- It waits until the arguments it reads are ready, then runs the operation for its latency (`us_alu` gives both the result and the latency).
- The result appears with a high ready bit in the last cycle of the operation.
- It sequences loads, stores and branches using "all earlier stations have ..." inputs (see *Sequencing*).

## The cyclic segmented parallel prefix (CSPP)

`cspp` is the central circuit of the Ultrascalar I and of the links between
hybrid clusters. Think of the stations as points on a ring. Each leaf `i` has a
value and a segment bit. Output `i` is the combination, under an associative
operator, of the leaves that come cyclically before `i`, going back as far as
the nearest leaf whose segment bit is high and including that leaf. The output
is exclusive: leaf `i`'s own input is not part of output `i`.

It is built as a binary tree (`cspp_tree`):
- **Up pass.** Each node forms (segment, value) for its subtree. If the right half has a segment bit, the node takes the right half's pair. Otherwise it combines the left value with the right value.
- **Down pass.** The prefix entering the right child is the left child's total if the left child has a segment bit. Otherwise it is the incoming prefix combined with the left total.
- **Wrap.** The root's total is fed back as the prefix of the whole tree. This closes the ring.

Gate delay is logarithmic in the number of leaves.

The design uses the CSPP with two operators:

- **`a (x) b = a`, 33 bits wide (`OP_AND=0`).** This is register propagation.
  - A station that writes register `r` raises its segment bit and offers its result.
  - Every later station, up to the next writer, receives that value and its ready bit.
  - The oldest station raises the segment bit of every register. The ring therefore always starts from the committed state.
- **`a (x) b = a AND b`, 1 bit wide (`OP_AND=1`).** This is sequencing.
  - Only the oldest station raises its segment bit.
  - Output `i` is then "every station from the oldest up to `i-1` meets the condition".

## Ultrascalar I

### Station (`us1_station`)

Each station holds a private copy of the whole register file: `L` entries,
each a value and a ready bit.

On every clock edge, a station that is not the oldest copies all the incoming
register values from the CSPPs into that file. The oldest station keeps its
own file. That file is the committed architectural state.

The station works as follows:
- It reads its two arguments from its register file.
- It drives the outgoing value of every register from the register file, except its destination register, where it inserts its own result. That result is not ready until it has been computed.
- Its modified bits, which are the CSPP segment bits, mark only the destination register. The oldest station raises all of them.

### Window and retirement (`us1_core`)

`us1_core` connects `N` stations with `L` register CSPPs and four 1-bit
sequencing CSPPs. The window is a ring, and a one-hot `oldest` vector marks
its head.

In each cycle, for station `i`:
- `all_prev[i]` means station `i` is the oldest, or every station from the oldest up to `i-1` has finished.
- If `all_prev[i]` holds and station `i` has finished, it is emptied at the edge. Its result has already been copied by every later station.
- If `all_prev[i]` holds and station `i` has not finished, it becomes the oldest at the edge.
- An empty station counts as unfinished. The head therefore stops at the first empty slot, which is where the fetch unit refills.

When every station has finished, the oldest station stays oldest and loads the
incoming values. In effect it becomes the newest state. All other stations are
emptied.

`commit_regs` shows the register file of the oldest station.

## Ultrascalar II

### Grid (`us2_grid`)

The register file does not travel to every station. Instead, a grid of
comparators routes values:
- **Rows** carry register bindings. First come `L` rows for the committed register file, then one row per station for the register that station writes.
- **Argument columns.** Each station has two. A column compares its register number with every row above the station's own row and returns the value of the latest match. Shadowed writes are ignored, even when they are unfinished.
- **Outgoing columns.** There is one per register. These see every row and give each register's value after the whole batch.

The grid has two forms, selected by `TREE`:
- `TREE=0`: each column is a chain of multiplexers from oldest to newest row, with linear gate delay.
- `TREE=1`: each column is a segmented reduction tree (`seg_reduce`), using "latest match wins" and the comparator output as segment bit, with logarithmic gate delay. The fan-out buffer trees that feed the tree version are ordinary wires in RTL.

Both forms compute the same function, and the testbench compares them against
each other.

### Cluster and stand-alone core

`us2_cluster` combines a register file, `C` execution cores and the grid.

Modified bits: a cluster's modified bit for register `r` is the OR of all its
stations' "writes `r`". This is what lets a cluster act as one station of an
Ultrascalar I ring.

Inside a cluster, AND chains in program order extend the cluster-level
sequencing inputs to each station, for loads, stores and commitment.

A cluster does not wrap around:
- It is filled as a whole: `fill` strobes `C` instruction slots, and an unused slot has `valid=0`.
- It is emptied as a whole.
- If every slot is squashed, the cluster becomes empty again.

`us2_core` is one cluster used alone. When every station has finished, the
outgoing values are written into the register file and the batch retires. The
stations can then be refilled.

## Hybrid Ultrascalar (`hybrid_core`)

`K` clusters stand in a ring and act as super-stations of an Ultrascalar I.
The clusters are linked by:
- one 33-bit CSPP per register, with segment bits equal to the cluster modified bits and values equal to the cluster's outgoing grid values;
- four 1-bit sequencing CSPPs.

Exactly one cluster is the oldest:
- Its register file holds the committed state.
- It forces all its modified bits high.
- It keeps its register file, except when the whole window retires.
- Every other cluster loads the incoming register values into its register file at each edge, and its grid reads from there.

The oldest and retirement rules are those of the Ultrascalar I, applied to
clusters. A cluster retires when all its stations have finished and every
earlier cluster has retired.

With `K=4` and `C=32`, the default hybrid holds 128 instructions.

## Sequencing: memory, branches and retirement

Four "all earlier" conditions run over the window. In the Ultrascalar I they
come from the CSPPs over stations. In the hybrid they come from the CSPPs over
clusters, then from the AND chains inside a cluster.

| Condition | Used for |
|---|---|
| all earlier finished | retirement and moving the head (`all_prev`) |
| all earlier stores done | a load may issue |
| all earlier loads done | a store may issue (together with stores done and committed) |
| all earlier committed | a store may issue; a station may report `done` |

A branch commits when it has resolved in agreement with its prediction. A
mispredicted branch raises `mispredict` and never commits. Two things follow:
- Nothing after it can write memory.
- Nothing after it can report `done`, so a wrong-path instruction can never retire.

Recovery is the fetch unit's job. It squashes the stations after the branch
and refills them from the correct path. The squash must happen no later than
the cycle in which `mispredict` is seen, because the branch itself can retire
at the end of that cycle. The register state needs no repair: the squashed
stations simply stop inserting values.

Memory port of each station:
- The station holds `mem_req` high, with `mem_we`, `mem_addr` and `mem_wdata`, until a one-cycle `mem_ack`.
- Load data (`mem_rdata`) is sampled with the ack.
- The address is `rs1 + imm`.
- An assertion checks that `mem_ack` never comes without `mem_req`.

## Timing

Everything runs on one clock with synchronous active-low reset (`rst_n`).
After reset:
- every register is 0 and ready;
- station 0, or cluster 0, is the oldest;
- every slot is empty.

Results move between stations through the prefix networks combinationally
within a cycle. A consumer sees a producer's value in the cycle after the
producer computed it, whichever variant and however far apart the two are.

Three choices of this implementation fix the exact cycle counts:

1. **Registered grid arguments.** In the Ultrascalar II grid, argument columns see each station's result one cycle after it is computed (`result_q`). Outgoing columns see it in the computing cycle (`st_res_now`). A dependent instruction in the same cluster therefore starts one cycle later, just as it would across clusters. ALU operations never chain within one cycle.
2. **One-cycle hold after a fill.** A station or cluster that is not the oldest waits one cycle after a fill before issuing. Its register file must first load values that include the other stations filled in the same cycle. The oldest station does not wait.
3. **Ack-paced memory.** A load completes in the cycle after its ack.

Example: the 8-instruction example window with station 6 oldest. All eight
are filled in one cycle, with initial registers `R0=10, R1=100, R2=7, R4=3,
R5=50, R6=8, R7=2`. The program is `R3=R1/R2; R0=R0+R3; R1=R5+R6; R1=R0+R1;
R2=R5*R6; R2=R2+R4; R0=R5-R6; R4=R0+R7` in stations 6, 7, 0, ..., 5. The
instructions finish at cycles 2, 12, 4, 5, 2, 3, 10, 11 for stations 0..7, and the final
registers are `R0=42, R1=82, R2=403, R3=14, R4=44`. Stations filled together with their producers start one cycle later than an
idealised timing would show.

Example: the 4-instruction Ultrascalar II batch. With `R0=4, R1=13, R2=-7,
R3=5`, it runs `R2=R1/R0; R1=R0-R3; R2=R3+R0; R3=R2*R1`. It finishes at cycles
10, 1, 1 and 4, retires at cycle 10, and leaves `R1=-1, R2=9, R3=-9`.

## Top level (`ultrascalar_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `L` | 32 | logical registers (all three cores) |
| `US1_N` | 64 | Ultrascalar I stations |
| `HYB_K` | 4 | hybrid clusters |
| `HYB_C` | 32 | stations per hybrid cluster |
| `US2_C` | 32 | Ultrascalar II stations |

Each core has its own port group, prefixed `us1_`, `hyb_` or `us2_`. Each group
contains:
- fill strobes and instruction slots;
- squash;
- the status signals: valid, busy, oldest, done, retire, mispredict;
- the committed register values;
- one memory port per station.

The instruction fetch unit and the memory system lie outside the RTL. The
testbenches model both.

## What is not built

- **Memory network.** The fat-tree or butterfly network that joins stations to memory, the memory switch of the Ultrascalar II layout, and the interleaved data cache are not built. Their inside is not specified by the architecture. Every station's memory port is a top-level port instead.
- **Instruction supply.** The trace cache and the fetch unit are not built. The testbenches act as the fetch unit: they predict, fill and squash.
- **Layout.** The physical layout questions (H-tree and mesh-of-trees floorplans, wire delay and area) have no RTL counterpart. The module hierarchy follows the same tree structure.
- **ALUs.** There is no ALU sharing and no floating point. Every station has its own integer ALU.
- **Hybrid clusters.** Hybrid clusters retire and refill whole, not station by station.

## Verification

Every testbench is self-checking. Each prints one line,
`TB_RESULT checks=N failures=M`, and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_cspp` | both operators on rings of 8 and 5 leaves with random inputs, and the two 8-station examples (station 6 oldest) |
| `tb_seg_reduce` | latest-match reduction against a model |
| `tb_us_alu` | results and latencies of every operation |
| `tb_us_exec` | issue on ready arguments, latencies, memory ordering and handshake, branch outcome, squash |
| `tb_us1_station` | register-file latching, modified bits, result insertion |
| `tb_us1_core` | the 8-instruction example with exact completion cycles; random programs with loads, stores and mispredicts against an in-order reference |
| `tb_us2_grid` | linear and tree grids against a nearest-earlier-writer model |
| `tb_us2_cluster` | modified bits, the 4-instruction batch, memory ordering across and within the cluster, squash |
| `tb_us2_core` | the 4-instruction batch with exact cycles; a random program |
| `tb_us2_core_tree` | the same on the logarithmic-delay grid (`TREE=1`): identical cycles and results |
| `tb_hybrid_core` | dependence chains across clusters; a random program |
| `tb_hybrid_fig10` | the hybrid test at 4 clusters of 8 stations with 8 registers, the 32-instruction configuration |
| `tb_ultrascalar_top` | all three cores at reduced size on the same random program; also counts squashes, wrap-around, out-of-order completion, stalled loads and stores, and cross-cluster overlap, and fails if any never happens |
| `tb_ultrascalar_full` | the top with default parameters: a 700-instruction random program on all three cores, with final registers and memory compared |

The random programs mix all operations. Branches are mispredicted at random;
the testbench fetch unit then squashes and refetches. Registers and a
256-word memory are compared with an in-order reference model (`tb_us_pkg`).

## Simulating

Verilator 5 was used, with two-state simulation and timing enabled:

```
verilator --binary --timing --assert --top-module tb_ultrascalar_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/us_pkg.sv tb/tb_us_pkg.sv \
  tb/tb_ultrascalar_top.sv -o sim
./obj_dir/sim
```

Replace the top module with any testbench in the table above.

- The full-size run (`tb_ultrascalar_full`) takes about two minutes to build and a fraction of a second to run.
- Lint uses the same file list with `--lint-only -Wall`.
- Sizes are ordinary parameters. To reproduce the 32-instruction hybrid with 8 registers and clusters of 8, use `hybrid_core #(.K(4), .C(8), .L(8))`.

Two notes on lint:
- `verilator --lint-only -Wall` reports undriven nets in the self-instantiating trees `cspp_tree` and `seg_reduce`. The report concerns the unelaborated template of each module; every elaborated instance drives those nets.
- The remaining warnings are about unused signals and parameters, plus one output port left unconnected on purpose (`result_q` in the Ultrascalar I station).
