# BBV+DDV program phase detection for a distributed shared-memory multiprocessor

Phase-adaptive hardware retunes itself when a program changes behaviour. To know
*when*, a phase detector splits execution into fixed sampling intervals and sorts
them into phases: intervals that behave alike get the same phase ID, so a
configuration tuned for that phase can be reused. On a uniprocessor, a basic-block
vector (BBV), which records which code ran, is a good enough signature. On a
distributed shared-memory (DSM) machine it is not. The same code on one node can
behave very differently depending on where its data lives (local or remote
memory), how far away that memory is, and how hard the other nodes are hammering
it.

This RTL adds a **data distribution vector (DDV)** beside the BBV in every node.
At the end of each interval the DDV reduces the node's memory behaviour to one
number, the **data distribution scalar**:

    DDS_i = sum over j of  F_ij * D_ij * C_j

- `F_ij` is how many loads/stores node *i* made to data whose home is node *j*
  during its interval.
- `D_ij` is the distance from *i* to *j*, with `D_ii = 1`.
- `C_j` is how many such accesses the *whole system* made to home *j* during
  that same interval. This is the contention term.

An interval joins an existing phase only if its BBV **and** its DDS are both
close to that phase's stored footprint.

## Building blocks

| module | role |
|---|---|
| `dsm_phase_detector` | top: `NODES` detectors plus the exchange fabric |
| `phase_detector_node` | one processor's detector and its controller |
| `interval_timer` | counts committed non-synchronization instructions |
| `bbv_accumulator` | hashed basic-block counters |
| `ddv_freq_matrix` | the `NODES x NODES` frequency counters F held at a node |
| `ddv_contention_vector` | sums the collected F_i vectors into C |
| `ddv_distance_matrix` | programmable distances D (triangular storage) |
| `dds_unit` | serial multiply-accumulate for the DDS |
| `footprint_table` | footprints, DDS footprints, phase IDs, LRU, matching |
| `ddv_exchange_fabric` | carries F_i vectors from every node to a requester |
| `ddv_pkg` | default sizes, controller state type, hypercube distance function |

## The frequency matrix: why every node counts for every other node

This is the least obvious part of the design. Each node decides its own interval
boundaries from its own instruction count, so the nodes' intervals do not line
up. Node *i* still needs `C`: what the whole system did *during node i's
interval*. One shared counter per home cannot give that.

So every node *p* keeps a full `NODES x NODES` matrix. Row *i* counts, **on node
i's behalf**, the accesses *p* has committed since *i* last started an interval.
Column *j* of that row is the count for accesses whose home is *j*. A committed
access with home *j* increments column *j* in **every** row.

When node *i* ends an interval, it asks every node (itself included) for row *i*.
Each node hands the row out and clears it at the same moment, which starts a
fresh count for *i*'s next interval. An access that commits in the same cycle as
the hand-out goes into the fresh row, so nothing is lost or counted twice. Node
*i* adds up the `NODES` rows it receives to get `C`. The row it gets from itself
is its own `F_i`.

At 32 nodes that is 1,024 counters of 24 bits per node.

## One interval, step by step (`phase_detector_node`)

1. **Counting (`ND_IDLE`).**
   - Each cycle the processor presents at most one committed instruction.
   - Non-synchronization instructions advance the interval count.
   - At a committed branch, the BBV counter picked by the hashed branch address
     adds the number of instructions since the previous branch, the branch
     itself included.
   - Every committed load/store counts in F under its home node.
2. **Interval end.**
   - After `INTERVAL_LEN` counted instructions the BBV accumulator is copied
     into a snapshot, and the live counters restart at zero.
   - C is cleared.
   - The node raises `xreq`.
   - Counting for the next interval goes on while the steps below run.
3. **Collection (`ND_XCHG`).** The fabric queries node 0, 1, … `NODES-1` for
   row *i*, one per cycle. Every hand-out is added into C.
4. **DDS (`ND_DDS`).** `dds_unit` adds one term per cycle. `D_ij` comes from
   the local distance matrix.
5. **Search (`ND_SEARCH`).**
   - `footprint_table` visits one entry per cycle. For each entry it computes
     the Manhattan distance between the snapshot and the stored vector (all 32
     absolute differences in parallel), and the absolute DDS difference.
   - An entry matches if both values are strictly below `bbv_thresh` and
     `dds_thresh`.
   - If several entries match, the one with the smallest Manhattan distance
     wins.
   - If none matches, a new phase is allocated:
     - it goes into the first invalid entry, or else the least recently used
       one;
     - the snapshot and the DDS are stored in it;
     - it gets the next phase ID from a wrapping counter.
6. **Report.** `phase_valid` pulses for one cycle with `phase_id`, `phase_new`,
   `phase_entry`, `phase_dds` and `phase_dist`.

`phase_flush` empties a node's footprint table while its controller is idle.
A context switch can use it to start the new thread without the old thread's
phases, at the price of retuning. The phase-ID counter keeps running, so IDs
from before the flush are not reused until the counter wraps.

If the next interval ends before step 6 is done, the interval is **stretched**:
it ends on the first cycle the controller is idle again, and
`interval_stretched` flags it. Instructions keep being counted into the BBV
during the stretch. At the default sizes a classification takes about a hundred
cycles while an interval lasts 93,750 instructions, so stretching only happens
when many nodes finish at nearly the same time and wait for the fabric.

### Latencies

| step | cycles |
|---|---|
| fabric grant to last hand-out | `NODES + 1` |
| DDS, start to `done` | `NODES + 1` |
| footprint search, start to `done` | `FT_ENTRIES + 2` |
| interval end to `phase_valid`, fabric free | `2*NODES + FT_ENTRIES + 4` (100 at defaults) |

A waiting node adds `NODES + 2` cycles for every collection ahead of it.

## The exchange fabric

`ddv_exchange_fabric` stands in for the F-vector messages that would cross the
machine's interconnect.

- It serves one requester at a time, in round-robin order.
- Queries are pipelined: it raises `q_valid[p]` with `q_row = i`, and node *p*
  answers one cycle later (`h_valid`, `h_data`).
- The answer goes straight on to node *i* (`r_valid[i]`, `r_src`, `r_data`,
  with `r_last` on the last one).
- A requester holds `xreq` until it has seen `r_last`.

Assertions check that every query is answered in the next cycle and that a
requester being served keeps its request up.

## Distances

`ddv_distance_matrix` stores only the lower triangle of a symmetric matrix,
`NODES*(NODES+1)/2` entries. Out of reset, each entry holds the hop count
between the two nodes in a binary hypercube, with 1 on the diagonal. Any entry
can be reprogrammed through `d_wr_*`. The top broadcasts those writes, so every
node holds the same matrix.

## Parameters

| parameter | default | from |
|---|---|---|
| `NODES` | 32 | largest machine evaluated |
| `ACC_ENTRIES` | 32 | BBV accumulator entries |
| `FT_ENTRIES` | 32 | footprint vectors |
| `INTERVAL_LEN` | 3,000,000 / `NODES` = 93,750 | interval used in the evaluation |
| `CNT_W` | 24 | this design (holds a 3M-instruction interval) |
| `D_W` | 8 | this design |
| `PC_W` | 32 | this design |
| `PHASE_W` | 16 | this design |

Derived widths:

- contention counters: `C_W = CNT_W + log2(NODES)`
- DDS: `DDS_W = CNT_W + D_W + C_W + log2(NODES)`, 66 bits at defaults; the
  DDS cannot overflow
- Manhattan distance: `CNT_W + log2(ACC_ENTRIES+1)` bits

### Which machines the defaults cover

- **32 nodes:** the evaluation's 32-node configuration (32 nodes, 32-entry
  accumulator, 32-vector table, 93,750-instruction intervals) fits the
  defaults exactly.
- **8 nodes:** build with `NODES = 8`. `INTERVAL_LEN` then defaults to
  375,000.
- **100M-instruction intervals:** the 24-bit counters would saturate. Use
  `CNT_W = 27` and set `INTERVAL_LEN` explicitly.

## Choices this design makes

The mechanism (what is counted, F, D, C, DDS, two-threshold matching,
smallest-Manhattan selection, LRU replacement, sizes) is the published one. The
following are this implementation's own decisions:

- **Commit interface.** One committed instruction per cycle per node, with the
  home node of each load/store supplied by the memory side (`commit_home`).
- **Hash.** The BBV hash is an XOR-fold of the word address (`pc[PC_W-1:2]`)
  into `log2(ACC_ENTRIES)` bits.
- **Counters.** All counters saturate; everything resets to zero
  asynchronously (`rst_n` low).
- **Interval boundary.** The BBV accumulator is snapshotted at the interval
  boundary rather than cleared after classification, and a node's own F row is
  cleared when it is handed out, exactly like every other node's copy.
- **Stretched intervals,** as described above.
- **Footprint matching.** A matching footprint is not updated. Ties go to the
  lowest entry index. Phase IDs come from a wrapping counter.
- **Transport.** The single round-robin fabric replaces real network messages.
  A real machine would overlap collections from different nodes.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bbv_accumulator` | random commit stream vs. a reference accumulator, every snapshot |
| `tb_interval_timer` | exact interval length, sync instructions skipped, stretching |
| `tb_ddv_freq_matrix` | random accesses and read-and-clear hand-outs, same-cycle races |
| `tb_ddv_distance_matrix` | all reset values, symmetry, random reprogramming |
| `tb_ddv_contention_vector` | sums and own-vector capture over 50 collections |
| `tb_dds_unit` | DDS vs. the formula (including all-ones operands), `NODES+1` latency |
| `tb_footprint_table` | 400 classifications vs. a reference table: IDs, entries, distances, LRU evictions, DDS-only rejections, flushes, latency |
| `tb_ddv_exchange_fabric` | delivery order and contents, round-robin grants, `NODES+1` latency |
| `tb_phase_detector_node` | one node with the testbench as fabric: hand-outs, DDS, report latency, recurring and new phases |
| `tb_dsm_phase_detector` | 8 nodes, 80-instruction intervals, 4-entry tables, 14 intervals each, against a cycle-accurate scoreboard |
| `tb_dsm_phase_detector_full` | the top at its default parameters, two full intervals (93,750 instructions) on all 32 nodes, same scoreboard |

`tb_dsm_phase_detector` and `tb_dsm_phase_detector_full` share `dsm_tb_core`.
Each node runs a synthetic program whose phase changes at its own interval
boundaries. One phase runs exactly the code of another but on remote data, so
only the DDS can separate the two.

The scoreboard models the BBV accumulators, all F matrices, C, the DDS and the
footprint tables on its own. The only thing it takes from inside the design is
which node is queried for which row. It checks every report: DDS, new/recurring,
phase ID and entry.

It also counts the mechanisms. A run fails if any of these never happens:

- interval ends
- stretched intervals
- collections
- remote hand-outs
- recurring phases
- new phases
- LRU evictions
- phases split by the DDS alone
- distance writes
- phase-table flushes

The benchmark programs the published evaluation used (SPLASH-2 LU and FMM,
SPEC-OMP Art and Equake) are not available as traces, so they are not simulated.
The synthetic programs exercise the same hardware paths.

Running a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/ddv_pkg.sv \
        tb/tb_dsm_phase_detector.sv --top-module tb_dsm_phase_detector -o sim
    ./obj_dir/sim

Replace the testbench name to run any other. The full-size testbench takes
several minutes to compile, because the 32-node design holds about 1.7 million
state bits.

## Limits

- Saving a thread's phase table into its context on a context switch is not
  built. Only the alternative, flushing the table, is.
- Only the detector is built. The processors, the caches and memory, the
  memory controller that supplies home nodes, the interconnection network, and
  the phase predictor and reconfiguration logic that would consume the phase
  reports all sit outside this RTL. Their connections appear as the top's
  ports.
- The F matrix and the footprint table are written as flip-flop arrays. A
  product implementation would place them in a small dedicated SRAM. That would
  need a different access schedule for the column-wide F increments.
