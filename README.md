# A CGRA with storage tuned to value lifetimes

This is synthesizable SystemVerilog for a coarse-grained reconfigurable array
(CGRA) that runs software-pipelined loops under a static **modulo schedule**.
Its register storage is split by how long values live:

* **Short-lived values** (one to a few cycles, most values in loop kernels)
  stay next to the ALU. Each functional unit has input registers that load
  only when the schedule says so. It also has a registered feedback path and
  a small private register block.
* **Medium and long-lived values** (about II cycles or longer, II being the
  initiation interval) live in **rotating register files**. These are
  register files whose addresses are renamed once per pass of the schedule.
* **Constants** sit in a non-rotating part of the same private register
  blocks. They are loaded when the array is configured.

This is the most efficient storage organisation found in the architecture
study this design follows. Relative to a baseline with two plain 16-entry
register files per cluster, the study reports 0.69x the area-energy product.
The RTL here has no power or area model and does not reproduce that figure.

## Modulo schedules, phases and waves

A loop body is compiled into a schedule of **II** configuration words per
unit. The schedule restarts every II cycles. One pass through the schedule is
a **wave**. `schedule_ctrl` produces the common `phase` (0 … II−1) and counts
waves. Every configurable unit owns a `config_mem` with one word per phase
(up to `MAX_II` = 16). The word at the current phase steers the unit in that
cycle: multiplexer selects, register enables, write enables and addresses.
Nothing is decoded at run time. Each unit simply does what its word for this
phase says.

A plain register file addressed by such a schedule cannot keep a value for
more than II cycles. The same write instruction comes round again in the
next wave and overwrites the entry. That limitation is what the rotating
register file removes.

## The rotating register file (`rotating_rf`)

This is the central structure, used three times per cluster:

* as the 16-entry 32-bit large register file;
* as the 16-entry 1-bit large register file;
* as the 8-entry, two-read, one-write private block of each functional unit.

* A **wave counter** is added to every read and write address:
  `physical = (logical + wave) mod R`. The schedule advances the counter with
  a per-phase bit `wave_inc`, normally set in one phase of every wave.
* The effect is automatic renaming. A value written at logical entry *l* in
  wave *w* is read as logical entry *l − k* in wave *w + k*. The same
  instruction in the next wave writes a fresh physical entry, so a value can
  live up to *R* waves (R·II cycles) without being copied.
* **Constant (ROM) region.** `rot_entries` = R is set at configuration time.
  Logical entries at or above R bypass the wave-counter addition and keep
  their contents for the whole run. `rot_entries = 0` gives a plain register
  file, and `rot_entries = ENTRIES` makes the whole file rotate.
* **Timing.** Reads are combinational. Writes and counter steps happen at the
  clock edge. A write in the same cycle as a step uses the mapping before the
  step. Reading an entry written in the same cycle returns the old value.

Example, the large file with R = 16:

| wave | phase 0: write logical 2 | phase 0: read logical 0 |
| --- | --- | --- |
| w | x[w] goes to physical (2+w) mod 16 | physical w mod 16 holds x[w−2] |

The read returns x[w−2]: it was written at logical 2 two waves earlier, and
each wave moved it down one logical entry.

A schedule should change `rot_entries` only while the array is in reset or
idle. The wave counter counts modulo the current size.

## Functional unit (`func_unit`)

```
 A ──┬──────────────┐        ┌──────── operand X ─┐
     └─[A_reg (en)]─┤        │                    ├─ ALU ─┬─ r ─┐
 B ──┬──────────────┤  select├──────── operand Y ─┘       │     ├─ R
     └─[B_reg (en)]─┤        │                 [FB reg(en)]┤     │
          FB reg ───┤        │                            │     │
  RB rd0, RB rd1 ───┘        └── private rotating block ◄─┘ ────┘
                                 (8 entries, 2R/1W, ROM region)
```

Per phase, `fu_cfg_t` selects the following:

* **ALU operation** (`alu_op_e`): add, sub, mul, and, or, xor, shl, shr, sra,
  eq, ne, lt, ltu, sel and pass.
* **Operands X and Y**: each is one of A, A_reg, B, B_reg, feedback, RB
  read port 0, RB read port 1, or zero. A and B can go straight to the ALU
  (bypass) or through their input registers.
* **Register enables**: `a_en`, `b_en` and `fb_en`. A register whose enable
  is off keeps its value, so the unit can hold an operand for several cycles
  or reorder operands that arrive in the wrong order.
* **Private block**: write enable, write source (ALU, A, B or feedback),
  write address, two read addresses and `wave_inc`.
* **Result R**: one of ALU, feedback, RB port 0 or RB port 1.

Timing: the unit retimes on its inputs, not its outputs. R and `cout` are
combinational from A, B and `cin` and from the stored state.

Other ALU behaviour:

* **Comparisons** drive `cout` onto the 1-bit control path.
* **`OP_SEL`** uses `cin` to choose between X and Y.
* **Constants** are loaded into the private block at configuration time
  through `cst_we/cst_addr/cst_data`.

## Cluster (`cluster`)

One cluster holds:

* four functional units;
* one 16-entry 32-bit rotating register file (the large file);
* two data memories;
* a scheduled 32-bit crossbar;
* on the 1-bit control path: two 3-LUTs, a 16-entry 1-bit rotating register
  file and a scheduled 1-bit crossbar.

The 1-bit crossbar also carries each FU's condition input and output.

Port numbering of the crossbars (constants in `cgra_pkg`):

| 32-bit crossbar | index |
| --- | --- |
| sources: FU0..3 R | 0..3 |
| large RF read | 4 |
| memory 0..1 read data | 5..6 |
| incoming track N, E, S, W | 7..10 |
| sinks: FU *i* A / B | 2*i* / 2*i*+1 |
| large RF write data | 8 |
| memory *j* address / write data | 9+2*j* / 10+2*j* |
| to switchbox 0..1 | 13..14 |

| 1-bit crossbar | index |
| --- | --- |
| sources: FU0..3 cout | 0..3 |
| LUT0..1 | 4..5 |
| 1-bit RF read | 6 |
| incoming N, E, S, W | 7..10 |
| sinks: FU0..3 cin | 0..3 |
| LUT *k* input *i* | 4+3*k*+*i* |
| 1-bit RF write data | 10 |
| to switchbox 0..1 | 11..12 |

A sink's select field holds the source index plus one. Select 0, the reset
value, leaves the sink unrouted and drives zero, as does any value above the
number of sources.

The crossbars, ALUs and LUTs are combinational. A FU can therefore bypass its
input registers, and the netlist contains paths crossbar → FU → crossbar and
crossbar → LUT → crossbar. Lint and synthesis report these as combinational
loops. They become real loops only if a schedule, in one phase, routes a
unit's combinational result back into its own bypassed input. A valid
schedule never does that, as with any scheduled crossbar.

**Data memories** are managed by the application. They are addressed from
the crossbar, with per-phase `we` / `re` bits. Reads are synchronous: the
word appears one cycle after `re` and is held until the next read.

## Array, switchboxes and configuration (`cgra_top`, `switchbox`)

`cgra_top` is a `ROWS × COLS` grid of tiles (default 2 × 2). Each tile is a
cluster plus a switchbox.

Each switchbox drives one 32-bit track and one 1-bit track to each neighbour.
Per phase, each outgoing track takes one of:

* an incoming track (pass-through);
* one of the two values its cluster hands over;
* its own old value (hold);
* zero.

Outgoing tracks are registered, so one hop takes one cycle. Tracks at the
array edge are the array's stream inputs and outputs (`edge_in_*`,
`edge_out_*`).

Configuration is written while `run` is low:

* **`cfg_tile`** is row·COLS + col.
* **`cfg_unit`** is the unit inside the tile:
  * 0–3: FU0–3;
  * 4: large RF;
  * 5–6: memories;
  * 7–8: LUTs;
  * 9: 1-bit RF;
  * 10: 32-bit crossbar;
  * 11: 1-bit crossbar;
  * 12: switchbox.
* **`cfg_addr`** is the phase.
* **`cfg_data`** is the word: the packed `*_cfg_t` struct from `cgra_pkg`, or
  the select vector for crossbars and the truth table for LUTs.

With `cfg_static = 1` the write goes to the unit's static word instead:

* If `cfg_data[63]` = 0, the write sets the rotating size of the unit's
  register file.
* If `cfg_data[63]` = 1, the write loads `cfg_data[31:0]` into entry
  `cfg_addr` of that register file. This is how constants are placed.

Then raise `run` with the wanted `ii`. The schedule starts at phase 0 and
repeats every `ii` cycles.

Reset clears every configuration word to zero. A zeroed word enables
nothing, writes nothing and routes nothing through the crossbars. An
unconfigured switchbox passes its north track to every output.

While `run` is low, every configuration memory presents a zero word
whatever it holds. So loading a configuration never changes registers or
memories, even though the phase sits at 0 the whole time.

## What follows the architecture and what is this design's own

The RTL follows the architecture in these points:

* 32-bit datapath plus a 1-bit control path.
* Four FUs, two data memories and two 3-LUTs per cluster.
* One 16-entry large rotating register file per cluster.
* Private 8-entry rotating blocks per FU, with 2 read ports, 1 write port and
  a constant region. The constant region works by disabling the wave-counter
  addition for the upper entries.
* Dynamically enabled input registers with bypass, and registered feedback.
* Phase-indexed configuration memories and a scheduled crossbar.
* Tiles made of a cluster and a switchbox on a grid.

These are this design's own choices, where the architecture gives nothing:

* The ALU operation set.
* The exact multiplexer inputs of the FU. Each operand may take any stored or
  incoming value, a superset of the drawn connections.
* One read port on the large files.
* Data memory size (1024 words) and read latency.
* Maximum II (16).
* The 1-bit storage: modelled as one 1-bit large rotating file.
* The switchbox structure: one registered track per direction, with hold.
  The 1-bit interconnect is scheduled like the word interconnect (a static
  setting is a schedule that repeats the same word).
* The configuration bus and its encodings.
* The array size.
* Reset of all storage to zero.

These are not built:

* The alternative storage structures that the study compares against:
  retiming chains, variable shift registers, single distributed registers,
  and register blocks shared on the cluster crossbar.
* The placement and routing tools that produce schedules.

A plain (non-rotating) register file is available by setting a rotating
size of 0.

## Verification and simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`,
which prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
| --- | --- |
| `tb_rotating_rf` | Compares against a logical-view model: each wave step shifts the rotating region down by one entry. Also checks the constant region, plain-file mode and an 8-wave lifetime. |
| `tb_func_unit` | Runs random configurations against a cycle model, plus directed tests of register hold, constant load and feedback accumulation. |
| `tb_cluster` | Runs a real II = 4 loop on one cluster. |
| `tb_cgra_top` | Runs the whole 2 × 2 array at its default parameters, as described below. |
| `tb_lifetime_workload` | Streams `out[w] = x[w-D] + x[w-1] + K` through one cluster. The old operand lives in the large rotating file and the recent one in a private block. Runs D = 2, 6 and 15 at II 4, D = 8 at II 3 and D = 4 at II 7, so lifetimes run from 8 to 60 cycles. A last run with a rotating size of 0 shows that a plain file cannot keep the old value apart. |

`tb_cgra_top` loads a four-tile loop through the configuration port and
streams 48 waves in at the west edge. It checks every edge output against a
reference and checks that 48 waves take 48·II cycles. It also counts how
often each mechanism was used, and fails if any count is zero. The
mechanisms are:

* a wave step of the rotating file;
* a value held past II cycles;
* a constant read;
* a held input register;
* feedback;
* bypass;
* a memory write and a memory read;
* a LUT evaluation;
* a switchbox pass-through.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cgra_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/cgra_pkg.sv tb/tb_cgra_top.sv -o sim
./obj_dir/sim
```

Verilator warns `UNOPTFLAT` on the cluster crossbars, for the structural
paths described above. The warning is expected.

## Files

* `rtl/cgra_pkg.sv`: sizes, port numbering and configuration word types.
* `rtl/cgra_top.sv`: the array.
* `rtl/cluster.sv`: the compute cluster.
* `rtl/switchbox.sv`: the switchbox.
* `rtl/schedule_ctrl.sv`: the phase and wave sequencer.
* `rtl/config_mem.sv`: a unit's configuration memory.
* `rtl/func_unit.sv`: the functional unit.
* `rtl/alu.sv`: the ALU.
* `rtl/rotating_rf.sv`: the rotating register file.
* `rtl/crossbar.sv`: the scheduled crossbar.
* `rtl/data_mem.sv`: the data memory.
* `rtl/lut3.sv`: the 3-LUT.
* `tb/tb_*.sv`: the testbenches.
