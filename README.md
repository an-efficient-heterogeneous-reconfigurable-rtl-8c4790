# A heterogeneous reconfigurable functional unit for an extensible MIPS processor

An extensible processor speeds up its hot loops by running short chains of
integer instructions as one *custom instruction* (CI) on a reconfigurable
functional unit (RFU) placed beside the core. A common RFU is a grid of
identical single-operation functional units (FUs). Every hop between two of
them passes a wide multiplexer, and those multiplexers take much of the
critical path. This design replaces the grid with **eight unequal FUs**:

- three *tri-instruction* FUs, which run three dependent operations inside one unit;
- two *bi-instruction* FUs, which run two;
- three *uni-instruction* FUs, which run one.

Together they hold 16 operations. A graph mapped onto them crosses fewer
multiplexers, so its critical path is shorter and a CI needs fewer clock
cycles.

Around the RFU sit the parts that make the extension automatic:

- a **profiler** finds hot basic blocks while the program runs;
- a **partitioned configuration memory** holds the CIs;
- a **scheduler** notices when the core reaches a CI's first instruction. It
  halts the core, lets the RFU do the work through the core's own
  register-file ports, and moves the PC past the instructions it replaced.

No compiler support and no new opcodes are needed.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly with Verilator 5
and elaborates with the slang front end of Yosys. Every block has a
self-checking testbench.

## The RFU array (`rfu_array`)

### Rows and FU kinds

| row | FU  | kind | operations it has          |
|-----|-----|------|----------------------------|
| 1   | FU0 | uni  | logical, add/sub/compare   |
| 1   | FU1 | uni  | shift                      |
| 1   | FU2 | tri  | logical, add/sub/compare, shift |
| 2   | FU3 | bi   | add/sub/compare            |
| 2   | FU4 | tri  | logical, add/sub/compare, shift |
| 3   | FU5 | uni  | logical, add/sub/compare   |
| 3   | FU6 | bi   | logical, add/sub/compare, shift |
| 3   | FU7 | tri  | logical, add/sub/compare   |

The operation classes are:

- logical: AND, OR, XOR, NOR;
- add/sub/compare: ADD, SUB, SLT, SLTU;
- shift: SLL, SRL, SRA, by operand b[4:0].

Every node also has MOVE, so a value can be passed through an FU. There is no
multiply, divide or load. An operation class an FU lacks returns 0; the
mapping software never asks for one. Data are 32 bits wide.

### What a multi-operation FU can run

A CI graph is called *regular* when every node feeds at most one other node.
There is one regular two-node graph and two regular three-node graphs, and
the FUs cover exactly these:

```
bi-FU :  A = A(p0,p1);  y = B(A,p2)
tri-FU:  chain  A = A(p0,p1);  B = B(A,p2);   y = C(B,p3)
         tree   A = A(p0,p1);  B = B(p2,p3);  y = C(A,B)
```

- Swap bits reverse the operands of B and C. SUB, SLT and the shifts need this.
- Only the last result leaves the FU: in a regular graph an inner node has no
  other consumer.
- To run a shorter graph, set the later operations to MOVE.

### Interconnect

Each FU operand port has a 5-bit select into one candidate space
(`rfu_pkg`):

- 0..7: the RFU inputs;
- 8..15: the FU outputs;
- 16..27: the 12 immediates;
- 28..31: unused, read as 0.

A port reaches only the connections its row has. Selecting anything else
reads 0.

| row | can read |
|-----|----------|
| 1 | RFU inputs, immediates, left neighbour (FU0→FU1→FU2) |
| 2 | RFU inputs, immediates, all row-1 outputs, left neighbour (FU3→FU4) |
| 3 | RFU inputs, immediates, all row-1 and row-2 outputs |

- The neighbour links go one way only, so there are no combinational loops.
- The longest dependent path is FU0 → FU1 → FU2 (3) → FU3 (2) → FU4 (3) →
  FU7 (3): 13 operations.
- Row 3 has no neighbour links. Two row-3 FUs cannot feed each other.
- Each of the 6 outputs selects any of the 8 FU results.

The array is purely combinational. How many cycles a CI needs depends on its
longest path, the clock and the technology. The mapping software works this
out and stores it in the scheduler. The RTL keeps the operands stable for that
many cycles; it neither measures nor checks the path.

## Configuration and its four parts (`rfu_pkg`, `rfu_config_mem`)

A CI's configuration (`ci_cfg_t`, 493 bits) has four parts. Each part is
stored in its own table:

| part | contents | bits |
|------|----------|------|
| P1 | operation, shape, swap bits and operand selects of all 8 FUs | 195 |
| P2 | register number read by each of the 8 inputs | 40 |
| P3 | per output: enable, source FU, destination register | 54 |
| P4 | 12 immediates, 16 bits each, with a zero/sign-extend bit | 204 |

A CI table maps a CI number to one index per part. Many CIs do the same work
on different registers or constants, so they can share one P1 entry and
differ only in P2 to P4. A smaller CI can also reuse the P1 of a larger one
it is a subset of. This keeps the memory small and gives partial
reconfiguration.

Timing and capacity:

- A read (`rd_en`, `rd_ci`) returns the whole configuration the next cycle,
  and the output holds it until the next read.
- Each table has its own write port.
- Default depth is 128 for every table. That covers the largest CI set the
  design targets (117 CIs for an AES/rijndael workload) even with no sharing.

## Running a CI: scheduler and RFU unit (`scheduler`, `rfu_unit`)

The scheduler keeps one entry per CI:

- a valid bit;
- the start PC;
- the number of instructions the CI replaces;
- the number of RFU cycles it needs (1..15).

The entry's index is also the CI number in the configuration memory. In
normal mode, every valid entry is compared with the core's PC each cycle.
After a match the sequence is:

```
cycle 0       PC matches: halt=1, configuration read issued
cycle 1       rfu_start: operands from the 8 register-file read ports are latched
cycles 2..    the stored number of cycles; the last is the commit cycle,
              in which outputs 1..4 go out on the 4 register-file write ports
(+1 cycle)    only if outputs 5/6 are enabled: they are written from two
              extra registers through write ports 0 and 1
last cycle    pc_set_valid with PC = start + 4 * length; halt drops after it
```

A CI that needs `n` cycles therefore halts the core for `n + 2` cycles, or
`n + 3` with more than four outputs.

The RFU owns no register-file ports. While `core_halt` is high, the top
level gives it the core's 8 read addresses and 4 write ports; at all other
times the core has them. The core is idle during a CI anyway, so the RFU and
core never need the ports at the same time.

## Profiler (`profiler`)

In training mode the profiler watches the committed PCs (one per cycle at
most). It keeps the previous and current PC in two registers. When their
difference is not 4, a branch or jump was taken, and the current PC starts a
basic block. The table (16 entries, 16-bit saturating counters) then either
increments that address's counter or adds the address with a count of 1.

Outputs:

- An entry whose count reaches `threshold` is hot. `hot_new` pulses with its
  address.
- Once the table is full, new addresses are dropped and `dropped` pulses.
- A read port shows any entry, so software can collect the hot blocks.

The profiler sees a PC one cycle after it arrives and updates the table one
cycle after that.

## Top level (`amber_rfu_top`)

`mode` selects the phase:

- `mode = 0` (training): the profiler runs and the scheduler is off.
- `mode = 1` (normal): the scheduler runs and the profiler is off.

The ports fall into these groups:

- **Core PC:** `core_pc_valid`, `core_pc`, `core_halt`, `core_pc_set_valid`,
  `core_pc_set`.
- **Shared register-file ports, core side:** `core_raddr`, `core_wp_*`.
- **Register-file side:** `rf_raddr`, `rf_rdata`, `rf_wp_*`.
- **Profiler:** `prof_*`.
- **Loading ports for the scheduler table:** `sch_*`.
- **Loading ports for the configuration memory:** `ci_*`, `p1_*` .. `p4_*`.

The core, its register file and the software that turns hot blocks into CIs
are not part of this RTL.

Parameters: `NUM_CI` (128), `PROF_ENTRIES` (16), `PROF_CNT_W` (16). The RFU's
sizes are fixed in `rfu_pkg`: 8 inputs, 6 outputs, 8 FUs, 12 immediates and 4
write ports.

## Where this implementation makes its own choices

These points were not fixed by the architecture as published, or this RTL
departs from it:

- **Which FUs are uni and which are bi.** The architecture gives a total of 3
  uni-, 2 bi- and 3 tri-FUs, and marks three positions as "uni or bi". Here
  the row-1 shift unit (FU1) is the uni-FU; FU3 and FU6 are the bi-FUs.
- **Exact link placement.** The published architecture has row-to-next-row
  links, row 1 → row 3 links, input → rows 2/3 links and one-way neighbour
  links in rows 1 and 2. It counts ten "long" links but does not
  specify each wire. This RTL lets each port reach every output of the rows
  it is linked to, which is likely a superset.
- **Longest chain.** Here it is 13 operations. The published limit is 12.
- **Configuration encoding.** The published configuration is 488 bits per CI.
  The published part widths (P1 138, P2 90, P3 60, P4 196) add up to 484, and
  their field layout is not given. This encoding is 493 bits (195/40/54/204).
  It uses a uniform 5-bit select for every port, so it spends more bits on
  interconnect and fewer on immediates.
- **Immediates.** 12 immediates of 16 bits, each with its own extend bit, and
  any port can select any of them.
- **Stores and branches inside a CI.** The architecture allows at most one
  store and one control instruction per CI. This RTL has no memory port, and
  the scheduler always resumes at start + 4 × length. A compare result can be
  written to a register, but a CI that ends in a taken branch or contains a
  store is not supported.
- **Cycle plan.** One cycle for the configuration read and one for the operand
  latch come before the CI's own cycles.
- **Extra outputs.** They use write ports 0 and 1.
- **Profiler and training.** The profiler sees at most one PC per cycle, and
  drops new addresses when its table is full. Training happens only with
  `mode = 0`; profiling during idle periods of normal operation is not
  modelled.
- **Reset.** Asynchronous, active low. The configuration memory arrays are
  not reset. The scheduler table and profiler table are.

The homogeneous 16-FU RFU used as a comparison point is not built.

## Testbenches and how far to trust them

Each `tb/tb_<module>.sv` drives one module and compares against values
computed independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_rfu_alu` | every operation on corner and random operands; a shift-only node gives 0 for other classes |
| `tb_rfu_uni_fu`, `tb_rfu_bi_fu`, `tb_rfu_tri_fu` | random configurations against a reference evaluator, both tri-FU shapes, all swap settings |
| `tb_rfu_array` | a 16-operation CI using every FU, both neighbour links, row 1 → row 3, inputs into rows 2/3 and both immediate extensions (500 random operand sets); missing links and missing operation classes read 0 |
| `tb_rfu_unit` | read addresses from P2, operands held after start, outputs 1-4 exactly in the commit cycle, outputs 5-6 exactly one cycle later |
| `tb_rfu_config_mem` | CIs sharing one P1, one-cycle read, hold, rewriting a shared P1 |
| `tb_scheduler` | cycle-exact halt, start, commit, extra cycle and new PC for latencies 1, 2, 4 and 15; no action in training mode or on invalid entries |
| `tb_profiler` | taken-branch count, table contents, hot events and drops against a model, with 20 targets for 16 entries |
| `tb_amber_rfu_top` | end to end at default parameters (described below) |
| `tb_rijndael_ci_set` | capacity workload at default parameters: 117 CIs (the CI count of an AES/rijndael build) with 40 shared random legal P1 entries, each run once by a behavioural core; registers checked after every CI against a reference model of the array written in the testbench, halt length and new PC checked |

`tb_amber_rfu_top` works as follows:

1. A behavioural single-issue core runs a loop program in software in
   training mode.
2. The testbench checks that the profiler found the two loop blocks hot, with
   exact counts, and that the table filled and dropped.
3. It loads two CIs that share one P1.
4. It reruns the program in normal mode from the same registers.
5. The final register file must equal the software run's. Each CI must halt
   the core for exactly `n + 2` or `n + 3` cycles. Every mechanism (taken
   branch, hot block, table full, mode switch, multi-cycle CI, extra
   write-back cycle, PC redirect, shared-port writes by the core) must occur
   at least once.

The program takes 119 cycles in software and 79 with the RFU.

The tests check function and cycle counts. They say nothing about the
critical path or area.

## Simulating

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/rfu_pkg.sv rtl/*.sv tb/tb_amber_rfu_top.sv --top-module tb_amber_rfu_top
./obj_dir/Vtb_amber_rfu_top
```

Replace the testbench file and top-module name to run any other test.
`rfu_pkg.sv` must come first. To change the RFU:

- FU kinds and operation classes are set in `rfu_array`.
- The links are the `c_*` candidate vectors in `rfu_array`.
- Sizes shared by all blocks are in `rfu_pkg`.
