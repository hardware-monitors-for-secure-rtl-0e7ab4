# Multi-task hardware monitor for embedded processors

A hardware monitor runs beside a processor core and checks every
instruction the core executes against a model of what the program is
allowed to do. The model is a state machine built offline from the
program binary: each state is an instruction, and each edge is labelled
with a 4-bit hash of the instruction that may come next. If the core
executes an instruction whose hash the current state does not allow,
for example code injected by a stack-smashing attack, the monitor raises
a recovery signal in the very next cycle. The core's operating system
then kills the task before the injected code can do anything useful.

A monitor that tracks one program is simple. The hard part is an
embedded system running a multitasking operating system. Tasks are
created, preempted and deleted all the time, and each one needs its own
graph and its own position in that graph. The monitor described here
follows the operating system's task management:

- It keeps the graphs of up to four applications in a local graph memory.
- It saves and restores each process's position on every context switch.
- It fetches missing graphs from a shared central store when a task is
  created.
- It never stalls the core: checking takes one memory lookup per
  instruction at full clock rate.

The top level, `mthm_dual_system`, gives each core of a dual-core
processor its own monitor. One centralized graph memory holds the graphs
of all installed applications. One DMA controller, shared through an
arbiter, copies graphs from that store into whichever monitor needs them.

## Contents

1. The monitoring graph and the one-lookup datapath
2. Graph slots and the header
3. The operating-system interface
4. Context switch, create and delete, step by step
5. Attack detection and recovery
6. Centralized graph memory, DMA and arbiter
7. Module map and parameters
8. Simulation and tests
9. What follows the original design and what is this design's own

---

## 1. The monitoring graph and the one-lookup datapath

### States, hashes and determinism

The instruction hash is the number of one bits in the 32-bit instruction
word, taken modulo 16 (`hash_unit`). The hash is also sent on as a 16-bit
one-hot vector.

A plain control-flow graph is non-deterministic: a branch can lead to two
instructions that have the same hash. The graph is therefore made
deterministic offline by powerset construction, merging such targets
into one state. In the resulting DFA, every state has at most 16
successors, each with a different hash. The successors can then be
named by a 16-bit *valid-hash* vector.

### One row per state, grouped by fan-out

Every state is stored as one 32-bit row:

```
 31      27 26           16 15                 0
+----------+---------------+-------------------+
|  nnext   |    offset     |    valid[15:0]    |
+----------+---------------+-------------------+
```

- `valid` has bit h set if an instruction with hash h may follow.
- `nnext` is the number of successors, which equals the number of set
  bits in `valid` (at most 16, so 5 bits).
- `offset` says where the state's successors are stored.

The successors of a state sit together in a *block* of `nnext` rows.
They are ordered by hash, so the successor reached by the k-th smallest
allowed hash is row k of the block.

Blocks are sorted into *groups* by their length. Group g holds all blocks
of g rows, one after another, starting at the group's base address. The
block of a state with g successors is therefore `offset`-th in group g
and starts at `base[g] + g * offset`. A state reached from predecessors
with different fan-outs appears once in each of their groups. That costs
some rows, but any transition needs only the current row.

### The transition

When an instruction retires:

1. `hash_unit` computes its hash h and the one-hot form.
2. `hash_compare` ANDs the one-hot hash with `valid` of the current row.
   - No match means an illegal instruction.
   - On a match, k is the number of set `valid` bits below bit h.
3. `sequencing_logic` computes the successor's row:

```
next_ptr = base[nnext] + nnext * offset + k
```

The 16 `base` values live in a register file (`base_addr_regfile`)
indexed by `nnext - 1`. The result is the *address pointer*, relative to
the start of the graph. The graph memory is read at
`frame address + address pointer`.

Worked example: the current row is `{nnext=3, offset=5, valid=0x0412}`
with `base[3] = 0x0040`. The instruction has hash 10.
- 0x0412 has bits 1, 4 and 10 set. Bit 10 is among them, so the
  instruction is legal.
- Two allowed hashes (1 and 4) lie below 10, so k = 2.
- The next row is `0x0040 + 3*5 + 2 = 0x0051`, the third row of the
  block.

### Timing: one lookup per instruction

The graph memory has a synchronous read port. In `mthm_monitor`, the
read address is formed from the *next* value of the address pointer,
not its registered value. So in the cycle in which an instruction moves
the pointer, the memory is already reading the new row, and that row is
on the memory output in the next cycle. A stream of back-to-back
instructions (`instr_valid` high every cycle) is therefore checked at
one instruction per cycle. Nothing in the datapath stalls, and no
instruction is ever waited for. Cycles with `instr_valid` low leave the
pointer and the row unchanged.

The path through the monitor is combinational from the memory output,
through the hash comparison and the multiply-add, to the read address.
The multiply is a 5-bit by 11-bit product.

## 2. Graph slots and the header

A monitor's graph memory (`graph_memory`) is 4096 words of 32 bits,
divided into four slots of 1024 words. A slot holds one application's
graph, so several processes running the same program share one slot.
The start address of slot i is its *frame address*, i × 1024.

The group base addresses belong to the graph. They travel with it as an
8-word header at the start of the slot:

```
word i (i = 0..7) = { base(group 2i+1)[15:0], base(group 2i+2)[15:0] }
unused group      = 0xFFFF
word 8            = start row: one successor, the program's first instruction
word 9 ...        = the successor blocks, group 1 first
```

A new process starts with its address pointer at 8, the start row. The
first instruction of the program is checked against it. When the
monitor switches to a process whose graph differs from the one in the
base registers, it reads the eight header words into the register file
(Section 4). Base addresses are relative to the slot, so a graph can be
copied into any slot without being changed.

Graphs with up to 1016 rows fit a slot. The five benchmark graphs used
to evaluate the design have between 74 and 188 rows.

The offline graph generator is not part of this RTL. The testbench
package `tb_graph_pkg` contains a small generator with this exact image
layout. Read it for a concrete example of the format.

## 3. The operating-system interface

The operating system talks to each monitor through four word registers
(`processor_interface`):

| addr | write                              | read                                    |
|------|------------------------------------|-----------------------------------------|
| 0    | Operation: 1 create, 2 switch, 3 delete | bit 31 Done, bit 30 error, bits 1:0 pending operation |
| 1    | GID: graph (application) identifier | GID                                     |
| 2    | PID: process identifier             | PID                                     |
| 3    | Enable: 1 while a user task runs    | Enable                                  |

The protocol:

1. Write Enable = 0. The OS's own code is not monitored.
2. Write GID (create only) and PID.
3. Write the Operation code. The control FSM takes the operation in the
   next cycle and clears the register.
4. Poll register 0 until Done (bit 31) is set. Bit 30 reports an error:
   - unknown PID;
   - PID already exists;
   - no free table row or slot.
5. After a context switch, write Enable = 1 when the new task's
   registers are restored. Monitoring resumes with its next instruction.

Writing an Operation or Enable = 1 clears Done. Identifiers are 4 bits
wide; each monitor tracks up to four processes.

## 4. Context switch, create and delete, step by step

`control_fsm` does the work, using three small lookup tables:

- **PID addresses** (`pid_addr_table`): PID → saved address pointer.
- **PID-to-GID** (`pid_gid_table`): PID → graph identifier.
- **GID-to-frame** (`gid_frame_table`): which graph sits in which slot,
  and how many live processes use it.

### Context switch (Operation 2, PID = next process)

| state   | cycles | action |
|---------|--------|--------|
| SAVE    | 1 | store the running process's address pointer under its PID |
| LOOK    | 1 | find the next PID's GID and saved pointer |
| FRAME   | 1 | find the GID's slot; set the frame address |
| BASE    | 9 | only if the GID differs from the graph whose bases are loaded: read header words 0..7 from the slot, one per cycle, into the base register file (the graph-memory read address is taken over meanwhile) |
| RESTORE | 1 | load the address pointer with the saved value; the read address now points at that row |
| FINISH  | 1 | set Done |

Done is visible 15 cycles after the Operation write when the bases are
reloaded, and 6 cycles after it when the new process uses the same graph
as the last one. The original prototype reports 18 cycles.

### Task create (Operation 1, GID and PID)

1. Add the PID to both PID tables. Its pointer is the start row.
2. Look up the GID:
   - **Graph already in a slot:** add one to the slot's process count.
     Done follows 3 cycles after the Operation write.
   - **Graph missing:** allocate a slot. An empty slot is taken first,
     otherwise the lowest slot whose graph has no live process. Then ask
     the DMA for a copy into that slot and wait for it. Done follows
     L + 8 cycles after the Operation write, where L is the number of
     words copied, header included, if the DMA is free. Add the time
     spent waiting for the other monitor's copy if it is not.

A create does not change the running process. The new graph's bases are
loaded when the first switch to it happens. Slots whose process count
falls to zero keep their graph, so a later create of the same
application needs no copy.

### Task delete (Operation 3, PID)

1. Clear the PID's rows in both PID tables.
2. Take one off its graph's process count.

Done follows 3 cycles after the Operation write. If the deleted process
was the current one, monitoring stops until the next switch.

### Cost compared with the operating system

The cycle counts are measured by the testbenches. The processor
figures are those reported for the original system on a 100 MHz Nios II
running µC/OS-II.

| operation       | OS on the core | this monitor |
|-----------------|----------------|--------------|
| task create     | 600            | 3, or L + 8 with a copy (127 for a 111-row graph and its 8-word header) |
| context switch  | 34             | 15 (6 without a base reload) |
| task delete     | 126            | 3 |
| system recovery | 311            | 1 to raise recovery, then a 3-cycle delete |

The monitor always finishes before the OS does, so it never slows the
system down. This holds even for a create that waits for the other
core's copy: the worst case for the benchmark graphs is about 410 cycles.

## 5. Attack detection and recovery

Checking is active while Enable is 1, a process is current and the FSM
is idle. If an instruction's hash is not in the current row's `valid`
vector:

- `recovery` rises at the next clock edge, one cycle after the
  instruction.
- `recovery` stays high until the OS writes Enable = 0.
- The address pointer is frozen, so further instructions neither move
  it nor re-trigger anything.

In the system this design comes from, `recovery` drives an interrupt of
the core. The interrupt handler disables monitoring and deletes the task
(Operation 3), and the OS schedules the next task. A recovery on one core
has no effect on the other core's monitor.

What the monitor can and cannot see: it checks the sequence of
instruction hashes. Injected code is caught at its first instruction
whose hash is not an allowed successor. With 16 hash values and a few
allowed successors per state, that is nearly always the first or second
injected instruction. Code that reproduces an allowed hash sequence is
not detected, and attacks that use only legal control flow are not
detected either. The testbenches inject instructions that are chosen to
have a forbidden hash.

## 6. Centralized graph memory, DMA and arbiter

`central_graph_memory` holds the graphs of all installed applications:
4096 words, one write port for downloading graphs and one synchronous
read port for the DMA. Downloading needs no cooperation from the
monitors, and a new application can be installed while they run.

`dma_controller` has a GID-to-address table: for each of 16 GIDs, the
graph's start word and its length in words, loaded through the `lut_*`
port. A copy works like this:

- A one-cycle `dma_start` with a GID and a destination frame starts it.
  `dma_done` falls in the next cycle.
- The controller looks the graph up, then reads one word per cycle.
- Each word is written to the monitor's graph memory one cycle later, at
  `destination + index`.
- `dma_done` rises again after the last write: L + 3 cycles after
  `dma_start` for L words.

Monitoring continues during a copy, because the copy writes to a slot
the running process does not use.

`graph_arbiter` shares the DMA between the monitors:

- A monitor raises its request (with GID and destination) and holds it
  until it sees its `finish` pulse.
- When `dma_done` is high (DMA idle), the arbiter grants the
  lowest-numbered requester, so Monitor 1 wins a tie. It pulses
  `dma_start` and routes the DMA's writes to that monitor only.
- When `dma_done` returns high, it pulses `finish`. A monitor that asks
  while the DMA is busy waits.

The arbiter is written for N monitors with fixed priority.

## 7. Module map and parameters

```
mthm_dual_system            top: NUM_MON monitors + shared DMA path
├── mthm_monitor  (×2)      one core's monitor
│   ├── processor_interface   OS registers
│   ├── control_fsm           switch / create / delete sequencing
│   ├── pid_addr_table        PID → saved pointer
│   ├── pid_gid_table         PID → GID
│   ├── gid_frame_table       GID → slot, process counts, allocation
│   ├── hash_unit             popcount mod 16, one-hot
│   ├── hash_compare          match, rank k
│   ├── sequencing_logic      base + nnext·offset + k
│   ├── base_addr_regfile     16 group bases
│   └── graph_memory          4 slots × 1024 × 32
├── graph_arbiter           fixed-priority DMA sharing
├── dma_controller          GID → address table, copy engine
└── central_graph_memory    4096 × 32 shared graph store
mthm_pkg                    widths, operation codes, entry/request structs
```

Top-level parameters and their defaults:

| parameter   | default | meaning |
|-------------|---------|---------|
| NUM_MON     | 2       | monitors / cores |
| SLOTS       | 4       | graph slots per monitor |
| SLOT_DEPTH  | 1024    | words per slot |
| PROCS       | 4       | processes per monitor |
| CGM_DEPTH   | 4096    | words of the centralized graph memory |

Fixed widths are in `mthm_pkg`:
- 32-bit instructions and graph words;
- 4-bit hash;
- 14-bit graph addresses;
- 16-bit base registers;
- 4-bit PID and GID.

Top-level ports:
- For each core (unpacked arrays indexed by core): the register bus
  (`cpu_we`, `cpu_addr`, `cpu_wdata`, `cpu_rdata`), the instruction stream
  (`instr_valid`, `instr`), `recovery` and, for observation, `addr_ptr`.
- Shared: the download port `cgm_*`, the table port `lut_*` and `dma_done`.

At the defaults the design uses 393,216 memory bits (two 4096-word monitor
memories and the central memory) and about 1,400 flip-flops.

## 8. Simulation and tests

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops. Each testbench has a
watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mthm_pkg.sv tb/tb_graph_pkg.sv tb/tb_mthm_dual_system.sv \
    --top-module tb_mthm_dual_system -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. The test data is
generated in SystemVerilog with `$urandom`; no data files are read.
Add `--assert` to check the concurrent assertions on the graph-copy
handshake in `graph_arbiter`, `dma_controller` and `control_fsm`:
- a copy starts only on an idle DMA;
- a request stays up until its copy is done;
- the DMA writes only while busy.

| testbench | what it establishes |
|-----------|---------------------|
| tb_hash_unit, tb_hash_compare, tb_sequencing_logic | datapath arithmetic against independent models, random and corner cases |
| tb_base_addr_regfile | header word → group register mapping, reset to 0xFFFF |
| tb_graph_memory, tb_central_graph_memory | write/read behaviour and one-cycle read latency |
| tb_pid_addr_table, tb_pid_gid_table, tb_gid_frame_table | random operation sequences against reference models; allocation and eviction order |
| tb_processor_interface | register map, Done/error handshake, operation flush |
| tb_control_fsm | the FSM alone with table models; exact cycle counts 15 / 6 / 3 / 3 and create with copy |
| tb_dma_controller | random graph copies; the L + 3 cycle copy time |
| tb_graph_arbiter | Monitor 1 priority, waiting while busy, write routing |
| tb_mthm_monitor | one monitor with random programs: long runs, switches, slot reuse, attacks, error cases |
| tb_mthm_dual_system | the whole system at default parameters (below) |

`tb_mthm_dual_system` runs the complete top at its default parameters:

- **Graphs.** It builds graphs for programs of 96, 60, 107, 77 and 166
  instructions (the sizes of qsort, bitcount, basicmath, stringmatch and
  dijkstra) and for a small vulnerable program. It downloads them into
  the central memory.
- **Workload.** Two operating systems run concurrently:
  - create processes, with both monitors asking for copies at the same time;
  - switch between processes and run them along random control-flow paths;
  - run OS code with monitoring disabled;
  - delete processes;
  - evict an idle graph;
  - attack the vulnerable program on core 1 while core 0 keeps running.
- **Checks.** Every instruction's effect on the address pointer is
  compared with the generator's prediction. The test also checks:
  - each operation's cycle count;
  - that every create finishes inside the OS's 600 cycles;
  - that the attack is flagged one cycle after the bad instruction, on
    that core only.
- **Mechanism counts.** It counts every mechanism: copy, shared graph,
  DMA wait, switch with and without reload, delete, attack, disabled
  monitoring and slot reuse. It fails if any count is zero.
- **Run time.** The test takes about ten seconds.

The generator's random graphs have somewhat more rows per instruction
(for example 160 rows for 96 instructions) than the real benchmark
graphs (111 rows). The copy times in the test are therefore a little
longer than the real ones.

## 9. What follows the original design and what is this design's own

**Taken from the original design:**
- the DFA graph with one-hot valid hashes, grouping by fan-out, 16 base
  registers and the `base + nnext·offset + k` transition;
- one lookup per instruction;
- graph slots with frame addresses;
- the PID-address, PID-to-GID and GID-to-frame storages with their
  create/switch/delete steps;
- the Operation/GID/PID/Enable register set with its Done bit;
- recovery by interrupt and task kill;
- the centralized graph memory with a GID-based DMA, one word per cycle;
- the arbiter with Monitor 1 priority;
- the widths visible in the prototype's signal traces (4-bit hash,
  14-bit graph address, 32-bit words).

**This design's own choices** (the original does not specify them):
- the instruction hash reduction (popcount modulo 16);
- the bit layout of a graph row and of the 8-word header;
- the slot size and the number of processes;
- all state encodings and cycle counts (the context switch is 15 cycles
  here against 18 in the prototype);
- the status bits of register 0 and the error flag;
- keeping idle graphs loaded and the eviction order;
- the DMA's table format and handshake timing;
- the depth of the central memory.

**Not included:**
- the processor cores, their memory controller and interrupt controller;
- the operating-system changes that drive the register interface;
- the offline tool that turns a binary into a graph;
- the secure mechanism that downloads graphs into the central memory.

The top level brings out the ports where these connect.
