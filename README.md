# A four-lane vector-thread unit with stack-based fragment convergence

A vector-thread (VT) machine runs data-parallel loops as many scalar
*microthreads* (uTs), one per loop iteration. While the uTs agree on their
control flow, the hardware runs them like a vector machine: one instruction is
fetched and decoded once, then applied to every uT's registers, lane by lane.
When a data-dependent branch sends uTs different ways, the group splits into
*fragments*. The hardware then has to pick which fragment runs next so that
the fragments meet again as soon as possible and run together as one.

This repository holds synthesizable SystemVerilog for the vector side of
such a machine. It is modelled on the multi-lane Maven VT configuration
described in "Exploring the Tradeoffs between Programmability and Efficiency
in Data-Parallel Accelerators" (Lee et al.):

- one control processor driving a four-lane vector unit;
- 256 registers per lane in four banks, each bank with its own integer ALU;
- in every lane, pipelined integer multiply/divide units and IEEE
  single-precision add, multiply, divide and square-root units;
- up to 32 uTs;
- the "2-stack" fragment-convergence scheme.

The control processor and the caches are not part of this RTL. The control
processor's side of the vector command queue is a port of the top module
`maven_vt_core`. The data cache is reached through a simple request/response
port.

## Organisation

```
 cmd_* ──> command queue ──> vt_viu ─────────────┬──> 4 x vector_lane
 resp_* <───────────────────┘  │  │  (micro-op + mask, broadcast)
                               │  │        │ uT loads/stores
 vinst_* ──> vinst_mem (2 KB) <┘  │        v
                                  │   mem_coalescer ──┐
                                  └──> vmu ───────────┴─> mem_arbiter ──> mem_*
                                   (vector loads/stores)
```

| module | role |
|---|---|
| `maven_vt_core` | top; wires everything, brings out the command port, code-load port, data-cache port and event pulses |
| `vt_viu` | vector issue unit: executes commands, fetches uT code, issues micro-ops, resolves branches, schedules fragments |
| `pvfb` | pending vector fragment buffer: sorted stack of parked fragments |
| `vinst_mem` | 2 KB uT instruction store |
| `vector_lane` | one lane: banked registers, per-bank ALUs, long-latency units, uT memory path |
| `vrf_bank` | one 64 x 32-bit 2-read/1-write register bank |
| `bank_alu` | integer ALU and branch comparator of one bank |
| `int_mul`, `int_div` | pipelined multiplier (3 cycles) and divider/remainder (12 cycles) |
| `fp_add`, `fp_mul` | single-precision adder/subtractor and multiplier (3 cycles each) |
| `fp_div`, `fp_sqrt` | single-precision divider (7 cycles) and square root (10 cycles) |
| `vmu` | vector memory unit: strided address generation, load-data and store-data queues |
| `mem_coalescer` | combines uT loads from different lanes that hit the same 16-byte block |
| `mem_arbiter` | shares the data-cache port between the vector and uT memory paths |
| `fifo`, `maven_pkg` | generic queue; shared types, uT opcodes and command format |

## Fragments and how they are scheduled

This is the least obvious part of the design.

### Fragments and divergence

A *vector fetch* command starts a fragment:

- its PC is the fetch address;
- its mask holds every uT below the current vector length.

The issue unit fetches the instruction at the fragment's PC and decodes it.
It then broadcasts the instruction to all four lanes together with the mask.
Only uTs whose mask bit is set write results.

A branch is sent to the lanes as a compare. Each lane returns one resolution
bit per uT.

- If all active uTs agree, the fragment moves to the target or falls through.
  This is a *uniform* branch (`ev_uniform`).
- Otherwise the fragment splits into a taken half and a fall-through half
  (`ev_diverge`).

### The scheduling rule

Every fragment has a sort key {future, PC}. The *future* bit is set for a
fragment produced by a backward branch, one whose target is at or before the
branch itself. Such a fragment belongs to the next loop iteration.

After a divergent branch:

1. The half with the smaller key becomes the running fragment. The other half
   is parked in the `pvfb`.
2. The running fragment is compared with the smallest parked fragment, the
   top of the stack:
   - smaller: it keeps running;
   - equal: the two merge (masks OR-ed, `ev_merge`) and continue as one;
   - larger: it is parked and the top is taken out instead.

The same comparison is made when a fragment moves on after a uniform branch.
A STOP instruction ends the running fragment and pops the next one. The vector
fetch is complete when the buffer is empty (`ev_vfetch_done`).

The idea is simple: the fragment furthest behind in the code always runs
first. Faster fragments therefore wait at a meeting point until the slower
ones catch up, and then continue as one.

### The current and future stacks

Without the future bit (1-stack mode, `TWO_STACK = 0`), uTs that loop back
early have a small PC and race through extra iterations alone. With the
future bit, fragments of the next iteration sort behind every fragment of the
current iteration. Loop-back fragments therefore wait until the whole group
has finished the iteration, and all uTs advance through the loop together.

The `pvfb` keeps both "stacks" in one physical sorted array of 32 entries:

- Each entry stores an *epoch* bit rather than the future bit. An entry is
  future when its epoch differs from a global current-epoch bit.
- When the top entry is popped and it is a future entry, the current stack has
  emptied. The current-epoch bit then toggles and every remaining entry changes
  side at once. This is the stack swap (`ev_swap`).

32 entries always suffice, because every uT is in at most one fragment. An
insertion with an equal key merges into the existing entry. Other insertions
are placed in sorted order in a single cycle, using parallel comparators.

### Worked example: one forward and two backward branches

Take a four-uT loop with one forward branch (0x04 → 0x0c) and two backward
branches (0x0c → 0x00 and 0x14 → 0x00):

- The 2-stack mode runs it in 13 micro-ops.
- The 1-stack mode needs 17. Two of the uTs run a whole extra iteration by
  themselves with mask 0011.

`tb_vt_viu` replays exactly this trace and checks both schedules micro-op by
micro-op.

## Lanes and register banking

Global uT *i* lives in lane *i* mod 4 as local uT *j* = *i* / 4. Inside a
lane, all registers of one uT sit in one bank, and consecutive local uTs go to
consecutive banks:

```
bank  = j mod 4
entry = ((j div 4) << log2(registers per uT)) | r      (64 entries per bank)
```

The configure command picks 4, 8, 16 or 32 registers per uT, which sets
log2(registers per uT). It answers with the maximum vector length:
min(4 × 256 / registers, 32), which is 32 for every setting.

A lane takes one micro-op at a time. Its sequencer visits local uTs
0 … ⌈vl/4⌉−1, one per cycle, so it touches a different bank every cycle. Each
bank's ALU computes and writes back in the same cycle. An integer micro-op
over 32 uTs therefore occupies the lanes for 8 cycles; inactive uTs still take
their cycle but write nothing.

Multiplies, divides and floating-point operations are issued one per cycle
into the pipelined units, and the results are written back as they come out.
The latencies are:

| unit | cycles |
|---|---|
| integer multiply | 3 |
| integer divide / remainder | 12 |
| floating-point add / subtract | 3 |
| floating-point multiply | 3 |
| floating-point divide | 7 |
| floating-point square root | 10 |

The lane waits for its last result before it reports idle. Each long-latency
unit carries a tag (local uT and destination register) alongside its
operation, so the write port knows where the result goes.

uT loads and stores compute rs + imm on the bank ALU. Each lane has one memory
access outstanding at a time.

The write port of a bank serves four sources, in this priority order:

1. vector-load writeback;
2. long-latency unit results;
3. uT load data;
4. the ALU.

These sources never compete in practice, because only one micro-op runs at a
time.

## Memory paths

All memory traffic leaves through one port with these rules:

- Requests are valid/ready word requests `{addr, we, wdata}`.
- Every request, stores included, gets exactly one response, in order.
- A response carries the aligned 16-byte block that holds the requested word.

Two paths use this port:

- **Vector loads and stores** (`vmu`) generate the addresses base + i·stride,
  one element per cycle; the stride may be any value, including 0 and
  negative values.
  - Loads are limited by the room left in the 8-entry load-data queue. The
    unit picks the word out of each returned block and writes element *i* into
    lane *i* mod 4, local uT *i* / 4.
  - Stores read one element per cycle from the lanes into the store-data
    queue, and issue writes from there.
  - A unit-stride load of 32 elements streams at one element per cycle after
    the memory latency.
- **uT loads and stores** from the lanes go through `mem_coalescer`. It picks
  the lowest-numbered lane with a request and compares the address bits above
  the 16-byte block offset for every other requesting lane. Loads that fall in
  the same block are served by one request. Their word selects are kept in a
  small queue, and when the block returns each lane gets its own word. Example:
  - the four lanes ask for 0x1c, 0x14, 0x08 and 0x14;
  - lanes 0, 1 and 3 share one request, taking words 3, 1 and 1;
  - lane 2 follows separately.

  Stores are never combined. With `USE_COALESCER = 0` (the default) the block
  sends every request on its own and acts only as an in-order arbiter.

`mem_arbiter` gives the vector path priority over the uT path. It records the
owner of each request so that the in-order responses can be routed back, and
allows at most 8 requests in flight.

## Programming interface

### Vector commands (`cmd`, type `vcmd_t`)

| op | fields | effect | answer on `resp_*` |
|---|---|---|---|
| `VC_CONFIG` | data = registers per uT | sets the register layout, vl = 0 | maximum vector length |
| `VC_SETVL` | data = requested length | vl = min(data, maximum) | vl |
| `VC_MOVSV` | vreg, data | every uT below vl: vreg ← data | – |
| `VC_LOADV` | vreg, data = base, stride | uT i: vreg ← mem[base + i·stride] | – |
| `VC_STOREV` | vreg, data = base, stride | mem[base + i·stride] ← uT i's vreg | – |
| `VC_VFETCH` | data = code address | runs uT code on all uTs below vl | – |
| `VC_SYNC` | – | waits for all earlier commands | 0 |

Commands are queued (8 deep). `cmd_ready` falls when the queue is full.
Commands execute in order, one at a time. Before starting a VT loop, write uT
code through `vinst_we/vinst_addr/vinst_wdata`.

### uT instructions (32 bits)

Field layout: `[31:26]` opcode, `[25:21]` ra, `[20:16]` rb, `[15:11]` rc,
`[15:0]` imm. Register 0 always reads zero.

| group | opcodes | meaning |
|---|---|---|
| register | ADD 0, SUB 1, AND 2, OR 3, XOR 4, SLT 5, SLTU 6, SLL 7, SRL 8, SRA 9 | ra ← rb op rc |
| immediate | ADDI 16, ANDI 17, ORI 18, XORI 19, SLTI 20, LUI 21 | ra ← rb op imm (sign-extended for ADDI/SLTI, zero-extended for logic ops; LUI: imm << 16) |
| long latency | MUL 24, DIV 25, REM 26 | signed; divide by zero gives −1 and the dividend |
| floating point | FSQRT 27, FADD 28, FSUB 29, FMUL 30, FDIV 31 | IEEE single precision, ra ← rb op rc (FSQRT: ra ← √rb) |
| memory | LW 32, SW 33 | ra ↔ mem[rb + imm] |
| branch | BEQ 40, BNE 41, BLT 42, BGE 43 | compare ra with rb (signed); target = pc + 4 + imm·4 |
| other | UTIDX 48, STOP 63 | ra ← uT index; end the fragment |

## Where this design departs from the reference architecture

The following are simplifications or choices of this RTL, not properties of
the architecture it follows:

- **Control processor and caches are absent.** The control processor's
  instruction set and the caches' internals are not specified in enough
  detail to build from. The uT instruction set has no atomic or
  conditional-move instructions, and the command and instruction encodings
  are this design's own.
- **Floating-point units written from scratch, one set per lane.** The
  reference machine uses library arithmetic parts, retimed into pipelines,
  splits the long-latency units between a lane's two arithmetic units, and
  lets the control processor share them. Here each lane has one of each, and
  each is a plain datapath computed in its first stage and followed by
  delay registers, to be spread by retiming in synthesis. The latencies match
  the reference. The rounding is round-to-nearest-even. Subnormal inputs count
  as zero and tiny results are flushed to zero. Every NaN produced is
  0x7fc00000.
- **One micro-op at a time.** The reference lane overlaps several functional
  units that share the banks through a crossbar, with a scheduler that avoids
  bank conflicts; it also adds a third arithmetic unit when banked. Here each
  micro-op finishes in all lanes before the next one issues. The banks and the
  per-bank ALUs are there, but there is no overlap or chaining, so there are no
  bank conflicts to schedule around.
- **Blocking memory.**
  - uT loads/stores: one outstanding access per lane, with no separate uT
    address/load/store queues.
  - Vector memory commands: the issue unit waits for each one to finish. The
    decoupling of memory accesses from lane execution is limited to the VMU's
    load and store queues.
- **Word-sized requests and a single port.** The VMU asks for one word per
  request, rather than moving wide blocks. The coalescer sends requests that do
  not match to the same single port in a later cycle, not to another cache bank
  in the same cycle.
- **Single-cycle sorted insertion** in the fragment buffer, instead of a
  systolic insertion sort over several cycles. The order kept is the same.
- **A written instruction store.** The 2 KB uT instruction memory is loaded
  directly; there is no cache tag or refill path.
- **Configurations left out.** Density-time execution (only meaningful for
  single-lane machines) and the FIFO fragment buffer baseline are not built.
  The 1-stack scheme is available (`TWO_STACK = 0`), as is the coalescer
  (`USE_COALESCER = 1`).
- **Own choices where the architecture is silent:**
  - queue depths: 8 commands, 8 load and 8 store elements, 8 requests in
    flight;
  - fixed arbitration priority;
  - divide-by-zero results;
  - the rule that a backward branch is one whose target is at or before the
    branch.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_bank_alu` | every ALU function and comparison against computed values, random and corner operands |
| `tb_vrf_bank` | two read ports and one write port against a model |
| `tb_int_mul` | products and the exact 3-cycle latency, back-to-back issue |
| `tb_int_div` | quotient/remainder incl. negative operands and zero divisors, exact 12-cycle latency |
| `tb_fp_add`, `tb_fp_mul`, `tb_fp_div`, `tb_fp_sqrt` | thousands of random and special operands against a double-precision reference rounded to single; exact 3/3/7/10-cycle latency |
| `tb_vinst_mem` | code writes and reads over the whole 2 KB |
| `tb_pvfb` | sorted insertion, merging, 1-stack and 2-stack ordering, stack swaps, random traffic against a queue model |
| `tb_vt_viu` | the four-uT loop example in both modes (13 vs 17 micro-ops, swaps, merges), command answers |
| `tb_vector_lane` | every micro-op kind under random masks, bank layout for two register counts, 8-cycle integer micro-op |
| `tb_vmu` | strided loads/stores (zero, negative, large strides) with back-pressure; one-element-per-cycle streaming |
| `tb_mem_coalescer` | the 0x1c/0x14/0x08/0x14 example; random loads/stores with and without coalescing |
| `tb_mem_arbiter` | priority, in-order routing and in-flight limit under random back-pressure |
| `tb_maven_vt_core` | whole unit at its default size (see below) |

The floating-point tests can use double precision as their reference
because a double holds more than twice the significand bits of a single plus
two. A sum, product, quotient or square root of singles, rounded first to
double and then to single, is therefore the correctly rounded single result.
The adder test also keeps operand exponents close enough that the double sum
is exact.

`tb_maven_vt_core` acts as the control processor and checks the whole unit
against a reference interpreter in the testbench, which runs each uT's code on
its own. It runs seven workloads:

- an irregular loop `if (A[i] > 0) C[i] = x·A[i] + B[i]`, stripmined over
  70 elements, which includes a tail of 6;
- a per-uT counting loop with a data-dependent trip count, followed by a
  divide and a remainder, with strided stores;
- an indirect gather through uT loads;
- a burst of commands that fills the command queue;
- single-precision arithmetic on whole numbers stored as floats, using add,
  subtract, multiply, divide and square root;
- a complex multiplication over 40 elements stored as {re, im} pairs, using
  stride-8 vector loads and stores;
- a binary search of 32 keys in a sorted 64-entry table, where every uT runs
  its own while loop of uT loads and leaves it at a different iteration.

At the end it compares every memory word and every register of all 32 uTs.
It also counts each mechanism and fails if any never happened: divergent and
uniform branches, merges, stack swaps, queue and memory back-pressure, uT
loads and stores, strided access, a vector-length tail, integer multiply and
divide, and each of the four floating-point operations.

`tb/mem_model.sv` is the behavioural memory used by the tests. It has a
configurable latency and random back-pressure.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/maven_pkg.sv tb/tb_maven_vt_core.sv --top-module tb_maven_vt_core -Mdir obj
./obj/Vtb_maven_vt_core
```

Replace the testbench name to run another one. The whole-unit test finishes
in well under a second of simulation time.

## Parameters of the top (`maven_vt_core`)

| parameter | default | meaning |
|---|---|---|
| `NUM_LANES` | 4 | lanes |
| `NUM_BANKS` | 4 | register banks per lane |
| `REGS_PER_LANE` | 256 | physical registers per lane |
| `MAX_VLEN` | 32 | maximum vector length (uTs) |
| `VINST_BYTES` | 2048 | uT instruction store |
| `CMDQ_DEPTH` | 8 | command queue entries |
| `TWO_STACK` | 1 | 2-stack (1) or 1-stack (0) fragment ordering |
| `USE_COALESCER` | 0 | combine uT loads to the same 16-byte block |
| `MUL_LAT`, `DIV_LAT` | 3, 12 | integer multiplier and divider latency |
| `FADD_LAT`, `FMUL_LAT`, `FDIV_LAT`, `FSQRT_LAT` | 3, 3, 7, 10 | floating-point unit latencies |
