# MACtrl — a hardware synchronization controller for multi-core shared memory

When several processor cores share one on-chip memory, software normally keeps
them apart with spin locks: each core polls a lock variable over the bus until
the lock is free. This wastes bus bandwidth and time, and under contention it
gets much worse. The Multi-Access Controller (MACtrl) moves synchronization into
hardware, between the cores and the shared memory. A core that has to wait is
*blocked*: its bus access is not acknowledged until it is its turn. It never
spins. The controller provides:

- **implicit locking**: every single access to the shared memory is atomic.
  Concurrent requests are settled by a *race* that picks one winner within a
  single cycle, using a rotating priority;
- **explicit (global) locking**: one global lock bit makes a sequence of
  accesses atomic;
- **address-sensitive locking**: cores lock disjoint blocks of the memory and
  work in them at the same time;
- **hardware barriers**: simple, extended simple and complex barriers for event
  synchronization.

The RTL follows the controller described in the paper *Hardware Synchronization
for Embedded Multi-Core Processors*. The paper built it for a dual-core FPGA
system with a dual-ported block RAM as shared memory. The paper describes what
each mechanism does but not how it is built inside. State machines, encodings,
register map, bus protocol and timing are this design's own. The section
"Where this design departs from or goes beyond the paper" lists them.

## Structure

```
            core 0 bus           core 1 bus   ...   core N-1 bus
                |                    |                   |
          +-----v-----+        +-----v-----+       +-----v-----+
          | core_fsm  |        | core_fsm  |       | core_fsm  |   core-side logic
          +--+--+--+--+        +--+--+--+--+       +--+--+--+--+
             |  |  |              |  |  |             |  |  |
   +---------+--+--+--------------+--+--+-------------+--+--+---------+
   |  inter-core logic                                                |
   |   mem_race      access race (rr_arbiter) + lock/bypass masks     |
   |   global_lock   global lock bit, own race (rr_arbiter)           |
   |   addr_lock     per-core block registers, own race (rr_arbiter)  |
   |   barrier_unit  simple / extended / complex barriers             |
   +--------------------------------+---------------------------------+
             |  one memory port per core (driven by its core_fsm)
      +------v---------------------------------------------+
      | shared_mem   N-port RAM (dual-port block RAM, N=2) |
      +----------------------------------------------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/mactrl_pkg.sv` | package | register map, barrier kinds, FSM states |
| `rtl/mactrl.sv` | `mactrl` | top: wires everything together |
| `rtl/core_fsm.sv` | `core_fsm` | one per core: decodes and sequences the core's accesses, blocks the core |
| `rtl/mem_race.sv` | `mem_race` | decides which cores may use the memory each cycle |
| `rtl/rr_arbiter.sv` | `rr_arbiter` | the race: one winner, decided in one cycle, rotating priority |
| `rtl/global_lock.sv` | `global_lock` | global lock bit |
| `rtl/addr_lock.sv` | `addr_lock` | address-sensitive block locks |
| `rtl/barrier_unit.sv` | `barrier_unit` | hardware barriers |
| `rtl/shared_mem.sv` | `shared_mem` | the shared memory |

## The access race and implicit locking

This is the core of the controller and the part with the most timing detail.

**Election.** A core's memory request enters the race (`core_fsm` state
`CS_ARB`). Only requesting cores compete, and the others are masked out. The
winner is the first requester at or after a priority pointer. The pointer then
moves to the core after the winner. The election is combinational, so a
requester can be granted in the same cycle it asks. Under full load the grants
rotate through the cores. A waiting core therefore sees at most N−1 foreign
grants before its own, and its worst-case wait is bounded by the number of
cores.

**Ownership.** A winner owns the memory until its access ends (`done` from its
FSM). While the memory is owned, the race elects no one. An access goes through
these cycles:

```
cycle   0        1          2         3
core    req ---------------------------->  (held until ack)
FSM     IDLE     ARB(grant) MEM       RESP(ack, rdata)
memory                      port used
```

An uncontended access therefore takes **4 cycles**, from the request to the
acknowledge, counting both. When both cores of a dual-core system write in the
same cycle, the loser waits for the winner's MEM and RESP cycles and finishes
after **7 cycles**. These are the best- and worst-case single-access counts the
paper reports for its controller. With four colliding cores the acknowledges
come after 4, 7, 10 and 13 cycles.

**Accesses that do not need to be serialized.** The memory has one port per
core, so some accesses proceed in parallel:

- *Concurrent reads*: if the memory is free and every competitor only reads,
  all of them are granted together.
- *Own block*: a core accessing inside the block it has locked is granted at
  once, even while another core owns the memory. It does not take part in the
  race and does not make the memory busy. This is what allows two cores to read
  and write different regions at the same time.

**Exclusions.** A core may not compete for an address inside a block that
another core has locked. While one core holds the global lock, no other core
may compete at all. The holder of the global lock still goes through the race.
This keeps it from overlapping an access that another core won just before the
lock was granted.

## Global lock and address-sensitive locking

**Global lock** (`global_lock`). A core writes `REG_GLOCK_ACQ` and stays blocked
until it holds the lock. Simultaneous requests are settled by a second
rotating-priority race. The lock becomes visible one cycle after it is won. A
write to `REG_GLOCK_REL` by the holder frees it. Writes from other cores are
ignored. A read-modify-write looks like this:

```
write REG_GLOCK_ACQ     ; blocks until granted
read  X
write X+1
write REG_GLOCK_REL
```

**Block locks** (`addr_lock`). Each core has a lower and an upper address
register. The lower address is written first and is only staged. Writing the
upper address starts a lock attempt on the block `[lower, upper]`, both bounds
inclusive, and the core is blocked until the attempt succeeds. An attempt
succeeds when the block overlaps no block held by another core. Of the attempts
that could succeed, one per cycle is granted, again by a rotating race, so two
overlapping attempts are never granted together. Starting a new attempt
releases the core's previous block, which is how a block is *relocated*.
`REG_ALOCK_REL` releases it explicitly. A core holds at most one block.

**Mutual exclusion.** The global lock and block locks cannot both be in use:

- the global lock is granted only while no block is held;
- no block is granted while the global lock is held.

Both kinds of request keep waiting; neither is refused. Software should release
a block when it is done with it. A block that is never released keeps a core
that needs the global lock, or an overlapping block, waiting forever.

## Barriers

A core enters a barrier by writing one of three barrier registers. It stays
blocked until the barrier releases it.

| Register | Value written | Core leaves when |
|---|---|---|
| `REG_BAR_SIMPLE` | ignored | at least one other core is in a simple barrier |
| `REG_BAR_EXT` | bit mask, bit j = core j | every core in the mask (except itself) has entered an extended barrier |
| `REG_BAR_CPLX` | bits 7:0 count K, bits 15:8 id | K other cores have entered a complex barrier with the same id |

The simple barrier is the point-to-point meeting of two cores. The extended
barrier names its partners explicitly, so software must know the core numbers.
The complex barrier only needs a count. Different ids act as independent
barriers, so several subsets of cores can synchronize at the same time.

Inside, each waiting core keeps a *met* vector. Bit j is set in any cycle in
which core j waits at a compatible barrier: same kind and, for complex
barriers, same id. The bit stays set after core j has left. This matters when
partners wait for different sets of cores. Example: core 0 waits for cores 1
and 3, and core 1 waits only for core 0. Core 1 leaves as soon as it meets
core 0, and core 0 still counts core 1 once core 3 arrives.

A core's met vector is cleared when it leaves. Barriers of different kinds
never meet each other. The release comes at the earliest in the cycle after the
last partner's entry. For two cores at a simple barrier, both are released in
the same cycle.

## Programming interface

Each core has a word-addressed bus port (`core_*[i]` on `mactrl`):

- the core raises `core_req` with `core_we`, `core_addr` and `core_wdata`, and
  holds them until `core_ack`;
- `core_ack` is high for one cycle and carries `core_rdata`;
- a new request may follow in the next cycle.

While the core is blocked, `core_ack` simply does not come.

The address has `log2(WORDS)+1` bits. When the top bit is 0, the rest is a
shared-memory word address. When it is 1, the low four bits select a register:

| Index | Register | Write | Read |
|---|---|---|---|
| 0 | `REG_STATUS` | — | status word |
| 1 | `REG_GLOCK_ACQ` | acquire global lock (blocks) | status |
| 2 | `REG_GLOCK_REL` | release global lock | status |
| 3 | `REG_ALOCK_LO` | lower block address | status |
| 4 | `REG_ALOCK_HI` | upper block address, lock attempt (blocks) | status |
| 5 | `REG_ALOCK_REL` | release block | status |
| 6 | `REG_BAR_SIMPLE` | simple barrier (blocks) | status |
| 7 | `REG_BAR_EXT` | extended barrier (blocks) | status |
| 8 | `REG_BAR_CPLX` | complex barrier (blocks) | status |

Status word: bits 31:16 give the core number, bits 15:8 the number of cores,
bit 1 is set while the core holds the global lock and bit 0 while it holds a
block. Register writes that do not block take 3 cycles.

## Parameters

| Parameter (`mactrl`) | Default | Origin |
|---|---|---|
| `N` | 2 | number of cores; 2 is the paper's hardware system. The paper's design is generic and it also simulated 4 and 8 cores |
| `DW` | 32 | data width; chosen to match the 32-bit PowerPC cores of the original system |
| `WORDS` | 2048 | shared-memory words (8 KiB); the paper gives no size |

The memory has one port per core. With N = 2 it maps onto a true dual-port
block RAM. With more cores it becomes a multi-port register-file memory, which
is expensive. A real multi-core implementation would have to share ports, and
the paper does not say how.

Reset is synchronous and active low. After reset all locks are free, no core
waits and the race priority is at core 0. The memory is zero at power-up.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_rr_arbiter` | winner of every cycle against a reference model (2000 random cycles), rotation, masking |
| `tb_shared_mem` | random dual-port traffic against a reference array, 1-cycle read latency |
| `tb_global_lock` | grant order, release only by the holder, exclusion by held blocks |
| `tb_addr_lock` | disjoint blocks together, overlapping attempts wait, relocation, global-lock exclusion |
| `tb_barrier_unit` | all three barrier kinds with four cores, including the met-vector case and id separation |
| `tb_mem_race` | one winner per election, 3-cycle ownership, concurrent reads, bypass, exclusions, random safety and bounded waiting |
| `tb_core_fsm` | 4-cycle access, 7 cycles with a delayed grant, all register strobes, blocking, status word |
| `tb_mactrl` | whole controller at its default size (see below) |
| `tb_mactrl_multi` | whole controller with four and with eight cores (see below) |

`tb_mactrl` runs the default dual-core controller through:

- single accesses: 4 cycles alone; 4 and 7 cycles for two colliding writes;
  concurrent reads;
- paired read/write accesses from both cores to one shared counter, 200 per
  core, first under the global lock (the count must be exact) and then with
  implicit locking only;
- a block-relocation scenario in which the two cores' blocks move toward each
  other and collide; the final memory contents must match the expected counts;
- global-lock/block-lock exclusion;
- all three barriers.

It counts how often each mechanism occurred (race stalls, concurrent reads,
bypasses, lock waits, barrier waits) and fails if one never did.

`tb_mactrl_multi` runs a four-core and an eight-core controller side by side.
The scenario lives in `tb/mactrl_env.sv`. With N cores it checks that:

- N colliding writes finish after 4, 7, 10, ... 4+3(N−1) cycles;
- no access under sustained contention exceeds 4+3(N−1) cycles;
- a global-lock counter is correct;
- N blocks are written in parallel;
- barriers work over subsets of the cores.

The modules carry assertions for the bus and lock rules:

- at most one winner per race;
- only requesters are granted;
- no two held blocks overlap;
- the global lock is never granted while a block is held;
- no write is granted together with another race access;
- one-cycle acknowledges.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mactrl_pkg.sv rtl/*.sv \
          tb/tb_mactrl.sv --top-module tb_mactrl -Mdir obj_tb_mactrl
./obj_tb_mactrl/Vtb_mactrl
```

Replace `tb_mactrl` with any other testbench name. For `tb_mactrl_multi`, also
add `tb/mactrl_env.sv` to the file list. All of them finish in
seconds. To lint the design, run
`verilator --lint-only -Wall -Irtl rtl/mactrl_pkg.sv rtl/mactrl.sv`. The only
warnings left are unused signals and package constants.

What has not been verified:

- the paper's large workloads (10 million paired accesses, its block-access
  benchmark) are simulated only in scaled-down form;
- no FPGA or timing run was made.

## Where this design departs from or goes beyond the paper

Taken from the paper:

- the controller structure: one FSM per core, plus inter-core logic and a
  shared memory;
- the race: only competing cores take part, one winner per election, a rotating
  highest priority, bounded waiting;
- the global lock bit, acquired by a variant of the same race;
- block locking through lower/upper address registers, with global and block
  locking mutually exclusive;
- the behaviour of simple, extended simple and complex barriers;
- the dual-core configuration with a dual-ported shared memory that allows
  concurrent reads;
- the best- and worst-case MACtrl access counts of 4 and 7 cycles.

This design's own choices:

- **Bus interface.** The paper's cores use a vendor on-chip memory interface. A
  plain req/ack word bus replaces it, with the registers mapped into the upper
  half of the address space. The register map, status word and complex-barrier
  field layout are invented here.
- **Race throughput.** The paper's ideal is a race that elects one winner per
  cycle. Here each election takes one cycle, but a new winner is elected only
  once the previous access has finished, which is one access every 3 cycles under
  full contention. This follows the paper's measured 4/7-cycle best/worst access
  counts, whose difference is a whole access of the other core.
- **Priority rotation.** The paper says the priority "continuously cycles". Here
  it moves past each winner rather than every clock, which is what guarantees
  the waiting bound.
- **Timing.** The 4/7-cycle counts are reproduced in controller clock cycles.
  The paper measured processor cycles on its board, which include the
  processor's own interface.
- **Concurrency rules.** All-reads-together and own-block bypass are this
  design's reading of "concurrent reads possible" and of concurrent access to
  locked regions. The global-lock holder going through the race is also a
  design choice.
- **Block locks.** Bounds are inclusive, there is one block per core, a new
  upper-address write relocates the block, and the lower register is staged.
- **Barriers.** The met vector, and the rule that barrier kinds do not mix.
- **Sizes.** Memory size and data width (not given). One port per core for
  N > 2.
- **Not included.** The processor cores, their buses (PLB/OPB), the external
  SDRAM and the board peripherals are not part of this RTL. Neither are the
  software spin-lock baselines the paper compares against. The cores'
  interface appears as the `core_*` ports of `mactrl`.
