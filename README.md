# A four-core HERA memory system with bus arbitration and transactional memory

HERA is a small 16-bit teaching processor. This design puts four HERA cores
on a single main memory. Only one core can use the memory in a given clock
cycle. The arbitration is built without a request/grant handshake, because the
cores know nothing about sharing:

- a core that loses arbitration simply does not see a rising clock edge;
- its memory request stays on the bus until a cycle in which it wins.

On top of this shared memory sits hardware transactional memory. Two
instructions, `TRST` and `TREND`, bracket a transaction. A small fully
associative cache per core buffers the transaction's stores and watches the
shared bus. The cache either writes everything to memory at `TREND` (commit),
or throws it away and restarts the transaction (abort).

The HERA core itself is not part of this RTL. The top level,
`hera_system`, brings each core's ports out as arrays. The testbenches attach
a behavioural core model to them (see "The cores" below).

```
            ROM0   ROM1   ROM2   ROM3        (instruction_rom, one per core)
             |      |      |      |
   core 0  core 1  core 2  core 3            (not included; tb/hera_core_model.sv)
     |        |       |       |
   tm_unit  tm_unit tm_unit tm_unit          (transactional cache + control)
     |        |       |       |      ^ snoop (RAM bus address, read, write)
   +------------------------------------+
   |            bus_arbitrator          |---- cpu_select, two_or_more
   +------------------------------------+
                    |
                 main_ram (64K x 16)

   core_clock[n] = clock | stop[n] | hold[n]   (stop_clock per core)
```

## Bus arbitration

`bus_arbitrator` combines four blocks, each of which is a separate module.

**Counting requesters (`two_or_more`).** Core *n* is a requester when its
read or write line is high. `two_or_more` goes high when at least two of the
four request bits are set. The original circuit is a 16-input multiplexer
whose constant inputs are 0 for the codes 0, 1, 2, 4 and 8 and 1 for all
others. The RTL computes the same function as `(rw & (rw - 1)) != 0`.

**Enables (`arb_enable`).** Core *n* is connected to memory when it requests
and either it is alone, or the priority pointer points at it:

```
enable[n] = (rw[n] && !two_or_more) || (rw[n] && cpu_select == n)
```

At most one enable is high in any cycle; an assertion checks this.

**Steering (`data_select`).** The address and the read/write strobes of the
enabled core are multiplexed onto the RAM port. The data lines of the
original design are bidirectional, and a ring of tri-state buffers per core
sets their direction. Here each data bus is split into two nets, one in each
direction, and each has a drive-enable output:

- `cpu_rdata_oe[n]` means data flows from RAM to core *n*;
- `mem_wdata_oe` means data flows from a core to RAM.

Data reaches a core only when it is enabled and reading. Cores that are not
enabled see zero.

**Rotating priority (`cpu_select_counter`).** A 2-bit register counts up on
every clock edge: 0, 1, 2, 3, 0, and so on. Reset clears it asynchronously.
The pointer turns whether or not anyone is waiting, so every core gets
priority once in any four cycles.

**Halting a core (`stop_clock`, one per core).** A core that requests while
another core has priority must not finish its instruction. Its clock is
therefore held high for that cycle:

```
stop[n]       = (read[n] | write[n]) & two_or_more & (cpu_select != n)
core_clock[n] = clock | stop[n]
```

Because the clock is ORed, it can only be stretched. No extra rising edge can
appear, provided `stop` settles while the clock is high. `stop` is derived
from signals that change at the rising edge. In the original gate-level
circuit this path is short:

- about 40 ns for the pointer register and adder;
- about 36 ns for the multiplexer;
- against a 1000 ns clock period.

The RTL has zero delay.

The consequence for timing is as follows:

- A memory access without contention takes one cycle.
- With *k* contenders, a core waits until the pointer reaches it. That is at
  most three extra cycles with four cores.
- Contention is resolved again in every cycle. Once the pointer passes a
  waiting core, that core may have to wait for the pointer to come round
  again. It is still bounded by four cycles, because the pointer visits every
  core in four cycles.

`hera_multicore` is the arbitrator plus the four `stop_clock` instances. Their
`cpu_num` inputs are tied to 0 to 3.

## Transactional memory

### Associative memory

`associative_memory_cell` stores one bit:

- It is written at the clock edge while its word-select `s` and `we` are
  high, and cleared by reset.
- `q` is the stored bit when the word is selected.
- `m` is a mismatch flag: `mk & (k ^ stored)`. With a bit's mask `mk` at 0,
  that bit does not take part in the comparison.

The textbook cell compares against its data input. This cell has a separate
key input `k`, so that one word can be written while another address is being
searched. Tying `k` to `d` gives the textbook cell.

`associative_memory` is a WORDS x WIDTH array of these cells, 4 x 4 by
default:

- Word *i* matches when `m[i]` is low, that is, when no unmasked bit differs.
- The read bus `q` is the OR of all selected words.

### Transactional cache

`transactional_cache` has 16 entries. Each entry holds a 16-bit address tag,
a 16-bit data word and a valid bit.

- **Two tag arrays.** The tags are stored twice, in two 16 x 16
  `associative_memory` arrays that are always written together. One array is
  searched with the core's address (`hit`, `hit_data`). The other is searched
  with the address on the RAM bus (`snp_hit`). Both searches therefore happen
  in the same cycle.
- **Stores.** A store to an address the cache already holds updates that
  entry in place. A store to a new address takes the lowest free entry.
- **Full.** `full` means all 16 entries are valid. A store to a new address
  is then ignored, and its owner treats it as an overflow.
- **Write-back port.** `rd_idx`, `rd_addr`, `rd_data` and `clr` let the
  control logic read out the entries one by one and free each one.
- **Flush.** `flush` frees every entry at the clock edge.

### Transaction control (`tm_unit`)

One `tm_unit` sits between each core and the arbitrator. It decodes the
instruction word the core is executing: `16'h1112` is `TRST` and `16'h1113` is
`TREND`. Its states are:

| State | Entered | Behaviour |
|---|---|---|
| idle (TFLAG = 0) | reset, after commit or abort | the core's memory port passes straight through |
| transaction (TFLAG = 1) | the core executes `TRST` | stores go into the cache, so they never stall the core. Loads of held addresses are answered from the cache; other loads go to RAM through the arbitrator |
| commit | the core reaches `TREND` | the core's clock is held (`hold`). Each cycle in which the unit wins the bus, it writes the lowest valid entry to RAM and frees it. When the cache is empty, TFLAG clears and the core moves past `TREND` |
| aborted | a conflict (below) | the cache is flushed without any write. `aborted` stays high until the core's next clock edge, where the core jumps back to its `TRST` |

A transaction aborts in any of these cases:

1. **Read conflict.** Its load is granted the bus while another core's cache
   holds that address. The reader aborts. The other core's transaction
   continues.
2. **Foreign write.** Another core writes, for example by committing, an
   address that this core's cache holds.
3. **Overflow.** A store needs a 17th entry. This also raises `exception`.

The unit counts failed attempts. After the third abort of the same
transaction, `fail` goes high, and the core skips to the instruction after
`TREND` instead of retrying. An overflow sets `fail` immediately. The counter
clears on a successful commit, and on the next `TRST` after a failure.

Once a commit has started, it is not aborted. Two commits can be in progress
at the same time. Their writes interleave through the normal arbitration.

The core clock is `clock | stop | hold`. `stop` is computed from the unit's
bus-side request, not from the core's own request. As a result:

- a transactional store that stays in the cache never halts the core;
- the core is halted only while its commit writes wait for the bus.

## The cores

The HERA processor is not included: its datapath and instruction decoder come
from an earlier single-core design that is not reproduced here. What the
system expects of a core is the following:

- **Program counter.** It drives `core_pc` and receives `core_instr`
  combinationally.
- **Memory requests.** It drives `core_addr`, `core_read`, `core_write` and
  `core_wdata` during an instruction. Load data on `core_rdata` is taken at
  the core's next clock edge.
- **Clock.** It runs on `core_clock[n]` only. It must treat a clock held high
  as "the instruction has not finished yet".
- **Transactions.** At a clock edge where `tx_abort` is high, it branches back
  to its last `TRST`, or past its `TREND` when `tx_fail` is also high. It
  executes nothing at that edge.

`tb/hera_core_model.sv` is a behavioural core for the testbenches. It executes
only the instruction words used by the test programs:

| Word | Instruction |
|---|---|
| `0000` | halt |
| `E d vv` | SETLO |
| `A d a b` | ADD |
| `4 d o b` | LOAD |
| `6 d o b` | STORE |
| `1112` | TRST |
| `1113` | TREND |

It is not a HERA implementation.

No exchange (swap) instruction exists. The spin lock and semaphore style of
synchronisation, which needs such an instruction, cannot run on this system.
Transactions are the only synchronisation mechanism.

## Parameters

All defaults are in `rtl/hera_pkg.sv`:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CORES` | 4 | cores; the pointer width follows it |
| `ADDR_W`, `DATA_W` | 16, 16 | address and data widths; the RAM and ROMs are 2^16 words |
| `TC_ENTRIES` | 16 | transactional cache entries per core |
| `MAX_ATTEMPTS` | 3 | failed attempts before `fail` |
| `OP_TRST`, `OP_TREND` | `16'h1112`, `16'h1113` | transaction instruction words |

`instruction_rom` has an `INIT_FILE` parameter, a hex file for `$readmemh`.
Without one, the ROMs are empty and a synthesis tool reduces them to
constants. The testbenches fill them by hierarchical assignment.

## Where this RTL departs from the original design

- **Tri-state data buses.** They are replaced by split nets with drive
  enables.
- **Cell key input.** The associative memory cell has a separate key input,
  and its mismatch output is a plain XOR with a mask.
- **Conflicting abort rules.** The original design gives two rules for when a
  transaction aborts:
  - a core that reads memory held in another core's transactional cache
    aborts;
  - a transaction succeeds only if no other transaction read or wrote its
    data.

  Both are implemented: the reader aborts on a conflicting read, and a holder
  aborts when another core writes its data. Another core merely reading an
  address held here does not abort this transaction.
- **Ties.** The original design breaks ties between transactions that start
  together at random. Here starting a transaction never blocks, so no
  tie-break is needed. Conflicts are settled by the order in which the
  rotating pointer grants the bus.
- **Livelock.** The "livelock prevention" alternative to failing after three
  attempts is not described in enough detail to build. The unit only fails.
- **Details added by this design.** The following are not specified by the
  original design:
  - the hold signal and the one-cycle abort handshake;
  - the commit order (lowest entry first);
  - lowest-free-entry allocation;
  - dropping memory requests made while an abort is pending;
  - the RAM timing: synchronous write, asynchronous read.
- **Core and display outputs.** The HERA core, its register and flag display
  outputs, and the exchange instruction are not included.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares the module against values computed independently in the
  testbench;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

The small blocks are checked exhaustively or with random stimulus. The cache
and `tm_unit` tests use 4-entry caches.

Two testbenches run the whole `hera_system` at its default size, with four
behavioural cores:

- **`tb_hera_system`** runs five scenarios and counts each mechanism (halt
  cycles, contention cycles, commit writes, aborts, failures, exceptions,
  transaction starts). It fails if any mechanism never happens.
  1. All four cores run the same load/store sequence at once. The testbench
     checks the results, and that no core is halted more than three cycles in
     a row.
  2. Two cores race on address 2 without synchronisation. The interference
     shows in the result.
  3. The same race is run inside transactions. The result is correct, after
     exactly one abort and retry.
  4. A load of an address held by another transaction aborts three times,
     then fails past `TREND`.
  5. Seventeen transactional stores overflow the cache. This raises the
     exception, and nothing reaches RAM.
- **`tb_dining_philosophers`** runs four philosophers, one per core. Each eats
  twice, and each meal is one transaction: mark hungry, take both chopsticks,
  increment a meal counter, mark thinking, put the chopsticks back.
  Neighbours' commits abort each other. The testbench checks:
  - every meal that did not fail was counted exactly once;
  - everything ends back on the table;
  - no intermediate state (hungry, chopstick in hand) is ever written to RAM.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hera_system \
    rtl/hera_pkg.sv $(ls rtl/*.sv | grep -v hera_pkg) \
    tb/hera_core_model.sv tb/tb_hera_system.sv
./obj_dir/Vtb_hera_system
```

`tb_dining_philosophers` builds the same way. A unit testbench needs:

- `rtl/hera_pkg.sv`;
- its module and that module's submodules;
- `tb/tb_<module>.sv`.

`tb/tb_check.svh` is found through `-Itb`. `tb_instruction_rom` reads
`tb/rom_test.hex`, so run it from the same directory. The simulator is two-state,
so every testbench applies a reset with a rising edge before checking.

Remaining Verilator warnings are unused parameters and the unused drive-enable
outputs of `data_select`. The enables exist so that a tri-state version can be
built from them.
