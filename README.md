# Temporal memory: result forwarding between redundant threads

In a redundantly multithreaded (RMT) processor, one SMT core runs two copies
of the same program. The *leading* thread runs ahead. The *trailing* thread
follows some instructions behind, and the outputs of the two threads are
compared to catch transient faults. The trailing thread can run faster if it
reuses what the leading thread has already worked out: branch outcomes and
targets, and load and store values. The usual way to pass these over is a
FIFO (an outcome queue, or delay buffer) between the leading thread's commit
stage and the trailing thread's fetch stage.

This design replaces the FIFO with a small associative memory, the
**temporal memory**. It differs from a queue in four ways:

* **Several results per cycle.** Four write ports take up to four results
  from a superscalar commit in one cycle. A queue takes one.
* **Repeats are not stored again.** If a result's key and value are already
  in the memory, it is not written a second time. A loop's branch target
  therefore takes one entry, not one per iteration.
* **It also serves as BTAC and BTIC.** The branch memory holds the PC, the
  branch target + 4 and the instruction at the target. The leading thread's
  fetch stage looks up every issued PC in it. A separate branch target
  address cache (BTAC) and branch target instruction cache (BTIC) are no
  longer needed.
* **Ordering without a queue.** Each entry records *when* it was written, in
  a 4-bit time stamp called FREE@acc. The trailing thread looks for its next
  entry by key *and* stamp. So two different values written for the same
  address reach the trailing thread in program order.

After reset, the memory also runs a cheap check of the external bus. It is
preloaded with the entry points of the start-up code, and the first
transfers of the leading thread are compared against them.

## Blocks

| module | role |
|---|---|
| `rmt_tm_system` | top: a branch memory and a data memory, each with its own start-up store |
| `temporal_memory` | one temporal memory (storage, associative search, write allocation, start-up check, ports) |
| `tm_access_counter` | the mode (start-up or lookup), the free-entry count and the two time-stamp counters |
| `tm_startup_rom` | programmable store of the start-up entry points |
| `tm_pkg` | widths, the mode enum, entry and write-port structs |

The processor core is not part of this RTL. Its decode, commit and fetch
interfaces are the ports of `rmt_tm_system`.

### Entries

| memory | key | payload | stamp | bits |
|---|---|---|---|---|
| branch | PC (32) | DEST = target + 4 (32), INST at target (32) | FREE@acc (4) | 100 |
| data | ADDR (32) | VAL (32) | FREE@acc (4) | 68 |

Each memory has 16 entries. The top adds the +4 to DEST, both for committed
branches and for programmed start-up entries. Each entry also has two state
bits:

* *valid*: the contents may be searched.
* *occupied*: the trailing thread has not yet read the entry.

An entry that has been read stays valid. It is still useful to the BTAC
lookup, but its slot may be reused.

## Operating modes

### Start-up mode (after reset)

1. While `rst_n` is low, both memories load all 16 entries in parallel from
   their start-up stores. Program the stores beforehand through the
   `*_prog_*` ports. The stores are not cleared by reset, so they keep their
   contents across a restart.
2. Each leading-thread access on the write ports is looked up by key:
   * If no entry has the key, the issued address was corrupted.
   * If the entry's payload differs, the fetched word was corrupted.

   In either case `fault_lane` marks the port and `restart_req` rises. The
   system is expected to reset and replay the start-up code.
3. The counter starts at 16 and goes down by the number of accesses in each
   cycle. When it reaches zero, `startup_done` pulses and the memory switches
   to lookup mode. The 16 start-up entries stay valid (the BTAC sees them)
   but are all free.

The check is only as good as the start-up code. It catches most bus faults
if the addresses and data words of the start-up accesses differ in as many
bit positions as possible.

### Lookup mode

**Leading writes** (up to four per cycle):

1. A result is *suppressed* (`w_dup`) if a valid entry, or a lower-numbered
   port in the same cycle, already holds the same key and payload.
2. The remaining results go into the lowest-numbered free entries. They all
   get the same stamp, the current `lead_stamp`, and become occupied.
3. `lead_stamp` and the free count go down by the number of entries stored.
4. If fewer entries are free than results to store, `l_stall` is raised in
   the same cycle and *nothing* is stored. The core must present the same
   results again. The branch memory and the data memory stall independently.
5. A read (no longer occupied) entry whose key receives a new value is
   invalidated.

**Leading BTAC/BTIC lookup** (branch memory only): the issued PC is searched
among all valid entries. On a hit, `fetch_next_pc` (DEST) is the next fetch
address and `fetch_tgt_inst` is the instruction at the branch target.

**Trailing reads** (`TRPORTS` ports per memory, one by default): the
trailing thread presents the PC of a decoded branch, or the address of a
decoded load or store.

1. An occupied entry with that key and with stamp equal to `trail_stamp` is
   returned and freed (`t_*_consumed`).
2. Otherwise, a valid entry that has already been read and has that key is
   returned without freeing it. This is the case of a result the leading
   thread suppressed as a repeat.
3. If neither exists, the access misses and the trailing thread has to fetch
   over the bus.

### How the time stamps work

This is the least obvious part of the design. Two 4-bit counters in
`tm_access_counter` run in step, one for each thread:

* **`lead_stamp`** is written into every entry stored in a cycle. It then
  goes down by the number of entries stored. All entries written in one
  cycle form a *group* and share one stamp. The next group's stamp is lower
  by the size of this group.
* **`trail_stamp`** is the stamp the trailing thread is looking for. With one
  read port, the group is read one entry per access. The counter counts the
  entries read from the group. After the last one (it was the only occupied
  entry still carrying that stamp), it goes down by the group size. From
  then on it equals the stamp of the next group.

The free count goes up by the group size only once the **whole** group has
been read. Entries of a partly read group are already free in the array but
are not yet counted as free. This keeps the number of outstanding stamps at
16 or fewer. Because the stamps are taken modulo 16, no two outstanding
groups can then share a stamp. If the free count rose on every single read,
the leading thread could write so far ahead that a new group got the stamp
of a group still being read.

With more than one trailing port (`TRPORTS` > 1), the ports are served in
program order within one cycle. Port 0 takes the oldest access. Entries of
the current group are read in parallel. If a lower port reads the last
entry of a group, the stamp moves on within the same cycle, so a higher port
already searches the next group. The free count then rises by the sizes of
all groups completed in that cycle.

Within a group, two entries can have the same key, for example two stores to
one address in one cycle. Ports are allocated in order to ascending entry
numbers, and the trailing search picks the lowest entry number, so the two
come out in port order.

### Limits

* **Suppression on data.** Say a value for an address is suppressed as a
  repeat, and a *different* value is then written for the same address
  while the first copy is still unread. When the trailing thread reaches the
  suppressed access, it finds the newer entry, with the current stamp, and
  takes it too early. Branches cannot hit this, because a PC always has the
  same target: there is no self-modifying code. A user who needs exact data
  forwarding in every case should turn suppression off for the data memory.
  That is a one-line change in `temporal_memory`: clear `w_dup`.
* **Trailing misses are possible.** They happen when a suppressed repeat's
  entry has been read and then reused. The core must then fetch over the bus.
  In the end-to-end test, about a quarter of the trailing branch accesses
  miss for this reason. With two trailing ports it is more than half. In
  that run, more than three times as many repeats were suppressed as in
  the one-port run, and each suppressed repeat is a possible miss. Data accesses with changing values never miss.
* **No error-detecting or error-correcting code is built.** The memory is a
  vulnerable structure and should be protected, but the entry formats hold
  no check bits.

## Interface of `rmt_tm_system`

All ports are synchronous to `clk`. `rst_n` is a synchronous, active-low
reset. Lookups (`fetch_*`, `t_br_*`, `t_dt_*`) and stalls are combinational
within the cycle. Entry and counter updates take effect at the next rising
edge.

| ports | direction | meaning |
|---|---|---|
| `br_wr[3:0]` (`br_write_t`: valid, pc, target, inst) | in | branch results from leading commit |
| `br_stall`, `br_dup[3:0]` | out | branch memory full; which results were suppressed |
| `dt_wr[3:0]` (`data_write_t`: valid, addr, val) | in | load/store results from leading commit |
| `dt_stall`, `dt_dup[3:0]` | out | same for the data memory |
| `fetch_valid`, `fetch_pc` → `fetch_hit`, `fetch_next_pc`, `fetch_tgt_inst` | in/out | leading fetch, BTAC/BTIC lookup |
| `t_br_valid`, `t_br_pc` → `t_br_hit`, `t_br_dest`, `t_br_inst`, `t_br_consumed` | in/out | trailing branch access, one element per trailing port, port 0 oldest |
| `t_dt_valid`, `t_dt_addr` → `t_dt_hit`, `t_dt_val`, `t_dt_consumed` | in/out | trailing load/store access, likewise |
| `br_prog_*`, `dt_prog_*`, `prog_rd_idx`, `*_prog_rd_*` | in/out | program and read back the start-up stores |
| `br_mode`, `dt_mode`, `br_count`, `dt_count`, `*_startup_done` | out | mode, counter value, end of start-up |
| `restart_req`, `br_fault_lane`, `dt_fault_lane` | out | start-up bus check failed |

The core must meet three conditions for the forwarding to be correct:

* The trailing thread asks only for results the leading thread committed in
  an earlier cycle.
* After a stall, the core re-presents the same results.
* The trailing thread presents its branches and loads/stores in program
  order.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | entries per memory, and words per start-up store |
| `WPORTS` | 4 | leading write ports |
| `STAMP_W` | 4 | FREE@acc width; `N` must not exceed `2**STAMP_W` |
| `TRPORTS` | 1 | trailing read ports per memory (`temporal_memory`, `rmt_tm_system`) |
| `KEY_W`, `PAY_W` | 32, 64 | key and payload widths of `temporal_memory` (the data memory uses 32, 32) |

The memory is a register array searched by per-entry comparators: one
comparator per entry on every port. The cost therefore grows as
`N × (WPORTS + 1 + 2·TRPORTS)` comparators. At the defaults, the top synthesises to about
5,300 flip-flops. About half of them are the two start-up stores.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=<n> failures=<n>`, and ends with `$finish`. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tm_pkg.sv tb/tb_rmt_tm_system.sv --top-module tb_rmt_tm_system
./obj_dir/Vtb_rmt_tm_system
```

| testbench | what it shows |
|---|---|
| `tb_tm_startup_rom` | programming, reprogramming and read-back of all entries |
| `tb_tm_access_counter` | start-up countdown and mode switch, free count, and both stamps against a reference model, with the memory driven full |
| `tb_temporal_memory` | runs the sequence in `tm_tb_core` on two memories, with one and with two trailing ports: start-up fault detection (corrupted data, corrupted address); ordered forwarding of changing values to repeated addresses; stall against a free-entry model; suppression, retained reads and the BTAC port with branch-like traffic; every stored entry read exactly once; parallel trailing reads with two ports |
| `tb_rmt_tm_system` | the whole system at default size: programming, a start-up with an injected bus fault and `restart_req`, a restart, then 4,000 cycles of a synthetic program on both threads. Every mechanism must occur at least once, and the counts are printed. It runs in a few seconds. |
| `tb_rmt_tm_system_tr2` | the same program with two trailing read ports per memory; values must still arrive in program order, and two entries must be read in one cycle in both memories |

The testbenches use only `$urandom`. They reset or drive everything they
read, so they run on a two-state simulator.

## What follows the original scheme, and what is this design's own

Taken from the scheme:

* The entry fields and widths, and 16 entries per memory.
* Separate memories for branches and data.
* Four leading write ports, one leading lookup port and one trailing read
  port. More trailing ports can be set with `TRPORTS`, because the scheme
  lets entries with the same stamp be read in parallel.
* A shared FREE@acc stamp for simultaneous writes.
* Repeat suppression, and use as BTAC/BTIC.
* The start-up preload from a programmable store, with an access counter
  that ends the start-up phase at zero.
* Bus-fault detection by comparison.
* Stalling the leading thread when the memory is full.

This design's own choices:

* **Separate counters.** The original scheme describes one counter that is
  the free count, is decremented by leading writes, is incremented by
  trailing reads, and is also written as the stamp. One register cannot
  serve as both a free count and a stamp that stays unique, so the free
  count and the two stamp counters are kept apart.
* Freeing at group granularity.
* With several trailing ports, continuing into the next group within one
  cycle.
* The stall protocol (all or nothing, per memory).
* Allocation of the lowest free entry first.
* Reading already-read entries when the trailing thread meets a suppressed
  repeat.
* Invalidating stale already-read entries.
* Treating a missing key during start-up as an address fault.
* The start-up store's programming port, and keeping its contents across
  reset.
* Synchronous reset.
* One counter and one start-up store per memory, where the system drawing
  shows a single counter box and a single start-up box.

Not built:

* The processor core.
* Error-detecting or error-correcting codes on the entries.
