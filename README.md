# Impulse adaptable memory controller in SystemVerilog

Impulse puts a remapping engine in the main-memory controller. Part of the
physical address space is not backed by DRAM. Addresses there are
*shadow addresses*. The operating system programs a shadow descriptor so that
each 128-byte line the processor reads from a shadow region is assembled by
the controller. The controller gathers it from data scattered through real
memory: every stride-th field of an array of records, the elements an index
vector points to, a structure recoloured into one part of a physically indexed
cache, or a set of scattered pages seen as one superpage. The CPU caches and
the bus see only dense lines. Writes to a shadow line are scattered back the
same way.

This RTL models the memory-controller side of such a system:

- the bus-facing queues;
- the remapping controller with its descriptors and translation buffer;
- a small memory-controller cache with sequential prefetch;
- the DRAM back end of an HP-PA style server: dispatcher, slave memory
  controllers and data accumulators, driving SDRAM.

The processors, I/O adapters and DRAM chips are outside the design. They
appear as ports, and behavioural models of the DRAM exist only in the
testbenches.

```
 system bus ──► mmc_core ──┬─► mc_frontend (MCache + prefetcher) ── SA0 ──┐
 (reads, writes,          │                                               │
  copyouts, CLIENT_OP,    └─► remap_controller (7 descriptors + MTLB) ─ SA1 ─┤
  coherency answers)                                                       ▼
        ▲                                                   dram_dispatcher
        │ data return                                       │ RA0   │ RA1
   bus_arbiter                                              ▼       ▼
                                            smc0 smc2 (even banks) smc1 smc3 (odd banks)
                                               │    │                │    │
                                         accum_mux 0 (smc0, smc2)   accum_mux 1 (smc1, smc3)
                                               └──── MD busses ─────┘ → dispatcher → SD0 / SD1
```

All modules share `impulse_pkg`. It holds the address, line and tag types and
the bus and transaction structs.

## Transaction ordering in the MMC (`mmc_core`, `issue_arbiter`)

This is the hardest part of the design.

**The problem.** The bus is pipelined and split. A read is seen by the memory
controller several cycles before every other bus module has answered its
coherency check. The controller wants to start DRAM reads at once, but it may
return data only in bus order relative to writes of the same line.

**The queues.**

- *Wait queue* (8 entries). Every transaction except copyouts waits here in
  bus order until its coherency answer has arrived.
- *Read queue.* Each read is also put in the read queue when it arrives.
  From there it is issued *speculatively* (the fast path).
- *Ready queue* (1 + number of write-data registers = 5 entries). Writes move
  into it from the head of the wait queue. Copyouts, which need no
  coherency, enter it directly from the bus.
- *Slave counter* (8). It limits the number of transactions outstanding
  below the MMC.
- *Data return queue* (4 entries).

**Issue rule.** Each cycle at most one transaction is issued, chosen in this
order:

1. While a *drain* is in progress, the head of the ready queue, until the
   read that started the drain has gone.
2. Otherwise the ready queue, if it holds more than `READYQ_OFLOW` entries or
   the read queue is empty.
3. Otherwise the head of the read queue.

**Conflict detection and reissue.** A read that was issued early may have
read a line that an earlier write had not reached yet. Two checks catch this:

- When a write is issued, every read of the same line still in the wait
  queue is marked.
- When a read reaches the head of the wait queue, the ready queue is searched
  for a write to its line.

Either way the speculative data are thrown away. The read is placed behind
the writes in the ready queue and the drain flag is set. It is then issued
again as the single *logically ordered* read, tagged so that its data go
straight to the data return queue.

**Coherency answers.** They are combined by `coh_collector`:

- `COH_CPY`: another cache supplies the line, and the controller drops its
  data.
- `COH_SHR`: the shared bit is set on the return.

**Predictive flow control.** `CLIENT_OP` tells the other bus modules what they
may start. A queue counts as critically full when its free slots are fewer
than the transactions already in the bus pipeline (`PIPE_STARTED`) plus one.
The encoding is:

- When the wait queue is critically full, only copyouts are allowed.
- When the write-data registers are critically full, or the wait and ready
  queues both are, nothing is allowed.

A read is issued only when the data return queue has room for it. The
logically ordered read keeps one slot reserved.

Writes to the 4 KB page at `0x7FFF_F000` are register writes to the remapping
controller. Bits 6:2 of the address select the register, and register 31
selects the descriptor that registers 0-11 address.

## Shadow remapping (`remap_controller`, `shadow_descriptor`, `shadow_alu`)

An issued transaction with address bit 31 set goes to the remapping
controller. It matches the address against the `[saddr_start, saddr_end)`
region of each enabled descriptor and queues it in front of that descriptor.
A shadow address that matches no region completes at once with zero data.

Each descriptor serves one transaction at a time. For a line it computes
`count` item accesses:

- for objects smaller than a line, 128 / object size items;
- otherwise one item.

It sends one item per cycle to the MTLB. The ALU (`shadow_alu`) works in
pseudo-virtual offsets. With `soffset = saddr - saddr_start` and
`index = soffset / object_size`:

| mode | offset of item k |
|---|---|
| strided | `(index + k) * stride + object_offset (+ soffset % object_size for objects larger than a line)` |
| indirection vector | `iv[index + k] * stride + object_offset`; the vector element is read from memory first into a one-line buffer |
| page coloring | `(soffset / way_size) * color_size + soffset % way_size - color_offset` |
| superpage | `soffset` |

Data from DRAM come back in any order. Each is tagged with its descriptor and
item number. The assembly logic shifts the object out of its DRAM line, using
the line offset remembered for that item, and places it at `k * object_size`
in the dense line. A scatter sends each object moved to its DRAM offset,
with a byte mask.

Sizes are written as log2 values. An object may not cross a 128-byte DRAM
line; an assertion checks this.

## Translation (`mtlb`)

Pseudo-virtual offsets are translated through a flat page table, one 4-byte
entry per 4 KB page, whose base each descriptor holds.

**Entries.** The MTLB has 32 entries, 2-way set associative. Each entry holds:

- valid and locked bits;
- a tag of {descriptor, page number};
- a 16-bit reference count;
- the page table entry.

**Replacement.** The victim is the unlocked entry with the lowest reference
count (not-recently-used). All counts are cleared every 1024 translations.

**Misses.** A miss reads the whole 128-byte line of 32 entries into a buffer,
so that neighbouring pages then load in one cycle. The victim stays locked
while the read is outstanding.

**Write-back.** The first reference to a page sets its reference bit, and the
first write sets its modify bit. In both cases the entry is written back to
the page table before the access proceeds.

**Faults.** An entry without its valid bit raises `mtlb_exception`. Page
faults are not handled.

## MCache and prefetch (`mcache`, `prefetcher`, `mc_frontend`)

Non-shadow accesses pass through a 4 KB, 4-way cache of 128-byte lines. It
holds only prefetched data, with FIFO replacement.

**Prefetch.** When a demand read returns from DRAM, the next line is
prefetched. Other modes wait for empty queues or an idle controller. The line
is reserved in state *Prefetching*:

- A read that finds it waits for the prefetch and takes its data.
- Prefetching lines are never chosen as victims.

**Writes.** Every write invalidates the matching line, even one still being
prefetched; the late fill is then dropped.

**Completions.** The front end accepts an access only when its completion is
certain to find room. Writes complete once they are handed to the DRAM side.

## DRAM back end (`dram_dispatcher`, `smc`, `accum_mux`)

The back end has eight banks: bank = address bits 9:7.

- Slave memory controller `s` owns banks `s` and `s+4`.
- The even-numbered controllers share RA bus 0, the odd ones RA bus 1.
- Accumulate/Mux chip `m` collects read data from controllers `m` and `m+2`.

The dispatcher routes each request to the RA bus of its bank, and each data
item to the SD bus named by its tag. On a collision, round-robin arbitration
picks the winner and the loser keeps its request valid.

Each `smc` keeps a FIFO queue per bank and drives its SDRAM with one command
per cycle, round robin over banks. The timings are in cycles:

| Timing | Cycles |
|---|---|
| tRCD (ACT to READ/WRITE) | 3 |
| tAA (READ to data) | 3 |
| tRAS (ACT to PRE) | 7 |
| tRP (PRE to ACT) | 3 |
| tCCD | 1 |
| tDPL (last write data to PRE) | 2 |

Bursts are 4 cycles. Further behaviour:

- A row stays open until another row is needed or it has been idle for
  `ROW_HOLD` cycles.
- Every 1560 cycles all banks are precharged and refreshed.
- Assertions check tRCD, tRP and tRAS.
- Read issue stops while the accumulator that receives the data is
  critically full.

## Bus arbitration (`bus_arbiter`)

The bus is granted two cycles after the requests:

- First the holder of a long transaction (for at most 4 extra cycles).
- Then the memory controller's data return.
- Then the I/O adapter.
- Then the CPUs, in round robin.

## Where this RTL departs from the document or fills gaps

- Values the document leaves open were chosen here:
  - `READYQ_OFLOW` = 2;
  - queue depths: wait queue 8, data return 4, slave 8, per-bank 8,
    accumulator 8;
  - MTLB geometry and reset interval;
  - `ROW_HOLD` = 16;
  - tag layout;
  - log2 encoding of sizes;
  - register numbering.
- The slave queue is a counter. A normal access leaves it when the access
  completes, not when it leaves its bank queue.
- Bank queues are first in, first out. No reordering algorithm is specified.
- Not built:
  - the Direct RDRAM timing variant;
  - the per-descriptor buffer of prefetched shadow lines and its stride
    prefetch;
  - page-fault handling.

## Simulating

Every testbench in `tb/` is self-checking and prints one
`TB_RESULT checks=N failures=M` line. For example, the whole system at its
default parameters:

```
verilator --binary --timing --assert rtl/impulse_pkg.sv rtl/*.sv \
    tb/dram_model.sv tb/tb_impulse_top.sv --top-module tb_impulse_top
./obj_dir/Vtb_impulse_top
```

`tb_impulse_top` is the end-to-end test. Its four behavioural SDRAMs keep
each word equal to its own address until it is written. It runs these cases:

- sequential streams, and writes followed by reads of the same line;
- late coherency answers, shared and modified answers;
- flow-control stalls;
- gathers in all four remapping modes, and a scatter with read-back;
- a run past the refresh period.

Every data return is compared with a reference memory. At the end the test
prints how often each mechanism occurred and fails any that never did. The
block testbenches (`tb_<module>`) check each unit against an independent
model. `tb_smc` also measures the tRCD, tAA and tRP gaps in cycles.
