# SEMP: a two-thread SMT processor for an FPGA

SEMP ("Simply Efficient Multithreaded Processor") runs **two hardware threads
at the same time on one two-wide out-of-order core**. Each thread keeps its
own front-end and bookkeeping: program counter, branch predictor, rename map,
issue queue and reorder buffer. The two threads share the parts that do the
actual work: the ALUs, the load/store unit, the physical register file and
the caches. In every cycle, instructions from either thread can fill the
execution units, so one thread's idle slots are used by the other thread.

The core is wrapped in two memory systems:

* **Cache model (default, `MODEL = 0`).** An 8 KB direct-mapped instruction
  cache and an 8 KB two-way data cache sit in front of a DDR-SDRAM controller
  driving a 32 MB DDR-SDRAM.
* **Stand-alone model (`MODEL = 1`).** The core runs uncached from 16 KB of
  on-chip block RAM.

In both models a small loader copies the program from a USB interface chip
into main memory before the core starts.

All code is synthesizable SystemVerilog in `rtl/`. Each testbench in `tb/`
checks itself.

## Block map

```
 USB chip ──► semp_usb_loader ──┐
                                ▼
 semp_system ── semp_core ──► semp_icache ──► semp_ddr_ctrl ──► DDR-SDRAM
                   │     └──► semp_dcache ──┘   (or semp_bram_mem, MODEL=1)
                   │
   semp_fetch → semp_decode ×2 + semp_bpred ×2 → semp_rename
        → semp_rob ×2, semp_issue_queue ×2, semp_lsu (memory access queue)
        → semp_select → semp_prf → semp_simple_alu ×2, semp_complex_alu
```

`semp_pkg` holds the sizes and the structures passed between stages:
decoded instruction, renamed micro-op, completion report, retirement record
and memory request.

## Sizes

| Resource | Size | Note |
|---|---|---|
| Hardware threads | 2 | |
| Issue width | 2 simple-ALU operations + 1 complex + 1 memory per cycle | |
| Execution units | 2 simple ALUs, 1 multiply/divide unit, 1 load/store unit | |
| Physical registers | 92 × 32 bit, shared | |
| Reorder buffer | 24 entries per thread | |
| Issue queue | 8 entries per thread | |
| Memory access queue | 8 entries, shared | |
| Branch predictor | 512 two-bit counters and a 2-bit global history, per thread | |
| I-cache | 8 KB, direct mapped, 16-byte blocks | |
| D-cache | 8 KB, 2-way, 16-byte blocks, write-through | |
| Cache hit / miss | 1 cycle / up to 17 cycles | |
| Main memory | 32 MB DDR-SDRAM, or 16 KB block RAM | |

The original description does not say whether the reorder-buffer and
issue-queue sizes are per thread or total. Here they are per thread.

## Pipeline

Each stage takes one cycle:

| Stage | What happens |
|---|---|
| IF | The fetch selector chooses a thread. The I-cache returns an aligned pair of instructions. |
| ID | Both instructions are decoded. The thread's predictor is looked up. A jump, or a conditional branch predicted taken, redirects fetch here. |
| RN | Both instructions are renamed and dispatched to the reorder buffer, plus the issue queue or the memory access queue. The group goes in whole or waits whole. |
| IW | Ready entries are selected from both issue queues. |
| RR | The shared register file is read. |
| EX | The ALUs compute. |
| RW | The result is written, and completion is reported. |
| RT1, RT2 | Instructions retire in order, up to two per thread per cycle. |

With a one-cycle memory, the first instruction retires in cycle 9 after
start. `tb_semp_core` checks this.

Other paths through the pipeline:

* **Multiply and divide.** The EX stage of the complex ALU loops, and is
  followed by two RW cycles: LO first, then HI.
* **Loads and stores.** They go through EX (address), MA (data cache) and
  RW.

Only one thread enters the front end per cycle. The choice alternates between
threads, skipping a thread that is switched off or being flushed. Fetched
pairs wait in a two-entry queue shared by both threads, and one cache access
is outstanding at a time. A hit therefore sustains one instruction pair per cycle.

## How two threads share one register file

This is the core of the design.

**Register budget.** Each thread has 34 architectural registers: r0–r31 plus
HI and LO. Two threads pin down 68 physical registers at any time, which
leaves 92 − 68 = 24 free registers. That equals one thread's reorder-buffer
depth.

**Map tables.** `semp_rename` keeps two maps per thread:

* a speculative map, used by new instructions;
* a retirement map, updated only when an instruction retires.

**Free list.** The free list is one 92-bit vector shared by both threads.
A group of two instructions may need up to four new registers, because
MULT/DIV writes both LO and HI. If four are not free, the group stalls in
RN. With 24 spare registers this is the main stall in a busy program, and
the end-to-end test does reach it.

**Freeing.** When an instruction retires, the register previously mapped to
its destination is freed. The speculative map can only point to it if a
younger instruction was renamed while it was still mapped, and retirement is
in order, so no one can still read it.

**Within a group.** A dependency inside one group is resolved in the same
cycle. The second instruction sees the first instruction's new register, not
the table entry.

## Issue, wakeup and bypass

**Scoreboard.** The core keeps two bits per physical register:

* `ready`: the value is written.
* `spec_ready`: the value will be available by the time a consumer reaches
  EX.

**Wakeup timing.** When a simple-ALU operation is selected, its destination
is marked `spec_ready` in that same cycle. A dependent instruction can then
be selected in the next cycle. It reads the register file while the producer
is in EX, and gets the value over the **EX bypass** from the producer's RW
register. The register file also forwards a value being written to a read in
the same cycle (write-through). Together these let a chain of simple
operations issue back to back.

Results of the complex ALU and of loads have unknown latency. They mark
their register ready only when written.

**Selection.** `semp_select` looks at both issue queues together. It picks up
to two simple operations and one complex operation, oldest first within a
queue. Thread priority alternates every cycle, so neither thread starves.
Loads and stores do not use the issue queues.

## Branches and recovery

**Prediction.** `semp_bpred` is a gshare predictor:

* The index is PC[10:2] XOR the 2-bit history.
* Each entry is a 2-bit counter.
* Each thread has its own table and history.
* A speculative history is shifted at decode. The true history is rebuilt
  from retired branches.

**Resolution.** The simple ALUs resolve branches and register jumps. They
record in the reorder buffer whether the front end followed the right path.

**Recovery at retirement.** Recovery waits until the mispredicted branch
reaches the head of its reorder buffer and retires. Then, for that thread
only:

1. The reorder buffer, issue queue and memory-access-queue entries are
   squashed.
2. The speculative map is overwritten by the retirement map.
3. The free list gives back every register that only squashed instructions
   held.
4. The speculative history is restored.
5. Fetch restarts at the correct address.

The other thread is not disturbed. This is slower than recovering at
execute, but it needs no per-branch checkpoints.

BREAK and SYSCALL stop their thread in the same way and raise `halted[t]`.
There are no branch delay slots.

## Loads and stores

`semp_lsu` holds up to eight memory operations of both threads, in rename
order. It serves only the oldest one:

* A load leaves when its base register is ready.
* A store also needs its data register, and must be the oldest instruction
  of its thread. So memory is written only by instructions that will retire.

An access answers in one cycle on a D-cache hit. Entries of a flushed thread
are dropped when they reach the front. If such an entry's access is already
in flight, its result is discarded. Byte order is big-endian.

## Caches

* **I-cache.** 512 lines, index = address bits [12:4]. It returns the
  8-byte pair holding the requested address.
* **D-cache.** 256 sets of two ways, with one LRU bit per set. It is
  write-through without write-allocate:
  * a store that hits updates the cached block;
  * every store is also written to memory as a masked 16-byte write.

On a read miss, a cache sends its request to the memory controller in the
same cycle it finds the miss. It answers the core in the cycle the block
arrives, while writing the block into the array.

## DDR-SDRAM controller

`semp_ddr_ctrl` serves whole 16-byte blocks. The target device is x16 with
4 banks, 8192 rows and 512 columns, so a burst of 8 half-words is exactly
one block.

**Address map** (byte address):

| Bits | Field |
|---|---|
| [3:0] | within the block |
| [9:1] | column |
| [11:10] | bank |
| [24:12] | row |

**Per access.** Each access opens a row with ACTIVE, waits tRCD, and issues
READ or WRITE with auto-precharge. So every access costs the same.

**Requesters.** There are three, in fixed priority:

1. the I-cache;
2. the D-cache;
3. the loader.

When both caches ask at once, the I-cache goes first and the D-cache waits.

**Start-up and refresh.** After reset, the controller runs the standard
power-up sequence:

* wait T_INIT (200 µs at about 80 MHz);
* precharge all;
* load the extended mode register (DLL on);
* load the mode register with DLL reset, CL 2 and BL 8;
* two auto-refreshes;
* load the mode register again.

After that it refreshes every T_REFI cycles.

**Latency.**

* An idle read answers 9 cycles after the request. The miss the core sees
  is 11 cycles or less.
* A miss that arrives during a refresh can wait up to tRFC + tRP longer. The
  data-cache test allows up to 25 cycles in that case. Otherwise the
  17-cycle limit holds.

**DQ bus.** The controller shows the data bus as two 16-bit halves per clock
(rising and falling edge). The FPGA's double-data-rate I/O registers and the
DQS strobe belong to the pad ring, outside this design.

## Program loading

`semp_usb_loader` reads bytes from the USB chip's receive FIFO:

* `rxf_n` low means a byte is waiting.
* The loader drives `rd_n` low for `RD_CYCLES` cycles and takes the byte at
  the end.

The byte stream is a sequence of records:

1. a 4-byte start address;
2. a 4-byte word count;
3. that many 4-byte words.

All values are most significant byte first. A record with count 0 ends
loading and raises `start`, which lets the core run. Each word is written
through the memory port as a one-word masked block write.

## Top level

`semp_system` has only plain ports:

* USB FIFO pins;
* DDR command, address and data halves;
* `run`, `halted[1:0]`;
* a performance-event structure from the core;
* `mem_events` strobes: I miss, D miss, D hit, I-over-D conflict, refresh.

`MODEL` picks one of the two memory systems. Unused ports of the other model
are tied off.

## Verification

Each block has a self-checking testbench (`tb/tb_<module>.sv`). Each one ends
with a `TB_RESULT` line and has a cycle watchdog. The test stimulus is
random, checked against a reference model in the testbench.

| Testbench | What it checks |
|---|---|
| ALUs | Random operations against reference functions. The multiply/divide latency of 34 cycles to the HI write. |
| Decoder | Each instruction format. |
| Predictor | Gshare indexing and counter updates, including two updates in the same cycle. |
| Rename | Maps and free list, against a model with flushes. |
| Issue queues + select | Wakeup, selection limits and flushes. |
| Reorder buffer | In-order retirement, two per cycle, and flushes. |
| Register file | Ports and write-through. |
| LSU | Program order, store gating at the reorder-buffer head, alignment and extension, and flushes. |
| Caches | Random traffic against a shadow memory through the real controller and a DDR model. Hit latency 1 cycle, miss latency bound. |
| DDR controller | Priority order, the 9-cycle idle read, refresh rate, and zero protocol violations in the DDR model, which checks tRCD, tRP, tRFC, CL and bank state. |
| Fetch | The PC stream through redirects and flushes, one pair per cycle, and thread alternation. |
| Loader | Strobe timing, every word at its address, and `start`. |
| Block RAM | One-cycle answers and loader priority. |
| `tb_semp_core` | Two test programs, one per thread, against a memory with random delays. Expected results, a store on a wrong path never reaching memory, and every mechanism occurring. |
| `tb_semp_standalone` | The stand-alone model (`MODEL = 1`) runs the same programs from block RAM. The DDR pins must stay idle. |
| `tb_semp_system` | The full top at default parameters: a USB byte stream loads both programs into the DDR model, both threads run to BREAK, and the results are read back. It fails if any of these never happened: redirect, flush, rename stall, bypass, dual-thread issue, complex ALU use, I miss, D miss, D hit, I-over-D priority, refresh. |

The test programs are built by the small assembler in
`tb/semp_asm_pkg.sv`. They exercise arithmetic, logic, shifts, multiply and
divide (signed and unsigned), byte, half-word and word memory access, loops,
calls through JAL/JR, and a data-dependent branch that mispredicts.

## Where this design fills in or departs from the original

**Not described originally, so chosen here:**

* the instruction-set subset;
* fetch and issue policies;
* recovery at retirement;
* the speculative wakeup and bypass;
* the cache write policy and replacement;
* every DDR timing value and the address map;
* the USB chip interface and the load format;
* the reset addresses: thread 0 at 0x0, thread 1 at 0x1000.

**Left out:**

* The OChiMuS thread-control instructions are not defined anywhere, so they
  are not implemented.
* Exceptions, the coprocessor and unaligned loads/stores (LWL/LWR/SWL/SWR)
  are not implemented.
* ADD, SUB and ADDI do not trap on overflow.

**Departures:**

* Both system models live in one top, selected by `MODEL`.
* The stand-alone memory is 16 KB. One passage of the original ties 16 KB to
  8 block RAMs, another speaks of 16 block RAMs; the size is what matters
  here.
* A data-cache miss that collides with a DDR refresh can exceed 17 cycles.
* The "up to 10 stages" of the original is realised as the nine one-cycle
  stages listed above. The multiply/divide path is longer.
