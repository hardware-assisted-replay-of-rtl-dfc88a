# Record and replay hardware for a bus-based multiprocessor

A program that shares memory between CPUs can give a different result each time
it runs. The order in which CPUs reach a shared cache line changes from run to
run, and with it the values they read. That makes such bugs hard to chase.
This RTL records that order while the machine runs at full speed. It can then
force the same order on a second run, so the failing execution can be replayed
as often as needed.

It does this without touching the program and almost without touching the CPUs:

* **Snooping.** A logging board sits on the shared memory bus. The only
  accesses that can order one CPU against another are cache misses and
  invalidations on shared data, and those all appear on the bus.
* **IC-deltas.** Each CPU carries a small instruction counter. With every bus
  transaction it sends the number of instructions it retired since its last
  logged transaction: the *IC-delta*, 12 bits.
* **Records.** The board turns the transactions into a log of 2-byte records,
  each a (CPU, instruction count) pair.
* **Playback.** The log is fed back to the CPUs: "CPU 3 runs 17 instructions,
  then CPU 0 runs 402, ...". Each CPU stops after exactly its share.

The board has two logging modes:

* **Total order** puts all records into one serial schedule. Playback runs one
  CPU at a time.
* **Partial order** sorts the transactions into *slices* by the cache line each
  one touches. All CPUs in a slice run in parallel on playback, with a barrier
  between slices. A small associative queue, the scheduler, builds the slices
  on the fly.

The design targets a 16-CPU machine with write-back snooping caches. All
sizes are parameters.

## The pieces

```
             CPUs + caches (outside)                     logging disk (outside)
   retire/tx_fire/hold     bus snoop                      ^ disk_*    | play_rec_*
          |                   |                           |           v
   cpu_ic_unit x NCPU    logging_device ---------------------+   replay_controller
   (IC-delta counter)     page_status_table                  |   (starts CPUs group by
          ^               event_filter                       |    group, waits for done)
          |               event_buffer -> po_scheduler --+   |
          |               (partial order only)           v   |
          |                    total order ----> instruction_count_table
          |                                              v
          +---- delta request ------------------- log_buffer (record ring)
```

| Module | What it does |
|---|---|
| `logger_pkg` | Widths and types: bus transaction, event, log record. |
| `cpu_ic_unit` | One per CPU. While logging, it counts instructions since the CPU's last logged transaction and drives that count as the IC-delta. When the count is full it holds the CPU and asks for a *delta-overflow* pseudo-transaction. During playback it lets the CPU retire exactly the loaded count, then holds the CPU and reports "done" with the same pseudo-transaction. |
| `page_status_table` | One bit per 4 KB page; a 1 means the page is sharable. The OS writes it. Every bus address is looked up, and only sharable pages are logged. |
| `event_filter` | Classifies each transaction. READ, READ-MODIFY and INVALIDATE on a sharable page are loggable. A write-back (WRITE-REPLACE, or the WRITE-UPDATE of a cache that supplied a line) goes to the scheduler only. An INVALIDATE of a line in the logger's own page (the top page) is a pseudo-transaction. Everything else is dropped. |
| `event_buffer` | Partial order only. A FIFO between the bus and the scheduler, taking two events per clock (write-back first, then the transaction). |
| `po_scheduler` | Partial order only. The slice queue; see below. |
| `instruction_count_table` | Turns events into records and writes them into the log buffer. |
| `log_buffer` | A RAM ring of records, 2^25 deep. It drains completed records in order to the disk port and sends *delta requests* when it fills up behind an incomplete record. |
| `logging_device` | The board itself: all of the above except the CPU units, with the mode input. |
| `replay_controller` | Reads records back and starts the named CPUs. At the end of each group it waits until every CPU it started has reported done. |
| `replay_system` | The top: NCPU counter units, the board and the playback controller. |

The CPUs, caches, bus and disk are not part of the RTL. Their signals are the
top's ports.

## How a record is formed

A record must say how many instructions its CPU may run before it has to wait
for other CPUs. The logger only learns that number when the CPU's **next**
logged transaction arrives. So the instruction count table keeps, for every
CPU, a pointer to that CPU's *open* record in the log buffer. When CPU `c`
sends a logged transaction with IC-delta `d`, the table does two writes in one
clock:

* it completes `c`'s open record with `d`;
* it appends a new open record for this transaction.

A CPU's very first transaction instead appends a complete record
`{c, d}` (the instructions before it) followed by the open one. This keeps
every count within 12 bits.

On playback, the record in a transaction's position therefore runs the CPU from
that transaction up to, but not including, its next one.

The log buffer may only pass completed records to the disk, and an open record
at its head blocks the drain. Three mechanisms keep the log moving:

* **Delta overflow.** When a CPU's counter reaches 4095 without a logged
  transaction, the CPU issues a pseudo-transaction. This is an INVALIDATE to a
  line in the logger's page, carrying the full count. It is logged like any
  other event, with no address.
* **Delta request.** When fewer than `REQ_FREE` records are free and the head
  record is open, the board asks that record's CPU for a delta overflow. This
  happens once per head record.
* **Flush.** At the end of logging, each CPU issues one last pseudo-transaction
  and the host raises `flush_i`. The scheduler writes out all its slices. The
  remaining open records then leave with count 0, because they cover nothing.

Records are 17 bits: CPU (4), IC-delta (12), and a group-end bit. The group-end
bit marks the end of a playback group. In total order every record is its own
group; in partial order a group is one slice.

## The partial-order scheduler

This is the least obvious part. The scheduler is a ring of `NSLICE` slices
with a *head* (the oldest slice, next to be written out) and a *tail* (where
new events enter). Each slice has four parts:

* a lookup register (LR), which carries a moving event;
* a virtual presence register (VPR), one bit per CPU;
* control flags: search, store, set-vp, present;
* an associative memory with one entry per CPU (line, IC-delta, modify,
  match).

A new event enters the tail slice's LR and moves one slice toward the head per
*time step*. It stops at slice `k` and is stored into the slice it came from
(`k+1`) when either of these holds:

* **Same CPU.** `VPR[k][cpu]` is set: this CPU already has an event in slice
  `k` or a later one.
* **Conflict.** Slice `k` holds a conflicting access to the same line: any
  access if the new event writes, a write if it reads.

Storing sets the CPU's VPR bit and starts a *set-vp* wave. The wave travels
toward the head one slice per step and sets the CPU's bit in every slice it
crosses. Later events of the same CPU can therefore never overtake earlier
ones.

The slice just before the head has an all-ones VPR. A searching event
therefore always stops by the head.

With these rules, an event only depends on events in earlier slices. Replaying
the slices in order, with all CPUs of a slice in parallel, respects every
logged dependency.

One time step takes six microcycles, one per clock:

| µ-cycle | Action |
|---|---|
| 0 | Load the next event from the event buffer into the tail LR. |
| 1 | A searching LR reads its CPU's VPR bit; a wave stops if the bit is already set. |
| 2 | A present LR is stored. Other searching LRs match their line against the memory. A wave sets its VPR bit. |
| 3 | A searching LR is stored if a matched entry conflicts. |
| 4 | A storing LR writes into the slice to its right, sets VPR and becomes a wave. If that slice is the tail, the tail moves right. |
| 5 | All LRs shift one slice toward the head. The head slice may be written out. |

So the scheduler takes one event per six clocks.

**Forwarding.** Two dependent events can arrive back to back, for example a
read of line A and, right after, a write of A by another CPU. The second event
may then search slices before the first has been stored. In microcycle 4, a
searching LR in a slice that is just receiving a store compares itself with
the stored event. On a conflict it is stored one slice further out, and the
tail may move by two. Without this the loader would have to stall for a whole
time step.

**Write-out.** The head slice is copied into a holding register and sent to
the instruction count table, one entry per clock, in three cases:

* a set-vp wave reaches the head, so the head cannot receive anything more;
* fewer than four free slices remain past the tail (*overflow write-out*);
* a flush is requested and nothing is in flight.

While fewer than four slices are free, loading stops (*stall*) and events wait
in the event buffer. Write-back entries are passed out with a flag and dropped
before the table. They take part in conflicts only, so a read that follows
another CPU's copy-back is ordered after it.

## Playback

`play_i` switches every counter unit to playback. Records are offered on
`play_rec_*`. The controller then works group by group:

1. For each record of the current group, it starts the named CPU with the
   record's count.
2. When the group-end bit arrives, it takes no more records and waits until
   every started CPU has run its count and signalled "done" on the bus with
   its pseudo-transaction.
3. It then goes on to the next group.

Outside playback the CPUs run freely. During playback a CPU must not retire
while `hold_o` is high.

## Interface rules for the surroundings

* The bus model puts each CPU transaction on the snoop port in the same clock
  as that CPU's `tx_fire_i`. The top adds the IC-delta from that CPU's counter
  unit.
* With a READ or READ-MODIFY that another cache supplied, the bus model also
  gives `bus_wu_valid_i` and the supplier's number.
* `tx_counts_i` tells the CPU's counter that the transaction will be logged:
  READ, READ-MODIFY or INVALIDATE on a sharable page. The CPU knows this from
  its page tables. Only such transactions restart the count.
* A transaction's IC-delta counts the instructions retired before the
  instruction that caused it.
* A pseudo-transaction (`pseudo_fire_i`) must not coincide with a retire while
  `hold_o` is high. On the snoop port it must appear as an INVALIDATE of a
  line in the top 4 KB page.
* The board never stalls the bus. If the event buffer or the log buffer is
  full, an event is dropped and `lost_o` stays set. The disk must drain at
  least the long-run log rate.
* `mode_partial_i` and `play_i` may change only while `idle_o` is high and
  the log has been drained.
* After reset, and on `pst_clear_i`, the page status table clears itself one
  page per clock. At the default size that takes 2^20 clocks. Lookups read 0
  until `pst_busy_o` falls.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `NCPU` | 16 | CPUs (4-bit CPU number). |
| `NSLICE` | 16 | Scheduler slices. 16 captures nearly all the parallelism available. |
| `EVBUF_DEPTH` | 16 | Event buffer entries. |
| `LOG_DEPTH` | 2^25 | Log buffer records (64 MB of 2-byte records). |
| `REQ_FREE` | 4096 | Free records below which a delta request is sent. It must exceed the events already inside the board: up to `NSLICE*NCPU` in the scheduler plus the event buffer. |
| `PAGE_AW` | 20 | Page number width (32-bit addresses, 4 KB pages). |

Lines are 16 bytes (`LINE_OFS` in the package).

At a 20 MHz clock (50 ns per microcycle), the scheduler takes 3.3 million
events per second. The heaviest workload the sizes were chosen for logs
900,000 records and 530,000 write-backs per second, so that leaves ample
margin. At that rate the default log buffer holds about 37 seconds of history
before it depends on the disk.

## Where this RTL goes beyond or departs from the original scheme

Choices made where the scheme leaves a gap:

* **First-event record and group-end bit.** Both are described in "How a
  record is formed" above.
* **Counter restart.** Only logged transactions restart a CPU's counter, not
  every bus transaction.
* **Overflow point.** The counter overflows at 4095, the largest 12-bit
  count.
* **Scheduler write-out and stall.** The head is written out on a wave, on
  overflow (fewer than four free slices) or on flush. Loads stall under the
  same four-slice condition, where the original raises an interrupt when the
  tail meets the head. Searching events stop one slice to the right of the
  slice that blocks them.
* **One board, two modes.** Both loggers share one board with a mode input.
  The original describes them as two devices.
* **Playback input.** Playback reads records from a stream instead of first
  loading them into the log buffer RAM.
* **End of logging.** The flush at the end of logging, and how open records
  are handled, are this design's own.

Not built:

* **Run removal.** The original suggests merging consecutive records of the
  same CPU to shrink a total-order log, by about 12%. No hardware for it is
  given, so it is not built.
* **Outside parts.** The disk, the CPUs, the caches and the bus protocol are
  outside the RTL.

**A limit of the partial-order log.** The end-to-end test shows that every
load that went to the bus replays with the value it saw while recording.
Most cache hits do too. But a load that hit in its own cache after its CPU's
latest logged event can replay after another CPU's later invalidation of that
line, and so see the newer value. The reason: that CPU's instructions up to
its next event run in the slice of its latest event, and the invalidation is
only ordered against the logged events of the line. The total-order log
reproduces every load exactly. The test reports such differences (a few dozen
in some ten thousand loads) without failing. If exact cache-hit replay
matters, record in total order.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. The package must come first; the
tools find the other files by module name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/logger_pkg.sv tb/tb_replay_system.sv --top-module tb_replay_system
./obj_dir/Vtb_replay_system
```

| Testbench | Covers |
|---|---|
| `tb_replay_system` | End to end at a small size: 4 CPUs, a 512-record log, 256 pages. It records a random run of a coherent-cache model in each mode, drains the log and replays it, then checks every bus load's value, the per-CPU instruction totals and the group structure. It also checks that these all happen at least once: delta overflow, delta request, write-update, write-replace, forwarding, scheduler stall, overflow write-out, parallel groups, and both modes. |
| `tb_replay_system_full` | The same at every default size: 16 CPUs, 2^25 records, the full page table. Runs in seconds. Here the log never fills, so delta requests and stalls are counted but not required. |
| `tb_workloads` | Four full-size systems side by side, one per measured workload (a logic verifier and a layout program, each with 4- and 16-byte cache lines). The traffic mix is set so the bus and record rates are at least the measured ones, taken per 1000 clocks of a 20 MHz logger. Each run is recorded in both modes and replayed, and the run fails if the rates fall below those floors. The mix is heavier than the measured one, so this is a floor, not a copy of the workloads. |
| `tb_logging_device` | Both modes on random bus traffic. In total order the log must equal a reference model exactly. In partial order it checks per-CPU deltas, that no CPU appears twice in a group, and that every pair of conflicting transactions lands in correctly ordered groups. |
| `tb_po_scheduler` | Reproduces a known example placement, including forwarding. Then bursts against a blocked output (stalls, overflow write-outs) and random traffic, checking dependency order, exactly-once output and the one-load-per-six-clocks rate. |
| others | One per block: page table, filter, event buffer, instruction count table (including a worked example log), log buffer (including delta request and flush), counter unit, playback controller. |

`replay_bench` (in `tb/`) holds the CPU, cache and bus model shared by the
system tests. `workload_cell` wraps one full-size system with that model for
`tb_workloads`.
