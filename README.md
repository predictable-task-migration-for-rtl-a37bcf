# Predictable migration of locked cache lines between cores

In a hard real-time multi-core system, tasks often lock their code and data into the
cache. Locking turns cache behaviour into something a timing analysis can bound. The
trouble starts when the scheduler moves a task to another core. The locked lines stay
behind in the old core's private cache. The task would then run with cold caches,
which breaks the bound the locking was meant to give.

This design moves the lines with the task. The old core ("source") pushes each locked
line of the task over a cache-to-cache bus into the new core's ("target") L2. There the
line is installed locked again. Every step has a fixed cost, so the cost of the whole
migration is a closed formula in a few numbers:

| symbol | meaning | default |
|---|---|---|
| D | L2 access time in cycles (read, write or set scan) | 10 |
| B | one message on the cache-to-cache bus, in cycles | 2 |
| Cn | locked lines the task owns | per task |
| S | sets in the L2 (8 KB, 8-way, 32-byte lines) | 32 |

The scheduler can therefore account for migration when it decides what to move and
when. The RTL implements:

- the migration hardware of four cores;
- six schemes that trade hardware for speed;
- a start-up protocol that lets several migrations share the bus at once without ever
  colliding;
- a TDMA slot table that keeps ordinary bus traffic predictable while migrations run.

## One push transaction

Every scheme is built from the same four-step transaction:

1. read the line at the source (D);
2. send a PUSH message carrying tag, PID and the whole 32-byte line (B);
3. write it, locked, at the target (D);
4. send an ACK back (B).

Done strictly one after another, a line costs 2(B+D) = 24 cycles.

The bus is 256 bits wide, so one message carries a full line plus a small header
(`bus_msg_t` in `mig_pkg`). Messages are point to point: only the addressed core acts
on one.

## Finding the task's lines

The source must know which lines to move. There are two ways.

**Region Registers (RCM family).** The scheduler loads four start/end address pairs
that cover the task's locked memory. `region_addr_gen` walks every line address in
them in order. Each address costs one cache read. A line that turns out to be absent
or unlocked is simply not pushed, but its read still costs D. Four pairs of two 32-bit
addresses are exactly one 256-bit line, so the whole register set fits in one bus
message. The synchronised start-up below relies on this.

**PID scan (SSCM family).** Every L2 line carries an 8-bit process-ID tag next to its
lock bit. The push block reads each of the S sets once. One set read returns all 8
ways (`l2_cache` answers with a snapshot of the set). Every way that is valid, locked
and tagged with the task's PID goes into a set buffer. This needs no knowledge of
addresses, but always costs at least S reads.

In both families the read that picks a line up for migration also clears its lock
bit at the source. That frees the way for whichever task runs there next. This is a
choice of this design. The source description says nothing about when the hardware
unlocks the source copy; only its software alternative uses a thread to do it.

## The six schemes (`push_block`)

The schemes differ only in when the next read may start and when a read line may go
onto the bus. All six live in one engine, chosen per migration by `mig_mode_e`.

| scheme | rule | cost |
|---|---|---|
| RCM | next read only after the previous ACK | Cn·2(B+D) |
| CCMP | at most two lines read but not yet acknowledged | odd Cn: ⌈Cn/2⌉·2(B+D); even Cn: Cn/2·2(B+D)+D |
| SCMP | reads back to back; each line pushed as soon as it is read | Cn·D + 2B + D |
| SSCM | each set read once; buffered hits pushed one per ACK | S·D + Cn·(2B+D) |
| Slotted-SSCM | every line and every empty set takes one fixed slot of 2(B+D) | (empty sets + Cn)·2(B+D) |
| Slotted-SSCM pipelining | slots shrink to D, no waiting for ACKs | max(slots·D, (last line's slot+1)·D + 2B + D) |

Why each exists:

- **CCMP** overlaps two transactions. The second read runs while the first line is on
  the bus and being written.
- **SCMP** is the fastest RCM variant when B ≤ D/2. In that case the bus never falls
  behind the reads.
- **SSCM** pays for the set scan. It wins when locked lines cluster in few sets, or
  when the task's addresses are not known.
- **Slotted-SSCM** gives the bus pattern a fixed rhythm, so its issue times can be
  computed off-line from the sets the lines map to:
  - a set read that finds nothing is padded by D+2B to a full slot;
  - every line after the first one in a set costs a "fake" read of D, so it too fills
    a whole slot.
- **Slotted pipelining** applies the SCMP idea to the slotted rhythm.

How the engine works:

- A two-entry ready queue sits between the cache responses and the bus requester.
- A counter tracks outstanding acknowledgments.
- Each scheme is a different gate on "may read now" and "may push now". For example,
  CCMP reads only while queued plus outstanding lines are fewer than two.
- Any event (read response, fake-read end, ACK) lets the next action start in the very
  next cycle.
- `mig_cycles` runs from the first read to the cycle after the last acknowledgment.
  While the bus grants at once, it equals the formulas above exactly. The testbenches
  check this cycle for cycle.

Event counters (`line_reads`, `set_reads`, `fake_reads`, `added_delays`,
`skipped_reads`, `lines_pushed`) make each mechanism visible.

### Measured against the published figures

With the published line counts (fft 47, jfdctint 36, bs 10 lines), the design
reproduces every published delay for RCM, CCMP, SCMP, SSCM, Slotted-SSCM and
Slotted-SSCM pipelining. Examples: fft gives 1128, 576, 484, 978, 1128 and 484 cycles;
bs gives 240, 130, 114, 460, 768 and 320.

Departures:

- For CCMP, the source text's formula uses ⌊Cn/2⌋ for odd Cn. Its own measured values
  and its timing diagram need ⌈Cn/2⌉. The RTL follows the measurements.
- For crc, some published figures correspond to 38 lines rather than the stated 41:
  RCM 912 = 38·24 and SCMP 394 = 38·10 + 14. With 41 lines the design gives RCM 984,
  SCMP 424 and CCMP 504. Its SSCM value, 894, agrees with the published one.
  The published crc line layout is not given. With its 41 lines spread over 31 sets
  (one set empty), the slotted schemes give the published 1008 and 434 cycles.
- Worst case of the slotted schemes: all lines are packed into the fewest sets, and
  those sets come last. The design reproduces every published worst case except
  Slotted-SSCM for bs. There, 10 lines in 2 sets leave 30 empty sets, so 40 slots
  take 960 cycles; the published figure is 888.

## Synchronised parallel migrations (`snoop_ctrl`)

When several tasks move at once, running the migrations one after another wastes the
bus. RCM and Slotted-SSCM use the bus only in short, regular bursts. A chain whose
bursts are shifted by B cycles against another's never meets it. So up to ⌊D/B⌋ = 5
chains fit on one bus.

The difficulty is getting the chains started at exactly the right offsets, without a
global clock. It is solved from the target side:

1. **Load contexts.** Before the phase, the scheduler writes each target's context:
   source core, scheme, PID, the four Region Register pairs and a start offset
   (`target_ctx_t`, through `ctx_we`/`ctx_in`).
2. **Arm.** The scheduler pulses `arm`. The target whose offset is 0 sends an INIT
   message at once. The INIT carries its packed Region Registers in the data field.
3. **Timestamp.** Every snoop controller watches the bus. It records the cycle in
   which the phase's first message appears (`t_first`).
4. **Send own INIT.** Each target sends its own INIT at `t_first + offset`
   (`init_cycle`).
5. **Source set-up.** The source takes the region block into its registers (D
   cycles), answers with INIT_ACK (B), and starts its chain once the INIT_ACK has left
   the bus. So every chain begins 2B+D after its INIT, and the chains stay exactly
   `offset` apart.

Offsets are the scheduler's business. Within a group ("bucket") of simultaneous
chains, the offsets are B apart. A later bucket gets offsets past the end of the
earlier one, which the formulas make exactly predictable. All of them can be armed
together.

Constraints:

- A target can take part in only one chain per phase.
- A source has one push engine, so chains with the same source must sit in different
  buckets.

At the target, the snoop controller turns each PUSH into a locked install. The install
starts one cycle after delivery, and the ACK is requested right after the install's
D cycles. A two-entry push buffer and a four-entry ACK buffer only come into play if
the bus or the cache port is busy, which a correct schedule avoids.

There is one more hazard. A core can be target of one chain and source of another. Its
single cache port then serves both the reads of its own chain and the installs of the
incoming one. `core_node` gives installs priority over push reads, and push reads
priority over the core's own accesses. It counts every migration access that found
the port taken (`port_waits`). The schedule avoids these collisions when pairs that
share a core are given adjacent offsets. The end-to-end test runs such a case (1→2,
3→1, 0→3 at offsets 0, 2, 4) with zero bus stalls and zero port waits.

### Parallel or serialised?

A scheduler facing several migrations can run them as parallel RCM chains, or one
after another with the fastest single scheme, SCMP. The cost of the parallel phase is
its longest chain. The cost of the serial run is the sum of the SCMP delays. Parallel
wins when many migrations of similar size move together. Serial wins when there are
only a few, or when one chain is much longer than the rest.

`tb_mig_table7` runs the published mixes on four cores. The tasks have 47, 36, 10 and
41 lines.

| tasks | parallel | serialised SCMP | choice |
|---|---|---|---|
| 47, 36, 41 lines | 1128 | 1282 | parallel |
| 36, 41 | 984 | 798 | serial |
| 47, 10, 41 | 1128 | 1022 | serial |

Each choice agrees with the published one. The gaps to the published costs all come
from the 41-line task, which the published numbers count as 38 lines. A mix of all
four tasks would need at least five cores.

## The cache (`l2_cache`)

- One port. An access is accepted when `req_ready` is high. Its response
  (`rsp_valid`) comes in the D-th cycle. The port is free again one cycle later.
- Four operations:
  - `OP_READ`: ordinary lookup;
  - `OP_MIG_READ`: lookup that also unlocks the line;
  - `OP_SET_SCAN`: snapshot of a set, unlocking the ways of the given PID that are
    locked;
  - `OP_INSTALL`: write a line with tag, PID and lock bit.
- Each response carries the whole set (all ways' addresses, PIDs, data, lock bits and
  a match mask), so the PID scan needs one access per set.
- An install reuses the way that already holds the address. Otherwise it takes the
  first invalid way, then the first unlocked way. If all eight ways are locked, it
  refuses the line (`rsp_ok` = 0, counted as `install_fail` at the target). The
  scheduler is expected to pick targets with room.

The array keeps no LRU state and takes part in no coherence protocol. The migration
does not need them, and the cores' ordinary miss handling is outside this design.

## Bus (`mig_bus`)

- One message at a time, B cycles each. Messages can follow each other back to
  back, one every B cycles.
- Requesters: two per core. The push block sends PUSH and INIT_ACK; the snoop
  controller sends ACK and INIT.
- Arbitration is fixed priority with the grant in the same cycle. The source text
  leaves arbitration open because its schedules never contend.
- `stall_cycles` counts cycles in which a request waited. `msg_start` is the pulse the
  snoop controllers timestamp.
- An assertion checks that at most one grant is given.

## TDMA reservation for ordinary traffic (`tdma_arbiter`)

While migrations run, the cores and the memory controller still need the bus. The
slot table makes their worst-case wait computable:

- A period lasts D cycles and holds ⌊D/B⌋ slots of B cycles.
- While n_mig chains are running, the first n_mig slots of every period are reserved
  for them (`mig_slot`, `mig_idx`).
- The remaining slots go round robin to the NA ordinary agents. The round robin
  continues across periods rather than restarting.
- Without migration, an agent waits at most NA·B − 1 cycles. With migration, the bound
  becomes n_mig·B·⌈NA/(⌊D/B⌋ − n_mig)⌉ + NA·B − 1.

The testbench runs the published example (D = 12, B = 2, two chains, five agents). It
reproduces both its slot order and its bound of 17 cycles.

In `mig_system` the table runs with NA = 4 cores + 1 memory controller. n_mig is the
number of busy sources. The table publishes its grants as ports. The ordinary traffic
it would schedule, and moving the migration chains themselves into the reserved
slots, are outside this design. The migration bus is driven by `mig_bus` alone.

## Top level (`mig_system`) and how to use it

The top has one `core_node` per core (L2 + push block + snoop controller), one
`mig_bus` and one `tdma_arbiter`. Its parameters are NC = 4, SETS = 32, WAYS = 8,
D = 10 and B = 2. Per-core ports are unpacked arrays.

- `cpu_req_*` / `cpu_rsp_*`: the core's access to its L2. Use it to install a task's
  locked lines (`OP_INSTALL` with `cpu_req_lock`), or to read them back.
- Single migration: pulse `start[src]` for one cycle with `start_mode`,
  `start_target`, `start_pid` and `start_regions`. The regions matter for RCM, CCMP
  and SCMP only; the SSCM schemes scan by PID. Wait for `src_done[src]`, then read
  `mig_cycles[src]`.
- Parallel phase: write each target's context with `ctx_we`/`ctx_in`, then pulse
  `arm`.
- Region pairs are [start, end): the end is exclusive, and start ≥ end marks an unused
  pair.

Simulating with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_mig_system \
    -y rtl +libext+.sv rtl/mig_pkg.sv tb/tb_mig_system.sv
./obj_dir/Vtb_mig_system
```

The package goes first on the command line; `-y rtl` lets Verilator find the other
modules by name. The same works for every testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mig_system` | Default size, end to end. It runs all six schemes, a three-chain synchronised phase and a phase with bus contention. It counts each mechanism: reads, set scans, fake reads, padded slots, skipped reads, INIT and INIT_ACK, stalls and reserved TDMA slots. |
| `tb_mig_table7` | Default size. Parallel RCM chains against serialised SCMP for three task mixes, including the phase length, and the resulting choice. |
| `tb_push_block` | Every published delay of the six schemes, including the slotted worst cases. Also the INIT set-up time, and the data and addresses of every push. |
| `tb_l2_cache` | Latency, install policy, lock clearing, refusal when full. |
| `tb_region_addr_gen` | Address walk over empty, single and adjacent regions. |
| `tb_snoop_ctrl` | Install and ACK timing, INIT at first + offset. |
| `tb_core_node` | Port sharing between core, push reads and installs. |
| `tb_mig_bus` | Message length, arbitration, counters. |
| `tb_tdma_arbiter` | The published slot sequence, the wait bound with and without migration slots, and the switch back to plain round robin. |

## What follows the source and what is this design's own

**Follows the source:**

- the four-step transaction and its costs;
- the six schemes and their closed forms (CCMP as measured, see above);
- four Region Register pairs fitting one line;
- PID tags with set-wide scanning and a set buffer;
- slot padding and fake reads;
- INIT/INIT_ACK start-up costing 2B+D, with offsets counted from the first bus
  message;
- the ⌊D/B⌋ chain limit;
- the TDMA period, reservation and bound;
- the cache and bus sizes (8 KB, 8-way, 32-byte lines, 256-bit bus, D = 10, B = 2).

**This design's own choices:**

- four cores;
- widths: 8-bit PID, 16-bit offsets and counters;
- exclusive region ends;
- unlocking at the source during the migrating read;
- the install way choice, and acknowledging refused installs;
- buffer depths;
- fixed-priority bus arbitration;
- cache port priorities;
- where the D of the INIT set-up lies (the source's take-in of the region block);
- padding the last empty set in Slotted-SSCM;
- how the TDMA table switches at period boundaries.

**Not built:**

- the processor cores, the L1 caches, the shared L3 and the memory controller, which
  are outside the migration logic;
- the scheduler that forms pairs and buckets and computes offsets, which is operating
  system software;
- the tiled mesh the source sketches as future work.

With four cores, at most three chains can run at once: every target distinct, and no
cycle among the pairs. The bus itself could carry five.
