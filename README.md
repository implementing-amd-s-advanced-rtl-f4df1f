# ASF support for an out-of-order AMD64 core

This is synthesizable SystemVerilog for the logic an out-of-order x86 core needs
to run AMD's Advanced Synchronization Facility (ASF). ASF is an experimental
instruction-set extension for lock-free programming and hardware transactional
memory. A program opens a *speculative region* with `SPECULATE`. It names the
memory lines it wants protected with `LOCK MOV` loads and stores, and closes the
region with `COMMIT`. The core rolls the region back if any of these happens:

- another core touches a protected line in a conflicting way;
- the hardware runs out of room to track the lines;
- an exception or interrupt arrives;
- the program executes `ABORT`.

After a rollback, execution continues right after `SPECULATE` with an error code
in rAX and ZF cleared, so the next instruction (`JNZ retry`) can branch to a
retry path. ASF promises that a region touching at most **four** lines will
eventually succeed if nothing else interferes.

This is hard on an out-of-order core because the core's own speculation and
ASF's speculation work against each other:

- memory micro-ops run out of program order;
- wrong-path loads can claim tracking resources;
- probes from other cores arrive at any moment;
- an abort can come while an instruction has only partly retired.

The blocks here solve each of these problems with small additions. The core's
own speculation machinery is left untouched.

## Blocks

| module | role |
|---|---|
| `asf_unit` | top: everything below, wired together; `mode_llb` picks the read/write-set store |
| `asf_region_ctrl` | region state, nesting, abort detection, redirect and abort code |
| `asf_fence_gate` | holds ASF memory micro-ops until the region's fence has retired |
| `asf_llb` | locked line buffer: protected lines, backup copies, staged for the 4-line guarantee |
| `asf_l1_spec` | L1 tag array with speculative-read / speculative-write bits |
| `asf_miss_buffer` | L1 miss buffer that counts in-flight ASF loads per outstanding line |
| `asf_pkg` | micro-op kinds, abort codes, address and line widths |

The rest of the core is outside this RTL: the reorder buffer (ROB), rename,
scheduler, load/store queues and cache data arrays. So is the coherence fabric.
The top's ports are the points where they connect.

## Ordering a region inside an out-of-order pipeline

The decoder turns `SPECULATE` into two micro-ops: `asf.spec`, followed by an ASF
memory fence, `asf.mfence`. `COMMIT` becomes `asf.commit`. Two rules then keep
every protected access inside its region:

1. **Region state changes only at retirement.** `asf_region_ctrl` reacts to
   `asf.spec`, `asf.commit` and `ABORT` only when they reach the retire stage
   (`retire_valid`, `retire_kind`). Nothing happens when they are decoded or
   executed.
2. **ASF memory micro-ops wait for the fence.** `asf_fence_gate` counts fences
   dispatched and fences retired. Each memory micro-op entering an issue slot
   stores the dispatch count as its *barrier*. An ASF micro-op's `issue_ok` bit
   stays low until the retire count reaches its barrier. Regular loads and
   stores are never held. A flush that throws away unretired fences reports
   how many (`fence_annul`).

Retirement is in order, so this gives

    issue(asf.spec) -> retire(asf.spec) -> retire(asf.mfence) -> issue(asf.memop)
                    -> retire(asf.memop) -> retire(asf.commit)

Two regions in a row are therefore serialised through ordinary dependencies.
The first region's accesses retire before its `COMMIT` does. The second region's
accesses cannot issue before its own fence retires, which comes after that
`COMMIT`. No pipeline flush or stall is needed. All of ASF's state (region
state, saved rIP/rSP and the read/write set) exists only once and is never
renamed.

The comparison is done modulo 2^`CNT_W` (6 bits). At most 31 fences may be in
flight.

## Holding the read/write set

There are two stores for the read/write set. Both are built, and the `mode_llb`
input chooses one. Change it only outside a region.

### Locked line buffer (`mode_llb = 1`)

`asf_llb` is a fully associative buffer. Each entry holds:

- a line address;
- a read bit and a write bit;
- a backup copy of the line, taken at its first speculative write;
- a count of the in-flight micro-ops that reference the entry;
- the sequence number of its oldest referencing micro-op.

An ASF access asks for an entry when it issues (`acc_*`). If the line is
already in the buffer, the access gets that entry. Otherwise it gets a free
one. The core keeps the returned index (`acc_idx`) with the micro-op. It later
reports the micro-op's retirement (`ret_*`) or annulment (`ann_*`) against that
index.

**Precise tracking.** An annulled wrong-path micro-op lowers the count. If no
retired micro-op has touched the line and the count reaches zero, the line
leaves the set again. Spurious lines therefore do not add contention or use up
capacity.

**Two stages.** The entries are split into two stages:

- Stage 1 holds at most `S1_N` lines that only in-flight (not yet retired)
  micro-ops reference.
- Stage 2 holds `S2_N` = 4 lines that retired micro-ops reference. These are the
  lines the four-line guarantee covers. When a referencing micro-op retires,
  its line moves from stage 1 to stage 2.

Both stages share one array of `S1_N + S2_N` entries. A stage bit says which
stage each entry is in, and moving a line only flips that bit.

If stage 2 is already full when a line must move into it, the LLB raises
`capacity` and the region aborts. Stage 1 only limits how far ahead the core
can run. A larger `S1_N` buys more memory-level parallelism; it never weakens
the guarantee.

**Replay.** An access that needs a new line while stage 1 is full does not get
an entry (`acc_grant` low). It waits. If some stage-1 line is referenced only by
micro-ops younger than the waiting one, the LLB raises `replay_valid` with
`replay_seq`. This asks the core to replay from that micro-op, which frees the
entry. Without this, younger accesses that ran ahead could fill stage 1 and
deadlock an older one.

Ages are measured from the ROB head (`rob_head_seq`), so sequence numbers may
wrap around.

**Probes and rollback.** The LLB checks every remote probe itself, in the same
cycle. A probe conflicts in two cases:

- it is a write probe to any protected line;
- it is a read probe to a line the region has written.

On a conflict, the LLB immediately rolls back the probed line only. It returns
the backup with the probe answer (`probe_data`) and writes it back to memory
(`wb_*`). The other core therefore never sees speculative data. The sticky
`conflict` flag then tells the region controller, which aborts in the next
cycle.

On abort, the LLB walks all its entries, one per cycle, and writes back every
remaining backup. `busy` is high during the walk. On commit it simply empties.
Probes are still answered correctly during the walk.

### L1 speculative bits (`mode_llb = 0`)

`asf_l1_spec` is the L1 data cache's tag array with two more bits per line:
speculative-read (`sr`) and speculative-write (`sw`). Tags live in a RAM. The
state bits are flip-flops, so they can be cleared all at once. The bits are set
at the earliest point that is safe:

- **On a hit:** the lookup itself sets the bit, so no second lookup is needed.
- **On a fill:** the fill arrives from `asf_miss_buffer`. The line comes in
  with `sr` set only if the miss buffer still counts an in-flight ASF load for
  it. The buffer counts merging and allocating ASF loads, and subtracts annulled
  ones. Loads can only retire after their miss has been resolved, so the count
  is exact. An ASF load that was on a wrong branch, and whose line arrives
  after the region has already ended, therefore does not leave an *orphan*
  `sr` line behind.
- **On store-to-load forwarding:** an ASF load that took its data from an
  older store never looks in the cache. The core presents it on the `stlf_*`
  port. If the line is present, it gets `sr`. If not, the cache installs a
  *monitor-only* entry: a valid tag with no data behind it, which exists only to
  catch probes.

A conflicting probe does two things: it invalidates a written line (the partial
rollback), and it sets the sticky `conflict` flag.

The pre-speculative value of a written line is kept in the next cache level.
Before the first speculative store to a dirty line, `wb_req` asks for that line
to be written back (cleaned). Commit clears all `sr`/`sw` bits and drops the
monitor-only entries. Rollback also invalidates every `sw` line.

The cache variant gives **no** four-line guarantee. A refill may have to evict
a line that holds `sr` or `sw` when both ways of its set are protected. This
raises `capacity` and aborts the region. The victim choice avoids this when it
can, but with 2 ways, 3 protected lines in one set always abort. Only the LLB
variant keeps the architectural promise.

## Aborts

`asf_region_ctrl` checks for an abort in every cycle of an active region. If
several causes arrive in the same cycle, the one highest in this list wins, and
its code goes into rAX:

| reason | code |
|---|---|
| contention (tracker `conflict`) | 1 |
| capacity (tracker `capacity`) | 2 |
| exception or interrupt (`exc_event`) | 4 |
| `ABORT` retiring | 3 |
| disallowed instruction retiring, or nesting deeper than 255 | 5 |

An abort lasts one cycle, during which the controller drives:

- `abort_pulse`;
- `redirect_rip` and `redirect_rsp`: the values saved when the outermost
  `asf.spec` retired;
- `abort_rax` and `abort_zf = 0`.

The core then flushes the pipeline and restarts fetch, as it would for a
mispredicted branch. No other register is restored. The same pulse rolls back
the active tracker.

Three timing details matter:

- **Stores in the abort cycle.** A store may retire in the very cycle the abort
  is detected. To catch it, `track_en`, which gates all ASF marking, stays high
  through the abort cycle and drops only one cycle later. The store is
  therefore tracked, and the rollback undoes it.
- **Abort against `COMMIT`.** An abort raised in the same cycle as the
  outermost `COMMIT` retires beats the commit: the requesting core wins.
- **Partly retired instructions.** An instruction split into several micro-ops
  (for example `CALL` or `RET`) may have partly retired when the abort hits.
  The abort resets rIP and rSP to consistent values, which covers this case.

**Nesting** is flattened. The controller counts `SPECULATE`s in an 8-bit depth
counter. Only the outermost `COMMIT` commits (`commit_pulse`), and only the
outermost `SPECULATE` saves rIP/rSP. A `COMMIT` outside any region is ignored
and flagged on `commit_error`.

## Top-level interface (`asf_unit`)

| group | signals | notes |
|---|---|---|
| retire | `retire_valid`, `retire_kind`, `retire_next_rip`, `retire_rsp`, `exc_event` | one micro-op per cycle; `asf.mfence` retirement also feeds the fence gate |
| region | `in_region`, `depth`, `commit_pulse`, `commit_error`, `abort_*`, `redirect_*` | `commit_pulse` is registered, one cycle after `COMMIT` retires |
| dispatch | `fence_dispatch`, `fence_annul`, `mop_dispatch`, `mop_slot`, `mop_is_asf` → `issue_ok[7:0]` | 8 issue slots |
| access | `acc_valid`, `acc_line`, `acc_write`, `acc_asf`, `acc_seq`, `acc_old_data`, `rob_head_seq` → `acc_hit`, `acc_go`, `acc_llb_idx`, `replay_*`, `clean_wb_*` | `acc_go` low means wait for an LLB entry |
| LLB bookkeeping | `mem_ret_*`, `mem_ann_*` | LLB entry index of a retired or annulled ASF micro-op |
| misses | `miss_*`, `ld_annul_*`, `fill_*`, `mem_req_*`, `evict_*` | miss-buffer index travels with the request and the fill |
| forwarding | `stlf_valid`, `stlf_line` → `stlf_ready` | a fill in the same cycle has priority |
| probes | `probe_valid`, `probe_line`, `probe_write` → `probe_conflict`, `probe_data*`, `l1_probe_hit` | answered combinationally |
| write-back | `wb_valid`, `wb_line`, `wb_data`, `llb_busy` | backups going back to memory |

Addresses are 42-bit line addresses: a 48-bit physical address with 64-byte
lines. Line data is 512 bits wide. Every port accepts one request per cycle.

## Sizes and where they come from

| parameter | value | origin |
|---|---|---|
| LLB stage 2 (`S2_N`) | 4 lines | the architectural minimum the guarantee requires |
| LLB stage 1 (`S1_N`) | 4 lines | chosen; it only needs to be "small" |
| L1 geometry (`SETS`×`WAYS`) | 512×2, 64-byte lines (64 KB) | chosen to match AMD L1 data caches of that time |
| miss-buffer entries | 8 | chosen |
| issue slots / fence counter | 8 / 6 bits | chosen |
| ROB sequence number | 7 bits | chosen |
| nesting depth counter | 8 bits | chosen |
| abort codes | see table above | chosen |

Everything not marked as the architectural minimum can be changed through the
modules' parameters. `asf_unit` itself has no parameters. It uses the defaults
above, and its port widths assume them.

## Limits and departures

- The cache-based variant does not give the four-line guarantee (see above). In
  this design it is a second mode of equal standing; the LLB mode is the one
  that meets the architecture.
- The L1 block holds tags and state only. The data array, the next cache level
  and the memory system are outside. The LLB's backups are written to memory
  through `wb_*`, and the coherence answer uses `probe_data`.
- Probes are answered in the cycle they arrive. A real fabric may need a
  registered answer; the rollback data is ready in the same cycle either way.
- A stage-1 line stays listed under its oldest referencing micro-op even after
  that micro-op is annulled. Replay decisions are therefore conservative: they
  may skip a replay that would have been possible, but they never replay an
  older micro-op.
- The miss buffer counts ASF loads only. An ASF store that misses gets its
  `sw` bit when it performs on the line after the fill, not with the fill.
- The `WATCHR`, `WATCHW` and `RELEASE` instructions are not supported.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`:

| testbench | what it covers |
|---|---|
| `tb_asf_region_ctrl` | nesting, every abort reason and its code, abort vs. COMMIT, tracking kept on during the abort cycle |
| `tb_asf_fence_gate` | fence holding, plain micro-ops passing, back-to-back regions, annulled fences, counter wrap |
| `tb_asf_miss_buffer` | the orphan case, merging, overflow, and 1500 random operations checked against a reference model |
| `tb_asf_llb` | stages, precise tracking, replay and stall, capacity, probe rollback, full-rollback timing (one entry per cycle) |
| `tb_asf_l1_spec` | marking, probes, monitor entries, victim choice, capacity, commit and rollback |
| `tb_asf_unit` | the whole unit at default sizes, end to end (see below) |
| `tb_asf_list_walk` | workload: a linked-list search in one region, with a mispredicted loop branch |

`tb_asf_unit` runs both modes: a DCAS-style commit, contention with partial and
full rollback, capacity, replay, nesting, `ABORT`, a conflict on a line flagged
by the miss buffer, the orphan case, store-to-load forwarding, the clean
write-back, and a store in the abort cycle. It counts each mechanism and fails
if any of them never happened.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_asf_unit rtl/asf_pkg.sv tb/tb_asf_unit.sv
    ./obj_dir/Vtb_asf_unit

`tb_asf_list_walk` searches lists of 1 to 5 nodes, one line per node. At
each node the loop branch is mispredicted, so one ASF load goes to a
wrong-path line and is annulled afterwards. The test checks two things:

- the wrong-path lines never stay protected;
- lists of up to four nodes commit, and a five-node list aborts with the
  capacity code.

Replace `tb_asf_unit` with any other testbench name. To lint the RTL alone:

    verilator --lint-only -Wall -Irtl -y rtl rtl/asf_pkg.sv rtl/asf_unit.sv

Lint reports a few warnings, none of them circuit problems:

- The helper functions in `asf_l1_spec` use only part of their argument (unused
  bits).
- The reset is used both asynchronously, by the flip-flops, and synchronously,
  by the `disable iff` of the assertions.
