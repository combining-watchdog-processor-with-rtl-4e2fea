# Watchdog-controlled instruction cache locking

A real-time system with an instruction cache has two problems. Its fetch
times depend on the cache's history, so the worst-case execution time is
hard to bound. A fault can also send the processor off its program's path.
A watchdog processor solves the second problem: it watches the instruction
stream and compares it with reference *signatures* placed at the start of
every basic block. Cache locking solves the first: once the right blocks
are in the cache and the cache is locked, their timing is known.

This design uses one piece of hardware for both. Every watchdog signature
carries one extra bit, the *cache-control bit*. The watchdog already reads
each signature to check control flow, so it also takes that bit and
tells the cache controller whether fetched blocks may enter the cache:

* bit = 1: the cache is unlocked. Blocks fetched from now on are loaded and
  displace older contents. The basic block (vertex) is "selected": its
  blocks are to be loaded and kept.
* bit = 0: the cache is locked. Nothing already in it can be displaced, and
  missed blocks are served without being stored.

The state holds until the next signature. Which vertices get a 1 is decided
offline by a selection tool, for example a genetic algorithm that minimises
system utilisation under cache-response-time analysis. Its output is only the
value of these bits, so the code layout never changes, and the hardware
needs no table of locked addresses.

The locking is *full* (the whole cache is locked or unlocked) and *dynamic*:
the contents change during the run, at vertex granularity, inside a task
and between tasks.

## Block diagram

```
  main processor fetch port                      main memory (block port)
        |  ^                                             ^   |
   req  |  | instr                               mem_req |   | mem_rsp (4 words)
        v  |                                             |   v
  +---------------------- icache_ctrl ---------------------------+
  |  direct-mapped array (icache_array), LINES x 4 words         |
  |  one-block line buffer, fill / bypass decision  <-- lock_i   |
  +--------------------------------------------------------------+
        | every delivered word (snoop)                 ^ cache_lock
        v                                              |
  +---------------------- watchdog_processor ---------------------+
  |  wdp_cfc: signature check  -> cfe (control-flow error)         |
  |  wdp_lock_ctrl: lock state from cache-control bit --------------+
  |  context port (save/restore at task switches)                 |
  +---------------------------------------------------------------+
```

`ft_rt_system` is the top. The main processor and main memory are outside
it. Their ports are brought out.

## Signatures

The processor is MIPS R2000 compatible, and it fetches the signatures and
executes them as no-operations. A signature here is the instruction
`ori $zero, $zero, imm16`, i.e. the word `0x3400_0000 | imm16`. Writing
register zero has no effect. The immediate is split as follows:

| bits  | meaning                                                        |
|-------|----------------------------------------------------------------|
| 15    | cache-control bit: 1 = unlock (vertex selected), 0 = lock      |
| 14:0  | reference signature of the basic block this word starts        |

The reference is a 15-bit compaction of the block's instructions. These are
the words after the signature, up to but not including the next signature.
Starting from 0, each word `w` updates the running value as

```
acc' = rotl1(acc) ^ w[14:0] ^ w[29:15] ^ {13'b0, w[31:30]}
```

A code-generation tool computes the reference the same way
(`wdp_pkg::compact`, `wdp_pkg::encode_sig`). The opcode, the field widths
and the compaction function are choices of this implementation. Only the
existence of the one control bit and its polarity are given by the
architecture.

## Control-flow checking

`wdp_cfc` sees every word that the cache hands to the processor, in program
order. This assumes an in-order processor without wrong-path fetches.
When a signature arrives:

1. If a block is open, its running signature must equal the reference that
   opened it. On a match `ok` pulses. On a mismatch `cfe` pulses, and the
   watchdog's sticky `cfe_o` flag is set until `err_clr_i`.
2. The new reference is stored, and the running signature restarts at 0.

Every other word is folded into the running signature. A jump into the
middle of a block, a skipped or corrupted instruction, or a jump out of a
block before its end all show up at the next signature. Nothing is checked
before the first signature after reset or after an idle context is loaded.

## When the lock bit takes effect

This is the subtle part. The cache decides whether to store a missed block
in the cycle that block's requested word is delivered. In that same cycle the
watchdog decodes the word. If the word is a signature, its own bit already
decides the fate of the block that holds it (`wdp_lock_ctrl.lock_o`).
Otherwise the held state decides. The whole vertex, signature included, thus
runs under the vertex's own bit, as the selection rules assume: all blocks
of a selected vertex are loaded, and none of an unselected one.

## The cache

`icache_ctrl` is direct mapped, with four 32-bit instructions per line
(one *main memory block*). LINES defaults to 4096. It can be set to any
power of two; the architecture was evaluated at 64 to 4096 lines.

* Hit: the word comes back one cycle after the request is accepted. A new
  request is accepted in that same cycle, so hits stream at one per clock.
* Miss: two cycles to reach memory, plus the memory latency. The memory port
  moves one whole block per request.
* The last block read from memory stays in a one-block **line buffer**.
  Later fetches from that block hit there. The architecture's timing model
  charges a block that is not locked in the cache one miss per visit, not
  one per instruction (`T_miss + T_hit * I` per vertex). The buffer makes
  that true.
* A line-buffer hit while the cache is unlocked also writes the buffered
  block into its line, if it is not there yet. Without this, a block first
  met under a lock (for instance the last line of an unselected vertex that
  a selected vertex shares) would never enter the cache, even when the
  selected vertex runs.

Assertions in `icache_ctrl` check the bus rules: a memory request is held
until accepted, no memory response arrives unasked, and a processor request
is held until accepted.

## Preemptive multitasking

A preempted task must resume with its own lock state and its own
half-finished check, or both the timing analysis and the error detection
break. The watchdog therefore has a context port:

* `wdp_ctx_o` is the state to save: whether a check is active, the
  reference, the running signature and the lock state, 32 bits in all
  (`wdp_pkg::wdp_ctx_t`).
* `wdp_ctx_load_i` with `wdp_ctx_i` loads a state in one cycle. The
  scheduler loads an idle state (`active = 0`) for a task that starts from
  its beginning, and the saved one for a task it resumes.
* `wdp_mon_en_i` low makes the watchdog ignore fetched words, so code
  without signatures (the scheduler, interrupt entry) runs unchecked and
  leaves the state alone.

Words fetched with monitoring off still pass through the cache under the
lock state in force at that moment. If the interrupted task was running
unlocked, scheduler code can displace its blocks. A scheduler that must not
disturb the cache should run from code the analysis accounts for, or
switch to a locked idle context first.

The context port and the monitor enable are additions of this
implementation. The architecture targets preemptive systems but does not
say how the watchdog handles a task switch.

## What the locking costs

Locking adds very little to the watchdog: one flip-flop for the lock
state, a two-input multiplexer that lets a signature's own bit through in
its cycle, and two event gates. After coarse synthesis with Yosys,
`wdp_lock_ctrl` is 13 word-level cells and 1 flip-flop, and the whole
watchdog is 51 cells and 33 flip-flops. The cache itself needs only one
extra input, the lock, which gates the line write on a miss. Only the line
buffer (one block, its tag and two flags) was added for timing.

Finer control needs no new hardware. Extra signatures can be inserted at
cache-block boundaries inside a basic block, so that each block gets its own
bit. The watchdog checks and locks per signature whatever the signature's
position; a signature with an empty block ahead of it simply checks nothing
new. This costs code size and fetch time, not logic.

## Interface summary (`ft_rt_system`)

| port group | signals | notes |
|---|---|---|
| fetch | `cpu_req_valid_i/ready_o/addr_i`, `cpu_rsp_valid_o/instr_o` | byte address, word aligned; hold the request until ready |
| memory | `mem_req_valid_o/ready_i/addr_o` (block address, 28 bits), `mem_rsp_valid_i/line_i` (128 bits) | one outstanding request |
| watchdog | `wdp_mon_en_i`, `wdp_ctx_load_i`, `wdp_ctx_i`, `wdp_ctx_o`, `wdp_err_clr_i`, `cfe_o`, `cfe_pulse_o`, `cache_lock_o` | |
| events | `ev_hit_o`, `ev_lbuf_o`, `ev_fill_o`, `ev_bypass_o`, `ev_sig_o`, `ev_ok_o`, `ev_lock_o`, `ev_unlock_o` | one-cycle pulses for counters |

Reset is asynchronous and active low. After reset the cache is empty and
unlocked, and the watchdog is inactive.

## Files

| file | contents |
|---|---|
| `rtl/wdp_pkg.sv` | signature format, compaction, context type |
| `rtl/wdp_cfc.sv` | control-flow checker |
| `rtl/wdp_lock_ctrl.sv` | lock state from the cache-control bit |
| `rtl/watchdog_processor.sv` | watchdog: checker, lock control, error flag, context port |
| `rtl/icache_array.sv` | tag, data and valid storage |
| `rtl/icache_ctrl.sv` | cache controller with full locking and line buffer |
| `rtl/ft_rt_system.sv` | top |
| `tb/main_memory_model.sv` | fixed-latency block memory model (testbench only) |
| `tb/workload_runner.sv` | one task-set run for `tb_workload` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the module with a reference model written
independently inside the testbench. For the watchdog tests this includes a
bit-serial rewrite of the compaction. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_wdp_cfc`, `tb_wdp_lock_ctrl`, `tb_watchdog_processor`: random basic
  blocks, some corrupted (word dropped, changed, entry past the signature).
  Also covered: unmonitored words, context save/load/restore, and the
  error flag with its clear.
* `tb_icache_array`: random reads and writes against a shadow copy.
* `tb_icache_ctrl` (64 lines, memory latency 6): random code-like fetches
  over four times the cache size, with the lock toggled at random. Checks
  every word, hit/miss, line-buffer hit, fill/bypass and memory request
  count. It also checks the latency: 1 cycle per hit, latency + 2 per miss.
* `tb_ft_rt_system` runs at the default size (4096 lines). It builds two
  tasks with signatures and chosen lock bits. Task A is a loop with an
  if-then-else; it suffers one injected control-flow error and one
  preemption by task B, whose code maps onto A's lines. The run includes
  unmonitored kernel code and the context save and restore. Every fetch is
  checked as above. The bench also checks the property the locking exists
  for: once a selected vertex has run, all its fetches hit, until another
  task displaces it. Each mechanism is counted and must occur: hits,
  line-buffer hits, fills, bypasses, passed checks, the error, lock and
  unlock switches, the context switch and the inter-task misses.
* `tb_workload` runs a task set shaped like the evaluated ones at each
  of the seven evaluated cache sizes, 64 to 4096 lines, side by side
  (`tb/workload_runner.sv` holds one run). Scheduling is rate-monotonic and
  preemptive. The set has three tasks of about 1.6, 4.4 and 6.8 KB, each a
  loop of three if-then-else structures. Vertices are selected at random,
  never with two selected blocks of one task on the same line. Every job's
  fetch time must stay within the timing model's bound: the hit time per
  instruction; one miss per block of an unselected vertex each time it
  runs; one miss per selected block to load it; and per preemption, a
  reload of the selected blocks and the line-buffer block. All signature
  checks must pass. Each size runs about 95 jobs with 30 to 50
  preemptions. Every job stays within its bound, and all 1,620 closing
  signature checks per size pass.

Run any of them with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_ft_rt_system \
    rtl/wdp_pkg.sv rtl/*.sv tb/main_memory_model.sv tb/tb_ft_rt_system.sv
./obj_dir/Vtb_ft_rt_system
```

## How far to trust it, and where it departs

* The control-bit meaning (1 = unlock, 0 = lock) follows the architecture.
  The bit holds until the next signature, and the lock covers the whole
  cache. The cache is direct mapped with four-instruction lines, at the
  evaluated sizes.
* These are this implementation's own choices: the signature encoding, the
  compaction function, the 15-bit reference, and the handshakes and cycle
  counts. The hit and miss times are named in the timing model but given no
  values. Also chosen here: the line buffer (derived from the timing model),
  the fill from the line buffer, the rule that a signature's bit applies to
  its own block, the reset state, the sticky error flag and the
  context/monitor-enable ports.
* The main processor is not included, and neither is main memory (a model
  is in `tb/`) nor the offline selection tool. What the processor or system
  does after `cfe_o` (trap, restart) is left to the integrator.
* Static locking with a preload at start-up is not built, and neither is a
  partially locked cache. Neither belongs to the configuration this design
  implements.
* A jump from the start of one block to the start of another whose
  reference happens to match is not detected. That is an inherent limit of
  block-signature checking with a 15-bit reference.
