# FTB-DIA: decoded x86 fetch blocks kept in memory, found by the branch predictor

An x86 front end spends much of its power and many of its cycles in the CISC
decoders. A trace cache avoids them by keeping decoded micro-ops in a
dedicated on-chip buffer. That buffer needs its own fetch engine and a lot of
area. This design keeps decoded micro-ops in **ordinary memory** instead.

The operating system gives each program a region of its virtual address space
called the **Decoded Instruction Area (DIA)**. When a fetch block has been
executed often enough, its committed micro-ops are written into DIA. The
**branch predictor** entry of that block records where the copy lives. The next
time the predictor predicts the block, the fetch request already carries the
address of the decoded copy. Fetch then reads micro-ops through the normal
instruction cache and sends them around the decoders.

No new cache, port or fetch engine is needed. The instruction cache does not
know whether it holds x86 bytes or micro-ops. The L2 sees the decoded words as
ordinary writes on its single port. The branch predictor's table, the Fetch
Target Buffer (FTB), grows three fields per entry.

The SystemVerilog in `rtl/` is synthesizable IEEE 1800-2017 and uses one package
of shared types (`dia_pkg`). `ftb_dia_frontend` is the top. Each block has a
self-checking testbench in `tb/`.

## The life of a fetch block

A *fetch block* is a run of instructions that starts at a branch target or
fall-through and ends with a branch. It is the unit that the predictor
predicts, that fetch reads, and that is stored in DIA.

1. **Predict.** Each cycle, `branch_predictor` looks up the current fetch
   address in the FTB, the perceptron, the indirect predictor and the RAS. It
   pushes one request into the 4-entry FTQ (`ftq`). The request holds the FTB
   entry, including `dvalid`, `daddr` and `dlen`, the predicted next address
   and a snapshot of the speculative histories.
2. **Fetch.** `fetch_unit` turns a request into instruction cache line reads.
   - If the request has `dvalid`, it reads `dlen` bytes starting at `daddr`.
     That is the decoded copy.
   - On an FTB hit without a copy, it reads the x86 bytes up to the
     fall-through.
   - On an FTB miss, it reads to the end of the line.

   Each line becomes a beat marked *decoded* or not.
3. **Decode.** `decode_bypass` sends decoded beats down a 3-stage fast path
   that does no work. Other beats go to the external CISC decoders, the slow
   path. Both paths are 3 stages deep, so control signals still cross the
   decode stages in the same cycles.
4. **Commit.** The back end commits the whole block. `dia_commit_ctrl` updates
   the FTB with it.
5. **Select.** Each FTB entry has a 4-bit hysteresis counter.
   - The same block committing again increments the counter.
   - A different block mapping to the same way decrements it. When it reaches
     zero, the entry is replaced and the new block starts at 1.
   - When the counter is saturated (15) and the entry has no decoded copy,
     the FTB raises `upd_store`. A block therefore needs at least 15 commits
     before it is stored.

   Selection keeps rarely executed code out of DIA.
6. **Store.** `dia_commit_ctrl` runs these steps in order:
   - **ALLOC** asks `dia_pointer` for `nuops × 4` bytes.
   - **STREAM** translates each word's DIA address in `commit_tlb` and pushes
     the word into `dia_write_buffer`.
   - **DSET** waits for the write buffer to drain, then writes `daddr`/`dlen`
     into the FTB entry and sets `dvalid`.

   `l2_arbiter` gives the single L2 port to the instruction cache first, then
   the data cache. The write buffer only gets cycles that both leave free.

Only committed blocks are stored. Wrong-path work never reaches DIA.

## DIA space: a pointer that only moves forward

`dia_pointer` holds three values:

| Register | Meaning | Reset |
|---|---|---|
| base | start of DIA, set by the OS | `0x4000_0000` |
| size | size of DIA, set by the OS | 64 KB |
| pointer | first free byte | base |

Blocks are placed one after another, and the pointer never moves back. A
block stops being referenced when its FTB entry is replaced. Its space is not
reclaimed: it stays unused until the next flush.

A **DIA flush** happens in three cases:
- an allocation does not fit, in which case the block is placed at the base;
- the instruction cache is invalidated (`icache_inval`), for example after
  self-modifying code;
- the OS writes the DIA registers (`cfg_we`).

The flush does not touch memory. It returns the pointer to the base and clears
every `dvalid` bit in the FTB in one cycle. `dia_flush_count` counts flushes.

## Keeping stale micro-ops out of rename

These rules are this design's own.

- **Front-end restart on a DIA flush.** When DIA is flushed, requests in the
  FTQ, in fetch or in the decoders may still point at decoded copies whose
  space is about to be reused. The top therefore flushes the FTQ, fetch and
  decode in the flush cycle. Prediction then restarts after the last block
  that reached rename. The register `resume_q` holds that block's request; it
  is replayed through the redirect path as if the block had resolved as
  predicted, which rebuilds the same histories and RAS pointer.

  If a multi-line block was only partly delivered when the flush hit, its
  early beats are delivered again. Rename must accept that, just as it does
  after a mispredict. Without the restart, the end-to-end test reads reused
  space and fails.
- **No decoded address before the data is in L2.** DSET waits until the write
  buffer is empty. Otherwise fetch could read the copy before the L2 holds it.
- **Storage cancelled by flushes.** An invalidation or register write while a
  block is being stored cancels the DSET step.
- **Ordering of the two decode paths.** Fast-path micro-ops must never reach
  rename ahead of older slow-path work. Equal depth alone is not enough when
  the decoders stall, so a decoded beat enters the fast path only when no
  slow-path beat is inside the decoders. An assertion (`a_paths_ordered`)
  checks that the two paths never deliver in the same cycle.

**Open point for the instruction cache.** DIA words are written to the L2
only. An L1 instruction cache line that already holds part of DIA (the rest of
a partly used line, or space reused after a flush) would go stale. The top
marks these writes on the L2 port with `l2_src == L2_DIA_WB`, so the
instruction cache can invalidate the matching line. That instruction cache is
outside this RTL.

## Blocks

| Module | Does | Default size |
|---|---|---|
| `ftb_dia_frontend` | top; wires everything below; front-end restart | — |
| `branch_predictor` | fetch address register, histories, FTQ push, redirect, commit training | — |
| `ftb` | 4-way FTB with hysteresis and decoded address/length/valid | 2048 entries |
| `perceptron_predictor` | conditional direction; 16-bit history, 8-bit weights, θ = ⌊1.93·16+14⌋ | 256 perceptrons |
| `indirect_predictor` | target of indirect jumps, indexed by address ⊕ path history | 2048 entries, 4-way |
| `ras` | return address stack with pointer repair | 32 |
| `next_address_logic` | next fetch address per branch type; miss → next line | — |
| `ftq` | fetch target queue | 4 |
| `fetch_unit` | request → line reads, decoded or original | 4 in flight, 32-byte lines |
| `decode_bypass` | fast path / slow path | 3 stages |
| `dia_commit_ctrl` | commit: train, allocate, stream, record | — |
| `dia_pointer` | base/size registers, pointer, flushes | 64 KB |
| `commit_tlb` | fully associative, 8 KB pages | 8 entries |
| `dia_write_buffer` | {physical address, micro-op word} FIFO | 8 |
| `l2_arbiter` | single L2 port, write buffer lowest priority; counts write-buffer stall cycles | — |

The table sizes, the 4-bit counter, the 3 decode stages, the 4-byte micro-ops,
the 8-entry commit TLB with 8 KB pages and the 64 KB DIA follow the original
proposal. Every width it leaves open is this design's choice and is listed in
`dia_pkg`:
- history lengths;
- the 5-bit block length and the 8-bit fall-through and decoded lengths;
- the 32-byte line.

Blocks are limited to 63 micro-ops (252 bytes).

## Top-level interface (`ftb_dia_frontend`)

All ports are plain signals or packed structs from `dia_pkg`.

- **DIA registers:** `cfg_we`, `cfg_base`, `cfg_size`; `icache_inval`
  (one-cycle pulse).
- **Instruction cache:** `ic_req_valid/ready/addr` (virtual, line-aligned
  except the first read of a block). `ic_rsp_valid/data` returns one 32-byte
  line per request, in order, at any later cycle.
- **CISC decoders:** `dec_in_valid/ready/beat` and `dec_flush`.
  `dec_out_valid/beat` return beats in order, at least 3 cycles after accepting
  them. There is no back-pressure on the output.
- **Rename:** `ren_valid/ren_beat`, one line of micro-ops or decoded
  instructions per cycle. It is always accepted.
- **Back end:**
  - `rd_valid/rd` is a one-cycle redirect carrying the mispredicted block's
    request and its real outcome.
  - `cm_valid/ready/cm` offers a committed block, followed by
    `up_valid/ready/data/last`: its micro-ops, one 32-bit word per beat.
    Every committed block must offer its micro-ops.
- **Page walker:** `tlb_miss/tlb_miss_vpn` out, `tlb_fill_valid/vpn/ppn` in.
- **L2:** `icm_*` and `dcm_*` are the L1 caches' requests, each held until
  granted. `l2_valid/ready/addr/we/wdata/src` is the single port.
- **Status:** `dia_ptr`, `dia_flush_count`, `dia_stored_count`,
  `wb_stall_count`.

Timing:
- The FTB, perceptron, indirect predictor and RAS are read combinationally, so
  a prediction takes one cycle.
- A redirect costs one cycle with no push.
- The fast path is exactly 3 cycles from acceptance to rename.

## Differences from the original proposal

- **Predictor latency.** The 3-cycle FTB latency and the 32-entry overriding
  predictor that hides it are not modelled. The overriding predictor is only
  named there, without its workings.
- **Fetch width.** The 4-wide and 8-wide setups are not distinguished. Fetch
  moves one 32-byte line per cycle, and prediction produces one block per
  cycle.
- **What "the same block" means.** A committed block matches an FTB entry only
  when start, length, fall-through, type and target all agree. An indirect
  jump that changes target therefore also decrements the counter.
- **Training.** Every committed block trains the FTB. On a miss, the way with
  the lowest counter is chosen; empty ways are filled first.
- **Added mechanisms.** The front-end restart, the wait for the write buffer,
  the cancel-on-flush rule, the DIA base register and the drain rule in
  `decode_bypass` are additions. They are described above.
- **Not built.** The instruction and data caches, the L2 itself, memory, the
  CISC decoders, the page walker and the out-of-order back end are outside
  this RTL and reached through ports.
- **L2 write width.** The L2 port writes 32-bit words. A real L2 would merge
  them into lines.

## How far it fits the evaluated programs

With the 64 KB default, the published per-benchmark decoded footprints of
SPECint2000 fit without any overflow flush. Those footprints are roughly:

| Benchmark | Decoded footprint |
|---|---|
| gzip | 12 KB |
| vpr | 8 KB |
| gcc | 17 KB |
| perlbmk | 58 KB |
| gap | 11 KB |
| vortex | 58 KB |
| bzip2 | 8 KB |
| twolf | 14 KB |

crafty (about 445 KB) and parser (about 162 KB) overflow and flush DIA from
time to time. That is the behaviour the overflow path implements.

`tb_dia_capacity` checks the boundary on the full-size front end. It runs a
ring of hot 252-byte blocks, each in its own FTB set.
- With 260 blocks (65,520 bytes), every block is stored exactly once. DIA
  never flushes, and the last pass is fetched entirely from DIA.
- With 261 blocks (65,772 bytes), the area overflows. It keeps flushing,
  because every block stays hot and is stored again.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dia_pkg.sv \
    rtl/ftb_dia_frontend.sv tb/tb_ftb_dia_frontend.sv \
    --top-module tb_ftb_dia_frontend -Mdir obj && ./obj/Vtb_ftb_dia_frontend
```

Replace the two file names for any other block, for example `rtl/ftb.sv` with
`tb/tb_ftb.sv`.

`tb_ftb_dia_frontend` runs the top **at its default sizes**. It runs a
synthetic looping program of 17 blocks per iteration against models of:
- the instruction cache, which reads a memory model through a fixed address
  translation;
- decoders with 3 to 5 cycles of latency;
- a back end that checks every block reaching rename against the
  architectural program order, redirects on a wrong next address and commits
  every block with known micro-ops;
- a page walker;
- random cache miss traffic on the L2 port.

Every micro-op that arrives by the fast path is compared with the value
committed for it.

Partway through the run the testbench invalidates the instruction cache. It
then moves DIA to a 64-byte area, so that allocations keep overflowing. It
counts and requires each of these mechanisms:
- FTB misses, redirects, stored blocks;
- fast and slow beats, fast beats waiting behind the decoders, decoded blocks
  spanning two lines;
- overflow and invalidation flushes, front-end restarts;
- commit TLB misses, write-buffer stalls;
- returns predicted by the RAS, indirect-predictor predictions, perceptron
  taken and not-taken predictions;
- a full FTQ, FTB replacements;
- fast-path reads from the moved area.

110 iterations take about 22,000 cycles and well under a second.

The unit testbenches use smaller tables where that shortens the run. For
example, `tb_ftb` uses a 16-entry FTB and `tb_perceptron_predictor` uses 16
perceptrons with an 8-bit history. They compare against values worked out
independently. Examples:
- the 15th commit raises the store request;
- replacement happens when the counter reaches zero;
- the round-robin victims;
- the exact 3-cycle fast path;
- the write buffer's priority on the L2 port.

## Notes on the tools

- Verilator's lint reports unused bits: parts of wide structs that a block
  does not read.
- It also reports `SYNCASYNCNET` on `rst_n`, because the reset is also used in
  assertions' `disable iff`.
- It reports `UNUSEDPARAM` for package constants that only some blocks use,
  when a block that does not use them is linted on its own.
- It reports `SYMRSVDWORD` because `abort`, a port of `dia_commit_ctrl`, is
  also a common C++ name.

None of these is a circuit problem. There are no latches, combinational loops or
multiple drivers.
