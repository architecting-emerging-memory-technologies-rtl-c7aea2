# Emerging-memory structures for an energy-efficient processor

SRAM is fast, but it leaks power all the time and it is not dense. This design
replaces or augments SRAM with newer memories at four points of a processor's
memory hierarchy. Each structure is shaped around the weakness of the memory it
uses:

| Structure | Memory used | Weakness it must hide | Idea |
|---|---|---|---|
| Branch predictor | memristors (16 resistance levels) | analog, imprecise | store perceptron weights as resistances and add them as currents |
| Private L1 data cache | SRAM + STT-RAM | slow, costly writes that also wear cells | small SRAM partition absorbs writes; blocks move with their coherence state |
| Last-level cache (LLC) | 2-bit multi-level-cell (MLC) STT-RAM | half of each cell is slow | each set picks, at run time, big blocks (all bits) or small blocks (fast bits only) |
| GPGPU L2 | STT-RAM + SRAM augment | writes and transit data | per-block read/write counters steer blocks between the parts; partitions tell each other about moves |

The four structures are independent. `emerging_mem_top` places them side by
side with one clock and one asynchronous active-low reset, and brings out each
one's ports under a prefix:
- `bp_*` for the predictor;
- `l1_*` for the L1;
- `llc_*` for the LLC;
- `l2_*` for the GPU L2.

Every parameter defaults to the main configuration described below.

## 1. Memristor perceptron branch predictor

`memristor_predictor`, `mlmc_array`, `latched_comparator`

**The perceptron.** A perceptron predictor keeps one row of signed weights per
branch (selected by PC bits 9..2), one weight per bit of global history, plus a
bias weight. The prediction is the sign of

    S = w0 + sum_j (h_j ? +w_j : -w_j)

Training happens when the prediction was wrong or |S| was below a threshold.
Each weight then moves one step towards agreeing with the outcome, saturating at
its ends.

**The memristor version.** The adder tree is replaced by wires:
- Each weight is a multi-level memristor cell (MLMC) with 16 levels, equivalent
  to a 4-bit weight.
- Each cell has a memristor branch and a fixed reference branch. The history bit
  steers them onto two shared lines, P and N: when the bit is 1 the memristor
  current goes to P and the reference to N, and when it is 0 they swap. This
  multiplies the weight by -1 without any arithmetic.
- The bias column's "history" is tied to 1.
- By Kirchhoff's law each line carries the sum of its currents.
- A latched comparator then gives the direction (P >= N) and whether
  |P - N| is below the training threshold (a "weak" prediction).

**The behavioural models.** `mlmc_array` and `latched_comparator` are behavioural
models of these analog parts, and can be simulated and synthesised as ordinary
logic:
- Each cell is a level L (0..15).
- The memristor branch contributes 2L+1 current units and the reference branch
  16, so P - N is exactly twice the signed weight (2L - 15).
- Cells reset to level 7.

**The digital wrapper.**
- A prediction is answered exactly one cycle after `pred_req`.
- Up to 24 branches may be in flight. Each keeps the row and history it used, in
  a queue.
- `res_valid` resolves the oldest branch:
  - the row is trained at that edge if the prediction was wrong or weak;
  - on a misprediction the queue is flushed and the history is rebuilt from the
    resolved branch's history plus its real outcome.
- The speculative history is bypassed, so back-to-back predictions see each
  other.

**Sizes.**
- 48 history bits.
- 256 rows: 256 x 48 cells matches the stated leakage of the whole table divided
  by the leakage of one cell.
- Threshold 212 current units, which is 2 x 106. 106 is the usual perceptron
  rule floor(1.93h + 14) for h = 48; the factor 2 converts weight steps to
  current units.

## 2. Hybrid SRAM / STT-RAM private L1 (`hybrid_l1`, `l1_pkg`)

**The two partitions.** A 4 KB SRAM partition and a 128 KB STT-RAM partition
form one cache:
- Both are 4-way with 64-byte lines.
- Each has its own index and tag. They are probed together, and a block is never
  in both (an assertion checks this).
- Hits take the partition's latency: SRAM 3 cycles read and write, STT-RAM 4
  read and 10 write.
- Misses are placed by type: a read miss goes to STT-RAM and a write miss
  (bus read-exclusive) goes to SRAM.

**Coherence.** The cache is MOESI with updates, over a snooping bus. The bus
commands are RD, RDX, UPD and WB.
- Local accesses:
  - A read miss fills in E, or in S when another cache has the line.
  - A write to E or M is silent and leaves M.
  - A write to S or O broadcasts the new line (UPD) and leaves O if someone
    still shares it, else M.
- Snooped remote operations:
  - A remote read turns M into O and E into S; M and O copies supply the line.
  - A remote write miss invalidates the copy.
  - A remote update overwrites an S or O copy and leaves S.
- M and O victims are written back.

**Placement policies** (parameter `POLICY`). Migration is what makes the SRAM
partition effective.
- `POL_NAIVE` never moves a block. Only the fill rule acts.
- `POL_IMM` (immediate) moves a block as soon as its state says it is in the
  wrong place:
  - M and O blocks have been written and will probably be written again, so they
    belong in SRAM. A local write hit in STT-RAM moves the block to SRAM.
  - E and S blocks are read-only for now, so they belong in STT-RAM. A remote
    update of an O block in SRAM makes it S and moves it to STT-RAM.
- `POL_DELAYED` moves a block only after two qualifying operations in a row. It
  counts them with a per-block transfer bit (TD):

  | Where the block is | What sets TD | What clears TD | What moves the block |
  |---|---|---|---|
  | STT-RAM | a local write | any read | a local write that finds TD already set (the block goes to SRAM) |
  | SRAM, in O or S | a remote read | any write, including updates from the owner | a remote read that finds TD set (the block goes to STT-RAM) |

  A remote read of an M block does not set TD, because that read is what turns
  the block into O.
- TD is cleared whenever a block is filled or moved.
- A move always completes before the access that caused it is answered. The
  moved block may evict a victim from the target partition, with a write-back if
  the victim is dirty.

**Refresh.** The STT-RAM cells trade retention for write speed, so the partition
is refreshed like DRAM:
- One block every `RETENTION / (STT-RAM blocks)` cycles.
- Each refresh occupies the cache for an STT-RAM read plus a write (14 cycles).
- The default retention is 32 µs, which is 96,000 cycles at 3 GHz, so one
  refresh every 46 cycles.
- The shortest usable retention is blocks x (read + write latency): 28,672
  cycles at this size.
- Priority is snoop, then refresh, then core. A core request that arrives during
  a refresh waits (`ev_refresh_wait`).

**Events and other configurations.**
- Events are pulsed for hits per partition, misses, moves in each direction,
  STT-RAM data writes (which wear the cells), refreshes, waits, updates and
  write-backs.
- The 8 KB + 64 KB configuration is `SRAM_SETS=32, STT_SETS=256` with STT-RAM
  latencies 3/9.

## 3. Reconfigurable MLC STT-RAM last-level cache

`mlc_llc`, `mlc_addr_decomp`, `mlc_set_monitor`

**The MLC cell.** A 2-bit MLC STT-RAM cell stacks a small "soft" junction and a
large "hard" one:
- The soft bit is quick to read and write.
- The hard bit is slow.
- With interleaved mapping, bits 0..255 of each 512-bit physical block are soft
  and bits 256..511 are hard.

**The two modes.** Each of the 8192 sets runs in one of two modes, held in its
mode bit (MS):

| Mode | Blocks per set | Bits used | Read / write hit latency |
|---|---|---|---|
| LBM (large block mode) | 8 blocks of 64 bytes | all bits | 10 / 44 cycles |
| SBM (small block mode) | 8 blocks of 32 bytes | soft bits only | 7 / 23 cycles |

**Address split** (`mlc_addr_decomp`).
- The set index is addr[18:6] in both modes, so an address always has the same
  home set.
- The tag gets one extra bit: 0 in LBM, and addr[5] in SBM, which tells the two
  halves of a 64-byte chunk apart.

**When to switch** (`mlc_set_monitor`). The decision is made only on a miss.
- Every block has two 2-bit reference counters, one per half (only the first is
  used in SBM).
- A hit decrements the accessed counter. A hit on a counter already at zero
  instead increments all the others, which keeps "hot" halves at zero.
- On a miss the zeros among the valid blocks' counters are counted:
  - In LBM, a count with 0 < zeros < θLS (4) says that only a few halves are
    hot, so small blocks would do.
  - In SBM, zeros > θSL (4) says many blocks are hot.
- A per-set protection bit (PB) requires the pattern on two misses in a row. The
  first miss sets PB, the second switches and clears it, and a miss without the
  pattern clears it.

**How a switch is performed.**
1. Every dirty block of the set is written back. Writes to memory are
   half-masked, because in SBM a block is only half a line.
2. The set changes mode:
   - LBM→SBM keeps each block's lower half in place (its tag is already right,
     since the extra bit is 0) and drops the upper halves.
   - SBM→LBM drops the small blocks whose extra tag bit is 1, re-ranks LRU, and
     re-fetches the upper half of every surviving block from memory.
3. The miss is then served in the new mode.
- All sets start in LBM.
- A miss spends 4 cycles on the tag check before any memory traffic.

The controller handles one 32-byte request at a time. Replacement is LRU.

## 4. Hybrid GPGPU L2 (`gpu_l2`, `gpu_l2_partition`, `transit_addr_buffer`)

**Structure.** The GPU's L2 is split into 8 partitions, one per DRAM channel.
- Partition = address bits 9..7. Lines are 128 bytes.
- Each partition has:
  - an STT-RAM part: 512 sets x 8 ways, 4 MB over all partitions;
  - an SRAM augment: 64 sets x 8 ways, 512 KB over all partitions;
  - an allocation/migration controller.
- Latencies: STT-RAM read 4 / write 30 cycles, SRAM 5 / 5.

**Counters and migration.**
- Every block has a 2-bit read counter and a 1-bit write counter, cleared on fill
  and on move.
- In STT-RAM:
  - a write that finds the write counter saturated moves the block to SRAM;
  - a read that finds the read counter saturated clears both counters (the
    block is still read-mostly).
- In SRAM the roles swap:
  - a read with a saturated read counter moves the block to STT-RAM;
  - a write with a saturated write counter clears both.
- Allocation on a miss:
  - write misses fill SRAM;
  - read misses fill STT-RAM, unless the set index hits in the transit address
    buffer.

**Transit address buffer (TAB).** The TAB catches data that only passes
through.
- When a block leaves STT-RAM with both counters at zero, it was never reused.
  Its set index is recorded in a 16-entry fully associative FIFO.
- The next read fill to that set goes to SRAM, and the entry is removed.

**Pre-migration.** Partitions see similar traffic, so a move in one predicts
the same move in the others.
- Every migration is broadcast (set and tag, registered, one cycle).
- Every other partition that holds the same set and tag in the same part moves
  it at once.
- Notices wait in a 4-entry queue per partition and are dropped when it is full.
  They are hints, not obligations.
- When several partitions broadcast in the same cycle, each receiver takes the
  lowest-numbered sender.

**Interfaces.** Each partition takes 32-bit word requests and has its own line
port to memory (`mem_*`, 1024-bit lines, one request outstanding).

## 5. Shared array: `cache_part`

Every SRAM and STT-RAM part above is a `cache_part`: a set-associative array of
tags, per-block metadata and data, with exact LRU.
- Lookup and victim selection are combinational. Invalid ways are chosen first,
  then the least recently used way.
- There is one write port per cycle. Invalidating a way keeps the LRU ranks
  dense.
- The latency of each memory technology is modelled by the controllers'
  counters, not by the array.

## Timing conventions

Latencies are counted from the clock edge that accepts a request (valid and
ready both high) to the edge that samples the response valid. A read hit with
latency 10 therefore has `resp_valid` high in the cycle before the tenth edge.
All storage resets asynchronously: valid bits clear, counters reset, and the
predictor's cells go to level 7. Big data arrays are not cleared.

## Simulating

All modules are plain SystemVerilog-2017. `hybrid_l1` and the top import
`l1_pkg`, so compile the package first. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/l1_pkg.sv tb/tb_hybrid_l1.sv --top tb_hybrid_l1
./obj_dir/Vtb_hybrid_l1
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog counts a failure if a run hangs.

| Testbench | What it checks |
|---|---|
| `tb_memristor_predictor` | a full reference model of weights, history, queue and training |
| `tb_mlmc_array`, `tb_latched_comparator` | currents, steering, saturation, thresholds |
| `tb_mlc_addr_decomp`, `tb_mlc_set_monitor` | exhaustive or random comparisons with a model |
| `tb_mlc_llc` | one set driven through LBM→SBM→LBM with every decision and both modes' hit latencies, then random traffic against a memory image |
| `tb_cache_part`, `tb_transit_addr_buffer` | random operations against models |
| `tb_gpu_l2_partition`, `tb_gpu_l2` | allocation, the counter example sequence, TAB, migrations, pre-migration across partitions (seen as SRAM hit latency), data |
| `tb_hybrid_l1` | three copies (one per policy) driven identically: which partition serves each access, data coherence against a golden image, write-back and update contents, latencies, refresh rate |
| `tb_emerging_mem_top` | all four structures at reduced sizes at once; counts every mechanism and fails any that never occurs |
| `tb_emerging_mem_top_full` | the top at default sizes, one complete operation per structure, with latencies |

At default sizes the top holds about 75 Mbit of arrays. Verilator builds it in
about half a minute, and the full-size test runs in seconds.

## Where this RTL goes beyond, or departs from, the description

- **Analog parts are behavioural.** The memristor cells and the comparator are
  modelled in integer current units. Noise, the programming pulses and the
  read/write voltages are not modelled.
- **Inferred sizes.** The predictor's threshold and row count are derived, not
  given (see section 1).
- **The LLC's switch.** Write back, keep the lower halves, and re-fetch only the
  blocks whose extra tag bit is 0. For SBM→LBM the alternative is to drop the
  whole set's data, which is cheaper at the switch but costs misses later; this
  design re-fetches. Re-fetches go one at a time after the write-backs.
- **The L1's protocol details.** The bus and snoop protocol are this design's:
  commands, the shared flag, and update-based writes to shared lines. So are the
  one-access-at-a-time controllers, the refresh priority and the 32 µs default
  retention.
- **The GPU L2's buffers.** The TAB size and policy, the pre-migration queue
  and the lowest-sender-first choice when several partitions broadcast at once
  are this design's choices.
- **Replacement and write policy.** The L1's LRU victims and write-allocate
  follow the source. LRU in the LLC and the GPU L2, and one outstanding miss
  per controller, are this design's choices.
- **Not built.** The queue-based L1 migration policy, which exists only as a
  point of comparison. Whole-system parts such as cores, DRAM and the
  interconnect are not built either; the testbenches stand in for them.
