# Hybrid warp size (HWS) warp control for a SIMT GPU

A GPU streaming multiprocessor (SM) runs threads in warps of 32 on an 8-wide
SIMD pipeline, so a full warp takes four issue cycles. After a divergent branch
each side of the branch runs with only some of its threads active, yet still
takes four cycles. That wastes SIMD slots until the paths meet again.

This RTL drops the fixed warp size. A warp's 32 slots are four **quarter-warps**
of 8 lanes. A warp coming back from a branch is **squeezed**: threads move into
the holes of other quarters, always within their own lane. Its **size is then
scaled** to the quarters that still hold threads, and the **issue stage** spends
one cycle per non-empty quarter (1 to 4), starting the next warp straight
after. As an option, warps that reach the same PC are combined by an
**enhanced dynamic warp formation (en-DWF)** step, which tolerates lane
conflicts by moving threads between quarters of a lane before combining.

The RTL covers the warp-control path of each SM: squeezer, warp-size
analyzer, en-DWF combiner, warp pool, scheduler and issue unit. It has 28 SMs
and the optional cross-SM warp-size synchronization. The SM pipeline,
register file, memories and interconnect are not part of it. They connect
through the ports of the top level.

## Thread placement: slots, lanes and quarters

Slot `s = quarter*8 + lane`. The lane is the SIMD pipeline and fixes the
register-file bank of the thread, so **a thread never changes lane**. It may
change quarter. A slot therefore stores an active bit and the thread ID
(`hws_pkg::warp_threads_t`), because after squeezing the slot no longer
implies the thread. A lane can hold up to four threads of a warp, one per
quarter. The smallest issue length a warp can reach is therefore
`max over lanes (threads in that lane)` quarters.

## The squeeze (`hws_squeezer`)

1. Count the active threads of each quarter. Rank the quarters by count, most
   first. Equal counts keep their physical order. The ranking is logical:
   quarters do not move.
2. For the quarters ranked 0, 1 and 2 in turn, fill each hole at lane *j* with
   the lane-*j* thread of the lowest-ranked quarter that still has one (rank 3
   first).

Filling the fullest quarters from the emptiest keeps the number of moves small.
Because every lane is compacted toward the top ranks, the result always reaches
the lane-locked minimum above. Example: a warp with threads in four quarters,
lanes `q0: 32@0 39@7`, `q1: 40@0 41@1 46@6`, `q2: 50@2 52..55@4..7`,
`q3: 57..60@1..4`. It ranks q2, q3, q1, q0. After six moves the result is
`q2 = 32 41 50 59 52 53 54 55` and `q3 = 40 57 58 - 60 - 46 39`: 16 slots
instead of 32.

The hardware is combinational. It computes the ranks, then runs three
unrolled passes over eight lanes.

## Warp scaling and variable-length issue

`hws_warp_size_analyzer` turns a warp into a 4-bit quarter mask. Bit *q* is set
when quarter *q* has an active thread. The warp size is 8 x (ones in the mask)
and the issue length is the number of ones. The mask is stored with the warp in
the pool.

`hws_issue_unit` issues the set quarters one per cycle, lowest first. A warp
whose mask has a hole (for example `1101`, as can happen after combination)
skips the empty quarter. On the last issue cycle of a warp it already accepts
the next standby warp. That warp's first quarter goes out in the next cycle, so
the SIMD lanes never idle while the pool holds a warp. Each issued cycle
carries the PC, the quarter index, 8 lane-active bits, 8 thread IDs,
first/last flags and the warp's issue length.

Timing: a warp accepted on `in_*` is written into the pool at the clock edge.
From the next cycle it can be the standby warp. It is taken in the cycle the
issue stage becomes free, and its first quarter is issued one cycle later.

## Enhanced warp formation (`hws_endwf_merge`)

When `dwf_en` is set, an incoming (male) warp is offered to the lowest pool
entry (female) that has the same PC. Plain warp formation would reject the
pair if any slot were used by both warps. en-DWF first relocates the male
thread of each conflicting slot. Lanes are scanned from lane 0 and quarters
from quarter 0. The thread goes to the first quarter of the same lane that is
free in both warps. Female threads never move. If no conflict remains, the
union is written back into the female entry. Otherwise the squeezed male warp
takes a new entry. The order of work in `hws_sm` is: squeeze the male, en-DWF,
combine, then scale the combined warp. The combined warp is not squeezed
again.

With `dwf_en` clear (PDOM&HWS), every returning warp takes its own entry.
Reconvergence is then left to the branch stack in the decode stage, which is
outside this RTL.

## Scheduling (`hws_warp_scheduler`)

- **Majority policy across PCs:** the scheduler keeps issuing warps at the
  current PC while the pool has any. When none is left, it moves to the PC held
  by the most pool entries. Ties go to the PC of the lowest-numbered entry.
- **Round robin within a PC:** the search starts after the entry issued last.

An issued warp leaves the pool. It comes back through `in_*` once the pipeline
has executed it, with its next PC and its active threads. At a divergence this
is one warp per path.

## Cross-SM warp-size synchronization (`hws_warp_size_sync`)

Each SM reports the issue length of its standby warp. `hws_warp_size_sync`
returns the maximum over all SMs. With `sync_en` set, every SM issues its next
warp with at least that length, and the extra cycles are bubbles at the end of
the warp. This reproduces a rule under which all SMs share the largest standby
warp size. It costs throughput: one SM with a full warp holds all SMs at four
cycles. It is therefore a run-time option, and it is off in normal use.

## Top level `hws_gpu`

| port | dir | per | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | clock, synchronous active-low reset |
| `dwf_en` | in | | 1: en-DWF&HWS, 0: PDOM&HWS |
| `sync_en` | in | | apply the cross-SM warp size |
| `in_valid`, `in_ready`, `in_pc`, `in_thr` | in/out | SM | warp returning from the pipeline (valid/ready handshake) |
| `iss_valid`, `iss` | out | SM | one issued quarter-warp per cycle (`issue_slice_t`) |
| `ev` | out | SM | one-cycle event flags (`sm_events_t`) |
| `pool_count` | out | SM | pool occupancy |
| `sync_quarters` | out | | synchronized issue length |

`in_ready` is low while the SM's pool is full. A warp with no active thread
(all of its threads finished) is accepted and dropped.

Parameters (`hws_pkg` and module parameters):

| name | default | origin |
|---|---|---|
| `WARP_SIZE`, `SIMD_WIDTH`, `NUM_QUARTERS` | 32, 8, 4 | target configuration |
| `NUM_SM` | 28 | target configuration |
| `POOL_DEPTH` | 32 | design choice (32 warps per SM) |
| `TID_W` | 10 | design choice (1024 threads per SM) |
| `PC_W` | 32 | design choice |

## Design choices and departures

- The quarter ranking is stable for equal counts. Another tie order changes
  which quarter receives threads, but not how many quarters the result uses.
- A hole is judged on the partly squeezed warp, so a slot emptied earlier in
  the same squeeze can be refilled.
- Only one merge candidate is tried per incoming warp: the lowest pool entry
  with the same PC. A warp being issued in the same cycle is not a candidate.
- `in_ready` applies back-pressure whenever the pool is full, even for a warp
  that would have merged.
- The majority is counted in pool entries, not threads.
- The squeezer, analyzer and combiner are single-cycle combinational logic.
  No pipelining of this path was attempted.
- Not built: the PDOM reconvergence stack, the 24-stage SM pipeline, the
  banked register file, the execution units, caches and shared memory, the
  interconnect, DRAM and the host. They are the unchanged baseline GPU.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_hws_squeezer`, `tb_hws_endwf_merge`: worked examples with known results,
  and thousands of random warps compared with a behavioural model. Property
  checks confirm that lanes keep their threads, that the result uses the
  lane-locked minimum of quarters, and that pool threads never move.
- `tb_hws_warp_size_analyzer`, `tb_hws_warp_size_sync`, `tb_hws_warp_pool`,
  `tb_hws_warp_scheduler`: random stimulus against shadow models.
- `tb_hws_issue_unit`: checks every issue cycle, the moment of each take and
  the total cycle count against the sum of the issue lengths.
- `tb_hws_sm` (8-entry pool) and `tb_hws_gpu` (full size, all defaults, 28 SMs
  x 32 warps): end-to-end runs of a divergent kernel in three modes (PDOM&HWS,
  en-DWF&HWS, en-DWF&HWS with synchronization). `tb_sm_env` is a behavioural
  model of the rest of each SM. It has a 24-cycle pipeline, splits warps by
  next PC, and uses several branch patterns. It checks that every thread
  executes exactly its own path once and in its own lane. It also checks that
  no empty quarter is issued, that issue lengths equal the lane-locked minimum
  (without warp formation), and that the issue stage never idles while a warp
  waits. The benches fail if a mechanism never occurred: squeeze, merge,
  relocation, failed merge, pool-full stall, PC switch, sync stretch, and
  issue lengths 1 to 4.
- `tb_hws_sm_examples`: two hand-worked cases on one SM. An if/else split
  issues its paths in 4, 1 and 3 cycles back to back. Two warps at one PC
  conflict in some slots and are combined by en-DWF into a 3-quarter warp.
- `tb_hws_occupancy_speedup`: two mixes of 1000 warps. In each mix a few
  percent of the warps need only 1, 2 or 3 quarters after squeezing. The bench
  checks that the total issue cycles give the speedup
  `1 / (f4 + f1/4 + f2/2 + 3*f3/4)` over fixed 4-cycle issue (1.065 and 1.104
  for the two mixes). Here `fN` is the fraction of warps that need N quarters.

Run one bench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hws_pkg.sv tb/tb_hws_gpu.sv \
          --top-module tb_hws_gpu -o sim
./obj_dir/sim
```

The full-size `tb_hws_gpu` takes about two minutes to build and seconds to run.
