# Dual-core execution with fault recovery and energy controls

Dual-core execution (DCE) builds a very large instruction window out of two
ordinary out-of-order cores. The **front core** runs ahead and never waits for
memory. When a load misses in the L2 cache, the core gives it a poison value
(INV) instead of waiting, and everything that depends on the load inherits the
poison. The instructions the front core retires go, in order, into a long
**result queue**. The **back core** takes them from the queue and executes the
program again, this time correctly. By then the front core has already started
the L2 misses, so the back core's loads mostly hit. The queue is the big window,
and it needs no associative structures.

Because every instruction is executed twice, the same hardware can catch
transient faults. The front core's results are carried in the queue and
compared with the back core's. Any difference is handled like a branch
misprediction: both cores are flushed and the front core restarts from the
back core's state. Going the other way, the second execution can be cut back
to save energy when fault tolerance is not needed.

This repository holds the control logic that DCE adds around two conventional
cores. The cores themselves, their caches, the shared L2, the branch predictor
and the prefetcher are not included. Their signals are ports of the top module,
`dce_top`. The testbenches drive those ports from behavioural core models.

## Contents

- [The path of an instruction](#the-path-of-an-instruction)
- [One recovery for every kind of error](#one-recovery-for-every-kind-of-error)
- [Checking the front core's results](#checking-the-front-cores-results)
- [Keeping the large window from wasting energy](#keeping-the-large-window-from-wasting-energy)
- [Dual-core and single-core mode](#dual-core-and-single-core-mode)
- [Protecting state and catching hangs](#protecting-state-and-catching-hangs)
- [Interfaces and timing of `dce_top`](#interfaces-and-timing-of-dce_top)
- [Parameters](#parameters)
- [Simulating](#simulating)
- [Where this design makes its own choices](#where-this-design-makes-its-own-choices)

## The path of an instruction

| Stage | Block | What happens |
|---|---|---|
| Front decode, load issue | `load_inv_filter` | Decides whether a load gets an INV value. A load that misses in the L2 while invalidation is enabled is invalidated. An I/O load is always invalidated. A *traversal load* of the form `lw ra, x(ra)` is never invalidated: it produces the address for the next iteration of a pointer-chasing loop, so poisoning it would poison the whole loop. |
| Front stores and loads | `runahead_cache` | The front core never writes the data cache. A retiring store writes its value, or INV, into a small 4-KB, 4-way cache with 8-byte blocks. Later front loads read values and INV flags from it. |
| Front retire | `result_queue` | The instruction enters a circular FIFO of 1024 entries with its PC, instruction word, front-core result, F_INV flag ("invalidated by the front core") and one parity bit. A 16-stage delay line in front of the array stands for the transfer time between the cores. |
| Back fetch | `back_fetch` | Takes instructions from the queue head. It may send an instruction twice, or mark it as needing no execution (see below). |
| Back rename | `rename_unit` | Rename table plus free list, extended for redundant copies. |
| Back retire | `redundancy_checker` | Compares results and decides whether the instruction may commit. |
| Architectural state | `ecc_regfile`, `arch_pc` in `dce_top` | Committed register values and the committed PC, both protected by a SECDED code. |

Branch mispredictions that the back core finds, check failures, parity errors
and watchdog expiries all go to `recovery_ctrl`. `window_size_ctrl`,
`important_mispred_detect` and two instances of `adaptive_enable_ctrl` watch
event rates and tune the machine once per interval.

## One recovery for every kind of error

DCE has a single recovery action, and everything reuses it:

1. In the cycle of the request, `flush` rises for one cycle. It clears the front
   core, the back core, the result queue and the run-ahead cache, and restores
   the back core's rename table from its architectural map. `rec_cause` gives
   the reason.
2. For the next `COPY_LAT` = 64 cycles, `copying` (the `f_stall` port) is high
   and the architectural state is copied to the front core. Register *r* goes
   out on copy step *r* (`f_copy_valid/addr/data`) and the PC on step 32
   (`f_copy_pc_valid`). The remaining cycles stand for transfer time. The front
   core restarts at that PC when the stall drops.

The causes are:
- a back-core branch misprediction;
- a result mismatch;
- a result-queue parity error;
- a watchdog expiry;
- a switch between dual-core and single-core mode.

If several requests arrive in the same cycle, the priority is parity, then
mismatch, then watchdog, then misprediction, then mode switch. Requests are
ignored while a copy is running.

A corrupted queue entry needs no special handling. The back core treats it as
a misprediction at that instruction: the entry is discarded, and the front core
fetches and executes it again.

## Checking the front core's results

The cores are configured once at reset through `cfg_reliable`.

**Fault-tolerant configuration (`cfg_reliable = 1`).** The back core checks every
instruction it retires.
- **Valid front results.** A front result that is not INV is compared with the
  back core's result.
- **Invalidated instructions.** An instruction the front core invalidated has
  no result to compare. So `back_fetch` sends it to the back core twice, as a
  *redundant copy* followed by the *original*. At retirement the copy's result
  is compared with the original's.

The renaming trick is the hardest part of the design:

- The redundant copy reads its source mappings from the rename table like any
  instruction.
- It receives a fresh physical destination register from the free list.
- It does **not** write that register into the rename table. Later instructions
  therefore never see it.
- The original then renames normally.
- The copy must come first. If the original came first, it could overwrite the
  mapping of a register that the copy also reads, and the copy would read the
  wrong source.

At commit:
- the redundant copy frees its own physical register right away, once the
  compare is done;
- the original frees the register it replaced, as usual.

One rename table is therefore enough. The extra registers live only as long as
the pair is in flight. `rename_unit` keeps a speculative map, an architectural
map and a bit-vector free list. The free list hands out the lowest free
register. A recovery rebuilds the free list from the architectural map.

`redundancy_checker` keeps the copy's result until the original retires. It
compares the two, and on a difference it refuses the commit (`b_commit` low)
and raises a mismatch recovery. The original, not the copy, is what commits the
architectural state.

**Power-efficient configuration (`cfg_reliable = 0`), selective re-execution.**
Apart from invalidated instructions, the front core can only be wrong in one
way: a load read a stale value. For example, an earlier store's address was
unknown, or the run-ahead cache evicted the value. So the back core executes
only loads and invalidated instructions again. Everything else is marked
`b_iss_exec = 0`, and the back core may write the front result straight into
its register file. At retirement a load's reloaded value is compared with the
value the front core loaded, and a difference triggers the usual recovery.

## Keeping the large window from wasting energy

A misprediction that depends on an L2 miss is called *important* here. It can
only be resolved late, and by then a 1024-entry window is full of wrong-path
work that is thrown away. Three controllers limit this waste. Each decides once
per `INTERVAL` = 1M retired instructions, and each compares rates exactly, as
count × 10⁶ against threshold × interval.

**Window size** (`window_size_ctrl`). It measures the back core's misprediction
rate and picks the queue's logical size:

| Rate per 1000 instructions | Window size |
|---|---|
| above 0.6 | 128 |
| above 0.3 | 256 |
| above 0.15 | 512 |
| otherwise | 1024 |

The queue's pointers advance modulo the current size. Because the size is a
power of two, this is an AND with a mask. The new size is taken over at the
next misprediction recovery (the `resize` input of `result_queue`), when the
queue is empty anyway.

**Invalidation on/off** (`adaptive_enable_ctrl`, instance `u_inv_ctl`). Over each
interval it counts L2 misses and important mispredictions. It then evaluates:

| Condition | L2 misses per 1K | Important mispredictions per 1K |
|---|---|---|
| A | > 50 | < 2.5 |
| B | > 25 | < 0.25 |
| C | > 2.5 | < 0.02 |

Invalidation stays on if any condition holds, and is turned off otherwise. With
invalidation off, the front core waits for its misses like a normal core, but
its results are still speculative. Traversal loads are never invalidated in
either case.

**Counting important mispredictions.** Where these come from depends on the
state of the controller:
- *While invalidation is on*, every back-core misprediction counts.
- *While it is off*, the back core sees no mispredictions, because the front
  core resolves them all. Instead, `important_mispred_detect` timestamps each
  of the front core's 32 branch checkpoints when it is allocated. A
  misprediction that resolves more than 100 cycles later counts as important
  (`f_br_important`).

## Dual-core and single-core mode

In the power-efficient configuration a second `adaptive_enable_ctrl`
(`u_mode_ctl`), with the same conditions A/B/C, chooses between the modes:

- **Dual → single.** This is an ordinary recovery with cause `REC_TO_SINGLE`.
  The back core's state is copied to the front core. The front core then runs
  alone: invalidation is off, the run-ahead cache is cleared and unused, and
  the queue is not written. It reports its retirements on `f_ret_cnt`, so the
  controllers keep counting. The back core is idle.
- **Single → dual.** Cause `REC_TO_DUAL`. The copy runs the other way: during
  the 64 cycles `st_copy_valid/addr` asks the front core for each register, and
  `st_copy_data`/`st_copy_pc` return it. The values are written into the
  back core's register file and `arch_pc`. Then invalidation is enabled again
  and the back core resumes fetching from the queue.

In the fault-tolerant configuration the machine always stays in dual-core mode.

## Protecting state and catching hangs

- **Result-queue parity.** One even-parity bit over the entry is computed on
  entry and checked at the head. A failure becomes a recovery.
- **I-cache parity** (`icache_parity_guard`). This block sits beside a 2-way
  L1 I-cache with 16-instruction lines. It produces one parity bit per
  instruction on a fill and checks the hit way on a lookup. A way that fails is
  reported as a miss, and `nullify` tells the cache to clear its valid bit, so
  the line is fetched again. The cache arrays themselves are not part of this
  design: `dce_top` brings the guard's signals out as the `f_ic_*` ports.
- **Architectural register file** (`ecc_regfile`). 32 × 32-bit registers stored
  as Hamming (39,32) codewords with an overall parity bit. A single-bit error is
  corrected on read and written back (scrubbed). A double-bit error is flagged.
  The register file is read during the back-to-front copy. The architectural
  PC in `dce_top` is stored as the same kind of codeword and scrubbed the same
  way. `arf_corrected` reports a correction in either. The code functions are in
  `dce_pkg`.
- **Watchdog** (`watchdog_timer`). A fault that freezes the back core, such as a
  lost ready bit, would otherwise hang the machine. The timer counts cycles in
  which the back core has work but commits nothing. After 8192 such cycles it
  triggers a recovery from the architectural state.

## Interfaces and timing of `dce_top`

The ports fall into four groups. All are plain signals or packed structs from
`dce_pkg`.

- **Front core:**
  - the load-invalidation query (`f_ld_*`, combinational);
  - the run-ahead cache load port (`f_rc_ld_*`, combinational) and store port
    (`f_rc_st_*`, written at the clock edge);
  - the retire port into the queue (`f_ret_valid/ready/data`, valid-ready, one
    per cycle);
  - the single-mode retire count (`f_ret_cnt`);
  - branch checkpoint allocate/resolve (`f_br_*`);
  - the outputs `f_flush`, `f_stall`, `f_inv_enable`, `dual_mode`, and the
    copy ports;
  - the I-cache parity ports (`f_ic_*`, combinational). They take the line
    being filled and, on a lookup, the tag matches, stored lines and stored
    parity of each way.
- **Back core:**
  - the issue port (`b_iss_*`, valid-ready). It carries the instruction, the
    redundant and execute flags, the decoded register fields and the physical
    registers.
  - the retire port (`b_ret_*`). It presents the ROB head's results for the
    check, together with the physical registers to free. `b_commit` answers in
    the same cycle.
  - `b_mispred`, `b_flush`.
- **Configuration:** `cfg_reliable`, and `l2_miss_cnt` (L2 misses per cycle, from
  the shared L2).
- **Status:**
  - `rec_cause`, `rq_size_log2`;
  - the commit/check/mismatch counters;
  - `arch_pc`, `arf_corrected`;
  - the interval pulses `win_update`, `inv_decide`, `mode_decide`;
  - `b_free_regs`.

`flush` is combinational from the requests and lasts one cycle. A push or pop
in the flush cycle is dropped. An instruction becomes visible at the queue head
16 cycles after it was pushed. The back-core side moves one instruction per
cycle. Register fields are decoded from the MIPS encoding in `dce_pkg`
(`decode_regs`).

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `dce_top`, `result_queue` | `RQ_DEPTH` / `DEPTH` | 1024 | result-queue entries |
| | `RQ_DELAY` / `DELAY` | 16 | cycles from push to visibility |
| `dce_top`, controllers | `INTERVAL` | 1,000,000 | retired instructions per adaptation decision |
| `dce_top`, `recovery_ctrl` | `COPY_LAT` | 64 | cycles of the state copy |
| `dce_top`, `watchdog_timer` | `WD_TIMEOUT` / `TIMEOUT` | 8192 | idle cycles before the watchdog fires (own choice) |
| `dce_top`, `rename_unit` | `NUM_PREGS` | 160 | physical registers: 32 architectural + 128 ROB entries (own choice) |
| `window_size_ctrl` | `TH128_PM`, `TH256_PM`, `TH512_PM` | 600, 300, 150 | misprediction thresholds per million instructions |
| `adaptive_enable_ctrl` | `L2_{A,B,C}_PM`, `IBR_{A,B,C}_PM` | 50000/25000/2500, 2500/250/20 | conditions A/B/C per million |
| `important_mispred_detect` | `NUM_CKPT`, `THRESH` | 32, 100 | checkpoints, latency threshold in cycles |
| `runahead_cache` | `SIZE_BYTES`, `WAYS`, `BLOCK_BYTES` | 4096, 4, 8 | |
| `icache_parity_guard` (`dce_top`: `IC_WAYS`, `IC_LINE`) | `WAYS`, `LINE_INSNS` | 2, 16 | |

The sizes come from the published evaluation setup. The evaluated core around
this logic is a 4-wide out-of-order core with a 128-entry ROB, 32 rename
checkpoints, 32-KB 2-way L1 caches and a shared 1-MB 8-way L2.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. To run one
with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dce_pkg.sv tb/tb_result_queue.sv --top-module tb_result_queue
./obj_dir/Vtb_result_queue
```

The end-to-end tests connect `dce_top` to `tb/dce_env.sv`, a behavioural
front core, back core and L2 miss source. The environment generates a synthetic
MIPS instruction stream with a golden result for every instruction. Its front
model does the following:
- pushes the stream into the queue;
- invalidates the loads the design tells it to;
- takes INV from the run-ahead cache;
- after a branch marked as mispredicted, pushes wrong-path instructions until
  the recovery;
- sometimes loads a stale value.

Its back model renames through the design, executes with a short latency, and
injects single-bit faults into back-core results. A small I-cache model stores
the parity that `dce_top` generates and flips stored bits. The testbench also
flips one bit inside the result queue, one in the PC and one in the register
file.

The environment checks:
- every commit against the golden program;
- every register and PC copied to the front core against the golden state.

It counts each mechanism and fails the run if one never happened. The
mechanisms are:
- redundant copies;
- bypassed instructions;
- the four recovery causes;
- traversal loads;
- INV forwarding;
- a full queue;
- I-cache nullifications;
- ECC corrections of the PC and of a register;
- important mispredictions;
- window shrink and growth;
- invalidation toggles;
- both mode switches.

- `tb_dce_top` shortens `INTERVAL` to 2000 so that all the adaptive decisions
  happen in about 90,000 cycles (well under a second).
- `tb_dce_top_full` leaves every `dce_top` parameter at its default, including
  the 1M-instruction interval. It runs about 28M cycles, roughly two and a half minutes
  with Verilator.

Both need `tb/dce_tb_signals.svh` and `tb/dce_env.sv` on the include/library
path (`-Itb -y tb`).

## Where this design makes its own choices

The published description gives the mechanisms and their sizes, but not
widths, handshakes or encodings. The following are this design's own choices:

- **Datapath and interfaces:**
  - 32-bit MIPS-style words;
  - one instruction per cycle on the queue and back-core ports, where the cores
    are 4-wide;
  - the register decode in `dce_pkg`.
- **Queue:**
  - even parity over the whole entry;
  - a delay line that counts against the queue's capacity;
  - a size change that restarts the empty queue at slot 0.
- **Watchdog:** the 8192-cycle timeout, which runs only while the queue holds
  work.
- **Physical registers:** 160, and a lowest-first free list.
- **Recovery:**
  - the priority order between causes;
  - a 64-cycle copy in the single-to-dual direction too;
  - the register-per-cycle copy schedule.
- **Run-ahead cache:** byte-granular valid and INV bits, write-allocate without
  fill, and true LRU.
- **Register-file and PC code:** SECDED (39,32). Only "an error-correcting code"
  is called for.
- **DCE_R:** the simpler scheme, which checks only valid front results and
  does not duplicate invalidated instructions, is available in `back_fetch`
  (`dual_exec = 0` with checking on). `dce_top` does not offer it as a
  configuration.
- **Adaptation:**
  - in the power-efficient configuration, invalidation is always on in
    dual-core mode; the invalidation controller acts only in the fault-tolerant
    configuration;
  - controllers start enabled, and the window starts at 1024 entries.
- **Single-core mode:** the back core simply idles. It could instead run
  another thread from its own I-cache, but that is left out.

Parts not included:
- the two cores, their caches and the L2;
- the branch predictor, which DCE leaves unchanged;
- the stream prefetcher;
- ECC on the memory state and on dirty L2 data, which belongs to those caches.
