# Split Latency Allocator for a near-threshold GPU

A GPU run at near-threshold voltage saves a lot of energy, but process
variation gets much worse there. Two effects matter most:

- **Register file entries.** Some entries of the large vector register file
  become slow. One slow row holds up every lane that reads it, so a wavefront
  that touches a slow row takes about 16 cycles per operand read instead of 8.
- **Compute units (CUs).** CUs end up with different maximum frequencies. The
  fastest is up to about 40% faster than the slowest.

A single global clock would run every CU at the speed of the slowest one. The
Split Latency Allocator (SLA) uses both effects instead:

1. **Access latency categorization.** A built-in self test marks each register
   entry fast or slow, with one *port-speed (PS) bit* per entry. Each
   instruction in the issue queue carries the PS bits of its operands. Any
   wavefront that reads a slow entry becomes a *critical wavefront*.
2. **Individual CU clocks.** Each CU runs at its own maximum frequency. That
   frequency is given as a ratio to the slowest CU (1.00 … 1.40).
3. **Split mapping.** A CU is *fast* if its ratio is above
   `1 + (fraction of slow entries)`, which is 1.20 for an 80 % fast / 20 %
   slow register file. Fast wavefronts go to fast CUs, so those CUs finish
   sooner and take more work. Critical wavefronts go to the slower CUs, where
   they have more time to cover their long register reads.

This repository is synthesizable SystemVerilog for that allocator. It also
has a timing model of the register file and self-checking testbenches. The
GPU it plugs into is not included: the CU pipelines, SIMD units, memories and
the BIST circuit itself. Their signals are ports of the top module.

## Block structure

```
 BIST results ──► ps_table ──(PS bits)──► issue_queue ──► vgpr_rf (8/16-cycle reads)
                     │ slow_count            │ categorization events
                     ▼                       ▼
            latency_ratio_unit         wf_categorizer ◄── timeline_start
       slow %, threshold = 1+slow%     critical flag + priority counter
                     │                       │
 per-SIMD Fmax ──► cu_fmax_unit ──ratios──► sla_allocator ──► dispatch (wavefront, CU)
                     │                       ▲
                     ▼                       └── completions from the CUs
            cu_clock_gen × NUM_CU ──► one clock enable per CU
```

| File | Role |
|---|---|
| `rtl/sla_pkg.sv` | Shared widths, fixed-point conventions, issue-queue entry struct, enums |
| `rtl/ps_table.sv` | One PS bit per register entry. It has a BIST write port, two lookup ports and a running count of slow entries. |
| `rtl/issue_queue.sv` | FIFO whose entries are `op_code, RFA, PS bits, RFB` plus the wavefront id. It reports each new entry for categorization. |
| `rtl/wf_categorizer.sv` | Per wavefront, it records slow reads in the current timeline and gives the critical flag and priority counter. |
| `rtl/latency_ratio_unit.sv` | Turns the slow count into a slow percentage and the fast-CU threshold. |
| `rtl/cu_fmax_unit.sv` | Sets each CU's Fmax to that of its slowest SIMD, then computes each CU's ratio to the slowest CU. |
| `rtl/cu_clock_gen.sv` | Per-CU clock enable: a phase accumulator that runs at the CU's ratio. |
| `rtl/sla_allocator.sv` | Pending buffer, priority choice, split between CU classes, round-robin pick of a CU, and slot occupancy. |
| `rtl/vgpr_rf.sv` | Behavioural timing model of the register file: 8 cycles when both rows are fast, 16 when either is slow. |
| `rtl/seq_divider.sv` | Sequential restoring divider, shared by the two configuration units. |
| `rtl/sla_top.sv` | Wires all of the above together. |

## Number formats

Ratios and percentages are integers in hundredths.

- An Fmax ratio of 1.07 is `107` (`ratio_t`, 10 bits).
- Twenty percent is `20` (`pct_t`, 7 bits).
- The threshold is `threshold_x100 = 100 + slow_pct`.
- A CU is fast when `cu_ratio_x100 > threshold_x100`. The comparison is
  strict, so a CU exactly at the threshold is a slow CU.

Both divisions round to nearest:

- `slow_pct = round(100·slow_count / entries)`. For example, 205 of 1024
  entries is 20 %.
- `ratio = round(100·fmax_cu / fmax_min)`.

Register addresses are `{SIMD[1:0], VGPR[7:0]}`, for 4 × 256 entries. A PS
bit of 1 means slow.

## The hard part: classification, priority and mapping

**When a wavefront is critical.** An instruction's PS bits are looked up as it
is written into the issue queue. The cycle after, the queue sends
`(wavefront, PS bits)` to the categorizer. Once any operand of a wavefront has
been slow in the current timeline, that wavefront is critical. The rule
follows from how a slow row behaves: it delays the read for every lane, so the
wavefront takes the long register access time. `timeline_start` clears all
wavefront state, and a wavefront not seen since then counts as fast.

**The priority counter.** Each wavefront's counter takes the value of the
register file's split:

- a critical wavefront gets the slow percentage (20 for 80/20);
- a fast wavefront gets the fast percentage (80).

A smaller value means the wavefront needs more time, so it is served first.

**Mapping.** `sla_allocator` holds up to `PEND_DEPTH` waiting wavefronts.
Every cycle it does the following:

1. It finds the waiting wavefronts whose target class still has a CU with a
   free slot. The target class is the fast CUs for fast wavefronts and the
   slow CUs for critical ones.
2. Among those, it takes the wavefront with the smallest counter. Ties go to
   the lowest buffer slot.
3. It sends that wavefront to the next CU of its class with a free slot. The
   search is round robin and starts after the CU it last used in that class.

Each CU has `SLOTS_PER_CU` wavefront slots. A completion (`done_valid`,
`done_cu`) frees one slot.

There is one fallback. If a class contains no CU at all, its wavefronts go to
the other class and `disp_fallback` is set. This case is real: with a 60/40
split the threshold is 1.40, and with at most 40 % spread no CU is strictly
above it. The allocator never uses the fallback only because a class is
*full*. In that case the wavefront waits, and `stat_wait_cycles` counts the
waiting cycles.

**Individual clocks.** Here, a CU's clock is a clock enable on the shared
reference clock `clk`. That reference is taken to run at
`REF_X100/100 = 2.00` times the slowest CU's frequency. Each cycle,
`cu_clock_gen` adds the CU's ratio to an accumulator. When the accumulator
reaches 200 it fires an enable and subtracts 200. So a CU with ratio `r`
gets exactly `floor(N·r/200)` enables in `N` reference cycles, evenly
spaced: a 1.00 CU gets every second cycle, a 1.40 CU gets 7 of every 10.

## Timing of the top-level interfaces

- **BIST writes.** A write takes effect at the next edge, and `slow_count`
  follows at the same edge.
- **Configuration.** `cfg_start` samples the slow count and all per-SIMD Fmax
  values.
  - The threshold is ready after about 20 cycles.
  - The CU ratios take about `NUM_CU × 27` cycles, which is about 3,500 for
    128 CUs, because one divider is used in turn for every CU.
  - `cfg_valid` rises once both results are ready. Nothing is dispatched
    before that.
- **Instructions.** `inst_valid/inst_ready` is a valid/ready handshake. The
  queue is `IQ_DEPTH` deep. An instruction pushed into an empty, idle queue
  leaves for the register file one cycle later. `rf_done` then pulses 8 or 16
  cycles after that, with the entry (`iss_entry`) and both operand rows.
  From push to result is therefore 9 cycles for fast operands and 17 for slow
  ones. The model keeps one read outstanding, so a stream of slow reads fills
  the queue and pushes back on the sender.
- **Wavefront requests.** `wf_req_valid/wf_req_ready` is a valid/ready
  handshake. The categorizer is looked up combinationally on `wf_req_id`.
  `disp_*` is registered and carries at most one dispatch per cycle. A
  wavefront accepted at edge *t* can appear on `disp_*` after edge *t+1* at
  the earliest.

## What follows the architecture and what is this design's choice

The following come from the architecture:

- one PS bit per register entry, reported by a BIST;
- the PS bits held in the issue-queue entry between RFA and RFB;
- categorization while the instruction waits to issue;
- critical wavefronts and a priority counter equal to the fast or slow share;
- each CU's Fmax set by its slowest SIMD and expressed as a ratio to the
  slowest CU;
- the threshold `1 + slow fraction`, with fast wavefronts going above it and
  critical ones below;
- 128 CUs (the near-threshold configuration);
- 4 SIMDs per CU and 64 lanes of 32 bits;
- register access latencies of 8 and 16 cycles.

The following are this design's own choices:

- 256 vector registers per SIMD;
- 40 wavefront slots per CU;
- 256 wavefront ids;
- queue and buffer depths of 16;
- 8-bit opcodes;
- all field widths and the hundredths format;
- rounding to the nearest value;
- the "any slow operand" rule for critical;
- strict `>` at the threshold;
- round robin as "next available CU";
- serving the smallest counter first;
- the fallback when a class is empty;
- clock enables on a 2× reference instead of separate clock sources;
- the single outstanding read in the register-file model.

Each of these is named in the opening comment of its file.

Known simplifications:

- The top has **one** issue queue and PS table, standing for the register
  file whose wavefronts are being categorized. A full GPU would have one per
  CU, feeding a shared categorizer.
- Mapping is done per **wavefront**. No step groups the wavefronts of a
  thread block onto one CU.
- How per-SIMD Fmax is measured is outside the design: it is an input.
- `vgpr_rf` is a model of an SRAM macro's timing, not a circuit.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against a model written independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

- `tb_sla_allocator` runs a full cycle-accurate reference model of the
  allocator. It covers the pending set, occupancy and both round-robin
  pointers, with random requests and completions under thresholds 1.20 and
  1.40.
- `tb_cu_fmax_unit` checks the 26-CU example ratios (1.07, 1.13, …, 1.00 for
  the slowest, 1.40 for the fastest) and random frequencies.
- `tb_sla_top` runs the whole design at its default size, with no parameter
  overrides. It goes through these steps:
  1. The BIST writes an 80/20 split, then configuration runs.
  2. It measures isolated fast and slow reads (9 and 17 cycles).
  3. A burst from 64 wavefronts pushes back on the sender, and the critical
     wavefronts must be exactly those that read a slow entry.
  4. Wavefronts are mapped with class checks until the slow CUs are full and
     wavefronts wait.
  5. The per-CU clock-enable rates are counted.
  6. The split moves to 60/40, where the fallback occurs.
  7. A timeline reset clears the categorization.

  Each of these mechanisms is counted and must occur.
- `tb_sla_port_ratio_sweep` runs the 80/20, 75/25, 70/30 and 60/40 splits
  through the top. For each split it prints how many CUs are fast, how many
  wavefronts are critical and where they went.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sla_pkg.sv rtl/*.sv tb/tb_sla_top.sv \
          --top-module tb_sla_top -Mdir obj_top && obj_top/Vtb_sla_top
```

Replace `tb_sla_top` with any other testbench in `tb/`. A block testbench
needs only `sla_pkg.sv`, its block and `seq_divider.sv`, but passing all of
`rtl/` works too. Each test finishes in well under a second of simulation.

## Changing it

Sizes are parameters of `sla_top`:

| Parameter | Default |
|---|---|
| `NUM_CU` | 128 |
| `NUM_SIMD` | 4 |
| `NUM_VGPR` | 256 |
| `NUM_WF` | 256 |
| `IQ_DEPTH` | 16 |
| `PEND_DEPTH` | 16 |
| `SLOTS_PER_CU` | 40 |
| `REF_X100` | 200 |
| `LANES` | 64 |
| `DATA_W` | 32 |

Field widths are in `sla_pkg`. `REG_W` must cover `NUM_SIMD × NUM_VGPR`, and
`WF_W` must cover `NUM_WF`. `REF_X100` must be at least the largest CU ratio,
or that CU is capped at one enable per reference cycle. The register-file
latencies are the `FAST_LAT`/`SLOW_LAT` parameters of `vgpr_rf`. Set
`FAST_LAT=4` for the 4-cycle case.
