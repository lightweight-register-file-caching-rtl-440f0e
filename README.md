# Malekeh: a register-file cache built into the operand collectors of a GPU core

A GPU core keeps the registers of all its resident warps in a large banked
register file. Reading those banks costs much of the core's dynamic energy.
Many register values are read again a few instructions later by the same
warp, so it pays to keep them close.

A conventional core already has small buffers between the banks and the
execution units. These operand collector units hold the source operands of
one issued instruction until all of them have arrived. This design turns
each of them into a tiny cache of the owning warp's registers, called a
caching collector unit (CCU). No storage is added for data: the existing
operand slots become cache lines, and only a few tag and control bits are
added. A read that hits in a CCU needs no bank access. Policies guided by
compiler hints decide three things:

- what to keep in a CCU;
- which warp issues next;
- how long to wait before handing a CCU to another warp.

Every parameter default is the full size of one streaming multiprocessor:

- 32 warps;
- a 256 KB register file in 8 banks;
- 8 CCUs with 8 cache entries each;
- 1024-bit warp registers (32 threads x 32 bit).

## Data flow

```
warp_rdy / warp_instr --> issue_scheduler --> ccu_allocator --> CCU[0..7]
                                                   ^   |            |
                            sthld_adapt -- STHLD --+   |     read requests
                                  ^                    |            v
                              issued instr.       port R      rf_arbiter --> rf_bank[0..7]
                                                                    |            |
wb[0..1] (writebacks) --------------------------> rf_arbiter        |   operand_crossbar
                                                  (bank write,      |     |      |
                                                   D filter) -------+  port S  port D
                                                                          v      v
                                                                       CCU[0..7] --> dispatch_scheduler --> eu_*
```

| File | Role |
|------|------|
| `rtl/malekeh_pkg.sv` | Sizes, instruction/port structs, register-to-bank mapping |
| `rtl/rf_bank.sv` | One bank: 256 rows x 1024 bit, one read and one write port |
| `rtl/rf_arbiter.sv` | Read arbitration per bank, write acceptance, filter deciding which writes reach a CCU |
| `rtl/operand_crossbar.sv` | Multiplexers: bank data to port S, writeback data to port D and to bank write ports |
| `rtl/ccu.sv` | The caching collector unit |
| `rtl/issue_scheduler.sv` | Chooses the warp that issues |
| `rtl/ccu_allocator.sv` | Chooses the CCU the issued instruction goes to; waits bounded by STHLD |
| `rtl/sthld_adapt.sv` | Adapts STHLD once per interval from the change in IPC |
| `rtl/dispatch_scheduler.sv` | Sends one fully collected instruction per cycle to the execution units |
| `rtl/malekeh_rf.sv` | Top level |

The execution units, fetch, decode and the scoreboard are outside the top.
The top has four external interfaces:

- **Instruction supply:** `warp_rdy` says the warp's next instruction may issue; `warp_instr` is that instruction.
- **Dispatch:** a valid/ready pair, `eu_valid`/`eu_ready`.
- **Writeback:** two slots, each with its own `wb_ready`.
- **Counters:** the `stat_*` outputs.

## The caching collector unit

A CCU belongs to one warp at a time. It has three parts.

- **Metadata:** the owning warp and the instruction waiting for dispatch.
- **Cache table (CT), 8 entries.** Each entry holds:
  - an 8-bit tag, which is the register number;
  - a lock bit, set while an instruction still needs the entry;
  - a 1-bit reuse hint. *Near* means the compiler expects the value to be read again soon (within a threshold RTHLD of instructions).
  - a 3-bit LRU age;
  - the 1024-bit value.
- **Operand collector table (OCT):** 7 slots. Each slot has a valid bit, a ready bit and a 3-bit index to the CT entry that holds its operand. Two operands naming the same register share one entry and one bank read.

### Allocation

When an instruction is allocated to a CCU, the CCU does the following in
the same cycle:

1. If the warp differs from the owner, the CT is flushed.
2. Each source register is looked up in the CT. A hit simply points its OCT slot at the entry.
3. A miss takes a victim entry and queues a bank read.
4. All source entries are locked, take the instruction's near/far hint and become most recently used.

The CCU is then busy until dispatch. Misses are requested one per cycle.
A value arrives on port S one cycle after the arbiter grants its request.

### Victim choice

1. Locked entries are never replaced.
2. An empty entry is used first.
3. Otherwise a random *far* entry is chosen, using a 16-bit LFSR.
4. If every candidate is near, the entry with the highest LRU age is chosen.

### Destination values

Every result is written to the banks, so any CCU can be flushed at any
time without losing data. A result also goes into the owning warp's CCU
through its single write port D, but only when the result carries the near
hint. If two such results arrive in one cycle, the lower writeback slot
wins and the other goes only to the banks.

A result of the owning warp that does not reach port D (far, or the losing
slot) invalidates any cached copy of that register. Without this, a CCU
could later hand out a stale value.

### Port R

Port R tells the scheduler and the allocator four things:

- whether the CCU is owned;
- by which warp;
- whether it is busy;
- whether any live value in it is near.

## Issue and CCU allocation

**Issue scheduler.** Ready warps form two classes: warps that own a CCU,
and all others. Warps that own a CCU win. Within a class the oldest warp
wins; age is the warp number, so warp 0 is oldest. A warp whose CCU still
holds an undispatched instruction is skipped.

**CCU allocator.** It places the selected warp's instruction in this order:

1. The warp's own CCU, if it has one.
2. Otherwise the first free CCU that is empty or holds only far values. It is flushed and given to the warp.
3. Otherwise every free CCU still holds near values that its warp may reuse. A wait counter is compared with STHLD. While the counter is not above STHLD, issue stalls and the counter counts up. Once it is above STHLD, a free CCU is replaced.
4. With no free CCU, issue stalls.

The counter clears whenever an instruction issues. STHLD trades hit ratio
against lost issue cycles.

## Adaptive STHLD

Time is cut into intervals of 10000 cycles. At the end of each interval,
the number of instructions issued (the interval's IPC) is compared with the
previous interval. A change is *large* (L) when |cur - prev| x 16 > prev;
otherwise it is *small* (S). A six-state machine then moves and adds a
delta to STHLD:

| state | on S | on L |
|-------|------|------|
| 1 | to 2, +1 | to 2, +1 |
| 2 | stay, +1 | to 3, +1 |
| 3 | to 2, +1 | to 4, -2 |
| 4 | to 2, +1 | to 5, -1 |
| 5 | to 6, +1 | stay, -1 |
| 6 | stay, 0 | to 3, +1 |

What each state does:

- **State 2** climbs while IPC is flat.
- **State 3** is a speculative step up after a large change.
- **States 4 and 5** walk back down when the step hurt.
- **State 6** holds the value until the next large change.

STHLD is 8 bits, starts at 0 and saturates at both ends.

## Timing

- **Issue cycle:** the instruction is placed in its CCU and its sources are looked up.
- **All hits:** the instruction is offered for dispatch in the next cycle.
- **Misses:** each read request goes out from the next cycle. The bank is read in the cycle the request is granted. The value is in the CT one cycle later.
- **All misses, no bank conflict:** the instruction is offered three cycles after issue.
- **Bank conflicts:** each bank serves one read per cycle, with round-robin among the CCUs.
- **Writes:** each bank takes one write per cycle. A slot that loses is held with `wb_ready` low.
- **Dispatch:** one instruction per cycle, round-robin among the ready CCUs.
- **Reset:** asynchronous and active low for all control state. Bank contents are not reset.

## Where this design departs from, or adds to, the description it follows

These points are this design's own choices:

- **Banks.** Each bank has one read and one write port.
- **Bank mapping:** register r of warp w is in bank (w + r) mod 8, at row {w, r[5:3]}. This allows 64 registers per warp.
- **Writeback slots.** There are two slots per cycle, with back-pressure.
- **Large-change threshold.** The original description gives no number for when an IPC change counts as large; this design uses 1/16.
- **Warp age.** Age is the warp number.
- **Victim choice.** An empty CT entry is taken before a far one.
- **Invalidation.** Writes that bypass the CCU drop its cached copy.
- **Busy CCUs.** A warp whose CCU is busy is not offered for issue.
- **Statistics.** The `stat_*` counters are added for measurement.

The SIMD execution units are not part of this RTL. Neither is the compiler
pass that computes the reuse hints. The hints arrive with each source
operand (`src_t.near`), with each instruction's destination (`dst_near`)
and with each writeback (`wb_t.near`).

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Mdir obj_ccu \
    rtl/malekeh_pkg.sv rtl/ccu.sv tb/tb_ccu.sv --top-module tb_ccu
./obj_ccu/Vtb_ccu
```

The whole design has two end-to-end testbenches:

- **`tb/tb_malekeh_rf.sv`** runs 24 warps with a 300-cycle STHLD interval.
- **`tb/tb_malekeh_rf_full.sv`** runs every default: 32 warps and 10000-cycle intervals.

Both use `tb/malekeh_harness.sv`, which plays the rest of the core:

- It generates random programs for each warp and computes the near hints from each program's real reuse distances.
- It keeps a scoreboard and a golden copy of every register.
- It checks every dispatched operand against that copy.
- It models the execution units with random latencies and writeback back-pressure.

At the end, each mechanism must have happened at least once, or the run
fails. The mechanisms are: hits, misses, D-port writes, flushes, STHLD
waits and the replacements that follow, busy stalls, issues from the
cached class, back-pressure, completed intervals and a change of STHLD.

```
verilator --binary --timing --assert -O1 -Mdir obj_top \
    rtl/malekeh_pkg.sv rtl/*.sv tb/malekeh_harness.sv tb/tb_malekeh_rf_full.sv \
    --top-module tb_malekeh_rf_full
./obj_top/Vtb_malekeh_rf_full
```

The full-size run takes a few seconds after a compile of about 1.5 minutes.
It typically reaches a hit ratio of about 80 %.

To change a size, edit `rtl/malekeh_pkg.sv`. N_CCU and the interval length
are also parameters of `malekeh_rf`.
