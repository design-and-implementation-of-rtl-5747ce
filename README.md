# A 4-way reorder buffer for an out-of-order pipeline

An out-of-order core executes an instruction as soon as its operands are
ready, so results arrive in a different order from the program. The
architectural state must still change in program order. Otherwise a
mispredicted branch or a faulting instruction would leave behind writes
that should never have happened.

This reorder buffer (ROB) resolves that conflict. Every instruction takes an
entry in program order when it is issued. Its result is parked in that entry
when it finishes, whatever the order. The result leaves for the register file
only when every older instruction has left. Until then, the buffer also acts
as a bypass: an instruction that needs a parked result as an operand can read
it from the buffer. A mispredicted branch throws away every younger entry. An
exception throws away the whole buffer.

The default configuration:

- 32 entries;
- 64-bit results and PCs;
- 5-bit physical register numbers;
- 4 instructions issued, 4 results written back and up to 4 instructions
  committed per cycle.

This follows the design described by C. Mao in *Design and implementation of
reorder buffer in superscalar pipeline processor*. The section "Departures
and additions" lists every point where this RTL fills a gap in that
description or differs from it.

## Life of an entry

```
           issue (ack)             write-back (exec_vld, granted)
  free ──────────────► allocated ─────────────────────────────► ready
   ▲                  valid=1, ready=0                         valid=1, ready=1
   │                        │                                      │
   │   flush (younger than  │                                      │ at head, in order,
   │   the branch) or       ▼                                      ▼ no exception
   └──────────────── discarded ◄──── exception at head ──── committed
```

An entry holds these fields:

- the flags `valid`, `ready`, `except`, `is_branch` and `taken`;
- the destination physical register `rd_phy`;
- the `pc`;
- the `result`.

A write-back aimed at a free entry is ignored.

## Interface

All ports use one clock, `clk`. `rst_n` is an active-low, asynchronous reset
that clears every entry and both pointers. Ports with a lane index are
unpacked arrays `[4]`. "Comb" means the output answers in the same cycle. "Reg"
means it is registered and shows in the cycle after the event.

| group | port | dir | width | timing | meaning |
|---|---|---|---|---|---|
| issue | `issue_vld` | in | 1 | | group strobe |
| | `issue_inst_vld` | in | 4 | | lane valid |
| | `issue_inst_pc[4]`, `issue_inst_rd_phy[4]`, `issue_inst_is_branch` | in | 64 / 5 / 4 | | instruction info |
| | `rob_issue_ack` | out | 4 | comb | lanes accepted |
| | `rob_issue_ptr[4]` | out | 5 | comb | entry given to each lane |
| write-back | `exec_vld`, `exec_rob_ptr[4]`, `exec_result[4]`, `exec_branch_taken`, `exec_except` | in | 4 / 5 / 64 / 4 / 4 | | one result per port |
| | `rob_exec_ack` | out | 4 | comb | result taken |
| branch flush | `bp_flush_vld`, `bp_flush_ptr` | in | 1 / 5 | | branch in entry `bp_flush_ptr` was mispredicted |
| forwarding | `exec_rs1_phy`, `exec_rs2_phy` | in | 5 | | source registers |
| | `rob_exec_data1/2`, `rob_exec_data1/2_vld` | out | 64 / 1 | comb | forwarded values |
| commit | `commit_vld`, `commit_cnt` | out | 4 / 3 | reg | slots committing, in program order from slot 0 |
| | `commit_rd_phy[4]`, `commit_result[4]`, `commit_pc[4]` | out | 5 / 64 / 64 | reg | the committed instructions |
| branch feedback | `rob_branch_update_vld`, `rob_branch_pc`, `rob_branch_taken` | out | 1 / 64 / 1 | reg | a branch committed, with its actual direction |
| exception | `rob_except_vld`, `rob_except_pc` | out | 1 / 64 | reg | an exception was taken; the buffer is now empty |
| status | `rob_full`, `rob_almost_full`, `rob_empty`, `rob_used_cnt` | out | 1 / 1 / 1 / 6 | state | occupancy |
| debug | `dbg_rob_valid`, `dbg_rob_ready`, `dbg_write_ptr`, `dbg_read_ptr` | out | 32 / 32 / 5 / 5 | state | raw state |

### Cycle by cycle

- **Issue.** The offered lanes in cycle *t* are acknowledged in *t*. Each
  accepted lane's entry number is on `rob_issue_ptr`. The entry is valid from
  *t+1*, and the execution side tags the instruction with that number.
- **Write-back.** A result granted in *t* sets the entry's `ready` at the
  edge ending *t*.
- **Commit.** In cycle *t+1*, the ready entries at the head are chosen. At
  the edge ending *t+1* they leave the buffer. During *t+2* the `commit_*`
  outputs show them. So a result written in *t* appears on the commit port
  two cycles later, if nothing older is pending.
- **Flush.** `bp_flush_vld` in *t* discards the younger entries at the edge
  ending *t*. Issue and commit are both held for cycle *t*.
- **Exception.** An excepting entry that is at the head in *t* empties the
  buffer at the edge ending *t*. `rob_except_*` report it during *t+1*. In the
  same cycle it wins over a flush, because it is older than any branch.

## Issue arbitration (`rob_issue_arb`)

The arbiter counts the offered lanes and compares the count with the number
of free entries. If the whole group fits, every valid lane is accepted.
Otherwise lanes are accepted in order, lane 0 first, until the free entries
run out. The lanes that are refused must be offered again.

Accepted lanes are packed. For example, lanes 0 and 2 of a group go to
entries *w* and *w+1*, where *w* is the write pointer. The free count is the
one at the start of the cycle: entries freed by this cycle's commit become
available in the next cycle.

## Write-back arbitration (`rob_exec_arb`)

Four ports can complete instructions in the same cycle. If two ports name
the same entry, the lower-numbered port wins (priority 0 > 1 > 2 > 3). The
losing result is dropped and its `rob_exec_ack` bit stays low. Ports that
name different entries are all granted.

## Commit, branch feedback and exceptions (`rob_commit_sel`)

This is the part whose rules matter most to the rest of the core.

Each cycle the four oldest entries (slots 0 to 3, starting at the read
pointer) are examined. Walking from slot 0, an entry commits while it is
valid, ready and free of an exception. The walk stops at the first entry that
is not. A completed instruction behind an unfinished one therefore waits,
however early it finished. At most four entries commit.

**Branches end a commit group.** When a branch commits, the group ends right
after it. This gives at most one branch per cycle. Its PC and actual
direction go to the predictor on `rob_branch_*`, in the same cycle as its
`commit_*` output.

**Exceptions are taken at the head.** Suppose an entry's write-back carried
`exec_except`. The entries older than it commit normally. When it reaches the
head, nothing commits. Instead the whole buffer is discarded: the write
pointer jumps to the read pointer and the count goes to 0. `rob_except_vld`
and `rob_except_pc` then report the faulting instruction. The excepting
instruction itself is not committed, so its result never reaches a register.
Restarting fetch is the job of the unit that receives the report.

**Commit is held during a flush cycle**, so it cannot race the removal of
wrong-path entries.

## Branch flush (`rob_flush_mask`)

The branch unit raises `bp_flush_vld` with the number of the mispredicted
branch's entry. The occupied entries run from the read pointer for
`rob_used_cnt` entries. Every one of them that lies after the branch is
cleared. The branch itself stays and commits normally, reporting its real
direction. The write pointer becomes `bp_flush_ptr + 1`. The read pointer does
not move, so the instructions older than the branch still commit in order.

A flush that names a free entry is ignored. Fetch redirection is not done by
the buffer.

## Operand forwarding (`rob_fwd`)

For each of the two source registers, the buffer is searched in age order
for the youngest valid entry that writes that register.

- If that entry is ready, its result appears on `rob_exec_dataN` with
  `rob_exec_dataN_vld` high.
- If that entry is not ready yet, nothing is forwarded. An older entry that
  writes the same register holds a stale value, so it must not be used.
- If no entry writes the register, nothing is forwarded. The value is then in
  the register file.

The search is combinational over all 32 entries. It is the longest logic path
in the design.

## Pointers and occupancy (`rob_ptr_mgmt`)

The pointers are circular, 5 bits wide:

- the write pointer names the next entry to allocate;
- the read pointer names the head.

The occupancy is kept in its own 6-bit register. Equal pointers can then mean
either empty or full without ambiguity. The status outputs are:

- `rob_full`: no entry is free;
- `rob_almost_full`: fewer than `AF_FREE` entries are free (default 4, one
  full issue group);
- `rob_empty`: no entry is occupied.

Pointer arithmetic wraps by compare-and-subtract, so the depth need not be a
power of two.

## Files and parameters

`rtl/` holds one unit per file:

| file | content |
|---|---|
| `rob_pkg.sv` | default sizes, `ptr_add` / `ptr_dist` circular pointer helpers |
| `rob.sv` | top level: wiring, registered commit / branch / exception outputs, status, debug, assertions |
| `rob_issue_arb.sv` | issue arbitration |
| `rob_exec_arb.sv` | write-back arbitration |
| `rob_ptr_mgmt.sv` | pointers and occupancy |
| `rob_storage.sv` | the entry array |
| `rob_commit_sel.sv` | commit decision |
| `rob_flush_mask.sv` | flush range |
| `rob_fwd.sv` | operand forwarding |

Parameters of `rob`:

| parameter | default | meaning |
|---|---|---|
| `DATA_WIDTH` | 64 | result width |
| `ROB_DEPTH` | 32 | entries |
| `PTR_WIDTH` | `$clog2(ROB_DEPTH)` = 5 | entry number width |
| `REG_ADDR_WID` | 5 | physical register number width |
| `PC_WIDTH` | 64 | PC width |
| `WAYS` | 4 | issue and commit lanes |
| `PORTS` | 4 | write-back ports |
| `AF_FREE` | `WAYS` | almost-full threshold, in free entries |

`WAYS` must be at least 2. The two forwarding lookups are fixed at the top
level. `rob_fwd` itself takes any number.

`rob.sv` carries concurrent assertions:

- the occupancy never exceeds the depth;
- the count of valid bits always equals the occupancy;
- nothing commits in a flush cycle;
- a commit always includes the head.

Yosys (slang front end) synthesizes the default configuration to about 5,100
flip-flops. The storage array is made of flip-flops with an asynchronous reset
on every field, not a RAM macro.

## Departures and additions

Compared with the published description:

- **Flush keeps the read pointer.** The description resets the read pointer to
  0 on a flush. That would lose, or commit out of order, the entries between
  the head and the branch whenever the head is not entry 0. Only the write
  pointer is moved here.
- **Occupancy is a register.** The description computes the used count from
  the two pointers as `write_ptr - read_ptr + 1`, which reads 1 when the
  buffer is empty and cannot tell full from empty. A separate counter is kept
  here.
- **One branch per commit group.** The description checks only the entry at
  the read pointer for branch feedback. With four commits per cycle, that
  would miss branches in slots 1 to 3, so the group is cut after a branch.
- **Chosen where the description is silent:**
  - the exception policy: taken at the head, whole buffer discarded, report
    on `rob_except_*`;
  - lane-0-first priority for a partially accepted issue group;
  - the almost-full threshold;
  - youngest-writer-wins forwarding;
  - dropping write-backs to free entries;
  - holding issue and commit during a flush.
- **Added ports:** `rob_issue_ack`, `rob_issue_ptr`, `rob_exec_ack`,
  `rob_empty`, `rob_except_*` and `issue_inst_is_branch`.
- **Not stored in an entry:** source operands and load/store addresses, which
  the description mentions only in passing. No memory-ordering logic is
  included.
- **Not reproduced:** the 7 nm timing, area and power figures of the
  description (1.6 GHz, about 10,761 µm², 4.6 mW).

## Verification

Each unit has a self-checking testbench in `tb/` that compares it with an
independent reference model:

- `tb_rob_issue_arb`: exhaustive over small free counts, then random;
- `tb_rob_exec_arb`: named conflicts, then random;
- `tb_rob_ptr_mgmt`: fill, drain, flush and clear, then random legal traffic;
- `tb_rob_storage`: random allocation, write-back and clear, plus an
  asynchronous reset;
- `tb_rob_commit_sel`: all 2^16 flag combinations;
- `tb_rob_flush_mask`: every head, occupancy and flush entry;
- `tb_rob_fwd`: named cases, then random contents.

`tb_rob` tests the whole buffer at its default size. A queue model of the
in-flight instructions predicts, every cycle:

- the issue and write-back acknowledges;
- the forwarded operands;
- the commit group;
- the branch feedback and the exception report;
- the occupancy and the status flags;
- the pointers and the valid / ready vectors.

It first replays the nine scenarios of the original verification plan:

1. four instructions issued;
2. two issued on the low lanes;
3. results for entries 0 and 2;
4. results for entries 1, 3 and 4;
5. a branch issued;
6. the branch's result, taken;
7. a misprediction flush at the branch;
8. new instructions issued after the flush;
9. their results, after which everything drains in order.

An asynchronous reset during operation follows. Directed tests then cover
forwarding, a write-back conflict, a divide-by-zero style exception and a
full buffer. The test ends with 6,000 cycles of random traffic. It counts how
often each mechanism happens and fails if any never does: full, almost full,
partial issue, write-back conflict, flush, exception, forwarding hit and
pending forward, 4-wide commit, branch feedback, pointer wrap, reset and
dropped write-back.

`tb_rob_throughput` checks the rate. It issues a full group of four every
cycle for 400 cycles and returns the results four per cycle. Within each
pair of groups, the younger group completes first. The test requires that:

- every issue lane is accepted;
- commits come out in program order;
- exactly four instructions commit in every steady-state cycle;
- an instruction whose result arrives in cycle *t* is on the commit port in
  cycle *t+2*.

Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rob_pkg.sv tb/tb_rob.sv --top-module tb_rob
./obj_dir/Vtb_rob
```

`tb_rob` finishes in well under a second. To try a different size, change the
parameter defaults in `rtl/rob_pkg.sv`. The testbenches read their sizes from
there, apart from the unit testbenches, which fix their own sizes.
