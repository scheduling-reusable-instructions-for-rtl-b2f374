# A loop-reusing issue queue

In an out-of-order core, the front end runs every cycle: the instruction
cache, branch predictor and decoder. That holds even when the core is going
round a tight loop whose decoded instructions were seen a few cycles earlier.
This RTL implements an issue queue that keeps those decoded instructions. It
detects a small loop, keeps the loop's instructions in its entries after they
issue, and then feeds them back to register renaming by itself. While it
does so, the front end (everything before renaming) can be clock- or
power-gated. No separate loop cache is needed: the storage is the issue
queue that the core already has. Because several iterations are buffered, the
loop is also unrolled inside the queue.

The design follows the issue queue of J. S. Hu, N. Vijaykrishnan, S. Kim,
M. Kandemir and M. J. Irwin, "Scheduling Reusable Instructions for Power
Reduction". The defaults are that proposal's baseline: a 64-entry unified
queue, 4-wide dispatch and issue, and an 8-entry table of non-bufferable
loops. The rest of the core is outside this RTL and is reached through
ports: fetch, decode, branch prediction, renaming, the reorder buffer and
the function units.

## The three states

A two-bit register, `R_iqstate`, holds the queue's mode. Its encoding is
`00` Normal, `01` Loop_Buffering, `11` Code_Reuse (`riq_pkg::iq_state_e`).

* **Normal.** The queue works as an ordinary collapsing issue queue. The loop
  detector looks at every dispatched conditional branch (predicted taken)
  and direct jump. The instruction is a loop end if its target lies at or
  before it and the loop body, from the target to the branch, holds at most
  `IQ_SIZE` instructions. If that address is not in the non-bufferable loop
  table (NBLT), the target and branch addresses are stored in `R_loophead`
  and `R_looptail`, and the queue enters Loop_Buffering.
* **Loop_Buffering.** Each dispatched instruction is marked as buffered
  (its *classification bit* is set) and counted. Its three logical register
  numbers are written to the *logical register list* (LRL). A buffered
  instruction that issues stays in its entry and sets its *issue state
  bit*. When the loop end is dispatched again, the count is the size of the
  iteration just buffered. If that many entries are still free of buffered
  instructions, one more iteration is buffered. Otherwise the queue enters
  Code_Reuse. So a 5-instruction loop in a 64-entry queue is buffered 12
  times (60 entries).
* **Code_Reuse.** `frontend_gate` is high and nothing is taken from the
  front end. The queue replays the buffered instructions in program order
  through the reuse pointer (below). This continues until a branch
  misprediction arrives. That happens on loop exit, on a different path
  inside the loop, or on a branch older than the loop.

Buffering is *revoked*, and the queue returns to Normal, in four cases:

| cause | NBLT entry |
|---|---|
| an instruction outside `[R_loophead, R_looptail]` is dispatched while no called procedure is active | yes |
| another loop end (an inner loop) is detected | yes |
| every entry holds a buffered instruction and the loop end has not been seen (a large procedure call) | yes |
| branch misprediction | no |

On revoke, buffered instructions that have already issued leave the queue at
once, and every classification bit is cleared. A misprediction also removes
all entries younger than the branch, judged by reorder-buffer age. The NBLT
is a FIFO-replaced content-addressable table of loop-end addresses. A loop
found in it is not buffered again, which stops the queue from switching
back and forth between Normal and Loop_Buffering.

Calls inside a loop are allowed. A small call-depth counter lets the
addresses of a called procedure count as part of the loop. The procedure's
instructions are then buffered and counted with the iteration.

## Reuse: how buffered instructions are found again

This is the least obvious part of the design.

*Buffer slots.* Buffering only ever appends to the queue, and a buffered
instruction is never removed while the loop stays buffered. The buffered
instructions therefore form one contiguous block at the young end of the
collapsing queue, in program order. Older unbuffered instructions can still
drain out ahead of them. Each buffered instruction is named by its *slot*,
its position in buffering order (0 is the loop head). Slot `s` lives at
queue entry `count - nbuf + s`, whatever collapsing has happened in front of
it. The LRL is indexed by slot, so it never has to move.

*The reuse pointer* (`riq_reuse_sched`) holds a slot number and is set to 0
on entering Code_Reuse. Each cycle it looks at the issue state bits of the
next `ISSUE_W` slots. The leading run of set bits, `m` instructions, has
issued, so those entries can take the next dynamic instance. Their logical
registers are read from the LRL and sent out on `reuse_req`. Renaming
answers in the same cycle on `reuse_ren` with new physical tags and a new
reorder-buffer index. The queue writes only those fields, clears the issue
state bit, and the instruction waits to issue again. The pointer advances by
`m` and returns to slot 0 after the last buffered instruction. `m` is also
limited by `ren_avail`, the number of instructions renaming can take that
cycle.

*Branches while reusing* keep the prediction they had when they were
buffered (`static_info_t.pred_taken` stays in the entry). The core checks
them at execution as usual. A wrong one arrives as `mispredict`.

## Cycle behaviour

* Dispatch: a group of up to `DISP_W` renamed instructions, in program
  order, is offered on `disp`. The first `disp_cnt` are taken at the next
  edge. Fewer are taken when the queue is nearly full, and none in
  Code_Reuse or during a misprediction. The rest must be offered again. One
  exception: when a group contains the loop end that starts Code_Reuse, the
  instructions after it are not taken, and the front end, now gated,
  discards them.
* Detection and buffering decisions for a group are combinational in the
  dispatch cycle. Instructions after a detected loop end in the same group
  are already buffered.
* Issue: up to `ISSUE_W` ready, unissued entries, oldest first, within the
  per-cycle unit limits (4 integer ALU, 1 integer multiply, 4 FP ALU,
  1 FP multiply). Issue outputs are combinational from the entries. A
  writeback tag on `wb_tag` makes dependants eligible from the next cycle.
* Holes left by leaving instructions are closed at the same edge
  (`iq_collapse`).
* `events` gives one-cycle pulses for power or statistics counters: loop
  detection, NBLT hit, start of buffering, further iteration, switch to
  Code_Reuse, and each revoke cause. Each is at most one pulse per cycle,
  even when a group holds several ends of a very short loop.

## Files

| file | contents |
|---|---|
| `rtl/riq_pkg.sv` | widths, state and unit-class enums, entry and port structs |
| `rtl/riq_top.sv` | the subsystem: all blocks wired together |
| `rtl/riq_loop_detector.sv` | capturable-loop check per decoded instruction |
| `rtl/riq_nblt.sv` | non-bufferable loop table (8-entry CAM, FIFO replacement) |
| `rtl/riq_ctrl.sv` | state machine, loop registers, iteration counter, revoke and gating |
| `rtl/riq_issue_queue.sv` | collapsing queue with classification and issue state bits |
| `rtl/riq_lrl.sv` | logical register list, 3 x 5 bits per slot |
| `rtl/riq_reuse_sched.sv` | reuse pointer |
| `tb/tb_riq_*.sv` | one self-checking testbench per module |
| `tb/tb_riq_core.sv`, `tb/tb_riq_sizes.sv` | the end-to-end program at 32, 128 and 256 entries |

## Where this RTL makes its own choices

The original proposal describes the mechanism, not an implementation.
These points are decisions made here:

* The loop detector is evaluated on the dispatch group. The decode-stage
  information (address, branch kind, predicted target) travels with each
  instruction instead of being checked one stage earlier.
* "Fits in the queue" means the body, from the target to the branch
  inclusive, has at most `IQ_SIZE` instructions. The proposal words it both
  as "distance no larger than" and as "size no larger than", which differ by
  one. Instructions are taken as 4 bytes.
* The "another iteration?" decision compares the iteration size with the
  entries not holding buffered instructions, not the entries that are empty
  at that moment.
* Call nesting is tracked with a 4-bit depth counter.
* A misprediction does not register the loop in the NBLT.
* Only the multi-iteration buffering policy is built. Buffering a single
  iteration and switching to Code_Reuse at once, which the proposal
  considers and sets aside, is not an option here.
* Selection is oldest first. Entries are aged by reorder-buffer index
  relative to `rob_head`.
* Reuse renaming is a same-cycle handshake, with capacity given by
  `ren_avail`.
* Reset is asynchronous and active low.
* Sizes not given in the proposal: 32-bit addresses, 7-bit physical tags
  (128 registers), 6-bit reorder-buffer index (64 entries), an 8-bit opaque
  opcode field, and `WB_W = 4` writeback tags per cycle.

Not included are the parts the proposal takes from its baseline processor:
fetch, instruction cache, branch predictor, decoder, renaming logic,
reorder buffer, load/store queue, function units and caches. The queue
models only the scheduling side of execution. Loads and stores are ordinary
entries here.

## Verification

Each module has a self-checking testbench that ends with a `TB_RESULT`
line:

* `tb_riq_loop_detector`: corner cases (a loop of exactly 64 and of 65
  instructions, forward, self, not-taken) and random groups against an
  integer reference.
* `tb_riq_nblt`: random inserts and lookups against a FIFO model.
* `tb_riq_lrl`: random multi-port writes and reads against an array.
* `tb_riq_reuse_sched`: random issue state bits and renaming capacity
  against a model pointer, including the wrap.
* `tb_riq_ctrl`: directed programs.
  * A 5-instruction loop: Code_Reuse after exactly 60 buffered instructions,
    with nothing taken past the loop end.
  * A loop calling a procedure: 56 buffered.
  * A loop exit followed by an NBLT hit.
  * An inner-loop revoke.
  * A full-queue revoke caused by an 80-instruction procedure.
  * A misprediction while buffering.
  * Every loop size from 1 to 65 instructions, with random dispatch
    capacity. The buffered count must be floor(64 / size) x size, and
    65 must never be buffered.
* `tb_riq_issue_queue`: run at 16 entries, with random dispatch, wakeup,
  buffering, reuse, squash and revoke, against a queue model. Every issued
  instruction, the free and buffered counts, and the issue state bits are
  compared each cycle.
* `tb_riq_top`: the whole subsystem at its default parameters, inside a
  behavioural core. That core has a front end with an ideal predictor,
  renaming with recovery, a 64-entry reorder buffer and pipelined units.
  * Every instruction computes a value from its sources. Each committed
    instruction's address and value are checked against a sequential
    reference run of the same program.
  * The program has a loop with a mid-loop misprediction, a loop with a
    call, a nested loop and a loop with a large call. Together they exercise
    each state change, each revoke cause, pointer wrap, collapse and
    dispatch stall.
  * It commits 2217 instructions in about 600 cycles, with the front end
    gated about 68% of the time.
* `tb_riq_sizes`: the same program and checks, run with the queue at 32,
  128 and 256 entries (`tb_riq_core` is the shared core model). It reports
  the front end gated for 72%, 70% and 44% of cycles. A larger queue
  buffers more iterations before it starts reusing. The reorder buffer of
  the core model stays at 64 entries, because the 6-bit index in `riq_pkg`
  fixes that size.

Running a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/riq_pkg.sv \
    tb/tb_riq_top.sv --top-module tb_riq_top -Mdir obj_top
./obj_top/Vtb_riq_top
```

Because it uses `-y rtl`, Verilator picks up any other module from `rtl/` by
its file name.

Lint notes: `riq_issue_queue` samples `rst_n` in its two clocked assertions
(dispatch group contiguous, group fits). Verilator therefore reports `rst_n`
as used both asynchronously and synchronously. This affects only the
assertions.

## Changing it

* `IQ_SIZE`, `DISP_W`, `ISSUE_W`, `WB_W` and `NBLT_DEPTH` are parameters
  of `riq_top`.
* The unit mix is set by the `N_*` parameters of `riq_issue_queue`.
* Field widths are in `riq_pkg`.
* The buffering decision and revoke rules are all in the combinational
  block of `riq_ctrl`. It walks the dispatch group one instruction at a
  time, in program order.
