# Dead-value-aware register renaming and save/restore elimination

A compiler knows, at many points of a program, that a register holds a value
that will never be read again before it is overwritten: the value is *dead*.
A conventional processor only learns this when the next write to the register
commits, and until then it keeps the value's physical register occupied and
dutifully saves and restores the register around procedure calls and thread
switches. This RTL implements the rename-stage hardware that lets the
processor act on *dead value information* (DVI) as soon as it is announced:

* **Early release of physical registers.** When a value is declared dead, its
  architectural register is unbound from its physical register, and that
  physical register returns to the free pool as soon as the declaring
  operation commits. The physical register file can therefore be smaller for
  the same performance; the default size here is 50 integer registers, the
  point at which the scheme was found to perform best, against 64 without it.
* **Dropping dead saves and restores at procedure calls.** Callee saves and
  restores are encoded as *live-stores* and *live-loads*. A live-store whose
  register is dead is never dispatched, and neither is the matching live-load.
* **Dropping dead saves and restores at thread switches.** The mask of live
  registers can be stored to and reloaded from a thread's control block, so a
  switch routine built from live-stores and live-loads skips dead registers.

## Where dead value information comes from

There are two sources, and both end up as a 32-bit *kill vector* (one bit per
architectural register) produced by `dvi_decode`:

* **Explicit DVI**: a new *kill* instruction carries a mask of dead registers.
  Here the mask field is 16 bits wide and a further bit selects whether it
  covers r0..r15 or r16..r31. The callee-saved registers of a MIPS-style ABI
  (r16..r23, r30) all sit in the upper half, so one kill before a call covers
  them. A typical compiler strategy is exactly that: one kill per call site,
  naming the callee-saved registers that are dead there.
* **Implicit DVI**: the calling convention already says that caller-saved
  registers are dead at procedure entry and exit, so every call and every
  return kills the registers set in the run-time input `abi_mask`. Software
  loads it with the caller-saved set; clearing it turns implicit DVI off,
  which is useful for debugging. r0 is never killed.

## The Live Value Mask and register binding

The central state is the **Live Value Mask (LVM)**, one bit per
architectural register kept beside the rename map. It is set when the register
is written (destination renaming) and cleared when a kill vector names the
register. Every update happens at decode, in program order.

A kill does more than clear the LVM bit: it *unbinds* the architectural
register from its physical register and records that physical register in the
killing operation's reorder-buffer entry. Because releasing a register cannot
be undone, the register only reaches the free pool when that entry commits.
After that the architectural register has no storage at all until it is
written again; a write to an unbound register releases nothing.

The example below shows the effect. `p1` would, in a conventional renamer,
stay allocated until `I4` commits, however far away `I4` is.

| step | operation              | r1 bound to | free pool          |
|------|------------------------|-------------|--------------------|
| I1   | `r1 <- ...`            | p1          | p2 p3 ...          |
| I2   | `... <- r1`            | p1          | p2 p3 ...          |
| I3   | `kill r1` (commits)    | none        | p2 p3 ... p1       |
|      | unrelated operations   | none        | p1 can be reused   |
| I4   | `r1 <- ...`            | p2          | p3 ... p1          |

This design keeps a **binding bit** per map entry (`map_valid`) separate
from the LVM bit. The two normally agree, but a return may copy a "dead" bit
back into the LVM for a register that still owns a physical register (see the
next section). With a single bit that register would be lost to the pool; with
two bits it stays bound and is released by its next overwrite as usual.

Reading an unbound register is a program error (it contradicts the compiler's
own liveness claim); the rename stage then hands out the stale tag and flags
the source as unbound (`disp_src*_bound`). Any value is acceptable there,
because the program never uses it.

## Save and restore elimination and the LVM-Stack

`sr_elim` decides, in the decode cycle, whether an operation is dropped:

* a **live-store** (save) is dropped when its data register is dead in the
  current LVM;
* a **live-load** (restore) is dropped when its data register is dead in the
  LVM snapshot at the top of the **LVM-Stack**.

The current LVM cannot judge restores: between the save and the restore the
procedure usually writes the register (that is why it saved it), which sets
the LVM bit. The decision has to be the one taken for the save, so a
snapshot of the LVM is pushed at every call and consulted for the restores
of that procedure:

| step | operation         | LVM bit r16 (before) | stack top r16 | action          |
|------|-------------------|----------------------|---------------|-----------------|
| I1   | `... <- r16`      | live                 |               |                 |
| E2   | `kill r16`        | live                 |               |                 |
| I2   | `call proc`       | dead                 |               | push snapshot   |
| I3   | `save r16`        | dead                 | dead          | save dropped    |
| I4   | `r16 <- ...`      | dead                 | dead          |                 |
| I5   | `... <- r16`      | live                 | dead          | top unchanged   |
| I6   | `restore r16`     | live                 | dead          | restore dropped |
| I7   | `return`          | live                 | dead          | pop             |
| I8   | `r16 <- ...`      | dead                 |               |                 |

At a return the snapshot is popped and its bits for the registers in the
run-time input `callee_mask` are copied back into the LVM. The other bits keep
their current value: a return-value register written by the callee must not
be marked dead by a snapshot taken before the call.

The LVM-Stack (`lvm_stack`) is a 16-entry circular buffer. On overflow it
wraps and overwrites the oldest snapshot; on underflow it behaves as empty.
An empty stack reads as all-live, so a restore is never dropped without a
snapshot to justify it. Dropping is therefore always safe; deep recursion
only loses opportunities.

Dropped saves and restores take no reorder-buffer entry and no physical
register. They are still fetched and decoded, but free cache bandwidth,
window space and commit bandwidth.

Setting the parameter `RESTORE_ELIM` to 0 gives the simpler variant that
drops saves only and never consults the stack.

## Thread switches

`OP_LVM_SAVE` presents the current LVM on `lvm_save_data` so the switch
routine can store it in the outgoing thread's control block. `OP_LVM_LOAD`
replaces the LVM with the value it carries (`lvm_data`, supplied by the core
with the operation) and should precede the restores of the incoming thread.
Its live-loads are then judged by the loaded mask. The LVM-Stack is not saved.

## Speculation and recovery

All updates happen at decode and may be speculative. The committed state is
kept as a second copy of the map and binding bits, updated as entries commit.
`flush` squashes everything uncommitted: the map returns to the committed
copy, the free pool is recomputed as every physical register the committed map
does not use, the LVM becomes all-live and the LVM-Stack empties. Treating
every register as live is always safe; it only costs elimination
opportunities until the program kills registers again. The same flush is the
intended response to exceptions, `longjmp`-style non-standard returns and
context switches that bypass the LVM-save/load pair.

## Interface of `dvi_top`

Up to four operations per cycle, slot 0 being the oldest:

* `in_op` is a `dvi_op_t` (see `rtl/dvi_pkg.sv`): the kind (`OP_NORMAL`,
  `OP_CALL`, `OP_RETURN`, `OP_KILL`, `OP_LIVE_STORE`, `OP_LIVE_LOAD`,
  `OP_LVM_SAVE`, `OP_LVM_LOAD`), destination and two sources with valid bits,
  the kill field and the LVM value for `OP_LVM_LOAD`. A live-store names its
  data register in `src1` (address base in `src2`); a live-load names it in
  `dst` (base in `src1`). A call normally writes the link register (`dst`).
* Each slot has `in_valid` and `in_accept`. The accepted slots always form a
  prefix of the group; the core offers the rest again in the next cycle. A
  slot waits when its destination needs a physical register and none is
  left, when the reorder buffer has no room (unless the operation is being
  dropped), during `flush`, and after a call or return in an older slot of the
  same group. The LVM-Stack therefore moves at most once per cycle.
* The slots are renamed as a chain. Each slot sees the map, binding bits and
  LVM as the older slots of its group left them, so a kill or write in
  slot 1 already affects slot 2 in the same cycle.
* In the accepting cycle each operation is either dropped (`elim_save` or
  `elim_restore` for its slot) or dispatched: `disp_valid` with the
  reorder-buffer index and the physical source and destination tags. A slot
  that reads a register written by an older slot of the same group gets that
  slot's new tag; forwarding the value is the core's job.
* The core reports up to four completions per cycle with
  `complete`/`complete_idx`. Kill instructions need no execution and are
  complete on arrival. Up to four completed operations commit per cycle
  (`commit`, `commit_idx`), in order. The physical registers they released
  return to the pool in that cycle.
* The physical register file (`rf_*`: 8 read ports, 4 write ports,
  combinational read, write at the clock edge) is brought out for the core's
  register-read and write-back stages.
* `abi_mask` and `callee_mask` are configuration inputs; the status outputs
  give the LVM, binding bits, free-register, reorder-buffer and stack
  occupancy and the stack overflow/underflow events.

Reset is asynchronous and active low. After reset architectural register i
is bound to physical register i, all values are live, physical registers 32
and up are free and the stack is empty.

## Parameters

| parameter      | default | meaning                                            |
|----------------|---------|----------------------------------------------------|
| `W`            | 4       | operations renamed and committed per cycle         |
| `PHYS`         | 50      | physical integer registers (must exceed 32)        |
| `ROB_DEPTH`    | 64      | reorder-buffer entries (the instruction window)    |
| `STACK_DEPTH`  | 16      | LVM-Stack entries                                  |
| `DATA_W`       | 32      | register width                                     |
| `NREAD`        | 8       | register-file read ports (4-wide issue)            |
| `NWRITE`       | 4       | register-file write ports                          |
| `RESTORE_ELIM` | 1       | 1: drop saves and restores; 0: saves only          |

Package constants: 32 architectural registers, 16-bit kill mask field.

## Modules

```
dvi_top
  dvi_decode     kill vector from kill instructions and calls/returns
  lvm_stack      circular stack of LVM snapshots
  dvi_rename     map table, LVM, binding bits, committed copy
    rename_slot  rename and drop logic of one slot (W in a chain)
      sr_elim    drop decision for live-stores and live-loads
    free_list    free physical registers as a bit vector
  rob            in-order commit; releases registers at commit
  phys_regfile   multiported physical register file
dvi_pkg          operation struct, kinds, kill field helper
```

The free pool is a bit vector rather than a FIFO because one committing kill
can return many registers at once. Each cycle it offers the four
lowest-numbered free registers, and the slots take them in order.

Lookups in the map and the masks are written as compare-and-select loops
instead of variable indexing. This keeps synthesis of the four-slot chain
fast.

## Departures from the published scheme and limits

* **How four operations per cycle are handled** is not described by the
  scheme. The slot chain, the prefix rule and the group end at a call or
  return are this design's choices.
* **Recovery by full flush**, not by per-branch checkpoints of the map, LVM
  and LVM-Stack.
* **Own choices** where the scheme leaves details open: the kill field layout,
  the separate binding bit, restoring only callee-saved bits at a return
  (`callee_mask`), an empty stack reading as all-live, kills occupying a
  reorder-buffer entry that is complete on arrival, the 32-bit data width,
  the reorder buffer sized as the 64-entry window, and four commits per cycle.
* **Not included**: the instruction decoder (operations arrive classified),
  the execution core, caches and branch predictor. The software side (kill
  insertion by the compiler or a binary rewriter, live-load/live-store
  prologues and epilogues, the thread switch routine) is outside the hardware.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| testbench          | what it checks                                                         |
|--------------------|------------------------------------------------------------------------|
| `tb_dvi_decode`    | kill vectors for all kinds against a bit-by-bit expectation            |
| `tb_sr_elim`       | drop decisions of both variants against the rule                       |
| `tb_lvm_stack`     | random push/pop/flush against an unbounded list, overflow and underflow|
| `tb_free_list`     | the four offered registers, multi-register release, recovery, empty pool |
| `tb_rob`           | 4-wide allocation, out-of-order completion, 4-wide in-order commit, flush |
| `tb_phys_regfile`  | all ports against a model, write-port collisions                       |
| `tb_dvi_rename`    | early-release example, then 20000 random 4-slot groups against a slot-by-slot model |
| `tb_dvi_top`       | the save/restore example, then a random program of about 50000 operations |

`tb_dvi_top` runs the top at its default parameters. It keeps a queue of
program operations and offers the next four every cycle. It also acts as the
execution core: each dispatched operation writes a fresh value into its
destination physical register. Every source read of a bound register is
compared with the value the program last wrote there. When an older slot of
the same group wrote the register, the source tag is compared with that
slot's destination tag instead. Any renaming or early-release error therefore
shows up as a wrong value. Drop decisions are compared with an independent
liveness model. It counts kills, implicit kills, dropped and kept saves and
restores, stack overflows and underflows, free-pool and reorder-buffer stalls,
early releases, LVM save/load, flushes, groups of several operations, groups
cut at a call or return and cycles with several commits. It fails if any of
these never happens.
All eight testbenches pass.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/dvi_pkg.sv tb/tb_dvi_top.sv --top-module tb_dvi_top
./obj_dir/Vtb_dvi_top
```

The modules lint cleanly with `verilator --lint-only -Wall` apart from
unused-bit and empty-pin warnings: each block receives the whole `dvi_op_t`
and uses only its own fields, and two status outputs of sub-blocks (the
free vector and the stack's empty flag) are left open.
