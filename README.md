# Physical register reference counting

In a conventional out-of-order core every register-writing instruction
allocates exactly one physical register at rename and frees exactly one
(the one it over-wrote) at commit, so a circular free list is enough. Two
families of techniques break that one-to-one rule:

* **Register sharing ("write" counting), e.g. NoSQ.** A load predicted to
  read an in-flight store's value is not executed; its destination is mapped
  to the physical register that holds the store's data. One physical register
  is then the destination of several in-flight instructions and can appear
  several times in a map table. It may be freed only when every instruction
  and every architectural register that names it is gone.
* **Aggressive reclamation ("read" counting), e.g. CPR.** A register is freed
  as soon as every instruction that reads it has executed and it has been
  over-written in the rename map, as long as no map-table checkpoint still
  names it.

Both are handled by **reference counting**: a register is free when nothing
references it. This RTL implements the counting hardware in two
representations and for three processor styles. The first is **unary**: a
bit matrix with one row per referencing entity and one column per physical
register. The second is **binary**: small saturating counters, one per
physical register. The three processor styles are NoSQ, CPR and a
NoSQ/CPR hybrid.

All schemes give register allocation the same interface: one *in-use* bit
per physical register, and priority encoders that pick free registers out of
the zeros of that vector.

## The unary matrix

The central observation is that a reference count does not need to be stored
as a number. Only "zero or not zero" matters to allocation.

```
              p0 p1 p2 ... pN-1         one row per entity that can reference
   ROB  row 0  0  0  1  ...  0          registers (an ROB/IQ/LSQ entry, a
        row 1  0  0  0  ...  0          logical register of a map table, a
        ...                             checkpoint)
   CMap r0     1  0  0  ...  0
        ...
              ---OR per column---
   in_use      1  0  1  ...  0          1 = referenced, 0 = free
```

* **Increment** means *write a row*. The row gets the decoded form of the
  register(s) the entity references (one-hot for a destination, a few bits
  for sources, a whole bitvector for a checkpoint). A bank needs as many row
  write ports as the structure it parallels has writes per cycle.
* **Decrement** means *reset a row*. A reset needs only a word line, so any
  number of rows can be reset in one cycle through a mask. This is what makes
  single-cycle squash recovery possible: the squashed rows go into the mask.
* Rows are never read individually. Each column is ORed into the in-use bit.

Rows are managed for free, because each bank's rows shadow an existing
structure. The row of ROB entry 7 is written by the instruction in ROB
entry 7. A scheme with several such structures has several banks, and their
column ORs are ORed together.

`refcnt_unary_bank` is that bank. It has `WPORTS` row writes, a row reset
mask and a column OR. It also has an optional whole-bank load and read-out,
which the NoSQ/CPR map-table bank needs. `refcnt_ckpt_bank` is the
checkpoint variant: one entry per checkpoint, written whole at creation,
reset at release, readable for restore.

## The five schemes

| module | processor | what references a register | increment | decrement |
|---|---|---|---|---|
| `refcnt_nosq_unary` | NoSQ | ROB bank: destination of each in-flight instruction; CMap bank: one row per logical register of the commit map | rename writes ROB row; commit writes CMap row | commit resets ROB row (and the CMap row write drops the over-written register); squash resets any ROB rows |
| `refcnt_cpr_unary` | CPR | IQ bank: sources of each un-executed instruction; Ckpt bank: one RMap bitvector per checkpoint; RMap bitvector: registers in the current map | rename writes IQ row, sets RMap bit; checkpoint creation copies RMap | execute/squash resets IQ row; rename clears over-written RMap bit; checkpoint release resets its row |
| `refcnt_nosqcpr_unary` | NoSQ + CPR | LSQ bank (loads/stores, until commit); IQ bank (other instructions, until execute); RMap bank with one row per logical register; Ckpt bank holding whole RMap copies | rename writes LSQ or IQ row and the RMap row of its logical destination | commit resets LSQ rows, execute resets IQ rows, checkpoint release resets a block |
| `refcnt_nosq_binary` | NoSQ | one 2-bit counter per register replaces the ROB and CMap columns | rename: +1 on the destination (new or shared) | commit: -1 on the over-written register; squash: -1 per squashed destination, walked |
| `refcnt_nosqcpr_hybrid` | NoSQ + CPR | unary LSQ and IQ banks as above; RMap as 2-bit counters; each checkpoint a copy of those counters | rename: +1 new destination | rename: -1 over-written register |

CPR can keep its map table as a single bitvector (`refcnt_rmap_vec`),
because a CPR map never names the same register twice. NoSQ's sharing breaks
that. A bit could then be cleared only if no other logical register still
names the register. So the NoSQ/CPR unary scheme stores one decoded row per
logical register, and each checkpoint copies all of them: 64 × 128 bits per
checkpoint at the defaults. The hybrid stores the same information as one
2-bit count per register: 128 × 2 bits per checkpoint, 32 times less. Its
checkpoint entries are never incremented, only written and restored, so they
need no adders.

`refcnt_top` instantiates the five schemes side by side. Each keeps its own
ports, prefixed `nu_`, `cu_`, `ncu_`, `nb_` and `nh_`. They are alternatives
for different processors and share no state.

## Binary counters and the one-per-cycle limit

A binary reference count is a `CBITS`-bit register with an adder tree in
front of it.

* `refcnt_ctr_tree` is the general counter. Every increment and decrement
  request is a separate operand: +1 for an increment, -1 (the bit
  sign-extended to all ones) for a decrement. With two increments (i0, i1),
  two decrements (d0, d1) and the counter itself there are five operands.
  They are reduced by three carry-save adders (`refcnt_csa`) and one final
  adder.
* `refcnt_ctr_single` is the cheap counter. It accepts at most one increment
  and one decrement per cycle. All increment inputs are ORed into one +1
  operand and all decrement inputs into one -1 operand. One 3-input
  carry-save adder and the final adder remain.
* Both have `max`, the AND of the bits (saturated: no increment may be
  accepted), and `in_use`, the OR of the bits.

In practice NoSQ counts are almost always 0 or 1, and values above 3 need
three loads bypassing from one store. That is why `CBITS = 2`. Binary
counters pay off only if the number of same-cycle updates to one counter can
be limited cheaply, so the NoSQ binary scheme and the hybrid use
`refcnt_ctr_single`. The hard part is the **acceptance logic that keeps that
limit**. Each scheme has a ready bit per rename slot (and per decrement slot
in `refcnt_nosq_binary`), and acceptance is strictly in order: once a slot
is refused, every later slot is refused too. A refused slot retries in a
later cycle.

* `refcnt_nosq_binary` refuses rename slot *s* if an earlier valid slot of
  the group has the same destination. Two bypassed loads sharing one store's
  register would otherwise increment it twice. It also refuses the slot if
  the destination counter is saturated. Decrement slot *s* is refused if an
  earlier decrement slot names the same register. For example, two
  committing instructions that both over-write a register shared by two
  logical registers. With parameter `ONE_PER_CYCLE = 0` the scheme switches
  to `refcnt_ctr_tree` and only refuses renames that would overflow.
* `refcnt_nosqcpr_hybrid` increments the new destination and decrements the
  over-written register in the same rename slot. A slot is refused if an
  earlier slot increments the same register or decrements the same register.
  It is also refused if its destination counter is saturated at the start of
  the cycle, unless the slot also over-writes that register, in which case
  the count does not change. An increment and a decrement of one counter in
  the same cycle are legal and cancel.

Saturation is checked against the count at the start of the cycle. An
earlier slot's decrement in the same cycle is not taken into account, so the
check is conservative. Refused slots write nothing: no counter changes and no
LSQ or IQ row. Both counters carry assertions for over- and underflow, and
`refcnt_ctr_single` also asserts the one-per-cycle rule.

A binary counter cannot subtract an arbitrary amount in one cycle. The NoSQ
binary scheme therefore undoes a squash by walking the squashed
instructions: each one feeds its destination into a decrement slot. The
`dec_*` slots serve both commit and the walk, and the caller decides which.
The unary schemes and the hybrid undo a squash in one cycle through their
reset masks. The hybrid's map counters come back whole from a checkpoint.

## Checkpoints and recovery

In the CPR-style schemes, `ckpt_create` with `ckpt_idx` copies the map-table
image into a checkpoint entry. The image is the RMap bitvector, the per-logical
RMap rows, or the RMap counters, depending on the scheme. The copy is the map
**as it stands at the start of the cycle**, before that cycle's renames. The
checkpoint therefore belongs to the first instruction of the rename group, and
the rename stage must start a group at a checkpointed instruction.
`ckpt_clr_mask` releases any set of checkpoints. `restore_en` with
`restore_idx` loads the map image back from a checkpoint; it wins over renames
in the same cycle. The caller releases younger checkpoints and resets the
squashed IQ/LSQ rows through the masks in the same cycle. Which entries those
are is decided by the surrounding core: checkpoint order, branch tags and ROB
management are not part of this design.

## Interface and timing

* All state changes happen on the rising edge of `clk`. Reset is synchronous
  and active-low (`rst_n`). After reset, logical register *i* maps to
  physical register *i*. Registers `0..NLREG-1` are therefore in use and all
  queues and checkpoints are empty.
* `in_use` is registered state ORed together, so it is valid for the whole
  cycle. `free_preg[j]`/`free_valid[j]` are the `j`-th lowest free register
  (`refcnt_alloc`, cascaded priority encoders). The rename stage gives
  `free_preg[j]` to its `j`-th allocating instruction of the cycle and must
  present that register as a destination in the same cycle. It shows as in
  use from the next cycle on.
* Rename slots are in program order (slot 0 oldest). When a later slot
  over-writes a logical register written by an earlier slot of the same
  group, the caller supplies the corrected over-written register (`ren_old`)
  and logical destination. The scheme does not look into the map table.
* Register sources (`ren_src`, `NSRC` per instruction) are the registers the
  IQ or LSQ row should hold. For a load or store that means its address, the
  store's data, or the register a bypassed load shares. The caller chooses.
* `ren_ready` (binary NoSQ, hybrid) is combinational from the requests and
  the current counts. The unary schemes always accept.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NLREG` logical registers | 64 | from the design description (NoSQ/CPR discussion) |
| `NCKPT` checkpoints | 16 | from the design description (CPR discussion) |
| `W` rename/commit width | 2 | from the design description (two-way superscalar) |
| `CBITS` counter width | 2 | from the design description |
| `NPREG` physical registers | 128 | own choice |
| `ROB`, `IQ`, `LSQ` depths | 64, 32, 32 | own choice |
| `NSRC` sources per instruction | 2 | own choice |

Defaults live in `refcnt_pkg`. Every scheme and `refcnt_top` take them as
parameters.

## Files

| file | contents |
|---|---|
| `rtl/refcnt_pkg.sv` | default sizes |
| `rtl/refcnt_unary_bank.sv` | unary matrix bank |
| `rtl/refcnt_ckpt_bank.sv` | checkpoint bank (bitvector, per-logical-register rows, or counter bit-planes) |
| `rtl/refcnt_rmap_vec.sv` | CPR RMap bitvector |
| `rtl/refcnt_csa.sv` | carry-save adder |
| `rtl/refcnt_ctr_tree.sv`, `rtl/refcnt_ctr_single.sv` | binary counters, full tree and one-per-cycle |
| `rtl/refcnt_ctr_array.sv` | one counter per register |
| `rtl/refcnt_alloc.sv` | free-register encoders |
| `rtl/refcnt_nosq_unary.sv`, `rtl/refcnt_cpr_unary.sv`, `rtl/refcnt_nosqcpr_unary.sv`, `rtl/refcnt_nosq_binary.sv`, `rtl/refcnt_nosqcpr_hybrid.sv` | the five schemes |
| `rtl/refcnt_top.sv` | all five side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog that counts a failure if the test hangs.
Build and run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/refcnt_pkg.sv rtl/*.sv tb/tb_refcnt_top.sv --top-module tb_refcnt_top
./obj_dir/Vtb_refcnt_top
```

* **Building blocks.** The testbenches of the banks, counters and encoders
  compare against behavioural models under random stimulus, with small
  parameters.
* **Schemes.** Each scheme's testbench runs a random instruction stream
  against a model of the processor's queues, map table and checkpoints. The
  expected in-use vector is recomputed every cycle from the set of live
  references, and every allocated register is checked to be free. The
  binary and hybrid testbenches also check every counter, and every ready
  bit against an independent statement of the acceptance rule.
* **`tb_refcnt_top`.** Runs all five schemes at the default sizes on a
  five-instruction example: A `r1=r3+1`, B store `m[r2]=r1`, load C
  `r3=m[r2]` bypassed from B, D `r1=r1+1`, E `r3=r1+r3`. It forces and
  counts each mechanism: register sharing, one-cycle squash, checkpoint
  creation, release and restore, execute and commit releases, a saturated
  counter holding a rename, and a same-cycle conflict split over two cycles.
  It builds in about ten seconds and runs in milliseconds.

## How far to trust it, and where it departs from the source

* The source describes the structures, what increments and decrements them,
  and the counter datapaths. Port lists, handshakes, the order of updates
  within a cycle, reset contents and most sizes are this design's own
  choices. They are listed in the module headers.
* The source's examples list ROB/IQ/CMap bit patterns and free-list rows.
  In a few places a printed free-list row disagrees with the matrix rows
  above it in one or two bit positions. This design follows the stated rule,
  the OR of each column.
* The source gives no mechanism for restoring a map from a checkpoint, nor
  for deciding which entries a squash removes. Here restore is a whole-entry
  load, and squash extents are inputs.
* Holding back a rename slot on saturation or conflict is stated in the
  source only as "forcing the loads to rename in consecutive cycles". Applying
  the same rule to decrements and to the hybrid's rename-time decrements is
  this design's extension, because its counters accept one decrement per
  cycle.
* Not built: the processor around the counters (rename map table, ROB/IQ/LSQ
  control, the squash walk sequencer, the policy for a load whose sharing
  target is saturated). Their actions are inputs.
* The largest structure is the NoSQ/CPR unary checkpoint bank: 16 × 64 × 128
  bits at the defaults. Synthesis of the full top is correspondingly slow.
