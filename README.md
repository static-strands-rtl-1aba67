# Static strands: an embedded out-of-order back end that collapses dependence chains

Much of the work an integer program does happens in short chains. One
instruction makes a value, the next one uses it, and nothing else ever reads
it. Such a value is *transient*. A conventional out-of-order core still treats
it like any other result:

- it takes its own reorder-buffer and issue-queue entry;
- its tag is broadcast to every waiting entry;
- it is written to the register file.

All of that costs energy and none of it is needed.

A *static strand* is a chain of instructions in which every intermediate value
is transient. The compiler, which can prove that there is no other consumer,
finds the strands. It marks each one by placing a *prefix* no-op in front of
it that holds the strand's length. The annotated program does exactly the same
as the original, so a machine that ignores the prefix still runs it correctly.

This RTL is the hardware side. It is the back end of a small two-ALU
out-of-order core with three additions:

1. A **strand accumulation buffer** (STAB) at dispatch. It gathers the
   instructions that follow a prefix into one *macro-op*.
2. **Strand-aware issue-queue entries.** Each holds a whole macro-op, wakes it
   with only two tag comparators, and never broadcasts an internal result.
3. **Closed-loop ALUs.** Each runs a strand one operation per cycle. Every
   intermediate value goes round a latch at the ALU, and only the final result
   is written back.

A collapsed strand therefore uses one ROB entry, one issue-queue entry, one
issue, one tag broadcast and one register write, however many instructions it
holds. This gives the small queues a larger effective capacity, and it removes
broadcasts, wakeup comparisons, register reads and writebacks.

Sizes follow the out-of-order embedded configuration the design was evaluated
in (a PowerPC 750FX-class core):

| Parameter | Value |
|---|---|
| Integer ALUs | 2 |
| Issue-queue entries | 6 |
| Reorder-buffer entries | 6 |
| Registers | 64 |
| Register-file ports | 4 read, 2 write |
| Dispatch width | 2 |
| Result tag buses | 2 |

The design's own choices are:

- strands of at most 4 instructions with at most 2 external inputs;
- a 32-bit datapath.

## Contents

| File | What it is |
|---|---|
| `rtl/strand_pkg.sv` | Sizes, the instruction and macro-op formats, and the ALU function |
| `rtl/stab.sv` | Strand accumulation buffer (dispatch) |
| `rtl/iq_slot.sv` | One strand-aware issue-queue entry |
| `rtl/select_logic.sv` | Grants ready entries to free ALUs |
| `rtl/issue_queue.sv` | Six entries, the tag bus, select, and the WAR query |
| `rtl/closed_loop_alu.sv` | ALU with a self-bypass loop latch |
| `rtl/reg_file.sv` | 64 x 32 register file; R0 reads as zero |
| `rtl/rob.sv` | Reorder buffer; one entry per macro-op |
| `rtl/strand_core.sv` | Top: dispatch, scoreboard and wiring |
| `tb/tb_*.sv` | One self-checking testbench per module, plus `tb_strand_configs` (strand-size configurations) |
| `tb/tb_strand_pkg.sv` | Reference model and program generator |

## Instructions and the prefix

The core takes *decoded* instructions, up to two per cycle, as `instr_t`
values:

- `kind`: an ALU instruction, a prefix, or a no-op;
- `pfx_len`: the strand length carried by a prefix;
- `op`: one of add, sub, and, or, xor, sll, srl, sra, slt, sltu;
- `rd`, `rs1`, `rs2`: register numbers;
- `use_imm` and a 16-bit sign-extended immediate, which replaces `rs2`.

A prefix with `pfx_len = L` declares that the next `L` ALU instructions form a
strand. Inside a strand, instruction *k > 0* must read the destination of
instruction *k-1*. Only the last instruction's destination is architecturally
visible after the strand. Registers written by earlier components are dead, by
the compiler's guarantee.

If a prefix's length is below 2 or above `MAX_STRAND_LEN`, the STAB drops the
prefix. The instructions then run as ordinary single instructions, which is
always correct. This is also how a strand longer than the hardware supports
is handled.

## The strand accumulation buffer (`stab`)

The STAB turns the instruction stream into macro-ops (`macro_op_t`). A macro-op
holds:

- `len`, from 1 to 4;
- for each component *k*: the op-code, the immediate, and an **operand
  selector** for each ALU input. The selector is one of `ZERO`, `SRC1`,
  `SRC2`, `IMM`, or `CHAIN`, the previous component's result;
- up to two **external sources**. Each has its register tag and an **oper-id**:
  the index of the first component that reads it;
- one **external destination**, which is the last component's `rd`;
- a `strand` flag and a `mixed` flag, plus the ROB id filled in at dispatch.

Each register operand of each component is routed like this:

- R0 becomes `ZERO`.
- If it names the previous component's destination, it becomes `CHAIN`, the
  transient value. The intermediate register number is never stored.
- If it names a register already recorded as an external source, it reuses
  that source.
- Otherwise it takes the next free external source.

A single instruction is simply a macro-op with `len = 1`.

Two consequences follow. First, a strand that needs a third external source is
an annotation error: the STAB flags it on `src_overflow`, and an assertion
catches it. Second, a component whose operands do not use `CHAIN` is also an
annotation error, caught by the `a_chain_used` assertion.

**Interface and timing.** The STAB is two wide, with instructions in program
order in slots 0..1.

- It accepts a group only when every macro-op it holds has been taken. When it
  accepts, it steps through both instructions combinationally.
- Up to two completed macro-ops are registered, compacted to slot 0 first.
- A strand therefore leaves the STAB in the cycle after its last instruction
  is accepted.
- The strand state carries over from one cycle to the next, so a strand can
  span any number of input groups.
- If dispatch takes only the older of two macro-ops, the younger one moves to
  slot 0 and new input waits one cycle. This keeps the buffer small.

## Issue-queue entries (`iq_slot`, `issue_queue`, `select_logic`)

An entry holds the whole macro-op. It also holds, for each of its two
external sources, a ready bit, the tag, and the oper-id. In addition it has an
**oper-counter** and the `strand` and `mixed` bits. Wakeup uses only two
comparators per entry, however long the strand is: one per external source
against each tag bus.

The request to the select logic is:

```
src_ok[i] = !src_valid[i] | ready[i] | (mixed & oper_counter != oper_id[i])
req       = valid & !in_flight & src_ok[0] & src_ok[1]
```

The oper-counter and oper-id only matter for **mixed strands**. These are
strands that contain loads, stores or branches. They must be issued one
operation at a time to different units, so each operation should wait only
for the source it itself consumes. Such an entry stays in the queue after a
grant. It is marked in flight, advances its counter on `op_done`, and issues
the next operation. An **ALU-only strand** instead waits for all its sources,
issues once, and leaves the queue on the grant.

`issue_bcast` is the broadcast suppression. It is low for every operation of a
mixed strand except the last, so an internal result never drives the tag bus.
An ALU-only strand produces only its final result anyway.

Other details:

- An entry that is allocated in the same cycle as a matching broadcast catches
  that broadcast.
- The queue allocates dispatch port *p* into the (p+1)-th lowest free entry.
- `alloc_ready[p]` means that at least *p+1* entries are free.

`select_logic` has a fixed priority: lowest entry index first, with ALU ports
filled in order. This is the simplest arbiter that works, but it is **not
fair**. An old entry in a high slot can be passed over while lower slots keep
refilling. In the core the wait is bounded: once the six-entry ROB is full,
nothing new enters the queue and the old entry is served. Use an age-ordered
or round-robin select if latency bounds matter.

The issue queue also answers a **WAR query** for dispatch: "does any waiting
entry still read register r?" (see below).

In this core, with no memory or branch units, every strand is ALU-only. The
oper-counter path is built and tested in `tb_iq_slot`, but in the core
`op_done` is tied low.

## Closed-loop ALUs (`closed_loop_alu`)

At issue, the ALU latches the whole macro-op and the two external source
values, which are read from the register file in the issue cycle. It then
computes one component per cycle:

- An operand selected as `CHAIN` comes from the loop latch, which holds the
  previous component's result.
- The other operands come from the latched sources, the immediate, or zero.
- Intermediate results go only into the loop latch.
- The last component's result is presented combinationally, with its
  destination tag and ROB id, on `res_*`. In that cycle it is written to the
  register file, broadcast on the tag bus, and marked complete in the ROB.

`loop_active` is high while the unit spins on an intermediate value. The unit
can take a new macro-op in the cycle of its last operation (`can_issue`), so
back-to-back issue leaves no bubble. An L-operation strand keeps the ALU busy
for L cycles.

## Dispatch without renaming (`strand_core`)

The core does not rename registers. The 64 registers are architectural, and
correctness comes from a scoreboard with one pending-write bit per register.
Dispatch takes up to two macro-ops per cycle, strictly in order. Macro-op *d*
dispatches only if every older macro-op of its group dispatches too, and only
if all of these hold:

- a free issue-queue entry and a free ROB entry are available for it;
- no **WAW** hazard: its destination is not pending, that is, not still to be
  written by an older macro-op;
- no **WAR** hazard: no waiting issue-queue entry still has its destination as
  a not-yet-read source. The issue queue answers this query;
- no hazard against the older macro-op dispatched in the same cycle. The
  younger one is held if it writes a register that the older one reads or
  writes.

A source enters the queue ready when its pending bit is clear and the older
macro-op of the same pair does not write it. A source also enters ready if its
tag is on the tag bus in the dispatch cycle.

Because an entry reads its sources from the register file when it issues, the
WAR rule guarantees that the value it reads is the one it was meant to read.
The WAW rule keeps the writes to each register in program order.

Collapsing makes this simpler, not harder: the destinations of a strand's
intermediate instructions never reach the scoreboard at all.

**Pipeline timing**

| When | What happens |
|---|---|
| cycle 0 | instruction accepted by the STAB |
| cycle 1 | macro-op dispatched (ROB and issue-queue entry written at the end of the cycle) |
| cycle 2 | earliest issue; sources read from the register file |
| cycles 2 .. 2+L-1 | the ALU runs the L components; the last one writes back, broadcasts and completes |
| following cycle | dependents may issue; the ROB may retire the entry |

There is no bypass network. A dependent instruction wakes on the broadcast
and reads the register file in the next cycle. A chain of *L* single
instructions therefore needs about *2L* cycles. The same chain as a strand
needs *L+1*. This, together with the larger effective window, is where the
core's speed-up comes from.

The ROB retires up to two entries per cycle. `commit_ninstr` reports how many
instructions each retired entry stands for.

## How it compares with the original proposal

These follow the proposal:

- the three additions: the STAB, the closed-loop ALUs, and the issue-entry
  fields (per-component op-codes and immediates, oper-counter, oper-ids, two
  shared wakeup comparators, broadcast suppression);
- one ROB entry and one issue entry per strand;
- the sizes in the table above;
- single-cycle ALU operations, with no double pumping.

These are this design's own choices:

- **No renaming.** Scoreboard hazards replace it, as described above.
- **Tag broadcast at writeback, not at select.** A strand's result exists only
  L cycles after select, so its dependents are woken when it is produced.
  There is no bypass network.
- **The strand format:** a maximum of 4 instructions and 2 inputs, a 4-bit
  prefix length field, 16-bit immediates, the op set, and R0 as zero.
- **The operand-routing rule** in the STAB (`CHAIN` means "names the previous
  component's destination").
- **The interfaces,** including the extra register-file read port `dbg_addr` /
  `dbg_data` for inspecting architectural state.
- **Commit width 2;** fixed-priority select; STAB input waits until both held
  macro-ops are taken.
- **Asynchronous active-low reset,** which clears everything, including the
  register file.

These parts are not built:

- fetch, decode and branch prediction;
- caches;
- the load/store unit;
- multiply and floating-point units.

Without memory and branch units, **mixed strands cannot run in the core.**
The issue entry supports them, and its testbench exercises that path. A third
shared wakeup comparator, which would support three-input strands, was not
built either. It would need six register read ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- **`tb_stab`** feeds random annotated streams two per cycle, with random
  input gaps and output back-pressure. For each macro-op it checks the
  length, the strand bit and the destination. It also checks that there are
  at most two external sources, each with a valid oper-id. It evaluates the
  macro-op on random register contents and compares the result with
  executing its instructions one by one. Finally it checks that a strand
  leaves one cycle after its last instruction.
- **`tb_iq_slot`** runs directed cases: wakeup, wakeup during allocation, an
  ALU strand waiting for a late source, and mixed-strand stepping with
  oper-counter gating and suppressed broadcasts. It also runs a random wakeup
  model.
- **`tb_select_logic`** checks every request and free-port combination
  exhaustively.
- **`tb_issue_queue`** runs random traffic against a model of readiness and
  WAR queries.
- **`tb_closed_loop_alu`**, **`tb_reg_file`** and **`tb_rob`** compare each
  module with a reference model, under random traffic and back-to-back cases.
- **`tb_strand_core`** runs the whole design at its default sizes. It
  generates a random program of about 7,100 ALU instructions, plus prefixes
  and no-ops. The program mixes
  register set-up, single instructions, prefixed strands of 2 to 4
  instructions, over-long strands whose prefix must be dropped, and stray
  no-ops. Two cores run it side by side: one gets the annotated program, the
  other the same program without prefixes. The test checks the following:
  - every register write, against a per-register expected sequence;
  - all registers at the end;
  - the retired instruction count;
  - that every valid strand was collapsed.

  It fails if any of these mechanisms never happened: strand collapse, a
  dropped prefix, loop spinning, ROB full, WAW and WAR holds, dual dispatch,
  a hold by the older macro-op of a pair, dual issue, an ALU busy with a
  strand while another entry waits, and dual retirement.

A typical end-to-end run, on a program in which about half the groups are
strands, gives:

| | cycles | tag broadcasts | wakeup compares | select-active cycles | register reads | writebacks |
|---|---|---|---|---|---|---|
| without prefixes | 9231 | 7127 | 7645 | 7956 | 9536 | 7127 |
| with strands | 6817 | 4058 | 3574 | 4954 | 5606 | 4058 |

IPC goes from 0.77 to 1.05. The random program is much denser in strands than
real code, so these numbers show that the mechanisms work. They are not an
estimate of the savings on real programs.

### Strand-size configurations

`tb_strand_configs` asks how much a compiler's strand limit matters. It takes
one program of dependence chains, each of 1 to 6 instructions, and annotates
it four ways. Each way is what a compiler limited to strands of at most 2, 3,
4 or 5 instructions, with at most two inputs, would produce:

- every chain is cut into pieces of at most that length;
- a piece gets a prefix if it has at least two instructions and reads at most
  two outside registers.

Five cores run the four annotations and the unannotated program side by side.
Each core is checked for its final registers, its retired count, and its
number of collapsed and dropped strands.

| strand limit | strands collapsed | prefixes dropped | cycles | IPC | broadcasts | register reads |
|---|---|---|---|---|---|---|
| none | 0 | 0 | 6138 | 0.77 | 4739 | 6405 |
| 2 | 1853 | 0 | 5116 | 0.93 | 2886 | 4172 |
| 3 | 1439 | 0 | 4765 | 1.00 | 2286 | 3339 |
| 4 | 1258 | 0 | 4500 | 1.05 | 1996 | 2896 |
| 5 | 591 | 460 | 5153 | 0.92 | 3583 | 4914 |

The limit-5 row is what happens when the annotation is made for longer strands
than the hardware supports. The five-long strands fall back to single
instructions: this is correct, but their benefit is lost. Matching the
compiler's limit to `MAX_STRAND_LEN` matters more than the limit itself.

## Simulating

Verilator 5 is enough. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/strand_pkg.sv tb/tb_strand_core.sv --top-module tb_strand_core
./obj_dir/Vtb_strand_core
```

Use the same command with any other `tb_<module>`. The end-to-end test takes a
few seconds. To change it:

- `NGROUPS` in `tb_strand_core` sets the program size.
- The sizes are the `strand_pkg` constants and the `strand_core` parameters
  (`NUM_ALUS`, `IQ_N`, `ROB_N`, `DW`). The testbenches assume two ALUs and
  dispatch width two.
- `MAX_STRAND_LEN` can be changed. `OPID_W` and `LEN_W` follow from it, and
  `PFX_LEN_W` must stay wide enough to hold over-long lengths.
