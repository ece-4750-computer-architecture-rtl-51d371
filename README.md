# Register renaming for a small out-of-order pipeline

A RAW dependence passes a value from one instruction to another. WAW and WAR
dependences do not. They exist only because the ISA has few register names,
yet they still stall an out-of-order machine. Take this sequence:

    a: mul  x1, x2, x3
    b: mul  x4, x1, x5
    c: addi x6, x4, 1
    d: addi x4, x7, 1

`d` is independent of `c`, but it writes `x4`, which `c` still has to read
(WAR), and `b` writes `x4` first (WAW). Renaming gives every result a fresh
hardware name, so `d` can run as soon as its own operand is ready.

This repository holds three single-issue cores that do this renaming in
hardware. They are built in SystemVerilog from the two classic schemes:

| core | renaming scheme | where uncommitted results live | where committed state lives |
|---|---|---|---|
| `io2i_ptr_proc` (`UNIFIED=0`) | pointer-based | physical register file (PRF) | architectural register file (ARF) |
| `io2i_ptr_proc` (`UNIFIED=1`) | pointer-based, unified | unified register file (URF) | URF, located through an architectural rename table (ART) |
| `io2i_val_proc` | value-based | reorder buffer (ROB) | ARF |

`rr_top` places the three cores side by side. Each core has its own ports.

## The pipeline

All three cores are *IO2I* machines:

- fetch and decode are in order;
- issue from an issue queue is out of order;
- writeback is out of order;
- commit through a reorder buffer is in order.

They execute only `add`, `addi` and `mul`, using the RV32I/RV32M encodings.
There are no branches, loads or stores, and no exceptions.

    F -> D -> [IQ] -> I -> X ----------------> W -> [ROB] -> C
                        \-> Y0 -> Y1 -> Y2 -> Y3 -/

- `add` and `addi` spend one cycle in X.
- `mul` spends four cycles in Y0..Y3.
- Both paths share one writeback stage, W.

An instruction therefore reaches W 2 cycles after issue if it goes through X,
and 5 cycles after issue if it goes through Y.

Where each structure is used:

| structure | pointer-based | value-based |
|---|---|---|
| rename table (RT) | read and written in D; pending bit cleared in W | read and written in D; pending bit cleared in W; valid bit cleared in C |
| free list (FL) | allocate in D, free in C | none |
| issue queue (IQ) | written in D; read and removed in I; woken in W | the same, and woken sources capture the value |
| scoreboard (SB) | read and written in I, indexed by physical register | the same, indexed by ROB slot |
| PRF / URF | read in I and C, written in W | none |
| ROB | allocated in D, completed in W, retired in C | the same; also read in D for values |
| ARF | written in C | read in D, written in C |
| ART (unified variant) | written in C | none |

## Pointer-based renaming (`io2i_ptr_proc`)

The machine has 64 physical registers for the 31 writable architectural
registers `x1..x31`. At reset `x<i>` maps to `p<i-1>`. The other 33 registers
are free.

**Decode (D).** Decode does the following:

- Looks up both sources in the RT. Each lookup gives a physical register and
  a pending bit.
- Takes the lowest-numbered free register from the FL for the destination.
  The FL is one bit per register with a priority encoder.
- Reads the destination's *current* mapping, which becomes the old mapping.
- Writes the new mapping into the RT with the pending bit set.
- Writes the IQ entry: op, immediate, destination register, and for each
  source a valid bit, a pending bit and the register number.
- Writes the ROB entry `{preg, areg, ppreg}`. `ppreg` is the old mapping of
  the destination.

Decode stalls if the FL is empty, or if the IQ or the ROB is full.

**Issue (I).** The oldest ready IQ entry issues. Operands come from the PRF, or
are bypassed from the end of X, the end of Y3 or from W. Nothing reads the ARF.

**Writeback (W).** W does the following:

- Writes the PRF.
- Clears the ROB entry's pending bit.
- Clears the pending bit of the RT entry that still maps to this register.
- Wakes up IQ sources waiting on this register.

**Commit (C).** When the ROB head has been written back, commit does the
following:

- Copies the value from `PRF[preg]` into `ARF[areg]`.
- Returns `ppreg` to the free list.

**Freeing registers.** Why free `ppreg` and not `preg`? A physical register may
be reused only when no read of it can still be in flight. Once an instruction
that overwrites `x4` commits, every older instruction has committed too. Those
older instructions are the only ones that could read the previous `x4`
register. Younger instructions were renamed to the new register. So the
*previous* mapping is dead exactly when the *next* writer of the same
architectural register commits.

Freeing earlier is wrong. Suppose the register were freed when the first writer
commits. The next writer could get it, write it, and a slow reader that was
decoded before would then read the wrong value.

**Unified register file (`UNIFIED=1`).** The ARF is removed. Commit no longer
copies a value. It writes the `preg` pointer into the ART entry of `areg`
(`arch_rename_table`). The ART then names the register that holds each
committed value, and the debug read port goes through it. Everything else is
unchanged. Freeing still uses `ppreg`.

## Value-based renaming (`io2i_val_proc`)

Here results wait in the ROB, so the "physical register" of a result is its
ROB slot number. No free list is needed: a name is handed out when the ROB
allocates the slot and returned when the slot commits.

Each RT entry holds a valid bit, a pending bit and a ROB slot. The valid bit is
set only while a writer of that register is in flight.

**Decode (D).** For each source, decode looks at the RT entry:

| RT entry | operand put into the IQ |
|---|---|
| not valid | value read from the ARF |
| valid, result being written back this cycle | value taken from W |
| valid, not pending | value read from the ROB slot |
| valid, pending | the ROB slot number, with the pending bit set |

The destination is renamed to the ROB tail slot. Decode stalls only when the IQ
or the ROB is full.

**Writeback (W).** W does the following:

- Writes the value into the ROB.
- Clears the pending bit of the RT entry that still names this slot.
- Broadcasts the slot number and value to the IQ. Each matching pending source
  replaces the slot number with the value.

**Commit (C).** Commit does the following:

- Copies the ROB head's value into the ARF.
- Clears the valid bit of the RT entry if it still names the committing slot.
  If a younger writer has since renamed that register, its entry is left alone.

## Issue, bypassing and the shared writeback port

This is the part that sets the timing. Both schemes share the same
`issue_queue` and `scoreboard` blocks.

- **Readiness.** A source is available in I in any of these cases:
  - the instruction does not read it;
  - its pending bit is clear in the IQ (the value is in the PRF, or already
    held in the entry);
  - its producer is in the last execute stage (X or Y3) or in W.

  The scoreboard gives the third case. For every register it keeps a pending
  bit and a countdown to W. It reports a register as bypassable when the
  countdown is 1 or 0.
- **Bypass network.** An operand marked as bypassed is selected by comparing
  its tag with the X, Y3 and W pipeline registers.
- **Writeback port.** X and Y3 both feed the single W stage. The scoreboard
  keeps a reservation vector: bit *k* set means W is taken *k* cycles from
  now. An `add`/`addi` that would reach W in the same cycle as an earlier
  `mul` is held back. A `mul` is never held back, because it has the longest
  latency.
- **Selection.** Among the ready entries, the one closest to the ROB head
  (the oldest) issues. Only one instruction issues per cycle.

### The example, cycle by cycle

The sequence above is run with `x2=1, x3=2, x5=4, x7=5`. Cycle 0 is when `a`
is fetched. All three cores give the same timing:

| instr | D | I | execute | W | C |
|---|---|---|---|---|---|
| a: mul x1,x2,x3 | 1 | 2 | Y 3-6 | 7 | 8 |
| b: mul x4,x1,x5 | 2 | 6 (bypass from `a` in Y3) | Y 7-10 | 11 | 12 |
| c: addi x6,x4,1 | 3 | 10 (bypass from `b` in Y3) | X 11 | 12 | 13 |
| d: addi x4,x7,1 | 4 | 7 | X 8 | 9 | 14 |

- `d` is ready in cycle 5, but it would reach W in cycle 7 together with `a`.
- In cycle 6 the older instruction `b` wins.
- `d` issues in cycle 7, ahead of `c`.
- Renaming `d`'s `x4` is what allows it to write back before `b` and `c`,
  even though they use an older `x4`.

Names in the pointer-based core, when the four instructions are the first
ones after reset (the register values do not affect the names):

| instr | new register | old mapping (freed at commit) |
|---|---|---|
| a | p31 | p0 (`x1`) |
| b | p32 | p3 (`x4`) |
| c | p33 | p5 (`x6`) |
| d | p34 | p32, the `x4` written by `b` |

In the value-based core, `a..d` get ROB slots 0..3. Final state: `x1=2`,
`x4=6`, `x6=9`.

## Interfaces

Each core (`io2i_ptr_proc`, `io2i_val_proc`) has these ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset. All registers reset to 0. |
| `imem_addr[31:0]` | out | byte address fetched this cycle. It holds while decode stalls. |
| `imem_data[31:0]` | in | instruction at `imem_addr`. Must be combinational, the same cycle. |
| `commit_val`, `commit_areg[4:0]`, `commit_data[31:0]` | out | one cycle per committed instruction, in program order |
| `dbg_areg[4:0]` → `dbg_data[31:0]` | in → out | combinational read of a committed register |
| `ev` (`rr_pkg::events_t`) | out | per-cycle events: decode stalls (FL/ROB/IQ), issue, out-of-order issue, bypassed operand, W-port wait, commit |

Instruction words other than `add`/`addi`/`mul` are dropped in decode, as are
these three when they write `x0`. They have no architectural effect. A stream
of zero words therefore acts as idle input.

`rr_top` brings out the same ports as packed arrays indexed by core:
0 = pointer/ARF, 1 = pointer/URF, 2 = value-based.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PREGS` | 64 | physical registers of the pointer-based cores. Must exceed 31. |
| `ROB_NENT` | 4 | ROB entries. This is also the number of names in the value-based core. |
| `IQ_NENT` | 4 | IQ entries |
| `UNIFIED` | 0 | pointer core only: 1 selects the URF + ART organisation |

`rr_pkg` fixes these values:

- `XLEN` = 32;
- 32 architectural registers;
- X latency 2 and Y latency 5, counted from issue to W.

With the defaults, a pointer-based core never runs out of free registers:
there are 33 free registers and at most 4 instructions in flight. Make
`NUM_PREGS` small (for example 34) to see free-list stalls.

## Files

| file | block |
|---|---|
| `rtl/rr_pkg.sv` | opcodes, decoder, event struct, latencies |
| `rtl/free_list.sv` | FL: free bits and priority encoder |
| `rtl/rename_table_ptr.sv`, `rtl/rename_table_val.sv` | the two rename tables |
| `rtl/arch_rename_table.sv` | ART of the unified variant |
| `rtl/issue_queue.sv` | IQ with wakeup, value capture and oldest-first select |
| `rtl/scoreboard.sv` | bypass availability and W-port reservation |
| `rtl/rob_ptr.sv`, `rtl/rob_val.sv` | the two reorder buffers |
| `rtl/regfile.sv` | PRF / URF / ARF |
| `rtl/mul_pipe.sv` | Y0..Y3 multiplier; one 8-bit slice of the multiplier operand per stage |
| `rtl/io2i_ptr_proc.sv`, `rtl/io2i_val_proc.sv` | the cores |
| `rtl/rr_top.sv` | the three cores side by side |

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator:

    verilator --binary --timing --assert -y rtl rtl/rr_pkg.sv tb/rr_asm_pkg.sv \
        tb/rr_top_full_tb.sv --top-module rr_top_full_tb
    ./obj_dir/Vrr_top_full_tb

The testbenches:

- **Core and top testbenches** (`io2i_ptr_proc_tb`, `io2i_val_proc_tb`,
  `rr_top_tb`, `rr_top_full_tb`). They run the example, then 12 random
  programs of 248 instructions over mostly `x0..x8`, to create many
  dependences. Every commit is compared in order with an instruction-level
  reference model, and all 32 committed registers are read back. The example's
  commit cycles are checked against the table above. The core testbenches
  also check the names chosen for the example: the physical registers
  allocated and freed by the pointer-based core, and the IQ operands (values
  or ROB slots) written by the value-based core. These testbenches count
  each mechanism and fail if one never happened: stalls on FL, ROB and IQ,
  out-of-order issue, bypass, and W-port waits.
  - `rr_top_full_tb` runs the top at its default sizes.
  - `rr_top_tb` uses 34 registers, a 4-entry ROB and a 2-entry IQ, so that
    every stall occurs.
- **Block testbenches** (`free_list_tb`, `rename_table_*_tb`,
  `issue_queue_tb`, `scoreboard_tb`, `rob_*_tb`, `regfile_tb`, `mul_pipe_tb`,
  `arch_rename_table_tb`). Each drives random traffic against a model
  written in the testbench.

`tb/rr_asm_pkg.sv` holds a three-instruction assembler (`enc_add`, `enc_addi`,
`enc_mul`) for writing more programs.

RTL assertions check several rules; a violation stops the simulation:

- no double free;
- no allocation into a full IQ;
- writeback only to live ROB entries;
- one writer per W cycle;
- issue respects the W reservation.

## Where the design makes its own choices

The scheme description fixes the structures, their fields, where each is read
and written, and the freeing rule. It leaves the following open, so this design
chooses:

- **Encoding.** RV32 encodings are used. A destination of `x0` drops the
  instruction.
- **Datapath.** Data is 32 bits wide.
- **Bypassing.** Bypasses come from the end of X, the end of Y3 and W.
- **Issue order.** Oldest-first selection.
- **Writeback port.** A reservation vector guards the shared W port.
- **Stalls.** Decode stalls when the FL is empty or the IQ or ROB is full.
- **ROB slot in the IQ.** The IQ carries the ROB slot of each instruction.
  W uses it to find the ROB entry, and issue uses it to compute age.
- **Reset.** All values reset to zero. The initial map is `x<i> → p<i-1>`.
- **Same-cycle forwarding.** When an RT read and a writeback to the same
  register fall in the same cycle, the writeback is forwarded to the read.
- **Multiplier.** The internal structure of the multiplier is this design's
  own.
- **Value-based rename table.** The valid bit is cleared at commit and the
  pending bit at writeback. The scheme mentions clearing entries at commit and
  also shows a rename-table write in W, so both are done.
- **Physical-register count.** The worked example of the pointer-based scheme
  uses only 11 physical registers (`p0..p10`). This design keeps 64, so the
  same example allocates `p31..p34` instead of `p7..p10`. The commit cycles
  are identical.
- **Instruction memory.** It is outside the cores. Testbenches model it as an
  array.
