# Instruction fusion for a RISC-V out-of-order core

RISC-V needs several short instructions for things other ISAs do in one, such as
computing a scaled array address or loading from `base + index`. Compressed (RVC)
code makes these sequences dense in memory, but each instruction still takes a
fetch-queue slot, a ROB entry, an issue-queue entry and a rename cycle. This RTL
merges short, adjacent sequences of compressed instructions into one internal
32-bit *fused* instruction at the end of fetch. From then on the pipeline carries one
instruction instead of two or three. The back-end executes the fused operation in
one functional unit, and the reorder buffer keeps exceptions precise even though a
fused instruction is partly an ALU operation and partly a load.

The design is the fusion slice of a 4-wide, 11-stage out-of-order RV64GC core
(Lagarto Ox class). It covers the F2 fetch stage, the fetch-decode queue, the
fusion part of decode, the integer and memory execution units that run fused
operations, and the reorder buffer with its fused-exception logic. The base core's
standard decoder, rename, issue queues, register file and load/store unit are not
included. They connect through the ports of `fusion_core_top`.

## The fused sequences

Two families are recognised. All their instructions must be compressed and adjacent
in the same 8-halfword fetch block.

**Scaled Index family** (10 sequences). `add` stands for `c.add` or `c.addw`, and
`ld` stands for `c.ld` or `c.lw`:

| fused | sequence | meaning |
|-------|----------|---------|
| LEA | `c.slli rd,sh` ; `add rd,rs2` | `rd = (rd << sh) + rs2` |
| IL  | `add rd,rs2` ; `ld rd,0(rd)` | `rd = mem[rd + rs2]` |
| SL  | `c.slli rd,sh` ; `add rd,rs2` ; `ld rd,0(rd)` | `rd = mem[(rd << sh) + rs2]` |

Register rules:
- Every instruction writes the same `rd`.
- The add reads `rd` as its first source.
- The load uses `rd` as both base and destination, with offset 0.
- The shift amount is below 32, because the fused format has a 5-bit immediate.

This implementation adds three rules of its own:
- When the sequence starts with `c.slli`, `rs2 != rd`. Otherwise the add would read
  the shifted value, which the fused form cannot reproduce.
- `rd != x0`.
- `c.slli` with shamt bit 5 set is never fused.

**Load Pair family** (4 sequences): `c.ld|c.lw rd1,off(rs1)` ; `c.ld|c.lw rd2,off+size1(rs1)`,
with `rd1 != rs1`. Here `size1` is 8 or 4, the size of the first load. Load pairs are
detected, queued and decoded. Executing them needs two rename destinations and two
write-backs, and those base-core changes are not part of this design (see the end).

### F_R4 encoding

A fused instruction is 32 bits in a variant of the R4 format, with `rs3` replaced by
a 5-bit immediate:

```
 31    27 26  25 24   20 19   15 14  12 11    7 6      0
| imm5   | func2 | rs2   | rs1   | func3 | rd    | opcode |
```

| family | opcode | func2 | func3 | imm5 | rs2 field |
|--------|--------|-------|-------|------|-----------|
| Scaled Index | `0000000` | LEA 00, IL 01, SL 10 | [2] add/addw, [1:0] load width | shift (0 for IL) | add's rs2 |
| Load Pair | `0000001` | width of load 1 | [1:0] width of load 2 | offset of load 1 / its size | rd2 |

Width codes are LD 00, LW 01, LH 10, LB 11. The PC of a fused instruction is the PC
of its first instruction. Constants and the struct for this format are in
`fusion_pkg.sv`.

## Detecting fusions in a fetch block (`c_detector`, `fusion_detector`)

This is the least obvious part of the design. F2 receives 8 halfword slots per cycle.
Any slot may start a sequence, sequences may overlap, and the result must fit back
into the same 8 slots.

**One detector per start slot.** `c_detector` looks at three consecutive slots and
answers with a 32-bit fused instruction and two 3-bit masks:

| result | replace mask | invalid mask |
|--------|-------------|--------------|
| no match | `000` | `000` |
| 2 instructions fused | `011` | `000` |
| 3 instructions fused | `111` | `100` |

The *replace* mask marks the slots whose instructions were absorbed. The fused
instruction always sits in the first two of them, low half first. The *invalid* mask
marks the slot a three-way fusion frees. When several patterns match at the same
start, the priority is SL > LEA > IL > LP. A LEA prefix therefore always looks one
slot further to see whether it is the start of a Scaled Load. `fusion_detector`
instantiates seven detectors, for start slots 0 to 6. Detector 6 sees only two slots,
with its third input tied off, so it can still find two-instruction sequences.

**Overlap resolution.** Detectors overlap. If slot 0 starts a Scaled Load
(`slli ; add ; ld`), the detector at slot 1 also sees `add ; ld` and reports an
Indexed Load. The earlier, longer sequence must win. The rule is applied in slot
order: a detector counts only if its first slot is not already covered by a selected
detector before it. Families cannot chain into each other: the load that ends an
IL/SL has `rd == base`, and a load pair forbids that.

**Mask reduction.** Each selected detector's masks are shifted to its start position
and OR-ed into the block masks by `shift_bitwise_reductor` (7 batches of 3 bits into
8 bits, one instance per mask). Example block:

```
slot:     0      1      2     3      4      5     6      7
        c.slli c.add  c.ld  c.slli c.add  c.ld  c.slli c.add
          SL covers 0-2      SL covers 3-5      LEA covers 6-7
replace = 1111_1111   invalid = 0010_0100   (bit 7 on the left)
```

**Slot selection.** An output slot carries either its own instruction, the low half
of the fused instruction starting there, or the high half of the fused instruction
starting in the previous slot. Slot 0 can only be a low half and slot 7 only a high
half. The replaced slots are tagged `is_fused`. That bit travels with the slot
through the queue to the decoder.

## F2 stage and the fetch-decode queue (`fetch_f2_stage`, `fetch_queue`)

`fetch_f2_stage` first predecodes the block. It walks the valid slots and marks each
as a compressed instruction, the low half or the high half of a 32-bit instruction.
A 32-bit instruction that starts in slot 7 continues in the next block. A one-bit
carry register remembers this and is updated when the queue takes the block. The
fusion detector sees only slots that are valid compressed instructions. Its whole
input is invalidated when:
- F1 reported an instruction page fault for the block,
- an access fault is raised in F2, or
- `fusion_en_i` is low.

A faulting block therefore goes down the pipeline unfused, and its exception stays
with the original instruction. Each slot leaves F2 with its data, its compressed
flag (cleared for fused halves), `is_fused`, the exception flag and its PC.
The write enables are `valid & ~invalid`.

The queue (16 halfword entries by default) has an **unordered write**. The enabled
slots are packed at the tail in order. So the hole left by a three-way fusion does
not stop the slots after it, and a Scaled Load really saves one queue entry. A block
is accepted whole or not at all (`ready_o` when the free space covers the enabled
slots). On the read side, up to 4 instructions are assembled from the head each
cycle:
- one slot for a plain compressed instruction,
- two slots for a 32-bit or fused instruction.

An instruction is offered only when all of its slots are present.

## Decode (`decode_stage`, `fusion_decoder`)

Each of the 4 decode lanes has a fusion decoder working in parallel with the base
core's standard decoder (`std_ctrl_i`). The `is_fused` bit chooses between their
control words. The fusion decoder fills the `ctrl_t` record:

| fused | queue | unit | sources / dests | immediate |
|-------|-------|------|-----------------|-----------|
| LEA | integer | FUSION_ALU | rs1, rs2 / rd | shift |
| IL | memory | MEM | rs1, rs2 / rd | none |
| SL | memory | MEM_SHIFT | rs1, rs2 / rd | shift |
| LP | memory | MEM | rs1 / rd, rd2 | byte offset (imm5 x size) |

It also gives the add size, the load widths, the fusion kind and a unique id per
fused variant (`fused_id_e`, 14 values). The decoder flags as illegal any encoding
the detector never produces: LH/LB widths, which have no compressed form, a LEA with
width bits, an IL with a shift, or a reserved func2.

## Execution

**Fusion ALU (`fusion_alu`).** This is the base ALU (ADD, SUB, XOR, OR, AND, SRA,
SRL, SLL, SLT/SLTU, with the W forms) plus `HL_F_LEA = (rs1 << sh) + rs2`. For LEA,
`word_i` selects `add` or `addw` for the addition only, and the addw result is
sign-extended. `XLEN` may be 32 or 64. With `FUSION_EN = 0` the same module is the
plain ALU.

**Integer ports (`int_fu_generator`).** Port `p` gets an ALU if `ALU_FU_VEC[p]` is
set. That ALU is a Fusion ALU if `ALU_FUSION_VEC[p]` is also set. A port never holds
both kinds. The defaults are `4'b1011` and `4'b0001`: ALUs on ports 0, 1 and 3, and
the Fusion ALU on port 0. Each port has two registers: the issued operation, then the
result. A result therefore reaches `cmplt_o` two clock edges after issue. Some
operations cannot run on their port: anything on a port without an ALU, and LEA on a
plain ALU. These raise `fu_err_o` and produce nothing. The multiply, divide and
branch units of the base core are not modelled.

**Memory execution (`mem_exec`, `fusion_il_fu`, `fusion_sl_fu`).** The MEM unit
computes normal `base + offset` addresses and the IL address `rs1 + rs2`, with addw
sign extension. The MEM_SHIFT unit computes the SL address `(rs1 << sh) + rs2`.
Its `LATENCY` parameter picks one cycle (shift and add together, a long path in front
of the TLB) or two (shift, register, add). The default is two. Both units feed one
request register to the load/store unit:

| operation | request valid after issue |
|-----------|---------------------------|
| load, store, IL | 2 edges |
| SL (`SL_LATENCY = 1`) | 3 edges |

To keep the two units from delivering in the same cycle, a non-SL operation
presented right after an SL is refused for one cycle (`iss_ready_o` low).

## Precise exceptions with fused loads (`reorder_buffer`, `fusion_xcptn_handler`, `fusion_xcpt_pc`)

This is the second hard part. In an IL or SL, only the final load can fault. The
shift and add before it are architecturally complete and must retire. So the ROB
must commit an instruction that also raises an exception, which a normal ROB never
does. Without special handling, the fused instruction would be marked completed,
commit, and leave the ROB before its exception is ever seen at the head.

The ROB has:
- a circular buffer managed by `rob_fifo_ctrl` (64 entries, 4 dispatches and 4
  commits per cycle; grants are always an in-order prefix),
- a completed bit per entry,
- an exception collector that keeps the oldest reported exception.

A plain exception is taken when the reported entry reaches the head *uncompleted*.
The fused case is handled like this:

1. **Window test.** Each cycle `fusion_xcptn_handler` checks whether the collector's
   rob id lies in the commit window `[head, head+4)`. When the window runs past the
   last entry, the test is `id >= head || id < (head+4) mod 64` instead of
   `head <= id < head+4`. The test is also limited to the entries in use.
2. **Partially completed.** If that entry's completed bit is set, two masks are
   built from the in-order ready prefix of the window:
   - `commit_valid_mask` commits up to *and including* the fused instruction. This
     drives `commit_valid_o`/`commit_rdy_o` and the entry reads.
   - `controller_rd_ens_mask` stops *before* it. This is how far the head advances.

   The head therefore lands on the fused instruction and stays there.
3. **Clear completed.** In the cycle the fused instruction commits
   (`partial_commit_o`), its completed bit is cleared at the next edge. It is now an
   uncompleted instruction with a pending exception at the head. The ordinary rule
   takes the exception one cycle later, and the instruction cannot commit twice.
4. **PC.** The fused instruction carries the PC of its first instruction, but the
   faulting instruction is the load. When the exception is taken, `fusion_xcpt_pc`
   adds 2 for IL and 4 for SL (all parts are compressed). Other instructions keep
   their PC.

A taken exception empties the ROB. In the top it also flushes the F2 carry, the fetch
queue and the execution pipelines.

Cycle view of a fused SL whose load faults while older work is done:

```
edge t    : load/store unit completes rob id 5 and reports a fault on it
cycle t+1 : 5 in window and completed -> commits 3,4,5; head moves to 5;
            partial_commit_o = 1
edge t+2  : completed bit of 5 cleared
cycle t+2 : head = 5, uncompleted, pending exception -> xcpt_o = 1,
            xcpt_pc_o = pc(5) + 4; ROB emptied at the next edge
```

## Top level (`fusion_core_top`)

Path through the slice:

```
F1 block ─► fetch_f2_stage ─► fetch_queue ─► decode_stage ─► (rename/dispatch: outside)
                                   │                               │
                         std decoder (outside)        reorder_buffer ◄─ completions
                                                                   ▲
 issue (outside) ─► int_fu_generator ──────────────────────────────┤ ports 0-3
                 └► mem_exec ─► load/store unit (outside) ─────────┘ port 4 (+ faults)
```

Port groups:
- F1 block in: 8 halfwords, per-slot valid, PC, page fault, access fault.
  `f1_ready_o` back.
- Decode: `dec_instr_o` goes to the standard decoder, its `std_ctrl_i` comes back,
  and `dec_ctrl_o`/`dec_ready_i` connect to rename.
- ROB dispatch (`disp_*`). Rob ids come back in the same cycle.
- Integer issue and results (`int_iss_i`, `int_cmplt_o`, `int_fu_err_o`).
- Memory issue (`mem_iss_i`, `mem_iss_ready_o`) and the request to the load/store
  unit (`mem_req_o`).
- Load/store completions and fault reports (`lsu_*`).
- Commit, partial commit, taken exception with cause, PC and rob id.
- Status outputs.

`flush_i` is the base core's recovery flush for the front end and execution units.
Timing: an F1 block enters the queue at the edge it is accepted, and the queue's read
side and decode are combinational.

Parameters of the top and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `FQ_DEPTH` | 16 | fetch queue halfword entries |
| `SL_LATENCY` | 1 | extra cycle in the MEM_SHIFT unit (0 or 1) |
| `ALU_FU_VEC` | `4'b1011` | ports with an ALU |
| `ALU_FUSION_VEC` | `4'b0001` | which of those ALUs are Fusion ALUs |

The ROB size (64) and the commit width (4) are fixed by `ROB_ID_W_DEFAULT` in the
package.

## What follows the original design and what does not

These follow the original fusion design:
- the sequences, register rules and encodings,
- the seven-detector array with replace/invalid masks, OR reduction and slot
  selection,
- disabling fusion on fetch exceptions,
- the unordered queue write and `is_fused` bit,
- the parallel fusion decoder and its control values,
- the Fusion ALU and its port allocation rule,
- the IL/SL address units with the 0/1-cycle option,
- the window test with wrap-around, the two commit masks, the delayed
  completed-bit reset, and the +2/+4 PC correction.

These are this design's own choices where the original is silent:
- the `rs2 != rd` rule for sequences that start with `c.slli`,
- the queue depth and all-or-nothing write,
- the `ctrl_t` layout,
- the number of Fusion ALUs (one, on port 0),
- the two-register integer pipeline,
- the one-cycle hold behind an SL,
- the ROB size, commit width and entry contents,
- the single-register exception collector,
- the flush wiring,
- the simple predecoder (no jump correction).

Not built: the standard decoder, branch prediction and jump correction, rename
(including the two-destination rename load pairs need), issue queues, register file,
multiply/divide/branch units, and the load/store unit with its load-pair write-back.
Load pairs are therefore only a front-end feature here.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`, and they share
`tb/tb_rvc_pkg.sv`. That package encodes RVC instructions from an abstract
description and holds an independent reference model of block fusion. Each test ends
by printing `TB_RESULT checks=<n> failures=<m>`. With Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_fusion_core_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fusion_pkg.sv tb/tb_rvc_pkg.sv tb/tb_fusion_core_top.sv
./obj_dir/Vtb_fusion_core_top
```

`tb_fusion_core_top` runs the whole slice at its default parameters for 30,000
cycles. The testbench plays F1, the standard decoder, dispatch, issue and the
load/store unit. It checks:
- every decoded instruction against the reference fusion of its block,
- every ALU result and memory address,
- in-order commit,
- the partial commit followed by the exception at PC+2 or PC+4.

It counts each mechanism and fails if any never occurred: LEA/IL/SL/LP fusion, freed
slots, fusion suppressed by a page fault and by `fusion_en_i`, queue-full stalls, the
MEM hold behind an SL, LEA on the Fusion ALU, refused LEA on a plain ALU, partial
commits, IL and SL exceptions, and ROB wrap-around. The unit testbenches cover:
- both XLEN values of the arithmetic units and both SL latencies,
- the wrap-around window cases of the exception handler,
- a model-based random test of the ROB with injected plain and fused faults.

`tb_fusion_loops` pushes loop kernels through F2, the queue and decode at default
sizes. Each kernel runs 10,000 iterations, once with fusion on and once with it off.
The "ideal" kernels hold only back-to-back sequences of one idiom plus the loop
counter and branch. The "loop" kernels also store each result. The test checks the
exact decoded and fused counts and prints the front-end cycle counts:

| kernel | instructions per iteration | decode cycles, off -> on |
|--------|----------------------------|--------------------------|
| LEA ideal | 16 -> 9 | 40001 -> 30001 |
| IL ideal | 16 -> 9 | 40001 -> 30001 |
| SL ideal | 16 -> 8 | 40001 -> 20001 |
| LEA loop | 8 -> 6 | 20001 -> 15001 |
| IL loop | 8 -> 6 | 20001 -> 15001 |
| SL loop | 14 -> 8 | 35001 -> 20001 |

Without fusion, these kernels are limited by the 4 decode lanes. With fusion, the
16-entry queue often becomes the limit. A block is taken only when all 8 of its slots
fit, so when the queue holds more than 8 halfwords, fetch waits a cycle. This is why
the two-instruction idioms save about a quarter of the front-end cycles rather than
closer to half. A deeper queue (`FQ_DEPTH`) raises that. These are front-end numbers
only. Whole-program cycle counts, and the standard benchmark suites, need the complete
core.
