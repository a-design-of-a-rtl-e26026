# Dual-phase VL-IW shader core with eight hardware threads

This is a small programmable shader core for 2D/3D graphics arithmetic on
4-lane vectors (x, y, z, w). It rests on three ideas:

* **Variable-length instruction words (VL-IW).** An instruction is built
  from one to four 32-bit *fragments*. Each fragment holds a single
  micro-operation. A simple operation costs one word of program memory, and
  a rich one costs up to four. A classic VLIW shader word pays for every
  field every time.
* **Two phases per instruction.** The fragments of an instruction belong to
  phase #0 or phase #1. The two phases behave like two cooperating SIMD
  processors, but they share one register file and one set of ALUs. Phase #0
  can also *coordinate* phase #1. It can supply a predicate that enables or
  disables phase #1, or an address that phase #1 uses as a register index, a
  branch target or a memory address. Compare-and-branch, indirect branches,
  calls, returns and loops all come from this one mechanism. No dedicated
  instruction exists for any of them.
* **Eight threads in strict round robin.** Each thread issues once every
  eight cycles. Every instruction has finished before its thread issues
  again, so the core has no hazard detection, forwarding or branch penalty.

The whole design is SystemVerilog in `rtl/`: one package and 13 modules, with
`gpu_core` as the top. Self-checking testbenches are in `tb/`.

## Contents

1. [Instruction words and fragments](#instruction-words-and-fragments)
2. [How a phase is assembled from fragments](#how-a-phase-is-assembled-from-fragments)
3. [Sharing the ALUs: lane routing and the pairing rules](#sharing-the-alus-lane-routing-and-the-pairing-rules)
4. [Phase #0 coordinating phase #1: predicates, addresses and control flow](#phase-0-coordinating-phase-1-predicates-addresses-and-control-flow)
5. [Threads and the pipeline](#threads-and-the-pipeline)
6. [Arithmetic units and number format](#arithmetic-units-and-number-format)
7. [Write-back, loads and stores](#write-back-loads-and-stores)
8. [Module map and top-level ports](#module-map-and-top-level-ports)
9. [Simulating](#simulating)
10. [Verification status: how far to trust it](#verification-status-how-far-to-trust-it)
11. [Departures from the original design](#departures-from-the-original-design)

---

## Instruction words and fragments

Every fragment has the same outer layout:

| bits   | field   | meaning                                                   |
|--------|---------|-----------------------------------------------------------|
| 31     | E       | end bit: this is the last fragment of the instruction     |
| 30     | P       | phase bit: 0 = phase #0, 1 = phase #1                     |
| 29:24  | opcode  | micro-operation (table below)                             |
| 23:0   | operand | register form or immediate form, chosen by the opcode     |

How fragments form an instruction:

* The instruction ends at the first fragment with E = 1. If none of the first
  three fragments has E set, the instruction is four fragments long.
* All phase #0 fragments come before all phase #1 fragments.
* Each phase holds at most two fragments.

A format error makes the instruction illegal (see the pairing rules). There
are three kinds:

* phase #0 after phase #1;
* a third fragment in a phase;
* a binary operation with no free read port for its implied second source.

The program counter counts fragments. Instruction memory is organised so
that the four fragments starting at *any* PC can be read in a single cycle
(see `instr_mem`).

**Register form** (arithmetic, moves, PRED, ADDR):

| bits  | field | meaning                                                        |
|-------|-------|----------------------------------------------------------------|
| 23:20 | dst   | destination register (for PRED: the condition code)            |
| 19:16 | mask  | lane write mask, bit 16 = x ... bit 19 = w                     |
| 15:12 | src   | source register                                                |
| 11:4  | swz   | swizzle; bits [2c+1:2c] select the source lane for lane c      |
| 3     | neg   | negate the source                                              |
| 2     | idx   | indexed source: read register (src + ADDR) mod 16              |
| 1:0   | -     | reserved, 0                                                    |

**Immediate form** (branches, loads, stores, halt):

| bits  | field | meaning                                                    |
|-------|-------|------------------------------------------------------------|
| 23:20 | reg   | load destination or store data register                    |
| 19:16 | mask  | lane mask for the load or store                            |
| 15:0  | imm   | signed 16-bit branch offset, branch target or memory offset |

**Opcodes** (numbering is this design's own):

| op   | name | kind        | effect |
|------|------|-------------|--------|
| 0x00 | NOP  | -           | empty fragment |
| 0x01 | SRC  | operand     | supplies the second source of its phase; written "-" below |
| 0x02 | MOV  | arithmetic  | dst.mask = src |
| 0x03 | ADD  | arithmetic  | dst.mask = src0 + src1 |
| 0x04 | MUL  | arithmetic  | dst.mask = src0 * src1 |
| 0x05 | MULS | arithmetic  | multiply with the result clamped to [0, 1.0] |
| 0x06 | RCP  | arithmetic  | 1 / src (one lane per instruction) |
| 0x07 | RSQ  | arithmetic  | 1 / sqrt(src) (one lane per instruction) |
| 0x08 | CMP  | arithmetic  | -1.0 / 0 / +1.0 for src0 < / == / > src1 |
| 0x09 | MVS  | arithmetic  | dst.mask = return PC (the PC of the next instruction) |
| 0x10 | PRED | coordinate  | predicate for phase #1 from lane x of src: Z, NZ, N, GE, P, LE = 0..5 |
| 0x11 | ADDR | coordinate  | address for phase #1 = integer part of lane x of src |
| 0x20 | BLR  | control     | PC = PC of next instruction + imm |
| 0x21 | BLD  | control     | PC = ADDR + imm (ADDR = 0 when phase #0 has none) |
| 0x22 | LD   | control     | reg.mask = data memory [ADDR + imm] |
| 0x23 | ST   | control     | data memory [ADDR + imm] = reg, lanes in mask |
| 0x24 | HALT | control     | the thread stops |

The examples below use the notation `[E P OP operands]`, one bracket per
fragment.

## How a phase is assembled from fragments

This is the least obvious part of the design, and it lives in
`vliw_decoder`. A phase has at most two fragments, hence two register read
ports. The decoder gives each fragment a role inside its phase:

* **Coordinate** (PRED, ADDR). These are evaluated during operand fetch and
  drive phase #1. They are legal only in phase #0.
* **Primary.** The first other fragment. It names the operation, the
  destination, the write mask and the first source.
* **Secondary.** The next fragment. Its source is the second operand of the
  primary's operation. If its own opcode is a real operation (not SRC), it
  also *overrides* the primary's operation on the lanes of its own mask.

A phase can therefore do different things in different lanes, as in this
instruction:

```
[0 0 MUL  r2.xyzw, r0]   [0 0 MOV  .y, r1]         phase #0: r2.xzw = r0*r1, r2.y = r1.y
[0 1 ADD  r11.xyz, r8]   [1 1 RCP  .w, r15]        phase #1: r11.xyz = r8+r15, r11.w = 1/r15.w
```

In lanes x, z and w, phase #0 multiplies r0 by r1. In lane y it moves r1.y
instead. Phase #1 adds in lanes x, y and z and takes the reciprocal in lane w.
This one instruction of four fragments does the work of four conventional
instructions.

The operand rules:

* A binary override (ADD, MUL, CMP in the secondary) uses both sources.
* A unary override (MOV, RCP, RSQ) uses the secondary's own source.
* A binary primary written **alone** takes its destination register as the
  second source. For example `MUL_sat A, B, A` is the single fragment
  `[1 0 MULS A, B]`. The decoder fills the phase's free slot with an
  implied SRC of the destination; if no slot is free, that is a format
  error.

## Sharing the ALUs: lane routing and the pairing rules

Both phases execute in the same cycle on one set of units:

* a 4-lane adder;
* a 4-lane comparator;
* a 4-lane multiplier;
* one scalar reciprocal unit;
* one scalar reciprocal-square-root unit.

`pre_coordinate` works out, lane by lane, which operation each phase
performs. It then hands each lane of each unit to the phase that needs it.
MOV and MVS lanes need no unit; their values pass straight to write-back.
`post_coordinate` picks each phase's result lanes back out of the units.

This only works when the two phases never want the same unit on the same
lane. `pairing_checker` enforces that with these rules:

| rule | illegal example | why |
|------|-----------------|-----|
| same adder lane in both phases | `add a.xyz b c` \| `add d.x e f` | one adder per lane |
| same multiplier lane in both phases | `mul a.x ...` \| `mul d.x ...` | one multiplier per lane |
| same comparator lane in both phases | `cmp a.x ...` \| `cmp d.x ...` | one comparator per lane |
| more than one RCP lane, or more than one RSQ lane, in the instruction | `rcp a.xy ...` | scalar special-function units |
| branch, load, store or halt in phase #0, or as a secondary | `[0 0 BLR ..]` | control exists only in phase #1 |
| PRED or ADDR in phase #1, or more than one of either | `[0 1 PRED ..]` | coordination flows from phase #0 to #1 |
| any format error from the decoder | - | - |

Allowed pairings include:

* the same unit on *different* lanes, e.g. `mul a.x` | `mul d.yzw`;
* RCP in one phase with RSQ in the other;
* MOVs duplicated in both phases;
* CMP in one phase with ADD in the other on the same lane.

An illegal instruction has no effect: no register write, no memory access,
no branch. The PC advances past it, and it is reported on `retire_illegal`.

Why the comparator is a separate unit: the loop idiom below pairs `CMP r2.x`
in phase #0 with `ADD r0.x` in phase #1, both on lane x. That pairing is legal
only if the compare does not occupy the adder.

## Phase #0 coordinating phase #1: predicates, addresses and control flow

There are two coordination values, and both are computed from phase #0's
operands in the same cycle as phase #1's operand fetch:

* **PRED cond, src.x.** If the condition fails, *all* of phase #1 is
  disabled: arithmetic, load, store, branch and halt. Phase #0 still
  executes.
* **ADDR src.x.** The integer part of a lane, rounded down. It serves as:
  * the index of a phase #1 source marked `idx`, i.e. relative register
    addressing `B[D.w]`;
  * the base of BLD, giving indirect and computed branches;
  * the base of LD/ST addresses.

Phase #1 sees nothing else of phase #0. Each phase reads the registers as
they were before the instruction.

With these, the usual control structures need no special instructions:

```
; relative branch
[1 1 BLR 120]                                         PC = next + 120

; if (r12.x < 0) goto r12.y   (compare-branch, indirect)
[0 0 PRED N, r12.xxxx] [0 0 ADDR r12.yyyy] [1 1 BLD 0]

; call 85: push the return PC onto a 4-entry stack kept in r13
[0 0 MOV r13.yzw, r13.xxyz] [0 0 MVS r13.x] [1 1 BLD 85]

; return: pop
[0 0 MOV r13.xyz, r13.yzww] [0 0 ADDR r13.xxxx] [1 1 BLD 0]
```

A call and a return each take one instruction. The "stack" is one register
with four lanes. Calls therefore nest four deep per stack register, and a
deeper stack would spill to memory in software.

A counted loop spends only two instructions on control:

```
head: [0 0 CMP r2.x, r0.xxxx] [0 0 - r0.zzzz] [1 1 ADD r0.x, r0.yyyy]
                                              ; r2.x = sign(i - n)  |  i += step
      [0 0 PRED GE, r2.xxxx] [1 1 BLR 41]     ; if (i >= n) leave
      ... 40 fragments of loop body ...
      [1 1 BLR -46]                           ; back to head
```

The head compares and increments in one instruction. The compare uses the
counter's old value, because both phases read before either writes. The
second instruction leaves the loop. The body therefore sees the incremented
counter.

The BLR offsets count fragments **from the instruction after the branch**.
In this loop layout, `+41` from the end of the exit branch lands just past
the back branch, and `-46` from the end of the back branch lands on the
head. The testbench runs this exact layout with these exact offsets.

## Threads and the pipeline

`thread_scheduler` holds a PC and an *active* bit per thread. Its slot
counter steps through threads 0..7, one per cycle. A stopped thread's slot
stays empty; the remaining threads do not issue more often. The pipeline has
four stages:

| stage | work |
|-------|------|
| S0 | the scheduler picks the thread; `instr_mem` reads the four fragments at its PC (synchronous read) |
| S1 | `vliw_decoder` and `pairing_checker`; two `operand_fetch` units (one per phase, four GPR read ports); `pre_coordinate` |
| S2 | `common_alu`; `branch_unit` computes the next PC and writes it to the scheduler; `mem_unit` issues the data memory request |
| S3 | load data arrive; `post_coordinate` and `write_back` write up to two destinations into `gpr_file` |

Thread t issues at cycle c, writes its next PC at c+2 and its registers at
c+3, and issues again at c+8. Every dependency between consecutive
instructions of a thread is therefore satisfied with no interlock. A taken
branch costs nothing, because the new PC is in place several cycles before
it is needed.

The margin shrinks with fewer threads. The design needs at least 4
(`NTHREADS >= 4` is asserted). With 8 threads all running, the core retires
one instruction per cycle. A single thread runs at one instruction per 8
cycles.

## Arithmetic units and number format

Lanes are signed 16.16 fixed point: 32 bits, 1.0 = 0x00010000.

| unit | behaviour |
|------|-----------|
| adder | a + b per lane, wrapping on overflow |
| comparator | sign(a - b) as -1.0 / 0 / +1.0, computed exactly with a 33-bit difference |
| multiplier | (a * b) >> 16 per lane; MULS clamps the result to [0, 1.0] |
| reciprocal | 2^32 / x, truncated; rcp(0) = largest positive value |
| reciprocal square root | 2^40 / isqrt(x * 2^32): an exact integer square root, then a division; rsq(x <= 0) = largest positive value |

Reciprocal and reciprocal square root are combinational. They give correct
results but a long path. A faster implementation would iterate or use a
table, at the cost of a longer pipeline.

## Write-back, loads and stores

Each phase writes at most one destination register with its lane mask, so the
register file has two lane-masked write ports. When both phases write the
same lane of the same register, phase #1 wins.

A phase #1 `LD` makes the loaded vector that phase's result for the lanes in
its mask. A `ST` writes the lanes of its mask.

The data memory is outside the core. It holds one 4-lane vector per address.
`dmem_req` goes out in S2 and `dmem_rdata` is expected one cycle later. The
testbench model is `tb/data_mem_model.sv`.

Register contents are not reset. Load the registers a program reads through
the host port first.

## Module map and top-level ports

| file | role |
|------|------|
| `gpu_pkg.sv` | types, opcodes, field layouts, swizzle / predicate / fixed-point helpers |
| `gpu_core.sv` | top: pipeline registers and wiring of everything below |
| `thread_scheduler.sv` | round-robin slot counter, per-thread PC and active bit |
| `instr_mem.sv` | four interleaved banks; reads the 4 fragments at any PC in one cycle |
| `vliw_decoder.sv` | instruction length, phase split, fragment roles, implied source |
| `pairing_checker.sv` | the exclusive pairing rules; illegal flag and which rule fired |
| `gpr_file.sv` | 16 x 4-lane registers per thread, 4 read ports, 2 lane-masked write ports, host port |
| `operand_fetch.sv` | one per phase: register reads, swizzle, negate, index, PRED/ADDR |
| `pre_coordinate.sv` | per-lane operations of both phases and their routing onto the units |
| `common_alu.sv` | adder, comparator, multiplier, reciprocal, reciprocal square root |
| `branch_unit.sv` | next PC, predicate gating of phase #1, halt |
| `mem_unit.sv` | load/store request from phase #1 |
| `post_coordinate.sv` | each phase's result lanes from the units, moves and load data |
| `write_back.sv` | two write ports, phase #1 priority, illegal / predicate gating |

Parameters of `gpu_core`:

| parameter | default | meaning |
|-----------|---------|---------|
| `NTHREADS` | 8 | number of threads (at least 4) |
| `IMEM_DEPTH` | 1024 | fragments of instruction memory |
| `DAW` | 10 | data memory address bits |

The package fixes 16 registers per thread and 16.16 lanes.

Ports of `gpu_core`:

* `imem_we/waddr/wdata`: program load, one fragment per cycle.
* `start/start_mask/start_pc`: a one-cycle pulse starts the chosen threads at
  a PC.
* `host_we/tid/reg/wdata/rdata`: write or read any register of any thread.
* `dmem_*`: the data memory port.
* `active`, `busy`: thread status.
* `retire_*`: one record per completed instruction. It gives the thread,
  the fragment count and whether the instruction was illegal, wrote in both
  phases, branched, was predicated off, or accessed memory.

## Simulating

The testbenches need Verilator 5 with `--timing`. From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gpu_pkg.sv tb/gpu_asm_pkg.sv tb/tb_gpu_core.sv \
    --top-module tb_gpu_core -o sim
./obj_dir/sim
```

To run another test, replace `tb_gpu_core` with any other testbench in `tb/`.
Each test prints `TB_RESULT checks=N failures=M` at the end.

`tb/gpu_asm_pkg.sv` is a small assembler for writing programs inside a
testbench:

* `F(e, p, op, dst, mask, src, swz, neg, idx)` builds a register-form
  fragment;
* `FI(e, p, op, reg, mask, imm)` builds an immediate-form fragment;
* `SW(x, y, z, w)` builds a swizzle;
* `fx()` and `rl()` convert between reals and 16.16.

To program the core:

1. Write fragments through `imem_*`.
2. Load registers through `host_*`.
3. Pulse `start`.
4. Wait for `busy` to fall.

`tb_gpu_core.sv` is a complete example of this sequence.

## Verification status: how far to trust it

Each module has its own self-checking testbench. Each testbench compares
the module with values computed independently in the test, and each was
confirmed to fail on a deliberately broken copy of its module.

| test | what it covers |
|------|----------------|
| `tb_thread_scheduler` | round-robin order, empty slots, start, PC update, halt |
| `tb_instr_mem` | four-fragment reads at every alignment |
| `tb_vliw_decoder` | lengths 1 to 4, phase split, roles, implied source, each format error |
| `tb_pairing_checker` | each rule, with legal and illegal pairings |
| `tb_gpr_file` | every register through all read ports, lane-masked writes on both ports, thread separation |
| `tb_operand_fetch` | swizzle, negate, indexing, every predicate condition, ADDR |
| `tb_pre_coordinate` | lane routing, overrides, implied sources, MVS |
| `tb_common_alu` | random operands against integer and real reference arithmetic; rcp/rsq within a stated error |
| `tb_branch_unit` | sequential flow, BLR / BLD, predication, halt, illegal |
| `tb_mem_unit` | address, masks, predicated-off and illegal requests |
| `tb_post_coordinate` | result selection per lane |
| `tb_write_back` | two ports, phase #1 priority, gating |

**`tb_gpu_core`** runs at the default size, with all 8 threads executing one
program on different data. The program covers:

* a dot product and a 4x4 matrix-vector product;
* the four-fragment mixed instruction shown above;
* compare and saturated multiply;
* a predicated add;
* an instruction that breaks the pairing rules;
* a data-dependent indirect branch;
* nested calls;
* an indexed operand;
* a store then a load.

It checks:

* every result register against real arithmetic;
* the instruction count of every thread;
* that each thread retires exactly once per 8 cycles;
* that each mechanism occurred at least once.

Across all threads the run retires 203 instructions in 207 cycles.

**`tb_workloads`** runs the published benchmark kernels on one thread and
counts instructions:

| kernel | instructions here | published (dual-phase, multi-thread) |
|--------|-------------------|--------------------------------------|
| 4-lane dot product | 3 | 3 |
| 4x4 matrix x vector | 5 | 6 |
| conditional indirect branch (taken / not) | 2 / 2 | 2 |
| call + return | 1 + 1 | 2 |
| 100-iteration loop, 40-fragment body | 42 per iteration + 2 | not given |

**`tb_examples`** encodes the published arithmetic and branch examples
fragment for fragment, as printed, and checks the result of each and the
number of instructions it took. Each example runs on its own. The examples
are:

* `MUL_sat A, B, A` as a single fragment;
* `ADD A, B, C`;
* `ADD A, B[D.w], C`;
* `ADD_predicate(E) A, B, C[D.w]`, with the predicate true and false;
* the four-operation instruction shown earlier;
* `MUL A, B, C` paired with `ADD D, E, F`;
* `BL R 120`;
* the conditional indirect branch, taken and not taken;
* `CALL 85` / `RETURN`.

What has not been done:

* The core has been simulated only. It has not been synthesised for timing.
  Reciprocal and reciprocal square root are long combinational paths and
  would limit the clock.
* Only the programs in the testbenches have run on it. There is no compiler,
  so no real shader program has been executed.
* Overflow behaviour is wrap-around. Apart from the clamping noted above it
  is not checked against any reference.

## Departures from the original design

The original description gives the architecture, the fragment format (E and
P bits, opcode, operand), the pairing rules, the worked examples and the
benchmark counts. It does not give:

* the opcode numbering or the operand-field layout;
* register count, number format, memory sizes or pipeline timing.

All of those are this design's choices, as listed here. Where the design
departs from the original, or fills a gap in it:

* **Number format.** The original targets floating-point shader arithmetic;
  this core uses 16.16 fixed point throughout, which keeps the shared units
  small and exact to test.
* **Comparator.** The original does not say which unit executes CMP. Its
  loop idiom pairs a compare and an add on the same lane, so CMP has its
  own 4-lane comparator here.
* **Relative branch base.** `BLR` counts from the next instruction. The
  published loop offsets (+41, -46) fit only this reading.
* **Additions.** HALT, the host ports, `start` and the retire record are
  additions needed to load and run programs.
* **Load/store.** The LD/ST fragment form (register, mask, ADDR +
  immediate, one vector per access) is this design's, as is the external
  one-cycle data memory.
* **Pairing rules.** Allowing at most one PRED and one ADDR per instruction,
  forbidding control fragments as secondaries, and skipping illegal
  instructions are this design's completions of the rules.
* **Matrix-vector product.** It takes 5 instructions here against a
  published 6. The original program is not given, so the difference cannot
  be traced.
* **Baselines.** The generic SIMD and multi-thread-only comparison
  architectures are not built. They are only points of comparison for the
  dual-phase core.
