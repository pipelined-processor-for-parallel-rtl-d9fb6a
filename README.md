# A pipelined Minimally Synchronized Architecture (MSA) processor

An interpreter for a high-level, stack-oriented instruction set usually runs
on one processor that does everything in turn. It fetches and decodes an
instruction, computes the address of each variable, loads the variable and
evaluates the expression. The MSA splits that work across three specialised
processors that share no resources:

- the **controller** walks the program, decodes it and handles control flow;
- the **memory unit** turns variable names into addresses and makes every
  data access;
- the **execution unit** evaluates arithmetic in Polish (postfix) form on an
  expression stack.

The three units talk only through small FIFO queues. Each unit runs ahead
as far as its input queues allow, so their work overlaps. The only
synchronisation is a queue that is empty or full. In this version each unit
is also pipelined internally.

```
            +------------------------ MCQ (relation result, 1 bit) -----+
            v                                                           |
  IC -> CONTROLLER --CMQ (1 write port)--> MEMORY UNIT <-> data cache   |
        IF ID IFRM SEND                    IF ID AG MEM END ------------+
            |                                 |      ^
            +--CEQ (2 write ports)--+     MXQ |      | XMQ
                                    v         v      |
                               EXECUTION UNIT  IF ID EX SEND
```

Everything here is synthesisable SystemVerilog. There is one module or
package per file in `rtl/` and one self-checking testbench per module in
`tb/`.

## The instruction encoding: leading and dependent parcels

The controller's program is a stream of 32-bit **parcels**. One source-level
instruction, for example a whole expression `A := (B + C) * 4`, is one
*leading* parcel followed by any number of *dependent* parcels. Each parcel
is decoded into at most three unit instructions:

- one memory-unit instruction, sent over the CMQ;
- two execution-unit instructions, sent over the CEQ.

| Parcel type | bit 31 | bits 30..24 / 30..28 | rest |
|---|---|---|---|
| leading   | 0 | major opcode `[31:24]` (8 bits) | 24-bit operand `[23:0]` |
| dependent | 1 | minor opcode `[31:28]` (4 bits, includes the flag) | operator and operand fields `[27:0]` |

The decoder reads an 8-bit decode register, DR:

- A leading parcel loads its major opcode into DR.
- A dependent parcel replaces only `DR[3:0]` with its minor opcode and keeps
  `DR[7:4]` from the leading parcel.

So the leading parcel selects a *family*, and the dependent parcels are
decoded within that family. For example, minor code 8 is `POVL` inside an
expression, `ASLD` after a store-immediate and `RLOP` after a relation.
Leading opcodes keep bit 3 clear so they never collide with a
family/minor combination.

The families (the opcode values are defined in `rtl/msa_pkg.sv`):

| Leading | Meaning | Dependent parcels |
|---|---|---|
| `PSVR` / `PSVI` / `PSVL` | start an expression with a variable, an indirect variable or a literal | any of the expression parcels below |
| `PAVR` | start an expression with an element of a structure or array (sets the object base) | any of the expression parcels below |
| `ASGV` / `ASGI` / `ASAR` | store the expression result into a variable, an indirect variable or a structure element | `ASOD`, `ASOV` (structure offsets) |
| `ASLV` / `ASLI` | store an immediate value | `ASLD` (the value) |
| `RLS1` / `RLS2` | relation *var rel literal* or *var rel var* | `RLOP` (relation in `[27:24]`: GT, GE, EQ, NE, LT, LE) |
| `CMR0` `CMI0` `CMR1` `CMI1` | single-parcel test: variable (direct or indirect) equals 0 or 1 | none |
| `GOTO` `LOOP` `CALL` `RETN` `HALT` | control flow | none |

A variable operand is 24 bits: a 4-bit display number and a 20-bit offset.

The expression parcels:

| Parcel | Fields | Effect |
|---|---|---|
| `POVL` / `PVLO` | operator `[27:24]`, literal `[23:0]` / literal `[27:4]`, operator `[3:0]` | apply the operator, then push the literal / push, then apply |
| `POVR` / `PVRO` | the same with a variable | the same, with the variable fetched by the memory unit |
| `POVI` | operator `[27:24]`, indirect variable `[23:0]` | apply, then push the pointed-to value |
| `PVAL` / `PVAR` / `PVRI` | literal / variable / indirect variable `[23:0]` | push the operand |
| `PAOD` / `PAOV` | offset `[23:0]`: literal / read from a variable | push the element at base + offset of the structure opened by `PAVR` |
| `POPP` | operators `[27:24]` and `[23:20]` | apply both, in that order |

There are eleven expression parcels, but a minor opcode whose top bit is the
dependent flag has only eight values. The parcels that carry a single
24-bit operand therefore share two minor codes:

- minor D: `PVAL`, `PAOD`;
- minor E: `PVAR`, `PVRI`, `PAOV`.

Their free bits `[27:24]` select the parcel, so the PLA sees those four
parcel bits as well as DR.

An expression parcel becomes, for example:

- "send variable X to the MXQ" for the memory unit;
- "take the next queue item" and "apply +" for the execution unit.

The memory unit fetches operands while the execution unit is still working
on earlier ones.

## Controller unit (`controller_unit`, `ctl_pla`, `control_stack`, `instr_cache`)

The controller has four stages:

| Stage | What it does |
|---|---|
| IF | Reads one parcel from the instruction cache into IR. |
| ID | Updates DR from IR and decodes the control-flow instructions. |
| IFRM | The PLA (`ctl_pla`, combinational) turns DR into up to three instruction fields. Each field's argument is cut from the right bits of the parcel. The fields go into ADREG, EXREG1 and EXREG2. |
| SEND | Writes ADREG to the CMQ and EXREG1/EXREG2 to the CEQ. |

The CEQ has two write ports, so both execution instructions can leave in
one cycle. If the CEQ has only one free slot, EXREG1 goes first and EXREG2
in a later cycle. The whole pipeline holds until every part of the SEND
stage has been written. This is also what lets a one-entry CEQ work.

Control transfers and their cost:

| Instruction | Cost | How it works |
|---|---|---|
| GOTO | one cycle | Resolved in ID. The one parcel already fetched is discarded. |
| CALL | one cycle | Also pushes the return address on the 16-entry `control_stack` and sends a frame-creation instruction to the memory unit. |
| RETN | one cycle | Pops the control stack and sends a frame-deletion instruction. |
| LOOP | unbounded | Needs the result of the previous relation, which the memory unit computes and returns through the MCQ. LOOP waits in ID, holding IF, until the MCQ has a word. It then branches to its target if the result is 1 and falls through if it is 0. A taken LOOP costs the same one-cycle redirect. |

The LOOP wait is the real price of this architecture: how long it lasts
depends on how far the memory unit is behind. When the relation's last
parcel directly precedes the LOOP and the memory unit is idle, the wait is
7 cycles:

- one cycle in SEND;
- five cycles through the memory unit's stages;
- one cycle for the MCQ word to reach the waiting LOOP.

Compilers are expected to place the relation well ahead of the LOOP.

Operand layouts:

- CALL: `{display m[23:20], frame size[19:12], target[11:0]}`;
- RETN: `{m[23:20], ...}`;
- GOTO and LOOP: the target address in the low bits.

## Memory unit (`memory_unit`, `display_regs`, `mem_comparator`, `data_cache`)

This is the most involved unit. It binds names to addresses, performs every
data access, creates and deletes procedure frames, and evaluates relations.

**Addressing.** A variable is named as (display `d`, offset `o`). The 16
display registers DR.1–DR.16 hold the base address of each statically nested
environment. The address is `display[d] + o`, which gives 16 levels of
static nesting and 2^20 words per environment. Other addressing modes:

- An *indirect* variable holds an absolute address, which is then read or
  written.
- A *structured* variable adds a third component: the object's base (from
  the leading parcel) plus a component offset. The offset is either a
  literal or read from another variable.

**Pipeline.**

| Stage | What it does |
|---|---|
| IF | Pops the CMQ into the memory instruction register. An empty queue yields a bubble. |
| ID | Decodes the opcode into access flags (read, write, two accesses, store data source, destination queue). |
| AG | The address adder forms `display[d] + offset` into MAR. Leading parcels of structured accesses and store-immediate park their address in a pending address register (PAR) for the dependent parcel that completes them. |
| MEM | One data-cache access per cycle at MAR. Store data comes from the XMQ (a computed result) or from the instruction (a literal). An indirect operand or a variable structure offset needs a first read to obtain the real address. The stage then holds for one more cycle. |
| END | The loaded word goes where the instruction says: to the MXQ (an operand for the execution unit), to the comparator's first-operand register, through the comparator to the MCQ (a relation result), or back into a display register (RETN). |

A store whose value must come from the execution unit waits in MEM until
the XMQ has a word. A send waits in END until the MXQ has room. Either wait
holds the stages behind it.

Every data access happens in MEM, in program order, and one at a time. So
the unit has no internal read-after-write hazard. Ordering between units is
kept by the queues.

**Relations.** A relation's leading parcel (`RLS1`/`RLS2`) loads the first
variable into the comparator register. The `RLOP` parcel that follows
supplies the relation and the second operand, a literal or a variable. The
comparison is signed. Its one-bit result is queued on the MCQ for the
controller's LOOP. The 0/1 tests compare one variable with 0 or 1.

**Frames.** The data stack grows upward from HIGHMEM, which is 2^20 after
reset.

- `CALL m, size` writes the old DR.m at HIGHMEM (word 0 of the new frame),
  points DR.m at the frame, advances HIGHMEM by `size + 1`, and records m
  in CURDISP. This happens in AG, so the very next instruction already sees
  the new environment.
- `RETN m` sets HIGHMEM back to DR.m, reads word 0 of the frame in MEM, and
  restores DR.m from it in END. AG is held while a RETN is in MEM or END.
  Otherwise an instruction could form an address from the stale display
  register.

Parameters and locals sit at offsets 1, 2, … of the frame. CURDISP is kept
up to date, but no instruction in this set reads it.

**Extra cost per instruction.** Measured from the CMQ to the MXQ:

- a direct send takes 4 cycles (SNVR: IF, ID, AG, MEM, then END writes);
- an indirect send takes one more (5).

| Instructions | Extra cycles |
|---|---|
| direct forms | 0 |
| SNVI, STQI, ACMVI0, ACMVI1 | 1 |
| STII, SNOV, STOV | 1 |

The last row differs from the reference timing, which lists these
instructions at 0 extra cycles. Here they need a pointer or offset word
from the data cache before the real access, so they also take a second
access.

## Execution unit (`exec_unit`, `expr_stack`)

The execution unit has four stages:

| Stage | What it does |
|---|---|
| IF | Pops the CEQ. |
| ID | Decodes the instruction. |
| EX | Works on the 16-entry expression stack. |
| SEND | RESREG is written to the XMQ. |

The instructions:

| Instruction | Effect |
|---|---|
| `IVAL v` | Pushes a literal. |
| `QVAL` | Pushes the next word of the MXQ. It waits in EX while the MXQ is empty. |
| `OPER op` | Replaces the top two entries `a` (below) and `b` (top) with `a op b`. |
| `SEND` | Pops the result into RESREG, which goes to the XMQ. A full XMQ holds the unit. |

The operators are ADD, SUB, MUL, AND, OR, XOR, SHL and SRA on 32-bit
signed integers.

## Queues (`msa_queue`)

All five queues share one FIFO module. It has `N_WR` write ports (1, or 2
for the CEQ) and one read port, and no fall-through. The head word is
visible on `rd_data` while `!empty`, and `rd_en` pops it. `count` lets the
controller see whether both CEQ writes fit. An assertion flags a write to a
full queue.

`Q_DEPTH` sets all five depths. It defaults to 3: in the architecture's
evaluation, longer queues gave no further speedup beyond 3. `Q_DEPTH=1` is
the unpipelined baseline's configuration and works too.

## Top level (`msa_top`)

`msa_top` wires the three units, the five queues and the data cache. The
host side has three interfaces:

- `ic_wr_*` loads parcels into the instruction cache;
- the data cache's second port (`dc_b_*`) reads and writes data;
- `start` runs the program from parcel 0.

`done` rises when the controller has executed HALT and all units and queues
are empty. `cs_err` and `stack_err` report control- or expression-stack
overflow or underflow.

The `ev_*` outputs pulse once per cycle in which a pipeline event happens:

- redirect, LOOP wait, LOOP taken, queue-full stall;
- call, return, frame creation;
- second memory access;
- waits on the XMQ and the MXQ;
- output-queue stalls.

They are meant for performance counters.

| Parameter | Default | Meaning |
|---|---|---|
| `IC_AW` | 12 | instruction cache address bits (4096 parcels) |
| `DC_AW` | 24 | data address bits (2^24 words, the full 24-bit address space) |
| `Q_DEPTH` | 3 | depth of every queue |
| `CS_DEPTH` | 16 | control stack entries (maximum call depth) |
| `STACK_DEPTH` | 16 | expression stack entries |

The data word is 32 bits (`DATA_W` in `msa_pkg`).

## How far to trust it, and where it departs from the reference design

**Taken from the architecture description:**

- the three units and their stage names;
- the five queues, with one write port on the CMQ and two on the CEQ;
- the 32-bit parcels with an 8-bit major opcode, a 4-bit minor opcode and a
  24-bit operand;
- the display/offset address with 16 display registers, and HIGHMEM and
  CURDISP;
- the frame layout, with the old display value in word 0;
- the split of the activation stack into a control stack and a data stack;
- the one-cycle GOTO/CALL/RETN penalty;
- the one extra cycle for indirect operands;
- the default queue length of 3.

**This design's own choices:**

- all numeric opcode values, and bit 31 as the leading/dependent flag;
- how operator and value fields sit inside a dependent parcel;
- the CALL and RETN operand layouts;
- LOOP branching on a true result;
- the HALT instruction;
- the relation set beyond > and >= (EQ, NE, LT, LE);
- the integer operator set;
- 32-bit data;
- the stack depths and the instruction cache size;
- the reset values of the display registers and HIGHMEM;
- the host load/read ports.

**Departures and omissions:**

- The minor opcode's four bits include the dependent flag. The
  single-operand expression parcels share two minor codes and are told
  apart by parcel bits `[27:24]`, so the PLA decodes four parcel bits
  besides DR.
- STII, SNOV and STOV take a second data access (see above).
- The caches always hit and have no backing memory. Miss handling is not
  modelled.
- No floating-point operators. The benchmark kernels the architecture was
  evaluated on are floating-point, so they cannot run here as written.
- Unit speed ratios (running one unit faster than another) are not
  modelled: all units share one clock.

## Verification

Each module has a testbench in `tb/` named `tb_<module>`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if the
design hangs. What they cover:

- The unit testbenches surround the unit with queue models that fill up or
  run empty at random, so every stall path is exercised. They compare what
  the unit sends with the expected streams:
  - the memory and controller testbenches use streams worked out by hand;
  - the execution testbench uses a reference evaluation of random
    expressions.

  They also check these cycle-exact latencies:
  - SNVR: 4 cycles to the MXQ;
  - SNVI: 5 cycles;
  - an `IVAL, IVAL, OPER, SEND` sequence: 6 cycles to the XMQ;
  - GOTO, CALL, RETN: the target is fetched two cycles after the branch.
- `tb_msa_top` runs a complete program on the top level with every
  parameter at its default. The program uses every parcel family, direct,
  indirect and structured operands, stores, relations, taken and not-taken
  LOOPs, GOTO, and a CALL/RETN with a local frame. It checks the memory
  contents afterwards against hand-computed values and checks the GOTO
  penalty. It fails if LOOP waits, queue-full stalls, second accesses, XMQ
  waits or MXQ waits never happened. It finishes in 277 cycles.

Four more testbenches run whole programs on the top level. Each checks its
results against a reference computed in the testbench.

| Testbench | Program | What it shows |
|---|---|---|
| `tb_msa_livermore` | The first five Livermore kernels in 32-bit integer form, n = 1001: 1 (hydro), 2 (ICCG excerpt), 3 (inner product), 4 (banded linear equations), 5 (tridiagonal elimination) | Long expressions over arrays, reached as structured operands, and nested loops (kernels 2 and 4, one with a zero-trip test at the loop head). Kernel 5 reads back in every iteration the value it stored in the previous one, which tests store/load ordering across the queues. Kernels 1, 3 and 5 take about 64, 40 and 57 cycles per iteration. Kernels 2 and 4 take 78,521 and 24,134 cycles in all. |
| `tb_msa_ackermann` | recursive Ackermann function, up to A(2,6) | Up to 16 nested calls on one display level, which fills the control stack exactly. Each run returns the data stack to its starting point. |
| `tb_msa_list` | sorted insertion of 40 items into a doubly linked list | Pointer chasing through indirect and structured operands, with a shallow call. Both link directions are checked. |
| `tb_msa_qdepth` | Livermore kernels 1, 3 and 5 at n = 201 on five copies of the machine, with queue depths 1, 2, 3, 4 and 10 | Depth 1 takes 37,322 cycles, depth 3 32,304 (1.16 times faster), depth 10 31,902. Most of the gain comes from the first two extra words. The LOOP wait, not queue space, is the limit in these loops. |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/msa_pkg.sv \
    $(ls rtl/*.sv | grep -v msa_pkg) tb/tb_msa_top.sv \
    --top-module tb_msa_top -o sim
./obj_dir/sim
```

Use any other `tb_<module>` the same way.

The data cache at its default size is a 2^24-word array. Simulation is fast
because the array is only touched where it is used, but synthesis for a
real device needs a smaller `DC_AW` or an external memory.
