# CalmRISC-32 in SystemVerilog

CalmRISC-32 is a 32-bit microcontroller core built for low power. Its main
ideas are:

- 16-bit instructions on a 32-bit load/store architecture, for small code and
  cheap fetches.
- A classic five-stage Harvard pipeline with interlocks and forwarding.
- Hardware tricks that avoid needless switching:
  - branches are decoded in a small unit of their own;
  - the upper PC bits are clocked only when they change;
  - each large datapath block has its own input register.
- A *passive* coprocessor (for example an FPU or a DSP) that gets its
  instructions from the core. It runs in lock step with the core through a
  small set of per-stage synchronisation signals.

This repository holds a synthesizable RTL model of that core. The model is
written from the published description of CalmRISC-32. That description
gives the architecture, the block structure, the pin names and the pipeline
behaviour, but no instruction encodings and no cycle-level tables. Everything
at bit level here (opcodes, the `sr` layout, exception vectors, handshake
timing) is therefore this design's own choice. It is collected in
`rtl/cr32_pkg.sv`, and each choice is pointed out where it is made.

## Block map

```
             PA/PD/PBWAIT/IABRT                      DA/DO/DOE/DI/NDMCS/DMWR/DSIZE/DBWAIT/DABRT
                   |                                              |
  Fetch   [cr32_pagu  PC, hi/lo split] -- cr32_predecode          |
                   |  branch -> PAGU latch      other -> IR       |
  Decode  [cr32_pagu branch decision]   [cr32_du decode+forward]--[cr32_regfile 4x8x32]
                   |                           |
  Execute                               [cr32_eu adder | shifter | mult stage 1, store data (port S)]
                                               |
  Memory                                [cr32_mu data cycle, bit RMW, cop moves, mult add]
                                               |
  Writeback                              register write (in calmrisc32)

  cr32_pcu: advance / stall / flush of every stage, exceptions, coprocessor sync
  cr32_sreg: sr (T, ie, fe, pm, rs), spc, ssr
```

`calmrisc32` is the top. It wires the blocks together and holds the
Decode-stage status bits and the Writeback register.

## How the pipeline advances

The pipeline moves as one unit, starting from the back. `cr32_pcu` computes
one "move" enable per stage each cycle:

```
mv_wb = COPWEN
mv_me = mv_wb & COPMEN & me_rdy          me_rdy: no DBWAIT, no bit-op read cycle pending
mv_ex = mv_me & COPXEN
mv_id = mv_ex & !stall_id & !exception
mv_if = mv_id & !PBWAIT & !break_stop
```

A stage that does not move keeps its instruction. If the stage in front of it
moves, it hands over a bubble. The core reports its own readiness to the
coprocessor:

- `STWEN = 1`
- `STMEN = STXEN = me_rdy`

These outputs never depend on the coprocessor's `COPxEN` inputs, so the two
controllers cannot form a combinational loop. A stall on either side therefore
stalls both pipelines at the same stage, and they stay aligned. For example,
while the core's Memory stage waits for DBWAIT, STMEN is low and a coprocessor
load sitting in the coprocessor's memory stage waits too.

### Interlocks in Decode (`stall_id`)

| Condition | Why |
|---|---|
| An operand (other than a store's data) is produced by a load, `ldp`, a multiply or a coprocessor-to-core move that is in Execute | That value only exists in Memory. The wait is one cycle, then Memory forwards it. |
| A move to `sr` is in Execute | The next instruction must see the new register-set selection. |
| The instruction reads T, and a bit operation is in Execute or Memory | Bit operations deliver T from the Memory stage. |
| `mfsr`, `mfspc`, `mfssr` or `reti`, while Execute or Memory is occupied | Simple and safe ordering for special registers. |
| A taken delayed branch whose delay-slot instruction has not been fetched yet | Keeps the branch and its slot together. |

### Forwarding

The Decoder Unit reads each operand from one of these sources, in priority
order:

1. the Execute result;
2. the Memory result (load data, program-memory data, multiplier product,
   coprocessor data, or the passed-on Execute result);
3. the value being written in Writeback;
4. the register file.

Forwarding compares physical register numbers. It is therefore correct across
register-set switches.

Store data is different. Decode only names the register, as a physical
number. Execute reads it through a third register-file port and takes the
Memory result (first) or the Writeback value when they write that register.
A store right behind the load of its data therefore does not wait.

T is forwarded separately. A branch in Decode sees the T value produced by the
ALU instruction in Execute in the same cycle (`t_fwd` in the top). This lets
`cmp` immediately followed by `brt` run without a bubble.

## Branches: PAGU and the delay slot

The pre-decoder looks only at the top three bits of each fetched instruction:

| Top bits | Class | Where it goes |
|---|---|---|
| `110` | branch | the PAGU branch latch; the Decoder Unit's IR is not loaded |
| `111` | coprocessor | the IR, with its low 13 bits driven on COPIR |
| anything else | other | the IR |

Branches are decided in Decode from the branch latch:

```
[15:13]=110 [12:10]=type [9]=delayed [8:0]=disp9 (halfwords, PC-relative)
type 0 brt    1 brf    2 bra    3 call (link r14)
     4 brec   [8:7] = EC index, [6:0] = disp7
     5 jmp rs [3:0]    6 jal rs (link r14)    7 reti (never delayed: PC <- spc, sr <- ssr)
```

Bit 9 chooses the form:

- **Delayed** (`[9]=1`): the next instruction always executes.
- **Non-delayed**: a taken branch squashes the instruction already fetched
  after it. This costs one cycle.

The link value is the address after the delay slot (branch + 4) or after the
branch (branch + 2). A call sends a register write of the link into the
pipeline, so r14 is updated through the normal Writeback path with
forwarding.

### Split PC register

The PC is split at `PC_SPLIT` (default 8):

- The lower part loads on every fetch.
- The upper part loads only when its new value differs (`hi_en`).

In a gated-clock implementation, `hi_en` is the enable of the upper clock
gate. In this RTL it is a register enable.

## Status register, register sets and T

`sr` has six bits: `{rs[1:0], pm, fe, ie, t}`. After reset, pm = 1 and all
other bits are 0.

The 32 registers form four sets of eight:

| Mode | r0–r7 | r8–r15 |
|---|---|---|
| user (`pm = 0`) | set 0 | set 1 |
| privileged (`pm = 1`) | set 2 if `rs[0]`, else set 0 | set 3 if `rs[1]`, else set 1 |

r14 receives the return address of `call`/`jal`. r15 is the stack pointer by
convention.

Instructions that write T:

| Instructions | Value written to T |
|---|---|
| compares (`cmpeq`, `cmpge`, `cmpgt`, `cmpuge`, `cmpugt`) | the comparison result |
| `tst` | 1 if `a & b == 0` |
| `adc`, `sbc` | the carry out (T is also the carry in) |
| `rrc` | the bit rotated out |
| `divl` | the quotient bit |
| the bit operations | the original value of the bit |

`inct` and `dect` add or subtract T.

ALU instructions write T when they leave Execute. Bit operations write it
when they leave Memory. If both happen on the same edge, the write from
Execute wins, because it comes from the younger instruction.

## Exceptions and interrupts

A single pair of special registers is used for every exception:

- `spc` holds the saved PC.
- `ssr` holds the saved `sr`.

On entry, `sr` becomes privileged with `ie` and `fe` cleared. `reti` restores
both registers.

| Priority | Cause | Taken in | Flushed | Saved PC | Vector |
|---|---|---|---|---|---|
| 1 | DABRT during a data cycle | Memory | Memory, Execute, Decode | the aborting instruction | 0x20 |
| 2 | COPEXP with a coprocessor op in Execute | Execute | Execute, Decode | the coprocessor instruction | 0x30 |
| 3 | IABRT (tagged at fetch) | Decode | Decode | that instruction | 0x10 |
| 4 | nFRQ low and `sr.fe` | Decode | Decode | the instruction in Decode | 0x40 |
| 5 | nIRQ low and `sr.ie` | Decode | Decode | the instruction in Decode | 0x50 |

Reset (nRES low, asynchronous) starts fetching at address 0. Vectors are 16
bytes apart.

Interrupts are not taken while a branch or a delay-slot instruction is in
Decode, so a branch is never separated from its slot.

When a data abort is taken, STEXP is raised in the same cycle so that the
coprocessor flushes from the same instruction. EXPTAG is high while a
data-memory instruction (load, store, bit op, `cld`) is in Execute, so the
coprocessor knows that an abort may follow.

The coprocessor-exception sequence works like this:

1. The coprocessor holds its possibly-faulting instruction by pulling COPMEN
   low. This stalls the core with that instruction still in Execute.
2. The coprocessor raises COPEXP.
3. The core flushes that instruction and everything younger, saves its PC and
   jumps to 0x30.

## Coprocessor interface

Coprocessor instructions (`111` + imm13) are fetched and decoded by the core:

- COPIR carries the instruction's 13 bits.
- NCOPID is low in the cycle the instruction moves from Decode to Execute.
- The core executes only the data transfers. Everything else is the
  coprocessor's business.

| imm13 | Operation | Data bus use in Memory |
|---|---|---|
| `11 0 rb mm cr` | cld load: memory → coprocessor register `cr` | read cycle; the coprocessor takes DI |
| `11 1 rb mm cr` | cld store: coprocessor register → memory | write cycle; DOE = 0, the coprocessor drives the write bus |
| `10 0 rs xxxxxx` | core register `rs` → coprocessor | no chip select; DO = rs, DOE = 1 |
| `10 1 rd xxxxxx` | coprocessor → core register `rd` | no chip select; `rd` ← DI |
| `00 …`, `01 …` | pure coprocessor operations | none |

The `mm` field sets the cld address and base update:

| `mm` | Address | Base register update |
|---|---|---|
| 00 | `[rb]` | none |
| 01 | `[rb]` | `rb += 4` (post-increment) |
| 10 | `[rb-4]` | `rb -= 4` (pre-decrement) |
| 11 | `[rb]` | `rb -= 4` (post-decrement) |

The branch `brec` tests one of the four EC inputs in the cycle it is in
Decode. A program that sets EC through a coprocessor instruction must let that
instruction get past the coprocessor's Memory stage first (two instructions in
between) before it issues `brec`.

## Instruction encoding

All instructions are 16 bits wide. `rd`/`rs`/`rb` are 4-bit register fields.

| [15:12] | Instruction | Fields |
|---|---|---|
| 0 | ALU `rd, rs` | [3:0]: add sub adc sbc and or xor tst mov cmpeq cmpge cmpgt cmpuge cmpugt mul divl |
| 1 | shift `rd, rs` | [3]=0, [2:0]: sl sr sra rr rl rrc (amount = rs[4:0]) |
| 1 | `ldp rd, [rs]` | [3:0]=1000: program-memory halfword, zero-extended |
| 2 | shift `rd, #n` | [7:5] function, [4:0] amount |
| 3 | `addi rd, #simm8` | |
| 4 | `movi rd, #simm8` | |
| 5 | misc | [7:6]=00, [2:0]: inct dect mfsr mtsr mfspc mtspc mfssr mtssr; [7:6]=01, [5:3]: push pop pushq popq ldi16 ldi32 mfpc srbit; [7]=1: `sys #[4:0]` (privileged) |
| 6 / 7 | `ldw` / `stw rd, [rb + d4*4]` | [11:8] rd, [7:4] rb, [3:0] d4 |
| 8 | `ldh/ldb/sth/stb rd, [rb + d2*size]` | [3] store, [2] byte, [1:0] d2 |
| 9 | `ldw rd, [rb + ri]` | [3:0] ri |
| A | `ldb/stb r0..r7, [r12 + d8]` | [11] store, [10:8] register, [7:0] d8 (memory-mapped ports) |
| B | `bits/bitr/bitc/bitt #n, [rb + d3]` | [11:10] operation, [9:7] bit, [6:3] rb, [2:0] d3 |
| C, D | branches | see above |
| E, F | coprocessor | see above |

Details:

- `mul` multiplies the low 16 bits of both operands, unsigned. The product is
  ready after two cycles: partial products in Execute, the final add in
  Memory.
- `divl` performs one restoring division step on `rd = {remainder, quotient}`,
  with the divisor in `rs[15:0]`. Sixteen steps divide a 16-bit number by a
  16-bit number.
- Stores put the datum on every byte lane. Loads are zero-extended. Memory is
  little-endian.
- `ldp rd, [rs]` reads program memory. In Memory it puts `rs` on PA for one
  cycle while the fetch holds; PBWAIT holds it like a data wait. The result
  comes from Memory, so a dependent instruction right behind it waits one
  cycle.
- Bit operations take two Memory-stage cycles: a byte read, then the write
  (`bitt` has no write). They work as test-and-set (`bits`) and
  test-and-reset (`bitr`).

## Multi-cycle instructions

Some instructions take more than one cycle in Decode. The instruction stays
in the instruction register while the decoder issues a short series of
ordinary operations into Execute, one per cycle. While it does so:

- fetching holds (`busy`);
- no interrupt is taken after the first operation.

r15 is the stack pointer. The stack grows downwards, and `push`
pre-decrements.

| Instruction | Operations issued |
|---|---|
| `push rd` | one store to `[r15-4]` that also writes `r15-4` back to r15 |
| `pop rd` | load `rd` from `[r15]`, then `r15 += 4` |
| `pushq g` | four stores: r4g+3, r4g+2, r4g+1, r4g to `[r15-4]` .. `[r15-16]` (g = rd[3:2]), then `r15 -= 16` |
| `popq g` | load r4g..r4g+3 from `[r15]`, `[r15+4]`, `[r15+8]`, `[r15+12]`, then `r15 += 16` |
| `ldi16 rd` + 1 halfword | a bubble, then `rd = sign-extended halfword` |
| `ldi32 rd` + 2 halfwords (low half first) | two bubbles, then `rd = {high, low}` |

Each operation uses the normal forwarding and interlocks.

The data halfwords that follow a long-immediate opcode are steered into the
instruction register even when their top bits look like a branch
(`want_imm`). This holds even when the opcode has already left Decode and the
fetch is waiting for the next halfword. A flush cancels it.

r15 changes only in the last operation of `pop`, `pushq` and `popq`. A data
abort inside the sequence therefore restarts the whole instruction cleanly.

Two other one-cycle instructions sit in the same opcode group:

- `mfpc rd` reads the address of the `mfpc` itself.
- `srbit` writes one bit of `sr` from the instruction. Only T can be written
  in user mode.

Restrictions:

- A long-immediate load must not be placed in a delay slot.
- An instruction abort on its data halfwords is not handled.
- `popq 3` loads r15 itself, so its result is not meaningful.

## What this model leaves out or changes

Not built (the instruction set names them but gives no encoding or timing):

- register-register addressing for half-words, bytes and stores. The opcode
  space is full.
- the displacement and register-register modes of `cld`

Changed:

- **Clocking.** The original uses two-phase clocking with latch pipeline
  registers and gated clocks. Here a single rising-edge clock (ICLK) with
  register enables is used.
- **Blocks outside the core.** The MMU, caches, DMA controller, debug unit,
  coprocessor and memories are outside the core. Their pins are brought out:
  - IABRT and DABRT come from the MMU.
  - PBWAIT and DBWAIT come from the caches.
  - The DMA grants PBGRANT and DBGRANT simply act as waits.
  - BKREQ stops fetching; BKMODE signals an empty pipeline.
- **Memory timing.** Memories must answer in the cycle the address is out,
  or assert a wait.

## Files

| File | Contents |
|---|---|
| `rtl/cr32_pkg.sv` | encodings, `sr` layout, vectors, pipeline control word |
| `rtl/calmrisc32.sv` | top: the core |
| `rtl/cr32_pcu.sv` | pipeline control |
| `rtl/cr32_pagu.sv` | PC and branch unit |
| `rtl/cr32_predecode.sv` | three-bit pre-decoder |
| `rtl/cr32_du.sv` | decoder, operand read, forwarding |
| `rtl/cr32_regfile.sv` | 32 × 32 register file with the set mapping; ports A and B for Decode, port S for store data in Execute |
| `rtl/cr32_eu.sv` | Execute stage |
| `rtl/cr32_alu.sv` | adder and logic unit |
| `rtl/cr32_shifter.sv` | barrel shifter |
| `rtl/cr32_mult.sv` | two-stage 16 × 16 multiplier |
| `rtl/cr32_mu.sv` | Memory stage |
| `rtl/cr32_sreg.sv` | `sr`, `spc`, `ssr` |
| `tb/tb_<module>.sv` | self-checking unit test per block |
| `tb/tb_calmrisc32.sv` | full system test: the program is assembled in the testbench |
| `tb/cr32_tb_cop.sv` | behavioural coprocessor used by the system test |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. Each one
has a watchdog. From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cr32_pkg.sv tb/tb_calmrisc32.sv --top-module tb_calmrisc32 -Mdir obj_top
obj_top/Vtb_calmrisc32            # add +trace for a per-cycle listing
```

Replace `calmrisc32` with another module name to run its unit test.

The system test runs the core at its default parameters. It builds its
program with small assembler functions (`alu`, `ldw`, `br`, `cld`, …).

- **Wait states.** Program and data wait states come from fixed patterns.
- **Events.** A data abort is raised for one address. An instruction abort
  is raised once for one fetch; the handler returns and the fetch is retried.
  A fast interrupt and an interrupt arrive together while a loop is running.
- **Ending.** The test ends with a break request and compares registers,
  memory and coprocessor registers with hand-computed values.
- **Mechanism counts.** It also counts 27 mechanisms and fails if any of
  them never occurs:
  - forwarding from Execute and from Memory;
  - the load-use and multiply interlocks;
  - the T-bit and `sr`-write interlocks;
  - executed delay slots and squashed non-delayed branches;
  - bit read-modify-write;
  - program and data wait states;
  - a coprocessor stall through COPMEN;
  - NCOPID issue and EXPTAG;
  - `brec` taken;
  - each exception (coprocessor, data abort, instruction abort, fast
    interrupt, interrupt) and `reti`;
  - `sys`;
  - updates of the upper PC bits;
  - multi-cycle sequences;
  - long-immediate halfwords that look like branches;
  - a program-memory read (`ldp`);
  - load data forwarded to a store in Execute.

  The register-set switch is checked through the final register contents.
  Break mode is checked because the test ends only once BKMODE is seen.

The unit tests compare each block with a reference model: random vectors
for the ALU, shifter, multiplier, PCU and MU, and an exhaustive check for the
pre-decoder.
