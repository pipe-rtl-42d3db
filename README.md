# PIPE: a decoupled access/execute processor pair in SystemVerilog

PIPE splits a program between two identical 16-bit processors:
- The **access processor (A)** works out memory addresses and sends load requests.
- The **execute processor (E)** does the arithmetic on the data that comes back.

Neither processor waits for memory the way a conventional CPU does. Load data arrives in a hardware queue that looks like a register: E reads R7 and gets the next element. Results leave through another queue that also looks like R7. Memory latency is hidden because A runs ahead of E, limited only by queue sizes. The two processors agree on every loop and `if` by sending one-bit branch outcomes to each other through small branch queues.

Each processor is a short, strictly in-order pipeline with four features:
- All hazards are resolved in one place, the issue stage.
- Branches are announced ahead of time. A *prepare-to-branch* instruction (PBR) says how many more parcels run before control moves, so the fetch unit never fetches an instruction that will be thrown away.
- A small on-chip instruction cache serves instructions, because the pins to memory are the bottleneck.
- The pins are split into an output path and an input path. Both are tagged every cycle, so addresses, store data, instruction words and load data share one narrow interface without bus turnaround.

This repository holds synthesizable RTL for both processors and for the machine that joins them. It also has self-checking testbenches for every block. The memory controller and memory are outside the chip and are modelled only in the testbenches.

## The machine

```
            branch outcomes (1 bit each way)
     +-----------+  <------ BQ ------>  +-----------+
     |  A-unit   |                      |  E-unit   |
     | pipe_     |                      | pipe_     |
     | processor |                      | processor |
     +-----------+                      +-----------+
   out tag/data| ^in tag/data       out tag/data| ^in tag/data
               v |                              v |
     +-----------------------------------------------------+
     |     memory controller (not part of the RTL)         |
     +-----------------------------------------------------+
```

`pipe_machine` is the top. It has two `pipe_processor` instances cross-wired through their branch queues. Each processor's memory pins are brought out as top-level ports. A typical split:

- **A** runs the address loop. For each element it issues `LDPA` (post-incrementing alternate load) for the operands. This sends the address to the controller with the "alternative load address" tag, and the controller delivers the word to **E's** load queue. A issues `STPA` for the result address (alternate store address). It decides the loop branch itself and pushes the outcome into E's branch queue.
- **E** runs the same loop without any address arithmetic. Operands come from R7 (its LDQ), the result goes to R7 (its store queue), and its loop branch tests the incoming branch queue (`BQ` condition).
- The controller pairs store addresses from A with store data from E.

A processor can also run alone and use its own loads and stores (internal tags).

## Processor pipeline

```
 fetch+cache ──► decode (IR1/IR2) ──► issue register ──► EX1 ──► EX2
  pipe_fetch       pipe_decode          pipe_issue        pipe_datapath
  pipe_icache
```

| stage | what happens |
|---|---|
| fetch | One parcel (16 bits) per cycle on a cache hit. A PBR is recognised here, not at execution. |
| decode | Collects one or two parcels. Produces a control word (`ctrl_t`) that has already resolved the R0/R7 special cases. |
| issue | Checks every interlock. Binds the 3-bit register fields to 4-bit physical descriptors using the current bank flag. Sends the instruction on or holds it. |
| EX1 | Reads the operands onto the A and B buses: register file, LDQ head, immediate, or the forwarded ALU sum. One-stage results go onto the C bus at the end of EX1: logic, shift, move, the post-increment address through the by-pass. The ALU's first half (propagate, generate, group carries) is latched. A PBR's condition is evaluated here. |
| EX2 | Add/subtract completes and its sum drives the C bus. That sum is also forwarded to the instruction now in EX1. |

Because execution is only two stages deep, instructions always finish in issue order. The only read-after-write case, an instruction right behind an add that produces its operand, is handled by forwarding, not a stall.

Timing at a glance:
- a logic or shift result is in the register file one cycle after issue;
- an add result is there two cycles after issue and can be used by the very next instruction;
- a one-stage instruction right behind an add waits one cycle, because both would use the single result bus in the same cycle.

The original circuit splits every cycle into two clock phases, precharging buses in one and using them in the other. This RTL has one clock edge per cycle and keeps the same cycle-level behaviour.

## Registers, banks and the queues behind R7

There are 16 physical registers in two banks of eight. A bank flag (`fg`) says which bank is the foreground:
- arithmetic, logic and shift instructions see only the foreground;
- `MOV` can read or write either bank;
- `SWAP` flips the flag.

This is the building block for fast procedure calls: the callee gets a fresh bank, and the return address goes in background R7. There is no call instruction: a call is a `PBR` plus a `MOV` of the return address plus a `SWAP`.

Two register numbers are special:
- **R7 as a source** is the head of the load data queue (LDQ). Reading it removes the element. An instruction that names R7 as both sources takes two elements: the first goes to the A bus, the second to the B bus.
- **R7 as a destination** is the tail of the store queue (SQ), and the register file is not written. A `MOV` to or from *background* R7 is an ordinary register access, since that is where return addresses live.
- **R0 in a load/store address** means zero, which gives absolute addressing. Elsewhere R0 is an ordinary register.

The queues:
- **LDQ (`pipe_ldq`)** has three elements on chip. When it is full, the processor raises `ldq_full` and the controller keeps further data in its own part of the queue.
- **SQ (`pipe_sq`)** is one register shared by store addresses and store data. Both must leave through the same output pins in program order anyway. Each entry carries its output tag.
- **LAR** is a one-entry load address register.
- **Branch queue (`pipe_bq`)**, depth 4, holds one-bit branch outcomes from the other processor.

## Instruction set

Field sizes come from the architecture: a 7-bit opcode and three 3-bit register fields, and an LS format with one register field, 6 reserved bits and a 16-bit second parcel. Bit positions and opcode values are this design's (see `rtl/pipe_pkg.sv`). Opcode bit 6 marks a two-parcel instruction, so length is known from the first parcel.

```
RRR   [15:9] op  [8:6] rd  [5:3] rs1  [2:0] rs2
LS    [15:9] op  [8:6] r   [5:0] 0    + second parcel imm16
PBR   [15:9] op  [8:6] count  [5:3] branch reg  [2:0] tested reg
```

| opcode | instruction | notes |
|---|---|---|
| 00 / 01 | ADD / SUB rd,rs1,rs2 | two-stage |
| 10–1F | LOGIC rd,rs1,rs2 | op[3:0] is the truth table: bit i of the result = tt[{a_i,b_i}]. AND=1000, OR=1110, XOR=0110. |
| 20–23 | SLL, SRL, SRA, ROR rd,rs1,rs2 | amount = rs2[3:0], one-stage |
| 24 | NOP | |
| 28 | MOV rd,rs1,bits | bits[0] = rd in background, bits[1] = rs1 in background |
| 2C | SWAP | |
| 30–3F | PBR cond,count,br,rt | op[2:0] = condition: ALWAYS, EQ, NE, LT, GE (test rt), BQ, NBQ (test incoming branch queue), NEVER. op[3] = push the outcome to the other processor. |
| 40 / 41 | LD / LDA r,imm | address r+imm, internal / alternate |
| 42 / 43 | LDP / LDPA r,imm | address r, then r += imm |
| 44–47 | ST, STA, STP, STPA | the same for store addresses; store data is written as R7 |
| 48 | LDI r,imm | r = imm (to R7: store the immediate) |
| 49 | ADDI r,imm | r = r + imm |
| 4C | LDBR br,imm | load branch register br with imm |

A store takes two instructions: one that sends the address and one that writes the data through R7. The memory controller pairs the address and data queues.

## Issue interlocks

`pipe_issue` is purely combinational and is the only place that stalls the pipeline. The instruction in the issue register is held while any of these is true:

| rule | condition |
|---|---|
| result bus | It writes its result in EX1 while the instruction now in EX1 will write its result in EX2 next cycle. |
| LDQ empty | It reads R7 (one element, or two when both sources name R7) and the LDQ will not hold enough once the instruction in EX1 has taken its own. |
| SQ full | It writes the SQ and the SQ is full, or an instruction in EX1/EX2 is about to write it. |
| LAR busy | It is a load and the LAR is full or about to be written. |
| SWAP | It references any register while a SWAP is in EX1, because the bank binding would be stale. |
| branch queue | It is a PBR on `BQ`/`NBQ` and the incoming queue is empty or being popped by EX1. Or it pushes an outcome and the other processor's queue is full or being pushed. |

Resources are counted ahead for the instruction already in EX1, so a queue's status never has to be updated mid-cycle.

## Prepare-to-branch

A branch is split in two. `PBR cond, count, br, rt` says:
- which branch register holds the target;
- which condition to test;
- how many more parcels (0–7) run before the transfer, the "delay slots".

The fetch unit (`pipe_fetch`) acts on the PBR as soon as it fetches it:

1. It sets **BP** (branch pending), loads **PCnt** with the count and copies the branch register into **PendingPC**.
2. Each further parcel fetched decrements PCnt. When PCnt reaches 0, fetching stops.
3. When the PBR reaches EX1, its condition is evaluated. If true, **BH** (branch to happen) is set. If false, BP is cleared and sequential fetching continues.
4. With BP, BH and PCnt = 0, PendingPC is copied to the fetch PC, and BP and BH are cleared.

No parcel is ever fetched and then discarded, and there is no branch prediction. The cost is that fetch may idle while the PBR travels from fetch to EX1. Filling the count with useful work hides that.

Branch registers BR0–BR7 are loaded by `LDBR`, which executes in EX1.

Rules this design adds:
- A PBR waits in fetch while another branch is pending.
- A PBR waits in fetch while an `LDBR` that has already passed fetch has not executed yet, so it always reads the new target.
- Software must not place a PBR inside the parcel window of an earlier PBR. That PBR would wait for a branch that cannot resolve until it itself has passed, and the machine deadlocks.

## Execution units

**ALU (`pipe_alu`).**
- Stage 1 makes the 16 bitwise functions with a truth-table function generator, the zero and sign flags of the A bus for branches, and per-bit propagate/generate.
- A two-level carry look-ahead gives the carries into the 4-, 8- and 12-bit groups and the carry out.
- Those values are latched, and stage 2 forms the sum from them, one 4-bit group at a time.
- Overflow is the XOR of the carries into and out of bit 15.
- The stage-2 sum is multiplexed straight onto the A or B bus of the next instruction when its physical descriptor matches (`fwd_a`, `fwd_b`).

**Barrel shifter (`pipe_shifter`).**
- It keeps the classic crossbar organisation: a 31-bit L bus, a 16-bit R bus and 16 one-hot select lines decoded from B[3:0], where select k joins L[i+k] to R[i].
- Rotate puts the operand on both halves of L.
- Logical and arithmetic right shifts fill the upper half with zeros or the sign.
- Left shift drives the operand onto R and reads L.
- It is combinational and finishes within EX1.

**By-pass.** The by-pass passes a source register straight to the result bus in EX1. This makes post-incrementing loads and stores single instructions: the old register value goes to the LAR/SQ in EX1 while the ALU computes register + immediate, which is written back in EX2.

## Instruction cache

`pipe_icache` is direct-mapped with 16 lines of four 16-bit words. Each line has a 10-bit tag and a valid bit. The parcel address splits as tag [15:6], line [5:2], word [1:0].

On a miss:
1. The cache asks the memory interface for a block fetch (output tag 101) of the line's first word.
2. The four words arrive in order with input tag 10 and are collected in an assembly register.
3. The line is written, and the requested parcel is handed to fetch in the same cycle as the last word.

There is no prefetching beyond whole-line refill. The single-word "instruction address" tag (001) is defined in `pipe_pkg` but never produced.

## Memory pins

| output tag | meaning | | input tag | meaning |
|---|---|---|---|---|
| 000 | nothing | | 00 | memory busy: send nothing this cycle |
| 001 | instruction address | | 01 | no data |
| 010 / 011 | load address, own / alternate | | 10 | instruction word |
| 100 | store data | | 11 | load data (into the LDQ) |
| 101 | block fetch | | | |
| 110 / 111 | store address, own / alternate | | | |

`pipe_memif` sends at most one item per cycle, in priority order: block fetch, then the LAR, then the SQ. A busy input tag suppresses output for that cycle. This pin is this design's addition:
- `ldq_full` lets the controller know when to hold load data back.

## Where this RTL makes its own choices

- Opcode values and field positions, the truth-table encoding of logic functions, and the branch condition set.
- The LDBR instruction, and the two fetch-side PBR waits described above.
- The LAR interlock, because the LAR holds one address. The branch-queue interlock and the branch queue depth of 4.
- The `ldq_full` pin, and the output priority in the memory interface.
- One clock edge per cycle instead of two phases. Precharged and complemented buses are not modelled.
- The LDQ module can pass data arriving from the input bus straight to the source buses when it is empty. The issue rule only lets an R7 reader go when an element is already held, so inside the processor this path is never used. It is kept in the block and tested there.
- One instruction may take two LDQ elements (R7 as both sources). The original design also limited compiled code to one LDQ reference per instruction to keep the hardware simple. Code that keeps to that limit runs unchanged here.
- There is no instruction queue between fetch and decode. Fetch hands one parcel per cycle to decode.
- `interruptible` reports when the LDQ, SQ, LAR and incoming branch queue are empty. There is no interrupt logic; an external handler is assumed.
- Reset is asynchronous and active low. It clears the register file, the branch registers, the queues, the cache valid bits and all control state. Cache tags and cache data are not cleared.

## Files

| file | block |
|---|---|
| `rtl/pipe_pkg.sv` | types, opcodes, tags, control word |
| `rtl/pipe_regfile.sv` | 16×16 register file with foreground/background banks |
| `rtl/pipe_alu.sv` | two-stage ALU with carry look-ahead |
| `rtl/pipe_shifter.sv` | one-stage barrel shifter |
| `rtl/pipe_ldq.sv`, `rtl/pipe_sq.sv`, `rtl/pipe_bq.sv` | load queue, store queue register, branch queue |
| `rtl/pipe_datapath.sv` | EX1/EX2, buses, forwarding, LAR, branch evaluation |
| `rtl/pipe_icache.sv`, `rtl/pipe_fetch.sv` | instruction cache, fetch and prepare-to-branch |
| `rtl/pipe_decode.sv`, `rtl/pipe_issue.sv` | decode and issue |
| `rtl/pipe_memif.sv` | tagged memory pins |
| `rtl/pipe_processor.sv` | one processor |
| `rtl/pipe_machine.sv` | top: A and E processors joined by branch queues |

Testbenches in `tb/`:
- Every block has one (`tb_<module>.sv`). Each compares against values computed independently in the testbench and prints `TB_RESULT checks=N failures=M`.
- `tb_pipe_mcu.sv` is a behavioural memory controller for both ports. It has a fixed latency and random busy cycles. It pairs store addresses with store data, holds a load behind a pending store to the same address, and holds load data while the processor's LDQ is full.
- `tb_asm_pkg.sv` has small encoder functions for writing programs.
- `tb_pipe_processor` runs one processor through an array copy and sum, bank swaps, shifts, forwarding and overflow.
- `tb_pipe_machine` runs the full machine at its default sizes. A streams two 64-element arrays to E. For each element, E adds the pair in one instruction that takes both operands from its LDQ, computes `(s<<1)^s`, and stores the result. The test checks every result, and requires that each mechanism actually happened, or it fails. The mechanisms are: alternate loads and stores, branch-queue traffic and its full stall, the LDQ-empty stall, two-element LDQ reads, load data held while the LDQ was full, result-bus and SWAP stalls, SQ-full stalls, forwarding, cache misses, branch transfers, memory-busy cycles and overflow.

Simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pipe_pkg.sv tb/tb_pipe_machine.sv \
          --top-module tb_pipe_machine -Mdir obj_machine
./obj_machine/Vtb_pipe_machine
```

Replace the testbench name to run any other test. The designs use only synthesizable SystemVerilog, and the whole machine also reads cleanly into Yosys. The processor's parameters are `LDQ_DEPTH` (3), `BQ_DEPTH` (4) and `RESET_PC`. The machine's parameters are `LDQ_DEPTH`, `BQ_DEPTH`, `A_RESET_PC` and `E_RESET_PC`.

## How far to trust it

- Every block passes its own randomized or directed testbench.
- Each testbench has been shown to catch a deliberately injected bug in its block.
- The processor and machine tests run real programs against a memory model.
- What has not been checked: timing closure, any circuit-level behaviour of the original two-phase design, and behaviour against a real memory controller. The controller's protocol beyond the tag codes is this design's reading.
