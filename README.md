# SDC: a superscalar dual-core ARM

Two ordinary five-stage ARM pipelines sit behind one shared instruction
fetch and dispatch unit (the IDU). The IDU can run the two pipelines as one
superscalar machine or as two independent cores. In **superscalar mode** the
IDU fetches two instructions per cycle, at `pc` and `pc+4`. When a small set of
rules allows it, the first goes to one core and the second to the other. Both
cores then work on CORE_A's register file, so the program sees a single ARM
processor.

Neither pipeline is modified. Each core keeps its own forwarding unit and
interlock and knows nothing of the other. All cross-core hazards are avoided
by the IDU, which simply does not issue an instruction that would need a value
still in flight in the other pipeline.

A few extended instructions switch the same hardware to other modes:

- **single mode**: only CORE_A runs, as a plain five-stage core.
- **multithreading mode**: each core fetches its own thread at its own PC and
  uses its own register file.
- **two waiting states**: these join the threads again.

This repository holds synthesizable SystemVerilog for the whole machine. It
also holds self-checking testbenches for every block and for the complete
system.

## Block map

```
             +-----------------------+
             |  instruction memory   |   two read ports (Ia, Ib)
             +-----------+-----------+
                         | Ia, Ib
             +-----------v-----------+      pc_a, pc_b, pc updates
             |          IDU          |<----------------------------+
             | predecode x2, dispatch|                             |
             | rules, mode FSM       |                             |
             +-----+-----------+-----+                             |
          disp A   |           |  disp B                           |
        +----------v--+     +--v----------+     +------------------+---+
        | CORE_A      |     | CORE_B      |<--->| register files       |
        | ID EXE MEM WB     | ID EXE MEM WB     | CORE_A | CORE_B      |
        +------+------+     +------+------+     | r0-r14, pc, NZCV each|
               |                   |            +----------------------+
             +-v-------------------v-+
             |   memory arbiter      |
             +-----------+-----------+
                         |
             +-----------v-----------+
             |     data memory       |
             +-----------------------+
```

| File | Block |
|---|---|
| `rtl/sdc_pkg.sv` | Types, instruction classes, resource masks and the extended-instruction encoding |
| `rtl/sdc_top.sv` | Whole machine |
| `rtl/sdc_idu.sv` | Fetch, PC update, dispatch in every mode |
| `rtl/sdc_predecode.sv` | Instruction class (Type0-4), read/write sets, extended instructions, `move` re-encoding |
| `rtl/sdc_dispatch_rules.sv` | Superscalar pairing and core choice |
| `rtl/sdc_mode_ctrl.sv` | Operation-mode state machine |
| `rtl/sdc_core.sv` | One five-stage ARM pipeline (an ARMv4 subset) |
| `rtl/sdc_regfile.sv` | Both register files, PCs and flags, with read ports for both cores |
| `rtl/sdc_dmem_arbiter.sv` | Round-robin arbiter in front of the data memory |
| `rtl/sdc_dmem.sv`, `rtl/sdc_imem.sv` | Memories (1024 words each by default) |

## Superscalar dispatch

This is the heart of the design and the part that needs the most care.

### Instruction classes

The IDU predecodes both fetched instructions into five classes:

| Class | Instructions | Where it may go |
|---|---|---|
| Type0 | Data processing, condition AL | Either core; may pair |
| Type1 | Single-register load/store (LDR/STR/LDRB/STRB), condition AL | Either core; may pair |
| Type2 | Load/store multiple | CORE_A only, alone |
| Type3 | Branch, anything writing the PC, undefined, or any condition other than AL | Alone. Control flow goes to CORE_A only; a conditional non-branch may go to either core. |
| Type4 | SWP, MRS/MSR, multiply, SWI, coprocessor, extended instructions | CORE_A only, alone |

### Resource masks

Each instruction also gets two 18-bit **resource masks**: what it reads and
what it writes.

- Bits 0-14 are r0-r14.
- Bit 16 is the NZCV flags.
- Bit 17 is data memory: a store writes it, a load reads it.

With flags and memory treated as registers, one set of RAW/WAW/WAR checks
covers all three:

- ordinary register dependences;
- a conditional instruction that needs flags set in the other core;
- a load that must not overtake a store issued to the other core.

### The window

Each core reports the instructions that have not yet written their results:
its ID entry, its EXE entry, and its MEM entry. The MEM entry is reported only
while the arbiter holds it there. An instruction leaving MEM writes back in the
next cycle, and the register file passes a write straight through to a read in
the same cycle. So an instruction issued now still reads the right value in its
ID stage. The flags are written at the end of EXE, so a MEM entry never holds
back flags.

### The rules

For the pair I0 (at `pc`) and I1 (at `pc+4`):

1. Both are Type0 or Type1.
2. I1 neither reads nor writes what I0 writes. This design adds that I1 also
   does not write what I0 reads.
3. If I0 sets the flags, I1's condition must be AL. Rule 1 already guarantees
   this, so it never decides anything on its own.
4. Relation to the pipelines:
   - a. If neither instruction reads anything pending in either pipeline, I0
     goes to CORE_A and I1 to CORE_B.
   - b. If I0 depends only on CORE_A and I1 not on CORE_A, I0 goes to CORE_A
     and I1 to CORE_B.
   - c. If I0 depends only on CORE_B and I1 not on CORE_B, I0 goes to CORE_B
     and I1 to CORE_A.

   An instruction that depends on a core must go to that core, where forwarding
   can supply the value.

If the pair fails the rules, I0 is issued alone:

- to CORE_A if it has no RAW, WAW or WAR conflict with CORE_B's window;
- otherwise to CORE_B if it is allowed there and has no conflict with CORE_A's
  window;
- otherwise nothing issues.

When I0 depends on both pipelines, nothing issues until one of them drains.
This is the typical stall of the scheme: `add r0, r1, r2` with r1 produced in
CORE_A and r2 in CORE_B.

When one core is stalled, I0 may still go to the other core. The WAW and WAR
checks against the stalled core's window keep it from overtaking.

### Control flow

A control-flow instruction goes to CORE_A and fetching stops until CORE_A
resolves it in its MEM stage, which then redirects the PC. There is no branch
prediction and no flush logic, because nothing past a branch is ever fetched.
This costs about four cycles per branch in every mode, and it is what limits
the superscalar gain on branch-heavy code.

## Operation modes and the extended instructions

The transitions, from each mode:

- **Single:** `suprs` goes to superscalar.
- **Superscalar:** `single` goes to single; `mthd` goes to multithreading.
- **Multithreading:**
  - `single` goes to single; `suprs` goes to superscalar.
  - `wait` goes to waiting "joint".
  - `joint` goes to waiting "wait".
- **Waiting "joint":** `joint` or `suprs` goes to superscalar.
- **Waiting "wait":** `wait` or `suprs` goes to superscalar.

Reset enters superscalar mode with all registers and both PCs at 0.

- **`suprs`** is honoured only from a core in system mode. The `priv` inputs of
  the top say which cores are; exceptions and processor modes themselves are
  not modelled. An extended instruction that is not valid in the current mode
  is skipped.
- **`single`, `mthd`, `suprs`:** the IDU stops fetching until both pipelines
  have drained, then switches.
- **`wait`, `joint`:** the mode changes at once. The core that fetched the
  instruction halts. The other core's matching instruction, fetched later,
  completes the rendezvous. Execution then continues in superscalar mode at
  CORE_A's PC.
- **`move Rd, Rn`** copies a register of CORE_A into CORE_B's file, which is
  how a thread's arguments are handed over. It is valid in superscalar mode.
  The IDU rewrites it into an ordinary `mov Rd, Rn` tagged to read CORE_A's
  file and write CORE_B's, and issues it alone to CORE_B. Writing r15 or r14
  sets CORE_B's PC or link register, which is how its thread entry and return
  address are set before `mthd`.

The usual intra-program pattern, run by `tb/tb_sdc_top.sv`, is:

1. Set up arguments.
2. Use `move` to give CORE_B its registers, `lr` and `pc`.
3. Issue `mthd`, then `bl work` in CORE_A.
4. CORE_A returns to a `wait`; CORE_B returns to a `joint`.
5. Continue in superscalar mode.

In multithreading mode, port Ia fetches at CORE_A's PC and port Ib at CORE_B's.
Each core dispatches, branches and reads and writes its own register file. If
both cores fetch an extended instruction in the same cycle, CORE_A's is taken
first.

### Encoding

The architecture defines the mnemonics but no bit patterns. This design puts
them in the ARM permanently-undefined space:

```
 31   28 27        20 19  16 15  12 11    8 7    4 3    0
 [ 1110 | 0111 1111 |  Rn  |  Rd  | sub-op | 1111 | 0000 ]
 sub-op: 0 suprs, 1 single, 2 mthd, 3 joint, 4 wait, 5 move Rd,Rn
```

`sdc_pkg::ext_encode` builds them. The testbench assembler in
`tb/sdc_asm_pkg.sv` has helpers for these and for ordinary instructions.

## Register files

`sdc_regfile` holds both files. Each file has r0-r14, a PC and NZCV.

- **Reads:** each core has three read ports and a file-select bit. In
  superscalar and single mode both cores select CORE_A's file; in
  multithreading mode each selects its own; `move` reads A and writes B.
- **Writes:** each core has two write ports, both used by its WB stage: one
  for the result and one for a written-back base register or the high word
  of a long multiply. Reads see a write
  made in the same cycle.
- **PC:** the IDU updates the PCs. A write-back to r15 writes that file's PC.

Because WAW hazards are checked on every issue, the two write-back ports never
write the same register in the same cycle. An assertion checks this.

## The cores

`sdc_core` is a classic IF/ID/EXE/MEM/WB pipeline; the IDU acts as its IF
stage.

- **Forwarding:** from EX/MEM and MEM/WB into EXE.
- **Interlocks:** a one-cycle load-use stall, and a stall while the arbiter
  refuses its memory access.
- **Flags:** read and written in EXE.
- **Branches:** resolved in MEM.

It executes an ARMv4 subset:

- all sixteen data-processing operations with immediate, immediate-shift and
  register-shift operands, including flag setting and all conditions;
- LDR/STR/LDRB/STRB with immediate or shifted-register offsets, and
  LDRH/STRH/LDRSB/LDRSH with immediate or register offsets. Each may be
  pre-indexed, pre-indexed with write-back, or post-indexed. The updated base
  goes through a second register-file write port and is forwarded like any
  result;
- MUL and MLA, and the long UMULL and SMULL (a single-cycle multiplier in EXE;
  with S they set N and Z). The high word of a long product is written through
  the second write port, and forwarded like an updated base;
- MRS and MSR, limited to the flags;
- B, BL and BX, and data-processing or LDR instructions writing the PC;
- LDM and STM in the IA, IB, DA and DB modes, with or without write-back.
  The instruction stays in IF/ID and issues one single-word micro-op per
  listed register, lowest register first, so a list of n registers takes n
  cycles in the core. The first micro-op reads the base and carries the
  write-back; the later ones use the base captured when the first leaves EXE.
  A loaded PC branches after the last word (`pop {..., pc}`);
- SWP and SWPB, through the same sequencer: a read micro-op loads Rd and
  captures Rm, then a write micro-op stores the captured value to the captured
  address. The read raises `dlock`, and the arbiter then serves this core's
  write before any access of the other core, so the swap is atomic between
  the two threads of multithreading mode.

Not executed: the accumulating long multiplies UMLAL and SMLAL, SWI,
coprocessor instructions, and LDM/STM with the S bit (user bank, SPSR copy),
an empty register list or r15 as base. These pass through the pipeline as
no-ops and pulse the core's `unsupported` output. The dispatch rules still
classify them correctly.

The dispatch unit treats multiply, halfword transfers and MRS/MSR as Type4.
So in superscalar mode they always go to CORE_A alone.

Reading r15 gives the instruction address + 8 in every form.

## Memory

- **Instruction memory:** two combinational read ports and a load port.
- **Data memory:** one 32-bit port with byte enables, combinational read and
  clocked write, plus a host port for loading and inspecting data.
- **Arbiter:** single-cycle round robin. The loser's MEM stage holds for a
  cycle; both loads and stores are arbitrated. A granted access with `lock`
  set (the read half of a SWP) makes the same core win the next cycle too.

## Interface of `sdc_top`

- **Clock and reset:** `clk`, `rst_n` (asynchronous, active low).
- **System mode:** `priv[2]`, per core.
- **Loading and inspection:**
  - `imem_we/imem_addr/imem_wdata` load the program;
  - `dmem_host_*` read and write data memory.
- **Status:**
  - `mode`;
  - `busy[2]`;
  - `retire[2]`, one pulse per instruction leaving WB.
- **Event pulses for performance counting:**
  - `idu_ev`: pair issued, single issue, both-pipeline RAW stall, WAW/WAR hold,
    issue with one core stalled, control-flow wait, move, extended instruction,
    mode switch;
  - per core: `ev_fwd`, `ev_loaduse`, `ev_memstall` and `unsupported`.

Byte addresses are used throughout. The memories ignore address bits above
their size.

## Measured behaviour

`tb/tb_sdc_speedup.sv` runs the same program twice: once starting with
`single` (a plain five-stage pipeline) and once in superscalar mode.

| Program | IPC, single mode | IPC, superscalar mode | Cycles |
|---|---|---|---|
| Averaging loop, two independent streams per iteration | 0.80 | 0.95 | 19.8% fewer |
| Bubble sort plus checksum | 0.72 | 0.67 | 5.7% more |

The sort is slower in superscalar mode for three reasons:

- paired loads collide at the single data port;
- the compare that follows then depends on both pipelines;
- the branch wait costs the same in both modes.

So the gain depends strongly on instruction scheduling. Published figures for
this kind of machine (about 0.6 to 0.9 IPC on media code) assume instruction
traces that were not available to test here.

## Where this design chose for itself

These are the points the architecture leaves open, or where this RTL is
deliberately stricter:

- WAW/WAR against the other core's window is checked on every issue, not only
  while that core is stalled, because a core can stall after the check.
- A pair also needs no WAR of I1 on I0.
- Type2/Type4 and control flow go to CORE_A only.
- An I0 free of hazards goes to CORE_A.
- Flags and memory are tracked as resources.
- The waiting states halt the core that fetched `wait`/`joint`. An extended
  instruction that is invalid in the current mode is skipped.
- The extended-instruction encoding, memory sizes, reset values and the
  arbiter policy are all this design's own.
- There is no separate `lr` update path from the IDU: BL writes `lr` through
  CORE_A's normal write-back.
- The five-stage core itself is not specified by the architecture. Its
  instruction subset, the micro-op sequencing of LDM/STM and SWP, the second
  register write port, and the arbiter lock that keeps SWP atomic are all this
  design's own.

## Simulating

Everything is plain SystemVerilog-2017 and runs under Verilator 5. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sdc_pkg.sv tb/sdc_asm_pkg.sv tb/tb_sdc_top.sv \
  -y rtl -y tb +libext+.sv --top-module tb_sdc_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

| Testbench | What it checks |
|---|---|
| `tb_sdc_top` | Whole machine at default sizes. Runs a parallel sort of 20 records with `move`/`mthd`/`wait`/`joint` and a superscalar merge, then a kernel with pairs, a both-pipeline RAW stall, WAW/WAR holds, flags, shifts, byte accesses and a push/pop, then single mode and both rendezvous orders. Every mechanism must occur at least once. |
| `tb_sdc_speedup` | Single vs superscalar mode on the same program (above) |
| `tb_sdc_idu` | Fetch, pairing, PC steps, `move` re-encoding, branch wait and modes, with stand-in cores driven by the testbench |
| `tb_sdc_dispatch_rules` | Hand-made pipeline contents and pairs covering every rule, stalls, control flow, memory ordering and WAW/WAR holds |
| `tb_sdc_predecode` | Classes, masks and `move` re-encoding |
| `tb_sdc_mode_ctrl` | Every transition of the state machine, drain, halt and privilege |
| `tb_sdc_core` | One pipeline with a random-grant memory: results of every supported instruction class (including write-back, halfwords, short and long multiplies, SWP/SWPB and push/pop through LDM/STM), forwarding, load-use, flags, branches, one instruction per cycle |
| `tb_sdc_regfile`, `tb_sdc_dmem_arbiter`, `tb_sdc_dmem`, `tb_sdc_imem` | Random tests against reference models |

To run your own programs, assemble them with the functions in
`tb/sdc_asm_pkg.sv` into the instruction memory through the load port, as
`tb_sdc_top` does.
