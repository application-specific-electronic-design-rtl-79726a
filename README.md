# A multicycle SPARC V8 integer unit, specified as a trap–fetch–execute loop

This design is a SPARC V8 integer unit built the way a high-level synthesis
tool would build it from a behavioural instruction-set specification. It does
not pipeline. It runs one architectural loop as a multicycle state machine:
test for reset and error, take a pending trap or interrupt, fetch, execute,
update the program counters. The loop drives a small, fixed data path:

- a windowed register file with two read ports and one write port;
- one full ALU and a second, add-only ALU for the next-PC arithmetic;
- a comparator and a shift unit;
- a window-pointer unit and a trap priority encoder.

Every step of the specification takes one state. That makes the machine easy
to check against the instruction-set definition, at the cost of about 4 to 12
cycles per instruction.

The same top level also holds a second, unrelated processor: an eight-
instruction accumulator machine, the textbook example of such a behavioural
specification. The two share only the clock.

## Files

| file | contents |
|---|---|
| `rtl/sparc_pkg.sv` | shared types: psr and tbr layouts, the status-flag struct, trap types, ASIs, ALU and shift operations, the decoded-instruction struct |
| `rtl/sparc_regfile.sv` | windowed register file |
| `rtl/sparc_alu.sv` | ALU with N Z V C, tag check and multiply step |
| `rtl/sparc_shifter.sv` | sll / srl / sra |
| `rtl/sparc_cmp.sv` | comparator (gt, eq, zero) |
| `rtl/sparc_cond.sv` | Bicc/Ticc condition evaluation |
| `rtl/sparc_window.sv` | cwp ± 1 modulo NWINDOWS and the wim test |
| `rtl/sparc_trap_prio.sv` | trap priority encoder |
| `rtl/sparc_decode.sv` | instruction decoder |
| `rtl/sparc_muldiv.sv` | iterative integer multiply/divide unit |
| `rtl/sparc_iu.sv` | the integer unit: state machine, architected and implementation registers, memory port |
| `rtl/acc_machine.sv` | the accumulator machine |
| `rtl/asds_top.sv` | top level, both processors side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_acc_workload` |
| `tb/sparc_asm_pkg.sv` | functions that assemble SPARC instruction words for the testbenches |
| `tb/sparc_mem_model.sv`, `tb/acc_mem_model.sv` | behavioural memories (not part of the design) |

## The integer unit's loop

`sparc_iu` keeps two groups of registers.

- **Architected:** pc, npc, psr, tbr, wim, y and asr[1..31].
- **Implementation:**
  - `inst`, the fetched instruction.
  - `p`, a set of status flags. Each pending trap condition has a flag (illegal_instruction, window_overflow, mem_address_not_aligned, ...), next to the mode flags execute_mode, error_mode, reset_mode, reset_trap, trap and annul.
  - `q`, which holds the interrupt level and the software trap number.
  - The temporaries `tempAddr`, `tempCWP` and `tempMask`.
  - The memory interface registers memAR (address), memDR (data), memAS (address space), memBM (byte mask) and memAE (access error).

An instruction never jumps straight to a trap handler. It sets the flag of the
condition it found, plus `p.trap`, and finishes. The next pass through the
CHECK state sees `p.trap` and enters the trap sequence. There the priority
encoder picks the highest-priority pending condition (SPARC V8 order) and
writes its type into tbr.tt. The instruction leaves pc and npc unchanged, so
the trap records the address of the faulting instruction.

| state | what happens |
|---|---|
| RESET | held while `bp_reset_in` is high; arms a reset trap |
| CHECK | error mode → ERROR. Sample the interrupt (ET = 1 and (IRL = 15 or IRL > PIL)). Pending trap → TRAP1, else → FETCH |
| TRAP1 | clear the flags and select tt. If ET = 0, enter error mode. Otherwise ET ← 0, PS ← S, S ← 1, CWP ← CWP − 1 |
| TRAP2 | r17 ← pc (npc when the slot was annulled) |
| TRAP3 | r18 ← npc; pc ← tbr, npc ← tbr + 4 (0 and 4 for reset) |
| FETCH | read memory at pc, ASI 8 (user) or 9 (supervisor), into `inst` |
| EXEC | skip an annulled slot, or trap on a fetch error, or execute; then pc ← npc, npc ← npc + 4 unless the instruction set them itself |
| WIN | second step of save/restore/rett: test the window mask, switch windows, do the add |
| STDATA | stores: move the register (or pair) to memDR and form the byte mask |
| MEM | one memory access at memAR / memAS / memBM |
| MEMEND | test memAE. Loads align, extend and write the register. ldd/std go round again for the second word |
| MULDIV | wait for the multiply/divide unit; write rd, y (products) and icc (cc forms) |
| ERROR | `pb_error` high; only reset leaves |

### Register windows

The register file holds 7 globals and `16 × NWINDOWS` windowed registers; r0
reads as zero and writes to it are dropped. Register n (8–31) of window w is
entry `((n − 8) + 16·w) mod (16·NWINDOWS)`. So the outs (r8–r15) of window w
are the same storage as the ins (r24–r31) of window w − 1.

The current window number goes straight into the address decode, and each
port has its own window input. save and a trap step the window down;
restore and rett step it up. Before switching, the window unit checks the new
window against wim: `(1 << new_cwp) & wim` not zero raises window_overflow
(save) or window_underflow (restore, rett). The default is 4 windows.

### Delay slots and annulling

Branches follow SPARC V8.

- **Target.** The target is relative to the address of the branch.
- **Untaken with a = 1.** The instruction in the delay slot is annulled.
- **`ba,a`.** The slot is annulled even though the branch is taken.
- **What an annulled slot costs.** It is fetched and then skipped in EXEC, so it takes four cycles like any ALU instruction.
- **Trap or interrupt after an annulled slot.** It saves npc and npc + 4, so the return does not execute the annulled instruction.

### Memory port

```
mem_req  ___/‾‾‾‾‾‾‾‾‾‾‾\___      address, we, asi, bm, wdata stable while req is high
mem_ack  _________/‾‾‾\_____      rdata and err are valid in the ack cycle
```

- **Accesses.** One access is outstanding at a time. A memory may insert any number of wait states; the test memory answers one cycle after the request.
- **Byte order.** Data is big-endian: bm[3] and byte address 0 are bits 31:24.
- **ASIs.** Fetches use 8/9 and data accesses 10/11; `lda`/`sta` supply their own.
- **Errors.** err = 1 on a fetch raises instruction_access_exception, and on a data access data_access_exception.
- **Assertions.** Two concurrent assertions in `sparc_iu` check the handshake: req stays high until ack, and ack never comes without req.

### Timing

These figures assume a memory that answers one cycle after the request.

| instruction | cycles |
|---|---|
| ALU, shift, sethi, branch, call, jmpl, rd/wr | 4 |
| save, restore, rett | 5 |
| load | 7 |
| store | 8 |
| ldd | 10 |
| std | 12 |
| umul, smul, udiv, sdiv (and cc forms) | 37 |
| entering a trap | +3 |

Each memory wait state adds one cycle per access.

## What it implements, and where it departs

**Implemented:**

- **Integer instructions:** the whole SPARC V8 integer set apart from the exceptions listed below.
  - add/sub with carry and cc variants, and/or/xor with andn/orn/xnor;
  - tagged add/sub and their trapping forms; mulscc;
  - umul/smul/udiv/sdiv and their cc forms. A product's high word goes to y, and a divide uses y as the high dividend word. A zero divisor raises division_by_zero, and a quotient that overflows saturates (V is set in the cc forms). A separate unit computes one bit per cycle;
  - sll/srl/sra and sethi;
  - Bicc with annul, call, jmpl;
  - Ticc, save/restore, rett;
  - rd/wr of y, psr, wim, tbr and asr;
  - ld/st of byte, half, word and double, signed and unsigned, and the alternate-space forms.
- **Traps:** every trap condition the instruction set raises, in V8 priority order.
- **External interrupts:** on `bp_IRL`.
- **Modes:** user/supervisor ASIs, privilege checks, and error mode.

**Not implemented:**

- **`swap`, `ldstub`.** They trap as illegal instructions: they belong to the multiprocessing part of the architecture.
- **Floating-point and coprocessor instructions.** They always trap as disabled.
- **Other consequences.** The FPU and coprocessor interface inputs are accepted and ignored, and the two atomic-access outputs stay low.
- **`flush`.** It does nothing, since there is no cache.

**Choices that differ from a literal reading of the behavioural specification:**

- **Branch and call displacements.** They are added to the address of the branch, as SPARC V8 defines. The specification adds them to the value it reads from npc.
- **`jmpl` and `rett` with an immediate.** They compute rs1 + simm13.
- **A trap while traps are disabled.** It sets error_mode and raises `pb_error`.
- **Window test.** It uses AND of the one-hot window mask with wim.
- **Special-register writes.** Writes to psr, wim, tbr and y take effect at once. The V8 delayed-write window is not modelled.
- **Status flags.** The `p` flags are a 25-bit struct, not bits of a 32-bit register.
- **Reset.** Reset is synchronous. Register-file contents and most temporaries are not reset.

**Cycles per instruction.** The multicycle schedule here is fixed, so its CPI
is not that of any particular synthesis run. Synthesis results for this kind
of specification are around 5.6 cycles per instruction with a basic schedule
and about 4 with trace scheduling. This design's 4–8 cycles for the common
instructions are in the same range. Multiply and divide are much slower (37) because they use one bit per cycle.

## The accumulator machine

`acc_machine` has four registers: pc, ac, memAR and memDR, where memDR splits
into an opcode field and an address field. It repeats fetch (memAR ← pc, read,
pc ← pc + 1) and execute until it executes `halt`.

| opcode | instruction | action | cycles |
|---|---|---|---|
| 0 | halt | stop until `rst` | 3 to `halted` |
| 1 | add | ac ← ac + M[a] | 5 |
| 2 | and | ac ← ac & M[a] | 5 |
| 3 | shr | ac ← ac >>> 1 | 3 |
| 4 | load | ac ← M[a] | 5 |
| 5 | stor | M[a] ← ac | 5 |
| 6 | jump | pc ← a | 3 |
| 7 | brn | if ac < 0: pc ← a | 3 |

The word is 16 bits (`WORD_W`), with a 3-bit opcode (`OP_W`) and a 13-bit word
address. Its memory port uses the same req/ack handshake as the integer unit.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sparc_iu`, `sparc_regfile`, `sparc_window`, `asds_top` | `NWINDOWS` | 4 | register windows (power of two) |
| `sparc_iu` | `IMPL`, `VER` | 0, 0 | psr.impl and psr.ver fields |
| `acc_machine` (`ACC_*` in the top) | `WORD_W`, `OP_W` | 16, 3 | word and opcode width |

`NWINDOWS = 8` gives the 136-word register file of an eight-window SPARC
implementation. The register-file testbench also passes at 8 windows, but the
integer-unit programs were written for 4 windows: their expected psr values
contain the window number.

At the defaults the top synthesizes to about 1000 cells and 540 flip-flop
bits. It also holds 3264 bits of memory arrays: the 71-word register file
(7 globals + 16 × `NWINDOWS`) and the 31 ancillary state registers, each 32
bits.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Data-path blocks.** They are compared against reference models written differently from the RTL: a bit-serial shifter, 64-bit flag arithmetic, an explicit ins/locals/outs register model, and written-out V8 priority and condition tables. Random stimulus covers the rest.
- **`tb_sparc_iu`.** It runs a hand-assembled program and checks its results and trap log against values worked out by hand.
  - The program has a trap table, a common trap handler and an interrupt handler.
  - It covers every instruction group.
  - It forces a window overflow and an underflow, an illegal instruction, a misaligned access, an access error, a tag overflow, an FP-disabled trap, a privileged instruction in user mode and an interrupt.
  - It also checks the latencies listed above, and error mode and the exit from it.
  - A third program runs umul, smul, udiv, udivcc (with an overflowing quotient) and sdiv, then divides by zero.
- **`tb_sparc_keep_workload`.** It runs a program built around the instructions a reduced configuration keeps: call, jmpl, save, restore, rett, lda, sta, ta and tne. It checks the results, the ASIs of the alternate-space stores, the trap log, the psr after rett and the latency of each of these instructions.
- **`tb_sparc_muldiv`.** It compares products and quotients with 64-bit reference arithmetic over corner and random operands, including saturation, and checks the 33-cycle latency.
- **`tb_acc_machine`.** It checks every instruction, including a brn loop, and two latencies.
- **`tb_acc_workload`.** It runs a program whose dynamic instruction counts are exactly the artificial mix add 25, and 15, load 20, stor 10, brn 18, shr 6, jump 5, halt 1.
  - It compares the machine with a reference interpreter.
  - It checks the total of 440 cycles (4.40 cycles per instruction).
- **`tb_asds_top`.** It runs both processors through the top at the default parameters.
  - The integer-unit program runs with one wait state on every access.
  - It counts each mechanism: instruction retire, memory stall, trap, annulled slot, interrupt, window overflow, window underflow, access error, error mode, multiply/divide, division_by_zero, the accumulator's taken brn, and halt.
  - A mechanism that never happens counts as a failure.

To run one with Verilator 5 (package files first):

```sh
verilator --binary --timing --top-module tb_asds_top \
  rtl/sparc_pkg.sv rtl/sparc_regfile.sv rtl/sparc_alu.sv rtl/sparc_shifter.sv \
  rtl/sparc_cmp.sv rtl/sparc_cond.sv rtl/sparc_window.sv rtl/sparc_trap_prio.sv \
  rtl/sparc_decode.sv rtl/sparc_muldiv.sv rtl/sparc_iu.sv rtl/acc_machine.sv rtl/asds_top.sv \
  tb/sparc_asm_pkg.sv tb/sparc_mem_model.sv tb/acc_mem_model.sv tb/tb_asds_top.sv
./obj_dir/Vtb_asds_top +verilator+rand+reset+2
```

All testbenches finish in well under a second. The unit testbenches need only
the package, the module under test and, for the decoder,
`tb/sparc_asm_pkg.sv`. To write further SPARC test programs, assemble them
with the functions in `sparc_asm_pkg` (`alu_r`, `alu_i`, `mem_i`, `bicc`,
`call`, `ticc_i`, ...) and write the words straight into the memory model's
array. See `tb_sparc_iu` for the layout of a trap table.
