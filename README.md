# S21: a simple 32-bit three-address processor

S21 is a small teaching instruction set. It has 32 general registers of 32 bits, with `R[0]` always zero, and fixed 32-bit instructions. Arithmetic is register to register in the form `op dest src1 src2`, and memory is reached only through `ld`/`st`. It has no condition flags. A comparison (`eq ne lt le gt ge`) writes 1 or 0 into a register, and the conditional jumps `jt`/`jf` test a register for non-zero or zero. Memory is addressed in 32-bit words, and 22 address bits (4M words) can be addressed directly.

This repository is a synthesizable SystemVerilog implementation of the whole S21 instruction set:

- all ALU operations, in register and immediate forms
- the three addressing modes of `ld`/`st`
- jumps, jump-and-link and return
- `push`/`pop`
- `trap`
- one software and one hardware interrupt
- the task-switch instructions `savr`, `resr`, `savt` and `rest`

The instruction set defines no microarchitecture. The multi-cycle organisation described below is this design's own.

## Instruction set in brief

| format | fields (MSB first) | used by |
|---|---|---|
| L | `op:5 r1:5 ads:22` | `nop`, `ld/st r1 ads`, `mv r1 #n`, `jmp`, `jal`, `jt`, `jf` |
| D | `op:5 r1:5 r2:5 disp:17` | `ld/st r1 @d r2`, `op r1 r2 #n` |
| X | `op:5 (=31) r1:5 r2:5 r3:5 xop:12` | `op r1 r2 r3`, `mv r1 r2`, `ld/st r1 +r2 r3`, `ret`, `trap`, `push`, `pop`, `not`, `int`, `reti`, `savr`, `resr`, `savt`, `rest` |

`ads` and `disp` are always sign extended.

Major opcodes:

| opcode | instruction |
|---|---|
| 0 | `nop` |
| 1 | `ld r1 ads` |
| 2 | `ld r1 @d r2` |
| 3 | `st r1 ads` |
| 4 | `st r1 @d r2` |
| 5 | `mv r1 #n` |
| 6 | `jmp ads` |
| 7 | `jal r1 ads` |
| 8 | `jt r1 ads` |
| 9 | `jf r1 ads` |
| 10..24 | `add sub mul div and or xor eq ne lt le gt ge shl shr` with an immediate |
| 31 | X-format |

X-format `xop` values:

| xop | instruction |
|---|---|
| 0..14 | the same fifteen ALU operations, register form |
| 15 | `mv` |
| 16 | `ld +` |
| 17 | `st +` |
| 18 | `ret` |
| 19 | `trap` |
| 20 | `push` |
| 21 | `pop` |
| 22 | `not` |
| 23 | `int` |
| 24 | `reti` |
| 25 | `savr` |
| 26 | `resr` |
| 27 | `savt` |
| 28 | `rest` |

Opcodes 25..30 and xops 29..4095 are undefined.

Effective addresses:

- absolute: `M[ads]`
- indirect: `M[d + R[r2]]`
- index: `M[R[r2] + R[r3]]`

The stack grows upward:

- `push sp r` is `R[sp]++; M[R[sp]] = R[r]`.
- `pop sp r` is `R[r] = M[R[sp]]; R[sp]--`.

`s21_pkg.sv` holds every one of these numbers.

## How the core executes an instruction

`s21_core` is a finite-state machine around a single memory port. Instructions and data share one memory, so each instruction needs at least one cycle to fetch and one to execute.

| state | what happens |
|---|---|
| FETCH | Put PC on the memory address. If a hardware interrupt is pending, take it instead: RetAds = PC, then read `M[1000]`. |
| DECODE | Latch the instruction; PC = PC + 1. |
| EXEC | Execute. ALU ops, `mv`, jumps, `st`, `push`, `trap`, `savt`, `rest` and `reti` finish here. `ld`/`pop` send their address to memory; `int` reads `M[1000]`. |
| LOAD | Write the word read by `ld`/`pop` to the register file. |
| VEC | PC = interrupt vector just read. |
| SAVR | One store per cycle, r0 to r15. |
| RESR | One load per cycle, r15 to r0. The read of word *k* overlaps the register write of word *k−1*. |
| HALT | Entered by `trap 0`; left only by reset. |

Resulting latencies, in cycles:

| instructions | cycles |
|---|---|
| ALU, `mv`, `jmp/jt/jf/jal/ret`, `st`, `push`, `trap`, `savt`, `rest`, `reti`, `nop` | 3 |
| `ld`, `pop`, `int` | 4 |
| `savr` | 19 |
| `resr` | 20 |
| hardware interrupt entry, before the first ISR instruction | 2 |

The memory port is synchronous, with one cycle of read latency. The core drives `mem_addr`/`mem_we`/`mem_wdata` combinationally from its state, and expects `mem_rdata` one clock later.

The datapath has these parts:

- **`s21_decoder`** turns the instruction register into a `dec_t` record: the instruction class, the ALU operation, the addressing mode, r1/r2/r3, and the sign-extended immediate (22 or 17 bits, depending on the format).
- **`s21_regfile`** has three asynchronous read ports and one write port. `st r1 +r2 r3` needs three registers at once. Read port 1 is always `R[r1]`: the store data, the jump condition, the stack pointer or the `ret` target. Port 2 is `R[r2]`. Port 3 is `R[r3]`, except that it reads `R[30]` during `trap` and walks r0..r15 during `savr`.
- **`s21_alu`** computes `R[r2] op (R[r3] or immediate)`.
- **`s21_intctl`** holds RetAds and the "interrupt in service" flag.

"PC" in `jal` (`R[r1] = PC`) and in interrupt entry (`RetAds = PC`) means the address of the *next* instruction. So `ret r31` after `jal r31 f` and `reti` after an interrupt both resume after the call site.

## Interrupts and task switching

This is the least obvious part of the design.

- **Vector.** Both interrupt kinds set RetAds = PC and PC = `M[1000]`. The word at address 1000 holds the *address* of the service routine, not code.
- **Hardware interrupt.** `irq` is a level request, sampled only in FETCH, at an instruction boundary. When it is taken, `irq_ack` pulses for one cycle.
- **One level.** A taken interrupt, hardware or `int 0`, sets an in-service flag. No further hardware interrupt is accepted until `reti` clears the flag. If `irq` is still high at `reti`, it is taken again before the next instruction. Nesting needs RetAds to be saved by software (`savt`), since `int` inside a routine overwrites it.
- **`savr sp`** pushes r0..r15: `M[sp+1..sp+16] = R[0..15]`, then `R[sp] += 16`. If `sp` is itself one of r0..r15, the value stored for it is the pointer as it stands at that step of the sequence.
- **`resr sp`** pops r15..r0: `R[15..0] = M[sp..sp-15]`, then `R[sp] -= 16`. If `sp` is one of r0..r15, the word popped for it is discarded, so that the pointer stays usable.
- **`savt r` / `rest r`** copy RetAds to a register, or a register to RetAds.

A task switcher therefore follows this pattern:

```
isr: savr r29        ; save r0..r15
     savt r1         ; RetAds -> r1
     push r29 r1
     ...             ; pick the next task, switch r29 ...
     pop  r29 r1
     rest r1         ; r1 -> RetAds
     resr r29
     reti
```

The end-to-end testbench runs a routine of this form, shared by `int 0` and the hardware interrupt.

## Traps and the outside world

`trap n` puts the trap number on `trap_code` (taken from the r1 field) and `R[30]` on `trap_value`, and pulses `trap_valid`.

- `trap 0` also halts the core (`halted` = 1).
- `trap 1` means "print `trap_value` as an integer", and `trap 2` means "print it as a character". Printing is left to whatever watches the port; the testbench does it with `$write`.
- Other trap numbers only pulse `trap_valid`.

## Top level and memory

`s21_top` joins the core to `s21_memory`, a true dual-port synchronous RAM of `2**AW` words. The default `AW = 22` matches the 4M directly addressable words; higher address bits are ignored. In simulation this memory takes 16 MiB.

Port A belongs to the core. Port B is brought out as `host_addr/host_we/host_wdata/host_rdata`, with the same one-cycle read latency. It is used to load a program while `rst` is high and to read results afterwards.

When `rst` falls, the core starts at address 0 with all registers and RetAds cleared.

Top-level ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `irq` / `irq_ack` | in / out | 1 | hardware interrupt request (level) and its acknowledge pulse |
| `trap_valid`, `trap_code`, `trap_value` | out | 1, 5, 32 | trap event, trap number, `R[30]` |
| `halted` | out | 1 | stopped by `trap 0` |
| `host_*` | in/out | 32 | second memory port |

## Choices where the instruction set is silent

The instruction set does not specify the following points. They are implementation choices, and a program that depends on them is not portable to another S21 implementation.

- **Microarchitecture.** Multi-cycle, one memory port, latencies as above. No pipeline and no caches.
- **`mul`** keeps the low 32 bits of the product.
- **`div`** is signed and truncates toward zero. `x / 0` gives −1 and `−2^31 / −1` gives `−2^31`. The divider is one combinational block; it is the longest path in the design.
- **`lt le gt ge`** compare signed values. All comparisons return exactly 1 for true.
- **`shl`/`shr`** are logical shifts by the full unsigned amount, so 32 or more gives 0. `shr` is not arithmetic.
- **Immediates.** The immediates of comparisons and shifts are sign extended like every `disp`.
- **`push r r` and `pop r r`** follow the step order literally. `push r r` stores the incremented pointer. `pop r r` leaves the popped word minus one.
- **Undefined opcodes and xops** execute as `nop`.
- **Reset** is synchronous and active high. It clears the PC, the registers, RetAds and the in-service flag.
- **Memory.** One memory holds instructions and data. Reads have one cycle of latency, and a read returns the old data if the same word is written in that cycle.

## Files

| file | contents |
|---|---|
| `rtl/s21_pkg.sv` | opcodes, xops, ALU operations, instruction classes, `dec_t` |
| `rtl/s21_decoder.sv` | instruction decoder |
| `rtl/s21_alu.sv` | ALU |
| `rtl/s21_regfile.sv` | 32 × 32 register file, 3 read ports and 1 write port |
| `rtl/s21_intctl.sv` | RetAds and hardware-interrupt acceptance |
| `rtl/s21_core.sv` | control FSM, PC, datapath wiring |
| `rtl/s21_memory.sv` | dual-port word memory |
| `rtl/s21_top.sv` | core + memory |
| `tb/s21_tb_pkg.sv` | instruction encoders and `s21_iss`, an instruction-level reference model |
| `tb/s21_*_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`.

- **`s21_top_tb`** runs the top at its default size, with the full 4M-word memory, in lockstep with the reference model `s21_iss`. The model steps one instruction each time the core fetches one, and enters its interrupt routine when the core raises `irq_ack`. At each halt, the testbench compares all registers, the trap log and every memory word the loader or the program wrote. Some random loads and stores use negative absolute addresses, which reach the top words of the memory.
  - It first runs a demonstration program. The program prints `Hi`, computes 6! recursively with `jal`/`ret` and `push`/`pop`, fills and sums an array with index addressing, and uses absolute and indirect addressing. It raises a software interrupt, then waits for a hardware interrupt; both are served by a `savr`/`savt`/`resr`/`rest` routine.
  - It then runs 100 random programs of 300 instructions each.
  - It counts how often each instruction kind, each addressing mode, taken and untaken branches, both interrupt kinds, the traps and the halt occurred. A mechanism that never occurs counts as a failure.
- **`s21_core_tb`** runs hand-written programs whose results and cycle count (130 cycles to halt) were worked out by hand. It includes a hardware-interrupt test that checks that no second interrupt is accepted inside the service routine. It also covers the corner cases listed above.
- **Unit testbenches:**
  - `s21_alu_tb`: corner cases and random operands against a 64-bit reference.
  - `s21_decoder_tb`: every instruction, with random fields.
  - `s21_regfile_tb` and `s21_memory_tb`: random traffic against a shadow array.
  - `s21_intctl_tb`: a directed sequence.

The reference model implements the same choices as the RTL for the points the instruction set leaves open. It therefore confirms that the RTL follows those choices, not that the choices are right.

Not covered by any test: a hardware interrupt arriving while the core is halted (it is ignored), and programs that run past 32-bit address wrap-around.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/s21_pkg.sv tb/s21_tb_pkg.sv tb/s21_top_tb.sv --top-module s21_top_tb
./obj_dir/Vs21_top_tb
```

Replace `s21_top_tb` with the name of any other testbench. The memory testbench overrides `AW` to 10, and the core testbench uses a 4K-word memory; all the others use the defaults. Verilator has only two logic states, so the testbenches initialise everything they read. Any memory words a program never writes hold arbitrary values.

## Changing the design

- **Memory size.** Set `AW` on `s21_top`. The interrupt vector at word 1000 needs `AW >= 10`.
- **New instructions.** Use the free opcodes 25..30 or xops 29 and up. Add the encoding to `s21_pkg`, a class to `iclass_e`, a case to `s21_decoder`, and the EXEC behaviour (plus any extra state) to `s21_core`. Then add the same behaviour to `s21_iss` so that the end-to-end test keeps checking it.
- **Faster core.** Decode could move into the fetch cycle, with a separate instruction port. The latencies checked in `s21_core_tb` would then change.
