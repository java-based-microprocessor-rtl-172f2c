# MJava: a small processor that executes Java bytecode directly

MJava runs the integer core of the Java Virtual Machine instruction set in
hardware. There is no interpreter and no runtime system underneath it: a host
streams raw bytecode into the chip one byte per clock, and the core decodes and
executes it as it arrives. It is a stack machine, like the JVM it imitates.
Operands live on an 8-word operand stack, five local variables play the role of
registers, and an ALU is selected directly by the JVM opcode byte. The design
is deliberately small and readable. It is meant for embedded and teaching use,
not for speed.

The RTL is SystemVerilog (IEEE 1800-2017). Every block has a self-checking
testbench, and the whole processor is checked against an instruction-level
reference model.

## Blocks

```
            write, byte_in                                out_stream (top of stack)
                  |                                              ^
                  v                                              |
        +------------------+  byte   +-------------------+  +-----------+
        |  mpc             |-------->|  sequencer        |->|  mstack   |  operand stack
        |  16-byte FIFO    |<--------|  FETCH/OPER/EXEC  |<-|  8 x 32   |
        |  full/empty/half | read,   |  local_var[0..4]  |  +-----------+
        +------------------+ jump    |                   |  +-----------+
                                     |                   |->|  mstack   |  return stack
                                     |                   |  +-----------+
                                     |                   |  +-----------+
                                     |                   |->|  malu     |  opcode-selected
                                     +-------------------+<-|  Z V N    |  ALU
                                                            +-----------+
```

| File | Block | Role |
|---|---|---|
| `rtl/mjava.sv` | top level and sequencer | fetch, decode, execute, local variables, branch control |
| `rtl/mpc.sv` | "program counter" | byte FIFO holding the bytecode stream, with full, empty and half flags |
| `rtl/mstack.sv` | LIFO stack | circular 8-word stack with push, pop and double pop. It is used twice |
| `rtl/malu.sv` | ALU | 32-bit two's-complement unit selected by the opcode, with Z, V and N flags |
| `rtl/mjava_pkg.sv` | package | opcode enum and the table of immediate-byte counts |

## Loading and running code

The core has two modes, set by the `write` input:

* **Load mode** (`write` = 1): each clock, `byte_in` is appended to the FIFO.
  The sequencer holds its state exactly as it is, even in the middle of an
  instruction. A write into a full FIFO is refused and pulses `pc_overflow`.
* **Run mode** (`write` = 0): the sequencer consumes bytes from the FIFO and
  executes them. If it needs a byte and the FIFO is empty, it waits and
  raises `stall`. It resumes as soon as more bytes are written.

So a host can load a whole program of up to 16 bytes and let it run. It can
also stream a longer straight-line program by topping up the FIFO whenever
`pc_full` is low. Execution pauses during each write.

## How an instruction executes

Each instruction walks through up to four states:

| State | What happens | Clocks |
|---|---|---|
| FETCH | The opcode byte is read from the FIFO. Its address is remembered for branches. | 1 (or more while stalled) |
| OPER | The 1 or 2 immediate bytes are read, one per clock. | 0, 1 or 2 |
| EXEC | The stacks, ALU, locals and branch logic act in a single clock. | 1 |
| EXEC2 | A second push, only for `swap` and `dup2`. | 0 or 1 |

With no stalls, an instruction takes 2 clocks plus one per immediate byte.
`swap` and `dup2` take one clock more. Take `bipush 5; bipush 7; iadd` as an
example: 3 + 3 + 2 = 8 clocks. `instr_done` pulses in the clock after an
instruction completes, and `done_opcode` then shows its opcode.

The single-clock EXEC works because the stack's read ports are combinational.
`data_out1` always shows the top word and `data_out2` the word below it. A pop
and a push in the same clock happen in that order. So `iadd` reads both
operands, pops two words and pushes the sum, all in one edge.

## Instruction set

All values are 32-bit two's complement. For binary operations, JVM order
applies: *value2* is the top of the stack and *value1* the word below it, and
the result is *value1 op value2*.

| Opcode | Mnemonic | Bytes | Action |
|---|---|---|---|
| 00 | nop | 1 | nothing |
| 02-08 | iconst_m1 .. iconst_5 | 1 | push -1 .. 5 |
| 10 | bipush b | 2 | push sign-extended byte |
| 11 | sipush b1 b2 | 3 | push sign-extended {b1,b2} |
| 15 | iload i | 2 | push local i |
| 1a-1d | iload_0 .. iload_3 | 1 | push local n |
| 36 | istore i | 2 | pop into local i |
| 3b-3e | istore_0 .. istore_3 | 1 | pop into local n |
| 84 | iinc i c | 3 | local i += sign-extended c (through the ALU) |
| 57 / 58 | pop / pop2 | 1 | drop one or two words |
| 59 | dup | 1 | push a copy of the top |
| 5c | dup2 | 1 | push copies of the top two words, in order (2 execute clocks) |
| 5f | swap | 1 | exchange the top two words (2 execute clocks) |
| 60 64 74 | iadd isub ineg | 1 | arithmetic. `ineg` negates the top |
| 78 7a | ishl ishr | 1 | shift by value2 & 31. `ishr` is arithmetic |
| 7e 80 82 | iand ior ixor | 1 | bitwise logic |
| 9f-a4 | if_icmpeq/ne/lt/ge/gt/le o1 o2 | 3 | pop two and compare (signed). If true, branch to opcode address + {o1,o2} |
| a7 | goto o1 o2 | 3 | branch to opcode address + {o1,o2} |
| a8 | jsr o1 o2 | 3 | push the address of the next instruction, then branch |
| a9 | ret i | 2 | continue at the address held in local i |

Any other opcode runs as a one-byte `nop` and pulses `bad_opcode`. Note that an
unsupported opcode that carries immediates (for example `ldc`) puts the
sequencer out of step with the stream.

The ALU decides comparisons too. `if_icmp<cond>` makes it compute
*value1 - value2*. Then "equal" is Z, and "less than" is N xor V, which stays
correct when the subtraction overflows. The flags of the last arithmetic
instruction or comparison stay visible on `flag_z`, `flag_v` and `flag_n`.
V is set only by additions of like signs and subtractions of unlike signs
that overflow. `ineg` of the most negative number wraps and does not set it.

## The stacks

`mstack` is a register array that fills from entry 0 upward. Its stack pointer
starts at the top entry, so the first push wraps it to entry 0. The pointer is
circular in both directions, as in a ring buffer. An occupancy counter sits
beside the ring:

* A push onto a full stack overwrites the oldest word, keeps the count at 8
  and pulses `overflow`.
* A pop of more words than are held still moves the pointer, so the ports
  then show stale words. It sets the count to 0 and pulses `underflow`.

This matches what a JVM program needs: a correct program never does either,
and a faulty one is flagged instead of halting. The array is cleared by reset,
so stale words read after an underflow are at least deterministic.

The same module, with the same depth, is the **return stack**. See jsr/ret
below.

## Branching inside a FIFO

This is the least obvious part of the design. The bytecode is held in a FIFO,
not in an addressable memory. Yet JVM branches are relative to the address of
the branch opcode.

The sequencer keeps `pc_addr`, a 16-bit count of stream bytes, which is the
JVM program counter of the next byte to read. It is 0 after reset and
increments with every byte consumed. The FIFO keeps its own read pointer into
its 16-byte ring. A taken branch computes the target (opcode address + signed
16-bit offset) and its distance from `pc_addr`. It then applies that distance
to both:

* `pc_addr` becomes the target.
* The FIFO's `jump` port moves the read pointer by the same signed distance.
  It also changes the occupancy count by the negated distance. A backward jump
  therefore makes already-consumed bytes readable again, and a forward jump
  skips bytes.

The bytes are still physically in the ring until the host overwrites them, so
a loop works as long as the target is still held. In practice this means:

* A program of at most 16 bytes, loaded whole, can branch anywhere within
  itself, in either direction. The tests run a counting loop, subroutines and
  all six conditional branches this way.
* A forward branch may not go past bytes already written. A backward branch
  may not go back to bytes the host has since overwritten. A jump that would
  take the count outside 0..16 is clamped and flagged on `pc_overflow` /
  `pc_underflow`. The design does not try to detect a target that was
  overwritten.

## jsr, ret and the return stack

`jsr` follows the JVM. It pushes the return address (the address of the next
instruction) onto the operand stack. A subroutine normally saves it with
`istore n` and returns with `ret n`, which continues at the address in local n.

`jsr` also pushes the same address onto the separate return stack. `ret` pops
the return stack and compares: if the local variable does not hold the address
on top of the return stack, or the return stack is empty, `ret_mismatch`
pulses. The jump still goes where the local variable says, as the JVM
requires. The return stack is thus a hardware cross-check on subroutine
nesting, and it never changes control flow.

## Interface of the top level (`mjava`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| reset | in | 1 | asynchronous reset, active high |
| write | in | 1 | load mode and byte strobe |
| byte_in | in | 8 | bytecode byte |
| out_stream | out | 32 | top of the operand stack |
| pc_full, pc_empty, pc_half | out | 1 | FIFO holds 16 bytes / 0 bytes / at least 8 bytes |
| pc_count | out | 5 | bytes held in the FIFO |
| st_depth | out | 4 | words on the operand stack |
| pc_addr | out | 16 | JVM pc of the next byte to read |
| flag_z, flag_v, flag_n | out | 1 | ALU flags of the last arithmetic instruction or comparison |
| instr_done, done_opcode | out | 1, 8 | completion pulse and the opcode completed |
| stall | out | 1 | waiting for bytes |
| branch_taken | out | 1 | pulse: a branch, goto, jsr or ret changed the pc |
| bad_opcode | out | 1 | pulse: an unsupported opcode ran as a nop |
| ret_mismatch | out | 1 | pulse: the ret target disagrees with the return stack |
| st_overflow, st_underflow | out | 1 | operand stack overflow / underflow pulse |
| pc_overflow, pc_underflow | out | 1 | FIFO write refused / read or jump out of range |

Parameters (the defaults are the design's sizes): `INT_WIDTH` = 32,
`BYTE_WIDTH` = 8, `PC_DEPTH` = 16 (a power of two), `ST_DEPTH` = 8 and
`N_LOCALS` = 5. `iload`, `istore`, `iinc` and `ret` accept an index byte up to
255. An index at or above `N_LOCALS` reads 0 and ignores writes.

## What comes from the original design, and what was added

The original MJava description supplies these parts:

* the four blocks (ALU, stack, FIFO "program counter" and datapath)
* 32-bit words, an 8-deep circular stack built once and used for both the
  operand and the return stack, a 16-byte FIFO with full, empty and half
  flags, and five local variables
* the load mode and run mode driven by `write`
* the instruction list
* an ALU selected by the raw opcode, with Z, V and N flags

This implementation chose or changed the following:

* **Sequencing.** The original describes only a sequential
  fetch-decode-execute flow. The FETCH/OPER/EXEC(2) machine and its clock
  counts are this design's.
* **Operand order.** The original is inconsistent here. Its examples shift and
  subtract the top word by the word below it. This design follows the JVM
  definition (value1 op value2, with value2 on top), so real compiled
  bytecode gives correct results.
* **Sign extension.** `bipush` and `sipush` sign-extend as the JVM requires.
  The original's example traces show zero-extension.
* **ishr** is an arithmetic shift, as the JVM requires, not a logical one.
* **Stack ports.** Both ports are combinational views of the top two words,
  and a pop and a push can happen in the same clock. The original registers
  the popped words. The occupancy count and the overflow/underflow pulses are
  additions.
* **FIFO.** The output is first-word fall-through. Reads of an empty FIFO and
  writes to a full one are refused with a pulse; the original stopped the
  simulation. The relative `jump` port, and with it every branch, is this
  design's mechanism. The original names branches as an aim of the FIFO
  organisation but does not show how.
* **Return stack.** It serves as a jsr/ret cross-check (`ret_mismatch`), as
  described above.
* **Enables.** All enables are active high. The stack and FIFO resets are
  active low; the top-level reset is active high.
* **Defined states.** Unsupported opcodes run as a nop and pulse `bad_opcode`.
  Reset clears every array.

## Verification

Each block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_malu.sv` | Corner cases and 4000 random vectors for every operation. Result, flags and carry are checked against 64-bit arithmetic. |
| `tb/tb_mstack.sv` | A directed fill past the depth and an empty past the bottom, then 3000 random push / pop / double-pop / pop-and-push clocks. A ring model checks ports, count and pulses. |
| `tb/tb_mpc.sv` | Writes past full, reads past empty, backward and forward jumps, out-of-range jumps and 4000 random clocks, all against a FIFO model. |
| `tb/tb_mjava.sv` | The whole processor at its default sizes against an instruction-level reference model (see below). |
| `tb/tb_mjava_demo.sv` | The 15-byte demonstration stream (`bipush`, `bipush`, `sipush`, `sipush`, `iadd`, `ishl`, `ior`, `swap`, `nop`). Each top-of-stack value is checked against hand-worked numbers, and the run must take 25 clocks. This stream leaves one word on the stack before `swap`, so `swap` underflows, which the test expects. |

`tb_mjava` acts as the host. It runs the demonstration stream with
per-instruction clock counts, then a counting loop and each `if_icmp` condition
on equal, smaller, larger and overflowing operand pairs. Next come two
subroutines, one of which alters its return address. Then it streams 600
random straight-line instructions while they execute, with random pauses.
Last, it writes 17 bytes into the full FIFO. At every `instr_done` it compares
the top of stack, the stack depth, the pc, the flags and all pulses with its
model, and it compares the locals after each program. It also fails unless
each of these happened at least once: stall, load-mode pause, taken and
untaken branch, jsr/ret, swap/dup2, stack overflow and underflow, ALU
overflow, full FIFO, half FIFO, refused write, unknown opcode and return
mismatch.

To simulate with Verilator 5 (example for the full processor):

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_mjava \
    -y rtl -y tb +libext+.sv rtl/mjava_pkg.sv tb/tb_mjava.sv
./obj_dir/Vtb_mjava
```

Replace `tb_mjava` with any other testbench name. The package must be listed
first. Each run takes well under a second.

The RTL lints cleanly with `verilator --lint-only -Wall` apart from two
kinds of note. The unused-signal notes name the stacks' pushed/popped
confirmations and the return stack's status, which this sequencer does not
need, and the ALU carry. The SYNCASYNCNET notes come from the stack and
FIFO assertions, which sample the asynchronous reset. The files also elaborate in Yosys through its slang
front end. After coarse synthesis the full core is about 480 word-level cells
and 940 flip-flop bits. All the storage is flip-flops: the two 8 x 32 stacks,
the 16 x 8 FIFO and five 32-bit locals.

## Limitations

* Only the integer subset listed above is supported: no long, float, double,
  arrays, objects, method invocation, `wide` or constant pool.
* A branch target must still be held in the 16-byte FIFO. Longer programs with
  loops need a larger `PC_DEPTH`.
* There is no pipelining: one instruction is in flight at a time.
