# QNICE: a 16-bit processor with a windowed register bank

QNICE is a small 16-bit architecture for homebrew or FPGA builds. It keeps
the instruction set tiny (18 instructions, one 16-bit word each, plus inline
constants) and makes subroutines cheap. The low eight registers, R0..R7, are
not fixed storage. They are a window into a 256-page register RAM. A
subroutine gets a fresh set of working registers by adding 0x0100 to the
status register, and it gives the caller's set back by subtracting 0x0100.
Nothing needs to be saved on the stack.

This repository holds a synthesizable SystemVerilog implementation of the
architecture (version 1.2 of its definition). It contains a multi-cycle
processor core, a 64K-word memory and memory-mapped I/O decoding. Self-checking
testbenches cover every block and the complete machine.

## Programmer's model

| Register | Role |
|---|---|
| R0..R7   | window into the register bank, page chosen by `rbank` |
| R8..R12  | general purpose; by convention used to pass arguments |
| R13      | stack pointer for subroutine calls |
| R14      | status register: `rbank` in bits 15:8, flags in bits 7:0 |
| R15      | program counter |

Status bits in R14[7:0], from bit 7 down to bit 0: `M I V N Z C X 1`.

- Bit 0 always reads 1, so a jump conditioned on bit 0 is unconditional.
- X is set when the result is 0xFFFF.
- C is the carry, or the borrow after a subtraction.
- Z is set when the result is zero.
- N is the sign of the result.
- V is set on signed overflow.
- I and M are interrupt bits. They are stored and can be written, but no
  interrupt mechanism exists in this implementation (see *Limits*).

### The register bank

The bank is 2048 words: `BANKS` (256) pages of 8 registers. The register file
reads and writes R0..R7 at bank index `{R14[15:8], reg[2:0]}`. The page
therefore changes as soon as R14 is written, and the next instruction already
sees the new page. A typical subroutine looks like this:

```
        RSUB  ROUTINE, 1        ; push R15 via R13, jump (condition "1" = always)
ROUTINE ADD   0x0100, R14       ; next page: fresh R0..R7
        ...                     ; R8..R12 carry arguments and results
        SUB   0x0100, R14       ; caller's page again
        MOVE  @R13++, R15       ; return
```

An instruction whose destination is R14 writes R14 in full. Its result
replaces the flags it would otherwise have set. Without this rule,
`ADD 0x0100, R14` would lose its result to the flag update. Bit 0 is still
forced to 1.

The bank is a plain RAM and is not cleared by reset. R8..R13 and R15 reset to
0, and R14 resets to 0x0001.

## Instruction encoding

```
 15   12 11    8 7   6 5    2 1   0
[opcode][src reg][smode][dst reg][dmode]      opcodes 0x0..0xE
[ 1111 ][src reg][smode][bm][n][cond ]        jumps and calls
```

| Opcode | Instruction | Effect |
|---|---|---|
| 0 | MOVE | dst := src |
| 1 | ADD  | dst := dst + src |
| 2 | ADDC | dst := dst + src + C |
| 3 | SUB  | dst := dst − src |
| 4 | SUBC | dst := dst − src − C |
| 5 | SHL  | dst <<= src; vacated bits take X; the last bit out goes to C |
| 6 | SHR  | dst >>= src; vacated bits take C; the last bit out goes to X |
| 7 | SWAP | dst := src with its bytes exchanged |
| 8 | NOT  | dst := ~src |
| 9, A, B | AND, OR, XOR | dst := src op dst |
| C | CMP  | flags of dst − src; nothing is written |
| D | (none) | reserved; executed as a no-op that still evaluates its operands |
| E | HALT | stop until reset |
| F | ABRA / ASUB / RBRA / RSUB (`bm` = 00/01/10/11) | conditional jump or call |

Addressing modes, for both `src` and `dst`:

| Mode | Syntax | Operand |
|---|---|---|
| 00 | `Rxx`    | the register |
| 01 | `@Rxx`   | mem[Rxx] |
| 10 | `@Rxx++` | mem[Rxx], then Rxx += 1 |
| 11 | `@--Rxx` | Rxx −= 1, then mem[Rxx] |

There is no immediate mode. R15 has already moved past the instruction word,
so `@R15++` reads the word that follows the instruction and skips over it.
`MOVE @R15++, R0` followed by 0x1234 loads a constant.

A jump is taken when `R14[cond] ^ n` is 1. Its target comes from the source
operand:

- ABRA and ASUB load it into R15.
- RBRA and RSUB add it to R15. R15 then already points past the instruction
  and any constant word.
- ASUB and RSUB first push the return address: `R13 -= 1; mem[R13] := R15`.
  A call therefore returns with `MOVE @R13++, R15`.

### Which flags each instruction changes

The architecture defines the flags but not which instructions update them.
This implementation uses these rules:

| Instructions | Flags updated |
|---|---|
| ADD, ADDC, SUB, SUBC, CMP | X C Z N V |
| MOVE, SWAP, NOT, AND, OR, XOR | X Z N |
| SHL | C only |
| SHR | X only |
| HALT, jumps, 0xD | none |

The shift count is the whole 16-bit source value. A count of 0 changes
nothing. A count of 16 or more fills the whole word with the fill bit.

## How an instruction executes

`qnice_cpu` is a multi-cycle sequencer. It makes at most one memory access
and one register write per clock:

| State | Work | Cycles |
|---|---|---|
| FETCH  | read mem[R15]; R15 += 1 | 1 |
| DECODE | latch the instruction | 1 |
| SRC    | address the source operand; apply ++/--; HALT stops here | 1 |
| SRC_W  | capture the source word (memory modes only) | 0/1 |
| DST    | address the destination and keep its address; read memory only if the old value is used | 1 |
| DST_W  | capture the destination word | 0/1 |
| EXEC   | ALU, flags, write-back to a register or to memory | 1 |
| BRANCH | test the condition; ABRA and RBRA load R15 here | 1 |
| PUSH, JUMP | calls: push R15, then load the target | 2 |

Resulting cycle counts:

- A register-to-register operation takes 5 cycles.
- Each memory operand that has to be read adds one cycle.
- A jump with an inline target takes 5 cycles, and a taken call takes 7.
- HALT takes 3 cycles.

The summation example below (4096 loop passes) takes 65,551 cycles.

The source operand is always evaluated before the destination. An operand
such as `@R1++` used on both sides therefore sees the register after the
first increment. The source of a jump is evaluated, including its ++/--
side effect, even when the jump is not taken.

## Memory, I/O and the bus

The core's bus is simple:

- `mem_addr`, `mem_wdata`, `mem_re` and `mem_we` are valid in the cycle of a
  request.
- Read data must be on `mem_rdata` in the next cycle.
- A write completes at the clock edge.
- There are no wait states.

Memory is word addressed: 64K words of 16 bits.

`qnice_system` splits the bus by address. The top 1k words, 0xFC00..0xFFFF,
are the I/O window and appear on the `io_*` ports. All other addresses go to
the internal `qnice_ram`. The RAM's own top 1k words are never reached. An
I/O controller must follow the memory timing: it returns read data in the
cycle after `io_re`.

## Modules

| File | Contents |
|---|---|
| `rtl/qnice_pkg.sv` | opcodes, addressing and jump modes, the instruction and flag structs, constants |
| `rtl/qnice_decoder.sv` | instruction fields and class bits |
| `rtl/qnice_addr_unit.sv` | effective address and register update for one operand |
| `rtl/qnice_alu.sv` | results and flags of opcodes 0..D |
| `rtl/qnice_cond.sv` | jump condition |
| `rtl/qnice_regfile.sv` | banked R0..R7, R8..R13, R14 (SR) and R15 (PC) |
| `rtl/qnice_cpu.sv` | the sequencer, which uses all of the above |
| `rtl/qnice_ram.sv` | synchronous single-port memory |
| `rtl/qnice_io_decoder.sv` | steering between RAM and the I/O window |
| `rtl/qnice_system.sv` | top level: core, RAM and I/O decoder |

Parameters:

- `BANKS` (default 256) sets the number of register pages, on
  `qnice_regfile`, `qnice_cpu` and `qnice_system`.
- `ADDR_W` (default 16) sets the RAM size as 2^`ADDR_W` words, on `qnice_ram`
  and `qnice_system`.
- `IO_BASE_ADDR` (default 0xFC00) sets the start of the I/O window, on
  `qnice_io_decoder`.

## Simulating

Each testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --top-module tb_qnice_system \
    -y rtl -y tb +libext+.sv rtl/qnice_pkg.sv tb/qnice_ref_pkg.sv \
    tb/tb_qnice_system.sv -o sim && ./obj_dir/sim
```

The same command works for the unit testbenches, with `tb_qnice_alu`,
`tb_qnice_regfile`, `tb_qnice_cpu` and so on. The `-Wno-fatal` option may be
needed, because the package constants that a given module does not use
produce lint warnings.

- `tb/qnice_ref_pkg.sv` is an instruction-level reference model. It executes
  whole instructions directly from the rules above, with the same flag
  choices, and has no notion of cycles.
- `tb_qnice_cpu` runs the summation program. It checks the final registers,
  the instruction count and the cycle count. It then runs 40 random
  instruction streams and compares registers against the model after every
  instruction, and memory and the whole register bank at the end.
- `tb_qnice_system` runs the complete machine at its default size. It runs
  the summation program, a hand-assembled program and 20 random streams with
  I/O accesses.
  - The hand-assembled program makes relative and absolute calls with page
    switches inside the subroutines. It uses every addressing mode on both
    operands and every ALU operation. It writes to and reads from the I/O
    window, takes and skips conditional jumps, and halts.
  - The testbench counts each mechanism: I/O reads and writes, page switches,
    calls, taken and untaken jumps, every addressing mode and every opcode.
    A mechanism that never occurs counts as a failure.
  - An I/O controller is stood in for by a 1k-word scratch memory.
- Unit testbenches check the ALU, register file, address unit, condition unit,
  decoder, RAM and I/O decoder against values computed in the testbench.

### Reference workload

The program below sums 0x1000 + 0x0FFF + … + 1:

```
0000 0F80 0000   MOVE 0x0000, R0
0002 0F84 1000   MOVE 0x1000, R1
0004 1100        ADD  R1, R0          ; LOOP
0005 3F84 0001   SUB  0x0001, R1
0007 FF8B 0004   ABRA LOOP, !Z
0009 E000        HALT
```

It executes 12,291 instructions and ends with:

- R0 = 0x0800, the low 16 bits of 0x800800;
- R14 = 0x0009 (Z and the constant 1);
- R15 = 0x000A.

Both testbenches check these values. The system testbench also counts
operand accesses by addressing mode during this run. Operands are read
12,288 times in register mode and 8,194 times as `@Rxx++`. They are written
8,194 times in register mode. These are the access statistics of the
architecture's reference emulator for the same program.

## Design choices beyond the architecture definition

The following points are choices made for this implementation. Only the
register roles, the encodings, the addressing modes and the memory map are
fixed by the architecture definition.

- The multi-cycle state sequence, the cycle counts and the one-cycle bus
  timing.
- The flag rules in the table above.
- C as borrow after a subtraction.
- `SUB src, dst` computes dst − src. The architecture's introduction can be
  read the other way round, but its instruction list and its example
  programs use dst − src.
- Opcode 0xD as a reserved no-op.
- The behaviour of shifts by 0 or by 16 and more.
- R14 written as a destination overrides the flag update.
- Reset values, taken to match a freshly started machine: all zero except
  R14 = 0x0001.
- The call push is a pre-decrement of R13, which is the mirror of the
  `@R13++` return.
- The source of a jump is evaluated even when the jump is not taken.

## Limits

- **Interrupts.** The architecture names an interrupt flag (I) and an
  interrupt enable (M) but no interrupt input, vector or return sequence.
  Both bits are plain storage here.
- **I/O controllers.** No I/O controllers are included. Only the address
  window and its bus exist.
- **Speed.** The core is a straightforward multi-cycle design with no
  pipelining or prefetch.
- **Bank RAM.** The register bank uses asynchronous reads. On an FPGA it maps
  to distributed RAM, not block RAM.
