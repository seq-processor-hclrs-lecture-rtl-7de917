# SEQ: a single-cycle Y86-64 processor

This is a processor that runs one whole instruction per clock cycle. The
instruction set is Y86-64, a small teaching subset of x86-64: fifteen
64-bit registers, three condition flags, and twelve instructions. Those
instructions are halt, nop, register/immediate/memory moves, conditional
moves, four ALU operations, conditional jumps, call/ret and push/pop.

Nothing in the core is pipelined or stored between stages. Each instruction
flows through six stages, all inside one clock period:

| stage      | what happens                                                     |
|------------|------------------------------------------------------------------|
| fetch      | read 10 bytes at PC; split out icode:ifun, rA, rB, valC; valP = PC + length |
| decode     | read two registers: valA = R[srcA], valB = R[srcB]               |
| execute    | valE = aluB OP aluA; evaluate the condition Cnd; OPq sets new flags |
| memory     | read valM from, or write to, the data memory                     |
| write back | R[dstE] <- valE, R[dstM] <- valM                                 |
| PC update  | next PC = valP, valC or valM                                     |

The stages are combinational. All state changes at one rising clock edge:
the PC, the register file, the data memory, the condition codes and the Stat
register. Because of that, the order of events inside a cycle has no effect
on the result. Reads of the register file and memory see the old values, and
every write lands together at the edge.

## Instruction encoding

The first byte of an instruction is `icode:ifun`, with icode in the high
nibble. Instructions that name registers have a second byte `rA:rB`, with rA
in the high nibble. Instructions with a constant then carry 8 little-endian
bytes. The instruction port delivers 10 bytes (`i10bytes`), the length of the
longest instruction. Bit 0 of `i10bytes` is the least significant bit of the
byte at PC.

| icode | instruction          | bytes | fields             |
|-------|----------------------|-------|--------------------|
| 0     | halt                 | 1     |                    |
| 1     | nop                  | 1     |                    |
| 2     | rrmovq / cmovXX      | 2     | rA, rB, ifun = condition |
| 3     | irmovq V, rB         | 10    | rA = F, rB, V      |
| 4     | rmmovq rA, D(rB)     | 10    | rA, rB, D          |
| 5     | mrmovq D(rB), rA     | 10    | rA, rB, D          |
| 6     | OPq rA, rB           | 2     | ifun: 0 add, 1 sub, 2 and, 3 xor |
| 7     | jXX Dest             | 9     | ifun = condition, Dest |
| 8     | call Dest            | 9     | Dest               |
| 9     | ret                  | 1     |                    |
| A     | pushq rA             | 2     | rA, F              |
| B     | popq rA              | 2     | rA, F              |

Conditions (ifun of jXX and cmovXX): 0 always, 1 le, 2 l, 3 e, 4 ne, 5 ge,
6 g. Registers are numbered 0 %rax, 1 %rcx, 2 %rdx, 3 %rbx, 4 %rsp, 5 %rbp,
6 %rsi, 7 %rdi, then 8..14 for %r8..%r14. Register number 0xF means "none".
All of these are in `seq_pkg`.

## The control muxes

The datapath is mostly wires. What makes it a processor is a set of
multiplexers whose select lines depend only on icode, plus Cnd in two
places. Every instruction is just a different setting of these muxes.

**Register numbers** (`decode_ctl`)

| instruction     | srcA | srcB | dstE            | dstM |
|-----------------|------|------|-----------------|------|
| rrmovq / cmovXX | rA   | –    | rB if Cnd, else – | –  |
| irmovq          | –    | –    | rB              | –    |
| rmmovq          | rA   | rB   | –               | –    |
| mrmovq          | –    | rB   | –               | rA   |
| OPq             | rA   | rB   | rB              | –    |
| call, ret       | –    | %rsp | %rsp            | –    |
| pushq           | rA   | %rsp | %rsp            | –    |
| popq            | rA   | %rsp | %rsp            | rA   |

A cmov whose condition fails still moves through the datapath. It just
writes to register "none". popq is the one instruction that uses both write
ports: %rsp gets valE (old %rsp + 8) and rA gets valM. If both ports name the
same register (`popq %rsp`), the M port wins. popq reads rA on port A even
though the value is not used. Reading a register needlessly does no harm.

**ALU inputs** (`exec_ctl`). The ALU always computes valE = aluB OP aluA.
For subtraction that gives rB - rA, which is what subq rA, rB means.

| instruction      | aluA | aluB | op     | valE            |
|------------------|------|------|--------|-----------------|
| rrmovq / cmovXX  | valA | valB = 0 | add | valA            |
| irmovq           | valC | valB = 0 | add | V               |
| rmmovq, mrmovq   | valC | valB | add    | D + R[rB]       |
| OPq              | valA | valB | ifun   | R[rB] OP R[rA]  |
| pushq, call      | 8    | valB | sub    | %rsp - 8        |
| popq, ret        | 8    | valB | add    | %rsp + 8        |

aluB is wired straight from register port B. For rrmovq and irmovq, srcB
is "none", which reads as 0, so the ALU passes aluA through. The stack
pointer moves through the ordinary ALU; there is no separate adder. Only
OPq writes the condition codes.

**Data memory** (`mem_ctl`)

| instruction | access | address           | data written |
|-------------|--------|-------------------|--------------|
| rmmovq      | write  | valE              | valA         |
| mrmovq      | read   | valE              |              |
| pushq       | write  | valE (new %rsp)   | valA         |
| call        | write  | valE (new %rsp)   | valP (return address) |
| popq, ret   | read   | valB (old %rsp)   |              |

**Next PC** (`pc_update`): valC for call and for a jXX whose condition
holds, valM for ret, valP otherwise.

**Condition** (`cond_unit`). This block looks only at the stored flags
{ZF, SF, OF}. "Less than" is SF xor OF. The conditions are le = lt | ZF,
l = lt, e = ZF, ne = !ZF, ge = !lt, g = !lt & !ZF. An undefined condition
code is false.

## Status and stopping

Every instruction gets a status:

- **ADR** (3): the PC is outside memory, the instruction would run past the
  end of memory, or a data access's 8 bytes do not all fit in memory.
- **INS** (4): the icode is undefined (greater than 0xB). Only icode is
  checked, not ifun.
- **HLT** (2): the instruction is halt.
- **AOK** (1): anything else.

An instruction whose status is not AOK changes no state at all. The Stat
register takes its status, and because that register is sticky the machine
stays frozen until reset. `halted` shows this. After a halt the PC still
points at the halt instruction. `cycles` counts executed cycles, the
stopping instruction included.

## Memory

`y86_memory` is a single byte array (`MEM_BYTES`, default 8192) that holds
both program and data. It has two ports:

- The **instruction port** is combinational: `pc` in, `i10bytes` out.
  Bytes past the end of memory read as zero.
- The **data port** reads combinationally, so `mem_output` is valid in the
  same cycle. Writes are synchronous: with `mem_writebit` high the
  little-endian 8-byte word appears at the next clock edge.

The memory also has a byte-wide loader port, which has priority over the
data port, and a debug read port. As written, the data port needs a
combinational read of 8 bytes and the instruction port a read of 10 bytes
at arbitrary byte alignment. That suits simulation or an FPGA with
distributed RAM. A block-RAM or SRAM implementation would need a clocked,
word-organised memory, and with it a different cycle structure.

## The smaller processors

SEQ is reached in steps, and each step is a working processor of its own.
Three of them are provided next to SEQ. They share SEQ's interface
conventions (reset, loader, Stat, freeze on stop) and its memory, register
file and register-bank modules.

- **`nopjmp_cpu`** runs nop (`10`) and jmp (`70 Dest`). The PC register
  feeds the instruction memory. A split step takes out icode and the
  destination valC. A one-bit function of icode ("1 if jmp, 0 if nop")
  then picks the next PC: valC, or valP = PC + 1. halt stops it, and any
  other byte is INS.
- **`add_cpu`** runs addq only. The PC always advances by 2. Register
  port A reads rA, port B reads rB, and an adder writes R[rA] + R[rB] back
  to rB through the E port. There are no condition codes. Because addq
  cannot make a non-zero value from zeroed registers, its testbenches
  preset registers directly.
- **`mov_cpu`** runs rrmovq, irmovq, rmmovq and mrmovq. A "convert opcode"
  function of icode drives four controls:
  - the PC mux: +2 for rrmovq, +10 for the others;
  - the dstE mux: rB, rA for mrmovq, or none for rmmovq;
  - the write-data mux: R[rA], the immediate, or memory data out;
  - the memory write enable.

  An adder forms the address R[rB] + D, and memory data in is R[rA]. Only
  the register file's E write port is used.

`y86_cpus` is the top level. It places the four processors side by side.
They share only `clk`; each keeps its own ports, prefixed `seq_`, `nj_`,
`add_` and `mov_`.

## Interface of `seq_cpu`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst | in | 1 | clock; synchronous active-high reset |
| load_we, load_addr, load_data | in | 1, 64, 8 | write one program byte per clock |
| stat, halted | out | 3, 1 | Stat register; Stat is not AOK |
| pc, cycles, cc | out | 64, 64, 3 | current PC, cycles run, {ZF,SF,OF} |
| dbg_reg / dbg_reg_val | in / out | 4 / 64 | read any register |
| dbg_addr / dbg_mem_val | in / out | 64 / 64 | read any 8-byte word |

Reset puts PC = 0, all registers = 0, flags Z=1 S=0 O=0, Stat = AOK. The
memory is not cleared. To run a program:

1. Hold `rst` high.
2. Write every byte you care about through the loader port.
3. Release `rst`. The first instruction executes at the next rising edge.

## Files

| file | contents |
|------|----------|
| `rtl/y86_cpus.sv` | top level: the four processors side by side |
| `rtl/nopjmp_cpu.sv`, `rtl/add_cpu.sv`, `rtl/mov_cpu.sv` | the three smaller processors |
| `rtl/seq_pkg.sv` | opcodes, status codes, ALU operations, conditions, flag struct |
| `rtl/seq_cpu.sv` | top level: the stages wired together, status and commit logic |
| `rtl/register_bank.sv` | a register with a mandatory initial value (PC, condition codes) |
| `rtl/fetch_unit.sv` | instruction split, length and valP |
| `rtl/decode_ctl.sv` | srcA/srcB/dstE/dstM muxes |
| `rtl/regfile.sv` | 15 x 64-bit registers, 2 read and 2 write ports |
| `rtl/exec_ctl.sv` | aluA mux, ALU operation, set_cc |
| `rtl/alu.sv` | add/sub/and/xor with ZF, SF, OF |
| `rtl/cond_unit.sv` | Cnd from flags and ifun |
| `rtl/mem_ctl.sv` | data memory enables, address and data muxes |
| `rtl/y86_memory.sv` | unified byte memory, instruction and data ports |
| `rtl/pc_update.sv` | next-PC mux |
| `rtl/stat_reg.sv` | sticky status register |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_seq_muxes.sv` | mux settings inside SEQ for six chosen instructions |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_seq_cpu -y rtl -y tb +libext+.sv -Irtl \
  rtl/seq_pkg.sv tb/tb_seq_cpu.sv -o sim
./obj_dir/sim
```

`tb_y86_cpus` runs all four processors at their default size, using
programs with hand-worked results:

- the nop/jmp example on the nop/jmp CPU;
- two additions on the add CPU;
- a constant moved through registers and memory on the mov CPU;
- a called loop with push, pop, cmov and ret on SEQ.

SEQ then runs the nop/jmp and mov programs as well and must end exactly as
the smaller processors did. `tb_nopjmp_cpu`, `tb_add_cpu` and `tb_mov_cpu`
check the small processors cycle by cycle against their own reference
models, using random programs.

`tb_seq_muxes` looks inside SEQ while it runs `addq %r8,%r9`, `rmmovq`,
`call`, `ret`, `irmovq` and `popq`. For each one it checks srcA, srcB, dstE,
dstM, the ALU input and operation, valE, the memory enables, address and
data, valM and the next PC against a table worked out by hand.

`tb_seq_cpu` tests SEQ on its own at its default size. It contains its
own instruction-set model of Y86-64, written straight from the architecture
rather than from the RTL. The model runs in lockstep with the core: after
every clock edge the PC, Stat, flags and all registers must agree, and the
whole memory must agree at the end of each program. The programs are:

- the nop/jmp example `nop; jmp 0x13; jmp 0x0a; jmp 0x1c; nop; nop; halt`,
  which must halt at PC 0x1e after 7 cycles;
- a directed program that sums an array in a called function (expected
  result 0x4321) and exercises cmov, push/pop, store/load and a taken je;
- four error programs: INS, a jump outside memory, a load outside memory,
  and an instruction cut off by the end of memory;
- 60 random programs of 60 instructions each, run for up to 400 cycles.

The testbench also counts every mechanism: each opcode, each ALU operation,
taken and untaken cmov and jXX, condition-code writes, dual register writes,
each stop status, and the freeze after a stop. It fails if any of them never
happened. It runs in well under a second.

The block testbenches drive random or exhaustive inputs and compare with
expected values computed in the testbench.

## Where the design makes its own choices

The stage structure, the mux set, the register file (15 registers, 2 read
and 2 write ports, 0xF = none), the 10-byte instruction port, the
same-cycle memory read and next-cycle write, the ALU operation codes and the
status names are the classic SEQ organisation. The following are
choices made here:

- **Condition flags.** The conditions le and l include OF (SF xor OF), as
  the Y86-64 architecture defines them. A simpler SF | ZF and SF form is
  equivalent only when no overflow has occurred.
- **Data written by push and rmmovq** is valA = R[rA]. It reaches the
  memory data input through the same mux that selects valP for call.
- **popq and ret** take the memory address from valB, the old %rsp read on
  port B. srcB is %rsp for all stack instructions.
- **Memory size, error rules and freezing** (ADR on any out-of-range
  access, no state change on a non-AOK instruction, sticky Stat) are this
  design's. So are the reset values of the registers and flags, the loader
  and debug ports, and the M-port priority on a write conflict.
- **Instruction validity** checks icode only. An OPq with ifun 4..15
  behaves like ifun & 3; an undefined jXX or cmovXX condition is never
  taken.

Pipelining controls (stall and bubble inputs on the register banks)
belong to a pipelined design and are not part of this one.
