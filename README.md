# A single-cycle Y86-64 processor (SEQ)

This is a processor for the Y86-64 teaching instruction set, a small subset of
x86-64. It executes one whole instruction per clock cycle. Between two rising
clock edges, signals flow through a purely combinational datapath:

fetch → decode (register read) → execute (ALU, condition) → memory → write back

At the next edge, every state element updates at once: the PC, the register
file, the condition codes and the data memory. There is no pipeline, no
stalling and no forwarding. The clock period must cover the longest path
through the datapath.

The design is built the way the SEQ processor is usually taught. First, list
what each instruction has to do. Then place a MUX wherever two instructions
need different values on the same wire. Each MUX is steered by a small logic
function of the opcode. Most of the design is therefore in those MUXes and the
table that drives them (see *Control: how the MUXes are set*).

## State and timing

| state element | size | written when |
|---|---|---|
| PC | 64 bits | every rising edge (unless the processor has stopped) |
| register file | 15 × 64 bits (`%rax`…`%r14`) | rising edge, through two write ports E and M |
| condition codes | SF, ZF | rising edge, only by `OPq` (add/sub/and/xor) |
| memory | `MEM_BYTES` bytes (default 1024), shared by instructions and data | rising edge, when the memory write enable is set |

Components that only read (instruction memory, register read ports, ALU,
condition MUX, data-memory read) are combinational. Their outputs settle as
soon as their inputs arrive. Components that write act only at the rising
edge. So an instruction sees the state left by the one before it, and CPI is
exactly 1.

Instructions and data live in one byte array. A program can therefore read, and
even overwrite, its own code. A store becomes visible to the instruction fetch
of the next cycle.

## The datapath, stage by stage

**Fetch** (`y86_fetch`). The memory returns the 10 bytes at the PC, the
longest instruction. These bytes are split into:
- `icode:ifun`: the two nibbles of byte 0;
- `rA`, `rB`: the two nibbles of byte 1, when present;
- `valC`: a 64-bit little-endian constant, from bytes 2–9 or 1–8.

The length is 1, 2, 9 or 10 bytes, decided by `icode`. An adder forms
`valP = PC + length`. An undefined `icode`, or an `ifun` that the instruction
does not define, marks the instruction invalid.

**Decode** (`y86_regfile` plus the `srcA`/`srcB` MUXes). The register file
has two combinational read ports. `R[srcA]` is called `valA` and `R[srcB]`
is called `valB`. Register number `0xF` means "no register": reading it gives
0, and writing to it does nothing. The control logic uses `0xF` to switch off a
write port.

**Execute** (`y86_alu`, `y86_cc`). The ALU computes `valE = aluB OP aluA`
for add, sub, and or xor. Each operand goes through its own MUX:
- `aluA` is `valA`, `valC` or the constant 8;
- `aluB` is `valB` or 0.

Those MUXes let one adder serve several purposes:
- `rB + displacement` for memory addresses;
- `%rsp ± 8` for the stack;
- `valA + 0` for `rrmovq`;
- `valC + 0` for `irmovq`.

The condition logic is a 7-input MUX over the stored flags, selected by `ifun`.
Its output is `Cnd`:

| ifun | 0 always | 1 le | 2 l | 3 e | 4 ne | 5 ge | 6 g |
|---|---|---|---|---|---|---|---|
| Cnd | 1 | SF \| ZF | SF | ZF | ¬ZF | ¬SF | ¬SF ∧ ¬ZF |

**Memory** (`y86_memory`). The data port reads the 64-bit word at its
address combinationally, giving `valM`. It writes at the edge. The address is
`valE`, or `valB` for `popq` and `ret`. For those two, `valB` is the old
`%rsp`, the address of the stack top being popped. The data written is
`valA`, or `valP` for `call`. `valP` is the return address, PC + 9.

**Write back.** Port E writes `valE` to `dstE`, and port M writes `valM` to
`dstM`. `popq` is the one instruction that needs both ports: the popped value
goes to `rA` and `%rsp + 8` goes to `%rsp`. A conditional move whose
condition fails sets `dstE` to `0xF`, so nothing is written.

**PC update** (`y86_pc_update`). The next PC is usually `valP`. The
exceptions are:
- `call` takes `valC`;
- a taken `jXX` takes `valC`;
- `ret` takes `valM`;
- `halt` and invalid instructions keep the current PC.

## Control: how the MUXes are set

`y86_control` is the set of logic functions that steer the MUXes. Its one
input is the fetched instruction, plus `Cnd`. F stands for `0xF` (no
register). A dash means the value is not used.

| instruction | srcA | srcB | dstE | dstM | aluA | aluB | ALU | mem addr | mem data | mem write | next PC |
|---|---|---|---|---|---|---|---|---|---|---|---|
| halt | F | F | F | F | – | – | – | – | – | no | hold |
| nop | F | F | F | F | – | – | – | – | – | no | valP |
| rrmovq / cmovXX | rA | F | Cnd ? rB : F | F | valA | 0 | add | – | – | no | valP |
| irmovq | F | F | rB | F | valC | 0 | add | – | – | no | valP |
| rmmovq | rA | rB | F | F | valC | valB | add | valE | valA | yes | valP |
| mrmovq | F | rB | F | rA | valC | valB | add | valE | – | no | valP |
| OPq | rA | rB | rB | F | valA | valB | ifun (sets CC) | – | – | no | valP |
| jXX | F | F | F | F | – | – | – | – | – | no | Cnd ? valC : valP |
| call | F | %rsp | %rsp | F | 8 | valB | sub | valE | valP | yes | valC |
| ret | F | %rsp | %rsp | F | 8 | valB | add | valB | – | no | valM |
| pushq | rA | %rsp | %rsp | F | 8 | valB | sub | valE | valA | yes | valP |
| popq | rA | %rsp | %rsp | rA | 8 | valB | add | valB | – | no | valP |

`rrmovq` and `irmovq` both pass through the ALU, with `aluB = 0`. This
avoids a separate MUX in front of the register file's E write port. It is
the simpler of the two usual ways to route those moves.

## Instruction encoding

Standard Y86-64. `%rsp` is register 4. Constants are little-endian.

| icode | instruction | bytes | layout |
|---|---|---|---|
| 0 | halt | 1 | `00` |
| 1 | nop | 1 | `10` |
| 2 | rrmovq / cmovXX | 2 | `2fn rA:rB` |
| 3 | irmovq V, rB | 10 | `30 F:rB V` |
| 4 | rmmovq rA, D(rB) | 10 | `40 rA:rB D` |
| 5 | mrmovq D(rB), rA | 10 | `50 rA:rB D` |
| 6 | OPq (0 add, 1 sub, 2 and, 3 xor) | 2 | `6fn rA:rB` |
| 7 | jXX Dest | 9 | `7fn Dest` |
| 8 | call Dest | 9 | `80 Dest` |
| 9 | ret | 1 | `90` |
| A | pushq rA | 2 | `A0 rA:F` |
| B | popq rA | 2 | `B0 rA:F` |

## Where this design departs from full Y86-64

- **No overflow flag.** The condition codes are only SF and ZF, so `le` is
  `SF | ZF` and `l` is `SF`. Full Y86-64 uses `(SF ^ OF) | ZF` and
  `SF ^ OF`. Signed comparisons whose subtraction overflows therefore give the
  wrong answer here.
- **No address error.** Addresses wrap modulo `MEM_BYTES`, and there is no
  `ADR` status. The status output has three values: `AOK` (running), `HLT`
  (at a `halt`) and `INS` (at an invalid instruction). In both stopped states
  the PC holds, and the control logic issues no writes. An assertion in
  `y86_seq` checks this.
- **Write-port priority.** If `dstE == dstM` (`popq %rsp`), port M wins, so
  `%rsp` receives the popped value.
- **Reset values.** PC = `RESET_PC` (0), all registers 0, ZF = 1, SF = 0.
- **Source-register detail.** `popq` reads `rA` on port A even though it does
  not use the value. This is harmless.

## Using `y86_seq`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything acts on the rising edge |
| `rst` | in | 1 | synchronous, active-high reset; while high the datapath writes nothing |
| `load_we`, `load_addr`, `load_data` | in | 1, 64, 8 | write one byte of memory per cycle (any time; intended for use during reset) |
| `pc` | out | 64 | current PC |
| `stat` | out | 2 | `AOK` / `HLT` / `INS` for the instruction at `pc` |
| `cc` | out | 2 | stored `{SF, ZF}` |
| `dbg_reg_id`, `dbg_reg_val` | in, out | 4, 64 | combinational read of any register |

Parameters: `MEM_BYTES` (power of two, default 1024) and `RESET_PC`
(default 0).

To run a program:
1. Hold `rst` high.
2. Write the image byte by byte through the load port.
3. Release `rst`.
4. Wait for `stat` to leave `AOK`.

The number of cycles equals the number of instructions executed.

Files: `rtl/y86_pkg.sv` holds the shared types: opcodes, the control-word
struct and the MUX select enums. Each other file in `rtl/` holds one block
named above. `y86_seq.sv` wires them together, including the `aluA`, `aluB`,
memory-address and memory-data MUXes.

## Verification

Every block has a self-checking testbench in `tb/`, and each ends by printing
`TB_RESULT checks=N failures=M`.
- `tb_y86_seq` runs the whole processor at its default size.
  - It assembles programs in SystemVerilog (`tb/y86_iss_pkg.sv` holds a small
    assembler class and an instruction-level reference model).
  - It runs the processor in lockstep with the model. After every cycle it
    compares the PC, all registers, the flags and the status, and at the end
    it compares all of memory.
  - Program 1 sums an array and finds its maximum, through two called
    functions. It checks the results against values computed in the
    testbench, and checks that 99 instructions take 99 cycles.
  - It also runs 100 random programs (random jumps, calls, returns and stack
    and memory traffic) and one program with an invalid instruction.
  - It counts how often each mechanism was used and fails if any never was:
    every instruction, cmov and jXX both taken and not taken, memory read and
    write, flag update, a write disabled by `0xF`, both write ports at once,
    halt, and invalid instruction.
- `tb_y86_mux_exercises` runs the classic "which value does each MUX select"
  questions on the real processor. The instructions are `addq %r8,%r9`,
  `rmmovq`, `irmovq`, `mrmovq`, `jle` (not taken and taken), `cmove` (not
  taken and taken), `call`, `pushq`, `popq` and `ret`. For each, it checks
  `aluA`, `aluB`, `valE`, `dstE`, `dstM`, the memory address, the memory
  data, the write enable, the next PC and the register written, against
  values worked out by hand.

To simulate with plain Verilator 5, for example the processor test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/y86_pkg.sv tb/y86_iss_pkg.sv tb/tb_y86_seq.sv --top-module tb_y86_seq
./obj_dir/Vtb_y86_seq
```

The block testbenches build the same way, with their own `tb_*.sv` file and
top module. Only `tb_y86_fetch`, `tb_y86_seq` and `tb_y86_mux_exercises` need
`tb/y86_iss_pkg.sv`. Each testbench has a watchdog and finishes in well under
a second.

## Scope

Only the single-cycle processor is implemented. Pipelining is introduced here
only by analogy, with washer, dryer and folding table, where overlapping loads
raise throughput to one load per 0.83 h without shortening any one load.
There is no pipelined processor, so none is included.
