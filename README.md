# An 8-bit multicycle MIPS subset, written as register transfers

This is a small teaching processor. It runs ten MIPS instructions on 8-bit data, with eight
8-bit registers and a 256-byte memory that holds both code and data. The memory port is one
byte wide, so a 32-bit MIPS instruction is fetched one byte at a time, over four cycles.

There is no separate datapath netlist and no separate control unit. The processor is one module
with two parts:

- a next-state function for a 14-state controller;
- a block that names, for each state, which registers load what.

That makes it easy to see what each cycle does. It also makes a handy reference model to hold
a structural version of the same machine against, since the two share the same ports and the
same cycle-by-cycle behaviour.

## Instruction set

All encodings are standard MIPS. Only the low bits of each field are used: three bits of a
register number, the low byte of the 16-bit immediate, and the low six bits of a jump target.

| instruction        | opcode   | funct    | effect                                     | cycles |
|--------------------|----------|----------|--------------------------------------------|--------|
| `lb rt, imm(rs)`   | `100000` |          | rt ← mem[rs + imm]                         | 8      |
| `sb rt, imm(rs)`   | `101000` |          | mem[rs + imm] ← rt                         | 7      |
| `add rd, rs, rt`   | `000000` | `100000` | rd ← rs + rt                               | 7      |
| `sub rd, rs, rt`   | `000000` | `100010` | rd ← rs − rt                               | 7      |
| `and rd, rs, rt`   | `000000` | `100100` | rd ← rs & rt                               | 7      |
| `or rd, rs, rt`    | `000000` | `100101` | rd ← rs \| rt                              | 7      |
| `slt rd, rs, rt`   | `000000` | `101010` | rd ← sign bit of (rs − rt)                 | 7      |
| `addi rt, rs, imm` | `001000` |          | rt ← rs + imm                              | 7      |
| `beq rs, rt, off`  | `000100` |          | if rs = rt: PC ← PC + 4 + 4·off            | 6      |
| `j target`         | `000010` |          | PC ← 4·target                              | 6      |

Notes:

- Register `$0` always reads as zero, and writes to it are dropped.
- Arithmetic wraps modulo 256.
- `slt` is a signed compare that takes the sign of the 8-bit difference and ignores overflow.
  For example, 127 − (−128) counts as "less than".
- An undefined opcode costs five cycles (fetch and decode) and does nothing else.
- An undefined R-type function code writes the old result register to `rd`.

## The controller

The controller's state is the only control the machine has. State codes are 4 bits; codes 0
and 15 are unused and lead back to FETCH1.

```
FETCH1 → FETCH2 → FETCH3 → FETCH4 → DECODE ─┬─ lb, sb ─→ MEMADR ─┬─ lb → LBRD → LBWR ─→ FETCH1
                                            │                    └─ sb → SBWR ─────────→ FETCH1
                                            ├─ R-type → RTYPEEX ─→ RTYPEWR ────────────→ FETCH1
                                            ├─ addi ──→ ADDIEX ──→ RTYPEWR ────────────→ FETCH1
                                            ├─ beq ───→ BEQEX ─────────────────────────→ FETCH1
                                            ├─ j ─────→ JEX ───────────────────────────→ FETCH1
                                            └─ other ──────────────────────────────────→ FETCH1
```

What each state does. All loads take effect at the rising clock edge that ends the state.

| state   | code | register transfers                                             | memory port             |
|---------|------|----------------------------------------------------------------|-------------------------|
| FETCH1  | 1    | IR byte 0 ← mem[PC]; PC ← PC + 1                               | `adr`=PC, `memread`     |
| FETCH2  | 2    | IR byte 1 ← mem[PC]; PC ← PC + 1                               | `adr`=PC, `memread`     |
| FETCH3  | 3    | IR byte 2 ← mem[PC]; PC ← PC + 1                               | `adr`=PC, `memread`     |
| FETCH4  | 4    | IR byte 3 ← mem[PC]; PC ← PC + 1                               | `adr`=PC, `memread`     |
| DECODE  | 5    | A ← reg[rs]; B ← reg[rt]                                       |                         |
| MEMADR  | 6    | RES ← A + imm                                                  |                         |
| LBRD    | 7    | MDR ← mem[RES]                                                 | `adr`=RES, `memread`    |
| LBWR    | 8    | reg[rt] ← MDR                                                  |                         |
| SBWR    | 9    | mem[RES] ← B                                                   | `adr`=RES, `memwrite`   |
| RTYPEEX | 10   | RES ← A op B                                                   |                         |
| RTYPEWR | 11   | reg[rd] ← RES (reg[rt] for addi)                               |                         |
| BEQEX   | 12   | if A = B: PC ← PC + 4·off                                      |                         |
| JEX     | 13   | PC ← 4·target                                                  |                         |
| ADDIEX  | 14   | RES ← A + imm                                                  |                         |

Points that are easy to misread:

- **Fetch order and byte order.** Byte 0 of the instruction register holds the first byte
  fetched, and that byte is instruction bits 31:24. The memory is big-endian to match: the byte
  at an address with low bits `00` is bits 31:24 of its word. A program written as one 32-bit
  hex word per line therefore executes as written.
- **The decode sees all four bytes.** The instruction word is wired straight from the four
  byte registers, so in DECODE the register numbers and the opcode are already valid.
- **The PC has already moved.** After FETCH4 the PC points at the next instruction. A taken
  branch adds 4·off to that value. This gives the usual MIPS target: the address of the
  `beq` plus 4, plus 4·off.
- **MDR loads every cycle.** It copies `memdata` on every clock edge, not only in LBRD. It
  holds the loaded byte in LBWR because LBRD is the cycle that presents the load address.
- **addi shares a state with R-type.** addi reuses RTYPEWR to write its result. That state
  picks `rt` as the destination when the opcode is addi, and `rd` otherwise.

## Memory

`exmemory` holds 2^(WIDTH−2) 32-bit words; at the default `WIDTH = 8` that is 64 words, or
256 bytes.

- **Reads** are combinational: `memdata` follows `adr` in the same cycle. This is what lets
  the processor sample a fetched byte at the end of the same cycle it presents the address.
- **Writes** store one byte at the rising edge when `memwrite` is high. The other three bytes
  of the word are unchanged.
- **Initial contents** are loaded at time zero with `$readmemh` from `INIT_FILE`, one hex word
  per line. The default is `rtl/memfile.dat`, and the path is taken relative to the directory
  the simulator is started in.
- The memory has no read enable. The processor's `memread` output is informative only.

## Interfaces and timing

`mips` and `mips_top` use one clock and a synchronous, active-high reset. Reset sets the state
to FETCH1 and the PC to 0. Nothing else is reset:

- The register file is not reset, so software must write a register before it reads it.
- The other internal registers reload before they are used.

`mips` ports:

| port        | dir | width | meaning                                          |
|-------------|-----|-------|--------------------------------------------------|
| `clk`       | in  | 1     | clock                                            |
| `reset`     | in  | 1     | synchronous reset                                |
| `memdata`   | in  | WIDTH | byte read from memory, used in the same cycle    |
| `memread`   | out | 1     | fetch or load cycle                              |
| `memwrite`  | out | 1     | store cycle                                      |
| `adr`       | out | WIDTH | byte address (PC, or RES in LBRD/SBWR)           |
| `writedata` | out | WIDTH | byte to store (register B)                       |

`mips_top` connects `mips` to `exmemory` and brings out `memread`, `memwrite`, `adr`,
`writedata` and `memdata`, so a test harness can watch the stores.

Parameters:

- `WIDTH` (default 8) sets the data and address width.
- `REGBITS` (default 3) is log2 of the register count.
- `INIT_FILE` sets the memory's initial contents.

Only `WIDTH = 8` is supported, because a fetch brings in exactly one 8-bit byte of the
instruction. Any other value stops elaboration with an error.

Throughput is fixed by the state graph. The machine has no pipeline and no stalls, and one
instruction runs at a time.

## The test program

`rtl/memfile.dat` holds a 19-instruction program followed by its data: bytes 3, 5 and 12 at
addresses 80, 84 and 88. The program:

1. loads the three data bytes (one load uses a non-zero base register);
2. combines them with `or`, `and`, `add`, `slt`, `sub` and `addi`;
3. runs one `beq` that falls through and one that is taken;
4. jumps over two loads that must never run.

It ends by storing 7 to byte address 5, in cycle 104 after reset. It then loops forever on a
jump to itself.

Address 5 lies in code that has already run. The byte there is already `07`, so the store
leaves the program unchanged. The end-to-end test prints `Simulation completely successful`
when it sees exactly that store.

## Where this design had to choose

This design follows a behavioural model of the machine: its state graph, its state and
instruction encodings, its four-byte fetch and its port list. In places that model can be
read more than one way, or breaks the MIPS rules. Wherever that happened, this design took the
standard MIPS meaning:

- **lb/sb address.** lb and sb add the unshifted immediate byte to the base register.
  Reading the model literally would either scale the offset by four or add nothing.
- **Branch offset.** beq scales its offset by four, as `j` does. Taken literally, the model
  adds the raw offset.
- **addi destination.** addi writes `rt`. The model's shared write-back state would write the
  register named by `instr[13:11]`, and for addi those bits are immediate bits.
- **sb address.** sb drives the address it computed in MEMADR onto `adr`. The model names no
  address for that cycle.
- **Instruction word.** The word is assembled with the first fetched byte on top, to match
  the memory's read order. It is combinational, so DECODE sees the current instruction.
- **Memory byte order.** Writes use the same byte order as reads (big-endian). Otherwise a
  stored byte would not read back from the address it was written to.
- **Register `$0`** reads as zero, as in MIPS.

The end-to-end test checks for a store of 7 to address 5. The program that performs that store
is this design's own.

## Verification

Each testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`.

- `tb/tb_mips.sv` tests the processor alone, with the testbench acting as the memory.
  - It runs six random programs. Each has 33 random instructions of every kind, including
    writes to `$0`, branches that are always taken, branches that depend on the data, and
    jumps.
  - An instruction-level reference model in the testbench gives the expected stores and the
    cycle each must happen in.
  - Every store is checked for its address, its data and its cycle. Every instruction fetch
    is checked for its PC.
- `tb/tb_exmemory.sv` tests the memory alone.
  - It checks the preloaded bytes and their byte order.
  - It then runs 2000 random byte writes and reads against a byte-array model, and finishes
    with a read of all 256 bytes.
- `tb/tb_mips_top.sv` runs the test program end to end at the default parameters.
  - It checks the single store, its cycle (104) and the final register values.
  - It counts every controller state, taken and untaken branches, and every R-type function.
    Any one that never occurs is a failure.

Run them with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl --top-module tb_mips_top \
    rtl/mips_pkg.sv rtl/mips.sv rtl/exmemory.sv rtl/mips_top.sv tb/tb_mips_top.sv
./obj_dir/Vtb_mips_top

verilator --binary --timing --assert -Irtl --top-module tb_mips \
    rtl/mips_pkg.sv rtl/mips.sv tb/tb_mips.sv
./obj_dir/Vtb_mips

verilator --binary --timing --assert -Irtl --top-module tb_exmemory \
    rtl/exmemory.sv tb/tb_exmemory.sv
./obj_dir/Vtb_exmemory
```

Verilator warns that some bits of the instruction word are unused. Those are the bits of the
register fields above `REGBITS` and the shift amount, which this subset ignores.

All three tests pass. Each one has also been shown to fail on a deliberately broken copy of
its module:

- a subtractor without the +1 of the two's complement;
- memory writes with the byte lanes reversed;
- the memory's write data wired to the address bus.

All of the RTL is synthesizable. At the default size it comes to about 110 word-level cells,
68 flip-flops, a 64-bit register file and a 2048-bit memory.

## Files

- `rtl/mips_pkg.sv`: state enum, opcodes and function codes
- `rtl/mips.sv`: the processor
- `rtl/exmemory.sv`: the code and data memory
- `rtl/mips_top.sv`: the processor and memory wired together
- `rtl/memfile.dat`: the test program and its data
- `tb/tb_mips.sv`, `tb/tb_exmemory.sv`, `tb/tb_mips_top.sv`: the testbenches
