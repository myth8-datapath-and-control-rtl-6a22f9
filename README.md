# MYTH8: a microprogrammed 8-bit CPU

MYTH8 is a deliberately small teaching processor. It has an 8-bit datapath, eight
registers, an ALU with eight functions and a memory interface with a `wait` handshake.
All of these are steered by one 30-wire control word per clock cycle. The word comes from a
control store (a ROM) addressed by a micro-program counter. A small sequencer picks the next
address. It can test one status wire and can add the instruction's opcode to a base address.
The machine's instruction set is therefore not wired into the logic. It is a set of short
control programs in the ROM: a fetch program, and one program per opcode. Change the ROM and
you have a different instruction set on the same hardware.

This repository holds synthesizable SystemVerilog for the whole CPU. The ROM holds the fetch
cycle and the seven-instruction "tiny" instruction set. Each block has a self-checking
testbench. There is also an end-to-end testbench that runs programs on the CPU next to an
instruction-level reference model.

## Block map

```
                  +-------------------- myth8_cpu ----------------------------+
                  |                                                           |
  upc <-----------+-- myth8_sequencer <-- branch fields --+                   |
                  |      ^   ^    ^                       |                   |
                  |  status wait  ir.opcode         myth8_control_store (ROM) |
                  |      |                                | 30-wire ctrl_t    |
                  |  +---+------------ myth8_datapath ----v----------------+  |
                  |  | myth8_reg_select -> myth8_regfile -> a,b -> myth8_alu |  |
                  |  |        ^                  ^ result mux <-- m        |  |
                  |  |   ir fields           MDR, const4, const8           |  |
                  |  |  myth8_ir  <-- mem_rdata --> myth8_mem_if (MAR,MDR)   |  |
                  |  +------------------------------------------------------+  |
                  +---- mem_addr, mem_wdata, mem_read, mem_write, mem_wait ----+
```

| File | Contents |
|---|---|
| `rtl/myth8_pkg.sv` | widths, control-word and micro-instruction structs, encodings, opcodes |
| `rtl/myth8_regfile.sv` | r0..r7, two read ports, one write enable per register |
| `rtl/myth8_alu.sv` | NOT AND OR XOR ADD SUB ADDA SUBA, flags c_out m7 v z |
| `rtl/myth8_mem_if.sv` | MAR and MDR |
| `rtl/myth8_ir.sv` | 16-bit instruction register, field decode, literal extension |
| `rtl/myth8_reg_select.sv` | the "virtual" register selects taken from IR fields |
| `rtl/myth8_datapath.sv` | the above wired together, plus the result multiplexor |
| `rtl/myth8_sequencer.sv` | micro-program counter and next-address logic |
| `rtl/myth8_control_store.sv` | the ROM: fetch and the instruction programs |
| `rtl/myth8_cpu.sv` | top level: datapath + control unit, memory port out |

The memory is not part of the design. `tb/myth8_mem_model.sv` is a behavioural model of it,
for simulation only.

## Registers and the datapath

There are eight 8-bit registers on a single result bus. Each register has its own write
enable. One result can therefore go into any number of registers in one cycle, for example
`r0` and `r5` together. Two independent multiplexors drive the `a` and `b` buses, and both
may select the same register. Reads are combinational and writes happen at the clock edge.
A line can therefore read a register and overwrite it in the same cycle, as `r7 <- r6 + 1` in
the fetch program does.

The registers have fixed roles, by convention only:

| Registers | Role |
|---|---|
| r0..r3 | the programmer's general-purpose registers (the 2-bit IR fields can name only these) |
| r4..r6 | temporaries of the control programs (fetch uses r6, store uses r4, bzero uses r6) |
| r7 | program counter |

The ALU result `m` goes three ways: to the result multiplexor, to MAR and to MDR. The result
multiplexor chooses what is written back to the registers. The choices are `m`, MDR, the
4-bit literal of the instruction sign-extended, or its 8-bit literal. MAR and MDR are
registers the machine-language programmer cannot see. MAR is the memory address. MDR is the
write data, and it can also be loaded from the memory's read data. Their select codes are 0
for hold. A control program that does not mention them therefore leaves them alone.

### ALU

Every arithmetic function is one 8-bit addition `a + X + c_in`, so a single adder does all
four:

| alu_sel | Name | Result | X |
|---|---|---|---|
| 0 | NOT | ~a | |
| 1 | AND | a & b | |
| 2 | OR | a \| b | |
| 3 | XOR | a ^ b | |
| 4 | ADD | a + b + c_in | b |
| 5 | SUB | a + ~b + c_in (a - b with c_in = 1) | ~b |
| 6 | ADDA | a + c_in | 0 |
| 7 | SUBA | a - 1 + c_in | 0xFF |

The ALU produces four flags:

- `c_out` is the carry out of bit 7.
- `m7` is the sign of the result.
- `v` is signed overflow: the carry out of bit 7 XOR the carry out of bit 6.
- `z` is 1 when the result is zero.

Logic functions give `c_out = v = 0`. After `SUB` with `c_in = 1`, signed comparisons follow
from the flags:

| Comparison | Flags |
|---|---|
| a > b | !z && (m7 == v) |
| a >= b | m7 == v |
| a < b | m7 ^ v |
| a <= b | z \|\| (m7 ^ v) |

Plain subtraction is not enough here, because `127 - (-128)` overflows.

## The control word

One cycle's control word, `myth8_pkg::ctrl_t`, has 30 wires:

| Field | Bits | Meaning |
|---|---|---|
| a_sel, b_sel | 3+3 | register on the a / b bus |
| r_write | 8 | write enables of r0..r7 |
| alu_sel | 3 | ALU function |
| c_in | 1 | carry into bit 0 |
| mar_sel | 1 | 0 hold, 1 load from ALU |
| mdr_sel | 2 | 0 hold, 1 load from ALU, 2 load from memory |
| result_sel | 2 | 0 ALU, 1 MDR, 2 const4 (sign-extended), 3 const8 |
| read, write | 1+1 | memory request, straight to the memory pins |
| ir0_sel, ir1_sel | 1+1 | load the first / second instruction byte from memory |
| ri_sel | 1 | write the register named by the IR's ri field (instead of r_write) |
| rj_sel | 1 | put the register named by rj on the a bus (instead of a_sel) |
| rk_sel | 1 | put the register named by rk on the b bus (instead of b_sel) |

An all-zero word does nothing.

The last three wires let one control program serve every register combination.
`myth8_reg_select` does the substitution:

- `va_sel = rj_sel ? ir.rj : a_sel`
- `vb_sel = rk_sel ? ir.rk : b_sel`
- `vr_write = ri_sel ? onehot(ir.ri) : r_write`

Because the IR fields are two bits, they reach only r0..r3. The temporaries and the PC are
named through `a_sel`, `b_sel` and `r_write`.

## Sequencing: how control programs branch

A micro-instruction is a control word plus a branch (`branch_t`): a condition code, a true
address, a false address and an `index_sel` bit. The next address is

```
upc_next = (cond ? addr_true : addr_false) + (index_sel ? ir.opcode : 0)
```

The condition can be one of these:

- constant true or false
- `m7`
- `c_out`
- `v`
- `z`
- the memory's `wait`

This one rule covers every branch form the control language has:

- `goto L` sets cond = true and both addresses to L.
- `if c then goto L endif` sets the false address to the next line.
- `if c then goto A else goto B endif` uses both addresses.
- The indexed jump `goto opcode[ir_opcode]` sets index_sel with base 5.

Every line carries a branch. There is no implicit "next line": the ROM is written in the
language's canonical form.

The condition is the status of the same cycle. A line can compute something and branch on
the result's flags at once. For example, the left-shift idiom is `a_sel=b_sel=ri, AND, if m7
...`, followed by `ADD ri+ri` with `c_in` set to the old sign. The `wait` condition makes a
line repeat itself until the memory is done.

### Control-store layout (128 words)

| Address | Contents |
|---|---|
| 0..4 | fetch0..fetch4 |
| 5..68 | one entry line per opcode (5 + opcode) |
| 69 | `branch` (taken bzero) |
| 70..72 | store, lines 2..4 |
| 73..74 | load, lines 2..3 |
| 75..127 | unused (goto fetch0) |

### The programs

```
fetch0: a=r7,b=r7,AND, r6_write, mar=LOAD;                    goto fetch1
fetch1: a=r6,ADDA,c_in, r7_write, read, ir0=LOAD;             if wait goto fetch1 else fetch2
fetch2: a=r7,b=r7,AND, r6_write, mar=LOAD;                    goto fetch3
fetch3: a=r6,ADDA,c_in, r7_write, read, ir1=LOAD;             if wait goto fetch3 else fetch4
fetch4:                                                       goto 5 + opcode
op0 noop  :                                                   goto fetch0
op1 add   : ri_sel, rj_sel, rk_sel, ADD;                      goto fetch0
op2 const8: ri_sel, result=CONST8;                            goto fetch0
op3 bzero : rj_sel, SUBA, r6_write, result=CONST4;            if c_out goto fetch0 else branch
  branch  : a=r7, b=r6, ADD, r7_write;                        goto fetch0
op4 move  : ri_sel, rj_sel, ADDA;                             goto fetch0
op5 store : a=r4,b=r4,XOR, r4_write;                          goto st1
  st1     : rj_sel, ADDA, mar=LOAD;                           goto st2
  st2     : a=r4, rk_sel, OR, mdr=LOAD_ALU;                   goto st3
  st3     : write;                                            if wait goto st3 else fetch0
op6 load  : rj_sel, ADDA, mar=LOAD;                           goto ld1
  ld1     : read, mdr=LOAD_MEM;                               if wait goto ld1 else ld2
  ld2     : ri_sel, result=MDR;                               goto fetch0
```

Notes on the less obvious lines:

- **Fetch** copies the PC through r6. MAR gets `r7` while r6 keeps a copy. The next line then
  writes `r6 + 1` back into r7 for as long as the read waits. Each instruction byte is
  latched into its IR half on every cycle of the read. The last such cycle is the one with
  `wait` low, when the data is valid.
- **bzero** puts the sign-extended 4-bit offset into r6 while the ALU computes `rj - 1`. That
  subtraction has no carry out only when `rj = 0`. r7 already points past the instruction,
  so the target is `address + 2 + offset`, with offset -8..+7 bytes.
- **store** needs `rk` on the a bus or passed through the ALU. But `rk_sel` reaches only the
  b bus, and no ALU function passes `b` through. So the program first clears r4 and then
  forms `r4 OR rk`.

## Instruction set and encoding

Every instruction is two bytes. The byte at the lower address is fetched first and forms
IR[15:8].

```
type one:  [15:10] opcode  [9:8] ri  [7:6] rj  [5:4] rk  [3:0] const4 (two's complement)
type two:  [15:10] opcode  [9:8] ri  [7:0] const8
```

| Op | Mnemonic | Effect | Cycles |
|---|---|---|---|
| 0 | noop | none | 6 |
| 1 | add | ri <- rj + rk | 6 |
| 2 | const8 | ri <- const8 | 6 |
| 3 | bzero | if rj == 0: pc <- pc + sext(const4) | 6, taken 7 |
| 4 | move | ri <- rj | 6 |
| 5 | store | Mem[rj] <- rk (r4 is clobbered) | 9 |
| 6 | load | ri <- Mem[rj] | 8 |
| 7..63 | (none) | behave as noop | 6 |

Each cycle count includes the 5 fetch cycles. Every memory wait cycle adds one more cycle:
the fetch does two reads, a load one read and a store one write. Programs see a flat 256-byte
space for code and data, since both the PC and MAR are 8 bits wide.

## Memory interface

| Port | Direction | Meaning |
|---|---|---|
| `mem_addr` | out | MAR |
| `mem_wdata` | out | MDR |
| `mem_read`, `mem_write` | out | come straight from the control word, never both at once (asserted) |
| `mem_rdata` | in | read data, sampled in the cycle `mem_wait` is low |
| `mem_wait` | in | high while the operation is still in progress |

The CPU holds `mem_read` or `mem_write` high and repeats the same microinstruction while
`mem_wait` is high. The access completes in the first cycle with `mem_wait` low. A
zero-wait memory returns read data combinationally in the same cycle and keeps `mem_wait`
low. The memory model in `tb/` does exactly this, with 0..3 wait cycles per access drawn at
random.

## Where this RTL departs from, or adds to, the original description

Followed as described:

- the register file and its controls
- the ALU functions and flags
- MAR and MDR with their hold/load codes
- the two instruction formats and field widths
- the register-select substitution
- the fetch program
- the load, bzero, const8, add and move programs
- the next-address rule
- the control-store placement (fetch 0..4, opcode bases 5..68, the rest from 69)

This design's own choices:

- **Numeric codes.** ALU codes other than ADD = 4 are chosen here, and so are the condition
  codes and the result_sel codes for the two literals. `result_sel` is 2 bits, which brings
  the control word to the stated 30 wires. An earlier one-bit version of that field is
  superseded.
- **IR layout.** The bit positions of the IR fields are chosen here.
- **Memory-interface details.** Reset is asynchronous, active low, and clears all
  registers, so execution starts at address 0. The control store has 128 words. MDR code 3
  means hold.
- **Fetch, second byte.** The program loops on itself while `wait` is high, like the first
  byte. Looping back to the first fetch line would overwrite the first byte.
- **Store.** The program uses the r4 clearing trick described above. Load and store form
  MAR with `ADDA rj` rather than `rj AND rj`, because only one bus can take the rj field.
- **z flag.** `z` is an extra status wire. It is needed for the equality comparisons, but
  no tiny-ISA program uses it.
- **Unused opcodes** run as noop.

Not built:

- **blt, ble.** The signed-compare branches are described as example control programs, but
  not as part of the 7-instruction set. They would need opcodes and four ROM lines each.
  Their hardware path (SUB, m7, v, const4, PC add) exists and is tested in the datapath
  testbench.
- **Microassembler.** No assembler for the textual control language exists; the ROM is
  written directly in `myth8_control_store.sv`.

## Verification

Each block has a testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog.

- `tb_myth8_alu`: corner cases (overflow at ±128, SUBA of zero), plus 4000 random vectors
  checked against integer arithmetic.
- `tb_myth8_regfile`: random multi-register writes against a shadow array, and reads before
  and after the edge.
- `tb_myth8_mem_if`, `tb_myth8_ir`, `tb_myth8_reg_select`, `tb_myth8_sequencer`: random
  stimulus checked against reference expressions.
- `tb_myth8_control_store`: the ROM line by line against the programs above.
- `tb_myth8_datapath`: the testbench acts as the control unit and runs:
  - a multi-register write
  - circular left shifts (eight of them restore the value)
  - right shift by k, done as a left shift by 8 - k followed by a mask
  - the load and store data paths
  - IR-driven register selection and the literals
  - signed comparisons from SUB flags
  - the blt program
- `tb_myth8_cpu` (end to end, all parameters at their defaults): first a directed program
  (a bzero counting loop summing 5..1, then store, load, move, add, noop and an unused
  opcode), then 40 random programs of 150 instructions each.
  - After every instruction it compares r0..r3 and the PC with an instruction-level model.
  - It checks the cycle count against the table above plus the wait cycles.
  - It compares the whole memory at the end of each program.
  - It fails if any opcode, a taken or untaken bzero, a negative offset, or a wait stall on
    fetch, load or store never occurred.

Run any testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/myth8_pkg.sv tb/tb_myth8_cpu.sv --top-module tb_myth8_cpu
./obj_dir/Vtb_myth8_cpu
```

## Changing the instruction set

Add a case to the `microcode` function in `myth8_control_store.sv`:

- the entry line goes at `UADDR_OPBASE + opcode`
- continuation lines go in the free range 75..127
- every line needs an explicit branch (`go`, `if_go`)

For a new instruction, also extend the reference model `ref_step` in `tb/tb_myth8_cpu.sv`
and its cycle table.
