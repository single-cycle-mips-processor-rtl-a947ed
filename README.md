# Single-cycle MIPS with a configurable approximate adder

A textbook single-cycle MIPS processor in which the adder of the ALU is
replaced by an *approximate* adder whose accuracy the program chooses, one
instruction at a time. The adder cuts the 32-bit addition into four 8-bit
slices that run in parallel, guessing the carry between slices instead of
waiting for it. A correction unit behind the slices repairs the wrong
guesses, and it can repair all of them, some or none. Ordinary `ADD`, `ADDI`
and every address calculation use the fully repaired, exact sum. Two extra
instructions, `ADDC1` and `ADDC2`, accept a less accurate sum in exchange for
a shorter addition path. This suits error-tolerant work such as image or
signal processing.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) and has been
checked with Verilator 5 (lint and simulation) and with the slang front end
of Yosys.

## The approximate adder

### Slices and carry prediction

`approx_adder` splits the operands into `NSEG = 4` slices of `SEG_W = 8`
bits. Each slice is added by its own `sub_adder`:

```
            a[31:24] b[31:24]  a[23:16] b[23:16]  a[15:8] b[15:8]  a[7:0] b[7:0]
                 |                 |                 |               |
  cin3 = a23&b23 |  cin2 = a15&b15 |  cin1 = a7&b7   |   cin0 = 0    |
            [sub_adder 3]     [sub_adder 2]     [sub_adder 1]   [sub_adder 0]
                 |            cout2=kill[2]     cout1=kill[1]   cout0=kill[0]
                 +-------- raw sum s, kill[2:0], pred[2:0] ---------+
                                      |
                              [correction_unit]  <- stages
                                      |
                                    sum
```

Slice 0 gets carry-in 0. Slice k+1 does not wait for the carry out of
slice k. It gets a *predicted* carry, `pred[k] = a[8k+7] & b[8k+7]`, which is
the carry *generate* of the top bit of the slice below (`carry_prediction`).
The longest carry path of the raw sum is therefore eight bits, not 32.

The prediction has one property that the whole scheme relies on. If
`pred[k]` is 1, both top bits of slice k are 1, so slice k certainly produces
a carry. A prediction can be wrong in only one direction: it can miss a carry
that really happens. It never invents one. Every error is therefore a missing
+1 at the bottom of some slice, and the repair needs only additions.

### Correction

The correction unit (`correction_unit`) compares each slice's carry out
`kill[k]` with the carry `pred[k]` that was predicted into the slice above.
`err[k] = kill[k] ^ pred[k]` is 1 exactly when slice k+1 is missing a carry.
It then works up the slices:

* slice 0 is already exact;
* slice 1 gets `+ err[0]`; the carry out of this addition is `c1`;
* slice 2 gets `+ err[1]`, then `+ c1`; the carry out is `c2`;
* slice 3 gets `+ err[2]`, then `+ c2`.

The second addition in each slice handles the ripple: repairing slice 1 can
carry into slice 2 (for example, `0x00ffffff + 1`). `err[k]` and `c` are
never both 1 for the same slice, because the slice sum is at most 511. An
immediate assertion in `correction_unit` checks this in simulation. With
all three boundaries repaired, the result equals `a + b` exactly.

### Choosing the accuracy

The 2-bit `stages` input says how many of the three boundaries are
repaired, **counting from the most significant one**:

| `stages` | boundaries repaired             | used by   | result |
|----------|---------------------------------|-----------|--------|
| 3        | 0, 1, 2                         | ADD, ADDI, LW, LB, SW | exact |
| 2        | 1, 2                            | (not used by any instruction) | error below bit 16 only |
| 1        | 2                               | ADDC1     | error below bit 24 only |
| 0        | none                            | ADDC2     | raw predicted sum |

A boundary that is not repaired contributes neither its own missing carry
nor a ripple. The top boundary is repaired first because its errors are
the largest (2^24 against 2^8).

Worked examples, all checked by the testbenches:

| a + b                     | stages 3     | stages 1     | stages 0     |
|---------------------------|--------------|--------------|--------------|
| `000000ff + 00000002`     | `00000101`   | `00000001`   | `00000001`   |
| `deadbeef + 0000c0fe`     | `deae7fed`   | `deae7fed`   | `deae7fed`   |
| `ffffffff + 00000100`     | `000000ff`   | `ffff00ff`   | `ffff00ff`   |

In the first row, bit 7 of one operand is 0. The carry out of slice 0 is
therefore not predicted, and only full correction restores it. In the second
row, every carry that crosses a boundary is predicted correctly, so every
setting is exact.

The rule "repaired boundaries count from the top" is this design's own
choice. What it must satisfy is that one stage of correction leaves the
first example at `0x00000001`.

## Instruction set and accuracy

| instruction | encoding                        | operation                     |
|-------------|---------------------------------|-------------------------------|
| ADD         | R-type, funct `0x20`            | rd = rs + rt (exact)          |
| ADDC1       | R-type, funct `0x28`            | rd = rs + rt, 1 correction stage |
| ADDC2       | R-type, funct `0x29`            | rd = rs + rt, no correction   |
| SUB/AND/OR/SLT | R-type, funct `0x22/0x24/0x25/0x2a` | as MIPS32           |
| ADDI        | `0x08`                          | rt = rs + sext(imm) (exact)   |
| LW / LB     | `0x23` / `0x20`                 | load word / sign-extended byte, exact address |
| SW          | `0x2b`                          | store word, exact address     |
| BEQ         | `0x04`                          | branch if rs == rt            |
| J           | `0x02`                          | jump                          |

The standard instructions use their MIPS32 encodings. The function codes of
`ADDC1` and `ADDC2` are codes that MIPS32 reserves. They, and the number of
stages each instruction gets (`ADDC1_STAGES = 1`, `ADDC2_STAGES = 0` in
`mips_pkg`), are choices of this design: change them in the package. Accuracy
belongs to the instruction. There is no mode register.

## Processor

`mips_top` is the classic single-cycle organisation: one instruction per
clock, with fetch, decode, execute, memory and write-back all inside one
cycle.

* `pc_register` holds the PC (synchronous reset to 0).
* `instruction_memory` (64 words by default) is read combinationally at
  `pc[7:2]`.
* Two `ripple_carry_adder`s compute `PC + 4` and the branch target
  `PC + 4 + (sext(imm) << 2)`. They are off the critical path and must be
  exact, so they are plain ripple-carry adders and not approximate ones.
* `controller` decodes opcode and funct into a `ctrl_t` struct. Its field
  `alu` carries the ALU select and the correction stages.
* `register_file`: 32 x 32 bits, two combinational read ports, write on
  the rising edge, `$0` hard-wired to zero, cleared by reset.
* `alu` holds the approximate adder, AND, OR, a subtractor and SLT, with a
  result multiplexer. SLT is the sign bit of `a - b`, with no overflow
  correction, as in the common teaching ALU. `zero` is `a - b == 0` and
  drives BEQ.
* `data_memory` (64 words by default) reads combinationally and writes a
  word on the rising edge. For LB it returns the addressed byte
  (little-endian) sign-extended.

### Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; clears PC and registers |
| `prog_we`, `prog_addr`, `prog_wdata` | in | 1, log2(IMEM_DEPTH), 32 | writes one program word per clock; use while `rst` is held |
| `pc`, `instr` | out | 32 | current PC and instruction |
| `alu_result` | out | 32 | ALU output of the current instruction |
| `write_data`, `mem_write` | out | 32, 1 | store data and store strobe |
| `alu_stages` | out | 2 | correction stages of the current ALU operation |

Parameters: `IMEM_DEPTH = 64` and `DMEM_DEPTH = 64` (words). The memories
are not cleared by reset.

## Design choices beyond the core idea

The adder's structure follows the published scheme. That covers the four
8-bit slices, the AND-type prediction from bits 7, 15 and 23, the
XOR-detected errors and the two-addition-per-slice correction chain. The
items below were chosen here:

* the exact meaning of a partial correction (top boundaries first);
* the encodings of ADDC1/ADDC2, and the mapping ADDC1 = 1 stage,
  ADDC2 = none;
* the instruction subset beyond the adder (classic single-cycle MIPS plus
  LB) and the jump datapath;
* the memory sizes, the program-load port, little-endian LB and the reset
  behaviour;
* the ALU select encoding (the usual MIPS ALU-control codes `000` AND,
  `001` OR, `010` ADD, `110` SUB, `111` SLT).

The slices are written as plain `+` operators, so synthesis picks their
internal adder. Path delays depend on that choice and on the technology.
The RTL makes no timing claim of its own.

## Files

`rtl/` (one module or package per file):

| file | contents |
|------|----------|
| `mips_pkg.sv` | widths, ALU select enum, opcodes/functs, `alu_ctrl_t`, `ctrl_t`, stage constants |
| `mips_top.sv` | processor top |
| `controller.sv` | instruction decoder |
| `alu.sv` | ALU |
| `approx_adder.sv` | approximate adder |
| `sub_adder.sv` | one slice |
| `carry_prediction.sv` | carry predictor |
| `correction_unit.sv` | configurable correction |
| `ripple_carry_adder.sv` | exact PC adders |
| `register_file.sv`, `pc_register.sv`, `instruction_memory.sv`, `data_memory.sv` | state |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). It
also holds `approx_ref_pkg.sv`, a reference model of the approximate sum that
works in a different way from the hardware: it walks the slices and keeps the
carry each slice actually receives. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

`tb_mips_top` loads a program through the program port and runs it at the
default sizes. The program does the additions above with ADD, ADDC1 and
ADDC2, builds `0xdeadbeef` in a loop of doublings, and stores, reloads (LW,
LB) and re-adds results. An instruction-level model inside the testbench
checks PC, instruction, ALU result and store port on every cycle, so CPI = 1
is checked too. The testbench also counts that every mechanism occurred:
exact and approximate additions, an inexact ADDC1 and ADDC2 result, a taken
and an untaken branch, a jump, word and byte loads, and stores.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/mips_pkg.sv tb/approx_ref_pkg.sv rtl/*.sv tb/tb_mips_top.sv \
  --top-module tb_mips_top -o sim && ./obj_dir/sim
```

Replace `tb_mips_top` with any other `tb_<module>` to run a unit test.
Lint a module with
`verilator --lint-only -Wall rtl/mips_pkg.sv rtl/*.sv --top-module <module>`.

To try another accuracy mapping, edit `ADDC1_STAGES` / `ADDC2_STAGES` in
`mips_pkg`. The reference model in `approx_ref_pkg` takes the stage count as
an argument, so the adder-level testbenches already cover every setting.
`tb_controller` and `tb_mips_top`, however, expect the default mapping.
