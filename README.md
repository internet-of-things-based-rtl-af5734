# Reconfigurable SIMD processor with a KS-CLA hybrid adder

A small 16-bit processor for IoT end devices. It gets parallelism cheaply by
splitting every 16-bit word into lanes. One instruction works on four 4-bit
values, two 8-bit values or one 16-bit value, and the lane width is chosen
per instruction. The adder at the centre of its ALU is a hybrid. Carry
look-ahead units add the low half of the word, Kogge-Stone prefix units add
the high half, and the carry chain between the 4-bit units can be cut at any
lane boundary.

The processor does not pipeline. Every instruction passes through
fetch, decode, execute, memory and write-back, one clock each, before the
next one starts. It runs from a 1024 x 18-bit instruction block RAM and a
1024 x 16-bit data block RAM.

## The hybrid adder (`hybrid_adder`, `cla4`, `ks4`)

The 16-bit adder is a chain of four 4-bit units:

```
  bits   [15:12]        [11:8]          [7:4]          [3:0]
        +--------+     +--------+     +--------+     +--------+
 Cout <-| unit 3 |<----| unit 2 |<----| unit 1 |<----| unit 0 |<-- cin
        |  KS    | c2  |  KS    | c1  |  CLA   | c0  |  CLA   |
        +--------+     +--------+     +--------+     +--------+
        \____ 8-bit Kogge-Stone ___/   \__ 8-bit carry look-ahead _/
```

* **`cla4`** forms propagate `p = a ^ b` and generate `g = a & b`. It writes
  every internal carry as a flat sum of products of `g`, `p` and the carry in,
  so no carry ripples inside the unit.
* **`ks4`** is a parallel-prefix adder. The carry in is folded into bit 0
  (`g0 | p0 & cin`). Two Kogge-Stone levels with spans 1 and 2 follow. Each
  node applies `(g, p) o (g', p') = (g | p g', p p')`, and sum bit `i` is
  `p[i]` XOR the group generate of bits `i-1..0`.

These units sit in this order because the carry into the high half arrives
late. The cheap CLA units produce it, and the fast prefix units absorb the
delay.

**Reconfiguration.** Three inputs `q`, `o` and `h` select 4-, 8- or 16-bit
lanes. A unit that starts a lane takes the adder's `cin` as its carry in.
Every other unit takes the carry out of the unit below it:

| mode | lanes        | units that start a lane |
|------|--------------|-------------------------|
| `q`  | 4 x 4 bits   | 0, 1, 2, 3              |
| `o`  | 2 x 8 bits   | 0, 2                    |
| `h`  | 1 x 16 bits  | 0                       |

If more than one mode bit is set, the narrowest lane wins. With none set,
the whole `WIDTH` is one lane. Because `cin` goes into every lane, `a + ~b`
with `cin = 1` subtracts lane by lane in two's complement. `cout[k]` is the
carry out of unit `k`, and a lane's carry out is the entry for its top unit.

The `WIDTH` parameter (default 16) must be a multiple of 8. For any
`WIDTH`, the low half uses CLA units and the high half uses Kogge-Stone
units. `WIDTH = 32` gives a 32-bit hybrid adder, and with no mode bit set it
adds the full 32 bits. The adder is purely combinational.

## The other lane-wise units

* **`simd_multiplier`** keeps the low lane-width bits of each lane's
  product. This low half is the same for unsigned and two's complement
  operands. It is a sum of products that ends in the hybrid adder. Row `j`
  of the partial products is `a`'s lane shifted left by `j` inside the lane,
  gated by bit `j` of `b`'s lane. A carry-save array of 3:2 compressors adds
  the rows into two vectors, `dout0` (sums) and `dout1` (carries). The array
  drops every carry that would leave the top of a lane. The hybrid adder,
  run in the same lane mode, adds `dout0` and `dout1`.
* **`simd_shifter`** shifts every lane by the same amount, taken modulo the
  lane width. It does shift left, logical shift right and arithmetic shift
  right. Bits never cross a lane boundary.

## The reconfigurable ALU (`ralu`): two clocks per operation

```
 clock 1 (load=1):  a, b, op, mode  ->  Operand 1 / Operand 2 registers
 clock 2 (exec=1):  adder | multiplier | shifter | AND/OR/XOR | pass
                    -> shadow register (result), valid=1 in the next clock
```

The inputs may change once the load clock has passed. The shadow register
holds its result until the next `exec`. The operations are ADD, SUB, MUL,
AND, OR, XOR, SHL, SHR, SRA and PASS (the result is operand 2). For the
shifts, the amount is operand 2's low four bits.

## The processor (`simd_core`)

Each instruction has five phases of one clock each. Nothing overlaps:

| phase | what happens |
|-------|--------------|
| IF    | PC goes to the instruction RAM. |
| ID    | The RAM's word is decoded (`decoder`). Both register ports are read, and the RALU loads its operands (its first clock). |
| EX    | The RALU computes into the shadow register (its second clock). The load-store unit's address generator forms the data address. |
| MEM   | The load-store unit (`lsu`) drives the data RAM. The next PC is chosen: JMP, or LOOP while its counter is not zero. |
| WB    | `rd` receives the shadow register or the loaded word. PC advances and `retired` counts the instruction. |

A program of N instructions, HALT included, ends with `halted` high exactly
5·N clocks after reset is released. HALT is sticky until reset. The register
file (`register_file`) holds four 16-bit registers. It has two
combinational read ports and one write port, and reset clears it.

No instruction can read a result before its own write-back, so the core
needs no operand bypass. A pipelined version of this machine would need
bypass paths from the shadow register and the load-store unit to the
operand registers; they are not built here.

### Instruction format

```
 17    12 11 10 9  8 7  6 5     0
 [opcode] [ rd ] [rs1] [rs2] [ 0 ]     register form
 [opcode] [ rd ] [     imm[9:0]  ]     immediate form
```

`opcode[5:4]` selects the lane width for the ALU functions: `00` H (16 bit),
`01` O (8 bit), `10` Q (4 bit). The value `11` selects the memory and
control group. `opcode[3:0]` selects the function:

| group `00`/`01`/`10` | meaning | group `11` | meaning |
|---|---|---|---|
| 0 | no-op | 0 LDI  | `rd = imm` (zero-extended) |
| 1 ADD | `rd = rs1 + rs2` | 1 LD   | `rd = M[imm]` |
| 2 SUB | `rd = rs1 - rs2` | 2 ST   | `M[imm] = rd` |
| 3 MUL | `rd = rs1 * rs2` (low half) | 3 LDX  | `rd = M[rs1[9:0]]` |
| 4 AND, 5 OR, 6 XOR | bitwise | 4 STX  | `M[rs1[9:0]] = rd` |
| 7 SHL, 8 SHR, 9 SRA | `rs1` shifted by `rs2[3:0] mod lane` | 5 JMP  | `pc = imm` |
| 10-15 | no-op | 6 LOOP | `rd = rd - 1`; if `rd != 0`, `pc = imm` |
| | | 15 HALT | stop |
| | | 7-14 | no-op |

`simd_pkg` holds these encodings as enums, the decoded control word `dec_t`,
and the helpers `enc_r` and `enc_i`, which build instruction words. LOOP
uses the RALU for its decrement, a 16-bit SUB of 1, and MEM tests the result
for zero.

## The chip (`simd_iot_top`) and how to use it

`simd_iot_top` joins the core, the instruction RAM `imem` (1024 x 18, with a
one-clock fetch and a load port) and the data RAM `dmem` (1024 x 16, two
read-first ports). Its pins:

* `clk`, and `rst_n` (asynchronous, active low);
* `prog_we/prog_addr/prog_data`: writes the instruction RAM;
* `host_en/host_we/host_addr/host_wdata/host_rdata`: the data RAM's second
  port. A read returns its word one clock after the address.
* `halted`, `pc`, `retired`: status.

To run a program, hold `rst_n` low and write the program and data. Then
release `rst_n` and wait for `halted`. Read the results through the host
port. Neither RAM is reset.

## Where this design departs from its source description

The source gives these points: the lane widths (4/8/16), the unit split of
the hybrid adder (CLA on `[7:0]`, Kogge-Stone on `[15:8]`, 4-bit units with
carries between them), the two-clock RALU, the five unpipelined phases, the
18-bit instruction with its 6-bit opcode, the 10-bit instruction and data
addresses, 16-bit data and the 2-bit register index. Everything below is
this design's own choice:

* how the carry chain is cut at lane boundaries, and the full-width mode when
  no mode bit is set;
* the instruction field positions, the opcode numbering, the operation list,
  LDX/STX register-indirect addressing, LOOP as decrement-and-branch, and
  HALT;
* the multiplier keeping the low half of each product, and its reduction
  being a row-by-row carry-save array; the shift kinds and the modulo shift
  amount;
* the second ports of both RAMs, used to load programs and data;
* the reset values, and the read-first behaviour of the data RAM;
* no operand bypass (see above);
* the internal structure of the shifter, which the source does not give.

The source's timing, power and area results (delay in picoseconds,
nanowatts, square micrometres) come from an FPGA and a 90 nm standard-cell
flow. This RTL does not reproduce or check them.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`.

* `tb_cla4` and `tb_ks4` apply all 512 input combinations.
* `tb_hybrid_adder` checks random operands in every mode at `WIDTH = 16`
  and `WIDTH = 32`, against lane-wise integer sums and per-unit carries.
* `tb_ralu` checks every operation in every mode. It also checks that the
  result arrives exactly two clocks after the operands, and that a load
  without exec leaves the shadow register alone.
* `tb_simd_core` runs a hand-worked program and expects it to halt after
  exactly 100 clocks (20 instructions).
* `tb_simd_iot_top` uses the top's default sizes. It runs six programs,
  each a 16-word vector loop plus 300 random instructions in all lane
  modes. It compares the whole data RAM, the instruction count and
  5 clocks per instruction with an instruction-level reference model in
  the testbench. It also fails if any instruction kind, lane mode, LOOP
  outcome or the two-clock RALU path never occurred.

To simulate one, with Verilator 5 (`-y rtl` lets it find each module by
its file name, and the package is named first because the modules import
it):

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_simd_iot_top \
    rtl/simd_pkg.sv tb/tb_simd_iot_top.sv -o sim
./obj_dir/sim
```

Replace `tb_simd_iot_top` with any other testbench name to run that one.

## Files

| file | contents |
|------|----------|
| `rtl/simd_pkg.sv` | sizes, opcode enums, `dec_t`, instruction builders |
| `rtl/cla4.sv`, `rtl/ks4.sv` | 4-bit carry look-ahead and Kogge-Stone units |
| `rtl/hybrid_adder.sv` | reconfigurable KS-CLA adder |
| `rtl/simd_multiplier.sv`, `rtl/simd_shifter.sv` | lane-wise multiplier and shifter |
| `rtl/ralu.sv` | two-clock reconfigurable ALU |
| `rtl/register_file.sv` | 4 x 16-bit registers |
| `rtl/decoder.sv` | instruction decoder |
| `rtl/lsu.sv` | load-store unit with address generation |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data block RAMs |
| `rtl/simd_core.sv` | five-phase processor core |
| `rtl/simd_iot_top.sv` | core with both RAMs |
