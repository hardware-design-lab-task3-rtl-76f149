# A 16-bit multi-cycle CPU: controller FSM over a register/ALU datapath

This is a small 16-bit processor. Each instruction runs over several clock
cycles. A four-state Mealy controller reads the opcode and drives a
register/ALU datapath one micro-operation per cycle. An ALU result does not go
straight back into the register file. It is first held in a result register
(Y). In a separate write-back cycle, Y is put onto a shared, tri-stated data
bus, and the register file takes it from that bus. This bus is the path by
which other units (memory, I/O) would later share the datapath, and it is why
arithmetic takes one cycle more than loading an immediate.

The CPU executes twelve instructions: eight register-register ALU operations
with an optional shift of the second operand, add/subtract with a 5-bit
immediate, and two 8-bit immediate loads (low and high byte). There is no
program counter or memory interface yet. Instructions come in on a port, one
each time the CPU signals that it is fetching.

## Instruction set

All instructions are 16 bits wide. Rd is the destination, and Ra and Rb are
sources. There are eight registers, R0..R7, and none of them is special.

| bits            | 15:11  | 10:8 | 7:5 | 4:3   | 2:0 |
|-----------------|--------|------|-----|-------|-----|
| register (R)    | 00 ooo | Rd   | Ra  | shift | Rb  |
| immediate (I)   | 01 00s | Rd   | Ra  | imm5 (4:0)  | |
| load immediate  | 1000u  | Rd   | imm8 (7:0)  |       |     |

| opcode | name  | operation                      | flags      |
|--------|-------|--------------------------------|------------|
| 00000  | ADD   | Rd = Ra + sh(Rb)               | Z N C V    |
| 00001  | SUB   | Rd = Ra - sh(Rb)               | Z N C V    |
| 00010  | ADDC  | Rd = Ra + sh(Rb) + C           | Z N C V    |
| 00011  | SUBC  | Rd = Ra - sh(Rb) - C           | Z N C V    |
| 00100  | AND   | Rd = Ra & sh(Rb)               | Z N        |
| 00101  | ANDBB | Rd = Ra & ~sh(Rb)              | Z N        |
| 00110  | OR    | Rd = Ra \| sh(Rb)              | Z N        |
| 00111  | ORBB  | Rd = Ra \| ~sh(Rb)             | Z N        |
| 01000  | ADDI  | Rd = Ra + sext(imm5)           | Z N C V    |
| 01001  | SUBI  | Rd = Ra - sext(imm5)           | Z N C V    |
| 10000  | LDI   | Rd = sext(imm8)                | unchanged  |
| 10001  | LUI   | Rd = imm8 << 8 (low byte zero) | unchanged  |

The ALU operation is opcode bits 13:11, the same three bits for R-type and
I-type. The shift field selects one of these:

| shift | sh(Rb)                                   |
|-------|------------------------------------------|
| 00    | Rb                                       |
| 01    | Rb << 1                                  |
| 10    | Rb >> 1, zero into bit 15                |
| 11    | Rb >> 1, bit 15 kept (arithmetic)        |

The CPU does not execute any other opcode. It spends DECODE on it and goes
back to FETCH, leaving registers and flags unchanged.

## Flags and the carry

The status register S holds `{Z, N, C, V}`, with Z in bit 3 and V in bit 0.
It is loaded together with Y by every R-type and I-type instruction.

- **Z** is set when the 16-bit result is zero.
- **N** is result bit 15.
- **C**: after an addition it is the carry out of bit 15. After a subtraction
  it is the **borrow**: 1 when `Ra - B` (minus C for SUBC) goes below zero as
  an unsigned number. This convention matters for chaining. SUBC subtracts C
  itself, not its complement. A 32-bit subtraction is therefore `SUB lo` then
  `SUBC hi`, in the same way that a 32-bit addition is `ADD lo` then
  `ADDC hi`. Many other processors store "not borrow" in C instead, so be
  careful when you port code.
- **V** is two's-complement overflow of the add or subtract.
- The four logic operations recompute Z and N. They keep C: the ALU passes
  its C input through. They clear V, because the ALU receives only C from the
  status register, not V.

ADDC and SUBC read C from S. This is the only feedback path from S into the
datapath.

## Controller

`cpu_fsm` is written as three processes: the state register, the next-state
logic and the output logic. The outputs are Mealy outputs: in DECODE they
depend on the opcode held in the instruction register.

```
 reset -> INIT -> FETCH -> DECODE --(R-type, ADDI, SUBI)--> WB --> FETCH
                    ^         |
                    +---------+  (LDI, LUI, unknown opcode)
```

The control word asserted in each state is shown below. A blank cell is 0.
vsel selects the register file's write data (0 bus, 1 pc_plus1, 2 sximm8,
3 tximm8). arith_sel 0 means that the ALU operation and shift come from the
instruction.

| state / class   | vsel | asel | bsel | loady | loads | rf_wen | arith_sel | load_ir | dp_gate | next   |
|-----------------|------|------|------|-------|-------|--------|-----------|---------|---------|--------|
| INIT            | 0    |      |      |       |       |        | 0         |         |         | FETCH  |
| FETCH           | 0    |      |      |       |       |        | 0         | 1       |         | DECODE |
| DECODE R-type   | 0    | 0    | 0    | 1     | 1     |        | 0         |         |         | WB     |
| DECODE ADDI/SUBI| 0    | 0    | 1    | 1     | 1     |        | 0         |         |         | WB     |
| DECODE LDI      | 2    |      |      |       |       | 1      | 0         |         |         | FETCH  |
| DECODE LUI      | 3    |      |      |       |       | 1      | 0         |         |         | FETCH  |
| DECODE other    | 0    |      |      |       |       |        | 0         |         |         | FETCH  |
| WB              | 0    |      |      |       |       | 1      | 0         |         | 1       | FETCH  |

Cycle counts are: **3 cycles** for R-type and I-type instructions, **2
cycles** for LDI, LUI and unknown opcodes, and one INIT cycle after reset.

`arith_ctrl` also has a pass-through mode (`arith_sel = 1`), which forces the
ALU operation to ADD and the shift to none. Together with `asel = 1`
(A = 0), this copies the B operand unchanged through the ALU, for
operations that move data. None of the twelve instructions needs it, so the
FSM never selects it. The mode is there for instructions that would be added
later.

## Datapath

```
              +-- datapath_in (= data bus) --0-+
              +-- pc_plus1 (tied to 0)    --1-+ vsel
              +-- sximm8  (sext IR[7:0])  --2-+----> wdata  REGFILE 8x16
              +-- tximm8  (IR[7:0] << 8)  --3-+             waddr = Rd
                                                            raddra = Ra -> A --+-0-\ asel
                                                                       16'b0 --+-1-/----> ALU a
                                                 raddrb = Rb -> B -> shifter -0-\ bsel
                                                              sximm5 (sext IR[4:0]) -1-/--> ALU b
        ALU result --[Y, loady]--> datapath_out --[tri-state, dp_gate]--> data bus
        ALU flags  --[S, loads]--> status_out  --(C)--> ALU carry in
```

- **Register file** (`regfile`). Reads are combinational. A write happens at
  the rising clock edge when `wen` is high. A read in the cycle of a write
  returns the old value. Reset clears all eight registers.
- **Y and S** are enabled registers. A value computed from the registers in
  DECODE is captured at the end of that cycle. Y therefore already holds the
  result in WB, when it is gated onto the bus.
- **Write-back** goes through the bus. In WB, `dp_gate` drives Y onto
  `data_bus`, and `vsel = 0` writes `datapath_in` (the same bus) into Rd.
- **pc_plus1** is tied to zero. The write mux has an input reserved for it,
  but this CPU has no program counter.

## Data bus and the tri-state gate

`tristate_buf` drives its input onto its output when `en` is high. When `en`
is low, the output is high impedance (`'z`), so several units can hang on one
bus. In `cpu_top`, only the datapath drives the bus. The bus goes out on the
`data_bus` port, and it loops back into the datapath. When nothing drives the
bus, its value is undefined; in a two-state simulator it reads as 0. The CPU
reads the bus only in WB, when it drives the bus itself. An assertion in
`cpu_top` enforces this rule: a register write whose data comes from the bus
must coincide with `dp_gate`.

## Top-level interface (`cpu_top`)

| port           | dir | width | meaning                                           |
|----------------|-----|-------|---------------------------------------------------|
| `clk`          | in  | 1     | clock; everything is rising-edge                  |
| `rst_n`        | in  | 1     | asynchronous, active-low reset                    |
| `instruction`  | in  | 16    | next instruction, sampled when `load_ir` is high  |
| `load_ir`      | out | 1     | high for the FETCH cycle                          |
| `data_bus`     | out | 16    | shared bus; carries Y during WB                   |
| `datapath_out` | out | 16    | Y register                                        |
| `status_out`   | out | 4     | S register `{Z,N,C,V}`                            |
| `state`        | out | 2     | INIT=0, FETCH=1, DECODE=2, WB=3                   |

To run a program, watch `load_ir`. While it is high, present the next
instruction on `instruction` before the rising edge. The register file keeps
a result from the WB edge onwards, and an LDI/LUI value from the DECODE edge
onwards. Reset clears the instruction register, the registers, Y and S, and
puts the controller in INIT.

## Files

`rtl/` has one unit per file:

| file               | what it is                                                                 |
|--------------------|----------------------------------------------------------------------------|
| `cpu_pkg.sv`       | widths, opcodes, ALU/shift/vsel encodings, flag struct, state enum, control-word struct |
| `cpu_top.sv`       | the CPU                                                                    |
| `cpu_fsm.sv`       | controller                                                                 |
| `instr_reg.sv`     | instruction register                                                       |
| `arith_ctrl.sv`    | IR-mode / pass-through choice of ALU operation and shift                   |
| `datapath.sv`      | write mux, register file, shifter, operand muxes, ALU, Y, S                |
| `regfile.sv`       | 8 x 16 register file                                                       |
| `shifter.sv`       | one-bit shifter                                                            |
| `alu.sv`           | ALU and flags                                                              |
| `sign_ext.sv`      | sign extender, used with 5- and 8-bit inputs                               |
| `tail_ext.sv`      | tail extender (imm8 << 8)                                                  |
| `tristate_buf.sv`  | bus gate                                                                   |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). It also
has `cpu_ref_pkg.sv`, a reference model that computes ALU and shift results
with integer arithmetic, so it does not share code with the RTL. Every
testbench ends by printing `TB_RESULT checks=N failures=M`. Each one has a
watchdog.

- `tb_cpu_top` runs the whole CPU. It starts with directed code: a 32-bit add
  and a 32-bit subtract chained through C, signed overflow, every shift, the
  logic operations and an unknown opcode. Then it runs 3000 random
  instructions against an instruction-level model. It checks:
  - the bus value and Y in every WB cycle;
  - S after every instruction;
  - the 3/2 cycle counts;
  - all registers at the end, read out with `OR Ri, Ri, Ri`;
  - that reset puts the CPU back in INIT.

  It also counts every mechanism and fails if one of them never happened:
  each instruction, each shift code, each flag, a carry consumed, an unknown
  opcode, a bus write-back and a reset.
- `tb_datapath` drives the control inputs directly with random values. It
  checks the registers, Y and S against a model, and checks that Y and S
  change exactly at the clock edge after their load enable.
- `tb_cpu_fsm` checks every control output in every state for all 32
  opcodes.
- The others check their unit exhaustively or with thousands of random
  vectors.

Run one with Verilator 5. The example is for the top; for another testbench,
change the testbench file and the top-module name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cpu_pkg.sv tb/cpu_ref_pkg.sv tb/tb_cpu_top.sv --top-module tb_cpu_top
./obj_dir/Vtb_cpu_top
```

The design has no size parameters to scale. The testbenches run it as it is.
The complete top-level test takes well under a second.

## What is specified and what is chosen here

These parts follow the lab description of the CPU:
- the block structure and the names of every signal;
- the instruction encodings and their operations;
- the four states and their transitions;
- the control values of INIT, FETCH and WB;
- the numbering of the vsel, asel and bsel mux inputs;
- the two Arith Ctrl modes;
- the extenders and the tri-state gate.

The following are decisions of this implementation, and are the first
places to look if you need to match another implementation of the same
instruction set:

- **Shift codes.** The description gives a 2-bit shift field but not its
  meaning. The four codes above are a choice.
- **Flag details.** C is a borrow after subtraction, following the literal
  `Ra - Shift(Rb) - C` of SUBC. Logic operations keep C and clear V. The
  status word is ordered `{Z,N,C,V}`.
- **DECODE control values.** These were worked out from the datapath rather
  than given. The result for each instruction class is in the table above.
- **Unknown opcodes** do nothing and take two cycles.
- **Reset** is asynchronous and active low. It clears IR, the registers, Y
  and S.
- **Instruction source.** The instruction arrives on a top-level port, and
  `load_ir` is brought out as its handshake. The `state` output exists for
  observation.
- **No program counter.** `pc_plus1` is a constant zero, so no instruction
  uses vsel input 1.
