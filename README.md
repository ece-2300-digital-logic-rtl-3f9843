# A single-cycle processor for a small RISC-V subset

This is a processor that finishes every instruction in exactly one clock
cycle. Fetching, decoding, reading registers, computing, accessing memory,
writing back and updating the PC all happen inside a single clock period.
That makes the control simple and the CPI exactly 1. The price is a long
clock period: it must cover the slowest instruction, the load. The design
follows the classic textbook datapath. A PC register feeds an instruction
memory, and the fetched word drives a register file, an immediate generator,
an ALU, a multiplier and a data memory. A purely combinational control unit
sets the multiplexers and write enables for each instruction.

The processor runs nine instructions: the eight of the base design plus an
optional auto-incrementing load.

| instruction          | effect                                                    | encoding (opcode / funct3 / funct7) |
|----------------------|-----------------------------------------------------------|-------------------------------------|
| `add rd, rs1, rs2`   | R[rd] = R[rs1] + R[rs2]                                   | 0110011 / 000 / 0000000             |
| `addi rd, rs1, imm`  | R[rd] = R[rs1] + sext(imm)                                | 0010011 / 000                       |
| `mul rd, rs1, rs2`   | R[rd] = low 32 bits of R[rs1] * R[rs2]                    | 0110011 / 000 / 0000001             |
| `lw rd, imm(rs1)`    | R[rd] = M[R[rs1] + sext(imm)]                             | 0000011 / 010                       |
| `sw rs2, imm(rs1)`   | M[R[rs1] + sext(imm)] = R[rs2]                            | 0100011 / 010                       |
| `jal rd, imm`        | R[rd] = PC + 4; PC = PC + sext(imm)                       | 1101111                             |
| `jr rs1`             | PC = R[rs1]                                               | 1100111 / 000                       |
| `bne rs1, rs2, imm`  | if R[rs1] != R[rs2] then PC = PC + sext(imm)              | 1100011 / 001                       |
| `lw.ai rd, imm(rs1)` | R[rd] = M[R[rs1] + sext(imm)]; R[rs1] = R[rs1] + 4        | 0001011 / 000                       |

Every instruction not listed also does PC = PC + 4. The encodings are the
standard RISC-V ones (`jr` is `jalr x0, 0(rs1)`); `lw.ai` uses the custom-0
opcode. Register x0 always reads as zero.

## Datapath

One pass through `datapath.sv`, in signal order:

```
             +--------------------- pc_sel mux <-- pc_plus4 | jalbr_targ | jr_targ
             v
  pc_reg --> PC --+--> imem addr           imem data = inst --> ctrl
                  +--> +4 --> pc_plus4
                  +--> adder(PC, imm) --> jalbr_targ

  inst[19:15] -> regfile read 0 -> R[rs1] --+--> ALU a ----------+--> ALU result --> dmem addr
  inst[24:20] -> regfile read 1 -> R[rs2] --+--> op2_sel mux --> ALU b             \-> eq = result[0]
                                            +--> dmem store data
  inst[31:7]  -> imm_gen(imm_type) -> imm --+--> op2_sel mux
  R[rs1], R[rs2] -> mul -> product
  R[rs1] -> jr_targ

  wb_sel mux (ALU result | product | dmem load data | pc_plus4) --> regfile write, address inst[11:7]
```

- **PC.** `pc_reg` holds the PC. The 4-to-1 `pc_sel` mux picks the next PC
  from three inputs: `pc_plus4`, `jalbr_targ` (PC + immediate, for `jal`
  and a taken `bne`) and `jr_targ` (R[rs1], for `jr`). Its fourth input
  repeats `pc_plus4`.
- **Register file.** It has two combinational read ports, addressed by
  rs1 and rs2 straight from the instruction bits. Writes happen at the
  rising clock edge, to rd.
- **Immediate generator.** `imm_gen` builds the sign-extended I, S, B or J
  immediate. S is `{inst[31:25], inst[11:7]}`. B is
  `{inst[31], inst[7], inst[30:25], inst[11:8], 0}`. J is
  `{inst[31], inst[19:12], inst[20], inst[30:21], 0}`.
- **ALU.** It has two functions: add, and compare. The compare returns 1
  when the operands are equal. The control unit reads the `eq` status from
  bit 0 of the ALU result. The ALU result is also the data-memory address,
  and R[rs2] is always the store data.
- **Multiplier.** It takes R[rs1] and R[rs2] directly; the second operand
  does not pass through the `op2_sel` mux.
- **Write-back.** The `wb_sel` mux chooses the value written to rd: the ALU
  result, the product, the load data, or `pc_plus4` (the `jal` link).

### The auto-incrementing load

`lw.ai` has to write two registers in one cycle: the loaded word to rd, and
R[rs1] + 4 back to rs1. The datapath gets a second +4 unit on R[rs1] and a
second register-file write port addressed by rs1. When rd = rs1, the loaded
word wins. Parameter `HAS_LW_AI` (default 1) adds this hardware. With
`HAS_LW_AI = 0`, the second port and adder disappear and `lw.ai` decodes as
a no-op, which leaves exactly the eight-instruction datapath.

## Control unit

`ctrl.sv` is a single combinational decoder, in effect one table row per
instruction ("-" means don't care; it is driven with a fixed value):

| inst  | pc_sel            | imm_type | op2_sel | alu_func | wb_sel | rf_wen | imem val | dmem val / wen |
|-------|-------------------|----------|---------|----------|--------|--------|----------|----------------|
| add   | pc+4              | -        | rf      | add      | alu    | 1      | 1        | 0              |
| addi  | pc+4              | I        | imm     | add      | alu    | 1      | 1        | 0              |
| mul   | pc+4              | -        | -       | -        | mul    | 1      | 1        | 0              |
| lw    | pc+4              | I        | imm     | add      | mem    | 1      | 1        | 1 / read       |
| sw    | pc+4              | S        | imm     | add      | -      | 0      | 1        | 1 / write      |
| jal   | jalbr             | J        | -       | -        | pc+4   | 1      | 1        | 0              |
| jr    | jr                | -        | -       | -        | -      | 0      | 1        | 0              |
| bne   | eq ? pc+4 : jalbr | B        | rf      | cmp      | -      | 0      | 1        | 0              |
| lw.ai | pc+4              | I        | imm     | add      | mem    | 1 (+rs1) | 1      | 1 / read       |

The one status signal, `eq`, flows back from the datapath. It is folded into
`pc_sel` for `bne`, so the branch decision runs from the ALU through the
control unit to the next-PC mux within the same cycle. This is not a
combinational loop: `eq` depends on the instruction and the registers,
never on `pc_sel`.

The decoder checks the opcode and funct3, and funct7 for `add` and `mul`. It
ignores the remaining fields of `jr`. Any unrecognised instruction becomes a
no-op that only advances the PC. The enum encodings of all control signals
are in `proc_pkg.sv`.

## Memory and timing

The processor assumes a memory that answers within the same cycle. Reads on
both ports are combinational. A store is written at the rising clock edge
that ends the instruction. `mem.sv` models this as a 32-bit-word array
with:

- an instruction port that only reads;
- a data port that reads, and writes when `val` and `wen` are both set;
- a host port for loading programs and reading results. A host write wins
  over a data-port write to the same word.

Addresses are byte addresses. Bits [1:0] are ignored, so only aligned
word accesses exist. The word index wraps modulo `MEM_WORDS`.

The requests are a packed struct, `mem_req_t = {val, wen, addr, data}`.
The processor drives `val` low while reset is held. Reset is synchronous
and active high. The first instruction after reset is fetched from
`RESET_PC`.

In a given cycle, everything the instruction does lands at the next rising
edge: the register write (or two for `lw.ai`), the store and the new PC.
A register written by one instruction is therefore read correctly by the
very next one, with no bypassing or stalls; nothing in this design stalls.

## Top level: `sc_proc_top`

| port                                        | use                                                        |
|---------------------------------------------|------------------------------------------------------------|
| `clk`, `reset`                              | clock; synchronous active-high reset                       |
| `host_wen`, `host_addr`, `host_wdata`       | write one memory word per clock (intended while in reset)  |
| `host_rdata`                                | memory word at `host_addr`, combinational                  |
| `trace_pc`, `trace_inst`                    | PC and instruction of the instruction executing this cycle |

| parameter   | default | meaning                                        |
|-------------|---------|------------------------------------------------|
| `MEM_WORDS` | 4096    | memory size in 32-bit words (16 KiB)           |
| `RESET_PC`  | 0       | first instruction address                      |
| `HAS_LW_AI` | 1       | include the auto-incrementing load             |

To run a program: hold `reset`, write the image through the host port,
release `reset`, and watch `trace_pc`. The test programs end with
`jal x0, 0`, which spins in place.

## Cycle time and performance

The clock period is the longest register-to-register path of any
instruction. Take these component delays, in units of a gate delay τ:

| component | delay | component | delay |
|---|---|---|---|
| 32-bit 2-to-1 mux | 4τ | 32-bit +4 unit | 30τ |
| 32-bit 4-to-1 mux | 8τ | immediate generator | 12τ |
| 32-bit adder | 60τ | register clock-to-Q / setup | 9τ / 10τ |
| 32-bit ALU | 64τ | register file read / setup | 25τ / 20τ |
| 32-bit multiplier | 100τ | memory read / setup | 120τ / 120τ |

With these numbers, the per-instruction critical paths (control-unit delay
not counted) are:

| instruction | path | delay |
|---|---|---|
| lw   | PC → imem → RF read → ALU → dmem read → wb mux → RF setup | 9+120+25+64+120+8+20 = **366τ** |
| sw   | PC → imem → RF read → ALU → dmem setup | 338τ |
| mul  | PC → imem → RF read → multiplier → wb mux → RF setup | 282τ |
| add  | PC → imem → RF read → op2 mux → ALU → wb mux → RF setup | 250τ |
| bne  | PC → imem → RF read → op2 mux → ALU → pc mux → PC setup | 240τ |
| jal  | PC → imem → imm gen → adder → pc mux → PC setup | 219τ |

The load sets the clock at 366τ. Two benchmark loops, each with n = 64:

- **Vector-vector add** (`dest[i] = src0[i] + src1[i]`). The loop is
  9 instructions per element, so 576 cycles, about 210,800τ.
- **Find** (search for a value; only the first element matches). That is
  1 + 6 + 5 × 63 = 322 instructions, so 322 cycles, about 117,900τ.

The end-to-end testbench runs both loops and confirms the cycle counts.

## Modules

| file | role |
|---|---|
| `proc_pkg.sv` | opcodes, control-signal enums, `ctrl_t`, `mem_req_t` |
| `sc_proc_top.sv` | processor + memory |
| `proc.sv` | control unit + datapath; memory request bundles |
| `datapath.sv` | the datapath above |
| `ctrl.sv` | control unit |
| `regfile.sv` | 32 × 32-bit, 2 read ports, `NWRITE` write ports, x0 = 0 |
| `imm_gen.sv` | I/S/B/J immediates |
| `alu.sv` | add / compare |
| `mul.sv` | 32 × 32 → low 32 multiplier |
| `adder.sv`, `pc_plus4.sv` | branch-target adder, +4 unit |
| `mux2.sv`, `mux4.sv` | operand, write-back and next-PC multiplexers |
| `pc_reg.sv` | PC register with synchronous reset |
| `mem.sv` | dual-ported combinational memory with host port |

## Simulating

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each prints
one line `TB_RESULT checks=N failures=M` and ends. `tb/tb_asm_pkg.sv`
provides instruction encoders and reference immediate decoders. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/proc_pkg.sv tb/tb_asm_pkg.sv tb/sc_proc_top_tb.sv --top-module sc_proc_top_tb
./obj_dir/Vsc_proc_top_tb
```

Replace `sc_proc_top_tb` with any other testbench name to run that one.

- **`sc_proc_top_tb`** uses the default parameters. It runs vector-add,
  find and six random programs, and keeps an instruction-level reference
  model in lockstep. Every cycle the traced PC and instruction must match
  the model; at the end the entire memory must match too. It counts each
  instruction class, taken and fall-through `bne`, writes to x0, and
  `lw.ai` with rd = rs1, and fails if any of these never happened.
- **`sc_proc_base_tb`** runs the plain eight-instruction configuration
  (`HAS_LW_AI = 0`).
- **`proc_tb`** runs a hand-checked directed program. It also checks the
  cycle count and the number of loads and stores.
- **`datapath_tb`** drives random control vectors against a reference
  datapath model.
- **`ctrl_tb`** checks the decode table for random encodings.
- The leaf testbenches check their units against independent reference
  computations.

The simulations have no X state. The register file and memory are not
reset, so the test programs write every register before reading it, and
the host port loads the whole memory.

## Where this design makes its own choices

The structure, instruction set, encodings and immediate formats are the
textbook's. These details are this implementation's own:

- Memory size (4096 words), reset PC (0), synchronous active-high reset,
  and the host load/read port.
- The `trace_pc` / `trace_inst` outputs.
- The memory request format, including a write flag `wen`. The textbook
  control list names only a valid bit for the data memory.
- The ALU compare function for `bne`, and taking `eq` from bit 0 of the
  ALU result.
- Unrecognised instructions execute as no-ops.
- `lw.ai`'s second write port and its rd = rs1 rule (the load wins).
- Only aligned word accesses. There are no byte or halfword loads, no
  exceptions and no misalignment detection.
- The multiplier is one combinational `*`. The register file and memory
  are flip-flop arrays with asynchronous reads, which suit simulation and
  small FPGAs. A real chip would use macros with the same behaviour.
