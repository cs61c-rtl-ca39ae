# MIPS-lite single-cycle processor

This is a 32-bit processor for a six-instruction subset of MIPS: `addu`, `subu`, `ori`, `lw`, `sw`
and `beq`. Every instruction runs in exactly one clock cycle. The PC addresses the instruction
memory at the start of the cycle. The instruction then flows through combinational logic: register
read, extender, ALU, data memory. All state (the PC, one register, one memory word) is written
together on the rising edge that ends the cycle. The clock period must cover the longest of these
paths, which is the `lw` path. No pipelining is done: the point of the design is that each
instruction's register transfer can be read straight off the hardware.

The structure is the classic textbook single-cycle datapath, built from small components: adder,
multiplexer, ALU, extender, enable register, register file and an "ideal" memory. The control is
split off as a separate decoder.

## The instructions and what each one does

All instructions are 32 bits wide. Two formats are used:

```
R-type  | op 31:26 | rs 25:21 | rt 20:16 | rd 15:11 | shamt 10:6 | funct 5:0 |
I-type  | op 31:26 | rs 25:21 | rt 20:16 |          imm16 15:0              |
```

| instr | encoding | register transfer |
|---|---|---|
| `addu rd,rs,rt` | op 0x00, funct 0x21 | R[rd] = R[rs] + R[rt]; PC = PC + 4 |
| `subu rd,rs,rt` | op 0x00, funct 0x23 | R[rd] = R[rs] - R[rt]; PC = PC + 4 |
| `ori rt,rs,imm16` | op 0x0D | R[rt] = R[rs] \| ZeroExt(imm16); PC = PC + 4 |
| `lw rt,imm16(rs)` | op 0x23 | R[rt] = MEM[R[rs] + SignExt(imm16)]; PC = PC + 4 |
| `sw rt,imm16(rs)` | op 0x2B | MEM[R[rs] + SignExt(imm16)] = R[rt]; PC = PC + 4 |
| `beq rs,rt,imm16` | op 0x04 | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16) x 4, else PC = PC + 4 |

The numeric encodings are the standard MIPS ones. Any other encoding acts as a no-op: it writes
nothing and moves on to PC + 4. Overflow is ignored, as `addu` and `subu` define. There are no
jumps, no exceptions and no other instructions.

## How one cycle works

In order of signal flow within one clock period:

1. **Fetch.** The PC (an `enable_register`, written every cycle) addresses the instruction
   memory. The memory read is combinational. The instruction word is split into its fields.
2. **Decode and operand read.** `control` turns `op` and `funct` into the control word. In
   parallel, `rs` and `rt` address the register file's two read ports, which give `busA` and
   `busB`.
3. **Execute.** The extender widens `imm16` by zeros (`ori`) or by sign (`lw`, `sw`, `beq`). The
   ALUSrc mux chooses `busB` (`addu`, `subu`, `beq`) or the immediate (`ori`, `lw`, `sw`) as
   the ALU's B operand. The ALU adds, subtracts or ORs.
4. **Memory.** The ALU result is the data-memory byte address. `busB` (that is, R[rt]) is the
   store data. The memory read is combinational, so `lw` data arrives in the same cycle.
5. **Write-back.** The W_Src mux chooses the memory word (`lw`) or the ALU result as `busW`. The
   RegDst mux chooses `rd` (R-type) or `rt` (I-type) as the register written.
6. **Next PC.** One adder forms PC + 4. A second adder adds SignExt(imm16) shifted left by two
   to PC + 4, giving the branch target. For `beq` the ALU subtracts and its Zero output is the
   Equal condition. The target is taken only when `nPC_sel` and Equal are both 1.

On the rising edge that ends the cycle, the PC, the register file (if RegWr) and the data memory
(if MemWr) are written together. Because everything is written on this one edge, a value written
by one instruction is visible to the next instruction's combinational reads. No forwarding or
stalling is needed.

### Control word

| instr | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | W_Src | nPC_sel |
|---|---|---|---|---|---|---|---|---|
| addu | 1 (rd) | 1 | x | 0 | add | 0 | 0 (ALU) | 0 |
| subu | 1 (rd) | 1 | x | 0 | sub | 0 | 0 | 0 |
| ori | 0 (rt) | 1 | 0 (zero) | 1 (imm) | or | 0 | 0 | 0 |
| lw | 0 | 1 | 1 (sign) | 1 | add | 0 | 1 (mem) | 0 |
| sw | x | 0 | 1 | 1 | add | 1 | x | 0 |
| beq | x | 0 | x | 0 | sub | 0 | x | 1 |

The RTL drives the `x` entries to 0, except ExtOp = 1 for `beq`. The word is the packed struct
`ctrl_t` in `mips_lite_pkg`. ALUctr is the enum `alu_ctr_e`: add 0, sub 1, or 2, and 3, slt 4.
The ALU also implements AND and signed set-less-than, the two further operations of the full MIPS
ALU. No instruction of this subset uses them.

## Modules

| module | role |
|---|---|
| `mips_lite_cpu` | top: `control` + `datapath` |
| `datapath` | everything but control: `ifetch`, `register_file`, `extender`, `alu`, data `ideal_memory`, three `mux2` |
| `control` | combinational decoder, op/funct -> `ctrl_t` |
| `ifetch` | PC (`enable_register` + reset mux), `next_address_logic`, instruction `ideal_memory` |
| `next_address_logic` | two `adder32`, a sign `extender`, a `mux2` |
| `register_file` | 32 x 32 bits; 2 combinational read ports, 1 write port on the rising edge; R0 reads 0 |
| `ideal_memory` | DEPTH x 32-bit words; combinational read, write on the rising edge when `we` |
| `alu` | add/sub through one `adder32` (B inverted, carry-in 1 to subtract), or, and, slt; `zero` |
| `extender` | 16 -> 32 bits, zero or sign by `ext_op` |
| `adder32`, `mux2`, `enable_register` | W-bit adder with carry in/out, 2:1 mux (`sel=0` picks `a`), register with write enable |
| `mips_lite_pkg` | opcodes, `alu_ctr_e`, `ctrl_t`, instruction field structs |

## Using the top

Parameters: `IMEM_DEPTH` and `DMEM_DEPTH` (words, default 1024 each, i.e. 4 KiB per memory).

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | all state changes on the rising edge |
| `rst` | in | 1 | synchronous, active high: next PC is 0, register and memory writes blocked |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, log2(IMEM_DEPTH), 32 | write one instruction word (word index) per clock |
| `pc`, `instr` | out | 32, 32 | instruction executing this cycle |
| `reg_we`, `reg_rw`, `reg_busw` | out | 1, 5, 32 | register write taking effect at the end of this cycle |
| `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | data-memory store (byte address, data) this cycle |

To run a program, hold `rst` high and write the program through the `prog_*` port. Keep `rst`
high for one more clock with `prog_we` low, then release it. The PC is then 0 and the processor
executes one instruction per clock. The instruction memory has a single address port, which the
program-load port takes over while `prog_we` is 1. A program has no halt instruction; the usual
idiom is a `beq $0,$0,-1` that branches to itself.

Addressing: the PC and data addresses are byte addresses. The memories use bits
`[log2(DEPTH)+1:2]` and ignore the two low bits, so misaligned addresses are silently rounded
down. Addresses beyond the memory size wrap around.

No register, memory word or PC is cleared except the PC by `rst`. Registers and memories start
with whatever the simulator or the silicon gives them.

## Where this design makes its own choices

The register transfers, the set of components, the control points, single-edge clocking and the
ideal memory behaviour (combinational read, clocked write) follow the classic single-cycle
datapath. The following are choices of this implementation:

- The opcode and funct values are the standard MIPS ones.
- Register 0 is hard-wired to zero, as in the MIPS architecture.
- Storage is written on the rising edge.
- The reset is synchronous and active high, and resets only the PC, to 0.
- The program-load port and the observation outputs are additions.
- Each memory is 1024 words.
- Addresses wrap and the low address bits are ignored.
- Unsupported encodings act as no-ops.
- The ALUctr encoding and the ExtOp and multiplexer select polarities are this design's own.
- The ALU's extra AND and signed SLT are included.
- The ALU is a behavioural adder plus logic. The insides of adder and ALU are left to synthesis.
- A register read during a write to the same register returns the old value. The new value
  appears after the edge.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
Each one also has a watchdog.

- `tb_mips_lite_cpu` runs the top at its default sizes. It starts with a directed loop that sums
  5..1, stores and reloads the sum and ORs in `0x8000`. It checks the final registers and memory,
  and that the halt loop is reached after exactly 25 clocks for 25 instructions. It then runs 20
  random programs that fill the whole instruction memory, 1000 cycles each. Every cycle it
  compares the PC, the write-back bus and the store bus with an instruction-level reference model
  (`tb/mips_ref_pkg.sv`). At the end of each program it compares all registers and data memory.
  It counts each instruction kind, taken and untaken branches, negative offsets, high `ori`
  immediates, writes to `$0` and unsupported encodings, and fails if any count is zero.
- `tb_datapath` drives the datapath with control words worked out in the testbench, not by
  `control`. It compares the datapath with the same reference model.
- `tb_control` checks all 4096 op/funct pairs. The component testbenches check their modules
  against independent reference arithmetic with random and corner-case inputs.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/mips_lite_pkg.sv tb/mips_ref_pkg.sv tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu
./obj_dir/Vtb_mips_lite_cpu
```

For testbenches other than the two processor-level ones, leave out `tb/mips_ref_pkg.sv` and
name the testbench's file and module. All of them finish in well under a second.

## Changing it

- To add an instruction, add its opcode to `mips_lite_pkg` and a case to `control`. If it needs
  new hardware (a jump target mux, a shifter for `shamt`), add that to `datapath` or
  `next_address_logic`. Extend `mips_ref_pkg`'s model so the processor tests cover it.
- To change a memory size, change the top's `IMEM_DEPTH` or `DMEM_DEPTH`. Both should be powers
  of two.
