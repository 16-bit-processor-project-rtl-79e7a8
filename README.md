# cpu16 — a 16-bit processor sequenced by one control PLA

cpu16 is a small multi-cycle processor. Every instruction is one 16-bit word.
There are 30 defined opcodes and eight 16-bit registers. All sequencing comes
from one two-level AND-OR array, the control PLA. It has nine inputs: a 2-bit
state, the level of the machine clock, RESET and the 5-bit opcode. It drives
24 control lines. Those lines open latches, clock the PC and the IR, pick the
single driver of each internal bus and give the next state. The datapath has
no sequencing of its own. Apart from a little decoding next to the PLA, the
whole behaviour of an instruction is in the PLA's table.

The processor is written as synthesizable SystemVerilog (IEEE 1800-2017). The
control words, opcodes and phase structure follow the original processor
description. Where that description only names a unit, this implementation
makes the choices listed under "Design choices and departures".

## Instruction set

| opcode | mnemonic | operation |
|---|---|---|
| 00000 | SEQ Rd,Rs1,Rs2 | Rd = (Rs1 == Rs2) |
| 00001 | ADD Rd,Rs1,Rs2 | Rd = Rs1 + Rs2, sets carry/overflow |
| 00010 | SGT Rd,Rs1,Rs2 | Rd = (Rs1 > Rs2), signed |
| 00011 | ADDI Rd,Rs,#5 | Rd = Rs + sext(imm5), sets carry/overflow |
| 00100 | SUB Rd,Rs1,Rs2 | Rd = Rs1 − Rs2, sets carry/overflow |
| 00101 | SLT Rd,Rs1,Rs2 | Rd = (Rs1 < Rs2), signed |
| 00111 / 01001 / 01011 / 01100 | OR / AND / XOR / XNOR Rd,Rs1,Rs2 | bitwise |
| 01000 / 01010 | ORI / ANDI Rd,Rs,#5 | bitwise with zext(imm5) |
| 01101 | NOT Rd,Rs | Rd = ~Rs |
| 01110 / 01111 / 10000 | SRA / SRL / SLL Rd,Rs,#2 | shift by 0..3 |
| 10001 | SW Rs,Raddr | mem[Raddr] = Rs |
| 10010 | MUL Rd,Rs1,Rs2 | Rd = Rs1[7:0] × Rs2[7:0] (unsigned, 16-bit result) |
| 10100 | LW Rd,Raddr | Rd = mem[Raddr] |
| 10101 / 10110 | LBI / LBIU Rd,#8 | Rd = sext / zext(imm8) |
| 10111 | LHI Rd,#8 | Rd = {imm8, 8'h00} |
| 11000 / 11001 | BEQZ / BNEZ Rs,#8 | if Rs ==0 / !=0: PC = PC + sext(imm8) |
| 11010 / 11011 | BC / BO #11 | if carry / overflow: PC = PC + sext(imm11) |
| 11100 | NOP | — |
| 11101 | J #11 | PC = PC + sext(imm11) |
| 11110 | JR Rs | PC = Rs |
| 11111 | JALR Rd,#8 | Rd = PC; PC = PC + sext(imm8) |
| 00110, 10011 | undefined | the machine stops on them (see below) |

"PC" in a branch means the address of the next instruction. The PC steps by 2
and addresses are byte addresses of 2-byte words. Only ADD, SUB and ADDI
update the carry and overflow flags.

Field placement (the original gives only the widths):

```
[15:11] opcode  [10:8] Rd  [7:5] Rs1  [4:2] Rs2  [1:0] shift amount
imm5 = [4:0]    imm8 = [7:0]    imm11 = [10:0]
```

BEQZ/BNEZ keep their register in the Rd position. SW keeps the data register
in Rs1 and the address register in Rs2. LW keeps the address register in Rs2.
JR keeps its register in Rs1.

## The eight phases

The machine clock `Clk` has four periods per instruction: fetch, decode,
execute and writeback. Each period has a low half and a high half. The state
register `{S1,S0}` changes only when Clk falls, so the PLA input `{S1,S0,Clk}`
walks through eight phase codes:

| phase | B | C | D | E | F | G | H | J |
|---|---|---|---|---|---|---|---|---|
| {S1,S0,Clk} | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
| period | fetch | fetch | decode | decode | execute | execute | writeback | writeback |

The PLA outputs the next state `{I_1,I_0}`, and the state register takes it
at the end of each high half. In phases B–D the control word is the same for
every instruction. From E onward it depends on the instruction class: 4
classes in E, 11 in F, 10 in G, 10 in H and 15 in J. SW returns to state 00
at the end of G, so it takes 6 phases. Every other instruction takes 8.

In this implementation the machine clock is derived from one edge clock
`clk` running at twice its rate: **one `clk` cycle is one phase**. So an
instruction takes 8 `clk` cycles, and SW takes 6.

### What happens in each phase

Two instruction classes show how the control words drive the datapath.

**Register-register ALU instruction (e.g. SUB):**

- **B, C (fetch).**
  - The PC drives the B bus, which is the memory address. Addr_valid is 1.
  - The ALU operand latches are open. The A latch takes the constant 2
    (ALUA_con) and the B latch takes the PC, and the adder is selected. The
    latches close at the end of C, holding PC and 2.
  - The memory word comes back through the DestIn latch onto the D bus. The
    IR master follows the D bus.
- **D.** DestIn still drives the instruction, and the IR master follows it.
- **E (decode).**
  - IR_Clk = 1, so the IR shows the new instruction.
  - The ALU drives PC + 2 onto the D bus, and the PC master follows it.
  - The registers named by Rs1 and Rs2 drive the A and B buses.
- **F (execute).**
  - PC_Clk = 1, so the PC now shows PC + 2.
  - The ALU latches open and take the two register operands.
- **G.** The latches close. The ALU result is selected (adder, BFU or
  shifter). SUB/SEQ/SGT/SLT switch the adder to subtract from here on.
- **H.** ADD/SUB/ADDI open the carry/overflow latch (ALUOC_Clk).
- **J (writeback).** Reg_write writes the D bus (the ALU result) into Rd.

**Branch (e.g. BEQZ):**

- **E.** The immediate generator drives the A bus.
- **F.** The PC, already showing PC + 2, drives the B bus. The ALU latches
  take both. The adder forms the target, and the PC master follows it through
  G and H.
- **J.** The PLA raises PC_Clk for every branch, because the branch conditions
  are not PLA inputs. `branch_cond` drops PC_Clk when the condition is false:
  - BEQZ, BNEZ: REG_zero, the register on read port A, which is steered to
    the Rd field by Rd_is_Rs1.
  - BC, BO: the latched carry or overflow.

  When the branch is not taken, the PC keeps PC + 2.

**Other instructions:**

- **JALR** also writes Rd in phase E. The D bus then carries the ALU's PC + 2.
- **JR, LBI, LBIU and LHI** pass the A operand through the shifter with the
  shift amount forced to 0.
- **MUL** reads the A and B buses directly. Its control words never open the
  ALU latches.
- **LW** keeps Addr_valid through F–J and writes DestIn into Rd in J.
- **SW** drives Addr_valid and Read_write in F and G and ends there.

### Reset

RESET is a PLA input, and the PLA only acts on it in state 00:

- **Phase A_1** (000, RESET=1): DestIn drives the D bus and the PC master
  follows.
- **Phase A_2** (001, RESET=1): PC_Clk loads the PC.
- The next state stays 00 while RESET is held.

In this implementation RESET also:

- clears the DestIn latch, so the PC loads 0;
- clears the state register from any phase.

Hold `reset` for at least two cycles. Release it at a clock edge after which
`clk_ph` is 0, so that the first phase is B. Execution starts at address 0.
The registers, flags, IR and memory are not reset.

### Undefined opcodes

Opcodes 00110 and 10011 match no product term after phase D. In phase E every
control line is 0. The next state is therefore 00, the IR is not clocked and
PC_Clk never rises. The machine fetches the same word again every 4 phases and
never moves on. It behaves the same way in the original table. Nothing
else changes, and RESET recovers.

## Control PLA (`cd_pla`)

The array has 52 product terms. Each term matches:

- one phase code;
- optionally a RESET value;
- a set of opcodes, given as a 32-bit membership mask.

The OR plane ORs together the 24-bit words of all matching terms. Each term is
one row of the phase/instruction-class map (A_1, A_2, B, C, D, E_1–E_4,
F_1–F_11, G_1–G_10, H_1–H_10, J_1–J_15). J_10–J_13 share one word and are
merged into a single term. The words are written left to right in this output
order, which is also the bit order of `cpu16_pkg::ctrl_t`, MSB first:

```
PC_Clk IR_Clk ALULatch_Clk ALUOC_Clk Addr_valid Read_write Immed_enable
RegA_enable PC_enable RegB_enable Mult_enable DestIn_enable ALU_enable
ALUSel_bs ALUSel_bs_a ALUShift_la ALUShift_lr ALUA_con Rs1_is_Rs2 Rd_is_Rs1
Reg_write I_0 I_1 ALUShift_force
```

Some signals are not PLA outputs:

- the shift amount, which is IR[1:0] unless ALUShift_force is set;
- the 4-entry BFU truth table (ALUBFU_3..0, indexed by the bit pair
  `{a,b}`), made by `instr_decode`;
- the adder's subtract/compare mode, also made by `instr_decode` and active
  only when S1 = 1.

`tb_cd_pla` checks all 512 input combinations against a separate
per-opcode cube list of the same table (153 cubes). It also checks that no
word enables two drivers on one bus, and that every defined opcode returns to
state 00 after 8 phases (SW after 6).

## Datapath

```
 drivers (enable)            bus        consumers
 RegA (RegA_enable)   --+
 Immed (Immed_enable) --+--> A bus --> ALU A latch (via ALUA_con: A bus or 2),
                                       multiplier a[7:0], mem_wdata
 RegB (RegB_enable)   --+
 PC (PC_enable)       --+--> B bus --> ALU B latch, multiplier b[7:0], mem_addr
 ALU (ALU_enable)     --+
 Mult (Mult_enable)   --+
 DestIn (DestIn_en.)  --+--> D bus --> PC master, IR master, register write port
```

- **Buses.** The original buses are tri-state. Here each bus is an AND-OR
  multiplexer of its enabled drivers. Concurrent assertions in `cpu16` check
  that at most one driver of a bus is enabled.
- **Master-slave PC and IR (`ms_reg`).** While the control line is 0 the
  master follows the D bus. While it is 1 the output shows the master, and the
  slave takes it at the end of that phase.
- **ALU latches (`alu`).** These are transparent latches, modelled on `clk`.
  While open, the output follows the input. Once closed, it holds the value
  from the end of the last open phase. The constant select is in front of the
  A latch. This matters for JALR: in its phase E, ALUA_con is 0 while the ALU
  must still output the PC + 2 captured in fetch.
- **Carry/overflow latch.** It is open in phase H of ADD, SUB and ADDI. Its
  output is the held value. The flags are only read in phase J, after the
  latch has closed, so a path through it while open is never needed, and
  leaving it out avoids a loop from PC_Clk back to itself.
- **Register file (`regfile`).**
  - Port A reads Rs1, or Rd when Rd_is_Rs1 is set.
  - Port B reads Rs2, or Rs1 when Rs1_is_Rs2 is set. Immediate instructions
    set it because their A side carries the immediate.
  - The write is synchronous, at the end of a phase with Reg_write.
- **IR opcode to the PLA.** In phase E the PLA reads the opcode from the IR
  master, and in the other phases from the IR slave. This gives the same
  value as the IR output for every defined opcode, and it keeps IR_Clk from
  depending on itself.

## Interface and timing (`cpu16`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | phase clock, one cycle per phase (2 × machine Clk) |
| reset | in | 1 | RESET, synchronous, hold for at least 2 cycles |
| mem_addr | out | 16 | byte address (B bus) |
| mem_wdata | out | 16 | write data (A bus) |
| mem_rdata | in | 16 | read data, expected combinationally for `mem_addr` |
| addr_valid | out | 1 | address valid |
| read_write | out | 1 | 0 read, 1 write |

- **Reads.** The processor takes `mem_rdata` in every cycle with
  `addr_valid && !read_write`. It keeps the last value in DestIn after that.
- **Writes.** The memory should store `mem_wdata` at the end of every cycle
  with `addr_valid && read_write`. SW writes in two cycles, both with the same
  data.
- **Instruction fetch.** Fetch reads in phases B and C.
- **LW.** LW reads in phases F to J.

## Design choices and departures

These points are not fixed by the original description, or are read from
partial information:

- **Instruction field positions.** As above.
- **Shift amount.** The original says the shifter is controlled by "OC bits 0
  and 1". It also says shifts use a 2-bit immediate. Taking opcode bits would
  fix every shift amount (SRA would always shift by 2), so IR[1:0] is used.
- **Compares and MUL.** Compares are signed. MUL is unsigned.
- **Flags.** Carry is the adder carry out; for SUB it is the carry of
  A + ~B + 1. Overflow is signed overflow.
- **LHI.** LHI clears the low byte. The original leaves this optional.
- **BFU truth tables.** They come from the opcode, in `instr_decode`. Their
  source is not specified in the original.
- **Reset.** The reset vector is 0, set by clearing DestIn. RESET also clears
  the state register from any phase.
- **Register file.** No register is hard-wired to zero, and nothing is reset
  except the state, DestIn and (through the reset phases) the PC.
- **Individual instruction decode.** Each decoded line compares all five
  opcode bits. The original decode uses don't-cares that only hold where each
  line is used, so the exact decode gives the same result there.
- **Control table.** Two rows of the original table needed reading:
  - The fetch/decode row D has one don't-care too few. It applies to all
    instructions.
  - The SLL writeback row J_14 has one zero too many. It is read as the SRL
    word without the right-shift bit, the same pattern as every other SLL
    row.
- **Minimised PLA.** The original's minimised form (espresso output) is
  not reproduced. The array here uses the unminimised terms, which have the
  same logic function. A physical PLA would use the minimised form.
- **Clocking.** The two-phase clock and the latches are modelled with a
  single rising-edge clock at twice the machine rate. The design has no latch
  cells and no combinational loops.

## Files

`rtl/`:

| file | contents |
|---|---|
| cpu16_pkg.sv | widths, opcodes (`opcode_e`), control word (`ctrl_t`), decode bundle (`dec_t`), phase codes |
| cpu16.sv | top: controller and datapath, buses, DestIn latch |
| cd_pla.sv | control PLA |
| state_seq.sv | clock phase and state register |
| instr_decode.sv | individual instruction decode and BFU table |
| branch_cond.sv | PC_Clk gating for conditional branches |
| ms_reg.sv | master-slave register (PC, IR) |
| regfile.sv | 8 × 16 register file |
| imm_gen.sv | immediate generator |
| alu.sv | operand latches, adder, BFU, shifter, flag latch |
| multiplier.sv | 8 × 8 multiplier |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

`tb_cpu16` is the end-to-end test:

- It fills the 64 KiB memory with random instructions and runs 30,000 of them
  from reset.
- At every fetch it compares PC, all registers and both flags with an
  instruction-level reference model in the testbench.
- It checks the cycle count of every instruction, and that the IR and the PC
  are updated by the start of decode and of execute.
- At the end of each run it compares the whole memory.
- Random code only branches forward. A word fetched more than eight times is
  replaced by an LBI, which breaks loops.
- A second run resets the machine mid-program and runs a directed program: a
  countdown loop, an overflowing ADD with BO taken, an untaken BC, and JALR,
  ending on an undefined opcode.
- It requires every opcode, taken and untaken branches of each kind, SW,
  the undefined-opcode stall and both resets to occur.

It runs in well under a second of simulation time.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu16_pkg.sv tb/tb_cpu16.sv --top-module tb_cpu16
./obj_dir/Vtb_cpu16
```

Replace `tb_cpu16` with any other testbench name to run a unit test. Each
testbench has a watchdog that ends the run with a failure if it hangs.
