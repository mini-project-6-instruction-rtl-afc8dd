# A 16-bit Thumb-style instruction decoder and program counter

This is the control half of a small 16-bit CPU. Each clock, the controller
fetches one 16-bit instruction, decodes it, and drives a datapath. The
datapath holds a register file, an ALU, a shifter, a result multiplexer and a
data memory. The controller tells it which registers to read and write, which
operation to perform and where the result comes from. The controller also
keeps the state the datapath does not hold: the program counter, the NZCV
condition flags and the link register.

The instruction set is a 24-instruction subset of 16-bit ARM Thumb, with
word addressing and a few simplifications (see *Instruction set*). The RTL
covers the controller only. The datapath and the memories are outside it and
connect through ports. `tb/` holds behavioural models of them, so that whole
programs can be run.

## Structure

```
             +--------------------- control ----------------------------+
             |                                                          |
instruction -+-> instr_reg --> id_instruction --> id_decode --> controls |--> datapath
             |   (reset: NOOP)                       |                  |
flag_nzcv ---+-------------------------------> flag_reg --> sel_pc ----+
             |                                  (NZCV, cond check)      |
mux_result --+--> program_counter --> pc_out ---------------------------+--> instruction memory
             |        ^ sel_pc                                          |
             |   LR register (loaded by BL) --> lr ---------------------+
             +----------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/id_pkg.sv` | Widths, the ALU / result-select / condition encodings, the decoded-control struct and the condition function |
| `rtl/instr_reg.sv` | The instruction register between fetch and decode. Reset loads NOOP (`BF00`) |
| `rtl/id_decode.sv` | The combinational decode table |
| `rtl/flag_reg.sv` | The NZCV register with per-instruction update mask, and the evaluation of the B\<cc\> condition |
| `rtl/instruction_decoder.sv` | Instruction register + decode + flags + LR + branch resolution |
| `rtl/program_counter.sv` | PC: +1 per cycle, or load the branch target |
| `rtl/control.sv` | Top level: decoder and PC |

## Timing: two stages and a branch delay slot

This part is the hardest to get right when you attach a datapath or write
programs for the design.

* **Fetch.** The instruction memory is read combinationally at `pc_out`.
  On the rising edge, `instr_reg` captures the word and the PC advances.
* **Decode/execute.** In the next cycle the word is on `id_instruction`. All
  controls derived from it are combinational. The datapath must finish the
  operation within this cycle: it writes the register file and, for STR, the
  data memory at the next rising edge. The flags and LR are updated at that
  same edge. Nothing depends on a result before it is written, so there are
  no hazards and no forwarding.
* **PC value seen by an instruction.** While the instruction at address *a*
  is decoded, `pc_out` is *a* + 1. Every PC-relative target is formed from
  that value: a branch at *a* with offset *k* goes to *a* + 1 + *k*. BL saves
  `pc_out + 1` = *a* + 2 in LR.
* **Delay slot.** When a branch is decoded, the instruction at *a* + 1 has
  already been fetched. It is executed and not cancelled. Execution then goes
  on at the target. Because of this, BL's return address *a* + 2 is the
  instruction after the delay slot.
* **Reset.** Reset is synchronous and active high. It sets the PC to 0,
  loads NOOP into the instruction register, and clears the flags and LR.
  The first cycle after reset decodes that NOOP while address 0 is fetched.

Example (the reference program): a `BL` (`450B`, offset 11) is decoded while
`pc_out` = 7. The PC then goes to 18 and LR becomes 8. The `CMP` fetched from
address 7 is still executed.

## Controller ↔ datapath contract

The datapath is expected to look like this:

* **Register file.** Two combinational read ports and one write port.
  * Read port 0 (`rf_rd_add0`) carries Rm, or the store data for STR.
  * Read port 1 (`rf_rd_add1`) carries Rn, Rdn or SP.
  * The write uses `rf_wr_add` / `rf_wr_en` and is clocked.
  * SP is register 13. When reading register 14, the datapath should return
    the controller's `lr` output, so that `BX r14` returns from a BL.
* **ALU operands.**
  * `op0 = sel_alu_op0 ? alu_op0_from_id : read port 0`, where
    `alu_op0_from_id` is the extended immediate.
  * `op1 = sel_alu_op1 ? alu_op1_from_id : read port 1`, where
    `alu_op1_from_id` is the PC.
* **`alu_control`.**

  | code | operation |
  |---|---|
  | 0 | AND |
  | 1 | ADD (`op1 + op0`) |
  | 2 | NOT (`~op0`) |
  | 3 | SUB (`op1 − op0`) |
  | 4 | OR |
  | 6 | XOR |
  | 7 | CMP (`op1 − op0`, result not written) |

  SUBS Rd, Rn, Rm therefore computes Rn − Rm. The carry follows the Thumb
  convention: C = 1 means no borrow.
* **Shifter.** It shifts read-port-1 data by read-port-0 data.
  * `right = 0` gives LSL.
  * With `right = 1`: `shift = 0` gives ROR, otherwise `arith` selects ASR
    (1) or LSR (0).
* **`result_sel`.**

  | code | source |
  |---|---|
  | 0 | ALU |
  | 1 | shifter |
  | 2 | read port 0 (MOV, BX) |
  | 3 | data-memory read data (LDR) |
  | 4 | `alu_op0_from_id` (MOVS) |

  The result mux output comes back to the controller as `mux_result`. It is
  both the write-back value and the branch target.
* **`flag_nzcv`.** N and Z of `mux_result`, plus C and V from the ALU (or C
  from the shifter). The controller stores only the flags the instruction is
  allowed to change.
* **Data memory.** The address is the ALU output (Rn + imm5). Reads use
  `dm_read_en`. Writes use `dm_write_en` and take read-port-0 data.

## Instruction set

Fields are listed from bit 15 down to bit 0. "upd" lists the flags the
instruction updates.

| instruction | encoding | operation | upd |
|---|---|---|---|
| MOVS Rd,#imm8 | `00100 Rd imm8` | Rd = imm8 (zero-extended) | NZ |
| MOV Rd,Rm | `01000110 D Rm4 Rd3` | Rd(D:Rd3) = Rm (16 registers) | – |
| ADDS Rd,Rn,Rm | `0001100 Rm Rn Rd` | Rd = Rn + Rm | NZCV |
| SUBS Rd,Rn,Rm | `0001101 Rm Rn Rd` | Rd = Rn − Rm | NZCV |
| ADDS Rd,Rn,#imm3 | `0001110 imm3 Rn Rd` | Rd = Rn + imm3 | NZCV |
| SUBS Rd,Rn,#imm3 | `0001111 imm3 Rn Rd` | Rd = Rn − imm3 | NZCV |
| ADD SP,SP,#imm7 | `101100000 imm7` | SP += imm7 (not scaled) | – |
| SUB SP,SP,#imm7 | `101100001 imm7` | SP −= imm7 | – |
| CMP Rn,Rm | `0100001010 Rm Rn` | flags of Rn − Rm | NZCV |
| ANDS / EORS / ORRS / MVNS Rdn,Rm | `010000 0000/0001/1100/1111 Rm Rdn` | Rdn = Rdn op Rm, MVN: ~Rm | NZ |
| LSLS / LSRS / ASRS / RORS Rdn,Rm | `010000 0010/0011/0100/0111 Rm Rdn` | shift Rdn by Rm[7:0] | NZC |
| STR Rt,[Rn,#imm5] | `01100 imm5 Rn Rt` | Mem[Rn + imm5] = Rt (word address) | – |
| LDR Rt,[Rn,#imm5] | `01101 imm5 Rn Rt` | Rt = Mem[Rn + imm5] | – |
| B\<cc\> label | `1101 cond imm8` | if cond: PC = PC + sext(imm8) | – |
| B label | `11100 imm11` | PC = PC + sext(imm11) | – |
| BL label | `01000101 xx imm6` | LR = PC + 1; PC = PC + sext(imm6) | – |
| BX Rm | `010001110 Rm4 000` | PC = Rm | – |
| NOOP | `10111111 00000000` | nothing (one idle cycle) | – |

The conditions are the usual Thumb codes:

| code | condition | code | condition |
|---|---|---|---|
| 0 | EQ | 8 | HI |
| 1 | NE | 9 | LS |
| 2 | CS | 10 | GE |
| 3 | CC | 11 | LT |
| 4 | MI | 12 | GT |
| 5 | PL | 13 | LE |
| 6 | VS | 14 | always |
| 7 | VC | 15 | never |

Any encoding not in the table behaves as NOOP.

Differences from standard Thumb:

* Addresses are in 16-bit words, so the PC advances by 1.
* Immediates of SP arithmetic and LDR/STR are not scaled.
* BL is a single 16-bit instruction with a 6-bit offset. It takes the
  encoding space of Thumb's high-register CMP.
* There is a branch delay slot.

## What follows the source design and what is this RTL's own choice

These points follow the source design:

* The instruction list, the field positions and the operations.
* The 16-bit width and the 4-bit register addresses.
* The signal names.
* The ALU codes and the result-select codes 0, 1, 2 and 4.
* The NOOP reset value of the instruction register.
* LR = PC + 1.
* The two-stage timing with a delay slot. This was derived from a reference
  run of the source design.

These points are this RTL's own choices:

* Result-select code 3 for LDR.
* SP = r13.
* LDR does not update flags, and RORS updates NZC like the other shifts.
  The source's table is ambiguous on both points.
* Condition code 15 means "never".
* Unknown encodings decode as NOOP.
* BX requires bits [2:0] = 0.
* Reading r14 returns LR. This is a datapath convention used by the
  testbench model.
* The synchronous reset and the PC reset value 0.

The source reports a synthesized cycle time of about 1.5 ns in a standard-cell
flow. This RTL has the same register structure (PC, instruction register,
flags, LR: 52 flip-flops), but no timing claim is made for it.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. All of them use
default parameters.

| testbench | what it does |
|---|---|
| `tb_id_decode` | All 65 536 encodings against a reference decode written from the instruction table, plus the control values of the reference program |
| `tb_flag_reg` | Masked flag updates and all 16 conditions on random flags |
| `tb_instr_reg`, `tb_program_counter` | Register behaviour, reset, branch loads, wrap-around |
| `tb_instruction_decoder` | Decoder with flags, LR and branch resolution on random instruction streams |
| `tb_test0` | The reference program (`2203 4616 1DD4 19A3 1AB0 1E11 450B 4284`, then `4032`… at address 18), checking the PC, results, registers, flags and LR each cycle |
| `tb_control` | End to end (see below) |

`tb_control` runs the controller on `tb/tb_datapath.sv` and 256-word
memories. It compares the PC, the decoded instruction, all registers, the
flags, LR and memory with a reference model in `tb/tb_isa.svh` after every
cycle. It first runs a directed program that covers every instruction, taken
and untaken B\<cc\>, backward loops, BL/BX r14, delay slots and overflow.
It then runs six random 256-word programs. It counts each mechanism and
fails if one never happens.

Example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/id_pkg.sv rtl/instr_reg.sv rtl/id_decode.sv rtl/flag_reg.sv \
  rtl/program_counter.sv rtl/instruction_decoder.sv rtl/control.sv \
  tb/tb_datapath.sv tb/tb_control.sv --top-module tb_control -Mdir obj
./obj/Vtb_control
```

Run this from the repository root, because `tb_isa.svh` is included as
`tb/tb_isa.svh`. Unit testbenches need only `rtl/`.
