// id_decode: combinational decode table of the instruction decoder.
//
// Maps one 16-bit instruction to the controls of the datapath (register-file
// addresses and write enable, ALU operand selects and operation, shifter
// mode, result-mux select, data-memory enables), the extended immediate, the
// set of NZCV flags the instruction updates and the kind of branch it is.
// Opcode bits, field positions, immediate extensions and which flags each
// instruction updates follow the supported-instruction table of the design.
//
// Operand convention: read port 0 carries Rm (the second operand, or the
// store data of STR), read port 1 carries Rn/Rdn; the ALU computes
// op1 - op0 for SUB/CMP, so SUBS Rd,Rn,Rm gives Rn - Rm. Immediates go out on
// alu_op0 (sel_alu_op0 = 1); PC-relative branches also put the PC on op1
// (sel_alu_op1 = 1) and let the ALU form PC + offset, which the result mux
// passes to the program counter. BX passes Rm through the result mux.
//
// This design's own choices: 3-bit register fields are zero-extended to the
// 4-bit register address; SP is register 13; LDR updates no flags; RORS
// updates N, Z and C like the other shifts; encodings outside the table
// (including BX with non-zero bits [2:0]) decode as NOOP. Purely
// combinational, no clock.
module id_decode
  import id_pkg::*;
(
  input  logic [DATA_W-1:0] instr,
  output id_ctrl_t          ctrl
);

  logic [RF_ADDR_W-1:0] r_lo;    // bits [2:0]: Rd / Rdn / Rt
  logic [RF_ADDR_W-1:0] r_mid;   // bits [5:3]: Rn / Rm (two-register forms)
  logic [RF_ADDR_W-1:0] r_hi;    // bits [8:6]: Rm (three-register forms)

  assign r_lo  = {1'b0, instr[2:0]};
  assign r_mid = {1'b0, instr[5:3]};
  assign r_hi  = {1'b0, instr[8:6]};

  always_comb begin
    ctrl             = '0;
    ctrl.alu_control = ALU_AND;
    ctrl.result_sel  = RES_ALU;
    ctrl.flag_upd    = UPD_NONE;
    ctrl.branch      = BR_NONE;
    ctrl.cond        = COND_AL;

    casez (instr)
      // MOVS Rd, #imm8
      16'b00100???_????????: begin
        ctrl.wr_add      = {1'b0, instr[10:8]};
        ctrl.wr_en       = 1'b1;
        ctrl.imm         = {8'h00, instr[7:0]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.result_sel  = RES_IMM;
        ctrl.flag_upd    = UPD_NZ;
      end
      // MOV Rd, Rm (4-bit registers, Rd = D:Rd)
      16'b01000110_????????: begin
        ctrl.rd_add0    = instr[6:3];
        ctrl.wr_add     = {instr[7], instr[2:0]};
        ctrl.wr_en      = 1'b1;
        ctrl.result_sel = RES_REG;
      end
      // ADDS Rd, Rn, Rm / SUBS Rd, Rn, Rm
      16'b0001100?_????????,
      16'b0001101?_????????: begin
        ctrl.rd_add0     = r_hi;
        ctrl.rd_add1     = r_mid;
        ctrl.wr_add      = r_lo;
        ctrl.wr_en       = 1'b1;
        ctrl.alu_control = instr[9] ? ALU_SUB : ALU_ADD;
        ctrl.flag_upd    = UPD_NZCV;
      end
      // ADDS Rd, Rn, #imm3 / SUBS Rd, Rn, #imm3
      16'b0001110?_????????,
      16'b0001111?_????????: begin
        ctrl.rd_add0     = r_mid;
        ctrl.rd_add1     = r_mid;
        ctrl.wr_add      = r_lo;
        ctrl.wr_en       = 1'b1;
        ctrl.imm         = {13'd0, instr[8:6]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.alu_control = instr[9] ? ALU_SUB : ALU_ADD;
        ctrl.flag_upd    = UPD_NZCV;
      end
      // ADD SP, SP, #imm7 / SUB SP, SP, #imm7
      16'b10110000_????????: begin
        ctrl.rd_add0     = SP_REG;
        ctrl.rd_add1     = SP_REG;
        ctrl.wr_add      = SP_REG;
        ctrl.wr_en       = 1'b1;
        ctrl.imm         = {9'd0, instr[6:0]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.alu_control = instr[7] ? ALU_SUB : ALU_ADD;
      end
      // CMP Rn, Rm
      16'b01000010_10??????: begin
        ctrl.rd_add0     = r_mid;
        ctrl.rd_add1     = r_lo;
        ctrl.alu_control = ALU_CMP;
        ctrl.flag_upd    = UPD_NZCV;
      end
      // ANDS / EORS / ORRS / MVNS Rdn, Rm
      16'b01000000_00??????,
      16'b01000000_01??????,
      16'b01000011_00??????,
      16'b01000011_11??????: begin
        ctrl.rd_add0  = r_mid;
        ctrl.rd_add1  = r_lo;
        ctrl.wr_add   = r_lo;
        ctrl.wr_en    = 1'b1;
        ctrl.flag_upd = UPD_NZ;
        unique case (instr[9:6])
          4'b0000: ctrl.alu_control = ALU_AND;
          4'b0001: ctrl.alu_control = ALU_XOR;
          4'b1100: ctrl.alu_control = ALU_OR;
          default: ctrl.alu_control = ALU_NOT;  // 4'b1111
        endcase
      end
      // LSLS / LSRS / ASRS / RORS Rdn, Rm
      16'b01000000_10??????,
      16'b01000000_11??????,
      16'b01000001_00??????,
      16'b01000001_11??????: begin
        ctrl.rd_add0    = r_mid;
        ctrl.rd_add1    = r_lo;
        ctrl.wr_add     = r_lo;
        ctrl.wr_en      = 1'b1;
        ctrl.result_sel = RES_SHIFT;
        ctrl.flag_upd   = UPD_NZC;
        ctrl.right      = (instr[9:6] != 4'b0010);
        ctrl.shift      = (instr[9:6] != 4'b0111);
        ctrl.arith      = (instr[9:6] == 4'b0100);
      end
      // STR Rt, [Rn, #imm5] / LDR Rt, [Rn, #imm5]
      16'b01100???_????????,
      16'b01101???_????????: begin
        ctrl.rd_add0     = r_lo;     // store data
        ctrl.rd_add1     = r_mid;    // base
        ctrl.imm         = {11'd0, instr[10:6]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.alu_control = ALU_ADD;
        if (instr[11]) begin
          ctrl.wr_add      = r_lo;
          ctrl.wr_en       = 1'b1;
          ctrl.dm_read_en  = 1'b1;
          ctrl.result_sel  = RES_MEM;
        end else begin
          ctrl.dm_write_en = 1'b1;
        end
      end
      // B<cc> label: PC + SignExt(imm8)
      16'b1101????_????????: begin
        ctrl.imm         = {{8{instr[7]}}, instr[7:0]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.sel_alu_op1 = 1'b1;
        ctrl.alu_control = ALU_ADD;
        ctrl.branch      = BR_COND;
        ctrl.cond        = cond_e'(instr[11:8]);
      end
      // B label: PC + SignExt(imm11)
      16'b11100???_????????: begin
        ctrl.imm         = {{5{instr[10]}}, instr[10:0]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.sel_alu_op1 = 1'b1;
        ctrl.alu_control = ALU_ADD;
        ctrl.branch      = BR_UNC;
      end
      // BL label: LR = PC + 1, PC + SignExt(imm6)
      16'b01000101_????????: begin
        ctrl.imm         = {{10{instr[5]}}, instr[5:0]};
        ctrl.sel_alu_op0 = 1'b1;
        ctrl.sel_alu_op1 = 1'b1;
        ctrl.alu_control = ALU_ADD;
        ctrl.branch      = BR_LINK;
      end
      // BX Rm
      16'b01000111_0????000: begin
        ctrl.rd_add0    = instr[6:3];
        ctrl.result_sel = RES_REG;
        ctrl.branch     = BR_REG;
      end
      // NOOP (10111111_00000000) and every encoding outside the table
      default: ;
    endcase
  end

endmodule
