// id_pkg: shared types and constants of the 16-bit instruction decoder and
// its program counter.
//
// The instruction set is a 16-bit Thumb-style subset: MOVS/MOV, ADDS/SUBS in
// register and 3-bit-immediate forms, ADD/SUB on the stack pointer, CMP, the
// logic operations ANDS/EORS/ORRS/MVNS, the register shifts LSLS/LSRS/ASRS/
// RORS, word LDR/STR with a 5-bit offset, B<cc>, B, BL, BX and NOOP. Field
// positions and opcodes follow the supported-instruction table of the design.
//
// The 3-bit ALU and result-select codes are the values the decoder puts on
// its alu_control and result_sel outputs; AND=0, ADD=1, NOT=2, SUB=3, OR=4,
// XOR=6, CMP=7 and result_sel ALU=0, shifter=1, register=2, immediate=4 were
// read off the reference simulation of the design. The memory code (3) and
// the register number of SP (13) are this design's own choices.
package id_pkg;

  localparam int unsigned DATA_W    = 16;  // instruction and data width
  localparam int unsigned RF_ADDR_W = 4;   // register-file address width

  // Encoding of NOOP (10111111_00000000); the instruction register resets to it.
  localparam logic [15:0] NOOP_INSTR = 16'hBF00;

  // Register number used implicitly by ADD/SUB SP.
  localparam logic [RF_ADDR_W-1:0] SP_REG = 4'd13;

  // Positions of the flags in a 4-bit NZCV vector.
  localparam int unsigned FLAG_N = 3;
  localparam int unsigned FLAG_Z = 2;
  localparam int unsigned FLAG_C = 1;
  localparam int unsigned FLAG_V = 0;

  localparam logic [3:0] UPD_NONE = 4'b0000;
  localparam logic [3:0] UPD_NZ   = 4'b1100;
  localparam logic [3:0] UPD_NZC  = 4'b1110;
  localparam logic [3:0] UPD_NZCV = 4'b1111;

  // ALU operation on (op0, op1). SUB and CMP compute op1 - op0.
  typedef enum logic [2:0] {
    ALU_AND = 3'd0,
    ALU_ADD = 3'd1,
    ALU_NOT = 3'd2,   // ~op0
    ALU_SUB = 3'd3,
    ALU_OR  = 3'd4,
    ALU_XOR = 3'd6,
    ALU_CMP = 3'd7    // op1 - op0, result only sets flags
  } alu_ctrl_e;

  // Source of the value written back to the register file (and of the PC
  // target when sel_pc is set).
  typedef enum logic [2:0] {
    RES_ALU   = 3'd0,
    RES_SHIFT = 3'd1,
    RES_REG   = 3'd2,  // register read port 0, unchanged
    RES_MEM   = 3'd3,  // data-memory read data
    RES_IMM   = 3'd4   // alu_op0_from_id, unchanged
  } result_sel_e;

  // Condition field of B<cc>.
  typedef enum logic [3:0] {
    COND_EQ = 4'h0, COND_NE = 4'h1, COND_CS = 4'h2, COND_CC = 4'h3,
    COND_MI = 4'h4, COND_PL = 4'h5, COND_VS = 4'h6, COND_VC = 4'h7,
    COND_HI = 4'h8, COND_LS = 4'h9, COND_GE = 4'hA, COND_LT = 4'hB,
    COND_GT = 4'hC, COND_LE = 4'hD, COND_AL = 4'hE, COND_NV = 4'hF
  } cond_e;

  // Kind of control transfer an instruction requests.
  typedef enum logic [2:0] {
    BR_NONE = 3'd0,
    BR_COND = 3'd1,   // B<cc>: taken when the condition holds
    BR_UNC  = 3'd2,   // B
    BR_LINK = 3'd3,   // BL: also writes LR
    BR_REG  = 3'd4    // BX: target is a register
  } branch_e;

  // Everything the combinational decode produces for one instruction.
  typedef struct packed {
    logic [RF_ADDR_W-1:0] rd_add0;     // read port 0: Rm (or Rn / store data)
    logic [RF_ADDR_W-1:0] rd_add1;     // read port 1: Rn / Rdn / SP
    logic [RF_ADDR_W-1:0] wr_add;      // destination register
    logic                 wr_en;
    logic                 sel_alu_op0; // 1: ALU op0 = immediate
    logic                 sel_alu_op1; // 1: ALU op1 = PC
    logic [DATA_W-1:0]    imm;         // extended immediate
    alu_ctrl_e            alu_control;
    logic                 right;       // shifter: 1 = right
    logic                 shift;       // shifter: 1 = shift, 0 = rotate
    logic                 arith;       // shifter: 1 = arithmetic right shift
    result_sel_e          result_sel;
    logic                 dm_read_en;
    logic                 dm_write_en;
    logic [3:0]           flag_upd;    // NZCV bits this instruction updates
    branch_e              branch;
    cond_e                cond;
  } id_ctrl_t;

  // Evaluate a B<cc> condition field against the NZCV flags.
  function automatic logic cond_holds(cond_e cond, logic [3:0] nzcv);
    logic n, z, c, v;
    n = nzcv[FLAG_N];
    z = nzcv[FLAG_Z];
    c = nzcv[FLAG_C];
    v = nzcv[FLAG_V];
    unique case (cond)
      COND_EQ: return z;
      COND_NE: return !z;
      COND_CS: return c;
      COND_CC: return !c;
      COND_MI: return n;
      COND_PL: return !n;
      COND_VS: return v;
      COND_VC: return !v;
      COND_HI: return c && !z;
      COND_LS: return !c || z;
      COND_GE: return n == v;
      COND_LT: return n != v;
      COND_GT: return !z && (n == v);
      COND_LE: return z || (n != v);
      COND_AL: return 1'b1;
      COND_NV: return 1'b0;
    endcase
  endfunction

endpackage
