// instruction_decoder: the instruction decoder (ID) of the 16-bit CPU.
//
// Each cycle it takes the word fetched at the current PC, registers it
// (instr_reg, reset to NOOP) and decodes the registered instruction
// (id_decode) into the controls and operands of the datapath. It also holds
// the state the datapath does not: the NZCV flags (flag_reg) and the link
// register LR. Structure:
//
//   instruction --> instr_reg --> id_instruction --> id_decode --> controls
//                                                         |
//   flag_nzcv -------------------------------> flag_reg --+--> sel_pc
//
// Timing: decode and execute happen in the cycle after the fetch. The
// datapath writes its result, the flags are updated and, for BL, LR is
// loaded at the end of that cycle. While an instruction is decoded, pc is
// its own address + 1; PC-relative branches use that value, so a branch at
// address a with offset k goes to a + 1 + k, and BL saves a + 2 = pc + 1 in
// LR. sel_pc is high for B, BL and BX, and for B<cc> whose condition holds
// on the stored flags; the program counter then loads the target the
// datapath returns on pc_target (the ALU's PC + offset, or Rm for BX). The
// instruction fetched behind the branch is not squashed.
//
// alu_op0_from_id carries the extended immediate, alu_op1_from_id the PC.
// Signal names, the register width of the addresses, the 3-bit ALU and
// result codes, and LR = PC + 1 follow the design; the handshake-free
// single-cycle interface and synchronous reset are this design's reading.
module instruction_decoder
  import id_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,            // synchronous, active high
  input  logic [DATA_W-1:0]    instruction,      // instruction memory data
  input  logic [DATA_W-1:0]    pc,               // current PC
  input  logic [3:0]           flag_nzcv,        // flags of the current result
  output logic [DATA_W-1:0]    id_instruction,   // instruction in decode
  output logic [RF_ADDR_W-1:0] rf_rd_add0,
  output logic [RF_ADDR_W-1:0] rf_rd_add1,
  output logic [RF_ADDR_W-1:0] rf_wr_add,
  output logic                 rf_wr_en,
  output logic                 right,
  output logic                 shift,
  output logic                 arith,
  output logic [DATA_W-1:0]    alu_op0_from_id,  // immediate
  output logic [DATA_W-1:0]    alu_op1_from_id,  // PC
  output logic                 sel_alu_op0,      // 1: op0 = alu_op0_from_id
  output logic                 sel_alu_op1,      // 1: op1 = alu_op1_from_id
  output logic [2:0]           alu_control,
  output logic [2:0]           result_sel,
  output logic                 dm_read_en,
  output logic                 dm_write_en,
  output logic                 sel_pc,           // 1: PC loads the target
  output logic [3:0]           flag,             // stored NZCV
  output logic [DATA_W-1:0]    lr                // link register
);

  id_ctrl_t ctrl;
  logic     cond_true;

  instr_reg #(
    .WIDTH       (DATA_W),
    .RESET_VALUE (NOOP_INSTR)
  ) u_ir (
    .clk       (clk),
    .reset     (reset),
    .instr_in  (instruction),
    .instr_out (id_instruction)
  );

  id_decode u_dec (
    .instr (id_instruction),
    .ctrl  (ctrl)
  );

  flag_reg u_flags (
    .clk       (clk),
    .reset     (reset),
    .nzcv_in   (flag_nzcv),
    .upd       (ctrl.flag_upd),
    .cond      (ctrl.cond),
    .flags     (flag),
    .cond_true (cond_true)
  );

  // Branch resolution.
  always_comb begin
    unique case (ctrl.branch)
      BR_COND:                 sel_pc = cond_true;
      BR_UNC, BR_LINK, BR_REG: sel_pc = 1'b1;
      default:                 sel_pc = 1'b0;
    endcase
  end

  // Link register: BL saves the return address.
  always_ff @(posedge clk) begin
    if (reset)                       lr <= '0;
    else if (ctrl.branch == BR_LINK) lr <= pc + DATA_W'(1);
  end

  assign rf_rd_add0      = ctrl.rd_add0;
  assign rf_rd_add1      = ctrl.rd_add1;
  assign rf_wr_add       = ctrl.wr_add;
  assign rf_wr_en        = ctrl.wr_en;
  assign right           = ctrl.right;
  assign shift           = ctrl.shift;
  assign arith           = ctrl.arith;
  assign alu_op0_from_id = ctrl.imm;
  assign alu_op1_from_id = pc;
  assign sel_alu_op0     = ctrl.sel_alu_op0;
  assign sel_alu_op1     = ctrl.sel_alu_op1;
  assign alu_control     = ctrl.alu_control;
  assign result_sel      = ctrl.result_sel;
  assign dm_read_en      = ctrl.dm_read_en;
  assign dm_write_en     = ctrl.dm_write_en;

  // A memory access is either a load or a store, and a branch writes
  // neither the register file nor memory.
  a_mem_exclusive: assert property (@(posedge clk) disable iff (reset)
    !(dm_read_en && dm_write_en));
  a_branch_no_write: assert property (@(posedge clk) disable iff (reset)
    (ctrl.branch != BR_NONE) |-> !(rf_wr_en || dm_write_en));

endmodule
