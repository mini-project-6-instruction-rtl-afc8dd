// tb_instruction_decoder: checks the decoder with its instruction register,
// flag register, link register and branch resolution, without a datapath.
//
// Each cycle a random instruction (all kinds of the set), a random PC and
// random datapath flags are applied. The testbench checks: the instruction
// appears on id_instruction one cycle later (and NOOP after reset); the
// flags update only in the bits the decoded instruction sets; sel_pc is high
// for B, BL, BX and for a B<cc> whose condition holds on the stored flags;
// BL loads LR with pc + 1; alu_op1_from_id is the PC.
module tb_instruction_decoder;
  logic clk = 1'b0, reset;
  always #5 clk = ~clk;

  logic [15:0] imem [256];   // needed by tb_isa.svh, unused here
  `include "tb/tb_isa.svh"

  logic [15:0] instruction, pc, id_instruction, alu_op0_from_id, alu_op1_from_id, lr;
  logic [3:0]  flag_nzcv, flag, rf_rd_add0, rf_rd_add1, rf_wr_add;
  logic        rf_wr_en, right, shift, arith, sel_alu_op0, sel_alu_op1;
  logic        dm_read_en, dm_write_en, sel_pc;
  logic [2:0]  alu_control, result_sel;

  instruction_decoder u_dut (
    .clk, .reset, .instruction, .pc, .flag_nzcv, .id_instruction,
    .rf_rd_add0, .rf_rd_add1, .rf_wr_add, .rf_wr_en, .right, .shift, .arith,
    .alu_op0_from_id, .alu_op1_from_id, .sel_alu_op0, .sel_alu_op1,
    .alu_control, .result_sel, .dm_read_en, .dm_write_en, .sel_pc, .flag, .lr
  );

  int checks = 0, failures = 0, n_taken = 0, n_fall = 0, n_bl = 0;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (ir %h)", what, got, exp, id_instruction);
    end
  endtask

  // flags an instruction updates, from the instruction table
  function automatic logic [3:0] upd_of(logic [15:0] i);
    if (i[15:11] == 5'b00100) return 4'b1100;                       // MOVS
    if (i[15:11] == 5'b00011) return 4'b1111;                       // ADDS/SUBS
    if (i[15:6] == 10'b0100001010) return 4'b1111;                  // CMP
    if (i[15:10] == 6'b010000 && i[9:6] inside {0, 1, 12, 15}) return 4'b1100;
    if (i[15:10] == 6'b010000 && i[9:6] inside {2, 3, 4, 7}) return 4'b1110;
    return 4'b0000;
  endfunction

  function automatic logic [15:0] random_instr();
    int r0 = $urandom_range(0, 7), r1 = $urandom_range(0, 7);
    case ($urandom_range(0, 13))
      0: return e_movs(r0, $urandom_range(0, 255));
      1: return e_addr(r0, r1, r0);
      2: return e_subi(r0, r1, 3);
      3: return e_cmp(r0, r1);
      4: return e_dp(OP_AND, r0, r1);
      5: return e_dp(OP_ROR, r0, r1);
      6: return e_ldr(r0, r1, 4);
      7: return e_str(r0, r1, 4);
      8, 9, 10: return e_bcc($urandom_range(0, 15), $urandom_range(0, 255));
      11: return e_b($urandom_range(0, 2047));
      12: return e_bl($urandom_range(0, 63));
      default: return ($urandom_range(0, 1) == 1) ? e_bx($urandom_range(0, 15)) : E_NOOP;
    endcase
  endfunction

  initial begin
    logic [3:0]  m_flags;
    logic [15:0] m_lr, m_ir;
    logic        exp_sel;
    reset = 1'b1;
    instruction = e_movs(1, 1); pc = '0; flag_nzcv = 4'hF;
    @(posedge clk); #1;
    chk("reset ir", id_instruction, E_NOOP);
    chk("reset flag", 16'(flag), 16'h0);
    chk("reset lr", lr, 16'h0);
    reset = 1'b0;
    m_flags = '0; m_lr = '0; m_ir = E_NOOP;
    for (int k = 0; k < 4000; k++) begin
      instruction = random_instr();
      pc = 16'($urandom);
      flag_nzcv = 4'($urandom);
      #1;
      // decode-stage checks on m_ir
      chk("id_instruction", id_instruction, m_ir);
      chk("alu_op1_from_id", alu_op1_from_id, pc);
      exp_sel = 1'b0;
      if (m_ir[15:12] == 4'b1101) begin
        exp_sel = ref_cond(m_ir[11:8], m_flags);
        if (exp_sel) n_taken++; else n_fall++;
      end
      if (m_ir[15:11] == 5'b11100 || m_ir[15:8] == 8'h45 ||
          (m_ir[15:7] == 9'b010001110 && m_ir[2:0] == 3'b000)) exp_sel = 1'b1;
      chk("sel_pc", 16'(sel_pc), 16'(exp_sel));
      if (m_ir[15:8] == 8'h45) begin m_lr = pc + 16'd1; n_bl++; end
      m_flags = (m_flags & ~upd_of(m_ir)) | (flag_nzcv & upd_of(m_ir));
      m_ir = instruction;
      @(posedge clk); #1;
      chk("flag", 16'(flag), 16'(m_flags));
      chk("lr", lr, m_lr);
    end
    checks += 3;
    if (n_taken == 0) failures++;
    if (n_fall == 0) failures++;
    if (n_bl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
