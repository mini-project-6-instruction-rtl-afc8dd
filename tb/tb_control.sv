// tb_control: end-to-end test of the controller (instruction decoder plus
// program counter) running programs on a behavioural datapath and memories.
//
// The controller is instantiated with its default parameters. A 256-word
// instruction memory is read combinationally at pc_out; a 256-word data
// memory is read combinationally and written at the clock edge. After every
// clock the testbench compares pc_out, id_instruction, all 16 registers, the
// flags and LR with a reference model stepped in lock step (tb_isa.svh), and
// the data memory at the end of each program. Programs:
//   1. a directed program: every instruction of the set, taken and
//      fall-through B<cc>, backward branches, BL with return by BX r14, BX
//      through an ordinary register, branch delay slots, partial flag updates;
//   2. random programs filling the whole instruction memory.
// Each mechanism is counted and one that never happened is a failure.
module tb_control;
  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  logic [15:0] imem [256];
  logic [15:0] dmem [256];

  logic [15:0] pc_out, instruction, mux_result, id_instruction;
  logic [15:0] alu_op0_from_id, alu_op1_from_id, lr, rd_data0, alu_out, dm_data;
  logic [3:0]  flag_nzcv, flag, rf_rd_add0, rf_rd_add1, rf_wr_add;
  logic        rf_wr_en, right, shift, arith, sel_alu_op0, sel_alu_op1;
  logic        sel_pc, dm_read_en, dm_write_en;
  logic [2:0]  alu_control, result_sel;

  control u_dut (
    .clk, .reset, .pc_out, .instruction, .flag_nzcv, .mux_result,
    .id_instruction, .rf_rd_add0, .rf_rd_add1, .rf_wr_add, .rf_wr_en,
    .right, .shift, .arith, .alu_op0_from_id, .alu_op1_from_id,
    .sel_alu_op0, .sel_alu_op1, .alu_control, .result_sel, .flag, .lr,
    .sel_pc, .dm_read_en, .dm_write_en
  );

  tb_datapath u_dp (
    .clk, .rf_rd_add0, .rf_rd_add1, .rf_wr_add, .rf_wr_en, .right, .shift,
    .arith, .alu_op0_from_id, .alu_op1_from_id, .sel_alu_op0, .sel_alu_op1,
    .alu_control, .result_sel, .flag, .lr, .dm_data, .rd_data0, .alu_out,
    .mux_result, .flag_nzcv
  );

  assign instruction = imem[pc_out[7:0]];
  assign dm_data     = dmem[alu_out[7:0]];
  always_ff @(posedge clk)
    if (dm_write_en) dmem[alu_out[7:0]] <= rd_data0;

  `include "tb/tb_isa.svh"

  int checks = 0, failures = 0;
  int kind_cnt [K_NUM];
  int n_cond_taken = 0, n_cond_fall = 0, n_delay_slot = 0, n_kept_flags = 0;
  int n_bx_lr = 0, n_backward = 0, n_reset_noop = 0;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %h expected %h (pc %h, ir %h)", what, got, exp,
                 pc_out, id_instruction);
    end
  endtask

  task automatic start_program();
    reset = 1'b1;
    @(posedge clk); @(posedge clk);
    #1 reset = 1'b0;
    // memories and registers are cleared once the decoder holds NOOP
    for (int k = 0; k < 256; k++) begin dmem[k] = 16'(k * 7); ref_mem[k] = 16'(k * 7); end
    for (int k = 0; k < 16; k++) u_dp.regs[k] = '0;
    ref_reset();
    checks++;
    if (id_instruction == E_NOOP && pc_out == 16'd0 && flag == 4'd0 && lr == 16'd0)
      n_reset_noop++;
    else failures++;
  endtask

  task automatic run_cycles(int ncyc);
    logic prev_taken = 1'b0;
    for (int cyc = 0; cyc < ncyc; cyc++) begin
      // decode-stage observations before the edge
      check("pc", pc_out, ref_pc);
      check("id_instruction", id_instruction, ref_ir);
      ref_step();
      check("sel_pc", 16'(sel_pc), 16'(ref_taken));
      kind_cnt[ref_kind]++;
      if (ref_kind == K_BCC && ref_taken) n_cond_taken++;
      if (ref_cond_fail) n_cond_fall++;
      if (prev_taken && ref_kind != K_NOOP) n_delay_slot++;
      if (ref_kept_flags) n_kept_flags++;
      if (ref_bx_lr) n_bx_lr++;
      if (ref_taken && ref_pc < pc_out) n_backward++;
      prev_taken = ref_taken;
      @(posedge clk); #1;
      for (int r = 0; r < 16; r++) check($sformatf("r%0d", r), u_dp.regs[r], ref_regs[r]);
      check("flag", 16'(flag), 16'(ref_flags));
      check("lr", lr, ref_lr);
    end
    for (int k = 0; k < 256; k++) check($sformatf("mem[%0d]", k), dmem[k], ref_mem[k]);
  endtask

  // Directed program (word addresses). pc during decode = address + 1.
  task automatic load_directed();
    for (int k = 0; k < 256; k++) imem[k] = E_NOOP;
    imem[0]  = e_movs(0, 5);
    imem[1]  = e_movs(1, 3);
    imem[2]  = e_addr(2, 0, 1);        // r2 = 8
    imem[3]  = e_subr(3, 0, 1);        // r3 = 2
    imem[4]  = e_addi(4, 2, 7);        // r4 = 15
    imem[5]  = e_subi(5, 4, 1);        // r5 = 14
    imem[6]  = e_mov(8, 5);            // high register
    imem[7]  = e_mov(6, 8);
    imem[8]  = e_addsp(20);
    imem[9]  = e_subsp(4);             // sp = 16
    imem[10] = e_str(2, 0, 3);         // mem[8] = 8
    imem[11] = e_ldr(7, 0, 3);         // r7 = 8
    imem[12] = e_cmp(7, 2);            // Z = 1
    imem[13] = e_bcc(0, 2);            // BEQ -> 16
    imem[14] = e_movs(1, 1);           // delay slot
    imem[15] = e_movs(1, 99);          // skipped
    imem[16] = e_bcc(1, 5);            // BNE, falls through
    imem[17] = e_dp(OP_AND, 0, 1);     // r0 = 1, C kept
    imem[18] = e_dp(OP_EOR, 0, 4);
    imem[19] = e_dp(OP_ORR, 3, 0);
    imem[20] = e_dp(OP_MVN, 6, 3);
    imem[21] = e_dp(OP_LSL, 4, 1);
    imem[22] = e_dp(OP_LSR, 4, 1);
    imem[23] = e_dp(OP_ASR, 6, 1);
    imem[24] = e_dp(OP_ROR, 6, 1);
    imem[25] = e_bl(4);                // -> 30, LR = 27
    imem[26] = e_movs(2, 17);          // delay slot
    imem[27] = e_b(12);                // return lands here; -> 40
    imem[28] = e_movs(3, 7);           // delay slot
    imem[30] = e_addi(2, 2, 1);        // subroutine
    imem[31] = e_bx(14);               // return to 27
    imem[32] = e_subi(7, 7, 1);        // delay slot
    imem[40] = e_movs(5, 3);
    imem[41] = e_subi(5, 5, 1);        // loop body
    imem[42] = e_bcc(1, -2);           // BNE -> 41
    imem[43] = e_addi(0, 0, 1);        // delay slot, every iteration
    imem[44] = e_movs(1, 50);
    imem[45] = e_bx(1);                // -> 50
    imem[50] = e_movs(0, 8'h80);
    imem[51] = e_dp(OP_LSL, 0, 1);     // r1 = 50 -> shift out: r0 = 0, C = 0
    imem[52] = e_movs(1, 8);
    imem[53] = e_movs(0, 8'h7F);
    imem[54] = e_dp(OP_LSL, 0, 1);     // r0 = 0x7F00
    imem[55] = e_addr(0, 0, 0);        // 0xFE00, signed overflow: V = 1
    imem[56] = e_bcc(6, 2);            // BVS -> 59
    imem[57] = e_dp(OP_AND, 2, 2);     // delay slot: NZ only, V kept
    imem[59] = e_bcc(14, -1);          // B always to itself
  endtask

  task automatic load_random();
    for (int k = 0; k < 256; k++) begin
      logic [15:0] w;
      int unsigned s = $urandom_range(0, 22);
      int r0 = $urandom_range(0, 7), r1 = $urandom_range(0, 7), r2 = $urandom_range(0, 7);
      case (s)
        0:  w = e_movs(r0, $urandom_range(0, 255));
        1:  w = e_mov($urandom_range(0, 13), $urandom_range(0, 15));
        2:  w = e_addr(r0, r1, r2);
        3:  w = e_subr(r0, r1, r2);
        4:  w = e_addi(r0, r1, r2);
        5:  w = e_subi(r0, r1, r2);
        6:  w = e_addsp($urandom_range(0, 127));
        7:  w = e_subsp($urandom_range(0, 127));
        8:  w = e_cmp(r0, r1);
        9:  w = e_dp(OP_AND, r0, r1);
        10: w = e_dp(OP_EOR, r0, r1);
        11: w = e_dp(OP_ORR, r0, r1);
        12: w = e_dp(OP_MVN, r0, r1);
        13: w = e_dp(OP_LSL, r0, r1);
        14: w = e_dp(OP_LSR, r0, r1);
        15: w = e_dp(OP_ASR, r0, r1);
        16: w = e_dp(OP_ROR, r0, r1);
        17: w = e_str(r0, r1, $urandom_range(0, 31));
        18: w = e_ldr(r0, r1, $urandom_range(0, 31));
        19: w = e_bcc($urandom_range(0, 15), $urandom_range(0, 255));
        20: w = e_b($urandom_range(0, 2047));
        21: w = e_bl($urandom_range(0, 63));
        default: w = ($urandom_range(0, 1) == 1) ? e_bx($urandom_range(0, 15)) : E_NOOP;
      endcase
      imem[k] = w;
    end
  endtask

  initial begin
    for (int k = 0; k < K_NUM; k++) kind_cnt[k] = 0;
    load_directed();
    start_program();
    run_cycles(90);
    // the directed program ends spinning at address 59 with known state
    check("directed r2", u_dp.regs[2], 16'd18);
    check("directed r0", u_dp.regs[0], 16'hFE00);
    check("directed flags NZCV", 16'(flag), 16'b0001);  // V kept by ANDS
    check("directed lr", lr, 16'd27);
    for (int p = 0; p < 6; p++) begin
      load_random();
      start_program();
      run_cycles(1500);
    end
    for (int k = 0; k < K_NUM; k++) begin
      checks++;
      if (kind_cnt[k] == 0) begin
        failures++;
        $display("FAIL instruction kind %s never executed", kind_e'(k));
      end
    end
    begin
      int mech [7];
      string names [7];
      mech = '{n_cond_taken, n_cond_fall, n_delay_slot, n_kept_flags, n_bx_lr,
               n_backward, n_reset_noop};
      names = '{"B<cc> taken", "B<cc> not taken", "delay slot executed",
                "partial flag update", "BX r14 return", "backward branch",
                "reset to NOOP"};
      for (int k = 0; k < 7; k++) begin
        $display("mechanism %-22s %0d", names[k], mech[k]);
        checks++;
        if (mech[k] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
