// tb_test0: runs the design's reference test program and checks the values
// of its reference simulation, cycle by cycle.
//
// The program is 2203 4616 1DD4 19A3 1AB0 1E11 450B 4284 at addresses 0-7
// and 4032 4046 4319 43C5 40A9 40F4 411D at addresses 18-24 (MOVS, MOV,
// ADDS imm/reg, SUBS reg/imm, BL, CMP, ANDS, EORS, ORRS, MVNS, LSLS, LSRS,
// ASRS). The controller runs it on the behavioural datapath with the
// default parameters. For each decoded instruction the testbench checks the
// PC, the result-mux value, the destination register and the flags after
// the instruction, as listed in the table below; the BL must jump from PC 7
// to 18, save LR = 8 and still execute the CMP fetched behind it.
module tb_test0;
  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  logic [15:0] imem [256];
  logic [15:0] pc_out, instruction, mux_result, id_instruction;
  logic [15:0] alu_op0_from_id, alu_op1_from_id, lr, rd_data0, alu_out;
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
    .alu_control, .result_sel, .flag, .lr, .dm_data(16'h0000), .rd_data0,
    .alu_out, .mux_result, .flag_nzcv
  );

  assign instruction = imem[pc_out[7:0]];

  // one row per decode cycle: instruction in decode, PC, result, written
  // register (-1: none), flags NZCV after the cycle
  typedef struct { logic [15:0] ir; int pc; logic [15:0] res; int wa; logic [3:0] nzcv; } step_t;
  localparam int NSTEP = 16;
  step_t steps [NSTEP] = '{
    '{16'hBF00,  0, 16'h0000, -1, 4'b0000},
    '{16'h2203,  1, 16'h0003,  2, 4'b0000},
    '{16'h4616,  2, 16'h0003,  6, 4'b0000},
    '{16'h1DD4,  3, 16'h000A,  4, 4'b0000},
    '{16'h19A3,  4, 16'h000D,  3, 4'b0000},
    '{16'h1AB0,  5, 16'h0000,  0, 4'b0110},
    '{16'h1E11,  6, 16'h0003,  1, 4'b0010},
    '{16'h450B,  7, 16'h0012, -1, 4'b0010},
    '{16'h4284, 18, 16'h000A, -1, 4'b0010},
    '{16'h4032, 19, 16'h0003,  2, 4'b0010},
    '{16'h4046, 20, 16'h0003,  6, 4'b0010},
    '{16'h4319, 21, 16'h000F,  1, 4'b0010},
    '{16'h43C5, 22, 16'hFFFF,  5, 4'b1010},
    '{16'h40A9, 23, 16'h0000,  1, 4'b0100},
    '{16'h40F4, 24, 16'h0001,  4, 4'b0000},
    '{16'h411D, 25, 16'hFFFF,  5, 4'b1010}
  };

  int checks = 0, failures = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) imem[k] = 16'hBF00;
    imem[0] = 16'h2203; imem[1] = 16'h4616; imem[2] = 16'h1DD4; imem[3] = 16'h19A3;
    imem[4] = 16'h1AB0; imem[5] = 16'h1E11; imem[6] = 16'h450B; imem[7] = 16'h4284;
    imem[18] = 16'h4032; imem[19] = 16'h4046; imem[20] = 16'h4319; imem[21] = 16'h43C5;
    imem[22] = 16'h40A9; imem[23] = 16'h40F4; imem[24] = 16'h411D;
    reset = 1'b1;
    @(posedge clk); @(posedge clk);
    #1 reset = 1'b0;
    for (int k = 0; k < 16; k++) u_dp.regs[k] = '0;
    for (int s = 0; s < NSTEP; s++) begin
      chk($sformatf("step %0d id_instruction", s), int'(id_instruction), int'(steps[s].ir));
      chk($sformatf("step %0d pc", s), int'(pc_out), steps[s].pc);
      chk($sformatf("step %0d mux_result", s), int'(mux_result), int'(steps[s].res));
      chk($sformatf("step %0d rf_wr_en", s), int'(rf_wr_en), int'(steps[s].wa >= 0));
      if (steps[s].wa >= 0) chk($sformatf("step %0d rf_wr_add", s), int'(rf_wr_add), steps[s].wa);
      @(posedge clk); #1;
      chk($sformatf("step %0d flags", s), int'(flag), int'(steps[s].nzcv));
      if (steps[s].wa >= 0) chk($sformatf("step %0d register", s), int'(u_dp.regs[steps[s].wa]), int'(steps[s].res));
      if (steps[s].ir == 16'h450B) chk("LR after BL", int'(lr), 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
