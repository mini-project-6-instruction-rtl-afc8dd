// tb_id_decode: checks the decode table.
//
// Part 1 applies instructions of the reference program with the control
// values seen in the design's reference simulation (register addresses,
// alu_control, result_sel, shifter mode, immediate). Part 2 applies all
// 65536 encodings and compares every field that matters for the decoded
// instruction with a reference decode written in this testbench from the
// instruction table: fields that the instruction does not use are not
// compared.
module tb_id_decode;
  import id_pkg::*;
  logic [15:0] instr;
  id_ctrl_t    ctrl;
  int checks = 0, failures = 0;

  id_decode u_dut (.instr, .ctrl);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %h %s: got %0h expected %0h", instr, what, got, exp);
    end
  endtask

  // Reference decode: which fields are used and their values.
  typedef struct {
    bit wr; int wa; bit use0; int ra0; bit use1; int ra1;
    bit use_alu; int alu; int rsel; bit s0; bit s1; bit use_imm; int imm;
    bit rd_mem; bit wr_mem; int upd; int br; int cond;
    bit use_sh; bit right; bit shift; bit arith;
  } ref_t;

  function automatic int sx(int v, int bits);
    return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
  endfunction

  function automatic ref_t ref_decode(logic [15:0] i);
    ref_t r;
    int lo = int'(i[2:0]), mid = int'(i[5:3]), hi = int'(i[8:6]);
    r = '{default: 0};
    if (i[15:11] == 5'b00100) begin                       // MOVS
      r.wr = 1; r.wa = int'(i[10:8]); r.rsel = 4; r.s0 = 1;
      r.use_imm = 1; r.imm = int'(i[7:0]); r.upd = 'b1100;
    end else if (i[15:8] == 8'b01000110) begin            // MOV
      r.wr = 1; r.wa = int'({i[7], i[2:0]}); r.use0 = 1; r.ra0 = int'(i[6:3]); r.rsel = 2;
    end else if (i[15:11] == 5'b00011) begin              // ADDS/SUBS
      r.wr = 1; r.wa = lo; r.use1 = 1; r.ra1 = mid; r.use_alu = 1;
      r.alu = i[9] ? 3 : 1; r.upd = 'b1111;
      if (i[10]) begin r.s0 = 1; r.use_imm = 1; r.imm = hi; end
      else begin r.use0 = 1; r.ra0 = hi; end
    end else if (i[15:8] == 8'b10110000) begin            // ADD/SUB SP
      r.wr = 1; r.wa = 13; r.use1 = 1; r.ra1 = 13; r.use_alu = 1; r.alu = i[7] ? 3 : 1;
      r.s0 = 1; r.use_imm = 1; r.imm = int'(i[6:0]);
    end else if (i[15:6] == 10'b0100001010) begin         // CMP
      r.use0 = 1; r.ra0 = mid; r.use1 = 1; r.ra1 = lo; r.use_alu = 1; r.alu = 7; r.upd = 'b1111;
    end else if (i[15:10] == 6'b010000 && i[9:6] inside {0, 1, 12, 15}) begin
      r.wr = 1; r.wa = lo; r.use0 = 1; r.ra0 = mid; r.use_alu = 1; r.upd = 'b1100;
      if (i[9:6] != 15) begin r.use1 = 1; r.ra1 = lo; end
      r.alu = (i[9:6] == 0) ? 0 : (i[9:6] == 1) ? 6 : (i[9:6] == 12) ? 4 : 2;
    end else if (i[15:10] == 6'b010000 && i[9:6] inside {2, 3, 4, 7}) begin
      r.wr = 1; r.wa = lo; r.use0 = 1; r.ra0 = mid; r.use1 = 1; r.ra1 = lo;
      r.rsel = 1; r.upd = 'b1110; r.use_sh = 1;
      r.right = (i[9:6] != 2); r.shift = (i[9:6] != 7); r.arith = (i[9:6] == 4);
    end else if (i[15:12] == 4'b0110) begin               // STR/LDR
      r.use1 = 1; r.ra1 = mid; r.use_alu = 1; r.alu = 1; r.s0 = 1;
      r.use_imm = 1; r.imm = int'(i[10:6]);
      if (i[11]) begin r.wr = 1; r.wa = lo; r.rd_mem = 1; r.rsel = 3; end
      else begin r.wr_mem = 1; r.use0 = 1; r.ra0 = lo; end
    end else if (i[15:12] == 4'b1101) begin               // B<cc>
      r.br = 1; r.cond = int'(i[11:8]); r.use_alu = 1; r.alu = 1; r.s0 = 1; r.s1 = 1;
      r.use_imm = 1; r.imm = sx(int'(i[7:0]), 8);
    end else if (i[15:11] == 5'b11100) begin              // B
      r.br = 2; r.use_alu = 1; r.alu = 1; r.s0 = 1; r.s1 = 1;
      r.use_imm = 1; r.imm = sx(int'(i[10:0]), 11);
    end else if (i[15:8] == 8'b01000101) begin            // BL
      r.br = 3; r.use_alu = 1; r.alu = 1; r.s0 = 1; r.s1 = 1;
      r.use_imm = 1; r.imm = sx(int'(i[5:0]), 6);
    end else if (i[15:7] == 9'b010001110 && i[2:0] == 0) begin  // BX
      r.br = 4; r.use0 = 1; r.ra0 = int'(i[6:3]); r.rsel = 2;
    end
    return r;
  endfunction

  task automatic compare(logic [15:0] i);
    ref_t r;
    instr = i;
    #1;
    r = ref_decode(i);
    chk("wr_en", int'(ctrl.wr_en), int'(r.wr));
    chk("dm_read_en", int'(ctrl.dm_read_en), int'(r.rd_mem));
    chk("dm_write_en", int'(ctrl.dm_write_en), int'(r.wr_mem));
    chk("flag_upd", int'(ctrl.flag_upd), r.upd);
    chk("branch", int'(ctrl.branch), r.br);
    if (r.br == 1) chk("cond", int'(ctrl.cond), r.cond);
    if (r.wr) chk("wr_add", int'(ctrl.wr_add), r.wa);
    if (r.use0) chk("rd_add0", int'(ctrl.rd_add0), r.ra0);
    if (r.use1) chk("rd_add1", int'(ctrl.rd_add1), r.ra1);
    if (r.wr || r.br != 0 || r.upd != 0) chk("result_sel", int'(ctrl.result_sel), r.rsel);
    if (r.use_alu) begin
      chk("alu_control", int'(ctrl.alu_control), r.alu);
      chk("sel_alu_op0", int'(ctrl.sel_alu_op0), int'(r.s0));
      chk("sel_alu_op1", int'(ctrl.sel_alu_op1), int'(r.s1));
    end
    if (r.use_imm) chk("imm", int'($signed(ctrl.imm)), (r.imm < 0) ? r.imm : r.imm);
    if (r.use_sh) begin
      chk("right", int'(ctrl.right), int'(r.right));
      chk("shift", int'(ctrl.shift), int'(r.shift));
      chk("arith", int'(ctrl.arith), int'(r.arith));
    end
  endtask

  task automatic fig(logic [15:0] i, int ra0, int ra1, int wa, int alu, int rsel);
    instr = i;
    #1;
    if (ra0 >= 0) chk("fig rd_add0", int'(ctrl.rd_add0), ra0);
    if (ra1 >= 0) chk("fig rd_add1", int'(ctrl.rd_add1), ra1);
    if (wa >= 0) chk("fig rf_wr_add", int'(ctrl.wr_add), wa);
    if (alu >= 0) chk("fig alu_control", int'(ctrl.alu_control), alu);
    if (rsel >= 0) chk("fig result_sel", int'(ctrl.result_sel), rsel);
  endtask

  initial begin
    // reference program, values as printed in its simulation
    fig(16'h2203, -1, -1, 2, -1, 4);  chk("imm 2203", int'(ctrl.imm), 3);
    fig(16'h4616, 2, -1, 6, -1, 2);
    fig(16'h1DD4, -1, 2, 4, 1, 0);    chk("imm 1dd4", int'(ctrl.imm), 7);
    fig(16'h19A3, 6, 4, 3, 1, 0);
    fig(16'h1AB0, 2, 6, 0, 3, 0);
    fig(16'h1E11, -1, 2, 1, 3, 0);
    fig(16'h4284, 0, 4, -1, 7, 0);    chk("4284 no write", int'(ctrl.wr_en), 0);
    fig(16'h4032, 6, 2, 2, 0, 0);
    fig(16'h4046, 0, 6, 6, 6, 0);
    fig(16'h4319, 3, 1, 1, 4, 0);
    fig(16'h43C5, 0, -1, 5, 2, 0);
    fig(16'h40A9, 5, 1, 1, -1, 1);
    chk("40a9 right", int'(ctrl.right), 0); chk("40a9 shift", int'(ctrl.shift), 1);
    fig(16'h40F4, 6, 4, 4, -1, 1);
    chk("40f4 right", int'(ctrl.right), 1); chk("40f4 arith", int'(ctrl.arith), 0);
    fig(16'h411D, 3, 5, 5, -1, 1);
    chk("411d right", int'(ctrl.right), 1); chk("411d arith", int'(ctrl.arith), 1);
    fig(16'h450B, -1, -1, -1, 1, 0);  chk("450b imm", int'(ctrl.imm), 11);
    chk("450b branch", int'(ctrl.branch), int'(BR_LINK));
    fig(16'hBF00, -1, -1, -1, -1, -1);
    chk("noop wr", int'(ctrl.wr_en), 0); chk("noop br", int'(ctrl.branch), 0);
    // exhaustive
    for (int k = 0; k < 65536; k++) compare(16'(k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
