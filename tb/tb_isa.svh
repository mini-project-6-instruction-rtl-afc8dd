// tb_isa.svh: instruction encoders and a cycle-level reference model of the
// controller plus datapath, shared by the system-level testbenches.
//
// Include inside a module that declares:  logic [15:0] imem [256];
// The reference model executes one instruction per call of iss_step(), with
// the same two-stage timing as the hardware: the instruction in decode
// (ref_ir) sees ref_pc = its address + 1, PC-relative targets are
// ref_pc + offset, BL saves ref_pc + 1 in LR, and the word fetched behind a
// taken branch is executed. Registers, flags, LR and data memory are kept in
// ref_* variables. The model decodes from the instruction bit patterns on
// its own and shares no code with the design.

// ---- encoders --------------------------------------------------------------
function automatic logic [15:0] e_movs(int rd, int imm8);
  return {5'b00100, 3'(rd), 8'(imm8)};
endfunction
function automatic logic [15:0] e_mov(int rd, int rm);
  return {8'b01000110, 1'(rd >> 3), 4'(rm), 3'(rd)};
endfunction
function automatic logic [15:0] e_addr(int rd, int rn, int rm);
  return {7'b0001100, 3'(rm), 3'(rn), 3'(rd)};
endfunction
function automatic logic [15:0] e_subr(int rd, int rn, int rm);
  return {7'b0001101, 3'(rm), 3'(rn), 3'(rd)};
endfunction
function automatic logic [15:0] e_addi(int rd, int rn, int imm3);
  return {7'b0001110, 3'(imm3), 3'(rn), 3'(rd)};
endfunction
function automatic logic [15:0] e_subi(int rd, int rn, int imm3);
  return {7'b0001111, 3'(imm3), 3'(rn), 3'(rd)};
endfunction
function automatic logic [15:0] e_addsp(int imm7);
  return {9'b101100000, 7'(imm7)};
endfunction
function automatic logic [15:0] e_subsp(int imm7);
  return {9'b101100001, 7'(imm7)};
endfunction
function automatic logic [15:0] e_cmp(int rn, int rm);
  return {10'b0100001010, 3'(rm), 3'(rn)};
endfunction
// data-processing group 010000 op4 Rm Rdn
localparam logic [3:0] OP_AND = 4'b0000, OP_EOR = 4'b0001, OP_LSL = 4'b0010,
                       OP_LSR = 4'b0011, OP_ASR = 4'b0100, OP_ROR = 4'b0111,
                       OP_ORR = 4'b1100, OP_MVN = 4'b1111;
function automatic logic [15:0] e_dp(logic [3:0] op, int rdn, int rm);
  return {6'b010000, op, 3'(rm), 3'(rdn)};
endfunction
function automatic logic [15:0] e_str(int rt, int rn, int imm5);
  return {5'b01100, 5'(imm5), 3'(rn), 3'(rt)};
endfunction
function automatic logic [15:0] e_ldr(int rt, int rn, int imm5);
  return {5'b01101, 5'(imm5), 3'(rn), 3'(rt)};
endfunction
function automatic logic [15:0] e_bcc(int cond, int off8);
  return {4'b1101, 4'(cond), 8'(off8)};
endfunction
function automatic logic [15:0] e_b(int off11);
  return {5'b11100, 11'(off11)};
endfunction
function automatic logic [15:0] e_bl(int off6);
  return {8'b01000101, 2'b00, 6'(off6)};
endfunction
function automatic logic [15:0] e_bx(int rm);
  return {9'b010001110, 4'(rm), 3'b000};
endfunction
localparam logic [15:0] E_NOOP = 16'hBF00;

// ---- instruction kinds counted by the testbenches --------------------------
typedef enum int {
  K_MOVS, K_MOV, K_ADDS_R, K_ADDS_I, K_ADD_SP, K_SUBS_R, K_SUBS_I, K_SUB_SP,
  K_CMP, K_ANDS, K_EORS, K_ORRS, K_MVNS, K_LSLS, K_LSRS, K_ASRS, K_RORS,
  K_STR, K_LDR, K_BCC, K_B, K_BL, K_BX, K_NOOP, K_NUM
} kind_e;

// ---- reference state -------------------------------------------------------
logic [15:0] ref_regs [16];
logic [15:0] ref_mem  [256];
logic [3:0]  ref_flags;           // N Z C V
logic [15:0] ref_lr, ref_pc, ref_ir;
kind_e       ref_kind;            // kind of the instruction just executed
logic        ref_taken;           // it was a taken branch
logic        ref_cond_fail;       // it was a B<cc> that fell through
logic        ref_kept_flags;      // it updated some flags and kept a set C or V
logic        ref_bx_lr;           // it was BX r14

function automatic logic [15:0] ref_rd(logic [3:0] r);
  return (r == 4'd14) ? ref_lr : ref_regs[r];
endfunction

task automatic ref_reset();
  for (int k = 0; k < 16; k++) ref_regs[k] = '0;
  ref_flags = '0;
  ref_lr    = '0;
  ref_pc    = '0;
  ref_ir    = E_NOOP;
endtask

function automatic logic ref_cond(logic [3:0] cc, logic [3:0] f);
  logic n, z, c, v, r;
  {n, z, c, v} = f;
  case (cc[3:1])
    3'd0: r = z;
    3'd1: r = c;
    3'd2: r = n;
    3'd3: r = v;
    3'd4: r = c & ~z;
    3'd5: r = (n == v);
    3'd6: r = ~z & (n == v);
    default: r = 1'b1;
  endcase
  // odd codes negate, except 15 which is "never"
  if (cc == 4'hF) return 1'b0;
  if (cc == 4'hE) return 1'b1;
  return cc[0] ? ~r : r;
endfunction

task automatic ref_step();
  logic [15:0] i, a, b, res, nxt, sext;
  logic [3:0]  upd, nzcv;
  logic        c, v, wr, taken;
  logic [3:0]  wa;
  int          n;
  i = ref_ir;
  nxt = ref_pc + 16'd1;
  res = '0; c = ref_flags[1]; v = ref_flags[0];
  upd = 4'b0000; wr = 1'b0; wa = '0; taken = 1'b0;
  ref_kind = K_NOOP; ref_cond_fail = 1'b0; ref_bx_lr = 1'b0;
  if (i[15:11] == 5'b00100) begin
    ref_kind = K_MOVS; res = {8'd0, i[7:0]}; wr = 1; wa = {1'b0, i[10:8]}; upd = 4'b1100;
  end else if (i[15:8] == 8'h46) begin
    ref_kind = K_MOV; res = ref_rd(i[6:3]); wr = 1; wa = {i[7], i[2:0]};
  end else if (i[15:11] == 5'b00011) begin
    a = ref_rd({1'b0, i[5:3]});
    b = i[10] ? {13'd0, i[8:6]} : ref_rd({1'b0, i[8:6]});
    wr = 1; wa = {1'b0, i[2:0]}; upd = 4'b1111;
    if (i[9]) begin
      ref_kind = i[10] ? K_SUBS_I : K_SUBS_R;
      res = a - b; c = (a >= b); v = (a[15] != b[15]) && (res[15] != a[15]);
    end else begin
      ref_kind = i[10] ? K_ADDS_I : K_ADDS_R;
      res = a + b; c = ({1'b0, a} + {1'b0, b}) > 17'hFFFF;
      v = (a[15] == b[15]) && (res[15] != a[15]);
    end
  end else if (i[15:8] == 8'hB0) begin
    ref_kind = i[7] ? K_SUB_SP : K_ADD_SP;
    res = i[7] ? ref_regs[13] - {9'd0, i[6:0]} : ref_regs[13] + {9'd0, i[6:0]};
    wr = 1; wa = 4'd13;
  end else if (i[15:6] == 10'b0100001010) begin
    ref_kind = K_CMP; a = ref_rd({1'b0, i[2:0]}); b = ref_rd({1'b0, i[5:3]});
    res = a - b; c = (a >= b); v = (a[15] != b[15]) && (res[15] != a[15]); upd = 4'b1111;
  end else if (i[15:10] == 6'b010000 &&
               (i[9:6] inside {4'b0000, 4'b0001, 4'b1100, 4'b1111,
                               4'b0010, 4'b0011, 4'b0100, 4'b0111})) begin
    a = ref_rd({1'b0, i[2:0]});   // Rdn
    b = ref_rd({1'b0, i[5:3]});   // Rm
    wr = 1; wa = {1'b0, i[2:0]};
    n = int'(b[7:0]);
    case (i[9:6])
      4'b0000: begin ref_kind = K_ANDS; res = a & b; upd = 4'b1100; end
      4'b0001: begin ref_kind = K_EORS; res = a ^ b; upd = 4'b1100; end
      4'b1100: begin ref_kind = K_ORRS; res = a | b; upd = 4'b1100; end
      4'b1111: begin ref_kind = K_MVNS; res = ~b;    upd = 4'b1100; end
      4'b0010: begin   // LSL, one bit at a time
        ref_kind = K_LSLS; upd = 4'b1110; res = a;
        for (int k = 0; k < n && k < 20; k++) begin c = res[15]; res = {res[14:0], 1'b0}; end
      end
      4'b0011: begin
        ref_kind = K_LSRS; upd = 4'b1110; res = a;
        for (int k = 0; k < n && k < 20; k++) begin c = res[0]; res = {1'b0, res[15:1]}; end
      end
      4'b0100: begin
        ref_kind = K_ASRS; upd = 4'b1110; res = a;
        for (int k = 0; k < n && k < 20; k++) begin c = res[0]; res = {res[15], res[15:1]}; end
      end
      default: begin
        ref_kind = K_RORS; upd = 4'b1110; res = a;
        for (int k = 0; k < n; k++) begin c = res[0]; res = {res[0], res[15:1]}; end
      end
    endcase
  end else if (i[15:12] == 4'b0110) begin
    a = (ref_rd({1'b0, i[5:3]}) + {11'd0, i[10:6]});
    if (i[11]) begin
      ref_kind = K_LDR; res = ref_mem[a[7:0]]; wr = 1; wa = {1'b0, i[2:0]};
    end else begin
      ref_kind = K_STR; ref_mem[a[7:0]] = ref_rd({1'b0, i[2:0]});
    end
  end else if (i[15:12] == 4'b1101) begin
    ref_kind = K_BCC; sext = {{8{i[7]}}, i[7:0]};
    taken = ref_cond(i[11:8], ref_flags);
    ref_cond_fail = !taken;
    if (taken) nxt = ref_pc + sext;
  end else if (i[15:11] == 5'b11100) begin
    ref_kind = K_B; taken = 1; nxt = ref_pc + {{5{i[10]}}, i[10:0]};
  end else if (i[15:8] == 8'h45) begin
    ref_kind = K_BL; taken = 1; nxt = ref_pc + {{10{i[5]}}, i[5:0]};
    ref_lr = ref_pc + 16'd1;
  end else if (i[15:7] == 9'b010001110 && i[2:0] == 3'b000) begin
    ref_kind = K_BX; taken = 1; nxt = ref_rd(i[6:3]); ref_bx_lr = (i[6:3] == 4'd14);
  end
  nzcv = {res[15], res == 16'd0, c, v};
  ref_kept_flags = (upd != 4'b0000) && (upd != 4'b1111) && (ref_flags[1] || ref_flags[0]);
  ref_flags = (ref_flags & ~upd) | (nzcv & upd);
  if (wr) ref_regs[wa] = res;
  ref_taken = taken;
  ref_ir = imem[ref_pc[7:0]];
  ref_pc = nxt;
endtask
