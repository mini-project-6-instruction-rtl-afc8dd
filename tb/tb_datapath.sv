// tb_datapath: behavioural model of the datapath the controller steers, for
// simulation only.
//
// Register file: 16 x 16-bit, two combinational read ports, one write port
// written at the rising clock edge; reading register 14 returns the
// controller's link register so that BX r14 returns from a BL. ALU: op0 is
// register port 0 or the decoder's immediate, op1 register port 1 or the PC;
// ADD = op1 + op0, SUB/CMP = op1 - op0 (carry = no borrow), AND, OR, XOR,
// NOT = ~op0. Shifter: shifts port-1 data by the low byte of port-0 data
// (LSL, LSR, ASR, ROR with Thumb carry-out rules). Result mux: ALU, shifter,
// port 0, data-memory data, immediate. flag_nzcv: N and Z of the result-mux
// output, C from the ALU or shifter, V from the ALU. Registers start at 0.
module tb_datapath (
  input  logic        clk,
  input  logic [3:0]  rf_rd_add0,
  input  logic [3:0]  rf_rd_add1,
  input  logic [3:0]  rf_wr_add,
  input  logic        rf_wr_en,
  input  logic        right,
  input  logic        shift,
  input  logic        arith,
  input  logic [15:0] alu_op0_from_id,
  input  logic [15:0] alu_op1_from_id,
  input  logic        sel_alu_op0,
  input  logic        sel_alu_op1,
  input  logic [2:0]  alu_control,
  input  logic [2:0]  result_sel,
  input  logic [3:0]  flag,          // stored flags (carry-in of shifts by 0)
  input  logic [15:0] lr,
  input  logic [15:0] dm_data,       // data-memory read data
  output logic [15:0] rd_data0,      // store data
  output logic [15:0] alu_out,       // memory address / branch target
  output logic [15:0] mux_result,
  output logic [3:0]  flag_nzcv
);

  logic [15:0] regs [16];
  logic [15:0] rd_data1, op0, op1, sh_out;
  logic        alu_c, alu_v, sh_c;

  initial for (int i = 0; i < 16; i++) regs[i] = '0;

  always_ff @(posedge clk)
    if (rf_wr_en) regs[rf_wr_add] <= mux_result;

  assign rd_data0 = (rf_rd_add0 == 4'd14) ? lr : regs[rf_rd_add0];
  assign rd_data1 = (rf_rd_add1 == 4'd14) ? lr : regs[rf_rd_add1];
  assign op0 = sel_alu_op0 ? alu_op0_from_id : rd_data0;
  assign op1 = sel_alu_op1 ? alu_op1_from_id : rd_data1;

  always_comb begin
    logic [16:0] s;
    alu_c = 1'b0;
    alu_v = 1'b0;
    s     = '0;
    case (alu_control)
      3'd0: alu_out = op0 & op1;
      3'd1: begin
        s = {1'b0, op1} + {1'b0, op0};
        alu_out = s[15:0];
        alu_c = s[16];
        alu_v = (op0[15] == op1[15]) && (s[15] != op1[15]);
      end
      3'd2: alu_out = ~op0;
      3'd3, 3'd7: begin
        s = {1'b0, op1} + {1'b0, ~op0} + 17'd1;
        alu_out = s[15:0];
        alu_c = s[16];
        alu_v = (op0[15] != op1[15]) && (s[15] != op1[15]);
      end
      3'd4: alu_out = op0 | op1;
      3'd6: alu_out = op0 ^ op1;
      default: alu_out = '0;
    endcase
  end

  always_comb begin
    int unsigned n;
    logic [31:0] w;
    n = int'(rd_data0[7:0]);
    sh_out = rd_data1;
    sh_c = flag[1];
    w = '0;
    if (n != 0) begin
      if (!right) begin                       // LSL
        w = {16'd0, rd_data1} << ((n > 16) ? 17 : n);
        sh_out = w[15:0];
        sh_c = (n > 16) ? 1'b0 : w[16];
      end else if (!shift) begin              // ROR
        n = n % 16;
        sh_out = (n == 0) ? rd_data1 : ((rd_data1 >> n) | (rd_data1 << (16 - n)));
        sh_c = sh_out[15];
      end else if (arith) begin               // ASR
        if (n >= 16) begin
          sh_out = {16{rd_data1[15]}};
          sh_c = rd_data1[15];
        end else begin
          sh_out = 16'($signed(rd_data1) >>> n);
          sh_c = rd_data1[n-1];
        end
      end else begin                          // LSR
        if (n > 16) begin
          sh_out = '0;
          sh_c = 1'b0;
        end else begin
          w = {rd_data1, 16'd0} >> n;
          sh_out = w[31:16];
          sh_c = w[15];
        end
      end
    end
  end

  always_comb begin
    case (result_sel)
      3'd0:    mux_result = alu_out;
      3'd1:    mux_result = sh_out;
      3'd2:    mux_result = rd_data0;
      3'd3:    mux_result = dm_data;
      3'd4:    mux_result = alu_op0_from_id;
      default: mux_result = '0;
    endcase
  end

  assign flag_nzcv = {mux_result[15], mux_result == 16'd0,
                      (result_sel == 3'd1) ? sh_c : alu_c, alu_v};

endmodule
