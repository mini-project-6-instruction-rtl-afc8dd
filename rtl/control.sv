// control: CPU core controller, the instruction decoder with its program
// counter.
//
// The controller drives the instruction-memory address (pc_out), receives
// the fetched word (instruction) and steers a datapath made of a register
// file with two read ports and one write port, an ALU with operand selects,
// a shifter, a result multiplexer and a data memory. In return it reads the
// datapath's flags of the current result (flag_nzcv) and the result-mux
// output (mux_result), which is also the branch target.
//
// Pipeline: fetch (combinational instruction-memory read at pc_out), then
// decode and execute in the next cycle. One instruction completes per clock;
// the instruction behind a taken branch is executed (one delay slot).
//
// The partition into instruction decoder and program counter and the
// signal names follow the design; the datapath and memories are outside
// this module and appear only as ports. Synchronous, active-high reset:
// pc_out = 0, the decoder holds NOOP, flags and LR are cleared.
module control
  import id_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  // instruction memory
  output logic [DATA_W-1:0]    pc_out,
  input  logic [DATA_W-1:0]    instruction,
  // datapath
  input  logic [3:0]           flag_nzcv,
  input  logic [DATA_W-1:0]    mux_result,
  output logic [DATA_W-1:0]    id_instruction,
  output logic [RF_ADDR_W-1:0] rf_rd_add0,
  output logic [RF_ADDR_W-1:0] rf_rd_add1,
  output logic [RF_ADDR_W-1:0] rf_wr_add,
  output logic                 rf_wr_en,
  output logic                 right,
  output logic                 shift,
  output logic                 arith,
  output logic [DATA_W-1:0]    alu_op0_from_id,
  output logic [DATA_W-1:0]    alu_op1_from_id,
  output logic                 sel_alu_op0,
  output logic                 sel_alu_op1,
  output logic [2:0]           alu_control,
  output logic [2:0]           result_sel,
  output logic [3:0]           flag,
  output logic [DATA_W-1:0]    lr,
  output logic                 sel_pc,
  // data memory
  output logic                 dm_read_en,
  output logic                 dm_write_en
);

  instruction_decoder u_id (
    .clk             (clk),
    .reset           (reset),
    .instruction     (instruction),
    .pc              (pc_out),
    .flag_nzcv       (flag_nzcv),
    .id_instruction  (id_instruction),
    .rf_rd_add0      (rf_rd_add0),
    .rf_rd_add1      (rf_rd_add1),
    .rf_wr_add       (rf_wr_add),
    .rf_wr_en        (rf_wr_en),
    .right           (right),
    .shift           (shift),
    .arith           (arith),
    .alu_op0_from_id (alu_op0_from_id),
    .alu_op1_from_id (alu_op1_from_id),
    .sel_alu_op0     (sel_alu_op0),
    .sel_alu_op1     (sel_alu_op1),
    .alu_control     (alu_control),
    .result_sel      (result_sel),
    .dm_read_en      (dm_read_en),
    .dm_write_en     (dm_write_en),
    .sel_pc          (sel_pc),
    .flag            (flag),
    .lr              (lr)
  );

  program_counter #(
    .PC_W     (DATA_W),
    .RESET_PC ('0)
  ) u_pc (
    .clk    (clk),
    .reset  (reset),
    .sel_pc (sel_pc),
    .target (mux_result),
    .pc_out (pc_out)
  );

endmodule
