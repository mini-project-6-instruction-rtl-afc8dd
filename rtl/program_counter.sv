// program_counter: address of the next instruction to fetch.
//
// On every rising clock edge the PC either advances by one (instructions
// are addressed as 16-bit words) or, when sel_pc is high, loads the branch
// target computed during the current cycle. Because the target is chosen
// while the branch is in decode, the word already fetched behind the branch
// is executed before the target (one delay slot). Synchronous, active-high
// reset sets the PC to RESET_PC. The PC width and the increment-or-load
// behaviour follow the design; the reset address is this design's own
// choice (execution of the reference program starts at address 0).
module program_counter #(
  parameter int unsigned      PC_W     = 16,
  parameter logic [PC_W-1:0]  RESET_PC = '0
) (
  input  logic            clk,
  input  logic            reset,    // synchronous, active high
  input  logic            sel_pc,   // 1: load target, 0: PC + 1
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] pc_out
);

  always_ff @(posedge clk) begin
    if (reset)       pc_out <= RESET_PC;
    else if (sel_pc) pc_out <= target;
    else             pc_out <= pc_out + PC_W'(1);
  end

endmodule
