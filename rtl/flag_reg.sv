// flag_reg: NZCV status register and branch-condition check.
//
// The datapath reports the N, Z, C and V flags of the current result on
// nzcv_in; at the rising clock edge the register takes the bits selected by
// upd (one bit per flag, NZCV order) and keeps the others, so an ANDS
// changes only N and Z and leaves C and V from an earlier ADDS/SUBS. The
// stored flags drive cond_true, the outcome of the 4-bit condition field of
// B<cc> for the instruction now in decode; an instruction that sets flags
// therefore affects a conditional branch that follows it directly.
// Synchronous, active-high reset clears all four flags.
//
// Which instructions update which flags follows the supported-instruction
// table; the condition codes use the usual Thumb meanings (EQ=0 ... LE=13,
// 14 = always), and 15 = never is this design's own choice.
module flag_reg
  import id_pkg::*;
(
  input  logic       clk,
  input  logic       reset,     // synchronous, active high
  input  logic [3:0] nzcv_in,   // flags of the current result
  input  logic [3:0] upd,       // which flags to update (NZCV)
  input  cond_e      cond,      // condition field of the decoded B<cc>
  output logic [3:0] flags,     // stored NZCV
  output logic       cond_true  // cond holds for the stored flags
);

  always_ff @(posedge clk) begin
    if (reset) flags <= 4'b0000;
    else       flags <= (flags & ~upd) | (nzcv_in & upd);
  end

  assign cond_true = cond_holds(cond, flags);

endmodule
