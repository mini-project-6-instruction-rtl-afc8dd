// instr_reg: instruction register between the instruction memory and the
// decoder.
//
// The instruction memory is read combinationally at the current PC; this
// register captures that word on every rising clock edge, so the decoder
// works on the instruction fetched one cycle earlier (a two-stage
// fetch / decode-execute pipeline). There is no enable: the pipeline never
// holds. A synchronous, active-high reset loads RESET_VALUE, the NOOP
// encoding, so the first cycle after reset executes nothing. The register
// and its NOOP reset follow the design's reference simulation and timing
// report (the reset path ends at the register's data input); the parameters
// are this design's own.
module instr_reg #(
  parameter int unsigned         WIDTH       = 16,
  parameter logic [WIDTH-1:0]    RESET_VALUE = 16'hBF00
) (
  input  logic             clk,
  input  logic             reset,      // synchronous, active high
  input  logic [WIDTH-1:0] instr_in,   // word read from instruction memory
  output logic [WIDTH-1:0] instr_out   // instruction being decoded
);

  always_ff @(posedge clk) begin
    if (reset) instr_out <= RESET_VALUE;
    else       instr_out <= instr_in;
  end

endmodule
