// tb_instr_reg: checks the instruction register. Reset must load the NOOP
// encoding 0xBF00 whatever the input; out of reset the register must show,
// after each rising edge, the word presented before that edge (one cycle of
// latency), for 2000 random words.
module tb_instr_reg;
  logic clk = 1'b0, reset;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  instr_reg u_dut (.clk, .reset, .instr_in(din), .instr_out(dout));

  task automatic check(logic [15:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL got %h expected %h", dout, exp);
    end
  endtask

  initial begin
    reset = 1'b1;
    din = 16'h1234;
    @(posedge clk); #1 check(16'hBF00);
    din = 16'hFFFF;
    @(posedge clk); #1 check(16'hBF00);
    reset = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      logic [15:0] w = 16'($urandom);
      din = w;
      #1 check((k == 0) ? 16'hBF00 : dout);   // no change before the edge
      @(posedge clk); #1 check(w);
    end
    reset = 1'b1;
    @(posedge clk); #1 check(16'hBF00);
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
