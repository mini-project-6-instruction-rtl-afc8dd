// tb_program_counter: checks the program counter against a counter kept in
// the testbench: reset to 0, +1 per cycle, loading the target when sel_pc
// is high (random targets and random sel_pc), wrap-around from 0xFFFF to 0,
// and reset taking priority over a branch.
module tb_program_counter;
  logic clk = 1'b0, reset, sel_pc;
  logic [15:0] target, pc;
  logic [15:0] exp_pc;
  int checks = 0, failures = 0, loads = 0;
  always #5 clk = ~clk;

  program_counter u_dut (.clk, .reset, .sel_pc, .target, .pc_out(pc));

  task automatic check(logic [15:0] exp);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL pc %h expected %h", pc, exp);
    end
  endtask

  initial begin
    reset = 1'b1; sel_pc = 1'b1; target = 16'h1234;
    @(posedge clk); #1 check(16'h0000);
    reset = 1'b0; sel_pc = 1'b0;
    exp_pc = 16'h0000;
    for (int k = 0; k < 3000; k++) begin
      sel_pc = ($urandom_range(0, 3) == 0);
      target = 16'($urandom);
      if (k == 1500) begin sel_pc = 1'b1; target = 16'hFFFE; end
      exp_pc = sel_pc ? target : exp_pc + 16'd1;
      loads += int'(sel_pc);
      @(posedge clk); #1 check(exp_pc);
    end
    sel_pc = 1'b0;
    @(posedge clk); #1 check(exp_pc + 16'd1);
    reset = 1'b1; sel_pc = 1'b1;
    @(posedge clk); #1 check(16'h0000);
    checks++;
    if (loads == 0) failures++;
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
