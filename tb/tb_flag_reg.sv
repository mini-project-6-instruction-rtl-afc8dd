// tb_flag_reg: checks the NZCV register and the condition check. Random
// flag inputs and update masks are applied; after each edge the stored
// flags must equal a model that replaces only the masked bits, and for all
// 16 condition codes cond_true must match the condition written out from
// its definition (EQ: Z, NE: !Z, CS: C, ... LE: Z or N != V, 14 always,
// 15 never). Reset must clear the flags.
module tb_flag_reg;
  import id_pkg::*;
  logic clk = 1'b0, reset;
  logic [3:0] nzcv_in, upd, flags, model;
  cond_e cond;
  logic cond_true;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flag_reg u_dut (.clk, .reset, .nzcv_in, .upd, .cond, .flags, .cond_true);

  function automatic logic expect_cond(int cc, logic [3:0] f);
    logic n, z, c, v;
    {n, z, c, v} = f;
    case (cc)
      0: return z;            1: return !z;
      2: return c;            3: return !c;
      4: return n;            5: return !n;
      6: return v;            7: return !v;
      8: return c && !z;      9: return !c || z;
      10: return n == v;      11: return n != v;
      12: return !z && n == v; 13: return z || n != v;
      14: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    reset = 1'b1; nzcv_in = 4'hF; upd = 4'hF; cond = COND_AL;
    @(posedge clk); #1;
    checks++; if (flags !== 4'h0) failures++;
    reset = 1'b0;
    model = 4'h0;
    for (int k = 0; k < 3000; k++) begin
      nzcv_in = 4'($urandom);
      upd = 4'($urandom);
      @(posedge clk); #1;
      model = (model & ~upd) | (nzcv_in & upd);
      checks++;
      if (flags !== model) begin
        failures++;
        $display("FAIL flags %b expected %b", flags, model);
      end
      for (int cc = 0; cc < 16; cc++) begin
        cond = cond_e'(cc);
        #1;
        checks++;
        if (cond_true !== expect_cond(cc, model)) begin
          failures++;
          $display("FAIL cond %0d flags %b: got %b", cc, model, cond_true);
        end
      end
    end
    reset = 1'b1;
    @(posedge clk); #1;
    checks++; if (flags !== 4'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
