// tb_instr_reg: checks reset, loading on the rising edge with LdIR = 1 and
// holding with LdIR = 0 against a reference register.
module tb_instr_reg;
  logic clk = 1'b0, rst, ld_ir;
  logic [31:0] instr_in, ir, ref_ir;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b0; #1 rst = 1'b1; ld_ir = 1'b1; instr_in = 32'hDEAD_BEEF;
    #12 check("reset", ir, 0);
    ref_ir = 0;
    @(negedge clk) begin rst = 1'b0; ld_ir = 1'b0; end
    repeat (300) begin
      @(negedge clk); #1;
      check("ir", ir, ref_ir);
      ld_ir = 1'($urandom); instr_in = $urandom;
      if (ld_ir) ref_ir = instr_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
