// tb_program_counter: checks reset to 0, PC + 4, loading the ALU value
// with PCSel = 1, and holding while LdPC = 0, against a reference PC kept in
// the testbench.  Inputs change after the falling edge, as the control unit
// drives them.
module tb_program_counter;
  logic clk = 1'b0, rst, ld_pc, pc_sel;
  logic [31:0] alu_out, pc, pc_plus4;
  logic [31:0] ref_pc;
  int checks = 0, failures = 0;

  program_counter dut (.*);

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
    rst = 1'b0; #1 rst = 1'b1; ld_pc = 1'b0; pc_sel = 1'b0; alu_out = '0;
    #12 check("reset", pc, 0);
    ref_pc = 0;
    @(negedge clk) rst = 1'b0;
    repeat (300) begin
      @(negedge clk);
      #1;
      check("pc", pc, ref_pc);
      check("pc_plus4", pc_plus4, ref_pc + 4);
      ld_pc = 1'($urandom); pc_sel = 1'($urandom); alu_out = $urandom & 32'hFFFF_FFFC;
      if (ld_pc) ref_pc = pc_sel ? alu_out : ref_pc + 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
