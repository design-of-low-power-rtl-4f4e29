// tb_branch_comp: checks that BrEq is the registered result of rs1 == rs2,
// captured only on rising edges where Br_control = 1 and held otherwise;
// half of the operand pairs are made equal on purpose.
module tb_branch_comp;
  logic clk = 1'b0, rst, br_control, br_eq, ref_eq;
  logic [31:0] d1_bus, d2_bus;
  int checks = 0, failures = 0;

  branch_comp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; #1 rst = 1'b1; br_control = 1'b0; d1_bus = 1; d2_bus = 1;
    #12;
    checks++; if (br_eq !== 1'b0) failures++;
    ref_eq = 1'b0;
    @(negedge clk) rst = 1'b0;
    repeat (400) begin
      @(negedge clk); #1;
      checks++;
      if (br_eq !== ref_eq) begin
        failures++;
        $display("FAIL br_eq %b expected %b", br_eq, ref_eq);
      end
      br_control = 1'($urandom);
      d1_bus = $urandom;
      d2_bus = $urandom_range(0, 1) ? d1_bus : d1_bus ^ (32'h1 << $urandom_range(0, 31));
      if (br_control) ref_eq = (d1_bus == d2_bus);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
