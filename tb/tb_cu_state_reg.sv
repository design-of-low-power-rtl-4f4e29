// tb_cu_state_reg: checks that the state register loads on the falling
// clock edge only, holds across the rising edge, and is cleared to INIT by
// an asynchronous reset.
module tb_cu_state_reg;
  import riscv_cu_pkg::*;
  logic clk = 1'b0, rst;
  cu_state_t next_state, state;
  int checks = 0, failures = 0;

  cu_state_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    cu_state_t v, prev;
    rst = 1'b0; #1 rst = 1'b1; next_state = S_ADD;
    #3 check("reset", int'(state), 0);
    @(negedge clk); #1 check("held in reset", state, 0);
    rst = 1'b0;
    prev = S_INIT;
    repeat (200) begin
      v = cu_state_t'($urandom_range(0, 17));
      next_state = v;
      @(posedge clk); #1 check("no load on rising edge", state, prev);
      @(negedge clk); #1 check("load on falling edge", state, v);
      prev = v;
    end
    // asynchronous reset while clk is high
    @(posedge clk); #1 rst = 1'b1; #1 check("async reset", state, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
