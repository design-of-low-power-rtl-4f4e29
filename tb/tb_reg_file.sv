// tb_reg_file: random writes and reads against a reference array.
// Checks the active-low write enable, x0 reading zero and ignoring writes,
// both read ports and the reset to zero.
module tb_reg_file;
  logic clk = 1'b0, rst, rf_wen_n;
  logic [4:0]  addr_d, addr1, addr2;
  logic [31:0] data_in, d1_bus, d2_bus;
  logic [31:0] ref_rf [32];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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
    rst = 1'b0; #1 rst = 1'b1; rf_wen_n = 1'b1; addr_d = '0; addr1 = '0; addr2 = '0; data_in = '0;
    foreach (ref_rf[i]) ref_rf[i] = '0;
    #12;
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      addr1 = 5'(i); addr2 = 5'(31 - i); #1;
      check("reset value port 1", d1_bus, 0);
      check("reset value port 2", d2_bus, 0);
    end
    repeat (1000) begin
      @(negedge clk); #1;
      rf_wen_n = 1'($urandom); addr_d = 5'($urandom); data_in = $urandom;
      addr1 = 5'($urandom); addr2 = 5'($urandom);
      #1;
      check("read port 1", d1_bus, ref_rf[addr1]);
      check("read port 2", d2_bus, ref_rf[addr2]);
      if (!rf_wen_n && addr_d != 0) ref_rf[addr_d] = data_in;
    end
    @(negedge clk); #1;
    rf_wen_n = 1'b0; addr_d = 0; data_in = 32'hFFFF_FFFF;
    @(negedge clk); #1;
    rf_wen_n = 1'b1; addr1 = 0; #1;
    check("x0 stays zero", d1_bus, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
