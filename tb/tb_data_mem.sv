// tb_data_mem: random word stores and loads against a byte reference.
// Checks the synchronous read (ReadData changes only on a rising edge with
// Mread = 1 and is held otherwise), little-endian byte order, address
// wrap-around and that nothing is written while Mwrite = 0.
module tb_data_mem;
  logic clk = 1'b0, mread, mwrite;
  logic [31:0] address, write_data, read_data, ref_rd;
  logic [7:0]  ref_mem [256];
  int checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    mread = 1'b0; mwrite = 1'b1;
    // initialise all bytes
    for (int i = 0; i < 256; i += 4) begin
      @(negedge clk); address = i; write_data = 32'(i) * 32'h0101_0101; 
      for (int b = 0; b < 4; b++) ref_mem[i + b] = 8'(i);
    end
    @(negedge clk); mwrite = 1'b0;
    @(negedge clk); mread = 1'b1; address = 0;
    @(negedge clk); ref_rd = {ref_mem[3], ref_mem[2], ref_mem[1], ref_mem[0]};
    repeat (1500) begin
      #1;
      checks++;
      if (read_data !== ref_rd) begin
        failures++;
        $display("FAIL read_data %h expected %h", read_data, ref_rd);
      end
      mread = 1'($urandom); mwrite = !mread && ($urandom_range(0, 1) == 1);
      a = $urandom_range(0, 255);
      address = {$urandom} & 32'hFFFF_FF00 | 32'(a);  // upper bits are ignored
      write_data = $urandom;
      @(negedge clk);
      if (mread) ref_rd = {ref_mem[(a+3)%256], ref_mem[(a+2)%256], ref_mem[(a+1)%256], ref_mem[a]};
      if (mwrite) for (int b = 0; b < 4; b++) ref_mem[(a+b)%256] = write_data[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
