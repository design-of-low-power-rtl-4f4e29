// tb_instr_mem: fills the 256-byte instruction memory through its load
// port with words generated from a hash of the address, then reads every
// word-aligned address (and some unaligned ones, which wrap) and compares
// with the little-endian composition of a byte reference; the output must
// be zero while IMwEn = 1.
module tb_instr_mem;
  logic clk = 1'b0, im_en_n, load_we;
  logic [31:0] pc, instr, load_data;
  logic [5:0]  load_addr;
  logic [7:0]  ref_mem [256];
  int checks = 0, failures = 0;

  instr_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] word_of(int a);
    return (32'(a) * 32'h9E37_79B9) ^ 32'h5A5A_1234;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] w;
    load_we = 1'b0; load_addr = '0; load_data = '0; im_en_n = 1'b1; pc = '0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 6'(a); w = word_of(a); load_data = w;
      for (int b = 0; b < 4; b++) ref_mem[4*a + b] = w[8*b +: 8];
    end
    @(negedge clk) load_we = 1'b0;
    for (int a = 0; a < 256; a += 4) begin
      pc = 32'(a); im_en_n = 1'b0; #1;
      check("aligned read", instr, {ref_mem[a+3], ref_mem[a+2], ref_mem[a+1], ref_mem[a]});
      im_en_n = 1'b1; #1;
      check("disabled read is zero", instr, 0);
    end
    for (int a = 253; a < 256; a++) begin
      pc = 32'(a); im_en_n = 1'b0; #1;
      check("wrapping read", instr, {ref_mem[(a+3)%256], ref_mem[(a+2)%256],
                                     ref_mem[(a+1)%256], ref_mem[a]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
