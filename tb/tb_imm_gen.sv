// tb_imm_gen: random instruction words for every opcode; the immediate is
// compared with a reference that reassembles the immediate from the
// scattered bit fields of each format and sign-extends it arithmetically.
// With IMMwEn = 1 the output must be zero.
module tb_imm_gen;
  logic        imm_en_n;
  logic [31:0] ir, imm;
  int checks = 0, failures = 0;

  imm_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_imm(logic [31:0] w);
    int v;
    case (w[6:0])
      7'h13, 7'h03: v = int'($signed(w)) >>> 20;
      7'h23: v = ((int'($signed(w)) >>> 25) * 32) + int'(w[11:7]);
      7'h63: v = ((int'($signed(w)) >>> 31) * 4096) + int'(w[7]) * 2048
                 + int'(w[30:25]) * 32 + int'(w[11:8]) * 2;
      7'h37, 7'h17: v = int'(w & 32'hFFFF_F000);
      7'h6F: v = ((int'($signed(w)) >>> 31) * 1048576) + int'(w[19:12]) * 4096
                 + int'(w[20]) * 2048 + int'(w[30:21]) * 2;
      default: v = 0;
    endcase
    return 32'(v);
  endfunction

  initial begin
    logic [6:0] ops [8] = '{7'h13, 7'h03, 7'h23, 7'h63, 7'h37, 7'h17, 7'h6F, 7'h33};
    repeat (2000) begin
      ir = {$urandom} & 32'hFFFF_FF80;
      ir[6:0] = ops[$urandom_range(0, 7)];
      imm_en_n = 1'b0; #1;
      checks++;
      if (imm !== ref_imm(ir)) begin
        failures++;
        $display("FAIL ir %h: got %h expected %h", ir, imm, ref_imm(ir));
      end
      imm_en_n = 1'b1; #1;
      checks++;
      if (imm !== 0) begin
        failures++;
        $display("FAIL disabled: %h", imm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
