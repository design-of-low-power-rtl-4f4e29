// tb_alu: random operands for every operation code, compared with a
// reference computed with plain integer arithmetic in the testbench.
module tb_alu;
  logic [31:0] a, b, y;
  logic [3:0]  op;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(logic [31:0] x, logic [31:0] z, logic [3:0] o);
    longint unsigned ux = x, uz = z;
    case (o)
      4'd0: return 32'(ux + uz);
      4'd1: return 32'(ux + (64'h1_0000_0000 - uz));
      4'd2: return x | z;
      4'd3: return x & z;
      4'd4: return 32'(ux * (64'd1 << z[4:0]));
      4'd5: return 32'(ux / (64'd1 << z[4:0]));
      4'd6: return z;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 16; o++) begin
      repeat (200) begin
        a = $urandom; b = $urandom; op = 4'(o);
        if ($urandom_range(0, 3) == 0) b = a;
        #1;
        checks++;
        if (y !== ref_alu(a, b, op)) begin
          failures++;
          $display("FAIL op %0d a %h b %h: got %h expected %h", o, a, b, y, ref_alu(a, b, op));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
