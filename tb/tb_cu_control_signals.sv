// tb_cu_control_signals: checks the output decoder of the control unit.
//
// For every state, and both values of BrEq, the 20-bit combined value is
// compared with the control table, and each named output is compared with
// the matching bit field of that value, so that both the packing and the
// individual lines are verified.  Unused state codes must give the idle
// (INIT) row.
module tb_cu_control_signals;
  import riscv_cu_pkg::*;
  cu_state_t   state;
  logic        br_eq;
  ctrl_t       ctrl;
  logic [19:0] cv;
  int checks = 0, failures = 0;

  cu_control_signals dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [19:0] exp_cv(int s, logic taken);
    case (s)
      0: return 20'h1C0D0;   1: return 20'h188D0;  2: return 20'h14000;
      3: return 20'h11D60;   4: return 20'h02160;  5: return 20'h08CC0;
      6: return 20'h08CC2;   7: return 20'h08CC4;  8: return 20'h08CC6;
      9: return 20'h00CE0;  10: return 20'h00CE8; 11: return 20'h00CEA;
     12: return 20'h00CAC;  13: return 20'h00CA0; 14: return 20'h02E20;
     15: return 20'h000C1;  16: return taken ? 20'h02E21 : 20'h1CCC0;
     17: return 20'h02D60;
      default: return 20'h1C0D0;
    endcase
  endfunction

  task automatic check(string what, int s, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL S%0d %s: got %0h expected %0h", s, what, got, exp);
    end
  endtask

  initial begin
    logic [19:0] e;
    for (int s = 0; s < 32; s++) begin
      for (int b = 0; b < 2; b++) begin
        state = cu_state_t'(s); br_eq = 1'(b);
        #1;
        e = exp_cv(s, 1'(b));
        check("CV", s, 32'(cv), 32'(e));
        check("RFwEn",      s, 32'(ctrl.rf_wen_n),   32'(e[16]));
        check("IMMwEn",     s, 32'(ctrl.imm_en_n),   32'(e[15]));
        check("IMwEn",      s, 32'(ctrl.im_en_n),    32'(e[14]));
        check("Mread",      s, 32'(ctrl.mread),      32'(e[13]));
        check("Mwrite",     s, 32'(ctrl.mwrite),     32'(e[12]));
        check("LdIR",       s, 32'(ctrl.ld_ir),      32'(e[11]));
        check("LdPC",       s, 32'(ctrl.ld_pc),      32'(e[10]));
        check("PCSel",      s, 32'(ctrl.pc_sel),     32'(e[9]));
        check("RFSel",      s, 32'(ctrl.rf_sel),     32'(e[8:7]));
        check("ASel",       s, 32'(ctrl.a_sel),      32'(e[6]));
        check("BSel",       s, 32'(ctrl.b_sel),      32'(e[5]));
        check("ALUOp_Sel",  s, 32'(ctrl.alu_op),     32'(e[4:1]));
        check("Br_control", s, 32'(ctrl.br_control), 32'(e[0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
