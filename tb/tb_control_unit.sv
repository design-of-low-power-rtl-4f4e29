// tb_control_unit: self-checking test of the control unit on its own.
//
// Each of the 13 instructions (plus one undecoded word) is held on the
// opcode/funct3/funct7 inputs while the FSM runs from FETCH back to FETCH.
// After every falling edge the state number and the 20-bit combined value
// are compared with the expected sequence, typed in here from the control
// table as hexadecimal constants, and the number of cycles per instruction
// is checked: 3 for single-state instructions, 4 for lw and beq.  beq is run
// once with BrEq = 0 and once with BrEq = 1.
module tb_control_unit;
  logic clk = 1'b0;
  logic rst;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic       br_eq;
  logic rf_wen_n, imm_en_n, im_en_n, mread, mwrite, ld_ir, ld_pc, pc_sel;
  logic [1:0] rf_sel;
  logic a_sel, b_sel, br_control;
  logic [3:0] alu_op;
  logic [4:0] state;
  logic [19:0] cv;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Expected CV per state from the control table.
  function automatic logic [19:0] exp_cv(int s, logic taken);
    case (s)
      0: return 20'h1C0D0;   1: return 20'h188D0;  2: return 20'h14000;
      3: return 20'h11D60;   4: return 20'h02160;  5: return 20'h08CC0;
      6: return 20'h08CC2;   7: return 20'h08CC4;  8: return 20'h08CC6;
      9: return 20'h00CE0;  10: return 20'h00CE8; 11: return 20'h00CEA;
     12: return 20'h00CAC;  13: return 20'h00CA0; 14: return 20'h02E20;
     15: return 20'h000C1;  16: return taken ? 20'h02E21 : 20'h1CCC0;
     17: return 20'h02D60;
      default: return 20'hFFFFF;
    endcase
  endfunction

  // Run one instruction starting in FETCH; exec lists the expected execute
  // states in order.
  task automatic run(string name, logic [6:0] op, logic [2:0] f3, logic [6:0] f7,
                     int exec[$], logic beq_val);
    int seq[$];
    opcode = op; funct3 = f3; funct7 = f7; br_eq = beq_val;
    seq = {1, 2};
    foreach (exec[i]) seq.push_back(exec[i]);
    check({name, " starts in FETCH"}, 32'(state), 1);
    foreach (seq[i]) begin
      check({name, " state"}, 32'(state), 32'(seq[i]));
      check({name, " cv"}, 32'(cv), 32'(exp_cv(seq[i], beq_val)));
      // single-bit spot checks against the table columns
      // every named output against its field of the combined value
      check({name, " outputs"}, 32'({rf_wen_n, imm_en_n, im_en_n, mread, mwrite, ld_ir,
                                     ld_pc, pc_sel, rf_sel, a_sel, b_sel, alu_op, br_control}),
            32'(cv[16:0]));
      @(negedge clk); #1;
    end
    // cycle count: FETCH + DECODE + execute states, then back in FETCH
    check({name, " cycles"}, 32'(seq.size()), (op == 7'b0000011 || op == 7'b1100011) ? 4 : 3);
    check({name, " back to FETCH"}, 32'(state), 1);
  endtask

  initial begin
    rst = 1'b0; #1 rst = 1'b1; opcode = '0; funct3 = '0; funct7 = '0; br_eq = 1'b0;
    #12;
    check("reset state", 32'(state), 0);
    check("reset cv", 32'(cv), 32'h1C0D0);
    // the register must not move on a rising edge
    @(negedge clk); #1 rst = 1'b0;
    @(posedge clk); #1 check("no change on rising edge", 32'(state), 0);
    @(negedge clk); #1 check("INIT -> FETCH", 32'(state), 1);

    run("ADD",   7'b0110011, 3'b000, 7'b0000000, '{5},  1'b0);
    run("SUB",   7'b0110011, 3'b000, 7'b0100000, '{6},  1'b0);
    run("OR",    7'b0110011, 3'b110, 7'b0000000, '{7},  1'b0);
    run("AND",   7'b0110011, 3'b111, 7'b0000000, '{8},  1'b0);
    run("ADDI",  7'b0010011, 3'b000, 7'b1010101, '{9},  1'b0);
    run("SLLI",  7'b0010011, 3'b001, 7'b0000000, '{10}, 1'b0);
    run("SRLI",  7'b0010011, 3'b101, 7'b0000001, '{11}, 1'b0);
    run("LW",    7'b0000011, 3'b010, 7'b0000000, '{4, 17}, 1'b0);
    run("SW",    7'b0100011, 3'b010, 7'b0000000, '{3},  1'b0);
    run("LUI",   7'b0110111, 3'b011, 7'b1111111, '{12}, 1'b0);
    run("AUIPC", 7'b0010111, 3'b100, 7'b0000000, '{13}, 1'b0);
    run("JAL",   7'b1101111, 3'b000, 7'b0000000, '{14}, 1'b0);
    run("BEQ-F", 7'b1100011, 3'b000, 7'b0000000, '{15, 16}, 1'b0);
    run("BEQ-T", 7'b1100011, 3'b000, 7'b0000000, '{15, 16}, 1'b1);
    // undecoded instructions fall back to FETCH after DECODE
    opcode = 7'b0110011; funct3 = 3'b101; funct7 = 7'b0100000;   // sra
    @(negedge clk); #1 check("undecoded: DECODE", 32'(state), 2);
    @(negedge clk); #1 check("undecoded: back to FETCH", 32'(state), 1);
    // asynchronous reset from the middle of a sequence
    @(negedge clk); #1;
    @(posedge clk); #2 rst = 1'b1; #1;
    check("async reset", 32'(state), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
