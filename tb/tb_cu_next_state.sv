// tb_cu_next_state: checks the next-state function of the control unit.
//
// For every state code 0..31 and a set of instruction fields (the 13
// decoded encodings, variants that must not decode, and random words) the
// output is compared with a reference written here from the instruction
// encodings and the state sequence: INIT->FETCH->DECODE, DECODE->execute
// state, LW->NOP, BEQ check->BEQ execute, every other state->FETCH.
module tb_cu_next_state;
  import riscv_cu_pkg::*;
  cu_state_t  state, next_state;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  int checks = 0, failures = 0;

  cu_next_state dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_decode(logic [6:0] op, logic [2:0] f3, logic [6:0] f7);
    if (op == 7'h33 && f3 == 0 && f7 == 7'h00) return 5;
    if (op == 7'h33 && f3 == 0 && f7 == 7'h20) return 6;
    if (op == 7'h33 && f3 == 6 && f7 == 7'h00) return 7;
    if (op == 7'h33 && f3 == 7 && f7 == 7'h00) return 8;
    if (op == 7'h13 && f3 == 0) return 9;
    if (op == 7'h13 && f3 == 1 && f7[6:1] == 0) return 10;
    if (op == 7'h13 && f3 == 5 && f7[6:1] == 0) return 11;
    if (op == 7'h03 && f3 == 2) return 4;
    if (op == 7'h23 && f3 == 2) return 3;
    if (op == 7'h37) return 12;
    if (op == 7'h17) return 13;
    if (op == 7'h6F) return 14;
    if (op == 7'h63 && f3 == 0) return 15;
    return 1;
  endfunction

  function automatic int ref_next(int s, logic [6:0] op, logic [2:0] f3, logic [6:0] f7);
    case (s)
      0: return 1;
      1: return 2;
      2: return ref_decode(op, f3, f7);
      4: return 17;
      15: return 16;
      default: return 1;
    endcase
  endfunction

  task automatic try(logic [6:0] op, logic [2:0] f3, logic [6:0] f7);
    for (int s = 0; s < 32; s++) begin
      state = cu_state_t'(s); opcode = op; funct3 = f3; funct7 = f7;
      #1;
      checks++;
      if (int'(next_state) != ref_next(s, op, f3, f7)) begin
        failures++;
        $display("FAIL state %0d op %b f3 %b f7 %b: got %0d expected %0d",
                 s, op, f3, f7, next_state, ref_next(s, op, f3, f7));
      end
    end
  endtask

  initial begin
    // the 13 decoded encodings
    try(7'h33, 0, 7'h00); try(7'h33, 0, 7'h20); try(7'h33, 6, 7'h00); try(7'h33, 7, 7'h00);
    try(7'h13, 0, 7'h7F); try(7'h13, 1, 7'h00); try(7'h13, 5, 7'h01); try(7'h03, 2, 7'h00);
    try(7'h23, 2, 7'h55); try(7'h37, 3, 7'h12); try(7'h17, 7, 7'h00); try(7'h6F, 0, 7'h00);
    try(7'h63, 0, 7'h00);
    // near misses that must not decode
    try(7'h33, 0, 7'h01); try(7'h33, 6, 7'h20); try(7'h13, 5, 7'h20); try(7'h13, 1, 7'h02);
    try(7'h03, 0, 7'h00); try(7'h23, 1, 7'h00); try(7'h63, 1, 7'h00); try(7'h00, 0, 7'h00);
    // random words
    repeat (300) try(7'($urandom), 3'($urandom), 7'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
