// tb_riscv_datapath: test of the datapath without the control unit.
//
// The testbench plays the part of the control unit from the control table
// alone: it decodes each instruction itself, looks up the state sequence
// (FETCH, DECODE, execute states) and applies, state by state after each
// falling edge, the table's 20-bit combined value unpacked into the control
// lines; in S16 it picks the taken or not-taken row from the datapath's
// BrEq output.  After every instruction the register file and PC are
// compared with an instruction-level reference model, and the data memory
// at the end.  The program uses all 13 instructions.
module tb_riscv_datapath;
  import riscv_cu_pkg::*;
  logic        clk = 1'b0, rst = 1'b0;
  ctrl_t       ctrl;
  logic [6:0]  opcode, funct7;
  logic [2:0]  funct3;
  logic        br_eq;
  logic [31:0] pc, ir;
  logic        load_we = 1'b0;
  logic [5:0]  load_addr = '0;
  logic [31:0] load_data = '0;
  int checks = 0, failures = 0;

  riscv_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // ---------------- assembler ------------------------------------------------
  function automatic logic [31:0] r_t(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3, int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, logic [2:0] f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] ADD (int rd, int a, int b); return r_t(7'h00, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return r_t(7'h20, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] OR_ (int rd, int a, int b); return r_t(7'h00, b, a, 3'd6, rd); endfunction
  function automatic logic [31:0] AND_(int rd, int a, int b); return r_t(7'h00, b, a, 3'd7, rd); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int imm); return i_t(imm, a, 3'd0, rd, 7'h13); endfunction
  function automatic logic [31:0] SLLI(int rd, int a, int sh); return i_t(sh & 31, a, 3'd1, rd, 7'h13); endfunction
  function automatic logic [31:0] SRLI(int rd, int a, int sh); return i_t(sh & 31, a, 3'd5, rd, 7'h13); endfunction
  function automatic logic [31:0] LW  (int rd, int off, int a); return i_t(off, a, 3'd2, rd, 7'h03); endfunction
  function automatic logic [31:0] SW  (int rs2, int off, int a);
    logic [11:0] o = 12'(off);
    return {o[11:5], 5'(rs2), 5'(a), 3'd2, o[4:0], 7'h23};
  endfunction
  function automatic logic [31:0] LUI  (int rd, int imm20); return {20'(imm20), 5'(rd), 7'h37}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return {20'(imm20), 5'(rd), 7'h17}; endfunction
  function automatic logic [31:0] JAL(int rd, int off);
    logic [20:0] o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], 5'(rd), 7'h6F};
  endfunction
  function automatic logic [31:0] BEQ(int a, int b, int off);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], 5'(b), 5'(a), 3'd0, o[4:1], o[11], 7'h63};
  endfunction

  // ---------------- reference model -------------------------------------------
  logic [31:0] prog [64];
  logic [31:0] m_x [32];
  logic [31:0] m_pc;
  logic [7:0]  m_mem [256];

  function automatic logic [31:0] sext12(logic [11:0] v); return {{20{v[11]}}, v}; endfunction

  function automatic logic [31:0] m_load(logic [31:0] a);
    logic [7:0] b = a[7:0];
    return {m_mem[8'(b+3)], m_mem[8'(b+2)], m_mem[8'(b+1)], m_mem[b]};
  endfunction

  // Executes the instruction at m_pc; returns its cycle count, 0 if undecoded.
  function automatic int m_step();
    logic [31:0] w = prog[m_pc[7:2]];
    logic [6:0] op = w[6:0], f7 = w[31:25];
    logic [2:0] f3 = w[14:12];
    int rd = int'(w[11:7]), rs1 = int'(w[19:15]), rs2 = int'(w[24:20]);
    logic [31:0] a = m_x[rs1], b = m_x[rs2], res, ea;
    logic [31:0] ii = sext12(w[31:20]);
    logic [31:0] si = sext12({w[31:25], w[11:7]});
    logic [31:0] bi = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
    logic [31:0] ji = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
    logic [31:0] ui = {w[31:12], 12'b0};
    int cyc = 3;
    logic wr = 1'b1;
    logic [31:0] npc = m_pc + 4;
    if (op == 7'h33 && f3 == 0 && f7 == 0)          res = a + b;
    else if (op == 7'h33 && f3 == 0 && f7 == 7'h20) res = a - b;
    else if (op == 7'h33 && f3 == 6 && f7 == 0)     res = a | b;
    else if (op == 7'h33 && f3 == 7 && f7 == 0)     res = a & b;
    else if (op == 7'h13 && f3 == 0)                res = a + ii;
    else if (op == 7'h13 && f3 == 1 && f7[6:1] == 0) res = a << w[24:20];
    else if (op == 7'h13 && f3 == 5 && f7[6:1] == 0) res = a >> w[24:20];
    else if (op == 7'h03 && f3 == 2) begin res = m_load(a + ii); cyc = 4; end
    else if (op == 7'h23 && f3 == 2) begin
      ea = a + si; wr = 1'b0;
      for (int k = 0; k < 4; k++) m_mem[8'(ea[7:0] + 8'(k))] = b[8*k +: 8];
    end
    else if (op == 7'h37) res = ui;
    else if (op == 7'h17) res = m_pc + ui;
    else if (op == 7'h6F) begin res = m_pc + 4; npc = m_pc + ji; end
    else if (op == 7'h63 && f3 == 0) begin
      cyc = 4;
      // compare state: x[bits 11:7] <- rs1 + rs2
      if (rd != 0) m_x[rd] = a + b;
      if (a == b) begin res = m_pc + 4; npc = m_pc + bi; end
      else wr = 1'b0;
    end
    else return 0;
    if (wr && rd != 0) m_x[rd] = res;
    m_pc = npc;
    return cyc;
  endfunction

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

  // state sequence of one instruction word, from its encoding
  function automatic void seq_of(logic [31:0] w, ref int q[$]);
    logic [6:0] op = w[6:0], f7 = w[31:25];
    logic [2:0] f3 = w[14:12];
    q = {1, 2};
    if (op == 7'h33 && f3 == 0 && f7 == 0) q.push_back(5);
    else if (op == 7'h33 && f3 == 0 && f7 == 7'h20) q.push_back(6);
    else if (op == 7'h33 && f3 == 6) q.push_back(7);
    else if (op == 7'h33 && f3 == 7) q.push_back(8);
    else if (op == 7'h13 && f3 == 0) q.push_back(9);
    else if (op == 7'h13 && f3 == 1) q.push_back(10);
    else if (op == 7'h13 && f3 == 5) q.push_back(11);
    else if (op == 7'h03) begin q.push_back(4); q.push_back(17); end
    else if (op == 7'h23) q.push_back(3);
    else if (op == 7'h37) q.push_back(12);
    else if (op == 7'h17) q.push_back(13);
    else if (op == 7'h6F) q.push_back(14);
    else if (op == 7'h63) begin q.push_back(15); q.push_back(16); end
  endfunction

  initial begin
    int n, q[$];
    n = 0;
    prog[n++] = ADDI (1, 0, 100);
    prog[n++] = ADDI (2, 0, -7);
    prog[n++] = ADD  (3, 1, 2);
    prog[n++] = SUB  (4, 1, 2);
    prog[n++] = OR_  (5, 1, 2);
    prog[n++] = AND_ (6, 1, 2);
    prog[n++] = SLLI (7, 1, 5);
    prog[n++] = SRLI (8, 2, 3);
    prog[n++] = LUI  (9, 20'hABCDE);
    prog[n++] = AUIPC(10, 20'h12345);
    prog[n++] = SW   (9, 32, 0);
    prog[n++] = LW   (11, 32, 0);
    prog[n++] = BEQ  (11, 9, 32);       // taken
    for (int i = 0; i < 7; i++) prog[n++] = ADDI(12, 12, 1);
    prog[n++] = BEQ  (11, 3, 32);       // not taken
    prog[n++] = JAL  (13, 8);
    prog[n++] = ADDI (14, 0, 99);
    prog[n++] = BEQ  (5, 5, 8);         // taken, side writes into x4
    prog[n++] = ADDI (15, 0, 1);
    prog[n++] = SW   (15, -4, 7);
    for (int i = n; i < 64; i++) prog[i] = 0;

    ctrl = ctrl_t'(17'(exp_cv(0, 1'b0)));
    #1 rst = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); load_we = 1'b1; load_addr = 6'(i); load_data = prog[i];
    end
    @(negedge clk) load_we = 1'b0;
    foreach (m_x[i]) m_x[i] = 0;
    for (int i = 0; i < 256; i++) m_mem[i] = dut.u_dmem.mem[i];
    m_pc = 0;
    @(negedge clk) rst = 1'b0;
    check("reset pc", pc, 0);
    while (prog[m_pc[7:2]] != 0) begin
      seq_of(prog[m_pc[7:2]], q);
      foreach (q[i]) begin
        @(negedge clk);
        ctrl = ctrl_t'(17'(exp_cv(q[i], br_eq)));
        if (q[i] == 2) begin
          check("IR holds the instruction", ir, prog[m_pc[7:2]]);
          check("opcode field", 32'(opcode), 32'(prog[m_pc[7:2]][6:0]));
          check("funct3 field", 32'(funct3), 32'(prog[m_pc[7:2]][14:12]));
          check("funct7 field", 32'(funct7), 32'(prog[m_pc[7:2]][31:25]));
        end
      end
      @(negedge clk);
      ctrl = ctrl_t'(17'(exp_cv(1, 1'b0)));
      void'(m_step());
      #1;
      check("pc", pc, m_pc);
      for (int r = 1; r < 32; r++) check("register", dut.u_rf.regs[r], m_x[r]);
      @(posedge clk);   // spend the FETCH cycle's edge before the next sequence
    end
    for (int i = 0; i < 256; i++) check("data memory", 32'(dut.u_dmem.mem[i]), 32'(m_mem[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
