// tb_riscv_core: end-to-end test of the core at its default sizes.
//
// Programs are assembled here, written through the instruction memory load
// port during reset, and run to completion.  An instruction-level reference
// model in the testbench executes the same program; each time the control
// unit comes back to FETCH, one instruction has retired and the whole
// register file and PC are compared with the model, and the number of
// cycles the instruction took is checked (3, or 4 for lw and beq).  The
// combined control value is checked against the control table in every
// cycle, and the data memory is compared with the model at the end.
//
// The reference model follows the control table, including the side
// effects of its branch rows: in the compare state the register named by
// instruction bits 11:7 receives rs1 + rs2, and a taken branch then writes
// PC + 4 there.  Branches with those bits zero (offsets whose bits 4:1 and
// 11 are zero) have no such effect.
//
// Programs: (1) the five instructions of the original simulation traces
// (ADD x1,x2,x3; LW x2,4(x1); SW x3,20(x2); JAL x18,4; BEQ x19,x20,8) and a
// directed program using all 13 instructions, with beq both taken and not
// taken; (2) random programs of the 13 instructions.  Each program ends in
// an all-zero word, which the control unit does not decode, so the core
// spins on it with an unchanged PC.
//
// Mechanisms counted, each must occur: every state S0..S17, beq taken,
// beq not taken, the extra load cycle, the halt on an undecoded word, and
// clock gating of the PC, IR, register file and data memory (cycles in
// which their load enable is off).
module tb_riscv_core;
  logic        clk = 1'b0, rst = 1'b0;
  logic        load_we = 1'b0;
  logic [5:0]  load_addr = '0;
  logic [31:0] load_data = '0;
  logic [31:0] pc, ir;
  logic [4:0]  state;
  logic [19:0] cv;
  int checks = 0, failures = 0;

  riscv_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // ---------------- mechanism counters ---------------------------------------
  int state_seen [18];
  int n_taken = 0, n_not_taken = 0, n_halt = 0;
  int gated_pc = 0, gated_ir = 0, gated_rf = 0, gated_dm = 0, n_cycles = 0;
  logic [31:0] retired = 0;

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

  // Loads prog[0..n-1] (rest zero), resets, runs until the halt word is
  // re-fetched, comparing with the model at every retirement.
  task automatic run_program(string name, int n);
    int cyc, exp_cyc, prev_state;
    logic [31:0] w;
    rst = 1'b0;
    @(negedge clk) rst = 1'b1;
    for (int i = 0; i < 64; i++) begin
      if (i >= n) prog[i] = 32'h0;
      load_we = 1'b1; load_addr = 6'(i); load_data = prog[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    foreach (m_x[i]) m_x[i] = 0;
    for (int i = 0; i < 256; i++) m_mem[i] = dut.u_dp.u_dmem.mem[i];
    m_pc = 0;
    #1 check({name, ": reset state"}, 32'(state), 0);
    check({name, ": reset pc"}, pc, 0);
    @(posedge clk); #1 rst = 1'b0;
    // INIT lasts until the next falling edge
    @(negedge clk); #1 check({name, ": INIT -> FETCH"}, 32'(state), 1);
    state_seen[0]++;
    cyc = 0;
    forever begin
      // now just after a falling edge: one control state begins
      if (state <= 17) state_seen[state]++;
      check({name, ": CV"}, 32'(cv), 32'(exp_cv(int'(state), dut.br_eq)));
      if (state == 16) begin
        if (dut.br_eq) n_taken++; else n_not_taken++;
      end
      n_cycles++;
      if (!dut.ctrl.ld_pc) gated_pc++;
      if (!dut.ctrl.ld_ir) gated_ir++;
      if (dut.ctrl.rf_wen_n) gated_rf++;
      if (!dut.ctrl.mread && !dut.ctrl.mwrite) gated_dm++;
      prev_state = int'(state);
      @(negedge clk); #1;
      cyc++;
      if (state == 1 && prev_state != 0) begin
        // an instruction has finished (or DECODE found nothing to do)
        w = prog[m_pc[7:2]];
        exp_cyc = m_step();
        if (exp_cyc == 0) begin
          check({name, ": halt keeps PC"}, pc, m_pc);
          check({name, ": halt takes 2 cycles"}, 32'(cyc), 2);
          n_halt++;
          break;
        end
        retired++;
        check({name, ": cycles per instruction"}, 32'(cyc), 32'(exp_cyc));
        check({name, ": pc"}, pc, m_pc);
        for (int r = 0; r < 32; r++)
          check({name, ": register"}, (r == 0) ? 32'h0 : dut.u_dp.u_rf.regs[r], m_x[r]);
        cyc = 0;
      end
    end
    for (int i = 0; i < 256; i++) check({name, ": data memory"}, 32'(dut.u_dp.u_dmem.mem[i]), 32'(m_mem[i]));
  endtask

  initial begin
    int n, k, rd, a, b, kind;
    foreach (state_seen[i]) state_seen[i] = 0;

    // (1a) the instructions of the original traces, with set-up
    n = 0;
    prog[n++] = ADDI(2, 0, 40);
    prog[n++] = ADDI(3, 0, 12);
    prog[n++] = ADD (1, 2, 3);        // ADD x1, x2, x3
    prog[n++] = LW  (2, 4, 1);        // LW x2, #4(x1)
    prog[n++] = SW  (3, 20, 2);       // SW x3, #20(x2)
    prog[n++] = JAL (18, 4);          // JAL x18, #4
    prog[n++] = BEQ (19, 20, 8);      // BEQ x19, x20, #8 (both zero: taken)
    prog[n++] = ADDI(5, 0, 1);        // skipped
    prog[n++] = ADDI(6, 0, 2);
    run_program("trace instructions", n);

    // (1b) all 13 instructions, beq taken and not taken
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
    prog[n++] = LW   (1, -68, 1);       // rs1 == rd, address 32
    prog[n++] = BEQ  (11, 9, 32);       // taken, no side write (offset bits 4:1, 11 zero)
    for (int i = 0; i < 7; i++) prog[n++] = ADDI(12, 12, 1);   // skipped
    prog[n++] = BEQ  (11, 3, 32);       // not taken
    prog[n++] = JAL  (13, 8);
    prog[n++] = ADDI (14, 0, 99);       // skipped
    prog[n++] = BEQ  (3, 4, 12);        // not taken, writes x3 + x4 into x6
    prog[n++] = BEQ  (5, 5, 8);         // taken, side writes into x4
    prog[n++] = ADDI (15, 0, 1);        // skipped
    prog[n++] = ADDI (16, 0, 2);
    run_program("all instructions", n);

    // (2) random programs
    for (int p = 0; p < 12; p++) begin
      n = 0;
      for (int r = 1; r < 8; r++) prog[n++] = ADDI(r, 0, int'($urandom_range(0, 4095)) - 2048);
      while (n < 60) begin
        rd = $urandom_range(1, 10); a = $urandom_range(0, 10); b = $urandom_range(0, 10);
        kind = $urandom_range(0, 13);
        case (kind)
          0: prog[n++] = ADD(rd, a, b);
          1: prog[n++] = SUB(rd, a, b);
          2: prog[n++] = OR_(rd, a, b);
          3: prog[n++] = AND_(rd, a, b);
          4: prog[n++] = ADDI(rd, a, int'($urandom_range(0, 4095)) - 2048);
          5: prog[n++] = SLLI(rd, a, $urandom_range(0, 31));
          6: prog[n++] = SRLI(rd, a, $urandom_range(0, 31));
          7: prog[n++] = LW(rd, int'($urandom_range(0, 4095)) - 2048, a);
          8: prog[n++] = SW(b, int'($urandom_range(0, 4095)) - 2048, a);
          9: prog[n++] = LUI(rd, $urandom);
          10: prog[n++] = AUIPC(rd, $urandom);
          11: prog[n++] = JAL(rd, 4 * $urandom_range(1, 2));
          default: begin
            k = $urandom_range(1, 2);
            prog[n++] = BEQ(a, ($urandom_range(0, 1) == 1) ? a : b, 4 * k);
          end
        endcase
      end
      run_program($sformatf("random %0d", p), n);
    end

    // ---------------- mechanism report ---------------------------------------
    for (int s = 0; s < 18; s++) begin
      checks++;
      if (state_seen[s] == 0) begin failures++; $display("FAIL state S%0d never entered", s); end
    end
    checks += 7;
    if (n_taken == 0)     begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0) begin failures++; $display("FAIL no branch not taken"); end
    if (n_halt == 0)      begin failures++; $display("FAIL no halt"); end
    if (gated_pc == 0)    begin failures++; $display("FAIL PC clock never gated"); end
    if (gated_ir == 0)    begin failures++; $display("FAIL IR clock never gated"); end
    if (gated_rf == 0)    begin failures++; $display("FAIL RF clock never gated"); end
    if (gated_dm == 0)    begin failures++; $display("FAIL DM clock never gated"); end
    $display("retired %0d instructions in %0d cycles; beq taken %0d, not taken %0d, lw extra cycles %0d, halts %0d",
             retired, n_cycles, n_taken, n_not_taken, state_seen[17], n_halt);
    $display("clock gated cycles: PC %0d, IR %0d, register file %0d, data memory %0d",
             gated_pc, gated_ir, gated_rf, gated_dm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
