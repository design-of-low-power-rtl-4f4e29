// cu_control_signals: output decoder of the control unit.
//
// Maps the state to the thirteen control outputs, one row of the control
// table per state.  The rows are those of the original table, including
// its less obvious entries (JAL and the taken branch assert Mread; the
// branch compare and taken-branch states enable the register-file write),
// so that every state produces the original combined value (CV).  DECODE
// (S2) is "don't care" in the table; it drives the value 14000 (hex) that
// the original simulation traces show.
//
// S16 is the only state whose outputs depend on an input: BrEq = 0 gives
// the "branch not taken" row (PC <- PC + 4), BrEq = 1 the "taken" row
// (PC <- PC + offset).  CV is the 17 output bits, RFwEn in bit 16 down to
// Br_control in bit 0, zero-extended to 20 bits.
//
// Purely combinational.
module cu_control_signals
  import riscv_cu_pkg::*;
(
  input  cu_state_t        state,
  input  logic             br_eq,
  output ctrl_t            ctrl,
  output logic [CV_W-1:0]  cv
);

  // Row constructor in the column order of the control table.
  function automatic ctrl_t row(logic rfw, logic immw, logic imw, logic mrd,
                                logic mwr, logic ldir, logic ldpc, logic pcs,
                                wb_sel_t rfs, logic as, logic bs,
                                alu_op_t op, logic brc);
    ctrl_t c;
    c.rf_wen_n   = rfw;
    c.imm_en_n   = immw;
    c.im_en_n    = imw;
    c.mread      = mrd;
    c.mwrite     = mwr;
    c.ld_ir      = ldir;
    c.ld_pc      = ldpc;
    c.pc_sel     = pcs;
    c.rf_sel     = rfs;
    c.a_sel      = as;
    c.b_sel      = bs;
    c.alu_op     = op;
    c.br_control = brc;
    return c;
  endfunction

  always_comb begin
    unique case (state)
      //                  RFw IMMw IMw Mrd Mwr LdIR LdPC PCs RFSel   A  B  ALUOp      Br
      S_INIT:   ctrl = row(1, 1,   1,  0,  0,  0,   0,   0,  WB_ALU, 1, 0, ALU_IDLE,  0);
      S_FETCH:  ctrl = row(1, 1,   0,  0,  0,  1,   0,   0,  WB_ALU, 1, 0, ALU_IDLE,  0);
      S_DECODE: ctrl = row(1, 0,   1,  0,  0,  0,   0,   0,  WB_PC4, 0, 0, ALU_ADD,   0);
      S_SW:     ctrl = row(1, 0,   0,  0,  1,  1,   1,   0,  WB_MEM, 1, 1, ALU_ADD,   0);
      S_LW:     ctrl = row(0, 0,   0,  1,  0,  0,   0,   0,  WB_MEM, 1, 1, ALU_ADD,   0);
      S_ADD:    ctrl = row(0, 1,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 0, ALU_ADD,   0);
      S_SUB:    ctrl = row(0, 1,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 0, ALU_SUB,   0);
      S_OR:     ctrl = row(0, 1,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 0, ALU_OR,    0);
      S_AND:    ctrl = row(0, 1,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 0, ALU_AND,   0);
      S_ADDI:   ctrl = row(0, 0,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 1, ALU_ADD,   0);
      S_SLLI:   ctrl = row(0, 0,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 1, ALU_SLL,   0);
      S_SRLI:   ctrl = row(0, 0,   0,  0,  0,  1,   1,   0,  WB_ALU, 1, 1, ALU_SRL,   0);
      S_LUI:    ctrl = row(0, 0,   0,  0,  0,  1,   1,   0,  WB_ALU, 0, 1, ALU_PASSB, 0);
      S_AUIPC:  ctrl = row(0, 0,   0,  0,  0,  1,   1,   0,  WB_ALU, 0, 1, ALU_ADD,   0);
      S_JAL:    ctrl = row(0, 0,   0,  1,  0,  1,   1,   1,  WB_PC4, 0, 1, ALU_ADD,   0);
      S_BEQ_CK: ctrl = row(0, 0,   0,  0,  0,  0,   0,   0,  WB_ALU, 1, 0, ALU_ADD,   1);
      S_BEQ_EX: ctrl = br_eq
                     ? row(0, 0,   0,  1,  0,  1,   1,   1,  WB_PC4, 0, 1, ALU_ADD,   1)
                     : row(1, 1,   1,  0,  0,  1,   1,   0,  WB_ALU, 1, 0, ALU_ADD,   0);
      S_LW_NOP: ctrl = row(0, 0,   0,  1,  0,  1,   1,   0,  WB_MEM, 1, 1, ALU_ADD,   0);
      // Unused codes 18..31: everything idle, as in INIT.
      default:  ctrl = row(1, 1,   1,  0,  0,  0,   0,   0,  WB_ALU, 1, 0, ALU_IDLE,  0);
    endcase
  end

  assign cv = ctrl_to_cv(ctrl);

endmodule
