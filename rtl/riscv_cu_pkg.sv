// riscv_cu_pkg: types and constants shared by the control unit and the
// datapath of the multi-cycle RV32I-subset core.
//
// The control unit walks one instruction at a time through FETCH (S1),
// DECODE (S2) and one execute state per instruction (S3..S17).  Its state
// is a plain binary number, state Sn has the code n, as the state traces of
// the original design show.  The thirteen control outputs are bundled in
// ctrl_t; packed in the field order below (RFwEn first, Br_control last) and
// zero-extended to 20 bits they form the "combined value" (CV) that the
// original control table lists for every state.
//
// The 4-bit ALU operation codes 0000..0110 are those of the control table.
// Code 1000 is what the table drives in INIT and FETCH, where no ALU result
// is consumed; the ALU treats it (and every other unlisted code) as "output
// zero", which is this design's own choice.
package riscv_cu_pkg;

  localparam int unsigned XLEN = 32;

  // ---- RV32I opcodes of the 13 decoded instructions -----------------------
  localparam logic [6:0] OP_RTYPE = 7'b0110011;  // add, sub, or, and
  localparam logic [6:0] OP_ITYPE = 7'b0010011;  // addi, slli, srli
  localparam logic [6:0] OP_LOAD  = 7'b0000011;  // lw
  localparam logic [6:0] OP_STORE = 7'b0100011;  // sw
  localparam logic [6:0] OP_LUI   = 7'b0110111;
  localparam logic [6:0] OP_AUIPC = 7'b0010111;
  localparam logic [6:0] OP_JAL   = 7'b1101111;
  localparam logic [6:0] OP_BRANCH= 7'b1100011;  // beq

  localparam logic [2:0] F3_ADD  = 3'b000;
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_WORD = 3'b010;
  localparam logic [2:0] F3_SRL  = 3'b101;
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;
  localparam logic [2:0] F3_BEQ  = 3'b000;

  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_SUB  = 7'b0100000;

  // ---- control unit states --------------------------------------------------
  typedef enum logic [4:0] {
    S_INIT   = 5'd0,   // PC <- 0
    S_FETCH  = 5'd1,   // IR <- IM[PC]
    S_DECODE = 5'd2,
    S_SW     = 5'd3,
    S_LW     = 5'd4,
    S_ADD    = 5'd5,
    S_SUB    = 5'd6,
    S_OR     = 5'd7,
    S_AND    = 5'd8,
    S_ADDI   = 5'd9,
    S_SLLI   = 5'd10,
    S_SRLI   = 5'd11,
    S_LUI    = 5'd12,
    S_AUIPC  = 5'd13,
    S_JAL    = 5'd14,
    S_BEQ_CK = 5'd15,  // compare rs1 and rs2
    S_BEQ_EX = 5'd16,  // branch taken or not, chosen by BrEq
    S_LW_NOP = 5'd17   // second load cycle, write back the read data
  } cu_state_t;

  // ---- ALU operations ---------------------------------------------------------
  typedef enum logic [3:0] {
    ALU_ADD  = 4'b0000,
    ALU_SUB  = 4'b0001,
    ALU_OR   = 4'b0010,
    ALU_AND  = 4'b0011,
    ALU_SLL  = 4'b0100,
    ALU_SRL  = 4'b0101,
    ALU_PASSB= 4'b0110,
    ALU_IDLE = 4'b1000
  } alu_op_t;

  // ---- register-file write-back source (RFSel) --------------------------------
  typedef enum logic [1:0] {
    WB_PC4  = 2'b00,   // PC + 4 (jal)
    WB_ALU  = 2'b01,   // ALU result
    WB_MEM  = 2'b10    // data memory read data
  } wb_sel_t;

  // ---- the thirteen control outputs -------------------------------------------
  // RFwEn, IMMwEn and IMwEn are active low (0 = enabled); all others are
  // active high.  ASel: 1 = rs1, 0 = PC.  BSel: 1 = immediate, 0 = rs2.
  // PCSel: 0 = PC + 4, 1 = ALU result.
  typedef struct packed {
    logic    rf_wen_n;   // RFwEn
    logic    imm_en_n;   // IMMwEn
    logic    im_en_n;    // IMwEn
    logic    mread;      // Mread
    logic    mwrite;     // Mwrite
    logic    ld_ir;      // LdIR
    logic    ld_pc;      // LdPC
    logic    pc_sel;     // PCSel
    wb_sel_t rf_sel;     // RFSel
    logic    a_sel;      // ASel
    logic    b_sel;      // BSel
    alu_op_t alu_op;     // ALUOp_Sel
    logic    br_control; // Br_control
  } ctrl_t;

  localparam int unsigned CV_W = 20;

  function automatic logic [CV_W-1:0] ctrl_to_cv(ctrl_t c);
    return CV_W'(c);
  endfunction

endpackage
