// control_unit: low-power control unit of the multi-cycle RV32I-subset core.
//
// A Moore-style FSM of the classic three parts: next-state logic, a 5-bit
// state register clocked on the falling edge, and an output decoder.  It
// decodes 13 RV32I instructions (add, sub, and, or, addi, slli, srli, lw,
// sw, lui, auipc, jal, beq) from the opcode, funct3 and funct7 fields and
// sequences each through FETCH (S1), DECODE (S2) and its execute state(s):
//
//   S0 INIT -> S1 FETCH -> S2 DECODE -> S3..S15 -> S1 ...
//   lw : S4 -> S17 (extra cycle for the data memory read)
//   beq: S15 (compare) -> S16 (BrEq selects taken / not taken)
//
// So R-, I-, S-, U- and J-type instructions take 3 cycles, lw and beq 4.
// The 13 control outputs follow the original control table bit for bit;
// `state` and the 20-bit combined value `cv` (all outputs packed, RFwEn in
// bit 16) are brought out as observation ports, as the original port count
// of 62 implies.  RFwEn, IMMwEn and IMwEn are active low.
//
// Timing: state changes on the falling edge of clk; all outputs are
// combinational from state (and from br_eq in S16), so they are stable for
// the following rising edge, on which the datapath registers load.
module control_unit
  import riscv_cu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [6:0]      opcode,
  input  logic [2:0]      funct3,
  input  logic [6:0]      funct7,
  input  logic            br_eq,
  // the 13 control outputs
  output logic            rf_wen_n,
  output logic            imm_en_n,
  output logic            im_en_n,
  output logic            mread,
  output logic            mwrite,
  output logic            ld_ir,
  output logic            ld_pc,
  output logic            pc_sel,
  output logic [1:0]      rf_sel,
  output logic            a_sel,
  output logic            b_sel,
  output logic [3:0]      alu_op,
  output logic            br_control,
  // observation
  output logic [4:0]      state,
  output logic [CV_W-1:0] cv
);

  cu_state_t state_q, state_d;
  ctrl_t     ctrl;

  cu_next_state u_next (
    .state      (state_q),
    .opcode     (opcode),
    .funct3     (funct3),
    .funct7     (funct7),
    .next_state (state_d)
  );

  cu_state_reg u_sreg (
    .clk        (clk),
    .rst        (rst),
    .next_state (state_d),
    .state      (state_q)
  );

  cu_control_signals u_out (
    .state (state_q),
    .br_eq (br_eq),
    .ctrl  (ctrl),
    .cv    (cv)
  );

  assign rf_wen_n   = ctrl.rf_wen_n;
  assign imm_en_n   = ctrl.imm_en_n;
  assign im_en_n    = ctrl.im_en_n;
  assign mread      = ctrl.mread;
  assign mwrite     = ctrl.mwrite;
  assign ld_ir      = ctrl.ld_ir;
  assign ld_pc      = ctrl.ld_pc;
  assign pc_sel     = ctrl.pc_sel;
  assign rf_sel     = ctrl.rf_sel;
  assign a_sel      = ctrl.a_sel;
  assign b_sel      = ctrl.b_sel;
  assign alu_op     = ctrl.alu_op;
  assign br_control = ctrl.br_control;
  assign state      = state_q;

endmodule
