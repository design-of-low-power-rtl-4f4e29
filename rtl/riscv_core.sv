// riscv_core: multi-cycle RV32I-subset processor core, control unit plus
// datapath.
//
// The control unit reads the opcode, funct3 and funct7 fields of the
// instruction register and the registered BrEq of the comparator, and
// drives the thirteen control lines of the datapath.  One instruction is
// executed at a time: FETCH, DECODE and one execute state, plus one more
// state for lw and beq, so 3 or 4 clock cycles per instruction.
//
// Ports: clk, rst (active high, asynchronous, returns the control unit to
// INIT and clears PC, IR, BrEq and the register file); a word-wide load
// port of the instruction memory, used while rst is high; and observation
// outputs: the PC, the instruction register, the control state and the
// 20-bit combined value of all control lines.
//
// Timing: the control state changes on the falling edge of clk, every
// datapath register loads on the rising edge through a clock gate.
module riscv_core
  import riscv_cu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load_we,
  input  logic [$clog2(IMEM_DEPTH)-3:0] load_addr,
  input  logic [XLEN-1:0]               load_data,
  output logic [XLEN-1:0]               pc,
  output logic [XLEN-1:0]               ir,
  output logic [4:0]                    state,
  output logic [CV_W-1:0]               cv
);

  ctrl_t      ctrl;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic       br_eq;
  logic [1:0] rf_sel;
  logic [3:0] alu_op;

  control_unit u_cu (
    .clk        (clk),
    .rst        (rst),
    .opcode     (opcode),
    .funct3     (funct3),
    .funct7     (funct7),
    .br_eq      (br_eq),
    .rf_wen_n   (ctrl.rf_wen_n),
    .imm_en_n   (ctrl.imm_en_n),
    .im_en_n    (ctrl.im_en_n),
    .mread      (ctrl.mread),
    .mwrite     (ctrl.mwrite),
    .ld_ir      (ctrl.ld_ir),
    .ld_pc      (ctrl.ld_pc),
    .pc_sel     (ctrl.pc_sel),
    .rf_sel     (rf_sel),
    .a_sel      (ctrl.a_sel),
    .b_sel      (ctrl.b_sel),
    .alu_op     (alu_op),
    .br_control (ctrl.br_control),
    .state      (state),
    .cv         (cv)
  );

  assign ctrl.rf_sel = wb_sel_t'(rf_sel);
  assign ctrl.alu_op = alu_op_t'(alu_op);

  riscv_datapath #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH)
  ) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .opcode    (opcode),
    .funct3    (funct3),
    .funct7    (funct7),
    .br_eq     (br_eq),
    .pc        (pc),
    .ir        (ir),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data)
  );

endmodule
