// riscv_datapath: the datapath unit the control unit drives.
//
// A single-issue, multi-cycle datapath: PC with +4 adder and PCSel mux,
// instruction memory (256 x 8), instruction register, 32 x 32 register
// file, immediate generator, beq comparator, operand multiplexers A and B,
// ALU, data memory (256 x 8) and the four-input write-back multiplexer.
//
//   operand A : ASel = 1 -> rs1 (D1_Bus),  0 -> PC
//   operand B : BSel = 1 -> immediate,     0 -> rs2 (D2_Bus)
//   write-back: RFSel = 00 -> PC + 4, 01 -> ALU result, 10 -> ReadData,
//               11 -> unused (zero)
//   next PC   : PCSel = 0 -> PC + 4,       1 -> ALU result
//
// The block structure, the mux input numbering and the memory sizes follow
// the original datapath diagram; the widths of the buses between them are
// 32 bits as printed there.  The memory address is the ALU result and the
// store data is rs2.  Every register (PC, IR, register file, data memory,
// BrEq) sits behind its own clock gate, enabled by the control output that
// loads it, so that a register that is not being loaded sees no clock.
//
// All registers load on the rising edge of clk; the control inputs change
// after the falling edge (see control_unit).  The instruction memory load
// port fills the program before reset is released.
module riscv_datapath
  import riscv_cu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  input  ctrl_t                         ctrl,
  // instruction fields and branch result for the control unit
  output logic [6:0]                    opcode,
  output logic [2:0]                    funct3,
  output logic [6:0]                    funct7,
  output logic                          br_eq,
  // observation
  output logic [XLEN-1:0]               pc,
  output logic [XLEN-1:0]               ir,
  // program load port of the instruction memory
  input  logic                          load_we,
  input  logic [$clog2(IMEM_DEPTH)-3:0] load_addr,
  input  logic [XLEN-1:0]               load_data
);

  logic [XLEN-1:0] pc_plus4, instr, imm, d1, d2, op_a, op_b, alu_y;
  logic [XLEN-1:0] read_data, wb_data;

  program_counter u_pc (
    .clk      (clk),
    .rst      (rst),
    .ld_pc    (ctrl.ld_pc),
    .pc_sel   (ctrl.pc_sel),
    .alu_out  (alu_y),
    .pc       (pc),
    .pc_plus4 (pc_plus4)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk       (clk),
    .im_en_n   (ctrl.im_en_n),
    .pc        (pc),
    .instr     (instr),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data)
  );

  instr_reg u_ir (
    .clk      (clk),
    .rst      (rst),
    .ld_ir    (ctrl.ld_ir),
    .instr_in (instr),
    .ir       (ir)
  );

  reg_file u_rf (
    .clk      (clk),
    .rst      (rst),
    .rf_wen_n (ctrl.rf_wen_n),
    .addr_d   (ir[11:7]),
    .addr1    (ir[19:15]),
    .addr2    (ir[24:20]),
    .data_in  (wb_data),
    .d1_bus   (d1),
    .d2_bus   (d2)
  );

  imm_gen u_imm (
    .imm_en_n (ctrl.imm_en_n),
    .ir       (ir),
    .imm      (imm)
  );

  branch_comp u_brc (
    .clk        (clk),
    .rst        (rst),
    .br_control (ctrl.br_control),
    .d1_bus     (d1),
    .d2_bus     (d2),
    .br_eq      (br_eq)
  );

  assign op_a = ctrl.a_sel ? d1  : pc;
  assign op_b = ctrl.b_sel ? imm : d2;

  alu u_alu (
    .a  (op_a),
    .b  (op_b),
    .op (ctrl.alu_op),
    .y  (alu_y)
  );

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk        (clk),
    .mread      (ctrl.mread),
    .mwrite     (ctrl.mwrite),
    .address    (alu_y),
    .write_data (d2),
    .read_data  (read_data)
  );

  always_comb begin
    unique case (ctrl.rf_sel)
      WB_PC4:  wb_data = pc_plus4;
      WB_ALU:  wb_data = alu_y;
      WB_MEM:  wb_data = read_data;
      default: wb_data = '0;
    endcase
  end

  assign opcode = ir[6:0];
  assign funct3 = ir[14:12];
  assign funct7 = ir[31:25];

endmodule
