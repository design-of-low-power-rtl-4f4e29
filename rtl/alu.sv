// alu: 32-bit ALU of the datapath.
//
// Operations, selected by ALUOp_Sel with the codes of the control table:
//   0000 add  (add, addi, lw/sw address, auipc, jal/beq target)
//   0001 sub
//   0010 or
//   0011 and
//   0100 sll  by b[4:0] (slli)
//   0101 srl  by b[4:0] (srli)
//   0110 pass b (lui)
// Any other code (the table drives 1000 in INIT and FETCH) gives zero, a
// choice of this design.  Combinational.
module alu
  import riscv_cu_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [3:0]      op,
  output logic [XLEN-1:0] y
);

  always_comb begin
    unique case (alu_op_t'(op))
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end

endmodule
