// instr_reg: the instruction register IR.
//
// Loads the instruction bus on the rising edge of clk while LdIR (ld_ir)
// is 1; otherwise its clock is stopped by a clock gate.  Its fields feed the
// control unit (opcode, funct3, funct7), the register file addresses and
// the immediate generator.  rst (active high, asynchronous) clears it, a
// choice of this design so that DECODE never sees an uninitialised word.
module instr_reg
  import riscv_cu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ld_ir,
  input  logic [XLEN-1:0] instr_in,
  output logic [XLEN-1:0] ir
);

  logic gclk;

  clock_gate u_cg (.clk(clk), .en(ld_ir), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) ir <= '0;
    else     ir <= instr_in;
  end

endmodule
