// program_counter: PC register with its +4 adder and next-PC multiplexer.
//
// pc_plus4 = pc + 4 is always available (it is also the jal / taken-branch
// link value).  PCSel picks the next PC: 0 = pc + 4, 1 = the ALU result
// (pc + immediate for jal and a taken beq).  The register loads on the
// rising edge of clk when ld_pc (LdPC) is 1; its clock is stopped by a
// clock gate otherwise.  rst (active high, asynchronous) clears PC to 0,
// which is the INIT action "PC <- 0"; that the clearing is done by the reset
// rather than by a load in INIT is this design's own choice, since the INIT
// state does not assert LdPC.
module program_counter
  import riscv_cu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ld_pc,
  input  logic            pc_sel,
  input  logic [XLEN-1:0] alu_out,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pc_plus4
);

  logic            gclk;
  logic [XLEN-1:0] pc_next;

  clock_gate u_cg (.clk(clk), .en(ld_pc), .gclk(gclk));

  assign pc_plus4 = pc + XLEN'(4);
  assign pc_next  = pc_sel ? alu_out : pc_plus4;

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

endmodule
