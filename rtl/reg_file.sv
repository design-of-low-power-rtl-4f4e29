// reg_file: 32 x 32-bit register file, two read ports and one write port.
//
// Reads are combinational: D1_Bus = x[Addr1], D2_Bus = x[Addr2].  The
// write port stores Data_in into x[AddrD] on the rising edge of clk while
// RFwEn (rf_wen_n) is 0; RFwEn is active low.  The clock of the whole array
// is stopped by a clock gate whenever no write is enabled.  x0 always reads
// zero and ignores writes, as RV32I requires.  rst (active high,
// asynchronous) clears all registers, a choice of this design.
module reg_file
  import riscv_cu_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     rf_wen_n,
  input  logic [$clog2(NREGS)-1:0] addr_d,
  input  logic [$clog2(NREGS)-1:0] addr1,
  input  logic [$clog2(NREGS)-1:0] addr2,
  input  logic [XLEN-1:0]          data_in,
  output logic [XLEN-1:0]          d1_bus,
  output logic [XLEN-1:0]          d2_bus
);

  logic            gclk;
  logic [XLEN-1:0] regs [NREGS];

  clock_gate u_cg (.clk(clk), .en(!rf_wen_n), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (addr_d != '0) begin
      regs[addr_d] <= data_in;
    end
  end

  assign d1_bus = (addr1 == '0) ? '0 : regs[addr1];
  assign d2_bus = (addr2 == '0) ? '0 : regs[addr2];

endmodule
