// branch_comp: equality comparator for beq.
//
// Compares D1_Bus (rs1) with D2_Bus (rs2).  The result BrEq is registered:
// it is captured on the rising edge of clk while Br_control is 1, that is in
// the middle of the compare state S15, and held for the following state S16,
// whose outputs it selects (taken / not taken).  Registering it is this
// design's reading of the Br_control input: a purely combinational BrEq
// gated by Br_control would form a loop through the S16 output decoder,
// because Br_control itself differs between the two S16 rows.  The register
// is clock-gated by Br_control.  rst (active high, asynchronous) clears it.
module branch_comp
  import riscv_cu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            br_control,
  input  logic [XLEN-1:0] d1_bus,
  input  logic [XLEN-1:0] d2_bus,
  output logic            br_eq
);

  logic gclk;

  clock_gate u_cg (.clk(clk), .en(br_control), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) br_eq <= 1'b0;
    else     br_eq <= (d1_bus == d2_bus);
  end

endmodule
