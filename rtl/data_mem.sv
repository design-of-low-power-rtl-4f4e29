// data_mem: byte-organised data memory, 256 x 8 by default, word access.
//
// The address is the ALU result; a word occupies the four bytes starting
// there, little-endian, addresses wrapping modulo DEPTH.  On a rising edge
// of clk with Mwrite = 1 the word Write_Data (rs2) is stored; on a rising
// edge with Mread = 1 the addressed word is copied into the ReadData
// register.  The read is therefore synchronous: data read in the first load
// state (S4) is on ReadData during the second (S17), which is why lw has an
// extra cycle.  The clock of the memory is stopped by a clock gate while
// neither Mread nor Mwrite is set.  Byte order and the synchronous read
// register are this design's reading of the two-cycle load.
module data_mem
  import riscv_cu_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic            clk,
  input  logic            mread,
  input  logic            mwrite,
  input  logic [XLEN-1:0] address,
  input  logic [XLEN-1:0] write_data,
  output logic [XLEN-1:0] read_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic          gclk;
  logic [AW-1:0] a0;

  clock_gate u_cg (.clk(clk), .en(mread | mwrite), .gclk(gclk));

  assign a0 = address[AW-1:0];

  always_ff @(posedge gclk) begin
    if (mwrite) begin
      for (int b = 0; b < 4; b++)
        mem[a0 + AW'(b)] <= write_data[8*b +: 8];
    end
    if (mread)
      read_data <= {mem[a0 + AW'(3)], mem[a0 + AW'(2)], mem[a0 + AW'(1)], mem[a0]};
  end

endmodule
