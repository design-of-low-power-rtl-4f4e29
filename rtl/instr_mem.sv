// instr_mem: byte-organised instruction memory, 256 x 8 by default.
//
// A 32-bit instruction is read little-endian from the four bytes starting
// at the PC (addresses wrap modulo DEPTH), combinationally, so the
// instruction register can capture IM[PC] on the same rising edge.  IMwEn
// (im_en_n) is an active-low enable: while it is 1 the output is forced to
// zero so that the instruction bus does not toggle.  The read timing, the
// byte order and the zero output are this design's own choices.
//
// The memory has no write path in the processor itself.  A word-wide load
// port (load_we, load_addr as a word address, load_data), written on the
// rising edge of clk, fills it before the core is released from reset; it
// is an addition of this design.
module instr_mem
  import riscv_cu_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                      clk,
  input  logic                      im_en_n,
  input  logic [XLEN-1:0]           pc,
  output logic [XLEN-1:0]           instr,
  input  logic                      load_we,
  input  logic [$clog2(DEPTH)-3:0]  load_addr,
  input  logic [XLEN-1:0]           load_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] a0;

  always_ff @(posedge clk) begin
    if (load_we) begin
      for (int b = 0; b < 4; b++)
        mem[{load_addr, 2'(b)}] <= load_data[8*b +: 8];
    end
  end

  assign a0 = pc[AW-1:0];

  always_comb begin
    instr = '0;
    if (!im_en_n)
      instr = {mem[a0 + AW'(3)], mem[a0 + AW'(2)], mem[a0 + AW'(1)], mem[a0]};
  end

endmodule
