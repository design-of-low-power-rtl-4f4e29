// imm_gen: immediate generator for the I, S, B, U and J formats.
//
// Picks the format from the opcode in the instruction register and builds
// the sign-extended 32-bit immediate following the RV32I encodings:
//   I (addi, slli, srli, lw): ir[31:20]
//   S (sw):                   {ir[31:25], ir[11:7]}
//   B (beq):                  {ir[31], ir[7], ir[30:25], ir[11:8], 0}
//   U (lui, auipc):           {ir[31:12], 12'b0}
//   J (jal):                  {ir[31], ir[19:12], ir[20], ir[30:21], 0}
// For slli/srli the low five bits are the shift amount, which the ALU uses.
// IMMwEn (imm_en_n) is an active-low enable; while it is 1 the output is
// held at zero so that the immediate bus stays quiet, which is this design's
// reading of the enable.  R-type and unknown opcodes give zero.
// Combinational.
module imm_gen
  import riscv_cu_pkg::*;
(
  input  logic            imm_en_n,
  input  logic [XLEN-1:0] ir,
  output logic [XLEN-1:0] imm
);

  always_comb begin
    imm = '0;
    if (!imm_en_n) begin
      unique case (ir[6:0])
        OP_ITYPE, OP_LOAD: imm = {{20{ir[31]}}, ir[31:20]};
        OP_STORE:          imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
        OP_BRANCH:         imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
        OP_LUI, OP_AUIPC:  imm = {ir[31:12], 12'b0};
        OP_JAL:            imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
        default:           imm = '0;
      endcase
    end
  end

endmodule
