// cu_next_state: next-state logic of the control unit FSM.
//
// Every instruction runs INIT/FETCH -> DECODE -> one execute state -> FETCH.
// Loads and branches take one more state: LW goes S4 -> S17 (the extra cycle
// in which the synchronous data memory delivers the word), BEQ goes
// S15 (compare) -> S16 (take or skip).  In DECODE the opcode, funct3 and
// funct7 fields of the instruction register select the execute state, as in
// the instruction encodings of RV32I.  SLLI/SRLI check funct7[6:1] only
// ("000000X"), so bit 25 is ignored as the original encoding table shows.
//
// An instruction outside the 13 decoded ones sends DECODE back to FETCH
// without touching PC, so the core re-fetches the same word for ever; this
// "halt on unknown instruction" is this design's own choice, the original
// does not say what happens.
//
// Purely combinational; the state register samples next_state.
module cu_next_state
  import riscv_cu_pkg::*;
(
  input  cu_state_t  state,
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output cu_state_t  next_state
);

  cu_state_t decoded;

  always_comb begin
    decoded = S_FETCH;
    unique case (opcode)
      OP_RTYPE: begin
        if (funct3 == F3_ADD && funct7 == F7_BASE) decoded = S_ADD;
        else if (funct3 == F3_ADD && funct7 == F7_SUB) decoded = S_SUB;
        else if (funct3 == F3_OR  && funct7 == F7_BASE) decoded = S_OR;
        else if (funct3 == F3_AND && funct7 == F7_BASE) decoded = S_AND;
      end
      OP_ITYPE: begin
        if (funct3 == F3_ADD) decoded = S_ADDI;
        else if (funct3 == F3_SLL && funct7[6:1] == 6'b000000) decoded = S_SLLI;
        else if (funct3 == F3_SRL && funct7[6:1] == 6'b000000) decoded = S_SRLI;
      end
      OP_LOAD:   if (funct3 == F3_WORD) decoded = S_LW;
      OP_STORE:  if (funct3 == F3_WORD) decoded = S_SW;
      OP_LUI:    decoded = S_LUI;
      OP_AUIPC:  decoded = S_AUIPC;
      OP_JAL:    decoded = S_JAL;
      OP_BRANCH: if (funct3 == F3_BEQ) decoded = S_BEQ_CK;
      default:   decoded = S_FETCH;
    endcase
  end

  always_comb begin
    unique case (state)
      S_INIT:   next_state = S_FETCH;
      S_FETCH:  next_state = S_DECODE;
      S_DECODE: next_state = decoded;
      S_LW:     next_state = S_LW_NOP;
      S_BEQ_CK: next_state = S_BEQ_EX;
      default:  next_state = S_FETCH;  // every execute state ends in FETCH
    endcase
  end

endmodule
