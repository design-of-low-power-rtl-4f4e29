// cu_state_reg: the 5-bit state register of the control unit.
//
// It loads next_state on the FALLING edge of clk, as the inverted clock
// input of the state register in the original block diagram shows.  The
// datapath registers load on the rising edge, so each control state lasts
// one full clock period from falling edge to falling edge and the datapath
// samples in the middle of it, half a period after the control outputs have
// settled.
//
// rst is active high and asynchronous and forces S0 (INIT); the polarity and
// the asynchronous style are this design's own choice.
module cu_state_reg
  import riscv_cu_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  cu_state_t next_state,
  output cu_state_t state
);

  always_ff @(negedge clk or posedge rst) begin
    if (rst) state <= S_INIT;
    else     state <= next_state;
  end

endmodule
