// egost_nlfsr: 3-bit nonlinear feedback shift register used as the serial
// (nibble) counter of the E-GOST core.
//
// The published design uses an NLFSR instead of a binary counter because it is smaller;
// it does not give the feedback, so this one is an own choice: shift left
// and feed back s2 ^ s1 ^ (~s1 & ~s0). The nonlinear term inserts the
// all-zero state into the period-7 LFSR sequence, so the register runs
// through all eight states: 0,1,2,5,3,7,6,4,0,...
//
// clr forces state 0 (NLFSR_FIRST); en advances one step; last is high in
// state 4 (NLFSR_LAST), the eighth cycle of a pass. Synchronous active-high
// reset.
module egost_nlfsr
  import egost_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       en,
  output logic [2:0] state,
  output logic       last
);

  always_ff @(posedge clk) begin
    if (rst || clr) state <= NLFSR_FIRST;
    else if (en)    state <= nlfsr_next(state);
  end

  assign last = (state == NLFSR_LAST);

endmodule
