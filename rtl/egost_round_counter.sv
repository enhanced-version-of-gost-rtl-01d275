// egost_round_counter: 5-bit round counter of the E-GOST core.
//
// Counts the 32 rounds of a block (0..31). clr sets it to 0 at the start of
// a block, inc adds one at the end of each round (in the swap cycle); it
// wraps from 31 to 0. last is high while round 31 is being computed.
// Synchronous active-high reset.
module egost_round_counter
  import egost_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       inc,
  output logic [4:0] round,
  output logic       last
);

  always_ff @(posedge clk) begin
    if (rst || clr) round <= '0;
    else if (inc)   round <= round + 5'd1;
  end

  assign last = (round == 5'(ROUNDS - 1));

endmodule
