// egost_serial_adder: nibble-serial 32-bit addition R + K mod 2^32.
//
// The published serial core adds the round key to the right half four bits at
// a time and keeps the carry between nibbles in one flip-flop. Nibbles must
// be presented least significant first while en is high. The carry flip-flop
// is cleared by clr (the controller raises it in every cycle that is not a
// serial round cycle), so the first nibble of each word gets carry-in 0 and
// the carry out of the top nibble is dropped, which gives the modulo 2^32.
//
// Timing: sum is combinational from a, b and the stored carry; the carry is
// updated on the rising clock edge when en is high. Synchronous active-high
// reset (own choice).
module egost_serial_adder
  import egost_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,   // clear the carry (word boundary)
  input  logic    en,    // a nibble is being added this cycle
  input  nibble_t a,
  input  nibble_t b,
  output nibble_t sum
);

  logic       carry_q;
  logic [4:0] full;

  always_comb full = {1'b0, a} + {1'b0, b} + {4'b0, carry_q};
  assign sum = full[3:0];

  always_ff @(posedge clk) begin
    if (rst || clr) carry_q <= 1'b0;
    else if (en)    carry_q <= full[4];
  end

endmodule
