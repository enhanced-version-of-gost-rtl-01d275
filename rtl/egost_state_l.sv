// egost_state_l: the 32-bit State L register of the serial E-GOST core.
//
// State L holds the left half of the Feistel state kept rotated right by 11
// bits: stored value = L >>> 11. With that convention the round
// L xor (S(K+R) <<< 11) becomes ((L >>> 11) xor S(K+R)) <<< 11, so the
// S-layer nibbles can be XORed in directly, one per clock, and the single
// rotation left is done when the word moves to State R in the swap cycle.
// Accordingly the swap cycle stores State R rotated right by 11 as the new
// left half. This follows the published serial datapath.
//
// In a round cycle the bottom nibble nib = q[3:0] leaves towards the XOR
// with the S-box output and the result nin comes back in at the top, so
// after eight cycles every nibble has been combined once and the word is in
// place again.
//
// Operations (op, one per clock):
//   L_HOLD      keep
//   L_SHIFT_IN  q <= {nin, q[31:4]}       round cycle
//   L_SWAP      q <= r_word >>> 11         Feistel swap
// Synchronous active-high reset to zero (own choice).
module egost_state_l
  import egost_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  l_op_e   op,
  input  nibble_t nin,
  input  word_t   r_word,
  output nibble_t nib,
  output word_t   word
);

  word_t q;

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      unique case (op)
        L_SHIFT_IN: q <= {nin, q[31:4]};
        L_SWAP:     q <= {r_word[ROT-1:0], r_word[31:ROT]};
        default:    q <= q;
      endcase
    end
  end

  assign nib  = q[3:0];
  assign word = q;

endmodule
