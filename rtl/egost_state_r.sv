// egost_state_r: the 32-bit State R register of the serial E-GOST core.
//
// It is read and written one nibble per clock: the least significant nibble
// q[3:0] is the serial output (to the key adder and to the core's data
// output), and a nibble enters at the top, q[31:28], so the word moves right
// by four bits per cycle. In a round the bottom nibble re-enters at the top,
// and after eight cycles the word is back where it started. Only the swap
// cycle touches the whole word: State R then takes State L rotated left by
// 11, which finishes the round R(i+1) = (L(i) xor S(K(i)+R(i))) <<< 11.
//
// Operations (op, one per clock):
//   R_HOLD      keep
//   R_SHIFT_IN  q <= {din, q[31:4]}           loading the plaintext
//   R_ROTATE    q <= {q[3:0], q[31:4]}         round or output cycle
//   R_SWAP      q <= l_word <<< 11              Feistel swap
// Synchronous active-high reset to zero (own choice; the published design only shows a
// reset line).
module egost_state_r
  import egost_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  r_op_e   op,
  input  nibble_t din,
  input  word_t   l_word,
  output nibble_t nib,
  output word_t   word
);

  word_t q;

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      unique case (op)
        R_SHIFT_IN: q <= {din, q[31:4]};
        R_ROTATE:   q <= {q[3:0], q[31:4]};
        R_SWAP:     q <= {l_word[31-ROT:0], l_word[31:32-ROT]};
        default:    q <= q;
      endcase
    end
  end

  assign nib  = q[3:0];
  assign word = q;

endmodule
