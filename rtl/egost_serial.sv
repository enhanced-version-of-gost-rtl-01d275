// egost_serial: fixed-key E-GOST block cipher (encryption) with a 4-bit
// datapath and a single S-box.
//
// E-GOST is the 64-bit GOST Feistel cipher (32 rounds, 256-bit key, round
// function F(R, K) = S(R + K mod 2^32) <<< 11) in which all eight S-boxes
// are the same proposed 4x4 S-box, so a serial datapath needs only one. Each
// round takes eight cycles in which a nibble of State R is added to a nibble
// of the round key (carry kept in a flip-flop), passed through the S-box and
// XORed into State L, followed by one swap cycle that exchanges the halves
// and does the 11-bit rotations on whole words. State L is kept rotated
// right by 11 so that the S-box nibbles can be XORed in unrotated (see
// egost_state_l). The key is hard-wired through the KEY parameter and
// selected by a 32-bit 8-to-1 mux (round key) and a 4-bit 8-to-1 mux
// (nibble, indexed by the 3-bit NLFSR serial counter). This structure
// follows the published design; the I/O sequence, handshake and reset are own choices.
//
// Interface (all synchronous to clk, active-high synchronous reset):
//   start       pulse while idle (busy low) to begin a block
//   din_ready   high in the 16 cycles in which din is taken: first the
//               plaintext high word P[63:32], then the low word P[31:0],
//               each least significant nibble first
//   dout_valid  high in the 16 cycles in which dout carries the ciphertext,
//               in the same order (C[35:32] first, C[31:28] last)
//   done        one-cycle pulse when round 32 completes, the cycle before
//               the first output nibble
// Ciphertext C = {R32, L32} in the usual GOST convention (no swap after the
// last round). Latency: 17 load + 32 x 9 round + 17 output = 322 cycles per
// block; the next start can come in the cycle after the last output nibble.
module egost_serial
  import egost_pkg::*;
#(
  parameter logic [255:0] KEY = 256'hffeeddcc_bbaa9988_77665544_33221100_f0f1f2f3_f4f5f6f7_f8f9fafb_fcfdfeff
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  nibble_t din,
  output logic    din_ready,
  output nibble_t dout,
  output logic    dout_valid,
  output logic    busy,
  output logic    done
);

  r_op_e      r_op;
  l_op_e      l_op;
  logic       add_en, carry_clr, nlfsr_clr, nlfsr_en, rnd_clr, rnd_inc;
  logic [2:0] key_sel, nlfsr_state;
  logic       nlfsr_last, round_last;
  logic [4:0] round;
  word_t      r_word, l_word, round_key;
  nibble_t    r_nib, l_nib, key_chunk, sum_nib, s_nib, l_new;

  egost_control u_control (
    .clk, .rst, .start, .nlfsr_last, .round_last, .round,
    .r_op, .l_op, .add_en, .carry_clr, .nlfsr_clr, .nlfsr_en,
    .rnd_clr, .rnd_inc, .key_sel, .din_ready, .dout_valid, .busy, .done
  );

  egost_nlfsr u_nlfsr (
    .clk, .rst, .clr(nlfsr_clr), .en(nlfsr_en),
    .state(nlfsr_state), .last(nlfsr_last)
  );

  egost_round_counter u_round_counter (
    .clk, .rst, .clr(rnd_clr), .inc(rnd_inc),
    .round, .last(round_last)
  );

  egost_round_key_mux #(.KEY(KEY)) u_round_key_mux (
    .sel(key_sel), .k(round_key)
  );

  egost_chunk_mux u_chunk_mux (
    .k(round_key), .nlfsr_state, .chunk(key_chunk)
  );

  egost_state_r u_state_r (
    .clk, .rst, .op(r_op), .din, .l_word,
    .nib(r_nib), .word(r_word)
  );

  egost_serial_adder u_adder (
    .clk, .rst, .clr(carry_clr), .en(add_en),
    .a(r_nib), .b(key_chunk), .sum(sum_nib)
  );

  egost_sbox u_sbox (
    .x(sum_nib), .y(s_nib)
  );

  // The XOR of Figure 3: S-layer output into the bottom nibble of State L.
  assign l_new = l_nib ^ s_nib;

  egost_state_l u_state_l (
    .clk, .rst, .op(l_op), .nin(l_new), .r_word,
    .nib(l_nib), .word(l_word)
  );

  assign dout = r_nib;

  // Whole-word swaps only happen between 8-cycle passes.
  a_swap_aligned: assert property (@(posedge clk) disable iff (rst)
    (r_op == R_SWAP) |-> (nlfsr_state == NLFSR_FIRST));

endmodule
