// egost_pkg: types and helpers shared by the nibble-serial E-GOST core.
//
// E-GOST is GOST 28147-89 (64-bit Feistel block, 256-bit key, 32 rounds,
// round function S(K + R) <<< 11) with the eight S-boxes all replaced by one
// proposed 4x4 S-box. The serial core keeps each 32-bit half in a register
// that is read and written one nibble per clock, and uses one extra clock per
// round for the whole-word swap with the two 11-bit rotations.
//
// Contents:
//   nibble_t / word_t       4-bit chunk and 32-bit half-block
//   r_op_e / l_op_e         what the State R and State L registers do in a cycle
//   phase_e                 phases of the controller
//   key_word_index()        GOST key schedule: word k(r mod 8) for rounds 0..23,
//                           k(7 - r mod 8) for rounds 24..31 (as published)
//   nlfsr_next()/nlfsr_pos() the 3-bit serial counter and the nibble position
//                           each of its states stands for (own choice: the
//                           published design names the NLFSR, not its feedback)
package egost_pkg;

  typedef logic [3:0]  nibble_t;
  typedef logic [31:0] word_t;

  localparam int unsigned ROUNDS         = 32; // rounds per block
  localparam int unsigned ROT            = 11; // rotation of the round function

  // State R: hold, shift a new nibble in at the top (load), rotate by one
  // nibble (round / output), or take State L rotated left by 11 (swap).
  typedef enum logic [1:0] {R_HOLD, R_SHIFT_IN, R_ROTATE, R_SWAP} r_op_e;

  // State L: hold, shift in at the top the bottom nibble XORed with the
  // S-layer output (round), or take State R rotated right by 11 (swap).
  typedef enum logic [1:0] {L_HOLD, L_SHIFT_IN, L_SWAP} l_op_e;

  typedef enum logic [3:0] {
    PH_IDLE,      // waiting for start
    PH_LOAD_L,    // 8 cycles: left half of the plaintext enters State R
    PH_LOAD_SWAP, // 1 cycle: it moves to State L (pre-rotated right by 11)
    PH_LOAD_R,    // 8 cycles: right half of the plaintext enters State R
    PH_ROUND,     // 8 cycles: key add, S-box, XOR into State L, nibble by nibble
    PH_SWAP,      // 1 cycle: Feistel swap with the 11-bit rotations
    PH_OUT_R,     // 8 cycles: State R (ciphertext high word) leaves nibble-wise
    PH_OUT_SWAP,  // 1 cycle: State L, rotated back left by 11, moves to State R
    PH_OUT_L      // 8 cycles: State R (ciphertext low word) leaves nibble-wise
  } phase_e;

  // Index of the 32-bit key word used in round r (0-based), Table 1 of GOST.
  function automatic logic [2:0] key_word_index(input logic [4:0] r);
    return (r < 5'd24) ? r[2:0] : 3'd7 - r[2:0];
  endfunction

  // 3-bit NLFSR: shift left, feedback s2 ^ s1 plus a term that inserts the
  // all-zero state, giving the period-8 sequence 0,1,2,5,3,7,6,4.
  localparam logic [2:0] NLFSR_FIRST = 3'd0;
  localparam logic [2:0] NLFSR_LAST  = 3'd4;

  function automatic logic [2:0] nlfsr_next(input logic [2:0] s);
    return {s[1:0], s[2] ^ s[1] ^ (~s[1] & ~s[0])};
  endfunction

  // Nibble position (0 = least significant) that NLFSR state s stands for.
  function automatic logic [2:0] nlfsr_pos(input logic [2:0] s);
    case (s)
      3'd0: return 3'd0;
      3'd1: return 3'd1;
      3'd2: return 3'd2;
      3'd5: return 3'd3;
      3'd3: return 3'd4;
      3'd7: return 3'd5;
      3'd6: return 3'd6;
      default: return 3'd7; // state 4
    endcase
  endfunction

endpackage
