// egost_control: sequencer of the nibble-serial E-GOST core.
//
// One block takes, from the cycle after start:
//   LOAD_L    8 cycles  plaintext high word enters State R, one nibble/cycle
//   LOAD_SWAP 1 cycle   it moves to State L (stored rotated right by 11)
//   LOAD_R    8 cycles  plaintext low word enters State R
//   32 x { ROUND 8 cycles: R nibble + key chunk -> S-box -> XOR into L
//          SWAP  1 cycle : L <= R >>> 11, R <= L <<< 11 }     = 288 cycles
//   OUT_R     8 cycles  State R (ciphertext high word) on dout
//   OUT_SWAP  1 cycle   State L, rotated back, moves to State R
//   OUT_L     8 cycles  ciphertext low word on dout
// so 17 + 288 + 17 = 322 cycles, back in IDLE after that. The 8 + 1 cycles
// per round and the swap cycle with its rotations follow the published E-GOST design; the
// load/output sequence and the handshake are this design's own choice.
//
// The 8-cycle passes are timed by the NLFSR (its last state ends a pass) and
// the rounds by the 5-bit round counter; both sit outside this module and
// are driven through clr/en/inc. key_sel is the GOST key-schedule word index
// of the current round. done is a one-cycle pulse in the swap cycle that
// ends round 32; start is ignored unless the core is idle. Synchronous
// active-high reset to IDLE.
module egost_control
  import egost_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       nlfsr_last,
  input  logic       round_last,
  input  logic [4:0] round,
  output r_op_e      r_op,
  output l_op_e      l_op,
  output logic       add_en,
  output logic       carry_clr,
  output logic       nlfsr_clr,
  output logic       nlfsr_en,
  output logic       rnd_clr,
  output logic       rnd_inc,
  output logic [2:0] key_sel,
  output logic       din_ready,
  output logic       dout_valid,
  output logic       busy,
  output logic       done
);

  phase_e ph_q, ph_d;

  always_ff @(posedge clk) begin
    if (rst) ph_q <= PH_IDLE;
    else     ph_q <= ph_d;
  end

  always_comb begin
    ph_d       = ph_q;
    r_op       = R_HOLD;
    l_op       = L_HOLD;
    add_en     = 1'b0;
    carry_clr  = 1'b1;
    nlfsr_clr  = 1'b0;
    nlfsr_en   = 1'b0;
    rnd_clr    = 1'b0;
    rnd_inc    = 1'b0;
    din_ready  = 1'b0;
    dout_valid = 1'b0;
    done       = 1'b0;
    unique case (ph_q)
      PH_IDLE: begin
        nlfsr_clr = 1'b1;
        rnd_clr   = 1'b1;
        if (start) ph_d = PH_LOAD_L;
      end
      PH_LOAD_L: begin
        din_ready = 1'b1;
        r_op      = R_SHIFT_IN;
        nlfsr_en  = 1'b1;
        if (nlfsr_last) ph_d = PH_LOAD_SWAP;
      end
      PH_LOAD_SWAP: begin
        r_op = R_SWAP;
        l_op = L_SWAP;
        ph_d = PH_LOAD_R;
      end
      PH_LOAD_R: begin
        din_ready = 1'b1;
        r_op      = R_SHIFT_IN;
        nlfsr_en  = 1'b1;
        if (nlfsr_last) ph_d = PH_ROUND;
      end
      PH_ROUND: begin
        r_op      = R_ROTATE;
        l_op      = L_SHIFT_IN;
        add_en    = 1'b1;
        carry_clr = 1'b0;
        nlfsr_en  = 1'b1;
        if (nlfsr_last) ph_d = PH_SWAP;
      end
      PH_SWAP: begin
        r_op    = R_SWAP;
        l_op    = L_SWAP;
        rnd_inc = 1'b1;
        if (round_last) begin
          done = 1'b1;
          ph_d = PH_OUT_R;
        end else begin
          ph_d = PH_ROUND;
        end
      end
      PH_OUT_R: begin
        dout_valid = 1'b1;
        r_op       = R_ROTATE;
        nlfsr_en   = 1'b1;
        if (nlfsr_last) ph_d = PH_OUT_SWAP;
      end
      PH_OUT_SWAP: begin
        r_op = R_SWAP;
        l_op = L_SWAP;
        ph_d = PH_OUT_L;
      end
      PH_OUT_L: begin
        dout_valid = 1'b1;
        r_op       = R_ROTATE;
        nlfsr_en   = 1'b1;
        if (nlfsr_last) ph_d = PH_IDLE;
      end
      default: ph_d = PH_IDLE;
    endcase
  end

  assign key_sel = key_word_index(round);
  assign busy    = (ph_q != PH_IDLE);

  // The data ports are never both active, and a swap never happens part-way
  // through an 8-cycle pass.
  a_ports_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(din_ready && dout_valid));
  a_done_in_swap: assert property (@(posedge clk) disable iff (rst)
    done |-> (ph_q == PH_SWAP && round_last));

endmodule
