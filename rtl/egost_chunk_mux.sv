// egost_chunk_mux: selects the 4-bit chunk of the round key for this cycle.
//
// A 4-bit 8-to-1 multiplexer driven directly by the state of the 3-bit NLFSR
// serial counter. The NLFSR does not count in binary, so its eight data
// inputs are wired in the order in which it visits its states: state s picks
// nibble nlfsr_pos(s) of the round key, and the nibbles come out least
// significant first (0,1,...,7) as the serial adder needs. Combinational.
module egost_chunk_mux
  import egost_pkg::*;
(
  input  word_t      k,
  input  logic [2:0] nlfsr_state,
  output nibble_t    chunk
);

  always_comb begin
    unique case (nlfsr_state)
      3'd0: chunk = k[ 3: 0]; // position 0
      3'd1: chunk = k[ 7: 4]; // position 1
      3'd2: chunk = k[11: 8]; // position 2
      3'd5: chunk = k[15:12]; // position 3
      3'd3: chunk = k[19:16]; // position 4
      3'd7: chunk = k[23:20]; // position 5
      3'd6: chunk = k[27:24]; // position 6
      default: chunk = k[31:28]; // state 4, position 7
    endcase
  end

endmodule
