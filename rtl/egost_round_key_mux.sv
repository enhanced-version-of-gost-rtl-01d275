// egost_round_key_mux: selects the 32-bit round key word from the fixed key.
//
// The core targets fixed-key use, so the 256-bit key is a parameter and the
// eight words k0..k7 (k_j = KEY[32j+31 : 32j]) are hard-wired inputs of a
// 32-bit 8-to-1 multiplexer. The controller supplies the word index, which
// follows the GOST key schedule (k0..k7 three times, then k7..k0).
// Combinational. The default key value is an arbitrary example: the published design
// gives no key.
module egost_round_key_mux
  import egost_pkg::*;
#(
  parameter logic [255:0] KEY = 256'hffeeddcc_bbaa9988_77665544_33221100_f0f1f2f3_f4f5f6f7_f8f9fafb_fcfdfeff
) (
  input  logic [2:0] sel,
  output word_t      k
);

  always_comb begin
    unique case (sel)
      3'd0: k = KEY[ 31:  0];
      3'd1: k = KEY[ 63: 32];
      3'd2: k = KEY[ 95: 64];
      3'd3: k = KEY[127: 96];
      3'd4: k = KEY[159:128];
      3'd5: k = KEY[191:160];
      3'd6: k = KEY[223:192];
      default: k = KEY[255:224];
    endcase
  end

endmodule
