// egost_ref_pkg: behavioural reference for the E-GOST testbenches.
//
// A plain word-level model of the cipher, written independently of the RTL:
// the S-box is a lookup of its table (8 7 3 C D B 4 1 6 A 9 F 0 5 E 2), the
// round is L' = R, R' = L xor (S(R + K) <<< 11), the key words run
// k0..k7, k0..k7, k0..k7, k7..k0 (k_j = KEY[32j+31:32j]), and the halves are
// not swapped after round 32. A 64-bit block is {L, R}.
package egost_ref_pkg;

  localparam logic [3:0] SBOX [16] = '{4'h8, 4'h7, 4'h3, 4'hC, 4'hD, 4'hB, 4'h4, 4'h1,
                                       4'h6, 4'hA, 4'h9, 4'hF, 4'h0, 4'h5, 4'hE, 4'h2};

  function automatic logic [3:0] ref_sbox(input logic [3:0] x);
    return SBOX[x];
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [31:0] k);
    logic [31:0] t, s;
    t = r + k;
    for (int i = 0; i < 8; i++) s[4*i +: 4] = SBOX[t[4*i +: 4]];
    return (s << 11) | (s >> 21);
  endfunction

  function automatic int ref_key_index(input int round);
    return (round < 24) ? (round % 8) : (7 - (round % 8));
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] p, input logic [255:0] key);
    logic [31:0] l, r, n;
    l = p[63:32];
    r = p[31:0];
    for (int i = 0; i < 32; i++) begin
      n = l ^ ref_f(r, key[32*ref_key_index(i) +: 32]);
      if (i < 31) begin
        l = r;
        r = n;
      end else begin
        l = n;
      end
    end
    return {l, r};
  endfunction

endpackage
