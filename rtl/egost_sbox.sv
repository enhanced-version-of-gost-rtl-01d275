// egost_sbox: the proposed E-GOST 4x4 S-box as a bit-sliced gate network.
//
// S(x) = 8 7 3 C D B 4 1 6 A 9 F 0 5 E 2 for x = 0..F. Its designers derive a
// 16-instruction AND/OR/XOR/NOT/MOV program for this S-box (five registers
// r0..r4, r0..r3 initially holding x0..x3, results S3=r4, S2=r3, S1=r2,
// S0=r0). Here every instruction becomes one gate and every register
// assignment a fresh net, so the S-box costs 2 AND, 2 OR, 9 XOR and 1 NOT
// gates with no lookup table. Because the same netlist is evaluated for every
// input value, it has a constant path and no data-dependent table access.
//
// Purely combinational: y follows x in the same cycle.
module egost_sbox
  import egost_pkg::*;
(
  input  nibble_t x,
  output nibble_t y
);

  logic r0_a, r0_b, r0_c;
  logic r1_a, r1_b, r1_c;
  logic r2_a, r2_b, r2_c, r2_d;
  logic r3_a, r3_b;
  logic r4_a, r4_b, r4_c;

  always_comb begin
    // line 1: mov r4,r1 | and r1,r3
    r4_a = x[1];
    r1_a = x[1] & x[3];
    // line 2: xor r1,r2 | xor r3,r0
    r1_b = r1_a ^ x[2];
    r3_a = x[3] ^ x[0];
    // line 3: xor r3,r1 | or r2,r4  -> r3 now holds S2
    r3_b = r3_a ^ r1_b;
    r2_a = x[2] | r4_a;
    // line 4: xor r2,r0 | xor r4,r3
    r2_b = r2_a ^ x[0];
    r4_b = r4_a ^ r3_b;
    // line 5: mov r0,r2 | or r2,r4
    r0_a = r2_b;
    r2_c = r2_b | r4_b;
    // line 6: xor r2,r1 | and r1,r0  -> r2 now holds S1
    r2_d = r2_c ^ r1_b;
    r1_c = r1_b & r0_a;
    // line 7: xor r4,r1 | xor r0,r2
    r4_c = r4_b ^ r1_c;
    r0_b = r0_a ^ r2_d;
    // line 8: xor r0,r4 | not r4    -> r0 holds S0, r4 holds S3
    r0_c = r0_b ^ r4_c;
    y    = {~r4_c, r3_b, r2_d, r0_c};
  end

endmodule
