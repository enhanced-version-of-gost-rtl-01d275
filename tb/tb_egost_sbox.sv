// tb_egost_sbox: exhaustive test of the bit-sliced E-GOST S-box.
//
// Checks all 16 inputs against the S-box table, checks that the mapping is
// a permutation, and builds the XOR (difference) distribution table from the
// outputs of the circuit: it must equal the published table of the S-box,
// with largest entry 4 for nonzero input differences and no nonzero input
// difference that gives a zero output difference (robustness 0.75).
module tb_egost_sbox;

  localparam logic [3:0] SBOX [16] = '{4'h8, 4'h7, 4'h3, 4'hC, 4'hD, 4'hB, 4'h4, 4'h1,
                                       4'h6, 4'hA, 4'h9, 4'hF, 4'h0, 4'h5, 4'hE, 4'h2};
  // difference distribution table, one hex digit per entry, dy = 0 leftmost
  localparam logic [63:0] DDT [16] = '{
    64'h0000000000000000, 64'h0000044000004004, 64'h0000020202240022, 64'h0022400002022002,
    64'h0000022400002402, 64'h0224000020420000, 64'h0000002242202020, 64'h0202400022002002,
    64'h0004000000400440, 64'h0220022020022002, 64'h0202422022000000, 64'h0400020202200022,
    64'h0220000020020440, 64'h0220000420020400, 64'h0022422002020000, 64'h0040002202202020};

  logic [3:0] x, y;
  int checks = 0, failures = 0;
  int ddt [16][16];
  logic [3:0] out [16];
  logic [15:0] seen;
  int dmax;

  egost_sbox dut (.x, .y);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      out[i] = y;
      seen[y] = 1'b1;
      checks++;
      if (y !== SBOX[i]) begin
        failures++;
        $display("FAIL: S(%h) = %h, expected %h", i, y, SBOX[i]);
      end
    end
    checks++;
    if (seen != 16'hffff) begin
      failures++;
      $display("FAIL: not a permutation");
    end
    dmax = 0;
    for (int dx = 0; dx < 16; dx++) begin
      for (int dy = 0; dy < 16; dy++) ddt[dx][dy] = 0;
      for (int i = 0; i < 16; i++) ddt[dx][out[i] ^ out[i ^ dx]]++;
    end
    for (int dx = 1; dx < 16; dx++)
      for (int dy = 0; dy < 16; dy++) begin
        checks++;
        if (ddt[dx][dy] != int'(DDT[dx][4*(15-dy) +: 4])) begin
          failures++;
          $display("FAIL: DDT[%h][%h] = %0d, expected %0d", dx, dy, ddt[dx][dy], DDT[dx][4*(15-dy) +: 4]);
        end
        if (ddt[dx][dy] > dmax) dmax = ddt[dx][dy];
      end
    checks++;
    if (dmax != 4) begin
      failures++;
      $display("FAIL: largest DDT entry %0d, expected 4", dmax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
