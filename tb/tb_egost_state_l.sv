// tb_egost_state_l: State L register operations.
//
// Swap-loads random words (State R rotated right by 11), then runs eight
// shift-in cycles that XOR a random word into it nibble by nibble, as the
// round does, and checks the result, the nibble order and hold.
module tb_egost_state_l;
  import egost_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  l_op_e      op;
  logic [3:0] nin, nib;
  logic [31:0] r_word, word;
  int checks = 0, failures = 0;

  egost_state_l dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] rw, x, exp;
    rst = 1'b1; op = L_HOLD; nin = '0; r_word = '0;
    @(negedge clk);
    rst = 1'b0;
    check(word == 32'h0, "reset value");
    for (int t = 0; t < 50; t++) begin
      rw = $urandom; x = $urandom;
      op = L_SWAP; r_word = rw;
      @(negedge clk);
      exp = (rw >> 11) | (rw << 21);
      check(word == exp, $sformatf("swap: %08h >>> 11 got %08h", rw, word));
      op = L_SHIFT_IN;
      for (int i = 0; i < 8; i++) begin
        check(nib == exp[4*i +: 4], "bottom nibble order");
        nin = nib ^ x[4*i +: 4];
        @(negedge clk);
      end
      op = L_HOLD;
      @(negedge clk);
      check(word == (exp ^ x), $sformatf("xor pass got %08h expected %08h", word, exp ^ x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
