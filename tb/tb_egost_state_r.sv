// tb_egost_state_r: State R register operations.
//
// Loads random words nibble by nibble (least significant first) and checks
// the word; rotates eight times and checks that the word comes back and
// that the bottom nibble walks through the word; checks the swap load
// (State L rotated left by 11), hold, and reset.
module tb_egost_state_r;
  import egost_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  r_op_e      op;
  logic [3:0] din, nib;
  logic [31:0] l_word, word;
  int checks = 0, failures = 0;

  egost_state_r dut (.*);

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
    logic [31:0] w, lw;
    rst = 1'b1; op = R_HOLD; din = '0; l_word = '0;
    @(negedge clk);
    rst = 1'b0;
    check(word == 32'h0, "reset value");
    for (int t = 0; t < 50; t++) begin
      w = $urandom; lw = $urandom;
      op = R_SHIFT_IN;
      for (int i = 0; i < 8; i++) begin
        din = w[4*i +: 4];
        @(negedge clk);
      end
      check(word == w, $sformatf("load %08h got %08h", w, word));
      op = R_ROTATE;
      for (int i = 0; i < 8; i++) begin
        check(nib == w[4*i +: 4], "serial output nibble");
        @(negedge clk);
      end
      check(word == w, "eight rotations restore the word");
      op = R_HOLD;
      @(negedge clk);
      check(word == w, "hold");
      op = R_SWAP; l_word = lw;
      @(negedge clk);
      check(word == ((lw << 11) | (lw >> 21)), $sformatf("swap: %08h <<< 11 got %08h", lw, word));
      op = R_HOLD;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
