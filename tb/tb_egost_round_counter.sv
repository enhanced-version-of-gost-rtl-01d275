// tb_egost_round_counter: the 5-bit round counter.
//
// Counts 0..31 with last only at 31, wraps to 0, holds without inc and
// clears on clr.
module tb_egost_round_counter;

  logic       clk = 1'b0;
  logic       rst, clr, inc;
  logic [4:0] round;
  logic       last;
  int checks = 0, failures = 0;

  egost_round_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; inc = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      check(int'(round) == i % 32, $sformatf("count %0d got %0d", i, round));
      check(last == (i % 32 == 31), "last flag");
      inc = 1'b1;
      @(negedge clk);
      inc = 1'b0;
      @(negedge clk);
    end
    check(round == 5'd8, "hold without inc");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(round == 5'd0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
