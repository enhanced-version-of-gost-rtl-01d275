// tb_egost_nlfsr: the 3-bit serial counter.
//
// After clear it must visit 0,1,2,5,3,7,6,4 and return to 0 (period 8, all
// states), raise last only in the eighth state, hold while en is low and
// return to 0 on clear.
module tb_egost_nlfsr;

  localparam logic [2:0] SEQ [8] = '{3'd0, 3'd1, 3'd2, 3'd5, 3'd3, 3'd7, 3'd6, 3'd4};

  logic       clk = 1'b0;
  logic       rst, clr, en;
  logic [2:0] state;
  logic       last;
  int checks = 0, failures = 0;

  egost_nlfsr dut (.*);

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
    rst = 1'b1; clr = 1'b0; en = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    en = 1'b1;
    for (int i = 0; i < 24; i++) begin
      check(state == SEQ[i % 8], $sformatf("step %0d state %0d", i, state));
      check(last == (i % 8 == 7), "last flag");
      @(negedge clk);
    end
    en = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(state == SEQ[0], "hold");
    en = 1'b1;
    repeat (3) @(negedge clk);
    check(state == SEQ[3], "advance after hold");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(state == 3'd0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
