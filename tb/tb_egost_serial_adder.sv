// tb_egost_serial_adder: nibble-serial 32-bit addition.
//
// Feeds pairs of 32-bit words, least significant nibble first, eight cycles
// per word with the carry cleared in a gap cycle between words, and compares
// the eight sum nibbles with (a + b) mod 2^32. Includes all-ones + 1 (carry
// through every nibble) and random pairs. Also checks that the carry is
// held while en is low.
module tb_egost_serial_adder;

  logic       clk = 1'b0;
  logic       rst, clr, en;
  logic [3:0] a, b, sum;
  int checks = 0, failures = 0;

  egost_serial_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_word(input logic [31:0] wa, input logic [31:0] wb, input bit stall);
    logic [31:0] got, exp;
    exp = wa + wb;
    @(negedge clk);
    clr = 1'b1; en = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < 8; i++) begin
      if (stall && i == 4) begin
        en = 1'b0; a = 4'h0; b = 4'h0;  // carry must survive an idle cycle
        @(negedge clk);
      end
      en = 1'b1;
      a = wa[4*i +: 4];
      b = wb[4*i +: 4];
      #1;
      got[4*i +: 4] = sum;
      @(negedge clk);
    end
    en = 1'b0;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %08h + %08h = %08h, expected %08h", wa, wb, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; en = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    add_word(32'hffffffff, 32'h00000001, 1'b0);
    add_word(32'h0fffffff, 32'h00000001, 1'b1);
    add_word(32'h80000000, 32'h80000000, 1'b0);
    add_word(32'h00000000, 32'h00000000, 1'b0);
    for (int i = 0; i < 200; i++) add_word($urandom, $urandom, i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
