// tb_egost_round_key_mux: the round key word multiplexer.
//
// For every select value checks the word against k_j = KEY[32j+31:32j] of
// the default key, and that all eight words differ (so a swapped input would
// be seen).
module tb_egost_round_key_mux;

  localparam logic [255:0] KEY = 256'hffeeddcc_bbaa9988_77665544_33221100_f0f1f2f3_f4f5f6f7_f8f9fafb_fcfdfeff;

  logic [2:0]  sel;
  logic [31:0] k;
  int checks = 0, failures = 0;

  egost_round_key_mux dut (.sel, .k);

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) begin
      sel = 3'(j);
      #1;
      checks++;
      if (k !== KEY[32*j +: 32]) begin
        failures++;
        $display("FAIL: sel %0d gives %08h, expected %08h", j, k, KEY[32*j +: 32]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
