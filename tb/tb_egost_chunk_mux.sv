// tb_egost_chunk_mux: key nibble selection by NLFSR state.
//
// Walks the NLFSR sequence 0,1,2,5,3,7,6,4 and checks that random key words
// come out least significant nibble first.
module tb_egost_chunk_mux;

  localparam logic [2:0] SEQ [8] = '{3'd0, 3'd1, 3'd2, 3'd5, 3'd3, 3'd7, 3'd6, 3'd4};

  logic [31:0] k;
  logic [2:0]  nlfsr_state;
  logic [3:0]  chunk;
  int checks = 0, failures = 0;

  egost_chunk_mux dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      k = $urandom;
      for (int i = 0; i < 8; i++) begin
        nlfsr_state = SEQ[i];
        #1;
        checks++;
        if (chunk !== k[4*i +: 4]) begin
          failures++;
          $display("FAIL: k=%08h step %0d gives %h", k, i, chunk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
