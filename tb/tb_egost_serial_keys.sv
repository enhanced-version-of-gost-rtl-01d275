// tb_egost_serial_keys: the serial E-GOST core with several hard-wired keys.
//
// Four cores with different KEY parameters (all-zero, all-ones, a key whose
// words differ only in one bit each, and a random-looking one) each encrypt
// a run of random plaintexts back to back; every ciphertext is compared
// with the word-level reference model. This exercises the key multiplexers
// and the carry chain of the serial adder with other operands than the
// default key.
module tb_egost_serial_keys;
  import egost_ref_pkg::*;

  localparam int NK = 4;
  localparam int N_BLOCKS = 12;
  localparam logic [255:0] KEYS [NK] = '{
    256'h0,
    {256{1'b1}},
    256'h00000080_00000040_00000020_00000010_00000008_00000004_00000002_00000001,
    256'h3c2a9e71_d04b8f16_a7e5c302_5b19f6de_82c4170b_e93d5a68_14f7ac29_6d80b3f5};

  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int finished = 0;

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    wait (finished == NK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NK; g++) begin : g_core
    logic       start, din_ready, dout_valid, busy, done;
    logic [3:0] din, dout;

    egost_serial #(.KEY(KEYS[g])) dut (
      .clk, .rst, .start, .din, .din_ready, .dout, .dout_valid, .busy, .done
    );

    initial begin
      logic [63:0] p, seq_in, got, exp;
      int k, o;
      start = 1'b0; din = '0;
      @(negedge rst);
      @(negedge clk);
      for (int b = 0; b < N_BLOCKS; b++) begin
        p = {$urandom, $urandom};
        seq_in = {p[31:0], p[63:32]};
        exp = ref_encrypt(p, KEYS[g]);
        got = '0; k = 0; o = 0;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (o < 16) begin
          din = seq_in[4*k +: 4];
          @(posedge clk);
          if (din_ready) k++;
          if (dout_valid) begin
            if (o < 8) got[32 + 4*o +: 4] = dout;
            else       got[4*(o-8) +: 4]  = dout;
            o++;
          end
          @(negedge clk);
        end
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL: key %0d P=%016h C=%016h expected %016h", g, p, got, exp);
        end
      end
      finished++;
    end
  end

endmodule
