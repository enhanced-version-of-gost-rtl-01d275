// tb_egost_control: the E-GOST sequencer on its own.
//
// The serial counter and the round counter are modelled here (a plain
// 0..7 counter and a 0..31 counter driven by the controller's clr/en/inc).
// For a block the test records, cycle by cycle after start, what the
// controller asks for and checks: 16 din_ready cycles in two runs of 8
// separated by one swap; 32 rounds of 8 add cycles and one swap; the key
// word index of each round (0..7 three times, then 7..0); the carry cleared
// outside round cycles; done in cycle 305 only; 16 dout_valid cycles with an
// output swap between, the last in cycle 322; a start while busy ignored.
module tb_egost_control;
  import egost_pkg::*;

  logic       clk = 1'b0;
  logic       rst, start;
  logic       nlfsr_last, round_last;
  logic [4:0] round;
  r_op_e      r_op;
  l_op_e      l_op;
  logic       add_en, carry_clr, nlfsr_clr, nlfsr_en, rnd_clr, rnd_inc;
  logic [2:0] key_sel;
  logic       din_ready, dout_valid, busy, done;
  int checks = 0, failures = 0;
  int unsigned cnt8;

  egost_control dut (.*);

  always #5 clk = ~clk;

  // models of the two counters
  always_ff @(posedge clk) begin
    if (rst || nlfsr_clr) cnt8 <= 0;
    else if (nlfsr_en)    cnt8 <= (cnt8 + 1) % 8;
    if (rst || rnd_clr)   round <= '0;
    else if (rnd_inc)     round <= round + 5'd1;
  end
  assign nlfsr_last = (cnt8 == 7);
  assign round_last = (round == 5'd31);

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

  task automatic run_block(input bit poke);
    string trace;
    int cyc, n_in, n_out, n_add, n_swap, t_done, t_last, rnd, sub;
    logic [2:0] exp_key;
    trace = "";
    cyc = 0; n_in = 0; n_out = 0; n_add = 0; n_swap = 0; t_done = -1; t_last = -1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy && cyc < 400) begin
      cyc++;
      start = poke && (cyc == 50);
      // cycle cyc after start: 1..8 load L, 9 swap, 10..17 load R,
      // 18..305 rounds, 306..313 out R, 314 swap, 315..322 out L
      if (cyc <= 8 || (cyc >= 10 && cyc <= 17)) begin
        check(din_ready && r_op == R_SHIFT_IN && l_op == L_HOLD, $sformatf("load cycle %0d", cyc));
        n_in++;
      end else if (cyc == 9 || cyc == 314) begin
        check(r_op == R_SWAP && l_op == L_SWAP && !din_ready && !dout_valid, $sformatf("swap cycle %0d", cyc));
      end else if (cyc >= 18 && cyc <= 305) begin
        rnd = (cyc - 18) / 9;
        sub = (cyc - 18) % 9;
        exp_key = (rnd < 24) ? 3'(rnd % 8) : 3'(7 - rnd % 8);
        check(key_sel == exp_key, $sformatf("round %0d key %0d got %0d", rnd, exp_key, key_sel));
        if (sub < 8) begin
          check(add_en && !carry_clr && r_op == R_ROTATE && l_op == L_SHIFT_IN, $sformatf("round %0d cycle %0d", rnd, sub));
          n_add++;
        end else begin
          check(r_op == R_SWAP && l_op == L_SWAP && rnd_inc && carry_clr, $sformatf("round %0d swap", rnd));
          n_swap++;
        end
      end else if (cyc >= 306 && cyc <= 322) begin
        check(dout_valid && r_op == R_ROTATE && l_op == L_HOLD, $sformatf("output cycle %0d", cyc));
        n_out++;
        t_last = cyc;
      end
      if (!(cyc >= 18 && cyc <= 305 && (cyc - 18) % 9 < 8))
        check(carry_clr && !add_en, "carry cleared outside rounds");
      if (done) t_done = cyc;
      @(negedge clk);
      start = 1'b0;
    end
    check(n_in == 16, $sformatf("16 input cycles, got %0d", n_in));
    check(n_add == 256 && n_swap == 32, "32 rounds of 8 + 1 cycles");
    check(n_out == 16, $sformatf("16 output cycles, got %0d", n_out));
    check(t_done == 305, $sformatf("done in cycle 305, got %0d", t_done));
    check(t_last == 322 && cyc == 322, $sformatf("block ends in cycle 322, got %0d", cyc));
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(!busy, "idle after reset");
    run_block(1'b0);
    run_block(1'b1);
    repeat (3) @(negedge clk);
    check(!busy, "stays idle without start");
    run_block(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
