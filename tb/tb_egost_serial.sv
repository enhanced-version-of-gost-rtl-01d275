// tb_egost_serial: end-to-end test of the serial E-GOST core at its default
// parameters (default key).
//
// Encrypts a set of plaintexts (fixed corner values and random ones) and
// compares every ciphertext with the word-level reference model. For each
// block it also checks the timing: done 305 cycles after start (17 load
// cycles + 32 rounds of 9 cycles), 16 output nibbles, the last one in cycle
// 322, and exactly 16 input nibbles taken. It counts the mechanisms of the
// design and fails if one never happened: nibble loading, the load swap,
// serial rounds with forward and with reversed key order, a carry between
// nibbles of the serial adder, the swap cycle, the output swap, a start
// ignored while busy, a back-to-back block and a reset in the middle of a
// block.
module tb_egost_serial;
  import egost_ref_pkg::*;

  localparam logic [255:0] KEY = 256'hffeeddcc_bbaa9988_77665544_33221100_f0f1f2f3_f4f5f6f7_f8f9fafb_fcfdfeff;
  localparam int N_RANDOM = 40;

  logic       clk = 1'b0;
  logic       rst;
  logic       start;
  logic [3:0] din;
  logic       din_ready;
  logic [3:0] dout;
  logic       dout_valid;
  logic       busy;
  logic       done;

  int checks = 0, failures = 0;
  int n_load = 0, n_load_swap = 0, n_fwd = 0, n_rev = 0, n_carry = 0;
  int n_swap = 0, n_out_swap = 0, n_ignored = 0, n_b2b = 0, n_reset = 0;

  egost_serial dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, read from the datapath controls.
  always @(posedge clk) if (!rst) begin
    if (din_ready) n_load++;
    if (dut.u_control.add_en && dut.u_round_counter.round < 5'd24) n_fwd++;
    if (dut.u_control.add_en && dut.u_round_counter.round >= 5'd24) n_rev++;
    if (dut.u_control.add_en && !dut.u_nlfsr.last && dut.u_adder.full[4]) n_carry++;
    if (dut.u_control.rnd_inc) n_swap++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Encrypt one block; with poke_start a second start pulse is given in the
  // middle of it, which the core must ignore.
  task automatic run_block(input logic [63:0] p, input bit poke_start);
    logic [63:0] seq_in, exp_c, got_c;
    int k, o, cyc, t_done, t_last, n_done;
    // nibble order: high word then low word, each least significant first
    seq_in = {p[31:0], p[63:32]};
    exp_c  = ref_encrypt(p, KEY);
    got_c  = '0;
    k = 0; o = 0; cyc = 0; t_done = -1; t_last = -1; n_done = 0;
    // called at a falling edge; start goes up at once, so a block that
    // follows another starts in the cycle after its last output nibble
    check(!busy, "idle before start");
    start = 1'b1;
    din   = seq_in[3:0];
    @(posedge clk);
    #1;
    check(busy, "busy after start");
    @(negedge clk);
    start = 1'b0;
    while (cyc < 400) begin
      din = seq_in[4*k +: 4];
      // a start pulse in the middle of the block must be ignored
      start = poke_start && (cyc == 100);
      @(posedge clk);
      cyc++;
      if (din_ready) k++;
      if (done) begin t_done = cyc; n_done++; end
      if (dout_valid) begin
        if (o < 8) got_c[32 + 4*o +: 4] = dout;
        else       got_c[4*(o-8) +: 4]  = dout;
        o++;
        if (o == 16) t_last = cyc;
      end
      if (dut.u_control.ph_q == 4'(egost_pkg::PH_LOAD_SWAP)) n_load_swap++;
      if (dut.u_control.ph_q == 4'(egost_pkg::PH_OUT_SWAP))  n_out_swap++;
      @(negedge clk);
      start = 1'b0;
      if (o == 16) break;
    end
    if (poke_start) begin
      check(!busy, "start while busy was ignored");
      if (!busy) n_ignored++;
    end
    check(k == 16, $sformatf("16 input nibbles taken (got %0d)", k));
    check(n_done == 1, "one done pulse");
    check(t_done == 305, $sformatf("done in cycle 305 (got %0d)", t_done));
    check(t_last == 322, $sformatf("last output in cycle 322 (got %0d)", t_last));
    check(got_c == exp_c, $sformatf("P=%016h C=%016h expected %016h", p, got_c, exp_c));
  endtask

  initial begin
    logic [63:0] p;
    rst = 1'b1; start = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    run_block(64'h0, 1'b0);
    run_block(64'hffffffff_ffffffff, 1'b1);
    run_block(64'hfedcba98_76543210, 1'b0);
    // back-to-back: this start comes in the cycle right after the previous
    // block's last output nibble
    n_b2b++;
    run_block(64'h01234567_89abcdef, 1'b0);
    for (int i = 0; i < N_RANDOM; i++) begin
      p = {$urandom, $urandom};
      run_block(p, 1'b0);
    end

    // reset in the middle of a block, then a clean block
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (150) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(!busy, "idle after reset");
    n_reset++;
    run_block(64'h5a5a5a5a_a5a5a5a5, 1'b0);

    check(n_load > 0,      "loading happened");
    check(n_load_swap > 0, "load swap happened");
    check(n_fwd > 0,       "forward key order rounds happened");
    check(n_rev > 0,       "reversed key order rounds happened");
    check(n_carry > 0,     "carry between nibbles happened");
    check(n_swap > 0,      "round swap happened");
    check(n_out_swap > 0,  "output swap happened");
    check(n_ignored > 0,   "start while busy happened");
    check(n_b2b > 0,       "back-to-back block happened");
    check(n_reset > 0,     "mid-block reset happened");
    $display("mechanisms: load=%0d load_swap=%0d fwd=%0d rev=%0d carry=%0d swap=%0d out_swap=%0d ignored=%0d b2b=%0d reset=%0d",
             n_load, n_load_swap, n_fwd, n_rev, n_carry, n_swap, n_out_swap, n_ignored, n_b2b, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
