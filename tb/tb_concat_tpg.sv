// tb_concat_tpg: self-checking testbench of concat_tpg at its default
// (s349) configuration.
//
// The expected values are the 13 published s349 test patterns of 24 bits.
// A monitor compares every scan bit with the concatenated test set, every
// pattern_valid pulse with the right pattern and index, and checks the
// timing: pattern p completes on enabled clock (p+1)*24 and done rises after
// exactly 13*24 = 312 enabled clocks, with en randomly stalling the
// generator. Pass 1 runs the full set; pass 2 is cut by restart after a few
// patterns; pass 3 runs the full set again after the restart; finally an
// asynchronous reset restarts it once more.
module tb_concat_tpg;
  import lfsr_tpg_pkg::*;
  localparam int N = S349_N, M = S349_M;
  localparam logic [23:0] TSET [13] = '{
    24'b011111111010101111110000, 24'b111100000010101111101011,
    24'b100101111000000100000001, 24'b100000001010000000000000,
    24'b000000000111010000010111, 24'b000000001100000000001010,
    24'b000000000100011000011100, 24'b000000000010011000000000,
    24'b000000000101100000010110, 24'b000000001111001000111110,
    24'b000010000100110100000110, 24'b011010000000101000001111,
    24'b000000000010110000011011};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, restart = 1'b0;
  logic scan_bit, scan_valid, pattern_valid, done;
  logic [N-1:0] pattern;
  logic [3:0] pattern_idx;
  int checks = 0, failures = 0;
  int nbit = 0, npat = 0, steps = 0, stalls = 0, done_seen = 0;

  always #5 clk = ~clk;

  concat_tpg dut (.clk, .rst_n, .en, .restart, .scan_bit, .scan_valid,
                  .pattern, .pattern_valid, .pattern_idx, .done);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // scoreboard: a pattern_valid pulse refers to bits counted before this clock
  always @(posedge clk) if (rst_n && !restart) begin
    if (pattern_valid) begin
      checks++;
      if (pattern !== TSET[npat] || int'(pattern_idx) != npat)
        fail($sformatf("pattern %0d: got %h idx %0d", npat, pattern, pattern_idx));
      checks++;
      if (nbit != (npat + 1) * N) fail($sformatf("pattern %0d after %0d bits", npat, nbit));
      npat++;
    end
    if (scan_valid) begin
      checks++;
      if (nbit >= M * N) fail("bit after the end of the set");
      else if (scan_bit !== TSET[nbit / N][N - 1 - nbit % N])
        fail($sformatf("scan bit %0d", nbit));
      nbit++;
      steps++;
    end else if (!done) stalls++;
    if (done && !done_seen) begin
      done_seen = 1;
      checks++;
      if (nbit != M * N || npat != M) fail($sformatf("done after %0d bits %0d patterns", nbit, npat));
    end
  end

  task automatic run_until_done();
    while (!done) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic do_restart();
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    nbit = 0; npat = 0; done_seen = 0;
  endtask

  initial begin
    #100000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    // pass 1: full set
    run_until_done();
    checks++; if (npat != M) fail("pass 1 incomplete");
    // done holds while en stays high
    en = 1'b1; repeat (5) @(negedge clk); en = 1'b0;
    checks++; if (!done || nbit != M * N) fail("done not held");
    // pass 2: restart, then restart again after 4 patterns
    do_restart();
    while (npat < 4) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    do_restart();
    // pass 3: full set from the seed
    run_until_done();
    checks++; if (npat != M) fail("pass 3 incomplete");
    // asynchronous reset also restarts the set
    #2 rst_n = 1'b0; #1 rst_n = 1'b1;
    nbit = 0; npat = 0; done_seen = 0;
    run_until_done();
    checks++; if (npat != M) fail("pass 4 incomplete");
    checks++; if (stalls == 0) fail("en never stalled the generator");
    $display("enabled clocks %0d, stalled clocks %0d", steps, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
