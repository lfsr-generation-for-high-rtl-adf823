// tb_reseed_tpg: self-checking testbench of reseed_tpg at its default (s349)
// configuration.
//
// The expected values are the 13 published s349 test patterns of 24 bits and
// the polynomial that expands each (the seventh polynomial serves patterns 7
// and 8). A monitor checks every scan bit, every pattern_valid pulse (pattern,
// index) and the polynomial in use for every bit. Pass 1 runs with en held
// high and must take exactly 13*(24+2) = 338 clocks from reset to done, with
// 13 reseeds of 2 clocks each. Pass 2 runs with random stalls, is cut short
// by restart after 5 patterns, and pass 3 runs the full set again.
module tb_reseed_tpg;
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
  localparam int PIDX [13] = '{0, 1, 2, 3, 4, 5, 6, 6, 7, 8, 9, 10, 11};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, restart = 1'b0;
  logic scan_bit, scan_valid, pattern_valid, reseeding, done;
  logic [N-1:0] pattern;
  logic [3:0] pattern_idx, poly_sel;
  int checks = 0, failures = 0;
  int nbit = 0, npat = 0, cycles = 0, reseed_cycles = 0, done_seen = 0, stalls = 0;

  always #5 clk = ~clk;

  reseed_tpg dut (.clk, .rst_n, .en, .restart, .scan_bit, .scan_valid, .pattern,
                  .pattern_valid, .pattern_idx, .reseeding, .poly_sel, .done);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // scoreboard: a pattern_valid pulse refers to bits counted before this clock
  always @(posedge clk) if (rst_n && !restart) begin
    if (en && !done) cycles++;
    if (!en && !done) stalls++;
    if (en && reseeding) reseed_cycles++;
    if (pattern_valid) begin
      checks++;
      if (pattern !== TSET[npat] || int'(pattern_idx) != npat)
        fail($sformatf("pattern %0d: got %h idx %0d", npat, pattern, pattern_idx));
      npat++;
    end
    if (scan_valid) begin
      checks++;
      if (nbit >= M * N) fail("bit after the end of the set");
      else begin
        if (scan_bit !== TSET[nbit / N][N - 1 - nbit % N])
          fail($sformatf("scan bit %0d", nbit));
        if (int'(poly_sel) != PIDX[nbit / N])
          fail($sformatf("bit %0d from polynomial %0d", nbit, poly_sel));
      end
      nbit++;
    end
    if (done && !done_seen) begin
      done_seen = 1;
      checks++;
      if (nbit != M * N || npat != M) fail($sformatf("done after %0d bits %0d patterns", nbit, npat));
    end
  end

  task automatic clear();
    nbit = 0; npat = 0; cycles = 0; reseed_cycles = 0; done_seen = 0;
  endtask

  task automatic run_until_done(bit stall);
    while (!done) begin
      @(negedge clk);
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic do_restart();
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    clear();
  endtask

  initial begin
    #100000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    // pass 1: en always high, exact cycle count
    run_until_done(1'b0);
    checks++; if (npat != M) fail("pass 1 incomplete");
    checks++;
    if (cycles != M * (N + 2))
      fail($sformatf("pass 1 took %0d clocks, expected %0d", cycles, M * (N + 2)));
    checks++;
    if (reseed_cycles != 2 * M) fail($sformatf("%0d reseed clocks, expected %0d", reseed_cycles, 2 * M));
    // pass 2: random stalls, restart after 5 patterns
    do_restart();
    while (npat < 5) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    do_restart();
    // pass 3: full set with stalls
    run_until_done(1'b1);
    checks++; if (npat != M) fail("pass 3 incomplete");
    checks++; if (stalls == 0) fail("en never stalled the generator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
