// tb_lfsr_tpg_top: end-to-end testbench of lfsr_tpg_top at its default
// parameters (the full s349 configuration).
//
// Both generators run side by side and must deliver the 13 published s349
// test patterns, bit by bit and as parallel words. Pass 1 runs both with en
// held high from reset and checks the test application time of each: 312
// clocks for the concatenated generator, 338 for the reseeding one (13
// reseeds of 2 clocks). Pass 2 restarts both, stalls them at random, cuts
// them with a second restart and runs them to the end again.
// Each mechanism is counted and must occur at least once: stalls, restarts,
// reseeds, switches between LFSR polynomials, a polynomial reused for a
// second seed, and done of each generator.
module tb_lfsr_tpg_top;
  localparam int N = 24, M = 13;
  localparam logic [23:0] TSET [13] = '{
    24'b011111111010101111110000, 24'b111100000010101111101011,
    24'b100101111000000100000001, 24'b100000001010000000000000,
    24'b000000000111010000010111, 24'b000000001100000000001010,
    24'b000000000100011000011100, 24'b000000000010011000000000,
    24'b000000000101100000010110, 24'b000000001111001000111110,
    24'b000010000100110100000110, 24'b011010000000101000001111,
    24'b000000000010110000011011};

  logic clk = 1'b0, rst_n = 1'b0;
  logic c_en = 0, c_restart = 0, r_en = 0, r_restart = 0;
  logic c_scan_bit, c_scan_valid, c_pattern_valid, c_done;
  logic r_scan_bit, r_scan_valid, r_pattern_valid, r_reseeding, r_done;
  logic [N-1:0] c_pattern, r_pattern;
  logic [3:0] c_pattern_idx, r_pattern_idx, r_poly_sel;
  int checks = 0, failures = 0;
  int c_bit = 0, c_pat = 0, c_cyc = 0, r_bit = 0, r_pat = 0, r_cyc = 0;
  int n_stall = 0, n_restart = 0, n_reseed = 0, n_switch = 0, n_reuse = 0;
  int n_c_done = 0, n_r_done = 0;
  logic c_done_q = 0, r_done_q = 0, r_reseeding_q = 0;
  logic [3:0] last_poly = '1;
  logic [11:0] poly_used = '0;

  always #5 clk = ~clk;

  lfsr_tpg_top dut (.*);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    // each generator moves only on its own enable
    checks++;
    if ((c_scan_valid && !c_en) || (r_scan_valid && !r_en)) fail("generator moved without its enable");
    // concatenated generator
    if (!c_restart) begin
      if (c_en && !c_done) c_cyc++;
      if (!c_en && !c_done) n_stall++;
      if (c_pattern_valid) begin
        checks++;
        if (c_pattern !== TSET[c_pat] || int'(c_pattern_idx) != c_pat)
          fail($sformatf("concat pattern %0d", c_pat));
        c_pat++;
      end
      if (c_scan_valid) begin
        checks++;
        if (c_bit >= M * N || c_scan_bit !== TSET[c_bit / N][N - 1 - c_bit % N])
          fail($sformatf("concat bit %0d", c_bit));
        c_bit++;
      end
      if (c_done && !c_done_q) n_c_done++;
    end
    c_done_q <= c_done;
    // reseeding generator
    if (!r_restart) begin
      if (r_en && !r_done) r_cyc++;
      if (!r_en && !r_done) n_stall++;
      if (r_pattern_valid) begin
        checks++;
        if (r_pattern !== TSET[r_pat] || int'(r_pattern_idx) != r_pat)
          fail($sformatf("reseed pattern %0d", r_pat));
        r_pat++;
      end
      if (r_scan_valid) begin
        checks++;
        if (r_bit >= M * N || r_scan_bit !== TSET[r_bit / N][N - 1 - r_bit % N])
          fail($sformatf("reseed bit %0d", r_bit));
        if (r_bit % N == 0) begin
          // first bit of a pattern: a new seed in some polynomial
          if (last_poly != '1 && r_poly_sel != last_poly) n_switch++;
          if (poly_used[r_poly_sel]) n_reuse++;
          poly_used[r_poly_sel] = 1'b1;
          last_poly = r_poly_sel;
        end
        r_bit++;
      end
      if (r_reseeding && !r_reseeding_q) n_reseed++;
      if (r_done && !r_done_q) n_r_done++;
    end
    r_done_q <= r_done;
    r_reseeding_q <= r_reseeding;
  end

  task automatic restart_both();
    @(negedge clk);
    c_restart = 1; r_restart = 1;
    @(negedge clk);
    c_restart = 0; r_restart = 0;
    c_bit = 0; c_pat = 0; c_cyc = 0; r_bit = 0; r_pat = 0; r_cyc = 0;
    last_poly = '1; poly_used = '0;
    n_restart++;
  endtask

  initial begin
    #200000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    // only the concatenated generator runs: the other one must not move
    @(negedge clk);
    c_en = 1;
    repeat (30) @(negedge clk);
    checks++; if (r_bit != 0 || c_bit != 30) fail("independent enables");
    // pass 1: both at full speed
    r_en = 1;
    while (!(c_done && r_done)) @(negedge clk);
    @(negedge clk);
    c_en = 0; r_en = 0;
    checks++; if (c_pat != M || r_pat != M) fail("pass 1 incomplete");
    checks++; if (c_cyc != M * N) fail($sformatf("concat took %0d clocks", c_cyc));
    checks++; if (r_cyc != M * (N + 2)) fail($sformatf("reseed took %0d clocks", r_cyc));
    $display("application time: concatenated %0d clocks, reseeding %0d clocks", c_cyc, r_cyc);
    // pass 2: random stalls and a restart part way
    restart_both();
    while (c_pat < 6) begin
      @(negedge clk);
      c_en = ($urandom_range(0, 2) != 0);
      r_en = ($urandom_range(0, 2) != 0);
    end
    restart_both();
    while (!(c_done && r_done)) begin
      @(negedge clk);
      c_en = ($urandom_range(0, 2) != 0);
      r_en = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk);
    c_en = 0; r_en = 0;
    checks++; if (c_pat != M || r_pat != M) fail("pass 2 incomplete");
    $display("stalls %0d restarts %0d reseeds %0d polynomial switches %0d reuses %0d done c/r %0d/%0d",
             n_stall, n_restart, n_reseed, n_switch, n_reuse, n_c_done, n_r_done);
    checks++; if (n_stall == 0) fail("no stall");
    checks++; if (n_restart == 0) fail("no restart");
    checks++; if (n_reseed < M) fail("too few reseeds");
    checks++; if (n_switch == 0) fail("no polynomial switch");
    checks++; if (n_reuse == 0) fail("no polynomial reuse");
    checks++; if (n_c_done < 2 || n_r_done < 2) fail("done not reached in both passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
