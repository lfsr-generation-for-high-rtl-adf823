// tb_reseed_workloads: the reseeding generator at the test-set size of the
// ISCAS benchmark c432 (28 patterns of 36 bits).
//
// The real c432 test set is not part of this repository, so a pseudo-random
// set of the same geometry is used (bit 28 of a 32-bit linear congruential
// generator, fixed seed). Every pattern gets its own LFSR, fitted at
// elaboration time by a constant function running Berlekamp-Massey on the
// 36-bit pattern, and its seed is the first DEG bits of the pattern,
// right-aligned in DMAX = 36 bits (no polynomial sharing: the configuration
// of the technique before its polynomial-set optimisation).
// Checks: every scan bit and pattern word, the polynomial in use, done after
// exactly M*(N+2) clocks with en held high, and stalls with en random.
module tb_reseed_workloads;
  localparam int M = 28, N = 36, NPOLY = 28, DMAX = 36;

  typedef logic [N-1:0]        pat_t;
  typedef logic [M-1:0][N-1:0] set_t;

  // pattern p, first bit in the MSB
  function automatic set_t test_set();
    set_t s;
    int unsigned x = 32'h0bad_cafe;
    for (int p = 0; p < M; p++)
      for (int i = N - 1; i >= 0; i--) begin
        x = x * 32'd1664525 + 32'd1013904223;
        s[p][i] = x[28];
      end
    return s;
  endfunction

  // Berlekamp-Massey over the N bits of one pattern (bit i = s[N-1-i]);
  // returns {degree, coefficients with bit k-1 = c_k}
  function automatic logic [DMAX+31:0] bm(pat_t pat);
    logic [DMAX:0] c = 1, b = 1, t;
    int l = 0, k = 1;
    for (int i = 0; i < N; i++) begin
      logic d;
      d = pat[N-1-i];
      for (int j = 1; j <= l; j++) d ^= c[j] & pat[N-1-(i-j)];
      if (d) begin
        t = c;
        c ^= b << k;
        if (2 * l <= i) begin
          l = i + 1 - l; b = t; k = 1;
        end else k++;
      end else k++;
    end
    return {32'(l), DMAX'(c >> 1)};
  endfunction

  localparam set_t TSET = test_set();

  // LFSR q serves pattern q
  function automatic int deg_of(int q);
    return int'(bm(TSET[q]) >> DMAX);
  endfunction

  function automatic logic [DMAX-1:0] coef_of(int q);
    return DMAX'(bm(TSET[q]));
  endfunction

  // seed of pattern p: its first DEG bits, right-aligned
  function automatic logic [DMAX-1:0] seed_of(int p);
    return DMAX'(TSET[p] >> (N - deg_of(p)));
  endfunction

  localparam int DEG [NPOLY] =
    '{deg_of(0), deg_of(1), deg_of(2), deg_of(3), deg_of(4), deg_of(5),
    deg_of(6), deg_of(7), deg_of(8), deg_of(9), deg_of(10), deg_of(11),
    deg_of(12), deg_of(13), deg_of(14), deg_of(15), deg_of(16), deg_of(17),
    deg_of(18), deg_of(19), deg_of(20), deg_of(21), deg_of(22), deg_of(23),
    deg_of(24), deg_of(25), deg_of(26), deg_of(27)};
  localparam logic [DMAX-1:0] COEF [NPOLY] =
    '{coef_of(0), coef_of(1), coef_of(2), coef_of(3), coef_of(4), coef_of(5),
    coef_of(6), coef_of(7), coef_of(8), coef_of(9), coef_of(10), coef_of(11),
    coef_of(12), coef_of(13), coef_of(14), coef_of(15), coef_of(16),
    coef_of(17), coef_of(18), coef_of(19), coef_of(20), coef_of(21),
    coef_of(22), coef_of(23), coef_of(24), coef_of(25), coef_of(26),
    coef_of(27)};
  localparam logic [DMAX-1:0] SEEDS [M] =
    '{seed_of(0), seed_of(1), seed_of(2), seed_of(3), seed_of(4), seed_of(5),
    seed_of(6), seed_of(7), seed_of(8), seed_of(9), seed_of(10), seed_of(11),
    seed_of(12), seed_of(13), seed_of(14), seed_of(15), seed_of(16),
    seed_of(17), seed_of(18), seed_of(19), seed_of(20), seed_of(21),
    seed_of(22), seed_of(23), seed_of(24), seed_of(25), seed_of(26),
    seed_of(27)};
  localparam int SEED_POLY [M] =
    '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19,
    20, 21, 22, 23, 24, 25, 26, 27};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, restart = 1'b0;
  logic scan_bit, scan_valid, pattern_valid, reseeding, done;
  logic [N-1:0] pattern;
  logic [4:0] pattern_idx, poly_sel;
  int checks = 0, failures = 0;
  int nbit = 0, npat = 0, cycles = 0, stalls = 0, dsum = 0;

  always #5 clk = ~clk;

  reseed_tpg #(.N(N), .M(M), .NPOLY(NPOLY), .DMAX(DMAX), .DEG(DEG), .COEF(COEF),
               .SEEDS(SEEDS), .SEED_POLY(SEED_POLY)) dut (
    .clk, .rst_n, .en, .restart, .scan_bit, .scan_valid, .pattern, .pattern_valid,
    .pattern_idx, .reseeding, .poly_sel, .done);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) if (rst_n && !restart) begin
    if (en && !done) cycles++;
    if (!en && !done) stalls++;
    if (pattern_valid) begin
      checks++;
      if (pattern !== TSET[npat] || int'(pattern_idx) != npat)
        fail($sformatf("pattern %0d", npat));
      npat++;
    end
    if (scan_valid) begin
      checks++;
      if (nbit >= M * N || scan_bit !== TSET[nbit / N][N - 1 - nbit % N]
          || int'(poly_sel) != SEED_POLY[nbit / N])
        fail($sformatf("bit %0d", nbit));
      nbit++;
    end
  end

  initial begin
    #200000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < NPOLY; q++) dsum += DEG[q];
    #12 rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++; if (npat != M) fail($sformatf("%0d patterns", npat));
    checks++; if (cycles != M * (N + 2)) fail($sformatf("%0d clocks, expected %0d", cycles, M * (N + 2)));
    // second pass with stalls
    restart = 1'b1; @(negedge clk); restart = 1'b0;
    nbit = 0; npat = 0;
    while (!done) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    checks++; if (npat != M) fail("stalled pass incomplete");
    checks++; if (stalls == 0) fail("no stall");
    $display("%0d LFSRs, mean degree %0d.%0d, %0d flip-flops in all", NPOLY,
             dsum / NPOLY, (dsum * 10 / NPOLY) % 10, dsum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
