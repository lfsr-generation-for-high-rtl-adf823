// tb_concat_workloads: the concatenated generator at the test-set sizes of
// several ISCAS benchmarks (m patterns x n bits):
//   s344 14x24, c6288 14x32, s208 27x19, s386 63x13, c432 28x36,
//   c1355 84x41, s1238 125x32.
// Their actual ATPG sets are not part of this repository, so each instance
// gets a pseudo-random test set of the same geometry (bit 28 of a 32-bit
// linear congruential generator, fixed seed; its carries make the sequence
// nonlinear over GF(2), so it has no short LFSR). The LFSR is fitted at
// elaboration time by a constant function running Berlekamp-Massey over the
// m*n-bit concatenated string:
//     C = 1, B = 1, L = 0, k = 1
//     for each bit i: d = s[i] ^ XOR_{j=1..L} C_j s[i-j]
//                     if d: T = C; C ^= B << k;
//                           if 2L <= i: L = i+1-L; B = T; k = 1 else k++
//                     else k++
// Checks per instance: every scan bit equals the pseudo-random test set,
// every pattern word, done after exactly m*n enabled clocks, and an LFSR
// degree within 8 of m*n/2, the size the published baseline LFSRs also
// have (for example 505 for the 1008 bits of c432). Elaboration runs the
// fits and takes about half a minute.
module tb_concat_workloads;
  localparam int NG = 7;
  localparam int LMAX = 4096;
  localparam int GM [NG] = '{14, 14, 27, 63, 28, 84, 125};
  localparam int GN [NG] = '{24, 32, 19, 13, 36, 41, 32};
  localparam int GBASE [NG] = '{169, 226, 259, 409, 505, 1723, 2007};   // published baseline LFSR size

  typedef logic [LMAX-1:0] vec_t;

  // bit i of the concatenated test set lives at index i
  function automatic vec_t test_set(int len, int unsigned seed);
    vec_t s = '0;
    int unsigned x = seed;
    for (int i = 0; i < len; i++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      s[i] = x[28];
    end
    return s;
  endfunction

  typedef struct packed {
    logic [31:0] deg;
    vec_t        coef;   // bit k-1 = c_k
  } bm_t;

  // Berlekamp-Massey: shortest LFSR generating s[0..len-1]
  function automatic bm_t bm(vec_t s, int len);
    vec_t c = vec_t'(1), b = vec_t'(1), t;
    int l = 0, k = 1;
    bm_t r;
    for (int i = 0; i < len; i++) begin
      logic d;
      d = s[i];
      for (int j = 1; j <= l; j++) d ^= c[j] & s[i-j];
      if (d) begin
        t = c;
        c ^= b << k;
        if (2 * l <= i) begin
          l = i + 1 - l; b = t; k = 1;
        end else k++;
      end else k++;
    end
    r.deg  = 32'(l);
    r.coef = c >> 1;
    return r;
  endfunction

  // first d bits of the stream, first bit in the MSB of a d-bit seed
  function automatic vec_t seed_of(vec_t s, int d);
    vec_t r = '0;
    for (int i = 0; i < d; i++) r[d-1-i] = s[i];
    return r;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  int checks = 0, failures = 0, finished = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NG; g++) begin : g_wl
    localparam int   M   = GM[g];
    localparam int   N   = GN[g];
    localparam int   LEN = M * N;
    localparam vec_t S   = test_set(LEN, 32'h1234_5678 + 32'(g));
    localparam bm_t  FIT = bm(S, LEN);
    localparam int   D   = int'(FIT.deg);
    localparam vec_t CF  = FIT.coef;
    localparam vec_t SD  = seed_of(S, D);

    logic scan_bit, scan_valid, pattern_valid, done;
    logic [N-1:0] pattern;
    logic [$clog2(M)-1:0] pattern_idx;
    int nbit = 0, npat = 0, steps = 0;

    concat_tpg #(.N(N), .M(M), .D(D), .COEF(CF[D-1:0]), .SEED(SD[D-1:0])) dut (
      .clk, .rst_n, .en, .restart(1'b0), .scan_bit, .scan_valid,
      .pattern, .pattern_valid, .pattern_idx, .done);

    always @(posedge clk) if (rst_n) begin
      if (pattern_valid) begin
        logic [N-1:0] exp_p;
        for (int i = 0; i < N; i++) exp_p[N-1-i] = S[npat * N + i];
        checks++;
        if (pattern !== exp_p || int'(pattern_idx) != npat) begin
          failures++;
          $display("FAIL workload %0d pattern %0d", g, npat);
        end
        npat++;
      end
      if (scan_valid) begin
        steps++;
        checks++;
        if (scan_bit !== S[nbit]) begin
          failures++;
          $display("FAIL workload %0d bit %0d", g, nbit);
        end
        nbit++;
      end
    end

    initial begin
      wait (rst_n);
      wait (done);
      repeat (2) @(posedge clk);
      checks++;
      if (steps != LEN || nbit != LEN) begin
        failures++;
        $display("FAIL workload %0d: done after %0d clocks, expected %0d", g, steps, LEN);
      end
      checks++;
      if (D < LEN / 2 - 8 || D > LEN / 2 + 8) begin
        failures++;
        $display("FAIL workload %0d: degree %0d far from %0d", g, D, LEN / 2);
      end
      checks++;
      if (npat != M) begin
        failures++;
        $display("FAIL workload %0d: %0d patterns", g, npat);
      end
      $display("workload %0dx%0d: %0d bits, LFSR degree %0d (published baseline for the real set: %0d)",
               M, N, LEN, D, GBASE[g]);
      finished++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    forever begin
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (finished == NG) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
