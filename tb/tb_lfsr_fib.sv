// tb_lfsr_fib: self-checking testbench of lfsr_fib.
//
// Three instances:
//   u_a  degree 13, polynomial 1111100101101 and seed 1111000000101 of the
//        published s349 reseeding result (pattern 2);
//   u_b  degree 14, polynomial 10101101010111, seed 00001000010011 (pattern 11);
//   u_c  the default: the degree-156 concatenated LFSR for all of s349.
// The polynomial strings are written c_d..c_1 followed by the constant term;
// the testbench drops the constant term to get the COEF vector. Each instance
// must reproduce its 24-bit pattern (u_c: all 13 patterns, 312 bits) bit by
// bit. Also checked: en low holds the window, load restarts the stream, and
// asynchronous reset returns to the seed.
module tb_lfsr_fib;
  localparam logic [12:0] PA = 13'b1111100101101;
  localparam logic [12:0] SA = 13'b1111000000101;
  localparam logic [23:0] TA = 24'b111100000010101111101011;
  localparam logic [13:0] PB = 14'b10101101010111;
  localparam logic [13:0] SB = 14'b00001000010011;
  localparam logic [23:0] TB = 24'b000010000100110100000110;
  localparam logic [23:0] TSET [13] = '{
    24'b011111111010101111110000, 24'b111100000010101111101011,
    24'b100101111000000100000001, 24'b100000001010000000000000,
    24'b000000000111010000010111, 24'b000000001100000000001010,
    24'b000000000100011000011100, 24'b000000000010011000000000,
    24'b000000000101100000010110, 24'b000000001111001000111110,
    24'b000010000100110100000110, 24'b011010000000101000001111,
    24'b000000000010110000011011};

  logic clk = 1'b0, rst_n = 1'b0;
  logic en_a, en_b, en_c, ld_a;
  logic bit_a, bit_b, bit_c;
  logic [12:0] st_a;
  logic [13:0] st_b;
  logic [155:0] st_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_fib #(.D(13), .COEF(13'(PA >> 1)), .SEED(SA)) u_a (
    .clk, .rst_n, .en(en_a), .load(ld_a), .load_val(SA), .bit_o(bit_a), .state_o(st_a));
  lfsr_fib #(.D(14), .COEF(14'(PB >> 1)), .SEED(SB)) u_b (
    .clk, .rst_n, .en(en_b), .load(1'b0), .load_val('0), .bit_o(bit_b), .state_o(st_b));
  lfsr_fib u_c (
    .clk, .rst_n, .en(en_c), .load(1'b0), .load_val('0), .bit_o(bit_c), .state_o(st_c));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; en_c = 0; ld_a = 0;
    #12 rst_n = 1'b1;
    // reset value is the seed
    checks++; if (st_a !== SA) begin failures++; $display("FAIL seed a"); end
    checks++; if (st_b !== SB) begin failures++; $display("FAIL seed b"); end
    // patterns 2 and 11
    @(negedge clk);
    en_a = 1; en_b = 1;
    for (int i = 23; i >= 0; i--) begin
      check($sformatf("a bit %0d", 23 - i), bit_a, TA[i]);
      check($sformatf("b bit %0d", 23 - i), bit_b, TB[i]);
      @(negedge clk);
    end
    // hold: en low keeps the window
    en_a = 0;
    begin
      automatic logic [12:0] held = st_a;
      repeat (3) @(negedge clk);
      checks++; if (st_a !== held) begin failures++; $display("FAIL hold"); end
    end
    // load restarts the stream from the seed
    ld_a = 1; @(negedge clk); ld_a = 0; en_a = 1;
    for (int i = 23; i >= 8; i--) begin
      check($sformatf("a reload bit %0d", 23 - i), bit_a, TA[i]);
      @(negedge clk);
    end
    en_a = 0; en_b = 0;
    // concatenated LFSR: the whole s349 set, 13 x 24 bits
    en_c = 1;
    for (int p = 0; p < 13; p++)
      for (int i = 23; i >= 0; i--) begin
        check($sformatf("c pattern %0d bit %0d", p, 23 - i), bit_c, TSET[p][i]);
        @(negedge clk);
      end
    // asynchronous reset returns to the seed
    #2 rst_n = 1'b0; #1;
    checks++; if (st_a !== SA || bit_c !== TSET[0][23]) begin failures++; $display("FAIL async reset"); end
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
