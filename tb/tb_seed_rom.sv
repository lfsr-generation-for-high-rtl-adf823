// tb_seed_rom: self-checking testbench of seed_rom at its default (s349)
// contents.
//
// Every seed must be the first DEG bits of its published test pattern, right
// aligned, and every word must name the polynomial that expands it: one per
// pattern, except that the seventh polynomial (index 6) expands patterns 7
// and 8. Addresses are read in random order and the data is checked one
// clock after the address (registered read).
module tb_seed_rom;
  import lfsr_tpg_pkg::*;
  localparam logic [23:0] TSET [13] = '{
    24'b011111111010101111110000, 24'b111100000010101111101011,
    24'b100101111000000100000001, 24'b100000001010000000000000,
    24'b000000000111010000010111, 24'b000000001100000000001010,
    24'b000000000100011000011100, 24'b000000000010011000000000,
    24'b000000000101100000010110, 24'b000000001111001000111110,
    24'b000010000100110100000110, 24'b011010000000101000001111,
    24'b000000000010110000011011};
  // seed length of each pattern = degree of its LFSR
  localparam int SLEN [13] = '{12, 13, 22, 21, 22, 20, 21, 21, 21, 11, 14, 13, 12};
  localparam int PIDX [13] = '{0, 1, 2, 3, 4, 5, 6, 6, 7, 8, 9, 10, 11};

  logic clk = 1'b0;
  logic [3:0] addr;
  logic [21:0] seed;
  logic [3:0] poly;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seed_rom dut (.clk, .addr, .seed, .poly);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      automatic int a = (n < 13) ? n : int'($urandom_range(0, 12));
      logic [21:0] exp_seed;
      @(negedge clk);
      addr = 4'(a);
      exp_seed = 22'(TSET[a] >> (24 - SLEN[a]));
      @(negedge clk);
      checks++;
      if (seed !== exp_seed || int'(poly) != PIDX[a]) begin
        failures++;
        $display("FAIL word %0d: seed %b poly %0d, expected %b poly %0d",
                 a, seed, poly, exp_seed, PIDX[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
