// seed_rom: seed memory of the reseeding (non-concatenated) technique.
//
// One word per test pattern, holding the seed that the pattern's LFSR starts
// from and the index of that LFSR's polynomial. Several words may name the
// same polynomial (a polynomial that expands more than one seed). The
// contents are parameters, so the memory synthesises to a ROM.
//
// Interface and timing: synchronous read, addr sampled at a clock edge, seed
// and poly valid after it (one clock latency). Seeds are right-aligned in a
// DMAX-bit word, first bit to emit at bit DEG-1 of the selected polynomial.
// That seeds sit in a memory follows the technique; the word layout and the
// registered read are this design's choices.
module seed_rom
  import lfsr_tpg_pkg::*;
#(
  parameter int              M     = S349_M,       // words = patterns
  parameter int              DMAX  = S349_DMAX,    // seed width
  parameter int              NPOLY = S349_NPOLY,   // polynomials
  parameter logic [DMAX-1:0] SEEDS     [M] = S349_SEEDS,
  parameter int              SEED_POLY [M] = S349_SEED_POLY,
  localparam int             MW    = (M > 1) ? $clog2(M) : 1,
  localparam int             PW    = (NPOLY > 1) ? $clog2(NPOLY) : 1
) (
  input  logic            clk,
  input  logic [MW-1:0]   addr,
  output logic [DMAX-1:0] seed,
  output logic [PW-1:0]   poly
);

  typedef struct packed {
    logic [PW-1:0]   poly;
    logic [DMAX-1:0] seed;
  } rom_word_t;

  function automatic rom_word_t rom_word(int i);
    rom_word_t w;
    w.poly = PW'(SEED_POLY[i]);
    w.seed = SEEDS[i];
    return w;
  endfunction

  rom_word_t mem [M];
  rom_word_t q;

  for (genvar i = 0; i < M; i++) begin : g_init
    assign mem[i] = rom_word(i);
  end

  always_ff @(posedge clk) begin
    q <= (int'(addr) < M) ? mem[addr] : '0;
  end

  assign seed = q.seed;
  assign poly = q.poly;

endmodule
