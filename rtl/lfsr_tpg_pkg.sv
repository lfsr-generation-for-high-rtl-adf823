// lfsr_tpg_pkg: shared constants of the deterministic LFSR test pattern
// generators.
//
// It holds one complete configuration of both generators for the ISCAS'89
// benchmark s349 (13 test patterns of 24 bits):
//   * the concatenated generator: a single degree-156 LFSR whose feedback
//     polynomial and initial window regenerate all 13 x 24 = 312 test bits
//     back to back;
//   * the reseeding generator: 12 LFSR polynomials and 13 seeds, one seed per
//     pattern (polynomial 6 counted from 0 expands two of them).
//
// Encoding used everywhere:
//   * COEF vectors hold c_D..c_1 from MSB to LSB, so bit i-1 is c_i, the tap
//     on the bit emitted i clocks before the one being computed.
//   * SEED vectors hold the first D bits of the stream, first bit in the MSB.
//     In the reseeding tables each seed is right-aligned in a DMAX-bit word,
//     its first bit at bit DEG-1 of the polynomial it belongs to.
// The 12 polynomials and 13 seeds follow the published s349 result of the
// reseeding technique; the concatenated polynomial is the Berlekamp-Massey
// solution of the same 13 patterns taken in order (degree 156; the published
// figure with don't-care bits optimised is 153).
package lfsr_tpg_pkg;

  // s349 test set geometry
  localparam int S349_N = 24;            // bits per pattern (n)
  localparam int S349_M = 13;            // number of patterns (m)

  // concatenated technique
  localparam int S349_CONCAT_DEG = 156;
  localparam logic [155:0] S349_CONCAT_COEF = 156'b111100100100101100011000101010011100110100010100011011001100011110101111101100111100100011111101110000011110001101111000010010100010100000101000010011001010;
  localparam logic [155:0] S349_CONCAT_SEED = 156'b011111111010101111110000111100000010101111101011100101111000000100000001100000001010000000000000000000000111010000010111000000001100000000001010000000000100;

  // reseeding (non-concatenated) technique
  localparam int S349_NPOLY = 12;
  localparam int S349_DMAX  = 22;
  localparam int S349_DEG [12] = '{12, 13, 22, 21, 22, 20, 21, 21, 11, 14, 13, 12};
  localparam logic [21:0] S349_COEF [12] = '{
    22'b0000000000101001111001,
    22'b0000000000111110010110,
    22'b0100001110100111010101,
    22'b0111000010110100111011,
    22'b0010001110011001011111,
    22'b0011100000100001011111,
    22'b0100000011000111001010,
    22'b0101110010001010010101,
    22'b0000000000011100111001,
    22'b0000000001010110101011,
    22'b0000000000111011010110,
    22'b0000000000110001001110
  };
  localparam int S349_SEED_POLY [13] = '{0, 1, 2, 3, 4, 5, 6, 6, 7, 8, 9, 10, 11};
  localparam logic [21:0] S349_SEEDS [13] = '{
    22'b0000000000011111111010,
    22'b0000000001111000000101,
    22'b1001011110000001000000,
    22'b0100000001010000000000,
    22'b0000000001110100000101,
    22'b0000000000110000000000,
    22'b0000000000100011000011,
    22'b0000000000010011000000,
    22'b0000000000101100000010,
    22'b0000000000000000000111,
    22'b0000000000001000010011,
    22'b0000000000110100000001,
    22'b0000000000000000000010
  };

  // state of the reseeding controller
  typedef enum logic [1:0] {
    RS_FETCH = 2'd0,   // seed ROM address presented
    RS_LOAD  = 2'd1,   // seed loaded into the selected LFSR
    RS_RUN   = 2'd2,   // LFSR shifting out the pattern
    RS_DONE  = 2'd3    // all patterns produced
  } reseed_state_e;

endpackage
