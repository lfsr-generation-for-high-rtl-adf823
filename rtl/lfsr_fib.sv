// lfsr_fib: external-XOR (Fibonacci) LFSR that reproduces a target bit
// stream from its feedback polynomial and initial window.
//
// The register holds a window of D consecutive stream bits, oldest in the MSB.
// Every enabled clock the oldest bit leaves on bit_o, the window shifts by one
// and the new youngest bit is the linear recurrence
//     b_j = c_1*b_{j-1} + c_2*b_{j-2} + ... + c_D*b_{j-D}   (mod 2)
// computed from the window before the shift. The stream on bit_o therefore
// starts with the D seed bits and continues with generated bits, which is
// exactly the target pattern when COEF and SEED come from a Berlekamp-Massey
// solution of that pattern.
//
// The seed is the reset value of the flip-flops (each flop is either set or
// reset by rst_n), so no memory holds it, as in the concatenated technique.
// A synchronous load replaces the window for reseeding or for restarting.
//
// Interface and timing:
//   rst_n     asynchronous, active low: window <= SEED
//   load      window <= load_val at the next edge (priority over en)
//   en        shift one bit at the next edge
//   bit_o     current oldest bit, valid in the same cycle (registered output)
//   state_o   the window
// The recurrence, window and seed-at-reset follow the technique; the reset
// polarity and the load port are this design's choices.
module lfsr_fib
  import lfsr_tpg_pkg::*;
#(
  parameter int         D    = S349_CONCAT_DEG,
  parameter logic [D-1:0] COEF = S349_CONCAT_COEF,  // bit i-1 = c_i
  parameter logic [D-1:0] SEED = S349_CONCAT_SEED   // first bit in MSB
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [D-1:0] load_val,
  output logic         bit_o,
  output logic [D-1:0] state_o
);

  logic [D-1:0] win;
  logic         fb;

  // win[D-1] = b_{j-D} (oldest) ... win[0] = b_{j-1} (youngest):
  // tap c_i multiplies b_{j-i} = win[i-1].
  always_comb fb = ^(COEF & win);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    win <= SEED;
    else if (load) win <= load_val;
    else if (en)   win <= {win[D-2:0], fb};
  end

  assign bit_o   = win[D-1];
  assign state_o = win;

endmodule
