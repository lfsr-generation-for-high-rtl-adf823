// lfsr_tpg_top: on-chip deterministic test pattern generation for the
// benchmark s349, in both forms.
//
//   c_*  concat_tpg: the proposed form. One degree-156 LFSR, its single seed
//        held as the flip-flops' set/reset value, regenerates the 13 test
//        patterns back to back in 13*24 = 312 clocks.
//   r_*  reseed_tpg: the non-concatenated form. 12 LFSRs and a 13-word seed
//        ROM; every pattern is reseeded, 13*26 = 338 clocks.
//
// Both generators share clock and reset and produce the same patterns; each
// has its own enable, restart and output ports, so either can drive the scan
// chain of the circuit under test (which is outside this module). Timing of
// every port is that of concat_tpg / reseed_tpg.
module lfsr_tpg_top
  import lfsr_tpg_pkg::*;
#(
  localparam int N  = S349_N,
  localparam int M  = S349_M,
  localparam int MW = $clog2(M),
  localparam int PW = $clog2(S349_NPOLY)
) (
  input  logic          clk,
  input  logic          rst_n,
  // concatenated generator
  input  logic          c_en,
  input  logic          c_restart,
  output logic          c_scan_bit,
  output logic          c_scan_valid,
  output logic [N-1:0]  c_pattern,
  output logic          c_pattern_valid,
  output logic [MW-1:0] c_pattern_idx,
  output logic          c_done,
  // reseeding generator
  input  logic          r_en,
  input  logic          r_restart,
  output logic          r_scan_bit,
  output logic          r_scan_valid,
  output logic [N-1:0]  r_pattern,
  output logic          r_pattern_valid,
  output logic [MW-1:0] r_pattern_idx,
  output logic          r_reseeding,
  output logic [PW-1:0] r_poly_sel,
  output logic          r_done
);

  concat_tpg u_concat (
    .clk           (clk),
    .rst_n         (rst_n),
    .en            (c_en),
    .restart       (c_restart),
    .scan_bit      (c_scan_bit),
    .scan_valid    (c_scan_valid),
    .pattern       (c_pattern),
    .pattern_valid (c_pattern_valid),
    .pattern_idx   (c_pattern_idx),
    .done          (c_done)
  );

  reseed_tpg u_reseed (
    .clk           (clk),
    .rst_n         (rst_n),
    .en            (r_en),
    .restart       (r_restart),
    .scan_bit      (r_scan_bit),
    .scan_valid    (r_scan_valid),
    .pattern       (r_pattern),
    .pattern_valid (r_pattern_valid),
    .pattern_idx   (r_pattern_idx),
    .reseeding     (r_reseeding),
    .poly_sel      (r_poly_sel),
    .done          (r_done)
  );

endmodule
