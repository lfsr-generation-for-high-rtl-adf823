// concat_tpg: test pattern generator of the concatenated technique.
//
// All m test patterns of n bits are treated as one bit string of m*n bits,
// pattern after pattern. A single LFSR (lfsr_fib) whose polynomial was fitted
// to that whole string regenerates it from one initial window, so there is
// exactly one seed, held as the set/reset value of the LFSR flip-flops, and no
// seed memory and no reseeding at all.
//
// The generator emits one bit per enabled clock on scan_bit (for a scan
// chain). A bit counter cuts the stream into patterns of N bits, which a
// serial-to-parallel register also presents on `pattern`, first bit in the
// MSB. After M patterns `done` rises and the LFSR stops. `restart` reloads
// the seed and starts the whole set again, as does reset.
//
// Interface and timing:
//   en          advance one bit; low stalls the generator (nothing is lost)
//   restart     synchronous; takes priority over en
//   scan_bit    valid while scan_valid is high (en and not done)
//   pattern_valid  one-clock pulse after the clock that shifted the last bit
//               of a pattern; pattern and pattern_idx hold until the next one
//   done        high after M*N enabled clocks, until restart or reset
// The whole set takes exactly M*N enabled clocks: no gap between patterns.
// Concatenation, the single hardwired seed and restart-by-reset follow the
// technique; counters, the parallel register and the handshake are this
// design's choices.
module concat_tpg
  import lfsr_tpg_pkg::*;
#(
  parameter int           N    = S349_N,            // bits per pattern
  parameter int           M    = S349_M,            // number of patterns
  parameter int           D    = S349_CONCAT_DEG,   // LFSR degree
  parameter logic [D-1:0] COEF = S349_CONCAT_COEF,
  parameter logic [D-1:0] SEED = S349_CONCAT_SEED,
  localparam int          NW   = (N > 1) ? $clog2(N) : 1,
  localparam int          MW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          restart,
  output logic          scan_bit,
  output logic          scan_valid,
  output logic [N-1:0]  pattern,
  output logic          pattern_valid,
  output logic [MW-1:0] pattern_idx,
  output logic          done
);

  logic [NW-1:0] bit_cnt;
  logic [MW-1:0] pat_cnt;
  logic [N-2:0]  sr;
  logic          step;
  logic          last_bit;

  assign step     = en && !done && !restart;
  assign last_bit = (bit_cnt == NW'(N - 1));

  lfsr_fib #(.D(D), .COEF(COEF), .SEED(SEED)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (step),
    .load     (restart),
    .load_val (SEED),
    .bit_o    (scan_bit),
    .state_o  ()
  );

  assign scan_valid = en && !done && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt       <= '0;
      pat_cnt       <= '0;
      sr            <= '0;
      pattern       <= '0;
      pattern_valid <= 1'b0;
      pattern_idx   <= '0;
      done          <= 1'b0;
    end else if (restart) begin
      bit_cnt       <= '0;
      pat_cnt       <= '0;
      pattern_valid <= 1'b0;
      done          <= 1'b0;
    end else begin
      pattern_valid <= 1'b0;
      if (step) begin
        sr <= (N-1)'({sr, scan_bit});
        if (last_bit) begin
          bit_cnt       <= '0;
          pattern       <= {sr, scan_bit};
          pattern_valid <= 1'b1;
          pattern_idx   <= pat_cnt;
          if (pat_cnt == MW'(M - 1)) done <= 1'b1;
          else                       pat_cnt <= pat_cnt + 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  // a pattern is reported only on a pattern boundary, and no bit leaves
  // after the last pattern
  a_boundary: assert property (@(posedge clk) disable iff (!rst_n)
                               pattern_valid |-> (bit_cnt == '0));
  a_quiet_done: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> !scan_valid);

endmodule
