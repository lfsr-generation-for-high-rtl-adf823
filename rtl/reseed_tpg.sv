// reseed_tpg: test pattern generator of the non-concatenated technique.
//
// Each test pattern is expanded on its own: a group of LFSRs with different
// feedback polynomials (NPOLY of them, degree DEG[k] each) and a seed memory
// (seed_rom) with one seed per pattern and the polynomial that expands it.
// For every pattern the controller
//   FETCH  presents the pattern number to the seed ROM,
//   LOAD   loads the seed into the LFSR that the ROM word names,
//   RUN    shifts that LFSR for N clocks, one test bit per clock,
// and moves on to the next pattern; after M patterns it stops in DONE.
// Reseeding costs two clocks per pattern, so a set takes M*(N+2) enabled
// clocks, against M*N for the concatenated generator.
//
// Outputs match concat_tpg: scan_bit/scan_valid per bit, `pattern` (first
// bit in MSB) with a one-clock pattern_valid pulse after its last bit, and
// `done`. `reseeding` is high in FETCH and LOAD, poly_sel names the LFSR in
// use. en low stalls the controller in any state; restart (synchronous)
// returns to pattern 0.
// The LFSR group, per-pattern seeds in memory and reseeding follow the
// technique; the controller, its two-clock reseed and the handshake are this
// design's choices.
module reseed_tpg
  import lfsr_tpg_pkg::*;
#(
  parameter int              N     = S349_N,
  parameter int              M     = S349_M,
  parameter int              NPOLY = S349_NPOLY,
  parameter int              DMAX  = S349_DMAX,
  parameter int              DEG       [NPOLY] = S349_DEG,
  parameter logic [DMAX-1:0] COEF      [NPOLY] = S349_COEF,
  parameter logic [DMAX-1:0] SEEDS     [M]     = S349_SEEDS,
  parameter int              SEED_POLY [M]     = S349_SEED_POLY,
  localparam int             NW    = (N > 1) ? $clog2(N) : 1,
  localparam int             MW    = (M > 1) ? $clog2(M) : 1,
  localparam int             PW    = (NPOLY > 1) ? $clog2(NPOLY) : 1
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
  output logic          reseeding,
  output logic [PW-1:0] poly_sel,
  output logic          done
);

  reseed_state_e   state;
  logic [NW-1:0]   bit_cnt;
  logic [MW-1:0]   pat_cnt;
  logic [N-2:0]    sr;
  logic [DMAX-1:0] rom_seed;
  logic [PW-1:0]   rom_poly;
  logic [NPOLY-1:0] lfsr_load, lfsr_en, lfsr_bit;
  logic            run_step, load_step;

  seed_rom #(
    .M(M), .DMAX(DMAX), .NPOLY(NPOLY), .SEEDS(SEEDS), .SEED_POLY(SEED_POLY)
  ) u_rom (
    .clk  (clk),
    .addr (pat_cnt),
    .seed (rom_seed),
    .poly (rom_poly)
  );

  assign load_step = en && !restart && (state == RS_LOAD);
  assign run_step  = en && !restart && (state == RS_RUN);

  always_comb begin
    lfsr_load = '0;
    lfsr_en   = '0;
    if (load_step) lfsr_load[rom_poly] = 1'b1;
    if (run_step)  lfsr_en[poly_sel]   = 1'b1;
  end

  for (genvar k = 0; k < NPOLY; k++) begin : g_lfsr
    lfsr_fib #(
      .D    (DEG[k]),
      .COEF (COEF[k][DEG[k]-1:0]),
      .SEED ('0)
    ) u_lfsr (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (lfsr_en[k]),
      .load     (lfsr_load[k]),
      .load_val (rom_seed[DEG[k]-1:0]),
      .bit_o    (lfsr_bit[k]),
      .state_o  ()
    );
  end

  assign scan_bit   = lfsr_bit[poly_sel];
  assign scan_valid = run_step;
  assign reseeding  = (state == RS_FETCH) || (state == RS_LOAD);
  assign done       = (state == RS_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= RS_FETCH;
      bit_cnt       <= '0;
      pat_cnt       <= '0;
      sr            <= '0;
      pattern       <= '0;
      pattern_valid <= 1'b0;
      pattern_idx   <= '0;
      poly_sel      <= '0;
    end else if (restart) begin
      state         <= RS_FETCH;
      bit_cnt       <= '0;
      pat_cnt       <= '0;
      pattern_valid <= 1'b0;
    end else begin
      pattern_valid <= 1'b0;
      if (en) begin
        unique case (state)
          RS_FETCH: state <= RS_LOAD;
          RS_LOAD: begin
            poly_sel <= rom_poly;
            bit_cnt  <= '0;
            state    <= RS_RUN;
          end
          RS_RUN: begin
            sr <= (N-1)'({sr, scan_bit});
            if (bit_cnt == NW'(N - 1)) begin
              pattern       <= {sr, scan_bit};
              pattern_valid <= 1'b1;
              pattern_idx   <= pat_cnt;
              if (pat_cnt == MW'(M - 1)) begin
                state <= RS_DONE;
              end else begin
                pat_cnt <= pat_cnt + 1'b1;
                state   <= RS_FETCH;
              end
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
          default: ;  // RS_DONE: hold until restart
        endcase
      end
    end
  end

  // at most one LFSR shifts or loads at a time
  a_one_lfsr: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0(lfsr_en) && $onehot0(lfsr_load));
  // the ROM only names polynomials that exist
  a_poly_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == RS_LOAD) |-> (int'(rom_poly) < NPOLY));

endmodule
