// b_acosd: backward automatic censored ordered statistics detector for one
// cell under test (CUT).
//
// Censoring step: starting from the largest reference cell, X(N-k) is tested
// against T_ck = X(1)^(1-alpha_k) * X(p)^alpha_k for k = 0, 1, ... . A cell
// above its threshold is an interfering target and is censored; testing
// stops at the first cell that is not above its threshold, or after all N-p
// cells above X(p) are censored (k = N-p).
// Detection step: the CUT is declared a target when it exceeds
// T_ak = X(1)^(1-beta_k) * X(N-k)^beta_k, k being the number of censored
// cells. Both thresholds are formed in the log domain,
// log T = log X(1) + a * (log X(j) - log X(1)), with log2 values from a
// look-up table; alpha_k and beta_k are the published Monte Carlo values for
// (N, p). The algorithm and tables follow the source design; the log2 base,
// the fixed-point formats and the cycle schedule are this design's choices.
// Ties go to H0 (no censoring, no target).
//
// Timing: the start cycle reads log X(1) and log X(p); the next cycle reads
// log X(N) and log CUT; then one cycle per censoring test (test k and the
// read for test k+1 overlap); then one detection cycle. done, with target, k
// and log_thr, pulses 3 + (number of tests) cycles after the start cycle, at
// most N-p+3 (7 for N=16, p=12). sorted and cut must stay stable from start
// to done; a new start is accepted the cycle done is high.
module b_acosd
  import acosd_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  sample_t       sorted [N],
  input  sample_t       cut,
  output logic          done,
  output logic          target,
  output logic [KW-1:0] k,
  output thr_t          log_thr
);

  localparam int NC = N - P;   // cells that may be censored

  initial begin
    if (!coef_supported(N, P)) $error("b_acosd: no coefficient table for this (N, P)");
  end

  coef_t alpha_tab [NC];
  coef_t beta_tab  [NC+1];
  for (genvar i = 0; i < NC; i++) begin : g_alpha
    assign alpha_tab[i] = milli_to_q(b_alpha_milli(N, P, i));
  end
  for (genvar i = 0; i <= NC; i++) begin : g_beta
    assign beta_tab[i] = milli_to_q(b_beta_milli(N, P, i));
  end

  typedef enum logic [1:0] {S_IDLE, S_RD, S_CENS, S_DET} state_t;
  state_t        state;
  sample_t       addr_a, addr_b;
  log_t          qa, qb;
  log_t          l1, lp, l0, lsel;
  logic [KW-1:0] kc;
  thr_t          tck, tak;
  logic          censor;

  log_lut u_lut (.clk(clk), .addr_a(addr_a), .addr_b(addr_b), .log_a(qa), .log_b(qb));

  assign tck    = log_threshold(l1, lp, alpha_tab[(int'(kc) < NC) ? int'(kc) : 0]);
  assign censor = thr_t'(qa) > tck;
  assign tak    = log_threshold(l1, lsel, beta_tab[int'(kc)]);

  // LUT addresses for the next cycle's data
  always_comb begin
    addr_a = sorted[0];
    addr_b = sorted[P-1];
    unique case (state)
      S_IDLE: begin addr_a = sorted[0];   addr_b = sorted[P-1]; end
      S_RD:   begin addr_a = sorted[N-1]; addr_b = cut;         end
      S_CENS: begin addr_a = sorted[N-2-int'(kc)]; addr_b = cut; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      kc      <= '0;
      l1      <= '0;
      lp      <= '0;
      l0      <= '0;
      lsel    <= '0;
      done    <= 1'b0;
      target  <= 1'b0;
      k       <= '0;
      log_thr <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kc    <= '0;
          state <= S_RD;
        end
        S_RD: begin
          l1    <= qa;
          lp    <= qb;
          state <= S_CENS;
        end
        S_CENS: begin
          if (kc == '0) l0 <= qb;
          if (!censor) begin
            lsel  <= qa;                 // X(N-k) is clutter: threshold on it
            state <= S_DET;
          end else if (int'(kc) == NC - 1) begin
            kc    <= kc + 1'b1;          // all N-p censored: X(N-k) = X(p)
            lsel  <= lp;
            state <= S_DET;
          end else begin
            kc    <= kc + 1'b1;
          end
        end
        S_DET: begin
          target  <= thr_t'(l0) > tak;
          k       <= kc;
          log_thr <= tak;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
