// f_acosd: forward automatic censored ordered statistics detector for one
// cell under test (CUT).
//
// Censoring step: starting just above X(p), X(p+k+1) is tested against
// T^_ck = X(1)^(1-alpha^_k) * X(p+k)^alpha^_k for k = 0, 1, ... . A cell not
// above its threshold is clutter and is accepted; testing stops at the first
// cell above its threshold (an interfering target, which with all larger
// cells is censored), or when all N-p cells above X(p) are accepted
// (k = N-p).
// Detection step: the CUT is declared a target when it exceeds
// T^_ak = X(1)^(1-beta^_k) * X(p+k)^beta^_k, k being the number of accepted
// cells. Thresholds are formed in the log domain from log2 table values, as
// in b_acosd. The search direction, the tables and the stopping rules follow
// the source design; the exponents are placed as in the backward detector
// (the coefficient tables, all above 1, only give a threshold above X(p+k)
// that way). Formats, schedule and tie handling (ties go to H0) are this
// design's choices.
//
// Timing: identical to b_acosd: done pulses 3 + (number of tests) cycles
// after the start cycle, at most N-p+3. sorted and cut must stay stable from
// start to done.
module f_acosd
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

  localparam int NC = N - P;   // cells above X(p) that are tested

  initial begin
    if (!coef_supported(N, P)) $error("f_acosd: no coefficient table for this (N, P)");
  end

  coef_t alpha_tab [NC];
  coef_t beta_tab  [NC+1];
  for (genvar i = 0; i < NC; i++) begin : g_alpha
    assign alpha_tab[i] = milli_to_q(f_alpha_milli(N, P, i));
  end
  for (genvar i = 0; i <= NC; i++) begin : g_beta
    assign beta_tab[i] = milli_to_q(f_beta_milli(N, P, i));
  end

  typedef enum logic [1:0] {S_IDLE, S_RD, S_CENS, S_DET} state_t;
  state_t        state;
  sample_t       addr_a, addr_b;
  log_t          qa, qb;
  log_t          l1, lcur, l0, lsel;
  logic [KW-1:0] kc;
  thr_t          tck, tak;
  logic          interf;

  log_lut u_lut (.clk(clk), .addr_a(addr_a), .addr_b(addr_b), .log_a(qa), .log_b(qb));

  // lcur holds log X(p+k); qa holds log X(p+k+1) during S_CENS
  assign tck    = log_threshold(l1, lcur, alpha_tab[(int'(kc) < NC) ? int'(kc) : 0]);
  assign interf = thr_t'(qa) > tck;
  assign tak    = log_threshold(l1, lsel, beta_tab[int'(kc)]);

  always_comb begin
    addr_a = sorted[0];
    addr_b = sorted[P-1];
    unique case (state)
      S_IDLE: begin addr_a = sorted[0];            addr_b = sorted[P-1]; end
      S_RD:   begin addr_a = sorted[P];            addr_b = cut;         end
      S_CENS: begin addr_a = sorted[(int'(kc) + P + 1 < N) ? int'(kc) + P + 1 : N - 1]; addr_b = cut; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      kc      <= '0;
      l1      <= '0;
      lcur    <= '0;
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
          lcur  <= qb;                   // log X(p)
          state <= S_CENS;
        end
        S_CENS: begin
          if (kc == '0) l0 <= qb;
          if (interf) begin
            lsel  <= lcur;               // stop: threshold on X(p+k)
            state <= S_DET;
          end else if (int'(kc) == NC - 1) begin
            kc    <= kc + 1'b1;          // all accepted: X(p+k) = X(N)
            lsel  <= qa;
            state <= S_DET;
          end else begin
            kc    <= kc + 1'b1;
            lcur  <= qa;
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
