// acosd_pkg: types, number formats and threshold coefficients shared by the
// ACOSD (automatic censored ordered statistics detector) CFAR blocks.
//
// Number formats (this design's choice, sized to the detector's data range):
//   sample_t  16-bit unsigned, 5 fraction bits (Q11.5): 0 .. 2047.97 in steps
//             of 1/32, which covers the 1 .. 2000 range of the log table.
//   log_t     16-bit signed log2 value, 10 fraction bits (Q5.10).
//   thr_t     24-bit signed log2 threshold, 10 fraction bits (room for the
//             extrapolation X(1) * (X(j)/X(1))^a with a up to 2.64).
//   coef_t    16-bit unsigned coefficient, 12 fraction bits (Q4.12).
//
// The coefficient tables are those obtained by Monte Carlo simulation for
// Pfa = 1e-3 and Pfc = 1e-2, for reference windows (N, p) = (16, 12) and
// (36, 24). They are stored in thousandths and converted to Q4.12 with
// rounding. Index k is the step number of the censoring test (alpha) or the
// censoring outcome (beta): alpha has N-p entries, beta has N-p+1.
// For any other (N, p) the functions return 0 and coef_supported() is 0.
package acosd_pkg;

  localparam int DW         = 16;
  localparam int SAMPLE_FRAC = 5;
  localparam int LOG_W      = 16;
  localparam int LOG_FRAC   = 10;
  localparam int THR_W      = 24;
  localparam int COEF_W     = 16;
  localparam int COEF_FRAC  = 12;
  localparam int KW         = 5;     // width of the censoring counters (N-p <= 31)

  typedef logic        [DW-1:0]     sample_t;
  typedef logic signed [LOG_W-1:0]  log_t;
  typedef logic signed [THR_W-1:0]  thr_t;
  typedef logic        [COEF_W-1:0] coef_t;

  // Thousandths -> Q4.12, rounded to nearest.
  function automatic coef_t milli_to_q(input int milli);
    return coef_t'((milli * (1 << COEF_FRAC) + 500) / 1000);
  endfunction

  function automatic bit coef_supported(input int n, input int p);
    return (n == 16 && p == 12) || (n == 36 && p == 24);
  endfunction

  // B-ACOSD censoring coefficient alpha_k, in thousandths.
  function automatic int b_alpha_milli(input int n, input int p, input int k);
    int t16 [4]  = '{2596, 2038, 1709, 1443};
    int t36 [12] = '{2538, 2154, 1953, 1812, 1700, 1601, 1523, 1443, 1369, 1300, 1225, 1153};
    if (n == 16 && p == 12 && k >= 0 && k < 4)  return t16[k];
    if (n == 36 && p == 24 && k >= 0 && k < 12) return t36[k];
    return 0;
  endfunction

  // B-ACOSD detection coefficient beta_k, in thousandths.
  function automatic int b_beta_milli(input int n, input int p, input int k);
    int t16 [5]  = '{1635, 1889, 2120, 2370, 2640};
    int t36 [13] = '{1350, 1465, 1566, 1650, 1730, 1800, 1870, 1940, 2020, 2100, 2180, 2265, 2345};
    if (n == 16 && p == 12 && k >= 0 && k < 5)  return t16[k];
    if (n == 36 && p == 24 && k >= 0 && k < 13) return t36[k];
    return 0;
  endfunction

  // F-ACOSD censoring coefficient alpha^_k, in thousandths.
  function automatic int f_alpha_milli(input int n, input int p, input int k);
    int t16 [4]  = '{1442, 1465, 1535, 1745};
    int t36 [12] = '{1150, 1152, 1154, 1158, 1160, 1167, 1174, 1191, 1210, 1264, 1311, 1467};
    if (n == 16 && p == 12 && k >= 0 && k < 4)  return t16[k];
    if (n == 36 && p == 24 && k >= 0 && k < 12) return t36[k];
    return 0;
  endfunction

  // F-ACOSD detection coefficient beta^_k, in thousandths.
  function automatic int f_beta_milli(input int n, input int p, input int k);
    int t16 [5]  = '{2640, 2370, 2120, 1889, 1635};
    int t36 [13] = '{2345, 2265, 2180, 2100, 2020, 1940, 1870, 1800, 1730, 1650, 1566, 1465, 1350};
    if (n == 16 && p == 12 && k >= 0 && k < 5)  return t16[k];
    if (n == 36 && p == 24 && k >= 0 && k < 13) return t36[k];
    return 0;
  endfunction

  // Log-domain threshold: l1 + a * (lj - l1), i.e. log2(X(1)^(1-a) * X(j)^a).
  function automatic thr_t log_threshold(input log_t l1, input log_t lj, input coef_t a);
    logic signed [LOG_W:0]          diff;
    logic signed [LOG_W+COEF_W+1:0] prod;
    diff = {lj[LOG_W-1], lj} - {l1[LOG_W-1], l1};
    prod = diff * $signed({1'b0, a});
    return thr_t'(l1) + thr_t'(prod >>> COEF_FRAC);
  endfunction

endpackage
