// tb_ref_pkg: reference model of the ACOSD detectors for the testbenches.
//
// Written independently of the RTL, in real arithmetic: the log of a sample
// is the natural-log based log2 of the middle of its table step, the
// coefficients are the published decimal values, and the censoring and
// detection rules are applied literally. Each comparison also reports its
// margin, so a testbench can skip decisions that lie within the fixed-point
// rounding of the hardware (a few 1/1024 of log2).
package tb_ref_pkg;

  localparam real EPS = 8.0 / 1024.0;   // decisions closer than this are not judged

  // log2 of the table value a 16-bit Q11.5 sample reads
  function automatic real lut_log2(input int raw);
    real v;
    int  s;
    if (raw < 320) v = ((raw < 1) ? 1.0 : real'(raw)) / 32.0;
    else if (raw < 3200) begin
      s = 320 + ((raw - 320) / 4) * 4;
      v = (real'(s) + 2.0) / 32.0;
    end else begin
      s = 3200 + ((raw - 3200) / 32) * 32;
      v = (real'(s) + 16.0) / 32.0;
    end
    return $ln(v) / $ln(2.0);
  endfunction

  function automatic real b_alpha(input int n, input int k);
    real a16 [4]  = '{2.596, 2.038, 1.709, 1.443};
    real a36 [12] = '{2.538, 2.154, 1.953, 1.812, 1.7, 1.601, 1.523, 1.443, 1.369, 1.3, 1.225, 1.153};
    return (n == 16) ? a16[k] : a36[k];
  endfunction
  function automatic real b_beta(input int n, input int k);
    real b16 [5]  = '{1.635, 1.889, 2.12, 2.37, 2.64};
    real b36 [13] = '{1.35, 1.465, 1.566, 1.65, 1.73, 1.8, 1.87, 1.94, 2.02, 2.1, 2.18, 2.265, 2.345};
    return (n == 16) ? b16[k] : b36[k];
  endfunction
  function automatic real f_alpha(input int n, input int k);
    real a16 [4]  = '{1.442, 1.465, 1.535, 1.745};
    real a36 [12] = '{1.15, 1.152, 1.154, 1.158, 1.16, 1.167, 1.174, 1.191, 1.21, 1.264, 1.311, 1.467};
    return (n == 16) ? a16[k] : a36[k];
  endfunction
  function automatic real f_beta(input int n, input int k);
    real b16 [5]  = '{2.64, 2.37, 2.12, 1.889, 1.635};
    real b36 [13] = '{2.345, 2.265, 2.18, 2.1, 2.02, 1.94, 1.87, 1.8, 1.73, 1.65, 1.566, 1.465, 1.35};
    return (n == 16) ? b16[k] : b36[k];
  endfunction

  // log2 of X(1)^(1-a) * X(j)^a
  function automatic real thr(input real l1, input real lj, input real a);
    return (1.0 - a) * l1 + a * lj;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  typedef struct {
    int  k;        // B: cells censored; F: cells accepted above X(p)
    int  tests;    // censoring comparisons made
    bit  target;
    real log_thr;  // log2 of the detection threshold
    bit  clear;    // every comparison had a margin above EPS
  } ref_res_t;

  // x: N reference samples sorted ascending (raw codes), cut: raw code
  function automatic ref_res_t ref_b(input int x[], input int cut, input int n, input int p);
    ref_res_t r;
    real l1, lp, lj, t;
    int  k;
    r.clear = 1;
    l1 = lut_log2(x[0]);
    lp = lut_log2(x[p-1]);
    k = 0;
    r.tests = 0;
    while (k < n - p) begin
      lj = lut_log2(x[n-1-k]);
      t  = thr(l1, lp, b_alpha(n, k));
      r.tests++;
      if (fabs(lj - t) < EPS) r.clear = 0;
      if (lj > t) k++;
      else break;
    end
    r.k = k;
    r.log_thr = thr(l1, lut_log2(x[n-1-k]), b_beta(n, k));
    r.target = lut_log2(cut) > r.log_thr;
    if (fabs(lut_log2(cut) - r.log_thr) < EPS) r.clear = 0;
    return r;
  endfunction

  function automatic ref_res_t ref_f(input int x[], input int cut, input int n, input int p);
    ref_res_t r;
    real l1, lj, lnext, t;
    int  k;
    r.clear = 1;
    l1 = lut_log2(x[0]);
    k = 0;
    r.tests = 0;
    while (k < n - p) begin
      lj    = lut_log2(x[p-1+k]);       // X(p+k)
      lnext = lut_log2(x[p+k]);         // X(p+k+1)
      t     = thr(l1, lj, f_alpha(n, k));
      r.tests++;
      if (fabs(lnext - t) < EPS) r.clear = 0;
      if (lnext > t) break;
      k++;
    end
    r.k = k;
    r.log_thr = thr(l1, lut_log2(x[p-1+k]), f_beta(n, k));
    r.target = lut_log2(cut) > r.log_thr;
    if (fabs(lut_log2(cut) - r.log_thr) < EPS) r.clear = 0;
    return r;
  endfunction

  // Lognormal clutter sample (ln X ~ N(mu, sigma)) times amp, as a Q11.5 code
  function automatic int lognormal_code(input real mu, input real sigma, input real amp);
    real u1, u2, z, v;
    u1 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    u2 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    z  = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
    v  = $exp(mu + sigma * z) * amp * 32.0;
    if (v > 65535.0) return 65535;
    return int'(v);
  endfunction

  function automatic void sort_up(ref int x[]);
    int t;
    for (int i = 0; i < x.size(); i++)
      for (int j = 0; j < x.size() - 1 - i; j++)
        if (x[j] > x[j+1]) begin
          t = x[j]; x[j] = x[j+1]; x[j+1] = t;
        end
  endfunction

endpackage
