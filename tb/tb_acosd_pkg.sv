// tb_acosd_pkg: checks the coefficient tables and the log-domain threshold
// function of acosd_pkg against the published decimal values and real
// arithmetic: every coefficient of both configurations within half a Q4.12
// step of its decimal value, and log_threshold() within 2/1024 of
// (1-a)*l1 + a*lj for random inputs.
module tb_acosd_pkg;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real q(input coef_t c);
    return real'(c) / 4096.0;
  endfunction

  initial begin
    int ns [2] = '{16, 36};
    int ps [2] = '{12, 24};
    log_t l1, lj;
    coef_t a;
    thr_t t;
    real  e;
    for (int c = 0; c < 2; c++) begin
      check(coef_supported(ns[c], ps[c]) == 1'b1, "configuration supported");
      for (int k = 0; k < ns[c] - ps[c]; k++) begin
        check(fabs(q(milli_to_q(b_alpha_milli(ns[c], ps[c], k))) - b_alpha(ns[c], k)) < 0.00013,
              $sformatf("B alpha N=%0d k=%0d", ns[c], k));
        check(fabs(q(milli_to_q(f_alpha_milli(ns[c], ps[c], k))) - f_alpha(ns[c], k)) < 0.00013,
              $sformatf("F alpha N=%0d k=%0d", ns[c], k));
      end
      for (int k = 0; k <= ns[c] - ps[c]; k++) begin
        check(fabs(q(milli_to_q(b_beta_milli(ns[c], ps[c], k))) - b_beta(ns[c], k)) < 0.00013,
              $sformatf("B beta N=%0d k=%0d", ns[c], k));
        check(fabs(q(milli_to_q(f_beta_milli(ns[c], ps[c], k))) - f_beta(ns[c], k)) < 0.00013,
              $sformatf("F beta N=%0d k=%0d", ns[c], k));
      end
    end
    check(coef_supported(20, 10) == 1'b0, "unsupported configuration flagged");
    for (int i = 0; i < 5000; i++) begin
      l1 = log_t'(int'($urandom % 16384) - 5120);
      lj = log_t'(int'($urandom % 16384) - 5120);
      a  = coef_t'($urandom % 12000);
      t  = log_threshold(l1, lj, a);
      e  = (1.0 - q(a)) * real'(l1) + q(a) * real'(lj);
      check(fabs(real'(t) - e) <= 2.0, $sformatf("threshold l1=%0d lj=%0d a=%0d: %0d vs %f", l1, lj, a, t, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
