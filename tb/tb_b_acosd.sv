// tb_b_acosd: self-checking test of the B-ACOSD detector (N=16, p=12).
//
// Each trial draws 16 lognormal clutter cells (ln X ~ N(1, 1.1)), replaces
// 0 to 5 of them by interfering targets 3 to 40 times stronger, sorts them
// and presents them with a cell under test that holds a target half of the
// time. The censoring count, the decision, the detection threshold and the
// latency (done exactly tests+2 clocks after the start edge) are compared
// with tb_ref_pkg. Decisions within the hardware's rounding of a threshold
// are not judged. Censoring must happen, stop early and run to the end in
// some trials each.
module tb_b_acosd;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int P = 12;
  localparam int TRIALS = 3000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  sample_t       sorted [N];
  sample_t       cut;
  logic          done, target;
  logic [KW-1:0] k;
  thr_t          log_thr;

  int checks = 0, failures = 0, skipped = 0;
  int n_kmin = 0, n_kmid = 0, n_kmax = 0, n_tgt = 0;

  b_acosd #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  initial begin
    int x[];
    int c, ninterf, lat;
    ref_res_t r;
    x = new[N];
    for (int i = 0; i < N; i++) sorted[i] = '0;
    cut = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      for (int i = 0; i < N; i++) x[i] = lognormal_code(1.0, 1.1, 1.0);
      ninterf = $urandom % 6;
      for (int i = 0; i < ninterf; i++) x[$urandom % N] = lognormal_code(1.0, 1.1, 3.0 + real'($urandom % 38));
      sort_up(x);
      c = lognormal_code(1.0, 1.1, ($urandom % 2 == 1) ? 3.0 + real'($urandom % 38) : 1.0);
      for (int i = 0; i < N; i++) sorted[i] = sample_t'(x[i]);
      cut = sample_t'(c);
      r = ref_b(x, c, N, P);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      lat = 0;
      do begin
        @(posedge clk);
        #1;
        lat++;
      end while (!done && lat < 50);
      if (!r.clear) begin
        skipped++;
      end else begin
        check(int'(k) == r.k, $sformatf("trial %0d k=%0d expected %0d", t, k, r.k));
        check(target == r.target, $sformatf("trial %0d target=%0d expected %0d", t, target, r.target));
        check(fabs(real'(log_thr) / 1024.0 - r.log_thr) < 0.01,
              $sformatf("trial %0d log_thr=%f expected %f", t, real'(log_thr) / 1024.0, r.log_thr));
        check(lat == r.tests + 2, $sformatf("trial %0d latency %0d expected %0d", t, lat, r.tests + 2));
        if (r.k == 0) n_kmin++;
        else if (r.k == N - P) n_kmax++;
        else n_kmid++;
        if (r.target) n_tgt++;
      end
    end
    $display("judged %0d, skipped %0d; k=0: %0d, 0<k<N-p: %0d, k=N-p: %0d, targets: %0d",
             TRIALS - skipped, skipped, n_kmin, n_kmid, n_kmax, n_tgt);
    check(n_kmin > 0 && n_kmid > 0 && n_kmax > 0 && n_tgt > 0, "every censoring outcome seen");
    check(skipped < TRIALS / 10, "few trials too close to call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
