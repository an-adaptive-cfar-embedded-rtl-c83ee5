// tb_acosd_n36: the end-to-end test of tb_acosd_cfar_top run on the second
// window size for which threshold tables are published: 36 reference cells,
// p = 24, two guard cells, 256-cell blocks. Same data model, same reference
// comparison, same mechanism counts; the per-cell budget becomes
// 7 + N - p = 19 clocks.
module tb_acosd_n36;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 36, P = 24, NGUARD = 2, NCELLS = 256;
  localparam int H = N / 2, GS = NGUARD / 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          ld_we = 1'b0;
  logic [7:0]    ld_addr = '0;
  sample_t       ld_data = '0;
  logic          start = 1'b0, alg_sel = 1'b0;
  logic          busy, done;
  logic [7:0]    res_addr = '0;
  logic          res_data;
  logic          cell_valid;
  logic [7:0]    cell_idx;
  logic          b_target, f_target;
  logic [KW-1:0] b_k, f_k;
  thr_t          b_log_thr, f_log_thr;
  logic [15:0]   b_count, f_count;
  logic [31:0]   cycles;

  acosd_cfar_top #(.N(N), .P(P)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, skipped = 0;
  int data [NCELLS];
  ref_res_t rb [NCELLS], rf [NCELLS];
  bit  dut_b [NCELLS], dut_f [NCELLS];
  int  n_bcens = 0, n_ball = 0, n_fstop = 0, n_fall = 0, n_btgt = 0, n_ftgt = 0, n_mode [2] = '{0, 0}, n_edge = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic int at(input int i);
    return (i < 0 || i >= NCELLS) ? 0 : data[i];
  endfunction

  task automatic make_block();
    int c, len;
    for (int i = 0; i < NCELLS; i++) data[i] = lognormal_code(1.0, 1.1, 1.0);
    for (int t = 0; t < 16; t++) data[$urandom % NCELLS] = lognormal_code(1.0, 1.1, (t % 2 == 1) ? 31.6 : 10.0);
    for (int g = 0; g < 4; g++) begin
      c = 2 * N + $urandom % (NCELLS - 4 * N);
      len = 3 + $urandom % (N - P);
      for (int i = 0; i < len; i++) data[c + i] = lognormal_code(1.0, 1.1, 100.0);
    end
    for (int c2 = 0; c2 < NCELLS; c2++) begin
      int x[];
      int j;
      x = new[N];
      j = 0;
      for (int i = 1; i <= H; i++) begin
        x[j++] = at(c2 - GS - i);
        x[j++] = at(c2 + GS + i);
      end
      sort_up(x);
      rb[c2] = ref_b(x, data[c2], N, P);
      rf[c2] = ref_f(x, data[c2], N, P);
    end
  endtask

  task automatic load_block();
    for (int i = 0; i < NCELLS; i++) begin
      ld_we = 1'b1;
      ld_addr = 8'(i);
      ld_data = sample_t'(data[i]);
      @(posedge clk);
      #1;
    end
    ld_we = 1'b0;
  endtask

  task automatic run_pass(input bit sel);
    int seen, last, per, nb, nf, busy_cycles;
    alg_sel = sel;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    seen = 0;
    last = 0;
    busy_cycles = 1;
    nb = 0;
    nf = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      busy_cycles++;
      if (cell_valid) begin
        int c;
        c = int'(cell_idx);
        check(c == seen, $sformatf("cell order %0d vs %0d", c, seen));
        dut_b[c] = b_target;
        dut_f[c] = f_target;
        if (b_target) nb++;
        if (f_target) nf++;
        if (rb[c].clear && rf[c].clear) begin
          check(b_target == rb[c].target, $sformatf("cell %0d B target %0d vs %0d", c, b_target, rb[c].target));
          check(f_target == rf[c].target, $sformatf("cell %0d F target %0d vs %0d", c, f_target, rf[c].target));
          check(int'(b_k) == rb[c].k, $sformatf("cell %0d B k %0d vs %0d", c, b_k, rb[c].k));
          check(int'(f_k) == rf[c].k, $sformatf("cell %0d F k %0d vs %0d", c, f_k, rf[c].k));
          check(fabs(real'(b_log_thr) / 1024.0 - rb[c].log_thr) < 0.01, $sformatf("cell %0d B threshold", c));
          check(fabs(real'(f_log_thr) / 1024.0 - rf[c].log_thr) < 0.01, $sformatf("cell %0d F threshold", c));
          if (seen > 0) begin
            per = busy_cycles - last;
            check(per == 7 + ((rb[c].tests > rf[c].tests) ? rb[c].tests : rf[c].tests),
                  $sformatf("cell %0d took %0d cycles", c, per));
          end
          if (rb[c].k > 0) n_bcens++;
          if (rb[c].k == N - P) n_ball++;
          if (rf[c].k < N - P) n_fstop++;
          if (rf[c].k == N - P) n_fall++;
          if (rb[c].target) n_btgt++;
          if (rf[c].target) n_ftgt++;
          if (c == 0 || c == NCELLS - 1) n_edge++;
        end else skipped++;
        if (seen > 0) check(busy_cycles - last <= 7 + N - P, $sformatf("cell %0d over its %0d-cycle budget", c, 7 + N - P));
        last = busy_cycles;
        seen++;
      end
    end
    check(seen == NCELLS, $sformatf("%0d cells decided", seen));
    check(int'(cycles) == busy_cycles, $sformatf("cycles output %0d vs %0d", cycles, busy_cycles));
    check(int'(b_count) == nb && int'(f_count) == nf, "target counters");
    check(!busy, "busy low after done");
    check(int'(cycles) <= NCELLS * (7 + N - P) + 3 * (H + GS) + 1, "pass within its cycle budget");
    $display("pass alg_sel=%0d: %0d cycles for %0d cells (%0.3f us per cell at 100 MHz), B targets %0d, F targets %0d",
             sel, cycles, NCELLS, real'(cycles) / NCELLS / 100.0, nb, nf);
    // read the result RAM back
    for (int i = 0; i < NCELLS; i++) begin
      res_addr = 8'(i);
      @(posedge clk);
      #1;
      check(res_data == (sel ? dut_f[i] : dut_b[i]), $sformatf("result RAM %0d", i));
    end
    n_mode[sel]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < 2; blk++) begin
      make_block();
      load_block();
      run_pass(1'b0);
      run_pass(1'b1);
    end
    $display("skipped %0d of %0d cell decisions as too close to call", skipped, 4 * NCELLS);
    $display("B censored: %0d, B all censored: %0d, F stopped: %0d, F all accepted: %0d, B targets: %0d, F targets: %0d, edge cells: %0d",
             n_bcens, n_ball, n_fstop, n_fall, n_btgt, n_ftgt, n_edge);
    check(n_bcens > 0, "B-ACOSD censoring happened");
    check(n_ball > 0, "B-ACOSD censored all N-p cells");
    check(n_fstop > 0, "F-ACOSD stopped on an interfering target");
    check(n_fall > 0, "F-ACOSD accepted all N-p cells");
    check(n_btgt > 0 && n_ftgt > 0, "targets declared by both algorithms");
    check(n_mode[0] > 0 && n_mode[1] > 0, "both result modes used");
    check(n_edge > 0, "edge cells decided");
    check(skipped < NCELLS / 4, "few decisions too close to call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
