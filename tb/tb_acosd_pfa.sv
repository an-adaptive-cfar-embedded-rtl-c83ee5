// tb_acosd_pfa: false-alarm and detection measurement on the full detector
// (default size: 256-cell blocks, 16 reference cells, p = 12).
//
// Many blocks of lognormal clutter (ln X ~ N(1, 1.1)) are processed, with 1 %
// of the cells replaced by targets whose amplitude is 10^(SCR/20) times a
// clutter draw, for SCR = 20 dB and 30 dB (the two signal-to-clutter ratios
// of the board measurement the design is modelled on, there run on 10^6
// cells). Every decision of both detectors that is not within rounding of
// its threshold is compared with tb_ref_pkg. The testbench reports, per SCR
// and algorithm, the detected targets and the false-alarm rate over the
// clutter cells, and requires the false-alarm rate to stay below 2e-3 (the
// design value is 1e-3) and the detector to find more targets at 30 dB than
// at 20 dB.
module tb_acosd_pfa;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16, P = 12, NGUARD = 2, NCELLS = 256;
  localparam int H = N / 2, GS = NGUARD / 2;
  localparam int BLOCKS = 3907;               // per SCR

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

  acosd_cfar_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, skipped = 0;
  int data [NCELLS];
  bit is_tgt [NCELLS];
  ref_res_t rb [NCELLS], rf [NCELLS];

  initial begin
    repeat (2 * BLOCKS * 3200 + 10000) @(posedge clk);
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

  initial begin
    real scr [2] = '{20.0, 30.0};
    int  n_tgt, n_clut, det_b, det_f, fa_b, fa_f;
    int  det_b_scr [2];
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      n_tgt = 0; n_clut = 0; det_b = 0; det_f = 0; fa_b = 0; fa_f = 0;
      for (int blk = 0; blk < BLOCKS; blk++) begin
        for (int i = 0; i < NCELLS; i++) begin
          is_tgt[i] = ($urandom % 100) == 0;
          data[i] = lognormal_code(1.0, 1.1, is_tgt[i] ? $pow(10.0, scr[s] / 20.0) : 1.0);
        end
        for (int c = 0; c < NCELLS; c++) begin
          int x[];
          int j;
          x = new[N];
          j = 0;
          for (int i = 1; i <= H; i++) begin
            x[j++] = at(c - GS - i);
            x[j++] = at(c + GS + i);
          end
          sort_up(x);
          rb[c] = ref_b(x, data[c], N, P);
          rf[c] = ref_f(x, data[c], N, P);
        end
        for (int i = 0; i < NCELLS; i++) begin
          ld_we = 1'b1; ld_addr = 8'(i); ld_data = sample_t'(data[i]);
          @(posedge clk);
          #1;
        end
        ld_we = 1'b0;
        alg_sel = blk[0];
        start = 1'b1;
        @(posedge clk);
        #1;
        start = 1'b0;
        while (!done) begin
          @(posedge clk);
          #1;
          if (cell_valid) begin
            int c;
            c = int'(cell_idx);
            if (rb[c].clear) check(b_target == rb[c].target, $sformatf("SCR %0.0f block %0d cell %0d B", scr[s], blk, c));
            else skipped++;
            if (rf[c].clear) check(f_target == rf[c].target, $sformatf("SCR %0.0f block %0d cell %0d F", scr[s], blk, c));
            else skipped++;
            if (is_tgt[c]) begin
              n_tgt++;
              if (b_target) det_b++;
              if (f_target) det_f++;
            end else begin
              n_clut++;
              if (b_target) fa_b++;
              if (f_target) fa_f++;
            end
          end
        end
      end
      $display("SCR %0.0f dB: %0d cells, %0d targets; B-ACOSD detected %0d, false alarms %0d (Pfa %f); F-ACOSD detected %0d, false alarms %0d (Pfa %f)",
               scr[s], n_tgt + n_clut, n_tgt, det_b, fa_b, real'(fa_b) / n_clut, det_f, fa_f, real'(fa_f) / n_clut);
      check(real'(fa_b) / n_clut < 2.0e-3, "B-ACOSD false-alarm rate below 2e-3");
      check(real'(fa_f) / n_clut < 2.0e-3, "F-ACOSD false-alarm rate below 2e-3");
      det_b_scr[s] = det_b;
    end
    check(det_b_scr[1] > det_b_scr[0], "more detections at 30 dB than at 20 dB");
    check(skipped < BLOCKS * NCELLS / 20, "few decisions too close to call");
    $display("skipped %0d decisions as too close to call", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
