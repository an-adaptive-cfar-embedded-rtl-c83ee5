// tb_log_lut: reads every one of the 65536 sample codes through both ports
// of log_lut (port B in reverse order) and compares each word, one clock
// after its address, with log2 of the middle of the code's table step
// computed in real arithmetic (tolerance: the 1/2048 rounding plus 1/1024).
// Spot checks: log2(1.0) = 0, log2(2.0) = 1024, log2(8.0) = 3072 (Q.10).
module tb_log_lut;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 1'b0;
  sample_t addr_a, addr_b;
  log_t    log_a, log_b;
  int checks = 0, failures = 0;

  log_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int pa, pb;
    addr_a = '0;
    addr_b = '0;
    pa = -1;
    pb = -1;
    for (int i = 0; i < 65536; i++) begin
      addr_a = sample_t'(i);
      addr_b = sample_t'(65535 - i);
      pa = i;
      pb = 65535 - i;
      @(posedge clk);
      #1;
      begin
        check(fabs(real'(log_a) - 1024.0 * lut_log2(pa)) <= 1.5, $sformatf("A code %0d: %0d vs %f", pa, log_a, 1024.0 * lut_log2(pa)));
        check(fabs(real'(log_b) - 1024.0 * lut_log2(pb)) <= 1.5, $sformatf("B code %0d: %0d vs %f", pb, log_b, 1024.0 * lut_log2(pb)));
        if (pa == 32)    check(log_a == 16'sd0,     "log2(1) = 0");
        if (pa == 64)    check(log_a == 16'sd1024,  "log2(2) = 1");
        if (pb == 256)   check(log_b == 16'sd3072,  "log2(8) = 3");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
