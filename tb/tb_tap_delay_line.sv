// tb_tap_delay_line: shifts random samples into the 19-tap window (16
// reference cells, 2 guard cells) with random gaps, and compares every tap
// with a queue model after each clock; then checks that clr empties it.
module tb_tap_delay_line;
  import acosd_pkg::*;

  localparam int N = 16, NGUARD = 2, WIN = N + NGUARD + 1;
  logic    clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift = 1'b0;
  sample_t din = '0;
  sample_t taps [WIN];
  int checks = 0, failures = 0;
  sample_t model [WIN];

  tap_delay_line #(.N(N), .NGUARD(NGUARD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < WIN; i++) begin
      checks++;
      if (taps[i] != model[i]) begin
        failures++;
        if (failures < 20) $display("FAIL %s tap %0d: %0d vs %0d", what, i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < WIN; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare("after reset");
    for (int t = 0; t < 500; t++) begin
      shift = ($urandom % 4) != 0;
      din   = sample_t'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = WIN - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      #1 compare($sformatf("step %0d", t));
    end
    clr = 1'b1;
    shift = 1'b1;
    @(posedge clk);
    #1;
    clr = 1'b0;
    shift = 1'b0;
    for (int i = 0; i < WIN; i++) model[i] = '0;
    compare("after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
