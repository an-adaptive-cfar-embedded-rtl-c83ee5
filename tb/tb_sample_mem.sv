// tb_sample_mem: fills all 256 words with random data, reads them back in a
// random order and checks each word one clock after its address; then checks
// that a write and a read in the same clock to different words do not mix.
module tb_sample_mem;
  logic        clk = 1'b0, we = 1'b0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  sample_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 256; i++) begin
      we = 1'b1; waddr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
      @(posedge clk);
      #1;
    end
    we = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      a = $urandom % 256;
      raddr = 8'(a);
      if (i % 3 == 0) begin
        we = 1'b1; waddr = 8'(a ^ 1); wdata = 16'($urandom);
      end else we = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 20) $display("FAIL addr %0d: %h vs %h", a, rdata, model[a]);
      end
      if (we) model[a ^ 1] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
