// tb_sorted_list: slides a 16-cell reference set over a random stream, with
// values from a small range so that duplicates are frequent. Each step is
// applied as the detector does it, a remove/insert pair per clock, and after
// every clock the list must equal the current set sorted from scratch. Also
// checks that upd low holds the list and that clr empties it to zeros.
module tb_sorted_list;
  import acosd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  logic    clk = 1'b0, rst_n = 1'b0, clr = 1'b0, upd = 1'b0;
  sample_t del_val = '0, ins_val = '0;
  sample_t sorted [N];
  int checks = 0, failures = 0;

  sorted_list #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int set[$], input string what);
    int x[];
    x = new[N];
    foreach (set[i]) x[i] = set[i];
    sort_up(x);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(sorted[i]) != x[i]) begin
        failures++;
        if (failures < 20) $display("FAIL %s pos %0d: %0d vs %0d", what, i, sorted[i], x[i]);
      end
    end
  endtask

  initial begin
    int set[$];
    int pos, v, range;
    for (int i = 0; i < N; i++) set.push_back(0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare(set, "reset");
    for (int t = 0; t < 3000; t++) begin
      range = (t < 1500) ? 8 : 65536;
      pos = $urandom % N;
      v = $urandom % range;
      del_val = sample_t'(set[pos]);
      ins_val = sample_t'(v);
      upd = ($urandom % 8) != 0;
      @(posedge clk);
      if (upd) set[pos] = v;
      #1 compare(set, $sformatf("step %0d", t));
    end
    upd = 1'b0;
    clr = 1'b1;
    @(posedge clk);
    #1;
    clr = 1'b0;
    foreach (set[i]) set[i] = 0;
    compare(set, "clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
