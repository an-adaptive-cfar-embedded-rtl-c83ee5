// result_mem: output memory of the detector, one target flag per range cell
// (1 x 256 by default, as in the source design). The detector writes the
// flag of each cell under test at its index; the host reads the flags
// through the read port, registered (one clock latency). No reset: the
// detector writes every address in a pass.
module result_mem #(
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
