// sample_mem: input data memory of the detector, DEPTH words of DW bits
// (16 x 256 by default, the size of the source design's input data ROM).
// The host writes the radar samples through the write port before a run;
// the detector reads them through the read port. The read is registered
// (one clock latency), as in an FPGA block RAM. Contents are not reset.
module sample_mem #(
  parameter int DEPTH = 256,
  parameter int DW    = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
