// tap_delay_line: the sliding CFAR window.
//
// Samples enter at taps[0] and move one place per shift. The window holds,
// from newest to oldest, N/2 leading reference cells, NGUARD/2 guard cells,
// the cell under test, NGUARD/2 guard cells and N/2 lagging reference cells,
// so WIN = N + NGUARD + 1 taps. With the defaults (16 reference cells, two
// guard cells) the cell under test is taps[9] of 19. Splitting the guard
// cells evenly between the two sides is this design's reading of "two guard
// cells"; the shift-register window itself is the classic CFAR structure.
//
// Interface: clr zeroes every tap (synchronous), shift loads din; clr wins.
// taps is registered: it shows the window after the last shift.
module tap_delay_line
  import acosd_pkg::*;
#(
  parameter int N      = 16,
  parameter int NGUARD = 2,
  localparam int WIN   = N + NGUARD + 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    shift,
  input  sample_t din,
  output sample_t taps [WIN]
);

  initial begin
    if (N % 2 != 0 || NGUARD % 2 != 0)
      $error("tap_delay_line: N and NGUARD must be even");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) taps[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < WIN; i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int i = 1; i < WIN; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
