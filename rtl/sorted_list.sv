// sorted_list: the reference cells kept in ascending order.
//
// Rather than sorting the whole reference window for every cell, the list is
// updated incrementally: as the window slides, one value leaves the reference
// set and another enters. An update removes the first entry equal to del_val
// (entries above it move down one place) and inserts ins_val after every
// remaining entry that is <= ins_val (entries above it move up one place).
// All N positions are computed in parallel, so one update takes one clock.
// A window step changes both the lagging and the leading half, so it takes
// two updates, i.e. two clocks, which matches the two-cycle sort of the
// source design (there done with a pointer-linked list in software).
//
// Interface: clr sets all entries to zero (matching a cleared delay line),
// upd applies one remove/insert. del_val must be present in the list; an
// assertion checks it. sorted[0] is the smallest value, X(1); sorted[N-1] is
// X(N). The output is registered.
module sorted_list
  import acosd_pkg::*;
#(
  parameter int N = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    upd,
  input  sample_t del_val,
  input  sample_t ins_val,
  output sample_t sorted [N]
);

  localparam int IW = $clog2(N + 1);

  sample_t           rem [N-1];
  sample_t           nxt [N];
  logic              found;
  logic [IW-1:0]     d;
  logic [IW-1:0]     pos;

  always_comb begin
    // position of the value that leaves
    found = 1'b0;
    d     = IW'(N - 1);
    for (int i = 0; i < N; i++) begin
      if (!found && sorted[i] == del_val) begin
        found = 1'b1;
        d     = IW'(i);
      end
    end
    // list without it
    for (int i = 0; i < N - 1; i++)
      rem[i] = (IW'(i) < d) ? sorted[i] : sorted[i+1];
    // insertion point: number of remaining entries <= ins_val
    pos = '0;
    for (int i = 0; i < N - 1; i++)
      if (rem[i] <= ins_val) pos = pos + 1'b1;
    nxt[0] = (pos == 0) ? ins_val : rem[0];
    for (int i = 1; i < N; i++) begin
      if (IW'(i) < pos)       nxt[i] = rem[i];
      else if (IW'(i) == pos) nxt[i] = ins_val;
      else                    nxt[i] = rem[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sorted[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N; i++) sorted[i] <= '0;
    end else if (upd) begin
      sorted <= nxt;
    end
  end

  a_del_present: assert property (@(posedge clk) disable iff (!rst_n) (upd && !clr) |-> found)
    else $error("sorted_list: removed value %0d is not in the list", del_val);

endmodule
