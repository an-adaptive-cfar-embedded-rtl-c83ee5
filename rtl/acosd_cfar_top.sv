// acosd_cfar_top: ACOSD CFAR detector over a block of range cells.
//
// A radar return block of NCELLS samples (16-bit, Q11.5) is loaded into the
// sample memory by the host. On start the detector slides a window of N
// reference cells, NGUARD guard cells and one cell under test (CUT) over the
// block. The reference cells are kept in ascending order by an incremental
// sorted list; the backward (B-ACOSD) and forward (F-ACOSD) censoring
// detectors then run side by side on the same ordered cells and each decides
// whether the CUT is a target. The decision of the algorithm picked by
// alg_sel is written into the result RAM at the CUT's index; both decisions
// and censoring counts are also shown on the cell_* outputs and counted.
//
// Per range cell: 1 cycle sample read, 2 cycles sorted-list update (lagging
// half, then leading half, the window shifting on the second), 1 cycle to
// start the two detectors, then 3 + (number of censoring tests) cycles until
// the slower detector has reported. With N=16, p=12 (1 to 4 tests) a cell
// takes 8..11 cycles, at most 0.11 us at 100 MHz, the per-cell time of the
// source design. The first CUTP window steps, before the CUT holds a real
// cell, take 3 cycles each.
// The window begins filled with zeros, and CUTP zeros follow the last
// sample, so every one of the NCELLS cells is decided; the edge handling is
// this design's choice. The host processor, JTAG UART, bus and PLL of the
// source system are not part of this RTL: their connection is the plain
// load / start / result ports.
//
// Interface: ld_* writes the sample memory (only while idle). start (while
// idle) begins a pass; busy is high during it and done pulses at its end;
// cycles then holds the pass length in clocks. res_addr/res_data read the
// result RAM with one clock latency. cell_valid pulses once per cell with
// cell_idx, b_target/f_target and b_k (cells censored by B-ACOSD) /
// f_k (cells accepted above X(p) by F-ACOSD) and the log2 detection
// thresholds b_log_thr / f_log_thr (Q.10).
module acosd_cfar_top
  import acosd_pkg::*;
#(
  parameter int N      = 16,
  parameter int P      = 12,
  parameter int NGUARD = 2,
  parameter int NCELLS = 256,
  localparam int AW    = $clog2(NCELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  sample_t       ld_data,
  input  logic          start,
  input  logic          alg_sel,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] res_addr,
  output logic          res_data,
  output logic          cell_valid,
  output logic [AW-1:0] cell_idx,
  output logic          b_target,
  output logic          f_target,
  output logic [KW-1:0] b_k,
  output logic [KW-1:0] f_k,
  output thr_t          b_log_thr,
  output thr_t          f_log_thr,
  output logic [15:0]   b_count,
  output logic [15:0]   f_count,
  output logic [31:0]   cycles
);

  localparam int WIN   = N + NGUARD + 1;
  localparam int H     = N / 2;          // reference cells per side
  localparam int GS    = NGUARD / 2;     // guard cells per side
  localparam int CUTP  = H + GS;         // tap of the CUT
  localparam int LAGIN = H + 2 * GS;     // tap that moves into the lagging half
  localparam int NSTEP = NCELLS + CUTP;  // window steps in a pass

  typedef enum logic [2:0] {S_IDLE, S_READ, S_SORT1, S_SORT2, S_RUN, S_WAIT} state_t;

  state_t        state;
  logic [$clog2(NSTEP+1)-1:0] step;
  sample_t       s_in;
  sample_t       taps [WIN];
  sample_t       sorted [N];
  sample_t       mem_q;
  logic          clr, shift, upd;
  sample_t       del_val, ins_val;
  logic          eng_start;
  logic          b_done, f_done, b_seen, f_seen;
  logic          b_tgt, f_tgt;
  logic [KW-1:0] bk, fk;
  thr_t          b_thr, f_thr;
  logic          alg_q;
  logic          rm_we;
  logic [AW-1:0] rm_addr;
  logic          rm_data;
  logic          cell_end;

  sample_mem #(.DEPTH(NCELLS), .DW(DW)) u_samples (
    .clk(clk), .we(ld_we && state == S_IDLE), .waddr(ld_addr), .wdata(ld_data),
    .raddr(AW'(step)), .rdata(mem_q));

  tap_delay_line #(.N(N), .NGUARD(NGUARD)) u_window (
    .clk(clk), .rst_n(rst_n), .clr(clr), .shift(shift), .din(s_in), .taps(taps));

  sorted_list #(.N(N)) u_sort (
    .clk(clk), .rst_n(rst_n), .clr(clr), .upd(upd),
    .del_val(del_val), .ins_val(ins_val), .sorted(sorted));

  b_acosd #(.N(N), .P(P)) u_bacosd (
    .clk(clk), .rst_n(rst_n), .start(eng_start), .sorted(sorted), .cut(taps[CUTP]),
    .done(b_done), .target(b_tgt), .k(bk), .log_thr(b_thr));

  f_acosd #(.N(N), .P(P)) u_facosd (
    .clk(clk), .rst_n(rst_n), .start(eng_start), .sorted(sorted), .cut(taps[CUTP]),
    .done(f_done), .target(f_tgt), .k(fk), .log_thr(f_thr));

  result_mem #(.DEPTH(NCELLS)) u_results (
    .clk(clk), .we(rm_we), .waddr(rm_addr), .wdata(rm_data), .raddr(res_addr), .rdata(res_data));

  // Sorted-list updates: first the lagging half (the oldest tap leaves, the
  // tap behind the guard cells enters), then the leading half (the newest
  // reference tap moves into the guard cells, the new sample enters).
  always_comb begin
    clr       = (state == S_IDLE) && start;
    upd       = (state == S_SORT1) || (state == S_SORT2);
    shift     = (state == S_SORT2);
    del_val   = (state == S_SORT1) ? taps[WIN-1] : taps[H-1];
    ins_val   = (state == S_SORT1) ? taps[LAGIN] : s_in;
    eng_start = (state == S_RUN);
  end

  // A cell is finished when both detectors have reported.
  assign cell_end = (state == S_WAIT) && (b_seen || b_done) && (f_seen || f_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step       <= '0;
      s_in       <= '0;
      b_seen     <= 1'b0;
      f_seen     <= 1'b0;
      alg_q      <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      cycles     <= '0;
      b_count    <= '0;
      f_count    <= '0;
      cell_valid <= 1'b0;
      cell_idx   <= '0;
      b_target   <= 1'b0;
      f_target   <= 1'b0;
      b_k        <= '0;
      f_k        <= '0;
      b_log_thr  <= '0;
      f_log_thr  <= '0;
      rm_we      <= 1'b0;
      rm_addr    <= '0;
      rm_data    <= 1'b0;
    end else begin
      done       <= 1'b0;
      cell_valid <= 1'b0;
      rm_we      <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          step    <= '0;
          alg_q   <= alg_sel;
          busy    <= 1'b1;
          cycles  <= 32'd1;
          b_count <= '0;
          f_count <= '0;
          state   <= S_READ;
        end
        S_READ: state <= S_SORT1;                 // memory read in flight
        S_SORT1: begin
          s_in  <= (int'(step) < NCELLS) ? mem_q : '0;
          state <= S_SORT2;
        end
        S_SORT2: begin
          if (int'(step) >= CUTP) state <= S_RUN;   // CUT holds a real cell
          else begin
            step  <= step + 1'b1;
            state <= S_READ;
          end
        end
        S_RUN: begin
          b_seen <= 1'b0;
          f_seen <= 1'b0;
          state  <= S_WAIT;
        end
        S_WAIT: begin
          if (b_done) b_seen <= 1'b1;
          if (f_done) f_seen <= 1'b1;
          if (cell_end) begin
            cell_valid <= 1'b1;
            cell_idx   <= AW'(int'(step) - CUTP);
            b_target   <= b_tgt;
            f_target   <= f_tgt;
            b_k        <= bk;
            f_k        <= fk;
            b_log_thr  <= b_thr;
            f_log_thr  <= f_thr;
            if (b_tgt) b_count <= b_count + 1'b1;
            if (f_tgt) f_count <= f_count + 1'b1;
            rm_we      <= 1'b1;
            rm_addr    <= AW'(int'(step) - CUTP);
            rm_data    <= alg_q ? f_tgt : b_tgt;
            if (int'(step) == NSTEP - 1) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              step  <= step + 1'b1;
              state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
