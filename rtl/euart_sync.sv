// euart_sync: synchronisation-pattern detector.
//
// TTP/A and LIN masters open each round with a synchronisation pattern, a
// frame whose transitions are all equidistant. While en_i is high this block
// measures the time between successive transitions of the filtered bus line.
// The first interval becomes the reference; every later interval must lie
// within the reference +/- reference/16 (a tolerance of 2^-4 = 6.25 %, the
// value the document chose). When SYNC_CELLS (8) intervals in a row pass,
// the pattern has been found: done_o pulses and brs_o carries the mean
// interval as a Q12.4 bit period, i.e. sum << 4 / SYNC_CELLS. An interval
// outside the tolerance restarts the search with that interval as the new
// reference; an interval shorter than MIN_CELL clock cycles (too short for
// 16-fold oversampling) or longer than 2^CNT_W-1 cycles restarts it with
// no reference.
//
// The algorithm (equidistant transitions, tolerance 2^-4, pattern of 8 bit
// cells) follows the document. The choice of the first interval as the
// reference, the restart rule and the counter widths are this design's.
//
// Timing: done_o is asserted in the cycle the last edge_i of the pattern
// arrives; brs_o is valid in the same cycle and held afterwards.
module euart_sync
  import euart_pkg::*;
#(
  parameter int unsigned SYNC_CELLS = 8,
  parameter int unsigned CNT_W      = 12,
  parameter int unsigned MIN_CELL   = OVERSAMPLE,
  parameter int unsigned TOL_SHIFT  = 4
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic en_i,      // search for the pattern
  input  logic edge_i,    // transition on the filtered bus line
  output logic done_o,    // pattern found (one cycle)
  output brs_t brs_o      // measured bit period, Q12.4
);

  localparam int unsigned SUM_W = CNT_W + $clog2(SYNC_CELLS);
  localparam int unsigned N_W   = $clog2(SYNC_CELLS + 1);

  logic [CNT_W-1:0] cnt_q, ref_q;
  logic [CNT_W:0]   interval;
  logic [SUM_W-1:0] sum_q, sum_new;
  logic [N_W-1:0]   n_q;
  logic             have_edge_q, ovf_q;
  logic [CNT_W:0]   diff;
  logic             in_tol, too_short, too_long;
  brs_t             brs_q;

  always_comb begin
    interval  = {1'b0, cnt_q} + 1'b1;
    too_short = interval < (CNT_W+1)'(MIN_CELL);
    too_long  = ovf_q;
    diff      = (interval > {1'b0, ref_q}) ? interval - {1'b0, ref_q}
                                           : {1'b0, ref_q} - interval;
    in_tol    = diff <= (CNT_W+1)'(ref_q >> TOL_SHIFT);
    sum_new   = sum_q + SUM_W'(interval);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q       <= '0;
      ref_q       <= '0;
      sum_q       <= '0;
      n_q         <= '0;
      have_edge_q <= 1'b0;
      ovf_q       <= 1'b0;
      done_o      <= 1'b0;
      brs_q       <= '0;
    end else begin
      done_o <= 1'b0;
      if (!en_i) begin
        have_edge_q <= 1'b0;
        n_q         <= '0;
        cnt_q       <= '0;
        ovf_q       <= 1'b0;
      end else if (edge_i) begin
        cnt_q       <= '0;
        ovf_q       <= 1'b0;
        have_edge_q <= 1'b1;
        if (!have_edge_q || too_short || too_long) begin
          n_q <= '0;                       // this edge opens a new search
        end else if (n_q == '0 || !in_tol) begin
          ref_q <= interval[CNT_W-1:0];    // first interval of a new search
          sum_q <= SUM_W'(interval);
          n_q   <= N_W'(1);
        end else if (n_q == N_W'(SYNC_CELLS - 1)) begin
          n_q    <= '0;
          done_o <= 1'b1;
          brs_q  <= BRS_W'(((SUM_W+BRS_FRAC)'(sum_new) << BRS_FRAC)
                             >> $clog2(SYNC_CELLS));
        end else begin
          sum_q <= sum_new;
          n_q   <= n_q + 1'b1;
        end
      end else if (&cnt_q) begin
        ovf_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign brs_o = brs_q;

endmodule
