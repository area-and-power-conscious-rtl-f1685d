// mv_avg: moving average of the on-time CPICH symbols (AVG).
//
// Keeps the last LEN = 4 despread CPICH symbols of each channel and their
// running sum (11 bits for 9-bit inputs). On every CLK_SYM_PL, while
// START_AVG is high, the newest symbol enters, the oldest leaves, and the
// output register is loaded with the sum shifted right by log2(LEN) = 2.
// The output is therefore new one cycle after CLK_SYM_PL, which is the
// cycle of CHIPX_PL when the CF estimator, frequency-offset estimator and
// power estimator load it. The window starts filled with zeros after reset.
// Length 4, the shift-right division and the sharing of this block by the
// three estimators follow the receiver; the running-sum form is this
// design's.
module mv_avg
  import rake_pkg::*;
#(
  parameter int unsigned LEN = 4    // power of two
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_avg,
  input  logic clk_sym_pl,
  input  sym_t p_demod,
  output sym_t mv_avg_o
);
  localparam int unsigned SH    = $clog2(LEN);
  localparam int unsigned SUM_W = SYM_W + SH;

  sym_t                    win [LEN];
  logic signed [SUM_W-1:0] sum_i, sum_q, nsum_i, nsum_q;

  assign nsum_i = sum_i + SUM_W'(p_demod.i) - SUM_W'(win[LEN-1].i);
  assign nsum_q = sum_q + SUM_W'(p_demod.q) - SUM_W'(win[LEN-1].q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LEN); k++) win[k] <= '0;
      sum_i    <= '0;
      sum_q    <= '0;
      mv_avg_o <= '0;
    end else if (clk_sym_pl && start_avg) begin
      win[0] <= p_demod;
      for (int k = 1; k < int'(LEN); k++) win[k] <= win[k-1];
      sum_i      <= nsum_i;
      sum_q      <= nsum_q;
      mv_avg_o.i <= SYM_W'(nsum_i >>> SH);
      mv_avg_o.q <= SYM_W'(nsum_q >>> SH);
    end
  end
endmodule
