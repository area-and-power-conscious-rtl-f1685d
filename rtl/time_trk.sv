// time_trk: early/late time tracker (TIME_TRK).
//
// On every CPICH symbol (CLK_SYM_PL while START_TIME_TRK is high) the
// magnitudes of the early and late despread pilot symbols are estimated
// (max + min/2, as in the power estimator) and their difference
//   e = |early| - |late|
// drives a second-order loop filter: a proportional path K1*e and an
// integral path K2*sum(e), with K1 = 2^-K1_SHIFT and K2 = 2^-K2_SHIFT
// realised as shifts. Internally everything is scaled by 2^FRAC so that
// the small coefficients keep their precision; the integrator saturates.
// The filter output is summed over the frame. On TIME_REQ (once a frame,
// from the clock generator) the accumulated value, scaled back by 2^FRAC,
// is compared with TIME_TRK_TH: above +TH gives LEAD (advance sampling by
// 1/8 chip), below -TH gives LAG (delay by 1/8 chip), otherwise NONE. The
// accumulator then restarts; the integrator keeps its state.
// A stronger early sample means the chip peak lies before the on-time
// sample, so sampling must move earlier: e > 0 drives LEAD. This keeps the
// loop stable with the input buffer's sample order and the clock
// generator's LEAD = offset - 1; it agrees with the rule "positive
// accumulator -> advance" of the receiver's tracker. Loop structure, shift coefficients (K2 = 2^-13 from the
// coefficient table) and threshold width follow the receiver; K1 = 2^-2,
// FRAC and the saturation are this design's choices.
module time_trk
  import rake_pkg::*;
#(
  parameter int unsigned K1_SHIFT = 2,
  parameter int unsigned K2_SHIFT = 13,
  parameter int unsigned FRAC     = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_time_trk,
  input  logic         clk_sym_pl,
  input  logic         time_req,
  input  logic [17:0]  time_trk_th,
  input  sym_t         p_early,
  input  sym_t         p_late,
  output lead_lag_e    lead_lag
);
  localparam int INT_W = 20;
  localparam int ACC_W = 40;
  localparam logic signed [INT_W-1:0] INT_MAX = {1'b0, {(INT_W-1){1'b1}}};
  localparam logic signed [INT_W-1:0] INT_MIN = {1'b1, {(INT_W-1){1'b0}}};

  logic signed [MAG_W:0]   e;
  logic signed [INT_W:0]   integ_sum;
  logic signed [INT_W-1:0] integ, integ_n;
  logic signed [ACC_W-1:0] y, acc, scaled;

  assign e         = $signed({1'b0, mag_approx(p_early.i, p_early.q)}) -
                     $signed({1'b0, mag_approx(p_late.i, p_late.q)});
  assign integ_sum = (INT_W+1)'(integ) + (INT_W+1)'(e);
  always_comb begin
    if (integ_sum > (INT_W+1)'(INT_MAX))      integ_n = INT_MAX;
    else if (integ_sum < (INT_W+1)'(INT_MIN)) integ_n = INT_MIN;
    else                                      integ_n = INT_W'(integ_sum);
  end
  assign y      = (ACC_W'(e) <<< (FRAC - K1_SHIFT)) + (ACC_W'(integ_n) <<< (FRAC - K2_SHIFT));
  assign scaled = acc >>> FRAC;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ    <= '0;
      acc      <= '0;
      lead_lag <= LL_NONE;
    end else begin
      if (time_req) begin
        if (scaled > $signed(ACC_W'(time_trk_th)))        lead_lag <= LL_LEAD;
        else if (scaled < -$signed(ACC_W'(time_trk_th)))  lead_lag <= LL_LAG;
        else                                              lead_lag <= LL_NONE;
        acc <= '0;
      end else if (clk_sym_pl && start_time_trk) begin
        integ <= integ_n;
        acc   <= acc + y;
      end
    end
  end
endmodule
