// cf_est: channel / frequency-offset estimator (CF_EST).
//
// With the CPICH pilot symbol equal to 1+j, the averaged despread pilot is
// 2a[(cos - sin) + j(cos + sin)] of the combined channel phase and
// frequency offset. Adding and subtracting its parts gives
//   cf_est_cos = (I + Q) / 2  =  2a cos(theta+phi)
//   cf_est_sin = (I - Q) / 2  = -2a sin(theta+phi)
// The 10-bit sums are truncated to 9 bits by dropping the LSB (lint reports
// that LSB of the sum signals as unused: the truncation is intended). Both
// outputs are registered on CHIPX_PL (once per 256-chip pilot symbol).
// CF_VALID goes high with the first estimate; it is this design's addition
// so that the compensator knows when an estimate exists.
module cf_est
  import rake_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    chipx_pl,
  input  sym_t                    mv_avg,
  output logic signed [SYM_W-1:0] cf_est_cos,
  output logic signed [SYM_W-1:0] cf_est_sin,
  output logic                    cf_valid
);
  logic signed [SYM_W:0] s_cos, s_sin;

  assign s_cos = (SYM_W+1)'(mv_avg.i) + (SYM_W+1)'(mv_avg.q);
  assign s_sin = (SYM_W+1)'(mv_avg.i) - (SYM_W+1)'(mv_avg.q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cf_est_cos <= '0;
      cf_est_sin <= '0;
      cf_valid   <= 1'b0;
    end else if (chipx_pl) begin
      cf_est_cos <= s_cos[SYM_W:1];
      cf_est_sin <= s_sin[SYM_W:1];
      cf_valid   <= 1'b1;
    end
  end
endmodule
