// freq_est: frequency-offset estimator front end (FREQ_EST).
//
// For consecutive averaged pilot symbols P(n) and P(n-1) it forms
// P(n) * conj(P(n-1)):
//   cos term = I(n)I(n-1) + Q(n)Q(n-1)      ~ 8a^2 cos(dphi)
//   sin term = Q(n)I(n-1) - I(n)Q(n-1)      ~ 8a^2 sin(dphi)
// with four 9x9 multipliers (18-bit products, 19-bit sums), and adds them
// into two accumulators over one frame of SYMS_PER_FRAME pilot symbols
// (150). At the end of the frame the untruncated 27-bit sums are
// registered on FREQ_EST_COS / FREQ_EST_SIN and FREQ_EST_AV pulses for one
// cycle (the interrupt to the DSP, which does the division and arctangent).
// Inputs are loaded on CHIPX_PL. The symbol counter restarts with the
// finger reset, which precedes the first pilot symbol of a frame. The
// structure and widths follow the receiver's frequency-offset estimator.
module freq_est
  import rake_pkg::*;
#(
  parameter int unsigned SYMS_PER_FRAME = 150
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     chipx_pl,
  input  sym_t                     mv_avg,
  output logic signed [FREQ_W-1:0] freq_est_cos,
  output logic signed [FREQ_W-1:0] freq_est_sin,
  output logic                     freq_est_av
);
  sym_t                      prev;
  logic signed [2*SYM_W-1:0] p_ii, p_qq, p_qi, p_iq;
  logic signed [2*SYM_W:0]   t_cos, t_sin;
  logic signed [FREQ_W-1:0]  acc_c, acc_s, n_c, n_s;
  logic [15:0]               nsym;

  assign p_ii  = mv_avg.i * prev.i;
  assign p_qq  = mv_avg.q * prev.q;
  assign p_qi  = mv_avg.q * prev.i;
  assign p_iq  = mv_avg.i * prev.q;
  assign t_cos = (2*SYM_W+1)'(p_ii) + (2*SYM_W+1)'(p_qq);
  assign t_sin = (2*SYM_W+1)'(p_qi) - (2*SYM_W+1)'(p_iq);
  assign n_c   = acc_c + FREQ_W'(t_cos);
  assign n_s   = acc_s + FREQ_W'(t_sin);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev         <= '0;
      acc_c        <= '0;
      acc_s        <= '0;
      nsym         <= '0;
      freq_est_cos <= '0;
      freq_est_sin <= '0;
      freq_est_av  <= 1'b0;
    end else begin
      freq_est_av <= 1'b0;
      if (chipx_pl) begin
        prev <= mv_avg;
        if (nsym == 16'(SYMS_PER_FRAME - 1)) begin
          freq_est_cos <= n_c;
          freq_est_sin <= n_s;
          freq_est_av  <= 1'b1;
          acc_c        <= '0;
          acc_s        <= '0;
          nsym         <= '0;
        end else begin
          acc_c <= n_c;
          acc_s <= n_s;
          nsym  <= nsym + 1'b1;
        end
      end
    end
  end
endmodule
